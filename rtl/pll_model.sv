// pll_model: behavioural model of the on-chip analog PLL (not synthesizable).
//
// Stands in for the FPGA's analog PLL, which a synthesis tool maps to the
// device's PLL primitive. It synthesizes clk_out with
//     F_OUT = F_IN * M / (N * K)
// (reference divider N, feedback divider M, post divider K), phase-locked to
// clk_in, and adds the random jitter an analog PLL shows: every output edge
// is moved from its ideal time by an independent, approximately Gaussian
// offset (sum of twelve uniform variates) of RMS value JITTER_FS
// femtoseconds, limited to a quarter of the output period. The jitter does
// not accumulate, as in a locked loop.
//
// How it works: the model measures the input period from the first two
// rising input edges and then treats every (N*K)-th rising input edge as an
// anchor. N*K input periods hold exactly M output periods, so the output
// edges of one anchor interval lie on a fixed grid: rising edge i at
// anchor + PHASE_FS + i*T_OUT. Each anchor starts a process that emits the
// 2*M edges of the following interval, one interval ahead, so that an edge
// pulled early by the jitter can still be scheduled before the anchor it
// precedes. locked rises at the first anchor; clk_out is 0 until the first
// edge, one anchor interval later.
//
// PHASE_FS is the static phase of the output against the input clock. In
// the generator it decides which samples fall next to an output edge: at 0
// one sample per window of N*K input cycles sits right on a rising edge.
//
// Ports follow a PLL primitive: clk_in, clk_out, locked. The ratio 139/133,
// the 16 ps RMS jitter and the 51.2 MHz output follow the enhanced PLL the
// generator uses; the split of 133 into N = 19 and K = 7 (keeping the VCO,
// F_IN*M/N = 358 MHz, inside that PLL's 300-800 MHz range) and the phase
// parameter are this design's own choices.
`timescale 1ps / 1fs
module pll_model #(
  parameter int unsigned M         = 139,
  parameter int unsigned N         = 19,
  parameter int unsigned K         = 7,
  parameter int unsigned JITTER_FS = 16000,
  parameter int unsigned PHASE_FS  = 0
) (
  input  logic clk_in,
  output logic clk_out,
  output logic locked
);

  localparam int unsigned NK = N * K;

  realtime     t_half;      // ideal half period of clk_out
  realtime     t_frame;     // length of one anchor interval
  realtime     t_anchor;    // time of the latest anchor edge
  event        anchor_ev;

  // Standard normal variate from twelve uniform ones.
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // Emit the 2*M edges of the interval that starts one interval after t0.
  task automatic emit_frame(input realtime t0);
    realtime base, target, j, lim;
    base = t0 + t_frame + real'(PHASE_FS) / 1000.0;
    lim  = t_half / 2.0;
    for (int unsigned i = 0; i < 2 * M; i++) begin
      j = real'(JITTER_FS) / 1000.0 * gauss();
      if (j >  lim) j =  lim;
      if (j < -lim) j = -lim;
      target = base + real'(i) * t_half + j;
      if (target > $realtime) #(target - $realtime);
      clk_out = (i % 2 == 0);
    end
  endtask

  // Input side: period measurement and anchor edges.
  initial begin
    realtime t_prev;
    int unsigned edge_cnt;
    locked   = 1'b0;
    clk_out  = 1'b0;
    edge_cnt = 0;
    @(posedge clk_in);
    t_prev = $realtime;
    @(posedge clk_in);
    t_frame = ($realtime - t_prev) * real'(NK);
    t_half  = t_frame / (2.0 * real'(M));
    forever begin
      if (edge_cnt == 0) begin
        t_anchor = $realtime;
        locked   = 1'b1;
        ->anchor_ev;
      end
      edge_cnt = (edge_cnt == NK - 1) ? 0 : edge_cnt + 1;
      @(posedge clk_in);
    end
  end

  // Output side: one emitting process per anchor interval.
  initial begin
    forever begin
      @(anchor_ev);
      fork
        emit_frame(t_anchor);
      join_none
    end
  end

endmodule
