// tb_trng_top_corrector: the XOR corrector against an unfavourable PLL phase.
//
// Three generators share one 48.99 MHz system clock. The samples of one
// window lie on a grid of step T_CLJ/133 = 146.8 ps across the CLJ period;
// as 133 is odd the falling edge sits half a step off the rising one. The
// PLLs here are placed a quarter step (36.7 ps) off the grid, the worst
// phase: both CLJ edges are 2.3 sigma from the nearest sample.
//   u_one   one sampler, 16 ps jitter: the decimated bits are almost
//           constant (fewer than 5 % of them differ from their predecessor);
//   u_four  four samplers behind 36.7 ps delay elements: two of them see
//           a CLJ edge shifted onto the grid, and the share of ones lies between
//           0.35 and 0.65;
//   u_calm  four samplers but no jitter: every bit is the same, since
//           without jitter a window of 133 samples always holds the same
//           pattern.
// Bits are taken from the raw decimated stream after PLL lock.
`timescale 1ps / 1fs
module tb_trng_top_corrector;
  import trng_pkg::*;
  localparam realtime     T_CLK = 20412.359;
  localparam int unsigned QUARTER_FS   = 36711;   // 19531.25 ps / 133 / 4
  localparam int unsigned DELTA_FS     = 36711;   // grid step / 4
  localparam int unsigned NBITS        = 400;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [BUS_W-1:0] rd_one, rd_four, rd_calm;
  logic             b_one, v_one, l_one, b_four, v_four, l_four, b_calm, v_calm, l_calm;
  logic [1:0]       s_one, s_four, s_calm;
  int               checks = 0, failures = 0;

  trng_top #(.N_SAMPLERS(1), .PHASE_FS(QUARTER_FS)) u_one (
    .clk(clk), .rst_n(rst_n), .av_chipselect(1'b0), .av_address(1'b0), .av_read(1'b0),
    .av_write(1'b0), .av_writedata('0), .av_readdata(rd_one),
    .rnd_bit(b_one), .rnd_bit_valid(v_one), .pll_locked(l_one), .cu_state(s_one));

  trng_top #(.N_SAMPLERS(4), .DELTA_FS(DELTA_FS), .PHASE_FS(QUARTER_FS)) u_four (
    .clk(clk), .rst_n(rst_n), .av_chipselect(1'b0), .av_address(1'b0), .av_read(1'b0),
    .av_write(1'b0), .av_writedata('0), .av_readdata(rd_four),
    .rnd_bit(b_four), .rnd_bit_valid(v_four), .pll_locked(l_four), .cu_state(s_four));

  trng_top #(.N_SAMPLERS(4), .DELTA_FS(DELTA_FS), .PHASE_FS(QUARTER_FS), .JITTER_FS(0)) u_calm (
    .clk(clk), .rst_n(rst_n), .av_chipselect(1'b0), .av_address(1'b0), .av_read(1'b0),
    .av_write(1'b0), .av_writedata('0), .av_readdata(rd_calm),
    .rnd_bit(b_calm), .rnd_bit_valid(v_calm), .pll_locked(l_calm), .cu_state(s_calm));

  always #(T_CLK / 2.0) clk = ~clk;

  initial begin
    #(T_CLK * 200000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bits counted from the third window after the first output edge on.
  int n[3] = '{0, 0, 0}, ones[3] = '{0, 0, 0}, chg[3] = '{0, 0, 0};
  logic last[3];

  task automatic take(int k, logic b);
    if (n[k] > 0 && b != last[k]) chg[k]++;
    if (b) ones[k]++;
    last[k] = b;
    n[k]++;
  endtask

  int skip = 0;
  always @(posedge clk) begin
    if (l_one && v_one) begin
      if (skip < 3) skip++;
      else begin
        take(0, b_one);
        take(1, b_four);
        take(2, b_calm);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (n[0] >= NBITS);
    $display("one sampler : %0d bits, %0d ones, %0d changes", n[0], ones[0], chg[0]);
    $display("four        : %0d bits, %0d ones, %0d changes", n[1], ones[1], chg[1]);
    $display("no jitter   : %0d bits, %0d ones, %0d changes", n[2], ones[2], chg[2]);
    checks++; if (chg[0] * 20 > n[0]) begin failures++; $display("single sampler not near-constant"); end
    checks++; if (ones[1] * 100 < 35 * n[1] || ones[1] * 100 > 65 * n[1]) begin failures++; $display("corrector output biased"); end
    checks++; if (chg[1] == 0) begin failures++; $display("corrector output constant"); end
    checks++; if (chg[2] != 0) begin failures++; $display("jitter-free output not constant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
