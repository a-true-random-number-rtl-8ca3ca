// xor_decimator: XOR decimator of the PLL-jitter TRNG.
//
// XORs K_D consecutive samples q(nT_CLK) into one output bit. With the
// sampled clock running at K_M/K_D times the sampling clock, the sample
// pattern repeats every K_D cycles, so one window holds every sampling phase
// exactly once: its deterministic part XORs to a constant and the samples
// taken in the jitter zone make the result random.
//
// Interface: while run is 1 one sample is taken per clk cycle; when run is
// 0 the window restarts. bit_valid pulses for one cycle with bit_out after
// the K_D-th sample of a window, so one bit leaves every K_D cycles.
//
// The window length K_D (= n*k of the PLL, 133 for the 139/133 EPLL ratio)
// follows the generator's description; the counter and accumulator are this
// design's own, the simplest circuit with that function.
`timescale 1ps / 1fs
module xor_decimator #(
  parameter int unsigned K_D = 133
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  input  logic sample,
  output logic bit_out,
  output logic bit_valid
);

  localparam int unsigned CNT_W = (K_D > 1) ? $clog2(K_D) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(K_D - 1);

  logic [CNT_W-1:0] cnt;
  logic             acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= 1'b0;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (!run) begin
        cnt <= '0;
        acc <= 1'b0;
      end else if (cnt == LAST) begin
        cnt       <= '0;
        acc       <= 1'b0;
        bit_out   <= acc ^ sample;
        bit_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        acc <= acc ^ sample;
      end
    end
  end

endmodule
