// xor_corrector: the sampling circuit of the PLL-jitter TRNG.
//
// N_SAMPLERS D flip-flops, all clocked by the system clock CLK, sample the
// jittered PLL clock CLJ (tap 0) and optionally delayed copies of it (taps
// 1..N-1, made outside this module by delay elements). Their outputs are
// XORed into one sample q(nT_CLK) per CLK cycle. Because CLJ and CLK are
// rationally related, the sampling point walks through the CLJ period and now
// and then lands inside the jitter zone around a CLJ edge; that flip-flop then
// captures an unpredictable value.
//
// Interface: clj_taps is asynchronous to clk on purpose. q is combinational
// from the sampling flip-flops and is valid one clk edge after the taps were
// sampled; the decimator that follows registers it.
//
// Follows the generator's structure: D flip-flops clocked by CLK with data
// from CLJ and an XOR of their outputs; one sampler (N_SAMPLERS = 1) is the
// basic configuration, the extra samplers are optional. Own choices:
// asynchronous active-low reset of the sampling flip-flops, and no
// synchronizer stage (a metastable sample only adds to the randomness; the
// decimator flip-flop gives it one more cycle to settle).
`timescale 1ps / 1fs
module xor_corrector #(
  parameter int unsigned N_SAMPLERS = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_SAMPLERS-1:0] clj_taps,
  output logic                  q
);

  logic [N_SAMPLERS-1:0] d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_q <= '0;
    else        d_q <= clj_taps;
  end

  assign q = ^d_q;

endmodule
