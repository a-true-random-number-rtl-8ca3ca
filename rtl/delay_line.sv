// delay_line: behavioural model of the delay elements in front of the
// optional extra samplers (not synthesizable).
//
// Produces TAPS copies of the jittered PLL clock: tap 0 is the clock itself
// and tap i is tap i-1 delayed by DELTA_FS femtoseconds, so sampler i sees
// the clock i*DELTA_FS later and samples a different point of its period.
// On an FPGA such a delay would be a chain of logic cells or routing, placed
// by hand; here it is modelled as an inertial delay.
//
// The chain of delay elements between the samplers follows the generator's
// structure; the delay value is this design's own choice, and the basic
// configuration uses a single tap (no delay element).
`timescale 1ps / 1fs
module delay_line #(
  parameter int unsigned TAPS     = 1,
  parameter int unsigned DELTA_FS = 50000
) (
  input  logic            din,
  output logic [TAPS-1:0] taps
);

  assign taps[0] = din;

  for (genvar i = 1; i < TAPS; i++) begin : g_delay
    assign #(real'(DELTA_FS) / 1000.0) taps[i] = taps[i-1];
  end

endmodule
