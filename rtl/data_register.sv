// data_register: output data register of the PLL-jitter TRNG.
//
// Holds the last complete random word for the bus master. It is loaded from
// the serial/parallel converter in a cycle where the control unit raises en,
// and keeps its value otherwise; q changes on the clk edge that ends the en
// cycle.
//
// The register and its En input follow the generator's block diagram; the
// reset value (zero) is this design's own choice.
`timescale 1ps / 1fs
module data_register #(
  parameter int unsigned WORD_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [WORD_W-1:0] d,
  output logic [WORD_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
