// sp_converter: serial/parallel converter of the PLL-jitter TRNG.
//
// Shifts the random bits from the XOR decimator into a WORD_W-bit word, the
// first bit ending up in the most significant position. When WORD_W bits are
// in, ready goes high and stays high, and further bits are dropped, until the
// control unit takes the word with a one-cycle take (the En that also loads
// the data register). clear empties the converter.
//
// Interface: bit_in is accepted in a cycle where bit_valid is 1 and ready is
// 0. ready rises in the cycle after the last bit is accepted. After take the
// converter is empty and accepts a bit in the next cycle.
//
// The converter and its Ready output follow the generator's block diagram;
// the word width (32, the bus width), the bit order and the stall-while-full
// behaviour are this design's own choices.
`timescale 1ps / 1fs
module sp_converter #(
  parameter int unsigned WORD_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              bit_in,
  input  logic              bit_valid,
  input  logic              take,
  output logic [WORD_W-1:0] word,
  output logic              ready
);

  localparam int unsigned CNT_W = $clog2(WORD_W + 1);

  logic [CNT_W-1:0] count;

  assign ready = (count == CNT_W'(WORD_W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word  <= '0;
      count <= '0;
    end else if (clear || (take && ready)) begin
      count <= '0;
    end else if (bit_valid && !ready) begin
      word  <= {word[WORD_W-2:0], bit_in};
      count <= count + 1'b1;
    end
  end

endmodule
