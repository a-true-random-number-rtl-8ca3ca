// status_register: status register of the PLL-jitter TRNG.
//
// Two bits, read by the bus master over the Avalon port:
//   VALID  (bit 0, read-only)   set when the control unit loads a new word
//          into the data register, cleared when the master reads that word;
//          a set request wins over a clear in the same cycle.
//   ENABLE (bit 1, read/write)  the generator runs while it is 1; written by
//          the master through the bus (wr_en with wr_data).
// The other bits read as zero.
//
// Interface: all inputs are sampled on the rising clk edge; q shows the new
// value from the next cycle on.
//
// That the status register exists and is written over the bus follows the
// generator's block diagram; the two bits, their positions and their reset
// values (VALID 0, ENABLE 1) are this design's own choices.
`timescale 1ps / 1fs
module status_register
  import trng_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             set_valid,
  input  logic             clr_valid,
  input  logic             wr_en,
  input  logic [BUS_W-1:0] wr_data,
  output logic [BUS_W-1:0] q,
  output logic             valid,
  output logic             enable
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      enable <= ENABLE_RESET;
    end else begin
      if (set_valid)      valid <= 1'b1;
      else if (clr_valid) valid <= 1'b0;
      if (wr_en) enable <= wr_data[ST_ENABLE];
    end
  end

  always_comb begin
    q            = '0;
    q[ST_VALID]  = valid;
    q[ST_ENABLE] = enable;
  end

endmodule
