// avalon_slave: bus slave port of the PLL-jitter TRNG.
//
// Decodes an Avalon-style slave access (chipselect, address, read, write,
// writedata, readdata) onto the two TRNG registers of trng_pkg: address 0
// reads the data register, address 1 reads and writes the status register.
//
// Timing: zero wait states with combinational readdata, valid in the cycle
// in which chipselect and read are high. data_read and status_wr are the
// one-cycle strobes for that access; the registers act on them at the clk
// edge that ends the cycle. Writes to the data register are ignored.
//
// The signal names Readdata, Writedata, Address and Chipselect follow the
// generator's block diagram; the read and write strobes, the zero-wait-state
// timing and the register map are this design's own choices.
`timescale 1ps / 1fs
module avalon_slave
  import trng_pkg::*;
(
  input  logic              chipselect,
  input  logic [ADDR_W-1:0] address,
  input  logic              read,
  input  logic              write,
  input  logic [BUS_W-1:0]  writedata,
  output logic [BUS_W-1:0]  readdata,
  input  logic [BUS_W-1:0]  data_q,
  input  logic [BUS_W-1:0]  status_q,
  output logic              data_read,
  output logic              status_wr,
  output logic [BUS_W-1:0]  wr_data
);

  always_comb begin
    unique case (address)
      ADDR_DATA:   readdata = data_q;
      ADDR_STATUS: readdata = status_q;
      default:     readdata = '0;
    endcase
  end

  assign data_read = chipselect && read  && (address == ADDR_DATA);
  assign status_wr = chipselect && write && (address == ADDR_STATUS);
  assign wr_data   = writedata;

endmodule
