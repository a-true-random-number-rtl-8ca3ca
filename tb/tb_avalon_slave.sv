// tb_avalon_slave: self-checking test of the bus slave port decode.
//
// Random chipselect/address/read/write combinations: readdata must show the
// data register at address 0 and the status register at address 1, the
// data_read strobe must fire only for a selected read of address 0 and
// status_wr only for a selected write of address 1.
`timescale 1ps / 1fs
module tb_avalon_slave;
  import trng_pkg::*;

  logic              chipselect, read, write;
  logic [ADDR_W-1:0] address;
  logic [BUS_W-1:0]  writedata, readdata, data_q, status_q, wr_data;
  logic              data_read, status_wr;
  int                checks = 0, failures = 0;

  avalon_slave dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_rd = 0, n_wr = 0;
    for (int i = 0; i < 2000; i++) begin
      chipselect = 1'($urandom);
      read       = 1'($urandom);
      write      = 1'($urandom);
      address    = ADDR_W'($urandom);
      writedata  = $urandom;
      data_q     = $urandom;
      status_q   = $urandom;
      #1000;
      checks++;
      if (readdata !== (address == 1'b0 ? data_q : status_q)) begin
        failures++; $display("readdata %h at address %0d", readdata, address);
      end
      checks++;
      if (data_read !== (chipselect && read && address == 1'b0)) begin failures++; $display("data_read wrong"); end
      checks++;
      if (status_wr !== (chipselect && write && address == 1'b1)) begin failures++; $display("status_wr wrong"); end
      if (status_wr) begin
        checks++;
        if (wr_data !== writedata) begin failures++; $display("wr_data wrong"); end
      end
      if (data_read) n_rd++;
      if (status_wr) n_wr++;
    end
    checks++; if (n_rd == 0 || n_wr == 0) begin failures++; $display("strobes never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
