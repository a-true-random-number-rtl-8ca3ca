// tb_status_register: self-checking test of the status register.
//
// Random set/clear requests and bus writes against a reference model:
// VALID is set by set_valid (which wins over clr_valid) and cleared by
// clr_valid; ENABLE takes bit 1 of a bus write; other bits read 0; reset
// gives VALID = 0, ENABLE = 1.
`timescale 1ps / 1fs
module tb_status_register;
  import trng_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             set_valid = 1'b0, clr_valid = 1'b0, wr_en = 1'b0;
  logic [BUS_W-1:0] wr_data = '0, q;
  logic             valid, enable;
  logic             ev, ee;
  int               checks = 0, failures = 0;

  status_register dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12000;
    ev = 1'b0; ee = 1'b1;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (valid !== ev || enable !== ee || q !== {30'd0, ee, ev}) begin
        failures++; $display("cycle %0d q %h valid %b enable %b exp %b %b", i, q, valid, enable, ev, ee);
      end
      set_valid = ($urandom % 5) == 0;
      clr_valid = ($urandom % 3) == 0;
      wr_en     = ($urandom % 6) == 0;
      wr_data   = $urandom;
      if (set_valid)      ev = 1'b1;
      else if (clr_valid) ev = 1'b0;
      if (wr_en) ee = wr_data[1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
