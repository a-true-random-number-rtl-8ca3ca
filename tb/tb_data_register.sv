// tb_data_register: self-checking test of the data register.
//
// Random words with random load enables; q must follow d only on cycles
// with en, and hold otherwise. Also checks the reset value.
`timescale 1ps / 1fs
module tb_data_register;
  localparam int unsigned W = 32;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '1, q;
  logic [W-1:0] expq;
  int           checks = 0, failures = 0;

  data_register #(.WORD_W(W)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12000;
    checks++; if (q !== '0) begin failures++; $display("reset value %h", q); end
    expq = '0;
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (q !== expq) begin failures++; $display("cycle %0d q %h exp %h", i, q, expq); end
      d  = $urandom;
      en = ($urandom % 4) == 0;
      if (en) expq = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
