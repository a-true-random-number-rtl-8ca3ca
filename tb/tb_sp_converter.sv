// tb_sp_converter: self-checking test of the serial/parallel converter.
//
// Offers random bits with random valid strobes and keeps its own list of the
// bits accepted. Each time ready rises the word must hold the last 32
// accepted bits, first bit in the MSB; while ready is high offered bits must
// be dropped; take empties the converter, and clear drops a partial word.
`timescale 1ps / 1fs
module tb_sp_converter;
  localparam int unsigned W = 32;

  logic         clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic         bit_in = 1'b0, bit_valid = 1'b0, take = 1'b0;
  logic [W-1:0] word;
  logic         ready;
  int           checks = 0, failures = 0;

  sp_converter #(.WORD_W(W)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] ref_word;
  int           ref_cnt;
  int           stalls = 0, words = 0;

  initial begin
    ref_word = '0; ref_cnt = 0;
    #12000 rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // check state left by the previous edge
      checks++;
      if (ready !== (ref_cnt == W)) begin failures++; $display("cycle %0d ready %b cnt %0d", i, ready, ref_cnt); end
      if (ready && ref_cnt == W) begin
        checks++;
        if (word !== ref_word) begin failures++; $display("word %h exp %h", word, ref_word); end
      end
      // drive the next cycle
      bit_in    = 1'($urandom);
      bit_valid = ($urandom % 3) != 0;
      take      = ready && (($urandom % 4) == 0);
      clear     = (i == 3000);
      // reference update at the coming edge
      if (clear || (take && ref_cnt == W)) begin
        if (take && !clear) words++;
        ref_cnt = 0;
      end else if (bit_valid && ref_cnt < W) begin
        ref_word = {ref_word[W-2:0], bit_in};
        ref_cnt++;
      end else if (bit_valid) begin
        stalls++;
      end
    end
    checks++; if (words < 20) begin failures++; $display("only %0d words", words); end
    checks++; if (stalls < 10) begin failures++; $display("only %0d stalls", stalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
