// tb_xor_corrector: self-checking test of the sampling circuit.
//
// Runs a three-sampler corrector: random tap values are driven away from the
// clock edge, and after every rising edge q must equal the XOR of the taps
// present at that edge. Also checks the reset value.
`timescale 1ps / 1fs
module tb_xor_corrector;
  localparam int unsigned N = 3;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] taps = '0;
  logic         q;
  int           checks = 0, failures = 0;

  xor_corrector #(.N_SAMPLERS(N)) dut (.clk(clk), .rst_n(rst_n), .clj_taps(taps), .q(q));

  always #5000 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] applied;
    int ones = 0;
    taps = 3'b101;
    #12000;
    checks++; if (q !== 1'b0) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      applied = 3'($urandom);
      taps    = applied;
      @(posedge clk);
      #1000;
      checks++;
      if (q !== (applied[0] ^ applied[1] ^ applied[2])) begin
        failures++;
        $display("cycle %0d taps %b q %b", i, applied, q);
      end
      if (q) ones++;
    end
    checks++; if (ones < 150 || ones > 350) begin failures++; $display("q stuck: %0d ones", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
