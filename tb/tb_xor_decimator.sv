// tb_xor_decimator: self-checking test of the XOR decimator at K_D = 133.
//
// Feeds random samples, keeps its own XOR of each window of K_D samples and
// compares it with every output bit. Checks that an output bit appears
// exactly every K_D cycles, and that dropping run restarts the window.
`timescale 1ps / 1fs
module tb_xor_decimator;
  localparam int unsigned K_D = 133;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, sample = 1'b0;
  logic bit_out, bit_valid;
  int   checks = 0, failures = 0;

  xor_decimator #(.K_D(K_D)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: count samples taken while run is 1.
  int  n_in = 0;
  bit  ref_acc = 1'b0;
  bit  exp_q[$];
  longint cyc = 0, last_out = -1;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (!run) begin
        n_in = 0; ref_acc = 1'b0;
      end else begin
        ref_acc ^= sample;
        n_in++;
        if (n_in == K_D) begin
          exp_q.push_back(ref_acc);
          n_in = 0; ref_acc = 1'b0;
        end
      end
    end
  end

  int n_out = 0;
  always @(negedge clk) begin
    if (bit_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output bit");
      end else begin
        bit e;
        e = exp_q.pop_front();
        if (bit_out !== e) begin failures++; $display("bit %0d: got %b exp %b", n_out, bit_out, e); end
      end
      if (last_out >= 0 && run_steady) begin
        checks++;
        if (cyc - last_out != K_D) begin failures++; $display("interval %0d", cyc - last_out); end
      end
      last_out = cyc;
      n_out++;
    end
  end

  bit run_steady = 1'b0;

  initial begin
    #12000 rst_n = 1'b1;
    @(negedge clk);
    run = 1'b1;
    repeat (5 * K_D + 40) begin
      sample = 1'($urandom);
      @(negedge clk);
      run_steady = 1'b1;
    end
    // pause mid-window: window must restart
    run_steady = 1'b0;
    run = 1'b0;
    last_out = -1;
    repeat (7) @(negedge clk);
    run = 1'b1;
    repeat (20 * K_D) begin
      sample = 1'($urandom);
      @(negedge clk);
      if (last_out >= 0) run_steady = 1'b1;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != 25) begin failures++; $display("output count %0d, expected 25", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
