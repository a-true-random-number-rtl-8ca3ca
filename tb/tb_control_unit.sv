// tb_control_unit: self-checking test of the control unit.
//
// Directed start-up sequence, then random enable/valid/ready/data_read
// stimulus compared cycle by cycle with a reference of the four-state
// machine: IDLE (run 0) -> WAIT -> LOAD (en, set_valid one cycle) -> HOLD ->
// WAIT on a data read; enable 0 forces IDLE; IDLE returns to HOLD when an
// unread word is waiting. Each state and transition must be seen.
`timescale 1ps / 1fs
module tb_control_unit;
  import trng_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      enable = 1'b0, valid = 1'b0, ready = 1'b0, data_read = 1'b0;
  logic      run, en, set_valid, clr_valid;
  cu_state_e state;
  int        checks = 0, failures = 0;

  control_unit dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state as plain integers: 0 idle, 1 wait, 2 load, 3 hold
  int rs = 0;
  int seen[4] = '{0, 0, 0, 0};
  int idle_to_hold = 0;

  task automatic compare(int i);
    checks++;
    if (int'(state) != rs) begin failures++; $display("cycle %0d state %0d exp %0d", i, state, rs); end
    checks++;
    if (run !== (rs != 0) || en !== (rs == 2) || set_valid !== (rs == 2)) begin
      failures++; $display("cycle %0d outputs run %b en %b set %b in state %0d", i, run, en, set_valid, rs);
    end
    checks++;
    if (clr_valid !== (data_read && (rs == 3 || rs == 0))) begin failures++; $display("cycle %0d clr_valid", i); end
  endtask

  function automatic int step(int s);
    if (!enable) return 0;
    case (s)
      0: return valid ? 3 : 1;
      1: return ready ? 2 : 1;
      2: return 3;
      default: return data_read ? 1 : 3;
    endcase
  endfunction

  initial begin
    #12000 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      compare(i);
      seen[rs]++;
      enable    = ($urandom % 16) != 0;
      valid     = 1'($urandom);
      ready     = ($urandom % 3) == 0;
      data_read = ($urandom % 4) == 0;
      if (rs == 0 && enable && valid) idle_to_hold++;
      rs = step(rs);
    end
    foreach (seen[k]) begin
      checks++; if (seen[k] < 10) begin failures++; $display("state %0d seen %0d times", k, seen[k]); end
    end
    checks++; if (idle_to_hold == 0) begin failures++; $display("IDLE->HOLD never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
