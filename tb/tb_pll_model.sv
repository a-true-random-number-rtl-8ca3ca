// tb_pll_model: self-checking test of the behavioural PLL.
//
// Two PLLs at the 139/(19*7) ratio from the same 48.99 MHz input clock: one
// without jitter and with a 5 ps static phase, one with the default 16 ps RMS
// and phase 0. For each, every output rising edge is compared with the ideal
// grid worked out here from the input period: rising edge i at
// T0 + 133*T_in + phase + i*T, T = T_in*133/139, T0 the second rising input
// edge (output starts one anchor interval after it). The jitter-free PLL must hit the grid within 1 fs; the
// jittered one must show an RMS deviation within 25 % of 16 ps and stay
// within T/4. Both must lock.
`timescale 1ps / 1fs
module tb_pll_model;
  localparam int unsigned M = 139, N = 19, K = 7;
  localparam realtime T_IN  = 20412.350;     // 48.99 MHz system clock
  localparam realtime T_OUT = T_IN * 133.0 / 139.0;

  logic clk = 1'b0;
  logic c_clean, c_jit, l_clean, l_jit;
  int   checks = 0, failures = 0;

  pll_model #(.M(M), .N(N), .K(K), .JITTER_FS(0), .PHASE_FS(5000)) u_clean (.clk_in(clk), .clk_out(c_clean), .locked(l_clean));
  pll_model #(.M(M), .N(N), .K(K)) u_jit (.clk_in(clk), .clk_out(c_jit), .locked(l_jit));

  always #(T_IN / 2.0) clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The first anchor is the second rising input edge (at 1.5*T_IN).
  localparam realtime T0 = 1.5 * T_IN;
  function automatic realtime ideal(int unsigned i, realtime phase);
    int unsigned frame = i / M, k = i % M;
    return T0 + real'(frame + 1) * 133.0 * T_IN + phase + real'(k) * T_OUT;
  endfunction

  int unsigned n_clean = 0, n_jit = 0;
  real sum_sq = 0.0, max_dev = 0.0;

  always @(posedge c_clean) begin
    automatic realtime d = $realtime - ideal(n_clean, 5.0);
    checks++;
    if (d > 0.001 || d < -0.001) begin failures++; $display("clean edge %0d off by %f ps", n_clean, d); end
    n_clean++;
  end

  always @(posedge c_jit) begin
    automatic realtime d = $realtime - ideal(n_jit, 0.0);
    sum_sq += d * d;
    if (d > max_dev) max_dev = d;
    if (-d > max_dev) max_dev = -d;
    n_jit++;
  end

  initial begin
    real rms;
    #(T_IN * 0.5);
    checks++; if (l_clean !== 1'b0) begin failures++; $display("locked before input"); end
    #(T_IN * 133.0 * 8.0);
    checks++; if (l_clean !== 1'b1 || l_jit !== 1'b1) begin failures++; $display("not locked"); end
    checks++; if (n_clean < 7 * M - 2) begin failures++; $display("only %0d output edges", n_clean); end
    rms = $sqrt(sum_sq / real'(n_jit));
    $display("jittered PLL: %0d edges, rms %f ps, max %f ps", n_jit, rms, max_dev);
    checks++; if (rms < 12.0 || rms > 20.0) begin failures++; $display("rms jitter %f ps", rms); end
    checks++; if (max_dev > T_OUT / 4.0) begin failures++; $display("edge beyond T/4"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
