// tb_trng_top_fpll: the generator in its second measured PLL configuration.
//
// Besides the 139/133 enhanced PLL of the default build, the fast-PLL
// configuration with ratio 12/7 and 10 ps RMS jitter was measured. Here the
// generator runs with PLL_M = 12, PLL_N = 1, PLL_K = 7 (K_D = 7) on the same
// 48.99 MHz system clock, so CLJ runs at 84 MHz and the VCO at 588 MHz.
// Checked: one decimated bit exactly every 7 cycles; a word every
// 32*7 = 224 cycles while the master reads promptly; every word read equals
// the bits the converter accepted; the bits after lock are balanced
// (0.35-0.65 ones) and not constant.
`timescale 1ps / 1fs
module tb_trng_top_fpll;
  import trng_pkg::*;
  localparam realtime     T_CLK = 20412.359;
  localparam int unsigned KD = 7;
  localparam int unsigned NWORDS = 24;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cs = 1'b0, rd = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [BUS_W-1:0]  rdata;
  logic              rnd_bit, rnd_bit_valid, pll_locked;
  logic [1:0]        cu_state;
  int                checks = 0, failures = 0;

  trng_top #(.PLL_M(12), .PLL_N(1), .PLL_K(KD), .JITTER_FS(10000)) dut (
    .clk(clk), .rst_n(rst_n),
    .av_chipselect(cs), .av_address(addr), .av_read(rd), .av_write(1'b0),
    .av_writedata('0), .av_readdata(rdata),
    .rnd_bit(rnd_bit), .rnd_bit_valid(rnd_bit_valid), .pll_locked(pll_locked),
    .cu_state(cu_state)
  );

  always #(T_CLK / 2.0) clk = ~clk;

  initial begin
    #(T_CLK * 100000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint      cyc = 0, last_bit_cyc = -1;
  logic [31:0] sp_ref = '0;
  int          sp_cnt = 0;
  logic [31:0] loaded_q[$];
  longint      load_cyc[$];
  int          nbits = 0, ones = 0, chg = 0, bad_iv = 0;
  logic        last_bit = 1'b0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (cu_state == 2'(CU_LOAD)) begin
        loaded_q.push_back(sp_ref);
        load_cyc.push_back(cyc);
        sp_cnt = 0;
      end else if (rnd_bit_valid && sp_cnt < 32) begin
        sp_ref = {sp_ref[30:0], rnd_bit};
        sp_cnt++;
      end
      if (rnd_bit_valid) begin
        if (last_bit_cyc >= 0 && cyc - last_bit_cyc != KD) bad_iv++;
        last_bit_cyc = cyc;
        if (pll_locked) begin
          if (nbits > 0 && rnd_bit != last_bit) chg++;
          if (rnd_bit) ones++;
          last_bit = rnd_bit;
          nbits++;
        end
      end
    end
  end

  task automatic bus_read(input logic [ADDR_W-1:0] a, output logic [BUS_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; rd = 1'b1; addr = a;
    #1;
    d = rdata;
    @(negedge clk);
    cs = 1'b0; rd = 1'b0;
  endtask

  initial begin
    logic [BUS_W-1:0] st, d, e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (pll_locked);
    // first output edges arrive one anchor interval after lock
    repeat (4 * KD) @(negedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      do bus_read(ADDR_STATUS, st); while (!st[ST_VALID]);
      bus_read(ADDR_DATA, d);
      e = loaded_q.pop_front();
      checks++; if (d !== e) begin failures++; $display("word %0d %h exp %h", w, d, e); end
      if (load_cyc.size() >= 2 && w >= 2) begin
        checks++;
        if (load_cyc[$] - load_cyc[$-1] != 32 * KD) begin
          failures++; $display("load interval %0d", load_cyc[$] - load_cyc[$-1]);
        end
      end
    end
    $display("fast PLL: %0d bits, %0d ones, %0d changes", nbits, ones, chg);
    checks++; if (bad_iv != 0) begin failures++; $display("%0d bit intervals not %0d cycles", bad_iv, KD); end
    checks++; if (ones * 100 < 35 * nbits || ones * 100 > 65 * nbits) begin failures++; $display("bits biased"); end
    checks++; if (chg == 0) begin failures++; $display("bits constant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
