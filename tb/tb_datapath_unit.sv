// tb_datapath_unit: self-checking test of the TRNG datapath.
//
// A jitter-free clock at 139/133 of the 50 MHz sampling clock is the CLJ
// input, and the testbench plays the control unit (run, en when a word is
// ready and the data register is free, set/clear of VALID). The testbench
// samples CLJ on every clock edge itself, XORs windows of 133 samples and
// packs the bits into 32-bit words; every decimated bit, every word read
// over the bus and the status register must match. Because a jitter-free
// CLJ repeats every 133 cycles, all its bits must also be equal. Finally the
// ENABLE bit is written over the bus and read back.
`timescale 1ps / 1fs
module tb_datapath_unit;
  import trng_pkg::*;
  localparam int unsigned K_D = 133;
  localparam realtime T_CLK = 20000.0;
  localparam realtime T_CLJ = T_CLK * 133.0 / 139.0;

  logic             clk = 1'b0, rst_n = 1'b0, clj = 1'b0;
  logic             run = 1'b0, en = 1'b0, set_valid = 1'b0, clr_valid = 1'b0;
  logic             ready, valid, enable, data_read;
  logic             cs = 1'b0, rd = 1'b0, wr = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [BUS_W-1:0] wdata = '0, rdata;
  logic             rnd_bit, rnd_bit_valid;
  int               checks = 0, failures = 0;

  datapath_unit #(.N_SAMPLERS(1), .K_D(K_D)) dut (
    .clk(clk), .rst_n(rst_n), .clj_taps(clj),
    .run(run), .en(en), .set_valid(set_valid), .clr_valid(clr_valid),
    .ready(ready), .valid(valid), .enable(enable), .data_read(data_read),
    .av_chipselect(cs), .av_address(addr), .av_read(rd), .av_write(wr),
    .av_writedata(wdata), .av_readdata(rdata),
    .rnd_bit(rnd_bit), .rnd_bit_valid(rnd_bit_valid)
  );

  always #(T_CLK / 2.0) clk = ~clk;
  initial begin
    #1000.25;
    forever #(T_CLJ / 2.0) clj = ~clj;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: sample CLJ at each edge (the DUT's flip-flop output is the
  // XOR input one cycle later), XOR windows of K_D samples.
  logic samp_d = 1'b0;
  int   n_in = 0;
  bit   acc = 1'b0;
  bit   exp_bits[$];
  bit   all_bits[$];
  always @(posedge clk) begin
    if (rst_n && run) begin
      acc ^= samp_d;
      n_in++;
      if (n_in == K_D) begin exp_bits.push_back(acc); n_in = 0; acc = 1'b0; end
    end
    samp_d = clj;
  end

  always @(negedge clk) begin
    if (rnd_bit_valid) begin
      checks++;
      if (exp_bits.size() == 0) begin failures++; $display("unexpected bit"); end
      else begin
        bit e;
        e = exp_bits.pop_front();
        if (e !== rnd_bit) begin failures++; $display("bit %0d: got %b exp %b", all_bits.size(), rnd_bit, e); end
      end
      all_bits.push_back(rnd_bit);
    end
  end

  task automatic bus_read(input logic [ADDR_W-1:0] a, output logic [BUS_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; rd = 1'b1; addr = a;
    #1;
    d = rdata;
    clr_valid = data_read && valid;
    @(negedge clk);
    cs = 1'b0; rd = 1'b0; clr_valid = 1'b0;
  endtask

  task automatic bus_write(input logic [ADDR_W-1:0] a, input logic [BUS_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; wr = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    cs = 1'b0; wr = 1'b0;
  endtask

  initial begin
    logic [BUS_W-1:0] d, st, expw;
    int words = 0;
    #30000 rst_n = 1'b1;
    @(negedge clk) run = 1'b1;
    while (words < 4) begin
      @(negedge clk);
      if (ready && !valid) begin
        en = 1'b1; set_valid = 1'b1;
        @(negedge clk);
        en = 1'b0; set_valid = 1'b0;
        bus_read(ADDR_STATUS, st);
        checks++; if (st[ST_VALID] !== 1'b1) begin failures++; $display("VALID not set"); end
        bus_read(ADDR_DATA, d);
        expw = '0;
        for (int b = 0; b < 32; b++) expw = {expw[30:0], all_bits[words * 32 + b]};
        checks++; if (d !== expw) begin failures++; $display("word %0d %h exp %h", words, d, expw); end
        bus_read(ADDR_STATUS, st);
        checks++; if (st[ST_VALID] !== 1'b0) begin failures++; $display("VALID not cleared by read"); end
        words++;
      end
    end
    checks++;
    foreach (all_bits[i]) if (all_bits[i] != all_bits[0]) begin failures++; $display("jitter-free bits differ at %0d", i); break; end
    checks++; if (all_bits.size() < 128) begin failures++; $display("only %0d bits", all_bits.size()); end
    bus_write(ADDR_STATUS, 32'h0);
    bus_read(ADDR_STATUS, st);
    checks++; if (st[ST_ENABLE] !== 1'b0 || enable !== 1'b0) begin failures++; $display("ENABLE not cleared"); end
    bus_write(ADDR_STATUS, 32'h2);
    bus_read(ADDR_STATUS, st);
    checks++; if (st[ST_ENABLE] !== 1'b1 || enable !== 1'b1) begin failures++; $display("ENABLE not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
