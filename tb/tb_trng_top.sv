// tb_trng_top: end-to-end test of the PLL-jitter TRNG at its default sizes.
//
// The 48.99 MHz system clock drives the generator, whose PLL makes a
// 51.2 MHz jittered clock (ratio 139/133, 16 ps RMS). A bus master model
// polls the status register and reads random words over the Avalon port.
// Checked:
//   - every word read equals the 32 decimated bits the serial/parallel
//     converter accepted (a reference of the converter runs on the raw bit
//     stream, dropping bits while it is full);
//   - words read promptly are loaded exactly 32*133 = 4256 cycles apart,
//     which at 48.99 MHz is at least the specified 32 kbit/s;
//   - VALID is set by a load and cleared by reading the word;
//   - stall: with the master away the converter fills, further bits are
//     dropped, and after the read the waiting word is loaded 2 cycles later;
//   - mode switch: ENABLE = 0 puts the control unit in IDLE and stops the
//     bit stream, ENABLE = 1 restarts it;
//   - the bits after PLL lock are not constant and their share of ones lies
//     between 0.35 and 0.65.
// Each mechanism must occur at least once.
`timescale 1ps / 1fs
module tb_trng_top;
  import trng_pkg::*;
  localparam realtime T_CLK = 20412.359;    // 51.2 MHz * 133/139
  localparam int unsigned WORD_CYC = 32 * 133;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cs = 1'b0, rd = 1'b0, wr = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [BUS_W-1:0]  wdata = '0, rdata;
  logic              rnd_bit, rnd_bit_valid, pll_locked;
  logic [1:0]        cu_state;
  int                checks = 0, failures = 0;

  trng_top dut (
    .clk(clk), .rst_n(rst_n),
    .av_chipselect(cs), .av_address(addr), .av_read(rd), .av_write(wr),
    .av_writedata(wdata), .av_readdata(rdata),
    .rnd_bit(rnd_bit), .rnd_bit_valid(rnd_bit_valid), .pll_locked(pll_locked),
    .cu_state(cu_state)
  );

  always #(T_CLK / 2.0) clk = ~clk;

  initial begin
    #(T_CLK * 400000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference of the converter and event counters ----
  longint      cyc = 0;
  logic [31:0] sp_ref = '0;
  int          sp_cnt = 0;
  logic [31:0] loaded_q[$];
  longint      load_cyc[$];
  int          n_dropped = 0, n_idle_bits = 0, n_idle_cyc = 0;
  int          ones = 0, nbits = 0, n_changes = 0;
  logic        last_bit = 1'b0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      // cu_state and rnd_bit_valid are sampled before this edge updates them
      if (cu_state == 2'(CU_IDLE)) begin
        n_idle_cyc++;
        if (rnd_bit_valid) n_idle_bits++;
        sp_cnt = 0;
      end else if (cu_state == 2'(CU_LOAD)) begin
        loaded_q.push_back(sp_ref);
        load_cyc.push_back(cyc);
        sp_cnt = 0;
      end else if (rnd_bit_valid) begin
        if (sp_cnt < 32) begin sp_ref = {sp_ref[30:0], rnd_bit}; sp_cnt++; end
        else n_dropped++;
      end
      if (rnd_bit_valid && pll_locked) begin
        nbits++;
        if (rnd_bit) ones++;
        if (nbits > 1 && rnd_bit != last_bit) n_changes++;
        last_bit = rnd_bit;
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

  task automatic bus_write(input logic [ADDR_W-1:0] a, input logic [BUS_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; wr = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    cs = 1'b0; wr = 1'b0;
  endtask

  int n_words = 0, n_rate = 0, n_stall = 0, n_switch = 0;

  // Poll until VALID, read the word and check it.
  task automatic get_word();
    logic [BUS_W-1:0] st, d, e;
    do bus_read(ADDR_STATUS, st); while (!st[ST_VALID]);
    bus_read(ADDR_DATA, d);
    checks++;
    if (loaded_q.size() == 0) begin failures++; $display("word read without a load"); end
    else begin
      e = loaded_q.pop_front();
      if (d !== e) begin failures++; $display("word %0d: %h exp %h", n_words, d, e); end
    end
    bus_read(ADDR_STATUS, st);
    checks++; if (st[ST_VALID] !== 1'b0 && cu_state != 2'(CU_LOAD)) begin failures++; $display("VALID still set after read"); end
    n_words++;
  endtask

  initial begin
    logic [BUS_W-1:0] st;
    longint t_read;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (pll_locked);
    checks++;
    bus_read(ADDR_STATUS, st);
    if (st[ST_ENABLE] !== 1'b1) begin failures++; $display("not enabled after reset"); end

    // 1. prompt reads: rate check
    for (int w = 0; w < 12; w++) begin
      get_word();
      if (load_cyc.size() >= 2) begin
        checks++; n_rate++;
        if (load_cyc[$] - load_cyc[$-1] != WORD_CYC) begin
          failures++; $display("load interval %0d, expected %0d", load_cyc[$] - load_cyc[$-1], WORD_CYC);
        end
      end
    end

    // delivered rate against the 32 kbit/s the generator is specified for
    begin
      real bps;
      bps = 32.0 / (real'(load_cyc[$] - load_cyc[$-1]) * T_CLK * 1.0e-12);
      $display("word rate: %0.0f bit/s", bps);
      checks++; if (bps < 32000.0) begin failures++; $display("below 32 kbit/s"); end
    end

    // 2. stall: master away for three word times
    repeat (3 * WORD_CYC) @(negedge clk);
    checks++; if (n_dropped == 0) begin failures++; $display("converter never stalled"); end
    get_word();
    t_read = cyc;
    wait (load_cyc.size() > 0);
    checks++; n_stall++;
    if (load_cyc[$] - t_read > 3) begin failures++; $display("waiting word loaded %0d cycles after read", load_cyc[$] - t_read); end
    get_word();

    // 3. mode switch
    bus_write(ADDR_STATUS, 32'h0);
    repeat (2) @(negedge clk);
    checks++; if (cu_state != 2'(CU_IDLE)) begin failures++; $display("not IDLE after disable"); end
    repeat (2 * 133 + 5) @(negedge clk);
    checks++; if (n_idle_bits != 0) begin failures++; $display("%0d bits while disabled", n_idle_bits); end
    bus_write(ADDR_STATUS, 32'h2);
    n_switch++;
    for (int w = 0; w < 4; w++) get_word();

    // 4. randomness of the bit stream after lock
    $display("bits %0d ones %0d changes %0d words %0d dropped %0d", nbits, ones, n_changes, n_words, n_dropped);
    checks++; if (real'(ones) < 0.35 * nbits || real'(ones) > 0.65 * nbits) begin failures++; $display("ones share off"); end
    checks++; if (n_changes == 0) begin failures++; $display("bit stream constant"); end

    // every mechanism seen
    checks++; if (n_rate == 0)     begin failures++; $display("rate never checked"); end
    checks++; if (n_stall == 0)    begin failures++; $display("stall never seen"); end
    checks++; if (n_switch == 0 || n_idle_cyc == 0) begin failures++; $display("mode switch never seen"); end
    checks++; if (n_dropped == 0)  begin failures++; $display("no dropped bits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
