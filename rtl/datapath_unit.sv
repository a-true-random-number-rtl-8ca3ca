// datapath_unit: datapath of the PLL-jitter TRNG.
//
// Chain, all clocked by the system clock CLK:
//   clj_taps -> xor_corrector (samples CLJ, XORs the samplers)
//            -> xor_decimator (XOR of K_D samples, one bit per K_D cycles)
//            -> sp_converter  (WORD_W-bit word, ready when full)
//            -> data_register (loaded by en from the control unit)
// and the status_register and avalon_slave that present both registers on
// the bus. The datapath exports ready, valid, enable and data_read to the
// control unit and takes run, en, set_valid and clr_valid from it.
//
// Assertions check the Ready/En handshake and that the bus master never
// reads and writes in the same cycle. Their "disable iff (!rst_n)" is the
// only synchronous use of rst_n, which is why a linter may report the reset
// as used both synchronously and asynchronously; all flip-flops reset
// asynchronously.
//
// Timing: one random bit every K_D clk cycles, so a word every WORD_W*K_D
// cycles (4256 at the defaults) while the data register is free.
//
// The set of blocks and their order follow the generator's block diagram;
// the word width of 32 is this design's own choice (the bus width).
`timescale 1ps / 1fs
module datapath_unit
  import trng_pkg::*;
#(
  parameter int unsigned N_SAMPLERS = 1,
  parameter int unsigned K_D        = 133
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_SAMPLERS-1:0] clj_taps,
  // control unit side
  input  logic                  run,
  input  logic                  en,
  input  logic                  set_valid,
  input  logic                  clr_valid,
  output logic                  ready,
  output logic                  valid,
  output logic                  enable,
  output logic                  data_read,
  // Avalon slave side
  input  logic                  av_chipselect,
  input  logic [ADDR_W-1:0]     av_address,
  input  logic                  av_read,
  input  logic                  av_write,
  input  logic [BUS_W-1:0]      av_writedata,
  output logic [BUS_W-1:0]      av_readdata,
  // observation of the internal bit stream
  output logic                  rnd_bit,
  output logic                  rnd_bit_valid
);

  logic             q;
  logic [BUS_W-1:0] sp_word;
  logic [BUS_W-1:0] data_q;
  logic [BUS_W-1:0] status_q;
  logic             status_wr;
  logic [BUS_W-1:0] wr_data;

  xor_corrector #(.N_SAMPLERS(N_SAMPLERS)) u_corrector (
    .clk      (clk),
    .rst_n    (rst_n),
    .clj_taps (clj_taps),
    .q        (q)
  );

  xor_decimator #(.K_D(K_D)) u_decimator (
    .clk       (clk),
    .rst_n     (rst_n),
    .run       (run),
    .sample    (q),
    .bit_out   (rnd_bit),
    .bit_valid (rnd_bit_valid)
  );

  sp_converter #(.WORD_W(BUS_W)) u_sp (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (!run),
    .bit_in    (rnd_bit),
    .bit_valid (rnd_bit_valid),
    .take      (en),
    .word      (sp_word),
    .ready     (ready)
  );

  data_register #(.WORD_W(BUS_W)) u_data (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .d     (sp_word),
    .q     (data_q)
  );

  status_register u_status (
    .clk       (clk),
    .rst_n     (rst_n),
    .set_valid (set_valid),
    .clr_valid (clr_valid),
    .wr_en     (status_wr),
    .wr_data   (wr_data),
    .q         (status_q),
    .valid     (valid),
    .enable    (enable)
  );

  avalon_slave u_bus (
    .chipselect (av_chipselect),
    .address    (av_address),
    .read       (av_read),
    .write      (av_write),
    .writedata  (av_writedata),
    .readdata   (av_readdata),
    .data_q     (data_q),
    .status_q   (status_q),
    .data_read  (data_read),
    .status_wr  (status_wr),
    .wr_data    (wr_data)
  );

  // Handshake rules: En takes a word only when the converter holds a full
  // one, and lasts one cycle; a bus master never reads and writes at once.
  a_en_needs_ready: assert property (@(posedge clk) disable iff (!rst_n) en |-> ready)
    else $error("En without a complete word");
  a_en_one_cycle: assert property (@(posedge clk) disable iff (!rst_n) en |=> !en)
    else $error("En longer than one cycle");
  a_bus_rw: assert property (@(posedge clk) disable iff (!rst_n) av_chipselect |-> !(av_read && av_write))
    else $error("simultaneous read and write");

endmodule
