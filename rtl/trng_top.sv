// trng_top: true random number generator built on PLL clock jitter.
//
// The system clock clk (CLK) feeds an analog PLL that synthesizes a clock
// CLJ at M/(N*K) = 139/133 times its frequency with a few picoseconds of
// random jitter. CLJ, and optionally delayed copies of it, is sampled on
// every CLK edge; over K_D = N*K = 133 cycles the sampling point sweeps the
// whole CLJ period once, and the samples that fall next to a CLJ edge are
// decided by the jitter. XORing the K_D samples of such a window gives one
// random bit. Bits are packed into 32-bit words that a processor reads over
// an Avalon slave port.
//
// Structure: pll_model (behavioural PLL), delay_line (behavioural delay
// elements), datapath_unit (sampler, decimator, serial/parallel converter,
// data and status registers, bus port) and control_unit, all digital logic
// on clk. Register map and bus timing: see trng_pkg and avalon_slave.
//
// Timing: a word every 32*K_D = 4256 clk cycles while the data register is
// read in time; at 49.0 MHz that is about 368 kbit/s.
//
// Parameters: PLL_M/PLL_N/PLL_K set the PLL ratio and K_D = PLL_N*PLL_K;
// JITTER_FS and PHASE_FS are the PLL model's RMS jitter and static phase
// against the sampling grid; N_SAMPLERS and DELTA_FS size the optional extra
// samplers and their delay elements. At PHASE_FS = 0 one sample per window
// sits on a CLJ edge; at a quarter grid step (36.7 ps) a single sampler
// gives almost constant bits and the extra samplers are needed.
//
// rnd_bit/rnd_bit_valid expose the raw decimated bit stream, pll_locked the
// PLL's lock flag and cu_state the control unit's state, for test. The
// one-PLL configuration with CLK taken straight from the clock input, the
// 139/133 ratio, the 16 ps jitter and the single sampler follow the
// generator's description; the divider split, the phase, the delay value and
// the observation ports are this design's own choices.
`timescale 1ps / 1fs
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned PLL_M      = 139,
  parameter int unsigned PLL_N      = 19,
  parameter int unsigned PLL_K      = 7,
  parameter int unsigned JITTER_FS  = 16000,
  parameter int unsigned PHASE_FS   = 0,
  parameter int unsigned N_SAMPLERS = 1,
  parameter int unsigned DELTA_FS   = 50000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              av_chipselect,
  input  logic [ADDR_W-1:0] av_address,
  input  logic              av_read,
  input  logic              av_write,
  input  logic [BUS_W-1:0]  av_writedata,
  output logic [BUS_W-1:0]  av_readdata,
  output logic              rnd_bit,
  output logic              rnd_bit_valid,
  output logic              pll_locked,
  output logic [1:0]        cu_state
);

  localparam int unsigned K_D = PLL_N * PLL_K;

  logic                  clj;
  logic [N_SAMPLERS-1:0] clj_taps;
  logic                  run, en, set_valid, clr_valid;
  logic                  ready, valid, enable, data_read;
  cu_state_e             state;

  assign cu_state = state;

  pll_model #(
    .M         (PLL_M),
    .N         (PLL_N),
    .K         (PLL_K),
    .JITTER_FS (JITTER_FS),
    .PHASE_FS  (PHASE_FS)
  ) u_pll (
    .clk_in  (clk),
    .clk_out (clj),
    .locked  (pll_locked)
  );

  delay_line #(
    .TAPS     (N_SAMPLERS),
    .DELTA_FS (DELTA_FS)
  ) u_delay (
    .din  (clj),
    .taps (clj_taps)
  );

  datapath_unit #(
    .N_SAMPLERS (N_SAMPLERS),
    .K_D        (K_D)
  ) u_datapath (
    .clk           (clk),
    .rst_n         (rst_n),
    .clj_taps      (clj_taps),
    .run           (run),
    .en            (en),
    .set_valid     (set_valid),
    .clr_valid     (clr_valid),
    .ready         (ready),
    .valid         (valid),
    .enable        (enable),
    .data_read     (data_read),
    .av_chipselect (av_chipselect),
    .av_address    (av_address),
    .av_read       (av_read),
    .av_write      (av_write),
    .av_writedata  (av_writedata),
    .av_readdata   (av_readdata),
    .rnd_bit       (rnd_bit),
    .rnd_bit_valid (rnd_bit_valid)
  );

  control_unit u_control (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (enable),
    .valid     (valid),
    .ready     (ready),
    .data_read (data_read),
    .run       (run),
    .en        (en),
    .set_valid (set_valid),
    .clr_valid (clr_valid),
    .state     (state)
  );

endmodule
