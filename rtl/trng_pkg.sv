// trng_pkg: constants and types shared by the PLL-jitter TRNG modules.
//
// The bus register map is this design's own choice (the two registers and the
// Avalon signal names follow the block diagram of the generator; their
// addresses and bit positions do not come from it):
//   word address 0  DATA    read-only, last complete random word; reading it
//                           marks the word as consumed
//   word address 1  STATUS  bit 0 VALID  (read-only)  a fresh word is waiting
//                           bit 1 ENABLE (read/write) generator runs when 1
`timescale 1ps / 1fs
package trng_pkg;

  // Bus geometry
  localparam int unsigned BUS_W  = 32;  // Avalon data width (Nios-class master)
  localparam int unsigned ADDR_W = 1;   // two word registers

  localparam logic [ADDR_W-1:0] ADDR_DATA   = 1'b0;
  localparam logic [ADDR_W-1:0] ADDR_STATUS = 1'b1;

  // Bit positions inside the STATUS register
  localparam int unsigned ST_VALID  = 0;
  localparam int unsigned ST_ENABLE = 1;

  // Reset value of the ENABLE bit: the generator starts running out of reset.
  localparam logic ENABLE_RESET = 1'b1;

  // Control unit states
  typedef enum logic [1:0] {
    CU_IDLE = 2'd0,  // generator disabled, sampler chain held in its start state
    CU_WAIT = 2'd1,  // collecting bits until the serial/parallel converter is full
    CU_LOAD = 2'd2,  // En: copy the converter's word into the data register
    CU_HOLD = 2'd3   // data register holds an unread word
  } cu_state_e;

endpackage
