// control_unit: control unit of the PLL-jitter TRNG.
//
// A four-state machine clocked by the system clock CLK:
//   IDLE  generator disabled: run is 0, so the decimator and the
//         serial/parallel converter are held empty. Leaves for HOLD if the
//         data register still holds an unread word, else for WAIT, once
//         enable is 1.
//   WAIT  run is 1; waits for ready from the serial/parallel converter.
//   LOAD  raises en for one cycle: the data register loads the word, the
//         converter is emptied and the VALID status bit is set.
//   HOLD  the data register holds an unread word; the converter fills and
//         then stalls. A bus read of the data register (data_read) raises
//         clr_valid and returns to WAIT.
// Clearing enable sends every state to IDLE.
//
// Interface: ready and data_read are sampled on the rising clk edge; en is
// high during the one cycle spent in LOAD, so a word reaches the data
// register two clk edges after ready rises.
//
// The unit's Ready input and En output follow the generator's block diagram;
// the states and the policy of never overwriting an unread word are this
// design's own choices.
`timescale 1ps / 1fs
module control_unit
  import trng_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  logic      valid,
  input  logic      ready,
  input  logic      data_read,
  output logic      run,
  output logic      en,
  output logic      set_valid,
  output logic      clr_valid,
  output cu_state_e state
);

  cu_state_e next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= CU_IDLE;
    else        state <= next;
  end

  always_comb begin
    next = state;
    if (!enable) begin
      next = CU_IDLE;
    end else begin
      unique case (state)
        CU_IDLE: next = valid ? CU_HOLD : CU_WAIT;
        CU_WAIT: if (ready) next = CU_LOAD;
        CU_LOAD: next = CU_HOLD;
        CU_HOLD: if (data_read) next = CU_WAIT;
        default: next = CU_IDLE;
      endcase
    end
  end

  assign run       = (state != CU_IDLE);
  assign en        = (state == CU_LOAD);
  assign set_valid = en;
  assign clr_valid = data_read && (state == CU_HOLD || state == CU_IDLE);

endmodule
