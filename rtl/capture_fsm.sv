// capture_fsm: capture state machine.
//
// Decides when samples of the observed signal are stored. Three states:
//   CAP_IDLE  armed. The sample hold register follows the input every
//             clock. A high trigger clears the sample counter and moves
//             to CAP_RUN; the sample held at that edge is the first one.
//   CAP_RUN   each clock the FIFO is not full, the held sample is written
//             (winc), the counter advances and the hold register takes
//             the next input. While the FIFO is full the sample is kept
//             and nothing advances (a stall), so no sample is lost,
//             though the stored ones are then no longer consecutive.
//             After the write made while the counter shows its last
//             value it moves to CAP_DONE.
//   CAP_DONE  done is high; it waits for trigger to go low and re-arms.
// The source design gives the machine, the samples counter and the
// hold-until-stored behaviour; the three states, the level-sensitive
// trigger and the stall on a full FIFO are this implementation's choices.
//
// Interface: clk, rst (active high, asynchronous), trigger, wfull, last
// from the sample counter. Outputs are decoded from the state without
// delay: winc, cnt_clr, cnt_inc, hold_en, busy, done.
module capture_fsm (
  input  logic                clk,
  input  logic                rst,
  input  logic                trigger,
  input  logic                wfull,
  input  logic                last,
  output logic                winc,
  output logic                cnt_clr,
  output logic                cnt_inc,
  output logic                hold_en,
  output logic                busy,
  output logic                done,
  output rsc_pkg::cap_state_e state
);

  import rsc_pkg::*;

  cap_state_e next_state;

  always_comb begin
    next_state = state;
    winc       = 1'b0;
    cnt_clr    = 1'b0;
    cnt_inc    = 1'b0;
    hold_en    = 1'b0;
    unique case (state)
      CAP_IDLE: begin
        hold_en = 1'b1;
        if (trigger) begin
          cnt_clr    = 1'b1;
          next_state = CAP_RUN;
        end
      end
      CAP_RUN: begin
        if (!wfull) begin
          winc    = 1'b1;
          cnt_inc = 1'b1;
          hold_en = 1'b1;
          if (last) next_state = CAP_DONE;
        end
      end
      CAP_DONE: begin
        if (!trigger) next_state = CAP_IDLE;
      end
      default: next_state = CAP_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= CAP_IDLE;
    else     state <= next_state;
  end

  // Handshake rule with the FIFO: never write while it reports full.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) winc |-> !wfull);

  assign busy = (state == CAP_RUN);
  assign done = (state == CAP_DONE);

endmodule
