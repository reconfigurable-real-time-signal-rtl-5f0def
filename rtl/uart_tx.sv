// uart_tx: serial transmitter that empties the FIFO onto the link.
//
// Runs on the selected bit-rate clock, one state per bit time, with the
// states of the source design's transmitter: idle, start, d0..d7, stop,
// nop. In idle, when the FIFO is not empty, it takes the word shown on
// fifo_rdata, pulses fifo_rinc for that clock edge to remove it, and
// goes to start. The line then carries the start bit (0), the eight data
// bits least significant first, a stop bit (1) and one more idle bit in
// nop before idle is re-entered. Back to back, one byte therefore takes
// 12 bit times: 8 data bits, no parity, and 3 bit times of line high
// between frames. Least-significant-bit-first order and the high idle
// line level are this implementation's choices (standard UART framing).
//
// PARITY adds a parity state between d7 and stop (even: the data bits
// and the parity bit hold an even number of ones; odd: an odd number),
// making a frame 13 bit times. The source design lists parity insertion
// among the jobs of a UART, but its transmitter has no parity state, so
// the default is PAR_NONE.
//
// Interface: clk is the bit-rate clock, rst active high and asynchronous
// (line held high). tx is registered and aligned with state. busy is
// high from start to nop.
module uart_tx #(
  parameter rsc_pkg::parity_e PARITY = rsc_pkg::PAR_NONE
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       fifo_rempty,
  input  logic [rsc_pkg::DATA_W-1:0] fifo_rdata,
  output logic                       fifo_rinc,
  output logic                       tx,
  output logic                       busy,
  output rsc_pkg::tx_state_e         state
);

  import rsc_pkg::*;

  tx_state_e         next_state;
  logic [DATA_W-1:0] shreg;
  logic              tx_next;
  logic              par_bit;

  assign par_bit = (^shreg) ^ (PARITY == PAR_ODD);

  always_comb begin
    next_state = state;
    fifo_rinc  = 1'b0;
    tx_next    = 1'b1;
    unique case (state)
      TX_IDLE: begin
        if (!fifo_rempty) begin
          fifo_rinc  = 1'b1;
          next_state = TX_START;
          tx_next    = 1'b0;
        end
      end
      TX_START, TX_D0, TX_D1, TX_D2, TX_D3, TX_D4, TX_D5, TX_D6: begin
        next_state = tx_state_e'(state + 4'd1);
        tx_next    = shreg[3'(state - TX_START)];
      end
      TX_D7: begin
        if (PARITY == PAR_NONE) begin
          next_state = TX_STOP;
        end else begin
          next_state = TX_PAR;
          tx_next    = par_bit;
        end
      end
      TX_PAR:  next_state = TX_STOP;
      TX_STOP: next_state = TX_NOP;
      TX_NOP:  next_state = TX_IDLE;
      default: next_state = TX_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= TX_IDLE;
      shreg <= '0;
      tx    <= 1'b1;
    end else begin
      state <= next_state;
      tx    <= tx_next;
      if (fifo_rinc) shreg <= fifo_rdata;
    end
  end

  assign busy = (state != TX_IDLE);

  // Handshake rule with the FIFO: only read a word that is there.
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (rst) fifo_rinc |-> !fifo_rempty);

endmodule
