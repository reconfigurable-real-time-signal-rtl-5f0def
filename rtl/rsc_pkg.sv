// rsc_pkg: types and constants shared by the signal-capture design.
//
// The capture path runs on a 50 MHz system clock. The serial link can run
// at one of eight bit rates, 115200 down to 1200 bit/s, picked by a 3-bit
// select code; code 0 is the fastest rate and code 7 the slowest. The
// rates and the 50 MHz clock follow the source design. The encodings of
// the state machines and the rounding of the divider ratios are choices
// of this implementation.
package rsc_pkg;

  // System clock from which all bit-rate clocks are divided.
  localparam int unsigned SYS_CLK_HZ = 50_000_000;

  // Number of selectable bit rates and width of the select code.
  localparam int unsigned NUM_RATES = 8;
  localparam int unsigned SEL_W     = 3;

  // Captured sample width.
  localparam int unsigned DATA_W = 8;

  // Bit-rate select code, fastest first.
  typedef enum logic [SEL_W-1:0] {
    BPS_115200 = 3'd0,
    BPS_57600  = 3'd1,
    BPS_38400  = 3'd2,
    BPS_19200  = 3'd3,
    BPS_9600   = 3'd4,
    BPS_4800   = 3'd5,
    BPS_2400   = 3'd6,
    BPS_1200   = 3'd7
  } bps_sel_e;

  // Bit rate, in bit/s, that select code `sel` stands for.
  function automatic int unsigned baud_of(int unsigned sel);
    case (sel)
      0:       return 115200;
      1:       return 57600;
      2:       return 38400;
      3:       return 19200;
      4:       return 9600;
      5:       return 4800;
      6:       return 2400;
      default: return 1200;
    endcase
  endfunction

  // Half period of a bit-rate clock in system clock cycles:
  // clk_hz / (2 * baud), rounded to the nearest integer, at least 1.
  function automatic int unsigned half_period(int unsigned clk_hz, int unsigned baud);
    int unsigned h;
    h = (clk_hz + baud) / (2 * baud);
    return (h == 0) ? 1 : h;
  endfunction

  // Capture state machine states.
  typedef enum logic [1:0] {
    CAP_IDLE = 2'd0,   // armed, waiting for the trigger
    CAP_RUN  = 2'd1,   // storing samples into the FIFO
    CAP_DONE = 2'd2    // sample budget used, waiting for the trigger to drop
  } cap_state_e;

  // Serial transmitter states: one state per bit time.
  typedef enum logic [3:0] {
    TX_IDLE  = 4'd0,
    TX_START = 4'd1,
    TX_D0    = 4'd2,
    TX_D1    = 4'd3,
    TX_D2    = 4'd4,
    TX_D3    = 4'd5,
    TX_D4    = 4'd6,
    TX_D5    = 4'd7,
    TX_D6    = 4'd8,
    TX_D7    = 4'd9,
    TX_STOP  = 4'd10,
    TX_NOP   = 4'd11,
    TX_PAR   = 4'd12   // only with a parity bit configured
  } tx_state_e;

  // Optional parity bit of the serial frame. The default configuration
  // has none.
  typedef enum logic [1:0] {
    PAR_NONE = 2'd0,
    PAR_EVEN = 2'd1,
    PAR_ODD  = 2'd2
  } parity_e;

endpackage
