// communication_module: buffers captured samples and sends them out on
// a serial line at a selectable bit rate.
//
// The timer block divides the system clock into eight bit-rate clocks,
// the 8:1 clock mux picks one with bps, and that clock runs the serial
// transmitter and the read side of the asynchronous FIFO. The write side
// of the FIFO runs on the system clock, where the capture module writes.
// This arrangement (timer, mux, UART, FIFO between capture and UART)
// follows the source design.
//
// Interface: clk is the 50 MHz system clock and the FIFO write clock;
// rst is active high and asynchronous and resets both clock domains
// (the bit-rate clocks are held low during reset, so the read domain
// leaves reset before its first clock edge). bps selects the rate
// (rsc_pkg::bps_sel_e) and should change only while the link is idle.
// winc/wdata/wfull form the FIFO write port. dout is the serial line,
// high when idle. uart_clk is the selected bit-rate clock. PARITY adds
// an optional parity bit to each frame (none by default).
module communication_module #(
  parameter int unsigned CLK_HZ = rsc_pkg::SYS_CLK_HZ,
  parameter int unsigned ASIZE  = 4,
  parameter rsc_pkg::parity_e PARITY = rsc_pkg::PAR_NONE
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [rsc_pkg::SEL_W-1:0]  bps,
  input  logic                       winc,
  input  logic [rsc_pkg::DATA_W-1:0] wdata,
  output logic                       wfull,
  output logic                       dout,
  output logic                       tx_busy,
  output logic                       uart_clk
);

  logic [rsc_pkg::NUM_RATES-1:0] baud_clk;
  logic                          rinc, rempty;
  logic [rsc_pkg::DATA_W-1:0]    rdata;
  rsc_pkg::tx_state_e            tx_state;

  baud_clock_gen #(.CLK_HZ(CLK_HZ)) u_timer (
    .clk(clk), .rst(rst), .baud_clk(baud_clk)
  );

  clock_mux8 u_mux (
    .a(baud_clk[0]), .b(baud_clk[1]), .c(baud_clk[2]), .d(baud_clk[3]),
    .e(baud_clk[4]), .f(baud_clk[5]), .g(baud_clk[6]), .h(baud_clk[7]),
    .s(bps), .y(uart_clk)
  );

  async_fifo #(.DSIZE(rsc_pkg::DATA_W), .ASIZE(ASIZE)) u_fifo (
    .wclk(clk), .wrst_n(!rst), .winc(winc), .wdata(wdata), .wfull(wfull),
    .rclk(uart_clk), .rrst_n(!rst), .rinc(rinc), .rdata(rdata), .rempty(rempty)
  );

  uart_tx #(.PARITY(PARITY)) u_uart (
    .clk(uart_clk), .rst(rst), .fifo_rempty(rempty), .fifo_rdata(rdata),
    .fifo_rinc(rinc), .tx(dout), .busy(tx_busy), .state(tx_state)
  );

endmodule
