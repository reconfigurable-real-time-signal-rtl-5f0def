// rsc_top: reconfigurable real-time signal capture.
//
// Captures an 8-bit signal from a design running in the same FPGA and
// sends the samples to a computer over a serial line. On a trigger the
// capture module stores NUM_SAMPLES consecutive samples (one per clock)
// into an asynchronous FIFO; the communication module drains the FIFO
// through a UART transmitter clocked at one of eight bit rates
// (115200 ... 1200 bit/s) chosen by bps. The two-module structure, the
// 8-bit data, the 16-word FIFO, the 50 MHz clock and the eight rates
// follow the source design; the sample count default (one full FIFO) is
// this implementation's choice.
//
// Interface: clk 50 MHz, rst active high and asynchronous, trigger and
// data from the observed design, bps rate select; dout serial line
// (8 data bits, LSB first, no parity, one stop bit, at least one extra
// idle bit between bytes); cap_busy/cap_done capture status; fifo_full
// shows when capture is stalled by a full FIFO; tx_busy is high while a
// byte is on the line (in the bit-rate clock domain). PARITY (none by
// default) inserts an even or odd parity bit before the stop bit.
module rsc_top #(
  parameter int unsigned CLK_HZ      = rsc_pkg::SYS_CLK_HZ,
  parameter int unsigned NUM_SAMPLES = 16,
  parameter int unsigned FIFO_ASIZE  = 4,
  parameter rsc_pkg::parity_e PARITY = rsc_pkg::PAR_NONE
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       trigger,
  input  logic [rsc_pkg::DATA_W-1:0] data,
  input  logic [rsc_pkg::SEL_W-1:0]  bps,
  output logic                       dout,
  output logic                       cap_busy,
  output logic                       cap_done,
  output logic                       fifo_full,
  output logic                       tx_busy
);

  logic                       winc;
  logic [rsc_pkg::DATA_W-1:0] wdata;
  logic                       uart_clk;

  capture_module #(.DATA_W(rsc_pkg::DATA_W), .NUM_SAMPLES(NUM_SAMPLES)) u_capture (
    .clk(clk), .rst(rst), .trigger(trigger), .data_in(data),
    .wfull(fifo_full), .winc(winc), .wdata(wdata),
    .busy(cap_busy), .done(cap_done)
  );

  communication_module #(.CLK_HZ(CLK_HZ), .ASIZE(FIFO_ASIZE), .PARITY(PARITY)) u_comm (
    .clk(clk), .rst(rst), .bps(bps), .winc(winc), .wdata(wdata),
    .wfull(fifo_full), .dout(dout), .tx_busy(tx_busy), .uart_clk(uart_clk)
  );

endmodule
