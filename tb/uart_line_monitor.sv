// uart_line_monitor: testbench serial-line receiver (stands in for the
// computer at the far end of the link).
//
// Watches `line` on the fast clock `clk`. A falling edge while idle
// starts a frame; the monitor then samples the line in the middle of the
// start bit, of the eight data bits (least significant first) and of the
// stop bit, bit_cycles clocks apart. At the middle of the stop bit it
// pulses valid for one clock with the byte in data; frame_err is high in
// that clock if the start bit was not low or the stop bit not high.
// start_cycle is the clock count (since reset) of the falling edge that
// began the frame. Not synthesizable in spirit: it is a checker.
module uart_line_monitor (
  input  logic        clk,
  input  logic        rst,
  input  logic        line,
  input  int unsigned bit_cycles,
  output logic        valid,
  output logic [7:0]  data,
  output logic        frame_err,
  output longint unsigned start_cycle
);

  longint unsigned cyc;
  logic            busy, line_q;
  int unsigned     cnt;
  int unsigned     bitn;
  logic [7:0]      sh;
  logic            bad;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cyc <= 0; busy <= 1'b0; line_q <= 1'b1; valid <= 1'b0; frame_err <= 1'b0;
      cnt <= 0; bitn <= 0; sh <= '0; bad <= 1'b0; data <= '0; start_cycle <= 0;
    end else begin
      cyc    <= cyc + 1;
      line_q <= line;
      valid  <= 1'b0;
      if (!busy) begin
        if (line_q && !line) begin
          busy <= 1'b1; cnt <= bit_cycles / 2; bitn <= 0; bad <= 1'b0;
          start_cycle <= cyc;
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1;
      end else begin
        cnt <= bit_cycles - 1;
        if (bitn == 0) begin
          if (line) bad <= 1'b1;
        end else if (bitn <= 8) begin
          sh <= {line, sh[7:1]};
        end else begin
          valid     <= 1'b1;
          data      <= sh;
          frame_err <= bad || !line;
          busy      <= 1'b0;
        end
        bitn <= bitn + 1;
      end
    end
  end

endmodule
