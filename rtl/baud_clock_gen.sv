// baud_clock_gen: timer block that divides the system clock into the
// eight bit-rate clocks of the serial link.
//
// Output bit i of baud_clk is a square wave at rsc_pkg::baud_of(i) Hz:
// 115200, 57600, 38400, 19200, 9600, 4800, 2400 and 1200 for i = 0..7.
// Each clock has its own counter that runs on clk and toggles the output
// every half_period(CLK_HZ, baud) cycles, so the full period is twice
// that, the ratio rounded to the nearest integer (at 50 MHz the actual
// rates are within 0.01 % of nominal). The eight rates and the 50 MHz
// source follow the source design; a separate counter per output and
// the rounding are this implementation's choices.
//
// Interface: clk is the system clock, rst is active high and
// asynchronous; while rst is high every counter is cleared and every
// output held low, so the derived clocks start cleanly after reset.
module baud_clock_gen #(
  parameter int unsigned CLK_HZ = rsc_pkg::SYS_CLK_HZ
) (
  input  logic                          clk,
  input  logic                          rst,
  output logic [rsc_pkg::NUM_RATES-1:0] baud_clk
);

  for (genvar i = 0; i < int'(rsc_pkg::NUM_RATES); i++) begin : g_div
    localparam int unsigned HALF = rsc_pkg::half_period(CLK_HZ, rsc_pkg::baud_of(i));
    localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;
    localparam logic [CW-1:0] LAST = CW'(HALF - 1);

    logic [CW-1:0] cnt;

    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        cnt         <= '0;
        baud_clk[i] <= 1'b0;
      end else if (cnt == LAST) begin
        cnt         <= '0;
        baud_clk[i] <= ~baud_clk[i];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
