// sample_counter: counts the samples stored during one capture.
//
// Cleared by clr, advanced by inc, one step per clock. last is high while
// the count stands at NUM_SAMPLES-1, so a capture that stores a sample
// while last is high has stored NUM_SAMPLES samples. clr wins over inc.
// The source design names a samples counter that feeds the capture state
// machine; its width, the clear/increment interface and the default of
// 16 samples (one full FIFO) are this implementation's choices.
//
// Interface: clk, rst (active high, asynchronous), clr, inc; count and
// last are registered/derived from the register with no extra delay.
module sample_counter #(
  parameter int unsigned NUM_SAMPLES = 16,
  localparam int unsigned CW = (NUM_SAMPLES > 1) ? $clog2(NUM_SAMPLES) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          inc,
  output logic [CW-1:0] count,
  output logic          last
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       count <= '0;
    else if (clr)  count <= '0;
    else if (inc)  count <= count + 1'b1;
  end

  assign last = (count == CW'(NUM_SAMPLES - 1));

endmodule
