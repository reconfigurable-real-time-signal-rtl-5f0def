// clock_mux8: 8-to-1 multiplexer that picks the bit-rate clock for the
// serial transmitter.
//
// y follows input a when s = 0, b when s = 1, and so on to h when s = 7.
// With the timer block's outputs wired a..h in order, s is the bit-rate
// select code of rsc_pkg::bps_sel_e. The 8:1 mux, its input names a..h,
// the select s and the output y follow the source design. It is purely
// combinational; changing s while the selected clocks run can produce a
// short pulse on y, so s should be changed only while the transmitter is
// idle or held in reset.
module clock_mux8 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic       d,
  input  logic       e,
  input  logic       f,
  input  logic       g,
  input  logic       h,
  input  logic [2:0] s,
  output logic       y
);

  always_comb begin
    unique case (s)
      3'd0: y = a;
      3'd1: y = b;
      3'd2: y = c;
      3'd3: y = d;
      3'd4: y = e;
      3'd5: y = f;
      3'd6: y = g;
      3'd7: y = h;
    endcase
  end

endmodule
