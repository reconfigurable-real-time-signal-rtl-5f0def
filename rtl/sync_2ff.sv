// sync_2ff: two flip-flop synchronizer for a Gray-coded FIFO pointer.
//
// Carries a pointer from one clock domain into another through two
// flip-flop stages clocked by the receiving clock. Because the pointer is
// Gray coded, at most one bit changes per step, so the value seen after
// the second stage is either the old or the new pointer, never a mix.
// The FIFO uses one copy to bring the read pointer into the write domain
// and one to bring the write pointer into the read domain, as in the
// source design's FIFO block diagram.
//
// Interface: clk and an active-low asynchronous reset rst_n of the
// receiving domain; d from the other domain; q is d delayed by two clk
// edges. Reset clears both stages.
module sync_2ff #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
