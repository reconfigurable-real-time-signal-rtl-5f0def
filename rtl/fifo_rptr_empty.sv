// fifo_rptr_empty: read pointer and empty flag of the asynchronous FIFO.
//
// Keeps the read pointer one bit wider than the memory address: a binary
// copy addresses the memory, a Gray copy (rptr) is handed to the write
// domain. The pointer advances on a read request (rinc) only while the
// FIFO is not empty. Empty is computed in the read domain: the FIFO is
// empty when the next read pointer equals the write pointer synchronized
// into the read domain (rq2_wptr), all bits including the extra one.
// This follows the source design. rempty is registered; it is set by
// reset and drops two to three rclk edges after the first write.
//
// Reset (rrst_n low, asynchronous) clears the pointer and sets rempty.
module fifo_rptr_empty #(
  parameter int unsigned ASIZE = 4
) (
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  input  logic [ASIZE:0]   rq2_wptr,
  output logic             rempty,
  output logic [ASIZE-1:0] raddr,
  output logic [ASIZE:0]   rptr
);

  logic [ASIZE:0] rbin, rbin_next, rgray_next;

  always_comb begin
    rbin_next  = rbin + {{ASIZE{1'b0}}, (rinc && !rempty)};
    rgray_next = (rbin_next >> 1) ^ rbin_next;
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin   <= '0;
      rptr   <= '0;
      rempty <= 1'b1;
    end else begin
      rbin   <= rbin_next;
      rptr   <= rgray_next;
      rempty <= (rgray_next == rq2_wptr);
    end
  end

  // The pointer handed to the write domain changes in at most one bit
  // per clock, which is what makes the two-flop synchronizer safe.
  logic [ASIZE:0] rptr_q;
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) rptr_q <= '0;
    else        rptr_q <= rptr;
  end
  a_rptr_one_bit: assert property (@(posedge rclk) disable iff (!rrst_n)
    (((rptr ^ rptr_q) & ((rptr ^ rptr_q) - 1'b1)) == '0));

  assign raddr = rbin[ASIZE-1:0];

endmodule
