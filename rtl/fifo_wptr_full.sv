// fifo_wptr_full: write pointer and full flag of the asynchronous FIFO.
//
// Keeps the write pointer one bit wider than the memory address: a binary
// copy addresses the memory, a Gray copy (wptr) is handed to the read
// domain. The pointer advances on a write request (winc) only while the
// FIFO is not full, so a write into a full FIFO is dropped and nothing is
// overwritten. Full is computed in the write domain against the read
// pointer synchronized into it (wq2_rptr): in Gray code the FIFO is full
// when the next write pointer equals the synchronized read pointer with
// its two most significant bits inverted and the rest equal. The extra
// pointer bit, the binary addressing and generating full in the write
// domain follow the source design; the Gray form of the full test is this
// implementation's. wfull is registered and asserted in the same cycle
// the last free word is written.
//
// Reset (wrst_n low, asynchronous) clears the pointer and the flag.
module fifo_wptr_full #(
  parameter int unsigned ASIZE = 4
) (
  input  logic           wclk,
  input  logic           wrst_n,
  input  logic           winc,
  input  logic [ASIZE:0] wq2_rptr,
  output logic           wfull,
  output logic [ASIZE-1:0] waddr,
  output logic [ASIZE:0] wptr
);

  logic [ASIZE:0] wbin, wbin_next, wgray_next;
  logic           wfull_next;

  always_comb begin
    wbin_next  = wbin + {{ASIZE{1'b0}}, (winc && !wfull)};
    wgray_next = (wbin_next >> 1) ^ wbin_next;
    wfull_next = (wgray_next == {~wq2_rptr[ASIZE:ASIZE-1], wq2_rptr[ASIZE-2:0]});
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wptr  <= '0;
      wfull <= 1'b0;
    end else begin
      wbin  <= wbin_next;
      wptr  <= wgray_next;
      wfull <= wfull_next;
    end
  end

  // The pointer handed to the read domain changes in at most one bit per
  // clock, which is what makes the two-flop synchronizer safe.
  logic [ASIZE:0] wptr_q;
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) wptr_q <= '0;
    else        wptr_q <= wptr;
  end
  a_wptr_one_bit: assert property (@(posedge wclk) disable iff (!wrst_n)
    (((wptr ^ wptr_q) & ((wptr ^ wptr_q) - 1'b1)) == '0));

  assign waddr = wbin[ASIZE-1:0];

endmodule
