// async_fifo: first-in first-out buffer between two unrelated clocks.
//
// Carries captured samples from the capture clock (wclk) to the serial
// link clock (rclk). It is built as in the source design's FIFO block
// diagram: a dual-port memory, a write-pointer/full block in the write
// domain, a read-pointer/empty block in the read domain, and two
// two-flop synchronizers that pass the Gray-coded pointers across. The
// memory is written only when winc is high and the FIFO is not full.
//
// Interface: write side wclk, wrst_n, winc, wdata, wfull; read side rclk,
// rrst_n, rinc, rdata, rempty. rdata shows the oldest word while rempty
// is low (first-word fall-through); raising rinc for one rclk edge
// removes it. Resets are active low and asynchronous; both sides must be
// reset together. Default size: 16 words of 8 bits.
module async_fifo #(
  parameter int unsigned DSIZE = 8,
  parameter int unsigned ASIZE = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             winc,
  input  logic [DSIZE-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  output logic [DSIZE-1:0] rdata,
  output logic             rempty
);

  logic [ASIZE-1:0] waddr, raddr;
  logic [ASIZE:0]   wptr, rptr, wq2_rptr, rq2_wptr;

  sync_2ff #(.WIDTH(ASIZE+1)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(rptr), .q(wq2_rptr)
  );

  sync_2ff #(.WIDTH(ASIZE+1)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(wptr), .q(rq2_wptr)
  );

  fifo_mem #(.DSIZE(DSIZE), .ASIZE(ASIZE)) u_mem (
    .wclk(wclk), .wclken(winc && !wfull), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata)
  );

  fifo_wptr_full #(.ASIZE(ASIZE)) u_wptr_full (
    .wclk(wclk), .wrst_n(wrst_n), .winc(winc), .wq2_rptr(wq2_rptr),
    .wfull(wfull), .waddr(waddr), .wptr(wptr)
  );

  fifo_rptr_empty #(.ASIZE(ASIZE)) u_rptr_empty (
    .rclk(rclk), .rrst_n(rrst_n), .rinc(rinc), .rq2_wptr(rq2_wptr),
    .rempty(rempty), .raddr(raddr), .rptr(rptr)
  );

endmodule
