// tb_fifo_rptr_empty: drives read requests and a Gray-encoded
// synchronized write pointer and checks the read address, the Gray read
// pointer and the empty flag against a reference model: empty exactly
// when the read count has caught up with the write count, and no
// advance while empty.
module tb_fifo_rptr_empty;
  localparam int AS = 4, DEPTH = 1 << AS;
  logic clk = 0, rst_n = 0, rinc;
  logic [AS:0] rq2_wptr, rptr;
  logic [AS-1:0] raddr;
  logic rempty;
  int unsigned wcount, rcount;
  int unsigned wprev = 0;  // write count the registered empty flag last saw
  int checks = 0, failures = 0, empty_seen = 0, blocked = 0;

  function automatic logic [AS:0] gray(int unsigned b);
    logic [AS:0] x = (AS+1)'(b);
    return (x >> 1) ^ x;
  endfunction

  fifo_rptr_empty #(.ASIZE(AS)) dut (.rclk(clk), .rrst_n(rst_n), .rinc(rinc), .rq2_wptr(rq2_wptr),
    .rempty(rempty), .raddr(raddr), .rptr(rptr));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rinc = 0; rq2_wptr = '0; wcount = 0; rcount = 0;
    #12 rst_n = 1;
    checks++; if (rempty !== 1 || rptr !== 0 || raddr !== 0) begin failures++; $display("reset state wrong"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rinc = ($urandom % 2) != 0;
      if ((wcount - rcount) < DEPTH && ($urandom % 3) == 0) wcount++;
      rq2_wptr = gray(wcount);
      @(posedge clk); #1;
      // the flag seen by this edge was computed from the previous pointers
      if (rinc && rcount != wprev) rcount++;
      else if (rinc) blocked++;
      checks++;
      if (raddr !== AS'(rcount)) begin failures++; $display("i=%0d raddr=%0d exp %0d", i, raddr, AS'(rcount)); end
      checks++;
      if (rptr !== gray(rcount)) begin failures++; $display("i=%0d rptr=%b exp %b", i, rptr, gray(rcount)); end
      checks++;
      if (rempty !== (rcount == wcount)) begin failures++; $display("i=%0d rempty=%0d r=%0d w=%0d", i, rempty, rcount, wcount); end
      if (rempty) empty_seen++;
      wprev = wcount;
    end
    checks++; if (empty_seen == 0 || blocked == 0) begin failures++; $display("empty never reached"); end
    $display("empty cycles=%0d blocked reads=%0d", empty_seen, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
