// tb_fifo_wptr_full: drives write requests and a (binary-modelled,
// Gray-encoded) synchronized read pointer, and checks the write address,
// the Gray write pointer and the full flag against a reference model:
// full exactly when the write count is 16 ahead of the read count, and
// no advance while full.
module tb_fifo_wptr_full;
  localparam int AS = 4, DEPTH = 1 << AS;
  logic clk = 0, rst_n = 0, winc;
  logic [AS:0] wq2_rptr, wptr;
  logic [AS-1:0] waddr;
  logic wfull;
  int unsigned wcount, rcount;
  int unsigned rprev = 0;  // read count the registered full flag last saw
  int checks = 0, failures = 0, full_seen = 0, blocked = 0;

  function automatic logic [AS:0] gray(int unsigned b);
    logic [AS:0] x = (AS+1)'(b);
    return (x >> 1) ^ x;
  endfunction

  fifo_wptr_full #(.ASIZE(AS)) dut (.wclk(clk), .wrst_n(rst_n), .winc(winc), .wq2_rptr(wq2_rptr),
    .wfull(wfull), .waddr(waddr), .wptr(wptr));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    winc = 0; wq2_rptr = '0; wcount = 0; rcount = 0;
    #12 rst_n = 1;
    checks++; if (wfull !== 0 || wptr !== 0 || waddr !== 0) begin failures++; $display("reset state wrong"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      winc = ($urandom % 4) != 0;
      // reader advances sometimes, never past the writer
      if (rcount < wcount && ($urandom % 3) == 0) rcount++;
      if (i > 1000 && i < 1100) rcount = wcount;  // drain phase
      wq2_rptr = gray(rcount);
      @(posedge clk); #1;
      if (winc && (wcount - rprev) != DEPTH) wcount++;
      else if (winc) blocked++;
      checks++;
      if (waddr !== AS'(wcount)) begin failures++; $display("i=%0d waddr=%0d exp %0d", i, waddr, AS'(wcount)); end
      checks++;
      if (wptr !== gray(wcount)) begin failures++; $display("i=%0d wptr=%b exp %b", i, wptr, gray(wcount)); end
      checks++;
      if (wfull !== ((wcount - rcount) == DEPTH)) begin
        failures++; $display("i=%0d wfull=%0d w=%0d r=%0d", i, wfull, wcount, rcount);
      end
      if (wfull) full_seen++;
      rprev = rcount;
    end
    checks++; if (full_seen == 0 || blocked == 0) begin failures++; $display("full never reached"); end
    $display("full cycles=%0d blocked writes=%0d", full_seen, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
