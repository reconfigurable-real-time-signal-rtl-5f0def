// tb_async_fifo: runs the asynchronous FIFO with unrelated write and
// read clocks (10 ns and 37 ns), random write and read requests and a
// reference queue. Checks data order, that exactly 16 words fit with the
// reader stopped, that full blocks further writes, that empty blocks
// reads and that empty clears after a write.
module tb_async_fifo;
  localparam int DS = 8, AS = 4, DEPTH = 1 << AS;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic winc = 0, rinc = 0, wfull, rempty;
  logic [DS-1:0] wdata = '0, rdata;
  logic [DS-1:0] q[$];
  int checks = 0, failures = 0, accepted = 0, full_blocks = 0, empty_blocks = 0;

  async_fifo #(.DSIZE(DS), .ASIZE(AS)) dut (.wclk(wclk), .wrst_n(wrst_n), .winc(winc), .wdata(wdata),
    .wfull(wfull), .rclk(rclk), .rrst_n(rrst_n), .rinc(rinc), .rdata(rdata), .rempty(rempty));

  always #5  wclk = ~wclk;
  always #18.5 rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write side: samples wfull before the edge, like the capture logic
  task automatic write_cycle(input logic want);
    logic f;
    @(negedge wclk);
    winc  = want;
    wdata = DS'($urandom);
    f     = wfull;  // registered on wclk: stable until the coming edge
    @(posedge wclk);
    if (winc && !f) begin q.push_back(wdata); accepted++; end
    else if (winc) full_blocks++;
    #1;  // later changes to winc land after the edge
  endtask

  task automatic read_cycle(input logic want);
    logic e0;
    logic [DS-1:0] d0;
    @(negedge rclk);
    rinc = want;
    e0   = rempty;  // registered on rclk: stable until the coming edge
    d0   = rdata;
    @(posedge rclk);
    if (rinc && !e0) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("read with model empty"); end
      else begin
        logic [DS-1:0] e;
        e = q.pop_front();
        if (d0 !== e) begin failures++; $display("rdata %h expected %h", d0, e); end
      end
    end else if (rinc) empty_blocks++;
    #1;
  endtask

  logic done_w = 0;

  initial begin
    #30 wrst_n = 1; rrst_n = 1;
    checks++; if (!rempty || wfull) begin failures++; $display("reset flags wrong"); end
    // phase 1: fill with the reader stopped
    repeat (40) write_cycle(1);
    checks++; if (accepted != DEPTH) begin failures++; $display("accepted %0d, expected %0d", accepted, DEPTH); end
    checks++; if (!wfull) begin failures++; $display("not full after fill"); end
    // phase 2: random traffic both sides
    fork
      begin repeat (3000) write_cycle(1'($urandom % 3 != 0)); winc = 0; done_w = 1; end
      begin
        while (!done_w || q.size() != 0) read_cycle(1'($urandom % 2));
        rinc = 0;
      end
    join
    repeat (8) @(posedge rclk);
    checks++; if (!rempty) begin failures++; $display("not empty at end"); end
    // phase 3: a read request into an empty FIFO does nothing
    repeat (4) read_cycle(1);
    checks++; if (!rempty || q.size() != 0) begin failures++; $display("empty read changed state"); end
    // phase 4: empty clears after one write within a few read clocks
    write_cycle(1); @(negedge wclk); winc = 0;
    repeat (4) @(posedge rclk);
    checks++; if (rempty) begin failures++; $display("empty did not clear"); end
    read_cycle(1); @(negedge rclk); rinc = 0;
    $display("accepted=%0d full_blocks=%0d empty_blocks=%0d", accepted, full_blocks, empty_blocks);
    checks++; if (full_blocks == 0 || empty_blocks == 0) begin failures++; $display("full or empty never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
