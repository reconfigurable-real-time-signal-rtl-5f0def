// tb_rsc_top: end-to-end test of the signal-capture system.
//
// The observed signal is a new random byte every clock. For each of the
// eight rate codes the test resets the system, raises the trigger, and
// receives the captured samples from the serial line with a line
// decoder. It runs at a 1.152 MHz system clock (a bit lasts 1152000 /
// rate clocks) and with 24 samples per capture, more than the 16-word
// FIFO holds, so the capture must stall on a full FIFO. Expected bytes
// come from the capture rule seen at the top's ports: the first sample
// is the input at the edge where the trigger is seen, and each later
// sample is the input at the edge of the previous store, where a store
// happens at every edge the capture is busy and the FIFO not full.
// Mechanisms counted: trigger, stall on full FIFO, capture done, re-arm
// and second capture without reset, each rate, back-to-back frames,
// line idle once the FIFO is empty.
module tb_rsc_top;
  localparam int unsigned CLK = 1_152_000;
  localparam int N = 24;
  logic clk = 0, rst = 0, trigger = 0;
  logic [7:0] data = 0;
  logic [2:0] bps = 0;
  logic dout, cap_busy, cap_done, fifo_full, tx_busy;
  logic mvalid, merr;
  logic [7:0] mdata;
  longint unsigned mstart, prev_start;
  int unsigned bit_cycles;
  logic [7:0] expq[$];
  int checks = 0, failures = 0;
  int n_trig = 0, n_stall = 0, n_done = 0, n_rearm = 0, n_rates = 0, n_b2b = 0, n_idle = 0, n_rx = 0;
  int unsigned RATE [8] = '{115200, 57600, 38400, 19200, 9600, 4800, 2400, 1200};

  rsc_top #(.CLK_HZ(CLK), .NUM_SAMPLES(N), .FIFO_ASIZE(4)) dut (.clk(clk), .rst(rst),
    .trigger(trigger), .data(data), .bps(bps), .dout(dout), .cap_busy(cap_busy),
    .cap_done(cap_done), .fifo_full(fifo_full), .tx_busy(tx_busy));

  uart_line_monitor mon (.clk(clk), .rst(rst), .line(dout), .bit_cycles(bit_cycles),
    .valid(mvalid), .data(mdata), .frame_err(merr), .start_cycle(mstart));

  always #5 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver side: compare with the expected samples
  always @(posedge clk) begin
    if (mvalid) begin
      logic [7:0] e;
      n_rx++;
      checks++;
      if (merr) begin failures++; $display("framing error"); end
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected byte %h (bps %0d) at %t n_rx=%0d", mdata, bps, $time, n_rx); end
      else begin
        e = expq.pop_front();
        if (mdata !== e) begin failures++; $display("byte %h expected %h (bps %0d)", mdata, e, bps); end
      end
      if (prev_start != 0 && mstart - prev_start <= 12 * bit_cycles + 1) n_b2b++;
      prev_start = mstart;
    end
  end

  // one capture: trigger, follow the store rule, wait for done, release
  task automatic capture();
    int stores = 0;
    logic busy_q, full_q;
    @(negedge clk);
    trigger = 1;
    data = 8'($urandom);
    checks++;
    if (cap_busy || cap_done) begin failures++; $display("not armed at trigger"); end
    expq.push_back(data);     // held at the trigger edge
    n_trig++;
    @(posedge clk); #1;
    for (int guard = 0; guard < 100000 && !cap_done; guard++) begin
      @(negedge clk);
      data = 8'($urandom);
      busy_q = cap_busy; full_q = fifo_full;
      if (busy_q && full_q) n_stall++;
      @(posedge clk); #1;
      if (busy_q && !full_q) begin
        stores++;
        if (stores < N) expq.push_back(data);  // the held value for the next store
      end
    end
    checks++;
    if (!cap_done || stores != N) begin failures++; $display("capture: done=%0d stores=%0d", cap_done, stores); end
    else n_done++;
    repeat (3) @(posedge clk);
    @(negedge clk) trigger = 0;
    @(posedge clk); #1;
    checks++;
    if (cap_done || cap_busy) begin failures++; $display("did not re-arm"); end
    else n_rearm++;
  endtask

  task automatic drain();
    int waited = 0;
    while (expq.size() != 0 && waited < 30 * 12 * int'(bit_cycles)) begin @(posedge clk); waited++; end
    repeat (3 * bit_cycles) @(posedge clk);
    #1;
    checks++;
    if (expq.size() != 0) begin failures++; $display("bps %0d: %0d samples not received", bps, expq.size()); expq.delete(); end
    checks++;
    if (dout !== 1'b1 || tx_busy) begin failures++; $display("line not idle after drain"); end
    else n_idle++;
  endtask

  initial begin
    #1;  // give reset a rising edge
    for (int code = 0; code < 8; code++) begin
      rst = 1;
      bps = 3'(code);
      bit_cycles = CLK / RATE[code];
      prev_start = 0;
      repeat (4) @(posedge clk);
      #1 rst = 0;
      repeat (2) @(posedge clk);
      capture();
      drain();
      if (code == 0 || code == 7) begin
        // second capture without reset
        prev_start = 0;
        capture();
        drain();
      end
      n_rates++;
      rst = 0;
    end
    $display("triggers=%0d stalls=%0d done=%0d rearm=%0d rates=%0d back_to_back=%0d idle=%0d bytes=%0d",
      n_trig, n_stall, n_done, n_rearm, n_rates, n_b2b, n_idle, n_rx);
    checks++; if (n_trig != 10 || n_done != 10 || n_rearm != 10) begin failures++; $display("capture count wrong"); end
    checks++; if (n_stall == 0) begin failures++; $display("no stall on full FIFO"); end
    checks++; if (n_rates != 8) begin failures++; $display("not all rates"); end
    checks++; if (n_b2b == 0) begin failures++; $display("no back-to-back frames"); end
    checks++; if (n_idle != 10) begin failures++; $display("line idle count %0d", n_idle); end
    checks++; if (n_rx != 10 * N) begin failures++; $display("received %0d bytes, expected %0d", n_rx, 10 * N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
