// tb_rsc_top_full: the signal-capture system at its default sizes: a
// 50 MHz clock, 16 samples per capture and a 16-word FIFO. For each of
// the eight rate codes it resets the system, triggers one capture of the
// observed signal (a new random byte every clock) and receives the 16
// samples from the serial line, decoding it at the expected bit time
// (2 * round(50e6 / (2 * rate)) clocks) and checking values and framing. At code 3 (19200 bit/s) a
// second capture follows without reset. With the sample count equal to
// the FIFO depth a capture never stalls, which is checked too. At code 3
// the observed signal repeats 00, 33, 44, 55.
module tb_rsc_top_full;
  localparam int N = 16;   // the top's default sample count
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
  // bit time in 20 ns clocks: 2 * round(50e6 / (2 * rate))
  int unsigned BITC [8] = '{434, 868, 1302, 2604, 5208, 10416, 20834, 41666};

  rsc_top dut (.clk(clk), .rst(rst),
    .trigger(trigger), .data(data), .bps(bps), .dout(dout), .cap_busy(cap_busy),
    .cap_done(cap_done), .fifo_full(fifo_full), .tx_busy(tx_busy));

  uart_line_monitor mon (.clk(clk), .rst(rst), .line(dout), .bit_cycles(bit_cycles),
    .valid(mvalid), .data(mdata), .frame_err(merr), .start_cycle(mstart));

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    #400ms;
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
  // at code 3 the observed signal cycles through 00, 33, 44, 55
  int pat = 0;
  function automatic logic [7:0] next_sample();
    logic [7:0] P [4] = '{8'h00, 8'h33, 8'h44, 8'h55};
    if (bps != 3'd3) return 8'($urandom);
    pat = (pat + 1) % 4;
    return P[pat];
  endfunction

  task automatic capture();
    int stores = 0;
    logic busy_q, full_q;
    @(negedge clk);
    trigger = 1;
    data = next_sample();
    checks++;
    if (cap_busy || cap_done) begin failures++; $display("not armed at trigger"); end
    expq.push_back(data);     // held at the trigger edge
    n_trig++;
    @(posedge clk); #1;
    for (int guard = 0; guard < 100000 && !cap_done; guard++) begin
      @(negedge clk);
      data = next_sample();
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
      bit_cycles = BITC[code];
      prev_start = 0;
      repeat (4) @(posedge clk);
      #1 rst = 0;
      repeat (2) @(posedge clk);
      capture();
      drain();
      if (code == 3) begin
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
    checks++; if (n_trig != 9 || n_done != 9 || n_rearm != 9) begin failures++; $display("capture count wrong"); end
    checks++; if (n_stall != 0) begin failures++; $display("a one-FIFO capture stalled"); end
    checks++; if (n_rates != 8) begin failures++; $display("not all rates"); end
    checks++; if (n_b2b == 0) begin failures++; $display("no back-to-back frames"); end
    checks++; if (n_idle != 9) begin failures++; $display("line idle count %0d", n_idle); end
    checks++; if (n_rx != 9 * N) begin failures++; $display("received %0d bytes, expected %0d", n_rx, 9 * N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
