// tb_communication_module: writes bytes into the communication module
// as fast as the FIFO accepts them and decodes the serial line, for each
// of the eight rate codes. Runs with a 1.152 MHz system clock so that a
// bit lasts exactly 1152000 / rate clocks (10 ... 960). Checks the bytes
// and their order, the frame format, the bit time and the 12-bit-time
// spacing of back-to-back frames, that the FIFO fills (writes held off by
// full) and that the line goes idle once the FIFO is empty.
module tb_communication_module;
  localparam int unsigned CLK = 1_152_000;
  logic clk = 0, rst = 0, winc = 0, wfull, dout, tx_busy, uart_clk;
  logic [2:0] bps = 0;
  logic [7:0] wdata = 0;
  logic mvalid, merr;
  logic [7:0] mdata;
  longint unsigned mstart, prev_start;
  int unsigned bit_cycles;
  logic [7:0] sent[$];
  int checks = 0, failures = 0, full_waits = 0, rx = 0, b2b = 0;
  int unsigned RATE [8] = '{115200, 57600, 38400, 19200, 9600, 4800, 2400, 1200};

  communication_module #(.CLK_HZ(CLK), .ASIZE(4)) dut (.clk(clk), .rst(rst), .bps(bps),
    .winc(winc), .wdata(wdata), .wfull(wfull), .dout(dout), .tx_busy(tx_busy), .uart_clk(uart_clk));

  uart_line_monitor mon (.clk(clk), .rst(rst), .line(dout), .bit_cycles(bit_cycles),
    .valid(mvalid), .data(mdata), .frame_err(merr), .start_cycle(mstart));

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (mvalid) begin
      rx++;
      checks++;
      if (merr) begin failures++; $display("framing error"); end
      checks++;
      if (sent.size() == 0) begin failures++; $display("unexpected byte %h", mdata); end
      else begin
        logic [7:0] e;
        e = sent.pop_front();
        if (mdata !== e) begin failures++; $display("byte %h expected %h (bps %0d)", mdata, e, bps); end
      end
      if (prev_start != 0) begin
        checks++;
        if (mstart - prev_start < 12 * bit_cycles - 1) begin
          failures++; $display("frames %0d clocks apart, bit %0d", mstart - prev_start, bit_cycles);
        end
        if (mstart - prev_start <= 12 * bit_cycles + 1) b2b++;
      end
      prev_start = mstart;
    end
  end

  // measure the bit time on the line: shortest low pulse of a 0x55 byte
  task automatic run_rate(input int code, input int nbytes);
    int waited;
    rst = 1;
    bps = 3'(code);
    bit_cycles = CLK / RATE[code];
    prev_start = 0;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < nbytes; i++) begin
      logic [7:0] b;
      logic f;
      b = (i == 0) ? 8'h55 : 8'($urandom);
      @(negedge clk);
      f = wfull;
      while (f) begin
        full_waits++;
        @(negedge clk); f = wfull;
      end
      winc = 1; wdata = b;
      @(posedge clk); #1;
      sent.push_back(b);
      winc = 0;
    end
    waited = 0;
    while (sent.size() != 0 && waited < 40 * 12 * int'(bit_cycles)) begin @(posedge clk); waited++; end
    repeat (3 * bit_cycles) @(posedge clk);
    #1;
    checks++;
    if (sent.size() != 0) begin failures++; $display("bps %0d: %0d bytes not received", code, sent.size()); sent.delete(); end
    checks++;
    if (dout !== 1'b1 || tx_busy) begin failures++; $display("bps %0d: line not idle after drain", code); end
  endtask

  // bit time check on the first byte 0x55: alternating bits
  longint unsigned edge_t [$];
  logic dout_q = 1;
  always @(posedge clk) begin
    dout_q <= dout;
    if (!rst && dout != dout_q) edge_t.push_back(mon.cyc);
  end

  initial begin
    for (int code = 0; code < 8; code++) begin
      edge_t.delete();
      run_rate(code, code < 4 ? 24 : 18);
      // 0x55 after the start bit: the first 10 edges are one bit apart
      checks++;
      if (edge_t.size() < 10) begin failures++; $display("bps %0d: too few edges", code); end
      else begin
        for (int k = 1; k < 10; k++) begin
          checks++;
          if (edge_t[k] - edge_t[k-1] != bit_cycles) begin
            failures++; $display("bps %0d: bit lasted %0d clocks, expected %0d", code, edge_t[k] - edge_t[k-1], bit_cycles);
          end
        end
      end
    end
    $display("bytes=%0d full_waits=%0d back_to_back=%0d", rx, full_waits, b2b);
    checks++; if (full_waits == 0) begin failures++; $display("FIFO never full"); end
    checks++; if (b2b == 0) begin failures++; $display("no back-to-back frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
