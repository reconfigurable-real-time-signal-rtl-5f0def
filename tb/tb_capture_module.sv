// tb_capture_module: the observed signal takes a new random value every
// clock. A model FIFO-full signal is held low for the first capture and
// toggled at random later. Checks, for each capture, that exactly
// NUM_SAMPLES words are written; that without back-pressure they are the
// input values of NUM_SAMPLES consecutive clocks starting with the clock
// edge at which the trigger was seen, written one clock later each; that
// with back-pressure each word is the input seen at the edge of the
// previous write (held, not lost); and that nothing is written while
// the FIFO is full or the module is idle or done.
module tb_capture_module;
  localparam int N = 16;
  logic clk = 0, rst = 1, trigger = 0, wfull = 0, winc, busy, done;
  logic [7:0] data_in = 0, wdata;
  logic [7:0] din_at [longint unsigned];   // data_in value at each clock edge
  longint unsigned cyc = 0;
  int checks = 0, failures = 0, stalls = 0, captures = 0;

  capture_module #(.DATA_W(8), .NUM_SAMPLES(N)) dut (.clk(clk), .rst(rst), .trigger(trigger),
    .data_in(data_in), .wfull(wfull), .winc(winc), .wdata(wdata), .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one capture; returns after done
  task automatic capture(input bit backpressure);
    longint unsigned t_trig, t_prev_write;
    int n = 0;
    @(negedge clk);
    trigger = 1;
    data_in = 8'($urandom);
    @(posedge clk);
    t_trig = cyc; din_at[cyc] = data_in; cyc++;
    #1;
    t_prev_write = t_trig;
    for (int guard = 0; guard < 400 && !done; guard++) begin
      logic w;
      @(negedge clk);
      data_in = 8'($urandom);
      wfull   = backpressure ? (($urandom % 3) == 0) : 1'b0;
      #1;
      w = winc;
      checks++;
      if (w !== (!wfull && busy)) begin failures++; $display("winc=%0d wfull=%0d busy=%0d", w, wfull, busy); end
      if (w) begin
        checks++;
        if (wdata !== din_at[t_prev_write]) begin
          failures++; $display("sample %0d = %h, expected %h", n, wdata, din_at[t_prev_write]);
        end
        if (!backpressure) begin
          checks++;
          if (cyc != t_trig + 1 + n) begin failures++; $display("sample %0d written at +%0d", n, cyc - t_trig); end
        end
        n++;
      end else if (busy && wfull) stalls++;
      @(posedge clk);
      din_at[cyc] = data_in;
      if (w) t_prev_write = cyc;
      cyc++;
      #1;
    end
    checks++;
    if (n != N || !done) begin failures++; $display("capture wrote %0d samples, done=%0d", n, done); end
    captures++;
    // done holds while the trigger stays high, nothing written
    wfull = 0;
    repeat (5) begin
      @(negedge clk); #1;
      checks++; if (winc || !done) begin failures++; $display("activity while done"); end
      @(posedge clk); cyc++; #1;
    end
    @(negedge clk); trigger = 0;
    @(posedge clk); cyc++; #1;
    checks++; if (done || busy) begin failures++; $display("did not re-arm"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (3) begin
      @(negedge clk); #1;
      checks++; if (winc || busy || done) begin failures++; $display("activity while idle"); end
      @(posedge clk); cyc++; #1;
    end
    capture(0);
    capture(1);
    capture(1);
    capture(0);
    $display("captures=%0d stalls=%0d", captures, stalls);
    checks++; if (stalls == 0) begin failures++; $display("no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
