// tb_sync_2ff: checks that the synchronizer delays its input by exactly
// two receiving-clock edges and that reset clears it.
module tb_sync_2ff;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [3];
  int checks = 0, failures = 0;

  sync_2ff #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 5'h1f;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== '0) begin failures++; $display("reset: q=%h", q); end
    rst_n = 1;
    hist[0] = 0; hist[1] = 0; hist[2] = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = W'($urandom);
      @(posedge clk); #1;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      // after this edge q holds the value d had two edges ago
      if (i >= 1) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("cycle %0d q=%h expected %h", i, q, hist[1]); end
      end
    end
    // asynchronous reset clears mid-cycle
    #2 rst_n = 0; #1;
    checks++; if (q !== '0) begin failures++; $display("async reset failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
