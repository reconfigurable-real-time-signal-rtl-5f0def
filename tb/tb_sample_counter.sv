// tb_sample_counter: random clear/increment against a reference count,
// checking count and the last flag at NUM_SAMPLES-1.
module tb_sample_counter;
  localparam int N = 16;
  logic clk = 0, rst = 1, clr, inc, last;
  logic [3:0] count;
  int unsigned model;
  int checks = 0, failures = 0, lasts = 0;

  sample_counter #(.NUM_SAMPLES(N)) dut (.clk(clk), .rst(rst), .clr(clr), .inc(inc), .count(count), .last(last));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; inc = 0; model = 0;
    #12 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr = ($urandom % 40) == 0;
      inc = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (clr) model = 0;
      else if (inc) model = (model + 1) % N;
      checks++;
      if (count !== 4'(model)) begin failures++; $display("i=%0d count=%0d exp %0d", i, count, model); end
      checks++;
      if (last !== (model == N - 1)) begin failures++; $display("i=%0d last=%0d count=%0d", i, last, model); end
      if (last) lasts++;
    end
    checks++; if (lasts == 0) begin failures++; $display("last never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
