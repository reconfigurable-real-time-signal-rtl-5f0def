// tb_clock_mux8: applies every select code with random inputs and
// checks that y equals the input the code names (0 -> a ... 7 -> h).
module tb_clock_mux8;
  logic [7:0] in;
  logic [2:0] s;
  logic y;
  int checks = 0, failures = 0;

  clock_mux8 dut (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .e(in[4]), .f(in[5]),
    .g(in[6]), .h(in[7]), .s(s), .y(y));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      for (int sel = 0; sel < 8; sel++) begin
        in = 8'($urandom);
        s  = 3'(sel);
        #1;
        checks++;
        if (y !== in[sel]) begin failures++; $display("s=%0d in=%b y=%b", sel, in, y); end
        // flip only the selected input: y must follow
        in[sel] = ~in[sel];
        #1;
        checks++;
        if (y !== in[sel]) begin failures++; $display("s=%0d did not follow", sel); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
