// tb_baud_clock_gen: measures the period and high time of each of the
// eight bit-rate clocks at the 50 MHz default, in system clock cycles,
// against hand-computed values: 2 * round(50e6 / (2 * rate)) for rates
// 115200, 57600, 38400, 19200, 9600, 4800, 2400, 1200. Also checks that
// the clocks are held low in reset.
module tb_baud_clock_gen;
  logic clk = 0, rst = 1;
  logic [7:0] bclk, bclk_q;
  longint unsigned cyc = 0;
  longint unsigned last_rise [8];
  longint unsigned last_fall [8];
  int nperiods [8];
  int checks = 0, failures = 0;
  // expected periods in 20 ns cycles
  int unsigned EXP [8] = '{434, 868, 1302, 2604, 5208, 10416, 20834, 41666};

  baud_clock_gen dut (.clk(clk), .rst(rst), .baud_clk(bclk));

  always #10 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      bclk_q <= bclk;
      for (int i = 0; i < 8; i++) begin
        if (bclk[i] && !bclk_q[i]) begin
          if (last_rise[i] != 0) begin
            checks++;
            nperiods[i]++;
            if (cyc - last_rise[i] != EXP[i]) begin
              failures++; $display("clock %0d period %0d expected %0d", i, cyc - last_rise[i], EXP[i]);
            end
          end
          last_rise[i] = cyc;
        end
        if (!bclk[i] && bclk_q[i] && last_rise[i] != 0) begin
          checks++;
          if (cyc - last_rise[i] != EXP[i] / 2) begin
            failures++; $display("clock %0d high time %0d expected %0d", i, cyc - last_rise[i], EXP[i] / 2);
          end
          last_fall[i] = cyc;
        end
      end
    end
  end

  initial begin
    bclk_q = '0;
    foreach (last_rise[i]) begin last_rise[i] = 0; last_fall[i] = 0; nperiods[i] = 0; end
    repeat (50) @(posedge clk);
    #1;
    checks++; if (bclk !== 8'h00) begin failures++; $display("clocks not low in reset"); end
    rst = 0;
    repeat (3 * 41666 + 100) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (nperiods[i] < 2) begin failures++; $display("clock %0d measured %0d periods", i, nperiods[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
