// tb_fifo_mem: writes random words to random addresses of the dual-port
// array, with the write enable toggled at random, and checks every read
// against a reference copy kept by the testbench.
module tb_fifo_mem;
  localparam int DS = 8, AS = 4, N = 1 << AS;
  logic clk = 0, wclken;
  logic [AS-1:0] waddr, raddr;
  logic [DS-1:0] wdata, rdata;
  logic [DS-1:0] ref_mem [N];
  int checks = 0, failures = 0;

  fifo_mem #(.DSIZE(DS), .ASIZE(AS)) dut (.wclk(clk), .wclken(wclken), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wclken = 1;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); waddr = AS'(a); wdata = DS'(a * 17 + 3); ref_mem[a] = wdata;
    end
    @(negedge clk); wclken = 0;
    for (int a = 0; a < N; a++) begin
      raddr = AS'(a); #1;
      checks++; if (rdata !== ref_mem[a]) begin failures++; $display("init a=%0d %h/%h", a, rdata, ref_mem[a]); end
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wclken = 1'($urandom);
      waddr  = AS'($urandom);
      wdata  = DS'($urandom);
      raddr  = AS'($urandom);
      #1;
      checks++; if (rdata !== ref_mem[raddr]) begin failures++; $display("i=%0d raddr=%0d %h/%h", i, raddr, rdata, ref_mem[raddr]); end
      @(posedge clk);
      if (wclken) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
