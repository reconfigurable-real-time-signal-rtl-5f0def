// fifo_mem: dual-port storage array of the asynchronous FIFO.
//
// One port writes, the other reads. A word is written at the rising edge
// of wclk when wclken is high. The read port is combinational: rdata
// always shows the word at raddr, so the word the read pointer addresses
// is already on the output and a reader takes it without an extra clock.
// Depth is 2**ASIZE words of DSIZE bits; the defaults, 16 words of 8
// bits, are those of the source design. The array is not reset: a word
// is only read after it has been written.
module fifo_mem #(
  parameter int unsigned DSIZE = 8,
  parameter int unsigned ASIZE = 4
) (
  input  logic             wclk,
  input  logic             wclken,
  input  logic [ASIZE-1:0] waddr,
  input  logic [DSIZE-1:0] wdata,
  input  logic [ASIZE-1:0] raddr,
  output logic [DSIZE-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ASIZE;

  logic [DSIZE-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (wclken) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
