// capture_module: takes samples of a signal inside the FPGA and hands
// them to the FIFO.
//
// Holds the capture state machine, the samples counter and the 8-bit
// sample hold register. The register holds each sample until the FIFO
// has taken it; wdata is the register's output. After a trigger the
// module stores NUM_SAMPLES samples, one per clock while the FIFO has
// room, then reports done and waits for the trigger to drop before it
// can be triggered again. The split into state machine and samples
// counter and the 8-bit data follow the source design; the rest is this
// implementation's (see capture_fsm).
//
// Interface: clk, rst (active high, asynchronous), trigger, data_in from
// the observed design; winc, wdata to the FIFO and wfull from it; busy
// and done status. Latency: the sample present on data_in at the clock
// edge where trigger is seen is written one clock later.
module capture_module #(
  parameter int unsigned DATA_W      = rsc_pkg::DATA_W,
  parameter int unsigned NUM_SAMPLES = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              trigger,
  input  logic [DATA_W-1:0] data_in,
  input  logic              wfull,
  output logic              winc,
  output logic [DATA_W-1:0] wdata,
  output logic              busy,
  output logic              done
);

  localparam int unsigned CW = (NUM_SAMPLES > 1) ? $clog2(NUM_SAMPLES) : 1;

  logic          cnt_clr, cnt_inc, hold_en, last;
  logic [CW-1:0] count;
  rsc_pkg::cap_state_e state;

  capture_fsm u_fsm (
    .clk(clk), .rst(rst), .trigger(trigger), .wfull(wfull), .last(last),
    .winc(winc), .cnt_clr(cnt_clr), .cnt_inc(cnt_inc), .hold_en(hold_en),
    .busy(busy), .done(done), .state(state)
  );

  sample_counter #(.NUM_SAMPLES(NUM_SAMPLES)) u_cnt (
    .clk(clk), .rst(rst), .clr(cnt_clr), .inc(cnt_inc),
    .count(count), .last(last)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          wdata <= '0;
    else if (hold_en) wdata <= data_in;
  end

endmodule
