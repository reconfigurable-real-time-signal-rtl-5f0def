// tb_uart_tx: feeds the transmitter from a model FIFO (first-word
// fall-through, like the real one) and decodes the serial line one
// sample per bit clock. Checks each frame (start 0, 8 data bits LSB
// first, stop 1), the byte order, one FIFO read per byte, the state
// sequence idle-start-d0..d7-stop-nop-idle, and the 12-bit-time spacing
// of back-to-back frames.
module tb_uart_tx;
  import rsc_pkg::*;
  logic clk = 0, rst = 1, rempty, rinc, tx, busy;
  logic [7:0] rdata;
  tx_state_e state, prev_state;
  logic [7:0] fifo_q[$];
  logic [7:0] sent_q[$];
  int checks = 0, failures = 0, frames = 0, reads = 0, b2b = 0;
  longint unsigned cyc = 0, last_start = 0;

  uart_tx dut (.clk(clk), .rst(rst), .fifo_rempty(rempty), .fifo_rdata(rdata),
    .fifo_rinc(rinc), .tx(tx), .busy(busy), .state(state));

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line decoder state
  int   dec_bit = -1;   // -1 idle, 0..7 data, 8 stop
  logic [7:0] dec_sh;

  task automatic push(input logic [7:0] b);
    fifo_q.push_back(b);
    sent_q.push_back(b);
  endtask

  task automatic step();
    logic r;
    @(negedge clk);
    rempty = (fifo_q.size() == 0);
    rdata  = rempty ? 8'h00 : fifo_q[0];
    #1;
    r = rinc;
    checks++;
    if (r !== (state == TX_IDLE && !rempty)) begin failures++; $display("rinc=%0d in state %s", r, state.name()); end
    // state sequence
    if (cyc != 0 && state != prev_state) begin
      tx_state_e exp;
      case (prev_state)
        TX_IDLE: exp = TX_START;
        TX_D7:   exp = TX_STOP;
        TX_STOP: exp = TX_NOP;
        TX_NOP:  exp = TX_IDLE;
        default: exp = tx_state_e'(prev_state + 1);
      endcase
      checks++;
      if (state != exp) begin failures++; $display("state %s after %s", state.name(), prev_state.name()); end
    end
    if (state != TX_IDLE && state == prev_state) begin failures++; $display("state %s held", state.name()); end
    prev_state = state;
    // decode the line
    if (dec_bit == -1) begin
      if (tx == 1'b0) begin
        if (last_start != 0 && cyc - last_start == 12) b2b++;
        if (last_start != 0) begin
          checks++;
          if (cyc - last_start < 12) begin failures++; $display("frames %0d apart", cyc - last_start); end
        end
        last_start = cyc;
        dec_bit = 0;
      end
    end else if (dec_bit < 8) begin
      dec_sh = {tx, dec_sh[7:1]};
      dec_bit++;
    end else begin
      checks++;
      if (tx !== 1'b1) begin failures++; $display("bad stop bit"); end
      checks++;
      if (sent_q.size() == 0) begin failures++; $display("unexpected frame"); end
      else begin
        logic [7:0] e;
        e = sent_q.pop_front();
        if (dec_sh !== e) begin failures++; $display("byte %h expected %h", dec_sh, e); end
      end
      frames++;
      dec_bit = -1;
    end
    @(posedge clk);
    if (r) begin void'(fifo_q.pop_front()); reads++; end
    cyc++;
    #1;
  endtask

  initial begin
    rempty = 1; rdata = 0; prev_state = TX_IDLE;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (tx !== 1'b1 || state != TX_IDLE) begin failures++; $display("reset state wrong"); end
    rst = 0;
    repeat (5) step();
    checks++; if (tx !== 1'b1 || busy) begin failures++; $display("line not idle with empty FIFO"); end
    // burst: back-to-back frames
    push(8'h33); push(8'h44); push(8'h55); push(8'hA5); push(8'h01); push(8'h80);
    for (int i = 0; i < 14; i++) push(8'($urandom));
    repeat (20 * 12 + 20) step();
    // single bytes with gaps
    for (int i = 0; i < 10; i++) begin
      push(8'($urandom));
      repeat (12 + ($urandom % 9)) step();
    end
    repeat (30) step();
    checks++; if (frames != 30) begin failures++; $display("frames=%0d expected 30", frames); end
    checks++; if (reads != 30) begin failures++; $display("reads=%0d expected 30", reads); end
    checks++; if (b2b < 19) begin failures++; $display("back-to-back frames at 12 bit times: %0d", b2b); end
    $display("frames=%0d reads=%0d back_to_back=%0d", frames, reads, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
