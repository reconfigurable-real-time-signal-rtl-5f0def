// tb_uart_tx_parity: the transmitter configured with an even and with an
// odd parity bit, each fed from its own model FIFO with the same bytes.
// Decodes both lines one sample per bit clock and checks the data, the
// parity bit (even: ones in data plus parity is even; odd: it is odd),
// the stop bit, the state after d7 and the 13-bit-time frame spacing.
module tb_uart_tx_parity;
  import rsc_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] rempty, rinc, tx, busy;
  logic [7:0] rdata [2];
  tx_state_e state [2];
  logic [7:0] fifo_q [2][$];
  logic [7:0] sent_q [2][$];
  int checks = 0, failures = 0, frames [2], b2b [2];
  longint unsigned cyc = 0, last_start [2];
  int dec_bit [2];
  logic [7:0] dec_sh [2];

  uart_tx #(.PARITY(PAR_EVEN)) dut_even (.clk(clk), .rst(rst), .fifo_rempty(rempty[0]),
    .fifo_rdata(rdata[0]), .fifo_rinc(rinc[0]), .tx(tx[0]), .busy(busy[0]), .state(state[0]));
  uart_tx #(.PARITY(PAR_ODD)) dut_odd (.clk(clk), .rst(rst), .fifo_rempty(rempty[1]),
    .fifo_rdata(rdata[1]), .fifo_rinc(rinc[1]), .tx(tx[1]), .busy(busy[1]), .state(state[1]));

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    logic [1:0] r;
    @(negedge clk);
    for (int u = 0; u < 2; u++) begin
      rempty[u] = (fifo_q[u].size() == 0);
      rdata[u]  = rempty[u] ? 8'h00 : fifo_q[u][0];
    end
    #1;
    r = rinc;
    for (int u = 0; u < 2; u++) begin
      if (state[u] == TX_PAR) begin
        checks++;
        if (dec_bit[u] != 8) begin failures++; $display("unit %0d: parity state at bit %0d", u, dec_bit[u]); end
      end
      if (dec_bit[u] == -1) begin
        if (tx[u] == 1'b0) begin
          if (last_start[u] != 0) begin
            checks++;
            if (cyc - last_start[u] < 13) begin failures++; $display("unit %0d: frames %0d apart", u, cyc - last_start[u]); end
            if (cyc - last_start[u] == 13) b2b[u]++;
          end
          last_start[u] = cyc;
          dec_bit[u] = 0;
        end
      end else if (dec_bit[u] < 8) begin
        dec_sh[u] = {tx[u], dec_sh[u][7:1]};
        dec_bit[u]++;
      end else if (dec_bit[u] == 8) begin
        checks++;
        if ((^dec_sh[u] ^ tx[u]) !== 1'(u)) begin failures++; $display("unit %0d: parity bit %0d for %h", u, tx[u], dec_sh[u]); end
        dec_bit[u]++;
      end else begin
        logic [7:0] e;
        checks++;
        if (tx[u] !== 1'b1) begin failures++; $display("unit %0d: bad stop bit", u); end
        checks++;
        e = sent_q[u].pop_front();
        if (dec_sh[u] !== e) begin failures++; $display("unit %0d: byte %h expected %h", u, dec_sh[u], e); end
        frames[u]++;
        dec_bit[u] = -1;
      end
    end
    @(posedge clk);
    for (int u = 0; u < 2; u++) if (r[u]) void'(fifo_q[u].pop_front());
    cyc++;
    #1;
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin frames[u] = 0; b2b[u] = 0; last_start[u] = 0; dec_bit[u] = -1; end
    rempty = 2'b11; rdata[0] = 0; rdata[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      b = (i < 2) ? (i == 0 ? 8'h00 : 8'hFF) : 8'($urandom);
      for (int u = 0; u < 2; u++) begin fifo_q[u].push_back(b); sent_q[u].push_back(b); end
    end
    repeat (40 * 13 + 30) step();
    for (int u = 0; u < 2; u++) begin
      checks++;
      if (frames[u] != 40 || b2b[u] < 39) begin failures++; $display("unit %0d: frames=%0d back_to_back=%0d", u, frames[u], b2b[u]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
