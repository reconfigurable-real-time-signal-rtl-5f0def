// tb_capture_fsm: drives trigger, FIFO-full and last-sample inputs at
// random and checks every output and state against the state table:
// IDLE -(trigger)-> RUN (clear counter); RUN writes, counts and reloads
// the hold register each clock the FIFO is not full, stalls while it is
// full, and goes to DONE after the write made with last high; DONE
// waits for trigger low. Counts how often each path was taken.
module tb_capture_fsm;
  import rsc_pkg::*;
  logic clk = 0, rst = 1, trigger = 0, wfull = 0, last = 0;
  logic winc, cnt_clr, cnt_inc, hold_en, busy, done;
  cap_state_e state, m_state;
  int checks = 0, failures = 0;
  int n_trig = 0, n_stall = 0, n_done = 0, n_rearm = 0, n_write = 0;

  capture_fsm dut (.clk(clk), .rst(rst), .trigger(trigger), .wfull(wfull), .last(last),
    .winc(winc), .cnt_clr(cnt_clr), .cnt_inc(cnt_inc), .hold_en(hold_en),
    .busy(busy), .done(done), .state(state));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s=%0d expected %0d in %s", what, got, exp, m_state.name()); end
  endtask

  initial begin
    m_state = CAP_IDLE;
    #12 rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      trigger = ($urandom % 5) != 0 ? trigger : ~trigger;
      wfull   = ($urandom % 4) == 0;
      last    = ($urandom % 6) == 0;
      #1;
      checks++;
      if (state != m_state) begin failures++; $display("state %s expected %s", state.name(), m_state.name()); end
      expect_eq("busy", busy, m_state == CAP_RUN);
      expect_eq("done", done, m_state == CAP_DONE);
      expect_eq("winc",    winc,    m_state == CAP_RUN && !wfull);
      expect_eq("cnt_inc", cnt_inc, m_state == CAP_RUN && !wfull);
      expect_eq("cnt_clr", cnt_clr, m_state == CAP_IDLE && trigger);
      expect_eq("hold_en", hold_en, m_state == CAP_IDLE || (m_state == CAP_RUN && !wfull));
      @(posedge clk);
      case (m_state)
        CAP_IDLE: if (trigger) begin m_state = CAP_RUN; n_trig++; end
        CAP_RUN: begin
          if (wfull) n_stall++;
          else begin
            n_write++;
            if (last) begin m_state = CAP_DONE; n_done++; end
          end
        end
        CAP_DONE: if (!trigger) begin m_state = CAP_IDLE; n_rearm++; end
        default: m_state = CAP_IDLE;
      endcase
    end
    $display("triggers=%0d writes=%0d stalls=%0d done=%0d rearm=%0d", n_trig, n_write, n_stall, n_done, n_rearm);
    checks++;
    if (n_trig == 0 || n_stall == 0 || n_done == 0 || n_rearm == 0) begin failures++; $display("a path was never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
