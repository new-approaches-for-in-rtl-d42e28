// tb_trace_ctrl: self-checking test of the experiment controller (3 buffers).
//
// Compares the controller cycle by cycle with a reference state machine
// written in the testbench while arm, start and the full flags are driven at
// random, and also walks one scripted experiment: no capture before arm or
// before start, capture in the start cycle, capture dropped in the first
// cycle a full flag is seen, frozen until the next arm.
module tb_trace_ctrl;
  import eob_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       arm = 1'b0, start = 1'b0;
  logic [2:0] buf_full = '0;
  logic       clear, capture;
  tc_state_e  state;

  int checks = 0, failures = 0;
  int ref_st = 0;   // 0 idle, 1 armed, 2 capture, 3 done
  int n_trig = 0, n_stop = 0, n_rearm = 0;

  always #5 clk = ~clk;

  trace_ctrl #(.NUM_BUF(3)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // expected combinational outputs for the present inputs
  task automatic compare();
    bit exp_cap;
    exp_cap = !arm && ((ref_st == 1 && start) || (ref_st == 2 && buf_full == 0));
    check(capture == exp_cap, $sformatf("capture %0b expected %0b (st %0d)", capture, exp_cap, ref_st));
    check(clear == arm, "clear follows arm");
    check(int'(state) == ref_st, $sformatf("state %0d expected %0d", state, ref_st));
  endtask

  task automatic step();
    #1 compare();
    @(posedge clk);
    if (arm) begin if (ref_st == 3) n_rearm++; ref_st = 1; end
    else if (ref_st == 1 && start) begin ref_st = 2; n_trig++; end
    else if (ref_st == 2 && buf_full != 0) begin ref_st = 3; n_stop++; end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // scripted experiment
    start = 1'b1; step(); start = 1'b0;            // start before arm: ignored
    check(state == TC_IDLE, "start before arm ignored");
    arm = 1'b1; step(); arm = 1'b0;
    repeat (3) step();                             // waiting for start
    start = 1'b1; #1 check(capture, "capture in start cycle"); step(); start = 1'b0;
    repeat (5) step();
    check(capture, "capture while no buffer full");
    buf_full = 3'b010; #1 check(!capture, "capture dropped on full"); step();
    check(state == TC_DONE, "done after full");
    buf_full = 3'b000; step();
    check(!capture && state == TC_DONE, "stays frozen");
    // random sequences
    for (int c = 0; c < 3000; c++) begin
      arm      = ($urandom_range(40, 0) == 0);
      start    = ($urandom_range(5, 0) == 0);
      buf_full = ($urandom_range(20, 0) == 0) ? 3'($urandom) : 3'b000;
      step();
    end
    check(n_trig > 3 && n_stop > 3 && n_rearm > 3, "trigger, stop and re-arm all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
