// tb_event_ref_trace: self-checking test of the event reference trace
// (3 EOPs, 32 samples deep).
//
// Runs the trace in event-filtered mode (a sample only in cycles with at
// least one event) and in cycle-accurate mode (a sample every cycle of the
// capture window), each until the buffer is full, with random event vectors
// that are often all zero. Checks the fill count every cycle and the uploaded
// samples against a queue built by the testbench.
module tb_event_ref_trace;
  localparam int unsigned NE = 3, D = 32;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          clear = 1'b0, capture = 1'b0, cycle_accurate = 1'b0;
  logic [NE-1:0] events = '0;
  logic          full;
  logic [5:0]    count;
  logic [4:0]    rd_addr = '0;
  logic [NE-1:0] rd_data;

  int checks = 0, failures = 0, n_idle_skipped = 0, n_idle_kept = 0;
  int exp_q[$];

  always #5 clk = ~clk;

  event_ref_trace #(.NUM_EOP(NE), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit ca);
    @(negedge clk); clear = 1'b1; cycle_accurate = ca;
    @(negedge clk); clear = 1'b0; exp_q.delete();
    capture = 1'b1;
    for (int c = 0; c < 200; c++) begin
      events = ($urandom_range(2, 0) == 0) ? NE'($urandom) : '0;
      @(posedge clk);
      if (exp_q.size() < D) begin
        if (ca || events != 0) exp_q.push_back(int'(events));
        if (events == 0) begin if (ca) n_idle_kept++; else n_idle_skipped++; end
      end
      @(negedge clk);
      check(count == 6'(exp_q.size()), $sformatf("count %0d expected %0d", count, exp_q.size()));
    end
    capture = 1'b0; events = '0;
    check(full, "trace full");
    for (int a = 0; a < D; a++) begin
      @(negedge clk); rd_addr = 5'(a);
      @(negedge clk);
      check(int'(rd_data) == exp_q[a], $sformatf("sample %0d = %b expected %b", a, rd_data, exp_q[a]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0);
    run(1'b1);
    check(n_idle_skipped > 0 && n_idle_kept > 0, "idle cycles skipped and kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
