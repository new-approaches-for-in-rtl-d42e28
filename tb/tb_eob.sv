// tb_eob: self-checking test of one Event Observability Buffer (8 x 12 here).
//
// Drives random enables, data and capture-window values and keeps its own
// queue of what must have been stored: a word is stored only when capture
// and en are both high and the buffer is not yet full. Checks count and full
// every cycle, reads the whole buffer back (one-cycle read latency), checks
// that writes after full are dropped and that clear empties the buffer.
module tb_eob;
  localparam int unsigned W = 12, D = 8;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         clear = 1'b0, capture = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0;
  logic         full;
  logic [3:0]   count;
  logic [2:0]   rd_addr = '0;
  logic [W-1:0] rd_data;

  int checks = 0, failures = 0;
  int exp_q[$];
  int n_drop_full = 0, n_gated = 0;

  always #5 clk = ~clk;

  eob #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic fill(input int cycles, input int p_en);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      capture = ($urandom_range(9, 0) != 0);
      en      = ($urandom_range(99, 0) < p_en);
      din     = W'($urandom);
      @(posedge clk);
      if (capture && en && exp_q.size() < D) exp_q.push_back(int'(din));
      else if (capture && en) n_drop_full++;
      else if (en) n_gated++;
      #1;
      check(count == 4'(exp_q.size()), $sformatf("count %0d expected %0d", count, exp_q.size()));
      check(full == (exp_q.size() == D), "full flag");
    end
    @(negedge clk); capture = 1'b0; en = 1'b0;
  endtask

  task automatic read_all();
    for (int a = 0; a < exp_q.size(); a++) begin
      @(negedge clk); rd_addr = 3'(a);
      @(negedge clk);
      check(rd_data == W'(exp_q[a]), $sformatf("entry %0d = %h expected %h", a, rd_data, exp_q[a]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && !full, "empty after reset");
    fill(6, 40);          // partly filled
    read_all();
    fill(60, 50);         // fills and then drops
    read_all();
    check(n_drop_full > 0, "writes attempted while full");
    check(n_gated > 0, "enables outside the capture window");
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0; exp_q.delete();
    check(count == 0 && !full, "empty after clear");
    fill(30, 30);
    read_all();
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
