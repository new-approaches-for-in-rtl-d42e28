// tb_eob_share_mux: self-checking test of the buffer-sharing multiplexer.
//
// Five EOPs of 10 bits, of which EOPs 0, 2 and 3 are members (mask 01101).
// In each cycle at most one member event is raised (sharing requires
// mutually exclusive events), while non-member events fire freely. Checks
// that the enable is the OR of the member events only and that the output
// word is the data of the member that fired (zero when none fired).
module tb_eob_share_mux;
  localparam int unsigned N = 5, W = 10;
  localparam logic [N-1:0] M = 5'b01101;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        ev = '0;
  logic [N-1:0][W-1:0] data = '0;
  logic                en;
  logic [W-1:0]        dout;

  int checks = 0, failures = 0, n_sel[N] = '{default: 0}, n_none = 0;

  always #5 clk = ~clk;

  eob_share_mux #(.N(N), .W(W), .MEMBERS(M)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      int pick;
      @(negedge clk);
      foreach (data[i]) data[i] = W'($urandom);
      pick = $urandom_range(N, 0);        // N means no member event
      ev = '0;
      if (pick < N && M[pick]) ev[pick] = 1'b1;
      ev[1] = 1'($urandom_range(1, 0));      // non-members fire at will
      ev[4] = 1'($urandom_range(1, 0));
      #1;
      if (pick < N && M[pick]) begin
        n_sel[pick]++;
        check(en == 1'b1, "enable on member event");
        check(dout == data[pick], $sformatf("data of member %0d", pick));
      end else begin
        n_none++;
        check(en == 1'b0, "no enable without member event");
        check(dout == '0, "idle data is zero");
      end
    end
    check(n_sel[0] > 0 && n_sel[2] > 0 && n_sel[3] > 0 && n_none > 0, "every member selected");
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
