// tb_eob_readback_mux: self-checking test of the read-back multiplexer
// (5 buffers, 12-bit words, 7-bit counts).
//
// Presents random words and counts on all buffer inputs and a random select
// each cycle. The count output must follow the present select; the data
// output must show the word of the buffer selected one cycle earlier, as the
// buffers' registered read ports deliver it then.
module tb_eob_readback_mux;
  localparam int unsigned NB = 5, RW = 12, CW = 7;

  logic                   clk = 1'b0;
  logic [2:0]             sel = '0, sel_prev = '0;
  logic [NB-1:0][RW-1:0]  buf_rd_data = '0;
  logic [NB-1:0][CW-1:0]  buf_count = '0;
  logic [RW-1:0]          rd_data;
  logic [CW-1:0]          rd_count;

  int checks = 0, failures = 0, n_seen[NB] = '{default: 0};

  always #5 clk = ~clk;

  eob_readback_mux #(.NUM_BUF(NB), .RD_W(RW), .CW(CW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    sel = 3'd0;
    for (int c = 0; c < 1000; c++) begin
      @(posedge clk);
      sel_prev = sel;
      @(negedge clk);
      foreach (buf_rd_data[b]) buf_rd_data[b] = RW'($urandom);
      foreach (buf_count[b])   buf_count[b]   = CW'($urandom);
      sel = 3'($urandom_range(NB - 1, 0));
      #1;
      check(rd_data == buf_rd_data[sel_prev], $sformatf("data of buffer %0d", sel_prev));
      check(rd_count == buf_count[sel], $sformatf("count of buffer %0d", sel));
      n_seen[sel]++;
    end
    foreach (n_seen[b]) check(n_seen[b] > 0, "every buffer selected");
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
