// tb_eob_trace_top_split: end-to-end test of the trace instrumentation with
// one buffer per EOP, sized by the relative assertion rate of the events: the
// 8-bit loop-bound EOP gets a 4 x 8 buffer and the 16-bit loop-body EOP, which
// fires up to 32 times per bound, a 128 x 16 buffer (32 entries for each
// bound entry); the reference trace is 512 deep. Sizes are scaled down from
// the default configuration to keep the run short.
//
// A behavioural model of the traced loop design drives the EOPs. Each
// experiment arms the instrumentation, starts the model after a random wait,
// lets the trace run until a buffer is full, keeps the model running a while
// longer, and then uploads every buffer through the read-back port. The
// uploaded contents are compared with an independent scoreboard, and the
// event order (and, with a cycle-accurate reference trace, the cycle of every
// event) is recovered from the uploads and compared with the scoreboard's log.
// Four experiments: a cycle-accurate reference trace with very sparse events
// (the reference trace fills first), dense events with loop bounds within the
// sizing estimate of 32 (the bound buffer fills first), an event-filtered
// reference trace, and loop bounds of 64, twice the estimate (the loop-body
// buffer fills first).
module tb_eob_trace_top_split;
  import trace_recovery_pkg::*;

  localparam int unsigned NUM_EOP = 2;
  localparam int unsigned NUM_EOB = 2;
  localparam int unsigned DATA_W  = 16;
  localparam int          EOB_OF_EOP [NUM_EOP] = '{0, 1};
  localparam logic [NUM_EOB-1:0][31:0] EOB_W     = {32'd16, 32'd8};
  localparam logic [NUM_EOB-1:0][31:0] EOB_DEPTH = {32'd128, 32'd4};
  localparam int unsigned REF_DEPTH            = 512;

  logic                           clk = 1'b0, rst_n = 1'b0;
  logic                           arm = 1'b0, ref_ca = 1'b1;
  logic                           armed, capturing, done;
  logic [NUM_EOB:0]               buf_full;
  logic                           start, go = 1'b0;
  logic [7:0]                     gap_max = 8'd0;
  logic [7:0]                     trip_lo = 8'd1, trip_hi = 8'd32;
  logic [NUM_EOP-1:0]             ev;
  logic [NUM_EOP-1:0][DATA_W-1:0] data;
  logic [1:0]                     rd_sel = '0;
  logic [8:0]                     rd_addr = '0;
  logic [15:0]                    rd_data;
  logic [9:0]                     rd_count;

  int checks = 0, failures = 0;
  int n_ref_fill = 0, n_data_fill = 0, n_ca = 0, n_filtered = 0, n_share = 0;
  int n_fill_b [NUM_EOB] = '{0, 0};
  int n_wait = 0, n_late = 0, n_rearm = 0, n_skip = 0;

  always #5 clk = ~clk;

  eob_trace_top #(
    .NUM_EOP (NUM_EOP), .DATA_W (DATA_W), .NUM_EOB (NUM_EOB),
    .EOB_OF_EOP ({32'd1, 32'd0}), .EOB_W (EOB_W), .EOB_DEPTH (EOB_DEPTH),
    .REF_DEPTH (REF_DEPTH)
  ) dut (
    .clk, .rst_n, .arm,
    .ref_cycle_accurate (ref_ca),
    .armed, .capturing, .done, .buf_full,
    .dut_start (start),
    .eop_event (ev),
    .eop_data  (data),
    .rd_sel, .rd_addr, .rd_data, .rd_count
  );

  hls_loop_model u_model (
    .clk, .rst_n, .go, .trip_lo, .trip_hi, .gap_max, .start, .ev, .data
  );

  trace_scoreboard #(
    .NUM_EOP (NUM_EOP), .DATA_W (DATA_W), .NUM_EOB (NUM_EOB),
    .EOB_OF_EOP ({32'd1, 32'd0}), .EOB_W (EOB_W), .EOB_DEPTH (EOB_DEPTH),
    .REF_DEPTH (REF_DEPTH)
  ) sb (
    .clk, .arm, .ref_ca, .start, .ev, .data
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Upload one buffer: returns its entries.
  task automatic upload(input int b, output iq_t q);
    int n;
    q.delete();
    @(negedge clk);
    rd_sel  = 2'(b);
    rd_addr = '0;
    #1 n = int'(rd_count);
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      q.push_back(int'(rd_data));
      rd_addr = 9'(a + 1);
    end
  endtask

  task automatic experiment(input bit ca, input int gap, input int tlo = 1, input int thi = 32);
    iq_t bufs [];
    iq_t refq;
    rec_t recs[$];
    int errs, lat;
    bufs = new[NUM_EOB];
    @(negedge clk);
    ref_ca = ca; gap_max = 8'(gap); trip_lo = 8'(tlo); trip_hi = 8'(thi);
    if (done) n_rearm++;
    arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    check(armed && !capturing && !done, "armed after arm pulse");
    repeat ($urandom_range(20, 3)) @(negedge clk);
    check(armed && dut.u_ref.count == 0, "nothing recorded before start");
    go = 1'b1;
    lat = 0;
    while (!done) begin
      @(negedge clk);
      if (capturing) lat++;
    end
    repeat (40) @(negedge clk);
    go = 1'b0;
    @(negedge clk);
    check(done && !capturing, "frozen after a buffer filled");
    // which buffer ended the window
    check(buf_full[sb.filler] == 1'b1, "the buffer the model says filled is full");
    if (sb.filler == NUM_EOB) n_ref_fill++; else begin n_data_fill++; n_fill_b[sb.filler]++; end
    if (sb.wait_cycles > 0) n_wait++;
    if (sb.late_events > 0) n_late++;
    if (sb.skipped_cycles > 0 && !ca) n_skip++;
    if (sb.count_shared_mix() > 0) n_share++;
    if (ca) n_ca++; else n_filtered++;
    // upload and compare with the scoreboard
    for (int b = 0; b < NUM_EOB; b++) begin
      upload(b, bufs[b]);
      check(bufs[b].size() == sb.exp_buf[b].size(),
            $sformatf("buffer %0d holds %0d entries, expected %0d", b, bufs[b].size(), sb.exp_buf[b].size()));
      foreach (sb.exp_buf[b][k])
        if (k < bufs[b].size())
          check(bufs[b][k] == sb.exp_buf[b][k],
                $sformatf("buffer %0d entry %0d = %h, expected %h", b, k, bufs[b][k], sb.exp_buf[b][k]));
    end
    upload(NUM_EOB, refq);
    check(refq.size() == sb.exp_ref.size(),
          $sformatf("reference trace holds %0d samples, expected %0d", refq.size(), sb.exp_ref.size()));
    if (ca) check(refq.size() == lat, $sformatf("cycle-accurate trace spans %0d cycles, window was %0d", refq.size(), lat));
    foreach (sb.exp_ref[k])
      if (k < refq.size()) check(refq[k] == sb.exp_ref[k], $sformatf("reference sample %0d", k));
    // recover event order and timing from the uploads alone
    recover(refq, bufs, EOB_OF_EOP, recs, errs);
    check(errs == 0, $sformatf("recovery found %0d inconsistencies", errs));
    check(recs.size() == sb.golden.size(),
          $sformatf("recovered %0d events, expected %0d", recs.size(), sb.golden.size()));
    foreach (sb.golden[g])
      if (g < recs.size()) begin
        check(recs[g].eop == sb.golden[g].eop && recs[g].data == sb.golden[g].data &&
              recs[g].sample == sb.golden[g].sample,
              $sformatf("recovered event %0d: eop %0d data %h sample %0d", g, recs[g].eop, recs[g].data, recs[g].sample));
        if (ca) check(recs[g].sample == sb.ev_cycles[g], "recovered cycle of event");
      end
    $display("experiment ca=%0d gap=%0d: window %0d cycles, %0d events, %0d ref samples, filled by buffer %0d",
             ca, gap, lat, sb.golden.size(), refq.size(), sb.filler);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    experiment(1'b1, 60, 32, 32);  // very sparse: reference trace fills first
    experiment(1'b1, 1);           // dense, bounds 1..32: bound buffer fills first
    experiment(1'b0, 8);           // event-filtered reference trace
    experiment(1'b1, 0, 64, 64);   // bounds above the sizing estimate of 32:
                                   // loop-body buffer fills first
    check(n_ref_fill  > 0, "window closed by the reference trace");
    check(n_data_fill > 0, "window closed by a data buffer");
    check(n_ca > 0 && n_filtered > 0, "both reference-trace modes");
    check(n_share == 0, "no buffer holds two EOPs");
    check(n_fill_b[0] > 0 && n_fill_b[1] > 0, "each data buffer closed a window");
    check(n_wait > 0, "armed trace waited for start");
    check(n_late > 0, "events after the window were dropped");
    check(n_skip > 0, "filtered trace skipped idle cycles");
    check(n_rearm > 0, "re-armed after a finished experiment");
    $display("mechanisms: ref_fill=%0d data_fill=%0d cycle_accurate=%0d filtered=%0d shared=%0d wait=%0d late=%0d rearm=%0d skip=%0d",
             n_ref_fill, n_data_fill, n_ca, n_filtered, n_share, n_wait, n_late, n_rearm, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
