// trace_scoreboard: reference model of what the trace instrumentation must
// record (testbench only).
//
// Watches the host and traced-design signals at every rising edge and keeps
// its own copy of the experiment: the window opens at the first start after
// arm, every event in the window is appended to the expected contents of its
// buffer (kept to the buffer's width) and to the expected reference trace
// (every cycle, or only cycles with an event), and the window closes after the
// first cycle in which any expected buffer reaches its depth. It also keeps a
// golden log of (reference sample, EOP, data) for each recorded event and
// counts the mechanisms exercised. Nothing here reads the design under test.
module trace_scoreboard
  import trace_recovery_pkg::*;
#(
  parameter int unsigned NUM_EOP               = 2,
  parameter int unsigned DATA_W                = 16,
  parameter int unsigned NUM_EOB               = 1,
  parameter logic [NUM_EOP-1:0][31:0] EOB_OF_EOP = {32'd0, 32'd0},
  parameter logic [NUM_EOB-1:0][31:0] EOB_W      = {32'd16},
  parameter logic [NUM_EOB-1:0][31:0] EOB_DEPTH  = {32'd2048},
  parameter int unsigned REF_DEPTH             = 16384
) (
  input logic                           clk,
  input logic                           arm,
  input logic                           ref_ca,
  input logic                           start,
  input logic [NUM_EOP-1:0]             ev,
  input logic [NUM_EOP-1:0][DATA_W-1:0] data
);

  typedef enum {S_IDLE, S_ARMED, S_CAP, S_DONE} st_t;

  st_t  st = S_IDLE;
  int   cyc;                    // cycles since the window opened
  iq_t  exp_buf [NUM_EOB];
  iq_t  exp_ref;
  rec_t golden[$];
  int   ev_cycles [$];          // cycle offset of each golden entry
  int   filler;                 // buffer that closed the window (NUM_EOB = ref)
  int   wait_cycles;            // armed cycles before start
  int   late_events;            // events after the window closed
  int   skipped_cycles;         // window cycles without event (filtered mode)

  function automatic int unsigned mask(input int unsigned v, input int unsigned w);
    return (w >= 32) ? v : (v & ((32'd1 << w) - 1));
  endfunction

  always @(posedge clk) begin
    if (arm) begin
      st = S_ARMED;
      foreach (exp_buf[b]) exp_buf[b].delete();
      exp_ref.delete(); golden.delete(); ev_cycles.delete();
      cyc = 0; filler = -1; wait_cycles = 0; late_events = 0; skipped_cycles = 0;
    end else begin
      if (st == S_ARMED) begin
        if (start) st = S_CAP;
        else       wait_cycles++;
      end
      if (st == S_CAP) begin
        if (ref_ca || (|ev)) exp_ref.push_back(int'(ev));
        else                 skipped_cycles++;
        for (int i = 0; i < NUM_EOP; i++) begin
          if (ev[i]) begin
            automatic int b = EOB_OF_EOP[i];
            rec_t r;
            exp_buf[b].push_back(int'(mask(32'(data[i]), EOB_W[b])));
            r.sample = exp_ref.size() - 1;
            r.eop    = i;
            r.data   = int'(mask(32'(data[i]), EOB_W[b]));
            golden.push_back(r);
            ev_cycles.push_back(cyc);
          end
        end
        cyc++;
        for (int b = NUM_EOB - 1; b >= 0; b--)
          if (exp_buf[b].size() == EOB_DEPTH[b]) filler = b;
        if (exp_ref.size() == REF_DEPTH) filler = NUM_EOB;
        if (filler >= 0) st = S_DONE;
      end else if (st == S_DONE) begin
        late_events += $countones(ev);
      end
    end
  end

  // Number of buffers that ended up with entries of two or more EOPs.
  function automatic int count_shared_mix();
    int n = 0;
    for (int b = 0; b < NUM_EOB; b++) begin
      bit seen [NUM_EOP] = '{default: 1'b0};
      int kinds = 0;
      foreach (golden[g]) if (EOB_OF_EOP[golden[g].eop] == 32'(b)) seen[golden[g].eop] = 1'b1;
      foreach (seen[i]) if (seen[i]) kinds++;
      if (kinds > 1) n++;
    end
    return n;
  endfunction

endmodule
