// eob_trace_top: EOB-based trace instrumentation for an HLS-generated circuit.
//
// The traced design exposes NUM_EOP Event Observability Ports: eop_event[i]
// is high in the cycle the source-level operation i completes (typically the
// clock enable of the register that keeps its result) and eop_data[i] is the
// result it validates (that register's input), zero-extended to DATA_W.
// Each EOP is routed to one of NUM_EOB trace buffers by EOB_OF_EOP. EOPs
// mapped to the same buffer share it through an event-selected multiplexer
// (their events must never coincide); a buffer with one member records its
// EOP directly. Each buffer has its own width EOB_W[b] (low bits of the data
// are kept) and depth EOB_DEPTH[b], so deeper buffers can be given to events
// that fire more often. A further buffer records the event reference trace,
// the vector of all event bits, either in every cycle (ref_cycle_accurate=1)
// or only in cycles with an event (ref_cycle_accurate=0); from it the host
// recovers the order and cycle of every recorded event.
//
// Operation: pulse arm to empty all buffers; the capture window opens in the
// first cycle dut_start is high and closes for all buffers once any buffer
// is full (done goes high). Then read back: rd_sel chooses a buffer
// (0..NUM_EOB-1 = data buffers, NUM_EOB = reference trace), rd_count gives its
// fill level at once and rd_data gives the entry at rd_addr one cycle later.
//
// The default configuration is the two-event example of the design's
// motivation: an 8-bit loop bound computed before a loop that produces one
// 16-bit value per iteration; the two events never coincide, so both share
// one 16-bit buffer of 2048 entries (one 36 Kb block RAM as 2K x 18), and the
// cycle-accurate reference trace is 2 bits wide and 16384 deep (one 36 Kb
// block RAM as 16K x 2). EOP routing, sharing, per-buffer sizing, the
// reference trace and start-triggered, stop-when-full control follow the
// document; the sizes, the read-back port and the run-time choice of the
// reference-trace mode are this design's own.
module eob_trace_top
  import eob_pkg::*;
#(
  parameter int unsigned NUM_EOP               = 2,
  parameter int unsigned DATA_W                = 16,
  parameter int unsigned NUM_EOB               = 1,
  parameter logic [NUM_EOP-1:0][31:0] EOB_OF_EOP = {32'd0, 32'd0},
  parameter logic [NUM_EOB-1:0][31:0] EOB_W      = {32'd16},
  parameter logic [NUM_EOB-1:0][31:0] EOB_DEPTH  = {32'd2048},
  parameter int unsigned REF_DEPTH             = 16384,
  localparam int unsigned NUM_BUF = NUM_EOB + 1,
  localparam int unsigned SEL_W   = addr_w(NUM_BUF),
  localparam int unsigned MAX_D   = max_depth(),
  localparam int unsigned AW      = addr_w(MAX_D),
  localparam int unsigned CW      = count_w(MAX_D),
  localparam int unsigned RD_W    = max_u(DATA_W, NUM_EOP)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // host control
  input  logic                           arm,
  input  logic                           ref_cycle_accurate,
  output logic                           armed,
  output logic                           capturing,
  output logic                           done,
  output logic [NUM_BUF-1:0]             buf_full,
  // traced design
  input  logic                           dut_start,
  input  logic [NUM_EOP-1:0]             eop_event,
  input  logic [NUM_EOP-1:0][DATA_W-1:0] eop_data,
  // read-back
  input  logic [SEL_W-1:0]               rd_sel,
  input  logic [AW-1:0]                  rd_addr,
  output logic [RD_W-1:0]                rd_data,
  output logic [CW-1:0]                  rd_count
);

  function automatic int unsigned max_depth();
    int unsigned m;
    m = REF_DEPTH;
    for (int b = 0; b < NUM_EOB; b++) m = max_u(m, EOB_DEPTH[b]);
    return m;
  endfunction

  function automatic logic [NUM_EOP-1:0] members_of(input int unsigned b);
    logic [NUM_EOP-1:0] m;
    m = '0;
    for (int i = 0; i < NUM_EOP; i++) m[i] = (EOB_OF_EOP[i] == b);
    return m;
  endfunction

  logic                          clear, capture;
  tc_state_e                     state;
  logic [NUM_BUF-1:0][RD_W-1:0]  buf_rd_data;
  logic [NUM_BUF-1:0][CW-1:0]    buf_count;

  // ---- experiment control ----------------------------------------------
  trace_ctrl #(.NUM_BUF(NUM_BUF)) u_ctrl (
    .clk, .rst_n, .arm,
    .start    (dut_start),
    .buf_full (buf_full),
    .clear, .capture, .state
  );

  assign armed     = (state == TC_ARMED);
  assign capturing = capture;
  assign done      = (state == TC_DONE);

  // ---- data buffers, one per EOB, each behind its sharing multiplexer ----
  for (genvar b = 0; b < NUM_EOB; b++) begin : g_eob
    localparam int unsigned BW  = EOB_W[b];
    localparam int unsigned BD  = EOB_DEPTH[b];
    localparam int unsigned BAW = addr_w(BD);
    localparam int unsigned BCW = count_w(BD);
    localparam logic [NUM_EOP-1:0] MEMBERS = members_of(b);

    logic              en;
    logic [DATA_W-1:0] din;
    logic [BW-1:0]     rdata;
    logic [BCW-1:0]    cnt;

    eob_share_mux #(.N(NUM_EOP), .W(DATA_W), .MEMBERS(MEMBERS)) u_share (
      .clk, .rst_n,
      .ev   (eop_event),
      .data (eop_data),
      .en, .dout (din)
    );

    eob #(.WIDTH(BW), .DEPTH(BD)) u_eob (
      .clk, .rst_n, .clear, .capture, .en,
      .din     (din[BW-1:0]),
      .full    (buf_full[b]),
      .count   (cnt),
      .rd_addr (rd_addr[BAW-1:0]),
      .rd_data (rdata)
    );

    assign buf_rd_data[b] = RD_W'(rdata);
    assign buf_count[b]   = CW'(cnt);
  end

  // ---- event reference trace ---------------------------------------------
  localparam int unsigned RAW = addr_w(REF_DEPTH);
  localparam int unsigned RCW = count_w(REF_DEPTH);

  logic [NUM_EOP-1:0] ref_rdata;
  logic [RCW-1:0]     ref_cnt;

  event_ref_trace #(.NUM_EOP(NUM_EOP), .DEPTH(REF_DEPTH)) u_ref (
    .clk, .rst_n, .clear, .capture,
    .cycle_accurate (ref_cycle_accurate),
    .events         (eop_event),
    .full           (buf_full[NUM_EOB]),
    .count          (ref_cnt),
    .rd_addr        (rd_addr[RAW-1:0]),
    .rd_data        (ref_rdata)
  );

  assign buf_rd_data[NUM_EOB] = RD_W'(ref_rdata);
  assign buf_count[NUM_EOB]   = CW'(ref_cnt);

  // ---- read-back -----------------------------------------------------------
  eob_readback_mux #(.NUM_BUF(NUM_BUF), .RD_W(RD_W), .CW(CW)) u_rb (
    .clk,
    .sel         (rd_sel),
    .buf_rd_data (buf_rd_data),
    .buf_count   (buf_count),
    .rd_data, .rd_count
  );

endmodule
