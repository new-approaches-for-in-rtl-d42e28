// event_ref_trace: the event reference trace buffer.
//
// Because every EOB stores only on its own events, the buffers lose their
// timing relationship to each other. The reference trace restores it: one
// extra EOB whose data input is the vector of all EOP event signals (bit i =
// event of EOP i). With cycle_accurate=0 its storage enable is the OR of the
// events, so it keeps one sample per cycle in which anything happened and the
// relative order of events can be recovered. With cycle_accurate=1 the enable
// is held high and it keeps one sample per cycle of the capture window, so
// the exact cycle of each event can also be recovered. Read-back and timing
// are those of eob (registered read, one cycle latency).
//
// Data = event vector and enable = OR of events or constant 1 follow the
// document; choosing between the two at run time with an input is this
// design's own.
module event_ref_trace #(
  parameter int unsigned NUM_EOP = 2,
  parameter int unsigned DEPTH   = 16384,
  localparam int unsigned AW = eob_pkg::addr_w(DEPTH),
  localparam int unsigned CW = eob_pkg::count_w(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               capture,
  input  logic               cycle_accurate,
  input  logic [NUM_EOP-1:0] events,
  output logic               full,
  output logic [CW-1:0]      count,
  input  logic [AW-1:0]      rd_addr,
  output logic [NUM_EOP-1:0] rd_data
);

  logic en;

  assign en = cycle_accurate || (|events);

  eob #(.WIDTH(NUM_EOP), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .clear, .capture, .en,
    .din     (events),
    .full, .count, .rd_addr, .rd_data
  );

endmodule
