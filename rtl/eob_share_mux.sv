// eob_share_mux: lets several EOPs share one EOB.
//
// EOPs whose event signals are never asserted in the same clock cycle can be
// recorded in one buffer. The data inputs are multiplexed using the event
// signals as selects (an AND-OR multiplexer: each member's data word is gated
// by its own event bit) and the buffer's storage enable is the OR of the
// member events. MEMBERS picks which of the N EOPs belong to this buffer, so
// one instance per buffer can be driven from the full EOP bundle; a buffer
// with a single member reduces to a direct connection (enable = event,
// data = data). The logic is purely combinational; clk and rst_n serve only
// the assertion that checks the mutual-exclusion rule sharing depends on.
//
// The multiplexer driven by the events and the OR-ed enable follow the
// document; the member mask and the AND-OR form are this design's own.
module eob_share_mux #(
  parameter int unsigned       N       = 2,
  parameter int unsigned       W       = 16,
  parameter logic [N-1:0]      MEMBERS = {N{1'b1}}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        ev,     // EOP event signals
  input  logic [N-1:0][W-1:0] data,   // EOP data signals
  output logic                en,     // storage enable for the shared EOB
  output logic [W-1:0]        dout    // data input for the shared EOB
);

  logic [N-1:0] sel;

  assign sel = ev & MEMBERS;
  assign en  = |sel;

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) begin
      dout |= data[i] & {W{sel[i]}};
    end
  end

  // Sharing is only valid for events in mutually exclusive cycles.
  a_exclusive : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel))
    else $error("eob_share_mux: members %b asserted in the same cycle", sel);

endmodule
