// eob_readback_mux: read-back (upload) multiplexer over all trace buffers.
//
// After an experiment the host reads every buffer through one port: it puts
// the buffer number on sel and an entry address on the shared address bus
// that reaches every buffer. rd_count shows the selected buffer's fill level
// at once; rd_data shows the selected buffer's word one cycle after sel and
// the address are presented, matching the registered read port of the
// buffers (sel is registered here for that reason). Buffers narrower than
// RD_W are zero-padded by the caller.
//
// The document names this multiplexer only; its interface and timing are
// this design's own.
module eob_readback_mux #(
  parameter int unsigned NUM_BUF = 2,
  parameter int unsigned RD_W    = 16,
  parameter int unsigned CW      = 15,
  localparam int unsigned SW = eob_pkg::addr_w(NUM_BUF)
) (
  input  logic                          clk,
  input  logic [SW-1:0]                 sel,
  input  logic [NUM_BUF-1:0][RD_W-1:0]  buf_rd_data,
  input  logic [NUM_BUF-1:0][CW-1:0]    buf_count,
  output logic [RD_W-1:0]               rd_data,
  output logic [CW-1:0]                 rd_count
);

  logic [SW-1:0] sel_q;

  always_ff @(posedge clk) sel_q <= sel;

  always_comb begin
    rd_data  = '0;
    rd_count = '0;
    for (int b = 0; b < NUM_BUF; b++) begin
      if (SW'(b) == sel_q) rd_data  = buf_rd_data[b];
      if (SW'(b) == sel)   rd_count = buf_count[b];
    end
  end

endmodule
