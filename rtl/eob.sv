// eob: Event Observability Buffer (EOB), one small independent trace buffer.
//
// An EOB has a data input and a data storage enable. While the capture window
// is open (capture=1) the word on din is written to the next free entry in
// every cycle where en=1; in cycles where en=0 nothing is stored, so a buffer
// fed by an EOP (en = event signal, din = data signal) holds only valid event
// results and no idle cycles. Each instance has its own WIDTH and DEPTH so
// that the depth can follow the expected relative assertion rate of the event
// it records. Tying en high turns it into a plain cycle-by-cycle recorder.
//
// The buffer fills linearly from entry 0 and stops when full: entry k is the
// k-th stored word, count is the number of valid entries and full is high once
// count == DEPTH. clear (a one-cycle pulse) empties it for a new experiment.
// The storage is a simple dual-port array with a registered read port, so it
// maps onto one block RAM: rd_data returns mem[rd_addr] one cycle after
// rd_addr is presented. Writes happen on the rising edge of clk; rst_n is a
// synchronous active-low reset of the fill counter (the array is not reset).
//
// Storage enable, data input and the sizing per event follow the document;
// linear fill-until-full (rather than a circular buffer), the clear pulse and
// the registered read port are this design's own choices.
module eob #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW = eob_pkg::addr_w(DEPTH),
  localparam int unsigned CW = eob_pkg::count_w(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,    // empty the buffer (new experiment)
  input  logic             capture,  // capture window open
  input  logic             en,       // data storage enable
  input  logic [WIDTH-1:0] din,
  output logic             full,
  output logic [CW-1:0]    count,    // valid entries, 0..DEPTH
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data   // mem[rd_addr], one cycle later
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic             wr;

  assign full = (count == CW'(DEPTH));
  assign wr   = capture && en && !full;

  always_ff @(posedge clk) begin
    if (!rst_n)      count <= '0;
    else if (clear)  count <= '0;
    else if (wr)     count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr && !clear) mem[AW'(count)] <= din;
    rd_data <= mem[rd_addr];
  end

endmodule
