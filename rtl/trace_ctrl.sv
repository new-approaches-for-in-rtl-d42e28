// trace_ctrl: controls one trace experiment.
//
// The host arms the instrumentation with a one-cycle pulse on arm; this also
// empties every buffer (clear). The capture window opens in the first cycle
// in which the traced design's start signal is high, so every buffer starts
// recording at the beginning of the design's operation, and it closes for all
// buffers together as soon as any buffer reports full. All buffers therefore
// cover exactly the same cycles, which the event-order recovery relies on.
// After that the controller sits in TC_DONE until the next arm, so the
// buffers stay frozen while they are read back.
//
// Timing: capture is combinational. It is high in the start cycle itself and
// low from the first cycle in which a buffer's full flag (registered in the
// buffer) is set. The state register moves ARMED->CAPTURE after the start
// cycle and CAPTURE->DONE in the cycle a full flag is seen. rst_n is a
// synchronous active-low reset to TC_IDLE.
//
// Triggering on start and ending when a buffer is full follow the document;
// the arm/clear protocol and the state encoding are this design's own.
module trace_ctrl #(
  parameter int unsigned NUM_BUF = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               arm,       // host: start a new experiment
  input  logic               start,     // traced design's start signal
  input  logic [NUM_BUF-1:0] buf_full,  // full flags of all buffers
  output logic               clear,     // empty all buffers
  output logic               capture,   // capture window open
  output eob_pkg::tc_state_e state
);

  import eob_pkg::*;

  tc_state_e state_d;
  logic      any_full;

  assign any_full = |buf_full;
  assign clear    = arm;

  always_comb begin
    state_d = state;
    capture = 1'b0;
    unique case (state)
      TC_IDLE: ;
      TC_ARMED: begin
        if (start) begin
          capture = 1'b1;
          state_d = TC_CAPTURE;
        end
      end
      TC_CAPTURE: begin
        if (any_full) state_d = TC_DONE;
        else          capture = 1'b1;
      end
      TC_DONE: ;
      default: state_d = TC_IDLE;
    endcase
    if (arm) begin
      capture = 1'b0;
      state_d = TC_ARMED;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= TC_IDLE;
    else        state <= state_d;
  end

endmodule
