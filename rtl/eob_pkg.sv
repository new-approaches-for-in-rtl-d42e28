// eob_pkg: types and helpers shared by the event-trace instrumentation.
//
// The trace instrumentation observes an HLS-generated circuit through Event
// Observability Ports (EOPs: an event bit plus the data word it validates) and
// records them in small independent trace buffers (EOBs). This package holds
// the state encoding of the experiment controller and a few constant
// functions used to size buffers and read-back paths. The encoding is this
// design's own choice.
package eob_pkg;

  // Experiment controller states.
  //   TC_IDLE    : after reset, nothing recorded yet
  //   TC_ARMED   : buffers emptied, waiting for the traced design's start
  //   TC_CAPTURE : capture window open, buffers store on their enables
  //   TC_DONE    : one buffer filled, every buffer frozen for read-back
  typedef enum logic [1:0] {
    TC_IDLE    = 2'd0,
    TC_ARMED   = 2'd1,
    TC_CAPTURE = 2'd2,
    TC_DONE    = 2'd3
  } tc_state_e;

  // Address width of a buffer of the given depth (at least one bit).
  function automatic int unsigned addr_w(input int unsigned depth);
    return (depth > 1) ? $clog2(depth) : 1;
  endfunction

  // Width of a fill counter that must also hold the value "depth".
  function automatic int unsigned count_w(input int unsigned depth);
    return $clog2(depth + 1);
  endfunction

  function automatic int unsigned max_u(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

endpackage
