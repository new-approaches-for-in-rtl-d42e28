// hls_loop_model: behavioural model of a traced HLS design (testbench only).
//
// Models the two-event example used to motivate the trace buffers: each call
// first computes an 8-bit unsigned loop bound (EOP 0) and then runs a loop
// that produces one 16-bit value per iteration (EOP 1); the bound is drawn
// at random from trip_lo..trip_hi (both at least 1). The bound event comes
// one cycle before the first loop event, so the two events never share a
// cycle and may share one trace buffer. Between loop iterations the model
// waits 0..gap_max idle cycles (chosen at random), between calls 1..4 cycles,
// which gives dense or sparse event regions. While no event is asserted the
// data outputs carry random values, as the inputs of an HLS result register
// do. When go rises the model pulses start for one cycle and then runs calls
// back to back until go falls. Everything is driven from the rising edge.
module hls_loop_model (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic [7:0]       trip_lo,   // loop bound drawn from trip_lo..trip_hi
  input  logic [7:0]       trip_hi,
  input  logic [7:0]       gap_max,
  output logic             start,
  output logic [1:0]       ev,
  output logic [1:0][15:0] data
);

  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_BODY} mstate_e;

  mstate_e     st;
  int unsigned wait_cnt, left;
  logic [7:0]  bound;
  logic [15:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; start <= 1'b0; ev <= '0; data <= '0;
      wait_cnt <= 0; left <= 0; bound <= '0; acc <= '0;
    end else begin
      start   <= 1'b0;
      ev      <= '0;
      data[0] <= 16'($urandom);
      data[1] <= 16'($urandom);
      if (!go) begin
        st <= M_IDLE;
      end else begin
        unique case (st)
          M_IDLE: begin
            start    <= 1'b1;
            wait_cnt <= $urandom_range(4, 1);
            st       <= M_WAIT;
          end
          M_WAIT: begin
            if (wait_cnt > 1) wait_cnt <= wait_cnt - 1;
            else begin
              // loop bound computed: EOP 0 fires
              bound    = 8'($urandom_range(int'(trip_hi), int'(trip_lo)));
              ev[0]   <= 1'b1;
              data[0] <= {8'h00, bound};
              left     <= 32'(bound);
              wait_cnt <= 0;
              acc      <= 16'($urandom);
              st       <= M_BODY;
            end
          end
          M_BODY: begin
            if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
            else begin
              // one loop iteration completes: EOP 1 fires
              ev[1]   <= 1'b1;
              data[1] <= acc;
              acc     <= acc + 16'd1 + 16'(left);
              left    <= left - 1;
              if (left == 1) begin
                wait_cnt <= $urandom_range(4, 1);
                st       <= M_WAIT;
              end else begin
                wait_cnt <= $urandom_range(int'(gap_max), 0);
              end
            end
          end
          default: st <= M_IDLE;
        endcase
      end
    end
  end

endmodule
