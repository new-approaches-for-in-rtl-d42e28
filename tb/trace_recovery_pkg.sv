// trace_recovery_pkg: host-side recovery of event order and timing (testbench
// only).
//
// After upload, each data buffer holds the results of its events in order but
// without time stamps. The reference trace holds one sample per recorded cycle
// with one bit per EOP. Recovery walks the reference trace from its last
// sample back to its first; for every EOP bit set in a sample it takes the
// last not yet used entry of that EOP's buffer and labels it with the sample
// number. This works because all buffers start and stop recording in the same
// cycles. With a cycle-accurate reference trace the sample number is the
// cycle offset from the start of the trace; otherwise it is the rank of the
// cycle among the cycles that had events.
package trace_recovery_pkg;

  typedef struct {
    int sample;  // reference-trace sample the event belongs to
    int eop;     // which EOP
    int data;    // recovered data word
  } rec_t;

  typedef int iq_t[$];

  // Returns the recovered events in forward order. errors counts reference
  // samples that point past the start of a buffer and buffer entries left
  // unclaimed at the end (both mean the traces do not line up).
  function automatic void recover(input iq_t ref_s, input iq_t bufs[],
                                  input int eob_of_eop[], output rec_t recs[$],
                                  output int errors);
    int ptr[];
    rec_t r;
    ptr    = new[bufs.size()];
    errors = 0;
    recs.delete();
    foreach (bufs[b]) ptr[b] = bufs[b].size();
    for (int k = ref_s.size() - 1; k >= 0; k--) begin
      for (int i = eob_of_eop.size() - 1; i >= 0; i--) begin
        if (ref_s[k][i]) begin
          int b = eob_of_eop[i];
          if (ptr[b] == 0) begin
            errors++;
          end else begin
            ptr[b]--;
            r.sample = k;
            r.eop    = i;
            r.data   = bufs[b][ptr[b]];
            recs.push_front(r);
          end
        end
      end
    end
    foreach (ptr[b]) if (ptr[b] != 0) errors++;
  endfunction

endpackage
