// ts_min_select: oldest-timestamp arbiter.
//
// Given N requesters, each with a valid bit and a timestamp, it reports
// whether any is valid, the index of the valid requester with the smallest
// timestamp and that timestamp. Ties go to the lowest index. This is the
// arbiter of the document's local/global virtual time scheme: each requester
// offers its local virtual time (its oldest timestamp) and the smallest one
// wins, so the task that holds the global virtual time is never made to
// wait behind a younger one. The tie rule is this design's choice.
//
// Purely combinational (a linear scan; N is small in this design).
// min_ts is all ones when nothing is valid.
module ts_min_select #(
  parameter int N = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]                  valid,
  input  chronos_pkg::ts_t              ts [N],
  output logic                          any,
  output logic [IW-1:0]                 idx,
  output chronos_pkg::ts_t              min_ts
);
  import chronos_pkg::*;

  always_comb begin
    any    = 1'b0;
    idx    = '0;
    min_ts = TS_MAX;
    for (int i = 0; i < N; i++) begin
      if (valid[i] && (!any || ts[i] < min_ts)) begin
        any    = 1'b1;
        idx    = IW'(i);
        min_ts = ts[i];
      end
    end
  end
endmodule
