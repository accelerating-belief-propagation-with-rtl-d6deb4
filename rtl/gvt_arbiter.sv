// gvt_arbiter: global virtual time (GVT) unit.
//
// Every tile reports its local virtual time (LVT), the smallest timestamp of
// any task it holds in any queue, PE or buffer, and whether it holds a task
// at all. The arbiter takes the minimum over the tiles and registers it as
// the GVT, which goes back to every tile. Tiles use it to decide which
// finished tasks may commit (timestamp not above the GVT) and which task
// may use the slots reserved for the oldest task. When no tile holds a task
// the GVT is all ones.
//
// Timing: one register stage; gvt reflects the LVTs of the previous cycle.
// Holding the GVT one cycle old is safe because no task ever creates a task
// older than itself. The registered output is this design's choice; the
// document describes the LVT/GVT computation but not its timing.
module gvt_arbiter #(
  parameter int NTILES = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NTILES-1:0]   lvt_valid,
  input  chronos_pkg::ts_t    lvt [NTILES],
  output chronos_pkg::ts_t    gvt,
  output logic                busy      // some tile held a task last cycle
);
  import chronos_pkg::*;

  logic                        any;
  logic [((NTILES > 1) ? $clog2(NTILES) : 1)-1:0] idx;
  ts_t                         min_ts;

  ts_min_select #(.N(NTILES)) u_min (
    .valid(lvt_valid), .ts(lvt), .any(any), .idx(idx), .min_ts(min_ts)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gvt  <= TS_MAX;
      busy <= 1'b0;
    end else begin
      gvt  <= min_ts;
      busy <= any;
    end
  end

  logic unused;
  assign unused = ^idx;
endmodule
