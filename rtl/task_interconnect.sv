// task_interconnect: task traffic between tiles (and from the host).
//
// Each tile's task send buffer offers one task per cycle; the host offers
// tasks on one more input. A task goes to the tile that owns its object,
// tile = obj mod NTILES. For each destination tile the interconnect picks,
// among the inputs that want it, the one with the smallest timestamp (so the
// GVT task is never held up), forwards it, and returns that tile's ready to
// the chosen input only. Abort messages from the tiles' commit queues are
// delivered to every tile in the same cycle.
//
// Purely combinational: a task leaves a send buffer and enters a task queue
// on the same clock edge, so a task is always held by exactly one queue and
// the GVT computed from the queues never misses it. A real implementation of
// this crossbar would pipeline it; this design keeps it one cycle. The
// document shows the interconnect joining the tiles but does not describe
// its routing, arbitration or timing; those are this design's choices.
module task_interconnect #(
  parameter int NTILES = 4,
  localparam int NSRC  = NTILES + 1,
  localparam int SW    = $clog2(NSRC)
) (
  // sources: tile send buffers
  input  logic [NTILES-1:0]    src_valid,
  input  chronos_pkg::task_t   src_task  [NTILES],
  output logic [NTILES-1:0]    src_ready,
  // source: host
  input  logic                 host_valid,
  input  chronos_pkg::task_t   host_task,
  output logic                 host_ready,
  // destinations: tile task queues
  output logic [NTILES-1:0]    dst_valid,
  output chronos_pkg::task_t   dst_task  [NTILES],
  input  logic [NTILES-1:0]    dst_ready,
  // abort channels
  input  logic [NTILES-1:0]    abi_valid,
  input  chronos_pkg::tid_t    abi_tid   [NTILES],
  output logic [NTILES-1:0]    abo_valid,
  output chronos_pkg::tid_t    abo_tid   [NTILES]
);
  import chronos_pkg::*;

  logic [NSRC-1:0] sv;
  task_t           st [NSRC];
  ts_t             sts [NSRC];
  always_comb begin
    for (int s = 0; s < NTILES; s++) begin
      sv[s] = src_valid[s];
      st[s] = src_task[s];
    end
    sv[NTILES] = host_valid;
    st[NTILES] = host_task;
    for (int s = 0; s < NSRC; s++) sts[s] = st[s].ts;
  end

  function automatic int dest_of(obj_t o);
    return int'(o % NTILES);
  endfunction

  logic [NSRC-1:0] rdy;
  logic [NTILES-1:0] d_any;
  logic [SW-1:0]     d_idx [NTILES];
  for (genvar d = 0; d < NTILES; d++) begin : g_dst
    logic [NSRC-1:0] want;
    logic            any;
    logic [SW-1:0]   idx;
    ts_t             mts;
    always_comb
      for (int s = 0; s < NSRC; s++)
        want[s] = sv[s] && dest_of(st[s].obj) == d;
    ts_min_select #(.N(NSRC)) u_arb (
      .valid(want), .ts(sts), .any(any), .idx(idx), .min_ts(mts)
    );
    assign dst_valid[d] = any;
    assign dst_task[d]  = st[idx];
    assign d_any[d]     = any;
    assign d_idx[d]     = idx;
    logic unused;
    assign unused = ^mts;
  end

  always_comb begin
    rdy = '0;
    for (int d = 0; d < NTILES; d++)
      if (d_any[d]) rdy[d_idx[d]] = dst_ready[d];
  end

  assign src_ready  = rdy[NTILES-1:0];
  assign host_ready = rdy[NTILES];
  assign abo_valid  = abi_valid;
  assign abo_tid    = abi_tid;
endmodule
