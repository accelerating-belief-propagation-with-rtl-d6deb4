// task_send_buffer: outgoing child tasks of a tile.
//
// Children created by the tile's PEs (handed over by the child manager) wait
// here until the task interconnect takes them to the tile that owns their
// object. The oldest entry is always offered first, so a child of the oldest
// task never waits behind younger traffic.
//
// Space is split between tied and untied children. A child is untied when
// its parent is the GVT task: that parent can no longer be aborted, so the
// child can never be aborted through it either. Tied children (all others)
// may fill at most DEPTH-UNTIED entries; the last UNTIED entries are kept
// for untied children. With UNTIED >= 1 this is the reservation for the GVT's
// children, and making UNTIED at least the largest number of children one
// task creates lets the GVT task always hand over all its children.
// The output offers the oldest entry whose destination task queue can take
// it now (untied entries and the GVT task may use the task queue's reserved
// entries), so one blocked destination does not hold up the others.
// Entries whose parent id appears on an abort channel are dropped.
//
// in_ready is combinational in in_untied; out_* are combinational from the
// stored entries. The tied/untied split and the GVT reservation follow the
// document; the depth, the oldest-first output order and the definition of
// "untied" as "parent is the GVT task" are this design's choices.
module task_send_buffer #(
  parameter int DEPTH  = 8,
  parameter int UNTIED = 4,
  parameter int NABORT = 4,
  parameter int NTILES = 4,
  localparam int IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  chronos_pkg::ts_t   gvt,
  input  logic               in_valid,
  input  chronos_pkg::task_t in_task,
  input  logic               in_untied,
  output logic               in_ready,
  input  logic [NABORT-1:0]  ab_valid,
  input  chronos_pkg::tid_t  ab_tid [NABORT],
  input  logic [NTILES-1:0]  dst_can_tied,     // destination would take a tied task
  input  logic [NTILES-1:0]  dst_can_untied,   // ... an untied task
  output logic               out_valid,
  output chronos_pkg::task_t out_task,
  input  logic               out_ready,
  output logic               lvt_valid,
  output chronos_pkg::ts_t   lvt,
  output logic               ev_untied_space,   // untied child took reserved space
  output logic               ev_tied_refused,   // tied child refused for lack of tied space
  output logic               ev_drop
);
  import chronos_pkg::*;

  logic [DEPTH-1:0] v_q;
  task_t            t_q [DEPTH];
  ts_t              t_ts [DEPTH];

  function automatic logic killed(tid_t p, logic [NABORT-1:0] av, tid_t at [NABORT]);
    logic k;
    k = 1'b0;
    for (int a = 0; a < NABORT; a++)
      if (av[a] && p != '0 && at[a] == p) k = 1'b1;
    return k;
  endfunction

  logic [DEPTH-1:0] kill;
  int unsigned      used;
  logic [IW-1:0]    fslot;
  always_comb begin
    used  = 0;
    fslot = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      kill[i] = v_q[i] && killed(t_q[i].ptid, ab_valid, ab_tid);
      t_ts[i] = t_q[i].ts;
      if (v_q[i]) used++;
      else        fslot = IW'(i);
    end
  end

  assign in_ready = in_untied ? (used < DEPTH) : (used < DEPTH - UNTIED);

  logic in_kill;
  assign in_kill = killed(in_task.ptid, ab_valid, ab_tid);

  logic [DEPTH-1:0] ov;
  logic [IW-1:0]    o_idx;
  ts_t              o_ts;
  always_comb
    for (int i = 0; i < DEPTH; i++) begin
      int dt;
      dt = int'(t_q[i].obj % NTILES);
      ov[i] = v_q[i] && !kill[i] &&
              ((t_q[i].untied || t_q[i].ts == gvt) ? dst_can_untied[dt] : dst_can_tied[dt]);
    end
  ts_min_select #(.N(DEPTH)) u_out (
    .valid(ov), .ts(t_ts), .any(out_valid), .idx(o_idx), .min_ts(o_ts)
  );
  assign out_task = t_q[o_idx];

  logic [IW-1:0] l_idx;
  ts_min_select #(.N(DEPTH)) u_lvt (
    .valid(v_q), .ts(t_ts), .any(lvt_valid), .idx(l_idx), .min_ts(lvt)
  );

  assign ev_untied_space = in_valid && in_ready && in_untied && (used >= DEPTH - UNTIED);
  assign ev_tied_refused = in_valid && !in_untied && !in_ready;
  assign ev_drop         = (|kill) || (in_valid && in_ready && in_kill);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else begin
      v_q <= v_q & ~kill;
      if (out_valid && out_ready) v_q[o_idx] <= 1'b0;
      if (in_valid && in_ready && !in_kill) v_q[fslot] <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (in_valid && in_ready) t_q[fslot] <= in_task;

  logic unused;
  assign unused = ^{l_idx, o_ts};
endmodule
