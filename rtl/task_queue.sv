// task_queue: the tile's task queue and dispatcher.
//
// Holds tasks that wait to run on this tile: tasks arriving from the task
// interconnect (other tiles and the host) and tasks the commit queue
// requeues after an abort. Every cycle it picks, among the tasks it may start,
// the one with the smallest timestamp and hands it to a free PE link; the
// commit queue allocates a slot for it in the same cycle.
//
// A task may not start while the commit queue holds an uncommitted task on
// the same object with an equal or smaller timestamp (objects are written by
// one task at a time and in timestamp order). If the commit queue instead
// holds a task on that object with a larger timestamp, that task ran too
// early: the queue asks the commit queue to abort it (conflict abort) and
// starts its own task once the rollback is done.
//
// Reservation: RSV entries are kept for privileged tasks, those whose
// timestamp equals the GVT and untied tasks (children of the GVT task, which
// can never be aborted), and for requeues, so the work of the oldest task
// can always enter even when younger speculative tasks fill the queue. A task whose parent appears on an abort channel is discarded.
//
// LVT output: smallest timestamp held. All outputs are combinational from
// the stored entries and inputs; entries update on the clock edge.
// The document gives the queue's role (buffer tasks, reserve a commit-queue
// slot before dispatch, accept requeues) and the GVT reservation idea; the
// conflict rule, the entry count and the single dispatch per cycle are
// this design's choices.
module task_queue #(
  parameter int DEPTH  = 16,
  parameter int NPE    = 4,
  parameter int NCQ    = 8,
  parameter int NABORT = 4,
  parameter int RSV    = 4,             // entries kept for untied/GVT tasks
  localparam int CQW   = (NCQ > 1) ? $clog2(NCQ) : 1,
  localparam int PEW   = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,           // dispatch enable
  input  chronos_pkg::ts_t     gvt,
  // enqueue from the interconnect
  input  logic                 enq_valid,
  input  chronos_pkg::task_t   enq_task,
  output logic                 enq_ready,
  output logic                 can_tied,      // a tied task would be taken now
  output logic                 can_untied,    // an untied or GVT task would be taken now
  // requeue from the commit queue
  input  logic                 rq_valid,
  input  chronos_pkg::task_t   rq_task,
  output logic                 rq_ready,
  // abort channels: instance ids of aborted tasks
  input  logic [NABORT-1:0]    ab_valid,
  input  chronos_pkg::tid_t    ab_tid [NABORT],
  // view of the commit queue
  input  logic [NCQ-1:0]       cq_busy,       // slot holds an uncommitted task
  input  logic [NCQ-1:0]       cq_aborting,   // slot is being aborted
  input  logic [NCQ-1:0]       cq_running,    // slot's task is still on a PE
  input  chronos_pkg::obj_t    cq_obj [NCQ],
  input  chronos_pkg::ts_t     cq_ts  [NCQ],
  input  logic                 cq_free,       // an ordinary slot is free
  input  logic                 cq_gvt_free,   // the GVT-reserved slot is free
  // conflict abort request to the commit queue
  output logic                 ca_valid,
  output logic [CQW-1:0]       ca_slot,
  // dispatch to PE links
  input  logic [NPE-1:0]       pe_ready,
  output logic                 disp_valid,
  output logic [PEW-1:0]       disp_pe,
  output chronos_pkg::task_t   disp_task,
  // local virtual time
  output logic                 lvt_valid,
  output chronos_pkg::ts_t     lvt,
  // event strobes for statistics
  output logic                 ev_rsv_enq,    // entered through the reserved entry
  output logic                 ev_res_abort,  // PE taken back for the GVT task
  output logic                 ev_drop        // entry discarded by a parent abort
);
  import chronos_pkg::*;

  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic  [DEPTH-1:0] v_q;
  task_t             t_q [DEPTH];

  // ---- entries killed by an abort channel this cycle
  function automatic logic killed(tid_t p, logic [NABORT-1:0] av, tid_t at [NABORT]);
    logic k;
    k = 1'b0;
    for (int a = 0; a < NABORT; a++)
      if (av[a] && p != '0 && at[a] == p) k = 1'b1;
    return k;
  endfunction

  logic [DEPTH-1:0] kill;
  always_comb
    for (int i = 0; i < DEPTH; i++)
      kill[i] = v_q[i] && killed(t_q[i].ptid, ab_valid, ab_tid);

  // ---- conflict classification against the commit queue
  logic [DEPTH-1:0] blocked;
  logic [DEPTH-1:0] has_later;
  logic [CQW-1:0]   later_slot [DEPTH];
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      blocked[i]    = 1'b0;
      has_later[i]  = 1'b0;
      later_slot[i] = '0;
      for (int s = 0; s < NCQ; s++) begin
        if (cq_busy[s] && cq_obj[s] == t_q[i].obj) begin
          if (cq_aborting[s] || cq_ts[s] <= t_q[i].ts)
            blocked[i] = 1'b1;
          else if (!has_later[i]) begin
            has_later[i]  = 1'b1;
            later_slot[i] = CQW'(s);
          end
        end
      end
    end
  end

  // ---- pick the oldest startable entry
  logic [DEPTH-1:0] cand;
  ts_t              t_ts [DEPTH];
  logic             c_any;
  logic [IW-1:0]    c_idx;
  ts_t              c_ts;
  always_comb
    for (int i = 0; i < DEPTH; i++) begin
      cand[i] = v_q[i] && !kill[i] && !blocked[i];
      t_ts[i] = t_q[i].ts;
    end

  ts_min_select #(.N(DEPTH)) u_pick (
    .valid(cand), .ts(t_ts), .any(c_any), .idx(c_idx), .min_ts(c_ts)
  );

  logic          pe_any;
  logic [PEW-1:0] pe_sel;
  always_comb begin
    pe_any = 1'b0;
    pe_sel = '0;
    for (int p = NPE-1; p >= 0; p--)
      if (pe_ready[p]) begin
        pe_any = 1'b1;
        pe_sel = PEW'(p);
      end
  end

  // youngest task still running on a PE (victim of a resource abort)
  logic           y_any;
  logic [CQW-1:0] y_slot;
  ts_t            y_ts;
  always_comb begin
    y_any  = 1'b0;
    y_slot = '0;
    y_ts   = '0;
    for (int s = 0; s < NCQ; s++)
      if (cq_running[s] && !cq_aborting[s] && (!y_any || cq_ts[s] > y_ts)) begin
        y_any  = 1'b1;
        y_slot = CQW'(s);
        y_ts   = cq_ts[s];
      end
  end

  logic slot_ok;
  assign slot_ok = cq_free || (cq_gvt_free && c_ts == gvt);

  always_comb begin
    ca_valid   = 1'b0;
    ca_slot    = '0;
    disp_valid = 1'b0;
    disp_pe    = pe_sel;
    disp_task  = t_q[c_idx];
    if (run && c_any) begin
      if (has_later[c_idx]) begin
        ca_valid = 1'b1;
        ca_slot  = later_slot[c_idx];
      end else if (pe_any && slot_ok) begin
        disp_valid = 1'b1;
      end else if (!pe_any && c_ts == gvt && y_any && y_ts > gvt) begin
        ca_valid = 1'b1;
        ca_slot  = y_slot;
      end
    end
  end

  // ---- free entries for insertion
  logic [DEPTH-1:0] freev;
  assign freev = ~v_q;
  int unsigned nfree;
  logic [IW-1:0] f0, f1;
  logic          f0_ok, f1_ok;
  always_comb begin
    nfree = 0;
    f0 = '0; f1 = '0; f0_ok = 1'b0; f1_ok = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (freev[i]) begin
        nfree++;
        if (!f0_ok) begin f0 = IW'(i); f0_ok = 1'b1; end
        else if (!f1_ok) begin f1 = IW'(i); f1_ok = 1'b1; end
      end
    end
  end

  logic enq_is_gvt;
  assign enq_is_gvt = enq_task.untied || (enq_task.ts == gvt);
  assign rq_ready   = (nfree >= 1);
  always_comb begin
    int need;
    need       = (rq_valid ? 1 : 0);
    can_untied = (nfree > need);
    can_tied   = (nfree > need + RSV);
  end
  assign enq_ready = enq_is_gvt ? can_untied : can_tied;

  logic enq_kill;
  assign enq_kill = killed(enq_task.ptid, ab_valid, ab_tid);

  assign ev_rsv_enq = enq_valid && enq_ready && !enq_kill && enq_is_gvt && !can_tied;
  assign ev_res_abort = run && c_any && !has_later[c_idx] && !pe_any &&
                        c_ts == gvt && y_any && y_ts > gvt;
  assign ev_drop    = (|kill) || (enq_valid && enq_ready && enq_kill);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++)
        if (kill[i]) v_q[i] <= 1'b0;
      if (disp_valid) v_q[c_idx] <= 1'b0;
      if (rq_valid && rq_ready) v_q[f0] <= 1'b1;
      if (enq_valid && enq_ready && !enq_kill) begin
        if (rq_valid) v_q[f1] <= 1'b1;
        else          v_q[f0] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rq_valid && rq_ready) t_q[f0] <= rq_task;
    if (enq_valid && enq_ready && !enq_kill) begin
      if (rq_valid) t_q[f1] <= enq_task;
      else          t_q[f0] <= enq_task;
    end
  end

  // ---- local virtual time
  logic [IW-1:0] l_idx;
  ts_min_select #(.N(DEPTH)) u_lvt (
    .valid(v_q), .ts(t_ts), .any(lvt_valid), .idx(l_idx), .min_ts(lvt)
  );
  logic unused;
  assign unused = ^l_idx;

`ifndef SYNTHESIS
  // A dispatched task never belongs to an aborted parent.
  a_no_kill_dispatch: assert property (@(posedge clk) disable iff (!rst_n)
    disp_valid |-> !kill[c_idx]);
`endif
endmodule
