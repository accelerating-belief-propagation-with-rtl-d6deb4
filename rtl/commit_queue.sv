// commit_queue: speculative state of the tasks a tile has started.
//
// Each slot follows one task from dispatch to commit or abort. It records the
// task, its instance id, the PE running it and an undo log entry: the object
// word the task overwrote, reported by the PE in the cycle of the write.
//
//  * Commit: a finished task commits (its slot is freed and its write becomes
//    permanent) once its timestamp is not above the GVT, so tasks commit in
//    timestamp order.
//  * Abort: a slot is aborted either because the task queue found that it ran
//    ahead of an older task on the same object (conflict abort; the task is
//    requeued) or because its parent's id appeared on an abort channel
//    (the task is discarded). Aborts are handled one at a time in two
//    cycles: first the PE, if still running, is squashed; then the undo
//    entry is written back to the cache (rollback), the task's own id is
//    broadcast so its children are aborted in turn, and the task is
//    requeued if the abort was a conflict abort.
//  * GVT reservation: slot 0 is kept for a task whose timestamp equals the
//    GVT, so the oldest task can always start even when every other slot
//    holds younger speculative work; it sits in the first slot.
//
// Allocation is combinational (alloc_slot/alloc_tid are valid in the dispatch
// cycle); everything else updates on the clock edge. The commit rule, the
// undo log and the reserved first slot follow the document; the two-cycle
// abort sequence, the abort broadcast by instance id (in place of child
// pointers) and the slot count are this design's choices.
module commit_queue #(
  parameter int NCQ     = 8,
  parameter int NPE     = 4,
  parameter int NABORT  = 4,
  parameter int LWORDS  = 64,      // local cache words (rollback address range)
  parameter int NTILES  = 4,
  parameter int TILE_ID = 0,
  localparam int CQW    = (NCQ > 1) ? $clog2(NCQ) : 1,
  localparam int PEW    = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int AW     = (LWORDS > 1) ? $clog2(LWORDS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  chronos_pkg::ts_t       gvt,
  // allocation (from the task queue's dispatch)
  input  logic                   disp_valid,
  input  chronos_pkg::task_t     disp_task,
  input  logic [PEW-1:0]         disp_pe,
  output logic [CQW-1:0]         alloc_slot,
  output chronos_pkg::tid_t      alloc_tid,
  output logic                   cq_free,
  output logic                   cq_gvt_free,
  // view for conflict detection
  output logic [NCQ-1:0]         cq_busy,
  output logic [NCQ-1:0]         cq_aborting,
  output logic [NCQ-1:0]         cq_running,
  output chronos_pkg::obj_t      cq_obj [NCQ],
  output chronos_pkg::ts_t       cq_ts  [NCQ],
  // conflict abort request
  input  logic                   ca_valid,
  input  logic [CQW-1:0]         ca_slot,
  // abort channels in (parent aborts)
  input  logic [NABORT-1:0]      ab_valid,
  input  chronos_pkg::tid_t      ab_tid [NABORT],
  // from PEs
  input  logic [NPE-1:0]         undo_valid,
  input  logic [CQW-1:0]         undo_slot [NPE],
  input  chronos_pkg::objword_t  undo_data [NPE],
  input  logic [NPE-1:0]         done_valid,
  input  logic [CQW-1:0]         done_slot [NPE],
  output logic [NPE-1:0]         squash,
  // rollback to the cache
  output logic                   rb_we,
  output logic [AW-1:0]          rb_addr,
  output chronos_pkg::objword_t  rb_wdata,
  // abort channel out
  output logic                   abo_valid,
  output chronos_pkg::tid_t      abo_tid,
  // requeue to the task queue
  output logic                   rq_valid,
  output chronos_pkg::task_t     rq_task,
  input  logic                   rq_ready,
  // local virtual time
  output logic                   lvt_valid,
  output chronos_pkg::ts_t       lvt,
  // event strobes
  output logic [$clog2(NCQ+1)-1:0] ev_commits,
  output logic                   ev_abort_conflict,
  output logic                   ev_abort_parent,
  output logic                   ev_gvt_slot
);
  import chronos_pkg::*;

  typedef struct packed {
    logic     busy;
    logic     fin;
    logic     ab_pend;
    logic     ab_rq;
    logic     ab_phase;
    logic     undo_v;
    objword_t undo_d;
    logic [PEW-1:0] pe;
    tid_t     tid;
    task_t    t;
  } cqe_t;

  cqe_t e_q [NCQ];
  logic [TID_CNT_W-1:0] cnt_q;

  // ---- exported view
  always_comb
    for (int s = 0; s < NCQ; s++) begin
      cq_busy[s]     = e_q[s].busy;
      cq_aborting[s] = e_q[s].busy && e_q[s].ab_pend;
      cq_running[s]  = e_q[s].busy && !e_q[s].fin;
      cq_obj[s]      = e_q[s].t.obj;
      cq_ts[s]       = e_q[s].t.ts;
    end

  // ---- allocation
  logic          ord_ok;
  logic [CQW-1:0] ord_slot;
  always_comb begin
    ord_ok   = 1'b0;
    ord_slot = '0;
    for (int s = NCQ-1; s >= 1; s--)
      if (!e_q[s].busy) begin
        ord_ok   = 1'b1;
        ord_slot = CQW'(s);
      end
  end
  assign cq_free     = ord_ok;
  assign cq_gvt_free = !e_q[0].busy;

  logic use_rsv;
  assign use_rsv    = cq_gvt_free && disp_task.ts == gvt;
  assign alloc_slot = use_rsv ? '0 : ord_slot;
  assign alloc_tid  = tid_t'({4'(TILE_ID), cnt_q});
  assign ev_gvt_slot = disp_valid && use_rsv && !ord_ok;

  // ---- parent aborts
  logic [NCQ-1:0] pkill;
  always_comb
    for (int s = 0; s < NCQ; s++) begin
      pkill[s] = 1'b0;
      for (int a = 0; a < NABORT; a++)
        if (ab_valid[a] && e_q[s].busy && e_q[s].t.ptid != '0 &&
            e_q[s].t.ptid == ab_tid[a])
          pkill[s] = 1'b1;
    end

  // ---- abort sequencing: lowest pending slot
  logic           ab_any;
  logic [CQW-1:0] ab_s;
  always_comb begin
    ab_any = 1'b0;
    ab_s   = '0;
    for (int s = NCQ-1; s >= 0; s--)
      if (e_q[s].busy && e_q[s].ab_pend) begin
        ab_any = 1'b1;
        ab_s   = CQW'(s);
      end
  end

  cqe_t ab_e;
  assign ab_e = e_q[ab_s];

  logic ab_phase_b, ab_finish;
  assign ab_phase_b = ab_any && ab_e.ab_phase;
  assign ab_finish  = ab_phase_b && (!ab_e.ab_rq || rq_ready);

  always_comb begin
    squash = '0;
    if (ab_any && !ab_e.ab_phase && !ab_e.fin) squash[ab_e.pe] = 1'b1;
  end

  assign rb_we     = ab_phase_b && ab_e.undo_v;
  assign rb_addr   = AW'(ab_e.t.obj / NTILES);
  assign rb_wdata  = ab_e.undo_d;
  assign abo_valid = ab_phase_b;
  assign abo_tid   = ab_e.tid;
  assign rq_valid  = ab_phase_b && ab_e.ab_rq;
  assign rq_task   = ab_e.t;
  assign ev_abort_conflict = ab_finish && ab_e.ab_rq;
  assign ev_abort_parent   = ab_finish && !ab_e.ab_rq;

  // ---- commits
  logic [NCQ-1:0] commit;
  always_comb begin
    ev_commits = '0;
    for (int s = 0; s < NCQ; s++) begin
      commit[s] = run && e_q[s].busy && e_q[s].fin && !e_q[s].ab_pend &&
                  e_q[s].t.ts <= gvt;
      ev_commits += ($clog2(NCQ+1))'(commit[s]);
    end
  end

  // ---- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NCQ; s++) e_q[s] <= '0;
      cnt_q <= TID_CNT_W'(1);
    end else begin
      for (int s = 0; s < NCQ; s++) begin
        if (commit[s]) e_q[s].busy <= 1'b0;
        if (pkill[s] && !e_q[s].ab_pend) begin
          e_q[s].ab_pend <= 1'b1;
          e_q[s].ab_rq   <= 1'b0;
        end
      end
      if (ca_valid && e_q[ca_slot].busy && !e_q[ca_slot].ab_pend && !pkill[ca_slot]) begin
        e_q[ca_slot].ab_pend <= 1'b1;
        e_q[ca_slot].ab_rq   <= 1'b1;
      end
      for (int p = 0; p < NPE; p++) begin
        if (undo_valid[p] && e_q[undo_slot[p]].busy && !e_q[undo_slot[p]].undo_v) begin
          e_q[undo_slot[p]].undo_v <= 1'b1;
          e_q[undo_slot[p]].undo_d <= undo_data[p];
        end
        if (done_valid[p] && e_q[done_slot[p]].busy)
          e_q[done_slot[p]].fin <= 1'b1;
      end
      if (ab_any && !ab_e.ab_phase) e_q[ab_s].ab_phase <= 1'b1;
      if (ab_finish) e_q[ab_s].busy <= 1'b0;
      if (disp_valid) begin
        e_q[alloc_slot] <= '{busy: 1'b1, fin: 1'b0, ab_pend: 1'b0, ab_rq: 1'b0,
                             ab_phase: 1'b0, undo_v: 1'b0, undo_d: '0,
                             pe: disp_pe, tid: alloc_tid, t: disp_task};
        cnt_q <= (cnt_q == '1) ? TID_CNT_W'(1) : cnt_q + 1'b1;
      end
    end
  end

  // ---- local virtual time
  logic [NCQ-1:0] lv;
  logic [CQW-1:0] l_idx;
  always_comb
    for (int s = 0; s < NCQ; s++) lv[s] = e_q[s].busy;
  ts_min_select #(.N(NCQ)) u_lvt (
    .valid(lv), .ts(cq_ts), .any(lvt_valid), .idx(l_idx), .min_ts(lvt)
  );
  logic unused;
  assign unused = ^l_idx;

`ifndef SYNTHESIS
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
    disp_valid |-> !e_q[alloc_slot].busy);
`endif
endmodule
