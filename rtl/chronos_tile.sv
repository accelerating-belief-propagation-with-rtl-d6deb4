// chronos_tile: one tile of the task-speculative accelerator.
//
// A tile owns the objects whose id is congruent to TILE_ID modulo NTILES and
// runs every task on them. Inside it:
//   task_queue       -> picks the oldest startable task, reserves a
//                       commit-queue slot and sends it over a pe_link_buf
//                       to an idle PE;
//   rbp_pe x NPE     -> run the task against the object cache, log the
//                       old word in the commit queue, produce children;
//   child_manager    -> moves the children, one PE at a time, into
//   task_send_buffer -> which offers them, oldest first, to the interconnect;
//   commit_queue     -> commits finished tasks at the GVT, aborts, rolls
//                       back, requeues, and broadcasts abort messages;
//   obj_cache        -> the tile's objects.
// The tile reports its local virtual time (the oldest timestamp in its task
// queue, commit queue and send buffer; children still in a PE or the child
// manager are always younger than their parent in the commit queue).
//
// The block structure and the arrows between the blocks (tasks, aborts,
// requeues, undo log, task accesses, rollback) follow the document's tile
// figure; the widths, depths and cycle timing are this design's choices.
// Task spills from the task queue to memory are not modelled: the task
// queue applies backpressure instead.
module chronos_tile #(
  parameter int TILE_ID    = 0,
  parameter int NTILES     = 4,
  parameter int NPE        = 4,
  parameter int GRID       = 7,
  parameter int TQ_DEPTH   = 64,
  parameter int TQ_RSV     = 8,
  parameter int NCQ        = 8,
  parameter int TSB_DEPTH  = 8,
  parameter int UNTIED     = 4,
  parameter int RQ_DEPTH   = 2,
  parameter bit PREEMPT    = 1'b1,
  parameter int J          = 64,
  parameter int EPS        = 2,
  parameter int RES_CAP    = 255,
  parameter int PRIO_SHIFT = 4,
  localparam int LWORDS    = (5 * GRID * GRID + NTILES - 1) / NTILES,
  localparam int AW        = (LWORDS > 1) ? $clog2(LWORDS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  chronos_pkg::ts_t       gvt,
  // tasks in from the interconnect
  input  logic                   enq_valid,
  input  chronos_pkg::task_t     enq_task,
  output logic                   enq_ready,
  output logic                   can_tied,
  output logic                   can_untied,
  // tasks out to the interconnect
  output logic                   snd_valid,
  output chronos_pkg::task_t     snd_task,
  input  logic                   snd_ready,
  input  logic [NTILES-1:0]      dst_can_tied,
  input  logic [NTILES-1:0]      dst_can_untied,
  // abort channels
  input  logic [NTILES-1:0]      ab_valid,
  input  chronos_pkg::tid_t      ab_tid [NTILES],
  output logic                   abo_valid,
  output chronos_pkg::tid_t      abo_tid,
  // host access to the object cache
  input  logic                   host_we,
  input  logic [AW-1:0]          host_addr,
  input  chronos_pkg::objword_t  host_wdata,
  output chronos_pkg::objword_t  host_rdata,
  // status
  output logic                   lvt_valid,
  output chronos_pkg::ts_t       lvt,
  output chronos_pkg::tile_ev_t  ev
);
  import chronos_pkg::*;

  localparam int CQW = (NCQ > 1) ? $clog2(NCQ) : 1;
  localparam int PEW = (NPE > 1) ? $clog2(NPE) : 1;

  // ---- task queue <-> commit queue
  logic [NCQ-1:0] cq_busy, cq_aborting, cq_running;
  obj_t           cq_obj [NCQ];
  ts_t            cq_ts  [NCQ];
  logic           cq_free, cq_gvt_free;
  logic           ca_valid;
  logic [CQW-1:0] ca_slot, alloc_slot;
  tid_t           alloc_tid;
  logic           rq_valid, rq_ready;
  task_t          rq_task;
  logic [NPE-1:0] pe_ready;
  logic           disp_valid;
  logic [PEW-1:0] disp_pe;
  task_t          disp_task;
  logic           tq_lvt_v, cq_lvt_v, tsb_lvt_v;
  ts_t            tq_lvt, cq_lvt, tsb_lvt;
  logic           ev_tq_rsv, ev_tq_drop, ev_tq_ra;

  task_queue #(.DEPTH(TQ_DEPTH), .NPE(NPE), .NCQ(NCQ), .NABORT(NTILES), .RSV(TQ_RSV)) u_tq (
    .clk, .rst_n, .run, .gvt,
    .enq_valid, .enq_task, .enq_ready, .can_tied, .can_untied,
    .rq_valid, .rq_task, .rq_ready,
    .ab_valid, .ab_tid,
    .cq_busy, .cq_aborting, .cq_running, .cq_obj, .cq_ts, .cq_free, .cq_gvt_free,
    .ca_valid, .ca_slot,
    .pe_ready, .disp_valid, .disp_pe, .disp_task,
    .lvt_valid(tq_lvt_v), .lvt(tq_lvt),
    .ev_rsv_enq(ev_tq_rsv), .ev_res_abort(ev_tq_ra), .ev_drop(ev_tq_drop)
  );

  // ---- PEs and their links
  logic [NPE-1:0]  squash, undo_valid, done_valid;
  logic [CQW-1:0]  undo_slot [NPE];
  logic [CQW-1:0]  done_slot [NPE];
  objword_t        undo_data [NPE];
  logic [NPE-1:0]  mreq, mwe, mgnt;
  logic [AW-1:0]   maddr  [NPE];
  objword_t        mwdata [NPE];
  objword_t        mrdata;
  logic [NPE-1:0]  creq, cpop, pbusy, pstale;
  ts_t             cpts  [NPE];
  task_t           child [NPE];
  logic            rb_we;
  logic [AW-1:0]   rb_addr;
  objword_t        rb_wdata;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic  l_in_ready, l_out_valid, pe_in_ready;
    job_t  l_in, l_out;
    logic [7:0] us, ds;

    assign l_in = '{t: disp_task, tid: alloc_tid, slot: 8'(alloc_slot)};
    assign pe_ready[p] = l_in_ready && pe_in_ready;

    pe_link_buf #(.T(job_t)) u_link (
      .clk, .rst_n, .flush(squash[p]),
      .in_valid(disp_valid && disp_pe == PEW'(p)), .in_data(l_in), .in_ready(l_in_ready),
      .out_valid(l_out_valid), .out_data(l_out), .out_ready(pe_in_ready)
    );

    rbp_pe #(.GRID(GRID), .NTILES(NTILES), .J(J), .EPS(EPS),
             .RES_CAP(RES_CAP), .PRIO_SHIFT(PRIO_SHIFT)) u_pe (
      .clk, .rst_n, .squash(squash[p]),
      .in_valid(l_out_valid), .in_job(l_out), .in_ready(pe_in_ready),
      .mreq(mreq[p]), .mwe(mwe[p]), .maddr(maddr[p]), .mwdata(mwdata[p]),
      .mgnt(mgnt[p]), .mrdata(mrdata),
      .undo_valid(undo_valid[p]), .undo_slot(us), .undo_data(undo_data[p]),
      .done_valid(done_valid[p]), .done_slot(ds),
      .creq(creq[p]), .cpts(cpts[p]), .child(child[p]), .cpop(cpop[p]),
      .busy(pbusy[p]), .ev_stale(pstale[p])
    );
    assign undo_slot[p] = CQW'(us);
    assign done_slot[p] = CQW'(ds);
  end

  // ---- commit queue
  logic [$clog2(NCQ+1)-1:0] ev_commits;
  logic ev_ab_c, ev_ab_p, ev_gslot;
  commit_queue #(.NCQ(NCQ), .NPE(NPE), .NABORT(NTILES), .LWORDS(LWORDS),
                 .NTILES(NTILES), .TILE_ID(TILE_ID)) u_cq (
    .clk, .rst_n, .run, .gvt,
    .disp_valid, .disp_task, .disp_pe, .alloc_slot, .alloc_tid, .cq_free, .cq_gvt_free,
    .cq_busy, .cq_aborting, .cq_running, .cq_obj, .cq_ts,
    .ca_valid, .ca_slot,
    .ab_valid, .ab_tid,
    .undo_valid, .undo_slot, .undo_data, .done_valid, .done_slot, .squash,
    .rb_we, .rb_addr, .rb_wdata,
    .abo_valid, .abo_tid,
    .rq_valid, .rq_task, .rq_ready,
    .lvt_valid(cq_lvt_v), .lvt(cq_lvt),
    .ev_commits, .ev_abort_conflict(ev_ab_c), .ev_abort_parent(ev_ab_p),
    .ev_gvt_slot(ev_gslot)
  );

  // ---- object cache
  obj_cache #(.WORDS(LWORDS), .NREQ(NPE)) u_cache (
    .clk, .rst_n,
    .req(mreq), .we(mwe), .addr(maddr), .wdata(mwdata), .gnt(mgnt), .rdata(mrdata),
    .rb_we, .rb_addr, .rb_wdata,
    .host_we, .host_addr, .host_wdata, .host_rdata
  );

  // ---- child manager and task send buffer
  logic  cm_valid, cm_untied, cm_ready, cm_busy, ev_pre, ev_evi;
  task_t cm_task;
  logic  ev_unt, ev_ref, ev_tsbd;

  child_manager #(.NPE(NPE), .RQ_DEPTH(RQ_DEPTH), .PREEMPT(PREEMPT)) u_cm (
    .clk, .rst_n, .gvt,
    .req(creq), .pts(cpts), .child, .squash, .pop(cpop),
    .out_valid(cm_valid), .out_task(cm_task), .out_untied(cm_untied), .out_ready(cm_ready),
    .busy(cm_busy), .ev_preempt(ev_pre), .ev_evict(ev_evi)
  );

  task_send_buffer #(.DEPTH(TSB_DEPTH), .UNTIED(UNTIED), .NABORT(NTILES), .NTILES(NTILES)) u_tsb (
    .clk, .rst_n, .gvt,
    .in_valid(cm_valid), .in_task(cm_task), .in_untied(cm_untied), .in_ready(cm_ready),
    .ab_valid, .ab_tid, .dst_can_tied, .dst_can_untied,
    .out_valid(snd_valid), .out_task(snd_task), .out_ready(snd_ready),
    .lvt_valid(tsb_lvt_v), .lvt(tsb_lvt),
    .ev_untied_space(ev_unt), .ev_tied_refused(ev_ref), .ev_drop(ev_tsbd)
  );

  // ---- local virtual time
  logic [2:0] lv;
  ts_t        lt [3];
  logic [1:0] l_idx;
  assign lv = {tsb_lvt_v, cq_lvt_v, tq_lvt_v};
  assign lt = '{tq_lvt, cq_lvt, tsb_lvt};
  ts_min_select #(.N(3)) u_lvt (
    .valid(lv), .ts(lt), .any(lvt_valid), .idx(l_idx), .min_ts(lvt)
  );

  always_comb begin
    ev = '0;
    ev.commits        = 4'(ev_commits);
    ev.dispatch       = disp_valid;
    ev.abort_conflict = ev_ab_c;
    ev.abort_parent   = ev_ab_p;
    ev.cq_gvt_slot    = ev_gslot;
    ev.tq_rsv         = ev_tq_rsv;
    ev.tq_drop        = ev_tq_drop;
    ev.tsb_untied     = ev_unt;
    ev.tsb_refused    = ev_ref;
    ev.tsb_drop       = ev_tsbd;
    ev.cm_preempt     = ev_pre;
    ev.cm_evict       = ev_evi;
    ev.stale          = |pstale;
    ev.res_abort      = ev_tq_ra;
  end

  logic unused;
  assign unused = ^{l_idx, pbusy, cm_busy};
endmodule
