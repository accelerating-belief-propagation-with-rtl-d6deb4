// child_manager: moves the children of finished PE work into the task send
// buffer, one PE at a time.
//
// A PE with children to send raises req and shows its next child and its own
// (the parent's) timestamp. Requests are held in a small request queue of
// RQ_DEPTH entries (fewer than the PEs). The manager serves the queued PE
// whose parent timestamp is smallest (the local/global virtual time arbiter),
// and passes that PE's children to the send buffer until it has none left.
// A child is marked untied when its parent's timestamp equals the GVT.
//
// Two deadlock fixes are built in:
//  * Preemption: if the send buffer refuses a tied child (its tied space is
//    full) while another queued PE holds untied children, the manager switches
//    to that PE instead of waiting on the refused one (PREEMPT=1).
//  * Resource abort in the request queue: when the queue is full and a PE
//    whose parent is the GVT task asks to enter, a request of a non-GVT PE
//    that is not being served is evicted to make room. The evicted PE keeps
//    its req raised and enters again later, so nothing is lost.
// A squashed PE's request is removed at once and none of its children pass.
//
// Timing: one new request enters per cycle; one child passes per cycle; the
// child path to the send buffer is combinational. The preemption and
// request-eviction behaviour follows the document; the queue depth, the
// oldest-first choice and the level-sensitive request are this design's.
module child_manager #(
  parameter int NPE      = 4,
  parameter int RQ_DEPTH = 2,
  parameter bit PREEMPT  = 1'b1,
  localparam int PEW     = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int RQW     = (RQ_DEPTH > 1) ? $clog2(RQ_DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  chronos_pkg::ts_t   gvt,
  input  logic [NPE-1:0]     req,
  input  chronos_pkg::ts_t   pts   [NPE],
  input  chronos_pkg::task_t child [NPE],
  input  logic [NPE-1:0]     squash,
  output logic [NPE-1:0]     pop,
  output logic               out_valid,
  output chronos_pkg::task_t out_task,
  output logic               out_untied,
  input  logic               out_ready,
  output logic               busy,
  output logic               ev_preempt,
  output logic               ev_evict
);
  import chronos_pkg::*;

  logic [RQ_DEPTH-1:0] rq_v;
  logic [PEW-1:0]      rq_pe [RQ_DEPTH];
  logic                cur_v;
  logic [RQW-1:0]      cur;

  // which PEs are queued
  logic [NPE-1:0] queued;
  always_comb begin
    queued = '0;
    for (int k = 0; k < RQ_DEPTH; k++)
      if (rq_v[k]) queued[rq_pe[k]] = 1'b1;
  end

  // live entries: still requesting and not squashed
  logic [RQ_DEPTH-1:0] live;
  ts_t                 e_ts [RQ_DEPTH];
  logic [RQ_DEPTH-1:0] e_gvt;
  always_comb
    for (int k = 0; k < RQ_DEPTH; k++) begin
      live[k]  = rq_v[k] && req[rq_pe[k]] && !squash[rq_pe[k]];
      e_ts[k]  = pts[rq_pe[k]];
      e_gvt[k] = live[k] && (pts[rq_pe[k]] == gvt);
    end

  // ---- serving
  logic           cur_live;
  logic [PEW-1:0] cur_pe;
  assign cur_pe   = rq_pe[cur];
  assign cur_live = cur_v && live[cur];

  assign out_valid  = cur_live;
  assign out_untied = (pts[cur_pe] == gvt);
  always_comb begin
    out_task        = child[cur_pe];
    out_task.untied = out_untied;
  end

  always_comb begin
    pop = '0;
    if (cur_live && out_ready) pop[cur_pe] = 1'b1;
  end

  // next entry to serve: oldest live entry
  logic           n_any;
  logic [RQW-1:0] n_idx;
  ts_t            n_ts;
  ts_min_select #(.N(RQ_DEPTH)) u_serve (
    .valid(live), .ts(e_ts), .any(n_any), .idx(n_idx), .min_ts(n_ts)
  );

  // untied alternative while the current one is refused
  logic           alt_any;
  logic [RQW-1:0] alt_idx;
  always_comb begin
    alt_any = 1'b0;
    alt_idx = '0;
    for (int k = RQ_DEPTH-1; k >= 0; k--)
      if (e_gvt[k] && !(cur_v && RQW'(k) == cur)) begin
        alt_any = 1'b1;
        alt_idx = RQW'(k);
      end
  end
  assign ev_preempt = PREEMPT && cur_live && !out_ready && !out_untied && alt_any;

  // ---- request entry: oldest unqueued requester
  logic [NPE-1:0] want;
  logic           w_any;
  logic [PEW-1:0] w_pe;
  ts_t            w_ts;
  assign want = req & ~queued & ~squash;
  ts_min_select #(.N(NPE)) u_want (
    .valid(want), .ts(pts), .any(w_any), .idx(w_pe), .min_ts(w_ts)
  );

  logic           f_any;
  logic [RQW-1:0] f_idx;
  logic           v_any;     // evictable victim
  logic [RQW-1:0] v_idx;
  always_comb begin
    f_any = 1'b0; f_idx = '0; v_any = 1'b0; v_idx = '0;
    for (int k = RQ_DEPTH-1; k >= 0; k--) begin
      if (!live[k]) begin f_any = 1'b1; f_idx = RQW'(k); end
      if (live[k] && !e_gvt[k] && !(cur_v && RQW'(k) == cur)) begin
        v_any = 1'b1; v_idx = RQW'(k);
      end
    end
  end

  logic ins, ev_ins;
  logic [RQW-1:0] ins_idx;
  assign ev_ins  = w_any && !f_any && (w_ts == gvt) && v_any;
  assign ins     = w_any && (f_any || ev_ins);
  assign ins_idx = f_any ? f_idx : v_idx;
  assign ev_evict = ev_ins;
  assign busy     = |live;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_v  <= '0;
      cur_v <= 1'b0;
      cur   <= '0;
    end else begin
      // drop entries that are done or squashed
      for (int k = 0; k < RQ_DEPTH; k++)
        if (!live[k]) rq_v[k] <= 1'b0;
      if (cur_v && !live[cur]) cur_v <= 1'b0;
      // choose what to serve
      if (!cur_v || !live[cur]) begin
        if (n_any) begin
          cur_v <= 1'b1;
          cur   <= n_idx;
        end
      end else if (ev_preempt) begin
        cur <= alt_idx;
      end
      if (ins) begin
        rq_v[ins_idx]  <= 1'b1;
        rq_pe[ins_idx] <= w_pe;
      end
    end
  end

`ifndef SYNTHESIS
  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pop));
`endif
endmodule
