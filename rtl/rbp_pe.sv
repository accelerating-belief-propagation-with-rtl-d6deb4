// rbp_pe: processing element for residual belief propagation (RBP).
//
// The model is a pairwise binary Markov random field on a GRID x GRID
// 4-connected grid, worked in the log domain with signed fixed-point
// integers. A node object holds its log-product: its local evidence plus the
// sum of its incoming messages. A message object i->j holds its value and the
// residual last stored for it. The message update is the clamp form
//     m(i->j) = clamp(lp(i) - m(j->i), -J, +J),
// the max-product update of an attractive coupling of strength J written in
// log-likelihood-ratio form.
//
// RBP is split into seven tasks, each of which writes at most one object:
//   READ_REV   on message j->i : read m(j->i), pass it on
//   LOOKAHEAD  on node i       : la = clamp(lp(i) - m(j->i))
//   CALC_PRIO  on message i->j : residual = |la - m(i->j)|
//   WRITE_PRIO on message i->j : store residual (0 if <= EPS, i.e. converged);
//                                if above EPS, enqueue UPD_MSG at a later
//                                timestamp: the larger the residual, the sooner
//   UPD_MSG    on message i->j : go on only if the stored residual is still
//                                this one (no newer lookahead since)
//   UPD_MSGVAL on message i->j : write la, pass delta = la - old on
//   UPD_NODE   on node j       : lp(j) += delta; start READ_REV for each
//                                message j->k, k != i
// so the priority queue of RBP becomes the task ordering of the hardware.
//
// Operation: the PE takes one job (task, instance id, commit-queue slot),
// makes one read-modify-write access to the tile's object cache (the old word
// goes to the commit queue as the undo entry in the same cycle), builds up to
// three children, hands them one per cycle to the child manager, then reports
// done to the commit queue. squash abandons the job at once.
// Latency: 1 cycle to start, >= 1 cycle for the access, 1 cycle per child,
// 1 cycle for done.
//
// The task list, the object of each task and the children of each follow the
// document's task breakdown; the binary grid model, the clamp update, the
// fixed-point format, EPS, the residual-to-timestamp mapping and the
// timestamp stages are this design's choices (the document's processing
// element was generated from floating-point C++ that it does not list).
module rbp_pe #(
  parameter int GRID       = 7,
  parameter int NTILES     = 4,
  parameter int J          = 64,
  parameter int EPS        = 2,
  parameter int RES_CAP    = 255,
  parameter int PRIO_SHIFT = 4,
  localparam int NNODE     = GRID * GRID,
  localparam int LWORDS    = (5 * NNODE + NTILES - 1) / NTILES,
  localparam int AW        = (LWORDS > 1) ? $clog2(LWORDS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   squash,
  // job in
  input  logic                   in_valid,
  input  chronos_pkg::job_t      in_job,
  output logic                   in_ready,
  // cache access
  output logic                   mreq,
  output logic                   mwe,
  output logic [AW-1:0]          maddr,
  output chronos_pkg::objword_t  mwdata,
  input  logic                   mgnt,
  input  chronos_pkg::objword_t  mrdata,
  // undo log and completion to the commit queue
  output logic                   undo_valid,
  output logic [7:0]             undo_slot,
  output chronos_pkg::objword_t  undo_data,
  output logic                   done_valid,
  output logic [7:0]             done_slot,
  // children to the child manager
  output logic                   creq,
  output chronos_pkg::ts_t       cpts,
  output chronos_pkg::task_t     child,
  input  logic                   cpop,
  output logic                   busy,
  output logic                   ev_stale
);
  import chronos_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_CHILD, S_DONE} state_e;
  state_e st_q;
  job_t   job_q;
  task_t  kids_q [3];
  logic [1:0] nk_q, ki_q;

  // ---- grid helpers
  function automatic logic nbr_ok(int n, int d);
    int r, c;
    r = n / GRID; c = n % GRID;
    case (d)
      0: return r > 0;
      1: return c < GRID - 1;
      2: return r < GRID - 1;
      default: return c > 0;
    endcase
  endfunction

  function automatic int nbr(int n, int d);
    case (d)
      0: return n - GRID;
      1: return n + 1;
      2: return n + GRID;
      default: return n - 1;
    endcase
  endfunction

  function automatic val_t sat(logic signed [VAL_W+1:0] x);
    if (x > (2**(VAL_W-1)) - 1) return val_t'((2**(VAL_W-1)) - 1);
    if (x < -(2**(VAL_W-1)))    return val_t'(-(2**(VAL_W-1)));
    return val_t'(x);
  endfunction

  // ---- access
  task_t t;
  assign t = job_q.t;

  logic writes;
  assign writes = (t.ttype == T_WRITE_PRIO) || (t.ttype == T_UPD_MSGVAL) ||
                  (t.ttype == T_UPD_NODE);

  assign mreq  = (st_q == S_ACC) && !squash;
  assign mwe   = writes;
  assign maddr = AW'(t.obj / NTILES);

  // ---- task semantics: new word and children, from the word read
  objword_t   nw;
  task_t      nk [3];
  logic [1:0] nnk;
  logic       stale;

  always_comb begin
    int m, src, d, dst, excl, k;
    logic signed [VAL_W+1:0] x;
    val_t la, res, delta;
    ts_t  base, dly;
    x     = '0;
    la    = '0;
    res   = '0;
    delta = '0;
    dly   = '0;
    dst   = 0;
    excl  = 0;
    k     = 0;
    nw    = mrdata;
    nnk   = '0;
    stale = 1'b0;
    for (int i = 0; i < 3; i++) begin
      nk[i]      = t;
      nk[i].ptid = job_q.tid;
    end
    base = ts_base(t.ts);
    m    = int'(t.obj) - NNODE;           // message index when the object is a message
    src  = m >>> 2;
    d    = m & 3;
    case (t.ttype)
      T_READ_REV: begin
        // object: reverse message; arg0: forward message index
        nk[0].ts    = make_ts(base, T_LOOKAHEAD);
        nk[0].obj   = obj_t'(int'(t.arg0) >>> 2);
        nk[0].ttype = T_LOOKAHEAD;
        nk[0].arg1  = mrdata.value;
        nnk         = 2'd1;
      end
      T_LOOKAHEAD: begin
        x = $signed({{2{mrdata.value[VAL_W-1]}}, mrdata.value}) -
            $signed({{2{t.arg1[VAL_W-1]}}, t.arg1});
        if (x > $signed(18'(J)))       la = val_t'(J);
        else if (x < -$signed(18'(J))) la = val_t'(-J);
        else             la = val_t'(x);
        nk[0].ts    = make_ts(base, T_CALC_PRIO);
        nk[0].obj   = obj_t'(NNODE + int'(t.arg0));
        nk[0].ttype = T_CALC_PRIO;
        nk[0].arg0  = la;
        nk[0].arg1  = '0;
        nnk         = 2'd1;
      end
      T_CALC_PRIO: begin
        x = $signed({{2{t.arg0[VAL_W-1]}}, t.arg0}) -
            $signed({{2{mrdata.value[VAL_W-1]}}, mrdata.value});
        if (x < 0) x = -x;
        res = sat(x);
        nk[0].ts    = make_ts(base, T_WRITE_PRIO);
        nk[0].ttype = T_WRITE_PRIO;
        nk[0].arg1  = res;
        nnk         = 2'd1;
      end
      T_WRITE_PRIO: begin
        res = t.arg1;
        if (res > val_t'(EPS)) begin
          nw.prio = res;
          dly = ts_t'(1 + ((RES_CAP - ((int'(res) > RES_CAP) ? RES_CAP : int'(res))) >> PRIO_SHIFT));
          nk[0].ts    = make_ts(base + dly, T_UPD_MSG);
          nk[0].ttype = T_UPD_MSG;
          nnk         = 2'd1;
        end else begin
          nw.prio = '0;
        end
      end
      T_UPD_MSG: begin
        if (mrdata.prio == t.arg1) begin
          nk[0].ts    = make_ts(base, T_UPD_MSGVAL);
          nk[0].ttype = T_UPD_MSGVAL;
          nnk         = 2'd1;
        end else begin
          stale = 1'b1;
        end
      end
      T_UPD_MSGVAL: begin
        nw.value = t.arg0;
        x = $signed({{2{t.arg0[VAL_W-1]}}, t.arg0}) -
            $signed({{2{mrdata.value[VAL_W-1]}}, mrdata.value});
        delta = sat(x);
        if (delta != 0) begin
          dst = nbr(src, d);
          nk[0].ts    = make_ts(base, T_UPD_NODE);
          nk[0].obj   = obj_t'(dst);
          nk[0].ttype = T_UPD_NODE;
          nk[0].arg0  = delta;
          nk[0].arg1  = val_t'(d ^ 2);     // direction from dst back to src
          nnk         = 2'd1;
        end
      end
      default: begin  // T_UPD_NODE, object: node
        x = $signed({{2{mrdata.value[VAL_W-1]}}, mrdata.value}) +
            $signed({{2{t.arg0[VAL_W-1]}}, t.arg0});
        nw.value = sat(x);
        excl = int'(t.arg1);
        k = 0;
        for (int dd = 0; dd < 4; dd++) begin
          if (dd != excl && nbr_ok(int'(t.obj), dd) && k < 3) begin
            // forward message obj->nbr; its READ_REV runs on the reverse
            nk[k].ts    = make_ts(base + 1, T_READ_REV);
            nk[k].obj   = obj_t'(NNODE + 4 * nbr(int'(t.obj), dd) + (dd ^ 2));
            nk[k].ttype = T_READ_REV;
            nk[k].arg0  = val_t'(4 * int'(t.obj) + dd);
            nk[k].arg1  = '0;
            k++;
          end
        end
        nnk = 2'(k);
      end
    endcase
  end

  assign mwdata     = nw;
  assign undo_valid = (st_q == S_ACC) && mgnt && writes && !squash;
  assign undo_slot  = job_q.slot;
  assign undo_data  = mrdata;
  assign done_valid = (st_q == S_DONE) && !squash;
  assign done_slot  = job_q.slot;
  assign in_ready   = (st_q == S_IDLE);
  assign busy       = (st_q != S_IDLE);
  assign creq       = (st_q == S_CHILD);
  assign cpts       = t.ts;
  assign child      = kids_q[ki_q];
  assign ev_stale   = (st_q == S_ACC) && mgnt && !squash && stale;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      nk_q <= '0;
      ki_q <= '0;
    end else if (squash) begin
      st_q <= S_IDLE;
    end else begin
      case (st_q)
        S_IDLE: if (in_valid) st_q <= S_ACC;
        S_ACC: if (mgnt) begin
          nk_q <= nnk;
          ki_q <= '0;
          st_q <= (nnk != 0) ? S_CHILD : S_DONE;
        end
        S_CHILD: if (cpop) begin
          if (ki_q + 2'd1 == nk_q) st_q <= S_DONE;
          ki_q <= ki_q + 2'd1;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st_q == S_IDLE && in_valid && !squash) job_q <= in_job;
    if (st_q == S_ACC && mgnt) kids_q <= nk;
  end
endmodule
