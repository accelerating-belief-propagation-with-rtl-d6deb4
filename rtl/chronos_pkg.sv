// chronos_pkg: types and constants shared by the task-speculative RBP
// accelerator.
//
// A task is the unit of work. Each task names one object (a graph node or a
// directed message) that it alone may write, carries a timestamp that orders it
// against every other task, a type from the residual-BP task chain, two data
// words passed from its parent, and the id of the parent task instance so that
// an abort of the parent can find it.
//
// Timestamp format (this design's choice): the low TS_STAGE_W bits hold the
// position of the task type inside the chain (stage 0..6), the upper bits a
// "base" time. Children of a chain step keep the base and advance the stage;
// a new chain starts at a larger base. This gives every pair of tasks that
// read and write the same values a strict order, so equal timestamps never
// decide a data race.
//
// Object numbering for a GRID x GRID pairwise graph: nodes are objects
// 0..N-1 (row-major); the message from node n in direction d
// (0 north, 1 east, 2 south, 3 west) is object N + 4*n + d.
package chronos_pkg;

  localparam int TS_W       = 32;   // timestamp width
  localparam int TS_STAGE_W = 3;    // low timestamp bits that hold the chain stage
  localparam int OBJ_W      = 16;   // global object id width
  localparam int VAL_W      = 16;   // signed fixed-point value width
  localparam int TID_W      = 20;   // task instance id width ({tile, counter})
  localparam int TID_CNT_W  = 16;   // counter part of a task instance id

  typedef logic [TS_W-1:0]  ts_t;
  typedef logic [OBJ_W-1:0] obj_t;
  typedef logic signed [VAL_W-1:0] val_t;
  typedef logic [TID_W-1:0] tid_t;

  // Residual-BP task chain, in stage order.
  typedef enum logic [2:0] {
    T_READ_REV   = 3'd0,  // read the reverse message
    T_LOOKAHEAD  = 3'd1,  // compute the candidate message from the source node
    T_CALC_PRIO  = 3'd2,  // residual = |candidate - current|
    T_WRITE_PRIO = 3'd3,  // store residual, enqueue the prioritised update
    T_UPD_MSG    = 3'd4,  // drop if a newer residual was stored since
    T_UPD_MSGVAL = 3'd5,  // write the new message value
    T_UPD_NODE   = 3'd6   // add the change to the destination node's log-product
  } ttype_e;

  typedef struct packed {
    ts_t    ts;
    obj_t   obj;
    ttype_e ttype;
    val_t   arg0;
    val_t   arg1;
    tid_t   ptid;   // parent instance id, 0 for tasks from the host
    logic   untied; // parent was the GVT task (or the host): cannot be aborted
  } task_t;

  // A task handed to a PE: the task, its instance id and its commit-queue slot.
  typedef struct packed {
    task_t      t;
    tid_t       tid;
    logic [7:0] slot;
  } job_t;

  // A cached object word: priority (stored residual) and value.
  typedef struct packed {
    val_t prio;
    val_t value;
  } objword_t;

  // Per-cycle event strobes of one tile, gathered for statistics.
  typedef struct packed {
    logic [3:0] commits;         // tasks committed this cycle
    logic       dispatch;        // task handed to a PE
    logic       abort_conflict;  // task aborted for running ahead; requeued
    logic       abort_parent;    // task aborted because its parent was
    logic       cq_gvt_slot;     // GVT task took the reserved commit-queue slot
    logic       tq_rsv;          // GVT task took the reserved task-queue entry
    logic       tq_drop;         // queued task discarded by a parent abort
    logic       tsb_untied;      // untied child took reserved send-buffer space
    logic       tsb_refused;     // tied child refused: tied space full
    logic       tsb_drop;        // buffered child discarded by a parent abort
    logic       cm_preempt;      // child manager switched to an untied PE
    logic       cm_evict;        // request evicted for a GVT request
    logic       stale;           // prioritised update found a newer residual
    logic       res_abort;       // running task aborted to free a PE for the GVT task
  } tile_ev_t;

  localparam ts_t TS_MAX = '1;

  function automatic logic [TS_STAGE_W-1:0] ts_stage(ts_t t);
    return t[TS_STAGE_W-1:0];
  endfunction

  function automatic ts_t ts_base(ts_t t);
    return t >> TS_STAGE_W;
  endfunction

  function automatic ts_t make_ts(ts_t base, ttype_e s);
    return (base << TS_STAGE_W) | ts_t'(s);
  endfunction

endpackage
