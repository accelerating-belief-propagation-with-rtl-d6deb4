// chronos_rbp_top: residual belief propagation on a task-speculative
// multi-tile accelerator.
//
// NTILES tiles, each with NPE RBP processing elements, hang off a task
// interconnect; a GVT arbiter takes the minimum of the tiles' local virtual
// times and returns it to all tiles. Objects (graph nodes and directed
// messages of a GRID x GRID grid) are spread over the tiles by
// obj mod NTILES and live in the owning tile's object cache.
//
// Use: with run low, the host loads every object through the host port
// (node word: value = local evidence; message word: 0) and pushes the
// initial tasks (one READ_REV per message, timestamp 0, parent id 0) through
// the host task port. Raising run starts dispatch and commit. Tasks run
// speculatively out of timestamp order; finished tasks commit when they are
// the oldest; tasks that ran too early are rolled back and rerun. The run is
// over when idle is high: no task is left anywhere. The host then reads the
// results through the host port (a node word's value is its log-belief
// ratio: evidence plus the sum of incoming messages).
//
// ev carries one tile_ev_t per tile and cycle (commits, aborts, use of the
// reserved slots, preemption, request eviction, ...), for statistics.
//
// The tile/interconnect/GVT organisation follows the document; the default
// sizes of 4 tiles of 4 PEs follow its figures, the 7x7 grid its largest
// run; queue depths and the host port are this design's choices. The
// memory-side interconnect and external memory banks of the document are not
// part of this design: each tile's cache holds all of its objects.
module chronos_rbp_top #(
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
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  // host task injection
  input  logic                  host_valid,
  input  chronos_pkg::task_t    host_task,
  output logic                  host_ready,
  // host object access (only while no task is running)
  input  logic                  host_we,
  input  chronos_pkg::obj_t     host_obj,
  input  chronos_pkg::objword_t host_wdata,
  output chronos_pkg::objword_t host_rdata,
  // status
  output chronos_pkg::ts_t      gvt,
  output logic                  idle,
  output chronos_pkg::tile_ev_t ev [NTILES]
);
  import chronos_pkg::*;

  logic [NTILES-1:0] enq_valid, enq_ready, snd_valid, snd_ready;
  task_t             enq_task [NTILES];
  task_t             snd_task [NTILES];
  logic [NTILES-1:0] abt_valid, ab_valid;
  tid_t              abt_tid [NTILES];
  tid_t              ab_tid  [NTILES];
  logic [NTILES-1:0] lvt_valid, can_tied, can_untied;
  ts_t               lvt [NTILES];
  objword_t          t_rdata [NTILES];
  logic              gvt_busy;

  for (genvar i = 0; i < NTILES; i++) begin : g_tile
    chronos_tile #(
      .TILE_ID(i), .NTILES(NTILES), .NPE(NPE), .GRID(GRID),
      .TQ_DEPTH(TQ_DEPTH), .TQ_RSV(TQ_RSV), .NCQ(NCQ), .TSB_DEPTH(TSB_DEPTH), .UNTIED(UNTIED),
      .RQ_DEPTH(RQ_DEPTH), .PREEMPT(PREEMPT), .J(J), .EPS(EPS),
      .RES_CAP(RES_CAP), .PRIO_SHIFT(PRIO_SHIFT)
    ) u_tile (
      .clk, .rst_n, .run, .gvt,
      .enq_valid(enq_valid[i]), .enq_task(enq_task[i]), .enq_ready(enq_ready[i]),
      .can_tied(can_tied[i]), .can_untied(can_untied[i]),
      .dst_can_tied(can_tied), .dst_can_untied(can_untied),
      .snd_valid(snd_valid[i]), .snd_task(snd_task[i]), .snd_ready(snd_ready[i]),
      .ab_valid, .ab_tid,
      .abo_valid(abt_valid[i]), .abo_tid(abt_tid[i]),
      .host_we(host_we && (int'(host_obj % NTILES) == i)),
      .host_addr(AW'(host_obj / NTILES)), .host_wdata, .host_rdata(t_rdata[i]),
      .lvt_valid(lvt_valid[i]), .lvt(lvt[i]), .ev(ev[i])
    );
  end

  task_interconnect #(.NTILES(NTILES)) u_net (
    .src_valid(snd_valid), .src_task(snd_task), .src_ready(snd_ready),
    .host_valid, .host_task, .host_ready,
    .dst_valid(enq_valid), .dst_task(enq_task), .dst_ready(enq_ready),
    .abi_valid(abt_valid), .abi_tid(abt_tid), .abo_valid(ab_valid), .abo_tid(ab_tid)
  );

  gvt_arbiter #(.NTILES(NTILES)) u_gvt (
    .clk, .rst_n, .lvt_valid, .lvt, .gvt, .busy(gvt_busy)
  );

  assign host_rdata = t_rdata[host_obj % NTILES];
  assign idle       = !(|lvt_valid) && !gvt_busy && !host_valid;
endmodule
