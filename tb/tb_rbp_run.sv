// tb_rbp_run: one complete RBP run on chronos_rbp_top, used by the
// end-to-end and full-size testbenches.
//
// It draws random local evidence for every node, loads the graph through the
// host port, enqueues one READ_REV task per directed message, raises run and
// waits for idle. It then reads every object back and checks the result
// against properties computed here, independently of the design:
//   * every node's value equals its evidence plus the sum of its incoming
//     messages, exactly;
//   * every message is a fixed point of the update within EPS:
//     |clamp(lp(i) - m(j->i), -J, J) - m(i->j)| <= EPS;
//   * every message lies in [-J, J].
// It counts the design's events (commits, aborts, reserved-slot use, ...)
// and reports checks, failures and counts on its outputs when done.
// FULL=1 instantiates the top with its default parameters.
module tb_rbp_run #(
  parameter bit FULL      = 1'b0,
  parameter int NTILES    = 4,
  parameter int NPE       = 4,
  parameter int GRID      = 7,
  parameter int TQ_DEPTH  = 64,
  parameter int TQ_RSV    = 8,
  parameter int NCQ       = 8,
  parameter int TSB_DEPTH = 8,
  parameter int UNTIED    = 4,
  parameter int RQ_DEPTH  = 2,
  parameter int J         = 64,
  parameter int EPS       = 2,
  parameter int HMAX      = 100,
  parameter int SEED      = 1,
  parameter int MAXCYC    = 2000000
) (
  input  logic        clk,
  output logic        finished,
  output int          checks,
  output int          failures,
  output longint      cycles,
  output longint      cnt [14]   // see names below
);
  import chronos_pkg::*;

  localparam int N = GRID * GRID;

  logic     rst_n, run, host_valid, host_ready, host_we, idle;
  task_t    host_task;
  obj_t     host_obj;
  objword_t host_wdata, host_rdata;
  ts_t      gvt;
  tile_ev_t ev [NTILES];

  if (FULL) begin : g_full
    chronos_rbp_top u_dut (
      .clk, .rst_n, .run, .host_valid, .host_task, .host_ready,
      .host_we, .host_obj, .host_wdata, .host_rdata, .gvt, .idle, .ev
    );
  end else begin : g_red
    chronos_rbp_top #(
      .NTILES(NTILES), .NPE(NPE), .GRID(GRID), .TQ_DEPTH(TQ_DEPTH), .TQ_RSV(TQ_RSV), .NCQ(NCQ),
      .TSB_DEPTH(TSB_DEPTH), .UNTIED(UNTIED), .RQ_DEPTH(RQ_DEPTH), .J(J), .EPS(EPS)
    ) u_dut (
      .clk, .rst_n, .run, .host_valid, .host_task, .host_ready,
      .host_we, .host_obj, .host_wdata, .host_rdata, .gvt, .idle, .ev
    );
  end

  // event counters: 0 commits, 1 dispatch, 2 abort_conflict, 3 abort_parent,
  // 4 cq_gvt_slot, 5 tq_rsv, 6 tq_drop, 7 tsb_untied, 8 tsb_refused,
  // 9 tsb_drop, 10 cm_preempt, 11 cm_evict, 12 stale, 13 res_abort
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 14; k++) cnt[k] <= 0;
    end else begin
      begin
        longint a [14];
        for (int k = 0; k < 14; k++) a[k] = cnt[k];
        for (int t = 0; t < NTILES; t++) begin
          a[0]  += ev[t].commits;
          a[1]  += ev[t].dispatch;
          a[2]  += ev[t].abort_conflict;
          a[3]  += ev[t].abort_parent;
          a[4]  += ev[t].cq_gvt_slot;
          a[5]  += ev[t].tq_rsv;
          a[6]  += ev[t].tq_drop;
          a[7]  += ev[t].tsb_untied;
          a[8]  += ev[t].tsb_refused;
          a[9]  += ev[t].tsb_drop;
          a[10] += ev[t].cm_preempt;
          a[11] += ev[t].cm_evict;
          a[12] += ev[t].stale;
          a[13] += ev[t].res_abort;
        end
        for (int k = 0; k < 14; k++) cnt[k] <= a[k];
      end
    end
  end

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

  int h [N];
  int lp [N];
  int msg [4*N];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int ninit;
    logic [31:0] lcg;
    lcg = 32'(SEED) * 32'd2654435761 + 32'd12345;
    finished = 1'b0; checks = 0; failures = 0; cycles = 0;
    rst_n = 1'b0; run = 1'b0; host_valid = 1'b0; host_we = 1'b0;
    host_task = '0; host_obj = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // load the graph
    // evidence from a private linear congruential generator, so that a run
    // depends only on its SEED and not on other instances in the testbench
    for (int n = 0; n < N; n++) begin
      lcg  = lcg * 32'd1664525 + 32'd1013904223;
      h[n] = int'(lcg[31:16] % (2 * HMAX + 1)) - HMAX;
      @(negedge clk);
      host_we = 1'b1; host_obj = obj_t'(n);
      host_wdata = '{prio: '0, value: val_t'(h[n])};
    end
    for (int m = 0; m < 4 * N; m++) begin
      @(negedge clk);
      host_we = 1'b1; host_obj = obj_t'(N + m); host_wdata = '0;
    end
    @(negedge clk);
    host_we = 1'b0;
    // initial tasks: one READ_REV per message, on its reverse message
    ninit = 0;
    for (int n = 0; n < N; n++)
      for (int d = 0; d < 4; d++)
        if (nbr_ok(n, d)) begin
          host_task = '0;
          host_task.ts    = '0;
          host_task.untied = 1'b1;
          host_task.ttype = T_READ_REV;
          host_task.obj   = obj_t'(N + 4 * nbr(n, d) + (d ^ 2));
          host_task.arg0  = val_t'(4 * n + d);
          host_valid = 1'b1;
          @(posedge clk);
          while (!host_ready) @(posedge clk);
          #1;
          ninit++;
        end
    host_valid = 1'b0;
    @(negedge clk);
    run = 1'b1;
    repeat (4) @(posedge clk);
    while (!idle && cycles < MAXCYC) begin
      @(posedge clk);
      cycles++;
    end
    chk(idle, "run did not finish");
    // read back
    run = 1'b0;
    for (int o = 0; o < 5 * N; o++) begin
      @(negedge clk);
      host_obj = obj_t'(o);
      #1;
      if (o < N) lp[o] = int'(host_rdata.value);
      else       msg[o - N] = int'(host_rdata.value);
    end
    for (int n = 0; n < N; n++) begin
      int s;
      s = h[n];
      for (int d = 0; d < 4; d++)
        if (nbr_ok(n, d)) s += msg[4 * nbr(n, d) + (d ^ 2)];
      chk(lp[n] == s, $sformatf("node %0d sum %0d expected %0d", n, lp[n], s));
    end
    for (int n = 0; n < N; n++)
      for (int d = 0; d < 4; d++)
        if (nbr_ok(n, d)) begin
          int x, la, mv, r;
          mv = msg[4 * n + d];
          r  = msg[4 * nbr(n, d) + (d ^ 2)];
          x  = lp[n] - r;
          la = (x > J) ? J : (x < -J) ? -J : x;
          chk(mv >= -J && mv <= J, $sformatf("msg %0d out of range %0d", 4*n+d, mv));
          chk((la - mv) <= EPS && (mv - la) <= EPS,
              $sformatf("msg %0d = %0d, update gives %0d", 4*n+d, mv, la));
        end
    chk(cnt[0] >= ninit, "fewer commits than initial tasks");
    $display("run GRID=%0d tiles=%0d pes=%0d: %0d cycles, commits=%0d dispatch=%0d abort_conflict=%0d abort_parent=%0d cq_gvt_slot=%0d tq_rsv=%0d tq_drop=%0d tsb_untied=%0d tsb_refused=%0d tsb_drop=%0d cm_preempt=%0d cm_evict=%0d stale=%0d res_abort=%0d",
             GRID, NTILES, NPE, cycles, cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5],
             cnt[6], cnt[7], cnt[8], cnt[9], cnt[10], cnt[11], cnt[12], cnt[13]);
    finished = 1'b1;
  end
endmodule
