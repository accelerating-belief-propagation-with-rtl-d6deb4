// tb_chronos_rbp_top: end-to-end test of the accelerator.
//
// Three complete RBP runs side by side: a 5x5 grid on 4 tiles of 4 PEs with
// a short task queue, a cramped 4x4 grid on 2 tiles (small commit queue,
// send buffer and request queue) that forces the deadlock-avoidance paths,
// and the default 7x7 configuration. Each run checks its converged messages
// and node sums (see tb_rbp_run). Every mechanism of the design must have
// happened in at least one run, else it counts as a failure: commits,
// dispatch, conflict aborts, use of the reserved commit-queue slot and
// task-queue entries, children discarded by a parent abort in the task queue
// and in the send buffer, untied send-buffer space, refused tied children,
// child-manager preemption and request eviction, stale prioritised updates
// and resource aborts of a running task.
// The cascaded abort of a child already in a commit queue is only reported:
// in these workloads the children of an aborted task are always still
// queued when the abort arrives, so that path is checked by the commit
// queue's own testbench instead.
// Timing: 10 ns clock; watchdog after 3,000,000 cycles.
module tb_chronos_rbp_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   fa, fb, fc;
  int     ca, cb, cc, xa, xb, xc;
  longint cya, cyb, cyc;
  longint na [14];
  longint nb [14];
  longint nc [14];

  tb_rbp_run #(.GRID(5), .TQ_DEPTH(32), .SEED(1)) u_a (
    .clk, .finished(fa), .checks(ca), .failures(xa), .cycles(cya), .cnt(na));
  tb_rbp_run #(.NTILES(2), .GRID(4), .TQ_DEPTH(32), .NCQ(4), .TSB_DEPTH(6),
               .UNTIED(3), .RQ_DEPTH(1), .SEED(1)) u_b (
    .clk, .finished(fb), .checks(cb), .failures(xb), .cycles(cyb), .cnt(nb));
  tb_rbp_run #(.SEED(1)) u_c (
    .clk, .finished(fc), .checks(cc), .failures(xc), .cycles(cyc), .cnt(nc));

  int checks = 0, failures = 0;
  string names [14] = '{"commit", "dispatch", "abort_conflict", "abort_parent",
                        "cq_gvt_slot", "tq_rsv", "tq_drop", "tsb_untied",
                        "tsb_refused", "tsb_drop", "cm_preempt", "cm_evict",
                        "stale", "res_abort"};

  initial begin
    repeat (2) @(posedge clk);
    wait (fa && fb && fc);
    checks   = ca + cb + cc;
    failures = xa + xb + xc;
    $display("cascaded aborts in the commit queues: %0d", na[3] + nb[3] + nc[3]);
    for (int k = 0; k < 14; k++) begin
      if (k == 3) continue;
      checks++;
      if (na[k] + nb[k] + nc[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", names[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
