// tb_chronos_rbp_full: one complete RBP run on chronos_rbp_top with every
// parameter at its default (7x7 grid, 4 tiles of 4 PEs). The run's
// messages and node sums are checked as described in tb_rbp_run.
module tb_chronos_rbp_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   f;
  int     c, x;
  longint cy;
  longint n [14];

  tb_rbp_run #(.FULL(1'b1), .SEED(1)) u_run (
    .clk, .finished(f), .checks(c), .failures(x), .cycles(cy), .cnt(n));

  initial begin
    repeat (2) @(posedge clk);
    wait (f);
    $display("TB_RESULT checks=%0d failures=%0d", c, x);
    $finish;
  end

  initial begin
    repeat (2100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c + 1, x + 1);
    $finish;
  end
endmodule
