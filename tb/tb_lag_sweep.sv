// tb_lag_sweep: runs a LACROSS pair at the two longer master-to-slave lags
// studied besides the 550-cycle minimum, 1100 and 2200 cycles, side by side.
// Each run (tb_lag_run) checks lock-step input delivery, retirements and
// logged lines against the master's history, recovery from slave, master and
// output errors, drift handling, credit stalls and the fingerprint timeout,
// with the timeout scaled to four times the lag. The result line sums both.
module tb_lag_sweep;
  logic done_a, done_b;
  int   checks_a, checks_b, failures_a, failures_b;

  tb_lag_run #(.LAG_T(1100)) u_lag_1100 (.done(done_a), .checks(checks_a), .failures(failures_a));
  tb_lag_run #(.LAG_T(2200)) u_lag_2200 (.done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end
endmodule
