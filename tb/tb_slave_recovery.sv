// Testbench for slave_recovery: random error pulses (fingerprint mismatch or
// output mismatch), random log-busy periods and restart messages with random
// resume times. A reference sequencer checks each output every cycle: entry
// pulse and epoch flip, NACK request only for an output mismatch, one cycle
// of restore/replay, NREGS checkpoint words in index order, the wait for the
// restart, and the core resuming exactly when ts reaches the resume time.
module tb_slave_recovery;
  import lacross_pkg::*;
  localparam int unsigned NREGS = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nrec = 0, nres = 0;

  logic fp_mismatch = 1'b0, out_err = 1'b0, log_busy = 1'b0, restart_valid = 1'b0;
  logic [TS_W-1:0] ts = '0;
  restart_msg_t restart_msg = '0;
  logic core_run, busy, epoch, nack_req, enter, rrf_restore, log_replay, ck_valid;
  logic [$clog2(NREGS)-1:0] ck_idx;

  int st = 0, idx = 0;     // 0 run, 1 restore, 2 send, 3 idle, 4 wait
  logic m_epoch = 1'b0;
  logic [TS_W-1:0] rts = '0;

  slave_recovery #(.NREGS(NREGS)) dut (
    .clk, .rst_n, .fp_mismatch, .out_err, .ts, .log_busy, .restart_valid, .restart_msg,
    .core_run, .busy, .epoch, .nack_req, .enter, .rrf_restore, .log_replay, .ck_valid, .ck_idx
  );

  always @(negedge clk) begin
    ts            <= ts + TS_W'($urandom % 2);
    fp_mismatch   <= ($urandom % 40) == 0;
    out_err       <= ($urandom % 60) == 0;
    log_busy      <= ($urandom % 3) == 0;
    restart_valid <= st == 3 && ($urandom % 6) == 0;
    restart_msg   <= '{ts: ts + TS_W'($urandom % 8)};
  end

  always @(posedge clk) if (rst_n) begin
    logic err, e_run;
    err   = fp_mismatch || out_err;
    e_run = st == 0 || (st == 4 && ts >= rts);
    checks++;
    if (core_run !== e_run || busy !== (st != 0) || epoch !== m_epoch || enter !== (st == 0 && err)
        || nack_req !== (st == 0 && out_err && !fp_mismatch) || rrf_restore !== (st == 1)
        || log_replay !== (st == 1) || ck_valid !== (st == 2) || (st == 2 && int'(ck_idx) != idx)) begin
      failures++;
      $display("FAIL state %0d: run=%0d busy=%0d enter=%0d nack=%0d restore=%0d ck=%0d/%0d", st, core_run,
               busy, enter, nack_req, rrf_restore, ck_valid, ck_idx);
    end
    case (st)
      0: if (err) begin st = 1; m_epoch = !m_epoch; nrec++; end
      1: begin st = 2; idx = 0; end
      2: begin if (idx == NREGS - 1) st = 3; idx++; end
      3: if (restart_valid && !log_busy) begin rts = restart_msg.ts; st = 4; end
      default: if (ts >= rts) begin st = 0; nres++; end
    endcase
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (8000) @(posedge clk);
    checks++;
    if (nrec < 50 || nres < 50) begin failures++; $display("FAIL recoveries %0d resumes %0d", nrec, nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
