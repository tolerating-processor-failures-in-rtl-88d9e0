// Testbench for master_recovery: random ACK/NACK arrivals, log-busy periods
// and checkpoint words from the slave. A reference sequencer checks the core
// stop in the NACK cycle, the epoch flip, the one-cycle replay/filter clear,
// the register writes of the received checkpoint, and the restart message
// (timestamp + 1) sent once all NREGS words are in and the log is idle.
module tb_master_recovery;
  import lacross_pkg::*;
  localparam int unsigned NREGS = 5, REG_W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nrec = 0, nrst = 0;

  logic ack_valid = 1'b0, log_busy = 1'b0, ck_valid = 1'b0;
  ack_msg_t ack_msg = '0;
  logic [TS_W-1:0] ts = '0;
  logic [$clog2(NREGS)-1:0] ck_idx = '0;
  logic [REG_W-1:0] ck_data = '0;
  logic core_run, busy, epoch, enter, log_replay, vf_clear, rrf_we, restart_valid;
  logic [$clog2(NREGS)-1:0] rrf_widx;
  logic [REG_W-1:0] rrf_wdata;
  restart_msg_t restart_msg;

  int st = 0, nrcv = 0, sent = 0;   // 0 run, 1 undo, 2 load
  logic m_epoch = 1'b0;

  master_recovery #(.NREGS(NREGS), .REG_W(REG_W)) dut (
    .clk, .rst_n, .ack_valid, .ack_msg, .ts, .log_busy, .ck_valid, .ck_idx, .ck_data,
    .core_run, .busy, .epoch, .enter, .log_replay, .vf_clear, .rrf_we, .rrf_widx, .rrf_wdata,
    .restart_valid, .restart_msg
  );

  always @(negedge clk) begin
    ts        <= ts + 1'b1;
    ack_valid <= ($urandom % 5) == 0;
    ack_msg   <= '{seq: SEQ_W'($urandom), ok: ($urandom % 10) != 0};
    log_busy  <= st == 1 && ($urandom % 4) != 0;
    // the slave streams its checkpoint once per recovery, with gaps
    ck_valid  <= st != 0 && sent < NREGS && ($urandom % 2) == 0;
    ck_idx    <= ($clog2(NREGS))'(sent);
    ck_data   <= REG_W'($urandom);
  end

  always @(posedge clk) if (rst_n) begin
    logic nack, done;
    nack = ack_valid && !ack_msg.ok;
    done = st == 2 && nrcv == NREGS;
    checks++;
    if (core_run !== (st == 0 && !nack) || busy !== (st != 0) || epoch !== m_epoch
        || enter !== (st == 0 && nack) || log_replay !== enter || vf_clear !== enter
        || rrf_we !== (st != 0 && ck_valid) || (rrf_we && (rrf_widx !== ck_idx || rrf_wdata !== ck_data))
        || restart_valid !== done || (done && restart_msg.ts !== ts + 1'b1)) begin
      failures++;
      $display("FAIL state %0d: run=%0d enter=%0d we=%0d restart=%0d nrcv=%0d", st, core_run, enter, rrf_we, restart_valid, nrcv);
    end
    if (st != 0 && ck_valid) begin nrcv++; sent++; end
    case (st)
      0: if (nack) begin st = 1; m_epoch = !m_epoch; nrcv = 0; sent = 0; nrec++; end
      1: if (!log_busy) st = 2;
      default: if (done) begin st = 0; nrst++; end
    endcase
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (8000) @(posedge clk);
    checks++;
    if (nrec < 50 || nrst < 50) begin failures++; $display("FAIL recoveries %0d restarts %0d", nrec, nrst); end
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
