// Testbench for fp_checker: master fingerprints (some from a stale epoch)
// arrive at random; the local fingerprint arrives at random, usually equal to
// the oldest queued master value. A reference model keeps the queue, the
// parked local value and the expected sequence number, and checks match,
// mismatch, waiting and the ACK/NACK message sent one cycle later.
module tb_fp_checker;
  import lacross_pkg::*;
  localparam int unsigned QDEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nm = 0, nmm = 0;

  logic flush = 1'b0, epoch = 1'b0, mfp_valid = 1'b0, own_valid = 1'b0, veto = 1'b0;
  fp_msg_t mfp_msg = '0;
  logic [FP_W-1:0] own_fp = '0;
  logic match, mismatch, ack_valid, waiting;
  ack_msg_t ack_msg;
  logic [SEQ_W-1:0] seq;

  fp_msg_t q[$];
  logic p_vld = 1'b0;
  logic [FP_W-1:0] p_fp = '0;
  logic [SEQ_W-1:0] m_seq = '0, tx_seq = '0;
  logic e_ack = 1'b0;
  ack_msg_t e_msg = '0;

  fp_checker #(.QDEPTH(QDEPTH)) dut (
    .clk, .rst_n, .flush, .epoch, .mfp_valid, .mfp_msg, .own_valid, .own_fp, .veto,
    .match, .mismatch, .ack_valid, .ack_msg, .waiting, .seq
  );

  always @(negedge clk) begin
    logic stale;
    stale = ($urandom % 20) == 0;
    mfp_valid <= ($urandom % 3) == 0 && q.size() < QDEPTH;
    mfp_msg   <= '{epoch: stale ? !epoch : epoch, seq: tx_seq, fp: FP_W'($urandom)};
    own_valid <= ($urandom % 4) == 0;
    if (q.size() > 0 && ($urandom % 8) != 0) own_fp <= q[0].fp;
    else own_fp <= FP_W'($urandom);
    veto      <= ($urandom % 40) == 0;
    if (($urandom % 300) == 0) begin flush <= 1'b1; epoch <= !epoch; end
    else flush <= 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    logic cmp, eq;
    logic [FP_W-1:0] cf;
    cmp = q.size() > 0 && (own_valid || p_vld);
    cf  = p_vld ? p_fp : own_fp;
    eq  = cmp && q[0].fp == cf && q[0].seq == m_seq && !veto;
    checks++;
    if (match !== (cmp && eq) || mismatch !== (cmp && !eq) || waiting !== p_vld || seq !== m_seq
        || ack_valid !== e_ack || (e_ack && ack_msg !== e_msg)) begin
      failures++;
      $display("FAIL m=%0d/%0d mm=%0d/%0d w=%0d/%0d seq=%0d/%0d ack=%0d/%0d", match, cmp && eq,
               mismatch, cmp && !eq, waiting, p_vld, seq, m_seq, ack_valid, e_ack);
    end
    if (match) nm++;
    if (mismatch) nmm++;
    e_ack = cmp;
    e_msg = '{seq: m_seq, ok: eq};
    if (cmp) begin void'(q.pop_front()); if (eq) m_seq++; end
    if (flush) begin q.delete(); p_vld = 1'b0; end
    else begin
      if (cmp) p_vld = 1'b0;
      else if (own_valid && q.size() == 0) begin p_vld = 1'b1; p_fp = own_fp; end
      if (mfp_valid && mfp_msg.epoch == epoch) begin q.push_back(mfp_msg); tx_seq++; end
    end
    // the master restarts its numbering at the slave's after a flush
    if (flush) tx_seq = m_seq;
    else if (cmp && !eq) tx_seq = m_seq;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (6000) @(posedge clk);
    checks++;
    if (nm < 100 || nmm < 10) begin failures++; $display("FAIL matches %0d mismatches %0d", nm, nmm); end
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
