// tb_lag_run: one run of a LACROSS pair at a longer master-to-slave lag,
// used by tb_lag_sweep. The environment is the one of tb_lacross_pair:
// two behavioural cores, a link with 100 cycles of latency and jitter on
// coordination messages, the same history-based checks, and an error-free
// restart check after each recovery. Phases: normal running; a soft error in
// the slave's state; a soft error in the master's state; a corrupted slave
// output; coordination latency close to the lag present at that point, which
// stalls of a full master log can have made shorter than LAG (drift and
// slow-down); an
// input burst (credit stall); loss of the master's fingerprints (both halves
// go solo after TIMEOUT = 4 * LAG). Reports its counts through the ports and
// raises `done` at the end.
module tb_lag_run #(
  parameter int unsigned LAG_T = 1100
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import lacross_pkg::*;

  localparam int unsigned NREGS  = 32;
  localparam int unsigned REG_W  = 64;
  localparam int unsigned LINE_W = 512;
  localparam int LAT = 100;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  always #1 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin checks = 0; failures = 0; done = 1'b0; end

  // ---------------- DUT ports ----------------
  logic m_tick, s_tick;
  logic in_valid, in_ready; ext_in_t in_data;
  logic m_core_run, m_core_in_valid; ext_in_t m_core_in_data;
  logic m_ret_valid; logic [REG_W-1:0] m_ret_data; logic [$clog2(NREGS)-1:0] m_ret_widx, m_rd_idx;
  logic [REG_W-1:0] m_rd_data;
  logic m_st_valid; logic [BLK_W-1:0] m_st_blk; logic [LINE_W-1:0] m_st_old_line;
  logic m_undo_valid; logic [BLK_W-1:0] m_undo_blk; logic [LINE_W-1:0] m_undo_line;
  logic m_out_valid, m_out_ready; out_msg_t m_out_msg;
  logic m_net_valid, m_net_ready; out_msg_t m_net_msg;
  logic s_core_run, s_core_in_valid; ext_in_t s_core_in_data;
  logic s_ret_valid; logic [REG_W-1:0] s_ret_data; logic [$clog2(NREGS)-1:0] s_ret_widx, s_rd_idx;
  logic [REG_W-1:0] s_rd_data;
  logic s_st_valid; logic [BLK_W-1:0] s_st_blk; logic [LINE_W-1:0] s_st_old_line;
  logic s_undo_valid; logic [BLK_W-1:0] s_undo_blk; logic [LINE_W-1:0] s_undo_line;
  logic s_out_valid, s_out_ready; out_msg_t s_out_msg;
  logic s_net_valid, s_net_ready; out_msg_t s_net_msg;
  logic m2s_coord_valid, m2s_coord_ready; coord_msg_t m2s_coord_msg;
  logic m2s_fp_valid; fp_msg_t m2s_fp_msg;
  logic m2s_fwd_valid; fwd_msg_t m2s_fwd_msg;
  logic m2s_restart_valid; restart_msg_t m2s_restart_msg;
  logic m2s_rx_coord_valid = 1'b0, m2s_rx_coord_ready; coord_msg_t m2s_rx_coord_msg;
  logic m2s_rx_fp_valid = 1'b0; fp_msg_t m2s_rx_fp_msg;
  logic m2s_rx_fwd_valid = 1'b0; fwd_msg_t m2s_rx_fwd_msg;
  logic m2s_rx_restart_valid = 1'b0; restart_msg_t m2s_rx_restart_msg;
  logic s2m_ack_valid; ack_msg_t s2m_ack_msg;
  logic s2m_crd_valid; credit_msg_t s2m_crd_msg;
  logic s2m_ck_valid; logic [$clog2(NREGS)-1:0] s2m_ck_idx; logic [REG_W-1:0] s2m_ck_data;
  logic s2m_rx_ack_valid = 1'b0; ack_msg_t s2m_rx_ack_msg;
  logic s2m_rx_crd_valid = 1'b0; credit_msg_t s2m_rx_crd_msg;
  logic s2m_rx_ck_valid = 1'b0; logic [$clog2(NREGS)-1:0] s2m_rx_ck_idx; logic [REG_W-1:0] s2m_rx_ck_data;
  logic s_slow_req;
  logic [TS_W-1:0] m_ts, s_ts;
  logic m_solo, s_solo; logic [1:0] m_fault_cause, s_fault_cause;
  logic m_recovering, s_recovering, m_take, s_take, s_fp_match, s_fp_mismatch, s_fp_wait, s_late_err;
  logic m_vf_bypass, m_vf_ovf, m_vf_degraded, m_credit_stall, m_log_overflow;

  lacross_pair #(.LAG(LAG_T), .TIMEOUT(4 * LAG_T)) dut (.*);

  // ---------------- cores ----------------
  int wide_lo = -1, wide_hi = -1;  // timestamp window with stores to many blocks
  logic m_wide, s_wide;
  assign m_wide = int'(m_ts) >= wide_lo && int'(m_ts) < wide_hi;
  assign s_wide = int'(s_ts) >= wide_lo && int'(s_ts) < wide_hi;
  logic inj_m = 1'b0, inj_s = 1'b0, inj_o = 1'b0;
  logic err_m, err_s, err_o;
  assign err_m = inj_m && m_core_run;
  assign err_s = inj_s && s_core_run;
  assign err_o = inj_o && s_out_valid;
  assign m_ret_widx = '0; assign m_rd_idx = '0;
  assign s_ret_widx = '0; assign s_rd_idx = '0;

  tb_core_model #(.LINE_W(LINE_W)) u_mcore (
    .clk, .rst_n, .core_run(m_core_run), .in_valid(m_core_in_valid), .in_data(m_core_in_data),
    .rd_data(m_rd_data), .ret_valid(m_ret_valid), .ret_data(m_ret_data),
    .st_valid(m_st_valid), .st_blk(m_st_blk), .st_old_line(m_st_old_line),
    .undo_valid(m_undo_valid), .undo_blk(m_undo_blk), .undo_line(m_undo_line),
    .out_valid(m_out_valid), .out_msg(m_out_msg),
    .wide_stores(m_wide), .err_state(err_m), .err_out(1'b0)
  );
  tb_core_model #(.LINE_W(LINE_W)) u_score (
    .clk, .rst_n, .core_run(s_core_run), .in_valid(s_core_in_valid), .in_data(s_core_in_data),
    .rd_data(s_rd_data), .ret_valid(s_ret_valid), .ret_data(s_ret_data),
    .st_valid(s_st_valid), .st_blk(s_st_blk), .st_old_line(s_st_old_line),
    .undo_valid(s_undo_valid), .undo_blk(s_undo_blk), .undo_line(s_undo_line),
    .out_valid(s_out_valid), .out_msg(s_out_msg),
    .wide_stores(s_wide), .err_state(err_s), .err_out(err_o)
  );

  // slave clock generator: half rate while a slow-down is requested
  assign m_tick = 1'b1;
  assign s_tick = !(s_slow_req && cyc[0]);
  assign m_net_ready = 1'b1;
  assign s_net_ready = 1'b1;
  assign m2s_coord_ready = 1'b1;

  // ---------------- link model ----------------
  typedef struct { int due; coord_msg_t m; } c_ent_t;
  typedef struct { int due; fp_msg_t m; } f_ent_t;
  typedef struct { int due; fwd_msg_t m; } w_ent_t;
  typedef struct { int due; restart_msg_t m; } r_ent_t;
  typedef struct { int due; ack_msg_t m; } a_ent_t;
  typedef struct { int due; credit_msg_t m; } k_ent_t;
  typedef struct { int due; logic [$clog2(NREGS)-1:0] i; logic [REG_W-1:0] d; } p_ent_t;
  c_ent_t cq[$]; f_ent_t fq[$]; w_ent_t wq[$]; r_ent_t rq[$];
  a_ent_t aq[$]; k_ent_t kq[$]; p_ent_t pq[$];
  int coord_lat = LAT;
  int eff_lag = 0;
  logic drop_fp = 1'b0;

  always @(posedge clk) begin
    if (rst_n && m2s_coord_valid) cq.push_back('{cyc + coord_lat + int'($urandom % 40), m2s_coord_msg});
    if (rst_n && m2s_fp_valid && !drop_fp) fq.push_back('{cyc + LAT, m2s_fp_msg});
    if (rst_n && m2s_fwd_valid) wq.push_back('{cyc + LAT, m2s_fwd_msg});
    if (rst_n && m2s_restart_valid) rq.push_back('{cyc + LAT, m2s_restart_msg});
    if (rst_n && s2m_ack_valid) aq.push_back('{cyc + LAT, s2m_ack_msg});
    if (rst_n && s2m_crd_valid) kq.push_back('{cyc + LAT, s2m_crd_msg});
    if (rst_n && s2m_ck_valid) pq.push_back('{cyc + LAT, s2m_ck_idx, s2m_ck_data});

    if (!m2s_rx_coord_valid || m2s_rx_coord_ready) begin
      m2s_rx_coord_valid <= 1'b0;
      foreach (cq[i]) if (cq[i].due <= cyc) begin
        m2s_rx_coord_valid <= 1'b1;
        m2s_rx_coord_msg   <= cq[i].m;
        cq.delete(i);
        break;
      end
    end
    m2s_rx_fp_valid <= 1'b0;
    if (fq.size() > 0 && fq[0].due <= cyc) begin m2s_rx_fp_valid <= 1'b1; m2s_rx_fp_msg <= fq[0].m; void'(fq.pop_front()); end
    m2s_rx_fwd_valid <= 1'b0;
    if (wq.size() > 0 && wq[0].due <= cyc) begin m2s_rx_fwd_valid <= 1'b1; m2s_rx_fwd_msg <= wq[0].m; void'(wq.pop_front()); end
    m2s_rx_restart_valid <= 1'b0;
    if (rq.size() > 0 && rq[0].due <= cyc) begin m2s_rx_restart_valid <= 1'b1; m2s_rx_restart_msg <= rq[0].m; void'(rq.pop_front()); end
    s2m_rx_ack_valid <= 1'b0;
    if (aq.size() > 0 && aq[0].due <= cyc) begin s2m_rx_ack_valid <= 1'b1; s2m_rx_ack_msg <= aq[0].m; void'(aq.pop_front()); end
    s2m_rx_crd_valid <= 1'b0;
    if (kq.size() > 0 && kq[0].due <= cyc) begin s2m_rx_crd_valid <= 1'b1; s2m_rx_crd_msg <= kq[0].m; void'(kq.pop_front()); end
    s2m_rx_ck_valid <= 1'b0;
    if (pq.size() > 0 && pq[0].due <= cyc) begin
      s2m_rx_ck_valid <= 1'b1; s2m_rx_ck_idx <= pq[0].i; s2m_rx_ck_data <= pq[0].d; void'(pq.pop_front());
    end
  end

  // ---------------- external inputs ----------------
  int in_rate = 40;   // one input per in_rate cycles on average
  always @(posedge clk) begin
    if (!rst_n) in_valid <= 1'b0;
    else if (!in_valid || in_ready) begin
      in_valid <= ($urandom % in_rate) == 0;
      in_data  <= '{payload: {$urandom, $urandom}};
    end
  end

  // ---------------- reference history and checks ----------------
  logic [63:0]       m_in_hist  [int];
  logic [63:0]       m_ret_hist [int];
  logic [LINE_W-1:0] m_st_hist  [int];
  int                rel_expect [logic [$bits(out_msg_t)-1:0]];
  int  skip_from = -1;       // slave compares from this timestamp on are skipped
  logic checking = 1'b1;
  int  max_arr_ts = -1;

  // mechanism counters
  int n_dlv = 0, n_ooo = 0, n_match = 0, n_mismatch = 0, n_s_rec = 0, n_m_rec = 0;
  int n_out_err = 0, n_bypass = 0, n_vf_hit = 0, n_ovf = 0, n_credit = 0, n_slow = 0;
  int n_undo = 0, n_restart = 0, n_s_rel = 0, n_m_rel = 0, n_wait = 0;
  logic s_rec_q = 1'b0, m_rec_q = 1'b0;
  int last_match_ts = -1, ckpt_ts = -1;

  always @(posedge clk) if (rst_n && enable) begin
    s_rec_q <= s_recovering;
    m_rec_q <= m_recovering;
    if (s_recovering && !s_rec_q) n_s_rec++;
    if (m_recovering && !m_rec_q) n_m_rec++;
    if (!s_recovering && s_rec_q) skip_from = -1;
    // the state both halves restart from must be the master's committed state
    // at the slave's last matching comparison
    if (s_fp_match) last_match_ts = int'(s_ts);
    if (s_recovering && !s_rec_q) ckpt_ts = last_match_ts;
    // slave: first cycle its core runs again; master: first cycle after recovery
    if ((s_recovering && s_core_run) || (!m_recovering && m_rec_q)) begin
      checks++;
      if (!m_ret_hist.exists(ckpt_ts)
          || (s_recovering && s_core_run && s_rd_data != m_ret_hist[ckpt_ts])
          || (!m_recovering && m_rec_q && m_rd_data != m_ret_hist[ckpt_ts])) begin
        failures++; $display("FAIL state after recovery differs from the checkpoint at ts %0d", ckpt_ts);
      end
    end
    if (s_fp_match) n_match++;
    if (s_fp_mismatch) n_mismatch++;
    if (dut.u_slave.out_err) n_out_err++;
    if (m_vf_bypass) n_bypass++;
    if (m2s_fwd_valid && m2s_fwd_msg.slave_release && m2s_fwd_msg.out.cls == OUT_DIRTY_REPLY) n_vf_hit++;
    if (m_vf_ovf) n_ovf++;
    if (m_credit_stall) n_credit++;
    if (s_slow_req) n_slow++;
    if (s_fp_wait) n_wait++;
    if (m_undo_valid || s_undo_valid) n_undo++;
    if (m2s_restart_valid) n_restart++;
    if (m2s_rx_coord_valid && m2s_rx_coord_ready) begin
      if (int'(m2s_rx_coord_msg.ts) < max_arr_ts) n_ooo++;
      else max_arr_ts <= int'(m2s_rx_coord_msg.ts);
    end
    if (s_late_err) begin failures++; $display("FAIL late coordination message at slave ts %0d", s_ts); end
    if (m_log_overflow) begin failures++; $display("FAIL master log overflow at %0d", cyc); end
    if (!m_solo && m_out_valid && m_core_run && !m_out_ready) begin failures++; $display("FAIL master output stalled"); end
    if (!s_solo && s_out_valid && s_core_run && !s_out_ready) begin failures++; $display("FAIL slave output stalled"); end

    if (err_m) skip_from = int'(m_ts);
    if (err_s) skip_from = int'(s_ts);
    // master history
    if (m_core_in_valid) m_in_hist[int'(m_ts)] = m_core_in_data.payload;
    if (m_core_run && m_ret_valid) m_ret_hist[int'(m_ts)] = m_ret_data;
    if (m_core_run && m_st_valid) m_st_hist[int'(m_ts)] = m_st_old_line;
    if (m2s_fwd_valid && m2s_fwd_msg.slave_release) rel_expect[m2s_fwd_msg.out] += 1;
    if (m_net_valid && m_net_ready && !m_solo) begin
      n_m_rel++;
      checks++;
      if (!(m_net_msg.cls inside {OUT_READ_SHARED, OUT_DIRTY_REPLY})) begin
        failures++; $display("FAIL master released %0d directly", m_net_msg.cls);
      end
    end
    // slave against master
    if (checking) begin
      if (s_core_in_valid) begin
        n_dlv++;
        checks++;
        if (!m_in_hist.exists(int'(s_ts)) || m_in_hist[int'(s_ts)] != s_core_in_data.payload) begin
          failures++; $display("FAIL input delivered at slave ts %0d differs", s_ts);
        end
      end
      if (s_core_run && s_ret_valid && !(skip_from >= 0 && int'(s_ts) >= skip_from)) begin
        checks++;
        if (!m_ret_hist.exists(int'(s_ts)) || m_ret_hist[int'(s_ts)] != s_ret_data) begin
          failures++; $display("FAIL slave retirement at ts %0d differs", s_ts);
        end
      end
      if (s_core_run && s_st_valid && !(skip_from >= 0 && int'(s_ts) >= skip_from)) begin
        checks++;
        if (!m_st_hist.exists(int'(s_ts)) || m_st_hist[int'(s_ts)] != s_st_old_line) begin
          failures++; $display("FAIL slave cache line before store at ts %0d differs", s_ts);
        end
      end
      if (s_net_valid && s_net_ready) begin
        n_s_rel++;
        checks++;
        if (!rel_expect.exists(s_net_msg) || rel_expect[s_net_msg] == 0) begin
          failures++; $display("FAIL slave released an output the master did not leave to it");
        end else rel_expect[s_net_msg] -= 1;
      end
    end
  end

  // error injection: consumed in the first cycle the target core runs
  always @(posedge clk) begin
    if (err_m) inj_m <= 1'b0;
    if (err_s) inj_s <= 1'b0;
    if (err_o) inj_o <= 1'b0;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic expect_min(input string what, input int n);
    checks++;
    if (n < 1) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    wait_cycles(4);
    rst_n = 1'b1;
    wait_cycles(2);
    enable = 1'b1;
    wait_cycles(3000 + LAG_T);
    @(negedge clk) inj_s = 1'b1;                 // soft error in slave state
    wait_cycles(2500 + LAG_T);
    @(negedge clk) inj_m = 1'b1;                 // soft error in master state
    wait_cycles(2500 + LAG_T);
    @(negedge clk) inj_o = 1'b1;                 // corrupted slave output
    wait_cycles(2500 + LAG_T);
    // drift towards the lag present now: stalls of a full master log can have
    // shortened it below LAG_T
    eff_lag = int'(m_ts) - int'(s_ts);
    $display("effective lag at lag %0d: %0d", LAG_T, eff_lag);
    coord_lat = (eff_lag - 50 > LAT) ? eff_lag - 50 : LAT;
    wait_cycles(1500);
    coord_lat = LAT;
    wait_cycles(1000 + LAG_T);
    in_rate = 1;                                 // input burst
    wait_cycles(600);
    in_rate = 40;
    wait_cycles(1500 + LAG_T);
    checking = 1'b0;
    drop_fp  = 1'b1;                             // master fingerprints stop arriving
    wait_cycles(10 * LAG_T);
    checks++;
    if (!(s_solo && s_fault_cause == 2'd2)) begin failures++; $display("FAIL slave did not detect the lost master"); end
    checks++;
    if (!(m_solo && m_fault_cause == 2'd2)) begin failures++; $display("FAIL master did not detect missing acknowledgements"); end
    $display("mechanisms at lag %0d:", LAG_T);
    expect_min("inputs delivered at slave", n_dlv);
    expect_min("out-of-order coordination", n_ooo);
    expect_min("fingerprint matches", n_match);
    expect_min("fingerprint mismatches", n_mismatch);
    expect_min("output mismatches", n_out_err);
    expect_min("slave recoveries", n_s_rec);
    expect_min("master recoveries", n_m_rec);
    expect_min("log undo entries", n_undo);
    expect_min("restarts", n_restart);
    expect_min("credit stalls (cycles)", n_credit);
    expect_min("slow-down requests (cycles)", n_slow);
    expect_min("slave waits for fingerprint", n_wait);
    expect_min("outputs released by slave", n_s_rel);
    expect_min("outputs released by master", n_m_rel);
    checks++;
    if (n_s_rec < 3) begin failures++; $display("FAIL expected three recoveries, saw %0d", n_s_rec); end
    done = 1'b1;
  end

  initial begin
    repeat (30000 + 20 * LAG_T) @(posedge clk);
    failures++;
    $display("FAIL watchdog at lag %0d", LAG_T);
    done = 1'b1;
  end
endmodule
