// lacross_slave_nc: node-controller extensions for the slave core of a
// LACROSS pair.
//
// The slave runs the same instruction stream as the master, M2S_DELAY cycles
// behind it, and is where results are checked. Its timestamp starts LAG ticks
// after the master's. Coordination messages wait in the gated delivery queue
// and reach the slave core when its timestamp equals their delivery time; the
// drift monitor asks for a slower slave clock (slow_req) when they arrive with
// too little slack (checked once the slave has started). At the end of each interval (decided exactly as on the
// master) the slave's fingerprint is compared in the same cycle with the
// master's: a match acknowledges it, takes the register checkpoint (flash copy)
// and empties the cache log, and releases the outputs the slave holds for the
// system; a mismatch, or an output that differs from the master's copy, NACKs
// and starts slave_recovery (restore, undo, send the checkpoint, wait for
// restart). If the master's fingerprint has not arrived yet the slave halts,
// timestamp included, until it does. credit_return reports free send-buffer
// space to the master. fault_monitor turns repeated mismatches or a master that
// stops sending fingerprints into solo operation.
// Timing: one delivery, retirement, store and output per cycle, counted only
// while core_run is high. `tick` is the slave's local clock enable.
// From the source design: the mechanisms and where they sit. Own choices: the
// message formats, the halt while a fingerprint is missing, and the sizes
// marked as assumed on the parameters.
// Lint note: status pins of submodules that this block does not need
// (queue occupancy, slack, registered fingerprint, log full/overflow/count)
// are left open on purpose.
module lacross_slave_nc
  import lacross_pkg::*;
#(
  parameter int unsigned LAG          = M2S_DELAY,
  parameter int unsigned NREGS        = 32,
  parameter int unsigned REG_W        = 64,
  parameter int unsigned LINE_W       = 512,
  parameter int unsigned INTERVAL     = 128,
  parameter int unsigned STORE_LIMIT  = 32,
  parameter int unsigned GDQ_DEPTH    = 32,
  parameter int unsigned DRIFT_MARGIN = 64,
  parameter int unsigned FP_QDEPTH    = 32,
  parameter int unsigned FWD_DEPTH    = 64,
  parameter int unsigned SEND_DEPTH   = 32,
  parameter int unsigned CREDIT_PERIOD = 32,
  parameter int unsigned FP_TIMEOUT   = 4 * M2S_DELAY,
  parameter int unsigned MISMATCH_LIMIT = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     tick,
  // slave core
  output logic                     core_run,
  output logic                     core_in_valid,
  output ext_in_t                  core_in_data,
  input  logic                     ret_valid,
  input  logic [REG_W-1:0]         ret_data,
  input  logic [$clog2(NREGS)-1:0] ret_widx,
  input  logic [$clog2(NREGS)-1:0] rd_idx,
  output logic [REG_W-1:0]         rd_data,
  input  logic                     st_valid,
  input  logic [BLK_W-1:0]         st_blk,
  input  logic [LINE_W-1:0]        st_old_line,
  output logic                     undo_valid,
  output logic [BLK_W-1:0]         undo_blk,
  output logic [LINE_W-1:0]        undo_line,
  input  logic                     out_valid,
  input  out_msg_t                 out_msg,
  output logic                     out_ready,
  // corroborated outputs released to the system
  output logic                     net_valid,
  output out_msg_t                 net_msg,
  input  logic                     net_ready,
  // master-to-slave link
  input  logic                     coord_valid,
  input  coord_msg_t               coord_msg,
  output logic                     coord_ready,
  input  logic                     fp_valid,
  input  fp_msg_t                  fp_msg,
  input  logic                     fwd_valid,
  input  fwd_msg_t                 fwd_msg,
  input  logic                     restart_valid,
  input  restart_msg_t             restart_msg,
  // slave-to-master link
  output logic                     ack_valid,
  output ack_msg_t                 ack_msg,
  output logic                     crd_valid,
  output credit_msg_t              crd_msg,
  output logic                     ck_valid,
  output logic [$clog2(NREGS)-1:0] ck_idx,
  output logic [REG_W-1:0]         ck_data,
  // clock control and status
  output logic                     slow_req,
  output logic                     late_err,
  output logic [TS_W-1:0]          ts,
  output logic                     solo,
  output logic [1:0]               fault_cause,
  output logic                     recovering,
  output logic                     take,
  output logic                     fp_match,
  output logic                     fp_mismatch,
  output logic                     fp_wait
);
  localparam int unsigned SCW = $clog2(SEND_DEPTH + 1);

  logic             ts_running, ts_tick, run;
  logic             r_ret, r_st, r_out;
  logic             rec_core_run, rec_busy, rec_epoch, rec_enter, rec_nack;
  logic             rec_restore, rec_replay;
  logic             log_busy;
  logic             gdq_dlv, gdq_late, dm_late;
  logic             out_err, force_fp;
  logic [FP_W-1:0]  fp_now;
  logic             fpc_ack_valid;
  ack_msg_t         fpc_ack_msg;
  logic [SEQ_W-1:0] fpc_seq;
  logic             nack_q;
  logic [SCW-1:0]   free_slots;

  // The slave halts, timestamp included, while it waits for a master fingerprint.
  assign ts_tick  = tick && !fp_wait;
  assign run      = enable && ts_tick && ts_running && rec_core_run;
  assign core_run = run;
  assign r_ret    = run && ret_valid;
  assign r_st     = run && st_valid;
  assign r_out    = run && out_valid;

  timestamp_counter #(.LAG(LAG)) u_ts (
    .clk, .rst_n, .enable, .tick(ts_tick), .running(ts_running), .ts
  );

  // ---- input coordination ----------------------------------------------
  gated_delivery_queue #(.DEPTH(GDQ_DEPTH)) u_gdq (
    .clk, .rst_n, .flush(1'b0), .ts, .tick(enable && ts_tick && ts_running),
    .arr_valid(coord_valid), .arr_msg(coord_msg), .arr_ready(coord_ready),
    .dlv_valid(gdq_dlv), .dlv_data(core_in_data), .late(gdq_late), .occupancy()
  );
  // inputs that fall due while the core is rolled back are dropped (as on the master)
  assign core_in_valid = gdq_dlv && run;

  drift_monitor #(.MARGIN(DRIFT_MARGIN)) u_dm (
    .clk, .rst_n, .ts, .arr_valid(coord_valid && coord_ready && ts_running), .arr_ts(coord_msg.ts),
    .slow_req, .late_err(dm_late), .slack()
  );
  assign late_err = dm_late || gdq_late;

  // ---- intervals and fingerprint comparison ------------------------------
  interval_ctrl #(.INTERVAL(INTERVAL), .STORE_LIMIT(STORE_LIMIT)) u_ivl (
    .clk, .rst_n, .restart(rec_enter),
    .ret_valid(r_ret), .st_valid(r_st), .force_fp, .take
  );

  fingerprint_gen #(.DATA_W(REG_W)) u_fpg (
    .clk, .rst_n, .restart(rec_enter),
    .upd_valid(r_ret), .upd_data(ret_data), .snap(take),
    .fp_valid(), .fp(), .fp_now
  );

  fp_checker #(.QDEPTH(FP_QDEPTH)) u_fpc (
    .clk, .rst_n, .flush(rec_enter), .epoch(rec_epoch),
    .mfp_valid(fp_valid && !solo), .mfp_msg(fp_msg),
    .own_valid(take && !solo), .own_fp(fp_now), .veto(out_err),
    .match(fp_match), .mismatch(fp_mismatch),
    .ack_valid(fpc_ack_valid), .ack_msg(fpc_ack_msg),
    .waiting(fp_wait), .seq(fpc_seq)
  );

  // A NACK for an output mismatch outside a comparison goes out a cycle later.
  always_ff @(posedge clk) begin
    if (!rst_n) nack_q <= 1'b0;
    else        nack_q <= rec_nack;
  end
  assign ack_valid = fpc_ack_valid || nack_q;
  assign ack_msg   = fpc_ack_valid ? fpc_ack_msg : '{seq: fpc_seq, ok: 1'b0};

  fault_monitor #(.MISMATCH_LIMIT(MISMATCH_LIMIT), .TIMEOUT(FP_TIMEOUT)) u_fm (
    .clk, .rst_n, .match(fp_match), .mismatch(fp_mismatch || rec_nack),
    .wait_active(fp_wait), .progress(fp_valid),
    .perm_fault(solo), .cause(fault_cause)
  );

  // ---- checkpoint state ------------------------------------------------
  rrf #(.NREGS(NREGS), .REG_W(REG_W)) u_rrf (
    .clk, .rst_n,
    .wr_en(r_ret), .wr_idx(ret_widx), .wr_data(ret_data),
    .rd_idx, .rd_data,
    .ckpt(fp_match), .restore(rec_restore), .sh_idx(ck_idx), .sh_data(ck_data)
  );

  ckpt_log #(.DEPTH(STORE_LIMIT), .BLK_W(BLK_W), .LINE_W(LINE_W), .NMARK(1)) u_log (
    .clk, .rst_n,
    .push(r_st), .push_blk(st_blk), .push_line(st_old_line),
    .mark(1'b0), .release_oldest(1'b0), .release_all(fp_match), .replay(rec_replay),
    .rp_valid(undo_valid), .rp_blk(undo_blk), .rp_line(undo_line),
    .busy(log_busy), .full(), .overflow(), .count()
  );

  // ---- outputs ---------------------------------------------------------
  logic oc_out_ready;
  output_corroborator #(.FWD_DEPTH(FWD_DEPTH), .SEND_DEPTH(SEND_DEPTH)) u_oc (
    .clk, .rst_n, .flush(rec_enter), .epoch(rec_epoch), .solo,
    .fwd_valid, .fwd_msg,
    .out_valid(r_out), .out_msg, .out_ready(oc_out_ready),
    .out_err, .force_fp,
    .match(fp_match), .mismatch(fp_mismatch || rec_nack),
    .net_valid, .net_msg, .net_ready,
    .free_slots
  );
  assign out_ready = run && oc_out_ready;

  credit_return #(.PERIOD(CREDIT_PERIOD)) u_cr (
    .clk, .rst_n,
    .delivered(gdq_dlv || gdq_late),
    .free_slots(CNT_W'(free_slots)),
    .rpt_valid(crd_valid), .rpt_msg(crd_msg)
  );

  // ---- recovery --------------------------------------------------------
  slave_recovery #(.NREGS(NREGS)) u_rec (
    .clk, .rst_n, .fp_mismatch, .out_err, .ts, .log_busy,
    .restart_valid, .restart_msg,
    .core_run(rec_core_run), .busy(rec_busy), .epoch(rec_epoch),
    .nack_req(rec_nack), .enter(rec_enter),
    .rrf_restore(rec_restore), .log_replay(rec_replay),
    .ck_valid, .ck_idx
  );
  assign recovering = rec_busy;
endmodule
