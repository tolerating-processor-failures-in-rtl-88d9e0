// lacross_master_nc: node-controller extensions for the master core of a
// LACROSS pair.
//
// The master is the pair's face to the system: every external input comes to
// it. coord_sender hands an accepted input to the master core at once and
// sends it, stamped with the master's timestamp, to the slave. The core's
// retired updates feed a fingerprint; interval_ctrl ends an interval after a
// fixed instruction count, a store count, or an output the slave must release.
// At the end of an interval the fingerprint is sent to the slave (next cycle),
// the cache log and the validation filter start a new interval/region and the
// register file takes a checkpoint (kept only so both cores see the same
// checkpoint overheads). Outputs go through release_ctrl. An ACK releases the
// oldest interval in the log and the filter; a NACK starts master_recovery,
// which undoes the master's cache from its log and loads the slave's register
// checkpoint. A fault_monitor on missing ACKs or repeated NACKs switches the
// master to solo (non-redundant) operation. credit_counter stops input
// acceptance when the slave's send buffer could overflow. The master log
// keeps every store not yet acknowledged (the slave keeps one interval); when
// it is full, or all its interval marks are in use, the core and its
// timestamp stall until an ACK frees space, so an undo is never lost and the
// slave, which cannot see the stall, still executes every instruction at the
// same timestamp as the master.
// Timing: one input, one retirement, one store and one output per cycle; all
// core-side events count only in cycles where core_run is high. The core keeps
// its architectural registers in this block's register file.
// From the source design: the mechanisms and where they sit. Own choices: the
// message formats, the epoch/sequence bookkeeping and the sizes marked as
// assumed on the parameters.
// Lint note: status pins of submodules that this block does not need
// (credit value, combinational fingerprint, shadow read port, log count) are
// left open on purpose.
module lacross_master_nc
  import lacross_pkg::*;
#(
  parameter int unsigned NREGS       = 32,
  parameter int unsigned REG_W       = 64,
  parameter int unsigned LINE_W      = 512,           // 64-byte coherence unit
  parameter int unsigned VF_ENTRIES  = 64,
  parameter int unsigned VF_REGIONS  = 32,
  parameter int unsigned INTERVAL    = 128,
  parameter int unsigned STORE_LIMIT = 32,
  parameter int unsigned LOG_DEPTH   = 256,
  parameter int unsigned COORD_DEPTH = 8,
  parameter int unsigned SEND_DEPTH  = 32,
  parameter int unsigned ACK_TIMEOUT = 4 * M2S_DELAY,
  parameter int unsigned MISMATCH_LIMIT = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     tick,
  // external inputs to the logical processor
  input  logic                     in_valid,
  input  ext_in_t                  in_data,
  output logic                     in_ready,
  // master core
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
  // outputs released directly to the system
  output logic                     net_valid,
  output out_msg_t                 net_msg,
  input  logic                     net_ready,
  // master-to-slave link
  output logic                     coord_valid,
  output coord_msg_t               coord_msg,
  input  logic                     coord_ready,
  output logic                     fp_valid,
  output fp_msg_t                  fp_msg,
  output logic                     fwd_valid,
  output fwd_msg_t                 fwd_msg,
  output logic                     restart_valid,
  output restart_msg_t             restart_msg,
  // slave-to-master link
  input  logic                     ack_valid,
  input  ack_msg_t                 ack_msg,
  input  logic                     crd_valid,
  input  credit_msg_t              crd_msg,
  input  logic                     ck_valid,
  input  logic [$clog2(NREGS)-1:0] ck_idx,
  input  logic [REG_W-1:0]         ck_data,
  // status
  output logic [TS_W-1:0]          ts,
  output logic                     solo,
  output logic [1:0]               fault_cause,
  output logic                     recovering,
  output logic                     take,
  output logic                     vf_bypass,
  output logic                     vf_ovf,
  output logic                     vf_degraded,
  output logic                     credit_stall,
  output logic                     log_overflow
);
  logic            ts_running;
  logic            rec_core_run, rec_busy, rec_epoch, rec_enter, rec_log_replay, rec_vf_clear;
  logic            rec_rrf_we;
  logic [$clog2(NREGS)-1:0] rec_widx;
  logic [REG_W-1:0]         rec_wdata;
  logic            crd_ok, accept_ok;
  logic            run, r_ret, r_st, r_out;
  logic            force_fp, lk_hit, log_busy, log_full;
  logic [BLK_W-1:0] lk_blk;
  logic            fpg_valid;
  logic [FP_W-1:0] fpg_fp;
  logic [SEQ_W-1:0] seq, ack_seq;
  logic            ack_ok, nack;
  logic            coord_v;

  assign ack_ok = ack_valid && ack_msg.ok;
  assign nack   = ack_valid && !ack_msg.ok;

  logic ts_tick;
  assign ts_tick = tick && (solo || !log_full);

  timestamp_counter #(.LAG(0)) u_ts (
    .clk, .rst_n, .enable, .tick(ts_tick), .running(ts_running), .ts
  );

  // a full undo log stalls the core until acknowledgements free entries
  assign run      = enable && tick && ts_running && rec_core_run && (solo || !log_full);
  assign core_run = run;
  assign r_ret    = run && ret_valid;
  assign r_st     = run && st_valid;
  assign r_out    = run && out_valid;

  // ---- inputs ----------------------------------------------------------
  assign accept_ok    = run && (solo || crd_ok);
  assign credit_stall = enable && in_valid && run && !solo && !crd_ok;

  coord_sender #(.DEPTH(COORD_DEPTH)) u_coord (
    .clk, .rst_n, .ts, .accept_ok,
    .in_valid, .in_data, .in_ready,
    .core_valid(core_in_valid), .core_data(core_in_data),
    .coord_valid(coord_v), .coord_msg, .coord_ready(coord_ready || solo)
  );
  assign coord_valid = coord_v && !solo;

  credit_counter #(.INIT_FREE(SEND_DEPTH)) u_crd (
    .clk, .rst_n, .accepted(in_valid && in_ready),
    .rpt_valid(crd_valid), .rpt_msg(crd_msg), .accept_ok(crd_ok), .credit()
  );

  // ---- fingerprints and intervals --------------------------------------
  interval_ctrl #(.INTERVAL(INTERVAL), .STORE_LIMIT(STORE_LIMIT)) u_ivl (
    .clk, .rst_n, .restart(rec_enter),
    .ret_valid(r_ret), .st_valid(r_st), .force_fp, .take
  );

  fingerprint_gen #(.DATA_W(REG_W)) u_fpg (
    .clk, .rst_n, .restart(rec_enter),
    .upd_valid(r_ret), .upd_data(ret_data), .snap(take),
    .fp_valid(fpg_valid), .fp(fpg_fp), .fp_now()
  );

  assign fp_valid = fpg_valid && !solo;
  assign fp_msg   = '{epoch: rec_epoch, seq: seq, fp: fpg_fp};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seq     <= '0;
      ack_seq <= '0;
    end else begin
      if (ack_ok) ack_seq <= ack_seq + 1'b1;
      if (rec_enter)      seq <= ack_seq;   // the NACKed interval is redone
      else if (fpg_valid) seq <= seq + 1'b1;
    end
  end

  fault_monitor #(.MISMATCH_LIMIT(MISMATCH_LIMIT), .TIMEOUT(ACK_TIMEOUT)) u_fm (
    .clk, .rst_n, .match(ack_ok), .mismatch(nack),
    .wait_active(seq != ack_seq && !rec_busy), .progress(ack_valid),
    .perm_fault(solo), .cause(fault_cause)
  );

  // ---- checkpoint state ------------------------------------------------
  rrf #(.NREGS(NREGS), .REG_W(REG_W)) u_rrf (
    .clk, .rst_n,
    .wr_en(r_ret || rec_rrf_we),
    .wr_idx(rec_rrf_we ? rec_widx : ret_widx),
    .wr_data(rec_rrf_we ? rec_wdata : ret_data),
    .rd_idx, .rd_data,
    .ckpt(take), .restore(1'b0), .sh_idx('0), .sh_data()
  );

  ckpt_log #(.DEPTH(LOG_DEPTH), .BLK_W(BLK_W), .LINE_W(LINE_W), .NMARK(VF_REGIONS)) u_log (
    .clk, .rst_n,
    .push(r_st && !solo), .push_blk(st_blk), .push_line(st_old_line),
    .mark(take && !solo), .release_oldest(ack_ok), .release_all(solo), .replay(rec_log_replay),
    .rp_valid(undo_valid), .rp_blk(undo_blk), .rp_line(undo_line),
    .busy(log_busy), .full(log_full), .overflow(log_overflow), .count()
  );

  validation_filter #(.ENTRIES(VF_ENTRIES), .REGIONS(VF_REGIONS)) u_vf (
    .clk, .rst_n, .clear(rec_vf_clear),
    .st_valid(r_st), .st_blk,
    .lk_blk, .lk_hit,
    .new_region(take), .ack(ack_ok),
    .ovf_event(vf_ovf), .degraded(vf_degraded)
  );

  // ---- outputs ---------------------------------------------------------
  logic rc_out_ready;
  release_ctrl u_rel (
    .epoch(rec_epoch), .solo,
    .out_valid(r_out), .out_msg, .out_ready(rc_out_ready),
    .lk_blk, .lk_hit,
    .net_valid, .net_msg, .net_ready,
    .fwd_valid, .fwd_msg, .force_fp, .vf_bypass
  );
  assign out_ready = run && rc_out_ready;

  // ---- recovery --------------------------------------------------------
  master_recovery #(.NREGS(NREGS), .REG_W(REG_W)) u_rec (
    .clk, .rst_n, .ack_valid(ack_valid && !solo), .ack_msg, .ts,
    .log_busy, .ck_valid, .ck_idx, .ck_data,
    .core_run(rec_core_run), .busy(rec_busy), .epoch(rec_epoch), .enter(rec_enter),
    .log_replay(rec_log_replay), .vf_clear(rec_vf_clear),
    .rrf_we(rec_rrf_we), .rrf_widx(rec_widx), .rrf_wdata(rec_wdata),
    .restart_valid, .restart_msg
  );
  assign recovering = rec_busy;
endmodule
