// lacross_pair: one LACROSS distributed DMR pair, the master-side and the
// slave-side node-controller extensions of two cores on different DSM nodes.
//
// The two halves share nothing but the interconnect, which is not part of this
// design: the master-to-slave link (coordination messages, fingerprints,
// forwarded outputs, restart) leaves as m2s_* outputs and enters the slave as
// m2s_rx_* inputs; the slave-to-master link (ACK/NACK, credit reports,
// register checkpoint during recovery) leaves as s2m_* and enters the master as
// s2m_rx_*. The caller supplies the link with whatever latency it has; lockstep
// holds as long as every message reaches the slave before the slave's
// timestamp reaches its delivery time (the link latency stays below the
// master-to-slave lag). The cores, their caches and the network stay outside
// too: m_* and s_* are the core-side ports of each half, *_net_* the outputs
// released to the system. s_tick is the slave's clock enable, to be slowed by
// the slave's clock generator while s_slow_req is high.
// From the source design: the asymmetric pair (master receives, slave checks
// and sends), the fixed lag and the early-release paths. Own choices: the split
// into two halves with explicit link ports and the default sizes marked as
// assumed.
module lacross_pair
  import lacross_pkg::*;
#(
  parameter int unsigned LAG         = M2S_DELAY,
  parameter int unsigned NREGS       = 32,
  parameter int unsigned REG_W       = 64,
  parameter int unsigned LINE_W      = 512,
  parameter int unsigned VF_ENTRIES  = 64,
  parameter int unsigned VF_REGIONS  = 32,
  parameter int unsigned INTERVAL    = 128,
  parameter int unsigned STORE_LIMIT = 32,
  parameter int unsigned SEND_DEPTH  = 32,
  parameter int unsigned TIMEOUT     = 4 * M2S_DELAY
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     m_tick,
  input  logic                     s_tick,
  // external inputs of the logical processor (to the master)
  input  logic                     in_valid,
  input  ext_in_t                  in_data,
  output logic                     in_ready,
  // master core
  output logic                     m_core_run,
  output logic                     m_core_in_valid,
  output ext_in_t                  m_core_in_data,
  input  logic                     m_ret_valid,
  input  logic [REG_W-1:0]         m_ret_data,
  input  logic [$clog2(NREGS)-1:0] m_ret_widx,
  input  logic [$clog2(NREGS)-1:0] m_rd_idx,
  output logic [REG_W-1:0]         m_rd_data,
  input  logic                     m_st_valid,
  input  logic [BLK_W-1:0]         m_st_blk,
  input  logic [LINE_W-1:0]        m_st_old_line,
  output logic                     m_undo_valid,
  output logic [BLK_W-1:0]         m_undo_blk,
  output logic [LINE_W-1:0]        m_undo_line,
  input  logic                     m_out_valid,
  input  out_msg_t                 m_out_msg,
  output logic                     m_out_ready,
  output logic                     m_net_valid,
  output out_msg_t                 m_net_msg,
  input  logic                     m_net_ready,
  // slave core
  output logic                     s_core_run,
  output logic                     s_core_in_valid,
  output ext_in_t                  s_core_in_data,
  input  logic                     s_ret_valid,
  input  logic [REG_W-1:0]         s_ret_data,
  input  logic [$clog2(NREGS)-1:0] s_ret_widx,
  input  logic [$clog2(NREGS)-1:0] s_rd_idx,
  output logic [REG_W-1:0]         s_rd_data,
  input  logic                     s_st_valid,
  input  logic [BLK_W-1:0]         s_st_blk,
  input  logic [LINE_W-1:0]        s_st_old_line,
  output logic                     s_undo_valid,
  output logic [BLK_W-1:0]         s_undo_blk,
  output logic [LINE_W-1:0]        s_undo_line,
  input  logic                     s_out_valid,
  input  out_msg_t                 s_out_msg,
  output logic                     s_out_ready,
  output logic                     s_net_valid,
  output out_msg_t                 s_net_msg,
  input  logic                     s_net_ready,
  // master-to-slave link, master end
  output logic                     m2s_coord_valid,
  output coord_msg_t               m2s_coord_msg,
  input  logic                     m2s_coord_ready,
  output logic                     m2s_fp_valid,
  output fp_msg_t                  m2s_fp_msg,
  output logic                     m2s_fwd_valid,
  output fwd_msg_t                 m2s_fwd_msg,
  output logic                     m2s_restart_valid,
  output restart_msg_t             m2s_restart_msg,
  // master-to-slave link, slave end
  input  logic                     m2s_rx_coord_valid,
  input  coord_msg_t               m2s_rx_coord_msg,
  output logic                     m2s_rx_coord_ready,
  input  logic                     m2s_rx_fp_valid,
  input  fp_msg_t                  m2s_rx_fp_msg,
  input  logic                     m2s_rx_fwd_valid,
  input  fwd_msg_t                 m2s_rx_fwd_msg,
  input  logic                     m2s_rx_restart_valid,
  input  restart_msg_t             m2s_rx_restart_msg,
  // slave-to-master link, slave end
  output logic                     s2m_ack_valid,
  output ack_msg_t                 s2m_ack_msg,
  output logic                     s2m_crd_valid,
  output credit_msg_t              s2m_crd_msg,
  output logic                     s2m_ck_valid,
  output logic [$clog2(NREGS)-1:0] s2m_ck_idx,
  output logic [REG_W-1:0]         s2m_ck_data,
  // slave-to-master link, master end
  input  logic                     s2m_rx_ack_valid,
  input  ack_msg_t                 s2m_rx_ack_msg,
  input  logic                     s2m_rx_crd_valid,
  input  credit_msg_t              s2m_rx_crd_msg,
  input  logic                     s2m_rx_ck_valid,
  input  logic [$clog2(NREGS)-1:0] s2m_rx_ck_idx,
  input  logic [REG_W-1:0]         s2m_rx_ck_data,
  // slave clock control
  output logic                     s_slow_req,
  // status
  output logic [TS_W-1:0]          m_ts,
  output logic [TS_W-1:0]          s_ts,
  output logic                     m_solo,
  output logic                     s_solo,
  output logic [1:0]               m_fault_cause,
  output logic [1:0]               s_fault_cause,
  output logic                     m_recovering,
  output logic                     s_recovering,
  output logic                     m_take,
  output logic                     s_take,
  output logic                     s_fp_match,
  output logic                     s_fp_mismatch,
  output logic                     s_fp_wait,
  output logic                     s_late_err,
  output logic                     m_vf_bypass,
  output logic                     m_vf_ovf,
  output logic                     m_vf_degraded,
  output logic                     m_credit_stall,
  output logic                     m_log_overflow
);
  lacross_master_nc #(
    .NREGS(NREGS), .REG_W(REG_W), .LINE_W(LINE_W),
    .VF_ENTRIES(VF_ENTRIES), .VF_REGIONS(VF_REGIONS),
    .INTERVAL(INTERVAL), .STORE_LIMIT(STORE_LIMIT),
    .SEND_DEPTH(SEND_DEPTH), .ACK_TIMEOUT(TIMEOUT)
  ) u_master (
    .clk, .rst_n, .enable, .tick(m_tick),
    .in_valid, .in_data, .in_ready,
    .core_run(m_core_run), .core_in_valid(m_core_in_valid), .core_in_data(m_core_in_data),
    .ret_valid(m_ret_valid), .ret_data(m_ret_data), .ret_widx(m_ret_widx),
    .rd_idx(m_rd_idx), .rd_data(m_rd_data),
    .st_valid(m_st_valid), .st_blk(m_st_blk), .st_old_line(m_st_old_line),
    .undo_valid(m_undo_valid), .undo_blk(m_undo_blk), .undo_line(m_undo_line),
    .out_valid(m_out_valid), .out_msg(m_out_msg), .out_ready(m_out_ready),
    .net_valid(m_net_valid), .net_msg(m_net_msg), .net_ready(m_net_ready),
    .coord_valid(m2s_coord_valid), .coord_msg(m2s_coord_msg), .coord_ready(m2s_coord_ready),
    .fp_valid(m2s_fp_valid), .fp_msg(m2s_fp_msg),
    .fwd_valid(m2s_fwd_valid), .fwd_msg(m2s_fwd_msg),
    .restart_valid(m2s_restart_valid), .restart_msg(m2s_restart_msg),
    .ack_valid(s2m_rx_ack_valid), .ack_msg(s2m_rx_ack_msg),
    .crd_valid(s2m_rx_crd_valid), .crd_msg(s2m_rx_crd_msg),
    .ck_valid(s2m_rx_ck_valid), .ck_idx(s2m_rx_ck_idx), .ck_data(s2m_rx_ck_data),
    .ts(m_ts), .solo(m_solo), .fault_cause(m_fault_cause), .recovering(m_recovering),
    .take(m_take), .vf_bypass(m_vf_bypass), .vf_ovf(m_vf_ovf), .vf_degraded(m_vf_degraded),
    .credit_stall(m_credit_stall), .log_overflow(m_log_overflow)
  );

  lacross_slave_nc #(
    .LAG(LAG), .NREGS(NREGS), .REG_W(REG_W), .LINE_W(LINE_W),
    .INTERVAL(INTERVAL), .STORE_LIMIT(STORE_LIMIT),
    .SEND_DEPTH(SEND_DEPTH), .FP_TIMEOUT(TIMEOUT)
  ) u_slave (
    .clk, .rst_n, .enable, .tick(s_tick),
    .core_run(s_core_run), .core_in_valid(s_core_in_valid), .core_in_data(s_core_in_data),
    .ret_valid(s_ret_valid), .ret_data(s_ret_data), .ret_widx(s_ret_widx),
    .rd_idx(s_rd_idx), .rd_data(s_rd_data),
    .st_valid(s_st_valid), .st_blk(s_st_blk), .st_old_line(s_st_old_line),
    .undo_valid(s_undo_valid), .undo_blk(s_undo_blk), .undo_line(s_undo_line),
    .out_valid(s_out_valid), .out_msg(s_out_msg), .out_ready(s_out_ready),
    .net_valid(s_net_valid), .net_msg(s_net_msg), .net_ready(s_net_ready),
    .coord_valid(m2s_rx_coord_valid), .coord_msg(m2s_rx_coord_msg), .coord_ready(m2s_rx_coord_ready),
    .fp_valid(m2s_rx_fp_valid), .fp_msg(m2s_rx_fp_msg),
    .fwd_valid(m2s_rx_fwd_valid), .fwd_msg(m2s_rx_fwd_msg),
    .restart_valid(m2s_rx_restart_valid), .restart_msg(m2s_rx_restart_msg),
    .ack_valid(s2m_ack_valid), .ack_msg(s2m_ack_msg),
    .crd_valid(s2m_crd_valid), .crd_msg(s2m_crd_msg),
    .ck_valid(s2m_ck_valid), .ck_idx(s2m_ck_idx), .ck_data(s2m_ck_data),
    .slow_req(s_slow_req), .late_err(s_late_err), .ts(s_ts),
    .solo(s_solo), .fault_cause(s_fault_cause), .recovering(s_recovering),
    .take(s_take), .fp_match(s_fp_match), .fp_mismatch(s_fp_mismatch), .fp_wait(s_fp_wait)
  );
endmodule
