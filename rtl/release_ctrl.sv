// release_ctrl: master-side output path.
//
// Every output of the master core is classified. Outputs without an
// irreversible effect, requests for a shared copy, are released to the system
// at once. A reply with dirty data is released at once too when the validation
// filter reports that the block holds no store awaiting fingerprint
// acknowledgement (lk_hit low). All other outputs, requests for a writable
// copy, device-register accesses, dirty replies to blocks still in the filter
// and anything else that changes system state, are left to the slave, which
// releases them after corroboration. Every output is also forwarded to the
// slave, flagged with whether the slave must release it; such an output raises
// `force_fp` so that a fingerprint follows it at once. If the pair has lost its
// partner (`solo`), every output is released directly and nothing is forwarded.
// The core is stalled (out_ready low) only while a direct release waits for
// net_ready. The forwarding link is assumed always to accept.
// From the source design: which output kinds may bypass corroboration, and the
// use of the validation filter for dirty replies. Own choices: forwarding every
// output and forcing a fingerprint after one that needs corroboration.
module release_ctrl
  import lacross_pkg::*;
(
  input  logic             epoch,
  input  logic             solo,
  input  logic             out_valid,
  input  out_msg_t         out_msg,
  output logic             out_ready,
  output logic [BLK_W-1:0] lk_blk,
  input  logic             lk_hit,
  output logic             net_valid,
  output out_msg_t         net_msg,
  input  logic             net_ready,
  output logic             fwd_valid,
  output fwd_msg_t         fwd_msg,
  output logic             force_fp,
  output logic             vf_bypass   // a dirty reply released without the slave
);
  logic direct;

  assign lk_blk    = out_msg.blk;
  assign direct    = solo
                  || (out_msg.cls == OUT_READ_SHARED)
                  || (out_msg.cls == OUT_DIRTY_REPLY && !lk_hit);
  assign out_ready = !direct || net_ready;
  assign net_valid = out_valid && direct;
  assign net_msg   = out_msg;
  assign fwd_valid = out_valid && out_ready && !solo;
  assign fwd_msg   = '{epoch: epoch, slave_release: !direct, out: out_msg};
  assign force_fp  = out_valid && out_ready && !direct;
  assign vf_bypass = out_valid && out_ready && !solo && (out_msg.cls == OUT_DIRTY_REPLY) && !lk_hit;
endmodule
