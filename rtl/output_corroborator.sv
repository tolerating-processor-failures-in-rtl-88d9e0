// output_corroborator: slave-side output checking and release.
//
// Outputs forwarded by the master (for corroboration) are queued; stale ones
// from before a rollback carry the old epoch and are dropped. When the slave
// core emits the corresponding output it is compared with the oldest queued
// master output; a difference, or a missing master output, raises `out_err`,
// which starts recovery like a fingerprint mismatch. A matching output that the
// master left to the slave enters the send buffer, unverified. The slave
// compares each fingerprint in the cycle it is taken (or halts until it can), so
// `match` covers every unverified output including one of the same cycle; they
// become verified and drain to the system, one per cycle under net_ready.
// `mismatch` drops every unverified output. `free_slots` feeds the flow-control
// credits. `solo` (partner lost) releases the
// slave's outputs directly. `flush` empties the forwarded-output queue.
// From the source design: comparing the two cores' outputs and releasing one
// verified output after fingerprint comparison. Own choices: buffer depths and
// keeping the slave's outputs rather than the master's copies.
// Lint notes: the epoch bit of the queued forwarded output is not read after
// the queue (stale epochs are filtered on entry); the FIFO's full and count
// pins are left open on purpose.
module output_corroborator
  import lacross_pkg::*;
#(
  parameter int unsigned FWD_DEPTH  = 16,
  parameter int unsigned SEND_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         epoch,
  input  logic         solo,
  input  logic         fwd_valid,
  input  fwd_msg_t     fwd_msg,
  input  logic         out_valid,
  input  out_msg_t     out_msg,
  output logic         out_ready,
  output logic         out_err,
  output logic         force_fp,   // the output is one the slave must release
  input  logic         match,
  input  logic         mismatch,
  output logic         net_valid,
  output out_msg_t     net_msg,
  input  logic         net_ready,
  output logic [$clog2(SEND_DEPTH+1)-1:0] free_slots
);
  localparam int unsigned SW = $clog2(SEND_DEPTH);
  localparam int unsigned CW = $clog2(SEND_DEPTH + 1);

  fwd_msg_t fhead;
  logic     fempty;
  logic     cmp_ok, enq;

  sync_fifo #(.WIDTH($bits(fwd_msg_t)), .DEPTH(FWD_DEPTH)) u_fwdq (
    .clk, .rst_n, .flush,
    .push(fwd_valid && fwd_msg.epoch == epoch && !solo), .din(fwd_msg),
    .pop(out_valid && out_ready && !solo), .dout(fhead),
    .empty(fempty), .full(), .count()
  );

  // send buffer: rptr..vptr verified, vptr..wptr unverified
  out_msg_t      sbuf [SEND_DEPTH];
  logic [SW-1:0] rptr, vptr, wptr, wptr_nxt;
  logic [CW-1:0] n_ver, n_unv;
  logic          pop_net;

  assign free_slots = CW'(SEND_DEPTH) - n_ver - n_unv;
  assign cmp_ok     = !fempty && (fhead.out == out_msg);
  assign out_ready  = solo ? net_ready : (free_slots != 0);
  assign enq        = out_valid && out_ready && !solo && cmp_ok && fhead.slave_release;
  assign force_fp   = out_valid && out_ready && !solo && !fempty && fhead.slave_release;
  assign out_err    = out_valid && out_ready && !solo && !cmp_ok;
  assign pop_net    = (n_ver != 0) && net_ready;
  assign net_valid  = solo ? out_valid : (n_ver != 0);
  assign net_msg    = solo ? out_msg : sbuf[rptr];
  assign wptr_nxt   = enq ? ((wptr == SW'(SEND_DEPTH - 1)) ? '0 : wptr + 1'b1) : wptr;

  always_ff @(posedge clk) begin
    if (enq) sbuf[wptr] <= out_msg;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rptr  <= '0;
      vptr  <= '0;
      wptr  <= '0;
      n_ver <= '0;
      n_unv <= '0;
    end else begin
      if (pop_net) rptr <= (rptr == SW'(SEND_DEPTH - 1)) ? '0 : rptr + 1'b1;
      if (mismatch) begin
        // the interval failed: drop every unverified output
        wptr  <= vptr;
        n_unv <= '0;
        n_ver <= n_ver - CW'(pop_net);
      end else if (match) begin
        // everything written so far, this cycle's output included, is verified
        wptr  <= wptr_nxt;
        vptr  <= wptr_nxt;
        n_ver <= n_ver + n_unv + CW'(enq) - CW'(pop_net);
        n_unv <= '0;
      end else begin
        wptr  <= wptr_nxt;
        n_ver <= n_ver - CW'(pop_net);
        n_unv <= n_unv + CW'(enq);
      end
    end
  end
endmodule
