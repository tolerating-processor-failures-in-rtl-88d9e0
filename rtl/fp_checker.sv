// fp_checker: slave-side fingerprint comparison.
//
// The master runs ahead, so its fingerprint for an interval normally arrives
// before the slave finishes the same interval. Arriving master fingerprints of
// the current epoch are queued (stale ones from before a rollback carry the old
// epoch and are dropped). When the slave produces its own fingerprint it is
// compared with the oldest queued master fingerprint: equal value and equal
// sequence number give `match` and an ACK to the master, anything else (or `veto`, an output
// mismatch detected in the same cycle) gives `mismatch` and a NACK. match/mismatch are combinational, in the cycle the
// slave's fingerprint is produced, so the checkpoint can be taken in that same
// cycle; the ACK/NACK message follows one cycle later. If no master fingerprint is queued the slave's own is
// held (`waiting`) and compared as soon as the master's arrives. The sequence
// number advances only on a match, so after a rollback the re-executed interval
// is compared under the same number. `flush` empties the queue (restart).
// From the source design: comparison at the slave, ACK on match, NACK and
// recovery on mismatch (Figure 5). Own choices: sequence numbers, epochs and
// the queue depth.
// Lint notes: the epoch bit of a queued fingerprint is not read after the
// queue (stale epochs are filtered on entry); the FIFO's full and count pins
// are left open on purpose, QDEPTH covers the fingerprints in flight.
module fp_checker
  import lacross_pkg::*;
#(
  parameter int unsigned QDEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  input  logic            epoch,       // current recovery epoch
  input  logic            mfp_valid,   // master fingerprint arrives
  input  fp_msg_t         mfp_msg,
  input  logic            own_valid,   // slave fingerprint produced
  input  logic [FP_W-1:0] own_fp,
  input  logic            veto,        // an output mismatch in this cycle
  output logic            match,
  output logic            mismatch,
  output logic            ack_valid,
  output ack_msg_t        ack_msg,
  output logic            waiting,
  output logic [SEQ_W-1:0] seq
);
  fp_msg_t         head;
  logic            empty;
  logic            pend_vld;
  logic [FP_W-1:0] pend_fp;
  logic            cmp_now;
  logic [FP_W-1:0] cmp_fp;
  logic            equal;

  assign cmp_now = !empty && (own_valid || pend_vld);
  assign cmp_fp  = pend_vld ? pend_fp : own_fp;
  assign equal   = (head.fp == cmp_fp) && (head.seq == seq) && !veto;
  assign waiting  = pend_vld;
  assign match    = cmp_now && equal;
  assign mismatch = cmp_now && !equal;

  sync_fifo #(.WIDTH($bits(fp_msg_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .flush,
    .push(mfp_valid && (mfp_msg.epoch == epoch)), .din(mfp_msg),
    .pop(cmp_now), .dout(head),
    .empty, .full(), .count()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seq <= '0;
    end else if (cmp_now && equal) begin
      seq <= seq + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      pend_vld <= 1'b0;
      pend_fp  <= '0;
    end else if (cmp_now) begin
      pend_vld <= 1'b0;
    end else if (own_valid && empty) begin
      pend_vld <= 1'b1;
      pend_fp  <= own_fp;
    end
  end

  // The answer to a comparison is sent even if the queue is flushed meanwhile.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_valid <= 1'b0;
      ack_msg   <= '0;
    end else begin
      ack_valid <= cmp_now;
      ack_msg   <= '{seq: seq, ok: equal};
    end
  end
endmodule
