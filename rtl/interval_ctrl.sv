// interval_ctrl: decides where a checkpoint interval ends.
//
// A fingerprint is taken, and with it a checkpoint created, in the cycle where
// (a) the INTERVAL-th instruction since the last fingerprint retires, (b) the
// STORE_LIMIT-th store since the last fingerprint is logged, so that the
// slave's single-interval checkpoint log can never overflow, or (c) `force_fp`
// is high because the core emitted an output that the slave must corroborate
// before release. `take` is combinational in the same cycle, so master and slave,
// which see identical retire/store/output streams, end their intervals at the
// same instruction. `restart` clears the counters after a rollback.
// From the source design: forcing a fingerprint before the checkpoint log fills,
// and comparing fingerprints before outputs change system state. Own choices:
// the fixed instruction interval and forcing a fingerprint right after an
// output that needs corroboration.
module interval_ctrl #(
  parameter int unsigned INTERVAL    = 128,
  parameter int unsigned STORE_LIMIT = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic ret_valid,   // one instruction retires
  input  logic st_valid,    // one store logged
  input  logic force_fp,
  output logic take
);
  logic [$clog2(INTERVAL+1)-1:0]    icnt;
  logic [$clog2(STORE_LIMIT+1)-1:0] scnt;

  assign take = force_fp
             || (ret_valid && (icnt == $bits(icnt)'(INTERVAL - 1)))
             || (st_valid  && (scnt == $bits(scnt)'(STORE_LIMIT - 1)));

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      icnt <= '0;
      scnt <= '0;
    end else if (take) begin
      icnt <= '0;
      scnt <= '0;
    end else begin
      if (ret_valid) icnt <= icnt + 1'b1;
      if (st_valid)  scnt <= scnt + 1'b1;
    end
  end
endmodule
