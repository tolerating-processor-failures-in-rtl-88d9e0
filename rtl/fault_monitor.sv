// fault_monitor: permanent-fault detection for one member of a DMR pair.
//
// A permanent fault shows either as fingerprint mismatches that keep recurring
// or as a partner that stops answering. The monitor counts consecutive
// mismatches (a match resets the count) and declares a permanent fault at
// MISMATCH_LIMIT. It also runs a timer while `wait_active` is high (a
// fingerprint or an acknowledgement is awaited); `progress` restarts the timer,
// and TIMEOUT cycles without progress declare a permanent fault. `perm_fault` is
// sticky until reset and puts the surviving core into non-redundant mode;
// `cause` says why.
// From the source design: the two detection criteria and the continuation in
// non-redundant mode. Own choices: the limit, the timeout and the sticky flag.
module fault_monitor #(
  parameter int unsigned MISMATCH_LIMIT = 3,
  parameter int unsigned TIMEOUT        = 2200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       match,
  input  logic       mismatch,
  input  logic       wait_active,
  input  logic       progress,
  output logic       perm_fault,
  output logic [1:0] cause        // 0 none, 1 repeated mismatch, 2 timeout
);
  logic [$clog2(MISMATCH_LIMIT+1)-1:0] mcnt;
  logic [$clog2(TIMEOUT+1)-1:0]        timer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mcnt       <= '0;
      timer      <= '0;
      perm_fault <= 1'b0;
      cause      <= 2'd0;
    end else if (!perm_fault) begin
      if (match) mcnt <= '0;
      else if (mismatch) begin
        mcnt <= mcnt + 1'b1;
        if (mcnt == $bits(mcnt)'(MISMATCH_LIMIT - 1)) begin
          perm_fault <= 1'b1;
          cause      <= 2'd1;
        end
      end
      if (!wait_active || progress) timer <= '0;
      else if (timer == $bits(timer)'(TIMEOUT - 1)) begin
        perm_fault <= 1'b1;
        cause      <= 2'd2;
      end else timer <= timer + 1'b1;
    end
  end
endmodule
