// slave_recovery: recovery sequencer of the slave core.
//
// The slave compares fingerprints and keeps the pair's only verified
// checkpoint, so it leads recovery. On `error` (a fingerprint mismatch, or an
// output that differs from the master's) it:
//   1. stops its core, moves to a new epoch (stale master messages are then
//      ignored), and raises `nack_req` for one cycle if the error was not a
//      fingerprint mismatch (a mismatch is already answered by a NACK);
//   2. restores its registers from the checkpoint in one cycle (`rrf_restore`)
//      and starts the reverse replay of its cache log (`log_replay`);
//   3. sends the register checkpoint to the master, one register per cycle on
//      ck_valid/ck_idx (the data is read from the shadow copy by the caller);
//   4. waits, idle, for the master's restart message and resumes its core when
//      its own timestamp reaches the logical time the master resumed at.
// `core_run` is low from the cycle after the error to the resume. `busy` is high meanwhile.
// From the source design: the order NACK, restore, send checkpoint, idle until
// restart (Figure 5). Own choices: the epoch bit, one register per cycle, and
// resuming at the master's restart timestamp to keep the fixed lag.
module slave_recovery
  import lacross_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     fp_mismatch,
  input  logic                     out_err,
  input  logic [TS_W-1:0]          ts,
  input  logic                     log_busy,
  input  logic                     restart_valid,
  input  restart_msg_t             restart_msg,
  output logic                     core_run,
  output logic                     busy,
  output logic                     epoch,
  output logic                     nack_req,
  output logic                     enter,        // one-cycle pulse on entry
  output logic                     rrf_restore,
  output logic                     log_replay,
  output logic                     ck_valid,
  output logic [$clog2(NREGS)-1:0] ck_idx
);
  typedef enum logic [2:0] {S_RUN, S_RESTORE, S_SEND, S_IDLE, S_WAIT_TS} state_e;
  state_e state;
  logic [TS_W-1:0] resume_ts;
  logic            error;

  assign error       = fp_mismatch || out_err;
  assign core_run    = (state == S_RUN) || (state == S_WAIT_TS && ts >= resume_ts);
  assign busy        = (state != S_RUN);
  assign enter       = (state == S_RUN) && error;
  assign nack_req    = (state == S_RUN) && out_err && !fp_mismatch;
  assign rrf_restore = (state == S_RESTORE);
  assign log_replay  = (state == S_RESTORE);
  assign ck_valid    = (state == S_SEND);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_RUN;
      epoch     <= 1'b0;
      ck_idx    <= '0;
      resume_ts <= '0;
    end else begin
      case (state)
        S_RUN: if (error) begin
          state <= S_RESTORE;
          epoch <= ~epoch;
        end
        S_RESTORE: begin
          state  <= S_SEND;
          ck_idx <= '0;
        end
        S_SEND: begin
          if (ck_idx == $bits(ck_idx)'(NREGS - 1)) state <= S_IDLE;
          ck_idx <= ck_idx + 1'b1;
        end
        S_IDLE: if (restart_valid && !log_busy) begin
          resume_ts <= restart_msg.ts;
          state     <= S_WAIT_TS;
        end
        default: if (ts >= resume_ts) state <= S_RUN;  // S_WAIT_TS
      endcase
    end
  end
endmodule
