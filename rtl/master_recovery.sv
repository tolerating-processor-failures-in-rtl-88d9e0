// master_recovery: recovery sequencer of the master core.
//
// A NACK from the slave (ack_valid with ok low) means the interval after the
// last acknowledged fingerprint cannot be trusted. The master then:
//   1. stops its core and refuses external inputs, moves to a new epoch, and
//      starts the reverse replay of its cache log, which holds the previous
//      values of every block written since the last acknowledged fingerprint
//      (`log_replay`, `vf_clear`);
//   2. writes each register of the slave's checkpoint, as it arrives on
//      ck_valid/ck_idx/ck_data, into its own register file (rrf_we...);
//   3. once the log is undone and all NREGS registers have arrived, sends a
//      restart message carrying the logical time ts+1 and resumes its core in
//      the next cycle; the slave resumes when its timestamp reaches that value.
// `core_run` is low from the NACK to the resume.
// From the source design: recovery on NACK, state taken from the slave's
// checkpoint, and a restart message (Figure 5). Own choices: undoing the
// master's cache with its own log, the epoch bit and the restart timestamp.
// Lint note: the sequence number of an acknowledgement is not read here;
// acknowledgements arrive in order and only ok/not-ok matters.
module master_recovery
  import lacross_pkg::*;
#(
  parameter int unsigned NREGS = 32,
  parameter int unsigned REG_W = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ack_valid,
  input  ack_msg_t                 ack_msg,
  input  logic [TS_W-1:0]          ts,
  input  logic                     log_busy,
  input  logic                     ck_valid,
  input  logic [$clog2(NREGS)-1:0] ck_idx,
  input  logic [REG_W-1:0]         ck_data,
  output logic                     core_run,
  output logic                     busy,
  output logic                     epoch,
  output logic                     enter,
  output logic                     log_replay,
  output logic                     vf_clear,
  output logic                     rrf_we,
  output logic [$clog2(NREGS)-1:0] rrf_widx,
  output logic [REG_W-1:0]         rrf_wdata,
  output logic                     restart_valid,
  output restart_msg_t             restart_msg
);
  typedef enum logic [1:0] {M_RUN, M_UNDO, M_LOAD} state_e;
  state_e state;
  logic   nack;
  logic [$clog2(NREGS+1)-1:0] nrcv;
  logic   done;

  assign nack          = ack_valid && !ack_msg.ok;
  assign enter         = (state == M_RUN) && nack;
  assign core_run      = (state == M_RUN) && !nack;
  assign busy          = (state != M_RUN);
  assign log_replay    = enter;
  assign vf_clear      = enter;
  assign rrf_we        = busy && ck_valid;
  assign rrf_widx      = ck_idx;
  assign rrf_wdata     = ck_data;
  assign done          = (state == M_LOAD) && (nrcv == $bits(nrcv)'(NREGS));
  assign restart_valid = done;
  assign restart_msg   = '{ts: ts + 1'b1};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= M_RUN;
      epoch <= 1'b0;
      nrcv  <= '0;
    end else begin
      if (busy && ck_valid) nrcv <= nrcv + 1'b1;
      case (state)
        M_RUN: if (nack) begin
          state <= M_UNDO;
          epoch <= ~epoch;
          nrcv  <= '0;
        end
        M_UNDO: if (!log_busy) state <= M_LOAD;
        default: if (done) state <= M_RUN;  // M_LOAD
      endcase
    end
  end
endmodule
