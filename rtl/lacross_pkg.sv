// lacross_pkg: types and constants shared by the LACROSS distributed-DMR
// node-controller extensions.
//
// A LACROSS pair is two processor cores on different DSM nodes running the same
// instruction stream. The master receives all external inputs and forwards
// each one, stamped with its delivery time, to the slave, which runs a fixed
// lag behind and takes the input at the same local time. Fingerprints (16-bit
// hashes of architectural updates) are compared at the slave; each match is a
// new checkpoint, a mismatch starts a rollback of both cores.
//
// From the source design: the 16-bit fingerprint, the 550-cycle master-to-slave
// lag, the 64-entry validation filter, the 64-byte coherence unit and the kinds
// of output that must be corroborated. This implementation's own choices: field
// widths, sequence numbers and epochs on link messages, and the message formats.
// Lint note: M2S_DELAY is used only as a default by the modules that import
// the package, so a lint of the package alone reports it unused.
package lacross_pkg;

  parameter int unsigned TS_W      = 32;   // local timestamp width
  parameter int unsigned FP_W      = 16;   // fingerprint width
  parameter int unsigned PAYLOAD_W = 64;   // payload word of a message
  parameter int unsigned BLK_W     = 34;   // cache-block address (40-bit PA, 64-byte blocks)
  parameter int unsigned SEQ_W     = 8;    // fingerprint sequence number
  parameter int unsigned M2S_DELAY = 550;  // master-to-slave lag, processor cycles

  // Kinds of output a core emits towards the system.
  typedef enum logic [2:0] {
    OUT_READ_SHARED = 3'd0,  // request for a shared copy: no irreversible effect
    OUT_READ_EXCL   = 3'd1,  // request for a writable copy: transfers ownership
    OUT_IO          = 3'd2,  // non-idempotent access to a device register
    OUT_DIRTY_REPLY = 3'd3,  // reply with dirty data to a remote read
    OUT_OTHER       = 3'd4   // anything else that changes system state
  } out_class_e;

  // External input delivered to the logical processor.
  typedef struct packed {
    logic [PAYLOAD_W-1:0] payload;
  } ext_in_t;

  // Coordination message: an input and the master's delivery time.
  typedef struct packed {
    logic [TS_W-1:0]      ts;
    logic [PAYLOAD_W-1:0] payload;
  } coord_msg_t;

  // Fingerprint sent by the master to the slave.
  typedef struct packed {
    logic             epoch;
    logic [SEQ_W-1:0] seq;
    logic [FP_W-1:0]  fp;
  } fp_msg_t;

  // Fingerprint acknowledgement (ok=1) or negative acknowledgement (ok=0).
  typedef struct packed {
    logic [SEQ_W-1:0] seq;
    logic             ok;
  } ack_msg_t;

  // Output of a core towards the system.
  typedef struct packed {
    out_class_e           cls;
    logic [BLK_W-1:0]     blk;
    logic [PAYLOAD_W-1:0] data;
  } out_msg_t;

  // Output forwarded by the master to the slave for corroboration.
  typedef struct packed {
    logic     epoch;
    logic     slave_release;  // 1: the slave releases it after corroboration
    out_msg_t out;
  } fwd_msg_t;

  // Restart message: logical time at which both cores resume.
  typedef struct packed {
    logic [TS_W-1:0] ts;
  } restart_msg_t;

  // Credit report from the slave: free send-buffer slots and the running count
  // of inputs delivered to the slave core.
  parameter int unsigned CNT_W = 16;
  typedef struct packed {
    logic [CNT_W-1:0] free_slots;
    logic [CNT_W-1:0] delivered;
  } credit_msg_t;

endpackage
