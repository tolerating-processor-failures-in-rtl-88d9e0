// fingerprint_gen: 16-bit fingerprint of a core's architectural-state updates.
//
// Every retired update word (upd_valid/upd_data) is folded into a running
// CRC-16 (polynomial x^16+x^12+x^5+1, initial value 16'hFFFF), all 64 bits in
// one cycle, most significant bit first. `snap` closes the interval: the CRC
// including the update of the same cycle is registered on `fp` with `fp_valid`
// high for one cycle, and the running value restarts from the initial value.
// `restart` (recovery) discards the running value. `fp_now` shows the
// fingerprint the current cycle would close with, for a same-cycle comparison. Master and slave build
// identical fingerprints when they retire identical update streams.
// From the source design: a 16-bit hash of updates to architectural state,
// one per checkpoint interval. Own choice: the hash is CRC-16-CCITT.
module fingerprint_gen
  import lacross_pkg::*;
#(
  parameter int unsigned DATA_W = PAYLOAD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              upd_valid,
  input  logic [DATA_W-1:0] upd_data,
  input  logic              snap,
  output logic              fp_valid,
  output logic [FP_W-1:0]   fp,
  output logic [FP_W-1:0]   fp_now    // fingerprint if snap were high now
);
  localparam logic [15:0] POLY = 16'h1021;
  localparam logic [15:0] INIT = 16'hFFFF;

  logic [15:0] crc, crc_upd, crc_now;

  always_comb begin
    crc_upd = crc;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      if (crc_upd[15] ^ upd_data[i]) crc_upd = {crc_upd[14:0], 1'b0} ^ POLY;
      else                           crc_upd = {crc_upd[14:0], 1'b0};
    end
    crc_now = upd_valid ? crc_upd : crc;
  end

  assign fp_now = FP_W'(crc_now);

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      crc      <= INIT;
      fp_valid <= 1'b0;
      fp       <= '0;
    end else begin
      fp_valid <= snap;
      if (snap) begin
        fp  <= FP_W'(crc_now);
        crc <= INIT;
      end else begin
        crc <= crc_now;
      end
    end
  end
endmodule
