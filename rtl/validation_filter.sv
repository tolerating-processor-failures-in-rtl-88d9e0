// validation_filter: master-side record of cache blocks written but not yet
// covered by an acknowledged fingerprint.
//
// A dirty block whose last store is already covered by a matching fingerprint
// is known to be error-free, so the master may answer a remote read for it
// directly instead of routing the reply through the slave. The filter holds
// ENTRIES fully associative entries {valid, region, block}. A region is one
// checkpoint interval; regions form a ring of REGIONS, the newest (`cur`) collects
// the stores of the interval in progress and the oldest waits for the next
// acknowledgement. Events:
//   st_valid    store: insert its block into the newest region unless it is
//               already there;
//   lk_blk      snoop for a remote dirty read: lk_hit is high (combinational) if
//               the block is in any outstanding region, i.e. the reply must be
//               corroborated by the slave;
//   new_region  a fingerprint was sent: the newest region closes, a new one opens;
//   ack         a fingerprint acknowledgement: the oldest region is cleared.
// Overflow (no free entry for a store, or no free region for a new interval)
// clears the filter; lk_hit is then forced high. Logging restarts at the start
// of the next interval, and normal lookups resume once every fingerprint sent
// before logging restarted has been acknowledged. `clear` (recovery) empties it.
// From the source design: the three events, region-wise clearing, fully
// associative lookup, 64 entries, and the overflow procedure. Own choices: the
// number of regions (32), overflow when regions run out, and also waiting for the
// fingerprint that closes the interval in which the overflow happened, whose
// stores were not all logged.
module validation_filter
  import lacross_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned REGIONS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             st_valid,
  input  logic [BLK_W-1:0] st_blk,
  input  logic [BLK_W-1:0] lk_blk,
  output logic             lk_hit,
  input  logic             new_region,
  input  logic             ack,
  output logic             ovf_event,   // one-cycle pulse on each overflow
  output logic             degraded     // lookups forced to hit
);
  localparam int unsigned RW = (REGIONS > 1) ? $clog2(REGIONS) : 1;
  localparam int unsigned EW = $clog2(ENTRIES);

  typedef enum logic [1:0] {VF_NORMAL, VF_OVF_WAIT, VF_OVF_DRAIN} vf_state_e;
  vf_state_e state;

  logic             vld [ENTRIES];
  logic [RW-1:0]    reg_of [ENTRIES];
  logic [BLK_W-1:0] blk_of [ENTRIES];
  logic [RW-1:0]    cur, old;
  logic [RW:0]      npend;          // closed regions awaiting acknowledgement
  logic [RW+1:0]    lost;           // acknowledgements to absorb after overflow

  logic          lk_match, in_cur, have_free;
  logic [EW-1:0] free_idx;
  logic          logging, need_insert, ovf_store, ovf_region;

  always_comb begin
    lk_match  = 1'b0;
    in_cur    = 1'b0;
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (vld[i] && blk_of[i] == lk_blk) lk_match = 1'b1;
      if (vld[i] && blk_of[i] == st_blk && reg_of[i] == cur) in_cur = 1'b1;
      if (!vld[i] && !have_free) begin
        have_free = 1'b1;
        free_idx  = EW'(i);
      end
    end
  end

  assign logging     = (state != VF_OVF_WAIT);
  assign need_insert = st_valid && logging && !in_cur;
  assign ovf_store   = need_insert && !have_free;
  assign ovf_region  = new_region && logging && (npend == (RW+1)'(REGIONS - 1));
  assign lk_hit      = lk_match || (state != VF_NORMAL);
  assign degraded    = (state != VF_NORMAL);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < ENTRIES; i++) vld[i] <= 1'b0;
      state     <= VF_NORMAL;
      cur       <= '0;
      old       <= '0;
      npend     <= '0;
      lost      <= '0;
      ovf_event <= 1'b0;
    end else begin
      ovf_event <= ovf_store || ovf_region;
      if (ovf_store || ovf_region) begin
        // Clear everything; acknowledgements still due for closed regions (and
        // for the interval being closed now, if any) are absorbed later.
        for (int i = 0; i < ENTRIES; i++) vld[i] <= 1'b0;
        lost  <= lost + (RW+2)'(npend) - (RW+2)'(ack && lost == 0 && npend != 0)
                 - (RW+2)'(ack && lost != 0) + (RW+2)'(new_region);
        npend <= '0;
        old   <= cur;
        state <= new_region ? VF_OVF_DRAIN : VF_OVF_WAIT;
      end else begin
        // acknowledgement: clear the oldest region, or absorb a lost one
        if (ack) begin
          if (lost != 0) lost <= lost - 1'b1;
          else if (npend != 0) begin
            for (int i = 0; i < ENTRIES; i++)
              if (reg_of[i] == old) vld[i] <= 1'b0;
            old <= old + 1'b1;
          end
        end
        if (need_insert) begin
          vld[free_idx]    <= 1'b1;
          reg_of[free_idx] <= cur;
          blk_of[free_idx] <= st_blk;
        end
        case (state)
          VF_NORMAL: begin
            if (new_region) cur <= cur + 1'b1;
            npend <= npend + (RW+1)'(new_region) - (RW+1)'(ack && lost == 0 && npend != 0);
          end
          VF_OVF_WAIT: begin
            // the interval in progress had unlogged stores: its fingerprint is lost too
            if (new_region) begin
              lost  <= lost + 1'b1 - (RW+2)'(ack && lost != 0);
              state <= VF_OVF_DRAIN;
            end
          end
          default: begin  // VF_OVF_DRAIN
            if (new_region) cur <= cur + 1'b1;
            npend <= npend + (RW+1)'(new_region) - (RW+1)'(ack && lost == 0 && npend != 0);
            if (lost == 0 || (lost == 1 && ack)) state <= VF_NORMAL;
          end
        endcase
      end
    end
  end
endmodule
