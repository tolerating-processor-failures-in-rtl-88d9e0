// gated_delivery_queue: slave-side holding queue for coordination messages.
//
// Coordination messages reach the slave ahead of time, possibly out of order.
// Each arriving message is stored in a free slot of a DEPTH-entry buffer. Every
// cycle the entry with the smallest delivery time is selected (a linear minimum
// search, so the buffer is sorted by delivery time as the source design asks for
// out-of-order networks). When the slave's local timestamp equals that delivery
// time and the slave core ticks, the payload is delivered to the core and the
// slot freed. An entry whose delivery time has already passed is dropped and
// reported on `late` (lockstep lost). `flush` empties the queue.
// Interface: arrival valid/ready, delivery valid (one cycle per message).
// From the source design: holding messages until the designated delivery time
// and sorting by delivery time. Own choices: buffer size and the minimum search.
module gated_delivery_queue
  import lacross_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  input  logic [TS_W-1:0] ts,        // slave local timestamp
  input  logic            tick,      // slave core advances this cycle
  input  logic            arr_valid,
  input  coord_msg_t      arr_msg,
  output logic            arr_ready,
  output logic            dlv_valid,
  output ext_in_t         dlv_data,
  output logic            late,
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic       vld [DEPTH];
  coord_msg_t ent [DEPTH];

  logic          have_min, have_free;
  logic [IW-1:0] min_idx, free_idx;

  always_comb begin
    have_min  = 1'b0;
    min_idx   = '0;
    have_free = 1'b0;
    free_idx  = '0;
    occupancy = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (vld[i]) begin
        occupancy = occupancy + 1'b1;
        if (!have_min || (ent[i].ts < ent[min_idx].ts)) begin
          have_min = 1'b1;
          min_idx  = IW'(i);
        end
      end else if (!have_free) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
    end
  end

  assign arr_ready = have_free;
  assign dlv_valid = have_min && tick && (ent[min_idx].ts == ts);
  assign dlv_data  = '{payload: ent[min_idx].payload};
  assign late      = have_min && (ent[min_idx].ts < ts);

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      for (int i = 0; i < DEPTH; i++) vld[i] <= 1'b0;
    end else begin
      if (dlv_valid || late) vld[min_idx] <= 1'b0;
      if (arr_valid && have_free) begin
        vld[free_idx] <= 1'b1;
        ent[free_idx] <= arr_msg;
      end
    end
  end
endmodule
