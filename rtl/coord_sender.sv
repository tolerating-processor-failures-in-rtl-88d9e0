// coord_sender: master-side input coordination.
//
// Every external input to the logical processor (coherence activity, refills,
// uncached load values, interrupts) goes to the master only. The cycle an input
// is accepted it is delivered to the master core and a coordination message,
// the input plus the master's current timestamp (its delivery time), is queued
// for the slave. The queue drains onto the master-to-slave link with a
// valid/ready handshake. An input is accepted only when `accept_ok` is high
// (flow-control credit available and no recovery in progress) and the message
// queue has room; `in_ready` tells the sender.
// From the source design: the timestamped coordination message and its routing
// to the master only. Own choices: one input per cycle and the DEPTH-entry
// queue in front of the link.
// Lint note: the FIFO count pin is left open on purpose.
module coord_sender
  import lacross_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] ts,          // master timestamp
  input  logic            accept_ok,
  // external input
  input  logic            in_valid,
  input  ext_in_t         in_data,
  output logic            in_ready,
  // delivery to the master core
  output logic            core_valid,
  output ext_in_t         core_data,
  // coordination message towards the slave
  output logic            coord_valid,
  output coord_msg_t      coord_msg,
  input  logic            coord_ready
);
  logic full, empty;
  logic accept;
  coord_msg_t msg_in;

  assign in_ready   = accept_ok && !full;
  assign accept     = in_valid && in_ready;
  assign core_valid = accept;
  assign core_data  = in_data;
  assign msg_in     = '{ts: ts, payload: in_data.payload};

  sync_fifo #(.WIDTH($bits(coord_msg_t)), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .flush(1'b0),
    .push(accept), .din(msg_in),
    .pop(coord_ready && !empty), .dout(coord_msg),
    .empty, .full, .count()
  );
  assign coord_valid = !empty;
endmodule
