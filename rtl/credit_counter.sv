// credit_counter: master side of the credit-debit flow control.
//
// In many interconnect flow-control disciplines a node may accept a message
// only if it can send the response. In a LACROSS pair the master receives but
// the slave sends, so the master cannot see back-pressure at the slave. The
// slave periodically reports the free slots of its send buffer and how many
// inputs it has taken so far. The master counts the inputs it has accepted
// (`accepted`); inputs it accepted that the slave had not yet taken may each
// still need a slot, so the conservative credit is
//   credit = free_slots - (accepted_total - delivered_total) - RESERVE
// and `accept_ok` is high while the credit is positive. Before the first report
// the slave's buffer is assumed empty (INIT_FREE slots).
// From the source design: the periodic report of free send-buffer space and the
// conservative stop. Own choices: the report contents and the reserve.
module credit_counter
  import lacross_pkg::*;
#(
  parameter int unsigned INIT_FREE = 16,
  parameter int unsigned RESERVE   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        accepted,
  input  logic        rpt_valid,
  input  credit_msg_t rpt_msg,
  output logic        accept_ok,
  output logic signed [CNT_W:0] credit
);
  logic [CNT_W-1:0] acc_total;
  logic [CNT_W-1:0] free_q, dlv_q;
  logic [CNT_W-1:0] in_flight;

  assign in_flight = acc_total - dlv_q;
  assign credit    = $signed({1'b0, free_q}) - $signed({1'b0, in_flight})
                   - $signed((CNT_W+1)'(RESERVE));
  assign accept_ok = (credit > 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_total <= '0;
      free_q    <= CNT_W'(INIT_FREE);
      dlv_q     <= '0;
    end else begin
      if (accepted) acc_total <= acc_total + 1'b1;
      if (rpt_valid) begin
        free_q <= rpt_msg.free_slots;
        dlv_q  <= rpt_msg.delivered;
      end
    end
  end
endmodule
