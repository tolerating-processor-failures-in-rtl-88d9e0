// credit_return: slave side of the credit-debit flow control.
//
// Counts the inputs delivered to the slave core and, every PERIOD cycles,
// sends the master a report with the current number of free slots in the
// slave's send buffer and that running delivery count (see credit_counter).
// The report is one cycle long on rpt_valid; the link is assumed to accept it.
// From the source design: the slave periodically informing the master of the
// space in its send buffers. Own choices: the period and the report contents.
module credit_return
  import lacross_pkg::*;
#(
  parameter int unsigned PERIOD = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             delivered,      // one input delivered to the slave core
  input  logic [CNT_W-1:0] free_slots,
  output logic             rpt_valid,
  output credit_msg_t      rpt_msg
);
  logic [$clog2(PERIOD)-1:0] t;
  logic [CNT_W-1:0]          dlv_total;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t         <= '0;
      dlv_total <= '0;
      rpt_valid <= 1'b0;
      rpt_msg   <= '0;
    end else begin
      rpt_valid <= 1'b0;
      if (delivered) dlv_total <= dlv_total + 1'b1;
      if (t == $bits(t)'(PERIOD - 1)) begin
        t         <= '0;
        rpt_valid <= 1'b1;
        rpt_msg   <= '{free_slots: free_slots, delivered: dlv_total + CNT_W'(delivered)};
      end else t <= t + 1'b1;
    end
  end
endmodule
