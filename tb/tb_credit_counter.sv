// Testbench for credit_counter: random accepts and credit reports. Checks the
// credit formula free - (accepted - delivered) - RESERVE against a reference
// and that accept_ok is exactly credit > 0.
module tb_credit_counter;
  import lacross_pkg::*;
  localparam int unsigned INIT_FREE = 6, RESERVE = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nstall = 0;

  logic accepted = 1'b0, rpt_valid = 1'b0, accept_ok;
  credit_msg_t rpt_msg = '0;
  logic signed [CNT_W:0] credit;
  int acc = 0, free_q = INIT_FREE, dlv_q = 0, dlv = 0, exp_c;

  credit_counter #(.INIT_FREE(INIT_FREE), .RESERVE(RESERVE)) dut (
    .clk, .rst_n, .accepted, .rpt_valid, .rpt_msg, .accept_ok, .credit
  );

  always @(negedge clk) begin
    accepted  <= accept_ok && ($urandom % 2) == 0;
    // the receiver delivers some of the accepted inputs and reports later
    if (dlv < acc && ($urandom % 3) == 0) dlv = dlv + 1;
    rpt_valid <= ($urandom % 7) == 0;
    rpt_msg   <= '{free_slots: CNT_W'(INIT_FREE - ($urandom % 3)), delivered: CNT_W'(dlv)};
  end

  always @(posedge clk) if (rst_n) begin
    exp_c = free_q - (acc - dlv_q) - RESERVE;
    checks++;
    if (int'(credit) != exp_c || accept_ok !== (exp_c > 0)) begin
      failures++; $display("FAIL credit=%0d expected %0d ok=%0d", credit, exp_c, accept_ok);
    end
    if (!accept_ok) nstall++;
    if (accepted) acc++;
    if (rpt_valid) begin free_q = int'(rpt_msg.free_slots); dlv_q = int'(rpt_msg.delivered); end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    checks++;
    if (nstall == 0) begin failures++; $display("FAIL never out of credit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
