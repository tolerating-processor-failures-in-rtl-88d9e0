// Testbench for credit_return: random delivery pulses and free-slot counts.
// A report must appear every PERIOD cycles carrying the free slots of the
// cycle before and the running delivery total including that cycle.
module tb_credit_return;
  import lacross_pkg::*;
  localparam int unsigned PERIOD = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nrpt = 0;

  logic delivered = 1'b0, rpt_valid;
  logic [CNT_W-1:0] free_slots = '0;
  credit_msg_t rpt_msg;
  int t = 0, total = 0;
  logic e_valid = 1'b0;
  credit_msg_t e_msg = '0;

  credit_return #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .delivered, .free_slots, .rpt_valid, .rpt_msg);

  always @(negedge clk) begin
    delivered  <= ($urandom % 2) == 0;
    free_slots <= CNT_W'($urandom % 40);
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (rpt_valid !== e_valid || (e_valid && rpt_msg !== e_msg)) begin
      failures++; $display("FAIL report %0d %h expected %0d %h", rpt_valid, rpt_msg, e_valid, e_msg);
    end
    if (rpt_valid) nrpt++;
    total += int'(delivered);
    e_valid = (t == PERIOD - 1);
    if (e_valid) e_msg = '{free_slots: free_slots, delivered: CNT_W'(total)};
    t = (t == PERIOD - 1) ? 0 : t + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    checks++;
    if (nrpt < 200) begin failures++; $display("FAIL too few reports"); end
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
