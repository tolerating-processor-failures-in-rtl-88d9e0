// Testbench for interval_ctrl: random retire, store and force pulses against a
// reference pair of counters. `take` is combinational and must be high in the
// very cycle of the INTERVAL-th retire, the STORE_LIMIT-th store or a force;
// restart clears both counts.
module tb_interval_ctrl;
  localparam int unsigned INTERVAL = 9, STORE_LIMIT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic restart = 1'b0, ret_valid = 1'b0, st_valid = 1'b0, force_fp = 1'b0, take;
  int icnt = 0, scnt = 0, ntake = 0;
  logic exp_take;

  interval_ctrl #(.INTERVAL(INTERVAL), .STORE_LIMIT(STORE_LIMIT)) dut (
    .clk, .rst_n, .restart, .ret_valid, .st_valid, .force_fp, .take
  );

  always @(negedge clk) begin
    restart   <= ($urandom % 200) == 0;
    ret_valid <= ($urandom % 2) == 0;
    st_valid  <= ($urandom % 6) == 0;
    force_fp  <= ($urandom % 50) == 0;
  end

  always @(posedge clk) if (rst_n) begin
    exp_take = force_fp || (ret_valid && icnt == INTERVAL - 1) || (st_valid && scnt == STORE_LIMIT - 1);
    checks++;
    if (take !== exp_take) begin
      failures++;
      $display("FAIL take=%0d expected %0d (icnt=%0d scnt=%0d)", take, exp_take, icnt, scnt);
    end
    if (exp_take) ntake++;
    if (restart || exp_take) begin icnt = 0; scnt = 0; end
    else begin icnt += int'(ret_valid); scnt += int'(st_valid); end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5000) @(posedge clk);
    checks++;
    if (ntake < 100) begin failures++; $display("FAIL too few intervals"); end
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
