// Testbench for drift_monitor: random arrival timestamps around the slave's
// local time. Checks the registered slack, the late error (slack <= 0) and the
// slow-down request hysteresis (set below MARGIN, cleared at 2*MARGIN).
module tb_drift_monitor;
  import lacross_pkg::*;
  localparam int unsigned MARGIN = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [TS_W-1:0] ts = '0, arr_ts = '0;
  logic arr_valid = 1'b0, slow_req, late_err;
  logic signed [TS_W:0] slack;
  logic m_slow = 1'b0, m_late = 1'b0;
  longint m_slack = 0, s;
  int nslow = 0, nlate = 0;

  drift_monitor #(.MARGIN(MARGIN)) dut (.clk, .rst_n, .ts, .arr_valid, .arr_ts, .slow_req, .late_err, .slack);

  always @(negedge clk) begin
    ts        <= ts + TS_W'($urandom % 2);
    arr_valid <= ($urandom % 3) == 0;
    arr_ts    <= ts + TS_W'(1000) - TS_W'(1000 - 5 + ($urandom % 60));
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (slow_req !== m_slow || late_err !== m_late || longint'(slack) != m_slack) begin
      failures++;
      $display("FAIL slow=%0d/%0d late=%0d/%0d slack=%0d/%0d", slow_req, m_slow, late_err, m_late, slack, m_slack);
    end
    m_late = 1'b0;
    if (arr_valid) begin
      s = longint'(arr_ts) - longint'(ts);
      m_slack = s;
      if (s <= 0) begin m_late = 1'b1; nlate++; end
      if (s < longint'(MARGIN)) m_slow = 1'b1;
      else if (s >= 2 * longint'(MARGIN)) m_slow = 1'b0;
    end
    if (m_slow) nslow++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    checks++;
    if (nslow == 0 || nlate == 0) begin failures++; $display("FAIL no slow/late seen"); end
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
