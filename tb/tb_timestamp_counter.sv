// Testbench for timestamp_counter: random enable/tick stimulus against a
// reference count. Checks that `running` rises after exactly LAG enabled ticks
// and that ts then increments once per enabled tick and never otherwise.
module tb_timestamp_counter;
  import lacross_pkg::*;
  localparam int unsigned LAG = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable = 1'b0, tick = 1'b0, running;
  logic [TS_W-1:0] ts;
  int m_lag = 0, m_ts = 0;
  logic m_run = 1'b0;

  timestamp_counter #(.LAG(LAG)) dut (.clk, .rst_n, .enable, .tick, .running, .ts);

  always @(negedge clk) begin
    enable <= ($urandom % 8) != 0;
    tick   <= ($urandom % 3) != 0;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (running !== m_run || int'(ts) != m_ts) begin
      failures++;
      $display("FAIL running=%0d/%0d ts=%0d/%0d", running, m_run, ts, m_ts);
    end
    if (enable && tick) begin
      if (m_run) m_ts++;
      else if (m_lag == LAG - 1) m_run = 1'b1;
      else m_lag++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    checks++;
    if (!m_run) begin failures++; $display("FAIL counter never started"); end
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
