// Testbench for fault_monitor: random match/mismatch/progress streams against
// a reference. MISMATCH_LIMIT consecutive mismatches (no match between) give
// cause 1; TIMEOUT cycles of waiting without progress give cause 2. The
// verdict is sticky until reset, and the bench resets it many times.
module tb_fault_monitor;
  localparam int unsigned LIMIT = 3, TMO = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic match = 1'b0, mismatch = 1'b0, wait_active = 1'b0, progress = 1'b0;
  logic perm_fault;
  logic [1:0] cause;
  int mc = 0, tm = 0, n1 = 0, n2 = 0;
  logic m_pf = 1'b0;
  logic [1:0] m_cause = 2'd0;
  int mode = 0;

  fault_monitor #(.MISMATCH_LIMIT(LIMIT), .TIMEOUT(TMO)) dut (
    .clk, .rst_n, .match, .mismatch, .wait_active, .progress, .perm_fault, .cause
  );

  always @(negedge clk) begin
    match       <= ($urandom % 6) == 0;
    mismatch    <= ($urandom % (mode ? 40 : 3)) == 0;
    wait_active <= ($urandom % (mode ? 500 : 10)) != 0;
    progress    <= ($urandom % (mode ? 200 : 30)) == 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      mc = 0; tm = 0; m_pf = 1'b0; m_cause = 2'd0;
    end else begin
      checks++;
      if (perm_fault !== m_pf || cause !== m_cause) begin
        failures++;
        $display("FAIL perm_fault=%0d/%0d cause=%0d/%0d", perm_fault, m_pf, cause, m_cause);
      end
      if (!m_pf) begin
        if (match) mc = 0;
        else if (mismatch) begin
          if (mc == LIMIT - 1) begin m_pf = 1'b1; m_cause = 2'd1; n1++; end
          mc++;
        end
        if (!wait_active || progress) tm = 0;
        else if (tm == TMO - 1) begin m_pf = 1'b1; m_cause = 2'd2; n2++; end
        else tm++;
      end
    end
  end

  initial begin
    for (int r = 0; r < 60; r++) begin
      mode = r % 2;
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      repeat (300) @(posedge clk);
    end
    checks++;
    if (n1 == 0 || n2 == 0) begin failures++; $display("FAIL causes seen: %0d %0d", n1, n2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
