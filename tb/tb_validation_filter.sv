// Testbench for validation_filter: random stores, lookups, region ends and
// acknowledgements against a reference list of per-region block sets.
// Safety: a lookup of any block stored in a region not yet acknowledged must
// hit. Precision: outside the degraded state a hit must name such a block.
// Small sizes make both overflow kinds (entries and regions) happen.
module tb_validation_filter;
  import lacross_pkg::*;
  localparam int unsigned ENTRIES = 8, REGIONS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, novf = 0, nhit = 0, nclr = 0;

  logic clear = 1'b0, st_valid = 1'b0, new_region = 1'b0, ack = 1'b0;
  logic [BLK_W-1:0] st_blk = '0, lk_blk = '0;
  logic lk_hit, ovf_event, degraded;

  typedef bit set_t [int];
  set_t regs[$];      // regs[0] oldest unacknowledged region, last = open one
  int rate = 4;

  validation_filter #(.ENTRIES(ENTRIES), .REGIONS(REGIONS)) dut (
    .clk, .rst_n, .clear, .st_valid, .st_blk, .lk_blk, .lk_hit, .new_region, .ack, .ovf_event, .degraded
  );

  function automatic bit stored(input int b);
    foreach (regs[i]) if (regs[i].exists(b)) return 1'b1;
    return 1'b0;
  endfunction

  always @(negedge clk) begin
    clear      <= ($urandom % 700) == 0;
    st_valid   <= ($urandom % rate) == 0;
    st_blk     <= BLK_W'($urandom % 40);
    lk_blk     <= BLK_W'($urandom % 40);
    new_region <= regs.size() <= REGIONS && ($urandom % 6) == 0;  // the log bounds open regions
    ack        <= regs.size() > 1 && ($urandom % 5) == 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      regs.delete();
      regs.push_back('{default: 0});
    end else begin
      bit s;
      s = stored(int'(lk_blk));
      checks++;
      if (s && !lk_hit) begin failures++; $display("FAIL missed block %0d at %0t st=%0d npend=%0d lost=%0d cur=%0d old=%0d nregs=%0d", lk_blk, $time, dut.state, dut.npend, dut.lost, dut.cur, dut.old, regs.size()); end
      if (!degraded && lk_hit && !s) begin failures++; $display("FAIL false hit on block %0d", lk_blk); end
      if (lk_hit) nhit++;
      if (ovf_event) novf++;
      if (clear) begin
        regs.delete();
        regs.push_back('{default: 0});
        nclr++;
      end else begin
        if (st_valid) regs[regs.size() - 1][int'(st_blk)] = 1'b1;
        if (ack) void'(regs.pop_front());
        if (new_region) regs.push_back('{default: 0});
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    rate = 40;
    repeat (4000) @(posedge clk);
    checks++;
    if (novf == 0 || nhit == 0) begin failures++; $display("FAIL overflows %0d hits %0d", novf, nhit); end
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
