// Testbench for release_ctrl (combinational, driven once per bench clock
// cycle): random outputs of every class,
// filter verdicts, network back-pressure and solo mode. Checks the release
// rule (shared reads and dirty replies that miss the filter go out directly,
// the rest wait for the slave), the forwarded copy, the forced interval end
// and the filter bypass count.
module tb_release_ctrl;
  import lacross_pkg::*;
  int checks = 0, failures = 0, ndir = 0, nheld = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic epoch, solo, out_valid, out_ready, lk_hit, net_valid, net_ready, fwd_valid, force_fp, vf_bypass;
  out_msg_t out_msg, net_msg;
  fwd_msg_t fwd_msg;
  logic [BLK_W-1:0] lk_blk;

  release_ctrl dut (
    .epoch, .solo, .out_valid, .out_msg, .out_ready, .lk_blk, .lk_hit,
    .net_valid, .net_msg, .net_ready, .fwd_valid, .fwd_msg, .force_fp, .vf_bypass
  );

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic direct, fire;
      @(negedge clk);
      epoch     = 1'($urandom);
      solo      = ($urandom % 10) == 0;
      out_valid = ($urandom % 4) != 0;
      out_msg   = '{cls: out_class_e'($urandom % 5), blk: BLK_W'({$urandom, $urandom}), data: {$urandom, $urandom}};
      lk_hit    = 1'($urandom);
      net_ready = ($urandom % 3) != 0;
      #1;
      direct = solo || out_msg.cls == OUT_READ_SHARED || (out_msg.cls == OUT_DIRTY_REPLY && !lk_hit);
      fire   = out_valid && (direct ? net_ready : 1'b1);
      checks++;
      if (lk_blk !== out_msg.blk || out_ready !== (!direct || net_ready)
          || net_valid !== (out_valid && direct) || (net_valid && net_msg !== out_msg)
          || fwd_valid !== (fire && !solo)
          || (fwd_valid && fwd_msg !== '{epoch: epoch, slave_release: !direct, out: out_msg})
          || force_fp !== (fire && !direct)
          || vf_bypass !== (fire && !solo && out_msg.cls == OUT_DIRTY_REPLY && !lk_hit)) begin
        failures++;
        $display("FAIL cls=%0d hit=%0d solo=%0d: ready=%0d net=%0d fwd=%0d force=%0d bypass=%0d",
                 out_msg.cls, lk_hit, solo, out_ready, net_valid, fwd_valid, force_fp, vf_bypass);
      end
      if (fire && direct) ndir++;
      if (fire && !direct) nheld++;
    end
    checks++;
    if (ndir == 0 || nheld == 0) begin failures++; $display("FAIL direct %0d held %0d", ndir, nheld); end
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
