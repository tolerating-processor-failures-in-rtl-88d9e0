// Testbench for output_corroborator: the master's forwarded outputs arrive
// (some from a stale epoch), the slave produces the same outputs with rare
// corruption, and fingerprint match/mismatch pulses arrive at random. A
// reference model checks the comparison error, the forced interval end, the
// held outputs released only after a match (dropped after a mismatch), the
// network order, the free-slot count, and solo pass-through.
module tb_output_corroborator;
  import lacross_pkg::*;
  localparam int unsigned FWD_DEPTH = 8, SEND_DEPTH = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nerr = 0, nsent = 0, nheld = 0;

  logic flush = 1'b0, epoch = 1'b0, solo = 1'b0, fwd_valid = 1'b0, out_valid = 1'b0;
  logic match = 1'b0, mismatch = 1'b0, net_ready = 1'b0;
  fwd_msg_t fwd_msg = '0;
  out_msg_t out_msg = '0, net_msg;
  logic out_ready, out_err, force_fp, net_valid;
  logic [$clog2(SEND_DEPTH+1)-1:0] free_slots;

  fwd_msg_t fq[$];
  out_msg_t ver[$], unv[$];

  output_corroborator #(.FWD_DEPTH(FWD_DEPTH), .SEND_DEPTH(SEND_DEPTH)) dut (
    .clk, .rst_n, .flush, .epoch, .solo, .fwd_valid, .fwd_msg, .out_valid, .out_msg, .out_ready,
    .out_err, .force_fp, .match, .mismatch, .net_valid, .net_msg, .net_ready, .free_slots
  );

  function automatic out_msg_t rnd_out();
    return '{cls: out_class_e'($urandom % 5), blk: BLK_W'($urandom), data: {$urandom, $urandom}};
  endfunction

  always @(negedge clk) begin
    fwd_valid <= fq.size() < FWD_DEPTH - 1 && ($urandom % 3) == 0;
    fwd_msg   <= '{epoch: (($urandom % 15) == 0) ? !epoch : epoch, slave_release: 1'($urandom), out: rnd_out()};
    out_valid <= fq.size() > 0 && ($urandom % 3) == 0;
    out_msg   <= (fq.size() > 0 && ($urandom % 40) != 0) ? fq[0].out : rnd_out();
    match     <= ($urandom % 8) == 0;
    mismatch  <= ($urandom % 60) == 0;
    net_ready <= ($urandom % 3) != 0;
    if (($urandom % 400) == 0) begin flush <= 1'b1; epoch <= !epoch; end
    else flush <= 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    logic fe, ok, rdy, fire, enq, ffp, err, nv, pop;
    int free;
    out_msg_t nm;
    fe   = fq.size() == 0;
    free = SEND_DEPTH - ver.size() - unv.size();
    ok   = !fe && fq[0].out == out_msg;
    rdy  = solo ? net_ready : free != 0;
    fire = out_valid && rdy && !solo;
    enq  = fire && ok && fq[0].slave_release;
    ffp  = fire && !fe && fq[0].slave_release;
    err  = fire && !ok;
    nv   = solo ? out_valid : ver.size() != 0;
    nm   = solo ? out_msg : (ver.size() != 0 ? ver[0] : net_msg);
    pop  = ver.size() != 0 && net_ready;
    checks++;
    if (out_ready !== rdy || out_err !== err || force_fp !== ffp || net_valid !== nv
        || (nv && net_msg !== nm) || int'(free_slots) != free) begin
      failures++;
      $display("FAIL rdy=%0d/%0d err=%0d/%0d ffp=%0d/%0d nv=%0d/%0d free=%0d/%0d", out_ready, rdy,
               out_err, err, force_fp, ffp, net_valid, nv, free_slots, free);
    end
    if (err) nerr++;
    if (enq) nheld++;
    if (nv && net_ready) nsent++;
    if (pop) void'(ver.pop_front());
    if (mismatch) unv.delete();
    else if (match) begin
      foreach (unv[i]) ver.push_back(unv[i]);
      unv.delete();
      if (enq) ver.push_back(out_msg);
    end else if (enq) unv.push_back(out_msg);
    if (flush) fq.delete();
    else begin
      if (fire && !fe) void'(fq.pop_front());
      if (fwd_valid && fwd_msg.epoch == epoch && !solo) fq.push_back(fwd_msg);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (8000) @(posedge clk);
    @(negedge clk) solo = 1'b1;
    repeat (500) @(posedge clk);
    checks++;
    if (nerr == 0 || nheld < 100 || nsent < 100) begin failures++; $display("FAIL err %0d held %0d sent %0d", nerr, nheld, nsent); end
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
