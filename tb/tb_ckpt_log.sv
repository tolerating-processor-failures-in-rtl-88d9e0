// Testbench for ckpt_log: random pushes, interval marks, oldest-interval
// releases, full releases and replays against a reference list of entries
// grouped by interval. A replay must return every live entry, newest first,
// one per cycle, and leave the log empty; count and full are checked each
// cycle.
module tb_ckpt_log;
  localparam int unsigned DEPTH = 16, BLK_W = 8, LINE_W = 16, NMARK = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nrp = 0, nrel = 0, nreplay = 0;

  logic push = 1'b0, mark = 1'b0, release_oldest = 1'b0, release_all = 1'b0, replay = 1'b0;
  logic [BLK_W-1:0] push_blk = '0, rp_blk;
  logic [LINE_W-1:0] push_line = '0, rp_line;
  logic rp_valid, busy, full, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;

  typedef struct { logic [BLK_W-1:0] b; logic [LINE_W-1:0] l; } ent_t;
  ent_t ents[$];
  int   sizes[$];     // closed interval sizes, oldest first
  int   open_n = 0;
  logic m_busy = 1'b0, m_ovf = 1'b0;

  ckpt_log #(.DEPTH(DEPTH), .BLK_W(BLK_W), .LINE_W(LINE_W), .NMARK(NMARK)) dut (
    .clk, .rst_n, .push, .push_blk, .push_line, .mark, .release_oldest, .release_all, .replay,
    .rp_valid, .rp_blk, .rp_line, .busy, .full, .overflow, .count
  );

  always @(negedge clk) begin
    push           <= ($urandom % 2) == 0;
    push_blk       <= BLK_W'($urandom);
    push_line      <= LINE_W'($urandom);
    mark           <= ($urandom % 5) == 0;
    release_oldest <= ($urandom % 7) == 0;
    release_all    <= ($urandom % 150) == 0;
    replay         <= ($urandom % 60) == 0;
  end

  always @(posedge clk) if (rst_n) begin
    logic mfull, dpush, dmark, drel;
    mfull = ents.size() == DEPTH || sizes.size() == NMARK;
    checks++;
    if (int'(count) != ents.size() || full !== mfull || busy !== m_busy
        || overflow !== m_ovf || rp_valid !== (m_busy && ents.size() > 0)) begin
      failures++; $display("FAIL count=%0d/%0d full=%0d/%0d busy=%0d/%0d", count, ents.size(), full, mfull, busy, m_busy);
    end
    if (m_busy) begin
      if (ents.size() == 0) m_busy = 1'b0;
      else begin
        checks++;
        if (rp_blk !== ents[$].b || rp_line !== ents[$].l) begin
          failures++; $display("FAIL replay %h/%h expected %h/%h", rp_blk, rp_line, ents[$].b, ents[$].l);
        end
        void'(ents.pop_back());
        nrp++;
      end
    end else if (release_all) begin
      ents.delete(); sizes.delete(); open_n = 0;
    end else if (replay) begin
      m_busy = 1'b1; sizes.delete(); open_n = 0; nreplay++;
    end else begin
      m_ovf = push && mfull;
      dpush = push && !mfull;
      dmark = mark && sizes.size() != NMARK;
      drel  = release_oldest && sizes.size() != 0;
      if (dpush) ents.push_back('{push_blk, push_line});
      if (drel) begin
        repeat (sizes[0]) void'(ents.pop_front());
        void'(sizes.pop_front());
        nrel++;
      end
      if (dmark) begin sizes.push_back(open_n + int'(dpush)); open_n = 0; end
      else open_n += int'(dpush);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (8000) @(posedge clk);
    checks++;
    if (nrp < 100 || nrel < 100 || nreplay < 10) begin failures++; $display("FAIL replayed %0d released %0d", nrp, nrel); end
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
