// ckpt_log: cache checkpoint log (copy-on-write undo log).
//
// On every store the previous value of the written cache block is pushed, with
// its block address, into a circular FIFO. `mark` closes a checkpoint interval
// (after the push of the same cycle) by recording the write pointer in a small
// boundary queue of up to NMARK intervals. `release_oldest` discards the entries
// of the oldest closed interval once its fingerprint is confirmed;
// `release_all` discards every entry, including a push of the same cycle. `replay`
// starts a reverse replay: one entry per cycle, newest first, is presented on
// rp_valid/rp_blk/rp_line to be written back into the cache, until everything
// not yet released has been undone; `busy` is high meanwhile and all interval
// marks are dropped. `count` is the number of live entries.
// The slave keeps only the interval being verified (release_all on a match); the master keeps every
// interval whose fingerprint is not yet acknowledged.
// From the source design: logging previous block values in a FIFO on every
// store and replaying the log in reverse on recovery. Own choices: the
// interval marks, the depth and one replay entry per cycle.
module ckpt_log #(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned BLK_W  = 34,
  parameter int unsigned LINE_W = 512,
  parameter int unsigned NMARK  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [BLK_W-1:0]  push_blk,
  input  logic [LINE_W-1:0] push_line,
  input  logic              mark,
  input  logic              release_oldest,
  input  logic              release_all,
  input  logic              replay,
  output logic              rp_valid,
  output logic [BLK_W-1:0]  rp_blk,
  output logic [LINE_W-1:0] rp_line,
  output logic              busy,
  output logic              full,
  output logic              overflow,   // a push was refused
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned MW = (NMARK > 1) ? $clog2(NMARK) : 1;

  logic [BLK_W-1:0]  blk_mem  [DEPTH];
  logic [LINE_W-1:0] line_mem [DEPTH];
  logic [AW-1:0] head, tail;         // head: next write, tail: oldest live
  logic [CW-1:0] msize [NMARK];      // sizes of the closed intervals, oldest first
  logic [CW-1:0] open_cnt;           // entries of the interval still open
  logic [MW-1:0] mrd, mwr;
  logic [$clog2(NMARK+1)-1:0] mcnt;
  logic do_push, do_mark, do_rel;
  logic [AW-1:0] head_prev;
  logic [CW-1:0] rel_size;
  logic [AW:0]   tail_sum;

  assign full      = (count == CW'(DEPTH)) || (mcnt == $bits(mcnt)'(NMARK));
  assign do_push   = push && !full && !busy;
  assign do_mark   = mark && !busy && (mcnt != $bits(mcnt)'(NMARK));  // refused only when full
  assign do_rel    = release_oldest && !busy && (mcnt != 0);
  assign head_prev = (head == '0) ? AW'(DEPTH - 1) : head - 1'b1;
  assign rel_size  = msize[mrd];
  assign tail_sum  = {1'b0, tail} + (AW+1)'(rel_size);
  assign rp_valid  = busy && (count != 0);
  assign rp_blk    = blk_mem[head_prev];
  assign rp_line   = line_mem[head_prev];

  always_ff @(posedge clk) begin
    if (do_push) begin
      blk_mem[head]  <= push_blk;
      line_mem[head] <= push_line;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head     <= '0;
      tail     <= '0;
      count    <= '0;
      open_cnt <= '0;
      mrd      <= '0;
      mwr      <= '0;
      mcnt     <= '0;
      busy     <= 1'b0;
      overflow <= 1'b0;
    end else if (busy) begin
      if (count == 0) busy <= 1'b0;
      else begin
        head  <= head_prev;
        count <= count - 1'b1;
      end
    end else if (release_all) begin
      // everything up to and including this cycle's push is confirmed
      if (do_push) head <= (head == AW'(DEPTH - 1)) ? '0 : head + 1'b1;
      tail     <= do_push ? ((head == AW'(DEPTH - 1)) ? '0 : head + 1'b1) : head;
      count    <= '0;
      open_cnt <= '0;
      mrd      <= '0;
      mwr      <= '0;
      mcnt     <= '0;
    end else if (replay) begin
      busy     <= 1'b1;
      mrd      <= '0;
      mwr      <= '0;
      mcnt     <= '0;
      open_cnt <= '0;
    end else begin
      overflow <= push && full;
      if (do_push) head <= (head == AW'(DEPTH - 1)) ? '0 : head + 1'b1;
      if (do_rel) begin
        tail <= (tail_sum >= (AW+1)'(DEPTH)) ? AW'(tail_sum - (AW+1)'(DEPTH)) : AW'(tail_sum);
        mrd  <= (mrd == MW'(NMARK - 1)) ? '0 : mrd + 1'b1;
      end
      if (do_mark) begin
        msize[mwr] <= open_cnt + CW'(do_push);
        mwr        <= (mwr == MW'(NMARK - 1)) ? '0 : mwr + 1'b1;
        open_cnt   <= '0;
      end else begin
        open_cnt <= open_cnt + CW'(do_push);
      end
      case ({do_mark, do_rel})
        2'b10:   mcnt <= mcnt + 1'b1;
        2'b01:   mcnt <= mcnt - 1'b1;
        default: mcnt <= mcnt;
      endcase
      count <= count + CW'(do_push) - (do_rel ? rel_size : '0);
    end
  end
endmodule
