// Testbench for sync_fifo: random push/pop/flush against a queue model.
// Checks data order, empty/full/count, and that pushes into a full FIFO and
// pops from an empty one are ignored.
module tb_sync_fifo;
  localparam int unsigned WIDTH = 12, DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nfull = 0;

  logic flush = 1'b0, push = 1'b0, pop = 1'b0, empty, full;
  logic [WIDTH-1:0] din = '0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [WIDTH-1:0] q[$];

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .rst_n, .flush, .push, .din, .pop, .dout, .empty, .full, .count);

  always @(negedge clk) begin
    flush <= ($urandom % 150) == 0;
    push  <= ($urandom % 2) == 0;
    pop   <= ($urandom % 5) < 2;
    din   <= WIDTH'($urandom);
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(count) != q.size() || empty !== (q.size() == 0) || full !== (q.size() == DEPTH)
        || (q.size() > 0 && dout !== q[0])) begin
      failures++; $display("FAIL count=%0d/%0d dout=%h", count, q.size(), dout);
    end
    if (full) nfull++;
    if (flush) q.delete();
    else begin
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && int'(count) < DEPTH) q.push_back(din);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
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
