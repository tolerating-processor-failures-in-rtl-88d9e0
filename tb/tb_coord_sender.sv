// Testbench for coord_sender: random inputs, accept permission and link
// back-pressure. Every accepted input must reach the core in the same cycle
// and leave as a coordination message, in order, stamped with the master
// timestamp of the accepting cycle; nothing is accepted without permission.
module tb_coord_sender;
  import lacross_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nsent = 0;

  logic [TS_W-1:0] ts = '0;
  logic accept_ok = 1'b0, in_valid = 1'b0, in_ready, core_valid, coord_valid, coord_ready = 1'b0;
  ext_in_t in_data = '0, core_data;
  coord_msg_t coord_msg;
  coord_msg_t exp_q[$];

  coord_sender #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .ts, .accept_ok, .in_valid, .in_data, .in_ready,
    .core_valid, .core_data, .coord_valid, .coord_msg, .coord_ready
  );

  always @(negedge clk) begin
    ts          <= ts + 1'b1;
    accept_ok   <= ($urandom % 4) != 0;
    in_valid    <= ($urandom % 2) == 0;
    in_data     <= '{payload: {$urandom, $urandom}};
    coord_ready <= ($urandom % 3) == 0;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (core_valid !== (in_valid && in_ready) || (in_ready && !accept_ok) || (core_valid && core_data !== in_data)) begin
      failures++; $display("FAIL core handoff");
    end
    checks++;
    if (coord_valid !== (exp_q.size() > 0)) begin failures++; $display("FAIL coord_valid=%0d queued=%0d", coord_valid, exp_q.size()); end
    if (coord_valid && coord_ready) begin
      checks++;
      if (coord_msg !== exp_q[0]) begin failures++; $display("FAIL message %h expected %h", coord_msg, exp_q[0]); end
      void'(exp_q.pop_front());
      nsent++;
    end
    if (core_valid) exp_q.push_back('{ts: ts, payload: in_data.payload});
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    checks++;
    if (nsent < 500) begin failures++; $display("FAIL too few messages"); end
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
