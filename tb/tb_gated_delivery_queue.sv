// Testbench for gated_delivery_queue: coordination messages with distinct
// timestamps arrive out of order ahead of a slowly advancing local time.
// Each must be delivered exactly when the local time equals its timestamp
// (in a tick cycle); one message per run is sent already late and must be
// reported and discarded. A flush empties the queue.
module tb_gated_delivery_queue;
  import lacross_pkg::*;
  localparam int unsigned DEPTH = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ndlv = 0, nlate = 0;

  logic flush = 1'b0, tick = 1'b0, arr_valid = 1'b0, arr_ready, dlv_valid, late;
  logic [TS_W-1:0] ts = '0;
  coord_msg_t arr_msg = '0;
  ext_in_t dlv_data;
  logic [$clog2(DEPTH+1)-1:0] occupancy;
  logic [PAYLOAD_W-1:0] pend [int];   // timestamp -> payload

  gated_delivery_queue #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .flush, .ts, .tick, .arr_valid, .arr_msg, .arr_ready,
    .dlv_valid, .dlv_data, .late, .occupancy
  );

  always @(negedge clk) begin
    logic [TS_W-1:0] t;
    tick <= ($urandom % 3) != 0;
    // mostly future timestamps in a jittered window, now and then a late one
    if (($urandom % 100) == 0) t = ts - 1;
    else t = ts + 1 + TS_W'($urandom % 30);
    arr_valid <= ($urandom % 4) == 0 && !pend.exists(int'(t));
    arr_msg   <= '{ts: t, payload: {$urandom, $urandom}};
  end

  always @(posedge clk) if (rst_n) begin
    int k;
    checks++;
    if (int'(occupancy) != pend.num()) begin failures++; $display("FAIL occupancy %0d expected %0d", occupancy, pend.num()); end
    if (late) begin
      nlate++;
      checks++;
      if (!pend.first(k) || k >= int'(ts)) begin failures++; $display("FAIL spurious late at ts %0d", ts); end
      else pend.delete(k);
    end else if (dlv_valid) begin
      ndlv++;
      checks++;
      if (!tick || !pend.exists(int'(ts)) || pend[int'(ts)] !== dlv_data.payload) begin
        failures++; $display("FAIL delivery at ts %0d", ts);
      end
      pend.delete(int'(ts));
    end else if (tick && pend.exists(int'(ts))) begin
      checks++; failures++; $display("FAIL message for ts %0d not delivered", ts);
    end
    if (arr_valid && arr_ready) pend[int'(arr_msg.ts)] = arr_msg.payload;
    if (tick) ts <= ts + 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (6000) @(posedge clk);
    checks++;
    if (ndlv < 500 || nlate == 0) begin failures++; $display("FAIL delivered %0d late %0d", ndlv, nlate); end
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
