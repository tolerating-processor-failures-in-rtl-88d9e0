// timestamp_counter: local logical time of one core of a DMR pair.
//
// The node controller keeps one timestamp per core. Master and slave timestamps
// advance together but the slave starts a fixed lag later, so that a
// coordination message sent by the master always reaches the slave before the
// slave's timestamp reaches the message's delivery time. After `enable` rises
// the counter first counts LAG ticks with `running` low, then sets `running` and
// increments `ts` on every tick. `tick` is the core's clock enable: the slave's
// tick comes from its (possibly slowed) local clock. The timestamp keeps counting
// through recovery so that the lag between the two cores never changes.
// From the source design: per-core timestamps and a fixed master-to-slave lag
// (550 processor cycles in its evaluation). Own choices: counting the lag in
// ticks of the same counter and resetting to zero.
module timestamp_counter
  import lacross_pkg::*;
#(
  parameter int unsigned LAG = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,   // pair started
  input  logic            tick,     // core clock enable
  output logic            running,  // lag elapsed, core may execute
  output logic [TS_W-1:0] ts
);
  localparam int unsigned LW = (LAG > 0) ? $clog2(LAG + 1) : 1;
  logic [LW-1:0] lag_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lag_cnt <= '0;
      running <= (LAG == 0);
      ts      <= '0;
    end else if (enable && tick) begin
      if (running) begin
        ts <= ts + 1'b1;
      end else if (lag_cnt == LW'(LAG - 1)) begin
        running <= 1'b1;
      end else begin
        lag_cnt <= lag_cnt + 1'b1;
      end
    end
  end
endmodule
