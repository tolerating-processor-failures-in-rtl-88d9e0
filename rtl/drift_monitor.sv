// drift_monitor: guards the master-to-slave lag when master and slave run on
// separately generated clocks.
//
// For every coordination message arriving at the slave it computes the slack,
// delivery time minus the slave's current timestamp. If the slack is below
// MARGIN the two clocks have drifted towards each other and `slow_req` is raised;
// it asks the slave's clock generator to slow down (for instance by down-spread
// modulation) and stays high until a message arrives with at least 2*MARGIN of
// slack. A message with no slack at all (already due or past) sets `late_err`
// for one cycle: lockstep can no longer be guaranteed. `slack` shows the slack
// of the last arrival.
// From the source design: the detection condition (arrival too close to the
// delivery time minus a safety margin) and the slow-down response. Own choices:
// the margin value and the release hysteresis.
module drift_monitor
  import lacross_pkg::*;
#(
  parameter int unsigned MARGIN = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] ts,         // slave local timestamp
  input  logic            arr_valid,
  input  logic [TS_W-1:0] arr_ts,     // delivery time of the arriving message
  output logic            slow_req,
  output logic            late_err,
  output logic signed [TS_W:0] slack
);
  logic signed [TS_W:0] cur_slack;
  assign cur_slack = $signed({1'b0, arr_ts}) - $signed({1'b0, ts});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slow_req <= 1'b0;
      late_err <= 1'b0;
      slack    <= '0;
    end else begin
      late_err <= 1'b0;
      if (arr_valid) begin
        slack <= cur_slack;
        if (cur_slack <= 0) late_err <= 1'b1;
        if (cur_slack < $signed((TS_W+1)'(MARGIN)))
          slow_req <= 1'b1;
        else if (cur_slack >= $signed((TS_W+1)'(2 * MARGIN)))
          slow_req <= 1'b0;
      end
    end
  end
endmodule
