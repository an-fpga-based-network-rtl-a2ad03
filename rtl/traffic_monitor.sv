// traffic_monitor: traffic intensity monitor for wavelength reconfiguration.
//
// Every node watches the traffic of each level and, when one level needs more
// bandwidth than it has, proposes to move a wavelength to it. The design description
// gives this function but leaves the algorithm to other work, so the rule here is
// this design's own and deliberately simple. The monitor counts the reservations
// seen on each level during a window of WINDOW clock ticks. At the end of a window
// it compares the load per wavelength of the two levels, using the current
// partition point x1 (level 0 owns wavelengths 0..x1-1, level 1 owns x1..C-1):
//     level 1 needs more:  L1 * C0 > 2^RATIO_SHIFT * L0 * C1   and C0 > 1
//     level 0 needs more:  L0 * C1 > 2^RATIO_SHIFT * L1 * C0   and C1 > 1
// and then pulses reconf_req for one tick with x1_new one step toward the busier
// level. Telling the other nodes and agreeing on the change is not done here.
//
// Timing: counts are taken on every clock; load[] holds the counts of the last
// complete window; reconf_req comes one tick after the window ends.
module traffic_monitor
  import ni_pkg::*;
#(
  parameter int unsigned WINDOW      = 65536,
  parameter int unsigned RATIO_SHIFT = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_LEVELS-1:0] resv_seen,
  input  logic [LAMBDA_W:0]     x1,
  output logic [15:0]           load [NUM_LEVELS],
  output logic                  reconf_req,
  output logic [LAMBDA_W:0]     x1_new,
  output logic                  needy_level
);
  logic [31:0] tick;
  logic [15:0] cnt [NUM_LEVELS];
  logic        win_end;
  assign win_end = tick == 32'(WINDOW - 1);

  logic [LAMBDA_W:0] c0, c1;
  logic [31:0]       a, b;
  assign c0 = x1;
  assign c1 = (LAMBDA_W+1)'(NUM_LAMBDA) - x1;
  assign a  = 32'(cnt[1]) * 32'(c0);   // level 1 load scaled by level 0 channels
  assign b  = 32'(cnt[0]) * 32'(c1);   // level 0 load scaled by level 1 channels

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick        <= '0;
      reconf_req  <= 1'b0;
      x1_new      <= '0;
      needy_level <= 1'b0;
      for (int l = 0; l < int'(NUM_LEVELS); l++) begin
        cnt[l]  <= '0;
        load[l] <= '0;
      end
    end else begin
      reconf_req <= 1'b0;
      tick       <= win_end ? '0 : tick + 1'b1;
      for (int l = 0; l < int'(NUM_LEVELS); l++) begin
        if (win_end) begin
          load[l] <= cnt[l];
          cnt[l]  <= '0;
        end else if (resv_seen[l] && cnt[l] != 16'hffff) begin
          cnt[l] <= cnt[l] + 1'b1;
        end
      end
      if (win_end) begin
        if (a > (b << RATIO_SHIFT) && c0 > 1) begin
          reconf_req  <= 1'b1;
          x1_new      <= x1 - 1'b1;
          needy_level <= 1'b1;
        end else if (b > (a << RATIO_SHIFT) && c1 > 1) begin
          reconf_req  <= 1'b1;
          x1_new      <= x1 + 1'b1;
          needy_level <= 1'b0;
        end
      end
    end
  end
endmodule
