// tb_traffic_monitor: self-checking test of the reconfiguration monitor.
//
// Windows of 200 ticks with a chosen number of reservations on each level. For each
// window the expected decision is computed from the rule (load per wavelength of one
// level more than twice the other's, and the giving level keeps at least one
// wavelength) and compared with reconf_req, x1_new, needy_level and load[].
module tb_traffic_monitor;
  import ni_pkg::*;
  localparam int WIN = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_LEVELS-1:0] resv_seen;
  logic [LAMBDA_W:0]     x1, x1_new;
  logic [15:0]           load [NUM_LEVELS];
  logic                  reconf_req, needy_level;

  traffic_monitor #(.WINDOW(WIN), .RATIO_SHIFT(1)) dut (.*);

  int checks = 0, failures = 0, reqs = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, n1, c0, c1, exp_req, exp_x1, exp_needy;
    resv_seen = '0; x1 = 3'd2;
    @(negedge clk); rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      if (w > 0) begin
        check(reconf_req == 1'(exp_req), $sformatf("window %0d reconf_req %0d exp %0d", w - 1, reconf_req, exp_req));
        if (exp_req) begin
          reqs++;
          check(int'(x1_new) == exp_x1, $sformatf("x1_new %0d exp %0d", x1_new, exp_x1));
          check(int'(needy_level) == exp_needy, "needy level");
        end
      end
      n0 = int'($urandom_range(0, 60));
      n1 = int'($urandom_range(0, 60));
      if (w == 0) begin n0 = 5; n1 = 50; end   // level 1 busy
      if (w == 1) begin n0 = 50; n1 = 5; end   // level 0 busy
      if (w == 2) begin n0 = 20; n1 = 20; end  // balanced
      x1 = (LAMBDA_W+1)'($urandom_range(1, 3));
      if (w == 3) begin x1 = 3'd1; n0 = 2; n1 = 60; end // level 0 cannot give
      c0 = int'(x1); c1 = NUM_LAMBDA - c0;
      // window: ticks 0..WIN-1, reservations spread in its first part
      for (int t = 0; t < WIN; t++) begin
        resv_seen[0] = (t < n0);
        resv_seen[1] = (t >= 70 && t < 70 + n1);
        if (t == WIN - 1) resv_seen = '0;   // not counted on the closing tick
        @(negedge clk);
      end
      exp_req = 0; exp_x1 = c0; exp_needy = 0;
      if (n1 * c0 > 2 * n0 * c1 && c0 > 1) begin exp_req = 1; exp_x1 = c0 - 1; exp_needy = 1; end
      else if (n0 * c1 > 2 * n1 * c0 && c1 > 1) begin exp_req = 1; exp_x1 = c0 + 1; exp_needy = 0; end
    end
    check(reconf_req == 1'(exp_req), "last window decision");
    check(reqs > 2, "requests seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // load[] shows the counts of the last window
  int cnt0 = 0, cnt1 = 0, tick = 0;
  always @(posedge clk) if (rst_n) begin
    if (tick == WIN - 1) begin
      tick <= 0;
      #1;
      check(int'(load[0]) == cnt0 && int'(load[1]) == cnt1,
            $sformatf("load %0d/%0d exp %0d/%0d", load[0], load[1], cnt0, cnt1));
      cnt0 = 0; cnt1 = 0;
    end else begin
      tick <= tick + 1;
      if (resv_seen[0]) cnt0++;
      if (resv_seen[1]) cnt1++;
    end
  end
endmodule
