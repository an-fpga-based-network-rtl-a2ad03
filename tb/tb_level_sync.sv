// tb_level_sync: self-checking test of the per-level distributed clock.
//
// Checks, against values worked out by hand from the correction rule: the delay
// measured from an own packet's round trip; the time and slot position loaded from a
// clock packet; the takeover delay of a node that hears no clock node; that a clock
// node ignores a clock packet from a higher identifier and yields to a lower one;
// that the cycle start time is latched for the clock packet.
module tb_level_sync;
  import ni_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              clock_node_en, own_tx_hdr, own_rx_hdr, clk_rx, cycle_start;
  logic [ID_W-1:0]   my_id, clk_rx_src;
  clk_word_t         clk_rx_word;
  logic [TIME_W-1:0] now, cycle_time, my_delay, resync_pos;
  logic              delay_valid, is_clock_node, synced, resync, takeover;

  level_sync #(.TAKEOVER_TICKS(100), .TAKEOVER_STEP(10), .CLK_WORD_POS(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, tk;
  logic [TIME_W-1:0] n0;
  initial begin
    clock_node_en = 0; own_tx_hdr = 0; own_rx_hdr = 0; clk_rx = 0; cycle_start = 0;
    my_id = 8'd2; clk_rx_src = 0; clk_rx_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // delay measurement: round trip of 14 ticks -> 7
    repeat (3) @(negedge clk);
    own_tx_hdr = 1; @(negedge clk); own_tx_hdr = 0;
    repeat (13) @(negedge clk);
    own_rx_hdr = 1; @(negedge clk); own_rx_hdr = 0;
    check(delay_valid && my_delay == 16'd7, $sformatf("my_delay %0d exp 7", my_delay));
    // clock packet: tx_time 1000, prop_delay 5 -> now = 1000+2+5+7 at arrival
    check(!synced, "not synced before first clock packet");
    clk_rx = 1; clk_rx_src = 8'd9; clk_rx_word = '{tx_time: 16'd1000, prop_delay: 16'd5};
    @(negedge clk);
    clk_rx = 0;
    check(resync && synced, "resync pulse and synced");
    check(now == 16'd1015, $sformatf("now after clock packet %0d exp 1015", now));
    check(resync_pos == 16'd15, $sformatf("resync_pos %0d exp 15", resync_pos));
    check(cycle_time == 16'd1000, "cycle_time from clock packet");
    @(negedge clk);
    check(now == 16'd1016 && !resync, "time runs on after resync");
    // takeover: limit = 100 + 2*10 = 120 silent ticks
    clock_node_en = 1;
    t0 = 0; tk = -1;
    for (int i = 0; i < 200 && tk < 0; i++) begin
      @(negedge clk);
      if (takeover) tk = i;
    end
    check(tk >= 118 && tk <= 122, $sformatf("takeover after %0d ticks, exp about 120", tk));
    check(is_clock_node, "is clock node after takeover");
    // cycle start latches time
    cycle_start = 1; n0 = now; @(negedge clk); cycle_start = 0;
    check(cycle_time == n0, "cycle_time latched at cycle start");
    // a higher identifier is ignored
    clk_rx = 1; clk_rx_src = 8'd7; clk_rx_word = '{tx_time: 16'd50, prop_delay: 16'd1};
    n0 = now;
    @(negedge clk); clk_rx = 0;
    check(is_clock_node && !resync && now == n0 + 1, "clock node ignores higher id");
    // a lower identifier takes over the role
    clk_rx = 1; clk_rx_src = 8'd1; clk_rx_word = '{tx_time: 16'd50, prop_delay: 16'd1};
    @(negedge clk); clk_rx = 0;
    check(!is_clock_node && resync && now == 16'd61, $sformatf("yield to lower id, now %0d exp 61", now));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
