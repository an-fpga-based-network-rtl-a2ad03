// tb_resv_unit: self-checking test of the reservation unit.
//
// Random control cycles, each with a random partition (first wavelength and number
// of wavelengths of the level) and up to 16 reservations with random sender and
// destination, are fed back to back, one per clock, to show the unit keeps up with
// a reservation every cycle. A reference model written as a list of slots, each with
// the set of destinations placed in it, predicts the data cycle length, the collision
// pulses, the transmit record and the whole receive table.
module tb_resv_unit;
  import ni_pkg::*;
  localparam int unsigned MAX_SLOTS = 16;
  localparam int unsigned SLOT_W = $clog2(MAX_SLOTS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                clear, resv_valid;
  logic [LAMBDA_W-1:0] wl_base;
  logic [LAMBDA_W:0]   wl_count;
  logic [ID_W-1:0]     my_id, resv_src, resv_dst;
  logic [SLOT_W:0]     num_slots;
  logic                collision, overflow, tx_valid;
  logic [SLOT_W-1:0]   tx_slot, rx_slot;
  logic [LAMBDA_W-1:0] tx_lambda, rx_lambda, cyc_wl_base;
  logic [LAMBDA_W:0]   cyc_wl_count;

  resv_unit #(.MAX_SLOTS(MAX_SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  int collisions_seen = 0, fills_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference model state
  int ref_dst [MAX_SLOTS][$];
  int ref_nslots;      // index of slot being filled
  int ref_cnt;         // packets in that slot
  int ref_rx [MAX_SLOTS];
  bit ref_txv; int ref_txs, ref_txl;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; resv_valid = 0; wl_base = 0; wl_count = 4; my_id = 8'd3;
    resv_src = 0; resv_dst = 0; rx_slot = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      int c, base, n;
      bit exp_col;
      c    = 1 + int'($urandom_range(0, NUM_LAMBDA - 1));
      base = int'($urandom_range(0, NUM_LAMBDA - c));
      n    = int'($urandom_range(0, 16));
      my_id = 8'($urandom_range(0, 5));
      @(negedge clk);
      wl_base = LAMBDA_W'(base); wl_count = (LAMBDA_W+1)'(c);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int s = 0; s < int'(MAX_SLOTS); s++) begin ref_dst[s].delete(); ref_rx[s] = base; end
      ref_nslots = 0; ref_cnt = 0; ref_txv = 0; ref_txs = 0; ref_txl = 0;
      for (int r = 0; r < n; r++) begin
        int src, dst, wl;
        src = r % 6;                       // at most one reservation per sender
        dst = int'($urandom_range(0, 5));
        exp_col = 0;
        foreach (ref_dst[ref_nslots][k]) if (ref_dst[ref_nslots][k] == dst) exp_col = 1;
        if (exp_col) begin ref_nslots++; ref_cnt = 0; end
        wl = base + ref_cnt;
        ref_dst[ref_nslots].push_back(dst);
        if (dst == int'(my_id)) ref_rx[ref_nslots] = wl;
        if (src == int'(my_id)) begin ref_txv = 1; ref_txs = ref_nslots; ref_txl = wl; end
        ref_cnt++;
        if (ref_cnt == c) begin ref_nslots++; ref_cnt = 0; fills_seen++; end
        resv_valid = 1; resv_src = ID_W'(src); resv_dst = ID_W'(dst);
        @(negedge clk);
        check(collision == exp_col, $sformatf("collision flag cycle %0d resv %0d", cyc, r));
        if (exp_col) collisions_seen++;
        check(!overflow, "no overflow expected");
      end
      resv_valid = 0;
      @(negedge clk);
      check(int'(num_slots) == ref_nslots + (ref_cnt != 0 ? 1 : 0),
            $sformatf("num_slots %0d exp %0d", num_slots, ref_nslots + (ref_cnt != 0)));
      check(tx_valid == ref_txv, "tx_valid");
      if (ref_txv) begin
        check(int'(tx_slot) == ref_txs, $sformatf("tx_slot %0d exp %0d", tx_slot, ref_txs));
        check(int'(tx_lambda) == ref_txl, $sformatf("tx_lambda %0d exp %0d", tx_lambda, ref_txl));
      end
      for (int s = 0; s < int'(MAX_SLOTS); s++) begin
        rx_slot = SLOT_W'(s);
        #1;
        check(int'(rx_lambda) == ref_rx[s], $sformatf("rx table slot %0d: %0d exp %0d", s, rx_lambda, ref_rx[s]));
      end
      check(int'(cyc_wl_base) == base && int'(cyc_wl_count) == c, "latched partition");
    end
    check(collisions_seen > 0, "collision path exercised");
    check(fills_seen > 0, "full-slot extension exercised");
    // overflow: 17 reservations to distinct destinations on one wavelength
    @(negedge clk);
    wl_base = 0; wl_count = 1; clear = 1;
    @(negedge clk);
    clear = 0;
    for (int r = 0; r < 17; r++) begin
      resv_valid = 1; resv_src = 8'(100 + r); resv_dst = 8'(r);
      @(negedge clk);
      check(overflow == (r == 16), $sformatf("overflow flag at reservation %0d", r));
    end
    resv_valid = 0;
    check(int'(num_slots) == 16, "num_slots saturates at MAX_SLOTS");
    $display("collisions=%0d full_slots=%0d", collisions_seen, fills_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
