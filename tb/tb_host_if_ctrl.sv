// tb_host_if_ctrl: self-checking test of the host interface controller.
//
// Transmit: the host sends packets of random level (including an invalid level 2),
// type and length (shorter than, equal to and longer than the network size). Each
// of the four level/type FIFOs is drained at random so that it fills up and pushes
// back. The words found in each FIFO must be the packet cut or zero-padded to the
// fixed length, with the last flag only on its final word; invalid packets must
// vanish and be reported.
// Receive: packets are loaded into the two level receive FIFOs; the host stream must
// deliver every one, whole and in order per level, never interleaving two packets,
// and alternate between the levels when both have packets waiting.
module tb_host_if_ctrl;
  import ni_pkg::*;
  localparam int CW = 16, DW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              tx_valid, tx_last, tx_ready, rx_valid, rx_last, rx_ready, bad_level;
  logic [31:0]       tx_data, rx_data;
  logic [3:0]        ofifo_wr, ofifo_full;
  host_word_t        ofifo_wdata;
  host_word_t        rcv_rdata [NUM_LEVELS];
  logic [1:0]        rcv_empty, rcv_rd;

  host_if_ctrl #(.CTRL_WORDS(CW), .DATA_WORDS(DW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  // the four outgoing FIFOs, drained by the test
  logic       o_rd [4], o_empty [4];
  host_word_t o_rdata [4];
  for (genvar f = 0; f < 4; f++) begin : g_of
    ni_fifo #(.WIDTH(33), .DEPTH(16)) u (
      .wclk(clk), .wrst_n(rst_n), .wr_en(ofifo_wr[f]), .wdata(ofifo_wdata), .full(ofifo_full[f]),
      .wr_free(), .rclk(clk), .rrst_n(rst_n), .rd_en(o_rd[f]), .rdata(o_rdata[f]),
      .empty(o_empty[f]), .rd_count());
  end
  // the two receive FIFOs, loaded by the test
  logic       i_wr [2];
  host_word_t i_wd [2];
  for (genvar l = 0; l < 2; l++) begin : g_if
    ni_fifo #(.WIDTH(33), .DEPTH(256)) u (
      .wclk(clk), .wrst_n(rst_n), .wr_en(i_wr[l]), .wdata(i_wd[l]), .full(), .wr_free(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(rcv_rd[l]), .rdata(rcv_rdata[l]),
      .empty(rcv_empty[l]), .rd_count());
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [32:0] exp_q [4][$];
  int bad_seen = 0, bad_sent = 0, full_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (bad_level) bad_seen++;
    if (|ofifo_full) full_seen++;
  end

  // drain side
  int got_words = 0;
  for (genvar f = 0; f < 4; f++) begin : g_drain
    always @(negedge clk) begin
      o_rd[f] = 0;
      if (rst_n && !o_empty[f] && $urandom_range(0, 2) == 0) begin
        check(exp_q[f].size() > 0, $sformatf("unexpected word in FIFO %0d", f));
        if (exp_q[f].size() > 0) begin
          check({o_rdata[f].last, o_rdata[f].data} == exp_q[f][0],
                $sformatf("FIFO %0d word %h exp %h", f, {o_rdata[f].last, o_rdata[f].data}, exp_q[f][0]));
          void'(exp_q[f].pop_front());
        end
        o_rd[f] = 1;
        got_words++;
      end
    end
  end

  task automatic send_pkt(input int level, input bit is_data, input int len, input int seq);
    pkt_hdr_t h;
    int netlen, f;
    h = make_hdr(8'(level), is_data ? PT_DATA : PT_CONTROL, 8'(seq), 8'd7);
    netlen = is_data ? DW : CW;
    f = 2 * (level & 1) + int'(is_data);
    if (level > 1) bad_sent++;
    for (int k = 0; k < len; k++) begin
      logic [31:0] w;
      w = (k == 0) ? 32'(h) : 32'(seq * 1000 + k);
      if (level <= 1 && k < netlen) exp_q[f].push_back({1'(k == netlen - 1), w});
      tx_valid = 1; tx_data = w; tx_last = (k == len - 1);
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      #1;
    end
    if (level <= 1) for (int k = len; k < netlen; k++) exp_q[f].push_back({1'(k == netlen - 1), 32'h0});
    tx_valid = 0;
  endtask

  // receive stream checker
  int rx_pkts = 0, alternations = 0, last_lvl = -1, next_seq [2] = '{0, 0};
  logic [31:0] cur [$];
  always @(posedge clk) if (rst_n && rx_valid && rx_ready) begin
    cur.push_back(rx_data);
    if (rx_last) begin
      int lvl, seq;
      lvl = int'(cur[0][31:24]);
      seq = int'(cur[0][15:8]);
      check(lvl < 2 && seq == next_seq[lvl], $sformatf("rx packet level %0d seq %0d exp %0d", lvl, seq, next_seq[lvl]));
      for (int k = 1; k < cur.size(); k++)
        check(cur[k] == 32'(lvl * 100000 + seq * 100 + k), "rx packet body, not interleaved");
      check(cur.size() == 3 + seq % 5, "rx packet length");
      if (lvl < 2) next_seq[lvl]++;
      if (last_lvl >= 0 && lvl != last_lvl) alternations++;
      last_lvl = lvl;
      rx_pkts++;
      cur.delete();
    end
  end

  initial begin
    tx_valid = 0; tx_data = 0; tx_last = 0; rx_ready = 0;
    for (int l = 0; l < 2; l++) begin i_wr[l] = 0; i_wd[l] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // receive: load 6 packets per level while the host is not ready
    for (int l = 0; l < 2; l++)
      for (int p = 0; p < 6; p++) begin
        int len;
        len = 3 + p % 5;
        for (int k = 0; k < len; k++) begin
          i_wr[l] = 1;
          i_wd[l].last = (k == len - 1);
          i_wd[l].data = (k == 0) ? {8'(l), 8'(PT_DATA), 8'(p), 8'd1} : 32'(l * 100000 + p * 100 + k);
          @(negedge clk);
        end
        i_wr[l] = 0;
      end
    repeat (5) @(negedge clk);
    fork
      begin
        for (int c = 0; c < 400; c++) begin
          rx_ready = ($urandom_range(0, 3) != 0);
          @(negedge clk);
        end
        rx_ready = 1;
      end
      begin
        // transmit
        for (int p = 0; p < 120; p++) begin
          int level, len;
          bit is_data;
          level = (p % 17 == 5) ? 2 : int'($urandom_range(0, 1));
          is_data = $urandom_range(0, 1);
          len = int'($urandom_range(1, is_data ? DW + 5 : CW + 5));
          if (p == 0) len = 1;
          send_pkt(level, is_data, len, p);
        end
      end
    join
    repeat (600) @(negedge clk);
    for (int f = 0; f < 4; f++) check(exp_q[f].size() == 0, $sformatf("FIFO %0d missing %0d words", f, exp_q[f].size()));
    check(bad_seen == bad_sent && bad_sent > 0, $sformatf("bad level reports %0d exp %0d", bad_seen, bad_sent));
    check(full_seen > 0, "back-pressure exercised");
    check(rx_pkts == 12, $sformatf("rx packets %0d exp 12", rx_pkts));
    check(alternations >= 10, $sformatf("levels alternate (%0d changes)", alternations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
