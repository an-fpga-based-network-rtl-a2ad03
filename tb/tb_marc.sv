// tb_marc: self-checking test of the MARC on its own.
//
// One node is looped back on itself: every word marc sends to the physical
// interface of a level comes back on that level's receive side four clocks later,
// whatever the wavelength (tuning commands are dropped). With a single node per level
// and clock-node duty enabled, the node must take over on both levels, then carry
// the data and control packets the test loads into its host-side FIFOs back into its
// receive FIFOs, word for word. Every word sent must use only wavelengths of its
// level under the current partition point. The partition point is first written by
// the host, then automatic reallocation is enabled with traffic on level 1 only; the
// traffic monitor must move wavelengths to level 1. Packets are reduced to 8 data
// words and the timeouts and monitoring window shortened.
module tb_marc;
  import ni_pkg::*;
  localparam int L = NUM_LEVELS, CW = CTRL_PKT_WORDS, DW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ID_W-1:0]       my_id = 8'd5;
  logic [L-1:0]          clock_node_en = 2'b11;
  logic [1:0]            my_slot [L];
  logic [2:0]            n_nodes [L];
  logic                  x1_wr, auto_reconf, reconf_req;
  logic [LAMBDA_W:0]     x1_cfg, x1, x1_new;
  host_word_t            ctrl_rdata [L], data_rdata [L], rcv_wdata [L];
  logic [15:0]           ctrl_count [L], data_count [L], rcv_free [L], load [L];
  logic [L-1:0]          ctrl_rd, data_rd, rcv_wr, ltx_wr, ltx_full, lrx_empty, lrx_rd;
  phy_tx_word_t          ltx_wdata [L];
  line_word_t            lrx_rdata [L];
  logic [TIME_W-1:0]     now [L];
  logic [L-1:0]          synced, is_clock_node, cycle_begin, collision, data_sent, data_rcvd;
  logic [L-1:0]          rx_drop, takeover, resync;
  logic [2:0]            data_slots [L];

  marc #(
    .MAX_NODES(4), .DATA_WORDS(DW), .GUARD(8), .TAKEOVER_TICKS(300), .TAKEOVER_STEP(50),
    .MON_WINDOW(2000)
  ) dut (.*);

  // host-side FIFOs, written and read by the test
  logic       c_wr [L], d_wr [L], r_rd [L], r_empty [L];
  host_word_t c_wd [L], d_wd [L], r_rdata [L];
  for (genvar l = 0; l < L; l++) begin : g_fifo
    logic [6:0] cc, dc, rf;
    ni_fifo #(.WIDTH(33), .DEPTH(64)) u_c (
      .wclk(clk), .wrst_n(rst_n), .wr_en(c_wr[l]), .wdata(c_wd[l]), .full(), .wr_free(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(ctrl_rd[l]), .rdata(ctrl_rdata[l]), .empty(),
      .rd_count(cc));
    ni_fifo #(.WIDTH(33), .DEPTH(64)) u_d (
      .wclk(clk), .wrst_n(rst_n), .wr_en(d_wr[l]), .wdata(d_wd[l]), .full(), .wr_free(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(data_rd[l]), .rdata(data_rdata[l]), .empty(),
      .rd_count(dc));
    ni_fifo #(.WIDTH(33), .DEPTH(64)) u_r (
      .wclk(clk), .wrst_n(rst_n), .wr_en(rcv_wr[l]), .wdata(rcv_wdata[l]), .full(),
      .wr_free(rf), .rclk(clk), .rrst_n(rst_n), .rd_en(r_rd[l]), .rdata(r_rdata[l]),
      .empty(r_empty[l]), .rd_count());
    assign ctrl_count[l] = 16'(cc);
    assign data_count[l] = 16'(dc);
    assign rcv_free[l]   = 16'(rf);
    assign my_slot[l]    = '0;
    assign n_nodes[l]    = 3'd1;

    // loopback with a four-clock delay
    line_word_t d_w [4];
    logic       d_v [4];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < 4; k++) begin d_v[k] <= 1'b0; d_w[k] <= '0; end
      end else begin
        d_v[0] <= ltx_wr[l] && !ltx_wdata[l].cmd;
        d_w[0] <= ltx_wdata[l].w;
        for (int k = 1; k < 4; k++) begin d_v[k] <= d_v[k-1]; d_w[k] <= d_w[k-1]; end
      end
    end
    assign lrx_empty[l] = !d_v[3];
    assign lrx_rdata[l] = d_w[3];
    assign ltx_full[l]  = 1'b0;
  end

  // wavelength check
  // (a new partition point applies from the next cycle of each level on)
  int n_words [L], n_takeover [L], n_recon = 0;
  logic [LAMBDA_W:0] x1_cyc [L];
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < L; l++) begin
      logic [3:0] lm;
      if (cycle_begin[l]) x1_cyc[l] = x1;
      lm = (l == 0) ? 4'((1 << x1_cyc[l]) - 1) : ~4'((1 << x1_cyc[l]) - 1);
      if (ltx_wr[l] && !ltx_wdata[l].cmd) begin
        check((ltx_wdata[l].lambda & ~lm) == '0 && ltx_wdata[l].lambda != '0,
              $sformatf("level %0d sends on %b with x1 = %0d", l, ltx_wdata[l].lambda, x1_cyc[l]));
        n_words[l]++;
      end
      if (takeover[l]) n_takeover[l]++;
    end
    if (reconf_req) n_recon++;
  end

  // receive: compare with what was queued
  // one queue per level and packet type: control and data packets may overtake
  // each other, packets of one type may not
  logic [32:0] exp_q [L][2][$];
  int n_pkts [L];
  for (genvar l = 0; l < L; l++) begin : g_rx
    bit in_pkt = 0, cur_data = 0;
    always @(negedge clk) begin
      r_rd[l] = 0;
      if (rst_n && !r_empty[l]) begin
        int t;
        if (!in_pkt) cur_data = (r_rdata[l].data[23:16] == 8'(PT_DATA));
        t = int'(cur_data);
        check(exp_q[l][t].size() > 0 && {r_rdata[l].last, r_rdata[l].data} == exp_q[l][t][0],
              $sformatf("level %0d received word %h", l, {r_rdata[l].last, r_rdata[l].data}));
        if (exp_q[l][t].size() > 0) void'(exp_q[l][t].pop_front());
        in_pkt = !r_rdata[l].last;
        if (r_rdata[l].last) n_pkts[l]++;
        r_rd[l] = 1;
      end
    end
  end

  task automatic queue_pkt(input int l, input bit is_data, input int tag);
    int len;
    len = is_data ? DW : CW;
    for (int k = 0; k < len; k++) begin
      host_word_t w;
      w.data = (k == 0) ? 32'(make_hdr(8'(l), is_data ? PT_DATA : PT_CONTROL, 8'd5, 8'd5))
                        : 32'(tag * 100 + k);
      w.last = (k == len - 1);
      if (is_data) begin d_wr[l] = 1; d_wd[l] = w; end
      else         begin c_wr[l] = 1; c_wd[l] = w; end
      exp_q[l][int'(is_data)].push_back({w.last, w.data});
      @(negedge clk);
      d_wr[l] = 0; c_wr[l] = 0;
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) begin
      c_wr[l] = 0; d_wr[l] = 0; c_wd[l] = '0; d_wd[l] = '0;
    end
    x1_wr = 0; x1_cfg = 3'd2; auto_reconf = 0;
    repeat (3) @(negedge clk);
    check(x1 == 3'd2, "partition point resets to the middle");
    rst_n = 1;
    // traffic on both levels
    for (int t = 0; t < 6; t++) begin
      queue_pkt(0, t % 2 == 0, t);
      queue_pkt(1, t % 3 != 0, 10 + t);
      repeat (200) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    check(n_takeover[0] == 1 && n_takeover[1] == 1, "one takeover per level");
    check(is_clock_node == 2'b11 && synced == 2'b11, "clock node on both levels");
    check(n_pkts[0] == 6 && n_pkts[1] == 6, $sformatf("looped packets %0d %0d", n_pkts[0], n_pkts[1]));
    // host writes the partition point
    x1_wr = 1; x1_cfg = 3'd3;
    @(negedge clk);
    x1_wr = 0;
    check(x1 == 3'd3, "partition point written by host");
    for (int t = 0; t < 4; t++) begin
      queue_pkt(0, 1, 20 + t);
      queue_pkt(1, 1, 30 + t);
      repeat (300) @(negedge clk);
    end
    // automatic reallocation under level 1 load
    auto_reconf = 1;
    for (int t = 0; t < 30 && x1 != 3'd1; t++) begin
      queue_pkt(1, 1, 40 + t);
      repeat (150) @(negedge clk);
    end
    check(x1 == 3'd1, $sformatf("reallocation moved x1 to 1 (x1 = %0d, requests %0d)", x1, n_recon));
    repeat (4000) @(negedge clk);
    for (int l = 0; l < L; l++)
      for (int t = 0; t < 2; t++)
        check(exp_q[l][t].size() == 0, $sformatf("level %0d: %0d words missing", l, exp_q[l][t].size()));
    check(n_words[0] > 0 && n_words[1] > 0, "both levels transmit");
    $display("packets %0d %0d, reallocation requests %0d", n_pkts[0], n_pkts[1], n_recon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
