// tb_level_mac: four level_mac nodes on one level of a modelled star network.
//
// Nodes 1..4 own control slots 0..3 of a level with two wavelengths; their links to
// the star have different delays. The test checks, against values computed in the
// testbench:
//  * clock node election: node 1 (lowest identifier, shortest takeover time) becomes
//    the clock node, the others follow its clock packets;
//  * synchronisation: once delays are measured, every node's clock equals the clock
//    node's within one tick, and measured delays differ as the link delays do;
//  * delivery: every data and control packet the hosts queue arrives, unchanged and
//    once, at its destination only, and no two words ever collide on a wavelength;
//  * cycle length: each cycle lasts (1 + 4) control slots plus D data slots, where D
//    is worked out by a reference model from the reservations seen on the line;
//  * the receiver collision rule and the slot extension both occur.
module tb_level_mac;
  import ni_pkg::*;
  localparam int N          = 4;
  localparam int CTRL_WORDS = 16;
  localparam int DATA_WORDS = 32;
  localparam int GUARD      = 16;
  localparam int CSL        = 1 + CTRL_WORDS + GUARD;
  localparam int DSL        = 1 + DATA_WORDS + GUARD;
  localparam int NODE_W     = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  // network
  int                    dly      [N] = '{1, 3, 2, 4};
  logic                  ntx_v    [N];
  line_word_t            ntx_w    [N];
  logic [NUM_LAMBDA-1:0] ntx_m    [N];
  logic [LAMBDA_W-1:0]   nrx_sel  [N];
  logic                  nrx_v    [N];
  line_word_t            nrx_w    [N];
  int                    net_coll, net_words;

  star_net #(.N(N)) u_net (
    .clk, .dly, .tx_valid(ntx_v), .tx_word(ntx_w), .tx_mask(ntx_m), .rx_sel(nrx_sel),
    .rx_valid(nrx_v), .rx_word(nrx_w), .collisions(net_coll), .words_carried(net_words)
  );

  // per node host-side FIFO write ports driven by the test
  logic       c_wr [N], d_wr [N];
  host_word_t c_wd [N], d_wd [N];
  logic       r_rd [N];
  host_word_t r_rd_data [N];
  logic       r_empty [N];
  logic       is_clk [N], synced [N], cyc_b [N], coll [N], takeover [N], resync [N];
  logic       dsent [N], drcvd [N], drop [N], resv_seen [N];
  logic [TIME_W-1:0] now [N];
  logic [NODE_W:0]   dslots [N];
  logic [5:0]  c_full_cnt [N];
  logic [7:0]  d_fill [N];
  logic [TIME_W-1:0] mdly [N];

  for (genvar i = 0; i < N; i++) begin : g_node
    host_word_t       ctrl_rdata, data_rdata, rcv_wdata;
    logic [6:0]       c_cnt;
    logic [7:0]       d_cnt;
    logic [8:0]       r_free;
    logic             ctrl_rd, data_rd, rcv_wr, ltx_wr, lrx_rd, lrx_empty;
    phy_tx_word_t     ltx_wdata;
    line_word_t       lrx_rdata;

    ni_fifo #(.WIDTH(33), .DEPTH(64)) u_c (
      .wclk(clk), .wrst_n(rst_n), .wr_en(c_wr[i]), .wdata(c_wd[i]), .full(), .wr_free(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(ctrl_rd), .rdata(ctrl_rdata), .empty(), .rd_count(c_cnt));
    ni_fifo #(.WIDTH(33), .DEPTH(128)) u_d (
      .wclk(clk), .wrst_n(rst_n), .wr_en(d_wr[i]), .wdata(d_wd[i]), .full(), .wr_free(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(data_rd), .rdata(data_rdata), .empty(), .rd_count(d_cnt));
    ni_fifo #(.WIDTH(33), .DEPTH(256)) u_r (
      .wclk(clk), .wrst_n(rst_n), .wr_en(rcv_wr), .wdata(rcv_wdata), .full(), .wr_free(r_free),
      .rclk(clk), .rrst_n(rst_n), .rd_en(r_rd[i]), .rdata(r_rd_data[i]), .empty(r_empty[i]), .rd_count());
    ni_fifo #(.WIDTH($bits(line_word_t)), .DEPTH(64)) u_lrx (
      .wclk(clk), .wrst_n(rst_n), .wr_en(nrx_v[i]), .wdata(nrx_w[i]), .full(), .wr_free(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(lrx_rd), .rdata(lrx_rdata), .empty(lrx_empty), .rd_count());

    level_mac #(
      .LEVEL(8'd0), .MAX_NODES(4), .CTRL_WORDS(CTRL_WORDS), .DATA_WORDS(DATA_WORDS),
      .GUARD(GUARD), .TAKEOVER_TICKS(1000), .TAKEOVER_STEP(50)
    ) dut (
      .clk, .rst_n,
      .my_id(8'(i + 1)), .my_slot(NODE_W'(i)), .n_nodes(3'd4),
      .wl_base(2'd0), .wl_count(3'd2), .clock_node_en(1'b1),
      .ctrl_rdata, .ctrl_count(16'(c_cnt)), .ctrl_rd,
      .data_rdata, .data_count(16'(d_cnt)), .data_rd,
      .rcv_wr, .rcv_wdata, .rcv_free(16'(r_free)),
      .ltx_wr, .ltx_wdata, .ltx_full(1'b0),
      .lrx_rdata, .lrx_empty, .lrx_rd,
      .now(now[i]), .my_delay(mdly[i]), .synced(synced[i]), .is_clock_node(is_clk[i]),
      .cycle_begin(cyc_b[i]), .resv_seen(resv_seen[i]), .collision(coll[i]),
      .data_sent(dsent[i]), .data_rcvd(drcvd[i]), .rx_drop(drop[i]),
      .data_slots(dslots[i]), .takeover(takeover[i]), .resync(resync[i])
    );

    // physical side glue: a tuning command retunes the receiver, words go out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ntx_v[i] <= 1'b0; ntx_w[i] <= '0; ntx_m[i] <= '0; nrx_sel[i] <= '0;
      end else begin
        ntx_v[i] <= ltx_wr && !ltx_wdata.cmd;
        ntx_w[i] <= ltx_wdata.w;
        ntx_m[i] <= ltx_wdata.lambda;
        if (ltx_wr && ltx_wdata.cmd) nrx_sel[i] <= ltx_wdata.w.data[LAMBDA_W-1:0];
      end
    end
    assign c_full_cnt[i] = c_cnt[5:0];
    assign d_fill[i]     = d_cnt;
  end

  // ------------------------------------------------------------ scoreboard
  typedef struct { int dst; int src; bit is_data; bit got; } pkt_rec_t;
  pkt_rec_t sent [int];
  int seq_next = 1;

  function automatic logic [31:0] body(input int seq, input int k);
    return 32'(seq * 32'h9e3779b1 + k * 7919);
  endfunction

  task automatic queue_pkt(input int src, input int dst, input bit is_data);
    int len, seq;
    pkt_hdr_t h;
    len = is_data ? DATA_WORDS : CTRL_WORDS;
    seq = seq_next++;
    sent[seq] = '{dst: dst, src: src, is_data: is_data, got: 0};
    h = make_hdr(8'd0, is_data ? PT_DATA : PT_CONTROL, 8'(dst), 8'(src));
    for (int k = 0; k < len; k++) begin
      host_word_t w;
      w.last = (k == len - 1);
      w.data = (k == 0) ? 32'(h) : (k == 1) ? 32'(seq) : body(seq, k);
      if (is_data) begin d_wr[src-1] = 1; d_wd[src-1] = w; end
      else         begin c_wr[src-1] = 1; c_wd[src-1] = w; end
      @(negedge clk);
      d_wr[src-1] = 0; c_wr[src-1] = 0;
    end
  endtask

  // receive side: drain each node's receive FIFO, rebuild packets
  int rx_pkts = 0, rx_data_pkts = 0, rx_ctrl_pkts = 0;
  for (genvar i = 0; i < N; i++) begin : g_rx
    logic [31:0] buf_w [$];
    assign r_rd[i] = !r_empty[i];
    always @(posedge clk) begin
      if (rst_n && !r_empty[i]) begin
        buf_w.push_back(r_rd_data[i].data);
        if (r_rd_data[i].last) begin
          pkt_hdr_t h;
          int seq, len;
          bit ok;
          h = pkt_hdr_t'(buf_w[0]);
          seq = int'(buf_w[1]);
          len = buf_w.size();
          ok = sent.exists(seq);
          check(ok, $sformatf("node %0d got unknown packet seq %0d", i + 1, seq));
          if (ok) begin
            check(sent[seq].dst == i + 1 && int'(h.dst) == i + 1,
                  $sformatf("packet %0d for %0d arrived at %0d", seq, sent[seq].dst, i + 1));
            check(int'(h.src) == sent[seq].src, "sender field");
            check(!sent[seq].got, $sformatf("packet %0d delivered twice", seq));
            check(len == (sent[seq].is_data ? DATA_WORDS : CTRL_WORDS), "packet length");
            for (int k = 2; k < len; k++)
              if (buf_w[k] != body(seq, k)) begin
                check(0, $sformatf("packet %0d word %0d corrupted", seq, k));
                break;
              end
            sent[seq].got = 1;
            rx_pkts++;
            if (sent[seq].is_data) rx_data_pkts++; else rx_ctrl_pkts++;
          end
          buf_w.delete();
        end
      end
    end
  end

  // ------------------------------------------------------------ cycle length reference
  int ref_tags [$];
  int ref_slot, ref_cnt, cyc_len_checks = 0, max_slots_seen = 0, coll_seen = 0;
  int cyc_t0 = -1, ticks = 0;
  int ref_d;
  always @(posedge clk) ticks++;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) if (coll[i]) coll_seen++;
      if (int'(dslots[0]) > max_slots_seen) max_slots_seen = int'(dslots[0]);
      // reservations as they go out on the line (sent during the control cycle)
      for (int i = 0; i < N; i++) begin
        if (ntx_v[i] && ntx_w[i].sof) begin
          pkt_hdr_t h;
          bit hit;
          h = pkt_hdr_t'(ntx_w[i].data);
          if (h.ptype == PT_RESV) begin
            hit = 0;
            foreach (ref_tags[k]) if (ref_tags[k] == int'(h.dst)) hit = 1;
            if (hit) begin ref_slot++; ref_cnt = 0; ref_tags.delete(); end
            ref_tags.push_back(int'(h.dst));
            ref_cnt++;
            if (ref_cnt == 2) begin ref_slot++; ref_cnt = 0; ref_tags.delete(); end
          end
        end
      end
      if (cyc_b[0] && is_clk[0]) begin
        ref_d = ref_slot + (ref_cnt != 0 ? 1 : 0);
        if (cyc_t0 >= 0) begin
          check(ticks - cyc_t0 == (1 + N) * CSL + ref_d * DSL,
                $sformatf("cycle length %0d exp %0d (D=%0d)", ticks - cyc_t0,
                          (1 + N) * CSL + ref_d * DSL, ref_d));
          cyc_len_checks++;
        end
        cyc_t0 = ticks;
        ref_slot = 0; ref_cnt = 0; ref_tags.delete();
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int takeovers = 0, resyncs = 0;
  always @(posedge clk) if (rst_n) for (int i = 0; i < N; i++) begin
    if (takeover[i]) takeovers++;
    if (resync[i]) resyncs++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin c_wr[i] = 0; d_wr[i] = 0; c_wd[i] = '0; d_wd[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // wait for all nodes to synchronise and measure their delays
    wait (synced[0] && synced[1] && synced[2] && synced[3]);
    repeat (3 * (1 + N) * CSL) @(negedge clk);
    check(is_clk[0] && !is_clk[1] && !is_clk[2] && !is_clk[3], "node 1 is the only clock node");
    for (int i = 1; i < N; i++) begin
      int diff;
      diff = int'(now[i]) - int'(now[0]);
      check(diff >= -1 && diff <= 1, $sformatf("node %0d clock %0d vs clock node %0d", i + 1, now[i], now[0]));
      diff = int'(mdly[i]) - int'(mdly[0]);
      check(diff == dly[i] - dly[0], $sformatf("node %0d delay difference %0d exp %0d", i + 1, diff, dly[i] - dly[0]));
    end
    // directed: nodes 1 and 2 both send to node 3 (receiver collision), 4 sends to 1
    fork
      queue_pkt(1, 3, 1);
      queue_pkt(2, 3, 1);
      queue_pkt(4, 1, 1);
      queue_pkt(3, 2, 0);
    join
    repeat (4 * ((1 + N) * CSL + N * DSL)) @(negedge clk);
    // random traffic
    for (int r = 0; r < 12; r++) begin
      for (int s = 1; s <= N; s++) begin
        int d;
        d = 1 + int'($urandom_range(0, N - 2));
        if (d >= s) d++;
        if (d_fill[s-1] < 8'(2 * DATA_WORDS)) queue_pkt(s, d, 1);
        if ($urandom_range(0, 2) == 0 && c_full_cnt[s-1] < 6'(2 * CTRL_WORDS)) queue_pkt(s, 1 + (s % N), 0);
      end
      repeat ((1 + N) * CSL + 2 * DSL) @(negedge clk);
    end
    repeat (12 * ((1 + N) * CSL + N * DSL)) @(negedge clk);
    foreach (sent[s]) check(sent[s].got, $sformatf("packet %0d (%0d->%0d) never arrived", s, sent[s].src, sent[s].dst));
    check(net_coll == 0, $sformatf("%0d wavelength collisions on the network", net_coll));
    check(coll_seen > 0, "receiver collision rule exercised");
    check(max_slots_seen > 1, "data cycle extended beyond one slot");
    check(cyc_len_checks > 10, "cycle lengths checked");
    check(takeovers == 1, $sformatf("exactly one takeover (%0d)", takeovers));
    check(resyncs > 0, "clock packets followed");
    check(rx_ctrl_pkts > 0 && rx_data_pkts > 0, "control and data packets delivered");
    $display("packets=%0d data=%0d ctrl=%0d cycles=%0d collisions_rule=%0d max_slots=%0d net_words=%0d",
             rx_pkts, rx_data_pkts, rx_ctrl_pkts, cyc_len_checks, coll_seen, max_slots_seen, net_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
