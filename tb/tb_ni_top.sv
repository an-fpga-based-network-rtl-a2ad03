// tb_ni_top: end-to-end test of four network interfaces on a two-level network.
//
// Four ni_top instances share two behavioural passive stars (star_net), one per
// level, with a different link delay per node. All four nodes belong to both
// levels and all may act as clock node. Packets are reduced to 32 data words and the
// clock-node timeout to 1500 ticks so that the test runs in reasonable time; every
// other mechanism works as at full size. The MARC and the physical interface share
// one 50 MHz clock, the host side runs on its own 77 MHz clock.
//
// The test runs in phases:
//   1. Reset. No node sends a clock packet, so one takes over on each level.
//   2. Every host sends 60 packets of random type, length (at most the network
//      size, so short ones are padded) and destination, mostly on level 1, after an
//      opening burst of level 0 data packets that mostly go to node 0. One
//      packet with an invalid level is sent and must be rejected. Node 3's host
//      stops reading for a while so that packets for it are dropped.
//   3. When the traffic monitors ask for it, the partition point is moved from 2 to
//      1 on all nodes at once, giving level 1 three wavelengths.
//   4. After the traffic has drained, node 0 (the clock node) is held in reset
//      and another node must take over on both levels.
// A scoreboard checks every delivered packet word by word; each packet must be
// delivered or counted as dropped at its destination. The stars must see no
// collisions, clocks on a level must agree within two ticks, and each mechanism
// listed at the end must have happened at least once.
module tb_ni_top;
  import ni_pkg::*;
  localparam int N = 4, L = NUM_LEVELS;
  localparam int CW = 16, DW = 32, PKTS = 60;

  logic host_clk = 0, clk = 0;
  logic rst_n [N];
  always #6.5 host_clk = ~host_clk;
  always #10  clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-node signals
  logic                  h_tx_valid [N], h_tx_last [N], h_tx_ready [N];
  logic [31:0]           h_tx_data [N], h_rx_data [N];
  logic                  h_rx_valid [N], h_rx_last [N], h_rx_ready [N];
  logic                  x1_wr [N], bad_level [N], reconf_req [N];
  logic [LAMBDA_W:0]     x1_cfg [N], x1 [N], x1_new [N];
  logic [L-1:0]          enc_valid [N], dec_valid [N], synced [N], is_clock_node [N], cycle_begin [N];
  logic [L-1:0]          collision [N], data_sent [N], data_rcvd [N], rx_drop [N], takeover [N];
  logic [L-1:0]          resync [N], tx_underrun [N], rx_overflow [N];
  line_word_t            enc_word [N][L], dec_word [N][L];
  logic [NUM_LAMBDA-1:0] laser_en [N][L];
  logic [LAMBDA_W-1:0]   rx_sel [N][L];
  logic [TIME_W-1:0]     now [N][L];
  logic [2:0]            data_slots [N][L];
  logic [15:0]           load [N][L];
  logic [1:0]            my_slot [N][L];
  logic [2:0]            n_nodes [N][L];

  // the two stars
  logic                  sn_tx_valid [L][N], sn_rx_valid [L][N];
  line_word_t            sn_tx_word [L][N], sn_rx_word [L][N];
  logic [NUM_LAMBDA-1:0] sn_mask [L][N];
  logic [LAMBDA_W-1:0]   sn_sel [L][N];
  int                    sn_coll [L], sn_words [L];
  int                    dly [L][N];
  initial dly = '{'{1, 3, 2, 4}, '{2, 5, 1, 3}};

  for (genvar l = 0; l < L; l++) begin : g_star
    star_net #(.N(N)) u_star (
      .clk(clk), .dly(dly[l]), .tx_valid(sn_tx_valid[l]), .tx_word(sn_tx_word[l]),
      .tx_mask(sn_mask[l]), .rx_sel(sn_sel[l]), .rx_valid(sn_rx_valid[l]),
      .rx_word(sn_rx_word[l]), .collisions(sn_coll[l]), .words_carried(sn_words[l]));
    for (genvar i = 0; i < N; i++) begin : g_link
      assign sn_tx_valid[l][i] = enc_valid[i][l];
      assign sn_tx_word[l][i]  = enc_word[i][l];
      assign sn_mask[l][i]     = laser_en[i][l];
      assign sn_sel[l][i]      = rx_sel[i][l];
      assign dec_valid[i][l]   = sn_rx_valid[l][i];
      assign dec_word[i][l]    = sn_rx_word[l][i];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_node
    for (genvar l = 0; l < L; l++) begin : g_cfg
      assign my_slot[i][l] = 2'(i);
      assign n_nodes[i][l] = 3'(N);
    end
    ni_top #(
      .MAX_NODES(N), .CTRL_WORDS(CW), .DATA_WORDS(DW), .GUARD(16),
      .TAKEOVER_TICKS(1500), .TAKEOVER_STEP(100), .MON_WINDOW(4000),
      .CTRL_FIFO_DEPTH(64), .DATA_FIFO_DEPTH(128), .RCV_FIFO_DEPTH(128), .LINE_FIFO_DEPTH(64)
    ) dut (
      .host_clk(host_clk), .marc_clk(clk), .phy_clk(clk), .rst_n(rst_n[i]),
      .host_tx_valid(h_tx_valid[i]), .host_tx_data(h_tx_data[i]), .host_tx_last(h_tx_last[i]),
      .host_tx_ready(h_tx_ready[i]), .host_rx_valid(h_rx_valid[i]), .host_rx_data(h_rx_data[i]),
      .host_rx_last(h_rx_last[i]), .host_rx_ready(h_rx_ready[i]),
      .my_id(8'(i)), .my_slot(my_slot[i]), .n_nodes(n_nodes[i]), .clock_node_en(2'b11),
      .x1_wr(x1_wr[i]), .x1_cfg(x1_cfg[i]), .auto_reconf(1'b0),
      .enc_valid(enc_valid[i]), .enc_word(enc_word[i]), .laser_en(laser_en[i]),
      .dec_valid(dec_valid[i]), .dec_word(dec_word[i]), .rx_sel(rx_sel[i]),
      .x1(x1[i]), .now(now[i]), .synced(synced[i]), .is_clock_node(is_clock_node[i]),
      .cycle_begin(cycle_begin[i]), .collision(collision[i]), .data_sent(data_sent[i]),
      .data_rcvd(data_rcvd[i]), .rx_drop(rx_drop[i]), .takeover(takeover[i]),
      .resync(resync[i]), .data_slots(data_slots[i]), .reconf_req(reconf_req[i]),
      .x1_new(x1_new[i]), .load(load[i]), .bad_level(bad_level[i]),
      .tx_underrun(tx_underrun[i]), .rx_overflow(rx_overflow[i]));
  end

  // ---------------------------------------------------------------- scoreboard
  typedef struct { int level; bit is_data; int len; int dst; } pkt_info_t;
  pkt_info_t exp_pkt [int];
  int sent_to [N][L], got_at [N][L], drop_at [N][L];
  int n_padded = 0, n_deliv [L][2], n_bad = 0, n_done = 0;

  function automatic logic [31:0] body(input int tag, input int k);
    return 32'(tag) * 32'h9E37_79B9 + 32'(k);
  endfunction

  // host transmit drivers
  int sent_cnt [N];
  for (genvar i = 0; i < N; i++) begin : g_host
    task automatic send(input int level, input bit is_data, input int dst, input int len,
                        input int tag);
      pkt_hdr_t h;
      h = make_hdr(8'(level), is_data ? PT_DATA : PT_CONTROL, 8'(dst), 8'(i));
      if (level < L) begin
        exp_pkt[tag] = '{level, is_data, len, dst};
        sent_to[dst][level]++;
      end
      for (int k = 0; k < len; k++) begin
        h_tx_valid[i] = 1;
        h_tx_data[i]  = (k == 0) ? 32'(h) : (k == 1) ? 32'(tag) : body(tag, k);
        h_tx_last[i]  = (k == len - 1);
        @(posedge host_clk);
        while (!h_tx_ready[i]) @(posedge host_clk);
        #1;
      end
      h_tx_valid[i] = 0;
    endtask

    initial begin
      h_tx_valid[i] = 0; h_tx_data[i] = 0; h_tx_last[i] = 0; sent_cnt[i] = 0;
      wait (rst_n[i] === 1'b1);
      repeat (20) @(posedge host_clk);
      #1;
      if (i == 2) send(2, 1, 0, 5, -1);
      for (int p = 0; p < PKTS; p++) begin
        int level, dst, len;
        bit is_data;
        level   = ($urandom_range(0, 9) == 0) ? 0 : 1;
        is_data = ($urandom_range(0, 9) < 7);
        dst     = (i + 1 + int'($urandom_range(0, N - 2))) % N;
        len     = int'($urandom_range(2, is_data ? DW : CW));
        if (p < 4) begin
          // opening burst of level 0 data packets, mostly to node 0
          level = 0; is_data = 1; dst = (i == 0) ? 1 : 0;
        end
        send(level, is_data, dst, len, i * 1000 + p);
        sent_cnt[i]++;
        repeat (int'($urandom_range(0, 40))) @(posedge host_clk);
        #1;
      end
    end

    // host receive: check each packet against the scoreboard
    logic [31:0] rq [$];
    initial begin
      h_rx_ready[i] = 1;
      forever begin
        @(negedge host_clk);
        if (i == 3 && $time > 80us && $time < 200us) h_rx_ready[i] = 0;
        else h_rx_ready[i] = ($urandom_range(0, 7) != 0);
      end
    end
    always @(posedge host_clk) if (rst_n[i] && h_rx_valid[i] && h_rx_ready[i]) begin
      rq.push_back(h_rx_data[i]);
      if (h_rx_last[i]) begin
        pkt_hdr_t h;
        int tag;
        h = pkt_hdr_t'(rq[0]);
        tag = int'(rq[1]);
        check(exp_pkt.exists(tag), $sformatf("node %0d: unknown packet tag %0d (header %h, %0d words)", i, tag, rq[0], rq.size()));
        if (exp_pkt.exists(tag)) begin
          pkt_info_t e;
          bit ok;
          e = exp_pkt[tag];
          ok = (int'(h.level) == e.level) && (int'(h.dst) == i) && (e.dst == i) &&
               (int'(h.src) == tag / 1000) &&
               (h.ptype == 8'(e.is_data ? PT_DATA : PT_CONTROL)) &&
               (rq.size() == (e.is_data ? DW : CW));
          for (int k = 2; k < rq.size(); k++)
            ok &= (rq[k] == ((k < e.len) ? body(tag, k) : 32'h0));
          check(ok, $sformatf("node %0d: packet %0d header/length/contents (hdr %h, %0d words, expected level %0d data %0d len %0d dst %0d)",
                              i, tag, rq[0], rq.size(), e.level, e.is_data, e.len, e.dst));
          if (e.len < rq.size()) n_padded++;
          n_deliv[e.level][e.is_data]++;
          got_at[i][e.level]++;
          exp_pkt.delete(tag);
        end
        rq.delete();
      end
    end
    always @(posedge host_clk) if (rst_n[i] && bad_level[i]) n_bad++;
  end

  // ---------------------------------------------------------------- monitors
  int n_takeover [L], n_resync [L], n_coll [L], n_ext [L], n_recon = 0, n_sync_chk = 0;
  int n_underrun = 0, n_overflow = 0, n_hi_lambda = 0, n_recover [L];
  int tick = 0;
  bit switched = 0, failed0 = 0;
  always @(posedge clk) begin
    tick++;
    for (int i = 0; i < N; i++) if (rst_n[i]) begin
      for (int l = 0; l < L; l++) begin
        if (takeover[i][l]) begin
          n_takeover[l]++;
          if (failed0) n_recover[l]++;
        end
        if (resync[i][l]) n_resync[l]++;
        if (collision[i][l]) n_coll[l]++;
        if (cycle_begin[i][l] && data_slots[i][l] > 1) n_ext[l]++;
        if (rx_drop[i][l]) drop_at[i][l]++;
        if (tx_underrun[i][l]) n_underrun++;
        if (rx_overflow[i][l]) n_overflow++;
      end
      if (reconf_req[i]) n_recon++;
      if (switched && enc_valid[i][1] && laser_en[i][1][1]) n_hi_lambda++;
      if (switched) check(!(enc_valid[i][0] && laser_en[i][0][1]), "level 0 sends on a level 1 wavelength");
    end
    // clock agreement among synced live nodes, sampled every 64 ticks
    if (tick % 64 == 0)
      for (int l = 0; l < L; l++)
        for (int i = 0; i < N; i++)
          for (int j = i + 1; j < N; j++)
            if (rst_n[i] && rst_n[j] && synced[i][l] && synced[j][l] && tick > 4000) begin
              int d;
              d = int'($signed(now[i][l] - now[j][l]));
              check(d >= -2 && d <= 2, $sformatf("level %0d clocks of %0d and %0d differ by %0d", l, i, j, d));
              n_sync_chk++;
            end
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    int cb_age [L];
    // a falling edge on the reset input, so that the asynchronous resets act
    for (int i = 0; i < N; i++) begin rst_n[i] = 1; x1_wr[i] = 0; x1_cfg[i] = 3'd2; end
    #1ns;
    for (int i = 0; i < N; i++) rst_n[i] = 0;
    #100ns;
    for (int i = 0; i < N; i++) rst_n[i] = 1;

    // phase 3: move the partition point once a traffic monitor asks for it, as the
    // hosts' software would
    wait (n_recon > 0 || (sent_cnt[0] == PKTS && sent_cnt[1] == PKTS));
    cb_age = '{0, 0};
    forever begin
      @(negedge clk);
      for (int l = 0; l < L; l++) cb_age[l] = cycle_begin[0][l] ? 0 : cb_age[l] + 1;
      if (cb_age[0] >= 30 && cb_age[1] >= 30 && cb_age[0] < 100 && cb_age[1] < 100) break;
    end
    for (int i = 0; i < N; i++) begin x1_wr[i] = 1; x1_cfg[i] = 3'd1; end
    @(negedge clk);
    for (int i = 0; i < N; i++) x1_wr[i] = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) check(x1[i] == 3'd1, "partition point written");
    // the cycle in progress finishes on the old wavelengths
    repeat (1000) @(negedge clk);
    switched = 1;

    // wait for all packets to be sent and delivered or dropped
    for (int i = 0; i < N; i++) wait (sent_cnt[i] == PKTS);
    repeat (20000) @(negedge clk);

    // phase 4: the clock node fails
    check(is_clock_node[0] == 2'b11, "node 0 is clock node on both levels");
    failed0 = 1;
    rst_n[0] = 0;
    repeat (4000) @(negedge clk);
    for (int l = 0; l < L; l++)
      check(is_clock_node[1][l] && !is_clock_node[2][l] && !is_clock_node[3][l],
            $sformatf("level %0d: node 1 took over after the clock node failed", l));

    // final checks
    for (int i = 0; i < N; i++)
      for (int l = 0; l < L; l++)
        check(got_at[i][l] + drop_at[i][l] == sent_to[i][l],
              $sformatf("node %0d level %0d: delivered %0d + dropped %0d != sent %0d",
                        i, l, got_at[i][l], drop_at[i][l], sent_to[i][l]));
    for (int l = 0; l < L; l++) check(sn_coll[l] == 0, $sformatf("level %0d: %0d collisions on the star", l, sn_coll[l]));
    check(n_underrun == 0, "no transmit underrun");
    check(n_overflow == 0, "no receive overflow at the physical interface");

    $display("mechanism counts:");
    $display("  clock-node takeover        L0 %0d L1 %0d", n_takeover[0], n_takeover[1]);
    $display("  takeover after node fails  L0 %0d L1 %0d", n_recover[0], n_recover[1]);
    $display("  clock resynchronisation    L0 %0d L1 %0d", n_resync[0], n_resync[1]);
    $display("  clock agreement checks     %0d", n_sync_chk);
    $display("  receiver-collision rule    L0 %0d L1 %0d", n_coll[0], n_coll[1]);
    $display("  data cycle extended        L0 %0d L1 %0d", n_ext[0], n_ext[1]);
    $display("  control delivered          L0 %0d L1 %0d", n_deliv[0][0], n_deliv[1][0]);
    $display("  data delivered             L0 %0d L1 %0d", n_deliv[0][1], n_deliv[1][1]);
    $display("  padded packets             %0d", n_padded);
    $display("  dropped, host not reading  %0d", drop_at[3][0] + drop_at[3][1]);
    $display("  invalid level rejected     %0d", n_bad);
    $display("  reallocation requested     %0d", n_recon);
    $display("  level 1 sends on wavelength 1 after the switch %0d", n_hi_lambda);
    for (int l = 0; l < L; l++) begin
      check(n_takeover[l] >= 2, $sformatf("level %0d: takeover", l));
      check(n_recover[l] >= 1, $sformatf("level %0d: takeover after failure", l));
      check(n_resync[l] > 0, $sformatf("level %0d: resync", l));
      check(n_coll[l] > 0, $sformatf("level %0d: receiver-collision rule", l));
      check(n_ext[l] > 0, $sformatf("level %0d: data cycle extension", l));
      check(n_deliv[l][0] > 0 && n_deliv[l][1] > 0, $sformatf("level %0d: control and data delivery", l));
    end
    check(n_sync_chk > 0, "clock agreement checked");
    check(n_padded > 0, "padding");
    check(drop_at[3][0] + drop_at[3][1] > 0, "drop when host does not read");
    check(n_bad == 1, "invalid level rejected once");
    check(n_recon > 0, "traffic monitor asks for reallocation");
    check(n_hi_lambda > 0, "new wavelength used after the partition point moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
