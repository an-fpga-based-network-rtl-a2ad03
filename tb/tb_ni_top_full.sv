// tb_ni_top_full: two network interfaces at full size.
//
// ni_top is used with all its default parameters: 16-node levels, 16-word (64-byte)
// control packets, 2048-word (8-Kbyte) data packets, the default guard time,
// clock-node timeout and FIFO depths. Two nodes share a behavioural passive star per
// level (star_net). After reset node 0 must take over as clock node on both levels
// once the full timeout has passed; node 1 must follow it. Then each node sends one
// full data packet and one control packet on one level and one short (padded) data
// packet and one control packet on the other; all four must arrive intact at the
// other node. The stars must see no collisions. The MARC and physical interface share
// a 50 MHz clock, the host side runs at 33 MHz.
module tb_ni_top_full;
  import ni_pkg::*;
  localparam int N = 2, L = NUM_LEVELS;
  localparam int CW = CTRL_PKT_WORDS, DW = DATA_PKT_WORDS;

  logic host_clk = 0, clk = 0, rst_n = 1;
  always #15 host_clk = ~host_clk;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic                  h_tx_valid [N], h_tx_last [N], h_tx_ready [N];
  logic [31:0]           h_tx_data [N], h_rx_data [N];
  logic                  h_rx_valid [N], h_rx_last [N];
  logic [L-1:0]          enc_valid [N], dec_valid [N], synced [N], is_clock_node [N], takeover [N];
  logic [L-1:0]          data_rcvd [N], tx_underrun [N], rx_overflow [N];
  line_word_t            enc_word [N][L], dec_word [N][L];
  logic [NUM_LAMBDA-1:0] laser_en [N][L];
  logic [LAMBDA_W-1:0]   rx_sel [N][L];
  logic [3:0]            my_slot [N][L];
  logic [4:0]            n_nodes [N][L];

  logic                  sn_tx_valid [L][N], sn_rx_valid [L][N];
  line_word_t            sn_tx_word [L][N], sn_rx_word [L][N];
  logic [NUM_LAMBDA-1:0] sn_mask [L][N];
  logic [LAMBDA_W-1:0]   sn_sel [L][N];
  int                    sn_coll [L], sn_words [L];
  int                    dly [L][N];
  initial dly = '{'{2, 3}, '{4, 1}};

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
      assign my_slot[i][l] = 4'(i);
      assign n_nodes[i][l] = 5'(N);
    end
    ni_top dut (
      .host_clk(host_clk), .marc_clk(clk), .phy_clk(clk), .rst_n(rst_n),
      .host_tx_valid(h_tx_valid[i]), .host_tx_data(h_tx_data[i]), .host_tx_last(h_tx_last[i]),
      .host_tx_ready(h_tx_ready[i]), .host_rx_valid(h_rx_valid[i]), .host_rx_data(h_rx_data[i]),
      .host_rx_last(h_rx_last[i]), .host_rx_ready(1'b1),
      .my_id(8'(i)), .my_slot(my_slot[i]), .n_nodes(n_nodes[i]), .clock_node_en(2'b11),
      .x1_wr(1'b0), .x1_cfg(3'd2), .auto_reconf(1'b0),
      .enc_valid(enc_valid[i]), .enc_word(enc_word[i]), .laser_en(laser_en[i]),
      .dec_valid(dec_valid[i]), .dec_word(dec_word[i]), .rx_sel(rx_sel[i]),
      .x1(), .now(), .synced(synced[i]), .is_clock_node(is_clock_node[i]),
      .cycle_begin(), .collision(), .data_sent(), .data_rcvd(data_rcvd[i]), .rx_drop(),
      .takeover(takeover[i]), .resync(), .data_slots(), .reconf_req(), .x1_new(), .load(),
      .bad_level(), .tx_underrun(tx_underrun[i]), .rx_overflow(rx_overflow[i]));
  end

  function automatic logic [31:0] body(input int tag, input int k);
    return 32'(tag) * 32'h9E37_79B9 + 32'(k);
  endfunction

  // packets: tag = 10 * sender + index
  typedef struct { int level; bit is_data; int len; } pkt_t;
  pkt_t plan [4] = '{'{0, 1, DW}, '{1, 0, CW}, '{1, 1, 100}, '{0, 0, 5}};
  int got [N], n_takeover [L];
  bit seen [int];

  for (genvar i = 0; i < N; i++) begin : g_host
    initial begin
      h_tx_valid[i] = 0; h_tx_data[i] = 0; h_tx_last[i] = 0;
      wait (rst_n === 1'b1);
      repeat (10) @(posedge host_clk);
      #1;
      for (int p = 0; p < 4; p++) begin
        pkt_t q;
        int tag;
        q = plan[(p + 2 * i) % 4];
        tag = 10 * i + p;
        for (int k = 0; k < q.len; k++) begin
          h_tx_valid[i] = 1;
          h_tx_data[i]  = (k == 0) ? 32'(make_hdr(8'(q.level), q.is_data ? PT_DATA : PT_CONTROL,
                                                  8'(1 - i), 8'(i)))
                        : (k == 1) ? 32'(tag) : body(tag, k);
          h_tx_last[i]  = (k == q.len - 1);
          @(posedge host_clk);
          while (!h_tx_ready[i]) @(posedge host_clk);
          #1;
        end
        h_tx_valid[i] = 0;
      end
    end

    logic [31:0] rq [$];
    always @(posedge host_clk) if (rst_n && h_rx_valid[i]) begin
      rq.push_back(h_rx_data[i]);
      if (h_rx_last[i]) begin
        pkt_hdr_t h;
        int tag, src, p;
        pkt_t q;
        bit ok;
        h   = pkt_hdr_t'(rq[0]);
        tag = int'(rq[1]);
        src = tag / 10;
        p   = tag % 10;
        ok  = (src == 1 - i) && p < 4 && !seen.exists(tag);
        if (ok) begin
          q  = plan[(p + 2 * src) % 4];
          ok = int'(h.level) == q.level && int'(h.dst) == i && int'(h.src) == src &&
               h.ptype == 8'(q.is_data ? PT_DATA : PT_CONTROL) &&
               rq.size() == (q.is_data ? DW : CW);
          for (int k = 2; k < rq.size(); k++)
            ok &= (rq[k] == ((k < q.len) ? body(tag, k) : 32'h0));
        end
        check(ok, $sformatf("node %0d: packet %0d (%0d words) intact", i, tag, rq.size()));
        seen[tag] = 1;
        got[i]++;
        rq.delete();
      end
    end
  end

  int tick = 0, first_takeover = -1;
  always @(posedge clk) if (rst_n) begin
    tick++;
    for (int l = 0; l < L; l++) begin
      if (takeover[0][l] || takeover[1][l]) begin
        n_takeover[l]++;
        if (first_takeover < 0) first_takeover = tick;
      end
    end
    for (int i = 0; i < N; i++) check(tx_underrun[i] == '0 && rx_overflow[i] == '0, "no underrun or overflow");
  end

  initial begin
    #1ns;
    rst_n = 0;   // a falling edge, so that the asynchronous resets act
    #100ns;
    rst_n = 1;
    wait (got[0] == 4 && got[1] == 4);
    repeat (100) @(posedge clk);
    $display("first takeover at tick %0d, packets received %0d and %0d, words on the stars %0d %0d",
             first_takeover, got[0], got[1], sn_words[0], sn_words[1]);
    check(first_takeover > 67000 && first_takeover < 67300, "full clock-node timeout before takeover");
    for (int l = 0; l < L; l++) begin
      check(n_takeover[l] == 1, $sformatf("level %0d: one takeover", l));
      check(is_clock_node[0][l] && !is_clock_node[1][l] && synced[1][l],
            $sformatf("level %0d: node 0 is clock node and node 1 follows", l));
      check(sn_coll[l] == 0, $sformatf("level %0d: no collisions on the star", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
