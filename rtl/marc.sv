// marc: media access and reconfiguration control.
//
// The MARC sits between the host-side FIFOs and the line-side FIFOs and runs one
// independent media access controller per hierarchy level (level_mac: clock,
// reservations, slot timing, packet processing), as the design description asks:
// each level has its own clock node, cycles and wavelengths. Around them it holds
// the wavelength partition and the traffic monitor.
//
// Partition: x1 is the partition point between the levels. Level 0 owns wavelengths
// 0..x1-1 and level 1 owns x1..C-1, so |C0| = x1 and |C1| = C - x1. It resets to
// C/2, the two-and-two split of the description's two-level example, is written by
// the host (x1_wr), and with auto_reconf set follows the traffic monitor's
// proposals. Each level takes a new partition at the start of its next control
// cycle. How the nodes agree on a change is left open by the description and is not
// built; a single node applying its own proposal is this design's simplification.
//
// Timing: everything on clk, the MARC clock; FIFO ports as in level_mac, whose
// receive words reach rcv_wdata unchanged.
module marc
  import ni_pkg::*;
#(
  parameter int unsigned MAX_NODES      = 16,
  parameter int unsigned CTRL_WORDS     = CTRL_PKT_WORDS,
  parameter int unsigned DATA_WORDS     = DATA_PKT_WORDS,
  parameter int unsigned GUARD          = 16,
  parameter int unsigned TAKEOVER_TICKS = 2 * ((1 + MAX_NODES) * (1 + CTRL_WORDS + GUARD) +
                                         MAX_NODES * (1 + DATA_WORDS + GUARD)),
  parameter int unsigned TAKEOVER_STEP  = 256,
  parameter int unsigned MON_WINDOW     = 65536,
  localparam int unsigned NODE_W = $clog2(MAX_NODES),
  localparam int unsigned CNT_W  = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration from the host
  input  logic [ID_W-1:0]       my_id,
  input  logic [NODE_W-1:0]     my_slot       [NUM_LEVELS],
  input  logic [NODE_W:0]       n_nodes       [NUM_LEVELS],
  input  logic [NUM_LEVELS-1:0] clock_node_en,
  input  logic                  x1_wr,
  input  logic [LAMBDA_W:0]     x1_cfg,
  input  logic                  auto_reconf,
  // host-side FIFOs
  input  host_word_t            ctrl_rdata    [NUM_LEVELS],
  input  logic [CNT_W-1:0]      ctrl_count    [NUM_LEVELS],
  output logic [NUM_LEVELS-1:0] ctrl_rd,
  input  host_word_t            data_rdata    [NUM_LEVELS],
  input  logic [CNT_W-1:0]      data_count    [NUM_LEVELS],
  output logic [NUM_LEVELS-1:0] data_rd,
  output logic [NUM_LEVELS-1:0] rcv_wr,
  output host_word_t            rcv_wdata     [NUM_LEVELS],
  input  logic [CNT_W-1:0]      rcv_free      [NUM_LEVELS],
  // line-side FIFOs
  output logic [NUM_LEVELS-1:0] ltx_wr,
  output phy_tx_word_t          ltx_wdata     [NUM_LEVELS],
  input  logic [NUM_LEVELS-1:0] ltx_full,
  input  line_word_t            lrx_rdata     [NUM_LEVELS],
  input  logic [NUM_LEVELS-1:0] lrx_empty,
  output logic [NUM_LEVELS-1:0] lrx_rd,
  // status
  output logic [LAMBDA_W:0]     x1,
  output logic [TIME_W-1:0]     now           [NUM_LEVELS],
  output logic [NUM_LEVELS-1:0] synced,
  output logic [NUM_LEVELS-1:0] is_clock_node,
  output logic [NUM_LEVELS-1:0] cycle_begin,
  output logic [NUM_LEVELS-1:0] collision,
  output logic [NUM_LEVELS-1:0] data_sent,
  output logic [NUM_LEVELS-1:0] data_rcvd,
  output logic [NUM_LEVELS-1:0] rx_drop,
  output logic [NUM_LEVELS-1:0] takeover,
  output logic [NUM_LEVELS-1:0] resync,
  output logic [NODE_W:0]       data_slots    [NUM_LEVELS],
  output logic                  reconf_req,
  output logic [LAMBDA_W:0]     x1_new,
  output logic [15:0]           load          [NUM_LEVELS]
);
  logic [NUM_LEVELS-1:0] resv_seen;
  logic                  needy_level;
  logic [LAMBDA_W-1:0]   wl_base  [NUM_LEVELS];
  logic [LAMBDA_W:0]     wl_count [NUM_LEVELS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         x1 <= (LAMBDA_W+1)'(NUM_LAMBDA / 2);
    else if (x1_wr)                     x1 <= x1_cfg;
    else if (auto_reconf && reconf_req) x1 <= x1_new;
  end

  assign wl_base[0]  = '0;
  assign wl_count[0] = x1;
  assign wl_base[1]  = LAMBDA_W'(x1);
  assign wl_count[1] = (LAMBDA_W+1)'(NUM_LAMBDA) - x1;

  for (genvar l = 0; l < int'(NUM_LEVELS); l++) begin : g_level
    level_mac #(
      .LEVEL         (8'(l)),
      .MAX_NODES     (MAX_NODES),
      .CTRL_WORDS    (CTRL_WORDS),
      .DATA_WORDS    (DATA_WORDS),
      .GUARD         (GUARD),
      .TAKEOVER_TICKS(TAKEOVER_TICKS),
      .TAKEOVER_STEP (TAKEOVER_STEP)
    ) u_mac (
      .clk, .rst_n, .my_id,
      .my_slot      (my_slot[l]),
      .n_nodes      (n_nodes[l]),
      .wl_base      (wl_base[l]),
      .wl_count     (wl_count[l]),
      .clock_node_en(clock_node_en[l]),
      .ctrl_rdata   (ctrl_rdata[l]),
      .ctrl_count   (ctrl_count[l]),
      .ctrl_rd      (ctrl_rd[l]),
      .data_rdata   (data_rdata[l]),
      .data_count   (data_count[l]),
      .data_rd      (data_rd[l]),
      .rcv_wr       (rcv_wr[l]),
      .rcv_wdata    (rcv_wdata[l]),
      .rcv_free     (rcv_free[l]),
      .ltx_wr       (ltx_wr[l]),
      .ltx_wdata    (ltx_wdata[l]),
      .ltx_full     (ltx_full[l]),
      .lrx_rdata    (lrx_rdata[l]),
      .lrx_empty    (lrx_empty[l]),
      .lrx_rd       (lrx_rd[l]),
      .now          (now[l]),
      .my_delay     (),
      .synced       (synced[l]),
      .is_clock_node(is_clock_node[l]),
      .cycle_begin  (cycle_begin[l]),
      .resv_seen    (resv_seen[l]),
      .collision    (collision[l]),
      .data_sent    (data_sent[l]),
      .data_rcvd    (data_rcvd[l]),
      .rx_drop      (rx_drop[l]),
      .data_slots   (data_slots[l]),
      .takeover     (takeover[l]),
      .resync       (resync[l])
    );
  end

  traffic_monitor #(.WINDOW(MON_WINDOW)) u_mon (
    .clk, .rst_n, .resv_seen, .x1, .load, .reconf_req, .x1_new, .needy_level
  );

endmodule
