// ni_top: FPGA-style network interface for a two-level WDM gigabit network.
//
// Three sections, each in its own clock domain, joined only by FIFOs:
//  * host interface (host_clk, the PCI local bus clock): host_if_ctrl sorts the
//    host's packets into the level 0/1 control and data FIFOs and merges the two
//    level receive FIFOs into one stream back to the host;
//  * media access and reconfiguration control (marc_clk): marc runs the clock,
//    reservation and slot machinery of each level and the traffic monitor;
//  * physical interface (phy_clk, the line word clock): phy_if_ctrl feeds the
//    8B/10B encoders and laser wavelength selection of each level and collects the
//    decoded receive words, through one transmit and one receive FIFO per level.
// The PCI bridge chip, the 8B/10B encoder/decoder chips, the serial transmitters
// and receivers and the wavelength multiplexers are outside this RTL; their
// signals are the ports below. This structure is the one of the design description.
//
// Clocks: the MARC counts slot time in marc_clk ticks and writes one line word per
// tick, so marc_clk must not be faster than phy_clk (the description allows running
// the MARC at the physical interface speed). host_clk is free.
// Configuration inputs (my_id, my_slot, n_nodes, clock_node_en, x1_*, auto_reconf)
// belong to the marc_clk domain and are meant to be static while the node runs.
// rst_n is asynchronous; each domain releases it on its own clock.
module ni_top
  import ni_pkg::*;
#(
  parameter int unsigned MAX_NODES       = 16,
  parameter int unsigned CTRL_WORDS      = CTRL_PKT_WORDS,
  parameter int unsigned DATA_WORDS      = DATA_PKT_WORDS,
  parameter int unsigned GUARD           = 16,
  parameter int unsigned TAKEOVER_TICKS  = 2 * ((1 + MAX_NODES) * (1 + CTRL_WORDS + GUARD) +
                                          MAX_NODES * (1 + DATA_WORDS + GUARD)),
  parameter int unsigned TAKEOVER_STEP   = 256,
  parameter int unsigned MON_WINDOW      = 65536,
  parameter int unsigned CTRL_FIFO_DEPTH = 64,
  parameter int unsigned DATA_FIFO_DEPTH = 4096,
  parameter int unsigned RCV_FIFO_DEPTH  = 4096,
  parameter int unsigned LINE_FIFO_DEPTH = 64,
  localparam int unsigned NODE_W = $clog2(MAX_NODES)
) (
  input  logic                  host_clk,
  input  logic                  marc_clk,
  input  logic                  phy_clk,
  input  logic                  rst_n,
  // host side (local bus of the PCI bridge)
  input  logic                  host_tx_valid,
  input  logic [WORD_W-1:0]     host_tx_data,
  input  logic                  host_tx_last,
  output logic                  host_tx_ready,
  output logic                  host_rx_valid,
  output logic [WORD_W-1:0]     host_rx_data,
  output logic                  host_rx_last,
  input  logic                  host_rx_ready,
  // configuration
  input  logic [ID_W-1:0]       my_id,
  input  logic [NODE_W-1:0]     my_slot       [NUM_LEVELS],
  input  logic [NODE_W:0]       n_nodes       [NUM_LEVELS],
  input  logic [NUM_LEVELS-1:0] clock_node_en,
  input  logic                  x1_wr,
  input  logic [LAMBDA_W:0]     x1_cfg,
  input  logic                  auto_reconf,
  // physical side, per level
  output logic [NUM_LEVELS-1:0] enc_valid,
  output line_word_t            enc_word      [NUM_LEVELS],
  output logic [NUM_LAMBDA-1:0] laser_en      [NUM_LEVELS],
  input  logic [NUM_LEVELS-1:0] dec_valid,
  input  line_word_t            dec_word      [NUM_LEVELS],
  output logic [LAMBDA_W-1:0]   rx_sel        [NUM_LEVELS],
  // status (marc_clk domain unless noted)
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
  output logic [15:0]           load          [NUM_LEVELS],
  output logic                  bad_level,                   // host_clk
  output logic [NUM_LEVELS-1:0] tx_underrun,                 // phy_clk
  output logic [NUM_LEVELS-1:0] rx_overflow                  // phy_clk
);
  localparam int unsigned CNT_W = 16;

  logic host_rst_n, marc_rst_n, phy_rst_n;
  reset_sync u_rst_host (.clk(host_clk), .rst_in_n(rst_n), .rst_out_n(host_rst_n));
  reset_sync u_rst_marc (.clk(marc_clk), .rst_in_n(rst_n), .rst_out_n(marc_rst_n));
  reset_sync u_rst_phy  (.clk(phy_clk),  .rst_in_n(rst_n), .rst_out_n(phy_rst_n));

  // ---------------------------------------------------------------- host side
  logic [3:0]            ofifo_wr, ofifo_full;
  host_word_t            ofifo_wdata;
  host_word_t            rcv_rdata [NUM_LEVELS];
  logic [NUM_LEVELS-1:0] rcv_empty, rcv_rd;

  host_if_ctrl #(.CTRL_WORDS(CTRL_WORDS), .DATA_WORDS(DATA_WORDS)) u_host (
    .clk(host_clk), .rst_n(host_rst_n),
    .tx_valid(host_tx_valid), .tx_data(host_tx_data), .tx_last(host_tx_last),
    .tx_ready(host_tx_ready),
    .rx_valid(host_rx_valid), .rx_data(host_rx_data), .rx_last(host_rx_last),
    .rx_ready(host_rx_ready),
    .ofifo_wr, .ofifo_wdata, .ofifo_full,
    .rcv_rdata, .rcv_empty, .rcv_rd,
    .bad_level
  );

  host_word_t            ctrl_rdata [NUM_LEVELS], data_rdata [NUM_LEVELS];
  logic [CNT_W-1:0]      ctrl_count [NUM_LEVELS], data_count [NUM_LEVELS];
  logic [NUM_LEVELS-1:0] ctrl_rd, data_rd, rcv_wr;
  host_word_t            rcv_wdata  [NUM_LEVELS];
  logic [CNT_W-1:0]      rcv_free   [NUM_LEVELS];

  for (genvar l = 0; l < int'(NUM_LEVELS); l++) begin : g_host_fifo
    logic [$clog2(CTRL_FIFO_DEPTH):0] c_cnt;
    logic [$clog2(DATA_FIFO_DEPTH):0] d_cnt;
    logic [$clog2(RCV_FIFO_DEPTH):0]  r_free;
    logic                             c_empty, d_empty, r_full;

    ni_fifo #(.WIDTH($bits(host_word_t)), .DEPTH(CTRL_FIFO_DEPTH)) u_ctrl (
      .wclk(host_clk), .wrst_n(host_rst_n), .wr_en(ofifo_wr[2*l]), .wdata(ofifo_wdata),
      .full(ofifo_full[2*l]), .wr_free(),
      .rclk(marc_clk), .rrst_n(marc_rst_n), .rd_en(ctrl_rd[l]), .rdata(ctrl_rdata[l]),
      .empty(c_empty), .rd_count(c_cnt)
    );
    ni_fifo #(.WIDTH($bits(host_word_t)), .DEPTH(DATA_FIFO_DEPTH)) u_data (
      .wclk(host_clk), .wrst_n(host_rst_n), .wr_en(ofifo_wr[2*l+1]), .wdata(ofifo_wdata),
      .full(ofifo_full[2*l+1]), .wr_free(),
      .rclk(marc_clk), .rrst_n(marc_rst_n), .rd_en(data_rd[l]), .rdata(data_rdata[l]),
      .empty(d_empty), .rd_count(d_cnt)
    );
    ni_fifo #(.WIDTH($bits(host_word_t)), .DEPTH(RCV_FIFO_DEPTH)) u_rcv (
      .wclk(marc_clk), .wrst_n(marc_rst_n), .wr_en(rcv_wr[l]), .wdata(rcv_wdata[l]),
      .full(r_full), .wr_free(r_free),
      .rclk(host_clk), .rrst_n(host_rst_n), .rd_en(rcv_rd[l]), .rdata(rcv_rdata[l]),
      .empty(rcv_empty[l]), .rd_count()
    );
    assign ctrl_count[l] = CNT_W'(c_cnt);
    assign data_count[l] = CNT_W'(d_cnt);
    assign rcv_free[l]   = CNT_W'(r_free);
  end

  // ---------------------------------------------------------------- MARC
  logic [NUM_LEVELS-1:0] ltx_wr, ltx_full, lrx_empty, lrx_rd;
  phy_tx_word_t          ltx_wdata [NUM_LEVELS];
  line_word_t            lrx_rdata [NUM_LEVELS];

  marc #(
    .MAX_NODES(MAX_NODES), .CTRL_WORDS(CTRL_WORDS), .DATA_WORDS(DATA_WORDS),
    .GUARD(GUARD), .TAKEOVER_TICKS(TAKEOVER_TICKS), .TAKEOVER_STEP(TAKEOVER_STEP),
    .MON_WINDOW(MON_WINDOW)
  ) u_marc (
    .clk(marc_clk), .rst_n(marc_rst_n),
    .my_id, .my_slot, .n_nodes, .clock_node_en, .x1_wr, .x1_cfg, .auto_reconf,
    .ctrl_rdata, .ctrl_count, .ctrl_rd, .data_rdata, .data_count, .data_rd,
    .rcv_wr, .rcv_wdata, .rcv_free,
    .ltx_wr, .ltx_wdata, .ltx_full, .lrx_rdata, .lrx_empty, .lrx_rd,
    .x1, .now, .synced, .is_clock_node, .cycle_begin, .collision, .data_sent,
    .data_rcvd, .rx_drop, .takeover, .resync, .data_slots, .reconf_req, .x1_new, .load
  );

  // ---------------------------------------------------------------- physical side
  phy_tx_word_t          ptx_rdata [NUM_LEVELS];
  logic [NUM_LEVELS-1:0] ptx_empty, ptx_rd, prx_wr, prx_full;
  line_word_t            prx_wdata [NUM_LEVELS];

  for (genvar l = 0; l < int'(NUM_LEVELS); l++) begin : g_line_fifo
    ni_fifo #(.WIDTH($bits(phy_tx_word_t)), .DEPTH(LINE_FIFO_DEPTH)) u_ltx (
      .wclk(marc_clk), .wrst_n(marc_rst_n), .wr_en(ltx_wr[l]), .wdata(ltx_wdata[l]),
      .full(ltx_full[l]), .wr_free(),
      .rclk(phy_clk), .rrst_n(phy_rst_n), .rd_en(ptx_rd[l]), .rdata(ptx_rdata[l]),
      .empty(ptx_empty[l]), .rd_count()
    );
    ni_fifo #(.WIDTH($bits(line_word_t)), .DEPTH(LINE_FIFO_DEPTH)) u_lrx (
      .wclk(phy_clk), .wrst_n(phy_rst_n), .wr_en(prx_wr[l]), .wdata(prx_wdata[l]),
      .full(prx_full[l]), .wr_free(),
      .rclk(marc_clk), .rrst_n(marc_rst_n), .rd_en(lrx_rd[l]), .rdata(lrx_rdata[l]),
      .empty(lrx_empty[l]), .rd_count()
    );
  end

  phy_if_ctrl u_phy (
    .clk(phy_clk), .rst_n(phy_rst_n),
    .ltx_rdata(ptx_rdata), .ltx_empty(ptx_empty), .ltx_rd(ptx_rd),
    .lrx_wr(prx_wr), .lrx_wdata(prx_wdata), .lrx_full(prx_full),
    .enc_valid, .enc_word, .laser_en, .dec_valid, .dec_word, .rx_sel,
    .tx_underrun, .rx_overflow
  );

endmodule
