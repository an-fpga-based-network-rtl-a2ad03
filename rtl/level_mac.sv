// level_mac: media access control of one hierarchy level.
//
// Access to the wavelengths of a level is organised in cycles. A control cycle has
// one clock slot followed by one control slot per node of the level; every packet
// sent in it is broadcast on all wavelengths of the level by the laser array. It is
// followed by a data cycle of as many data slots as the reservations of the control
// cycle need, in which each reserved data packet travels on a single wavelength.
// A node that has a data packet waiting sends a reservation in its control slot; all
// nodes, the sender included, feed the reservations they receive into resv_unit,
// which works out the slot and wavelength of every data packet. This follows the
// design description. The timing below is this design's own:
//
//   clock/control slot: pos 0 receiver tuning command, pos 1..CTRL_WORDS packet,
//                       then GUARD idle ticks (CTRL_SLOT_LEN = 1 + CTRL_WORDS + GUARD)
//   data slot:          pos 0 tuning command, pos 1..DATA_WORDS packet, GUARD idle
//
// All packets have their full size (64-byte control packets, 8-Kbyte data packets);
// packets the MAC makes itself (clock, reservation, probe) are padded with zeros.
// In its control slot a node sends, in this order of preference, a reservation or a
// control packet from the host (the two alternate when both wait, so neither
// starves), or else a probe, an empty control packet whose only use is to measure
// the node's delay (see level_sync). A data packet or control packet is only started
// once it is complete in its FIFO.
//
// Receive side: every word from the line FIFO is examined. Reservations go to
// resv_unit; the clock packet time word goes to level_sync; own packets coming back
// time the round trip; control and data packets addressed to this node are copied to
// the receive FIFO toward the host if it has room for the whole packet, otherwise
// they are dropped and counted. Packets for other nodes or of the other level are
// discarded. A received word is copied to rcv_wdata unchanged (only rcv_wr is
// decided here), so that output is the line receive word itself.
//
// Interfaces: the host-side FIFOs are read first-word-fall-through with their fill
// counts; the line-side transmit FIFO takes phy_tx_word_t (data words with their
// wavelength mask, or tuning commands); the line-side receive FIFO gives
// line_word_t. One word per clock in each direction. While not running cycles (before
// the first clock packet is accepted) the MAC tunes the receiver to the first
// wavelength of the level and keeps it there.
// A node that becomes clock node while it is already running cycles keeps their
// timing, so the other nodes stay aligned when a clock node fails.
module level_mac
  import ni_pkg::*;
#(
  parameter logic [7:0]  LEVEL          = 8'd0,
  parameter int unsigned MAX_NODES      = 16,
  parameter int unsigned CTRL_WORDS     = CTRL_PKT_WORDS,
  parameter int unsigned DATA_WORDS     = DATA_PKT_WORDS,
  parameter int unsigned GUARD          = 16,
  parameter int unsigned TAKEOVER_TICKS = 2 * ((1 + MAX_NODES) * (1 + CTRL_WORDS + GUARD) +
                                         MAX_NODES * (1 + DATA_WORDS + GUARD)),
  parameter int unsigned TAKEOVER_STEP  = 256,
  localparam int unsigned NODE_W = $clog2(MAX_NODES),
  localparam int unsigned CNT_W  = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic [ID_W-1:0]       my_id,
  input  logic [NODE_W-1:0]     my_slot,      // this node's control slot
  input  logic [NODE_W:0]       n_nodes,      // control slots per control cycle
  input  logic [LAMBDA_W-1:0]   wl_base,      // first wavelength of the level
  input  logic [LAMBDA_W:0]     wl_count,     // wavelengths of the level
  input  logic                  clock_node_en,
  // host-side control and data FIFOs (read)
  input  host_word_t            ctrl_rdata,
  input  logic [CNT_W-1:0]      ctrl_count,
  output logic                  ctrl_rd,
  input  host_word_t            data_rdata,
  input  logic [CNT_W-1:0]      data_count,
  output logic                  data_rd,
  // host-side receive FIFO (write)
  output logic                  rcv_wr,
  output host_word_t            rcv_wdata,
  input  logic [CNT_W-1:0]      rcv_free,
  // line-side FIFOs
  output logic                  ltx_wr,
  output phy_tx_word_t          ltx_wdata,
  input  logic                  ltx_full,
  input  line_word_t            lrx_rdata,
  input  logic                  lrx_empty,
  output logic                  lrx_rd,
  // status
  output logic [TIME_W-1:0]     now,
  output logic [TIME_W-1:0]     my_delay,      // measured delay to the partitioner
  output logic                  synced,
  output logic                  is_clock_node,
  output logic                  cycle_begin,   // pulse: first tick of a control cycle
  output logic                  resv_seen,     // pulse: a reservation was received
  output logic                  collision,     // pulse: receiver collision closed a slot
  output logic                  data_sent,     // pulse: own data packet started
  output logic                  data_rcvd,     // pulse: data packet for this node started
  output logic                  rx_drop,       // pulse: packet for this node dropped (no room)
  output logic [NODE_W:0]       data_slots,    // slots in the current data cycle
  output logic                  takeover,
  output logic                  resync
);
  localparam int unsigned CTRL_SLOT_LEN = 1 + CTRL_WORDS + GUARD;
  localparam int unsigned DATA_SLOT_LEN = 1 + DATA_WORDS + GUARD;
  localparam int unsigned POS_W = $clog2(DATA_SLOT_LEN + 1);

  typedef enum logic [1:0] {PH_IDLE, PH_CLOCK, PH_CTRL, PH_DATA} phase_e;
  typedef enum logic [2:0] {JOB_NONE, JOB_CLOCK, JOB_RESV, JOB_PROBE, JOB_CTRL, JOB_DATA} job_e;

  phase_e            phase;
  logic [NODE_W:0]   slot;
  logic [POS_W-1:0]  pos;
  job_e              job;
  logic [ID_W-1:0]   job_dst;
  logic              prefer_resv;

  // ---------------------------------------------------------------- sync
  logic              own_tx_hdr, own_rx_hdr, clk_rx;
  logic [ID_W-1:0]   clk_rx_src;
  clk_word_t         clk_rx_word;
  logic [TIME_W-1:0] cycle_time, resync_pos;
  logic              delay_valid;

  level_sync #(
    .TAKEOVER_TICKS(TAKEOVER_TICKS),
    .TAKEOVER_STEP (TAKEOVER_STEP),
    .CLK_WORD_POS  (2)
  ) u_sync (
    .clk, .rst_n, .clock_node_en, .my_id,
    .own_tx_hdr, .own_rx_hdr, .clk_rx, .clk_rx_src, .clk_rx_word,
    .cycle_start(cycle_begin),
    .now, .cycle_time, .my_delay, .delay_valid, .is_clock_node, .synced,
    .resync, .resync_pos, .takeover
  );

  // ---------------------------------------------------------------- reservations
  logic                  resv_valid;
  logic [ID_W-1:0]       resv_src, resv_dst;
  logic [NODE_W:0]       num_slots;
  logic                  resv_overflow, tx_valid;
  logic [NODE_W-1:0]     tx_slot, rx_slot;
  logic [LAMBDA_W-1:0]   tx_lambda, rx_lambda, cyc_wl_base;
  logic [LAMBDA_W:0]     cyc_wl_count;

  resv_unit #(.MAX_SLOTS(MAX_NODES)) u_resv (
    .clk, .rst_n,
    .clear(cycle_begin || resync),
    .wl_base, .wl_count, .my_id,
    .resv_valid, .resv_src, .resv_dst,
    .num_slots, .collision, .overflow(resv_overflow),
    .tx_valid, .tx_slot, .tx_lambda,
    .rx_slot, .rx_lambda, .cyc_wl_base, .cyc_wl_count
  );

  assign data_slots = num_slots;
  assign rx_slot    = slot[NODE_W-1:0];

  function automatic logic [NUM_LAMBDA-1:0] level_mask(input logic [LAMBDA_W-1:0] base,
                                                       input logic [LAMBDA_W:0] cnt);
    logic [NUM_LAMBDA-1:0] m;
    for (int k = 0; k < int'(NUM_LAMBDA); k++)
      m[k] = (k >= int'(base)) && (k < int'(base) + int'(cnt));
    return m;
  endfunction

  // ---------------------------------------------------------------- slot sequencer
  logic [POS_W-1:0] slot_len;
  logic             slot_end;
  assign slot_len    = (phase == PH_DATA) ? POS_W'(DATA_SLOT_LEN) : POS_W'(CTRL_SLOT_LEN);
  assign slot_end    = (phase != PH_IDLE) && (pos == slot_len - 1'b1);
  assign cycle_begin = (phase == PH_CLOCK) && (pos == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      slot  <= '0;
      pos   <= '0;
    end else if (takeover && phase == PH_IDLE) begin
      // a node already running cycles keeps their timing when it becomes clock node
      phase <= PH_CLOCK;
      slot  <= '0;
      pos   <= '0;
    end else if (resync) begin
      phase <= PH_CLOCK;
      slot  <= '0;
      pos   <= POS_W'(resync_pos) + 1'b1;
    end else if (slot_end) begin
      pos <= '0;
      unique case (phase)
        PH_CLOCK: begin
          phase <= (n_nodes != '0) ? PH_CTRL : PH_CLOCK;
          slot  <= '0;
        end
        PH_CTRL: begin
          if (slot + 1'b1 < n_nodes) begin
            slot <= slot + 1'b1;
          end else if (num_slots != '0) begin
            phase <= PH_DATA;
            slot  <= '0;
          end else begin
            phase <= PH_CLOCK;
            slot  <= '0;
          end
        end
        PH_DATA: begin
          if (slot + 1'b1 < num_slots) begin
            slot <= slot + 1'b1;
          end else begin
            phase <= PH_CLOCK;
            slot  <= '0;
          end
        end
        default: ;
      endcase
    end else if (phase != PH_IDLE) begin
      pos <= pos + 1'b1;
    end
  end

  // ---------------------------------------------------------------- transmit
  logic ctrl_ready, data_ready;
  pkt_hdr_t data_hdr, ctrl_hdr;
  assign ctrl_ready = ctrl_count >= CNT_W'(CTRL_WORDS);
  assign data_ready = data_count >= CNT_W'(DATA_WORDS);
  assign data_hdr   = pkt_hdr_t'(data_rdata.data);
  assign ctrl_hdr   = pkt_hdr_t'(ctrl_rdata.data);

  // job chosen at pos 0 of each slot, carried out at pos 1..length
  job_e job_next;
  always_comb begin
    job_next = JOB_NONE;
    unique case (phase)
      PH_CLOCK: if (is_clock_node) job_next = JOB_CLOCK;
      PH_CTRL:
        if (synced && slot == {1'b0, my_slot}) begin
          if (data_ready && (!ctrl_ready || prefer_resv)) job_next = JOB_RESV;
          else if (ctrl_ready)                           job_next = JOB_CTRL;
          else                                           job_next = JOB_PROBE;
        end
      PH_DATA:
        if (tx_valid && slot == {1'b0, tx_slot} && data_ready) job_next = JOB_DATA;
      default: ;
    endcase
  end

  logic [POS_W-1:0] idx;
  logic [POS_W-1:0] job_len;
  logic             job_word;
  logic [NUM_LAMBDA-1:0] job_mask;
  assign idx      = pos - 1'b1;
  assign job_len  = (job == JOB_DATA) ? POS_W'(DATA_WORDS) : POS_W'(CTRL_WORDS);
  assign job_word = (job != JOB_NONE) && (phase != PH_IDLE) && (pos != '0) && (pos <= job_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      job         <= JOB_NONE;
      job_dst     <= '0;
      job_mask    <= '0;
      prefer_resv <= 1'b0;
    end else if (resync || slot_end) begin
      job <= JOB_NONE;
    end else if (phase != PH_IDLE && pos == '0) begin
      job     <= job_next;
      job_dst <= data_hdr.dst;
      unique case (job_next)
        JOB_DATA:  job_mask <= NUM_LAMBDA'(1) << tx_lambda;
        JOB_CLOCK: job_mask <= level_mask(wl_base, wl_count);
        default:   job_mask <= level_mask(cyc_wl_base, cyc_wl_count);
      endcase
      if (job_next == JOB_RESV) prefer_resv <= 1'b0;
      if (job_next == JOB_CTRL) prefer_resv <= 1'b1;
    end
  end

  logic [WORD_W-1:0]   tx_word;
  logic [LAMBDA_W-1:0] tune_wl;
  assign tune_wl = (phase == PH_DATA)  ? rx_lambda :
                   (phase == PH_CLOCK) ? wl_base : cyc_wl_base;
  always_comb begin
    tx_word = '0;
    unique case (job)
      JOB_CLOCK:
        if (idx == '0)      tx_word = make_hdr(LEVEL, PT_CLOCK, '1, my_id);
        else if (idx == 1)  tx_word = {cycle_time, my_delay};
      JOB_RESV:
        if (idx == '0)      tx_word = make_hdr(LEVEL, PT_RESV, job_dst, my_id);
      JOB_PROBE:
        if (idx == '0)      tx_word = make_hdr(LEVEL, PT_PROBE, my_id, my_id);
      JOB_CTRL:
        if (idx == '0)      tx_word = make_hdr(LEVEL, PT_CONTROL, ctrl_hdr.dst, my_id);
        else                tx_word = ctrl_rdata.data;
      JOB_DATA:
        if (idx == '0)      tx_word = make_hdr(LEVEL, PT_DATA, data_hdr.dst, my_id);
        else                tx_word = data_rdata.data;
      default: ;
    endcase
  end

  // last wavelength the receiver was told to use; the physical interface starts on
  // wavelength 0 after reset. A node that is not running cycles listens on the
  // first wavelength of its level, where the clock packet arrives.
  logic [LAMBDA_W-1:0] tuned_wl;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             tuned_wl <= '0;
    else if (ltx_wr && ltx_wdata.cmd)       tuned_wl <= ltx_wdata.w.data[LAMBDA_W-1:0];
  end

  always_comb begin
    ltx_wr    = 1'b0;
    ltx_wdata = '0;
    ctrl_rd   = 1'b0;
    data_rd   = 1'b0;
    if (phase == PH_IDLE && tuned_wl != wl_base && !ltx_full) begin
      ltx_wr              = 1'b1;
      ltx_wdata.cmd       = 1'b1;
      ltx_wdata.w.data    = WORD_W'(wl_base);
    end else if (phase != PH_IDLE && pos == '0) begin
      // receiver tuning for this slot: the table entry in a data slot, the first
      // wavelength of the level otherwise
      ltx_wr              = 1'b1;
      ltx_wdata.cmd       = 1'b1;
      ltx_wdata.w.data    = WORD_W'(tune_wl);
    end else if (job_word) begin
      ltx_wr           = 1'b1;
      ltx_wdata.lambda = job_mask;
      ltx_wdata.w.sof  = (idx == '0);
      ltx_wdata.w.eof  = (idx == job_len - 1'b1);
      ltx_wdata.w.data = tx_word;
      ctrl_rd          = (job == JOB_CTRL);
      data_rd          = (job == JOB_DATA);
    end
  end

  assign own_tx_hdr = job_word && idx == '0 && job != JOB_DATA;
  assign data_sent  = job_word && idx == '0 && job == JOB_DATA;

  // ---------------------------------------------------------------- receive
  pkt_hdr_t rh;
  logic     rx_v, in_clk_other, fwd;
  logic [1:0] rx_idx;   // word index, saturating: only the first two words matter
  logic     for_me, level_ok, room;

  assign lrx_rd   = !lrx_empty;
  assign rx_v     = !lrx_empty;
  assign rh       = pkt_hdr_t'(lrx_rdata.data);
  assign level_ok = rh.level == LEVEL;
  assign for_me   = rh.dst == my_id;
  always_comb begin
    unique case (pkt_type_e'(rh.ptype))
      PT_DATA:    room = rcv_free >= CNT_W'(DATA_WORDS);
      PT_CONTROL: room = rcv_free >= CNT_W'(CTRL_WORDS);
      default:    room = 1'b0;
    endcase
  end

  logic sof_v, fwd_start;
  assign sof_v     = rx_v && lrx_rdata.sof && level_ok;
  assign fwd_start = sof_v && for_me && room &&
                     (rh.ptype == PT_DATA || rh.ptype == PT_CONTROL);

  assign resv_valid  = sof_v && rh.ptype == PT_RESV;
  assign resv_src    = rh.src;
  assign resv_dst    = rh.dst;
  assign resv_seen   = resv_valid;
  assign own_rx_hdr  = sof_v && rh.src == my_id && rh.ptype != PT_DATA;
  assign clk_rx      = rx_v && !lrx_rdata.sof && in_clk_other && rx_idx == 2'd0;
  assign clk_rx_word = clk_word_t'(lrx_rdata.data);
  assign data_rcvd   = fwd_start && rh.ptype == PT_DATA;
  assign rx_drop     = sof_v && for_me && !room &&
                       (rh.ptype == PT_DATA || rh.ptype == PT_CONTROL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_clk_other <= 1'b0;
      fwd          <= 1'b0;
      rx_idx       <= '0;
      clk_rx_src   <= '0;
    end else if (rx_v) begin
      if (lrx_rdata.sof) begin
        in_clk_other <= level_ok && rh.ptype == PT_CLOCK && rh.src != my_id;
        clk_rx_src   <= rh.src;
        fwd          <= fwd_start && !lrx_rdata.eof;
        rx_idx       <= '0;
      end else begin
        if (rx_idx != 2'd3) rx_idx <= rx_idx + 1'b1;
        if (lrx_rdata.eof) begin
          fwd          <= 1'b0;
          in_clk_other <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    rcv_wr         = rx_v && (fwd_start || (fwd && !lrx_rdata.sof));
    rcv_wdata.last = lrx_rdata.eof;
    rcv_wdata.data = lrx_rdata.data;
  end

  // ---------------------------------------------------------------- rules
  a_tx_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(ltx_wr && ltx_full));
  a_resync_in_slot: assert property (@(posedge clk) disable iff (!rst_n)
                                     resync |-> resync_pos < TIME_W'(CTRL_SLOT_LEN - 1));
  a_pkt_whole:      assert property (@(posedge clk) disable iff (!rst_n)
                                     (data_rd && ltx_wdata.w.eof) |-> data_rdata.last);

endmodule
