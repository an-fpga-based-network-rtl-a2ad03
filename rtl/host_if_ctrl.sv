// host_if_ctrl: host interface controller.
//
// Sits between the local bus of the PCI bridge and the MARC. Outgoing packets from
// the host are sorted by the level and type fields of their header word into four
// FIFOs: level 0 control, level 0 data, level 1 control, level 1 data (FIFO index
// = 2*level + is_data). Incoming packets from the two level receive FIFOs are merged
// into one stream to the host. Both jobs are those of the design description; the
// stream handshake and the packet rules below are this design's own:
//  * A packet is a burst of 32-bit words on a valid/ready stream, tx_last on the
//    final word. Its first word is the header {level, type, destination, sender}.
//  * Packets have fixed sizes on the network, CTRL_WORDS for control packets and
//    DATA_WORDS for data packets. A shorter packet is padded with zero words, the
//    excess of a longer one is discarded, so the MARC always finds whole packets of
//    known length. The FIFO word carries a last flag on the final word.
//  * A header with a level other than 0 or 1 is reported on bad_level and its packet
//    is discarded.
//  * The receive merge alternates between the levels packet by packet when both
//    have packets waiting, and never interleaves two packets.
// All on the host clock; the FIFO ports are the host-side ends of ni_fifo.
module host_if_ctrl
  import ni_pkg::*;
#(
  parameter int unsigned CTRL_WORDS = CTRL_PKT_WORDS,
  parameter int unsigned DATA_WORDS = DATA_PKT_WORDS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // packets from the host
  input  logic                  tx_valid,
  input  logic [WORD_W-1:0]     tx_data,
  input  logic                  tx_last,
  output logic                  tx_ready,
  // packets to the host
  output logic                  rx_valid,
  output logic [WORD_W-1:0]     rx_data,
  output logic                  rx_last,
  input  logic                  rx_ready,
  // level control/data FIFOs, write side
  output logic [3:0]            ofifo_wr,
  output host_word_t            ofifo_wdata,
  input  logic [3:0]            ofifo_full,
  // level receive FIFOs, read side
  input  host_word_t            rcv_rdata [NUM_LEVELS],
  input  logic [NUM_LEVELS-1:0] rcv_empty,
  output logic [NUM_LEVELS-1:0] rcv_rd,
  // status
  output logic                  bad_level
);
  typedef enum logic [1:0] {S_HDR, S_BODY, S_PAD, S_DROP} tx_state_e;
  tx_state_e   st;
  logic [1:0]  sel;
  logic [15:0] cnt;       // words written of the current packet
  logic [15:0] len;       // packet length on the network

  pkt_hdr_t    h;
  logic        h_data, h_bad;
  logic [1:0]  h_sel;
  logic [15:0] h_len;
  assign h      = pkt_hdr_t'(tx_data);
  assign h_data = h.ptype == PT_DATA;
  assign h_bad  = h.level > 8'd1;
  assign h_sel  = {h.level[0], h_data};
  assign h_len  = h_data ? 16'(DATA_WORDS) : 16'(CTRL_WORDS);

  logic [1:0]  cur_sel;
  logic [15:0] cur_len;
  assign cur_sel = (st == S_HDR) ? h_sel : sel;
  assign cur_len = (st == S_HDR) ? h_len : len;

  logic wr_ok, final_word;
  assign wr_ok      = !ofifo_full[cur_sel];
  assign final_word = cnt == cur_len - 1'b1;

  always_comb begin
    tx_ready    = 1'b0;
    ofifo_wr    = '0;
    ofifo_wdata = '0;
    unique case (st)
      S_HDR: begin
        tx_ready = h_bad || wr_ok;
        if (tx_valid && !h_bad && wr_ok) begin
          ofifo_wr[cur_sel]  = 1'b1;
          ofifo_wdata.data   = tx_data;
          ofifo_wdata.last   = final_word;
        end
      end
      S_BODY: begin
        tx_ready = wr_ok;
        if (tx_valid && wr_ok) begin
          ofifo_wr[cur_sel]  = 1'b1;
          ofifo_wdata.data   = tx_data;
          ofifo_wdata.last   = final_word;
        end
      end
      S_PAD: begin
        if (wr_ok) begin
          ofifo_wr[cur_sel]  = 1'b1;
          ofifo_wdata.last   = final_word;
        end
      end
      S_DROP: tx_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_HDR;
      sel       <= '0;
      cnt       <= '0;
      len       <= '0;
      bad_level <= 1'b0;
    end else begin
      bad_level <= 1'b0;
      unique case (st)
        S_HDR:
          if (tx_valid && h_bad) begin
            bad_level <= 1'b1;
            if (!tx_last) st <= S_DROP;
          end else if (tx_valid && wr_ok) begin
            sel <= h_sel;
            len <= h_len;
            cnt <= 16'd1;
            if (final_word) st <= tx_last ? S_HDR : S_DROP;
            else            st <= tx_last ? S_PAD : S_BODY;
          end
        S_BODY:
          if (tx_valid && wr_ok) begin
            cnt <= cnt + 1'b1;
            if (final_word) st <= tx_last ? S_HDR : S_DROP;
            else if (tx_last) st <= S_PAD;
          end
        S_PAD:
          if (wr_ok) begin
            cnt <= cnt + 1'b1;
            if (final_word) st <= S_HDR;
          end
        S_DROP:
          if (tx_valid && tx_last) st <= S_HDR;
        default: st <= S_HDR;
      endcase
    end
  end

  // ---------------------------------------------------------------- receive merge
  logic in_pkt, rsel, prio;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt <= 1'b0;
      rsel   <= 1'b0;
      prio   <= 1'b0;
    end else if (!in_pkt) begin
      if (!rcv_empty[prio]) begin
        in_pkt <= 1'b1;
        rsel   <= prio;
      end else if (!rcv_empty[!prio]) begin
        in_pkt <= 1'b1;
        rsel   <= !prio;
      end
    end else if (rx_valid && rx_ready && rx_last) begin
      in_pkt <= 1'b0;
      prio   <= !rsel;
    end
  end

  assign rx_valid = in_pkt && !rcv_empty[rsel];
  assign rx_data  = rcv_rdata[rsel].data;
  assign rx_last  = rcv_rdata[rsel].last;
  always_comb begin
    rcv_rd       = '0;
    rcv_rd[rsel] = rx_valid && rx_ready;
  end

endmodule
