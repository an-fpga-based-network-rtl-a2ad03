// level_sync: distributed clock of one hierarchy level.
//
// Each level keeps its own time. One node per level, the clock node, opens every
// control cycle with a clock packet carrying its time at the start of the cycle and
// its own propagation delay to the wavelength partitioner. Every other node sets its
// clock from that packet: the time it should read when the packet's time word
// arrives is
//     tx_time + CLK_WORD_POS + prop_delay(clock node) + my_delay
// where CLK_WORD_POS is the offset of the time word in the clock slot and my_delay
// is this node's own delay to the partitioner. That correction, the clock packet
// fields and the idea that any node takes over as clock node when it hears none come
// from the design description. How the delay is measured and how the takeover is
// arbitrated is not described; here:
//  * delay: the network returns every packet to its sender, so a node notes its
//    local time when the header of its own control-slot packet leaves (own_tx_hdr)
//    and when it comes back (own_rx_hdr); half the round trip is my_delay. The
//    round trip includes the fixed FIFO and interface latencies, which then cancel
//    out of the correction above.
//  * before its own delay is measured a node uses the clock node's delay in its
//    place, which is exact on a symmetric star and keeps the first correction close.
//    A clock packet whose prop_delay is zero comes from a clock node that has not
//    measured its own delay yet; it holds off takeovers but is not followed.
//  * takeover: a node with clock_node_en that hears no clock packet for
//    TAKEOVER_TICKS + my_id * TAKEOVER_STEP ticks becomes clock node (the stagger
//    keeps two nodes from starting together). A clock node that hears a clock packet
//    from a node with a lower identifier gives up the role and follows it.
//
// Timing: one tick per clock. resync and takeover are one-tick pulses for the slot
// sequencer. my_delay is half of a TIME_W-bit round trip, so its top bit is
// always zero. resync_pos is the position in the clock slot during the tick in which
// resync is high, so the sequencer loads resync_pos + 1 on that clock edge.
module level_sync
  import ni_pkg::*;
#(
  parameter int unsigned TAKEOVER_TICKS = 8192,
  parameter int unsigned TAKEOVER_STEP  = 256,
  parameter int unsigned CLK_WORD_POS   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clock_node_en,
  input  logic [ID_W-1:0]   my_id,
  input  logic              own_tx_hdr,
  input  logic              own_rx_hdr,
  input  logic              clk_rx,
  input  logic [ID_W-1:0]   clk_rx_src,
  input  clk_word_t         clk_rx_word,
  input  logic              cycle_start,
  output logic [TIME_W-1:0] now,
  output logic [TIME_W-1:0] cycle_time,
  output logic [TIME_W-1:0] my_delay,
  output logic              delay_valid,
  output logic              is_clock_node,
  output logic              synced,
  output logic              resync,
  output logic [TIME_W-1:0] resync_pos,
  output logic              takeover
);
  logic [31:0]       silent;
  logic [TIME_W-1:0] t_tx;
  logic              rt_pending;
  logic              accept;
  logic [TIME_W-1:0] corr;     // elapsed time in the cycle when the time word arrives
  logic [31:0]       limit;

  assign accept = clk_rx && clk_rx_word.prop_delay != '0 &&
                  (!is_clock_node || clk_rx_src < my_id);
  assign corr   = TIME_W'(CLK_WORD_POS) + clk_rx_word.prop_delay +
                  (delay_valid ? my_delay : clk_rx_word.prop_delay);
  assign limit  = 32'(TAKEOVER_TICKS) + 32'(my_id) * 32'(TAKEOVER_STEP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now           <= '0;
      cycle_time    <= '0;
      my_delay      <= '0;
      delay_valid   <= 1'b0;
      is_clock_node <= 1'b0;
      synced        <= 1'b0;
      resync        <= 1'b0;
      resync_pos    <= '0;
      takeover      <= 1'b0;
      silent        <= '0;
      t_tx          <= '0;
      rt_pending    <= 1'b0;
    end else begin
      resync   <= 1'b0;
      takeover <= 1'b0;
      now      <= now + 1'b1;

      // propagation delay measurement
      if (own_tx_hdr) begin
        t_tx       <= now;
        rt_pending <= 1'b1;
      end else if (own_rx_hdr && rt_pending) begin
        my_delay    <= (now - t_tx) >> 1;
        delay_valid <= 1'b1;
        rt_pending  <= 1'b0;
      end

      if (cycle_start) cycle_time <= now;

      if (accept) begin
        // follow the clock node
        now           <= clk_rx_word.tx_time + corr + 1'b1;
        cycle_time    <= clk_rx_word.tx_time;
        resync        <= 1'b1;
        resync_pos    <= corr + 1'b1;
        synced        <= 1'b1;
        is_clock_node <= 1'b0;
        silent        <= '0;
      end else if (clk_rx || is_clock_node) begin
        silent <= '0;
      end else if (clock_node_en && silent >= limit) begin
        is_clock_node <= 1'b1;
        synced        <= 1'b1;
        takeover      <= 1'b1;
        silent        <= '0;
      end else begin
        silent <= silent + 1'b1;
      end
    end
  end

  a_one_event: assert property (@(posedge clk) disable iff (!rst_n) !(resync && takeover));

endmodule
