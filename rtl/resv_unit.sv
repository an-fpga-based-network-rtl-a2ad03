// resv_unit: reservation hardware of one hierarchy level.
//
// Every node sees every reservation packet of its level, its own included, and from
// them alone builds the same map of the coming data cycle. This unit does that
// bookkeeping, one reservation per clock cycle and without buffering:
//  * destination tags: one per wavelength of the level, holding the destinations
//    already placed in the data slot now being filled;
//  * collision detection: a reservation whose destination is already in the tags
//    would make two packets arrive at one receiver in one slot, so the current slot
//    is closed (counted as full however many wavelengths it uses) and the
//    reservation starts the next slot;
//  * wavelength indicator and data slot indicator: where the next reservation goes.
//    Reservations take wavelengths first come first served; when all C_i
//    wavelengths of a slot are taken, the data cycle grows by one slot;
//  * transmit record: slot and wavelength of this node's own data packet (sender
//    tag = my_id);
//  * receive table: for each data slot, the wavelength the receiver must be tuned
//    to. Slots with no packet for this node read back as the first wavelength of
//    the level (wl_base).
// The structure follows the reservation block diagram of the design description;
// keeping the tags only for the slot being filled, and clearing them when a slot
// closes, is this design's reading of "the destinations of the most recent C_i
// data packets".
//
// Timing: resv_valid with resv_src/resv_dst is taken on a clock edge; all outputs
// reflect it from the next cycle. clear (start of a control cycle) empties the map
// and latches wl_base/wl_count for the cycle. rx_lambda is a combinational read of
// the receive table at rx_slot. num_slots is the length of the data cycle in slots.
module resv_unit
  import ni_pkg::*;
#(
  parameter int unsigned MAX_SLOTS = 16,
  localparam int unsigned SLOT_W = $clog2(MAX_SLOTS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic [LAMBDA_W-1:0]   wl_base,    // first wavelength of this level
  input  logic [LAMBDA_W:0]     wl_count,   // C_i, wavelengths of this level (1..NUM_LAMBDA)
  input  logic [ID_W-1:0]       my_id,
  input  logic                  resv_valid,
  input  logic [ID_W-1:0]       resv_src,
  input  logic [ID_W-1:0]       resv_dst,
  output logic [SLOT_W:0]       num_slots,
  output logic                  collision,  // pulse: the last reservation closed a slot early
  output logic                  overflow,   // pulse: reservation dropped, no slot left
  output logic                  tx_valid,
  output logic [SLOT_W-1:0]     tx_slot,
  output logic [LAMBDA_W-1:0]   tx_lambda,
  input  logic [SLOT_W-1:0]     rx_slot,
  output logic [LAMBDA_W-1:0]   rx_lambda,
  output logic [LAMBDA_W-1:0]   cyc_wl_base,
  output logic [LAMBDA_W:0]     cyc_wl_count
);
  // Destination tags of the slot being filled, indexed by wavelength offset.
  logic [ID_W-1:0]       tag   [NUM_LAMBDA];
  logic [NUM_LAMBDA-1:0] tag_v;
  logic [SLOT_W:0]       cur_slot;   // data slot indicator (MAX_SLOTS = no slot left)
  logic [LAMBDA_W:0]     cur_wl;     // wavelength indicator, offset within the level
  logic [LAMBDA_W-1:0]   rx_tab [MAX_SLOTS];
  logic [MAX_SLOTS-1:0]  rx_tab_v;

  // Collision detection against the tags of the current slot.
  logic hit;
  always_comb begin
    hit = 1'b0;
    for (int k = 0; k < int'(NUM_LAMBDA); k++)
      if (tag_v[k] && tag[k] == resv_dst) hit = 1'b1;
  end

  // Placement of the incoming reservation.
  logic [SLOT_W:0]   a_slot;
  logic [LAMBDA_W:0] a_wl;
  logic              a_ok;
  logic [LAMBDA_W:0] n_wl;
  always_comb begin
    a_slot = hit ? cur_slot + 1'b1 : cur_slot;
    a_wl   = hit ? '0 : cur_wl;
    a_ok   = a_slot < (SLOT_W+1)'(MAX_SLOTS);
    n_wl   = a_wl + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_v        <= '0;
      cur_slot     <= '0;
      cur_wl       <= '0;
      rx_tab_v     <= '0;
      tx_valid     <= 1'b0;
      tx_slot      <= '0;
      tx_lambda    <= '0;
      collision    <= 1'b0;
      overflow     <= 1'b0;
      cyc_wl_base  <= '0;
      cyc_wl_count <= (LAMBDA_W+1)'(1);
      for (int k = 0; k < int'(NUM_LAMBDA); k++) tag[k] <= '0;
    end else begin
      collision <= 1'b0;
      overflow  <= 1'b0;
      if (clear) begin
        tag_v        <= '0;
        cur_slot     <= '0;
        cur_wl       <= '0;
        rx_tab_v     <= '0;
        tx_valid     <= 1'b0;
        cyc_wl_base  <= wl_base;
        cyc_wl_count <= (wl_count == '0) ? (LAMBDA_W+1)'(1) : wl_count;
      end else if (resv_valid) begin
        collision <= hit;
        if (!a_ok) begin
          overflow <= 1'b1;
        end else begin
          if (resv_dst == my_id) begin
            rx_tab[a_slot[SLOT_W-1:0]]   <= cyc_wl_base + a_wl[LAMBDA_W-1:0];
            rx_tab_v[a_slot[SLOT_W-1:0]] <= 1'b1;
          end
          if (resv_src == my_id) begin
            tx_valid  <= 1'b1;
            tx_slot   <= a_slot[SLOT_W-1:0];
            tx_lambda <= cyc_wl_base + a_wl[LAMBDA_W-1:0];
          end
          if (n_wl >= cyc_wl_count) begin
            // slot full: the data cycle grows by one slot
            cur_slot <= a_slot + 1'b1;
            cur_wl   <= '0;
            tag_v    <= '0;
          end else begin
            cur_slot <= a_slot;
            cur_wl   <= n_wl;
            tag_v    <= (hit ? '0 : tag_v) | (NUM_LAMBDA'(1) << a_wl);
            tag[a_wl[LAMBDA_W-1:0]] <= resv_dst;
          end
        end
      end
    end
  end

  assign num_slots = cur_slot + (SLOT_W+1)'(cur_wl != '0);
  assign rx_lambda = rx_tab_v[rx_slot] ? rx_tab[rx_slot] : cyc_wl_base;

endmodule
