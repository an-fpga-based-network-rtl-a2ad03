// phy_if_ctrl: physical interface controller.
//
// Runs on the line word clock and serves both levels in parallel. Per level it
//  * transmit: takes one word per clock from the level's transmit FIFO and presents
//    it to the 8B/10B encoder (enc_valid, enc_word with frame delimiters) together
//    with the laser enables of the wavelengths it must go out on (laser_en, the
//    transmit wavelength selection). A tuning command word from the MARC is not sent:
//    it sets the receiver's wavelength selection rx_sel instead. A packet whose words
//    stop arriving before its end is reported on tx_underrun.
//  * receive: writes every decoded word (dec_valid, dec_word) into the level's
//    receive FIFO; a word that finds the FIFO full is dropped and reported on
//    rx_overflow.
// Selecting wavelengths and moving data between the FIFOs and the encoder/decoder
// chips is the job the design description gives this controller; carrying the
// wavelength selections through the transmit FIFO with the data, so that they take
// effect in step with the words, is this design's own choice.
// Timing: one register stage in each direction; rx_sel changes one clock after its
// command leaves the FIFO.
module phy_if_ctrl
  import ni_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // transmit FIFOs from the MARC (read side)
  input  phy_tx_word_t          ltx_rdata  [NUM_LEVELS],
  input  logic [NUM_LEVELS-1:0] ltx_empty,
  output logic [NUM_LEVELS-1:0] ltx_rd,
  // receive FIFOs to the MARC (write side)
  output logic [NUM_LEVELS-1:0] lrx_wr,
  output line_word_t            lrx_wdata  [NUM_LEVELS],
  input  logic [NUM_LEVELS-1:0] lrx_full,
  // encoder / transmitter side
  output logic [NUM_LEVELS-1:0] enc_valid,
  output line_word_t            enc_word   [NUM_LEVELS],
  output logic [NUM_LAMBDA-1:0] laser_en   [NUM_LEVELS],
  // decoder / receiver side
  input  logic [NUM_LEVELS-1:0] dec_valid,
  input  line_word_t            dec_word   [NUM_LEVELS],
  output logic [LAMBDA_W-1:0]   rx_sel     [NUM_LEVELS],
  // status
  output logic [NUM_LEVELS-1:0] tx_underrun,
  output logic [NUM_LEVELS-1:0] rx_overflow
);
  for (genvar l = 0; l < int'(NUM_LEVELS); l++) begin : g_level
    logic in_frame;
    assign ltx_rd[l] = !ltx_empty[l];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        enc_valid[l]   <= 1'b0;
        enc_word[l]    <= '0;
        laser_en[l]    <= '0;
        rx_sel[l]      <= '0;
        in_frame       <= 1'b0;
        tx_underrun[l] <= 1'b0;
      end else begin
        tx_underrun[l] <= 1'b0;
        enc_valid[l]   <= 1'b0;
        laser_en[l]    <= '0;
        if (!ltx_empty[l]) begin
          if (ltx_rdata[l].cmd) begin
            rx_sel[l] <= ltx_rdata[l].w.data[LAMBDA_W-1:0];
          end else begin
            enc_valid[l] <= 1'b1;
            enc_word[l]  <= ltx_rdata[l].w;
            laser_en[l]  <= ltx_rdata[l].lambda;
            if (ltx_rdata[l].w.sof) in_frame <= !ltx_rdata[l].w.eof;
            else if (ltx_rdata[l].w.eof) in_frame <= 1'b0;
          end
        end else if (in_frame) begin
          tx_underrun[l] <= 1'b1;
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lrx_wr[l]      <= 1'b0;
        lrx_wdata[l]   <= '0;
        rx_overflow[l] <= 1'b0;
      end else begin
        lrx_wr[l]      <= dec_valid[l] && !lrx_full[l];
        lrx_wdata[l]   <= dec_word[l];
        rx_overflow[l] <= dec_valid[l] && lrx_full[l];
      end
    end
  end
endmodule
