// tb_phy_if_ctrl: self-checking test of the physical interface controller.
//
// Each level's transmit FIFO output is driven directly with a random mix of
// receiver tuning commands, frame words on random wavelength sets, and gaps (some
// inside a frame). A reference model predicts, one clock later, the encoder word
// and valid, the laser enables, the receiver selection and the underrun flag. On
// the receive side random decoder words are offered while the receive FIFO's full
// flag toggles; words must be written one clock later unless full, when an overflow
// is reported instead.
module tb_phy_if_ctrl;
  import ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  phy_tx_word_t          ltx_rdata [NUM_LEVELS];
  logic [NUM_LEVELS-1:0] ltx_empty, ltx_rd, lrx_wr, lrx_full, enc_valid, dec_valid;
  logic [NUM_LEVELS-1:0] tx_underrun, rx_overflow;
  line_word_t            lrx_wdata [NUM_LEVELS], enc_word [NUM_LEVELS], dec_word [NUM_LEVELS];
  logic [NUM_LAMBDA-1:0] laser_en [NUM_LEVELS];
  logic [LAMBDA_W-1:0]   rx_sel [NUM_LEVELS];

  phy_if_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  bit                    m_in_frame [NUM_LEVELS];
  logic [LAMBDA_W-1:0]   m_sel [NUM_LEVELS];
  int n_cmd = 0, n_under = 0, n_ovf = 0, n_words = 0, n_rx = 0;

  initial begin
    for (int l = 0; l < NUM_LEVELS; l++) begin
      ltx_rdata[l] = '0; dec_word[l] = '0; m_in_frame[l] = 0; m_sel[l] = '0;
    end
    ltx_empty = '1; dec_valid = '0; lrx_full = '0;
    repeat (3) @(negedge clk);
    check(enc_valid == '0 && laser_en[0] == '0 && rx_sel[1] == '0, "reset values");
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      // present stimulus
      bit                    e_valid [NUM_LEVELS], e_under [NUM_LEVELS], e_wr [NUM_LEVELS], e_ovf [NUM_LEVELS];
      line_word_t            e_word [NUM_LEVELS], e_rx [NUM_LEVELS];
      logic [NUM_LAMBDA-1:0] e_las [NUM_LEVELS];
      for (int l = 0; l < NUM_LEVELS; l++) begin
        int r;
        r = int'($urandom_range(0, 9));
        e_valid[l] = 0; e_under[l] = 0; e_las[l] = '0; e_word[l] = '0;
        if (r == 0) begin
          ltx_empty[l] = 1;
          e_under[l] = m_in_frame[l];
        end else begin
          ltx_empty[l] = 0;
          ltx_rdata[l] = phy_tx_word_t'({$urandom, $urandom});
          ltx_rdata[l].cmd = (r == 1);
          if (r == 1) begin
            m_sel[l] = ltx_rdata[l].w.data[LAMBDA_W-1:0];
          end else begin
            ltx_rdata[l].w.sof = (r == 2);
            ltx_rdata[l].w.eof = (r == 3);
            e_valid[l] = 1; e_word[l] = ltx_rdata[l].w; e_las[l] = ltx_rdata[l].lambda;
            if (r == 2) m_in_frame[l] = 1;
            else if (r == 3) m_in_frame[l] = 0;
          end
        end
        dec_valid[l] = $urandom_range(0, 1);
        dec_word[l]  = line_word_t'({$urandom, $urandom});
        lrx_full[l]  = ($urandom_range(0, 4) == 0);
        e_wr[l]  = dec_valid[l] && !lrx_full[l];
        e_ovf[l] = dec_valid[l] && lrx_full[l];
        e_rx[l]  = dec_word[l];
      end
      #1;
      check(ltx_rd == ~ltx_empty, "pop whenever a word is available");
      @(negedge clk);
      for (int l = 0; l < NUM_LEVELS; l++) begin
        check(enc_valid[l] == e_valid[l], $sformatf("level %0d enc_valid", l));
        if (e_valid[l]) begin
          check(enc_word[l] == e_word[l], $sformatf("level %0d enc_word", l));
          n_words++;
        end
        check(laser_en[l] == e_las[l], $sformatf("level %0d laser_en %b exp %b", l, laser_en[l], e_las[l]));
        check(rx_sel[l] == m_sel[l], $sformatf("level %0d rx_sel", l));
        check(tx_underrun[l] == e_under[l], $sformatf("level %0d tx_underrun", l));
        check(lrx_wr[l] == e_wr[l] && rx_overflow[l] == e_ovf[l], $sformatf("level %0d rx write/overflow", l));
        if (e_wr[l]) begin
          check(lrx_wdata[l] == e_rx[l], $sformatf("level %0d rx word", l));
          n_rx++;
        end
        n_under += int'(e_under[l]);
        n_ovf   += int'(e_ovf[l]);
      end
    end
    check(n_under > 0 && n_ovf > 0 && n_words > 1000 && n_rx > 1000, "all paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
