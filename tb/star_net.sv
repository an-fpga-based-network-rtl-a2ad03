// star_net: behavioural model of one level of the optical network (testbench only).
//
// N nodes hang off a passive star through a wavelength partitioner. Node i's link
// to the star has a delay of DLY[i] clocks, so a word that node i sends reaches node
// j, itself included, DLY[i] + DLY[j] clocks later. A node sends a word on every
// wavelength whose bit is set in tx_mask (a laser array); each node receives on the
// one wavelength rx_sel selects. Two words arriving on the same wavelength at the
// same receiver in the same clock destroy each other: the receiver gets nothing and
// the collision is counted. Not synthesizable.
module star_net
  import ni_pkg::*;
#(
  parameter int N    = 4,
  parameter int HIST = 64
) (
  input  logic                  clk,
  input  int                    dly       [N],
  input  logic                  tx_valid  [N],
  input  line_word_t            tx_word   [N],
  input  logic [NUM_LAMBDA-1:0] tx_mask   [N],
  input  logic [LAMBDA_W-1:0]   rx_sel    [N],
  output logic                  rx_valid  [N],
  output line_word_t            rx_word   [N],
  output int                    collisions,
  output int                    words_carried
);
  logic                  hv [N][HIST];
  line_word_t            hw [N][HIST];
  logic [NUM_LAMBDA-1:0] hm [N][HIST];
  int ptr = 0;

  initial begin
    collisions = 0;
    words_carried = 0;
    for (int i = 0; i < N; i++) begin
      rx_valid[i] = 1'b0;
      rx_word[i]  = '0;
      for (int t = 0; t < HIST; t++) begin hv[i][t] = 1'b0; hw[i][t] = '0; hm[i][t] = '0; end
    end
  end

  always @(posedge clk) begin
    int np;
    np = (ptr + 1) % HIST;
    for (int i = 0; i < N; i++) begin
      hv[i][np] = tx_valid[i];
      hw[i][np] = tx_word[i];
      hm[i][np] = tx_mask[i];
      if (tx_valid[i]) words_carried++;
    end
    ptr = np;
    for (int j = 0; j < N; j++) begin
      int hits;
      line_word_t w;
      hits = 0;
      w = '0;
      for (int i = 0; i < N; i++) begin
        int idx;
        idx = (ptr - (dly[i] + dly[j]) + HIST) % HIST;
        if (hv[i][idx] && hm[i][idx][rx_sel[j]]) begin
          hits++;
          w = hw[i][idx];
        end
      end
      if (hits > 1) collisions++;
      rx_valid[j] <= (hits == 1);
      rx_word[j]  <= w;
    end
  end
endmodule
