// ni_fifo: dual-clock first-word-fall-through FIFO.
//
// The network interface joins its three clock domains (host bus, media access
// control, serial line) only through FIFOs, and this one module serves as every one
// of them: the level 0/1 control, data and receive FIFOs on the host side and one
// transmit and one receive FIFO per level on the line side. The design description
// names the FIFOs but gives neither their depth nor their construction; the depths
// are set where the FIFOs are instantiated, and the construction below is the usual
// Gray-coded pointer scheme.
//
// Write side (wclk): wr_en writes wdata unless full. wr_free counts the free entries
// as seen from the write side (it lags reads by two wclk cycles, so it never
// overstates the space).
// Read side (rclk): rdata always shows the oldest word while !empty; rd_en pops it.
// rd_count is the number of words available (lags writes by two rclk cycles).
// DEPTH must be a power of two.
module ni_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     wclk,
  input  logic                     wrst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wdata,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   wr_free,
  input  logic                     rclk,
  input  logic                     rrst_n,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   rd_count
);
  localparam int unsigned AW = $clog2(DEPTH);

  if ((1 << AW) != DEPTH || DEPTH < 4) begin : g_bad_depth
    $error("ni_fifo: DEPTH must be a power of two and at least 4");
  end

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2;  // write pointer synchronised into rclk
  logic [AW:0] rgray_s1, rgray_s2;  // read pointer synchronised into wclk

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  // ---------------- write side ----------------
  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  assign full    = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
  assign wr_free = (AW+1)'(DEPTH) - (wbin - gray2bin(rgray_s2));

  // ---------------- read side ----------------
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign empty    = (rgray == wgray_s2);
  assign rd_count = gray2bin(wgray_s2) - rbin;
  assign rdata    = mem[rbin[AW-1:0]];

  // A writer must not push into a full FIFO: the word would be lost.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full))
    else $error("ni_fifo: write while full");

endmodule
