// tb_ni_fifo: self-checking test of the dual-clock FIFO.
//
// Writer and reader run on unrelated clocks (7 ns and 11 ns periods) and make
// random pauses. Every word read must be the next word written, in order; full and
// empty must hold back writes and reads; the fill counts must stay within the FIFO
// depth, rd_count must never promise more words than were written, and wr_free
// never more than the depth, reaching zero exactly when full.
module tb_ni_fifo;
  localparam int W = 33, D = 16;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #3.5 wclk = ~wclk;
  always #5.5 rclk = ~rclk;

  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D):0] wr_free, rd_count;

  ni_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wdata, .full, .wr_free,
    .rclk, .rrst_n(rst_n), .rd_en, .rdata, .empty, .rd_count);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t]: %s", $time, what); end
  endtask

  logic [W-1:0] model [$];
  int written = 0, read_n = 0, saw_full = 0;
  localparam int TOTAL = 3000;

  function automatic logic [W-1:0] val(input int n);
    return W'(n * 32'h2545F491 + 17);
  endfunction

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wr_en = 0; wdata = '0;
    #30 rst_n = 1;
    while (written < TOTAL) begin
      @(negedge wclk);
      wr_en = 0;
      if (full) saw_full++;
      if (!full && $urandom_range(0, 3) != 0) begin
        wr_en = 1; wdata = val(written);
        model.push_back(val(written));
        written++;
      end
    end
    @(negedge wclk) wr_en = 0;
  end

  // reader: slower in the first half so the FIFO fills, faster later
  initial begin
    rd_en = 0;
    #30;
    while (read_n < TOTAL) begin
      @(negedge rclk);
      rd_en = 0;
      check(int'(rd_count) <= D, "rd_count within depth");
      check(int'(rd_count) <= model.size(), "rd_count never ahead of writes");
      check(empty == (rd_count == 0), "empty agrees with rd_count");
      if (!empty && $urandom_range(0, read_n < TOTAL / 2 ? 4 : 1) == 0) begin
        check(model.size() > 0 && rdata == model[0],
              $sformatf("word %0d: got %h", read_n, rdata));
        if (model.size() > 0) void'(model.pop_front());
        rd_en = 1;
        read_n++;
      end
    end
    @(negedge rclk) rd_en = 0;
    repeat (6) @(negedge wclk);
    check(wr_free == D[$clog2(D):0], "all room back when empty");
    check(saw_full > 0, "FIFO became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge wclk) if (rst_n) begin
    check(int'(wr_free) <= D, "wr_free within depth");
    check(full == (wr_free == 0), "full agrees with wr_free");
  end
endmodule
