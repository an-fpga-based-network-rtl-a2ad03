// reset_sync: reset synchroniser for one clock domain.
//
// The reset input is asserted asynchronously and released synchronously, two clock
// edges after rst_in_n goes high, so every domain of the network interface leaves
// reset cleanly on its own clock. Own helper; the design description says nothing
// about reset.
module reset_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);
  logic s1;
  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) begin
      s1        <= 1'b0;
      rst_out_n <= 1'b0;
    end else begin
      s1        <= 1'b1;
      rst_out_n <= s1;
    end
  end
endmodule
