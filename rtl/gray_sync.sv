// gray_sync: two-flop synchroniser for a Gray-coded pointer crossing clock
// domains (only one bit changes per step, so the sampled value is always a
// valid, possibly one-step-old, pointer).
module gray_sync #(
  parameter int unsigned W = 13
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] s1;
  always_ff @(posedge clk) begin
    if (rst) begin s1 <= '0; dout <= '0; end
    else     begin s1 <= din; dout <= s1; end
  end
endmodule
