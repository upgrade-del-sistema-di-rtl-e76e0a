// sync2: two-flop synchroniser for a bundle of independent single-bit levels.
module sync2 #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] s1;
  always_ff @(posedge clk) begin
    if (rst) begin s1 <= INIT; dout <= INIT; end
    else     begin s1 <= din;  dout <= s1;   end
  end
endmodule
