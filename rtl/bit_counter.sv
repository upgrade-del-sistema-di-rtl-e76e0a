// bit_counter: shapes one strip signal into a clean synchronous pulse.
//
// The discriminated strip pulse (about 20 ns wide) is asynchronous to the
// board. It is sampled on pll_clk (12.5 ns period, so a 20 ns pulse is seen on
// at least one edge), passed through a second flip-flop against
// metastability, and its rising edge starts a counter that holds the output
// high for out_width pll_clk cycles. A new rising edge while the output is high
// restarts the count. out_width = 0 is treated as 1.
//
// Latency: the output rises 3 pll_clk edges after the first edge that samples
// the input high. Sampling on the faster PLL clock and a programmable output
// width (OUT_WIDTH) come from the original test-stand design; the two-stage synchroniser and the
// retrigger rule are this implementation's choices.
module bit_counter #(
  parameter int unsigned W = 8   // width of the out_width counter
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         din,        // asynchronous strip signal (after mask)
  input  logic [W-1:0] out_width,  // pulse width in clk cycles
  output logic         dout,       // stretched synchronous pulse
  output logic         hit         // one-cycle pulse on each rising edge
);
  logic         s1, s2, s3;
  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
    end else begin
      s1 <= din; s2 <= s1; s3 <= s2;
    end
  end

  assign hit = s2 & ~s3;

  always_ff @(posedge clk) begin
    if (rst)      cnt <= '0;
    else if (hit) cnt <= (out_width == '0) ? W'(1) : out_width;
    else if (cnt != '0) cnt <= cnt - 1'b1;
  end

  assign dout = (cnt != '0);
endmodule
