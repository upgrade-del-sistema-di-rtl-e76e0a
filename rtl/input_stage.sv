// input_stage: front of one strip plane (x or y) of a V1495 board.
//
// The N strip signals pass an optional inverter (the front-end lines arrive in
// negative logic), a mask (mask bit 1 = channel enabled) and one bit_counter
// per channel, which synchronises the strip to pll_clk and stretches each hit
// to out_width cycles. The result (x_sync / y_sync) feeds the trigger logic and
// the shift register; the per-channel hit pulses feed the scalers.
//
// Order inverter -> mask -> bit counters follows the input-stage diagram; a
// single invert bit for the whole plane is a choice of this implementation.
module input_stage #(
  parameter int unsigned N = 40,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] strips_in,  // raw strip signals
  input  logic         invert,
  input  logic [N-1:0] mask,       // 1 = enabled
  input  logic [W-1:0] out_width,
  output logic [N-1:0] strips_sync,
  output logic [N-1:0] hits
);
  logic [N-1:0] masked;
  assign masked = (invert ? ~strips_in : strips_in) & mask;

  for (genvar i = 0; i < N; i++) begin : g_ch
    bit_counter #(.W(W)) u_bc (
      .clk, .rst, .din(masked[i]), .out_width,
      .dout(strips_sync[i]), .hit(hits[i])
    );
  end
endmodule
