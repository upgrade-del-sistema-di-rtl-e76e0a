// plane_trigger: chamber trigger of one board.
//
// trg_par = (OR of all x strips) AND (OR of all y strips), i.e. a particle
// crossed both strip planes of the chamber. Combinational; the strips are
// already synchronous (x_sync, y_sync), so the output is registered once to
// give a clean line for the cable to the master board.
module plane_trigger #(
  parameter int unsigned NX = 40,
  parameter int unsigned NY = 72
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NX-1:0] x_sync,
  input  logic [NY-1:0] y_sync,
  output logic          trk_x,    // OR of x strips
  output logic          trk_y,    // OR of y strips
  output logic          trg_par   // registered AND
);
  assign trk_x = |x_sync;
  assign trk_y = |y_sync;

  always_ff @(posedge clk) begin
    if (rst) trg_par <= 1'b0;
    else     trg_par <= trk_x & trk_y;
  end
endmodule
