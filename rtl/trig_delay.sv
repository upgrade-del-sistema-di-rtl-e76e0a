// trig_delay: programmable delay of one trigger line (DELAY / DELAY_LENGHT).
//
// The line enters a two-flop synchroniser (it comes over a cable from another
// board or from the scintillator logic) and then a MAX_DELAY-stage shift
// register clocked by pll_clk. delay_length selects the tap: the output equals
// the synchronised input delayed by delay_length further cycles, so the total
// latency is delay_length + 2 cycles. The delay register lets the operator
// align trgS, trg1 and trg2 before they are ANDed.
module trig_delay #(
  parameter int unsigned DW = 5   // width of delay_length; 2**DW stages
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          din,
  input  logic [DW-1:0] delay_length,
  output logic          dout
);
  localparam int unsigned DEPTH = 2 ** DW;
  logic             s1, s2;
  logic [DEPTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= 1'b0; s2 <= 1'b0; sr <= '0;
    end else begin
      s1 <= din;
      s2 <= s1;
      sr <= {sr[DEPTH-2:0], s2};
    end
  end

  // tap 0 is the synchroniser output itself
  always_comb begin
    if (delay_length == '0) dout = s2;
    else                    dout = sr[delay_length - 1'b1];
  end
endmodule
