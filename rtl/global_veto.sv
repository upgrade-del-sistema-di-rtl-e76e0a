// global_veto: GLOBAL VETO of the master board.
//
// veto blocks the trigger unit while any board is busy: busy3 (master's own
// BUSY) and busy1/busy2 coming back over cables from the two slaves. Because a
// slave raises its busy only after it has received trg over the cable, the
// veto also holds for HOLDOFF pll_clk cycles after every trg, covering that
// round trip. busy1/busy2 are synchronised with two flip-flops.
//
// The inputs (trg, busy1, busy2, busy3) follow the original test-stand design; the hold-off
// window and its default length are this implementation's choices.
module global_veto #(
  parameter int unsigned HOLDOFF = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic trg,
  input  logic busy1,
  input  logic busy2,
  input  logic busy3,
  output logic veto
);
  localparam int unsigned HW = $clog2(HOLDOFF + 1);
  logic [1:0]    s1, s2;
  logic [HW-1:0] hcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; hcnt <= '0;
    end else begin
      s1 <= {busy2, busy1};
      s2 <= s1;
      if (trg)              hcnt <= HW'(HOLDOFF);
      else if (hcnt != '0)  hcnt <= hcnt - 1'b1;
    end
  end

  assign veto = busy3 | (|s2) | trg | (hcnt != '0);
endmodule
