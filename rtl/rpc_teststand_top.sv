// rpc_teststand_top: trigger and readout of the RPC test stand, three V1495
// boards side by side in one VME crate.
//
// Board 0 = SLAVE 1 (tracking chamber TRK1), board 1 = MASTER (test chambers
// TST1, TST2, and the trigger), board 2 = SLAVE 2 (tracking chamber TRK2),
// 320 strip inputs in all. The inter-board cables are wired here:
//   SLAVE 1 trg_par -> MASTER trg1,  SLAVE 1 busy -> MASTER busy1
//   SLAVE 2 trg_par -> MASTER trg2,  SLAVE 2 busy -> MASTER busy2
//   MASTER trg      -> SLAVE 1 and SLAVE 2 (trg_link_in)
// trgS, the scintillator coincidence, enters the master from outside. Each
// board keeps its own FIFO and local bus; the host reads the three boards and
// matches events by their event number. lclk is the 40 MHz local-bus clock;
// pll_clk is the 80 MHz clock of the board PLLs (one shared clock here).
module rpc_teststand_top
  import rpc_pkg::*;
#(
  parameter int unsigned HOLDOFF = 8
) (
  input  logic                 lclk,
  input  logic                 pll_clk,
  input  logic                 nlbres,
  input  logic [2:0][31:0]     a_in,
  input  logic [2:0][31:0]     b_in,
  input  logic [2:0][31:0]     d_in,
  input  logic [2:0][31:0]     f_in,
  input  logic                 trgs_in,
  input  logic [2:0]           nads,
  input  logic [2:0]           wnr,
  input  logic [2:0]           nblast,
  input  logic [2:0][LB_W-1:0] lad_in,
  output logic [2:0][LB_W-1:0] lad_out,
  output logic [2:0]           lad_oe,
  output logic [2:0]           nready,
  output logic [2:0]           nledg,
  output logic [2:0]           nledr,
  output logic                 trg1,     // cable SLAVE 1 -> MASTER
  output logic                 trg2,     // cable SLAVE 2 -> MASTER
  output logic                 busy1,
  output logic                 busy2,
  output logic                 busy3,    // MASTER's own busy
  output logic                 trg       // MASTER -> slaves
);
  logic [2:0] trg_par_o, busy_o, trg_o;

  for (genvar b = 0; b < 3; b++) begin : g_board
    v1495_user #(.MASTER(b == 1), .BOARD_ID(2'(b)), .HOLDOFF(HOLDOFF)) u_board (
      .lclk, .pll_clk, .nlbres,
      .a_in(a_in[b]), .b_in(b_in[b]), .d_in(d_in[b]), .f_in(f_in[b]),
      .nads(nads[b]), .wnr(wnr[b]), .nblast(nblast[b]), .lad_in(lad_in[b]),
      .lad_out(lad_out[b]), .lad_oe(lad_oe[b]), .nready(nready[b]),
      .trgs_in(b == 1 ? trgs_in : 1'b0),
      .trg1_in(b == 1 ? trg1 : 1'b0), .busy1_in(b == 1 ? busy1 : 1'b0),
      .trg2_in(b == 1 ? trg2 : 1'b0), .busy2_in(b == 1 ? busy2 : 1'b0),
      .trg_link_in(b == 1 ? 1'b0 : trg),
      .trg_par_out(trg_par_o[b]), .busy_out(busy_o[b]), .trg_out(trg_o[b]),
      .nledg(nledg[b]), .nledr(nledr[b]));
  end

  assign trg1  = trg_par_o[0];
  assign busy1 = busy_o[0];
  assign trg2  = trg_par_o[2];
  assign busy2 = busy_o[2];
  assign busy3 = busy_o[1];
  assign trg   = trg_o[1];
endmodule
