// v1495_user: user-FPGA design of one V1495 board of the RPC test stand.
//
// Three identical boards read the test stand: SLAVE 1 reads tracking chamber
// TRK1, SLAVE 2 reads TRK2 (40 x + 72 y strips each) and the MASTER reads the
// two chambers under test TST1/TST2 (16 x + 32 y strips each) and builds the
// trigger. MASTER = 1 selects the master's input mapping and trigger path.
//
// Data path (pll_clk, 80 MHz from the board PLL fed by LCLK):
//   strip inputs -> input_stage (inverter, mask, bit counters) -> x_sync/y_sync
//   x_sync/y_sync -> plane_trigger (OR x AND OR y) -> trg_par
//   trigger -> trg_unit -> trg, n_Ev, timestamp
//   trg + x_sync/y_sync -> shift_reg -> words -> daq_controller -> meb_fifo
//   meb_fifo -> lb_interface (LCLK) -> local bus / BLT to the VME bridge
// Slave: trg_par goes to the master (trg1/trg2 line), busy goes to the master
// (busy1/busy2), and the master's trg comes back on trg_link_in.
// Master: master_trigger delays and ANDs trgS, trg1, trg2 (or uses its own
// chamber in auto-trigger mode); global_veto combines busy1, busy2 and its own
// busy3; trg_out sends every accepted trigger to the slaves, stretched to two
// pll_clk cycles. A slave never drives that line: its trg_out is tied low,
// and the master's trg_par_out is tied low likewise.
//
// Input mapping. Slave: x = {B[7:0], A[31:0]} (x strips 1-40),
// y = {B[15:8], F[15:0], D[31:0], B[31:16]} (y strips 1-16 on B[31:16],
// 17-48 on D, 49-64 on F, 65-72 on B[15:8]). Master: x = {D[15:0], A[15:0]}
// (TST2x, TST1x), y = {F[31:0], B[31:0]} (TST2y, TST1y), upper bits unused.
// The split of the ports between x and y follows the original test-stand design; the bit order
// inside port B is a choice of this implementation.
//
// Clocking and reset: nlbres (active low) resets both domains. ctrl_reg
// levels (acq_run, sw_reset, scaler_run, scaler_clear) are synchronised into
// pll_clk; sw_reset also clears the FIFO. Configuration registers are written
// in the LCLK domain and used in the pll_clk domain without synchronisation:
// change them only while the acquisition is stopped.
module v1495_user
  import rpc_pkg::*;
#(
  parameter bit         MASTER   = 1'b0,
  parameter logic [1:0] BOARD_ID = 2'd0,
  parameter int unsigned HOLDOFF = 8
) (
  input  logic            lclk,
  input  logic            pll_clk,
  input  logic            nlbres,
  // front-panel strip inputs
  input  logic [31:0]     a_in,
  input  logic [31:0]     b_in,
  input  logic [31:0]     d_in,
  input  logic [31:0]     f_in,
  // local bus
  input  logic            nads,
  input  logic            wnr,
  input  logic            nblast,
  input  logic [LB_W-1:0] lad_in,
  output logic [LB_W-1:0] lad_out,
  output logic            lad_oe,
  output logic            nready,
  // inter-board lines
  input  logic            trgs_in,      // master: scintillator logic (trgS)
  input  logic            trg1_in,      // master: from SLAVE 1
  input  logic            busy1_in,     // master: from SLAVE 1
  input  logic            trg2_in,      // master: from SLAVE 2
  input  logic            busy2_in,     // master: from SLAVE 2
  input  logic            trg_link_in,  // slave: trg from the master
  output logic            trg_par_out,  // slave: chamber trigger to the master
  output logic            busy_out,     // board busy (slave: to the master)
  output logic            trg_out,      // master: trg to the slaves
  // LEDs
  output logic            nledg,
  output logic            nledr
);
  // ---------------- resets and control ----------------
  logic rst_l, rst_p_hw, rst_p, rst_fifo_l;
  ctrl_reg_t  ctrl;
  board_cfg_t cfg;
  logic run, scaler_run, scaler_clear, sw_reset_p;

  sync2 #(.W(1), .INIT(1'b1)) u_rst_l (.clk(lclk),    .rst(1'b0), .din(~nlbres), .dout(rst_l));
  sync2 #(.W(1), .INIT(1'b1)) u_rst_p (.clk(pll_clk), .rst(1'b0), .din(~nlbres), .dout(rst_p_hw));
  sync2 #(.W(4)) u_ctrl_sync (.clk(pll_clk), .rst(rst_p_hw),
    .din({ctrl.acq_run, ctrl.sw_reset, ctrl.scaler_run, ctrl.scaler_clear}),
    .dout({run, sw_reset_p, scaler_run, scaler_clear}));
  assign rst_p      = rst_p_hw | sw_reset_p;
  assign rst_fifo_l = rst_l | ctrl.sw_reset;

  // ---------------- input stage ----------------
  logic [NX-1:0] x_in, x_sync, x_hit;
  logic [NY-1:0] y_in, y_sync, y_hit;

  if (MASTER) begin : g_map_master
    assign x_in = NX'({d_in[15:0], a_in[15:0]});
    assign y_in = NY'({f_in, b_in});
  end else begin : g_map_slave
    assign x_in = {b_in[7:0], a_in};
    assign y_in = {b_in[15:8], f_in[15:0], d_in, b_in[31:16]};
  end

  input_stage #(.N(NX), .W(OW_W)) u_in_x (.clk(pll_clk), .rst(rst_p), .strips_in(x_in),
    .invert(cfg.invert), .mask(cfg.x_mask), .out_width(cfg.out_width),
    .strips_sync(x_sync), .hits(x_hit));
  input_stage #(.N(NY), .W(OW_W)) u_in_y (.clk(pll_clk), .rst(rst_p), .strips_in(y_in),
    .invert(cfg.invert), .mask(cfg.y_mask), .out_width(cfg.out_width),
    .strips_sync(y_sync), .hits(y_hit));

  logic [6:0]  scaler_sel;
  logic [31:0] scaler_val;
  scaler_bank #(.N(NCH), .CW(32), .SW(7)) u_scalers (.clk(pll_clk), .rst(rst_p_hw),
    .enable(scaler_run), .clear(scaler_clear), .hits({y_hit, x_hit}),
    .sel(scaler_sel), .count(scaler_val));

  // ---------------- trigger ----------------
  logic trk_x, trk_y, trg_par;
  plane_trigger #(.NX(NX), .NY(NY)) u_ptrg (.clk(pll_clk), .rst(rst_p),
    .x_sync, .y_sync, .trk_x, .trk_y, .trg_par);

  logic                trg_in, veto, faf, trg, trg_rejected;
  logic [EVCNT_W-1:0]  n_ev;
  logic [31:0]         timestamp;
  logic                busy;

  if (MASTER) begin : g_trg_master
    logic trgs_sync, trg1_sync, trg2_sync;
    master_trigger #(.DW(DLY_W)) u_mtrg (.clk(pll_clk), .rst(rst_p),
      .trgs(trgs_in), .trg1(trg1_in), .trg2(trg2_in), .local_trg(trg_par),
      .dly_trgs(cfg.dly_trgs), .dly_trg1(cfg.dly_trg1), .dly_trg2(cfg.dly_trg2),
      .cfg(cfg.trg_cfg), .trgs_sync, .trg1_sync, .trg2_sync, .trg_in);
    global_veto #(.HOLDOFF(HOLDOFF)) u_veto (.clk(pll_clk), .rst(rst_p), .trg,
      .busy1(busy1_in), .busy2(busy2_in), .busy3(busy), .veto);
    logic trg_d;
    always_ff @(posedge pll_clk) begin
      if (rst_p) begin trg_d <= 1'b0; trg_out <= 1'b0; end
      else begin trg_d <= trg; trg_out <= trg | trg_d; end
    end
    assign trg_par_out = 1'b0;
  end else begin : g_trg_slave
    logic trg_link_s;
    sync2 #(.W(1)) u_link_sync (.clk(pll_clk), .rst(rst_p), .din(trg_link_in), .dout(trg_link_s));
    assign trg_in      = trg_link_s;
    assign veto        = 1'b0;
    assign trg_out     = 1'b0;
    assign trg_par_out = trg_par;
  end

  // A slave must follow every trigger of the master, so only the master
  // applies FaF at its trigger unit; a slave's FaF reaches the master as busy.
  trg_unit #(.EW(EVCNT_W), .TW(32)) u_trg_unit (.clk(pll_clk), .rst(rst_p), .run,
    .trg_in, .veto, .faf(MASTER ? faf : 1'b0), .trg, .n_ev, .timestamp,
    .rejected(trg_rejected));

  // ---------------- event building ----------------
  logic        start_gate, word_out;
  logic [3:0]  w;
  logic [31:0] wr_data, ts_evt;
  shift_reg #(.NX(NX), .NY(NY), .NW(NCLK_W), .TW(32)) u_sr (.clk(pll_clk), .rst(rst_p),
    .trg, .timestamp, .x_sync, .y_sync, .n_clock(cfg.n_clock),
    .start_gate, .w, .word_out, .wr_data, .timestamp_out(ts_evt));

  localparam int unsigned UW = $clog2(FIFO_DEPTH) + 1;
  logic          meb_wr, meb_wrfull, meb_rd, meb_rdempty, wrt_fifo;
  logic [31:0]   meb_data_in, meb_data_out, words_lost;
  logic [UW-1:0] meb_wrused, meb_rdused;
  reg_status_t   status_p, status_l;

  daq_controller #(.BOARD_ID(BOARD_ID), .UW(UW), .TW(32)) u_daq (.clk(pll_clk), .rst(rst_p),
    .run, .ndiv_length(cfg.ndiv_length), .n_ev, .word_out, .wr_data, .timestamp(ts_evt),
    .meb_wrused, .meb_wrfull, .faf, .meb_wr, .meb_data_in, .wrt_fifo,
    .status(status_p), .words_lost);

  busy_logic #(.DEPTH(FIFO_DEPTH), .EVENT_WORDS(EVENT_WORDS), .UW(UW)) u_busy (
    .clk(pll_clk), .rst(rst_p), .trg, .wrt_fifo, .meb_wrused, .faf, .busy_out(busy));
  assign busy_out = busy;

  meb_fifo #(.DEPTH(FIFO_DEPTH), .DW(32)) u_fifo (
    .wr_clk(pll_clk), .wr_rst(rst_p), .meb_wr, .meb_data_in, .meb_wrfull, .meb_wrused,
    .rd_clk(lclk), .rd_rst(rst_fifo_l), .meb_rd, .meb_data_out, .meb_rdempty, .meb_rdused);

  // ---------------- local bus ----------------
  sync2 #(.W($bits(reg_status_t)), .INIT(6'b110000)) u_stat_sync (.clk(lclk), .rst(rst_l),
    .din(status_p), .dout(status_l));

  lb_interface u_lb (.lclk, .rst(rst_l), .nads, .wnr, .nblast, .lad_in, .lad_out, .lad_oe,
    .nready, .cfg, .ctrl, .status(status_l), .fifo_used(meb_rdused), .n_ev,
    .scaler_sel, .scaler_val, .meb_rd, .meb_data_out, .meb_rdempty);

  assign nledg = status_l.nledg;
  assign nledr = status_l.nledr;
endmodule
