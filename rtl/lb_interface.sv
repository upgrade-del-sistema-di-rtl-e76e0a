// lb_interface: slave side of the V1495 local bus (LB_INTERFACE).
//
// The local bus is the 16-bit multiplexed address/data bus between the VME
// bridge FPGA and the user FPGA, clocked by LCLK (40 MHz). A cycle starts with
// nads low for one LCLK cycle while lad_in carries the address and wnr the
// direction (1 = write). Each following 16-bit transfer is acknowledged by
// nready low for one cycle: on a write the bridge holds the data on lad_in
// from the cycle after nads until the acknowledge; on a read the value is on
// lad_out while nready is low. The bridge drives nblast low during the last
// transfer; while nblast stays high the cycle continues, which is how a block
// transfer (BLT) streams the FIFO.
//
// Address A_FIFO (base + 0x0000) reads the event FIFO: each 32-bit word is
// popped with meb_rd and sent low half first, then high half; an empty FIFO
// reads as 0xFFFF. The other addresses hold the configuration registers (mask,
// delays, n_clock, OUT_WIDTH, trigger configuration, ndiv_length, inverter),
// ctrl_reg, REG_STATUS, the FIFO occupancy, n_Ev and the scalers (register map
// in rpc_pkg). A BLT word costs four LCLK cycles.
//
// The FIFO address, BLT read and the register set come from the original test-stand design; the bus
// handshake follows the V1495 local-bus signal names, and its exact timing,
// the register map and the reset values are choices of this implementation. Values read
// from the pll_clk domain (n_Ev, scalers) are not re-synchronised: read them
// while they are stable.
module lb_interface
  import rpc_pkg::*;
(
  input  logic               lclk,
  input  logic               rst,          // synchronous, from nLBRES
  input  logic               nads,
  input  logic               wnr,
  input  logic               nblast,
  input  logic [LB_W-1:0]    lad_in,
  output logic [LB_W-1:0]    lad_out,
  output logic               lad_oe,
  output logic               nready,
  // registers
  output board_cfg_t         cfg,
  output ctrl_reg_t          ctrl,
  input  reg_status_t        status,       // already in the LCLK domain
  input  logic [12:0]        fifo_used,
  input  logic [EVCNT_W-1:0] n_ev,
  output logic [6:0]         scaler_sel,
  input  logic [31:0]        scaler_val,
  // FIFO read port
  output logic               meb_rd,
  input  logic [31:0]        meb_data_out,
  input  logic               meb_rdempty
);
  typedef enum logic [2:0] {
    L_IDLE, L_WR, L_RD_REG, L_ACK, L_FIFO_POP, L_FIFO_WAIT, L_ACK_LO, L_ACK_HI
  } lstate_t;

  lstate_t           state;
  logic [15:0]       addr;
  logic              wnr_l;
  logic              was_empty;
  logic [31:0]       word;
  logic [15:0]       rd_val;

  // register read multiplexer
  always_comb begin
    rd_val     = 16'h0000;
    scaler_sel = 7'((addr - A_SCALER0) >> 2);
    if (addr >= A_SCALER0 && addr < A_SCALER0 + 16'(4 * NCH)) begin
      rd_val = addr[1] ? scaler_val[31:16] : scaler_val[15:0];
    end else begin
      unique case (addr)
        A_CTRL:      rd_val = ctrl;
        A_STATUS:    rd_val = 16'(status);
        A_WRUSED:    rd_val = 16'(fifo_used);
        A_NEV_LO:    rd_val = n_ev[15:0];
        A_NEV_HI:    rd_val = 16'(n_ev[EVCNT_W-1:16]);
        A_OUTWIDTH:  rd_val = 16'(cfg.out_width);
        A_NCLOCK:    rd_val = 16'(cfg.n_clock);
        A_DLY_TRGS:  rd_val = 16'(cfg.dly_trgs);
        A_DLY_TRG1:  rd_val = 16'(cfg.dly_trg1);
        A_DLY_TRG2:  rd_val = 16'(cfg.dly_trg2);
        A_TRGCFG:    rd_val = 16'(cfg.trg_cfg);
        A_NDIV:      rd_val = 16'(cfg.ndiv_length);
        A_INVERT:    rd_val = 16'(cfg.invert);
        A_XMASK0:          rd_val = cfg.x_mask[15:0];
        A_XMASK0 + 16'd2:  rd_val = cfg.x_mask[31:16];
        A_XMASK0 + 16'd4:  rd_val = 16'(cfg.x_mask[39:32]);
        A_YMASK0:          rd_val = cfg.y_mask[15:0];
        A_YMASK0 + 16'd2:  rd_val = cfg.y_mask[31:16];
        A_YMASK0 + 16'd4:  rd_val = cfg.y_mask[47:32];
        A_YMASK0 + 16'd6:  rd_val = cfg.y_mask[63:48];
        A_YMASK0 + 16'd8:  rd_val = 16'(cfg.y_mask[71:64]);
        default:     rd_val = 16'h0000;
      endcase
    end
  end

  assign nready = ~(state == L_ACK || state == L_ACK_LO || state == L_ACK_HI);
  assign lad_oe = (state == L_ACK && !wnr_l) || state == L_ACK_LO || state == L_ACK_HI;
  assign meb_rd = (state == L_FIFO_POP) && !meb_rdempty;

  always_ff @(posedge lclk) begin
    if (rst) begin
      state     <= L_IDLE;
      addr      <= '0;
      wnr_l     <= 1'b0;
      was_empty <= 1'b0;
      word      <= '0;
      lad_out   <= '0;
      ctrl      <= '0;
      cfg.x_mask      <= '1;
      cfg.y_mask      <= '1;
      cfg.invert      <= 1'b0;
      cfg.out_width   <= OW_W'(12);
      cfg.n_clock     <= NCLK_W'(4);
      cfg.dly_trgs    <= '0;
      cfg.dly_trg1    <= '0;
      cfg.dly_trg2    <= '0;
      cfg.trg_cfg     <= TRG_CFG_EFFICIENCY;
      cfg.ndiv_length <= 13'(EVENT_WORDS);
    end else begin
      unique case (state)
        L_IDLE: if (!nads) begin
          addr  <= lad_in;
          wnr_l <= wnr;
          if (wnr)                  state <= L_WR;
          else if (lad_in == A_FIFO) state <= L_FIFO_POP;
          else                      state <= L_RD_REG;
        end
        L_WR: begin
          unique case (addr)
            A_CTRL:      ctrl <= lad_in;
            A_OUTWIDTH:  cfg.out_width   <= lad_in[OW_W-1:0];
            A_NCLOCK:    cfg.n_clock     <= lad_in[NCLK_W-1:0];
            A_DLY_TRGS:  cfg.dly_trgs    <= lad_in[DLY_W-1:0];
            A_DLY_TRG1:  cfg.dly_trg1    <= lad_in[DLY_W-1:0];
            A_DLY_TRG2:  cfg.dly_trg2    <= lad_in[DLY_W-1:0];
            A_TRGCFG:    cfg.trg_cfg     <= lad_in[3:0];
            A_NDIV:      cfg.ndiv_length <= lad_in[12:0];
            A_INVERT:    cfg.invert      <= lad_in[0];
            A_XMASK0:          cfg.x_mask[15:0]  <= lad_in;
            A_XMASK0 + 16'd2:  cfg.x_mask[31:16] <= lad_in;
            A_XMASK0 + 16'd4:  cfg.x_mask[39:32] <= lad_in[7:0];
            A_YMASK0:          cfg.y_mask[15:0]  <= lad_in;
            A_YMASK0 + 16'd2:  cfg.y_mask[31:16] <= lad_in;
            A_YMASK0 + 16'd4:  cfg.y_mask[47:32] <= lad_in;
            A_YMASK0 + 16'd6:  cfg.y_mask[63:48] <= lad_in;
            A_YMASK0 + 16'd8:  cfg.y_mask[71:64] <= lad_in[7:0];
            default: ;
          endcase
          state <= L_ACK;
        end
        L_RD_REG: begin
          lad_out <= rd_val;
          state   <= L_ACK;
        end
        L_ACK: begin
          if (!nblast)    state <= L_IDLE;
          else if (wnr_l) state <= L_WR;
          else            state <= L_RD_REG;
        end
        L_FIFO_POP: begin
          was_empty <= meb_rdempty;
          state     <= L_FIFO_WAIT;
        end
        L_FIFO_WAIT: begin
          word    <= was_empty ? 32'hFFFF_FFFF : meb_data_out;
          lad_out <= was_empty ? 16'hFFFF : meb_data_out[15:0];
          state   <= L_ACK_LO;
        end
        L_ACK_LO: begin
          lad_out <= word[31:16];
          state   <= nblast ? L_ACK_HI : L_IDLE;
        end
        L_ACK_HI: state <= nblast ? L_FIFO_POP : L_IDLE;
        default:  state <= L_IDLE;
      endcase
    end
  end
endmodule
