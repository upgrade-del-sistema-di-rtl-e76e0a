// rpc_pkg: constants and types shared by the trigger and readout logic of the
// RPC test-stand V1495 boards.
//
// Channel counts follow the tracking-chamber readout (40 x strips and 72 y strips
// per board, 112 channels); the 4096 x 32-bit event FIFO is the documented size.
// The event format (six 32-bit words: header, timestamp, four hit-pattern words),
// the local-bus register map and the widths of the configuration registers are
// choices of this implementation.
package rpc_pkg;

  localparam int unsigned NX          = 40;    // x strips per board
  localparam int unsigned NY          = 72;    // y strips per board
  localparam int unsigned NCH         = NX + NY;
  localparam int unsigned WORD_W      = 32;    // FIFO word
  localparam int unsigned DATA_WORDS  = 4;     // w1..w4 hit-pattern words
  localparam int unsigned EVENT_WORDS = DATA_WORDS + 2; // + header + timestamp
  localparam int unsigned FIFO_DEPTH  = 4096;
  localparam int unsigned LB_W        = 16;    // local bus data width
  localparam int unsigned DLY_W       = 5;     // DELAY_LENGHT register width
  localparam int unsigned MAX_DELAY   = 32;    // 2**DLY_W taps
  localparam int unsigned OW_W        = 8;     // OUT_WIDTH register width
  localparam int unsigned NCLK_W      = 8;     // n_clock register width
  localparam int unsigned EVCNT_W     = 24;    // n_Ev width in the header

  localparam logic [3:0]  HEADER_TAG  = 4'hA;

  // Trigger configuration: trg_in is the AND of the enabled sources.
  typedef struct packed {
    logic use_local;  // this board's own chamber (OR x AND OR y): auto-trigger
    logic use_trg2;   // SLAVE 2 tracking chamber
    logic use_trg1;   // SLAVE 1 tracking chamber
    logic use_trgs;   // scintillator coincidence
  } trg_cfg_t;

  localparam trg_cfg_t TRG_CFG_EFFICIENCY = '{use_local: 1'b0, use_trg2: 1'b1, use_trg1: 1'b1, use_trgs: 1'b1};
  localparam trg_cfg_t TRG_CFG_AUTO       = '{use_local: 1'b1, use_trg2: 1'b0, use_trg1: 1'b0, use_trgs: 1'b0};

  // ctrl_reg bits
  typedef struct packed {
    logic [11:0] spare;
    logic        scaler_clear; // level: hold scalers at zero
    logic        scaler_run;   // level: scalers count
    logic        sw_reset;     // level: hold acquisition logic in reset
    logic        acq_run;      // level: 1 = acquisition started
  } ctrl_reg_t;

  // REG_STATUS bits
  typedef struct packed {
    logic nledg;      // green LED, low when acquisition runs
    logic nledr;      // red LED, low when FIFO full
    logic state_acq;  // acquisition running
    logic blt_ready;  // FIFO holds at least ndiv_length words
    logic wrt_fifo;   // an event is being written
    logic faf;        // FIFO cannot take another event
  } reg_status_t;

  // Board configuration, written over the local bus.
  typedef struct packed {
    logic [NX-1:0]     x_mask;      // 1 = channel enabled
    logic [NY-1:0]     y_mask;
    logic              invert;      // invert all strip inputs
    logic [OW_W-1:0]   out_width;   // bit-counter pulse width, pll_clk cycles
    logic [NCLK_W-1:0] n_clock;     // shift-register gate length, pll_clk cycles
    logic [DLY_W-1:0]  dly_trgs;    // DELAY_LENGHT of trgS
    logic [DLY_W-1:0]  dly_trg1;    // DELAY_LENGHT of trg1
    logic [DLY_W-1:0]  dly_trg2;    // DELAY_LENGHT of trg2
    trg_cfg_t          trg_cfg;
    logic [12:0]       ndiv_length; // blt_ready threshold, FIFO words
  } board_cfg_t;

  // Local-bus register map (byte offsets, 16-bit registers).
  localparam logic [15:0] A_FIFO      = 16'h0000; // FIFO data, BLT read
  localparam logic [15:0] A_CTRL      = 16'h1000;
  localparam logic [15:0] A_STATUS    = 16'h1002;
  localparam logic [15:0] A_WRUSED    = 16'h1004;
  localparam logic [15:0] A_NEV_LO    = 16'h1006;
  localparam logic [15:0] A_NEV_HI    = 16'h1008;
  localparam logic [15:0] A_OUTWIDTH  = 16'h100A;
  localparam logic [15:0] A_NCLOCK    = 16'h100C;
  localparam logic [15:0] A_DLY_TRGS  = 16'h100E;
  localparam logic [15:0] A_DLY_TRG1  = 16'h1010;
  localparam logic [15:0] A_DLY_TRG2  = 16'h1012;
  localparam logic [15:0] A_TRGCFG    = 16'h1014;
  localparam logic [15:0] A_NDIV      = 16'h1016;
  localparam logic [15:0] A_INVERT    = 16'h1018;
  localparam logic [15:0] A_XMASK0    = 16'h1020; // 3 registers, 16 bits each
  localparam logic [15:0] A_YMASK0    = 16'h1030; // 5 registers
  localparam logic [15:0] A_SCALER0   = 16'h2000; // channel c: +4c (low), +4c+2 (high)

  // Header word: tag, board id, event number.
  function automatic logic [WORD_W-1:0] make_header(input logic [1:0] board_id,
                                                    input logic [EVCNT_W-1:0] n_ev);
    return {HEADER_TAG, 2'b00, board_id, n_ev};
  endfunction

endpackage
