// daq_controller: DAQ CONTROLLER - writes events into the FIFO.
//
// While the acquisition runs (ctrl.acq_run) every event announced by the shift
// register is written into the FIFO as six 32-bit words:
//   word 0  header     {4'hA, 2'b00, board_id, n_Ev}
//   word 1  timestamp  pll_clk cycles from start of run to the trigger
//   word 2..5          w1..w4 hit pattern {16'b0, y[71:0], x[39:0]}
// The first word_out pulse of an event (start_gate) starts the header and the
// timestamp; the next four word_out pulses carry wr_data. WRT_FIFO is high from
// the header until the last word. A word met with a full FIFO is dropped and
// the red LED error flag set (the busy logic normally prevents this).
// blt_ready tells the host that at least ndiv_length words (the block-transfer
// length) wait in the FIFO; ndiv_length = 0 means "any word".
// The LEDs are active low: green = running, red = FIFO full or words lost.
// STATE_ACQ and FaF are copied from the run and faf inputs into the status
// word unchanged, so the host reads every status bit from one register.
//
// Timing: meb_wr / meb_data_in are registered, one cycle after the word is
// seen. Inputs and status bits (STATE_ACQ, blt_ready, WRT_FIFO, nLEDG, nLEDR)
// follow the original test-stand design; the event format is a choice of this implementation, sized to
// the 24 bytes per event implied by the documented block-transfer rate.
module daq_controller
  import rpc_pkg::*;
#(
  parameter logic [1:0]  BOARD_ID = 2'd0,
  parameter int unsigned UW       = 13,   // meb_wrused width
  parameter int unsigned TW       = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               run,          // ctrl_reg acq_run, synchronised
  input  logic [12:0]        ndiv_length,
  input  logic [EVCNT_W-1:0] n_ev,
  input  logic               word_out,
  input  logic [31:0]        wr_data,
  input  logic [TW-1:0]      timestamp,
  input  logic [UW-1:0]      meb_wrused,
  input  logic               meb_wrfull,
  input  logic               faf,
  output logic               meb_wr,
  output logic [31:0]        meb_data_in,
  output logic               wrt_fifo,
  output reg_status_t        status,
  output logic [31:0]        words_lost
);
  typedef enum logic [1:0] {D_IDLE, D_TS, D_DATA} dstate_t;
  dstate_t    state;
  logic [2:0] nword;
  logic       wr_req;
  logic [31:0] wr_word;
  logic        err;

  always_comb begin
    wr_req  = 1'b0;
    wr_word = wr_data;
    unique case (state)
      D_IDLE: if (run && word_out) begin
        wr_req  = 1'b1;
        wr_word = make_header(BOARD_ID, n_ev);
      end
      D_TS: begin
        wr_req  = 1'b1;
        wr_word = 32'(timestamp);
      end
      D_DATA: if (word_out) wr_req = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= D_IDLE;
      nword       <= '0;
      meb_wr      <= 1'b0;
      meb_data_in <= '0;
      err         <= 1'b0;
      words_lost  <= '0;
    end else begin
      meb_wr <= 1'b0;
      if (wr_req) begin
        if (meb_wrfull) begin
          err        <= 1'b1;
          words_lost <= words_lost + 1'b1;
        end else begin
          meb_wr      <= 1'b1;
          meb_data_in <= wr_word;
        end
      end
      unique case (state)
        D_IDLE: if (run && word_out) state <= D_TS;
        D_TS:   begin state <= D_DATA; nword <= '0; end
        D_DATA: if (word_out) begin
          nword <= nword + 1'b1;
          if (nword == 3'd3) state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
      if (!run && state == D_IDLE) err <= 1'b0;
    end
  end

  assign wrt_fifo = (state != D_IDLE);

  always_comb begin
    status.state_acq = run;
    status.wrt_fifo  = wrt_fifo;
    status.faf       = faf;
    status.blt_ready = (ndiv_length == '0) ? (meb_wrused != '0)
                                           : (meb_wrused >= UW'(ndiv_length));
    status.nledg     = ~run;
    status.nledr     = ~(err | meb_wrfull);
  end
endmodule
