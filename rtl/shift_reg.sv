// shift_reg: SHIFT REG - builds the hit pattern of one event.
//
// On an accepted trigger (trg) it pulses start_gate and opens a gate of
// n_clock pll_clk cycles (at least 2) during which the synchronised strips
// x_sync / y_sync are ORed into a pattern register, so a strip that fires
// anywhere inside the gate is recorded. When the gate closes the 128-bit word
// {16'b0, y, x} is shifted out as four 32-bit words on wr_data, one per cycle,
// each flagged by its strobe w1..w4. word_out = start_gate | w1 | w2 | w3 | w4
// tells the DAQ controller that a word is present. The timestamp of the
// trigger is latched and held on timestamp_out for the controller. Triggers
// that arrive before the last word has left are ignored (the busy/veto logic
// keeps them from happening).
//
// Timing: start_gate is the cycle after trg; w1 follows start_gate by n_clock
// cycles; w1..w4 are consecutive. The gate length parameter n_clock and the
// outputs start_gate, w1..w4, WORD_OUT and wr_data come from the original test-stand design; the
// OR-accumulation inside the gate and the word packing are this design's
// choices.
module shift_reg
#(
  parameter int unsigned NX  = rpc_pkg::NX,
  parameter int unsigned NY  = rpc_pkg::NY,
  parameter int unsigned NW  = rpc_pkg::NCLK_W,
  parameter int unsigned TW  = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              trg,
  input  logic [TW-1:0]     timestamp,
  input  logic [NX-1:0]     x_sync,
  input  logic [NY-1:0]     y_sync,
  input  logic [NW-1:0]     n_clock,
  output logic              start_gate,
  output logic [3:0]        w,          // w[0] = w1 ... w[3] = w4
  output logic              word_out,
  output logic [31:0]       wr_data,
  output logic [TW-1:0]     timestamp_out
);
  localparam int unsigned PW = 128;
  initial assert (NX + NY <= PW) else $error("shift_reg: NX+NY exceeds 128 bits");

  typedef enum logic [1:0] {S_IDLE, S_GATE, S_SHIFT} state_t;
  state_t         state;
  logic [NW-1:0]  gcnt;
  logic [1:0]     widx;
  logic [PW-1:0]  pattern;
  logic [NW-1:0]  glen;

  assign glen = (n_clock < NW'(2)) ? NW'(2) : n_clock;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      gcnt          <= '0;
      widx          <= '0;
      pattern       <= '0;
      start_gate    <= 1'b0;
      w             <= '0;
      wr_data       <= '0;
      timestamp_out <= '0;
    end else begin
      start_gate <= 1'b0;
      w          <= '0;
      unique case (state)
        S_IDLE: if (trg) begin
          state         <= S_GATE;
          start_gate    <= 1'b1;
          timestamp_out <= timestamp;
          gcnt          <= glen - 1'b1;
          pattern       <= PW'({y_sync, x_sync});
        end
        S_GATE: begin
          pattern <= pattern | PW'({y_sync, x_sync});
          if (gcnt == NW'(1)) begin
            state <= S_SHIFT;
            widx  <= '0;
          end
          gcnt <= gcnt - 1'b1;
        end
        S_SHIFT: begin
          wr_data   <= pattern[32*widx +: 32];
          w[widx]   <= 1'b1;
          widx      <= widx + 1'b1;
          if (widx == 2'd3) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign word_out = start_gate | (|w);
endmodule
