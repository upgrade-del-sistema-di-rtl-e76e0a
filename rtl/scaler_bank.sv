// scaler_bank: one pulse counter per RPC channel (the Scaler function).
//
// Each of the N channels has a CW-bit counter that adds one for every hit
// pulse (rising edge of the synchronised strip, from the bit counters) while
// enable is high; clear holds all counters at zero. Counters saturate at their
// maximum instead of wrapping. The counter selected by sel is presented on
// count (combinational read port, used by the local-bus interface).
//
// Counting pulses per channel follows the original test-stand design; counter width, saturation and
// the read port are this implementation's choices. The counters live in the
// pll_clk domain and are read from the LCLK domain: freeze them (enable = 0)
// before reading for a consistent value.
module scaler_bank #(
  parameter int unsigned N  = 112,
  parameter int unsigned CW = 32,
  parameter int unsigned SW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic          clear,
  input  logic [N-1:0]  hits,
  input  logic [SW-1:0] sel,
  output logic [CW-1:0] count
);
  logic [CW-1:0] cnt [N];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (rst || clear)                          cnt[i] <= '0;
      else if (enable && hits[i] && ~&cnt[i])    cnt[i] <= cnt[i] + 1'b1;
    end
  end

  assign count = (32'(sel) < N) ? cnt[sel] : '0;
endmodule
