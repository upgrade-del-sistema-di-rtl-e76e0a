// trg_unit: TRG UNIT - turns the trigger condition into an accepted trigger.
//
// A rising edge of trg_in produces a one-cycle trg pulse when the acquisition
// runs (run = 1) and neither the global veto nor the FIFO-almost-full flag
// (FaF) is set: this is the veto check. Each accepted trigger increments the
// event number n_ev and latches the free-running timestamp counter (pll_clk
// cycles since the acquisition started) into timestamp. Both counters clear
// while run = 0.
//
// Timing: trg is asserted on the clock edge after the one that sees trg_in rise.
// Edge detection, counter widths and the clear-on-stop rule are this design's
// choices; the inputs and outputs are those of the TRG UNIT of the original design.
module trg_unit #(
  parameter int unsigned EW = 24,  // n_ev width
  parameter int unsigned TW = 32   // timestamp width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  logic          trg_in,
  input  logic          veto,
  input  logic          faf,
  output logic          trg,
  output logic [EW-1:0] n_ev,
  output logic [TW-1:0] timestamp,
  output logic          rejected   // one-cycle pulse: trigger lost to veto/FaF
);
  logic          trg_in_d;
  logic [TW-1:0] ts_cnt;
  logic          edge_in;

  assign edge_in = trg_in & ~trg_in_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      trg_in_d  <= 1'b0;
      trg       <= 1'b0;
      rejected  <= 1'b0;
      n_ev      <= '0;
      ts_cnt    <= '0;
      timestamp <= '0;
    end else begin
      trg_in_d <= trg_in;
      trg      <= 1'b0;
      rejected <= 1'b0;
      if (!run) begin
        ts_cnt <= '0;
        n_ev   <= '0;
      end else begin
        ts_cnt <= ts_cnt + 1'b1;
        if (edge_in) begin
          if (veto || faf) rejected <= 1'b1;
          else begin
            trg       <= 1'b1;
            n_ev      <= n_ev + 1'b1;
            timestamp <= ts_cnt;
          end
        end
      end
    end
  end
endmodule
