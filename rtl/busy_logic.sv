// busy_logic: BUSY of one board.
//
// busy is raised by an accepted trigger and held while the event is being
// written into the FIFO (WRT_FIFO from the DAQ controller). FaF ("FIFO almost
// full") is set when the FIFO occupancy meb_wrused leaves room for less than
// one more event of EVENT_WORDS words. busy_out = busy OR FaF is the board's
// busy line (busy3 on the master, busy1/busy2 on the slaves).
//
// The inputs (trg, WRT_FIFO, meb_wrused) and outputs (busy, FaF) follow the original
// design; the exact rule is this implementation's choice.
module busy_logic #(
  parameter int unsigned DEPTH       = 4096,
  parameter int unsigned EVENT_WORDS = 6,
  parameter int unsigned UW          = $clog2(DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          trg,
  input  logic          wrt_fifo,
  input  logic [UW-1:0] meb_wrused,
  output logic          faf,
  output logic          busy_out
);
  logic hold;

  // hold bridges the cycle between trg and the rise of wrt_fifo
  always_ff @(posedge clk) begin
    if (rst)           hold <= 1'b0;
    else if (trg)      hold <= 1'b1;
    else if (wrt_fifo) hold <= 1'b0;
  end

  assign faf      = (32'(meb_wrused) + EVENT_WORDS > DEPTH);
  assign busy_out = trg | hold | wrt_fifo | faf;
endmodule
