// meb_fifo: the multi-event buffer, a dual-clock FIFO of DEPTH x 32-bit words.
//
// The DAQ side writes on wr_clk (pll_clk) and the local-bus side reads on
// rd_clk (LCLK); independent read and write ports let the host read out events
// while new ones are stored, which reduces dead time. Pointers are one bit
// wider than the address and cross domains in Gray code through gray_sync.
//   meb_wrfull   (wr_clk) no room for a write
//   meb_wrused   (wr_clk) words stored, as seen from the write side; it may
//                         lag reads by two rd_clk/wr_clk cycles (conservative)
//   meb_rdempty  (rd_clk) nothing to read
// Reading: a meb_rd pulse with meb_rdempty low pops one word; it appears on
// meb_data_out on the next rd_clk edge and stays until the next read. Writes
// to a full FIFO and reads from an empty one are ignored.
//
// Size (4096 x 32), independent clocks and the three flags are from the
// design; the Gray-pointer implementation is the usual one for such a FIFO.
module meb_fifo #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned DW    = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          wr_clk,
  input  logic          wr_rst,
  input  logic          meb_wr,
  input  logic [DW-1:0] meb_data_in,
  output logic          meb_wrfull,
  output logic [AW:0]   meb_wrused,
  input  logic          rd_clk,
  input  logic          rd_rst,
  input  logic          meb_rd,
  output logic [DW-1:0] meb_data_out,
  output logic          meb_rdempty,
  output logic [AW:0]   meb_rdused
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wptr, rptr, wptr_g, rptr_g, wptr_g_rs, rptr_g_ws, wptr_rs, rptr_ws;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic do_wr;
  assign do_wr = meb_wr & ~meb_wrfull;

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= meb_data_in;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wptr   <= '0;
      wptr_g <= '0;
    end else if (do_wr) begin
      wptr   <= wptr + 1'b1;
      wptr_g <= bin2gray(wptr + 1'b1);
    end
  end

  gray_sync #(.W(AW+1)) u_rptr_sync (.clk(wr_clk), .rst(wr_rst), .din(rptr_g), .dout(rptr_g_ws));
  assign rptr_ws    = gray2bin(rptr_g_ws);
  assign meb_wrused = wptr - rptr_ws;
  assign meb_wrfull = (meb_wrused == (AW+1)'(DEPTH));

  // read side
  logic do_rd;
  assign do_rd = meb_rd & ~meb_rdempty;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr         <= '0;
      rptr_g       <= '0;
      meb_data_out <= '0;
    end else if (do_rd) begin
      meb_data_out <= mem[rptr[AW-1:0]];
      rptr         <= rptr + 1'b1;
      rptr_g       <= bin2gray(rptr + 1'b1);
    end
  end

  gray_sync #(.W(AW+1)) u_wptr_sync (.clk(rd_clk), .rst(rd_rst), .din(wptr_g), .dout(wptr_g_rs));
  assign wptr_rs     = gray2bin(wptr_g_rs);
  assign meb_rdused  = wptr_rs - rptr;
  assign meb_rdempty = (wptr_g_rs == rptr_g);
endmodule
