// tb_lb_interface: a local-bus master model runs single writes and reads and
// block transfers against the interface. The FIFO behind it is a queue model.
// Checks register write/readback and reset values, status/n_Ev/scaler reads,
// BLT data order (low half first), the 0xFFFF filler of an empty FIFO, and
// the cost of a BLT word (four LCLK cycles).
module tb_lb_interface;
  import rpc_pkg::*;
  logic lclk = 0, rst = 1;
  logic nads = 1, wnr = 0, nblast = 1;
  logic [15:0] lad_in = '0, lad_out;
  logic lad_oe, nready;
  board_cfg_t cfg;
  ctrl_reg_t ctrl;
  reg_status_t status = '0;
  logic [12:0] fifo_used = 13'd123;
  logic [23:0] n_ev = 24'hABCDEF;
  logic [6:0] scaler_sel;
  logic [31:0] scaler_val;
  logic meb_rd, meb_rdempty;
  logic [31:0] meb_data_out = '0;
  logic [31:0] q [$];
  logic [31:0] sent [$];
  int checks = 0, failures = 0;

  lb_interface dut (.lclk, .rst, .nads, .wnr, .nblast, .lad_in, .lad_out, .lad_oe, .nready,
    .cfg, .ctrl, .status, .fifo_used, .n_ev, .scaler_sel, .scaler_val,
    .meb_rd, .meb_data_out, .meb_rdempty);
  always #12.5 lclk = ~lclk;

  assign scaler_val  = {9'h1A5, scaler_sel, 9'h0C3, scaler_sel};
  assign meb_rdempty = (q.size() == 0);
  always @(posedge lclk) if (meb_rd && q.size() != 0) meb_data_out <= q.pop_front();

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("%s", what); end
  endtask

  // one local-bus cycle of n 16-bit transfers
  task automatic lb_cycle(input logic [15:0] addr, input logic write, input int n,
                          input logic [15:0] wdata [], output logic [15:0] rdata [], output int cycles);
    rdata = new[n];
    @(negedge lclk);
    nads = 0; wnr = write; lad_in = addr; nblast = 1;
    @(negedge lclk);
    nads = 1;
    cycles = 1;
    for (int i = 0; i < n; i++) begin
      if (write) lad_in = wdata[i];
      while (nready) begin @(negedge lclk); cycles++; end
      if (!write) begin
        chk(lad_oe == 1'b1, "lad_oe during read");
        rdata[i] = lad_out;
      end
      nblast = (i == n - 1) ? 1'b0 : 1'b1;
      @(negedge lclk); cycles++;
    end
    nblast = 1;
    chk(nready == 1'b1 && lad_oe == 1'b0, "bus released");
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] r []; int c;
    lb_cycle(a, 1'b1, 1, '{d}, r, c);
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    logic [15:0] r []; int c;
    lb_cycle(a, 1'b0, 1, '{16'h0}, r, c);
    d = r[0];
  endtask

  initial begin
    logic [15:0] v;
    logic [15:0] r [];
    int c;
    repeat (2) @(posedge lclk);
    @(negedge lclk) rst = 0;
    // reset values
    rd(A_NCLOCK, v);   chk(v == 16'd4, "n_clock reset value");
    rd(A_TRGCFG, v);   chk(v == 16'(TRG_CFG_EFFICIENCY), "trigger config reset value");
    rd(A_XMASK0, v);   chk(v == 16'hFFFF, "x mask reset value");
    // write/readback
    wr(A_CTRL, 16'h0005);     chk(ctrl.acq_run && ctrl.scaler_run && !ctrl.sw_reset, "ctrl fields");
    wr(A_NCLOCK, 16'd9);      chk(cfg.n_clock == 8'd9, "n_clock field");
    wr(A_DLY_TRG1, 16'd17);   chk(cfg.dly_trg1 == 5'd17, "delay field");
    wr(A_TRGCFG, 16'h0008);   chk(cfg.trg_cfg == TRG_CFG_AUTO, "trigger config field");
    wr(A_OUTWIDTH, 16'd6);    chk(cfg.out_width == 8'd6, "out_width field");
    wr(A_NDIV, 16'd60);       chk(cfg.ndiv_length == 13'd60, "ndiv field");
    wr(A_INVERT, 16'd1);      chk(cfg.invert == 1'b1, "invert field");
    wr(A_XMASK0 + 16'd4, 16'h00F0); chk(cfg.x_mask[39:32] == 8'hF0, "x mask high");
    wr(A_YMASK0 + 16'd8, 16'h0081); chk(cfg.y_mask[71:64] == 8'h81, "y mask high");
    wr(A_YMASK0 + 16'd2, 16'h1234); chk(cfg.y_mask[31:16] == 16'h1234, "y mask word 1");
    rd(A_YMASK0 + 16'd2, v);  chk(v == 16'h1234, "y mask readback");
    rd(A_DLY_TRG1, v);        chk(v == 16'd17, "delay readback");
    rd(A_CTRL, v);            chk(v == 16'h0005, "ctrl readback");
    status = 6'b101010;
    rd(A_STATUS, v);          chk(v == 16'h002A, "status read");
    rd(A_WRUSED, v);          chk(v == 16'd123, "fifo used read");
    rd(A_NEV_LO, v);          chk(v == 16'hCDEF, "n_ev low");
    rd(A_NEV_HI, v);          chk(v == 16'h00AB, "n_ev high");
    for (int ch = 0; ch < 112; ch += 37) begin
      rd(A_SCALER0 + 16'(4 * ch), v);     chk(v == {9'h0C3, 7'(ch)}, $sformatf("scaler %0d low %h", ch, v));
      rd(A_SCALER0 + 16'(4 * ch + 2), v); chk(v == {9'h1A5, 7'(ch)}, "scaler high");
    end
    // BLT of 10 words from the FIFO
    for (int i = 0; i < 30; i++) begin q.push_back($urandom); sent.push_back(q[$]); end
    lb_cycle(A_FIFO, 1'b0, 20, '{16'h0}, r, c);
    for (int i = 0; i < 10; i++)
      chk({r[2*i+1], r[2*i]} == sent[i], $sformatf("BLT word %0d: %h%h vs %h", i, r[2*i+1], r[2*i], sent[i]));
    chk(c <= 4 * 10 + 4, $sformatf("BLT of 10 words took %0d cycles", c));
    chk(q.size() == 20, "BLT popped exactly 10 words");
    // BLT past the end of the data: filler words
    lb_cycle(A_FIFO, 1'b0, 44, '{16'h0}, r, c);
    for (int i = 0; i < 20; i++) chk({r[2*i+1], r[2*i]} == sent[10 + i], "second BLT data");
    chk(r[40] == 16'hFFFF && r[43] == 16'hFFFF, "empty FIFO reads 0xFFFF");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge lclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
