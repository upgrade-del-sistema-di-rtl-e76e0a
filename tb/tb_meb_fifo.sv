// tb_meb_fifo: the 4096 x 32 dual-clock FIFO with an 80 MHz write clock and a
// 40 MHz read clock. Fills it completely (meb_wrfull, meb_wrused = 4096,
// extra writes ignored), drains it (data order, meb_rdempty, extra reads
// ignored), then runs random concurrent writes and reads against a queue.
module tb_meb_fifo;
  localparam int DEPTH = 4096;
  logic wr_clk = 0, rd_clk = 0, wr_rst = 1, rd_rst = 1;
  logic meb_wr = 0, meb_rd = 0;
  logic [31:0] meb_data_in = '0, meb_data_out;
  logic meb_wrfull, meb_rdempty;
  logic [12:0] meb_wrused, meb_rdused;
  logic [31:0] model [$];
  int checks = 0, failures = 0, nread = 0;
  logic pending = 0;

  meb_fifo #(.DEPTH(DEPTH), .DW(32)) dut (.wr_clk, .wr_rst, .meb_wr, .meb_data_in, .meb_wrfull, .meb_wrused,
    .rd_clk, .rd_rst, .meb_rd, .meb_data_out, .meb_rdempty, .meb_rdused);
  always #6.25 wr_clk = ~wr_clk;
  always #12.5 rd_clk = ~rd_clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("%s", what); end
  endtask

  // write side: pushes into the model when the FIFO accepts
  always @(posedge wr_clk) if (meb_wr && !meb_wrfull) model.push_back(meb_data_in);
  // read side: a popped word appears on the next edge
  always @(posedge rd_clk) begin
    if (pending) begin
      chk(meb_data_out == model[0], $sformatf("read %0d: %h vs %h", nread, meb_data_out, model[0]));
      void'(model.pop_front());
      nread++;
    end
    pending = meb_rd && !meb_rdempty;
  end

  initial begin
    repeat (3) @(posedge rd_clk);
    @(negedge wr_clk) wr_rst = 0;
    rd_rst = 0;
    // fill
    for (int i = 0; i < DEPTH + 10; i++) begin
      meb_data_in = $urandom; meb_wr = 1;
      @(negedge wr_clk);
    end
    meb_wr = 0;
    repeat (4) @(negedge rd_clk);
    chk(meb_wrfull == 1'b1, "wrfull when full");
    chk(meb_wrused == 13'(DEPTH), $sformatf("wrused %0d", meb_wrused));
    chk(model.size() == DEPTH, "extra writes ignored");
    // drain
    while (!meb_rdempty) begin
      meb_rd = 1;
      @(negedge rd_clk);
    end
    meb_rd = 1; repeat (3) @(negedge rd_clk);    // reads of an empty FIFO
    meb_rd = 0;
    @(negedge rd_clk);
    chk(nread == DEPTH, $sformatf("drained %0d", nread));
    repeat (4) @(negedge wr_clk);
    chk(meb_wrused == 0 && !meb_wrfull, "empty after drain");
    // concurrent random traffic
    fork
      for (int i = 0; i < 6000; i++) begin
        @(negedge wr_clk);
        meb_wr = ($urandom_range(0, 2) != 0); meb_data_in = $urandom;
      end
      for (int i = 0; i < 3000; i++) begin
        @(negedge rd_clk);
        meb_rd = ($urandom_range(0, 3) != 0);
      end
    join
    @(negedge wr_clk) meb_wr = 0;
    while (!meb_rdempty || pending) begin
      @(negedge rd_clk) meb_rd = 1;
    end
    meb_rd = 0;
    repeat (3) @(negedge rd_clk);
    chk(model.size() == 0, $sformatf("%0d words left in model", model.size()));
    chk(meb_rdused == 0, "rdused zero at end");
    $display("words read: %0d", nread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge rd_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
