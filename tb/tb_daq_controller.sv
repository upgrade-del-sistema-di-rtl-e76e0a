// tb_daq_controller: feeds events as the shift register produces them (a
// start word_out, then four data words with random spacing) and records the
// FIFO writes. Each event must appear as header {4'hA, 2'b00, board_id,
// n_Ev}, timestamp, four data words; nothing is written while stopped; words
// met with a full FIFO are dropped and counted; status bits follow run,
// WRT_FIFO, FaF and the blt_ready threshold.
module tb_daq_controller;
  import rpc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, run = 0;
  logic [12:0] ndiv_length = 13'd6;
  logic [23:0] n_ev = '0;
  logic word_out = 0;
  logic [31:0] wr_data = '0, timestamp = '0;
  logic [12:0] meb_wrused = '0;
  logic meb_wrfull = 0, faf = 0;
  logic meb_wr, wrt_fifo;
  logic [31:0] meb_data_in, words_lost;
  reg_status_t status;
  logic [31:0] got [$];
  int checks = 0, failures = 0;

  daq_controller #(.BOARD_ID(2'd2), .UW(13), .TW(32)) dut (.clk, .rst, .run, .ndiv_length, .n_ev,
    .word_out, .wr_data, .timestamp, .meb_wrused, .meb_wrfull, .faf, .meb_wr, .meb_data_in,
    .wrt_fifo, .status, .words_lost);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && meb_wr) got.push_back(meb_data_in);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("%s", what); end
  endtask

  task automatic send_event(input logic [23:0] ev, input logic [31:0] ts, input logic [127:0] pat);
    n_ev = ev; timestamp = ts;
    word_out = 1;
    @(negedge clk) word_out = 0;
    chk(wrt_fifo == run, "WRT_FIFO after start");
    repeat ($urandom_range(1, 4)) @(negedge clk);
    for (int j = 0; j < 4; j++) begin
      word_out = 1; wr_data = pat[32*j +: 32];
      @(negedge clk) word_out = 0;
      if ($urandom_range(0, 1) == 0 && j < 3) @(negedge clk);
    end
    @(negedge clk);
    chk(wrt_fifo == 1'b0, "WRT_FIFO after last word");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // stopped: nothing written
    send_event(24'd9, 32'd9, '1);
    chk(got.size() == 0, "write while stopped");
    chk(status.nledg == 1'b1 && status.state_acq == 1'b0, "LED/state stopped");
    run = 1;
    @(negedge clk);
    chk(status.nledg == 1'b0 && status.state_acq == 1'b1, "LED/state running");
    for (int e = 1; e <= 50; e++) begin
      logic [127:0] pat;
      logic [31:0] ts;
      pat = {$urandom, $urandom, $urandom, $urandom};
      ts = $urandom;
      got.delete();
      send_event(24'(e), ts, pat);
      chk(got.size() == 6, $sformatf("event %0d: %0d words", e, got.size()));
      if (got.size() == 6) begin
        chk(got[0] == {4'hA, 2'b00, 2'd2, 24'(e)}, $sformatf("header %h", got[0]));
        chk(got[1] == ts, "timestamp word");
        for (int j = 0; j < 4; j++) chk(got[2 + j] == pat[32*j +: 32], "data word");
      end
    end
    // full FIFO: words dropped and counted, red LED on
    meb_wrfull = 1; got.delete();
    send_event(24'd77, 32'd1, '0);
    chk(got.size() == 0, "write into full FIFO");
    chk(words_lost == 32'd6, $sformatf("words_lost %0d", words_lost));
    chk(status.nledr == 1'b0, "red LED on error");
    meb_wrfull = 0;
    // blt_ready threshold
    for (int u = 0; u < 20; u++) begin
      meb_wrused = 13'(u); ndiv_length = 13'(u % 7); faf = u[0];
      #1;
      chk(status.blt_ready == ((u % 7 == 0) ? (u != 0) : (u >= u % 7)), "blt_ready");
      chk(status.faf == faf, "faf status");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
