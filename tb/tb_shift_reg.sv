// tb_shift_reg: triggers with random gate lengths (n_clock 0..12) while random
// sparse hit patterns arrive on x_sync / y_sync. Expected: start_gate one
// cycle after trg; the pattern is the OR of the strips over the gate (glen =
// max(n_clock, 2) edges from the trigger edge on); w1..w4 on the glen-th to
// (glen+3)-th cycles after start_gate, carrying {16'b0, y, x} in 32-bit
// slices; triggers during an event are ignored; the timestamp is held.
module tb_shift_reg;
  logic clk = 1'b0, rst = 1'b1, trg = 0;
  logic [31:0] timestamp = '0;
  logic [39:0] x_sync = '0;
  logic [71:0] y_sync = '0;
  logic [7:0] n_clock;
  logic start_gate, word_out;
  logic [3:0] w;
  logic [31:0] wr_data, timestamp_out;
  int checks = 0, failures = 0, n_events = 0;

  shift_reg #(.NX(40), .NY(72), .NW(8), .TW(32)) dut (.clk, .rst, .trg, .timestamp, .x_sync, .y_sync,
    .n_clock, .start_gate, .w, .word_out, .wr_data, .timestamp_out);
  always #5 clk = ~clk;
  always @(posedge clk) timestamp <= timestamp + 1;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("event %0d: %s", n_events, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int ev = 0; ev < 200; ev++) begin
      int glen;
      logic [127:0] pat;
      logic [31:0] ts0;
      n_clock = 8'($urandom_range(0, 12));
      glen = (n_clock < 2) ? 2 : int'(n_clock);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      // trigger cycle: inputs sampled at the coming edge E0
      trg = 1;
      pat = '0;
      for (int c = 0; c < glen; c++) begin
        x_sync = ($urandom_range(0, 1) == 0) ? '0 : (40'd1 << $urandom_range(0, 39));
        y_sync = ($urandom_range(0, 1) == 0) ? '0 : (72'd1 << $urandom_range(0, 71));
        pat |= 128'({y_sync, x_sync});
        if (c == 0) ts0 = timestamp;
        @(negedge clk);
        chk(start_gate == (c == 0), "start_gate timing");
        chk(w == 4'b0, "word strobe during gate");
        if (c == 0) chk(timestamp_out == ts0, "timestamp");
        trg = ($urandom_range(0, 3) == 0);   // ignored while busy
      end
      x_sync = '1; y_sync = '1;              // must not enter the pattern
      for (int j = 0; j < 4; j++) begin
        @(negedge clk);
        trg = 0;
        chk(w == 4'(1 << j), $sformatf("strobe w%0d", j + 1));
        chk(word_out == 1'b1, "word_out");
        chk(wr_data == pat[32*j +: 32], $sformatf("data word %0d: %h vs %h", j, wr_data, pat[32*j +: 32]));
        chk(timestamp_out == ts0, "timestamp held");
      end
      x_sync = '0; y_sync = '0;
      @(negedge clk);
      chk(word_out == 1'b0, "word_out after event");
      n_events++;
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
