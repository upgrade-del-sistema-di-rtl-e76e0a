// tb_busy_logic: busy must rise with trg, hold until WRT_FIFO has started and
// ended, and FaF must be set exactly when fewer than EVENT_WORDS free words
// remain in the FIFO.
module tb_busy_logic;
  localparam int DEPTH = 4096, EW = 6;
  logic clk = 1'b0, rst = 1'b1, trg = 0, wrt_fifo = 0;
  logic [12:0] meb_wrused = '0;
  logic faf, busy_out;
  int checks = 0, failures = 0;

  busy_logic #(.DEPTH(DEPTH), .EVENT_WORDS(EW), .UW(13)) dut (.clk, .rst, .trg, .wrt_fifo, .meb_wrused, .faf, .busy_out);
  always #5 clk = ~clk;

  task automatic expect_busy(input logic b, input string what);
    checks++;
    if (busy_out !== b) begin failures++; $display("%s: busy %b expected %b", what, busy_out, b); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    expect_busy(0, "idle");
    for (int ev = 0; ev < 50; ev++) begin
      int gap = $urandom_range(0, 6), len = $urandom_range(1, 8);
      trg = 1; #1 expect_busy(1, "trg cycle");
      @(negedge clk) trg = 0; #1 expect_busy(1, "after trg");
      repeat (gap) begin @(negedge clk); #1 expect_busy(1, "gap before WRT_FIFO"); end
      wrt_fifo = 1;
      repeat (len) begin @(negedge clk); #1 expect_busy(1, "WRT_FIFO"); end
      wrt_fifo = 0; #1 expect_busy(0, "done");
      repeat (3) begin @(negedge clk); #1 expect_busy(0, "idle after"); end
    end
    for (int u = DEPTH - 20; u <= DEPTH; u++) begin
      meb_wrused = 13'(u);
      #1 checks += 2;
      if (faf !== (u > DEPTH - EW)) begin failures++; $display("wrused %0d faf %b", u, faf); end
      if (busy_out !== (u > DEPTH - EW)) failures++;
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
