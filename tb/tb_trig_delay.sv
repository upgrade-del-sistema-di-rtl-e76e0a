// tb_trig_delay: random input levels; after edge n the output must equal the
// input sampled at edge n-1-delay_length (two synchroniser stages plus the
// programmed delay). Several delay settings, including 0 and the maximum.
module tb_trig_delay;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0, dout;
  logic [4:0] delay_length;
  logic hist [$];
  int checks = 0, failures = 0;

  trig_delay #(.DW(5)) dut (.clk, .rst, .din, .delay_length, .dout);
  always #5 clk = ~clk;

  initial begin
    int dl [5] = '{0, 1, 7, 31, 12};
    repeat (2) @(posedge clk);
    rst = 1'b0;
    foreach (dl[j]) begin
      delay_length = 5'(dl[j]);
      hist.delete();
      for (int k = 0; k < 300; k++) begin
        @(negedge clk);
        // after the edge just passed, hist holds values sampled at earlier edges
        if (hist.size() > dl[j] + 2) begin
          checks++;
          if (dout !== hist[hist.size() - 2 - dl[j]]) begin
            failures++;
            if (failures < 10) $display("delay %0d step %0d: dout %b", dl[j], k, dout);
          end
        end
        din = ($urandom_range(0, 3) == 0) ? ~din : din;
        @(posedge clk);
        hist.push_back(din);
      end
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
