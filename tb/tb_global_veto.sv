// tb_global_veto: veto = busy3 OR trg OR synchronised busy1/busy2 (two-edge
// delay) OR the HOLDOFF window after each trg; checked against a model.
module tb_global_veto;
  localparam int HOLDOFF = 8;
  logic clk = 1'b0, rst = 1'b1, trg = 0, busy1 = 0, busy2 = 0, busy3 = 0, veto;
  int checks = 0, failures = 0, n_hold = 0;
  logic h1 [$], h2 [$];
  int hcnt = 0;

  global_veto #(.HOLDOFF(HOLDOFF)) dut (.clk, .rst, .trg, .busy1, .busy2, .busy3, .veto);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      logic e, s1, s2;
      trg   = ($urandom_range(0, 30) == 0);
      busy1 = ($urandom_range(0, 9) == 0) ? ~busy1 : busy1;
      busy2 = ($urandom_range(0, 9) == 0) ? ~busy2 : busy2;
      busy3 = ($urandom_range(0, 15) == 0);
      #1;
      s1 = (h1.size() >= 2) ? h1[h1.size()-2] : 1'b0;
      s2 = (h2.size() >= 2) ? h2[h2.size()-2] : 1'b0;
      e = busy3 | trg | s1 | s2 | (hcnt != 0);
      if (!(busy3 | trg | s1 | s2) && hcnt != 0) n_hold++;
      checks++;
      if (veto !== e) begin failures++; if (failures < 10) $display("k %0d veto %b exp %b", k, veto, e); end
      @(posedge clk);
      h1.push_back(busy1); h2.push_back(busy2);
      if (trg) hcnt = HOLDOFF; else if (hcnt != 0) hcnt--;
      @(negedge clk);
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("hold-off never alone"); end
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
