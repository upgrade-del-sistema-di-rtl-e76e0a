// tb_scaler_bank: random hit pulses on 8 channels with enable and clear
// toggling; every counter is compared with a reference count through the read
// port. A 6-bit counter width exercises saturation.
module tb_scaler_bank;
  localparam int N = 8, CW = 6;
  logic clk = 1'b0, rst = 1'b1, enable = 0, clear = 0;
  logic [N-1:0] hits = '0;
  logic [2:0] sel;
  logic [CW-1:0] count;
  int ref_cnt [N];
  int checks = 0, failures = 0, n_sat = 0;

  scaler_bank #(.N(N), .CW(CW), .SW(3)) dut (.clk, .rst, .enable, .clear, .hits, .sel, .count);
  always #5 clk = ~clk;

  task automatic compare_all();
    for (int i = 0; i < N; i++) begin
      sel = 3'(i); #0.5;
      checks++;
      if (count !== CW'(ref_cnt[i])) begin failures++; $display("ch %0d count %0d ref %0d", i, count, ref_cnt[i]); end
      if (ref_cnt[i] == 2**CW - 1) n_sat++;
    end
  endtask

  initial begin
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      enable = (k % 500) > 50;
      clear  = (k % 1500) == 1499;
      hits   = N'($urandom) & N'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (clear) ref_cnt[i] = 0;
        else if (enable && hits[i] && ref_cnt[i] < 2**CW - 1) ref_cnt[i]++;
      end
      @(negedge clk);
      if (k % 97 == 0 || k % 1500 == 1499) compare_all();
    end
    compare_all();
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never reached"); end
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
