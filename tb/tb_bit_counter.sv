// tb_bit_counter: checks the strip synchroniser / pulse shaper.
// The input is driven with pulses of random width and spacing that are not
// aligned to the clock. The expected output is derived from the input as seen
// on each rising clock edge: after edge n the output is high iff the latest
// sampled rising edge m of the input satisfies m+2 <= n <= m+1+W (W =
// out_width, 0 counts as 1). Also checks one hit pulse per rising edge.
module tb_bit_counter;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0;
  logic [7:0] out_width;
  logic dout, hit;
  int checks = 0, failures = 0;

  bit_counter #(.W(8)) dut (.clk, .rst, .din, .out_width, .dout, .hit);

  always #6.25 clk = ~clk;

  // sampled input history
  int n = 0;            // edge index
  int last_rise = -100; // edge index of last sampled rising edge
  int prev_rise = -100; // the one before (a retrigger extends its window)
  int last_w = 1, prev_w = 1;
  logic prev = 1'b0;
  int nrise = 0, nhit = 0;

  always @(posedge clk) if (!rst) begin
    n <= n + 1;
    if (din && !prev) begin
      prev_rise <= last_rise; prev_w <= last_w;
      last_rise <= n; last_w <= (out_width == 0) ? 1 : int'(out_width);
      nrise <= nrise + 1;
    end
    prev <= din;
  end

  always @(negedge clk) if (!rst) begin
    logic exp_o;
    int e;
    e = n - 1;  // index of the edge just passed
    // the newer window wins once it has started
    if (e >= last_rise + 2) exp_o = (e <= last_rise + 1 + last_w);
    else                    exp_o = (e >= prev_rise + 2) && (e <= prev_rise + 1 + prev_w);
    if (n > 3) checks++;
    if (n > 3 && dout !== exp_o) begin
      failures++;
      if (failures < 10) $display("edge %0d: dout=%b expected %b (last rise %0d)", e, dout, exp_o, last_rise);
    end
    if (hit) nhit++;
  end

  initial begin
    out_width = 8'd4;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 400; k++) begin
      if (k == 150) begin repeat (12) @(posedge clk); out_width = 8'd1; end
      if (k == 250) begin repeat (12) @(posedge clk); out_width = 8'd0; end
      if (k == 300) begin repeat (12) @(posedge clk); out_width = 8'd9; end
      #($urandom_range(25, 400) * 1ns / 10.0);
      din = 1'b1;
      #($urandom_range(200, 300) * 1ns / 10.0);   // 20..30 ns pulse
      din = 1'b0;
      #($urandom_range(0, 1500) * 1ns / 10.0);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (nhit != nrise) begin failures++; $display("hits %0d, rising edges %0d", nhit, nrise); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
