// tb_input_stage: 12 strips driven with clock-aligned pulses. Checks the
// inverter, the mask and the bit counters: each enabled strip must produce
// one hit per rising edge of its (possibly inverted) input and a synchronous
// output that rises three edges after the input and lasts out_width cycles;
// masked strips stay silent.
module tb_input_stage;
  localparam int N = 12;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] strips_in = '0, mask, strips_sync, hits;
  logic invert;
  logic [7:0] out_width;
  int checks = 0, failures = 0;
  int nhit [N], nexp [N];

  input_stage #(.N(N), .W(8)) dut (.clk, .rst, .strips_in, .invert, .mask, .out_width, .strips_sync, .hits);
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) for (int i = 0; i < N; i++) if (hits[i]) nhit[i]++;

  initial begin
    foreach (nhit[i]) begin nhit[i] = 0; nexp[i] = 0; end
    invert = 0; mask = '1; out_width = 8'd3;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int phase = 0; phase < 4; phase++) begin
      invert = phase[0];
      mask   = (phase < 2) ? '1 : N'($urandom);
      strips_in = invert ? '1 : '0;
      repeat (6) @(negedge clk);
      for (int ev = 0; ev < 30; ev++) begin
        logic [N-1:0] pat;
        pat = N'($urandom) | 1;
        // pulse of 2 cycles at the (logical) active level
        strips_in = invert ? ~pat : pat;
        for (int i = 0; i < N; i++) if (pat[i] && mask[i]) nexp[i]++;
        repeat (2) @(negedge clk);
        strips_in = invert ? '1 : '0;
        // output rises 3 edges after the first sampled edge, lasts 3 cycles
        @(negedge clk);   // 1 edge after pulse end = 3 edges after start
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (strips_sync !== (pat & mask)) begin
            failures++;
            if (failures < 10) $display("phase %0d ev %0d c %0d sync %h exp %h", phase, ev, c, strips_sync, pat & mask);
          end
          @(negedge clk);
        end
        checks++;
        if (strips_sync !== '0) begin failures++; $display("sync not cleared: %h", strips_sync); end
        repeat (3) @(negedge clk);
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (nhit[i] != nexp[i]) begin failures++; $display("ch %0d hits %0d expected %0d", i, nhit[i], nexp[i]); end
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
