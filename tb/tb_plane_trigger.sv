// tb_plane_trigger: random strip patterns; trg_par must equal
// (any x strip) AND (any y strip) of the previous cycle, trk_x/trk_y the
// same-cycle ORs.
module tb_plane_trigger;
  logic clk = 1'b0, rst = 1'b1;
  logic [39:0] x_sync;
  logic [71:0] y_sync;
  logic trk_x, trk_y, trg_par;
  logic exp_q;
  int checks = 0, failures = 0;

  plane_trigger #(.NX(40), .NY(72)) dut (.clk, .rst, .x_sync, .y_sync, .trk_x, .trk_y, .trg_par);
  always #5 clk = ~clk;

  function automatic logic any_bit(input logic [71:0] v, input int n);
    for (int i = 0; i < n; i++) if (v[i]) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    x_sync = '0; y_sync = '0; exp_q = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      checks++;
      if (trg_par !== exp_q) begin failures++; $display("cycle %0d trg_par %b exp %b", k, trg_par, exp_q); end
      // sparse patterns: often a single plane or no hit
      x_sync = ($urandom_range(0, 2) == 0) ? '0 : (40'd1 << $urandom_range(0, 39));
      y_sync = ($urandom_range(0, 2) == 0) ? '0 : (72'd1 << $urandom_range(0, 71));
      #1;
      checks += 2;
      if (trk_x !== any_bit(72'(x_sync), 40)) failures++;
      if (trk_y !== any_bit(y_sync, 72)) failures++;
      exp_q = any_bit(72'(x_sync), 40) & any_bit(y_sync, 72);
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
