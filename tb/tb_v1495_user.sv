// tb_v1495_user: one SLAVE board on its own. The testbench plays the master:
// it watches trg_par_out, answers with a two-cycle trg on trg_link_in and
// reads the events back over the local bus. Checks the chamber trigger,
// busy_out around an event, the event words, n_Ev, the software reset (FIFO
// emptied, event counter restarted) and the stop state (trg ignored).
module tb_v1495_user;
  import rpc_pkg::*;
  logic lclk = 0, pll_clk = 0, nlbres = 0;
  logic [31:0] a_in = '0, b_in = '0, d_in = '0, f_in = '0;
  logic nads = 1, wnr = 0, nblast = 1;
  logic [15:0] lad_in = '0, lad_out;
  logic lad_oe, nready, trg_link_in = 0;
  logic trg_par_out, busy_out, trg_out, nledg, nledr;
  int checks = 0, failures = 0;
  int n_trgpar = 0, n_busy = 0;

  v1495_user #(.MASTER(1'b0), .BOARD_ID(2'd0)) dut (.lclk, .pll_clk, .nlbres, .a_in, .b_in, .d_in, .f_in,
    .nads, .wnr, .nblast, .lad_in, .lad_out, .lad_oe, .nready,
    .trgs_in(1'b0), .trg1_in(1'b0), .busy1_in(1'b0), .trg2_in(1'b0), .busy2_in(1'b0),
    .trg_link_in, .trg_par_out, .busy_out, .trg_out, .nledg, .nledr);

  always #12.5 lclk = ~lclk;
  always #6.25 pll_clk = ~pll_clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("[%0t] FAIL %s", $time, what); end
  endtask

  task automatic lb_cycle(input logic [15:0] addr, input logic write, input int n,
                          input logic [15:0] wdata, ref logic [15:0] rdata [$]);
    int guard;
    @(negedge lclk);
    nads = 0; wnr = write; lad_in = addr; nblast = 1;
    @(negedge lclk);
    nads = 1;
    for (int i = 0; i < n; i++) begin
      if (write) lad_in = wdata;
      guard = 0;
      while (nready) begin
        @(negedge lclk);
        if (++guard > 20) begin chk(0, "no nready"); return; end
      end
      if (!write) rdata.push_back(lad_out);
      nblast = (i == n - 1) ? 1'b0 : 1'b1;
      @(negedge lclk);
    end
    nblast = 1;
  endtask
  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] r [$];
    lb_cycle(a, 1'b1, 1, d, r);
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    logic [15:0] r [$];
    lb_cycle(a, 1'b0, 1, 16'h0, r);
    d = r[0];
  endtask

  // master model: answer each chamber trigger with a trg after a cable delay
  logic answer = 1;
  always begin
    @(posedge trg_par_out);
    n_trgpar++;
    if (answer) begin
      repeat (3) @(posedge pll_clk);
      #1 trg_link_in = 1;
      repeat (2) @(posedge pll_clk);
      #1 trg_link_in = 0;
      repeat (3) @(posedge pll_clk);
      if (busy_out) n_busy++;
    end
  end

  // x strip i (0..39), y strip j (0..71) -> panel bits, as in the board map
  task automatic strip(input int c, input logic v);
    if (c < 32)       a_in[c] = v;
    else if (c < 40)  b_in[c - 32] = v;
    else if (c < 56)  b_in[16 + c - 40] = v;
    else if (c < 88)  d_in[c - 56] = v;
    else if (c < 104) f_in[c - 88] = v;
    else              b_in[8 + c - 104] = v;
  endtask

  task automatic particle(input int xs, input int ys);
    @(negedge pll_clk);
    strip(xs, 1); strip(40 + ys, 1);
    #20ns;
    strip(xs, 0); strip(40 + ys, 0);
    repeat (40) @(posedge pll_clk);
  endtask

  task automatic read_events(input int n, input int first_ev, input int xs [], input int ys []);
    logic [15:0] v, r [$];
    rd(A_WRUSED, v);
    chk(v == 16'(n * EVENT_WORDS), $sformatf("FIFO holds %0d words, expected %0d", v, n * EVENT_WORDS));
    if (v == 0) return;
    lb_cycle(A_FIFO, 1'b0, 2 * int'(v), 16'h0, r);
    for (int e = 0; e < n; e++) begin
      logic [31:0] wd [6];
      logic [127:0] p, pe;
      for (int k = 0; k < 6; k++) wd[k] = {r[2 * (6 * e + k) + 1], r[2 * (6 * e + k)]};
      p = {wd[5], wd[4], wd[3], wd[2]};
      pe = '0;
      pe[xs[e]] = 1'b1;
      pe[40 + ys[e]] = 1'b1;
      chk(wd[0] == {4'hA, 4'h0, 24'(first_ev + e)}, $sformatf("header %h", wd[0]));
      chk(p == pe, $sformatf("event %0d pattern %h expected %h", e, p, pe));
      if (e > 0) chk(wd[1] > {r[2 * (6 * e - 5) + 1], r[2 * (6 * e - 5)]}, "timestamps increase");
    end
  endtask

  initial begin
    logic [15:0] v;
    int xs [], ys [];
    repeat (4) @(posedge lclk);
    nlbres = 1;
    repeat (4) @(posedge lclk);
    wr(A_NCLOCK, 16'd6);
    wr(A_CTRL, 16'h0001);
    repeat (10) @(posedge pll_clk);
    chk(nledg == 1'b0, "green LED");
    xs = new[10]; ys = new[10];
    for (int e = 0; e < 10; e++) begin
      xs[e] = $urandom_range(0, 39); ys[e] = $urandom_range(0, 71);
      particle(xs[e], ys[e]);
    end
    chk(n_trgpar == 10, $sformatf("trg_par_out pulses %0d", n_trgpar));
    chk(n_busy == 10, $sformatf("busy seen in %0d of 10 events", n_busy));
    rd(A_NEV_LO, v); chk(v == 16'd10, "n_Ev register");
    read_events(10, 1, xs, ys);
    // a trigger with no hit still gives a (empty) event
    @(negedge pll_clk) trg_link_in = 1;
    @(negedge pll_clk);
    @(negedge pll_clk) trg_link_in = 0;
    repeat (3) @(posedge pll_clk);
    chk(busy_out == 1'b1, "busy during event");
    repeat (30) @(posedge pll_clk);
    chk(busy_out == 1'b0, "busy released");
    rd(A_WRUSED, v); chk(v == 16'd6, "empty event written");
    // software reset empties the FIFO and restarts the count
    wr(A_CTRL, 16'h0003);
    repeat (10) @(posedge pll_clk);
    wr(A_CTRL, 16'h0001);
    repeat (10) @(posedge pll_clk);
    rd(A_WRUSED, v); chk(v == 16'd0, "FIFO empty after reset");
    rd(A_NEV_LO, v); chk(v == 16'd0, "n_Ev cleared by reset");
    for (int e = 0; e < 3; e++) begin
      xs[e] = $urandom_range(0, 39); ys[e] = $urandom_range(0, 71);
      particle(xs[e], ys[e]);
    end
    read_events(3, 1, xs, ys);
    // stopped: trg ignored
    wr(A_CTRL, 16'h0000);
    particle(3, 4);
    rd(A_WRUSED, v); chk(v == 16'd0, "no event while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge pll_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
