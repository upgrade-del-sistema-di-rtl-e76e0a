// tb_hv_scan_run: the long runs of the test-stand programme on the complete
// three-board system at the default sizes.
//
//   run 1  HV-scan point: 20000 efficiency-triggered events (trgS & trg1 & trg2)
//   run 2  auto-trigger run: 20000 events triggered by the test chambers alone
//
// The host reads every board by block transfer whenever blt_ready is set, as
// the acquisition program does during a run. Every event read back is decoded
// and checked: header, board number, consecutive n_Ev, increasing timestamp
// and the strip pattern. At the end of each run the event counters read
// through the registers must equal the number of particles sent.
module tb_hv_scan_run;
  import rpc_pkg::*;

  localparam int N_RUN = 20000;

  logic lclk = 0, pll_clk = 0, nlbres = 0;
  logic [2:0][31:0] a_in = '0, b_in = '0, d_in = '0, f_in = '0;
  logic trgs_in = 0;
  logic [2:0] nads = '1, wnr = '0, nblast = '1;
  logic [2:0][15:0] lad_in = '0;
  logic [2:0][15:0] lad_out;
  logic [2:0] lad_oe, nready, nledg, nledr;
  logic trg1, trg2, busy1, busy2, busy3, trg;

  rpc_teststand_top dut (.lclk, .pll_clk, .nlbres, .a_in, .b_in, .d_in, .f_in, .trgs_in,
    .nads, .wnr, .nblast, .lad_in, .lad_out, .lad_oe, .nready, .nledg, .nledr,
    .trg1, .trg2, .busy1, .busy2, .busy3, .trg);

  always #12.5  lclk = ~lclk;
  always #6.25  pll_clk = ~pll_clk;

  int checks = 0, failures = 0;
  int n_read [3];
  int n_blt = 0, n_trg_seen = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 25) $display("[%0t] FAIL %s", $time, what); end
  endtask

  logic trg_d = 0;
  always @(posedge pll_clk) begin
    trg_d <= trg;
    if (trg && !trg_d) n_trg_seen++;
  end

  // ---------------- host: local bus master ----------------
  task automatic lb_cycle(input int b, input logic [15:0] addr, input logic write, input int n,
                          input logic [15:0] wdata, ref logic [15:0] rdata [$]);
    int guard;
    @(negedge lclk);
    nads[b] = 0; wnr[b] = write; lad_in[b] = addr; nblast[b] = 1;
    @(negedge lclk);
    nads[b] = 1;
    for (int i = 0; i < n; i++) begin
      if (write) lad_in[b] = wdata;
      guard = 0;
      while (nready[b]) begin
        @(negedge lclk);
        if (++guard > 20) begin chk(0, "local bus: no nready"); return; end
      end
      if (!write) rdata.push_back(lad_out[b]);
      nblast[b] = (i == n - 1) ? 1'b0 : 1'b1;
      @(negedge lclk);
    end
    nblast[b] = 1;
  endtask

  task automatic wr(input int b, input logic [15:0] a, input logic [15:0] d);
    logic [15:0] r [$];
    lb_cycle(b, a, 1'b1, 1, d, r);
  endtask

  task automatic rd(input int b, input logic [15:0] a, output logic [15:0] d);
    logic [15:0] r [$];
    lb_cycle(b, a, 1'b0, 1, 16'h0, r);
    d = r[0];
  endtask

  // ---------------- expected events ----------------
  logic [127:0] exp_q [3][$];
  int           next_ev [3];
  logic [31:0]  last_ts [3];

  // read the complete events of board b if it reports blt_ready (or always
  // when drain is set) and check them
  task automatic readout(input int b, input logic drain);
    logic [15:0] v, r [$];
    int words;
    rd(b, A_STATUS, v);
    if (!drain && !v[2]) return;
    rd(b, A_WRUSED, v);
    words = int'(v);
    chk(words % EVENT_WORDS == 0, $sformatf("board %0d: %0d words is not whole events", b, words));
    if (words == 0) return;
    lb_cycle(b, A_FIFO, 1'b0, 2 * words, 16'h0, r);
    n_blt++;
    for (int e = 0; e < words / EVENT_WORDS; e++) begin
      logic [31:0] wd [EVENT_WORDS];
      logic [127:0] p;
      for (int k = 0; k < EVENT_WORDS; k++) wd[k] = {r[2 * (e * EVENT_WORDS + k) + 1], r[2 * (e * EVENT_WORDS + k)]};
      p = {wd[5], wd[4], wd[3], wd[2]};
      chk(wd[0][31:28] == HEADER_TAG && wd[0][25:24] == 2'(b),
          $sformatf("board %0d: header %h", b, wd[0]));
      chk(wd[0][23:0] == 24'(next_ev[b]),
          $sformatf("board %0d: n_Ev %0d expected %0d", b, wd[0][23:0], next_ev[b]));
      chk(next_ev[b] == 1 || wd[1] > last_ts[b],
          $sformatf("board %0d: timestamp %0d after %0d", b, wd[1], last_ts[b]));
      last_ts[b] = wd[1];
      next_ev[b]++;
      n_read[b]++;
      if (exp_q[b].size() == 0) chk(0, $sformatf("board %0d: unexpected event", b));
      else begin
        logic [127:0] x;
        x = exp_q[b].pop_front();
        chk(p == x, $sformatf("board %0d event %0d: pattern %h expected %h", b, wd[0][23:0], p, x));
      end
    end
  endtask

  // ---------------- muon model ----------------
  task automatic set_strip(input int b, input int c, input logic v);
    if (b != 1) begin
      if (c < 32)       a_in[b][c] = v;
      else if (c < 40)  b_in[b][c - 32] = v;
      else if (c < 56)  b_in[b][16 + c - 40] = v;
      else if (c < 88)  d_in[b][c - 56] = v;
      else if (c < 104) f_in[b][c - 88] = v;
      else              b_in[b][8 + c - 104] = v;
    end else begin
      if (c < 16)       a_in[b][c] = v;
      else if (c < 32)  d_in[b][c - 16] = v;
      else if (c >= 40 && c < 72)  b_in[b][c - 40] = v;
      else if (c >= 72 && c < 104) f_in[b][c - 72] = v;
    end
  endtask

  function automatic logic [111:0] cluster(input int lo, input int hi);
    int s, n;
    logic [111:0] m;
    m = '0;
    n = $urandom_range(1, 3);
    s = $urandom_range(lo, hi - n + 1);
    for (int i = 0; i < n; i++) m[s + i] = 1'b1;
    return m;
  endfunction

  function automatic logic [111:0] trk_hits();
    return cluster(0, 39) | cluster(40, 111);
  endfunction
  function automatic logic [111:0] tst_hits();
    logic [111:0] h;
    h = ($urandom_range(0, 1) != 0) ? cluster(0, 15) : cluster(16, 31);
    h |= ($urandom_range(0, 1) != 0) ? cluster(40, 71) : cluster(72, 103);
    return h;
  endfunction

  task automatic particle(input logic [111:0] hit [3], input logic scint);
    #($urandom_range(0, 120) * 0.1ns);
    for (int b = 0; b < 3; b++) for (int c = 0; c < 112; c++) if (hit[b][c]) set_strip(b, c, 1'b1);
    if (scint) trgs_in = 1'b1;
    #20ns;
    for (int b = 0; b < 3; b++) for (int c = 0; c < 112; c++) if (hit[b][c]) set_strip(b, c, 1'b0);
    #30ns trgs_in = 1'b0;
    for (int b = 0; b < 3; b++) exp_q[b].push_back({16'h0, hit[b][111:40], hit[b][39:0]});
    repeat (40) @(posedge pll_clk);
  endtask

  task automatic start_run(input logic [15:0] trg_cfg);
    for (int b = 0; b < 3; b++) wr(b, A_CTRL, 16'h0000);
    wr(1, A_TRGCFG, trg_cfg);
    repeat (20) @(posedge pll_clk);
    for (int b = 0; b < 3; b++) begin
      next_ev[b] = 1;
      n_read[b] = 0;
      wr(b, A_CTRL, 16'h0001);
    end
    n_trg_seen = 0;
  endtask

  task automatic end_run(input string name);
    logic [15:0] lo, hi;
    repeat (60) @(posedge pll_clk);
    for (int b = 0; b < 3; b++) begin
      readout(b, 1'b1);
      rd(b, A_NEV_LO, lo);
      rd(b, A_NEV_HI, hi);
      chk({hi, lo} == 32'(N_RUN), $sformatf("%s board %0d: n_Ev register %0d", name, b, {hi, lo}));
      chk(n_read[b] == N_RUN, $sformatf("%s board %0d: %0d events read", name, b, n_read[b]));
      chk(exp_q[b].size() == 0, $sformatf("%s board %0d: %0d events never read", name, b, exp_q[b].size()));
      chk(nledr[b] == 1'b1, $sformatf("%s board %0d lost words", name, b));
    end
    chk(n_trg_seen == N_RUN, $sformatf("%s: %0d triggers", name, n_trg_seen));
    $display("%s: %0d events per board, %0d triggers", name, n_read[1], n_trg_seen);
  endtask

  initial begin
    logic [111:0] h [3];
    repeat (4) @(posedge lclk);
    nlbres = 1;
    repeat (4) @(posedge lclk);
    for (int b = 0; b < 3; b++) wr(b, A_NDIV, 16'(EVENT_WORDS));
    wr(1, A_DLY_TRGS, 16'd4);

    // run 1: efficiency trigger
    start_run(16'(TRG_CFG_EFFICIENCY));
    for (int i = 0; i < N_RUN; i++) begin
      h[0] = trk_hits(); h[2] = trk_hits(); h[1] = tst_hits();
      particle(h, 1'b1);
      if (i % 64 == 63) for (int b = 0; b < 3; b++) readout(b, 1'b0);
    end
    end_run("efficiency run");

    // run 2: auto-trigger on the test chambers
    start_run(16'(TRG_CFG_AUTO));
    for (int i = 0; i < N_RUN; i++) begin
      h[0] = '0; h[2] = '0; h[1] = tst_hits();
      particle(h, 1'b0);
      if (i % 64 == 63) for (int b = 0; b < 3; b++) readout(b, 1'b0);
    end
    end_run("auto-trigger run");

    chk(n_blt > 0, "no block transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge pll_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
