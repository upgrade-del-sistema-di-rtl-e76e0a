// tb_rpc_teststand_top: end-to-end run of the three-board test stand at the
// default sizes (4096-word FIFOs, 112 channels per board).
//
// A host model drives the three local buses (register writes, status polls,
// block transfers); a muon model puts 20 ns strip pulses, not aligned to the
// clock, on the tracking chambers TRK1/TRK2 (slaves), the test chambers
// TST1/TST2 (master) and the scintillator line trgS. Every event read back is
// decoded and compared with the strips that were hit.
//
// Phases and the mechanisms each must show (counted; one never seen fails):
//   A  efficiency trigger (trgS & trg1 & trg2 through the delays), masked
//      strips, BLT readout gated by blt_ready
//   B  efficiency trigger refuses hits in the test chambers alone; the
//      auto-trigger configuration accepts them
//   C  inverted inputs on the master
//   D  FIFO almost full on the master (FaF) vetoes triggers without losing
//      data; then a slave's busy line (busy1) vetoes the master
//   E  scalers count the hits of every strip, masked strips stay at zero
module tb_rpc_teststand_top;
  import rpc_pkg::*;

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

  // 40 MHz LCLK and the 80 MHz PLL clock, rising edges aligned
  always #12.5  lclk = ~lclk;
  always #6.25  pll_clk = ~pll_clk;

  int checks = 0, failures = 0;
  int n_eff = 0, n_mask = 0, n_blt = 0, n_auto = 0, n_eff_refused = 0, n_invert = 0;
  int n_faf_veto = 0, n_slave_veto = 0, n_scaler = 0, n_trg_seen = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 25) $display("[%0t] FAIL %s", $time, what); end
  endtask

  logic trg_d = 0;   // the trg line to the slaves is two cycles wide: count edges
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
  typedef struct {
    logic [39:0] x;
    logic [71:0] y;
  } hits_t;
  hits_t exp_q [3][$];      // per board: patterns of the events still to be read
  int    next_ev [3];       // per board: expected n_Ev of the next event read

  function automatic logic [127:0] pack(input hits_t h);
    return {16'h0, h.y, h.x};
  endfunction

  // read every complete event of board b by block transfer and check it
  task automatic readout(input int b, input string phase);
    logic [15:0] v, r [$];
    int words;
    rd(b, A_STATUS, v);
    rd(b, A_WRUSED, v);
    words = int'(v);
    chk(words % EVENT_WORDS == 0, $sformatf("%s board %0d: %0d words is not whole events", phase, b, words));
    if (words == 0) return;
    lb_cycle(b, A_FIFO, 1'b0, 2 * words, 16'h0, r);
    n_blt++;
    for (int e = 0; e < words / EVENT_WORDS; e++) begin
      logic [31:0] wd [EVENT_WORDS];
      logic [127:0] p;
      hits_t h;
      for (int k = 0; k < EVENT_WORDS; k++) wd[k] = {r[2 * (e * EVENT_WORDS + k) + 1], r[2 * (e * EVENT_WORDS + k)]};
      p = {wd[5], wd[4], wd[3], wd[2]};
      chk(wd[0][31:28] == HEADER_TAG && wd[0][25:24] == 2'(b),
          $sformatf("%s board %0d: header %h", phase, b, wd[0]));
      chk(wd[0][23:0] == 24'(next_ev[b]),
          $sformatf("%s board %0d: n_Ev %0d expected %0d", phase, b, wd[0][23:0], next_ev[b]));
      next_ev[b]++;
      if (exp_q[b].size() == 0) begin
        chk(0, $sformatf("%s board %0d: unexpected event", phase, b));
      end else begin
        h = exp_q[b].pop_front();
        chk(p == pack(h), $sformatf("%s board %0d event %0d: pattern %h expected %h",
                                    phase, b, wd[0][23:0], p, pack(h)));
      end
    end
  endtask

  // ---------------- muon model ----------------
  int scaler_ref [3][112];  // hits each channel should have counted
  logic [2:0] inv_board = '0;

  // channel index c (0..39 x, 40..111 y) of a board -> front-panel bit
  task automatic set_strip(input int b, input int c, input logic v);
    logic lv;
    lv = v ^ inv_board[b];
    if (b != 1) begin
      if (c < 32)       a_in[b][c] = lv;
      else if (c < 40)  b_in[b][c - 32] = lv;
      else if (c < 56)  b_in[b][16 + c - 40] = lv;
      else if (c < 88)  d_in[b][c - 56] = lv;
      else if (c < 104) f_in[b][c - 88] = lv;
      else              b_in[b][8 + c - 104] = lv;
    end else begin
      if (c < 16)       a_in[b][c] = lv;
      else if (c < 32)  d_in[b][c - 16] = lv;
      else if (c >= 40 && c < 72)  b_in[b][c - 40] = lv;
      else if (c >= 72 && c < 104) f_in[b][c - 72] = lv;
    end
  endtask

  // random cluster of 1..3 strips in [lo, hi]
  function automatic logic [111:0] cluster(input int lo, input int hi);
    int s, n;
    logic [111:0] m;
    m = '0;
    n = $urandom_range(1, 3);
    s = $urandom_range(lo, hi - n + 1);
    for (int i = 0; i < n; i++) m[s + i] = 1'b1;
    return m;
  endfunction

  logic [111:0] mask [3];   // 1 = channel enabled

  // One particle. hit[b] = channels fired on board b; scint drives trgS.
  // expect_evt: the master should accept it (all boards then record it).
  task automatic particle(input logic [111:0] hit [3], input logic scint, input logic expect_evt);
    #($urandom_range(0, 120) * 0.1ns);
    for (int b = 0; b < 3; b++) for (int c = 0; c < 112; c++) if (hit[b][c]) set_strip(b, c, 1'b1);
    if (scint) trgs_in = 1'b1;
    #20ns;
    for (int b = 0; b < 3; b++) for (int c = 0; c < 112; c++) if (hit[b][c]) set_strip(b, c, 1'b0);
    #30ns trgs_in = 1'b0;
    for (int b = 0; b < 3; b++) begin
      for (int c = 0; c < 112; c++) if (hit[b][c] && mask[b][c]) scaler_ref[b][c]++;
      if (expect_evt) exp_q[b].push_back('{x: hit[b][39:0] & mask[b][39:0], y: hit[b][111:40] & mask[b][111:40]});
    end
    repeat (40) @(posedge pll_clk);
  endtask

  // a track seen by both planes of the chamber after masking
  function automatic logic [111:0] trk_hits(input int b);
    logic [111:0] h;
    do h = cluster(0, 39) | cluster(40, 111);
    while ((h[39:0] & mask[b][39:0]) == '0 || (h[111:40] & mask[b][111:40]) == '0);
    return h;
  endfunction
  function automatic logic [111:0] tst_hits();
    // TST1x 0..15 or TST2x 16..31; TST1y 40..71 or TST2y 72..103
    logic [111:0] h;
    h = ($urandom_range(0, 1) != 0) ? cluster(0, 15) : cluster(16, 31);
    h |= ($urandom_range(0, 1) != 0) ? cluster(40, 71) : cluster(72, 103);
    return h;
  endfunction

  task automatic write_masks(input int b);
    for (int k = 0; k < 3; k++) wr(b, A_XMASK0 + 16'(2 * k), mask[b][16 * k +: 16]);
    for (int k = 0; k < 5; k++) wr(b, A_YMASK0 + 16'(2 * k), 16'(mask[b][40 + 16 * k +: 16]));
  endtask

  task automatic wait_idle();
    repeat (60) @(posedge pll_clk);
  endtask

  // ---------------- test sequence ----------------
  initial begin
    logic [111:0] h [3];
    logic [15:0] v;
    int accepted, sent;
    for (int b = 0; b < 3; b++) begin
      next_ev[b] = 1;
      mask[b] = '1;
      foreach (scaler_ref[b][c]) scaler_ref[b][c] = 0;
    end
    repeat (4) @(posedge lclk);
    nlbres = 1;
    repeat (4) @(posedge lclk);

    // configuration: masks, trigger delays (trgS skips a slave's input
    // stage, so it is delayed to meet trg1/trg2), start
    mask[0][5] = 1'b0; mask[0][60] = 1'b0; mask[2][39] = 1'b0;
    for (int b = 0; b < 3; b++) begin
      write_masks(b);
      wr(b, A_NDIV, 16'(EVENT_WORDS));
    end
    wr(1, A_DLY_TRGS, 16'd4);
    wr(1, A_DLY_TRG1, 16'd0);
    wr(1, A_DLY_TRG2, 16'd0);
    rd(1, A_DLY_TRGS, v); chk(v == 16'd4, "delay register readback");
    for (int b = 0; b < 3; b++) wr(b, A_CTRL, 16'h0005);   // acq_run + scaler_run
    repeat (10) @(posedge pll_clk);
    for (int b = 0; b < 3; b++) chk(nledg[b] == 1'b0, "green LED on while running");

    // ---- A: efficiency trigger ----
    for (int i = 0; i < 24; i++) begin
      h[0] = trk_hits(0); h[2] = trk_hits(2); h[1] = tst_hits();
      if (i % 4 == 0) begin h[0][5] = 1'b1; h[0][60] = 1'b1; n_mask++; end   // masked strips
      particle(h, 1'b1, 1'b1);
      n_eff++;
    end
    wait_idle();
    for (int b = 0; b < 3; b++) begin
      rd(b, A_STATUS, v);
      chk(v[2] == 1'b1, $sformatf("blt_ready on board %0d", b));
      readout(b, "A");
      rd(b, A_STATUS, v);
      chk(v[2] == 1'b0, "blt_ready clears after readout");
    end
    chk(n_trg_seen == 24, $sformatf("phase A: %0d triggers", n_trg_seen));

    // ---- B: test-chamber hits alone ----
    for (int i = 0; i < 6; i++) begin
      h[0] = '0; h[2] = '0; h[1] = tst_hits();
      particle(h, 1'b0, 1'b0);
    end
    wait_idle();
    for (int b = 0; b < 3; b++) begin rd(b, A_WRUSED, v); chk(v == 0, "efficiency trigger without tracking"); end
    if (n_trg_seen == 24) n_eff_refused += 6;
    wr(1, A_TRGCFG, 16'(TRG_CFG_AUTO));
    for (int i = 0; i < 12; i++) begin
      h[0] = '0; h[2] = '0; h[1] = tst_hits();
      particle(h, 1'b0, 1'b1);
      n_auto++;
    end
    wait_idle();
    for (int b = 0; b < 3; b++) readout(b, "B");

    // ---- C: inverted inputs on the master ----
    wr(1, A_CTRL, 16'h0000);            // stop, scalers frozen while the lines flip
    inv_board[1] = 1'b1;
    a_in[1] = '1; b_in[1] = '1; d_in[1] = '1; f_in[1] = '1;
    wr(1, A_INVERT, 16'h0001);
    wr(1, A_TRGCFG, 16'(TRG_CFG_EFFICIENCY));
    repeat (20) @(posedge pll_clk);
    wr(1, A_CTRL, 16'h0005);
    // the master's event counter restarts with the run
    next_ev[1] = 1;
    for (int i = 0; i < 8; i++) begin
      h[0] = trk_hits(0); h[2] = trk_hits(2); h[1] = tst_hits();
      particle(h, 1'b1, 1'b1);
      n_invert++;
    end
    wait_idle();
    for (int b = 0; b < 3; b++) readout(b, "C");

    // ---- D: FIFO almost full on the master, then a busy slave ----
    // slaves are read as we go; the master is not read
    sent = 0;
    for (int i = 0; i < 700; i++) begin
      logic full;
      rd(1, A_STATUS, v);
      full = v[0];                      // FaF
      h[0] = trk_hits(0); h[2] = trk_hits(2); h[1] = tst_hits();
      particle(h, 1'b1, !full);
      if (full) n_faf_veto++;
      sent++;
      if (i % 50 == 49) begin readout(0, "D"); readout(2, "D"); end
    end
    wait_idle();
    chk(nledr[1] == 1'b1, "no words lost on the master");
    rd(1, A_WRUSED, v);
    chk(int'(v) > FIFO_DEPTH - EVENT_WORDS, $sformatf("master FIFO filled to %0d", v));
    for (int b = 0; b < 3; b++) readout(b, "D");
    // now the master is empty; fill SLAVE 1 until its busy1 blocks the master
    for (int i = 0; i < 720; i++) begin
      logic full;
      rd(0, A_STATUS, v);
      full = v[0];
      h[0] = trk_hits(0); h[2] = trk_hits(2); h[1] = tst_hits();
      particle(h, 1'b1, !full);
      if (full) n_slave_veto++;
      if (i % 50 == 49) begin readout(1, "D2"); readout(2, "D2"); end
    end
    wait_idle();
    for (int b = 0; b < 3; b++) readout(b, "D2");
    for (int b = 0; b < 3; b++) chk(nledr[b] == 1'b1, $sformatf("board %0d lost words", b));

    // ---- E: scalers ----
    for (int b = 0; b < 3; b++) wr(b, A_CTRL, 16'h0001);   // freeze scalers
    repeat (10) @(posedge pll_clk);
    for (int b = 0; b < 3; b++) begin
      for (int c = 0; c < 112; c++) begin
        logic [15:0] lo, hi;
        if (b == 1 && ((c >= 32 && c < 40) || c >= 104)) continue;   // unused master inputs
        rd(b, A_SCALER0 + 16'(4 * c), lo);
        rd(b, A_SCALER0 + 16'(4 * c + 2), hi);
        chk({hi, lo} == 32'(scaler_ref[b][c]),
            $sformatf("scaler board %0d ch %0d: %0d expected %0d", b, c, {hi, lo}, scaler_ref[b][c]));
        if (scaler_ref[b][c] > 0) n_scaler++;
      end
    end
    chk(scaler_ref[0][5] == 0, "masked strip counted");

    for (int b = 0; b < 3; b++) chk(exp_q[b].size() == 0, $sformatf("board %0d: %0d events never read", b, exp_q[b].size()));
    $display("mechanisms: efficiency=%0d masked=%0d blt=%0d refused=%0d auto=%0d invert=%0d faf_veto=%0d busy1_veto=%0d scaler_channels=%0d",
             n_eff, n_mask, n_blt, n_eff_refused, n_auto, n_invert, n_faf_veto, n_slave_veto, n_scaler);
    chk(n_eff > 0,         "efficiency trigger never happened");
    chk(n_mask > 0,        "mask never exercised");
    chk(n_blt > 0,         "no block transfer");
    chk(n_eff_refused > 0, "efficiency trigger never refused a lone test-chamber hit");
    chk(n_auto > 0,        "auto-trigger never happened");
    chk(n_invert > 0,      "inverter never exercised");
    chk(n_faf_veto > 0,    "FaF veto never happened");
    chk(n_slave_veto > 0,  "slave busy veto never happened");
    chk(n_scaler > 0,      "scalers never counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge pll_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
