// tb_master_trigger: drives trgS, trg1, trg2 and the local chamber trigger
// with random levels and checks trg_in against the AND of the enabled,
// delayed lines (each delayed by its own DELAY_LENGHT plus the two-stage
// synchroniser; local_trg is used undelayed). Covers the efficiency
// configuration (trgS & trg1 & trg2), the auto-trigger configuration (own
// chamber only) and random configurations.
module tb_master_trigger;
  import rpc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic trgs = 0, trg1 = 0, trg2 = 0, local_trg = 0;
  logic [4:0] dly_trgs, dly_trg1, dly_trg2;
  trg_cfg_t cfg;
  logic trgs_sync, trg1_sync, trg2_sync, trg_in;
  logic hs [$], h1 [$], h2 [$];
  int checks = 0, failures = 0, n_fired = 0;

  master_trigger #(.DW(5)) dut (.clk, .rst, .trgs, .trg1, .trg2, .local_trg,
    .dly_trgs, .dly_trg1, .dly_trg2, .cfg, .trgs_sync, .trg1_sync, .trg2_sync, .trg_in);
  always #5 clk = ~clk;

  function automatic logic past(ref logic h [$], input int d);
    return (h.size() > d + 1) ? h[h.size() - 2 - d] : 1'b0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int phase = 0; phase < 8; phase++) begin
      case (phase)
        0: cfg = TRG_CFG_EFFICIENCY;
        1: cfg = TRG_CFG_AUTO;
        2: cfg = '0;
        default: cfg = 4'($urandom_range(0, 15));
      endcase
      dly_trgs = 5'($urandom_range(0, 31));
      dly_trg1 = 5'($urandom_range(0, 31));
      dly_trg2 = 5'($urandom_range(0, 31));
      hs.delete(); h1.delete(); h2.delete();
      for (int k = 0; k < 400; k++) begin
        @(negedge clk);
        if (k > 40) begin
          logic e;
          e = cfg.use_trgs | cfg.use_trg1 | cfg.use_trg2 | cfg.use_local;
          if (cfg.use_trgs)  e &= past(hs, int'(dly_trgs));
          if (cfg.use_trg1)  e &= past(h1, int'(dly_trg1));
          if (cfg.use_trg2)  e &= past(h2, int'(dly_trg2));
          if (cfg.use_local) e &= local_trg;
          checks++;
          if (trg_in !== e) begin
            failures++;
            if (failures < 10) $display("phase %0d k %0d trg_in %b exp %b", phase, k, trg_in, e);
          end
          if (e) n_fired++;
        end
        // lines mostly high so that the AND fires often
        trgs = ($urandom_range(0, 3) != 0);
        trg1 = ($urandom_range(0, 3) != 0);
        trg2 = ($urandom_range(0, 3) != 0);
        local_trg = ($urandom_range(0, 1) != 0);
        @(posedge clk);
        hs.push_back(trgs); h1.push_back(trg1); h2.push_back(trg2);
      end
    end
    checks++;
    if (n_fired == 0) begin failures++; $display("trigger never fired"); end
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
