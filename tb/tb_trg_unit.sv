// tb_trg_unit: random trg_in, veto, FaF and run. A reference model computes
// the accepted trigger (rising edge of trg_in, running, no veto, no FaF), the
// event number, the timestamp (cycles since run rose) and the rejections.
module tb_trg_unit;
  logic clk = 1'b0, rst = 1'b1;
  logic run = 0, trg_in = 0, veto = 0, faf = 0;
  logic trg, rejected;
  logic [23:0] n_ev;
  logic [31:0] timestamp;
  int checks = 0, failures = 0;
  // model
  logic m_prev = 0, m_trg = 0, m_rej = 0;
  int unsigned m_nev = 0, m_ts = 0, m_cnt = 0;
  int n_acc = 0, n_rej = 0;

  trg_unit #(.EW(24), .TW(32)) dut (.clk, .rst, .run, .trg_in, .veto, .faf, .trg, .n_ev, .timestamp, .rejected);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      // inputs for the coming edge
      if (k % 1000 == 0) run = 1'b0;
      else if (k % 1000 == 10) run = 1'b1;
      trg_in = ($urandom_range(0, 2) == 0);
      veto   = ($urandom_range(0, 3) == 0);
      faf    = ($urandom_range(0, 9) == 0);
      // model of the next edge
      m_trg = 0; m_rej = 0;
      if (!run) begin m_cnt = 0; m_nev = 0; end
      else begin
        if (trg_in && !m_prev) begin
          if (veto || faf) begin m_rej = 1; n_rej++; end
          else begin m_trg = 1; m_nev++; m_ts = m_cnt; n_acc++; end
        end
        m_cnt++;
      end
      m_prev = trg_in;
      @(negedge clk);
      checks += 4;
      if (trg !== m_trg) failures++;
      if (rejected !== m_rej) failures++;
      if (n_ev !== 24'(m_nev)) failures++;
      if (timestamp !== m_ts) failures++;
      if (failures > 0 && failures < 5) $display("k %0d trg %b/%b n_ev %0d/%0d ts %0d/%0d", k, trg, m_trg, n_ev, m_nev, timestamp, m_ts);
    end
    checks++;
    if (n_acc == 0 || n_rej == 0) failures++;
    $display("accepted %0d rejected %0d", n_acc, n_rej);
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
