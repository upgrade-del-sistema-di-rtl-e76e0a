// master_trigger: trigger logic of the MASTER board.
//
// The three trigger lines - trgS from the scintillator coincidence, trg1 from
// the SLAVE 1 tracking chamber and trg2 from the SLAVE 2 tracking chamber - each
// pass a programmable delay (trig_delay, one DELAY_LENGHT register per line)
// so that they overlap in time, and are then ANDed into trg_in for the trigger
// unit. The trigger configuration register chooses which sources enter the AND:
// the efficiency trigger uses trgS, trg1 and trg2; the auto-trigger uses only
// the master's own test chamber (local_trg = OR x AND OR y of the test-chamber
// strips), which records noise and hot spots. With no source enabled trg_in
// stays low.
//
// Delays, AND and the two trigger modes follow the original test-stand design; expressing the
// modes as an enable mask is this implementation's choice.
module master_trigger
  import rpc_pkg::*;
#(
  parameter int unsigned DW = rpc_pkg::DLY_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          trgs,        // scintillator logic (external)
  input  logic          trg1,        // from SLAVE 1
  input  logic          trg2,        // from SLAVE 2
  input  logic          local_trg,   // own chamber, already synchronous
  input  logic [DW-1:0] dly_trgs,
  input  logic [DW-1:0] dly_trg1,
  input  logic [DW-1:0] dly_trg2,
  input  trg_cfg_t      cfg,
  output logic          trgs_sync,
  output logic          trg1_sync,
  output logic          trg2_sync,
  output logic          trg_in
);
  trig_delay #(.DW(DW)) u_dly_s (.clk, .rst, .din(trgs), .delay_length(dly_trgs), .dout(trgs_sync));
  trig_delay #(.DW(DW)) u_dly_1 (.clk, .rst, .din(trg1), .delay_length(dly_trg1), .dout(trg1_sync));
  trig_delay #(.DW(DW)) u_dly_2 (.clk, .rst, .din(trg2), .delay_length(dly_trg2), .dout(trg2_sync));

  always_comb begin
    trg_in = cfg.use_trgs | cfg.use_trg1 | cfg.use_trg2 | cfg.use_local;
    if (cfg.use_trgs)  trg_in &= trgs_sync;
    if (cfg.use_trg1)  trg_in &= trg1_sync;
    if (cfg.use_trg2)  trg_in &= trg2_sync;
    if (cfg.use_local) trg_in &= local_trg;
  end
endmodule
