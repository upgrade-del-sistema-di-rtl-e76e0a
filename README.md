# Trigger and readout for an RPC cosmic-ray test stand

This is the trigger and data-acquisition logic of a test stand for Resistive
Plate Chambers (RPCs), the large gas detectors of the ALICE muon trigger.
Cosmic muons cross a stack of detectors:

- two tracking chambers (TRK1 and TRK2), each read by 40 x strips and 72 y strips;
- three planes of scintillators;
- the two chambers under test (TST1 and TST2), each read by 16 x strips and 32 y strips.

When a muon is seen, the hit pattern of every strip is stored. Offline, the
tracking chambers predict where the muon crossed the test chambers, which gives
the efficiency of the chambers under test. A second trigger mode fires on the
test chamber alone, to map its noise and find hot spots.

The logic runs in the user FPGAs of three CAEN V1495 VME boards. Each board
has 64 differential inputs (ports A and B), expansion ports D, E and F, and a
16-bit local bus to the VME bridge FPGA on the same board:

| board | index | reads | role |
|-------|-------|-------|------|
| SLAVE 1 | 0 | TRK1 (40 x + 72 y) | chamber trigger `trg1`, busy `busy1` |
| MASTER | 1 | TST1 and TST2 (2 x (16 x + 32 y)) | builds the trigger, global veto |
| SLAVE 2 | 2 | TRK2 (40 x + 72 y) | chamber trigger `trg2`, busy `busy2` |

`rpc_teststand_top` holds the three boards and the cables between them.
`v1495_user` is the design of one board. Its parameter `MASTER` selects the
master's input mapping and trigger path.

## From a muon to an event

All acquisition logic runs on `pll_clk`, 80 MHz (12.5 ns). The board PLL
derives it from the 40 MHz local-bus clock `LCLK`. The discriminated strip
pulses are about 20 ns wide and asynchronous to the board. At 25 ns sampling a
pulse can fall between two clock edges; at 12.5 ns every pulse is seen on at
least one edge.

1. **Input stage** (`input_stage`, one per strip plane): the strips pass an
   optional inverter and the channel mask. Each strip then goes to a
   `bit_counter`. The bit counter synchronises the strip with two flip-flops,
   detects its rising edge, and holds its output `x_sync`/`y_sync` high for
   `OUT_WIDTH` cycles (reset value 12, i.e. 150 ns). Every rising edge also
   goes to a 32-bit `scaler_bank` counter for that channel.
2. **Chamber trigger** (`plane_trigger`): `trg_par = (OR of x) AND (OR of y)`,
   registered. On a slave this is the `trg1`/`trg2` cable to the master.
3. **Master trigger** (`master_trigger`): `trgS`, `trg1` and `trg2` are
   synchronised and delayed by their own `DELAY_LENGHT` register (0 to 31
   cycles, `trig_delay`). They are then ANDed into `trg_in`. The `trgS` line is
   the scintillator coincidence and comes from outside the FPGAs. The trigger
   configuration register chooses which sources enter the AND:
   - `0111`: efficiency trigger, `trgS & trg1 & trg2`;
   - `1000`: auto-trigger, the master's own test chambers only.
4. **Trigger unit** (`trg_unit`): a rising edge of `trg_in` becomes a
   one-cycle `trg` if the acquisition runs and neither `veto` nor FaF ("FIFO
   almost full") is set. Each accepted trigger increments `n_Ev` and latches
   the run timestamp.
   - On the master, `trg` goes to the slaves, stretched to two cycles.
   - On a slave, the trigger unit follows that line with `veto` and FaF tied
     low. Every board therefore numbers the same events in the same way.
5. **Shift register** (`shift_reg`): `trg` opens a gate of `n_clock` cycles
   (at least 2). During the gate the strips are ORed into a 128-bit pattern,
   `{16'b0, y[71:0], x[39:0]}`. When the gate closes, the pattern is sent as
   four 32-bit words, strobed by `w1`..`w4`. `WORD_OUT` is the OR of
   `start_gate` and the four strobes.
6. **DAQ controller** (`daq_controller`) writes six words per event into the
   FIFO and keeps the status register: `STATE_ACQ`, `blt_ready`,
   `WRT_FIFO`, FaF and the two LEDs.
7. **FIFO** (`meb_fifo`): 4096 x 32 bits. Writes use `pll_clk`; reads use
   `LCLK`. The host reads it by block transfer over the local bus
   (`lb_interface`).

### Why the pulse widths matter

A slave's own hits must still be in its `x_sync`/`y_sync` when the trigger
comes back from the master. The round trip is about 8 `pll_clk` cycles with
zero delays:

| step | cycles |
|------|--------|
| `trg_par` register | 1 |
| synchroniser on the master | 2 |
| master trigger unit | 1 |
| `trg` output register | 1 |
| synchroniser on the slave | 2 |
| slave trigger unit | 1 |

The programmed delay of that line adds to the total. `OUT_WIDTH` must be
longer than the round trip. The `n_clock` gate then catches hits that arrive
slightly late. `trgS` does not pass through a bit counter, so it reaches the
master about four cycles before `trg1`/`trg2`. Setting `DELAY_LENGHT` of
`trgS` to 4 lines the three up; the end-to-end testbench uses that setting.

### Busy and veto

The master must not accept a trigger that any board cannot store:

- `busy_logic` raises a board's busy line from `trg` until the controller has
  written the event's last word.
- It also raises busy whenever the FIFO has fewer than six free words. That
  condition is FaF.
- The slaves' busy lines return to the master as `busy1`/`busy2`.
- `global_veto` ORs them with the master's own busy (`busy3`). It also holds
  the veto for `HOLDOFF` = 8 cycles after each `trg`, because a slave raises
  its busy only after it has seen that trigger.

A trigger that meets the veto is dropped on all boards. The result is that no
board ever receives an event it cannot store, and the event numbers stay
aligned across the boards.

## Event format

Each board writes six 32-bit words per event, 24 bytes:

| word | content |
|------|---------|
| 0 | header `{4'hA, 2'b00, board_id[1:0], n_Ev[23:0]}` |
| 1 | timestamp: `pll_clk` cycles from the start of the run to the trigger |
| 2 | `x[31:0]` |
| 3 | `{y[23:0], x[39:32]}` |
| 4 | `y[55:24]` |
| 5 | `{16'h0000, y[71:56]}` |

Strip order on a slave: x strips 1-40 are `x[0..39]` and y strips 1-72 are
`y[0..71]`. On the master, `x = {TST2x, TST1x}` and `y = {TST2y, TST1y}`;
`x[39:32]` and `y[71:64]` are always zero there.

## Front-panel mapping

| board | bits | strips |
|-------|------|--------|
| slave | `A[31:0]` | x 1-32 |
| slave | `B[7:0]` | x 33-40 |
| slave | `B[15:8]` | y 65-72 |
| slave | `B[31:16]` | y 1-16 |
| slave | `D[31:0]` | y 17-48 |
| slave | `F[15:0]` | y 49-64 |
| master | `A[15:0]` | TST1x |
| master | `B[31:0]` | TST1y |
| master | `D[15:0]` | TST2x |
| master | `F[31:0]` | TST2y |

The inter-board lines (`trg1`, `busy1`, `trg2`, `busy2` and `trg`) are named
ports of `v1495_user`. On the real boards they use pins of port E and the G0
connector.

## Local bus and registers

The local bus is `LCLK`-synchronous, with 16-bit multiplexed address and data
on `lad_in`/`lad_out`. The top keeps the two directions and the output enable
`lad_oe` separate.

A cycle works like this:

- It starts with `nads` low for one cycle. That cycle carries the address and
  `wnr` (1 = write).
- Each 16-bit transfer is then acknowledged by `nready` low for one cycle.
- On a write, the bridge holds the data from the cycle after `nads` until the
  acknowledge.
- On a read, `lad_out` is valid while `nready` is low.
- The bridge drives `nblast` low during the last transfer of a cycle. While
  `nblast` stays high, the cycle continues.

Reading address `0x0000` streams the FIFO:

- every word is sent as its low half, then its high half;
- one 32-bit word takes four `LCLK` cycles;
- an empty FIFO reads as `0xFFFF`.

The host loop is:

1. Poll `STATUS.blt_ready`.
2. Read `WRUSED`.
3. Block-transfer that many words.

`blt_ready` is set when at least `ndiv_length` words are stored. Its reset
value is one event (6 words).

| address | register | reset value |
|---------|----------|-------------|
| `0x0000` | FIFO data (read) | |
| `0x1000` | `ctrl_reg`: bit 0 `acq_run`, bit 1 `sw_reset`, bit 2 `scaler_run`, bit 3 `scaler_clear` | 0 |
| `0x1002` | `REG_STATUS` (read): bit 0 FaF, bit 1 `WRT_FIFO`, bit 2 `blt_ready`, bit 3 `STATE_ACQ`, bit 4 `nLEDR`, bit 5 `nLEDG` | |
| `0x1004` | FIFO words stored (read) | |
| `0x1006` / `0x1008` | `n_Ev` low/high (read) | |
| `0x100A` | `OUT_WIDTH` | 12 |
| `0x100C` | `n_clock` | 4 |
| `0x100E`, `0x1010`, `0x1012` | `DELAY_LENGHT` of trgS, trg1, trg2 | 0 |
| `0x1014` | trigger configuration `{local, trg2, trg1, trgS}` | `0111` |
| `0x1016` | `ndiv_length` | 6 |
| `0x1018` | inverter enable | 0 |
| `0x1020`..`0x1024` | `X_MASK` (1 = enabled) | all ones |
| `0x1030`..`0x1038` | `Y_MASK` (1 = enabled) | all ones |
| `0x2000 + 4c`, `+2` | scaler of channel `c`, low/high half (channels 0-39 x, 40-111 y) | 0 |

`sw_reset` is a level. While it is high, the acquisition logic and both sides
of the FIFO are held in reset.

## Clocks, resets and crossings

- `nlbres` (active low) resets both clock domains through synchronisers.
- The `ctrl_reg` bits are levels and cross into `pll_clk` through two-flop
  synchronisers. The status bits cross back the same way.
- The FIFO pointers cross in Gray code.
- The configuration registers (masks, widths, delays, trigger configuration)
  are **not** synchronised. Change them only while `acq_run` is 0.
- The scalers and `n_Ev` are read across the clock boundary without a
  snapshot. Stop the counting before reading them: clear `scaler_run`, and
  stop the run for `n_Ev`.

The top uses one `pll_clk` for all three boards. Because every inter-board line
is synchronised where it arrives, separate board clocks work too, with up to
two cycles more latency per line.

## Files

`rtl/`:

| file | role |
|------|------|
| `rpc_pkg.sv` | sizes, register map, `trg_cfg_t`, `ctrl_reg_t`, `reg_status_t`, `board_cfg_t`, header function |
| `rpc_teststand_top.sv` | three boards and their cables |
| `v1495_user.sv` | one board |
| `input_stage.sv`, `bit_counter.sv` | inverter, mask, synchroniser and pulse shaper |
| `scaler_bank.sv` | per-channel counters |
| `plane_trigger.sv` | OR x AND OR y |
| `trig_delay.sv`, `master_trigger.sv` | delays and trigger AND |
| `trg_unit.sv`, `busy_logic.sv`, `global_veto.sv` | trigger acceptance, busy, veto |
| `shift_reg.sv`, `daq_controller.sv` | event building |
| `meb_fifo.sv`, `gray_sync.sv` | dual-clock FIFO |
| `lb_interface.sv` | local bus and registers |
| `sync2.sv` | level synchroniser |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each ends
by printing `TB_RESULT checks=N failures=M`.

`tb_rpc_teststand_top` runs the whole stand at full size with a host model and
a muon model. Its phases are:

- efficiency-trigger events, with masked strips;
- lone test-chamber hits, which the efficiency trigger refuses and the
  auto-trigger accepts;
- inverted inputs;
- filling the master's FIFO to FaF, then a slave's FIFO until its busy vetoes
  the master;
- scaler readback.

It compares every event read back with the strips it fired. It also counts
each mechanism and fails if one never happened. It simulates about 4 ms in a
few seconds.

`tb_hv_scan_run` runs the two long runs of the test programme on the same
top: an HV-scan point of 20000 efficiency-triggered events and an
auto-trigger run of 20000 events. The host reads each board by block transfer
whenever `blt_ready` is set. Every event is checked for header, consecutive
`n_Ev`, increasing timestamp and strip pattern. At the end of each run, the
event-counter registers must read 20000. It simulates about 94 ms in about
30 s.

## Simulating

With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/rpc_pkg.sv tb/tb_rpc_teststand_top.sv --top-module tb_rpc_teststand_top
./obj_dir/Vtb_rpc_teststand_top
```

Any other testbench is built the same way. Put `rtl/rpc_pkg.sv` first, and let
`-y rtl` find the modules. The testbenches give clock periods as plain numbers
in nanoseconds, so keep `--timescale 1ns/1ps`.

## Sizes and what they hold

- 112 channels per board, 320 used in all.
- 4096-word FIFO per board, enough for 682 events.
- `n_Ev` is 24 bits, enough for 16.7 million events, so a run of one million
  events is numbered without wrapping.
- The 32-bit timestamp wraps every 53.7 s at 80 MHz. In long runs, order
  events by `n_Ev`.
- At 320 events/s, 24 bytes per event is 7.7 kB/s per board. The FIFO then
  buffers about 2 s of data.
- The logic itself can take a trigger about every 20 `pll_clk` cycles
  (gate + 4 words + hold-off), far above cosmic-ray rates.

## Departures and open points

These parts are this implementation's own choices, not taken from the
test-stand description:

- the event format;
- the register map and reset values;
- the local-bus handshake timing;
- the OR-accumulation inside the `n_clock` gate;
- the FaF rule (one event of space left);
- the veto hold-off;
- the trigger-configuration encoding;
- the saturating 32-bit scalers;
- the bit order inside port B on the slaves.

Some parts of the stand are not in this RTL:

- The PLL is not included: `pll_clk` is an input of the top.
- The VME bridge FPGA and the host program are outside it; the local-bus pins
  are ports.
- The scintillator coincidence (an OR per plane, then an AND of the three
  planes) is done before the FPGA. It enters as `trgS`.

The original boards were written in VHDL for an Altera Cyclone FPGA, with a
vendor FIFO. Here the FIFO is a portable Gray-pointer FIFO with a registered
read port.
