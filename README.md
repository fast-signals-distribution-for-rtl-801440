# Fast signal distribution for a calorimeter test module

A test module of a calorimeter needs five timing signals at every one of its front-end boards:

| Signal | What it is |
|---|---|
| CLK | the 40.08 MHz machine clock |
| L1accept | the first-level trigger |
| BCR | bunch-counter reset, one pulse every 3564 clock cycles |
| Init | a synchronous reset, always coincident with a BCR |
| Calib | the pulse that fires the calibration injector |

The same clock edge must reach every board, so each output has a programmable fine delay. The trigger has to be clean: pulses at least three cycles apart, with no trigger that clashes with a calibration.

This RTL builds the three VME modules that do the job and wires them into one system:

- **PDG (programmable delay generator).** Makes or selects the clock, the trigger and the BCR. It drives eight bundles (CLK, L1accept, BCR), each with a 12-bit fine delay in 50 ps steps.
- **PDC (programmable delay for calibration).** Takes the external triggers, masks them, runs calibration sequences and delays the trigger by a whole number of cycles. It produces the Init window and drives six bundles (Calib, Init). Its trigger output feeds the PDG's external trigger input. Its own clock and BCR come from PDG output 1.
- **Fan-out.** Up to seven modules. Each one merges one PDG bundle with one PDC bundle into eight five-signal front-end bundles. Every output has its own 3-bit delay in 2.5 ns steps and its own Calib enable.

At full size the system serves 56 front-end outputs: seven Fan-outs of eight outputs each. Fan-out 7 gets no PDC bundle, so it delivers no Calib or Init. That suits the receivers that need neither.

## Signal path and timing conventions

Every pulse is one clock cycle long. A module launches its pulses on the rising edge of its clock, and that rising edge is the reference edge. A pulse and the clock that travel with it change together. Sampling the pulse on the same rising edge would therefore be a race. Each receiver (the PDC for BCR, the Fan-out for L1accept and BCR) instead captures incoming pulses on the **falling** edge, half a cycle after launch, and re-launches them on the next rising edge. As a result each module adds one cycle of latency to L1accept and BCR.

Calib is not re-timed in the Fan-out. It goes from the PDC output through the per-output enable, and no fine delay is applied to it.

## PDC: triggers, dead time and the calibration sequence

**Trigger inputs** (`pdc_trigger_logic`).
- Trig1 and Trig2 are asynchronous. Each passes through a two-flop synchroniser and a rising-edge detector, which gives ±½ cycle of jitter.
- Each input has a 2-bit mode:

  | Mode | Effect |
  |---|---|
  | `00` | ignored |
  | `01` | physics L1accept |
  | `11` | starts a calibration sequence |
  | `10` | reserved, treated as `00` |

- A physics trigger is dropped in two cases:
  - it falls within 2 cycles after the previous L1accept (dead time), so accepted pulses are always ≥ 3 cycles apart;
  - a calibration veto is active.

**Calibration sequence** (`calib_sequencer`). It is requested by VME (bit 24 of register 00) or by a trigger input in mode 11. Time is counted in cycles from the start of the sequence:

| Output | Timing |
|---|---|
| Calib | rises at count L4 and lasts L2 × 16 cycles (L2 × 400 ns) |
| veto | covers counts L3 … L3 + 2·L1, i.e. 2·L1 + 1 cycles |
| calibration L1accept | one cycle at count L3 + L1, the middle of the veto |

- Each L1 step therefore widens the veto by 25 ns on both sides of the L1accept.
- The sequence is busy until both Calib and the veto have ended. A request that arrives while it is busy waits: the VME request bit stays set until the sequence starts, and then clears itself.
- The calibration L1accept is OR-ed with the accepted physics triggers. The result goes through the **large delay** (`l1a_delay_line`, 0 … 255 whole cycles, set by DLY).

Time from the rising edge of Calib to the L1accept at the PDC output: (DLY + L3 + L1 − L4) cycles. The front-end needs this number, and the system testbench checks it.

**Init** (`init_generator`).
- Triggered by a VME write of bit 28 of register 00.
- The PDC follows the BCR phase of its own clock bundle. It opens an 18-cycle (450 ns) window that starts 11 cycles before its next expected BCR.
- Each Fan-out turns the window into a single Init pulse: the BCR that falls inside the window. This guarantees that Init always comes with a BCR.
- Why 11 cycles: the window is placed so that the relative clock skew among Fan-outs (PDG fine delays of 0 to about 205 ns) keeps every Fan-out's BCR inside it. A Fan-out's BCR is inside when the difference between its PDG channel delay and the PDC's PDG channel delay lies in [−225 ns, +225 ns).

How the Init window is positioned is this design's own choice; the source only says that the Fan-out processes Init.

## PDG: sources and fine delays

**Control register `MUX`** (4 bits) selects the sources:

| Bits | Selects |
|---|---|
| `[1:0]` | trigger: 00 = internal 100 Hz, 01 = internal 100 kHz, 11 = external, 10 = none |
| `[2]` | external BCR |
| `[3]` | external clock |

- At reset `MUX` takes the front-panel thumbwheel value.
- The registers run on the internal oscillator clock. The MUX bits reach the selected clock through two flops.
- The internal trigger divides the clock: 400 800 cycles for 100 Hz and 401 cycles for 100 kHz (99.95 kHz). These dividers are this design's choice.
- The internal BCR comes from a free-running counter over 0 … 3563.
- The external trigger is sampled by a single flop on the undelayed clock. The external BCR is synchronised and edge-detected.

**Fine delays** (`prog_delay_line`).
- In hardware these are analog delay chips. In this RTL they are a behavioural transport-delay model, using code × step picoseconds:
  - PDG: 12-bit code, 50 ps steps, up to 204.75 ns;
  - Fan-out: 3-bit code, 2.5 ns steps, up to 17.5 ns.
- The model keeps up to 64 edges in flight, so a delay longer than the clock period still reproduces every edge.
- The model is not synthesisable as a delay. A real implementation would replace it with the delay part.

## VME access

Every module is an A32/D32 slave (`vme_slave`). It answers address modifiers 0x0E, 0x0D, 0x0A and 0x09.

Address = `XX000M00 + offset`:
- `XX` is a rotary switch shared by the whole system.
- `M` picks the module: 0 = PDG, 1–7 = Fan-out number (its Y switch), 8 = PDC.

Cycle timing:
- AS* and DS* are synchronised with two flops.
- A register write or read happens one cycle after the access is recognised.
- DTACK* goes low about 4 module clocks after DS*, and is released when DS* rises.
- Modules that are not selected drive zero read data. In the system, read data are OR-ed and DTACK* lines AND-ed.
- Only single 32-bit transfers are supported.

| Module | Offset | Bits |
|---|---|---|
| PDG | 00 | `[19:16]` MUX, `[11:0]` DLY1 |
| PDG | 04, 08, 0C, 10 | `[27:16]` DLY2/4/6/8, `[11:0]` DLY3/5/7 (offset 4·k holds DLY2k in the high half and DLY2k+1 in the low half) |
| Fan-out | 00 | `[23:16]` Calib enable for outputs 1–8, `[2:0]` DLY1 |
| Fan-out | 04 … 10 | `[18:16]` DLY even, `[2:0]` DLY odd (same pairing as the PDG) |
| PDC | 00 | `[28]` Init request, `[24]` calibration request, `[19:18]` Mode2, `[17:16]` Mode1, `[7:0]` DLY |
| PDC | 04 | `[19:16]` L1, `[7:0]` L2 |
| PDC | 08 | `[21:16]` L3, `[5:0]` L4 |

The PDC request bits read back as 1 while they are pending.

## Files

`rtl/`
- `fsd_pkg.sv` holds the shared constants, bundle structs and mode enums.
- `fsd_system.sv` is the top level. Parameters: `N_FANOUT` (1..7, default 7), `BCR_PER`, `DIV_SLOW`, `DIV_FAST`, `INIT_LEAD`.
- `pdg.sv`, `pdc.sv` and `fanout.sv` are the modules.
- `bcr_generator`, `int_trigger_gen`, `calib_sequencer`, `pdc_trigger_logic`, `l1a_delay_line`, `init_generator`, `prog_delay_line`, `vme_slave` and `sync_edge` are their parts.

`tb/`
- Each `tb_<block>.sv` is a self-checking test that prints `TB_RESULT checks=… failures=…`.
- `vme_master.sv` is a behavioural bus master used by the VME tests.
- `tb_fsd_system.sv` runs the full-size system (seven Fan-outs, default parameters):
  - a physics trigger and a dead-time drop;
  - a VME calibration with a trigger inside the veto;
  - a Trig2 calibration;
  - two Inits, one with the PDC's clock channel at maximum delay;
  - a switch to the 100 kHz internal trigger.

  It checks:
  - pulse counts on all 56 outputs;
  - the BCR period;
  - Init/BCR coincidence;
  - the Calib enables;
  - fine-delay offsets;
  - the Calib-to-L1accept spacing.

  Each mechanism must occur at least once. The test takes about 2.5 minutes to build and 1 minute to run.
- `tb_fsd_small.sv` runs the same operation on the smallest system (one Fan-out, 8 outputs) in a few seconds.

To simulate one test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fsd_pkg.sv tb/tb_fsd_system.sv --top-module tb_fsd_system -o sim
./obj_dir/sim
```

`-y` lets Verilator find every other module by its file name; only the package is listed. The same command with another `tb_<block>` runs a block test. Tests must pass with any power-up state; `+verilator+rand+reset+2` on the simulator command line randomises it.

## Where this design departs from or fills in the source specification

- **Init placement.** The placement (the window leads the BCR by 11 cycles) and the Fan-out's "BCR inside the window" rule are this design's own choices.
- **Calib width.** One passage gives 400 ns … 6.5 µs, another an 8-bit field of 400 ns units (up to about 100 µs). The 8-bit field is implemented. L2 = 0 gives no Calib.
- **L1accept delay.** The range is 0 … 255 cycles (8-bit field), although one sentence speaks of "up to 256".
- **Mode and MUX codes.** Mode code 10 and trigger-select code 10 are unused.
- **Synchronisers and reset.**
  - Synchroniser depths, VME handshake timing, reset values and the internal-trigger dividers are chosen here.
  - PDG delays reset to zero.
  - The PDC does not open an Init window until it has seen its first BCR.
- **Electrical side.** Signal levels (ECL, PECL, NIM), galvanic isolation, the oscillator, the cables and the front-panel switches are outside the RTL. Clocks, switch settings and logic-level signals are ports.
- **Fine delays.** They are behavioural models, so synthesis of `prog_delay_line` gives no delay.
