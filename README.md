# One merger module for every job: the CP/JEP merger layer of a Level-1 calorimeter trigger

A calorimeter trigger of this kind has two processor subsystems:

- The **Cluster Processor (CP)** finds electron/photon and tau/hadron clusters. It has 4 crates of 14 CPMs.
- The **Jet/Energy-sum Processor (JEP)** finds jets and sums transverse energy. It has 2 crates of 16 JEMs.

Every processor module reports a small summary each 25 ns bunch crossing. For each of 8 thresholds it sends how many objects passed, as 3 bits clipped at 7. A JEM also sends its Et, Ex and Ey sums. These summaries must be merged twice:

1. within each crate;
2. across the crates of a subsystem.

The results go to the Central Trigger Processor (CTP).

This RTL merges them all with **one** board design, the Common Merger Module (CMM). Three things make that possible:

- **Equal widths everywhere.** Each processor module sends one 25-bit word over the backplane. That is 400 links for 16 JEMs and 350 for 14 CPMs. Each cable between crates is also 25 bits.
- **Compressed energies.** A JEM's 12-bit Et, Ex and Ey sums are cut to 8 bits each: 6 data bits and 2 scale bits meaning ×1, ×4, ×16 or ×64. So an energy word has the same 24 data bits as a hit-count word.
- **Both levels on every board.** Each CMM holds crate-level and system-level logic. Its geographical address (crate and slot) decides which function it runs and whether it is the system-level board.

`l1calo_merger_system` is the top. It instantiates twelve identical `cmm`s, two per crate, and wires their cables the way the two subsystems need. Its inputs are:

- the CPMs' 350-link backplane words;
- the jet JEMs' 400-link words;
- for the energy CMMs, the JEMs' uncompressed 12-bit Et, Ex and Ey sums. The top encodes each sum to 8 bits, as a JEM's output stage does (`jem_energy_encoder`).

Its outputs are the four CTP words and a VME-- bus per crate.

## Module types and where they sit

| crate | slot 3 (A) | slot 20 (B) | role |
|---|---|---|---|
| 0 | e/γ | τ/hadron | CP **system** level: sums crates 0–3 |
| 1–3 | e/γ | τ/hadron | CP crate level: cable to crate 0 |
| 4 | jet | energy | JEP **system** level: sums crates 4–5 |
| 5 | jet | energy | JEP crate level: cable to crate 4 |

`cmm_config` decodes this. The slot numbers and the choice of system crates are parameters, and this design's own choice. In the CP, the slot-B module is the one whose 8 threshold sets can each be e/γ or τ/hadron. Its merging logic is the same hit counting.

## Data path of one CMM

```
backplane 16x25 ─► backplane_rx ─► crate_hit_merge ────┐
  (rise/fall capture, parity)  └─► crate_energy_merge ─┴► crate result 2x(24+parity)
                                                          ├─► cable_out (to the system CMM)
                                                          └─► pipeline_delay (local path)
cable_in 3x25 ──► cable_rx (2 registers, parity) ─────────┐            │
                                                          ▼            ▼
                             system_hit_merge ─► jet_et_estimator     system_energy_merge
                                      └────────────── ctp_out (32 bits, system level only)
VME-- ─► vme_slave ─► registers, missing-Et LUT
```

Every CMM has all of the function logic. The decoded type picks which results reach `cable_out` and `ctp_out`. A crate-level CMM drives `ctp_out` to zero. In hardware the same effect comes from loading a different FPGA configuration.

### Hit counting (e/γ, τ/hadron, jet)

- **Crate level:** per threshold, add the 3-bit numbers of the enabled modules (14 or 16) and clip at 7.
- **System level:** add the local crate and up to three remote crates (4 in the CP, 2 in the JEP) and clip at 7 again.

The jet system CMM also forms an **approximate total jet Et**. It takes Σ (jets above threshold *t*) × (value of threshold *t*) and compares the result with four jet-Et thresholds. The threshold values and jet-Et thresholds are registers.

### Energy summing

**Crate level:** each JEM code is expanded by a left shift of 0, 2, 4 or 6 bits, then summed. Et is unsigned; Ex and Ey are two's complement. Each crate sum is 16 bits. Together the three make the 48-bit crate result:

- cable 0 = {Ex[7:0], Et}
- cable 1 = {Ey, Ex[15:8]}

**System level:** the local and remote crate sums are added into 17-bit totals. Then:

- **Total Et** is compared with four thresholds. A hit means strictly greater.
- **Missing Et** goes through a 16k × 8 look-up table. |Ex| and |Ey| are both shifted right by the smallest common amount (0, 2, 4 or 6 bits) that makes each fit in 6 bits. The LUT address is then {scale, |Ex|>>2s, |Ey|>>2s}. Bit *i* of the entry is the missing-Et hit for threshold *i*. The contents are loaded over VME--, so any threshold shape can be programmed. The testbenches load bit *i* = ((mx·4^s)² + (my·4^s)² > T_i²).
- **Overflow:** if either component is too big for the ×64 scale (magnitude ≥ 4096), all eight missing-Et hits are set.

The LUT is 128 kbit. The original System FPGA had 96 RAM blocks of 4 kbit, and this needs 32 of them.

### Re-timing, latency alignment and timing

**Backplane.** Each source module's word can be captured on the rising or the falling edge (`REG_PHASE`, one bit per module), whichever is clear of its data transitions. The falling-edge copy gets one extra register, so both choices have the same latency.

**Cables.** Each cable word passes two registers.

**Local path.** On a system-level CMM, the local crate result reaches the system logic without crossing a cable. So it is held back by a programmable 0–15 clock delay (`REG_CTRL[3:0]`), which makes the local and remote inputs belong to the same bunch crossing. With no extra cable delay the two paths differ by 3 clocks, and 3 is the reset value. More cable delay means adding the same number of clocks to this register. `tb_cmm` tests this with 2 extra clocks.

**Latency** (40 MHz clock, data valid before rising edge *n*):

| output | valid after edge |
|---|---|
| crate result on `cable_out` | *n*+3 |
| CTP word (with the default delay) | *n*+8 |

A new result is produced every clock. The top adds no latency: its JEM encoders are combinational.

### Parity and error flags

- The 25th bit of every backplane word and every cable word is odd parity over the other 24.
- Errors are recorded in sticky flags: `REG_BP_ERR` has one bit per module, `REG_CABLE_ERR` one bit per cable. Writing a 1 clears a bit.
- Only enabled modules, and cables actually in use, set a flag.
- Data with a parity error is still used.

## VME-- access

The crate backplane carries only A24/D16 cycles on SYSRESET*, A[23:1], D[15:0], DS0*, WRITE* and DTACK*.

`vme_slave` works as follows:

- It synchronises DS0*.
- It selects the board when A[23:16] equals the slot number.
- It does one register access.
- It drives DTACK* low until DS0* is released. Read data is driven only during the acknowledge, so several boards can share the bus.

Register map (byte addresses within the board):

| address | register |
|---|---|
| 0x0000 | type: {valid, is_jep, is_system, func[1:0]} (func 0 e/γ, 1 τ, 2 jet, 3 energy) |
| 0x0002 | [3:0] local delay (reset 3), [11:8] crate enable (reset all) |
| 0x0004 | backplane capture edge per module (1 = falling) |
| 0x0006 / 0x0008 | backplane / cable parity error flags, write 1 to clear |
| 0x000A | module enable (reset all; CP boards ignore 14 and 15) |
| 0x000C | status: crate sum clipped, system sum clipped, missing-Et overflow |
| 0x000E | jet-Et estimate |
| 0x0010–0x0016 | total-Et thresholds 0–3 (reset 0xFFFF) |
| 0x0020–0x002E | jet threshold values 0–7 (8 bits) |
| 0x0030–0x0036 | jet-Et thresholds 0–3 |
| 0x0040 / 0x0042 / 0x0044 | system Et / Ex / Ey [15:0] |
| 0x8000–0xFFFE | missing-Et LUT, word *a* = entry *a*, data [7:0] |

## Files

| file | role |
|---|---|
| `rtl/cmm_pkg.sv` | widths, module-type enum, crate-sum struct, register map, parity and decode functions |
| `rtl/l1calo_merger_system.sv` | top: 12 CMMs and the cable routing |
| `rtl/cmm.sv` | one Common Merger Module |
| `rtl/cmm_config.sv` | geographical address → module type |
| `rtl/backplane_rx.sv`, `rtl/cable_rx.sv` | re-timing and parity checking |
| `rtl/crate_hit_merge.sv`, `rtl/crate_energy_merge.sv` | crate merging |
| `rtl/pipeline_delay.sv` | local-path latency matching |
| `rtl/system_hit_merge.sv`, `rtl/system_energy_merge.sv`, `rtl/jet_et_estimator.sv` | system merging |
| `rtl/vme_slave.sv` | VME-- slave |
| `rtl/jem_energy_encoder.sv` | the 12→8-bit energy code, as a JEM produces it; used in the top to feed the energy CMMs |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ref_pkg.sv` | reference model used by the CMM and system testbenches |
| `tb/vme_master.sv` | behavioural VME-- master |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends a hung run with a failure. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/cmm_pkg.sv tb/tb_ref_pkg.sv tb/tb_l1calo_merger_system.sv --top-module tb_l1calo_merger_system
./obj_dir/Vtb_l1calo_merger_system
```

Testbenches that do not use `tb_ref_pkg` need only `rtl/cmm_pkg.sv` ahead of the testbench file.

`tb_l1calo_merger_system` runs the whole system at its default size: 6 crates and 12 CMMs, with 350 links into each CP CMM, 400 into each jet CMM, and 16 JEMs' worth of encoders in front of each energy CMM. It takes seconds. It:

- feeds random 12-bit JEM energy sums through the encoders, so that the reference also checks what the compression keeps;
- reads every board's type over VME--;
- loads the LUT and thresholds;
- switches one crate-level board to falling-edge capture and drives that board's data so that only the falling edge sees valid data;
- runs 400 bunch crossings of random data and compares all four CTP words with a reference model;
- checks that a planted parity error is flagged and can be cleared.

It counts how often each mechanism fires: crate and system clipping, JEM sums that lose low bits to the compression, falling-edge capture, Et and missing-Et hits, missing-Et overflow and jet-Et hits. A mechanism that never fires fails the run.

`tb_cmm` runs four CMMs set to four different types. The testbench plays the remote crates. It also re-programs the local delay and the crate enables part-way through.

## How far to trust it, and where it is this design's own

All blocks simulate against independent reference models. The whole design passes Verilator's `-Wall` lint with only unused-signal and unused-parameter warnings, and elaborates with Yosys/slang. The assertions in `vme_slave` use the reset in `disable iff`, which Verilator reports as a reset used both synchronously and asynchronously; the flip-flops themselves use it only as an asynchronous reset.

These sizes and functions come from the design being modelled:

- 400/350 backplane links, 8 threshold sets, 3-bit multiplicities clipped at 7, 14/16 modules per crate, 4/2 crates;
- the 6+2-bit energy code with ×1/4/16/64 scaling, decoded by shifting;
- 50 local bits and 75 remote bits at the system logic, and a pipeline delay on the local path;
- 4 total-Et and 8 missing-Et thresholds, missing Et by look-up table;
- the jet-Et estimate;
- the VME-- signal set;
- choosing the type by geographical address.

These are choices made here:

- the parity bit on each 25-bit word, and how the two edge choices and cable registers re-time data;
- bit packing inside words, the CTP word format, the register map and the reset values;
- the slot numbers and system crates;
- the LUT address format and its overflow rule;
- strictly-greater threshold tests;
- four jet-Et thresholds;
- truncation (not rounding) in the energy code;
- two's complement data fields for Ex and Ey.

Known departures and omissions:

- **Total Et uses comparators.** The design it follows applies the total-Et thresholds with look-up tables too. Four comparators give the same hits for plain thresholds.
- **One netlist instead of reconfiguration.** All functions are in one netlist, chosen by the address. The original reloads one of eight FPGA configurations from on-board flash at power-up.
- **Not modelled:**
  - event-data and region-of-interest readout, and readout control (their formats are not defined here);
  - the configuration flash;
  - the physical LVDS links;
  - the VME64 adapter card;
  - CANbus monitoring;
  - the timing-control module and readout driver.
- **Proposed extensions not built:** counting forward jets separately, and a noise-suppressed total Et. Their input formats are not defined.
- **Clock domains:** every board and cable runs on one 40 MHz clock in simulation. The cable registers stand in for re-timing across crates. They are not a proven synchroniser.
