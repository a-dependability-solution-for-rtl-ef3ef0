# Run-time self-test of a homogeneous multiprocessor: Dependability Manager RTL

A chip with nine identical processor tiles needs only some of them for its
application. The spare tiles make it possible to test the others in the field
without stopping the application: software moves the load off a group of three
tiles, a small on-chip **Dependability Manager (DM)** runs a deterministic
structural (scan) test on all three at once, and compares their answers with each
other. Identical tiles that receive identical stimuli must return identical
responses, so no reference responses and no signature registers are stored on chip:
the tile whose responses disagree with the other two is the faulty one. The DM
reports it, and the resource-management software takes that tile out of service.

This repository holds synthesizable SystemVerilog for that test infrastructure:

* the DM, made of a test pattern generator (LFSR with reseeding or bit flipping, plus
  a phase shifter), a
  test response evaluator (majority vote) and a controller with a command register;
* an IEEE 1500 style dependability wrapper around each tile, which switches the tile
  between normal operation, manufacturing test, run-time scan test and memory BIST;
* a top level, `rfd_dep`, with one DM and nine wrapped tiles.

The processor tiles themselves, the on-chip network and the host processor that
sends commands are not part of the RTL; their connections are ports of the top level.

## How one test runs

```
 host writes command ──► dm_fsm ──► serial load of wrapper instruction (3 bits)
                                    + update pulse to the selected tiles only
                           │
                           ├── memory BIST: start pulse, wait for done/fail
                           │
                           └── scan test:   dm_tpg ──flit (32 b)──► 3 wrappers ──► 3 tiles' scan chains
                                                                       │
                                            dm_tre ◄──3 response flits─┘
                           │
                           └── wrappers back to normal, report word to the host
```

1. **Command.** A 32-bit word selects an operation and a set of tiles (layout below).
2. **Wrapper configuration.** The DM shifts the 3-bit instruction into the wrapper
   instruction registers over a shared serial line and then pulses `update_wr` only
   for the selected tiles. Tiles not selected keep their instruction, so they keep
   running the application.
3. **Memory BIST** (operations `MBIST` and `FULL`). The DM pulses the start of each
   selected tile's embedded memory BIST and waits until all report done. A tile that
   reports a failure, or has not finished after `MBIST_TIMEOUT` cycles, is a memory
   fault. Done flags are ignored in the first cycle after the start pulse, so a flag
   still high from an earlier run cannot end the wait. A `FULL` test stops here if it
   found one.
4. **Scan test** (operations `SCAN` and `FULL`). Each tile has 32 parallel scan chains
   of 398 flops, so one flit of 32 bits shifts every chain by one position. For each of
   413 test vectors the generator sends 398 flits, then a one-cycle capture strobe. The
   bits that fall out of the chains while a vector shifts in are the responses to the
   previous vector; they return in the same cycle and go to the evaluator. A final
   pass of 398 zero flits unloads the response to the last vector. The responses
   unloaded during the first vector are whatever the chains held before and are not
   evaluated.
5. **Report.** The wrappers return to normal mode and the DM presents a report word
   for one cycle on `rpt_valid`.

### Timing

With the network granting every cycle (`tam_ready` high), a scan test takes
(413 + 1) × 398 shift cycles + 413 capture cycles = 165,185 cycles in the generator,
and 165,196 cycles from command to report. At the intended 200 MHz that is 0.83 ms
per group of three tiles, 2.5 ms for all nine tiles in three groups. When
`tam_ready` is low the generator simply waits; no flit is lost and the test gets
longer in proportion. Memory BIST time is set by the tiles' BIST engines.

## The vote and its limits (`dm_tre`)

For every evaluated flit the evaluator forms the bitwise majority of the three
responses and sets a sticky flag for each tile whose flit differs from it. At the end
of the test:

* no flag: the three tiles agree, all are taken as fault-free;
* one flag: that tile is faulty (`core_fault`, its bit in `faulty_tiles`);
* two or more flags: the vote could not single out one tile (`ERR_NO_MAJORITY`); the
  flagged tiles are still listed.

The scheme rests on the assumption that at most one tile of a group became faulty
since the previous test. If two tiles develop *the same* fault, they outvote the good
tile and the good tile is reported. The end-to-end testbench shows both cases: two
different faults give `ERR_NO_MAJORITY`; two identical injected faults would not.

The evaluator needs all responses of a flit in the same cycle. That holds in this
top level, where the tiles are wired directly to the DM; behind a real network, with
different latencies per tile, small per-tile buffers would be needed in front of it.

## Test pattern generation (`dm_tpg`, `dm_lfsr`, `dm_phase_shifter`, `dm_bitflip`)

The scan stimuli are not stored. Each test vector is the expansion of a 64-bit seed:
the LFSR is loaded with the vector's seed and stepped once per flit; the phase
shifter turns each LFSR state into a 32-bit flit, output bit *i* being the XOR of
stages *i*, (3*i*+7) mod 64 and (5*i*+14) mod 64, so that neighbouring scan chains do
not receive shifted copies of one sequence. The LFSR polynomial is
x^64 + x^63 + x^61 + x^60 + 1.

**What the seeds are.** In a real DM the seeds are solved from the tile's ATPG test
patterns, so that the expanded vectors reproduce the care bits of the deterministic
test. That pattern set is not available here. `seed_of()` in `dm_tpg.sv` stands in for
the seed ROM: seed *v* is three xorshift(13, 7, 17) rounds of
`64'h9E3779B97F4A7C15 ^ v`. The generator therefore behaves exactly like the real one
(timing, flit format, reseeding, unload) but its stimuli have no particular fault
coverage. To use the RTL for a real core, replace `seed_of()` with a ROM of seeds
computed for that core's scan patterns; nothing else changes.

**Bit flipping instead of reseeding.** With the parameter `BIT_FLIP = 1` (on `dm_tpg`,
`dm` and `rfd_dep`) the generator uses the other common way of embedding
deterministic patterns: the LFSR is seeded once at the start of the test and runs on
through all vectors, and `dm_bitflip` watches its state. Each of its 16 entries holds
a 12-bit match value and a flit bit; whenever the low 12 bits of the LFSR state equal
an entry's value, that bit of the current flit is inverted. Timing and flit format are
unchanged. As with the seeds, the entries (entry *e* matches the low bits of a
xorshift of *e*+1 and flips bit (7*e*+3) mod 32) are placeholders for values that
would be computed from the core's test patterns. Reseeding is the default.

## Command and report words (`dm_pkg`)

Command (`dm_cmd_t`):

| bits  | field  | meaning |
|-------|--------|---------|
| 31    | start  | must be 1, otherwise the write is ignored |
| 30:29 | op     | 0 memory BIST, 1 scan test, 2 full (BIST then scan), 3 reserved |
| 28:20 | tiles  | bit 20 = tile 1 … bit 28 = tile 9 |
| 19:0  | —      | ignored |

A scan or full test needs exactly three tiles; memory BIST accepts one to nine. With
this layout `32'h9600_0000` means "memory BIST on tiles 6, 7 and 9". Commands written
while the DM is busy are ignored.

Report (`dm_report_t`):

| bits  | field        | meaning |
|-------|--------------|---------|
| 31    | done         | always 1 in a presented report |
| 30    | is_error     | the test could not give a verdict |
| 29:28 | err          | 0 none, 1 no majority, 2 bad tile selection, 3 reserved opcode |
| 27    | core_fault   | the scan test flagged a tile |
| 26    | mem_fault    | a memory BIST failed or timed out |
| 25:17 | faulty_tiles | bit 17 = tile 1 … |
| 16:14 | faulty_duts  | flags of the group, bit 16 = lowest-numbered selected tile |
| 13:5  | tested_tiles | copy of the command's tile mask |
| 4:0   | —            | zero |

For example a scan test of tiles 1, 6, 7 in which tile 7 is faulty returns
`32'h8880_4C20`: core fault, tile 7, third device of the group (`faulty_duts` = 001).

## The dependability wrapper (`xe_wrapper`)

| instruction | code | scan chains connected to | functional ports |
|-------------|------|--------------------------|------------------|
| `WIR_NORMAL` | 000 (reset) | nothing (idle) | core ↔ network |
| `WIR_MFG`    | 001 | test pins `ate_*` | isolated |
| `WIR_DEP`    | 010 | DM flits in, responses out | isolated |
| `WIR_MBIST`  | 011 | nothing; BIST start/done/fail pass through | isolated |

The instruction register is loaded serially: with `select_wir` and `shift_wr` high,
`wsi` is shifted in least significant bit first, three clocks; `update_wr` then makes
it the active instruction. With `select_wir` low, `shift_wr` shifts `wsi` through a
one-bit bypass register to `wso`. In `WIR_DEP` a flit accepted from the DM
(`tam_valid`) shifts the chains and the bits shifted out are returned on `resp_flit`
in the same cycle (combinational path through the wrapper).

Fault injection for experiments: `fi_core` forces bit 0 of the scan response and of
the functional output to 1 (stuck-at-1); `fi_mem` forces the memory BIST to fail.

## Top level (`rfd_dep`)

One DM and nine wrappers. Ports, all per tile where indexed `[9]`:

* `cmd_valid`, `cmd_data`, `busy`, `rpt_valid`, `rpt_data` — DM control register and report;
* `tam_ready` — grant for the DM's test traffic (low = the network is busy);
* `tm`, `tm_wsi`, `tm_select_wir`, `tm_shift_wr`, `tm_update_wr` — chip test pins that take
  over the serial wrapper port while `tm` is high (the only way into manufacturing mode);
* `noc_in_*`, `noc_out_*` — functional traffic of each tile;
* `ate_se`, `ate_capture`, `ate_si`, `ate_so` — manufacturing scan pins of each tile;
* `fi_core`, `fi_mem` — fault injection;
* `core_*` — the connection to each processor core: functional data, `core_se`,
  `core_capture`, `core_si`/`core_so` (32 chains), memory BIST start/done/fail;
* `mode`, `wso` — observation.

The on-chip network that carries test traffic in the real device is replaced by direct
wires: flits are multicast to the three selected wrappers and the responses come back
in the same cycle, which is what a guaranteed-throughput multicast connection at full
bandwidth provides. A shared network is modelled only through `tam_ready`.

Parameters (all modules take the same names): `CHAIN_LEN` = 398 flits per vector,
`N_VECTORS` = 413, `LFSR_LEN` = 64, `MBIST_TIMEOUT` = 65536 cycles. Tile count (9),
group size (3) and flit width (32) are constants in `dm_pkg`, because the command and
report layouts depend on them. All registers reset asynchronously on `rst_n` low.

## Where this RTL departs from the original design

Taken from the published design: nine tiles with 32 scan chains each; three tiles
tested at a time and compared by majority vote; 413 vectors of 398 32-bit flits; a
TPG of LFSR, reseeding and phase shifter; a TRE; an FSM driven by 32-bit command words
that also starts and checks the tiles' memory BIST; the test flow (configure wrappers,
memory BIST, scan test, flag faulty tile); IEEE 1500 wrappers with normal,
manufacturing and dependability modes and fault injection; a 32-bit, 200 MHz network
as test access.

This design's own choices: LFSR length and polynomial, phase-shifter taps, the seed
function and bit-flip entries standing in for real ones, the choice of reseeding as
default, command and report bit layouts (chosen so that
`0x9600_0000` is a three-tile memory-BIST command), the error codes, the BIST timeout,
the wrapper instruction codes and the separate memory-BIST instruction, the
fault-injection effect, the direct-wire replacement for the network and the
test-pin path into manufacturing mode.

Not included: the processor tiles, the network routers, the host processor and its
software, the SRAM tiles and their BIST, and the clock PLL. The original chip needed about 32.7 µs per
vector at 100 MHz when measured through its network (about 3,270 cycles for 398 flits);
this RTL, with its direct connection, needs 399 cycles per vector.

## Simulating

Every module is in `rtl/<module>.sv`; `dm_pkg.sv` must be read first. Each testbench
`tb/tb_<module>.sv` is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. `tb/xe_core_model.sv` is a behavioural model of a
processor tile (scan chains with a nonlinear capture function, a memory BIST that
finishes after a set delay, and a functional path that returns each word plus one); it
can be given a real stuck-at defect with its `STUCK_CHAIN` parameter.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rfd_dep \
          -y rtl -y tb +libext+.sv -Irtl rtl/dm_pkg.sv tb/tb_rfd_dep.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_dm_lfsr` | LFSR against a bit-level reference; load, step, priority |
| `tb_dm_phase_shifter` | tap formula on 2000 states |
| `tb_dm_tpg` | full-size generator: every flit against a reference, flit/capture counts, exact cycle count, random stalls |
| `tb_dm_bitflip` | bit-flip decoder against a reference; generator in bit-flipping mode, flit by flit |
| `tb_dm_tre` | vote with 0, 1, 2 corrupted tiles; gating by `check`/`valid` |
| `tb_xe_wrapper` | all instructions loaded serially, every output in every mode, bypass, fault injection |
| `tb_dm_fsm` | command decoding, wrapper load sequence, reports for every outcome, busy handling |
| `tb_dm` | DM with nine tile models, one with a real defect; multicast, cycle count |
| `tb_rfd_dep` | whole top, reduced sizes: BIST pass/fail/timeout, scan with injected fault under stalls, no majority, full flow, manufacturing mode, functional traffic on untested tiles throughout |
| `tb_rfd_nine_tiles` | full size: all nine tiles in three groups while the other six carry traffic, fault on tile 5 found in group 2; 495,588 cycles = 2.48 ms at 200 MHz; about 30 s |
| `tb_rfd_dep_full` | whole top at full size: fault-free scan test of tiles 1, 6, 7 in 165,196 cycles, then a full test naming tile 7; about 30 s in Verilator |

All testbenches except `tb_rfd_dep_full`, `tb_rfd_nine_tiles` and `tb_dm_tpg` override the scan sizes to stay short; the
logic does not depend on the sizes beyond counter widths.
