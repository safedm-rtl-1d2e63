# SafeDM: a diversity monitor for redundant cores that are not lockstepped

Safety standards for the most critical functions (ISO 26262 ASIL-D, for example)
require redundant execution with *diversity*. A single fault, such as a voltage
droop, may strike two redundant cores at once. If both cores are in exactly the
same electrical state at that moment, they can fail in exactly the same way, and
the comparison of their results will not see it. Classic dual-core lockstep avoids
this by running a shadow core a few cycles behind. That costs a whole core, and
most high-performance cores do not offer it.

This design takes another route. Two ordinary cores run the same task
independently. A small monitor watches both of them and tells software, cycle by
cycle, whether they are in the same state. It never stalls or slows either core.
In practice the cores drift apart on their own, because shared buses, caches and
OS services serialise them, and because replicated processes use different
addresses. The monitor supplies the evidence that this drift really happens, and
it raises an interrupt when it does not.

The monitor can report a false positive: it may flag a loss of diversity when
some source of diversity it does not observe is present. It cannot report a
false negative. If either signature differs, the cores really are doing
different work.

## How "the same state" is decided

Each core's state is condensed into two signatures, which are compared between
the cores every cycle.

**Data signature (DS).** Every value the pipeline operates on is read from, or
written to, the register file. Values that travel through bypasses are written
back too. So the monitor keeps, for each observed register-file port, a shift
register of what that port carried in each of the last `DS_DEPTH` cycles
(`reg_port_fifo`). DS is the concatenation of these windows over all ports:

    DS = P0[t-1] P0[t-2] ... P0[t-n]  P1[t-1] ...  P3[t-n]

Each entry is `{enable, value}`, and the value is zeroed when the port is idle.
The window advances every cycle, not only when the port is used. This matters.
Two cores that read the same registers in the same order, but at different
cycles, are diverse. A record that ignored timing would call them equal.

**Instruction signature (IS).** The monitor needs to know which instructions
are in flight, and in which pipeline stage each one is. The target core is
in-order and dual-issue with 7 stages, and the instructions of one stage move on
together. So `instr_fifo` rebuilds the pipeline occupancy from two things: the
group fetched each cycle, and the core's stall (`hold`) signal. A fetched group
enters stage 1. On every non-held cycle each stage hands its group to the next,
and the group in stage 7 retires. Each slot holds `{valid, encoding}`. Because a
slot's position in IS is its stage, two cores with the same instruction in
different stages have different signatures.

**Decision.** `DataDiversity = DS0 != DS1` and `InstructionDiversity = IS0 != IS1`
(see `signature_compare`). A cycle *lacks diversity* only when **both** are
false. While the core's `hold` is high, its FIFOs keep their contents, so a
stalled pipeline keeps its signature.

At the default size, DS is 4 ports × 5 cycles × 65 bits = 1300 bits, and IS is
7 stages × 2 slots × 33 bits = 462 bits per core. Each comparison is one wide XOR
followed by an OR reduction, with a register after it.

## Reporting

`diversity_monitor` counts, while enabled:

- cycles without diversity (both signatures equal);
- cycles with equal data signatures;
- cycles with equal instruction signatures.

Software picks one of three ways to be told about a loss of diversity:

| mode | `CTRL[2:1]` | behaviour |
|---|---|---|
| poll | 0 | no interrupt; software reads the count when it wants |
| first | 1 | interrupt on the first cycle without diversity |
| threshold | 2 | interrupt once the count since the last clear reaches `THRESHOLD` |

The interrupt is a level. It stays high until software writes 1 to `STATUS[0]`.
A threshold of 0 behaves like 1. Counters saturate and are zeroed by writing
`CLEAR`.

A safety concept can treat a reported loss of diversity like a detected error,
for example by dropping that job of the task. False positives are rare, so this
is affordable.

## Measurement aids

Two more blocks help characterise a platform. They are not needed to detect a
loss of diversity, and can be left out of a deployment.

- **Instruction diff** (`instruction_diff`): a signed counter. It goes up by
  core 0's committed instructions and down by core 1's, so it gives the
  staggering between two identical instruction streams. It also counts the
  cycles in which that distance is zero.
- **History** (`history_module`, one instance for DS and one for IS): a
  histogram of *episodes*. An episode is a run of consecutive cycles with equal
  signatures. A run of length L goes into bin `min((L-1)/BIN_SIZE, NBINS-1)`,
  and the last bin collects all longer runs. The bin is tracked with a small
  counter while the run lasts, so no divider is needed. A run is recorded in the
  cycle after it ends.

Zero staggering does not by itself mean a loss of diversity. Cores at the same
instruction count can hold their instructions in different stages, or work on
different addresses. The two counts are kept apart for that reason.

## Structure

```
safedm_top
├── signature_generator  ×2 (one per core)
│   ├── reg_port_fifo    ×NPORTS   -> DS
│   └── instr_fifo                 -> IS
├── signature_compare    ×2 (DS, IS)
├── diversity_monitor           counters, modes, interrupt
├── instruction_diff            staggering
├── history_module       ×2 (DS, IS)
└── safedm_apb                  APB register file (the only bus-specific block)
```

`safedm_pkg` holds the default sizes, the mode enum and the register map.

### Timing

A core sample presented in cycle t enters the FIFOs at the edge that ends cycle
t. The comparison of the new signatures is registered at the next edge. The
counters, the histograms and the interrupt then update at the edge after that.
So a state is counted two cycles after the core was in it. `instruction_diff`
counts commits at the edge that samples them.

### Connecting to a core

Per core, the monitor needs these signals, all sampled on the rising clock:

| port | width (default) | meaning |
|---|---|---|
| `hold[c]` | 1 | pipeline stalled this cycle |
| `rp_en[c][p]`, `rp_data[c][p]` | 4 × (1 + 64) | enable and value of each observed register-file port |
| `fetch_valid[c][s]`, `fetch_instr[c][s]` | 2 × (1 + 32) | the group entering stage 1 this cycle |
| `commit[c]` | 2 | instructions retired this cycle (instruction diff only) |

Which four ports to observe depends on the core. The source integration taps
four register-file ports of a 64-bit dual-issue core and treats them alike.

## Register map (APB, 32-bit, byte addresses)

The slave follows the AMBA 2.0 APB: a setup phase, then an access phase, with
no wait states and no error response. Read data is driven while `PSEL` is high.
Writes take effect at the access phase.

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | RW | [0] enable, [2:1] mode (reset 0) |
| 0x04 | STATUS | R / W1C | [0] interrupt (write 1 to clear), [1] DS differ, [2] IS differ, [3] lack of diversity now |
| 0x08 | THRESHOLD | RW | interrupt threshold for mode 2 (reset 1) |
| 0x0C | NODIV_CNT | R | cycles without diversity |
| 0x10 | DATA_EQ | R | cycles with equal DS |
| 0x14 | INSTR_EQ | R | cycles with equal IS |
| 0x18 | STAGGER | R | signed committed-instruction distance (core 0 − core 1) |
| 0x1C | ZERO_STAG | R | cycles with zero distance |
| 0x20 | BIN_SIZE | RW | histogram bin width in cycles (reset 1, 0 acts as 1) |
| 0x24 | CLEAR | W | bit 0: zero all counters and histograms |
| 0x40–0x7C | HIST_DATA[i] | R | DS episode histogram, bin i |
| 0x80–0xBC | HIST_INSTR[i] | R | IS episode histogram, bin i |

Unmapped addresses read 0 and ignore writes. Turning the monitor off (CTRL[0] = 0)
freezes every counter and closes any open episode. The signature FIFOs keep
running.

## Parameters

| parameter | default | origin |
|---|---|---|
| `XLEN` | 64 | the target cores are 64-bit RISC-V |
| `NPORTS` | 4 | four observed register-file ports, as in the source integration |
| `DS_DEPTH` | 5 | own choice: register read (stage 3) to write-back (stage 7); the source leaves n to the implementation |
| `ILEN` | 32 | RISC-V base instruction width (own choice) |
| `IWIDTH` | 2 | dual issue |
| `NSTAGES` | 7 | 7-stage pipeline |
| `CNT_W` | 32 | own choice |
| `NBINS` | 8 | own choice (up to 16 are readable) |
| `BIN_W` | 16 | own choice |

At the defaults the monitor has about 4,300 flip-flops. Most are the 2 × 1300 DS
bits and the 2 × 462 IS bits.

## What follows the source and what is this design's own

These follow the source:

- the two signatures, sampled every cycle;
- the per-stage instruction record for an in-order pipeline whose stages advance as a group;
- the use of `hold` to freeze the FIFOs;
- the "both must match" rule;
- the three reporting modes;
- the up/down instruction counter;
- the histogram with configurable bins;
- the placement behind an APB slave.

These are this design's own choices:

- **Port entries** carry the enable bit and a zeroed value when idle.
- **Pipeline model**: the stage record is built from the fetch group and
  `hold`. Wrong-path instructions killed by a branch flush are not removed from
  it. On a core that flushes often, IS shows the fetched sequence rather than
  the exact stage occupancy. Both cores are recorded the same way, and the
  data signature is not affected.
- **Latency**: the comparison has a register stage, so a state is judged two
  cycles late.
- **Registers**: the register map, the reset values, the sticky interrupt with
  write-1-to-clear, saturating counters, and the zero-staggering counter.
- **Histogram**: binning of episode lengths with one common width and an overflow bin.
- **Bus**: 32-bit APB data.

Not included: the cores, caches, AHB bus and APB bridge of the platform the
monitor sits in. The top brings the core observation signals and the APB out as
ports.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block with a
reference model written independently in the testbench, and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `tb_reg_port_fifo` | random traffic and stalls against an array model of the window |
| `tb_instr_fifo` | random fetch groups and stalls; a group stays exactly `NSTAGES` cycles |
| `tb_signature_generator` | DS and IS bit layout against a reference built from arrays |
| `tb_signature_compare` | single-bit differences (including the end bits); one-cycle latency |
| `tb_diversity_monitor` | all three modes, clears, the exact cycle on which the threshold interrupt fires |
| `tb_instruction_diff` | positive, negative and zero distance; zero-distance count |
| `tb_history_module` | run lengths up to overflow, bin sizes 0–3, enable drops, clears |
| `tb_safedm_apb` | every register, reset values, one-cycle clear pulses, unmapped addresses |
| `tb_safedm_top` | end to end, at the default size |

The system-level testbenches share a small environment, `safedm_env`. It
contains the monitor and these behavioural helpers:

- `core_pipe_model`: a model of the signals a dual-issue 7-stage core presents.
  It runs a looping program, with an optional nop prologue for staggering,
  random stalls, fetch bubbles, an address-space offset, and load misses.
- `shared_bus_model`: one shared bus that serves the cores' misses one at a time.
- `apb_master_bfm`: an APB master.
- `safedm_ref_model`: a reference that keeps its own signature histories and
  derives every counter, histogram and the interrupt from them.

The two system-level testbenches are:

- `tb_safedm_top` runs the monitor at its default size through eight phases:
  - identical lockstep execution (first-loss interrupt);
  - separate address spaces (data diversity only);
  - staggered starts in both directions with stalls (poll and threshold modes);
  - a threshold interrupt after 200 cycles;
  - poll mode;
  - a nop prologue with fetch bubbles (instruction diversity only);
  - a simultaneous start that the shared bus pulls apart.

  It checks the interrupt pin every cycle and every register after each phase.
  It also fails unless each of these mechanisms occurred at least once: stall,
  lack of diversity, data-only and instruction-only diversity, both interrupt
  modes, interrupt clear, a quiet poll mode, histogram overflow, positive and
  negative staggering, clear, and a bus conflict.
- `tb_stagger_workload` repeats the staggering experiment with a synthetic
  program. One core starts 0, 100, 1,000 or 10,000 nops late, each way round.
  The testbench prints, per setting, the zero-distance cycles and the cycles
  without diversity. A typical result:

  ```
  staggering   zero-staggering cycles   cycles without diversity
      0 nops                     2916                       2916
    100 nops                       87                          0
   1000 nops                        1                          0
  10000 nops                        1                          0
  ```

  With no staggering, the cores stay identical until their first cache misses
  collide on the bus. From then on they stay apart. Staggered runs never lose
  diversity, although the distance passes through zero now and then. Nops
  count as committed instructions, so the distance is not the number of nops.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_safedm_top rtl/safedm_pkg.sv tb/tb_safedm_top.sv
./obj_dir/Vtb_safedm_top
```

Replace `tb_safedm_top` with any other testbench name. The end-to-end test takes
a few seconds. The RTL lints with `verilator --lint-only -Wall`. The only
warnings are unused package constants and a note that the reset is used both
asynchronously (by the flip-flops) and synchronously (by the `disable iff` of
the APB protocol assertions). It elaborates and synthesises in Yosys through
its slang front end.
