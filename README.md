# Error-resilient two-processor SoC: protection and fault-emulation RTL

A multiprocessor system built from unreliable logic has to survive soft
errors (particle strikes, transients) and timing errors (a signal that
arrives a cycle late) in three places: the processor data path, the
processor control flow, and the on-chip bus. This RTL adds a cheap,
fast-reacting protection mechanism to each of the three, plus the hardware
needed to emulate the faults on an FPGA and to measure how a real
application (an LTE Turbo decoder running in software) suffers under them:

* **Data path:** every protected pipeline register gets a shadow copy and a
  history copy. A mismatch between main and shadow rolls the pipeline back
  by one step. Each corrected error costs exactly two cycles.
* **Control path:** a checker next to the fetch stage compares each PC with
  its successor against the program's control-flow instruction graph
  (CFIG) and a return-address stack. On a mismatch it makes the core fetch
  the offending instruction again, costing one cycle.
* **Bus:** the AHB data bus is widened to 33 lines. Every memory segment has
  its own protection mode, held Hamming-coded in a mode RAM. EDC units at
  each master and slave apply that mode: parity with retransmission (ARQ),
  repetition with voting, or soft-value codes that *puncture* (zero) a
  damaged decoder input instead of retransmitting it.
* **Fault emulation:** independent LFSRs per line flip or delay signals at
  a rate that can be set at run time.

The idea behind the bus part is that protection should be chosen per data
type. A pointer must be exact, so it gets parity and ARQ. An audio sample
may take an error. Soft inputs of an iterative decoder are already noisy,
so a wrong one is best replaced by "don't know" (zero).

The processor cores (LEON3 class), the AHB arbiter, the memory controller,
the SDRAM, the noise (AWGN) generator and the decoder software are not part
of this RTL. Their connections are ports of the top level, `rp_mpsoc_top`.

## Data path: shadow registers and micro-rollback

`dp_shadow_reg` is one inter-stage register. It holds three registers:

| register | captures | purpose |
|---|---|---|
| main | `d` at every enabled edge | the normal pipeline register |
| shadow | the same `d`, one cycle later | a second, later sample of the same value |
| history | the previous main value | the state to go back to |

A real shadow register samples on a delayed clock. Here that is emulated
with clock enables so that the design stays single-clock. `err` is the
OR-reduced XOR of main and shadow. The fault masks `inj_main` and
`inj_shadow` model a pulse that reaches only one of the two samples.

`dp_pipeline_ctrl` ORs the error flags of all registers and runs the
rollback:

```
cycle t   : some err_vec bit high -> hold = 1 (combinational), nothing advances
cycle t+1 : retry = 1 (registered) -> every register reloads from history,
            q shows the history value
cycle t+2 : normal operation resumes
```

The penalty is therefore always two cycles, wherever the error was. If an
error shows up during the retry cycle, the sequence starts again.
`commit` tells the core's stage logic that the pipeline advanced, and
`rollbacks` counts the recoveries.

`dp_protected_pipeline` chains `NREG` (default 4) such registers with one
controller. The combinational stage logic in between stays in the core: it
enters on `pipe_d` and leaves on `pipe_q`.

## Control flow checking

`cfc_checker` sees two addresses every cycle:

* `pc_n`, the PC in the fetch register;
* `pc_next`, the PC the core's PC multiplexer selected next.

The CFIG memory has one entry per instruction word of the program region
(2^`IDX_W` = 1024 words by default). Each entry holds a 3-bit kind and a
32-bit static target. It is loaded before the program runs, through
`cfig_we/waddr/wkind/wtarget`. The legal successors are:

| kind at `pc_n` | legal `pc_next` | stack |
|---|---|---|
| none | `pc_n + 4` | |
| direct branch | target or `pc_n + 4` | |
| direct jump | target | |
| direct call | target | push `pc_n + 4` |
| indirect call | any | push `pc_n + 4` |
| indirect jump | any (counted as unchecked) | |
| return | top of stack | pop |

**Timing of the table lookup.** The CFIG read is synchronous. To have the
entry ready when the check is made, it is addressed with the PC that will
sit in the fetch register in the next cycle. The address that was read is
kept, so a stale entry (after a stall or reset) is never used: that check
is skipped and counted in `unchecked`.

**Re-execution.** On a violation, `reexec` is raised for one cycle in the
next cycle. `reexec_pc` then carries `pc_n`. The top places a multiplexer in
front of the core's next-PC input (`pc_next = reexec ? reexec_pc :
pc_next_core`), so the instruction with the wrong successor is fetched
again. For a sequential instruction this costs one extra cycle.

The return stack (`cfc_return_stack`, 16 entries) is circular: on overflow
the oldest entry is lost and `stack_overflows` counts it. It is updated
only by instructions that passed their check.

## Protected AHB data bus

### Modes

Each direction of the data bus has 33 lines. The mode of a transfer comes
from the protection-mode RAM (`prot_mode_ram`), indexed by segment
`haddr[31:21]`: 2048 segments of 2 MiB. Each segment's 4-bit mode is stored
as a 7-bit Hamming(7,4) codeword, which is carried with the data phase
(`prot_mode_cw`) and corrected by every EDC unit.

| mode | protection | payload | layout on the 33 lines |
|---|---|---|---|
| 0 | even parity, ARQ | 32 bit | `{parity, data}` |
| 1 | none | 32 bit | `{0, data}` |
| 2 | 3× repetition, majority vote | 11 bit | `{d, d, d}` |
| 3 | sign tripled, vote on sign | 4 × 6-bit soft values | 4 × `{s, s, v[5:0]}` |
| 4 | parity per value, puncture | 4 × 6-bit | 4 × `{^v, v[5:0]}` |
| 5 | sign doubled, puncture | 4 × 6-bit | 4 × `{v[5], v[5:0]}` |
| 6–15 | reserved, sent as mode 1 | | |

* Soft values are 6-bit two's complement, packed at payload bits
  `[6i+5:6i]`.
* Puncturing sets a value whose check fails to 0, the neutral soft value.
* All segments reset to mode 1.
* The mode-field width leaves room for sixteen modes.
* Modes 4 and 5 are the two input codes used in the Turbo-decoder
  experiment.

The Hamming layout is `cw = {m3, m2, m1, p4, m0, p2, p1}`. The syndrome
therefore gives the 1-based position of a single flipped bit
(`edc_pkg::hamming74_*`).

### Phase shifting

Codes catch errors on a few lines. They miss the case where the whole bus
arrives one cycle late, because a late codeword is still a valid codeword.
Every EDC unit therefore keeps a phase bit that toggles every cycle, and
XORs it into bus bit 0 when sending and when receiving. All units toggle in
step. A word that arrives one cycle late is decoded with the opposite phase,
so bit 0 is wrong and the code flags the error.

### ARQ

In mode 0 a parity error leads to a retransmission:

* **Read:** `edc_master` raises `arq` in the same cycle. The interconnect
  routes it to the slave's unit, which holds HREADY low for one cycle and
  drives the word again.
* **Write:** `edc_slave` itself holds HREADY low for one cycle. The master
  keeps HWDATA while HREADY is low.

Each retransmission costs one cycle. At most `ARQ_MAX` = 3 are requested
per data phase. After that, the word is delivered with its `detected`
status bit set.

### Interconnect

`edc_interconnect` takes the arbiter's grant (`hmaster`), so arbitration
itself stays outside. It works as follows:

* It registers the address phase and reads the segment's mode codeword in
  that same cycle, so the codeword is ready for the data phase.
* It multiplexes HWDATA and HRDATA. The master is selected by the owner of
  the data phase, not by the current grant.
* It routes the ARQ to the slave.
* It performs mode-RAM writes that masters request through `mode_set`.
  The master's unit Hamming-encodes the mode before it is written.
* Slave `i` answers addresses whose top four bits are `i`. Unmapped
  addresses complete at once with zero data.

It models a single-beat AHB without bursts, splits or error responses.

## Fault injection

`err_injector` gives every line its own 51-bit LFSR with feedback
x^51 + x^6 + x^3 + x + 1, each starting from a different seed.

* **Rate:** each LFSR advances 16 steps per clock. A line is hit when its
  low 16 bits are below `thr`, so the rate per line and cycle is
  `thr/65536`. Examples: 655 ≈ 1e-2, 66 ≈ 1e-3, 7 ≈ 1e-4.
* **Kind of hit:** a hit either inverts the line or, in delay mode,
  repeats the line's value from the previous cycle (a timing error).

The top instantiates the following injectors:

| target | lines | effect |
|---|---|---|
| each core's protected pipeline | `NREG·W` | main-register input (`inj_dp_*`) |
| each core's next PC | `AW` | PC lines (`inj_cp_*`) |
| HWDATA | 33 | flip or delay (`inj_bus_*`) |
| HRDATA | 33 | flip or delay (`inj_bus_*`) |

## Turbo slave

`ts_turbo_slave` is the hardware side of a Monte-Carlo decoding
experiment. Frames flow through it as follows:

1. A start command makes `ts_data_gen` (PRBS31) produce K = 512
   information bits. These are kept in a source buffer.
2. The bits are encoded by `ts_turbo_enc`, the LTE rate-1/3 turbo encoder:
   * two 8-state RSC encoders (feedback 1+D²+D³, parity 1+D+D³);
   * a QPP interleaver with f1 = 31, f2 = 64;
   * standard trellis termination, K + 4 = 516 output triples, K + 7
     cycles per frame.
3. The triples leave on `chan_bits` for an external noise generator.
4. The returning 6-bit soft values `chan_llr` are stored, one triple per
   bus word.
5. The processors read the soft values over the protected bus (in a soft
   mode such as 3, 4 or 5), decode them, and write the decoded words back.
6. `ts_error_monitor` counts bit and frame errors.

Register map (byte offset inside the slave):

| address | content |
|---|---|
| bit 13 set | soft word n = `addr[12:2]`: `{p2, p1, sys}` in bits 17:0 |
| bits 13:12 = 01 | decoded word n = `addr[11:2]` (write), bit b = information bit 32n+b |
| word 0 | write: bit0 start, bit1 clear statistics; read: bit0 busy, bit1 soft values complete |
| word 1 | seed for the next frame |
| words 2, 3, 4 | frames, bit errors, frame errors |
| word 5 | K |

## Top level

`rp_mpsoc_top` has these parameters:

| parameter | default | meaning |
|---|---|---|
| `NCPU` | 2 | number of cores |
| `NREG` | 4 | protected registers per core |
| `W` | 32 | register width |
| `AW` | 32 | address width |
| `SEG_W` | 11 | segment index width |
| `IDX_W` | 10 | CFIG index width |
| `K` | 512 | Turbo frame length |

Port groups:

* `inj_*`: enable, rate and delay mode of the injectors.
* `pipe_*`: per core, the stage outputs into the protected registers, their
  outputs, and hold, retry and commit. The core must stall on hold and
  redo the stage on retry.
* `pc_*`, `cfc_*`, `cfig_*`: the fetch PC, the core's next PC, the next PC
  after injection and override (which the core loads), re-execution
  strobes, and the CFIG loading port.
* `hmaster`, `m_*`: the grant and each core's plain bus requests and
  payloads, with decode status and counters.
* `mem_*`, `s_*`: the memory controller's side of slave 0, behind its EDC
  unit.
* `chan_*`, `ts_*`: the noise-channel port and the Turbo statistics.

## Simulation

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and has a watchdog.

* `tb_edc_master` and `tb_edc_slave` additionally use the reference
  package `tb/tb_edc_ref.sv`.
* `tb_rp_mpsoc_top` runs the whole system at its default parameters,
  in about a second of wall-clock time. It:
  * loads a CFIG;
  * runs both cores' fetch and pipeline streams under injected faults;
  * performs bus traffic in all modes with bus injection on;
  * runs Turbo frames through a behavioural noiseless BPSK channel.

  It then checks that each mechanism actually occurred: rollback,
  re-execution, read and write ARQ, vote correction, puncturing, mode
  writes, delay faults and a completed frame.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/edc_pkg.sv rtl/cfc_pkg.sv tb/tb_rp_mpsoc_top.sv \
    --top-module tb_rp_mpsoc_top -Mdir obj_top -o sim
./obj_top/sim
```

Any other testbench is built the same way; the packages go first. Modules
are found through `-Irtl`.

## Where this design goes beyond or departs from the source description

These parts are this design's own choices:

* the register counts and widths (`NREG`, `W`);
* the CFIG format and its indexing;
* the return-stack depth and overflow policy;
* the segment size and address-to-slave map;
* the ARQ limit and how ARQ is signalled on AHB;
* the bit layouts of the bus modes;
* the placement of modes 4 and 5;
* the LFSR polynomial and rate resolution;
* the Turbo slave's register map and buffers.

The following departs from the source or is simplified:

* **SPARC delay slots.** The checker treats a branch's successor as
  "target or PC+4".
* **Indirect jumps** are not checked. Returns are checked against the
  stack only.
* **Re-execution cost.** The source quotes five cycles for a wrong return,
  which includes the core's refill. Here only the one-cycle request is
  built; the rest depends on the core.
* **CFIG size.** 1024 × 35 bits = 35,840 bits. That is more than the
  source's 28,880-bit budget, but it is organised per address, so a larger
  program needs a larger `IDX_W`.
* **Evaluation-only modes.** The source mentions bus modes for fault
  campaigns that count the errors a code misses instead of passing them
  on. They are not built. Such a mode needs the fault-free bus word at the
  receiver, which only exists in emulation.
* **Turbo decoder.** The decoder itself is software and is not included.
