# Hybrid memory logic BIST

A built-in self-test for a small embedded RAM. It does not stop at pass or
fail: it also repairs the memory's output. Pseudo-random words are written
to pseudo-random addresses and read back. Each word read is compared bit by
bit with a fault-free reference copy. Bits found stuck at 0 or stuck at 1
are logged, and from then on they are replaced by the reference bits. The
memory plus this repair logic make up the "hybrid memory". Its corrected
output is compressed into a signature, and `bist_out` stays high (pass)
while every faulty word has been repaired. `bist_out` falls for good as soon
as a faulty word cannot be repaired.

An *activity factor* sets how often a new test pattern reaches the memory.
This bounds the switching activity, and so the power, of the test.

```
          +-----------+   +---------------+   +-------------+   +---------+
 LFSR-1 ->|           |   |               |-->| RAM under   |-->| space   |--> sa0/sa1/err
 LFSR-2 ->|  p1 PRPG  |-->| p3 scan_path  |   | test (c1)   |   | compar- |
 LFSR-3 ->|           | ^ | activity      |-->| reference   |-->| ator s1 |
          +-----------+ | | factor,       |   | copy (r1)   |   +---------+
             p2 phase --+ | MUX-1..3 regs |   +-------------+        |
             shifter      +---------------+        | raw, ref        v
                                                   +------> h1 self-healing --> data_out
                                                                   |
                                         m1 MISR(corrected) m2 MISR(reference)
                                                        \      /
                                                      u6 TRA (flip-flop) --> bist_out
```

## Top-level pins (`bist_controller`)

| pin | dir | width | function |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | active-high, synchronous; everything that is read is cleared |
| `enable`, `pc` | in | 1 each | the test runs only while both are high |
| `load` | in | 1 | takes `af_amount` as the activity factor; no pattern is issued in a load cycle |
| `af_amount` | in | 16 | activity factor value |
| `af_red_inc` | in | 1 | 1: increased activity, a pattern every cycle. 0: reduced activity, one pattern every `af_amount`+1 cycles |
| `up_down` | in | 1 | count direction of the idle counter (1 up, 0 down) in reduced mode |
| `bist_out` | out | 1 | 1 pass, 0 fail; 0 during and after reset until the first signatures are compared |
| `data_out` | out | 16 | corrected read data |
| `fault_det`, `sa0_det`, `sa1_det` | out | 1 each | sticky: a mismatch was seen, with a stuck-at-0 / stuck-at-1 symptom |
| `repair_ovf` | out | 1 | sticky: a faulty word found the repair table full |

The first nine pins, 24 bits in all, are the interface of the original
design. `data_out` and the four flags are added here so that detection and
repair can be observed from outside.

## Pattern generation: three LFSRs that never repeat within a period

`prpg` holds three Fibonacci LFSRs (`lfsr`). The stages shift from
X(n-1) towards X0. The XOR of X0 and the tapped stages is fed back into
X(n-1).

* **LFSR-1**, 16 bits, gives the write data. The feedback is X0^X2^X3^X5,
  which gives the maximal period 65535. The seed is `16'hACE1`.
* **LFSR-2**, 4 bits, gives the write address. The feedback is X0^X1, with
  the de Bruijn correction: the feedback is inverted when X3..X1 are all 0.
  With the correction the sequence covers all 16 addresses, 0 included,
  once every 16 patterns.
* **LFSR-3** is identical to LFSR-2 and gives the read address. The test
  controller holds it back for `READ_LAG` patterns (default 1). After that
  it steps together with the other two. The read address is therefore
  always the write address of `READ_LAG` patterns earlier. Every read
  checks a word that has really been written, and no valid bits are needed.

The LFSRs advance only when a pattern is issued. Cycles without a pattern
consume no pattern, so none is skipped or repeated. `phase_shifter`
decorrelates neighbouring LFSR bits with `out = in ^ (in >> 3)`. This map is
invertible, so distinct LFSR states stay distinct words.

## Activity factor (`scan_path`)

This stage decides, cycle by cycle, whether the memory sees a new access.

* `af` is a 16-bit register. It loads `af_amount` while `load=1` and is
  cleared by reset.
* In reduced mode (`af_red_inc=0`) an idle counter runs between 0 and `af`.
  Counting up (`up_down=1`), it issues a pattern when it reaches `af`, then
  restarts at 0. Counting down, it issues a pattern at 0 and restarts at
  `af`. Either way a pattern is issued every `af`+1 cycles. Changing the
  direction only shifts the phase of the next pattern.
* In increased mode (`af_red_inc=1`) a pattern is issued on every running
  cycle.
* On a pattern cycle (`tick`) the three MUX registers (MUX-1 data, MUX-2
  write address, MUX-3 read address) take the new LFSR values, and the
  write strobe is set. The read strobe is set too once the read lag has
  elapsed. On every other cycle the registers keep their value and both
  strobes are low, so the memory inputs do not toggle.

The names `af_red_inc`, `up_down`, `load`, `af_amount` and `pc` come from
the original interface. Only loose pin descriptions exist for them. The
exact semantics above (a mode pin, an idle counter, run = enable AND pc)
are this implementation's reading of those descriptions.

## Memory under test and coded faults (`cut_ram`, `ref_data`)

`cut_ram` is a 16 x 16 array with one synchronous write port and one
asynchronous read port. Stuck-at faults are part of the model. The
`FAULTS` parameter is a list of up to four `hml_pkg::fault_t` records:
`{kind: FAULT_SA0 | FAULT_SA1 | FAULT_NONE, addr, mask}`. When a matching
word is written, the masked bits are forced to 0 or 1. The default list is
empty. `ref_data` is a fault-free array with the same ports. It receives
exactly the same writes and reads, and supplies the expected word.

## Detection and repair (`space_comparator`, `self_healing_scan_cell`)

The comparator gives three vectors:

* `err_vec = raw ^ ref`
* `sa0_vec = err_vec & ref`: the bit should be 1 but reads 0
* `sa1_vec = err_vec & raw`: the bit reads 1 but should be 0

`mismatch` is the OR of `err_vec`. All outputs are zero when no read is
being compared. The test controller turns the three into the sticky flags
`fault_det`, `sa0_det` and `sa1_det`.

The self-healing cell keeps a table of `REPAIR_ENTRIES` (default 4) records
`{addr, mask}`. On a read with errors, one of three things happens:

* If the address is already logged, the new bits are ORed into its mask.
* Otherwise, if a record is free, it is allocated.
* Otherwise `repair_ovf` is set.

The corrected word is `(raw & ~fix) | (ref & fix)`, where `fix` is the
logged mask plus the bits of the current read. A faulty word is therefore
already corrected on the read that discovers it. A word that could not be
logged goes out uncorrected.

## Pass/fail

MISR `m1` compresses the corrected read stream and MISR `m2` the reference
stream. Both use the LFSR feedback above. The response analyser `u6`
compares the two signatures one cycle after each read, and its flip-flop
drives `bist_out` directly. The result depends on the faults:

* A fault-free memory passes.
* A memory whose faults all fit in the repair table passes, with
  `fault_det` set.
* Any uncorrected word makes the signatures differ. The MISR never brings
  them back together in practice, so the failure is latched.

## Timing

Take a pattern issued in cycle t (`tick` is high):

* Cycle t+1: the memory request is in the MUX registers. The write happens
  at the end of t+1. The read (of the word from pattern t-`READ_LAG`), the
  comparison and the correction are combinational in t+1. The repair table
  and the MISRs update at the end of t+1.
* Cycle t+3: `bist_out` shows the result.

`READ_LAG` must be at least 1: a read in the same pattern as its write
would see the old word.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `bist_controller` | `DATA_W` | 16 | word width, same as `af_amount` |
| | `ADDR_W` | 4 | 16-word memory (an assumption of this implementation) |
| | `AF_W` | 16 | activity factor width |
| | `READ_LAG` | 1 | patterns between writing a word and reading it back |
| | `REPAIR_ENTRIES` | 4 | faulty words the repair can hold |
| | `FAULTS` | none | injected stuck-at faults |

The LFSR taps and seeds are parameters of `prpg`, `lfsr` and `misr`. To
change `DATA_W` or `ADDR_W`, give taps that are maximal for the new width.
The MUX registers carry a `mem_req_t` sized for up to 32-bit data and
16-bit addresses; the unused upper bits are constant zero.

## How far this follows the original design

Taken from the original description:

* the three LFSRs and what each generates;
* the activity-factor MUXes in front of the RAM;
* the reference data and the space comparator, with its use for telling
  stuck-at-0 from stuck-at-1;
* faults coded into the memory model;
* the correction of faulty data;
* the block names PRPG, phase shifter, scan path, self-healing scan cell,
  MISR, TRA and space comparator, and their instance names;
* the pin names and `bist_out` polarity;
* a flip-flop driving `bist_out`.

Choices of this implementation, where the description is silent:

* the memory size;
* polynomials and seeds;
* the read-lag scheme and the de Bruijn address sequence;
* the exact activity-factor semantics;
* the contents of the phase shifter, which is only named. It is
  combinational here; the original shows clock, enable and reset pins on
  it.
* the repair table and bit substitution, and its size;
* the MISR structure, and the use of two MISRs where one is drawn;
* the extra status outputs.

Other departures:

* The original draws the memory-side block as a "CUT" with `load` and
  `up_down` pins. Here the RAM is the circuit under test, and those pins
  act in the activity-factor stage.
* The original taps the reference data before the MUXes. Here it is taken
  after them, so the RAM and the reference see the same accesses.

Not implemented, because the description names them without saying what
they do:

* a bit-swapping LFSR;
* a "modified" MISR;
* an isolation circuit feeding an s27 benchmark circuit;
* a BCD multiplier.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert --top-module tb_bist_controller \
  -y rtl -y tb +libext+.sv -Irtl rtl/hml_pkg.sv tb/tb_bist_controller.sv
./obj_dir/Vtb_bist_controller
```

* `tb_bist_controller` runs four copies side by side: fault-free,
  repairable faults, a repair table too small, and a read lag of 3.
  It checks every read
  against an independent model of the pattern generator, the pattern
  spacing in each activity mode, the `bist_out` latency and the final
  flags.
* `tb_bist_controller_full` is one complete test at the default
  parameters. It loads `af_amount=10`, reads back all 16 words, runs a
  reduced-activity period and expects a pass.

To inject faults, override `FAULTS` on `bist_controller` as in
`tb_bist_controller`. The simulator used here is two-state: the memory
arrays start with arbitrary contents, which is harmless because no word is
read before it is written.
