# Hardware stuck-at fault testing on a reconfigurable processing unit

Fault simulators such as ATALANTA or FSIM decide in software which stuck-at
faults of a combinational circuit a set of test patterns detects. This design
does that work in hardware. The circuit under test (CUT) is built into the
chip together with a fault-injection multiplexer on every line. A small
controller then walks through every fault and every test pattern and compares
the faulty response with the fault-free one. Each (fault, pattern) pair takes
one clock cycle instead of a software simulation step. A parallel variant
builds one CUT copy per fault and checks every fault against a pattern in a
single clock.

The test logic lives in the hardware blocks (HBs) of a reconfigurable
processing unit (RPU). A soft processor would start the blocks and read back
their results. This RTL contains the RPU with four HBs: the sequential and the
parallel tester, each for two circuits. These are the ISCAS'85 benchmark c17
and the one-bit full adder known as EC13. The processor, its buses and its
peripherals are standard vendor IP and are not part of this RTL. The RPU
brings out a plain start/status/read port where they would connect.

## Fault injection: one multiplexer per line

Each line of the CUT is a primary input or a gate output. Every line is cut
in two and a fault-injection multiplexer (`fim`) is placed in the gap. Gates
read the multiplexer's output, so a fault on a line reaches every gate that
line fans out to. The multiplexer has two select bits:

| select | effect              |
|--------|---------------------|
| 00     | line passes         |
| 01     | line stuck-at-1     |
| 10     | line stuck-at-0     |
| 11     | line passes         |

A CUT with N lines has 2N faults. All select bits together form a one-hot
*fault vector* of 2N+1 bits, with bit k set for fault index k:

* k = 0: no fault. Bit 0 drives nothing, so this is the fault-free run.
* k = 2j-1: line j stuck-at-0.
* k = 2j: line j stuck-at-1.

Shifting the single 1 one position further injects the next fault. That is
all the controller has to do to go from one fault to the next.

Lines are numbered as in a renumbered netlist: the inputs come first, then
the gate outputs.

* c17 (`c17_cut`, 11 lines, 22 faults): lines 1 to 5 are the inputs. The six
  NAND gates are 6=NAND(1,3), 7=NAND(3,4), 8=NAND(2,7), 9=NAND(7,5),
  10=NAND(6,8) and 11=NAND(8,9). The response is {line 10, line 11}.
* EC13 full adder (`ec13_cut`, 8 lines, 16 faults): lines 1 to 3 are a, b and
  c_in. The gates are 4=AND(1,2), 5=XOR(1,2), 6=AND(5,3), 7=XOR(5,3) (the sum)
  and 8=OR(4,6) (the carry). The response is {sum, carry}. Only the full-adder
  function and its fault count are taken from the source. This gate structure
  was chosen because it reproduces every entry of the published EC13 fault
  localisation table.

Patterns are written MSB first: bit N_IN-1 drives input line 1.

## The two test strategies

### Sequential (`seq_hb`, controller `seq_fsm`)

There is one faulty CUT and one fault-free CUT copy. The faults form the
outer loop and the patterns the inner loop:

```
for fault k = 1 .. 2N:          (fault vector = 1 << k)
  for pattern p = 0 .. P-1:     (one clock each)
    compare faulty response with fault-free response; count / log
```

In the clock that evaluates the last pattern of fault k, the controller also
selects fault k+1 and restarts the pattern generator. No cycle is lost
between faults, so a test takes exactly 2N x P cycles. For c17 that is 88
cycles with its 4 deterministic patterns and 1386 cycles with 63 random
patterns. For EC13 it is 80 and 1008.

### Parallel (`par_hb`, controller `par_fsm`)

There are 2N CUT copies, and copy g has fault g+1 fixed in its fault vector.
The vector is a constant, so synthesis folds each multiplexer into a
hard-wired fault. Every copy has its own compressors and comparators. All
copies share one fault-free copy. The controller only steps through the
patterns, one per clock, so a test takes P cycles: 4 and 63 for c17, 5 and
63 for EC13. That is 2N times fewer cycles than the sequential block, and the
cost is 2N times the CUT logic.

## Pattern generation (`tpg`, `ca_rng`)

`mode_i` selects the pattern source when a test starts:

* **Deterministic**: a ROM holds pre-computed test sets, indexed by pattern
  position. For c17 the set is 01111, 11010, 10000, 10101. For EC13 it is
  101, 100, 111, 001, 010. These sets are the ones the published results use.
* **Pseudo-random**: a 16-cell one-dimensional cellular automaton with
  constant-0 boundaries, run for `n_rand_i` patterns. Each cell follows one of
  two rules:
  * rule 90: y_i <= y_{i-1} ^ y_{i+1}
  * rule 150: y_i <= y_{i-1} ^ y_i ^ y_{i+1}

  Rule 150 is used in cells 0, 2 and 4 (`RULE150 = 16'h0015`) and rule 90 in
  the others. With this choice the automaton passes through all 65535
  non-zero states before it repeats. A zero seed is replaced by 1. A CUT
  takes the top N_IN bits of the state. A CUT with more than 16 inputs would
  take the state repeated.

The sequential block replays the same sequence for every fault, because the
automaton is reloaded from `seed_i` at each restart.

## Output evaluation: compressors, comparators, counters, memory

`output_evaluator` holds comparators #1 to #4 of one lane. Comparators #1 to
#3 compare the faulty and fault-free responses after a `compressor` has
reduced each of them to one bit. Comparator #4 compares the responses
directly. The source tailors its compressors to each CUT as zero-aliasing
space compactors, but does not give their logic. This design uses three
generic reductions:

* #1: parity
* #2: AND
* #3: OR

These can miss faults that comparator #4 sees. The counters show how many
(see the table below).

`fault_counters` counts, for each comparator, the number of **distinct**
faults detected. A flag per fault and comparator makes sure each fault is
counted only once, by the first pattern that exposes it. The sequential block
clears the flag when it moves to the next fault. The parallel block keeps one
flag per lane for the whole test. With these rules the c17 deterministic test
credits 9, 6, 2 and 5 faults to its four patterns, and EC13 credits 7, 5, 3,
1 and 0. Both match the published results.

`fault_log_mem` is an append-only RAM with one cycle of read latency. Each
block writes it as follows:

* **Sequential block**: one word per fault, on that fault's first detection
  by comparator #4. The word is {pattern, fault index, faulty response,
  fault-free response}. These are the rows of a fault localisation table:
  which line, stuck-at which value, exposed by which input.
* **Parallel block**: one word per pattern that newly detects at least one
  fault. The word is {pattern, fault-free response, mask}. Mask bit g is
  fault index g+1.

Each block also has a clock counter, which counts the cycles of the test.

## RPU port and register map (`rpu_top`)

| HB | block    | circuit |
|----|----------|---------|
| 0  | `seq_hb` | c17     |
| 1  | `par_hb` | c17     |
| 2  | `seq_hb` | EC13    |
| 3  | `par_hb` | EC13    |

A test runs as follows:

1. Set `mode_i`, `n_rand_i` and `seed_i`.
2. Pulse one or more `start_i` bits for one clock. Blocks may run at the same
   time.
3. Wait for the `done_o` bits.
4. Read the results: put the block number on `rd_hb_i` and the address on
   `rd_addr_i`. The word appears on `rd_data_o` one clock later.

| address | content                                            |
|---------|----------------------------------------------------|
| 0x00    | {done, busy}                                       |
| 0x01-04 | counters #1-#4: faults detected per comparator     |
| 0x05    | test length in clock cycles                        |
| 0x06    | number of fault-memory words                       |
| 0x80+i  | fault-memory word i (zero-extended to 32 bits)     |

For c17 the fault-memory words are 14 bits wide in the sequential block and
29 bits wide in the parallel block. All flip-flops use an asynchronous
active-low reset `rst_n`.

## Results

Simulation reproduces these figures from the published hardware runs:

| test                          | seq. cycles | par. cycles | faults detected |
|-------------------------------|-------------|-------------|-----------------|
| c17, 4 deterministic patterns | 88          | 4           | 22 of 22        |
| c17, 63 random patterns       | 1386        | 63          | 22 of 22*       |
| EC13, 5 deterministic         | 80          | 5           | 16 of 16        |
| EC13, 63 random               | 1008        | 63          | 16 of 16*       |

\* With the seeds used in the testbenches. The source does not give the
automaton's rule assignment or its seed, so the random patterns differ from
the published ones. The cycle counts do not depend on them.

The c17 and EC13 deterministic fault memories hold the same (pattern, line,
stuck-at value, responses) rows as the published localisation tables.

With the generic compressors, counters #1 to #3 (parity, AND, OR) reach
16, 16 and 15 of 22 in the c17 deterministic test and 14, 12 and 7 of 16
for EC13. For example, parity cannot see a fault that flips both outputs at
once. In the 63-pattern random tests with seed 0xB5A3 they reach 22, 22, 22
for c17 and 16, 14, 16 for EC13. Counter #4 reaches full coverage in all
four tests.

## Where this RTL departs from the source or fills gaps

* The compressors are generic reductions, not the CUT-specific zero-aliasing
  compactors of the original work.
* The ruleset of the automaton (which cells use rule 150) and the 16-cell
  width are this design's. The width matches the 16-bit repetition visible in
  the published c432 random patterns.
* The source names the second rule "rule 160". Its formula (the XOR of both
  neighbours and the cell itself) is rule 150, and the formula is what is
  built.
* One source sentence sizes the parallel scheme as n x m x 2 CUT copies,
  where m is the number of patterns. The block diagram and the measured cycle
  counts show one copy per fault (2n), and 2n is what is built.
* The fault-free responses come from a fault-free CUT copy, not from a stored
  table of "fault-free signatures". This works for any pattern source. The
  parallel block's diagram draws one such table per faulty copy. Here all
  copies share one fault-free CUT, which gives the same comparison with less
  logic.
* The block diagram does not show which comparator's result is written to
  the fault memory. This design logs detections by comparator #4, the
  uncompressed one, so the log is the exact localisation table.
* Lines carry the renumbered indices 1 to 11 used in the localisation
  tables, not the original ISCAS node numbers (1, 2, 3, 6, 7, 10, 11, 16,
  19, 22, 23).
* The source does not specify these, and they are this design's own choices:
  * the fault-memory word layout
  * the single-pattern-per-clock timing of the controllers, which the
    published cycle counts imply
  * the register map
  * the reset
* Not included:
  * the EC37 and c432 circuits, whose netlists are not available. c432, with
    36 inputs, would also need wider pattern and log buses than `bist_pkg`
    provides.
  * the MicroBlaze processor, OPB buses and bridge, Fast Simplex Links,
    memories, UART, GPIO, interrupt controller, timer and the run-time
    reconfiguration port. These are vendor IP.

## Adding a circuit

1. Write `<name>_cut.sv` following `c17_cut`. Take pre-multiplexer and
   post-multiplexer nets, put one `fim` per line on select bits (2j-1, 2j),
   and make gates read the post-multiplexer nets.
2. Add an enum value and its sizes and deterministic patterns to `bist_pkg`.
3. Add a branch to `cut_fim`.

The blocks size their counters, fault vector and memory from the package
functions. `compressor` and `output_evaluator` take any output width.

## Simulating

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. `tb/bist_ref_pkg.sv` holds the
reference models. These are line-by-line fault simulators of c17 and EC13, a
shift-based model of the automaton, and a function that works out the
expected counts and fault-memory words of a whole test session. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rpu_top \
  -y rtl -y tb +libext+.sv rtl/bist_pkg.sv tb/bist_ref_pkg.sv tb/tb_rpu_top.sv
./obj_dir/Vtb_rpu_top
```

`tb_rpu_top` runs all four blocks at the default parameters through the
register port, in deterministic and then pseudo-random mode. It checks every
counter, cycle count and fault-memory word. It also counts how often each
mechanism occurred: both pattern modes, concurrent blocks, detections,
compressor misses, memory reads and the parallel speed-up.

`tb_seq_hb` and `tb_par_hb` test one block type for both circuits.
`tb_published_tables` compares the fault memory of the deterministic
sequential tests with the published c17 and EC13 localisation tables, row by
row.

## Files

| file | content |
|------|---------|
| `rtl/bist_pkg.sv` | CUT enum, sizes, deterministic pattern ROM |
| `rtl/fim.sv` | fault-injection multiplexer |
| `rtl/c17_cut.sv`, `rtl/ec13_cut.sv` | circuits with one FIM per line |
| `rtl/cut_fim.sv` | circuit selection; also the fault-free copy |
| `rtl/ca_rng.sv`, `rtl/tpg.sv` | automaton and test pattern generator |
| `rtl/compressor.sv`, `rtl/output_evaluator.sv` | compressors and comparators #1-#4 |
| `rtl/fault_counters.sv`, `rtl/fault_log_mem.sv` | counters #1-#4, fault memory |
| `rtl/seq_fsm.sv`, `rtl/seq_hb.sv` | sequential tester |
| `rtl/par_fsm.sv`, `rtl/par_hb.sv` | parallel tester |
| `rtl/rpu_top.sv` | RPU with four hardware blocks |
