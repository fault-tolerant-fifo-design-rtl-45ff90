# Fault-tolerant FIFO for a NoC router, with a two-gate TMR voter

A router in a network-on-chip keeps incoming flits in FIFO buffers. As
transistors shrink, those buffers pick up permanent and transient faults. This
design hardens one such FIFO in two ways:

1. **Triple modular redundancy (TMR).** Three identical FIFO channels run in
   lock-step, and every output bit is decided by a majority voter. The voter is
   the cheap part of the idea. It uses one XOR gate and one 2:1 multiplexer per
   bit, where the classic majority gate uses three ANDs and an OR.
2. **Transparent online memory test.** Each channel can test its own storage in
   the field with the transparent SOA-MATS++ march test. The test finds stuck-at
   cells without losing the words the FIFO holds. It reports which copy, which
   location and which bits are faulty.

The voter hides a single faulty copy from the router. The memory test shows
which copy is faulty.

## The voter (`ft_voter`)

For each bit:

    S = A xor B
    V = S ? C : B

| A, B agree? | S | V | why it is the majority |
|---|---|---|---|
| yes | 0 | B | A = B, so two of three already agree |
| no  | 1 | C | one of A, B is wrong, so C sides with the correct one |

The truth table of V equals the two-out-of-three majority on all eight input
combinations. So `ft_voter` is a drop-in majority voter, and its testbench
checks it against `a&b | a&c | b&c`.

Single-fault behaviour:

- **Copy C wrong.** A = B, S = 0, and B is passed on.
- **Copy A or B wrong.** S = 1, and C (which is correct) is passed on.
- **The voter's own node S stuck at 0 or 1.** While the copies agree
  (A = B = C), both multiplexer inputs carry the same value, so V is still right.
  This is where the structure is better than a plain majority gate: its only
  internal node cannot corrupt the output on its own.

A double fault is not covered. Two faulty copies, or a stuck S together with a
faulty copy, give a wrong output. This is the usual TMR limit.

`WIDTH` repeats the one-bit voter across a bus. `tmr_fifo` uses a single
11-bit instance for all voted signals.

## The transparent SOA-MATS++ test (`soa_mats_tester`)

The test visits the locations `i = 0 .. DEPTH-1` in order. Each location gets
three runs of one clock cycle each. `temp` is the word read in that cycle, and
`original` is a register.

| run | read | check | write |
|---|---|---|---|
| 0, invert  | `temp = lut[i]`, `original = temp` | none | `lut[i] = ~temp` |
| 1, restore | `temp = lut[i]` | `temp ^ original` must be all 1s | `lut[i] = ~temp` |
| 2, read    | `temp = lut[i]` | `temp ^ original` must be all 0s | none |

After run 1 the location holds its original word again, so the FIFO's content
survives the test. A 0 in the run-1 result, or a 1 in the run-2 result, marks a
faulty bit.

**Worked example** (4-bit word; also a directed case in `tb_soa_mats_tester`).
The cell holds `1010`, and its MSB develops a stuck-at-1 fault.

- Run 0 writes `0101`, but the cell stores `1101`.
- Run 1 reads `1101`. XORed with `1010` this gives `0111`. The MSB should be 1,
  so the fault is found there.

**Why run 2 is needed.** Suppose the stuck value equals the inverted word,
for example stuck-at-0 on a bit that holds 1. Run 0's write happens to store
the right value, so run 1 sees nothing wrong. Only the final read shows the
error. The fault test of this block removes the run-2 check and shows that such
faults then escape.

**Timing.** A one-cycle `start` while idle makes `busy` high for exactly
`3*DEPTH` cycles, starting on the next cycle. `done` then pulses for one cycle.

**Report.** `fault`, `fault_bits` and `fault_addr` describe the most recent
test:
- `fault_bits` is the OR of all deviating bits.
- `fault_addr` is the first faulty location.

A faulty location cannot store `~temp`, so its word may have changed after the
test. Every other location keeps its word.

## One FIFO channel (`fifo_channel`, `fifo_mem`)

This is the module that TMR triplicates. It is a circular buffer with a write
pointer, a read pointer and an occupancy counter. It is built around a
`DEPTH x WIDTH` array (`fifo_mem`) with a synchronous write and an asynchronous
read. The tester shares the array's ports.

Handshake (identical for the channel and the top):

- `rd_data` shows the head word whenever `empty` is low. This is first-word
  fall-through: `rd_en` drops the head word at the clock edge.
- `wr_en` stores `wr_data` at the edge unless `full` is high. A write while
  full is dropped.
- A read while empty is ignored. A read and a write may happen in the same
  cycle.
- `test_start` hands the array to the tester. While `test_busy` is high:
  - `wr_en` and `rd_en` are ignored;
  - `rd_data` is not valid;
  - `full`, `empty` and `count` keep their values.

  Afterwards the FIFO carries on where it stopped.
- An assertion in `fifo_channel` checks that the occupancy never exceeds
  `DEPTH`.

**Fault model.** The `sa_*` inputs of `fifo_mem` model a stuck-at fault that
appears in the field. While `sa_en` is high, every write to `sa_addr` stores
`sa_value` in the bits set in `sa_mask`. The cell keeps its previous content
until it is next written. This is the behaviour the worked example above
assumes. The test is meant for stuck-at, transition and read-disturb faults,
but the hook models only stuck-at cells. The ports are a fault-injection hook
for simulation. In a real build, tie `sa_en` to 0 and the rest to constants.

## The top (`tmr_fifo`)

The three `fifo_channel` copies (A, B, C) share all inputs, including
`test_start` and the `sa_*` fault-model inputs. Only `sa_en` is separate for
each copy.

**Voted outputs:** `rd_data`, `full`, `empty`, `count`, `test_busy` and
`test_done` go through `ft_voter`.

**Per-copy outputs:** `test_fault[k]`, `test_fault_bits[k]` and
`test_fault_addr[k]` are not voted, on purpose. Voting them would hide exactly
the copy that needs attention. A controller can use them to see which copy has
a bad cell while the voter keeps the data correct.

Parameters (the package `ftf_pkg` holds `NUM_COPIES = 3` and the run encoding):

| parameter | default | origin |
|---|---|---|
| `WIDTH` | 4 | the 4-bit word of the published worked example |
| `DEPTH` | 8 | own choice; no depth is given in the source |

At the defaults, generic synthesis gives about 300 word-level cells, 90
flip-flop bits and 3 x 32 memory bits.

## Where this RTL departs from or goes beyond the published design

Taken from the source:
- the XOR/MUX voter and its single-fault argument;
- the three runs of the transparent SOA-MATS++ test and their expected
  patterns;
- the 4-bit word and the stuck-at-1 example;
- the use of the voter in a TMR scheme for a NoC router's FIFO.

This implementation's own choices:
- **Scope of TMR.** The whole FIFO channel is the redundant module, including
  pointers and tester. Which signals are voted, and the unvoted per-copy test
  report, are also own choices.
- **FIFO structure and handshake.** The pointers, the flags, first-word
  fall-through, and dropped or ignored operations are own choices.
- **Tester scheduling.** The tester has a one-cycle-per-run schedule, a
  start/busy/done interface and its report format. FIFO traffic pauses while a
  test runs.
- **Sizes and memory style.** `DEPTH = 8` and the asynchronous-read memory are
  own choices.
- **Reset.** Reset is asynchronous and active low. The array itself is not
  reset.
- **Fault injection.** The `sa_*` fault-injection ports are an addition for
  simulation.

Not included:
- The router around the buffer. Its ports, routing function and flit format are
  not specified.
- A block named `bsd`, shown in the source's RTL schematic only by its ports
  (`des[1:0]`, `clk`, `down`, `ini`, `eft`, `right`, `up`, `distance[5:0]`).
  Its function is never described.
- The published FPGA comparison. It reports 11 slices, 21 LUTs and 12
  flip-flops against 19, 36 and 13 for an earlier voter. It refers to an
  unspecified circuit, so those numbers are not expected to match this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ft_voter` | Exhaustive 1-bit truth table. Every single-copy fault (C, A, B) on 8-bit words. Node S forced to 0 and to 1 while the inputs agree. Random words against the majority function. |
| `tb_fifo_mem` | Write/read against a shadow array, plus the stuck-at model, including `1010 -> write 0101 -> reads 1101`. |
| `tb_soa_mats_tester` | Busy lasts exactly `3*DEPTH` cycles with a single `done` pulse. Content survives a fault-free test. The worked example is detected at the MSB. Stuck-at-0 under a 1 is caught by the final read. 30 random faults give exact bits and location. |
| `tb_fifo_channel` | 6000 random cycles against a queue model, including tests in the middle of traffic. Full, empty, dropped writes, ignored reads, simultaneous read and write, and operations during a test all occur. An injected fault is located. |
| `tb_tmr_fifo` | Runs at the default parameters. Four phases: no fault, then a faulty copy C, A and B. The voted outputs must match the fault-free model every cycle. Every test must flag exactly the faulty copy with its bits and location. Every mechanism, including a corrupted word masked in each case, is counted and must occur. |

Each testbench was also shown to fail against a deliberately broken copy of
its module:
- the voter with S stuck at 0;
- the memory losing address bit 0;
- the tester without its run-2 check;
- the channel letting writes through during a test;
- the top with the voter's C input wired to copy A.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ftf_pkg.sv tb/tb_tmr_fifo.sv --top-module tb_tmr_fifo -o sim
    ./obj_dir/sim

Every testbench finishes in well under a second of wall time. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ftf_pkg.sv rtl/tmr_fifo.sv`.

## Changing it

- **Wider flits or deeper buffers.** Override `WIDTH` and `DEPTH` on
  `tmr_fifo`. The depth need not be a power of two (5 was simulated), since
  the pointers wrap explicitly.
  The test then takes `3*DEPTH` cycles.
- **A larger array.** A synchronous-read RAM needs a two-cycle run schedule in
  `soa_mats_tester`. The tester assumes it can read and write the same location
  within one cycle.
- **Voting more signals.** Concatenate them into the `c_vote` word in
  `tmr_fifo`. The voter width follows automatically.
