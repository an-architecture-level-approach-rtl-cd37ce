# Variation-tolerant custom instructions for an extensible processor

An extensible processor speeds up an application by adding *custom
instructions* (CIs): small data-flow graphs from the program's hot spots,
built in hardware in a Custom Functional Unit (CFU) that sits next to the ALU.
A CI is chosen at design time so that its nominal delay fits one clock period.
In a deep-submicron process, though, threshold voltage and channel length vary
from die to die and within a die. On some manufactured chips a few CI outputs
then miss the clock edge, and those chips would fail. Designing every CI for
its worst-case delay avoids the failures but gives away most of the speedup.

This design takes a third way. Each chip finds out, once, which of its CIs
are too slow, and from then on gives exactly those CIs **one extra clock
cycle**. Everything else runs at full speed. The cost is one cycle per slow
CI, not a slower clock for the whole chip.

The RTL is a five-stage in-order MIPS-like pipeline (IF, ID, EX, MEM, WB)
extended with four pieces:

| piece              | module            | job |
|--------------------|-------------------|-----|
| CFU                | `cfu`             | executes the CIs. Two operands in, `NUM_OUT` result words out |
| output selector    | `output_selector` | picks the CFU output port a CI instruction writes back, which is also the one the checker sees |
| checker            | `ci_checker`      | at test time, compares a CI's captured output with an expected value. On a mismatch it reports the CI's op-code |
| CI controller      | `ci_controller`   | keeps the LUT of slow CI op-codes, looks up every fetched instruction, and issues the stall command |

## How a chip learns which CIs are slow (test time)

Testing is done in software, with ordinary instructions plus one new one.
For every CI, and for every output port of that CI:

1. Load the test vector into the source registers, and the expected result
   into a third register. Any instructions can do this, for example `LUI`/`ORI`.
2. Execute the CI. When it leaves EX, the checker stores the value the pipeline
   captured for it (input **A**) together with its op-code.
3. Execute `CHK rs`. In EX, the checker compares **A** with the value of `rs`
   (input **B**, forwarded like any other operand). If they differ, the
   checker asks the CI controller, one cycle later, to set the LUT bit of that
   op-code.

A CI whose critical path is too slow on this chip latches a wrong value in
step 2, so step 3 catches it. A CI with several outputs is checked once per
output, with the output selected by the CI instruction. `CHK` may come any
number of instructions after the CI. It always checks the most recent one.
A `CHK` issued before any CI has run does nothing.

The test vectors should exercise the critical paths (delay-test vectors). They
are not generated by this hardware.

The LUT is cleared by reset. The test routine is meant to run once after
power-up, before the application.

## How slow CIs get their second cycle (run time)

1. **Look-up at fetch.** `ci_controller` decodes the word coming out of the
   instruction memory. If it is a CI whose op-code has its LUT bit set,
   `if_slow` is raised. The flag is stored in the IF/ID register and then in
   ID/EX, next to the instruction.
2. **Stall command.** In the first cycle that a flagged CI spends in EX,
   `stall_cmd` goes high. `pipeline_controller` then holds the PC, IF/ID and
   ID/EX, and sends a bubble into EX/MEM. `extra_cycle` is high in the next
   cycle, which stops the command from repeating. The CI therefore spends
   exactly two cycles in EX, and its result is registered at the end of the
   second one.
3. **Frozen CFU inputs.** This is the subtle part. The CFU's operands may be
   forwarded from EX/MEM or MEM/WB. During the stall those stages keep
   moving: the instruction in MEM/WB writes back and leaves. If the operands
   were re-selected in the second cycle, a value forwarded from MEM/WB would
   no longer be there. So in the stall cycle (`cfu_freeze`) the ID/EX operand
   registers load the forwarded values that the CFU is using. In the extra
   cycle (`idex.frozen`) forwarding is switched off. The CFU sees the same
   operands for both cycles.

The CI stall takes priority over a load-use stall and a branch redirect. It
can never coincide with a redirect, because a CI is not a branch, and an
assertion in `ext_proc_top` checks this. Another assertion, in
`ci_controller`, checks that the extra cycle never lasts more than one clock.

In an RTL simulation every CI meets timing, so this logic cannot show a
timing failure by itself. The end-to-end test bench models the failure: when
a CI output that is "slow" on the simulated chip finishes in a single cycle,
the bench corrupts the captured value.

## Instruction set

32-bit MIPS formats, without branch delay slots:

* R-type: `ADD SUB AND OR XOR NOR SLT SLL SRL`
* I-type: `ADDI SLTI ANDI ORI XORI LUI LW SW BEQ BNE`
* J-type: `J`

The two extensions:

| instr | opcode | fields |
|-------|--------|--------|
| `CI`  | `0x1C` | `rs`, `rt` = operands, `rd` = destination, `shamt[0]` = CFU output port written back, `funct` = CI op-code (the LUT index) |
| `CHK` | `0x1D` | `rs` = register holding the expected value. Writes nothing |

The register file has two read ports and one write port, which matches a CI
with two inputs and one written result. To use a second output of the same
CI, execute the CI a second time with the other output port selected.

## Pipeline details

* Branches and jumps are resolved in EX. IF/ID and ID/EX are flushed, so a
  taken branch costs two cycles.
* A load followed by an instruction that uses its result costs one stall
  cycle. All other dependences are forwarded from EX/MEM or MEM/WB.
* The register file writes through: WB and ID can use the same register in
  the same cycle.
* The instruction and data "caches" are single-cycle memories that always
  hit (`inst_mem`, `data_mem`). The program is loaded through the top's
  `prog_*` port while `rst_n` is low. `dbg_addr`/`dbg_rdata` read the data
  memory. Addresses are byte addresses in the ISA and word indices at the
  memories.
* Reset (`rst_n`, asynchronous, active low) clears the PC, every pipeline
  register, the register file, the checker and the LUT. It does not clear
  the memories.

## The example CFU

Which CIs a CFU holds depends on the application. The eight CIs in `cfu` are
examples, chosen to look like CIs taken from packet-processing, hashing,
bit-counting and ADPCM code. Each has two 32-bit outputs:

| CI | `out[0]`                      | `out[1]`                      |
|----|-------------------------------|-------------------------------|
| 0  | `(a + b) ^ (a >> 3)`          | `a + b`                       |
| 1  | `popcount(a) + popcount(b)`   | `popcount(a)`                 |
| 2  | `rotl(a, b[4:0]) + b`         | `rotl(a, b[4:0])`             |
| 3  | signed `abs(a - b)`           | signed `a < b`                |
| 4  | 16-bit saturating `a + b`     | saturation flag               |
| 5  | `(a << 1) ^ b ^ (b >> 1)`     | `a ^ b`                       |
| 6  | `byteswap(a) ^ b`             | `byteswap(a)`                 |
| 7  | `a + 10*b` (shift-add)        | `a - (b >> 2)`                |

Op-codes 8 to 63 repeat this table modulo 8 when `NUM_CI` is raised. Op-codes
at or above `NUM_CI` return zero and never enter the LUT. To fit a real
application, replace the `case` in `cfu.sv`. Nothing else has to change as
long as a CI keeps two inputs.

## Parameters (`ext_proc_top`)

| name         | default | meaning |
|--------------|---------|---------|
| `XLEN`       | 32      | data width |
| `NUM_CI`     | 8       | number of CI op-codes, which is also the number of LUT bits (at most 64) |
| `NUM_OUT`    | 2       | output ports per CI |
| `IMEM_DEPTH` | 1024    | instruction memory words |
| `DMEM_DEPTH` | 1024    | data memory words |

The LUT has one bit per CI op-code and is indexed directly. No associative
search is needed.

## What is faithful and what is chosen here

These parts follow the published architecture:

* the CFU beside the ALU in EX;
* the checker that compares a CI output with a register value when a
  dedicated compare instruction runs, and that adds the CI's op-code to a LUT
  on a mismatch;
* each output port of a CI checked separately;
* the look-up of every fetched instruction;
* the one-cycle stall for listed CIs, with the CFU inputs frozen during the
  extra cycle.

These are choices made in this design:

* the MIPS subset and the CI/CHK encodings;
* the checker storing the last CI's output, so that `CHK` need not follow the
  CI immediately;
* the registered LUT update;
* a LUT with one bit per op-code;
* the stall being raised in the CI's first EX cycle rather than in IF;
* branch resolution in EX;
* always-hitting memories in place of caches;
* a LUT that is lost at reset, rather than a non-volatile one;
* the example CIs and all parameter defaults other than the 32-bit width.

Not built in hardware:

* the design-time flow that picks the CIs and weighs how likely each is to
  need the extra cycle;
* the generation of delay-test vectors.

## Files

`rtl/`:

* `ep_pkg.sv`: opcodes, the ALU-operation and forwarding enums, and the
  decoded-control struct.
* `ext_proc_top.sv`: the pipeline, including the MEM and WB stages.
* The other files each hold one block: `fetch_unit`, `decoder`, `regfile`,
  `alu`, `cfu`, `output_selector`, `forwarding_unit`, `pipeline_controller`,
  `ci_controller`, `ci_checker`, `inst_mem`, `data_mem`.

`tb/`: one self-checking bench per module (`<module>_tb.sv`). Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `ep_tb_pkg.sv` holds a
small assembler and a reference model of the example CIs.

`ext_proc_top_tb` runs the whole processor at its default parameters. It
simulates 1000 chip samples plus a reference sample (sample 0) that has no
slow CIs. Each CI output is given a fixed probability of missing the clock,
between 0 and 30 %. Each sample then draws its own set of slow outputs from
these probabilities. In the last sample every CI is slow on one of its ports.
For each sample the bench runs the test routine for all 16 CI/port pairs and
then a data loop that chains all eight CIs through loads, stores, a
load-use hazard and a branch. It checks:

* that the LUT ends up holding exactly the slow CIs;
* that each listed CI takes exactly two EX cycles and every other CI one;
* that the loop takes the sample-0 cycle count plus one cycle per execution
  of a listed CI;
* that the stored results match the reference model.

It also counts single-cycle CIs, CI stalls, frozen operands that came from
write-back, passing and failing `CHK`s, load-use stalls, redirects, and both
forwarding paths. It fails if any of these never happened. It also prints
the minimum, mean and maximum run-time cycle counts over the samples. In one
run the loop took 106 cycles with every CI in one cycle, and 106 / 120.1 /
154 cycles (minimum / mean / maximum) over the 1000 samples.

`bitcount_workload_tb` is a bit-counting workload. It counts the set bits
of 16 random words twice: once with a software loop, and once with one
popcount CI per word. It runs on two chip samples: one where the CI meets
timing, and one where the CI's test fails and it gets the extra cycle. The
bench checks every count. It also checks that the CI loop costs exactly one
cycle more per word on the slow sample and is still much faster than
software. For these 16 words the bench measured 2905 cycles for the software
loop, and 158 cycles (fast sample) or 174 cycles (slow sample) for the CI
loop.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ep_pkg.sv tb/ep_tb_pkg.sv tb/ext_proc_top_tb.sv --top-module ext_proc_top_tb
./obj_dir/Vext_proc_top_tb
```

Replace `ext_proc_top_tb` with any other `*_tb` to run a unit bench. Every
bench finishes in well under a second. To write your own program, encode it
with the `asm_*` functions in `ep_tb_pkg`. Load it through `prog_we`,
`prog_addr` and `prog_wdata` while holding reset, then release `rst_n`.
