# IDEA block cipher on an FPGA: a phase-pipelined core behind an on-chip buffer

IDEA enciphers 64-bit blocks under a 128-bit key. Each block passes through eight
identical *phases* and a short output *transformation phase*. Each phase mixes three
operations on 16-bit words: XOR, addition modulo 2^16 and multiplication modulo
2^16+1. The multiplier is by far the most expensive of the three.

This RTL implements the fastest of the FPGA organisations described by Granado,
Vega, Sánchez and Gómez ("Improving the Performance of the IDEA Cryptographic
Algorithm Using FPGAs"). Two ideas make it fast:

* **Phase-level pipelining.** There is one hardware stage per phase, plus one for the
  transformation, with 64-bit registers between them. Nine blocks are in flight at a
  time, and a finished block leaves every *phase time*. Each stage owns a single
  multiplier and uses it four times per block, which keeps the area down.
* **An internal array.** The host and the FPGA share a 32-bit memory bank on the
  board. The FPGA copies up to 1200 characters (150 blocks) at a time from the bank
  into an on-chip buffer. It ciphers the buffer with nothing else going on, then
  copies it back. Moving data and ciphering never overlap, so the core runs at full
  rate while it has work.

At the 20 MHz clock the original design used, the core alone ciphers
20 MHz / 8 × 64 bit = 160 Mbit/s. A whole job, including all traffic to and from the
bank, runs at about 102 Mbit/s (see *Timing*). The authors measured 62 Mbit/s on their
board, host software included.

## The IDEA operations

A block is four 16-bit words X1..X4, with X1 the most significant. In the
multiplication (written (.)), the all-zero word stands for 2^16. One phase with
subkeys Z1..Z6 computes:

```
A = X1 (.) Z1      B = X2 + Z2      C = X3 + Z3      D = X4 (.) Z4
E = (A ^ C) (.) Z5
F = ((B ^ D) + E) (.) Z6
G = E + F
out = { A ^ F,  C ^ F,  B ^ G,  D ^ G }          -- middle words swapped
```

The transformation phase (subkeys Z1..Z4) undoes the swap:
`{ X1 (.) Z1, X3 + Z2, X2 + Z3, X4 (.) Z4 }`.

`idea_mul` reduces the 32-bit product with the Low-High method. For non-zero
operands the result is `lo - hi`, plus 1 if `lo < hi`. A zero operand (2^16 ≡ −1)
gives `1 - other`. The multiplier is combinational.

## Inside a pipeline stage: one multiplier, eight steps

This is the part that takes the most care. A free-running counter `step` (0..7) is
shared by all nine stages. Within a phase time of 8 cycles, every phase stage
performs one group of operations per cycle:

| step | operation group                 | multiplier use |
|------|---------------------------------|----------------|
| 0    | A = X1(.)Z1, B = X2+Z2, C = X3+Z3 | X1, Z1         |
| 1    | D = X4(.)Z4                     | X4, Z4         |
| 2    | A^C, B^D                        | –              |
| 3    | E = (A^C)(.)Z5                  | A^C, Z5        |
| 4    | (B^D) + E                       | –              |
| 5    | F = ((B^D)+E)(.)Z6              | …, Z6          |
| 6    | G = E + F                       | –              |
| 7    | output XORs (combinational)     | –              |

The groups are those of the original phase-pipelined schedule. Its phase time is
4·mt + 2·at + 2·xt: four multiplications, two additions and two XOR levels, with the
first two additions done alongside the first multiplication. Giving each group one
clock cycle is this implementation's choice.

On the clock edge that ends step 7 (`advance`), each stage loads the result of the
stage before it into its 64-bit input register. Stage 1 loads the next input block
instead. The output XORs are combinational, so they happen during step 7 and their
result is captured directly by the next stage.

The transformation stage (`idea_out_stage`) also has one multiplier. It needs only
steps 0 and 1, then holds its result until the next `advance`.

Each stage carries a valid bit, so a phase time with no input block sends a bubble
down the pipeline. `idea_pipe_core` registers the final result and marks it with a
one-cycle `out_valid` pulse. Timing of the core:

* `in_ready` is high during step 7. A block offered with `in_valid` then is taken at
  the end of that cycle.
* The block reaches the output register 72 cycles (nine phase times) later.
* Blocks offered back to back come out 8 cycles apart. There is no back-pressure.
* The subkeys must not change while blocks are in flight.

## Subkeys

`idea_keysched` derives the 52 subkeys (6 per phase and 4 for the transformation)
from the 128-bit key. They sit in a packed array where element n is Z((n mod 6)+1)
of phase (n/6)+1.

* **Encryption.** Cut the key into eight 16-bit words, most significant first. Rotate
  it left by 25 bits and repeat. This is ready one cycle after `start`.
* **Decryption.** The same datapath runs with new subkeys. Decryption phase r takes
  from encryption phase 10−r:
  * the multiplicative inverses of Z1 and Z4,
  * the additive inverses of Z2 and Z3, swapped for r = 2..8,
  * Z5 and Z6 of encryption phase 9−r.

  The 18 multiplicative inverses are computed one at a time on a single `idea_mul` as
  x^(2^16−1) (Fermat's little theorem; 2^16+1 is prime). Each inverse takes 15
  square-then-multiply rounds. The whole decryption schedule takes 559 cycles.

The original design only states that 52 subkeys are generated from the key. Building
the standard schedule on chip is this implementation's choice.

## A job: bank → array → core → array → bank

`idea_array_ctrl` runs the job. The host talks to it through the memory bank and two
8-bit ports:

* **Memory bank** (32-bit words, written by the host before the start):

  | word     | contents                                                     |
  |----------|--------------------------------------------------------------|
  | 0..3     | key, word 0 = key bits 127:96                                |
  | 4        | bit 31: 1 = decrypt; bits 23:0: number of blocks N           |
  | 8 + 2k   | block k, bits 63:32 (the result overwrites it)               |
  | 9 + 2k   | block k, bits 31:0                                           |

* **Control port**, host to FPGA: writing `8'h01` while the FPGA is idle starts a job.
  Other bytes, and any byte written while busy, are ignored.
* **Status port**, FPGA to host:
  * bit 0 is *busy*. The host must not touch the bank while it is set.
  * bit 1 is *done*. It is set at the end of a job and cleared by the next start.

A job reads the 5 header words and starts the key schedule. Then it repeats, for each
batch of up to 150 blocks:

1. **Fill.** Copy the batch from the bank into the array: two reads per block, high
   half first.
2. **Compute.** Feed the array to the core, one block per phase time. Write each
   result back into the slot its input came from.
3. **Drain.** Copy the batch back to the bank: two writes per block.

A job of N blocks makes exactly 5 + 2N bank reads and 2N bank writes.

The interface expects the bank to behave as a synchronous SRAM: read data arrive one
cycle after `mem_rd`. The original board arbitrates bank access between host and
FPGA, and the RTL has no such arbitration. Instead, the host stays off the bank while
the FPGA is busy.

The internal array (`idea_int_array`) is a simple dual-port memory: one synchronous
read port and one write port, 64 bits wide. Its size is set in characters
(`ARRAY_CHARS`, default 1200 = 150 blocks).

## Timing

For a job of N blocks in batches of n ≤ 150 blocks:

| part            | cycles                                  |
|-----------------|-----------------------------------------|
| header          | about 7                                 |
| key schedule    | 1 (encrypt) or 559 (decrypt)            |
| fill, per batch | 2n + 2                                  |
| compute         | 8n + 66 to 8n + 74 (pipeline fill)      |
| drain           | 2n + 1                                  |

The largest workload in the original study is 31 880 characters (3985 blocks):
26 full batches and one batch of 85 blocks. It takes 49 780 cycles to encipher. At
20 MHz that is 2.49 ms, or 102.5 Mbit/s. About two thirds of the time is the
core's 8 cycles per block, and one third is the four bank accesses per block.

## Parameters

| parameter     | default | where                       | meaning                                      |
|---------------|---------|-----------------------------|----------------------------------------------|
| `ARRAY_CHARS` | 1200    | top, controller, array      | internal array size in 8-bit characters      |
| `MEM_AW`      | 19      | top, controller             | bank word address width (2^19 words = 2 MB)  |

`NUM_PHASES` (8) and `PHASE_STEPS` (8) in `idea_pkg` are fixed by the algorithm and
the stage schedule.

## How this relates to the original design

The following follows the original design:

* the phase dataflow;
* the phase-level pipeline with 64-bit registers between phases;
* one multiplier per phase stage and the grouping of operations within a phase;
* the Low-High multiplier;
* the internal array of 1200 characters;
* data and computation kept apart in separate fill, compute and drain activities;
* two 32-bit bank accesses per 64-bit block;
* control and status ports of 8 bits.

The following are this implementation's own choices:

* one clock cycle per operation group;
* valid bits and bubbles;
* the memory layout, the command and status encodings, and the SRAM-like bank timing;
* generating the subkeys, including the decryption inverses, on chip;
* a single multiplier in the transformation stage;
* the array's port structure.

The original work also studied two slower algorithm organisations: fully sequential,
and sequential with two multipliers working in parallel. It also studied two other
ways of talking to the host: through the memory bank with no array, and byte by byte
through the control and status ports. These were compared against the organisation
built here and are not included. The original was written in Handel-C for a Virtex
XCV2000E. This is plain synthesizable SystemVerilog, with no vendor primitives. The
array is an inferred memory.

## Files

| file | contents |
|------|----------|
| `rtl/idea_pkg.sv` | sizes, types, `expand_key` (encryption key schedule) |
| `rtl/idea_mul.sv` | multiplier modulo 2^16+1 |
| `rtl/idea_phase_stage.sv` | one phase, one multiplier, 8 steps |
| `rtl/idea_out_stage.sv` | transformation phase stage |
| `rtl/idea_pipe_core.sv` | 9-stage pipeline, step counter, output register |
| `rtl/idea_keysched.sv` | encryption/decryption subkeys |
| `rtl/idea_int_array.sv` | internal array |
| `rtl/idea_array_ctrl.sv` | job sequencer, bank and port interface |
| `rtl/idea_fpga_top.sv` | top level |
| `tb/idea_ref_pkg.sv` | behavioural IDEA reference (uses `%`, extended Euclid) |
| `tb/rc1000_mem_model.sv` | behavioural 32-bit memory bank, counts accesses |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares its module with `idea_ref_pkg`, which is written from the
arithmetic definition and shares no code with the RTL. Every testbench ends by
printing `TB_RESULT checks=N failures=M`.

* `tb_idea_mul` covers corner operands, 200 000 random pairs and x (.) x⁻¹ = 1.
* `tb_idea_phase_stage` and `tb_idea_out_stage` check results exactly 8 cycles
  after loading. They include bubbles and zero (2^16) operands.
* `tb_idea_pipe_core` uses the published IDEA test vector: key 0001 0002 … 0008 and
  plaintext 0000 0001 0002 0003 give 11FB ED2B 0198 6DE5. It also runs 400 random
  blocks, back to back and with gaps, and a decryption round trip. It checks the
  72-cycle latency and the 8-cycle spacing.
* `tb_idea_keysched` tests both modes with test, zero, all-ones and random keys, and
  checks the cycle counts.
* `tb_idea_int_array` checks read-back and read-during-write.
* `tb_idea_array_ctrl` uses a 4-block array, so jobs need several batches. It runs
  jobs of 0, 1, 4 and 11 blocks and a decryption. It checks access counts, status
  bits, the ignored start command and that the words around the data are untouched.
* `tb_idea_fpga_top` runs the full-size design with all defaults. It enciphers and
  then deciphers 31 880 characters. It counts full and partial batches, bubbles,
  back-to-back outputs and both job types, and checks the job time against the
  budget above. It simulates in well under a second.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/idea_pkg.sv tb/idea_ref_pkg.sv tb/tb_idea_fpga_top.sv \
  --top-module tb_idea_fpga_top -Mdir obj_top
./obj_top/Vtb_idea_fpga_top
```

Replace the testbench name to run another. Verilator does not model X, so the
testbenches reset everything they read. Add `+verilator+rand+reset+2` to start with
random register contents.

## Limits

* No stall or back-pressure anywhere. The bank must answer every read in one cycle.
* The key schedule runs once per job, and a decryption job pays 559 cycles for it.
* Timing closure at 20 MHz has not been checked. Each stage's critical path is one
  16×16 multiplier plus the Low-High correction and a multiplexer.
