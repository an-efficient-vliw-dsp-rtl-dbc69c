# Four-way VLIW DSP with a ring-structure register file

This is a four-issue VLIW signal processor for baseband work such as FIR
filtering, FFTs, Viterbi decoding and motion estimation. A wide VLIW machine
usually hits two limits. The first is the register file: a central file
serving four units needs about a dozen ports, and its area and delay grow
quickly with the port count. The second is code size: fixed-width VLIW
words fill up with NOPs. The design tackles each limit with one idea.

* **Ring-structure register file.** The register file is split into eight
  small 2-read/2-write sub-blocks. Each unit owns one private block. The four
  shared blocks sit on a ring, and every instruction packet carries a 2-bit
  *ring offset*. The offset decides which shared block each unit sees as its
  registers r8–r15. Data moves between units by changing the offset, not by
  copying. No sub-block ever needs ports for more than one unit.
* **Hierarchical VLIW encoding.** Packets are compressed into fixed 1024-bit
  bundles. Each packet has a 12-bit *cap*, holding the valid mask, the ring
  offset and the tail length. Each active unit then has a 20-bit *head* and
  a variable-length *tail* for its immediate. Idle units cost no bits. An
  instruction dispatcher expands the packets again at one per cycle. It
  also runs zero-overhead loops and jumps itself.

The RTL covers the whole processor:
* the dispatcher and the instruction memory;
* the ring register file with its switch;
* two control/load-store units and two SIMD ALU/MAC units, one of them enhanced;
* the data memory.

## Datapath fields

A packet has four instruction slots called *fields*:

| field | unit | private block r0–r7 | instructions |
|---|---|---|---|
| 0, 1 | control / load-store (`ls_unit`) | 8 × 32-bit address registers | LH/SH, LW/SW, double forms `_D`, half-word vector forms `_V`, ADDI, XOR, MOV32 |
| 2 | enhanced ALU/MAC (`alu_mac_unit`, `ENHANCED=1`) | 8 × 40-bit accumulators | everything in field 3, plus CMUL, CMUL_16V, CMAC, MUL32, MAC32 |
| 3 | ALU/MAC (`alu_mac_unit`, `ENHANCED=0`) | 8 × 40-bit accumulators | MUL/MAC (Hi/Lo halves), ADD…SRA, BF2, MUL_V, MUL_16V, MAC_V, ADD_V, SUB_V, ABS_V, SRA_V, MIN_V, MAX_V, PACK, ADDI, XOR, MOV32 |

Registers r8–r15 of every field are 32-bit ring registers.

**Memory addressing.** Memory operands use post-increment addressing
`(ri)+j`. The access goes to the address in `ri`, then `ri += j`, where `j`
is the tail immediate. A double access such as `LW_D rm,rn,(ri)+j` does all
of the following in one cycle:
* loads `Mem[ri]` and `Mem[ri+1]`;
* writes them to `rm` and `rn`;
* bumps both `ri` and `ri+1`.

That is six register accesses in one cycle. They fit because `ri`/`ri+1`
live in the private block and `rm`/`rn` in the ring block, and each block
has its own two read and two write ports. `fu_rf_access` hands out those
ports:
* Each register access goes to the next free port of the block its index
  selects.
* An instruction that needs three ports of one block is a programming error.
  An assertion reports it. An example is `LH_V` with a private destination.

**Multipliers.** Each ALU/MAC unit has two multipliers, and `MUL_V`/`MAC_V`
use both: `rd ← (rd +) a.Hi×b.Hi` and `rd+1 ← (rd+1 +) a.Lo×b.Lo`, with
`rd` even. The complex and 32-bit instructions of field 2 need four products
in one cycle. Field 2 therefore borrows field 3's two multipliers
(`bor_*` → `lend_*` in `vliw_dsp_top`). In that cycle field 3 may not issue
anything that multiplies, and an assertion checks this.

The multipliers are 17×17 signed. The 17th bit lets the unsigned low halves
of a 32-bit multiply use them. Results are integers, and the `_16V` forms
keep product bits [30:15] (Q15).

**Saturation.** A 40-bit result written to a 32-bit ring register is
saturated. This is how a pair of accumulators is summed and rounded into an
output register.

## Ring register file

`ring_rf` holds the eight sub-blocks (`rf_subblock`, 8 entries, 2R/2W):
* Private blocks 0 and 1 are 32 bits wide; private blocks 2 and 3 are 40 bits.
* The four shared blocks are 32 bits wide.
* `ring_switch` is a stateless rotator. Field *i* reaches shared block
  (*i* + offset) mod 4.

A typical use: a load/store field writes samples into r8 under offset 0. The
next packet uses offset 2, and an ALU field then reads the same physical
block as its own r8. Reads are combinational, and writes land at the clock
edge. On a same-cycle collision, write port 1 wins. Reset clears every
register.

## Instruction encoding

A bundle is 1024 bits.
* **Caps** are stacked from bit 1023 downward, one per packet. A cap whose
  top two bits are `00` ends the bundle.
* **Packets** are stacked from bit 0 upward. Each packet holds the heads of
  its active fields in field order, followed by their tails.

```
datapath cap    [11:10]=01  [9:6] valid (bit 6+i = field i)  [5:4] ring offset  [3:0] tail bytes
dispatcher cap  [11:10]=10  [9:7] RPT/J/JAL/JR/BNEZ/TRAP                        [3:0] tail bytes
head (20 bits)  [19:14] opcode  [13:10] rd  [9:6] ra  [5:2] rb  [1:0] tail size 0/1/2/4 bytes
```

* **Tails.** A tail is the instruction's sign-extended immediate. A packet
  can carry at most 15 tail bytes, so a packet holds at most three 32-bit
  immediates.
* **Dispatcher instructions** have a cap and a tail but no head:

  | instruction | tail |
  |---|---|
  | RPT | `[15:0]` n, `[23:16]` m |
  | J, JAL | `[29:0]` target position |
  | BNEZ | `[29:0]` target, `[35:32]` register |
  | JR | `[3:0]` register |
  | TRAP | `[7:0]` number; it jumps to bundle *number* |

* **Positions.** A program position is 30 bits wide:
  `{bundle[14:0], packet index[4:0], head pointer[9:0]}`.
  * The bundle number is a 7-bit page followed by an 8-bit bundle within
    the page.
  * The packet index selects the cap.
  * The head pointer is the bit where the packet's first head starts.

  A jump can therefore start decoding without scanning the bundle.
* **Links.** JAL and TRAP leave the return position in r7 of field 0.

The opcode numbers are in `dsp_pkg.sv`. The test assembler
`tb/vliw_asm_pkg.sv` shows how to build bundles. It gives each immediate the
shortest tail that holds it, and it keeps a dispatcher instruction in the
same bundle as the packet that follows it.

## Instruction dispatcher

`instruction_dispatcher` is the hardest part of the design. Its state:
* the current bundle, plus a prefetched copy of the next one;
* a 386-bit cap shifter (32 caps plus a 2-bit look-ahead);
* a 1024-bit head/tail shifter.

**Issuing a packet.** Each cycle the decoder looks only at fixed positions.
* The cap is at the top of the cap shifter.
* The four heads are at the bottom of the head/tail shifter. The valid bits
  pick which head belongs to which field.
* The tails follow the heads.

After issuing, the cap shifter moves by 12 bits. The head/tail shifter moves
by `20 × heads + 8 × tail bytes`.

**Bundle end.** The two bits just below the current cap tell one cycle early
that the bundle ends there. The prefetched next bundle is then swapped in
with no lost cycle. While it runs, the following bundle is read from memory.

**Costs of dispatcher instructions.**
* **RPT n,m** repeats the following *m* caps *n* times.
  * It is decoded in the same cycle as the packet after it, so it costs
    nothing.
  * Loops can nest two deep.
  * Each loop level keeps a copy of the bundle that holds its first packet,
    with the shifter state at that point. Jumping back is free even when the
    body crosses a bundle boundary.
  * When the body runs on into the next bundle, that bundle stays in the
    prefetch buffer as the loop jumps back. The next pass therefore swaps it
    in without waiting for the memory.
* **BNEZ and JR** are also issued together with the next packet, so they
  cost nothing when not taken.
  * Field 0 must be idle in that packet. Its register port reads the branch
    register during execute.
  * A taken branch squashes the one packet decoded in the meantime.
* **J, JAL and TRAP** issue one empty packet while the shifters are
  re-aligned to the target. JAL and TRAP use that empty packet to write the
  link.
* **Fetch penalty.** A target that is neither the current nor the
  prefetched bundle costs one more cycle for the memory read.

**Restrictions.**
* RPT, BNEZ and JR must be followed by a datapath cap in the same bundle.
  An assertion checks this.
* BNEZ and JR need field 0 idle in the packet they travel with. An
  assertion checks this too.
* Jumping or branching out of a running RPT loop is not supported, and
  nothing checks for it. The loop state simply stays active.

The event outputs `ev_loop_back`, `ev_bundle_swap`, `ev_redirect` and
`ev_bubble` make these mechanisms visible.

## Pipeline and timing

The pipeline has three steps:
1. **Fetch.** The bundle is read from instruction memory, with one cycle of
   latency.
2. **Dispatch.** The packet is decoded into the registered `pkt`.
3. **Execute.** The units read the register file and the data memory
   combinationally, and all results are written at the clock edge.

A load therefore feeds a MAC in the very next packet, which is what a
software-pipelined inner loop expects. Data memory (`data_mem`) has the
following layout:
* 16384 half-words (32 Kbytes).
* Four channels: two per load/store unit, so a double access completes in
  one cycle.
* A word at address *a* is `{M[a], M[a+1]}`, and it may start at an odd
  address.

Instruction memory (`inst_mem`) holds 256 bundles, which is one 32-Kbyte
page. Program positions already carry a 7-bit page number, so the program
space can grow to 128 pages (4 Mbytes) by raising `IMEM_BUNDLES` and the
dispatcher's `IMEM_AW`.

## Worked example: 64-tap FIR

The end-to-end test runs a 64-tap FIR filter that produces 1024 outputs.
Inputs are 16-bit fractions and outputs are 32-bit. Each outer iteration
computes two outputs in 35 packets:
* The two load/store fields stream samples and coefficients into ring
  registers with double loads.
* The two ALU/MAC fields each run two MACs per cycle into their
  accumulators, for four taps per cycle.
* An RPT loop covers the taps, and another covers the outputs.
* At the end of an iteration, the accumulator pair is summed and saturated
  into r8, and both load/store fields store one result each.

The test checks three things:
* every output against a reference model, including saturated ones;
* that the loop takes exactly 3 + 35 × 512 = 17923 cycles;
* that no empty cycle occurs, even though the loops cross several bundle
  boundaries.

In each outer iteration, 32 double loads advance the input pointer by 64
half-words. One ADDI then steps it back by 62. The net effect moves the
input window forward by the two outputs just produced.

## Where this design makes its own choices

The following are fixed by the architecture and followed here:
* four fields, and their split into control/LS and ALU/MAC units;
* the register counts and widths, and the 2R/2W sub-blocks;
* the rotating ring;
* 1024-bit bundles with caps from one end and packets from the other;
* the 12-bit cap contents;
* at most 32 packets per bundle, hence the 386-bit cap shifter;
* the incremental and logarithmic shifters and the look-ahead;
* two-level zero-overhead loops;
* the dispatcher instruction set;
* the use of field 0 to resolve branches;
* the instruction list of each field;
* multiplier borrowing by the enhanced unit;
* the 32-Kbyte data memory with half-word addressing;
* instruction memory pages of 256 bundles.

The following are this design's own:
* the bit order inside caps and heads, the opcode numbers and the
  dispatcher tail layouts;
* the 30-bit position format;
* r7 of field 0 as the link register;
* TRAP *n* jumping to bundle *n*;
* the rotation direction of the ring;
* the meaning of the `_V` load/store forms: two half-words at `ri` and
  `ri+1` packed into one register;
* sign extension of half-word loads;
* which field is the enhanced one;
* 17-bit multipliers, integer products and Q15 extraction for the `_16V`
  forms;
* the Hi/Lo selector in immediate bits [1:0] for MUL/MAC;
* the BF2 definition: `rd ← {aH+bH, aL+bL}`, `rd+1 ← {aH−bH, aL−bL}`;
* the three-step pipeline, which replaces the original five stages (three
  instruction stages and three execution stages with one shared).
  Results and cycle counts per packet are the same; only the fetch-to-issue
  latency after a redirect differs.

Not built:
* A host processor interface beyond the plain memory write ports.
* The central register file that the ring file was compared against, which
  is not part of this processor.

A 256-point radix-2 FFT also runs end to end (`tb_fft256`). Each butterfly
takes five packets that pass one ring block from field to field:
1. Field 0 loads both inputs with one double load, under offset 0.
2. Field 1 loads the twiddle factor into the same block, under offset 3.
3. Field 2 multiplies with CMUL_16V, borrowing field 3's multipliers, under
   offset 2.
4. Field 2 forms the sum and difference with BF2, under offset 2.
5. Field 0 stores both results, under offset 0.

The whole transform takes 6172 cycles with no empty cycle. The result
matches an integer model bit for bit. It stays within the Q15 truncation
bound of an exact DFT. A software-pipelined schedule that keeps all four
fields busy would need far fewer cycles, but it is not written here.

Two more kernels run end to end. Each schedule is simple and correct, but it
is not tuned for speed:
* **Viterbi add-compare-select** (`tb_viterbi_acs`): 64 states over 16
  trellis steps.
  * Each butterfly takes five packets and yields two new path metrics.
  * LH_V copies an old metric into both lanes.
  * Fields 2 and 3 add and subtract the branch metric. Field 2 keeps its sum
    in a private register so that MAX_V can compare it with field 3's
    result in the next ring block.
  * The test takes 2609 cycles for 1024 ACS operations, with exact metrics.
  * Survivor bits are not recorded.
* **Motion-estimation SAD** (`tb_me_sad`): a 16×16 block against one
  candidate in a 48×48 window.
  * Fields 0 and 1 load pixel pairs of the block and the window with
    double loads.
  * Fields 2 and 3 run SUB_V, ABS_V and ADD_V into private accumulators.
  * Loads alternate between ring blocks 0/1 and 2/3, so they overlap with
    the arithmetic.
  * The test takes 246 cycles for 256 pixels, and its sum is exact.
  * Packing two 8-bit pixels per lane and a denser schedule would raise the
    rate further.

## Files and simulation

`rtl/`:
* `dsp_pkg.sv`: the shared types and constants.
* `vliw_dsp_top.sv`: the top level.
* `instruction_dispatcher.sv`, `inst_mem.sv`, `ring_rf.sv`,
  `ring_switch.sv`, `rf_subblock.sv`, `fu_rf_access.sv`, `ls_unit.sv`,
  `alu_mac_unit.sv`, `data_mem.sv`: the blocks.

`tb/` holds one self-checking testbench per block, `tb_<module>.sv`, and the
assembler package `vliw_asm_pkg.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.
* `tb_instruction_dispatcher` checks the packet order through these cases:
  * straight code;
  * an RPT loop and nested RPT loops;
  * loop bodies spread over two bundles, one of them starting on the last
    packet of a bundle;
  * JAL/JR through the link;
  * a BNEZ count-down loop;
  * a far jump and TRAP.

  It also checks that loops and bundle swaps cost no cycle.
* `tb_vliw_dsp_top` runs the full-size processor:
  * the FIR;
  * a program with JAL/J, a BNEZ loop, CMUL (which borrows multipliers),
    MUL32 and TRAP.

  It counts every mechanism: loop-backs, bundle swaps, redirects, taken
  branches, saturations and borrows.
* `tb_fft256`, `tb_viterbi_acs` and `tb_me_sad` run the FFT, Viterbi and
  motion-estimation kernels described above on the full-size processor. They
  check the results against models, and check the cycle counts.

Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dsp_pkg.sv tb/vliw_asm_pkg.sv \
    tb/tb_vliw_dsp_top.sv --top-module tb_vliw_dsp_top -Mdir obj
./obj/Vtb_vliw_dsp_top
```

The other testbenches build the same way; `vliw_asm_pkg.sv` is needed only
by the dispatcher, top-level and kernel tests. All testbenches initialise or reset
whatever they read, so they also run on a two-state simulator with random
start-up values.
