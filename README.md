# Universal pipelines: one RTL, every pipeline configuration

Pipelining a datapath is a trade-off. Each pipeline register shortens the clock period, but it can
also create hazards, and the hardware that resolves them (bypasses, stalls, kills) costs delay of its
own and lost cycles. Which registers are worth having depends on the unit delays. This RTL makes that
choice a parameter. It describes a **universal pipeline**: the datapath with every optional pipeline
register and every piece of hazard hardware any configuration could need. Each optional register has
a Boolean presence parameter. The hazard hardware is generated from five placement rules, so that
any setting of the presence parameters yields a correct pipeline with exactly the hazard hardware
that configuration requires.

Two datapaths are built this way. They stand side by side in `pipeline_top`:

* a **DLX** integer pipeline (IF, ID, EX, MEM, WB) with 3 optional registers, giving 8 configurations;
* a floating-point **multiply accumulator (MAC)** with units MUL, ADD, RND and WB and 2 optional
  registers, giving 4 configurations.

The defaults are the fully pipelined versions of both.

## The parcel: how instructions travel

In the DLX, every unit takes a `parcel_t` and passes one on (`rtl/dlx_pkg.sv`). A parcel carries:

* the pc and the instruction word;
* the decoded fields and the operand values as they stand so far;
* the result, with a `res_ready` flag once it is final;
* a `redirect`/`target` pair for a jump or a taken branch.

A bubble is a parcel with `valid = 0`. Because the hazard units also speak parcels, each one is a
small combinational filter placed between two units:

| unit | what it does to the parcel passing through |
|---|---|
| `dlx_bypass` | replaces `val1`/`val2` with `src.result` when `src` is valid, writes that register (not r0) and has its result ready |
| `dlx_kill` | turns the parcel into a bubble when the parcel at the end of EX's stage (EX output, or MEM1 output when `EXMEM1` is absent) is a valid jump or taken branch |
| `dlx_detect` | turns the parcel into a bubble and raises `stall` when the previous parcel it let through (held in its *history register*) is a load this one depends on |
| `dlx_stall` | during a stall, feeds the following register its own output, so that register keeps its instruction |
| `dlx_selector` | chooses the next fetch pc. A redirect from the register after EX comes first, then the kill redirect (the end of EX's stage, delayed by one register), then the stall hold |
| `dlx_pipe_reg` | a register when `PRESENT=1`, a wire when `PRESENT=0` |

## DLX: what each configuration gets

The optional registers are `IF1ID`, `IDEX` and `EXMEM1`. `MEM1WB` is always present, because the
register file is write-before-read: a value written by WB is readable in the same cycle. The rules
place the following hardware:

| hardware | present when | why |
|---|---|---|
| EX bypass into ID | `IDEX && EXMEM1` | EX computes register values one stage after ID |
| MEM1 bypass into ID | `IDEX \|\| EXMEM1` | MEM1 is one or two stages after ID. With only `EXMEM1`, this is the *delayed* forward: EX and ID share a stage, so a forward from EX would be a combinational loop, and the value is taken after the register instead |
| detect + stall units, stall input of the selector | `IDEX && EXMEM1` | a load's value (MEM1) comes two stages after ID needs it. Only 1-cycle stalls occur |
| kill unit in front of `IF1ID` | `IF1ID` | the pc is computed in EX, later than IF |
| kill unit in front of `IDEX` | `IDEX` | likewise |
| delay register from the end of EX's stage to the selector | either kill unit present | the redirect reaches the pc one cycle later |

Inside ID's stage, the order is: MEM1 bypass, then EX bypass (the younger value wins), then kill, then
detect. Branches are predicted not taken.

**Timing per configuration**, where `n` is the number of optional registers present:

* Fetch to write-back takes `n + 1` cycles.
* A jump or taken branch loses `IF1ID + IDEX` instructions, killed in flight.
* A load followed by a dependent instruction loses one cycle, but only when `IDEX && EXMEM1`.
* Otherwise one instruction issues per cycle.

For the fully pipelined default:

* An instruction retires 4 cycles after it is fetched.
* A taken branch or jump costs 2 cycles.
* A load-use pair costs 1 cycle.

The testbench checks these gaps for all 8 configurations.

### Instruction set

The DLX here is a small subset with DLX-style formats and its own opcode values:

| instruction | encoding | meaning |
|---|---|---|
| `ADD SUB AND OR XOR SLT MUL rd, rs1, rs2` | R-type, opcode `00`, function `20 22 24 25 26 2A 0E` | `rd = rs1 op rs2` (SLT signed) |
| `ADDI rd, rs1, imm` | opcode `08` | `rd = rs1 + sext(imm)` |
| `LW rd, imm(rs1)` | opcode `23` | `rd = mem[rs1 + sext(imm)]` |
| `SW rs2, imm(rs1)` | opcode `2B`, data register in bits [20:16] | `mem[rs1 + sext(imm)] = rs2` |
| `BEQZ/BNEZ rs1, imm` | opcode `04`/`05` | if taken, `pc = pc + 1 + sext(imm)` |
| `J target` | opcode `02` | `pc = target` (26-bit absolute) |

Other conventions:

* The pc and all memory addresses are word addresses.
* Instruction memory and data memory hold 256 words each (parameters).
* There are 32 registers of 32 bits, and r0 reads as zero.
* The instruction memory has a load port.
* Reset clears the registers and the data memory and sets the pc to 0.
* Any other encoding decodes as a no-op.
* `J` computes its target in ID. Like the branches, it takes effect from EX, so it pays the same kill
  penalty.

## MAC: a fork-and-join floating-point pipeline

Instructions are `A = B + C`, `A = B * C` and `A = B + C * D` on 32 binary32 registers
(`minstr_t`: valid, op, a, b, c, d).

* MUL reads two registers (B and C, or C and D) and forms the exact 48-bit product, without rounding.
* ADD adds either two registers, or register B and the product from MUL.
* RND normalises, rounds to nearest even and renormalises.
* WB writes the register file, which is write-before-read.

The optional registers follow MUL (`MULDEL`) and ADD (`ADDDEL`). `RNDWB` is always present. The only
hazard hardware is bypasses from the RND output: into MUL's operands when `MULDEL` is present, and into
ADD's operands when `ADDDEL` is present.

**Timing.** An instruction issued in cycle `t` reaches RND in cycle `t + MULDEL` (multiply),
`t + ADDDEL` (add) or `t + MULDEL + ADDDEL` (multiply-add), and is in `RNDWB` right after that cycle.
A multiply-add reads B in ADD in cycle `t + MULDEL`.

**The schedule is the user's job.** Resource conflicts are not resolved in hardware: two
instructions wanting ADD or RND in the same cycle. Neither are dependences the bypasses cannot cover.
A result can be read in the cycle RND produces it only by a unit that has a bypass; every other unit
can read it from the next cycle on. Assertions in `mac_pipeline` flag ADD and RND conflicts.
`tb/mac_checker.sv` contains a list scheduler that obeys these rules and can serve as a reference.

**Number format.** The MAC uses IEEE-754 binary32 with round to nearest, ties to even. Subnormal
inputs count as zero, results below the normal range flush to zero, and results above it become
infinity. NaN and infinity inputs get no special treatment.

Internally, values are unrounded (`ufp_t`): a sign, a 12-bit exponent and a 53-bit significand with
49 fraction bits. The product of two significands is exact and leaves its three lowest bits zero. ADD
aligns the smaller-exponent operand and keeps the bits it shifts out as a sticky bit. The zero guard
bits make shifts of up to 3 places exact, and those are the only cases where massive cancellation can
happen. A product's significand can exceed 2, so ADD picks the subtraction direction after
alignment. A multiply-add is therefore rounded once, as a fused multiply-add.

The register file has a load port, `rf_ld_*`, for setting initial values while the pipeline is idle,
because the instruction set has no load.

## Configurations chosen by unit costs

Which configuration is best depends on the delays of the units and the hazard hardware. The
configurations below come out of the cost examples the method was tried on, and each is one
parameter setting of this RTL:

| examples | parameters |
|---|---|
| DLX examples 1, 5, 6 | `IF1ID=1 IDEX=1 EXMEM1=0` (IF \| ID \| EX MEM) |
| DLX examples 2, 4 | `IF1ID=0 IDEX=1 EXMEM1=0` (IF ID \| EX MEM) |
| DLX example 3 | `IF1ID=0 IDEX=0 EXMEM1=1` (IF ID EX \| MEM) |
| DLX example 7 | `IF1ID=1 IDEX=1 EXMEM1=1` (the default) |
| MAC examples 1, 4 | `MULDEL=1 ADDDEL=1` (the default) |
| MAC examples 2, 3 (cheap units; an expensive MUL) | `MULDEL=1 ADDDEL=0` |

`dlx_pipeline_tb` and `mac_pipeline_tb` run every setting, so each of these is tested. Clock period
and throughput follow from unit delays that the RTL does not model. The cycle penalties that enter
the throughput are modelled: stalls, killed instructions and one issue per cycle otherwise.

## Top level

`pipeline_top` has the parameters `DLX_IF1ID`, `DLX_IDEX`, `DLX_EXMEM1`, `DLX_IMEM_WORDS`,
`DLX_DMEM_WORDS`, `MAC_MULDEL` and `MAC_ADDDEL`. The two pipelines share `clk` and the synchronous,
active-high `rst`.

* **DLX ports** (prefix `dlx_`): an instruction memory load port, the retiring parcel, debug read
  ports for the register file and data memory, and one-cycle pulses for each hazard event: stall,
  kill, EX bypass and MEM1 bypass.
* **MAC ports** (prefix `mac_`): the issued instruction, the write-back result, the register load
  port, a debug read port and the two bypass event pulses.

## Where this design departs from, or adds to, the method it implements

* **Jumps redirect from EX.** A direct jump's target is known in ID, but the only redirect path is
  the one from EX, shared with branches. A separate, earlier redirect for jumps would save one killed
  instruction per jump.
* **Kill placement.** One kill unit sits in front of each present register between IF and EX, fed
  from the end of EX's stage: the EX output, or the MEM1 output when `EXMEM1` is absent, since MEM1
  then shares EX's stage. The general kill rule can be read as also killing in the stage of the unit that
  computes the pc. The worked example and the text kill only the instructions in IF and ID, and this
  design follows them.
* **Detect position.** The detect unit always sits at the end of ID's stage and looks back through its
  history register, in every configuration that needs it.
* **Stall conditions.** A load is never forwarded from EX; any instruction that reads the loaded
  register in the next slot stalls, including stores and branches.
* **MAC bypass position.** The drawings place each bypass right after MUL or ADD, on the value going
  into the following register. Here the bypass acts on the unit's operands instead, because a product
  or sum formed from a stale operand cannot be repaired afterwards. The cycle in which a result can
  be used is the same.
* **Choices of this design:** the instruction set, memory sizes, reset behaviour, number format,
  rounding details, event outputs, debug and load ports.
* **Not built:** the design-space search itself (enumerating configurations and computing clock
  periods and throughput from unit costs). It is a method run offline, not hardware. The RTL
  provides every configuration it chooses from, and reproduces the cycle penalties its throughput
  formula counts.

## Verification

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.

* `dlx_pipeline_tb` runs all 8 DLX configurations side by side on one program, the unpipelined one
  (all three optional registers absent) included, so every configuration must match unpipelined execution. The program starts
  with directed hazard cases: back-to-back dependences, a load-use pair, a taken loop branch, a jump
  with an instruction in its shadow. It continues with 200 random instructions. A lockstep
  instruction-set model (`dlx_checker`) checks:
  * every retired instruction;
  * the final registers and data memory;
  * the stall and kill gaps of each configuration.

  Each configuration must use exactly the hazard hardware the rules give it.
* `mac_pipeline_tb` runs all 4 MAC configurations. It uses directed rounding cases (ties to even,
  sticky-only products, exact cancellation, cancellation after a one-place shift) followed by 400
  random dependent instructions. `mac_checker` schedules the program for the configuration under
  test, then checks three things:
  * every write-back, against an exact big-integer reference (`mac_tb_pkg`);
  * the issue-to-write latency;
  * that each present bypass was used.
* `pipeline_top_tb` runs the top at its default parameters. It requires every mechanism to act at
  least once: stall, kill, EX bypass, MEM1 bypass, MUL bypass and ADD bypass.
* Unit testbenches check each functional and hazard unit against an independent model.

To simulate with Verilator 5, list the packages first:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dlx_pkg.sv rtl/mac_pkg.sv tb/dlx_tb_pkg.sv tb/mac_tb_pkg.sv \
  rtl/*.sv tb/dlx_checker.sv tb/mac_checker.sv tb/pipeline_top_tb.sv \
  --top-module pipeline_top_tb -Wno-fatal
./obj_dir/Vpipeline_top_tb
```

Replace the last testbench file and `--top-module` to run another one. Every testbench finishes in
well under a second.

## Files

* `rtl/dlx_pkg.sv`: parcel type, opcodes, encoders.
* DLX units: `rtl/dlx_fetch.sv`, `dlx_decode.sv`, `dlx_execute.sv`, `dlx_memory.sv`, `dlx_regfile.sv`.
* DLX hazard units: `dlx_bypass.sv`, `dlx_kill.sv`, `dlx_stall.sv`, `dlx_detect.sv`,
  `dlx_selector.sv`, `dlx_pipe_reg.sv`.
* `dlx_pipeline.sv`: the DLX universal pipeline.
* `rtl/mac_pkg.sv`: MAC types.
* MAC units: `mac_mul.sv`, `mac_add.sv`, `mac_rnd.sv`, `mac_regfile.sv`, `mac_bypass.sv`.
* `mac_pipeline.sv`: the MAC universal pipeline.
* `rtl/pipeline_top.sv`: both pipelines side by side.
* `tb/`: one `<module>_tb.sv` per module, plus `dlx_tb_pkg.sv`, `dlx_checker.sv`, `mac_tb_pkg.sv` and
  `mac_checker.sv`.
