# Microcode engine chain with branch-coverage checkers

Code coverage tools measure RTL, but a microcode-driven block has much of its
behaviour in the microcode in its instruction SRAM. Line or toggle coverage of
the processor only shows that each opcode worked at some point. It does not show
whether every branch of every microcode flow went both ways. This design adds
that measurement in hardware terms. For each conditional branch in the
microcode, a small checker watches the processor's instruction-SRAM pins. It
records whether the branch was seen **taken** and whether it was seen **not
taken**. Each branch gives two coverage bins, and the binder that holds all the
checkers of a processor reports how many of the bins have fired.

The design around the checkers is a microcode IP with four programmable
engines in a chain. Each engine has its own processor, its own instruction SRAM
and its own set of checkers.

```
 cmd in ─► [engine 0] ─► [engine 1] ─► [engine 2] ─► [engine 3] ─► cmd out
              │
              ├── ucode_processor ──SRAM pins──► inst_sram
              │                          └─────► ucode_binder ─► ucode_fc_checker × NUM_BR
              └── coverage outputs (hit strobes, sticky bins, counts, covered-bin total)
```

## How a branch shows up on the SRAM bus

This is the key to the whole design. The processor has a four-stage pipeline
(fetch, decode, execute, write-back) and **one branch delay slot**. The SRAM
delivers an instruction one clock after its address. Take a conditional
branch stored at word `SRC`:

| cycle | SRAM address driven | decode stage holds | execute stage holds |
|-------|---------------------|--------------------|---------------------|
| t     | `SRC`               | the `cmp` at SRC-1 | –                   |
| t+1   | `SRC+1` (delay slot)| the branch         | the `cmp`           |
| t+2   | `DST` or `SRC+2`    | delay-slot instr.  | the branch          |

The branch is resolved in decode at t+1. Its condition comes from the `cmp`,
which is in execute in that same cycle, so the compare result is forwarded
straight to the branch. Meanwhile the delay slot `SRC+1` is already being
fetched, so it always runs. The first address that the branch can change is
the one driven at t+2. So, with no stall in between:

* **step next** (not taken): three back-to-back reads of `SRC`, `SRC+1`, `SRC+2`
* **branch** (taken): three back-to-back reads of `SRC`, `SRC+1`, `DST`

Only the SRAM pins are needed to see this. That is why the checker can sit
outside the processor and needs no change to it. The same microcode flow
reached from different callers is also counted once per branch outcome, not
once per address, which is the point of measuring branches rather than
addresses. A read is a cycle with `csn` low and `wen` high. Writes (the
microcode load) and idle cycles break a sequence.

## Blocks

### `ucode_fc_checker`: one branch, two bins

Parameters: `SRC_PC` (the word address of the branch) and `DST_PC` (its taken
target). Inputs: `i_clk`, `i_rstn`, `i_inst_mem_csn`, `i_inst_mem_wen` and
`i_inst_mem_a[15:0]`. Two flops track the sequence: "SRC was read last cycle"
and "SRC then SRC+1 were read in the last two cycles". The third read decides
which bin fires.

* `o_step_next_hit` / `o_branch_hit` pulse in the cycle of the third read.
* `o_*_covered` go high on the next edge and stay high until reset.
* `o_*_count` count the hits and saturate at all ones.
* Reset clears everything and blocks the check.

If `DST_PC == SRC_PC+2`, the two bins cannot be told apart and both fire.

Checkers like this one are usually written as SVA `cover property` statements
and used only in simulation. Here the checker is plain synthesizable logic,
so the coverage can also be read from an FPGA prototype or from silicon. The
testbench keeps the SVA form as a cross-check.

### `ucode_binder`: all the checkers of one microcode image

The binder has one checker per branch: `NUM_BR` entries in `SRC_PCS`/`DST_PCS`.
All of them watch the same SRAM pins. `o_covered_bins` gives the "covered of
2·NUM_BR" figure. The branch list belongs to the microcode and not to the RTL,
so it has to be regenerated whenever the microcode changes. It is best
produced by a script that reads the disassembled microcode and emits one
`(source, target)` pair per conditional branch. The default list holds two
example branches: `'h807f → 'h808e` and `'h8082 → 'h8087`.

### `ucode_processor`: the engine's CPU

* **Fetch** drives the SRAM with the PC.
* **Decode** takes the word from the SRAM output and resolves branches.
* **Execute** reads the registers `r0..r15`, with forwarding from write-back,
  and runs the ALU, `cmp` and the command-port transfers.
* **Write-back** writes the register file.

The pipeline runs one instruction per clock. It has no branch penalty beyond
the delay slot. A straight-line program of N instructions keeps `o_busy` high
for N+3 cycles.

Instruction word (this design's own encoding, defined in `ucode_pkg`):
`[31:28]` opcode, `[27:24]` rd or branch condition, `[23:20]` rs,
`[19:16]` rt, `[15:0]` immediate or absolute branch target.

| op | meaning | op | meaning |
|----|---------|----|---------|
| `nop` | – | `movi rd,imm` | rd = zero-extended imm |
| `add rd,rs,rt` | rd = rs+rt | `movhi rd,rs,imm` | rd = {imm, rs[15:0]} |
| `addi rd,rs,imm` | rd = rs+sext(imm) | `cmp rs,rt` | set eq / signed lt / unsigned lt |
| `sub`, `and`, `or`, `xor` | rd = rs op rt | `br cc,target` | if cc: pc = target, after one delay slot |
| `lsr`/`lsl rd,rs,imm` | shift by imm[4:0] | `in rd` | rd = next upstream command word |
| `halt` | stop fetching | `out rs` | send rs downstream |

Branch conditions: `al` (unconditional), `eq`, `ne`, `lt`, `ge` (signed), `ltu`,
`geu` (unsigned). Codes 7–15 never branch. The delay slot must not hold a
branch or a `halt`.

`in` waits for `i_cmd_valid`. `out` waits when the one-word output register is
still full and `i_cmd_ready` is low. While waiting, fetch, decode and execute
hold, the SRAM is not read (its output keeps the decoded word), and a bubble
goes to write-back. `halt` stops fetching, and the engine becomes idle once
the pipeline drains.

While idle (`o_busy` low), the processor passes the load port
(`i_load_en/addr/data`) to the SRAM as writes, one word per clock. Load
requests made while busy are ignored. `i_start` starts fetching at
`i_start_pc`. `o_stall`, `o_br_taken` and `o_br_not_taken` are one-cycle status
strobes.

### `inst_sram`

This is a single-port array of `2**AW × DW` words (65536 × 32). `csn` and `wen`
are active low, and a read has one cycle of latency. The output holds while
the SRAM is not being read. The array has no reset: microcode is written
before the engine starts. For a real chip, replace it with a foundry macro
that has the same pins.

### `ucode_engine` and `ucode_ip_top`

`ucode_engine` wires a processor, its SRAM and a binder together. The binder
sees exactly the pins that the SRAM sees.

`ucode_ip_top` chains `NPROC = 4` engines on 32-bit valid/ready command links.
The top's upstream port feeds engine 0, engine *i*'s `out` feeds engine
*i+1*'s `in`, and the last engine drives the top's downstream port. Microcode
is loaded through one shared port with an engine select (`i_load_sel`). Each
engine is started on its own with `i_start[e]` and `i_start_pc[e]`.

Each engine runs its own microcode, so each engine has its own branch list
(`SRC_PCS[e]`, `DST_PCS[e]`) and its own branch count (`NUM_BRS[e]`, at most
`NUM_BR`). An engine uses the low `NUM_BRS[e]` entries of its row, and its
unused coverage outputs read as zero. All ports are plain packed vectors
indexed by engine.

Main parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `NPROC` | 4 | engines in the chain |
| `NUM_BR` | 2 | largest branch list (checker count) of an engine |
| `NUM_BRS` | 2 for every engine | checkers of each engine |
| `SRC_PCS`, `DST_PCS` | the two example pairs, for every engine | branch lists |
| `CNT_W` | 16 | width of the hit counters |

At the defaults, each engine has two checkers. A real microcode image has
more. The case-study configuration in the testbenches uses 18, 29, 13 and 41
checkers (202 bins), which needs `NUM_BR = 41` and `NUM_BRS = {41,13,29,18}`
(engine 0 is the least significant entry).

## What is specified and what is chosen here

These points come from the microcode-coverage method this design implements:

* the two coverage sequences and the checker's pin names
* the one-cycle SRAM fetch and the single delay slot
* one checker per branch, and one binder per processor
* four processors, in a chain
* the 16-bit SRAM word address and the `cmp`-then-branch idiom (`bge` is
  a signed ≥)

These are this design's own choices, because the method leaves them open:

* **ISA and encoding.** Only a few mnemonics were given. The rest of the ISA,
  the encoding, the flags and the absolute branch targets are chosen here.
  Microcode listings that use byte addresses map to SRAM word addresses as
  `byte_addr[17:2]`.
* **Branch resolution.** Branches are resolved in decode, with the `cmp` result
  forwarded from execute. This is what makes the taken sequence
  `SRC, SRC+1, DST` come out back to back.
* **Data transfer.** "Data transfer" is modelled as `in`/`out` on the chain's
  command links. There is no data memory.
* **Handshakes and control.** The valid/ready command links, the load/start
  interface, `halt` and the stall rules are chosen here.
* **Reset.** Reset is asynchronous and active low, and clears pipeline, flags
  and registers.
* **SRAM pins.** `csn`/`wen` are taken to be active low, so a read is
  `csn=0, wen=1`.
* **Checker form.** The checker is synthesizable logic with sticky bins and
  saturating hit counters, not simulation-only `cover property` statements.
  The checker sets are instantiated inside each engine, not attached with
  `bind`.
* **Covered-bin total.** `o_covered_bins` is computed in hardware. Normally the
  coverage tool would work out this figure.
* **Other IP blocks.** Other parts of such an IP (context FIFOs, response
  handler, SFR block) are not included. The chain's two ends are top-level
  ports instead.

## Testbenches

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog. The testbenches share
three packages in `tb/`:

* `ucode_asm_pkg` is an assembler: one function per instruction.
* `ucode_iss_pkg` has an instruction-level model of the processor, with the
  delay slot written out explicitly. The model records the executed-address
  trace, the branch outcomes and the output words.
* `ucode_iss_pkg` also has a random program generator and two microcode
  programs: a command loop whose branches sit on the default checker
  addresses, and a bit-test loop with any number of branches.

| testbench | what it shows |
|-----------|---------------|
| `tb_inst_sram` | write/read-back, one-cycle latency, output hold |
| `tb_ucode_fc_checker` | directed and 20 000 random bus cycles against a model and against the SVA sequences; near misses (write or idle in the sequence); reset |
| `tb_ucode_binder` | three checkers, bins and total after each step, coinciding bins |
| `tb_ucode_processor` | SRAM read trace and outputs equal the model on 24 random programs with port stalls; N+3 busy cycles; the `cmp r2,r12 / bge` example with `SRC, SRC+1, DST` in consecutive cycles |
| `tb_ucode_engine` | the bins fill one by one as commands steer the two branches; counts against the model |
| `tb_ucode_ip_top` | four engines at default parameters: 400 commands through the chain, output stream and per-engine coverage against the chained model; counts taken/not-taken branches, stalls, back-pressure and halts, and each must occur |
| `tb_ucode_case_study` | case-study configuration (18/29/13/41 checkers): 6 000 random commands, every checker's counts against the model, 202/202 bins |

To run one with Verilator (5.x):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ucode_pkg.sv tb/ucode_asm_pkg.sv tb/ucode_iss_pkg.sv \
  tb/tb_ucode_ip_top.sv --top-module tb_ucode_ip_top -o sim
./obj_dir/sim
```

Replace the last file and `--top-module` to run another testbench. Each one
finishes in seconds.

## Using the checkers with new microcode

1. Assemble the microcode and load it through the load port.
2. For each conditional branch, add its word address and its taken target to
   that engine's row of `SRC_PCS`/`DST_PCS`, and set `NUM_BRS[e]`.
3. Run the tests, then read `o_step_next_covered`/`o_branch_covered`.

A bin that never fires is either a microcode path that the tests do not reach
or a path that cannot happen. Unconditional branches should be left off the
list, because their step-next bin can never fire.
