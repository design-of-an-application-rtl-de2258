# A small FIR-filter ASIP: three-stage pipelined 32-bit processor

This is an application-specific instruction-set processor (ASIP) cut down to
run one job: FIR filtering, which is a sum of coefficient × sample products.
It is a 32-bit load/store machine with a three-stage pipeline (fetch, decode,
execute), 16 general-purpose registers, separate program and data memories
and nine operations. The set was reached by profiling a FIR program on a
larger general-purpose processor (19 instructions, 32 registers) and dropping
every instruction the program never executed. What is left is just enough
for a multiply-accumulate loop:

```
loop: ldr  r4,[r3+r8]      ; A[i]
      ldr  r6,[r5+r8]      ; X[i]
      mul  r4,r4,r6
      add  r2,r2,r4        ; accumulate
      mvm  [r10+0x02a],r2  ; store running sum Y[i]
      incr r10
      incr r8
      incr r0
      jne  r0,r1,loop      ; two delay slots follow
      nop
      nop
```

With A = {4, 5} and X = {6, 7} this leaves 59 in `r2` and at data address
0x2b. The testbench `tb_asip_top` runs that case.

## Instruction set and encoding

Every instruction is one 32-bit word. The major opcode is bits [31:26]. `ldm`
is the exception: it uses only bits [31:28], so its address field can be 12
bits wide. Register fields are 5 bits wide. With 16 registers built, indices
16–31 read as zero and writes to them are dropped.

| op    | [31:26]  | fields                                            | effect |
|-------|----------|---------------------------------------------------|--------|
| nop   | 000000   | all zero                                          | — |
| add   | 000000   | src1[25:21] src2[20:16] dest[15:11] func[5:0]=000001 | dest = src1 + src2 |
| mul   | 000000   | same, func = 000110                               | dest = low 32 bits of src1 × src2 |
| incr  | 000000   | src[25:21], [20:6] = 0, func = 000110             | src = src + 1 |
| sub/and/or | 000000 | same as add, func = 000010 / 000011 / 000100   | dest = src1 −/&/\| src2 |
| ldr   | 100100   | src1 src2 dest, [10:0] = 0                        | dest = DM[src1 + src2] |
| ldm   | 1101 ([31:28]) | imm_addr[27:16] imm_value[15:0]             | DM[imm_addr] = imm_value |
| mvm   | 100011   | src[25:21] base[20:16] 0000 ofs[11:0]             | DM[base + ofs] = src |
| jne   | 111000   | src[25:21] dest[20:16] target[15:0]               | if dest ≠ src: PC = target (after 2 delay slots) |
| movi  | 100001   | 00000 dest[20:16] xxxx imm[11:0]                  | dest = imm |

The layouts and opcodes of nop, add, mul, incr, ldr, ldm, mvm, jne and movi
reproduce the machine words of the reference FIR program bit for bit. For
example, `d00a0002` is `ldm 0x00a,0x0002`, `00862006` is `mul r4,r4,r6`,
`8c4a002a` is `mvm [r10+0x02a],r2` and `e020000d` is `jne r0,r1,0x000d`.
The testbench `tb_asip_decoder` checks that these words decode as shown.

Some encoding points are this design's own choices:

* **mul and incr share function code 000110.** A word with that code is
  decoded as `incr` when both its src2 and dest fields are zero, and as `mul`
  otherwise. A consequence is that `mul rX, rY, r0` with rY = r0 cannot be
  written.
* **sub, and and or** sit in the ALU group under the codes 2, 3 and 4. The
  reduced processor was described as able to drop them. They are kept here
  because they cost one adder mode and two gates per bit.
* **Immediates** are zero-extended.
* **Unknown words** decode as nop.

## Pipeline, timing and hazards

```
        FE                      DC                                  EX
  PC ──> program memory ─> [IR] ─> decoder ─> operand read ─> [DC/EX] ─> ALU / mul / load-store / jne
  ^                                            ^  (bypass) <──────────────── result
  └──────────────── jne target, taken ─────────────────────────────────────┘
```

* **One instruction per cycle.** Each stage takes one cycle and nothing stalls
  by itself. An instruction's result is written to the register file or data
  memory at the clock edge that ends its EX cycle. That is the third edge
  after its address was on the fetch bus.
* **Two branch delay slots.** `jne` compares its two registers in EX. By then
  the next two instructions are already in DC and FE, and they are not
  flushed: they always execute. The PC then loads the target. This is why
  every loop's `jne` is followed by two `nop`s. Useful instructions may be
  put in those slots instead. A `jne` must not sit in the delay slot of a
  taken `jne`; an assertion in `asip_pipe` reports it if one does.
* **Bypass.** Registers are read in DC and written at the end of EX. When the
  instruction in DC reads the register the instruction in EX is about to
  write, the pipeline controller (`asip_pipe_ctrl`) selects the EX result
  instead. So a load followed at once by an instruction that uses the loaded
  value (`ldr r6,...` then `mul r4,r4,r6`) needs no stall. As a result,
  programs see plain sequential semantics except for the delay slots.
* **Memory timing.** Both memories are read combinationally and written at
  the clock edge. The data memory has a single port used only by EX: `ldr`
  reads it, while `ldm` and `mvm` write it. The data address is computed one
  stage earlier, in DC (`asip_dc_arith`): src1+src2 for `ldr`, base+offset
  for `mvm`, the immediate for `ldm`. That leaves EX with one ALU operation
  or the memory access.
* **Stall.** Holding `en` low freezes the PC and both pipeline registers. It
  also suppresses every register write, memory write and branch. The frozen
  EX instruction takes effect once, when `en` returns high.

For an N-tap run of the FIR program above, the prologue takes P = 2N + 9
instructions. Each loop pass takes 11 cycles: 9 instructions plus 2 delay
slots. The last result is stored in cycle P + 11(N−1) + 6, counting the first
enabled cycle as 0. `tb_asip_top` checks this exact cycle, which is 30 for
N = 2.

## Structure

| module | stage / role |
|--------|--------------|
| `asip_top` | the whole processor: pipeline plus register file plus memories |
| `asip_pipe` | the FE/DC/EX pipeline |
| `asip_fetch` | FE: program counter, next-PC choice |
| `asip_fe_dc_reg` | FE/DC register (instruction register IR) |
| `asip_decoder` | DC: instruction decode into `dec_t` |
| `asip_pipe_ctrl` | stall and bypass selects |
| `asip_dc_arith` | DC: operand selection, data-address generation |
| `asip_dc_ex_reg` | DC/EX register (`dc_ex_t`) |
| `asip_ex_arith` | EX: ALU, multiplier, jne, load/store, write-back |
| `asip_regfile` | 16 × 32-bit GPRs, 2 read ports + 1 inspection port, 1 write port |
| `asip_prog_mem` | 32 × 32-bit program memory, load port |
| `asip_data_mem` | 67 × 32-bit data memory, inspection port |
| `asip_pkg` | widths, opcodes, `ex_op_e`, `dec_t`, `dc_ex_t` |

The top splits into memories, register file and pipeline. The pipeline holds
a fetch unit, two pipeline registers, a decode-stage arithmetic unit with the
decoder and controller, and an execute-stage arithmetic unit. This follows
the entity structure that the processor's generated RTL had.

### Parameters of `asip_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_REGS` | 16 | general-purpose registers. Set it to 32 for the register file of the general-purpose starting point. |
| `PM_DEPTH` | 32 | program words. The reduced model quoted 22 words (0x00–0x15), but the FIR program itself is 25 words long, so 32 is used. |
| `DM_DEPTH` | 67 | data words, addresses 0x00–0x42. This is the upper end of the reduced data range. The FIR program uses 0x0a (tap count), 0x10.. (coefficients), 0x1a.. (samples) and 0x2a.. (results). |

## Using it

Ports of `asip_top`:

* **Clock and reset:** `clk`, and `rst_n`, which is synchronous and
  active-low. Reset clears the PC, both pipeline registers and all registers.
  Data memory is not cleared.
* **Enable:** `en`. Low means stall.
* **Program load:** `pm_we`, `pm_waddr`, `pm_wdata`. One word is written per
  rising edge.
* **Inspection:** `dbg_reg_idx`/`dbg_reg_data` and `dbg_dm_addr`/`dbg_dm_data`.
  These are combinational reads.
* **Status:** `pc`, `stall`, `fwd_a`, `fwd_b`, `br_taken`, and `ex_op` (the
  operation now in EX).

To run a program:

1. Hold `en` low and load the program.
2. Pulse `rst_n` low.
3. Raise `en`.

There is no halt instruction. Pad the program with nops, which are all-zero
words; addresses past the memory also read as nop. Then watch `pc` or the
results.

`tb/asip_asm_pkg.sv` has one encoder function per instruction and
`fir_program(n, a, x, loop_pc)`, which assembles the N-tap program above.
To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/asip_pkg.sv tb/asip_asm_pkg.sv \
    tb/tb_asip_top.sv --top-module tb_asip_top
./obj_dir/Vtb_asip_top
```

Every testbench prints `TB_RESULT checks=N failures=M` at the end. The
testbenches are:

* `tb_asip_top` runs the whole design at its defaults:
  * the 2-tap case, which must give 59;
  * a random 5-tap case;
  * the same 5-tap case with random stalls.

  It checks results, registers and the cycle of the last store. It also
  counts each mechanism (both bypass paths, taken and not-taken `jne`,
  stalls, every operation) and fails if any never happened.
* `tb_asip_pipe` runs 60 random programs on the pipeline. The programs have
  dense register dependencies, forward branches with their delay slots, and
  random stalls. After each one it compares every register and data word
  with a sequential reference model that includes the delay slots. It also
  checks that E executed instructions complete in E + 2 cycles.
* Each other module has its own `tb_asip_<module>.sv`, which compares the
  module with an independent reference.

## How far it follows the processor it reproduces, and where it departs

Taken from the processor's description:

* three stages FE/DC/EX;
* 32-bit registers and memories;
* 16 GPRs;
* separate program and data memories;
* the operation set nop, incr, add, mul, movi, ldm, ldr, mvm, jne;
* the bit layout and opcodes of those operations, as set by the machine words
  of the FIR program;
* the FIR test case and its result, 59;
* a data range ending at 0x42.

Chosen here, because the description is silent or inconsistent:

* **Delay slots.** Taken jne does not flush. This was read from the two nops
  after each `jne` and from a run profile with no flushes or stalls.
* **Hazards.** Operand bypass from EX to DC, not interlocks.
* **Memory ports.** Combinational memory reads, the program-load and
  inspection ports, and the core enable.
* **Where the address is computed.** The split of work between the DC and EX
  arithmetic units.
* **Encoding details.** The incr/mul tie rule, and the sub/and/or codes.
* **Program-memory size.** 32 words rather than the quoted 22, which cannot
  hold the program.
* **Reset.** Reset values, and an active-low synchronous reset.
* **FIR program.** The two registers the reference listing uses but never
  loads are set up explicitly: `movi r5,0x1a` for the sample base, and
  `ldr r1,[r2+r0]`, which loads the tap count from 0x0a. The loop then
  branches back to its first load.

Not built:

* the larger general-purpose processor the ASIP was compared against. It had
  19 instructions (decr, not, xor, mac, jmp, mov, shl, shr and others) whose
  encodings are unknown;
* the unexplained debugger resources `SET` and `BPC`;
* anything physical (layout, timing closure).
