# RV32I pipeline with a decoupled, clock-gated floating-point coprocessor

This is a 32-bit RISC-V processor (RV32I, five-stage pipeline) that hands
single-precision floating-point arithmetic to a separate coprocessor instead of
putting an FPU inside its Execute stage. The decoder looks at the major opcode.
Integer instructions stay in the pipeline. `FADD.S`, `FSUB.S`, `FMUL.S` and
`FDIV.S` go out over a request/response handshake to the coprocessor, which
computes on its own while the pipeline carries on. Inside the coprocessor,
every part has its own glitch-free clock gate. The gate is a flip-flop on the
falling clock edge followed by an AND. So only the unit that is computing
receives clock edges, and an idle coprocessor receives none.

The aims are lower dynamic power when FP work is intermittent, and a shorter
critical path: no wide integer/FP result multiplexer sits in the Execute
stage. No power or timing figures are reproduced here; the RTL is behaviourally
verified only (see *How far it is verified*).

```
 instr_mem ─► IF ─► ID ─────────► EX ──────────► MEM ─► WB
              PC   decode         int ALU        data_mem  │
                   int regfile ◄──forwarding─────────────┤
                   FP  regfile ◄──────────────────── FLW ─┤
                   hazards/scoreboard                      │
                        ▲          │ request {op,a,b,rd}    │
                        │          ▼                        │
                        │   ┌───────────── ext_fpu ────────┐│
                        │   │ fpu_ctrl  (own gated clock)  ││
                        │   │ fp_addsub (own gated clock)  ││
                        │   │ fp_mul    (own gated clock)  ││
                        │   │ fp_div    (own gated clock)  ││
                        │   │      └─► mux ─► fp_round     ││
                        │   └──────────────────┬───────────┘│
                        └──── response {data,rd,flags} ─────┘ (writes FP regfile)
```

## Files

All files are in `rtl/`, one module or package per file.

| module | role |
|---|---|
| `riscv_core_with_ext_fpu` | top: pipeline registers, operand muxes, load/store lane logic, wiring of everything below |
| `riscv_pkg` | opcodes, 4-bit ALU codes, the `ctrl_t` decode record |
| `fpu_pkg` | FP operation codes, flag positions, `fp_unr_t` (unrounded hand-off), request/response payload structs, NaN/inf/zero helpers |
| `if_stage` | PC register: +4, stall, redirect |
| `instr_mem` | instruction array, combinational fetch, program-load write port |
| `control_unit` | decoder; routes an instruction to the integer pipeline or to the coprocessor |
| `int_regfile`, `fp_regfile` | 32×32 register files, two reads, one write, write-first |
| `int_alu` | RV32I ALU plus the branch comparison |
| `forwarding_unit` | EX operand bypass selects (EX/MEM, MEM/WB) |
| `hazard_unit` | stall/bubble/flush control |
| `fpu_intf` | FP-register busy scoreboard (32 bits) and sticky `fflags` (5 bits) |
| `data_mem` | byte-enabled data array, combinational read, debug read port |
| `ext_fpu` | the coprocessor: control, three arithmetic units, shared rounding, four clock gates |
| `fpu_ctrl` | coprocessor FSM and handshake |
| `fp_addsub`, `fp_mul`, `fp_div` | arithmetic units, each registering an unrounded result on its own gated clock |
| `fp_round` | normalisation, round-to-nearest-even, IEEE exception flags |
| `clock_gate` | negative-edge flip-flop + AND clock gate |

## The coprocessor handshake and decoupled execution

This is the part of the design that needs the most care.

**Channels.** The top connects the core to the coprocessor with two
valid/ready channels:

* Request: `x_issue_valid` / `x_issue_ready`. The payload `x_req_t` is
  `{op[2:0], a[31:0], b[31:0], rd[4:0]}`.
* Response: `x_result_valid` / `x_result_ready`. The payload `x_rsp_t` is
  `{data[31:0], rd[4:0], flags[4:0]}`.

A transfer takes place on a rising edge where valid and ready are both high.
Assertions check two rules:

* a request that has not been accepted stays offered, unchanged;
* a response that has not been taken stays offered, unchanged.

**Where FP operands live.** The FP register file is in the core, beside the
integer one. Decode reads both FP sources. The values travel with the request,
so the coprocessor needs no register file of its own. The response carries the
destination register number, `rd`, back with the result. The core then writes
the result straight into the FP register file and ORs `flags` into `fflags`.

**Issue.** An OP-FP instruction reaches EX and raises `x_issue_valid`.
* If the coprocessor is idle (`x_issue_ready` = 1), the request is accepted on
  that edge and the instruction leaves the pipeline. A bubble goes on to MEM.
* If the coprocessor is still busy with an earlier operation, IF, ID and EX
  freeze and bubbles enter MEM until the request is accepted. Only one
  operation is outstanding at a time.

**Running ahead.** After issue, later instructions continue as long as they do
not touch the pending result. `fpu_intf` keeps one busy bit per FP register.

* The bit is set when an instruction that will write that register leaves
  decode. This covers FP arithmetic and `FLW`.
* It is cleared when the value is written, either by `FLW` write-back or by an
  accepted response.

Decode stalls an instruction whose FP source is busy. It also stalls one whose
FP destination is busy, so that an older pending result cannot overwrite a
newer value. Integer instructions never look at the scoreboard. A 30-cycle
division therefore overlaps with integer work; the top-level test counts this
overlap.

**One write port.** The FP register file has one write port, shared by `FLW`
write-back and coprocessor responses. When both arrive in the same cycle, the
core drives `x_result_ready` low. The coprocessor holds its response, and the
response is written on the next free cycle. That is the only use of response
back-pressure.

**Latency**, counted from the edge that accepts a request to the edge after
which `x_result_valid` is high:

| operation | cycles |
|---|---|
| FADD.S, FSUB.S, FMUL.S | 1 |
| FDIV.S | 29 |
| FDIV.S with a special operand (NaN, infinity, zero) | 2 |

The response is written into the FP register file on the edge where it is
taken. A dependent instruction waiting in decode sees the value in that same
cycle, because the register file is write-first. It enters EX one cycle later.

## Clock gating

`clock_gate` samples its enable on the falling edge of the master clock and
ANDs the master clock with the flip-flop output (`gclk = clk & q`).

* `q` only changes while `clk` is low, so a gated pulse is always a full
  master-clock high phase: never shortened, never a glitch.
* An enable that is settled before the falling edge of cycle *n* decides
  whether the rising edge at the end of cycle *n* is delivered.

The enables come from combinational logic in the master-clock domain, which
settles within the first half of the cycle. That half cycle is the timing
budget for the enable paths.

`ext_fpu` has four gates:

| gate | enabled when |
|---|---|
| control (`fpu_ctrl`, its operand and tag registers) | a request arrives while idle; in every EXEC cycle; when a waiting response is taken |
| adder | the single EXEC cycle of an add/subtract |
| multiplier | the single EXEC cycle of a multiply |
| divider | every EXEC cycle of a divide |

Per operation, the control clock sees three edges: accept, execute and
hand-over. A divide adds one edge per divider cycle. The selected unit sees one
edge; the divider sees 29, or 2 for a special operand. The other units see
none.

While the coprocessor is idle, or holds a response that is not taken yet, all
four gated clocks are stopped. The registers in the gated domains use an
asynchronous reset so that reset works with the clock off. The top brings the
control gate's output out as `fpu_gated_clk` for observation.

On an FPGA or in an ASIC flow, the AND should be a clock-buffer or ICG cell,
and the enable paths need half-cycle constraints. Neither is in the RTL.

## Floating-point arithmetic

The format is IEEE-754 single precision. Rounding is always to nearest, ties
to even: the rounding-mode field of OP-FP instructions is ignored.

Subnormal inputs and outputs are handled in full. The exception flags are
`{NV, DZ, OF, UF, NX}`. Tininess is detected before rounding, so `UF` is
raised when a result is tiny before rounding and also inexact. NaN results
are the canonical quiet NaN `0x7FC00000`. A signalling NaN operand raises NV.

Each unit produces an `fp_unr_t`. This is either a finished special result or
an unrounded value `(-1)^sign · mant · 2^(exp−127−26)` with a sticky bit. In
that form a leading one at bit 26 means an ordinary normal number.

* **`fp_addsub`** orders the operands by magnitude. It aligns the smaller one
  with the shifted-out bits folded into the sticky position, then adds or
  subtracts with guard, round and sticky bits. An exact zero is +0, except
  that −0 + −0 gives −0. inf − inf gives NaN with NV.
* **`fp_mul`** first normalises subnormal significands, so the 48-bit product
  always has its leading one at bit 47 or 46. It passes the top 28 bits on and
  folds the rest into sticky. inf × 0 gives NaN with NV.
* **`fp_div`** performs a radix-2 restoring division of the normalised
  significands: 27 quotient bits, one per cycle, and the final remainder as
  sticky. 0/0 and inf/inf give NaN with NV; finite/0 gives ±inf with DZ.
* **`fp_round`** is shared by the three units and sits after the unit-select
  multiplexer. It normalises with a leading-zero count, and denormalises when
  the exponent is ≤ 0. It rounds by adding the increment to the packed
  `{exponent, fraction}`, so a carry moves into the exponent and can reach
  infinity, which sets OF.

## Integer pipeline

* **Instruction set.** All of RV32I except FENCE, ECALL, EBREAK and the CSR
  instructions. These decode as no-ops, as do unsupported OP-FP encodings
  (FSQRT, FMIN, conversions and so on). There are no CSR instructions, so
  `fflags` is an output port of the top.
* **Branches and jumps** are resolved in EX. When taken, the two younger
  instructions are flushed: a two-cycle penalty, with no prediction.
* **Forwarding.** Integer operands come from EX/MEM or MEM/WB, and EX/MEM wins
  when both match. The selects are 2 bits: `10` EX/MEM, `01` MEM/WB, `00`
  register file.
* **Load-use hazards** cost one bubble. Writes are visible to decode in the
  same cycle (write-first register files).
* **Memories.** Instruction and data memory are 256 words each by default
  (`IMEM_WORDS`, `DMEM_WORDS`). They are arrays with combinational read, and
  the index wraps modulo the size. Byte, halfword and word loads and stores are
  supported. Misaligned accesses are not trapped: the byte lanes are taken from
  the aligned word.
* **Reset.** `rst_n` is active-low: synchronous in the pipeline, asynchronous
  in the coprocessor. Register-file contents are not reset; software must
  write a register before reading it.
* **Loading a program.** While `rst_n` is low, write words through
  `prog_we/prog_addr/prog_data`. The core starts fetching at address 0 after
  reset.
* **Reading results.** `dbg_addr/dbg_data` reads data memory at any time.

## Where this RTL departs from or adds to its source

The source describes the architecture at block level, so the following are
this design's own choices:

* the handshake payloads and exact signal timing;
* the FSM;
* the unit latencies and the division algorithm;
* the busy scoreboard (the core-side interface block has 32 + 5 registers);
* one write port with response back-pressure;
* memory sizes and read style;
* reset style;
* branch resolution in EX;
* the 2-bit forwarding encodings;
* the ALU and FP operation code values.

Three points deliberately differ from the source's wording:

* **FLW and FSW.** The source lists LOAD-FP and STORE-FP among the opcodes that
  go to the coprocessor. Here they use the core's load/store path, because the
  FP register file is in the core's register bank.
* **Where the FP register file sits.** One description puts the FP register
  file inside the coprocessor, and the block diagram puts it in the core. This
  design follows the block diagram, and requests carry operand values.
* **Number of clock gates.** The source's area summary shows a single
  clock-gate cell, while its text says the adder, multiplier and registers are
  gated separately. This design gates four parts separately.

Not built:

* the baseline variant with the FP unit inside the Execute stage, which the
  source only compares against;
* rounding modes other than nearest-even;
* FP operations other than add, subtract, multiply and divide;
* CSRs, traps and interrupts.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/riscv_pkg.sv rtl/fpu_pkg.sv tb/fp_ref_pkg.sv tb/rv_asm_pkg.sv \
    tb/tb_riscv_core_with_ext_fpu.sv --top-module tb_riscv_core_with_ext_fpu
./obj_dir/Vtb_riscv_core_with_ext_fpu
```

For another block, replace the testbench name. The packages are only needed
when the testbench uses them. Testbenches drive inputs just after a rising
edge. This matters for anything feeding a clock-gate enable, which must be
settled before the falling edge.

The support code in `tb/` is:

* **`tb/fp_ref_pkg.sv`** – an FP reference model that is independent of the
  RTL. It computes in `real`, then rounds the double to single by manipulating
  bit fields. It also has a random operand generator aimed at the underflow,
  overflow, cancellation and special-value corners.
* **`tb/rv_asm_pkg.sv`** – instruction encoders and a sequential
  instruction-set simulator.

## How far it is verified

Every module has its own randomised testbench with an independent model. The
floating-point units are checked against the reference model: each unit
thousands of times, and the whole coprocessor with random back-pressure. The
coprocessor tests also check the latencies above and the exact number of edges
each gated clock delivers per operation.

The top-level testbench runs at the default sizes. It generates eight
programs, each with:

* a directed part that exercises every pipeline and coprocessor mechanism;
* a random part of integer ALU, load/store and FP operations with random
  dependencies.

Each program is checked against the instruction-set simulator: the final data
memory (including all registers stored out) and the flags. The test counts
each of the following and fails if any never happens:

* EX/MEM and MEM/WB forwarding;
* load-use stalls;
* FP-scoreboard stalls;
* request stalls;
* flushes;
* response back-pressure;
* integer instructions retiring during an FP operation;
* the coprocessor clock being off for most cycles.

A second top-level testbench, `tb_int_fp_demo`, runs a fixed 21-instruction
bring-up program, also at the default sizes. Its operands are 10 and 3:

* ADD, SUB, AND and OR on the integer side;
* FADD, FSUB, FMUL and FDIV on 10.0 and 3.0 through the coprocessor.

It checks results worked out by hand:

* the order and values of the integer write-backs, and that the first six
  retire on back-to-back cycles;
* the four stored FP results and the flags;
* each request's latency, 1, 1, 1 and 29 cycles;
* the 40 edges the gated control clock delivers in all.

For every module there is also a copy with one deliberate bug, and its
testbench was confirmed to fail on that copy.

A generic mapping with yosys (`synth_xilinx -family xc7`, default sizes) gives
about 2,800 logic LUTs plus about 480 LUTs used as register-file RAM. It also
gives 747 flip-flops, one 18 Kb block RAM and two DSP48 blocks. The RTL has not
been placed and routed, and no power or timing claims are made for it.
