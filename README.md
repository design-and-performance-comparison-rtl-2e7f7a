# Two-stage pipelined RV32 ALU accelerator with status flags, on AXI4-Lite

A processor on a Zynq-class device hands a single integer operation — two
32-bit operands and an opcode — to a small unit in programmable logic, and
reads back the result together with Zero, Carry, Overflow and Negative
flags. The unit is an ALU for the eight RV32I register-register operations
(ADD, SUB, AND, OR, XOR, SLL, SRL, SLT), split into two pipeline stages so
that the adder and the result multiplexer sit in one clock period and the
output register in the next. The split costs one extra cycle of latency but
allows a faster clock: the reference implementation reports 150 MHz for the
pipelined unit against 100 MHz for a single-cycle ALU, so 150 million
operations per second instead of 100. The ALU sits behind a memory-mapped
AXI4-Lite slave, so software drives it with ordinary loads and stores.

```
 processor ──AXI──> interconnect ──AXI4-Lite──> alu_axi_wrapper
 (Zynq PS, M_AXI_GP0)  (address decode,           ├─ registers OP_A, OP_B, OPCODE, CONTROL
                       base 0x4000_0000)          ├─ alu_pipelined
                                                  │    ├─ Execute:   alu_execute + Execute register
                                                  │    └─ Writeback: output register
                                                  └─ registers RESULT, FLAGS, DONE/BUSY
```

The processor, the AXI interconnect and the reset block of the
reference system are vendor parts and are not in this RTL; the top module
`alu_axi_wrapper` exposes the AXI4-Lite slave port they connect to. The
single-cycle ALU that the pipelined unit is usually compared with is not
part of this RTL either.

## The pipeline and its handshake

`alu_pipelined` is the heart of the design and the part that needs most
care when you reuse it.

* **Execute.** `alu_execute` computes the operation combinationally from
  `in_a`, `in_b`, `in_op`. When a request is accepted (`in_valid && in_ready`
  at a rising edge) its result and flags are written into the Execute
  register, and the stage's valid bit is set.
* **Writeback.** At the next edge at which it can move, the Execute register
  is copied into the output register, which drives `out_result`,
  `out_flags` and `out_valid`.

Flow control is valid/ready on both sides. A stage may take new contents
when it is empty or when the stage after it is emptying in the same edge:

```
wb_ready = !out_valid || out_ready
in_ready = !ex_valid  || wb_ready
```

So `in_ready` depends combinationally on `out_ready` (through one AND/OR
level) — keep that in mind if you chain this unit with logic that makes
`out_ready` from `in_valid`. Nothing is dropped or duplicated under
back-pressure, and a result waiting for `out_ready` keeps its value; an
assertion (`a_out_hold`) checks the latter in simulation.

Timing, with `out_ready` high:

```
edge       0          1           2
accept     op0        op1         op2  ...
Execute               op0         op1
output                            op0 valid    (2 cycles after acceptance)
```

One request is accepted and one result delivered every cycle once the pipe
is full. Reset (`rst_n`, synchronous, active low) clears only the two valid
bits.

## Operations and flags

Opcodes are 4 bits, reusing the RV32I encoding `{funct7[5], funct3}` so a
core's decoder fields can be passed straight in:

| op  | code | result                      | C                  | V                 |
|-----|------|-----------------------------|--------------------|-------------------|
| ADD | 0000 | a + b                       | carry out of bit 31 | signed overflow  |
| SUB | 1000 | a − b                       | 1 = no borrow (a ≥ b unsigned) | signed overflow |
| SLL | 0001 | a << b[4:0]                 | 0                  | 0                 |
| SLT | 0010 | 1 if a < b (signed), else 0 | 0                  | 0                 |
| XOR | 0100 | a ^ b                       | 0                  | 0                 |
| SRL | 0101 | a >> b[4:0] (logical)       | 0                  | 0                 |
| OR  | 0110 | a \| b                      | 0                  | 0                 |
| AND | 0111 | a & b                       | 0                  | 0                 |

Z (result is zero) and N (bit 31 of the result) are produced for every
operation. Any other opcode gives result 0 (so Z = 1) and raises no error.
One adder serves ADD, SUB and SLT: SUB and SLT add `~b` with a carry-in of
1, and SLT takes `N xor V` of that difference, which is correct even when
the subtraction overflows. The carry convention for SUB (carry = not
borrow) is the one that lets software chain subtractions word by word;
likewise the ADD carry supports multi-word addition done in software. There
is no add-with-carry or conditional-move operation in hardware.

## Register map and software sequence

32-bit registers at byte offsets from the slave's base address:

| offset | name    | access | content |
|--------|---------|--------|---------|
| 0x00   | CONTROL | W      | bit 0 START: writing 1 launches one operation (self-clearing) |
|        |         | R      | bit 1 DONE: a result has arrived since the last START; bit 2 BUSY: an operation is in the pipeline |
| 0x04   | OP_A    | R/W    | operand A |
| 0x08   | OP_B    | R/W    | operand B |
| 0x0C   | OPCODE  | R/W    | bits 3:0 opcode, upper bits read 0 |
| 0x10   | RESULT  | R      | result of the last completed operation |
| 0x14   | FLAGS   | R      | bit 0 Z, bit 1 C, bit 2 V, bit 3 N |

Unmapped offsets read 0 and ignore writes; every response is OKAY; byte
strobes are honoured on OP_A, OP_B and OPCODE. A typical access is:

```
write OP_A, OP_B, OPCODE
write CONTROL = 1
read CONTROL until bit 1 (DONE) is set
read RESULT, FLAGS
```

With the START write taking effect at edge *k* (the edge at which BVALID
rises), the request enters the ALU at *k*+1, leaves it at *k*+2 and DONE is
set at *k*+3. Any read of CONTROL issued after the write response has been
taken will in practice see DONE within one or two polls. START may be
written again while an operation is in flight; each START is a separate
operation, and RESULT/FLAGS hold the latest one to complete.

Bus behaviour: the address and data channels of a write are accepted
independently, in either order; the register is written when both have
arrived and BVALID follows at the same edge. One write and one read may be
outstanding at a time. A read returns RVALID one cycle after the address is
accepted. The wrapper always accepts ALU results, so inside this wrapper
the ALU never sees back-pressure.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `alu_execute`, `alu_pipelined` | `WIDTH` | 32 | data width; shifts use log2(WIDTH) bits of b |
| `alu_axi_wrapper` | `C_S_AXI_DATA_WIDTH` | 32 | register width |
| `alu_axi_wrapper` | `C_S_AXI_ADDR_WIDTH` | 5 | must be at least 5 for the six registers |

Shared types — the opcode enum `alu_op_e`, the flag struct `alu_flags_t`,
register offsets and control bits — live in `alu_pkg`.

## What follows the reference design and what is chosen here

Taken from the reference design: 32-bit data; the eight operations; the
four flags; two stages named Execute (operation and flags) and Writeback
(register and forward the result); two-cycle latency and one result per
cycle; valid/ready flow control on the pipelined unit; an AXI4-Lite slave
with control, operand A, operand B, opcode and result registers, with the
control register starting the computation; the names `alu_axi_wrapper` and
`alu_pipelined` and the S_AXI / ACLK / ARESETN port groups.

Chosen here, because the reference leaves it open: the opcode encoding; the
C and V conventions (SUB carry = not borrow; C and V are 0 outside ADD and
SUB); result 0 for illegal opcodes; shift amount from b[4:0]; the register
offsets; the FLAGS register and the DONE/BUSY bits; START as a
self-clearing bit 0; the address width; the bus timing; OKAY for every
access; synchronous active-low reset; the exact ready equations.

Not modelled: the processor, interconnect and reset block; the
clock frequency and resource figures of an FPGA implementation, which RTL
simulation cannot show. For orientation, the reference implementation of
the pipelined unit reports about 80 LUTs and 152 flip-flops; generic
synthesis of this wrapper (which also holds the AXI address/data latches)
gives about 260 flip-flop bits.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
an independent reference model written with 64-bit integer arithmetic and
prints `TB_RESULT checks=N failures=M`:

* `alu_execute_tb` — directed corner cases (carries, overflow both ways,
  zero results, maximum shifts, SLT where signed and unsigned order differ,
  illegal opcodes) and 4000 random operations.
* `alu_pipelined_tb` — a scoreboard over 200 back-to-back requests, checking
  that each result appears exactly two cycles after acceptance and that 200
  requests are accepted in 200 cycles; then 3000 cycles of random
  `in_valid`/`out_ready`, counting input stalls, output stalls and bubbles
  (each must occur).
* `alu_axi_wrapper_tb` — end to end at the default parameters, over the bus:
  register read-back and byte strobes, every opcode and flag, an illegal
  opcode and an unmapped offset, all bus orderings and delayed
  BREADY/RREADY, the exact DONE timing (CONTROL read three edges after
  START shows busy, four edges after shows done), two STARTs in a row, 1000
  random operations, and a loop of 200 back-to-back operations, which take
  20 bus cycles each as software sees them.

To run one with plain Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
  rtl/alu_pkg.sv rtl/alu_execute.sv rtl/alu_pipelined.sv rtl/alu_axi_wrapper.sv \
  tb/alu_axi_wrapper_tb.sv --top-module alu_axi_wrapper_tb -o sim
./obj_dir/sim
```

Replace the testbench file and top module for the others; `alu_execute_tb`
needs only `alu_pkg.sv` and `alu_execute.sv`, `alu_pipelined_tb` adds
`alu_pipelined.sv`. Each run takes well under a second.

## Files

* `rtl/alu_pkg.sv` — opcodes, flag struct, register map constants
* `rtl/alu_execute.sv` — Execute-stage operation and flag logic
* `rtl/alu_pipelined.sv` — two-stage pipeline with valid/ready
* `rtl/alu_axi_wrapper.sv` — AXI4-Lite slave and registers; top module
* `tb/*_tb.sv` — one testbench per module
