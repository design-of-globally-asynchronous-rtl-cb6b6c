# An 8-bit GALS processor: four clock domains, no global clock

This is a small 8-bit accumulator processor built as a *globally asynchronous,
locally synchronous* (GALS) system. The processor is cut into four synchronous
modules. Each module has its own clock input, and no two clocks need any
frequency or phase relation. The modules pass data only over
request/acknowledge channels. A module with nothing to do stops its own clock
(a *pausible* clock), so only the parts an instruction needs are clocked
while it runs.

The aim of the partitioning is to replace one global clock tree with four small
local ones. A module can then run as fast as its own logic allows rather than
at the speed of the slowest path in the whole processor. The cost is handshake
latency between modules and a few synchronizer flip-flops.

## The four modules

| Module | Clock pin | Role |
|---|---|---|
| `control_unit` (SM1) | `CLK_ctrl_mpu` | takes one instruction at a time, decodes it, starts it in the right module, acknowledges it when done |
| `mux_acc` (SM2) | `CLK_dp_mpu` | the accumulator and the multiplexer in front of it; sends arithmetic work to SM4 |
| `register_memory` (SM3) | `CLK_mem_mpu` | 8 x 8-bit register file: loaded from outside, read for operands |
| `functional_units` (SM4) | `CLK_fu_mpu` | ALU (`alu`) and shifter (`shifter`) |

`gals_processor` is the top level. It only wires these four modules together.

## How an instruction travels

The environment is treated as one more asynchronous partner. It puts an
instruction on `Input_mpu` and toggles `Req_mpu`. When the instruction has
finished, `Ack_mpu` toggles to match, and by then `Output_mpu` (the
accumulator) holds the result. Each arrow below is one channel transfer:

```
LDA/ADD/SUB/AND/OR/XOR r   env -> SM1 -> SM3 -> SM2 [-> SM4 -> SM2] -> SM1 -> env
NOT/SHL/SHR/ROL/ROR/INC/DEC/CLR
                           env -> SM1 -------> SM2 [-> SM4 -> SM2] -> SM1 -> env
NOP, reserved              env -> SM1 -> env
```

The trip in brackets is skipped for LDA and CLR. SM2 finishes those itself by
selecting the register operand or zero. Operations that need no register skip
the register memory entirely. At most one instruction is in flight, because
SM1 acknowledges an instruction only after SM2 reports completion. So each
channel carries at most one word at a time, and no module needs a FIFO.

The channels and their bundled data (types in `gals_pkg`):

| From -> to | Word |
|---|---|
| env -> SM1 | `instr_t` = {op[3:0], unused, addr[2:0]} |
| SM1 -> SM3 | `rm_cmd_t` = {op, addr} |
| SM1 -> SM2 | `opcode_t` (SM2 uses b = 0) |
| SM3 -> SM2 | `ma_cmd_t` = {op, b = R[addr]} |
| SM2 -> SM4 | `fu_cmd_t` = {op, a = acc, b} |
| SM4 -> SM2 | result byte |
| SM2 -> SM1 | new accumulator value ("done") |

## Request/acknowledge channels (`hs_tx`, `hs_rx`)

A channel is a request wire, an acknowledge wire and a data bus. It uses
two-phase (transition) signalling:

* The sender registers the word on `dout` and toggles `req` at the same clock
  edge. Both then stay put. A transfer is outstanding while `req != ack`, and
  `ready` is low during that time.
* The receiver passes `req` through `SYNC_STAGES` flip-flops (2 by default).
  A word is waiting (`valid`) while the synchronized request differs from its
  own `ack`. The local logic asserts `take`, and `ack` toggles at that edge.
* The acknowledge goes back through the sender's own `SYNC_STAGES`
  synchronizer before `ready` rises again.

The data bus is not synchronized. This is the bundled-data rule: the data
changed together with `req` and is held until the acknowledge comes back.
Because the request reaches `valid` only after `SYNC_STAGES` receiver edges,
the data has settled by the time anyone reads it. In a real implementation,
the delay from `dout` to the receiver must be kept below the synchronizer
delay. This is a timing constraint that synthesis must not break.

Cost: one crossing takes about `SYNC_STAGES` to `SYNC_STAGES + 1` receiver
cycles. The channel is free again about `SYNC_STAGES + 1` sender cycles after
that. An ADD makes five crossings (SM1->SM3->SM2->SM4->SM2->SM1), plus one
each way to the environment.

Measured in the end-to-end testbench with four equal 10 ns clocks and
`SYNC_STAGES = 2`, the time from `Req_mpu` to `Ack_mpu` averages about:

| Instruction | Path | Time |
|---|---|---|
| NOP | SM1 only | 3 cycles |
| CLR | SM1 -> SM2 | 8 cycles |
| LDA | SM1 -> SM3 -> SM2 | 11 cycles |
| NOT, shifts, INC, DEC | SM1 -> SM2 -> SM4 | 14 cycles |
| ADD, SUB, AND, OR, XOR | SM1 -> SM3 -> SM2 -> SM4 | 17 cycles |

Almost all of this is synchronizer latency. Each module does at most two
cycles of real work per instruction. The GALS structure pays off when the
module clocks can run much faster than one shared clock could.

Both modules hold an assertion for their rule: no `send` while not `ready`,
and no `take` without `valid`.

## Pausible clocks (`clock_gate`)

Each module has two clock regions:

* The channel endpoints (synchronizers, request and acknowledge flip-flops)
  and the reset synchronizer run on the free-running module clock. A request
  from another domain can therefore always be seen.
* The module's own state (the FSM, the accumulator, the operand registers,
  the register storage) runs on `gclk`. This comes from `clock_gate`, a
  latch-based glitch-free gate: the enable is latched while the clock is low,
  and `gclk = clk & latched_enable`.

Each module computes its enable (`clk_en`) from "is there something to act on":

| Module | Clock runs when |
|---|---|
| SM1 | idle with an instruction waiting, or waiting with "done" arrived |
| SM2 | idle with an operation waiting, or waiting with the SM4 result arrived |
| SM3 | an external write or a read request is present |
| SM4 | an operation arrives, and the one cycle after it that sends the result |

All four also run during reset. As a result, the local clock ticks a fixed
number of times per instruction: SM1 twice (once for NOP), SM2 once for
LDA/CLR and twice for SM4 operations, SM3 once per read or write, and SM4
twice per operation. The end-to-end testbench checks these counts exactly.

The gate's latch is intended. It is the only latch in the design, one per
module. On an FPGA, each `clock_gate` would map to a clock-buffer enable (for
example a BUFGCE) rather than to fabric logic.

## Instruction set

One 8-bit word on `Input_mpu`: bits [7:4] hold the opcode and bits [2:0] a
register address. Bit 3 is ignored. Results wrap modulo 256, and there are no
flags.

| Code | Op | Effect | Code | Op | Effect |
|---|---|---|---|---|---|
| 0 | NOP | none | 8 | SHL | acc <<= 1 |
| 1 | LDA r | acc = R[r] | 9 | SHR | acc >>= 1 (logical) |
| 2 | ADD r | acc += R[r] | A | ROL | rotate left 1 |
| 3 | SUB r | acc -= R[r] | B | ROR | rotate right 1 |
| 4 | AND r | acc &= R[r] | C | INC | acc += 1 |
| 5 | OR r | acc \|= R[r] | D | DEC | acc -= 1 |
| 6 | XOR r | acc ^= R[r] | E | CLR | acc = 0 |
| 7 | NOT | acc = ~acc | F | (reserved) | none |

The register memory is written only from outside, through `Wr_mpu`,
`Add_memory` and `In_memory`. These are sampled on `CLK_mem_mpu`, and the
writes must happen while no instruction is in flight. The storage has no
reset, like a RAM, so load a word before you read it. The accumulator resets
to zero.

## Pins of `gals_processor`

| Pin | Dir | Width | Meaning |
|---|---|---|---|
| `Input_mpu` | in | 8 | instruction word |
| `Req_mpu` / `Ack_mpu` | in / out | 1 | two-phase handshake for `Input_mpu` |
| `Add_memory`, `In_memory`, `Wr_mpu` | in | 3, 8, 1 | register memory write port (on `CLK_mem_mpu`) |
| `CLK_ctrl_mpu`, `CLK_dp_mpu`, `CLK_mem_mpu`, `CLK_fu_mpu` | in | 1 each | module clocks, unrelated |
| `Rst` | in | 1 | active-high reset: asserted asynchronously, released per domain after two flip-flops |
| `Output_mpu` | out | 8 | accumulator |

Parameter: `SYNC_STAGES` (default 2, must be at least 2) sets the depth of
every synchronizer. The data width (8) and the register address width (3) are
constants in `gals_pkg`.

## What is specified and what is this design's own

The following follow the processor's published description: the partitioning
into these four modules and what each holds, the 8-bit data width, the 8-word
register memory with its 3-bit address, the names and widths of the pins, the
active-high reset, request/acknowledge communication between modules, and
stopping idle modules through a pausible clock.

The following are this design's own choices:

* **Instruction set.** The opcode encoding and all of the operations listed
  above. The description names only ADD.
* **Instruction handshake.** The `Req_mpu`/`Ack_mpu` pins. The described pin
  list has no way to say when a new instruction is present.
* **Clock pins.** Two extra clock inputs. The described pin list has clocks
  only for the control unit and the mux+accumulator, even though all four
  modules are said to run at their own frequencies. Here every module has its
  own clock.
* **Channels.** The two-phase signalling, the bundled-data discipline and the
  2-flop synchronizers.
* **Pausing.** The clock pause is a gated incoming clock, not a stretchable
  ring oscillator.
* **Module internals.** Everything inside the modules: the dispatch rule, which
  operations bypass which modules, the asynchronous-read register file, the
  operand registers in SM4, and the reset synchronizers.

The published implementation reports about 69 flip-flops. This RTL
synthesizes to about 129 flip-flop bits plus 64 bits of register storage. Most
of the difference is the two synchronizer flops on each of the 13 incoming
request and acknowledge wires, plus the registered channel data. The reported clock rate and
power figures are not reproduced here. They depend on the FPGA flow.

Not included: the fully synchronous version of the same processor, which the
GALS version was compared against, and dynamic voltage and frequency scaling,
which is only proposed for the future.

## Simulating

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. For example, to run the end-to-end test with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_gals_processor rtl/gals_pkg.sv tb/tb_gals_processor.sv
./obj_dir/Vtb_gals_processor
```

To run another testbench, replace `tb_gals_processor` in both places.

| Testbench | What it exercises |
|---|---|
| `tb_gals_processor` | whole processor at default parameters. It loads registers, runs LDA 0xAA / ADD 0x03, then one of each opcode, then 900 random instructions mixed with register writes, under three clock setups: periods of 7, 11, 13 and 5 ns; a 3 ns control unit with a 17 ns functional unit; and four equal 10 ns clocks. It checks the accumulator after every acknowledge and the exact tick count of each gated clock, and requires each path (register operand, memory bypass, functional-unit bypass, ALU, shifter, NOP, external write, pause of each clock) to occur. |
| `tb_control_unit`, `tb_mux_acc`, `tb_register_memory`, `tb_functional_units` | one module, with the testbench playing its neighbours over real two-phase channels |
| `tb_hs_channel` | `hs_tx` -> `hs_rx` across two unrelated clocks: order, integrity, latency |
| `tb_clock_gate` | gated edges match the enable; no glitch when the enable changes while the clock is high |
| `tb_alu`, `tb_shifter` | every operation against a bit-level model |

## Changing it

* **New operation.** Add it to `opcode_t` and to the classifying functions in
  `gals_pkg` (`needs_reg`, `needs_fu`, `is_shift`, `is_nop`). Then implement
  it in `alu` or `shifter`, or as a new multiplexer input in `mux_acc` if it
  needs no functional unit. The control unit and the channels need no change.
* **More registers or a wider data path.** Change `RADDR_W` or `DATA_W` in
  `gals_pkg`. The instruction word must then be widened to match.
* **Slower or more robust synchronizers.** Set `SYNC_STAGES`.
