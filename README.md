# A customizable AltiVec-compatible SIMD integer unit

This is a 128-bit SIMD execution unit that runs the AltiVec (PowerPC VMX)
integer instructions that dot products and FIR filters are made of. Code
written for a PowerPC with AltiVec can drive it without changes. The unit is
meant for an FPGA or an embedded SoC, where the whole AltiVec instruction set
is too large. So it is built from only the instructions an application needs,
and some of them are made narrower than the ISA allows.

The design rests on two ideas.

* **RISC-style decomposition.** The "CISC" instruction `vec_msum` does 16
  byte multiplies, a 4-way reduction and a 32-bit accumulation in one
  instruction. That work can also be done by a sequence of simpler
  instructions: widen the bytes, multiply in 16-bit lanes, widen again, add in
  32-bit lanes, and reduce across lanes at the end. The simpler units have
  shorter critical paths. On an FPGA they can therefore run at a higher clock
  and need less energy per result, even though they take more instructions.
  The unit contains both forms, and each can be left out.
* **Specialization.** `vec_perm` is a full 32-to-1 byte crossbar. Dot products
  and FIR filters only use it to build unaligned windows of a byte stream.
  Two narrower permute units do only that. Likewise, the 16-bit
  multiply-add `vec_mladd` can be split into a 16-bit multiply `vec_mul16`
  (which AltiVec does not have) and a plain `vec_add`.

## Instructions

Vectors are 128 bits wide. Elements are numbered as in AltiVec, big-endian:
element 0 is the leftmost and most significant. Byte `i` is bits
`[127-8i -: 8]`, halfword `i` is `[127-16i -: 16]` and word `i` is
`[127-32i -: 32]`. `a`, `b` and `c` are the registers named by the vA, vB
and vC fields.

| opcode | AltiVec name | result | class | built when |
|---|---|---|---|---|
| `OP_VLD` | (load) | the instruction's 128-bit `data` field | simple | always |
| `OP_VADDUBM/UHM/UWM` | `vec_add` | element-wise sum of 8/16/32-bit elements, wrapping | simple | always |
| `OP_VMSUMUBM` | `vec_msum` | `d[w] = c[w] + Σ_{j<4} a[4w+j]·b[4w+j]` (unsigned bytes, wraps mod 2^32) | complex | `EN_MSUM` |
| `OP_VSUMSWS` | `vec_sums` | `d[3] = sat_s32(a[0]+a[1]+a[2]+a[3]+b[3])`, `d[0..2] = 0` | complex | `EN_SUMS` |
| `OP_VSUM4UBS` | `vec_sum4s` | `d[w] = sat_u32(b[w] + Σ_{j<4} a[4w+j])` | complex | `EN_SUM4S` |
| `OP_VMLADDUHM` | `vec_mladd` | `d[h] = (a[h]·b[h] + c[h]) mod 2^16` | complex | `EN_MLADD` |
| `OP_VMULEUB` / `OP_VMULOUB` | `vec_mule` / `vec_mulo` | `d[h] = a[2h]·b[2h]` / `a[2h+1]·b[2h+1]`, full 16-bit products | complex | `EN_MULEO` |
| `OP_VMULUHM` | 16-bit `vec_mul` (not in AltiVec) | `d[h] = (a[h]·b[h]) mod 2^16` | complex | `EN_MUL16` |
| `OP_VPERM` | `vec_perm` | `d[i] = (a‖b)[c[i] mod 32]` | permute | `EN_PERM` |
| `OP_VPERM_V1` | specialized `vec_perm` | `d[i] = (a‖b)[s+i]`, `s = c[0] mod 4` | permute | `EN_PERM_V1` |
| `OP_VPERM_V2` | specialized `vec_perm` | `d[i] = (a‖b)[s+i]`, `s = c[0] mod 16` | permute | `EN_PERM_V2` |
| `OP_VUPKHUB/LUB` | merge with zero | bytes 0..7 / 8..15 of `b`, zero-extended to halfwords | permute | `EN_UNPACK` |
| `OP_VUPKHUH/LUH` | merge with zero | halfwords 0..3 / 4..7 of `b`, zero-extended to words | permute | `EN_UNPACK` |
| `OP_VUPKHSB/LSB/HSH/LSH` | `vec_unpackh/l` | the same, sign-extended | permute | `EN_UNPACK` |
| `OP_NOP` | | nothing | | always |

`vec_sums` and `vec_sum4s` set the sticky flag `vscr_sat` when they clamp, in
the way AltiVec's VSCR[SAT] bit works. `sat_clr` clears the flag. Any opcode
whose unit is not built, and any unknown encoding, is accepted and retired
without a write. `illegal` pulses in the cycle it is accepted.

The specialized permutes take their offset from control byte 0. Software
builds its unaligned-load masks as consecutive byte indices
`s, s+1, …, s+15`. For such a mask the specialized permutes give exactly the
same result as the full crossbar, so the same code runs on either.

## How the kernels map onto the unit

**Dot product, CISC form.** Each pair of 16-byte vectors needs one
`vec_msum` into a word accumulator. Four accumulators hide the 4-cycle
latency. At the end the accumulators are added and `vec_sums` folds the four
lanes into word 3. This takes 3 instructions per 16 pixels: two loads and one
`vec_msum`.

**Dot product, RISC #1.** This is the decomposition of `vec_msum` in five
steps:

1. Widen `a` and `b` to halfwords: `VUPKHUB` and `VUPKLUB` give the high and
   low halves A0/A1 and B0/B1.
2. `vec_mladd` with a zero addend gives P0 = A0·B0 and P1 = A1·B1. An 8×8
   product always fits in 16 bits.
3. Widen P0 and P1 to words: P00, P01, P10 and P11.
4. Add each of them into a 32-bit accumulator with `vec_add`.
5. Reduce across the lanes with `vec_add` and `vec_sums`.

**Dot product, RISC #2.** `vec_mule` and `vec_mulo` produce the 16-bit
products directly. Steps 3 to 5 are the same as in RISC #1.

**4-tap FIR**, `Y(j) = Σ_{k<4} f(k)·X(j+k)`:

* *msum form:* the window at offset `k` (`OP_VPERM_V1`) goes into `vec_msum`
  against `{f0,f1,f2,f3}` repeated four times. Word `w` of the result is
  `Y(4w+k)`, so four offsets give 16 outputs.
* *mladd form:* the window at offset `k` is widened and multiplied into a
  16-bit accumulator with `vec_mladd`, using the coefficient `f(k)` splatted
  across the lanes.
* *mul form:* the same window goes into `vec_mule` and `vec_mulo` against a
  byte-splatted `f(k)`, and `vec_add` sums the results in 16-bit lanes.

Only offsets 0 to 3 are ever needed, which is why the narrow `VPERM_V1`
covers the FIR.

## Issue, latency and interlocks (`vec_issue`)

This is the part of the unit that needs the most care when you use it.

The unit issues in order, at most one instruction per clock. An instruction
is offered with `in_valid` and taken at the rising edge where `in_ready` is
high. It must be held unchanged until it is taken; an assertion checks this.
When it is taken, its operands are read from the register file and its
result is computed in the same cycle. The result then waits in a write-back
delay line of `MAX_LAT` slots. Slot `k` holds the result that will be
written `k+1` edges later, so an instruction of latency `L` enters slot
`L-1`. Every slot moves down one place each cycle, and slot 0 is written to
the register file.

The latencies are 1 for simple integer operations, 2 for the permute class
and 4 for the complex class. These are the MPC7450 (PowerPC G4) AltiVec
latencies, which the unit is meant to match. `in_ready` is low in two cases.

* **Dependency stall (`stall_raw`).** The instruction reads vA, vB or vC, or
  writes vD, and that register has a result waiting in slots 1 and up. The
  result in slot 0 is written at this edge. The register file forwards a
  value on the edge it is written, so the instruction can issue on that same
  edge. As a result, a dependent instruction issues exactly `L` cycles after
  its producer. The write-after-write check keeps write-back in program
  order for each register.
* **Write-back slot stall (`stall_wb`).** The instruction writes a register,
  and slot `L` is occupied. That slot will move into the one this
  instruction needs, and two results would then be written in the same
  cycle. An example is a complex instruction, then a simple one, then a
  permute.

`busy` is high while any result is in flight. To read a final result,
wait until `busy` is low, then read it on the asynchronous observation port
`rd_addr`/`rd_data`.

The functional units are combinational. The delay line stands for their
pipeline registers: as a netlist, each unit is a single-cycle block followed
by `L` register stages. Moving those registers into the multipliers is left
to retiming, or to a hand-pipelined version of the units.

## Module structure

```
altivec_unit            top: ports, vscr_sat, handshake assertion
├── vreg_file           32 x 128-bit registers, 4 async read ports, write-through
├── vec_execute         decode, EN_* customization, latency class, result select
│   ├── vec_add  vec_msum  vec_sums  vec_sum4s  vec_mladd
│   ├── vec_mule_mulo  vec_mul16
│   ├── vec_perm  vec_perm_v1  vec_perm_v2
│   └── vec_unpack
└── vec_issue           scoreboard and write-back delay line
altivec_pkg             vec_t, op_e, instr_t, esz_e, element helpers, op_reads()
```

Top-level ports of `altivec_unit`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset that clears registers, pipeline and flag |
| `in_valid` / `in_ready` | in / out | 1 | instruction handshake |
| `in_instr` | in | `instr_t` (148 bits) | `{op[4:0], vd, va, vb, vc, data[127:0]}` |
| `illegal` | out | 1 | an unbuilt or unknown opcode was taken |
| `vscr_sat`, `sat_clr` | out, in | 1 | sticky saturation flag and its clear |
| `busy` | out | 1 | results in flight |
| `stall_raw`, `stall_wb` | out | 1 | why the offered instruction is held |
| `rd_addr` / `rd_data` | in / out | 5 / 128 | register observation port |

Parameters: `EN_MSUM`, `EN_SUMS`, `EN_SUM4S`, `EN_MLADD`, `EN_MULEO`,
`EN_MUL16`, `EN_PERM`, `EN_PERM_V1`, `EN_PERM_V2` and `EN_UNPACK` each
default to 1. `LAT_SIMPLE`, `LAT_PERM` and `LAT_COMPLEX` default to 1, 2
and 4. A configuration that supports only the RISC #1 form of both kernels,
for example, sets `EN_MSUM`, `EN_SUM4S`, `EN_MULEO`, `EN_PERM` and
`EN_PERM_V2` to 0.

## Arithmetic limits worth knowing

The unit reproduces the AltiVec lane arithmetic exactly. That arithmetic has
limits that matter at image sizes.

* **Dot product.** The sum of 512×512 or more products of 8-bit pixels can
  exceed 2^31−1. Then the 32-bit lanes wrap and `vec_sums` saturates. The
  result equals the true dot product only when the data are small enough.
  With random pixels, 256×256 is exact, while 512×512 and 1024×1024 are not.
  The different forms put different bytes in each lane, so once the lanes
  wrap, their results also differ from each other. `tb_workloads` shows this.
* **FIR.** The 16-bit `vec_mladd` and `vec_mule`/`vec_mulo` forms are exact
  only while `4·255·max f < 65536`, that is for coefficients below 64. The
  `vec_msum` form has 32-bit outputs and is always exact.

## Departures and choices

The following behaviour is taken from the published description: the
instruction semantics of `vec_msum`, `vec_sums` and `vec_perm`, including
its crossbar example, which serves as a test vector. So are the five-step
decomposition, the split of `vec_mladd` into a 16-bit multiply and an add,
the restriction of permutes to unaligned windows, and the aim of matching G4
latencies.

The following are this design's own choices:

* **Operand types.** Unsigned bytes are used for `vec_msum`, `vec_sum4s` and
  `vec_mule`/`vec_mulo`, because pixels are unsigned. The signed AltiVec
  variants (`vmsummbm`, `vsum4sbs`, `vmulesb` and so on) are not built.
* **Specialized permutes.** The two specialized permutes are defined here as
  offset ranges 0..3 and 0..15. The published work reports their area but
  does not describe them.
* **Latency numbers.** The cycle counts 1, 2 and 4 come from the MPC7450
  pipelines, and so does the grouping of opcodes into the three classes.
* **Unit structure.** The following are all choices of this design:
  * the 32-register file and its reset to zero;
  * the write-through forwarding;
  * the issue and interlock scheme;
  * the valid/ready interface;
  * the sticky `vscr_sat` flag;
  * the handling of unbuilt opcodes.
* **Loads and stores.** There is no memory interface. The unit was meant to
  sit behind a cache hierarchy like the G4's, which is not part of this RTL.
  Loads enter as `OP_VLD` instructions that carry their data, and stores are
  reads of the observation port.
* **Omitted instructions.** Other AltiVec instructions (logical operations,
  shifts, compares, floating point, splats and merges other than
  zero-extension) are not built. The workloads here do not need them.

Neither clock frequency nor area was measured. The unit's effect on area,
power and execution time is not reproduced here.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/altivec_pkg.sv \
          tb/tb_altivec_unit.sv --top-module tb_altivec_unit -o sim
./obj_dir/sim
```

Substitute any other testbench name for `tb_altivec_unit`.

* `tb_<module>`: one testbench per unit. Each compares its unit with an
  independent reference, using directed cases and a few thousand random
  ones.
* `tb_vec_issue`: checks `in_ready` every cycle against a reference
  scoreboard, and checks every write-back for its cycle, register and data.
* `tb_altivec_unit`: the end-to-end test at the default configuration. It
  runs all three dot-product forms and the FIR forms, and checks the
  crossbar example, saturation, an illegal opcode and the measured latency
  of each class (4, 2 and 1). It requires that dependency stalls,
  write-back slot stalls, forwarding, saturation and an illegal opcode each
  occur.
* `tb_altivec_unit_custom`: a unit customized for the `vec_mladd` forms
  only. It runs the dot product and the FIR in that form, and checks that the
  opcodes of the units left out are illegal and write nothing.
* `tb_workloads`: the dot product and the 4-tap FIR at 256×256, 512×512 and
  1024×1024, in all three forms each, checked result by result. It prints
  the unit's cycles per pixel. This counts issue cycles only, with operands
  arriving at one load per cycle. Measured values are:

  | kernel | CISC (`vec_msum`) | `vec_mladd` form | `vec_mule`/`vec_mulo` form |
  |---|---|---|---|
  | dot product | 0.19 | 1.19 | 0.94 |
  | FIR | 0.88 | 2.25 | 2.50 |

  It takes about a minute.
