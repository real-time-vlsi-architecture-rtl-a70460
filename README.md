# SSS2 / LE2 — a vector coprocessor and streaming memory for real-time biomedical imaging

Optical tissue-imaging instruments, such as oxygen-consumption and blood-perfusion mappers, take
a stream of 16-bit multi-wavelength camera frames. They must filter, difference and threshold
those frames fast enough to guide a clinician during a procedure. The SSS2 platform does this
work on several scalar CPUs. Each CPU has an **LE2** engine attached: a SIMD coprocessor with long
vector registers. All LE2 engines feed from a shared, banked local memory called **STRMEM**. A DMA
engine and a host stream move frames in and out of STRMEM. A second-level cache keeps the CPUs'
write-through traffic away from external DDR2.

This repository holds synthesizable SystemVerilog for that data-processing core:

| module | role |
|---|---|
| `sss2_top` | NPE LE2 engines + STRMEM + DMA + L2 cache, wired as one system |
| `le2_core` | the LE2 engine: 8-stage pipeline, hazard check, precise exceptions |
| `le2_vrf`, `le2_vacc`, `le2_vctrl_regs`, `le2_sreg_file` | LE2 architectural state |
| `le2_lane_alu` | one 16-bit SIMD lane (lanes 0 and 1 double as the scalar ALU) |
| `strmem`, `rr_arbiter` | multi-bank, multi-client local memory at 0x30000000 |
| `strmem_dma` | block-copy DMA between the system side and STRMEM |
| `l2_cache` | write-back L2 data cache in front of the DDR2 port |
| `le2_pkg` | shared types: instruction encoding, opcodes, memory-port structs |

The scalar CPUs are not included. Neither are the system bus and its snooping, the debug unit,
the separate VLIW engines of the platform, or the analog and optical front end. Their
connection points are top-level ports.

## The LE2 programmer's model

The following architectural sizes come from the original architecture. Their defaults are the
architecture's maximums:

* `VREGS` = 16 vector registers of `VLMAX` = 4096 16-bit elements.
* `VLEN`: the run-time vector length. Only elements 0..VLEN-1 take part in an instruction.
* The predicate register, one bit per element. It masks the elements below VLEN further: an
  element is written only if its bit is set.
* `SREGS` = 16 scalar registers of 32 bits.
* Two vector accumulators, VACC0 and VACC1, each VLMAX/2 elements of 32 bits.

One point needed a choice: how the two accumulators map onto a vector. Here, element *i* of a
16-bit vector accumulates into VACC(*i* mod 2), entry *i*/2. The pair therefore holds one 32-bit
sum per element of a VLMAX vector.

### Instruction set (this design's own)

The architecture does not define an instruction set. LE2 was meant to take custom datapaths
generated from C image-processing code. The set below is small and image-oriented, enough to
exercise every part of the engine. Encoding: `op[31:26] rd[25:22] ra[21:18] rb[17:14]
imm[13:0]` (the immediate is signed).

| group | operations |
|---|---|
| element-wise, `vd = va op vb` | VADD, VSUB (wrap-around), VMUL (low 16 bits), VMIN, VMAX, VABSD, VAND, VOR, VXOR, VSRA/VSLL by `imm[3:0]`, VSPLAT (`vd = sreg[ra][15:0]`) |
| accumulators | VMAC (`VACC += va*vb`, 32-bit), VACLR, VACRD (`vd = sat16(VACC >>> imm[4:0])`) |
| predicate | VCMPGT, VCMPEQ (masked by VLEN only), VPSET (all ones) |
| STRMEM | VLD `vd`, VST `vb` at `sreg[ra] + imm`, unit stride, 8-byte aligned (the low 3 address bits are ignored) |
| scalar | SADD, SSUB, SAND, SOR, SADDI, SLI (`sd` = CPU operand), SMOVV (`sd = {va[1], va[0]}`), SETVL (VLEN = CPU operand) |

The CPU sends each instruction together with a 32-bit operand (`op_data`). The CPU reads any
scalar register through a combinational port, so results return with no added latency.

## How a vector instruction moves through the pipeline

The datapath has `LANES` = 4 lanes of 16 bits (a package constant). That is one 64-bit STRMEM
word per cycle. A vector instruction is cut into ceil(VLEN/4) *micro-ops*, one per element
group. Decode issues one micro-op per cycle. A 4096-element instruction is therefore 1024
micro-ops, and an independent one keeps the engine busy for 1024 + 7 cycles. Decode takes the
next instruction in the cycle the current one issues its last micro-op, so instructions follow
each other without a gap.

The eight stages carry the names the architecture gives them. The work done in each stage is
this design's own choice:

| stage | work |
|---|---|
| DEC | hold the instruction, count groups, hazard check, read the VRF (synchronous) and the scalar registers, build the VLEN/predicate mask, check exceptions |
| AG | present the STRMEM request (address = base + 8·group; store data = VRF port B) |
| MRD1, MRD2 | the two cycles of STRMEM read latency; the accumulator read starts in MRD2 |
| EX1 | lane ALUs and 16×16 multipliers; for scalar ops, lane 0's carry feeds lane 1 |
| EX2 | accumulate, accumulator read-out with shift and saturation, load-data select |
| PWB | result select, compare bits into the predicate format |
| WB | write the VRF, scalar file, accumulators or predicate under the mask |

**Only DEC and AG ever stall.** A micro-op waits in DEC while any micro-op in AG..WB writes one
of its sources. The match is the same register *and the same element group*, or any predicate
write for an instruction that uses the predicate mask. Long vectors therefore chain back-to-back
without stalls. Short dependent ones wait for the producer to leave WB: with one group, the
consumer issues 8 cycles after the producer. AG waits while STRMEM has not granted its request.
During that wait AG sends bubbles forward, so MRD1..WB never stall. Load data therefore always
meets its micro-op in MRD2, and an assertion in `le2_core` checks this.

**Exceptions are precise.** The architecture requires a precise exception model but does not list
the causes. Two causes are implemented, both checked in DEC before the first micro-op issues:

* SETVL with an operand above VLMAX;
* a load or store whose whole range [`sreg[ra]+imm`, +8·groups) is not inside STRMEM.

A refused instruction changes no state. `exc_valid` pulses with the cause, and the engine takes
the next instruction.

The coupling to the CPU is reduced to a valid/ready port. In the original, LE2 runs in series
with the CPU pipeline.

## STRMEM: the shared streaming memory

STRMEM is mapped at 0x30000000. It has `NBANKS` = 4 banks of `BANK_WORDS` = 4096 64-bit words
(128 KB). Consecutive words go to consecutive banks. Each bank has its own round-robin arbiter,
so several clients that stream through different words proceed in parallel. Clients in
`sss2_top`: engine 0..NPE-1, then the DMA, then the host stream.

Client protocol (`mem_req_t` / `mem_rsp_t` in `le2_pkg`):

* Hold `valid`, `write`, `addr`, `wdata` and `strobe` (one bit per 16-bit element) until `gnt`.
  An assertion checks this.
* A write happens at the granted clock edge.
* Read data arrives with `rvalid` exactly two cycles after the grant.
* An address outside the window is granted at once. A write to it is dropped, and a read of it
  returns 0.

Bank count, size, interleaving and arbitration are this design's choices. The architecture
specifies only a multi-bank, multi-client, DMA-fed memory at that address, with a 132 MB/s host
stream. One host word per cycle meets that rate at any clock above 16.5 MHz.

## DMA engine and L2 cache

`strmem_dma` copies `cfg_words` 64-bit words in either direction between STRMEM and the system
side. It runs one descriptor at a time, with one word in flight. `done` pulses for one cycle at
the end. The original platform has two DMA engines (one for the system bus, one for STRMEM).
Only the STRMEM one is built.

`l2_cache` is direct mapped with `L2_SETS` = 256 lines of `L2_LINE` = 4 words (8 KB). It is
write-back and write-allocate. A hit is granted at once, with read data the next cycle. A miss
first writes back a dirty victim, then fills the line word by word from the `ddr_*` port. Stores
that hit a resident line produce no external traffic; this is the cache's purpose in the
platform. With the system bus not built, the DMA is its only client. Size, line length and
associativity are assumed.

## How far to trust it

Every module has a self-checking testbench in `tb/`. Each one counts its checks and ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_le2_core` compares an engine (VLMAX = 64) against `le2_ref_pkg`, an instruction-level
  reference model. It runs about 1500 random instructions with random VLEN, predicates and
  out-of-range accesses, while a second STRMEM client contends for the banks. It then compares
  all of memory, every vector and scalar register and the accumulators. It also checks the
  timing: a one-group instruction keeps the engine busy for 8 cycles, a 64-element one for
  16 + 7 cycles, four independent one-group instructions issue on consecutive cycles
  (8 + 3 cycles), and a dependent pair stalls.
* `tb_sss2_top` runs the whole system at its default size: 2 engines, VLMAX = 4096, 128 KB
  STRMEM, 8 KB L2. The host streams in a frame, and the DMA brings in a second frame through the
  L2. Engine 0 computes a thresholded frame difference, once at full length and once with
  VLEN = 4093. Meanwhile engine 1 runs a 3-tap multiply-accumulate filter and has two
  instructions refused, and the host stream reads random words of the first frame back to
  back, so all three compete for the banks. The results leave through the DMA (forcing L2
  write-backs) and the host stream, and everything is compared with the model. The test fails if any of these never
  happens: hazard stall, STRMEM conflict, exception, DMA in either direction, VLEN change,
  predicate masking, L2 hit, miss or write-back.
* The leaf testbenches compare each block with a shadow model under random traffic: the
  register files, masks, lane ALU, arbiter fairness, STRMEM latency and bank exclusivity, DMA
  copies and the cache. Each testbench was also shown to fail against a deliberately broken copy
  of its module.

Where the design departs from, or adds to, the original architecture:

* The instruction set, encoding, lane count and exception causes are invented here.
* The original engine is described as a two-way long-instruction-word machine, but its two
  issue slots are not defined. This engine takes one instruction at a time. Its parallelism
  comes from the four SIMD lanes and the pipelining of the element groups.
* Only STRMEM-based vector memory access is built. The original offers a cache-based vector
  load/store unit as an alternative, and a plug-in interface for behaviourally synthesized
  datapaths; neither is built.
* The top does not contain the scalar CPUs or the snooping system bus. Cache coherence between
  CPUs is therefore not modelled.
* The number of engines (2), the STRMEM geometry and the L2 geometry are not specified by the
  architecture.
* Vector registers, accumulators and memories are not reset. Programs initialise what they read.
  VLEN resets to VLMAX and the predicate to all ones.

## Simulating

Any testbench builds with plain Verilator 5. The package must come first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/le2_pkg.sv tb/le2_ref_pkg.sv tb/tb_sss2_top.sv --top-module tb_sss2_top
./obj_dir/Vtb_sss2_top
```

Replace `tb_sss2_top` with any other `tb_*` module. `tb/le2_ref_pkg.sv` is needed only by
`tb_le2_core` and `tb_sss2_top`. The full-size system test takes about ten seconds to compile and
well under a second to run.

To change the configuration, set `sss2_top` parameters: `NPE`, `VREGS`, `VLMAX`, `SREGS`,
`NBANKS`, `BANK_WORDS`, `L2_SETS`, `L2_LINE`. Rules:

* `VLMAX` must be a multiple of 4.
* `NBANKS`, `BANK_WORDS`, `L2_SETS` and `L2_LINE` must be powers of two.
* The instruction fields address at most 16 vector and 16 scalar registers.
* To add an operation, extend `le2_op_e` in `le2_pkg` and follow the existing ones through the
  decode tables in `le2_core` (source use, write kind) and the lane ALU. Then add it to the
  reference model.
