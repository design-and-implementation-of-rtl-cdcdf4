# A SIMD (MSA) coprocessor for a five-stage MIPS32 core

This is the RTL of a 128-bit SIMD extension for a small in-order MIPS32
processor. It runs the integer part of the MIPS SIMD Architecture (MSA). That
means 32 vector registers of 128 bits, each read as 16 bytes, 8 halfwords,
4 words or 2 doublewords. It also provides an unaligned 16-byte data memory
and the instruction memory.

The main idea is a coprocessor that runs *in lock step* with the host core.
- Both have the same five stages (IF, ID, EX, MEM, WB).
- The coprocessor reads the same fetched word as the core's decode stage and
  ignores any word that is not an MSA instruction.
- When either pipeline stalls, both stall.
- The core keeps doing everything scalar: fetch, PC, branch targets, GPRs and
  address arithmetic. The coprocessor only needs a few narrow connections to
  the core (GPR read, GPR write, stall, branch condition). The memory ports are
  shared.

The host core itself is not part of this RTL. `msa_soc` brings its side of
every connection out as ports. The end-to-end testbench drives those ports
with a small behavioural core.

The design is based on the thesis *Design and Implementation of a Multimedia
Extension for a RISC Processor*. The
[Departures from the reference design](#departures-from-the-reference-design)
section lists where this RTL differs from it, or fills in what the thesis
leaves open.

## Block structure

```
msa_soc
├── instr_memory        128k x 32, synchronous read, load port
├── data_memory         16 byte-wide cells, unaligned 16-byte access
└── msa_unit            the coprocessor pipeline
    ├── msa_decoder     instruction -> control word (dec_t in msa_pkg)
    ├── msa_vrf         32 x 128 bits, 3 read + 1 write ports
    │   └── vrf_bank x3 one 1R1W copy each, written together
    ├── branch_unit     BZ.V / BNZ.V / BZ.df / BNZ.df (in ID)
    ├── special_unit1   operand A: odd elements widened
    ├── special_unit2   operand B: register, even elements widened, or immediate
    ├── special_unit3   operand C: register or replicated GPR
    ├── vpu_3r          30 arithmetic lanes
    │   └── lane_3r x30 (16 x 8, 8 x 16, 4 x 32, 2 x 64 bits)
    │       ├── adder_lane
    │       ├── mul_lane -> karatsuba_mul
    │       └── div_lane (pipelined, DIV_LAT stages,
    │           └── seq_divider   or sequential with DIV_SEQ = 1)
    ├── dotp_unit, cmp_unit, minmax_unit, sat_unit, shift_unit,
    │   bit_unit, count_unit, vecop_unit, shuffle_unit
    └── insert_unit     INSERT / INSVE, element extract for COPY_S/U
```

`msa_pkg` holds everything the modules share:
- the vector type and data formats;
- the opcode constants;
- the internal operation codes;
- the decoded-instruction struct `dec_t`.

## The pipeline and its four paths to the core

`msa_unit` is the core of the design. Each stage works as follows:

| Stage | Coprocessor work |
|---|---|
| IF | The core fetches. The word leaving the instruction memory is the instruction in ID for both pipelines. |
| ID | Decode. Read `ws`, `wt`, `wd` from the register file. Apply forwarding. Ask the core for a GPR when needed. Evaluate MSA branches. |
| EX | The special units shape the operands. Every execution unit computes, and the decoded `unit` field picks one result. |
| MEM | `ST.df` sends `wd` to the data memory. `LD.df` starts a 16-byte read. |
| WB | Write the result or the loaded data to the vector register file. COPY/CFCMSA results go to a GPR. |

The coprocessor meets the core at four points:

- **Path A: vector → GPR.** `COPY_S`, `COPY_U` and `CFCMSA` carry a 32-bit
  value down the pipe. They write it through `gpr_we/gpr_waddr/gpr_wdata` in WB.
- **Path B: GPR → vector.** For `FILL`, `INSERT`, `SLD`, `SPLAT` and `CTCMSA`,
  the coprocessor drives `gpr_raddr/gpr_rd` in ID. The core answers with
  `gpr_rdata` in the same cycle. The value then travels with the instruction.
- **Path C: vector store.** The core computes the address of `ST.df`
  (`GPR[rs] + s10 << df`) and presents it in its MEM stage. The coprocessor
  supplies the 16 data bytes.
- **Path D: vector load.** Same addressing. The data memory returns 16 bytes
  one cycle later, which is WB, where they are written to `wd`.

MSA branches (`BZ.V`, `BNZ.V`, `BZ.df`, `BNZ.df`) are decided in ID.
`msa_br_valid` and `msa_br_taken` are reported to the core. The core computes
the target from the 16-bit offset and executes the delay slot, as for its own
branches.

### Hazards, forwarding and stalls

Forwarding:
- A source produced by the instruction in **MEM** is forwarded to ID.
- A source written in **WB** in the same cycle is read through the register
  file, which has write-through.

Stalls:
- **`stall_id`**: a source is produced by the instruction in **EX**, or by a
  **load** in MEM, whose data only exists in WB. IF and ID hold, and a bubble
  enters EX. This costs one cycle after an ALU producer and two after a load.
- **`stall_ex`**: a `DIV_*`/`MOD_*` is in EX and the divider pipeline
  (`DIV_LAT` = 4 cycles) has not delivered. IF, ID and EX hold, and a bubble
  enters MEM. A divide therefore costs `DIV_LAT` extra cycles.
- **`core_stall`** (input) freezes every stage of the coprocessor.

The host must freeze its pipeline whenever `msa_stall_id` or `msa_stall_ex` is
high. The same rules apply to branch operands. A branch right after its
producer waits one cycle.

## Register file

The register file needs three reads (`ws`, `wt`, `wd`) and one write per cycle.
FPGA block memories offer one read and one write port. `msa_vrf` therefore
keeps three identical copies (`vrf_bank`), writes all three together, and
reads one port from each.

Reads are combinational with write-through. The register file clears itself
one register per cycle while reset is held, so reset must last at least
32 cycles. This matters because values such as `wd` for `MADDV` and `INSERT`
are read before they are ever written.

## The 3R lanes

`vpu_3r` holds 30 `lane_3r` instances: 16 of 8 bits, 8 of 16, 4 of 32 and 2 of
64. All of them compute every cycle, and the data format selects whose results
form the 128-bit result. Each lane has three parts that share the operand
multiplexers:

- **adder_lane** runs the 22 add-type operations:

  | Operations | Instructions |
  |---|---|
  | Add and subtract | `ADDV`, `SUBV`, `ADD_A` |
  | Saturating | `ADDS_A`, `ADDS_S/U`, `SUBS_S/U`, `SUBSUS_U`, `SUBSUU_S` |
  | Averages | `AVE_S/U`, `AVER_S/U` |
  | Absolute difference | `ASUB_S/U` |
  | Horizontal add/subtract | `HADD_S/U`, `HSUB_S/U` |

  It is one adder with a carry-in, absolute-value input muxes, a widened sum
  for saturation, and a final clamp. Saturation bounds come from the element
  width and signedness.
- **mul_lane** runs `MULV`, `MADDV` and `MSUBV` as `c ± a*b`, modulo 2^W.
  The product comes from `karatsuba_mul`. At 8 and 16 bits it is a direct
  multiply, which maps to one DSP block. Above 16 bits it uses three
  half-width products: `(a1·b1)·2^W + ((a1+a0)(b1+b0) − a1b1 − a0b0)·2^(W/2) + a0b0`.
  Only one Karatsuba level is used. The three half-width products are plain
  multiplies that synthesis maps to DSP blocks.
- **div_lane** runs `DIV_S/U` and `MOD_S/U`. A combinational divide is followed
  by `DIV_LAT − 1` register stages. It accepts a new divide every cycle and
  returns it `DIV_LAT` cycles later. Division by zero gives a quotient of all
  ones and a remainder equal to the dividend.

  With `DIV_SEQ = 1`, every lane uses `seq_divider` instead, which is much
  smaller. It is a restoring divider that produces one quotient bit per clock
  from the most significant bit down, so a division takes W cycles (8 to 64).
  - Each step shifts the partial remainder left. It subtracts the divisor when
    the difference is not negative, and that step's quotient bit is 1.
  - Signs are applied at the end.
  - The pipeline needs no change, because it waits for the divider's `done`
    rather than counting cycles.

The lane operation code is a 4-bit field (`lop_e` in `msa_pkg`), numbered
after the reference design's tables. `DIV` is the exception (see below).

## The special units

- **Special unit 1** replaces operand A by its odd elements. It sign- or
  zero-extends them to the next wider format.
- **Special unit 2** replaces operand B by one of these:
  - its even elements, widened the same way;
  - a replicated immediate (`u5`, `s5`, `i8`, `s10` or a bit index `m`).
- **Special unit 3** replaces operand C by the GPR value replicated in every
  element. A doubleword gets the GPR sign-extended.

Together, units 1 and 2 turn the horizontal instructions into ordinary lane
operations on the wider format:
- `HADD` and `HSUB` run in the lane adders;
- `DOTP`, `DPADD` and `DPSUB` run in `dotp_unit`.

## Other execution units

| Unit | Instructions |
|---|---|
| `cmp_unit` | `CEQ`, `CLT_S/U`, `CLE_S/U` and the immediate forms. The result is all ones or zero per element. |
| `minmax_unit` | `MAX_S/U`, `MIN_S/U`, `MAX_A`, `MIN_A` and the immediate forms. |
| `sat_unit` | `SAT_S/U`: clamps each element to an (m+1)-bit range. |
| `shift_unit` | `SLL`, `SRA`, `SRL`, `SRAR`, `SRLR`. The rounding forms add the last bit shifted out. |
| `bit_unit` | `BCLR`, `BSET`, `BNEG`, `BINSL`, `BINSR`. |
| `count_unit` | `PCNT`, `NLOC`, `NLZC`. Counts are built per byte and combined for wider elements. |
| `vecop_unit` | `AND`, `OR`, `NOR`, `XOR`, `BMNZ`, `BMZ`, `BSEL`, and their `I8` forms. |
| `shuffle_unit` | `VSHF`, `SLD/SLDI`, `SPLAT/SPLATI`, `PCKEV/PCKOD`, `ILVL/ILVR/ILVEV/ILVOD`, `SHF`. |
| `insert_unit` | `INSERT` and `INSVE`, plus element extraction with sign or zero extension for `COPY_S/U`. |

`MOVE.V`, `LDI` and `FILL` pass operand A, B or C straight to the result.

## Data memory: unaligned 16-byte access

`data_memory` is 16 byte-wide memories ("cells"). Byte address `a` lives in:
- cell `a mod 16`;
- row `a div 16`.

A 16-byte access at any address touches each cell exactly once:
- cells at or above `a mod 16` use row `a div 16`;
- cells below it use the next row.

Each cell gets its own row address. The 16 cell outputs are rotated by
`a mod 16` so that byte `k` of the result is the byte at `a + k`.

Writes use the inverse rotation. `wr_bytes` (1, 2, 4, 8 or 16) enables only
the first bytes of the rotated window. The same memory serves:
- MSA loads and stores;
- scalar byte, halfword and word accesses of the core.

Reads are synchronous: data appears one cycle after the address. Addresses
wrap at the top of memory.

Example: address 3226 is cell 10 of row 201. A 16-byte access reads cells
10–15 of row 201 and cells 0–9 of row 202.

## Instruction memory

`instr_memory` holds 128k words of 32 bits (512 KB). Its read is synchronous
with a read enable, and the output holds when the enable is low, which
implements a fetch stall. There are two ways to load a program:
- a write port;
- `$readmemh` of a file named by the `INIT_FILE` parameter.

## Interface of `msa_soc`

| Group | Ports | Meaning |
|---|---|---|
| fetch | `core_pc`, `core_fetch` → `id_instr` | The core's fetch address. The instruction appears one cycle later. |
| | `id_valid` | The word in ID is a real instruction (not a bubble or a squashed slot). |
| program load | `imem_we`, `imem_waddr`, `imem_wdata` | Write port of the instruction memory. |
| stall | `core_stall` in; `msa_stall_id`, `msa_stall_ex` out | Common pipeline freeze (see Hazards). |
| branch | `msa_br_valid`, `msa_br_taken` | MSA branch decided in ID. |
| path B | `gpr_raddr`, `gpr_rd` → `gpr_rdata` | GPR read, answered in the same cycle. |
| path A | `gpr_we`, `gpr_waddr`, `gpr_wdata` | GPR write, in WB. |
| memory | `core_daddr`, `core_drd`, `core_dwr_bytes`, `core_dwdata` → `dmem_rdata` | The core's MEM-stage address, used for its own accesses and for `LD.df`/`ST.df`. A vector store always writes 16 bytes and takes priority over a core store in the same cycle. |
| events | `ev_fwd_mem`, `ev_retire` | Pulses for observation: a MEM-forwarded operand, or an instruction leaving WB. |

The defaults are:
- `IMEM_AW = 17` (128k words);
- `DMEM_AW = 19` (512 KB);
- `DIV_LAT = 4`;
- `DIV_SEQ = 0` (pipelined dividers).

## Departures from the reference design

- **Host core not included.** The reference uses an existing open-source
  MIPS32 core, modified to cooperate with the coprocessor. Its interface is
  the set of ports above.
- **Floating point.** The reference implements only integer MSA, and so does
  this RTL. Floating-point MSA instructions decode as no-operations.
- **Divider.** The reference uses a vendor 4-stage pipelined divider.
  - This RTL has its own pipelined divider with the same latency and rate.
  - The reference's low-area sequential divider is selected with `DIV_SEQ`.
    It has the same algorithm and W-cycle latency.
  - Division by zero is defined here as described above.
- **DIV operation code.** The reference's divider table gives `DIV` the code
  `1100`, which its adder table already uses for `SUBSUU_S`. `DIV` uses `0100`
  here, a code otherwise unused.
- **SUBSUS_U / SUBSUU_S.** The reference's adder table marks both as
  non-saturating, but describes them as saturating. They saturate here, as MSA
  defines them.
- **ADDS_A** saturates `|a| + |b|` to the signed maximum, as MSA defines it.
- **Forwarding and hazards.** The reference states that the two pipelines
  stall together, but does not give the hazard rules. The rules above
  (MEM forwarding, WB write-through, the two stall sources) are this design's
  own.
- **Unit granularity.** The reference draws one small circuit per
  instruction family. Here closely related instructions share a unit, for
  example `CEQ/CLT/CLE` in `cmp_unit` and all shuffles in `shuffle_unit`. The
  operations are the same.
- **Control registers.**
  - `MSAIR` reads as `0x100`.
  - `MSACSR` is a plain read/write register, with no exception or rounding
    behaviour, since there is no floating point.
  - The other control registers read as zero.
- **Memory sizes.** The data memory size (512 KB) follows the reference's
  overall memory limit. The reference gives the instruction memory size
  directly.
- **Register-file reset.** Clearing the register file during reset is an
  addition.
- **No timing optimisation.** The Karatsuba multipliers and the divider's
  first stage are combinational. The reference gives no internal pipelining
  for them either, so the achievable clock is set by those paths.

## Workloads

The reference evaluates two kernels. Both fit the default configuration with
room to spare, and both run end to end on `msa_soc` at full size. Each uses a
fully unrolled MSA program and a behavioural core that only fetches and
generates addresses.

**`tb_fdct`: integer forward DCT.** The input is a 16x16 matrix of 32-bit
values, treated as four 8x8 blocks. The transform is the JPEG integer FDCT:
- 8-point butterflies;
- 13-bit fixed-point constants;
- two extra bits of precision between the passes;
- rounding shifts, which map directly onto `SRARI.W`.

Each vector holds four 32-bit elements, so one 1-D pass works on a strip of
four columns. The row pass is done by first transposing the block in
registers with `ILVR/ILVL.W` and `ILVR/ILVL.D`. The constants come from GPRs
through `FILL.W`.

The run takes 1792 instructions and 2273 cycles. It uses about 2.5 KB of data
against the 512 KB data memory. Every coefficient matches a plain integer
model.

**`tb_matmult`: 20x20 matrix multiplication** of 32-bit integers.
- Each group of four result elements is accumulated with `MADDV.W`.
- The multiplier operand is broadcast with `SPLATI.W`.
- Rows are 80 bytes long, so most loads are unaligned.

The run takes 6700 instructions and 9317 cycles, using 4.8 KB of data. The
test also checks the exact stall count the hazard rules predict: 2600 cycles,
one per `SPLATI`→`MADDV` pair plus one load-use stall per row load.

The reference runs its programs as loops on the scalar core. Its cycle counts
are therefore not comparable with these unrolled ones.

## Testbenches and simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. The reference
models come from `tb/msa_ref_pkg.sv`. Common macros are in `tb/tb_common.svh`.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Simulate one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/msa_pkg.sv tb/msa_ref_pkg.sv tb/tb_msa_soc.sv
./obj_dir/Vtb_msa_soc +verilator+rand+reset+2
```

The testbenches are:

- **Arithmetic lanes.** `tb_adder_lane`, `tb_mul_lane`, `tb_karatsuba_mul`
  and `tb_div_lane` compare all widths against reference arithmetic. The
  divider test also checks the `DIV_LAT`-cycle latency and back-to-back
  issue. `tb_seq_divider` checks the sequential divider at all four widths,
  including its exact W-cycle latency.
- **`tb_lane_3r`, `tb_vpu_3r`.** Whole-vector operations in every format. The
  divide latency is checked through the VPU.
- **Execution units.** One testbench per unit, with random operands against
  the reference model.
- **`tb_msa_vrf`, `tb_vrf_bank`.** Register-file reads and writes,
  write-through, and the reset clear.
- **`tb_data_memory`.** Random unaligned reads and writes of every size
  against a byte-array model, including wrap-around. It runs at a reduced
  address width.
- **`tb_instr_memory`.** Full-size instruction memory: load, read latency and
  hold on a stall.
- **`tb_msa_decoder`.** Every instruction class, encoded by the reference
  package's assemblers.
- **`tb_msa_unit`.** Directed pipeline tests:
  - each stall kind with its exact cycle count;
  - forwarding;
  - branches;
  - core stalls;
  - control registers;
  - store data.
- **`tb_fdct`, `tb_matmult`.** The two workloads above, at default parameters.
- **`tb_msa_soc`.** The end-to-end test at default parameters.
  - A behavioural core fetches a random program of 4000 MSA
    instructions (the data memory is first filled through the core's store port). It executes the branch delay slot, serves the GPR ports,
    computes load/store addresses, stalls at random, and inserts bubbles
    while a GPR it needs is still being produced.
  - Every vector and GPR write is compared, in order, with an ISA-level model.
  - At the end it compares the registers, `MSACSR` and memory.
  - It counts each pipeline mechanism and fails if any never occurred:
    - EX-hazard and load-use stalls;
    - divider stalls;
    - MEM forwarding;
    - write-through;
    - taken and not-taken branches;
    - aligned and unaligned loads and stores;
    - GPR reads and writes;
    - core stalls;
    - `CTCMSA` and `CFCMSA`.

Testbenches assume a two-state simulator that starts registers at random
values. Everything that is read is reset or initialised.
