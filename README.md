# VeMICry: a vector co-processor for cryptography

Embedded crypto accelerators are usually built for one algorithm and one key
size. VeMICry ("Vectorial MIPS for Cryptography") takes another approach. It is
a small vector unit that plugs into the co-processor interface of a MIPS-I
scalar core. Its instruction set lets both of these run at vector speed:

- symmetric ciphers (AES), written as byte-wise table look-ups, rotations and
  GF(2^8) doublings on the four columns of the state;
- public-key arithmetic, written as long-integer and binary-polynomial
  multiply-accumulate over many 32-bit words (RSA, ECC over GF(2^m) with
  Montgomery multiplication).

The scalar core fetches and decodes everything. It handles loops, addresses and
scalar values, and passes each vector instruction to this unit.

This repository holds synthesizable SystemVerilog for the vector unit and
self-checking testbenches. The architecture follows the paper *A Vector Approach
to Cryptography Implementation*. Where that paper leaves a detail open, this RTL
makes its own choice. Those choices are listed in
[Where this RTL departs from or adds to the architecture](#where-this-rtl-departs-from-or-adds-to-the-architecture).

## Machine organisation

| Parameter | Meaning | Default |
|---|---|---|
| `Q` | vector registers | 8 |
| `P` | 32-bit elements per register (depth) | 8 |
| `R` | lanes, i.e. vector processing units (VPUs) | 8 |
| `MEM_DEPTH` | bytes in each of the four byte arrays of a lane's memory bank | 1024 |

- **Lanes.** Lane `j` owns elements `j, j+R, j+2R, ...` of every vector
  register and has one VPU. When `R < P`, an instruction passes through the lanes
  `P/R` times, once per *group* of `R` elements. Group `g` is elements `g*R` to
  `g*R+R-1`.
- **Element order.** Element 0 is the least significant word of a multi-word
  number.
- **AES state layout.** Each AES column is one 32-bit word, with row 0 in the
  most significant byte.
- **Scalar registers of the unit:**
  - **VCR** (vector condition register, 32 bits). Bit `i` enables element `i` for
    `VBCROTR`. The low 8 bits are the reduction polynomial of `VMPMUL`; for AES,
    the `0x1B` of `0x11B`.
  - **SBI** (scalar buffer interface). It holds the scalar operand of the
    instruction entering the pipeline. Every pipeline stage carries its own copy.
  - **CAR** (carry register). It takes the carry or the most significant word
    that a multi-word operation pushes out of the top element.
- **Lane memory bank.** Each lane has its own software-managed bank, made of four
  byte arrays side by side. Array `b` holds byte `b` of every word, and each array
  has its own address. So a lane can read a word (`VLOAD`) or four independent
  bytes (`VBYTELD`, four S-box look-ups) in one cycle.

## Instruction set as built

`n` is the instruction's immediate. `Rs` is the value of the scalar register the
instruction names, which the core sends along with it. `e` runs over the
elements.

| Instruction | Effect |
|---|---|
| `VXOR Vd,Vj,Vk` | `Vd[e] = Vj[e] ^ Vk[e]` |
| `VBCROTR Vd,Vj,n` | `Vd[e] = VCR[e] ? rotr(Vj[e], n) : Vj[e]` |
| `VMPMUL Vd,Vj` | each byte multiplied by x modulo `x^8 + VCR[7:0]` |
| `VSADDU Vd,Vj,Rs` | `Vd[e] = Vj[e] + Rs`; the carry of element `e` goes to `CAR[e]` |
| `VSMOVE Vd,Rs,n` | `Rs` into the first `n` elements; `n = 0` means all |
| `VADDU Vd,Vj,Vk` | multi-word add with the carry rippling up; the final carry is added to CAR |
| `VSAMULT Vd,Vj,Rs` | multi-word integer `Vj * Rs`; the top word goes to CAR |
| `VSPMULT Vd,Vj,Rs` | multi-word carry-less (GF(2)[x]) `Vj * Rs`; the top word goes to CAR |
| `VLOAD Vd,Rs,n` | loads `n+1` words: element `e` from lane `e mod R`, row `Rs + e div R` |
| `VSTORE Rs,Vj,n` | stores `n+1` words, same placement as `VLOAD` |
| `VBYTELD Vd,Rs,n` | in `n+1` words, each byte `x` in byte position `b` is replaced by byte array `b` at row `Rs + x` |
| `VTRANSP Vd,Vj,n` | `n = 0`: copy. Otherwise every block of 4 words is transposed as a 4x4 byte matrix |
| `VWSHL Vd,Vj,n` | shift up by `n` words, zeros in at the bottom; the word leaving is written to CAR |
| `VWSHR Vd,Vj,n` | shift down by `n` words; CAR enters at element `P-n` |
| `VEXTRACT Rt,Vj,n` | returns `Vj[n-1]`, or CAR when `n = 0` |
| `MTVCR Rs` / `MFVCR` | write / read VCR |
| `MTVL Rs` | set the vector length `l` to `Rs`; 0 or a value above `P` selects `P` |

**Vector length.** The register `l` (reset value `P`) limits the element-wise
and multi-word instructions (`VXOR`, `VBCROTR`, `VMPMUL`, `VSADDU`, `VSMOVE`,
`VADDU`, `VSAMULT`, `VSPMULT`):

- They act on elements `0..l-1` only; the others keep their contents.
- They take `ceil(l/R)` iterations instead of `P/R`, so with `R < P` a short
  vector also issues faster.
- `VADDU` adds its final carry to CAR only when `l = P`; otherwise CAR is kept.
- `VSAMULT`/`VSPMULT` write the word above element `l-1` to CAR.
- `VSMOVE` writes `min(n, l)` elements, or `l` when `n = 0`.

Memory instructions keep their own counts, and the whole-register instructions
and `VEXTRACT` always see all `P` elements.

The types live in `rtl/vemicry_pkg.sv`:

- `vinstr_t` is the decoded instruction: `op`, `vd`, `vj`, `vk`, `n`, `rs`.
- `VSTORE` and `VEXTRACT` take their vector register in `vj`.
- `VBYTELD` reads and writes `vd`.

## The pipeline

An accepted instruction enters **DF** in the cycle it is accepted, which is the
scalar core's EX cycle. Each group then passes through four stages:

- **DF** reads the register file.
- **EXM** does the multiply/add work of the multi-word instructions and presents
  the memory address.
- **EXC** selects carries, does all element-wise work and takes the memory read
  data.
- **WB** writes the result back.

The groups of one instruction enter DF on consecutive cycles, so a new
instruction issues every `P/R` cycles:

```
cycle          0    1    2    3    4    5
group 0        DF   EXM  EXC  WB
group 1             DF   EXM  EXC  WB            (P/R = 2)
next instr               DF   EXM  EXC  WB
```

**Instruction classes.** What matters for hazards is *when* an instruction needs
its operands:

| Class | Instructions | Operand needed at |
|---|---|---|
| element-wise | `VXOR`, `VBCROTR`, `VMPMUL`, `VSADDU`, `VSMOVE` | EXC |
| multi-word (carry/high word from the element below) | `VADDU`, `VSAMULT`, `VSPMULT` | EXM |
| memory | `VLOAD` (no vector operand), `VSTORE`, `VBYTELD` | EXM |
| whole-register | `VTRANSP`, `VWSHL`, `VWSHR` | computed at issue |
| scalar | `MTVCR`, `MFVCR`, `VEXTRACT`, `MTVL` | at issue |

**Forwarding and stalls.** A result exists only at the end of EXC. Each lane
forwards its WB register into the operands of the instruction in EXM and of the
one in EXC, when these were read from the same register and group. The register
file is write-through, so DF also sees the value WB writes in the same cycle.
With these paths, only one case costs a cycle. When `P/R = 1`, an instruction
that needs its operand at EXM, issued right after the instruction producing it,
is held for one cycle (`ev.hazard_stall`). Its EXM then lines up with the
producer's WB. Element-wise consumers never stall. When `P/R >= 2`, the same
group of the producer is already in WB when the consumer reaches EXM, and no
stall occurs. This matches the rule that hazards matter only for `P/R <= 2`.
With a short vector (`l <= R`) every instruction takes one iteration, so the
stall can also occur when `R < P`.

| Previous instruction | Next instruction | Stall (P/R = 1) | Forwarded from WB into |
|---|---|---|---|
| element-wise | element-wise | none | EXC |
| element-wise | multi-word / VSTORE / VBYTELD | 1 cycle | EXM |
| multi-word | element-wise | none | EXC |
| multi-word | multi-word / VSTORE / VBYTELD | 1 cycle | EXM |

**Multi-word arithmetic across lanes.** Each VPU has a 32-bit carry-select adder
(`vemicry_csa`), which forms the sum for an incoming carry of 0 and of 1:

- In EXM, lane `j` computes its 64-bit product and adds the high word of lane
  `j-1`'s product, which is available combinationally in the same stage.
- In EXC, only the selection ripples up through the `R` lanes.
- Lane `R-1`'s carry and high word pass to lane 0 of the next group through one
  register each. Because groups follow each other on consecutive cycles, a
  `P`-word multiply-accumulate keeps the same issue rate as an element-wise
  instruction.

**Whole-register and scalar-result instructions.**
- `VTRANSP`, `VWSHL`, `VWSHR` and `VEXTRACT` move data between lanes. They wait
  until EXM and EXC are empty (`ev.drain_wait`), read the whole register in one
  cycle, and compute the result in `vemicry_permute`.
- For `VEXTRACT`, the result returns on `res_data` one cycle later.
- For the three permutes, the lanes then write the result back group by group.

**VCR timing.** `MTVCR` takes effect at once. Every instruction takes its copy
of VCR when it enters DF, so a later `MTVCR` cannot change an instruction
already in flight.

## Interface and timing (`vemicry`)

| Port | Direction | Function |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `iss_valid`, `iss_instr`, `iss_ready` | in, in, out | instruction handshake. The instruction is accepted on a cycle with both valid and ready high. `iss_ready` depends on the offered instruction (hazards, drain) and stays low during the remaining groups of a multi-group instruction |
| `res_valid`, `res_data` | out | one-cycle pulse with the `VEXTRACT` / `MFVCR` result, the cycle after acceptance |
| `hm_req`, `hm_we`, `hm_lane`, `hm_addr`, `hm_be`, `hm_wdata`, `hm_gnt` | in ×6, out | host access to one word of one lane's bank. Granted unless a memory instruction is in EXM |
| `hm_rdata` | out | host read data, the cycle after the grant |
| `busy` | out | an instruction is still in the pipeline |
| `ev` | out | per-cycle flags: hazard stall, drain wait, forward into EXM, forward into EXC, DF write-through, later group in DF |

The register file and the memory banks have no reset. Software initialises what
it reads, for example with `VSMOVE Vx, R0, 0`.

## Sources

One module per file, in `rtl/`:

| File | Block |
|---|---|
| `vemicry.sv` | top: controller, register file, permute unit, control registers, `R` lanes with their banks, lane-to-lane chains, host port |
| `vemicry_ctrl.sv` | issue, vector length register, group sequencing, stall and drain rules, stage control registers, `VEXTRACT`/`MFVCR` result |
| `vemicry_vrf.sv` | vector register file: two group read ports, one whole-register read port, one group write port |
| `vemicry_vpu.sv` | one lane: EXM/EXC/WB datapath, forwarding, memory port |
| `vemicry_csa.sv` | carry-select adder |
| `vemicry_lane_mem.sv` | lane memory bank, four byte arrays |
| `vemicry_permute.sv` | `VTRANSP`, `VWSHL`, `VWSHR` |
| `vemicry_cregs.sv` | VCR, SBI, CAR and the CAR update rules |
| `vemicry_pkg.sv` | opcodes, instruction and control structs, classification |

## Programs and measured cycles

`tb/tb_vemicry.sv` runs these programs through the issue port. The scalar work
(loop control, key schedule, reading `a(x)` word by word) is done by the
testbench:

- **AES-128**, run twice: one 16-byte block with `l = 4`, then two blocks at
  once with `l = 8` (8 words per register). `MTVL` sets `l` at the start. The
  word counts of `VLOAD`, `VBYTELD` and `VSTORE` are `l-1`:
  - AddRoundKey: `VLOAD` of the round key, then `VXOR`.
  - SubBytes: `VBYTELD` with the S-box replicated in all four byte arrays.
  - ShiftRows: `VTRANSP`, then three `VBCROTR` by 24 under VCR masks
    `0xEE`/`0xCC`/`0x88`, then `VTRANSP`.
  - MixColumns: three `VBCROTR` by 8/16/24 under VCR = `0xFFFF`, `VXOR`,
    `VMPMUL` under VCR = `0x11B`, three `VXOR`, using
    `a' = x(a^b) ^ b ^ c ^ d` and its rotations.
  - Block 0 is the FIPS-197 example (`69c4e0d8...70b4c55a`).
- **Montgomery multiplication in GF(2^191)** with `f = x^191 + x^9 + 1` and six
  32-bit reduction steps. Each step is:
  `VSPMULT` (a_j·b), `VXOR`, `VEXTRACT` C0, `VSMOVE`, `VSPMULT` (C0·N0),
  `VEXTRACT` M, `VSPMULT` (M·f), `VXOR`, `VWSHR` by one word.
  `N0 = F0^-1 mod x^32`. The result is compared with `a·b·x^-192 mod f`,
  computed bit-serially.

Co-processor cycles from the first vector instruction to the end of the last
write-back, as printed by the testbench:

| Program | r = 8 (default) | r = 4 |
|---|---|---|
| AES-128, 16 bytes (1 block, `l = 4`) | 259 | 302 |
| AES-128, 32 bytes (2 blocks, `l = 8`) | 259 | 404 |
| GF(2^191) Montgomery multiplication | 109 | 153 |

These counts cover the vector instruction stream only. The scalar instructions
of a real program would overlap with them. At r = 8 the counts include the drain
waits of the `VTRANSP`/`VWSHR`/`VEXTRACT` instructions and the one-cycle hazard
stalls.

At r = 8 a second AES block costs nothing, because both blocks fit in one
register. At r = 4 a single block with `l = 4` needs one iteration per
instruction instead of two, which saves a quarter of the cycles.

These are pipeline cycles of the vector unit. They cannot be compared directly
with instruction counts from an instruction-level model in which every
instruction, scalar or vector, takes one cycle.

Capacity at the defaults:

- The AES state of two blocks (8 words) fills a register exactly.
- The S-box uses 256 of the 1024 rows of each byte array.
- A 191-bit operand takes 6 of the 8 elements, and the Montgomery loop uses 6 of
  the 8 registers.
- Operands up to 256 bits fit in one register.
- RSA-size operands (1024 bits or more) would need `P >= 32`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_vemicry` | the end-to-end programs above, directed carry chains (`VADDU`/`VSAMULT`/`VSPMULT` whose carry or high word crosses every element and iteration), plus a 400-instruction random stream over 4 registers (dense hazards) against an instruction-level model in `vemicry_tb_runner`. It runs the default machine and an r = 4 machine side by side. The random stream also changes the vector length. It checks issue interval, stall cycles and write-back latency, also for `l = R`. It fails if any mechanism (hazard stall, drain wait, forwarding into EXM and into EXC, write-through, multi-group issue, short vectors, host access) never occurred |
| `tb_vemicry_vpu` | one lane with its bank. Four groups per instruction exercise the carry and high-word chains; back-to-back single-group instructions exercise forwarding |
| `tb_vemicry_ctrl` | issue timing, group and first/last flags, stall and drain rules, results, vector length (counts, iterations, stall with `l <= R`) |
| `tb_vemicry_vrf`, `tb_vemicry_lane_mem`, `tb_vemicry_permute`, `tb_vemicry_cregs`, `tb_vemicry_csa` | the smaller blocks against reference models |

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_vemicry \
    -y rtl -y tb +libext+.sv -Irtl rtl/vemicry_pkg.sv tb/tb_vemicry.sv -o sim
./obj_dir/sim
```

The end-to-end build takes about two minutes, and the run well under a second.
The other testbenches build the same way with their own `--top-module`. Uninitialised
state is randomised (`+verilator+rand+reset+2`) without changing the results.

## Where this RTL departs from or adds to the architecture

**Not built**
- **The MIPS core itself.** Its side of the co-processor interface is the
  `iss_*`/`res_*` ports.

**Own choices where the architecture is silent**
- **Vector length.** The architecture only suggests a configuration register
  for `l`. The `MTVL` instruction and its encoding are this design's own, as
  is the choice of which instructions `l` applies to. CAR after `VADDU` follows
  the architecture (updated only when `l = P`). CAR after `VSAMULT`/`VSPMULT`
  with `l < P` is this design's choice.
- **Word counts.** The code examples load "4 words" with `n = 3` and "6 words"
  with `n = 5`, so `VLOAD`, `VSTORE` and `VBYTELD` act on `n+1` words.
  `VSMOVE` uses `n` words, with 0 meaning all.
- **VCR width.** VCR is specified as `P` bits, but `VMPMUL` reads a 9-bit
  polynomial from it and the AES code writes `0x11B` and `0xFFFF`. VCR is
  32 bits here.
- **Memory placement.** Word `e` of a vector goes to lane `e mod R`, row
  `base + e div R`. Lookup tables for `VBYTELD` must be replicated in all four
  byte arrays. The host port for filling the banks is an addition.
- **Memory timing.** Memory instructions present their address in EXM, one stage
  before the data are used, because the bank read is registered.
- **Whole-register instructions.** `VTRANSP` is computed by a separate permute
  unit after a pipeline drain, rather than as a carry-chained lane operation.
  The same holds for `VWSHL`/`VWSHR`, whose class the architecture does not give.
  The transpose stride `n` only selects copy (`0`) or 4x4 byte-block transpose.
  For shifts by more than one word, the choices are: the word leaving from
  element `P-n` goes to CAR, and CAR enters at element `P-n`.
- **VSADDU.** It sets only the CAR bits of the elements it touches.
- **Memory-instruction hazards.** The stall rule is extended to `VSTORE` and
  `VBYTELD`, whose operands are needed in EXM.
- **Structure and timing details.** The register file is built from flip-flops
  with write-through. The result of `VEXTRACT`/`MFVCR` comes one cycle after
  issue. Reset is synchronous and active low.
- **Limits.** The register-number field allows up to 16 registers. VCR and CAR
  bit fields cover up to 32 elements.
