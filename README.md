# Butterfly instructions for a dual-issue RISC-V core: NTT execute cluster

Post-quantum signature and key-exchange schemes such as ML-DSA (Dilithium)
and ML-KEM (Kyber) spend most of their non-hash time multiplying
polynomials. They do it with the number-theoretic transform (NTT): transform
both operands, multiply coefficient by coefficient, and transform back. The
inner operation of every transform is the **butterfly**. It takes three
inputs (two coefficients `a`, `b` and a twiddle factor `z`) and produces two
outputs. A RISC-V register-register instruction has two sources and one
destination, so a plain core needs several instructions per butterfly.

This design adds butterfly instructions to the execute stage of a
**dual-issue, in-order-issue, out-of-order-completion** core in the style of
CVA6. It uses the fact that a superscalar core already has what a butterfly
needs:

* **Three operands.** Two issue ports give four register read ports. A
  butterfly issued from slot 0 reads `b` and `z` on its own port and borrows
  the second read port of slot 1 for `a`.
* **Two results.** Two result paths, one per ALU, reach the scoreboard. The
  butterfly's `b'` goes out on the ALU path and `a'` on the ALU2 path, both
  into one scoreboard entry.
* **Overlap with loads.** The half of slot 1 that the butterfly leaves free
  can issue a load in the same cycle.
* **Triple commit.** Commit retires three register results per cycle: a
  butterfly's two plus a load's one. A butterfly+load pair per cycle
  therefore never backs up the scoreboard.

Only the issue, execute, scoreboard and commit part is given as RTL. The
front end (PC generation, fetch, instruction cache, decode) is not included.
Instructions enter already decoded.

## Arithmetic

All butterfly arithmetic is modulo the ML-DSA prime q = 8380417
(2^23 - 2^13 + 1). Products use Montgomery form with R = 2^32.
`x.z` denotes `x * z * 2^-32 mod q`. Twiddle factors are therefore stored
pre-multiplied by 2^32 (mod q), and `x.z` then equals the true product
`x * zeta`.

| instruction | `a` (rd) | `b` (rs1) | `z` (rs2) | results |
|---|---|---|---|---|
| `btf.ct a, b, z` (Cooley-Tukey, forward NTT) | read, written | read, written | read | `a' = a + b.z`, `b' = a - b.z` |
| `btf.gs a, b, z` (Gentleman-Sande, inverse NTT) | read, written | read, written | read | `a' = a + b`, `b' = (a - b).z` |
| `btf.mm rd, b, z` (pointwise Montgomery product) | written | read | read | `rd = b.z` |

Operands and results are canonical, in `[0, q)`. The instruction encodings
are not fixed here. `ntt_pkg::instr_t` holds the decoded fields
`{op, rd, rs1, rs2, imm}`.

## The butterfly unit (`btf_unit`)

```
  a ─┬──────────────────────────────────────┬──────────────┐
     └─[a-b mod q]─┐                         │              │
  b ───────────────┴─►mux(ct/mm: b, gs: a-b)─►MUL──►║──►REDC─┬─►[a - r]──►mux─► b'  (ALU path)
  z ────────────────────────────────────────►      ║        │              ▲ gs/mm: r
                                                   reg      └─►mux(ct: r, gs: b)─►[a + ·]─► a' (ALU2 path)
```

* **First cycle.** A modular subtractor forms `a - b`, which only `btf.gs`
  uses. A multiplexer picks the multiplier input: `b` for ct and mm,
  `a - b` for gs. The 32x32 multiplier result is registered.
* **Second cycle.** Montgomery reduction (`mont_reduce`) turns the 64-bit
  product into `r` in `[0, q)`. A modular subtractor computes `a - r`, and a
  modular adder computes `a + r` (ct) or `a + b` (gs).
* **Output multiplexers.** They choose `b'` as `a - r` (ct) or `r` (gs, mm).

The unit accepts one operation per cycle, and results appear one clock after
its inputs. In the cluster a butterfly issued in cycle t reaches the
scoreboard at the end of t+2, one cycle later than an ALU result. The path
from the pipeline register through the reduction, the adder and the result
multiplexer is the unit's longest.

`mont_reduce` is textbook REDC:

* `m = t * (-q^-1) mod 2^32`
* `u = (t + m*q) / 2^32`
* subtract q once if `u >= q`

The constant is `-q^-1 mod 2^32 = 4236238847`.

## Issue rules (`issue_stage`)

Each cycle two decoded instructions are offered, slot 0 being the older.
Slot 0 issues if all of these hold:

* none of its source or destination registers is still to be written by an
  entry in the scoreboard;
* a scoreboard entry is free (stores take none);
* its result path is free. If a butterfly issued in the previous cycle, an
  ALU op on port 0 must wait one cycle (for ct/gs, on port 1 as well),
  because both results would reach the same multiplexer in the same cycle.

Slot 1 issues only together with slot 0, and only if:

* it does not read or write anything slot 0 writes;
* at most one of the two is a load or store (there is one LSU);
* the scoreboard has room for both.

A butterfly (ct/gs) in slot 0 pairs **only with a load** in slot 1. The
butterfly's `a` occupies the second read port of slot 1; the load uses the
first for its base. A `btf.mm` leaves slot 1 entirely free. A butterfly
never issues from slot 1.

There is **no operand forwarding**. A consumer reads the register file after
its producer has committed, four cycles after a butterfly or load issued.
This is the main reason the transforms below run slower than the figures
reported for the complete core. CVA6 itself forwards from its scoreboard.

## Scoreboard and commit (`scoreboard`, `regfile`)

The scoreboard is a circular table of 8 entries:

* **Entries.** Each has up to two destination registers, a pending bit per
  destination and the results.
* **Allocation.** Issue allocates one entry per instruction in program
  order.
* **Write-back.** Three ports fill results in any order: ALU / butterfly
  `b'`, ALU2 / butterfly `a'`, and the LSU.
* **Commit.** Commit walks from the oldest entry and retires finished
  entries while their register writes fit in `NR_COMMIT_PORTS` (3). The
  writes go to the register file at the end of that cycle.
* **Busy vector.** `busy_o` lists every register that a live entry will
  still write. It drives the issue stalls.

The register file has four combinational read ports and `NR_COMMIT_PORTS`
write ports. x0 is always zero.

## Top level (`cva6_ntt_cluster`)

| port | dir | meaning |
|---|---|---|
| `clk_i`, `rst_ni` | in | clock, asynchronous active-low reset |
| `instr_i[2]`, `instr_valid_i[2]` | in | decoded instruction pair, slot 0 oldest |
| `instr_ack_o[2]` | out | slots issued this cycle (combinational); advance the stream by the count |
| `ext_en_i`, `ext_we_i`, `ext_addr_i`, `ext_wdata_i`, `ext_rdata_o` | in/out | word access to the data memory, served in cycles without a core load/store; read data one cycle later |
| `idle_o` | out | nothing in flight |
| `issue_ev_o` | out | per-cycle issue events (dual issue, butterfly+load pair, stalls by cause) |
| `commit_writes_o` | out | register writes committed this cycle |

Parameters:

* `DMEM_WORDS` (1024) sets the data memory size.
* `NR_COMMIT_PORTS` (3) sets the commit width. Setting it to 2 gives the
  commit width of the unmodified core.
* The scoreboard size `NR_SB_ENTRIES` (8) and q are constants in `ntt_pkg`.

Supported operations: `add`, `sub`, `addi`, `lw`, `sw` (word only), `btf.ct`,
`btf.gs`, `btf.mm`. The ALU and LSU here are minimal stand-ins for the
core's own units.

## Performance

The testbench `tb_cva6_ntt_cluster` performs a complete 256-coefficient
negacyclic polynomial multiplication at the default parameters. The
instruction stream is generated in the testbench and register-blocked:

* 16 coefficients live in registers through four NTT layers, two passes per
  transform;
* twiddles are loaded just before use, so most loads pair with a butterfly;
* the stores of one block interleave with the loads of the next.

Cycle counts for this cluster, against figures reported for a complete
superscalar CVA6 with butterfly instructions and its own software:

| kernel | memory instr. | this cluster | reported, complete core | base dual-issue core, no butterfly |
|---|---|---|---|---|
| NTT (256) | 1504 | 3521 | 1913 | 10335 |
| NTT^-1 (256) | 1504 | 3521 | 1892 | 11333 |
| pointwise product | 768 | 774 | 807 | 2188 |

The pointwise product is limited by the single memory port and comes within
1 % of that bound. The transforms lose cycles mainly to read-after-write
stalls that forwarding would remove. With two commit ports
(`tb_cluster_two_commit`) the same NTT takes 3969 cycles. A burst of
butterfly+load pairs then fills the scoreboard: 15 cycles instead of 9.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_mont_reduce` | 5000 random and extreme products against `t * 2^-32 mod q` by plain modular arithmetic |
| `tb_btf_unit` | random ct/gs/mm back to back with gaps; exact values, latency 1, tag |
| `tb_alu`, `tb_regfile`, `tb_lsu` | random traffic against array and arithmetic models; load latency |
| `tb_scoreboard` | random allocation and out-of-order write-back against a queue model; commit is exactly the greedy in-order prefix that fits three writes; busy and free counts |
| `tb_issue_stage` | directed cases for every pairing and stall rule and for operand routing, then 4000 random pairs with random busy masks and scoreboard space checked against the issue rules |
| `tb_cva6_ntt_cluster` | NTT(P), NTT(Q) against a direct transform; P x Q against the schoolbook product; cycle bounds; each mechanism occurs (butterfly alone, butterfly+load pair, ALU dual issue, hazard stall, result-port stall, triple commit, ct/gs/mm) |
| `tb_cluster_two_commit` | the same with two commit ports; scoreboard-full stalls occur |

The reference values in the testbenches use plain 64-bit modular
arithmetic, not the Montgomery datapath. The twiddles are
`zeta_k = 1753^bitrev8(k) mod q`. The inverse uses `q - zeta_k`. The final
scaling constant is `256^-1 * 2^64 mod q`, which undoes the Montgomery
factors of the pointwise and scaling products.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ntt_pkg.sv tb/tb_ntt_ref_pkg.sv tb/tb_cva6_ntt_cluster.sv \
  --top-module tb_cva6_ntt_cluster -o sim && obj_dir/sim
```

The full-size run takes a few seconds.

## Where this departs from, or goes beyond, the source design

* **Own choices.** The modulus, R = 2^32, canonical operand ranges, the
  one-register butterfly latency, and the scoreboard size (8) are this
  design's reading of a 32-bit ML-DSA implementation.
* **One scoreboard entry per butterfly.** A butterfly writes both `a` and
  `b` from a single entry, which is the final form of the scheme. An earlier
  form split the butterfly into two entries, one per issue slot. That form
  is not built.
* **No operand forwarding** from the scoreboard or the result buses (see
  above).
* **No front end.** Instructions are offered already decoded. There are no
  branches, exceptions or CSRs.
* **Minimal LSU.** A single-port, word-only memory with a one-cycle load
  stands in for the core's LSU and data cache. A memory instruction may
  issue from either slot. With a butterfly it must be a load in slot 1.
* **Minimal ALU.** Only `add`, `sub` and `addi` are implemented.
* **ML-DSA only.** The butterfly unit does not support ML-KEM's q = 3329.
