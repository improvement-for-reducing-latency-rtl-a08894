# Hiding load latency with LTAPB and FAC-like address prediction

In a classic five-stage RISC pipeline a load spends two cycles before its data
exists. In EXE the ALU adds base register and offset to form the effective
address; in MEM that address reads the data cache. An instruction that uses
the loaded value right away has to wait a cycle. This RTL starts the cache
access earlier, in two ways that can be combined:

* **FAC-like** (fast address calculation): a separate carry-select adder
  predicts the cache address fields so that the cache can be read *in EXE*,
  in the same cycle as the address is computed. That saves one cycle.
* **LTAPB** (Load Target Address Prediction Buffer): a small table, looked up
  with the PC during fetch, remembers the effective address each load used
  last time. On a hit the cache is read *in ID*, before the base register has
  even been read. That saves two cycles.
* **Hybrid**: the LTAPB is tried first, then FAC-like, then the normal
  EXE/MEM path.

The design follows the schemes described in the paper *Improvement for
Reducing Latency of Load Instructions*. The pipeline around them, the
instruction set, the cache geometry and the miss handling belong to this
implementation. Where it departs from the paper is listed at the end.

## The three load paths

| path | cache read in | address from | data ready at end of | consumer right behind the load |
|---|---|---|---|---|
| LTAPB | ID (port A) | `Effec_Addr` of the hit entry | ID | no stall |
| FAC-like | EXE (port B) | carry-select predictor, `FAC_Vali`=1 and `FAC_enable2`=1 | EXE | no stall |
| normal | MEM (port B) | EXE ALU | MEM | one load-use stall |

Every load retires with a `retire_path` code saying which path served it.
The paths are tried in order. A path that does not apply passes the load on:

* An LTAPB hit whose cache read in ID misses does **not** refill. The load goes on
  to EXE as if it had missed in the LTAPB, and from there it needs its base
  register again. Refilling from ID was tried and dropped. An LTAPB load in ID
  and an older load in EXE/MEM can map to the same set with different tags,
  and each refill would then evict the other's line forever.
* FAC-like gives way when `FAC_Vali` is low (the sum leaves the address
  space) or when `FAC_enable2` is low. `FAC_enable2` is low when the load in
  MEM needs port B for a normal access. The older access always wins, so a
  normal load is never delayed by a prediction.
* A port-B miss, whether FAC-like or normal, freezes the whole pipeline. The line is
  fetched over the refill port and the access is repeated, and then it hits.

The load-use interlock in ID is the only data stall. It fires when the
instruction in ID reads the destination of a load in EXE that will not have
its data by the end of this cycle. "Will not" is known in that same cycle: it
is `!(FAC_Vali & FAC_enable2 & hit)`. The predictor's single validity bit is
what makes this decision cheap. A load served by the LTAPB does not read its
base register, so it never waits for it.

Results reach EXE through the EX/MEM and MEM/WB registers, and through the
register file's write-through for values written in WB. Branches (`BNE`)
resolve in EXE. When one is taken it squashes IF and ID (predict not taken,
two lost cycles).

## The FAC-like predictor (`fac_predictor`, `csel_adder`, `dcache_addr_sel`)

The 32-bit address is split the way the cache sees it:

```
 31            S  S-1        B  B-1       0
 [     tag      ] [ set index ] [ block ofs ]      B = 5, S = 14 by default
```

Each field has its own carry-select section (`csel_adder`), which computes the
field sum for carry-in 0 and for carry-in 1. The block-offset carry picks
the set-index result and carry, and that carry picks the tag result. The
section delay therefore does not add up along the address.

`FAC_Vali` is low only if the 32-bit sum leaves the address space. With a
sign-extended 16-bit offset that happens when the tag carry-out differs from
the offset's sign bit. For non-negative offsets this is simply "no carry out".
Otherwise the predicted address is the true address, so a valid
prediction never needs to be checked against the ALU.

`dcache_addr_sel` holds the three per-field 2:1 multiplexers in front of cache
port B. They choose between the predicted fields of the load in EXE and the
ALU address of the load in MEM, steered by `FAC_Vali & FAC_enable2`. The
select also goes back to the control logic, which uses it to assign port B's
result to EXE or MEM.

## The LTAPB (`ltapb`)

Each of the 64 fully associative entries has the six fields of the paper's
structure:

| field | bits | meaning |
|---|---|---|
| TAG | 64 | PC of the load |
| Valid | 1 | `Effec_Addr` may be used |
| Reserved | 1 | entry held for an instruction in flight, waiting for its EXE result |
| Base_Num | 5 | base register of the load |
| Effec_Addr | 64 | effective address of its last execution |
| Ref_Count | 2 | hits, saturating; drives replacement |

TAG and `Effec_Addr` are 64 bits wide. The pipeline's 32-bit PC and addresses
are zero-extended into them.

The life of an entry, stage by stage:

1. **IF, hit.** A valid entry whose TAG matches the PC returns `Effec_Addr`.
   `Ref_Count` increments when the fetched instruction actually advances
   (`lk_en`).
2. **IF, miss.** Fetch cannot tell a load from anything else, so every
   instruction that misses reserves an entry (`Reserved=1`, `Valid=0`,
   `TAG=PC`), in this order of preference:
   * an entry already tagged with this PC;
   * a free entry;
   * the non-reserved entry with the lowest `Ref_Count` (lowest index on a tie).

   Reserved entries are never replaced. If all entries are reserved, nothing
   is reserved.
3. **ID.** A non-load releases its entry. A load keeps it and records its base
   register in `Base_Num`. A load whose destination is its own base register
   releases its entry, because its address would be stale at once. An
   instruction squashed by a taken branch releases its entry.
4. **EXE.** A load that still holds a reserved entry writes its ALU address
   into `Effec_Addr` and sets Valid.
5. **Dependency.** Any instruction leaving ID compares its destination with
   every entry's `Base_Num`. Matching entries, valid or still waiting for a
   fill, lose Valid and Reserved. The next execution of such a load finds the
   entry by its TAG, reuses it, and refills it with the address formed from
   the new base value. That is how an invalidated entry gets its address
   updated and becomes valid again.

The table holds no offsets, so an address can only be refreshed by running
the load again. Three same-cycle cases need care:

* The writer of a base register is in ID while a load using it is fetched.
  The ID comparison is applied combinationally to that lookup, so the load
  misses.
* The writer is in ID while the load's fill leaves EXE. The fill is dropped.
* Updates are applied in the order decode, dependency, fill, fetch, so the
  youngest instruction's action wins.

With these rules a hit always returns the address the load would compute.
No recovery from a wrong prediction is needed. This relies on the program
having no stores.

## Instruction set and interfaces

MIPS-style encoding, 32-bit instructions, 32 registers, `r0` reads zero:

| instruction | encoding | effect |
|---|---|---|
| `ADDU rd, rs, rt` | `op=0x00`, rd in [15:11] (word 0 is `NOP`) | rd = rs + rt |
| `ADDIU rt, rs, imm` | `op=0x09` | rt = rs + sext(imm) |
| `LW rt, imm(rs)` | `op=0x23` | rt = mem[rs + sext(imm)], word aligned |
| `BNE rs, rt, off` | `op=0x05` | if rs != rt: pc = pc + 4 + sext(off)·4 |
| `HALT` | `op=0x3f` | stop once it retires |

There are no stores. Data comes from the next memory level through the refill
port.

Ports of `hybrid_load_pipeline`:

* `cfg_ltapb_en`, `cfg_fac_en` select the configuration: both low is the
  baseline pipeline, both high the hybrid. Change them only under reset.
* `imem_addr` / `imem_rdata`: the instruction is read combinationally in IF.
* Refill: `mem_req` rises with a line-aligned `mem_addr` and stays high until
  a cycle with `mem_valid` high and the 256-bit `mem_line`. Any latency is
  allowed. Assertions in the top check this handshake. A refill costs one
  detection cycle plus the cycles `mem_req` is high.
* `retire_*` give the retiring instruction (PC, register write, load path).
  `events` (`lp_pkg::events_t`) has one strobe per mechanism: LTAPB
  hit/reserve/evict/release/dependency-kill/fill/ID-miss, FAC-like hit,
  invalid and port-busy, normal load, load-use stall, refill, branch flush,
  forwarding from each register, retire. `halted` rises after `HALT` retires.

Reset is synchronous and active low. It clears the pipeline, the register
file, the cache valid bits and the LTAPB.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `hybrid_load_pipeline`, `ltapb` | `LT_N` / `N` | 64 | LTAPB entries; the paper also evaluates 4, 16 and 32 |
| | `LT_TAG_W`, `LT_EA_W` | 64, 64 | TAG and `Effec_Addr` widths |
| `ltapb` | `REG_W`, `RC_W` | 5, 2 | Base_Num and Ref_Count widths |
| cache, predictor, select | `DC_B` / `B` | 5 | 32-byte lines (own choice) |
| | `DC_S` / `S` | 14 | 16 KiB direct mapped (own choice) |
| `dcache` | `NRD` | 2 | read ports |

## Files

`rtl/lp_pkg.sv` holds the opcodes, decoder, load-path codes and event
struct. Each module has one file: `csel_adder`, `fac_predictor`,
`dcache_addr_sel`, `dcache`, `regfile`, `ltapb` and the top
`hybrid_load_pipeline`. Each file begins with a description of its function,
timing and interface.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_csel_adder`, `tb_fac_predictor`, `tb_dcache_addr_sel`, `tb_regfile`
  check against plain arithmetic or shadow models. The adder test is
  exhaustive at 4 bits. The predictor test includes both wrap directions.
* `tb_dcache` checks both ports against a shadow copy of tags and lines.
* `tb_ltapb` (4 entries) covers each rule above directly: hit, release,
  invalidation, same-cycle bypass, dropped fill, replacement order, and the
  all-reserved case. A random part checks, against a model, that a PC hits
  exactly when it was filled and its base register has not been written
  since.
* `tb_hybrid_load_pipeline` runs the top at its default sizes. An
  instruction-set model runs each program first, and every retirement is
  compared with it. Each program runs in all four configurations. The cycle
  count must equal retired + 4 + 2·taken branches + load-use stalls + refill
  cycles. Hand-derived expectations are checked on microbenchmarks; for
  example, a 10-iteration loop of `LW`+use stalls 10 times on the baseline,
  once with LTAPB only (first iteration), and never with FAC-like or hybrid.
  Random loop programs follow. Every event must occur at least once.
* `tb_ltapb_sweep` runs one load-heavy loop on the hybrid pipeline with 4,
  16, 32 and 64 LTAPB entries, the sizes the paper sweeps. It checks the
  results, and that LTAPB-served loads never decrease as entries grow.

To run one with plain Verilator (package first):

```
verilator --binary --timing --assert -Irtl rtl/lp_pkg.sv rtl/*.sv \
          tb/tb_hybrid_load_pipeline.sv --top-module tb_hybrid_load_pipeline
./obj_dir/Vtb_hybrid_load_pipeline
```

All testbenches finish in well under a second.

## Departures from the paper and limits

* **Pipeline.** The paper measures its schemes on an out-of-order simulator
  running SPEC95. It describes them on the in-order stages
  IF/ID/EXE/MEM/WB, and that in-order pipeline is what is built here. The
  small instruction set cannot run those benchmarks: there are no stores,
  floating point, or other MIPS instructions. The paper's speedups and miss
  ratios are therefore not reproduced.
* **Not built.** The instruction cache (brought out as a fetch port), the TLB
  (addresses are used untranslated) and the lower memory levels (brought out
  as the refill port) are described only by name.
* **LTAPB dependency update.** The paper says a conflicting entry is updated
  "when the base register's new value is computed". With no offset in the
  entry, that update happens here at the load's next execution. The check
  is a one-cycle parallel compare, not a multi-cycle checking mode.
* **Replacement.** Ref_Count decides the victim, as in the paper. Skipping
  reserved entries, preferring free entries and saturating the counter are
  choices made here.
* **FAC-like validity.** The carry test is extended to negative offsets, as
  described above.
* **Cache.** The geometry (16 KiB, direct mapped, 32-byte lines) is chosen
  here. So are the two read ports, which stand in for the paper's
  "sufficient cache bandwidth" assumption. `FAC_enable2` is asserted only
  when the MEM stage does not need the shared port.
* **Widths.** The LTAPB keeps its 64-bit TAG and address fields, although the
  rest of the datapath is 32 bits wide.
