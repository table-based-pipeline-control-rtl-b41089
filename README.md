# A scoreboard-controlled w75 pipeline back end

A pipelined processor whose functional units sit in several stages has many places
where a freshly computed register value can be before it reaches the register file,
and every consumer must pick the newest one at the right moment. Writing that control
as a state machine explodes in states. This design instead keeps a small **table**
(a scoreboard) that records, for every functional unit, whether it is busy and for how
long, and for every register, *where* its newest value is and *how many cycles* until
it exists. The instruction in decode reads the table, and the table alone decides
whether it may go on and which bypass input feeds each of its operands.

The control scheme follows the lecture notes *Table-Based Pipeline Control Logic*
(CS3220 Processor Design, 2005) and their w75 pipeline, an x86-like ISA with
load-op and load-op-store instructions. The SystemVerilog, the instruction record,
the cache and handshake interfaces and the divider are this design's own.

## The pipeline: one instruction per stage, two paths

```
        D (decode/RF read)    LE (load/exec1)     E2 (exec2)        SW (store/write-back)
                            +---------------+   +------------+   +----------------------+
 upper path  loads,         | D$ load port  |-->|   INT2     |-->| ST latch, D$ store,  |
 load-ops, stores,     ---> |               |   |            |   | register write       |
 load-op-stores             +---------------+   +------------+   +----------------------+
                            +---------------+   +------------+   +----------------------+
 lower path  reg/imm   ---> |     INT1      |-->| BP1 latch  |-->| BP2 latch, register  |
 operations                 +---------------+   +------------+   | write                |
                                                                 +----------------------+
```

* An instruction of the form `op A B` computes `A = A op B`. `A` is a register or the
  memory word at `[ra]`; `B` is a register, an immediate or the memory word at `[rb]`.
  So `ADD R1 R2` is a lower-path operation, `MOV R1 *R2` a load, `SUB R3 *R5` a
  load-op, `MOV *R1 R2` a store and `ADD *R1 R2` a load-op-store.
* Although there are two paths, **at most one instruction occupies each stage**. A
  lower-path ADD in LE means the load port is idle that cycle.
* All register operands are read in decode. Each is read from the register file and
  at the same time from the scoreboard. It is then taken from one of seven places:
  the register file or six in-flight places.
* Values are caught **at the very end of a cycle**. A value produced by INT1 in some
  cycle travels the bypass wires and the operand multiplexer in that same cycle, and it
  lands in the latch in front of LE. A consumer directly behind its producer therefore
  loses no cycle.

## The scoreboard table (`w75_scoreboard`)

| column | field 1 | field 2 |
|---|---|---|
| INT1, INT2, LOAD, STORE | busy | counter: cycles until the unit is free − 1 |
| R0 … R7 | location of the newest value (or of its producer) | counter: cycles until the value is ready − 1 |

A counter of **0** means "free next cycle" or "produced by the end of this cycle, so
bypassable now". The seven locations are:

| location | stage | what it is |
|---|---|---|
| `RF`   | –  | the register file holds the value |
| `INT1` | LE | INT1 output (lower path) |
| `BP1`  | E2 | lower-path latch behind INT1 |
| `BP2`  | SW | lower-path latch, about to be written |
| `LOAD` | LE | data-cache load-port output |
| `INT2` | E2 | INT2 output (upper path) |
| `ST`   | SW | upper-path latch, about to be stored or written |

**Writing the table.** When an instruction leaves decode, it writes its
destination's column. Because this happens in program order, the column always
describes the newest instance of the register, even when older instances are still in
flight. The entry it writes:

| instruction | location | counter |
|---|---|---|
| lower-path operation | `INT1` | ALU latency − 1 (0; 2 for MUL; 33 for DIV) |
| load `MOV R *R` | `LOAD` | 0 (assumes a hit, see below) |
| load-op `op R *R` | `LOAD` | 1 + INT2 latency − 1 (1; 3 for MUL; 34 for DIV) |

The location names the place of the **producer**, even before the value exists
there. A load-op therefore first points at `LOAD` with a non-zero counter.

**Keeping it current.** On every clock edge:

* a register whose producer leaves its stage moves one place along its path:
  `INT1→BP1→BP2→RF` or `LOAD→INT2→ST→RF`;
* its counter drops by one only when the producer **made progress**. Progress means it
  left its stage, or its unit counted down. A load that misses makes no progress, so
  the counters of everything waiting on it freeze;
* a unit column is loaded (busy, latency − 1) when an instruction enters the unit. It
  counts down, and clears when its instruction leaves and no new one enters.

**Reading it** (`w75_sb_read`, two instances in decode) gives a source's location,
which is the bypass select, and whether its counter is 0.

## Deciding in decode (`w75_issue_logic`, `w75_mem_dep`)

The instruction in decode leaves at the next edge only if all of these hold:

1. every register it reads is ready: counter 0 after the load-miss override;
2. its first unit is free next cycle (INT1 for the lower path, LOAD for the upper path):
   not busy, or busy with counter 0;
3. LE will be empty. A unit that has finished can still be held: a multiply or divide
   in INT2 holds E2, and E2 then holds LE;
4. no memory dependency holds it (below).

Otherwise it stays in decode, reads the register file and table again next cycle, and
keeps polling until the counters reach zero.

Worked example: `ADD R1 R2; MUL R3 R1; SUB R6 R3`, with a 3-cycle multiply.

| cycle | in D | INT1 busy/cnt | R1 | R3 | R6 | D decision |
|---|---|---|---|---|---|---|
| 0 | ADD | 0/0 | RF/0 | RF/0 | RF/0 | go |
| 1 | MUL | 1/0 | INT1/0 | RF/0 | RF/0 | go, R1 from INT1 |
| 2 | SUB | 1/2 | BP1/0 | INT1/2 | RF/0 | stall |
| 3 | SUB | 1/1 | BP2/0 | INT1/1 | RF/0 | stall |
| 4 | SUB | 1/0 | RF/0 | INT1/0 | RF/0 | go, R3 from INT1 |
| 5 | – | 1/0 | RF/0 | BP1/0 | INT1/0 | |

## Loads that miss: the late override

A load writes its destination as "`LOAD`, counter 0" when it leaves decode, before it
has touched the cache. The cache reports hit or miss late in the load's LE cycle. Each
scoreboard read port therefore has a final multiplexer. If the column points at `LOAD`
and the load in LE is missing, the port replaces the counter with an "infinity"
(all ones), and the dependant in decode stalls. The missing load stays in LE until the
cache hits. Counters behind it are frozen by the progress rule, so they stay correct.

## Multi-cycle units (`w75_exec_unit`, `w75_srt_divider`)

INT1 and INT2 are the same module. Because the ISA has both `MUL R R` and
`MUL R *R`, both ALUs must multiply and both must divide.

* ADD, SUB, AND, OR, XOR and MOV take one cycle. The result is combinational in the
  stage.
* **MUL** takes `MUL_LAT` = 3 cycles. Each cycle it multiplies by an 11-bit slice of
  the second operand and accumulates. The product appears in the third cycle.
* **DIV** (unsigned) takes `DIV_LAT` = 34 cycles in a radix-2 SRT divider. The first
  cycle normalises the divisor so that its top bit is set. Then come 32 iterations that
  each pick a quotient digit in {−1, 0, +1} from only the three top bits of the partial
  remainder. The last cycle forms the quotient from the positive and negative digit
  registers, with a final correction when the remainder is negative. A zero divisor
  gives all ones.

Both units need their operands held while they work. The stage latch does this,
because the instruction stays in the stage.

## One ALU instead of two: the uniform modes

With two paths, both ALUs must multiply and divide, so the design carries two
multipliers and two dividers. Setting the top's parameter `UNIFORM` to 1 removes that
duplication. Every instruction then takes the upper path: LE (load port), E2 (INT2) and
SW (store port). An instruction that does not touch memory simply skips the cache in LE
and SW. INT1, BP1 and BP2 are never used, and synthesis removes INT1.

The price is one cycle per dependency. An `ADD R1 R2` now spends a cycle in LE before
INT2 computes, so it leaves decode with R1 = `LOAD`/1:

| cycle | A `ADD R1 R2` | B `SUB R3 R1` | LOAD | INT2 | STORE | R1 | R3 |
|---|---|---|---|---|---|---|---|
| 1 | LE | D, waits | busy/0 | – | – | LOAD/1 | RF/0 |
| 2 | E2 | D, leaves (R1 from INT2) | – | busy/0 | – | INT2/0 | RF/0 |
| 3 | SW | LE | busy/0 | – | – | ST/0 | LOAD/1 |

The LOAD column marks the load stage as taken, even by an instruction that skips the
cache there. STORE is marked only for an instruction that writes memory, so it stays
free while A is in SW. In both modes the STORE column is for observation only; no
decision reads it.

In general, a destination counter starts at the ALU latency (the cycle in LE plus the
latency minus one). A MUL therefore starts at 3, and a plain load still starts at 0.

`SECOND_READ` = 1, used together with `UNIFORM`, wins that cycle back. Decode lets an
instruction into LE even when some register sources are not ready. LE has a second
table read port and a second bypass multiplexer for each operand. Every cycle, LE
checks the open operands again. It latches each one in the first cycle the table calls
it ready, and it holds (`ev_stall_late`) until all have arrived. In the example above, B
leaves decode in cycle 1 and catches R1 from INT2 in cycle 2, with no bubble. If the
producer is a 3-cycle MUL, B holds in LE for two cycles and catches the product in the
third.

Two kinds of source must still be ready in decode:

* a load address, because the load port uses it in LE at once;
* a source that is also the destination register. The instruction rewrites that
  register's table column when it leaves decode, so the column no longer describes the
  old value.

An open operand's producer is always ahead of it in the pipeline. So the value is
still in one of the in-flight places when it becomes ready; an assertion checks that
it is never taken from the register file. The memory-dependency rule and the load-miss
override apply unchanged.

## Memory dependencies

A load-op-store reads the cache in LE and writes it in SW. A later load can therefore
overtake the write. Addresses are not compared. Instead, an instruction in decode that
reads memory (a load, load-op or load-op-store) waits while any store or load-op-store
is in LE, E2 or SW. The wait includes SW, although a store there writes at the end of
that same cycle. This literal rule costs one cycle per dependency. The exception would
be a one-line change in `w75_mem_dep`.

## Files

| file | contents |
|---|---|
| `rtl/w75_pkg.sv` | widths, `loc_t`, `fu_t`, `alu_op_t`, the `uop_t` instruction record, table entry types, helper functions |
| `rtl/w75_pipeline.sv` | **top**: stage latches, wiring, unit/table update strobes, uniform modes |
| `rtl/w75_scoreboard.sv` | the table |
| `rtl/w75_sb_read.sv` | table read port with load-miss override |
| `rtl/w75_issue_logic.sv` | decode go/stall decision |
| `rtl/w75_mem_dep.sv` | memory-dependency stall |
| `rtl/w75_bypass_mux.sv` | 7-input operand multiplexer |
| `rtl/w75_exec_unit.sv` | INT1/INT2 ALU |
| `rtl/w75_srt_divider.sv` | SRT divider |
| `rtl/w75_regfile.sv` | R0–R7 |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_w75_pipeline_uniform.sv`, `tb/tb_w75_pipeline_second_read.sv` | the end-to-end test with `UNIFORM` = 1, without and with `SECOND_READ` |
| `tb/w75_dcache_model.sv` | behavioural data cache used by the top-level testbench |

Parameters live in `w75_pkg`: `XLEN` = 32, `NREGS` = 8, `MUL_LAT` = 3,
`DIV_LAT` = `XLEN`+2 and the counter width `CNT_W` = 6. The top has two mode
parameters, `UNIFORM` and `SECOND_READ`, both 0 by default.

## Top-level interface and timing (`w75_pipeline`)

* `in_valid / in_ready / in_uop`: decoded instructions in program order. One is taken
  at a rising edge when both valid and ready are high. `uop_t` holds `op`, `dst_mem`,
  `src_mode` (`SRC_REG`, `SRC_IMM`, `SRC_MEM`), `ra`, `rb` and `imm`.
* `ld_req / ld_addr / ld_hit / ld_rdata`: the cache load port, active in LE. `ld_hit`
  and `ld_rdata` must answer **combinationally in the same cycle**. Keep `ld_req`
  asserted until `ld_hit` is seen.
* `st_req / st_addr / st_wdata`: the cache store port, written at the rising edge that
  ends SW. The store port never stalls.
* `wb_en / wb_idx / wb_data`: the register write at the end of SW.
* `rf_o`, `sb_regs_o`, `sb_fus_o` and `ev_*`: observation of the register file, of the
  table and of each cycle's decode decision, including the stall reasons and the bypass
  selects. `ev_stall_late` marks a cycle in which LE holds for an open operand (second
  read only).
* `rst_n` is an asynchronous reset, active low. It empties the pipeline, zeroes the
  registers, marks every register as `RF` with counter 0 and frees every unit.

Addresses are byte addresses. The cache model uses bits [9:2].

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. The end-to-end test `tb/tb_w75_pipeline.sv` runs the
top at its default parameters against the cache model. The model's misses last 4
cycles, and the cache can be flushed. A sequential reference model runs the same
instructions, and every write-back, every store and the final register and memory
contents are compared with it. Directed programs check the table contents and bypass
selects cycle by cycle for:

* the forwarding example `ADD R1 R2; SUB R4 R1; ADD R1 R4; XOR R1 R4`;
* the multiply example above;
* the load-miss example `MOV R1 *R2; ADD R4 R1`;
* the memory-dependency example `MOV R5 R1; ADD *R1 R2; SUB R3 *R5`. Here the load
  waits exactly three cycles.

A 1500-instruction random program then mixes every instruction form, multiplies and
divides on both ALUs, and random cache flushes. The test fails unless each of the
following happened at least once:

* each of the seven bypass sources;
* each stall reason;
* a load miss;
* a MUL and a DIV on each ALU.

`tb_w75_pipeline_uniform` and `tb_w75_pipeline_second_read` run the same tests with
`UNIFORM` = 1, without and with `SECOND_READ`. They replace the forwarding and multiply
tables with the uniform-mode tables above. Both also check the mode's own mechanisms:
every operand comes from `RF`, `LOAD`, `INT2` or `ST`, and never from the lower path;
every MUL and DIV runs on INT2. With the second read, at least one hold and one catch in
LE must happen.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/w75_pkg.sv tb/tb_w75_pipeline.sv --top-module tb_w75_pipeline -o sim
./obj_dir/sim
```

Replace `tb_w75_pipeline` with any other `tb_*` name to run that unit test. Under
`verilator --lint-only -Wall` the only warnings left are about unused signals and the
reset style. The unused signals are bits of packed structs passed to helper functions,
and the counter outputs of the table read ports.

## Choices made here, and what is not included

* **Decoded input.** The w75 encoding, fetch, next-PC logic, condition flags and
  branches are not specified, so they are not built. The top starts at the decode stage
  and takes a decoded record.
* **Data cache.** Only its ports are defined; `tb/w75_dcache_model.sv` is a
  behavioural stand-in for testing. Its size, line size and miss time (256 words,
  4-word lines, 4 cycles) are test choices.
* **Operation set.** ADD, SUB, AND, OR, XOR, MOV, MUL and unsigned DIV. Memory-to-memory
  forms are not supported.
* **Upper-path place names and counters.** The names `INT2` and `ST` are this
  design's. So are the counter values a load-op loads, and the rule that counters
  freeze behind a stalled producer.
* **Structural check.** Decode also checks that LE will be free. This is needed
  because a finished unit can be held by a busy E2.
* **Divider.** The multiply latency of 3 comes from the source design. The divide
  latency of 34 and the radix-2 divider are this design's.
* **Uniform modes.** The two-path pipeline is the default. The single-ALU pipeline and
  its second table read are parameter options. Which operands may stay open until LE
  (everything except load addresses and sources that are also the destination) is
  this design's rule.
