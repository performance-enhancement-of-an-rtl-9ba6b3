# Heterogeneous reconfigurable functional unit for an extensible processor

An extensible processor speeds up hot pieces of a program by turning small
data-flow graphs (DFGs) of ordinary integer instructions into *custom
instructions* (CIs) that run on a reconfigurable functional unit (RFU)
coupled tightly to the core. In a homogeneous RFU, a matrix of identical
single-instruction FUs, every edge of the DFG passes through an operand
multiplexer, and the multiplexers make up a large part of the critical path.

This RFU instead uses **heterogeneous** FUs. Some units execute one
instruction (uni-FU). Others execute a fixed chain of two instructions
(bi-FU), or a regular sub-graph of three (tri-FU). Inside a bi- or tri-FU the
intermediate results go straight from node to node, with no multiplexer in
between. A DFG is *regular* when no result feeds more than one instruction,
and most CIs are regular, so clustering a CI onto these units removes most of
the multiplexers from its critical path. The FUs are also deliberately
incomplete: each one is built only for the instruction types it needs.

The RTL contains:

* the datapath (`rfu_array`), which is purely combinational;
* a configuration memory split into four parts (`rfu_config_mem`), so that
  similar CIs can share configuration data;
* a controller (`rfu_ctrl`) that reloads only the parts of the active
  configuration that change between CIs;
* the top, `amber_rfu`, which joins these three and adds the operand and
  result registers.

## The array

```
            in0 ... in7 ───────────────────────────────┬──────────────┐
              │                                        │ 4 long lines │ 5 long lines
   row 1   [uni1] <──> [uni2]      [ tri1 ]            │              │
              │          │            │                │              │
              ├──────────┴────────────┴─ row-1 link ───┼──────────┐   │
   row 2      [ tri2 ] <── [bi1]                <──────┘          │   │
                 │           │                                    │   │
   row 3   [uni3]      [ tri3 ]      [bi2]       <────────────────┴───┘
              └──── any FU result ────> out0 ... out5
```

| row | FU   | kind | instruction types built |
|-----|------|------|-------------------------|
| 1   | uni1 | uni  | logical, add/sub/compare |
| 1   | uni2 | uni  | shift |
| 1   | tri1 | tri  | logical, add/sub/compare, shift |
| 2   | tri2 | tri  | logical, add/sub/compare, shift |
| 2   | bi1  | bi   | add/sub/compare |
| 3   | uni3 | uni  | logical, add/sub/compare |
| 3   | tri3 | tri  | logical, add/sub/compare |
| 3   | bi2  | bi   | logical, add/sub/compare, shift |

That is 16 instruction nodes in all (3 + 2×2 + 3×3), with 8 data inputs and
6 data outputs.

### Connections

* **Row to row.** Row 1 reads the 8 inputs. Row 2 reads the row-1 results.
  Row 3 reads the row-2 results. A value that must skip a row without a long
  connection is carried by a `MOV` on an FU in between.
* **Ten long connections.**
  * Four input lines end at row 2.
  * Five input lines end at row 3.
  * One link carries a row-1 result to row 3.
  * Each input line carries one input, chosen by the configuration (P2).
  * The row-1 link carries uni1, uni2 or tri1, chosen by P1.
* **Three neighbour links** within a row: uni1 → uni2, uni2 → uni1 and
  bi1 → tri2. They serve long, sequential CIs with little parallelism.
  * uni1 and uni2 can feed each other, so the array contains a structural
    combinational loop. The loop is cut by priority: when uni1 takes its
    operand from uni2, uni2 sees 0 on its neighbour input. The array
    therefore always settles, but lint and synthesis tools report the loop.
    Configurations should use only one direction at a time.
* **Outputs.** Each output selects any of the 8 FU results, or drives 0 when
  it is disabled.

Operand source numbers (one select field per FU operand):

| row | select | sources |
|-----|--------|---------|
| 1 | 4 bits | 0–7 input; 8 neighbour (uni1/uni2 only); anything else gives 0 |
| 2 | 3 bits | 0 uni1, 1 uni2, 2 tri1, 3–6 long line L2[0..3], 7 bi1 (tri2 only; 0 for bi1) |
| 3 | 3 bits | 0 tri2, 1 bi1, 2–6 long line L3[0..4], 7 row-1 link |

### Inside the FUs

Each **node** (`fu_node`) computes one instruction `y = f(A, B)`:

* `use_imm` replaces B with the node's 16-bit immediate. `imm_sext` chooses
  sign or zero extension.
* `swap` then exchanges A and B. This lets a chained value be either operand
  of SUB, SLT or a shift.

Opcodes:

| type | opcodes | notes |
|------|---------|-------|
| logical | `AND OR XOR NOR` | |
| add/sub/compare | `ADD SUB SLT SLTU` | |
| shift | `SLL SRL SRA LUI` | shift amount is `B[4:0]`; `LUI` gives `B<<16` |
| — | `MOV` | result is A; built on every node |

An opcode whose type a node does not have gives 0. The logic for that type is
not generated at all.

**bi-FU** (`bi_fu`): `n0 = f0(a0,b0)`, `n1 = f1(n0,b1)`. It outputs `n0` or
`n1`.

**tri-FU** (`tri_fu`) has four external operands and two shapes:

* chain: `n0 = f0(a0,b0)`, `n1 = f1(n0,x1)`, `n2 = f2(n1,x2)`
* tree: `n0 = f0(a0,b0)`, `n1 = f1(x1,x2)`, `n2 = f2(n0,n1)`

It outputs `n0`, `n1` or `n2`, so it can hold one, two or three instructions.

### Worked example

Take the DFG `((LUI i1 | ORI i2) & d0) | ((d1 & ANDI i3) << 4)`. A greedy
clustering that takes the longest branch first maps it like this:

* tri1 (row 1) runs the chain `LUI → ORI → AND d0`.
* tri2 (row 2) runs the chain `ANDI → SLL 4` on `d1`, which arrives over a
  long line.
* uni3 (row 3) ORs the tri2 result with tri1's result, which arrives over the
  row-1 link.

The row-2 bi-FU would be a natural home for the ANDI/SLL pair, but it only
has add/sub/compare. That is why the pair goes on tri2. `tb_rfu_array` and
`tb_amber_rfu` both run this CI.

## Configuration: four parts and partial reconfiguration

A CI's configuration is split into four parts (types in `rfu_pkg`):

| part | contents | bits |
|------|----------|-----:|
| P1 | node functions, FU modes, operand selects of rows 2 and 3, row-1 link | 173 |
| P2 | row-1 operand selects, choice of input for each long line | 59 |
| P3 | output selects and enables | 24 |
| P4 | one 16-bit immediate per node | 256 |

`rfu_config_mem` keeps each part in its own table of `P_DEPTH` entries. A CI
table of `CI_DEPTH` entries holds, for each CI number, four indices:
`{p4_idx, p3_idx, p2_idx, p1_idx}`. Sharing works like this:

* Two CIs with the same structure point at the same P1 entry. This also
  covers a CI whose structure is a subset of another's.
* They can still differ in their inputs, outputs or immediates.
* Equal P2, P3 or P4 contents are stored only once.

All four part tables can be read in the same cycle.

`rfu_ctrl` records which entry each active part came from. When a CI is
issued:

1. **IDLE:** accept the request and read the CI table.
2. **LOOK:** compare the four indices with the loaded ones.
3. **LOAD** (only if an index differs): read and load only the differing
   parts. This cycle is skipped when nothing differs.
4. **EXEC:** the array evaluates the CI on the latched operands, and the
   results are registered.

Writing a part-table entry that is currently loaded marks that part stale,
so the next CI reloads it. The controller counts executed CIs, context
switches (CIs that needed any load) and loads per part.

### Timing and interface of `amber_rfu`

* **Configuration.** Write with `cfg_we`, `cfg_tbl` (`TBL_CI`, `TBL_P1`…`TBL_P4`),
  `cfg_waddr` and `cfg_wdata`. The low bits of `cfg_wdata` hold the packed
  part struct or CI entry.
* **Issue.** Use the `ci_valid`/`ci_ready` handshake. A waiting request must
  stay asserted with the same `ci_id`; an assertion in `rfu_ctrl` checks
  this. `ci_in[0..7]` are captured on the accepting edge.
* **Result.** `res_valid` is a one-cycle pulse with `res_data[0..5]` and
  `res_en`.
  * It arrives 2 cycles after the accepting edge, or 3 if parts had to be
    loaded.
  * `ci_ready` returns in the same cycle as `res_valid`, so back-to-back CIs
    issue every 3 (or 4) cycles.
* **Clock and reset.** One clock. `rst_n` is an asynchronous, active-low
  reset. Configuration tables are not reset; load them before use.
* **Timing path.** The array is one combinational path from the operand
  registers to the result registers: up to three rows of FUs and their
  operand multiplexers. Choose the clock period to match.

Parameters: `DATA_W` = 32, `CI_DEPTH` = 128, `P_DEPTH` = 128. With 128
entries, an application with 117 CIs fits even if no CIs share parts.

## How far this follows the source architecture

Taken from the source architecture:

* the three-row arrangement and the FU kind at each position;
* the instruction types per FU;
* 8 inputs and 6 outputs;
* the 4 + 5 + 1 long connections and the three neighbour links;
* the chain and tree shapes of the bi- and tri-FUs;
* the split of the configuration into the four parts P1–P4, with parts
  shared between similar CIs.

Choices made in this RTL:

* **Encoding and widths.** The opcode list and encoding and the whole bit
  layout are this RTL's own, so one configuration is 512 bits. The source
  design quotes 488 bits per CI in one place and 484 bits (138/90/60/196)
  for the four parts in another. Neither layout is given, so neither is
  reproduced. The 16-bit immediate per node is the main cause of the
  difference.
* **Long lines.** Which input each long line carries is configurable here.
  The source does not say which inputs the lines tap.
* **Outputs.** Every output can select every FU.
* **Neighbour loop.** Priority cuts the uni1/uni2 loop.
* **Memory organisation.** The index-table organisation of the configuration
  memory, its depths, the controller's states and latency, the handshake and
  the statistics counters are all this RTL's own design. The source describes
  partial reconfiguration and sharing only at the level of function.
* **Data width.** 32 bits, the data width of the MIPS base core.

## Files and simulation

| file | contents |
|------|----------|
| `rtl/rfu_pkg.sv` | shape constants, opcodes, configuration part structs |
| `rtl/fu_node.sv` | one instruction node / uni-FU |
| `rtl/bi_fu.sv`, `rtl/tri_fu.sv` | bi- and tri-instruction FUs |
| `rtl/rfu_array.sv` | the three-row array with all connections |
| `rtl/rfu_config_mem.sv` | CI table and P1–P4 tables |
| `rtl/rfu_ctrl.sv` | issue and partial-reconfiguration controller |
| `rtl/amber_rfu.sv` | top |
| `tb/rfu_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus a capacity run |

Each testbench prints `TB_RESULT checks=N failures=M`. To simulate one, for
example the end-to-end test at default sizes:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_amber_rfu \
  -y rtl -y tb +libext+.sv rtl/rfu_pkg.sv tb/rfu_ref_pkg.sv tb/tb_amber_rfu.sv
./obj_dir/Vtb_amber_rfu
```

What the tests cover:

* **Module tests.** `tb_fu_node`, `tb_bi_fu` and `tb_tri_fu` combine
  hand-computed vectors with thousands of random vectors checked against the
  reference model. They include the type-restricted variants.
* **Array test.** `tb_rfu_array` runs the worked example and a CI that uses
  every neighbour link, both tri-FU shapes, the long lines and a `MOV`. It
  then runs 2000 random configurations.
* **Memory and controller tests.** `tb_rfu_config_mem` and `tb_rfu_ctrl`
  check read latency, which parts are reloaded, stale marking, the latency of
  a CI and the counters.
* **End-to-end test.** `tb_amber_rfu` runs at default sizes and covers:
  * full, partial and no reconfiguration;
  * a reload after a rewrite;
  * a request waiting for a busy unit;
  * the neighbour links, the row-1 link, tree and chain modes, and disabled
    outputs.

  It counts each of these and fails if any never happens.
* **Capacity test.** `tb_amber_rfu_capacity` loads 117 unshared CIs and runs
  each one twice.

Every testbench is self-checking. The reference model checks what the RTL
computes, not its speed: nothing here measures the critical-path delay, area
or power that motivate the heterogeneous arrangement.

## Not included

* The base processor (a 4-issue in-order MIPS core), its profiler and its
  scheduler. The RFU's issue and result ports are where a core would connect.
* The software flow that finds hot basic blocks, clusters DFGs onto the FUs,
  keeps a library of pre-mapped small DFG structures and merges similar
  configurations. The configurations written into `rfu_config_mem` are that
  flow's output.
* The homogeneous 16-FU matrix that this design replaces. It is a baseline
  only.
