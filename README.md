# A map-reduce SIMD accelerator

This is an embedded accelerator that follows the map-reduce pattern. A small
controller runs the program. Each cycle it hands one instruction to a linear
array of P identical cells, and every cell executes that instruction on its
own data: this is the *map* step. A pipelined tree then folds the cells'
results into one scalar: the *reduce* step. The array takes the data-parallel,
compute-heavy part of a program. The control-heavy part stays on a host
processor, which loads programs and data and reads back results.

The default build has P = 128 cells, the size of the FPGA prototype of this
architecture. Data is 32 bits wide. Each cell has 1024 words of local memory.

```
            program / data memory, start, busy, cycles, reduction result
 host side ─────────────────────────────┐
                                        ▼
                                 ┌────────────┐  array instr + scalar + reduce cmd
                                 │ Controller │──────────────┐
                                 └────────────┘              ▼
                                        ▲              ┌──────────┐ L+1 stages
                                        │              │  Distr   │ (binary tree)
                                        │              └──────────┘
                 ┌──────────────────────┼───────────────────┼────────────────┐
                 │ Scan (prefix of      │           ┌───────┴───────┐        │
                 │ "active" flags)  ◄──►│  Map:  cell0  cell1 … cell P-1 ◄──►│ Trans ◄── host side
                 └──────────────────────┼───────────────────┬────────────────┘
                                        │              ┌──────────┐ L+1 stages
                                        └──────────────│  Reduce  │ (ADD/MAX/MIN)
               result to controller, or pushed into    └──────────┘
               the global shift register of the cells
```

L = clog2(P), which is 7 for P = 128.

## Files

| file | block |
|---|---|
| `rtl/mr_pkg.sv` | shared types: instruction formats, opcodes, the broadcast word |
| `rtl/mr_top.sv` | the accelerator: controller, Distr, Map, Scan, Reduce, Trans |
| `rtl/mr_ctrl.sv` | controller: program memory, data memory, accumulator, branches, cycle counter |
| `rtl/mr_distr.sv` | Distr: pipelined broadcast tree |
| `rtl/mr_map.sv` | Map section: P cells, neighbour links, global shift register chain |
| `rtl/mr_cell.sv` | one cell: accumulator, local memory, address register, activity counter |
| `rtl/mr_scan.sv` | Scan: parallel-prefix network over the activity flags |
| `rtl/mr_reduce.sv` | Reduce section: pipelined ADD/MAX/MIN tree over the active cells |
| `rtl/mr_trans.sv` | Trans: host access to the local memories while the array runs |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_mr_top` runs the whole design at its default size |

## Instruction pairs

A program word is a pair: one **controller instruction** and one **array
instruction** (`prog_word_t`, 44 bits). The controller executes its half
and sends the array half down the Distr tree in the same cycle. Along with
it go a 32-bit **scalar** and a **reduction command**. The scalar is the
controller's accumulator as it stood before this cycle. On a `C_SEND` line
it is that line's immediate instead.

Both halves have a 5-bit opcode and a 16-bit immediate. The array half also
has a 2-bit operand source: local memory word `mem[imm]`, the sign-extended
immediate, or the broadcast scalar.

Controller instructions (one cycle each; branches cost no bubble):

| op | effect |
|---|---|
| `C_NOP`, `C_HALT` | nothing / stop (the array half of the halt line is still issued) |
| `C_VLOAD`, `C_VADD`, `C_VSUB` | acc ← imm, acc + imm, acc − imm |
| `C_LOAD`, `C_ADD`, `C_SUB`, `C_STORE` | same with data-memory word `dmem[imm]`; store acc |
| `C_SEND` | scalar of this line ← imm (acc unchanged) |
| `C_JMP`, `C_BRZ`, `C_BRNZ` | jump, branch if acc = 0, branch if acc ≠ 0 |
| `C_BRNZDEC` | if acc ≠ 0: branch and acc ← acc − 1 (loop of acc+1 trips) |
| `C_CPUSHL` | reduce the cells' accumulators (op = imm: 0 add, 1 max, 2 min) and push the result into the global shift register |
| `C_CRED` | same, result into the controller's reduction register (`red_result`, pulse on `red_valid`) |
| `C_RLOAD` | acc ← reduction register |
| `C_FIRSTIX` | acc ← index of the first active cell, from Scan (−1 if none) |

Array instructions act on each cell's accumulator `acc`:

| group | ops |
|---|---|
| load/arith/logic | `A_LOAD`, `A_ADD`, `A_SUB`, `A_MULT` (low 32 bits), `A_AND`, `A_OR`, `A_XOR` on acc and the operand |
| tests (leave 1/0 in acc) | `A_EQ`, `A_LT`, `A_LEQ` (signed), `A_ZERO` |
| memory | `A_STORE` (mem[imm] ← acc), `A_ILOAD` / `A_ISTORE` (at addr+imm, then addr ← addr+1), `A_ADDRLD` (addr ← operand) |
| special vectors | `A_IXLOAD` (acc ← cell index 0…P−1), `A_SRLOAD` (acc ← shift register element) |
| spatial control | `A_RESETACT`, `A_SETACT`, `A_WHERE`, `A_ELSEWHERE`, `A_ENDWHERE`, `A_FIRST` |
| global moves | `A_SHL`, `A_SHR` (scalar enters at the end), `A_ROTL`, `A_ROTR` (one position per instruction) |

## Activity: nested WHERE with counters

Selecting cells is the part that needs the most care. Each cell has an 8-bit
**activity counter**. The cell is *active* when its counter is 0. Loads,
arithmetic, tests, stores and address updates change only active cells.
Spatial-control instructions act on every cell. A Boolean vector is simply
the accumulators left by a test instruction.

* `WHERE`: an active cell whose acc ≠ 0 stays at 0. Every other cell,
  including cells that were already inactive, increments its counter. The
  counter therefore records how many enclosing WHEREs deselected the cell.
* `ELSEWHERE`: counters at 0 become 1 and counters at 1 become 0. Cells
  deselected by an outer level (≥ 2) are untouched. This gives the
  "else" branch of the innermost WHERE.
* `ENDWHERE`: every counter above 0 decrements, which closes one level.
* `FIRST`: every cell increments except the lowest-index active cell. It
  uses the Scan network, which gives each cell the OR of the active flags
  of all lower cells (a Sklansky prefix, combinational, clog2(P) levels).
* `RESETACT` clears all counters. `SETACT` sets each counter to
  (acc ≠ 0), so 1 deactivates the cell.

Shift and rotate move the accumulators of *all* cells, whatever their
counters.

## Timing and software pipelining

There are no interlocks. Programs wait for the pipelines themselves. With
L = clog2(P):

* An array instruction issued in cycle t is executed by all cells together
  and changes their state at the end of cycle t+L+1. Distr has L+1 register
  stages.
* A reduction issued in cycle t sees the accumulators as left by the array
  instructions issued up to cycle t−1. Its result enters the global shift
  register at the end of cycle t+2L+2, so an `A_SRLOAD` issued at t+L+2 or
  later reads it. Or the result is in the controller's reduction register from
  cycle t+2L+3, where a `C_RLOAD` can read it.
* Reductions and array instructions can be issued every cycle.

The global shift register has one element per cell. Each push moves every
element one cell toward cell 0 and enters the new value at cell P−1. After P
pushes, cell i holds the i-th value pushed.

### Example: vector–matrix product

The vector is in word 0 of every cell, with element j in cell j. Row i of the
N×N matrix is in word 1+i. The result y[i] = Σ_j v[j]·M[i][j] is built as N
reductions pushed into the shift register:

```
 0: C_SEND 1          | A_ADDRLD scalar      addr <- 1 (row 0)
 1: C_VLOAD N-1       | A_ILOAD 0            loop counter; acc <- row 0
 2: C_NOP             | A_MULT  mem[0]       acc <- row 0 * v
 3: C_CPUSHL add      | A_ILOAD 0            push sum of previous product; next row
 4: C_BRNZDEC 3       | A_MULT  mem[0]
 5..4+L: C_NOP        | A_NOP                latency steps
 5+L: C_NOP           | A_SRLOAD             acc <- y
 6+L: C_HALT          | A_STORE 900
```

The loop body is two lines, and each trip produces one result element. The
run issues 2N + 4 + L instruction pairs before the halt line. For N = P = 128
that is 267 cycles, about 2.09 cycles per result element; the testbench checks
the cycle count exactly. For N = P = 1024 it would be 2062 cycles, about 2.01
per element. That size needs `P = 1024` and at least 1025 words of local
memory, so it does not fit the default build.

## Transfers (Trans)

The host side reaches any word of any local memory through `tr_*`. A request
names a cell, a word address and, for a write, the data. The request is
registered and decoded to the chosen cell. A write lands one cycle after the
request. Read data comes back on `tr_rdata` with `tr_rvalid`, two cycles after
the request. Each local memory has a second port for this, so transfers run
while the array computes. If a transfer and a store hit the same word in the
same cycle, the transfer wins. Vector-level moves (whole, strided, permuted or
gathered vectors) are sequences of these word transfers, issued by the host.

## Top-level interface (`mr_top`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset (clears registers, not memories) |
| `pm_we`, `pm_addr`, `pm_wdata` | write one instruction pair into program memory |
| `dm_we`, `dm_addr`, `dm_wdata`, `dm_rdata` | write / read controller data memory |
| `start`, `busy`, `cycles` | run from pc 0; high until `C_HALT`; cycles of the last run |
| `red_result`, `red_valid` | result of a `C_CRED` reduction |
| `tr_we`, `tr_re`, `tr_cell`, `tr_addr`, `tr_wdata`, `tr_rvalid`, `tr_rdata` | Trans port |
| `any_active`, `first_active` | from Scan: some cell active, index of the first active cell |

Parameters: `P` (cells, 128), `MEM_WORDS` (words per cell, 1024),
`PROG_WORDS` and `DMEM_WORDS` (controller memories, 1024 each). Data width,
immediate width and activity-counter width are in `mr_pkg`.

## What is this design's own choice

The architecture fixes these things:
* the block structure: controller, Distr, Map, Reduce, Scan and Trans;
* one instruction pair fetched per cycle;
* log-depth broadcast and reduction;
* the activity-counter rules;
* the operation list and the mnemonics.

Everything else here is a choice made for this RTL:
* the binary encoding and the accumulator-plus-operand-source model;
* the exact meaning of the indexed load (post-increment);
* register stages at every tree level;
* what Scan computes (the activity prefix);
* the identity values that inactive cells feed to a reduction;
* the Trans port as a one-word addressed interface;
* all memory sizes;
* reset behaviour;
* 32-bit data (the architecture allows 16 or 32);
* reductions requested by controller instructions (`C_CPUSHL`, `C_CRED`)
  rather than by an array instruction.

The example above matches the published cycle formula T = 2N + 4 + log P
exactly.

The following are **not** built:
* the host processor, the on-chip interconnect, the external DRAM and the
  external interface (the top brings out the ports they would use);
* general permutation of a vector across cells;
* a hardware sequencer for strided, permuted or gathered vector transfers.

Cell indices run from 0 to P−1; `A_IXLOAD` gives cell 0 the value 0.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. They use only
plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl rtl/mr_pkg.sv tb/tb_mr_top.sv \
          --top-module tb_mr_top -Mdir obj_top -o sim && ./obj_top/sim
```

Replace `tb_mr_top` with `tb_mr_cell`, `tb_mr_map`, `tb_mr_distr`,
`tb_mr_reduce`, `tb_mr_scan`, `tb_mr_trans` or `tb_mr_ctrl` to test one
block. `tb_mr_top` uses the default parameters (128 cells). It runs:
* the vector–matrix product with N = 128, checking results and cycle count;
* a single-cell extraction test, once for each of several cells;
* a program covering WHERE/ELSEWHERE/ENDWHERE/FIRST, all three reductions
  and all four global moves.

It counts how often each mechanism occurred and fails if one never did. It
runs in under a second.

`tb_mr_vecmat` runs the same product at N = P = 1024 (`mr_top` with
`P = 1024`, `MEM_WORDS = 2048`). It places the operands directly into the
local memories, reads the 1024 results back through Trans, and checks the
run length: 2062 instruction pairs plus the halt. Building it takes about
1.5 minutes; the run takes about a second.
