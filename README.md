# PSYS-style path-based in-memory systolic array for matrix-vector products

In a sparse-matrix solver the matrix stays fixed and only the vector changes.
This accelerator uses that fact. Each matrix element is a known constant, so
"multiply by a" is a fixed Boolean function of the unknown operand. That
function is compiled into a small RRAM crossbar once. The crossbar then
computes it with a single read (*path-based computing*). The crossbars
sit in a systolic grid. Vector elements stream across the grid and partial
sums stream down it, so only the vector moves. The matrix never leaves the
array.

This RTL models the whole digital side of the design:

| module | role |
|---|---|
| `psys_pkg` | widths, sizes, literal and command types, and a crossbar design generator |
| `path_xbar` | path-based 1T1M crossbar evaluator (memristor states + selector literals) |
| `psys_shift_add` | slice shifter and 16-bit adder |
| `psys_cell` | one systolic array unit: IR, crossbar, shifter, adder, OR |
| `psys_delay` | delay line used for skew / de-skew |
| `psys_pe` | 8 x 8 grid of units with input skew and output de-skew |
| `psys_ctrl` | PE controller and global drivers: programming, vector injection, result queue |
| `psys_bus` | system bus: command routing and round-robin result return |
| `psys_top` | 2 PEs + controllers + bus |

The host CPU and the DRAM sit outside the design. So does the off-line software that
turns a sparse matrix into crossbar programs. The top's command and result
ports are where the host connects.

## Path-based evaluation (`path_xbar`)

A crossbar has 128 wordlines and 256 bitlines. Each cross-point is a
memristor plus an access transistor. A memristor is programmed ON (low
resistance) or OFF. All transistors on one wordline share a *selector line*.
That line is driven by one literal of the input variables:

| `lit_kind_e` | selector closed when |
|---|---|
| `LIT_OFF` | never (unused wordline) |
| `LIT_ON`  | always |
| `LIT_POS` | `vars[var_idx] == 1` |
| `LIT_NEG` | `vars[var_idx] == 0` |

Bitline 0 is the input and is driven high. Output `k` is bitline `1+k`. It reads 1
when a conducting path joins it to bitline 0. A wordline whose selector is
closed shorts together every bitline where it has an ON memristor. The model
therefore computes the set of bitlines connected to bitline 0 through closed
wordlines. Current can flow either way along a path, so a crossbar design
must not contain false "sneak" paths. Avoiding them is the job of whoever
builds the design.

The evaluation is combinational. An electrical read finds a path of any
length. The RTL propagates connectivity for `HOPS` (default 8) wordline
steps. That is exact for every design whose true paths use at most `HOPS`
wordlines. Raise `HOPS` for deeper designs.

Programming writes one whole wordline per clock: `prog_bits` sets the
memristor states and `prog_lit` sets the selector literal. Reset erases
the array. Real RRAM would keep its state. Here the reset keeps a
two-state simulation deterministic.

### The multiplier design

For a constant `a` (8 bits) and a 2-bit slice `s` of the unknown operand,
the crossbar must output the 10-bit product `a*s`. `psys_pkg::mult_xbar_row(a, w)` and
`mult_xbar_lit(w)` produce such a design. They use 60 wordlines and 31
bitlines:

* bitline 0: the input. Bitline `1+k`: product bit `k`.
* bitline `11+2k+v`: private node of output `k` for the case `s[1] == v`.
* wordline `2k+v` (literal `s[1]==v`) joins the input to node `(k,v)`.
* wordline `20+4k+m` (literal `s[0]==m[0]`) joins node `(k,m[1])` to output
  `k`. It is written only when bit `k` of `a*m` is 1.

Each output has its own intermediate nodes, so a current flowing backwards
from one output can never reach another output. Every true path is two
wordlines long.
Compared with the optimised designs reported for this style (24 x 48
worst case for an 8-bit by 2-bit product), this one is simple and
larger. It still fits the 128 x 256 array with plenty of room. Any other
design can be loaded through the same programming port.

## The array unit (`psys_cell`)

One unit holds one 8-bit constant `a` and computes
`ps_out = ps_in + a*b mod 2^16` for each 8-bit operand `b`. It uses the
identity `a*b = sum_j a*b_j*4^j` over the four 2-bit slices `b_j`.

```
cycle c      b_vld_in: IR <- b, acc <- ps_in
cycle c+1..4 slice j = 0..3 on the crossbar's selector lines;
             acc <- acc + (xbar_out << 2j)     (shifter + adder)
             at j = 3 the sum goes to OR instead
cycle c+5    b_vld_out / ps_vld_out pulse: ps_out = OR, b_out = b
```

The latency is `N_SLICES+1 = 5` cycles. A new operand may arrive in the
cycle the last slice is processed, so a unit takes one operand every 4
cycles. An assertion catches operands that arrive faster. Another assertion
catches programming while the unit is busy. There is only one shifter and one
adder, which is why the slices are processed one after another.

## The processing element (`psys_pe`)

Unit `(r,c)` of the 8 x 8 grid holds `A[c][r]`. The matrix block is stored
transposed. Vector element `b[r]` enters grid row `r` on the left and moves
right one unit per step. Partial sums start at 0 on the top row and move down.
Column `c` therefore ends with `y[c] = sum_r A[c][r]*b[r]`.

Every unit takes `LAT = 5` cycles. For the partial sum from above to meet
the operand from the left, row `r` is delayed by `LAT*r` cycles on entry.
Column `c`'s result is delayed by `LAT*(COLS-1-c)` cycles on exit. A whole
result vector then leaves in one cycle, `LAT*(ROWS+COLS-1) = 75` cycles
after its input vector. An assertion checks this alignment in every
unit. A new vector may enter every 4 cycles.

## Controller and bus

`psys_ctrl` accepts `cmd_t` commands (valid/ready):

* `OP_PROG` writes wordline `xrow` of unit (`cell_r`, `cell_c`). The bits
  come from `payload` and the literal from `lit`. It waits until no vector
  is in flight and every unit is idle. This is the switch from compute mode
  to programming mode.
* `OP_VECTOR` sends the 8 operands in `payload[63:0]`, with element `r` in
  bits `8r+7:8r`. That is the 64-wire local bus. Vectors are spaced at
  least 4 cycles apart.
* `OP_NOP` and unused codes are consumed.

The grid cannot stall, so results go into a 32-entry FIFO. A vector is
admitted only while (vectors in flight + queued results) < 32. A slow
result reader therefore holds back the command stream, and no result is
ever dropped.

`psys_bus` sends each command to the PE named in `cmd.pe`. Commands for a
PE that does not exist are dropped. It returns results over one channel with
round-robin arbitration, tagged with `res_pe`. The handshake passes through
combinationally.

Latency from an accepted `OP_VECTOR` to `res_valid` is 1 (controller
register) + 75 (PE) + 1 (FIFO) cycles.

## Using it for a sparse matrix

The accelerator multiplies dense 8 x 8 blocks of 8-bit values. A large
sparse matrix is prepared on the host, as `tb/tb_psys_spmv.sv` does it:

1. Cut each element into 8-bit bit-slices. Each slice matrix is processed on its own.
2. Cut each slice matrix into blocks of 8 rows. In each block, pack the columns
   that hold a non-zero to the left, 8 at a time. This gives dense tiles,
   together with the list of vector indices each tile needs. (The original
   flow also shrinks the block height until the tiles reach a target density.
   This host code keeps it at 8.)
3. Program each tile into a PE. Send the gathered vector. Add the result
   into `y`, shifted left by 8 × the slice number.

With 2 PEs of 64 units, the design holds 128 slice values at a time. The
published benchmark matrices (289 to 43164 rows, 1377 to 2.6 M non-zeros)
therefore run as many programming passes. Each pass takes 7680
one-wordline writes. Host software has to schedule these passes.

## Sizes and what is this design's own

Taken from the architecture description:

* 8-bit known operand
* 8-bit unknown operand in 2-bit slices
* 16-bit adder and output register
* 128 x 256 crossbars
* 64-wire local bus
* transposed binding, with vectors flowing sideways and partial sums
  downward
* IR / crossbar / shifter / adder / OR in each unit
* a controller with global drivers

This design's own choices:

* 2 PEs of 8 x 8 units
* the literal encoding and the wordline/bitline orientation of the crossbar
  model
* the multiplier crossbar designs (the published flow uses BDD-based
  synthesis)
* one slice per cycle, and the 5-cycle unit latency
* the skew and de-skew delay lines
* the command format, the drain-before-program rule, the credit-controlled
  result FIFO and the bus arbitration
* unsigned arithmetic, wrapping at 16 bits (sums of eight 8 x 8 products can
  wrap)
* resetting the crossbar contents

The input register is specified at 10 bytes. This unit uses 3 of them (the
operand and the incoming sum).

Known limits:

* The memristor array is modelled as flip-flops with ideal ON/OFF behaviour.
  Analog effects and the programming pulses are not modelled.
* Signed values are not handled.
* Recombining the bit-slices and packing the sparse matrix are left to the host.

## Simulating

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.
For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          --top-module tb_psys_top rtl/psys_pkg.sv tb/tb_psys_top.sv
./obj_dir/Vtb_psys_top
```

| testbench | what it covers | run time |
|---|---|---|
| `tb_psys_shift_add` | shift/add, wrap-around | < 1 s |
| `tb_path_xbar` | a 3-variable function with a back-flowing path; multiplier designs for random constants; reprogramming | < 1 s |
| `tb_psys_cell` | `ps_in + a*b`, 5-cycle latency, full-rate and gapped streams | < 1 s |
| `tb_psys_pe` | full 8 x 8 PE: `A*b`, 75-cycle latency, reprogramming | ~2 s |
| `tb_psys_ctrl` | rate, credit and drain stalls with a slow reader | ~2 s |
| `tb_psys_bus` | routing, dropped addresses, round-robin fairness, conflicts | < 1 s |
| `tb_psys_top` | full-size end-to-end run on both PEs; counts every stall kind, bus conflicts, wordline writes and slice steps | ~10 s |
| `tb_psys_spmv` | a 24 x 24 sparse matrix with 16-bit values through bit-slicing, packing, binding and recombination | ~1 min |

Simulation speed is set by the crossbar evaluation. It costs roughly
`HOPS x 128` 256-bit operations per unit per cycle.
