# A 4 x 4 CGRA with programmable rotating/non-rotating register files

A coarse-grained reconfigurable array (CGRA) speeds up loops with modulo
scheduling. A kernel of II instructions per processing element (PE) is
repeated every II cycles, so the iterations overlap. Because the same
instruction runs in every iteration, its destination register index never
changes. Two kinds of register are therefore needed:

* **Rotating registers.** Their indices shift by one every iteration. A value
  produced in iteration *j* is then not overwritten by the same instruction in
  iteration *j+1*.
* **Non-rotating registers.** Pointers, loop-invariant constants and values
  that live for less than II cycles must stay at a fixed index. A load that
  advances its own pointer by 4 every iteration breaks if the pointer's
  register rotates away under it.

Some loops need many rotating registers and few fixed ones; loops full of
loads and stores need the opposite. This design does not fix the split in
silicon. Each PE has a **programmable register file (PRF)**: one small
register bank whose boundary between the rotating and non-rotating regions is
set per PE at configuration time. The compiler only has to count a PE's total
registers, not two separate pools.

The RTL is a complete, simulatable array built around that register file:
16 PEs in a mesh, 4 PRF registers per PE (64 in total), a context memory per
PE, a loop sequencer, a shared memory bus per row and a multi-port data
memory. The register-file organisation, the array size and the row buses
follow the design described by D. Saluja in "Register File Organization for
Coarse-Grained Reconfigurable Architectures: Compiler-Microarchitecture
Perspective" (M.S. thesis, Arizona State University, 2014). That work does
not specify the instruction set, the operand network, the memory timing or
the configuration interface. Those are this design's own choices and are
marked as such below.

## The programmable register file

### Index mapping

With `n = NUM_REGS` registers (a power of two, 4 by default), every register
port (read R1, read R2, write W) carries a log2(n)-bit index `i` from the
instruction. The PRF turns it into a physical index as follows:

```
sum  = (i + offset) mod n          // log2(n)-bit adder, carry dropped
phys = (i <= T) ? (sum & T) : i    // RC decides, a mux selects
```

`T` is the per-PE threshold and must be of the form 2^k - 1 (0, 1, 3 for
n = 4). Because of that form, `sum & T` is `sum mod (T+1)`: an adder and an
AND gate do the modulo, with no divider on the register file's critical path.
Indices `0..T` form the rotating region of `T+1` registers. Indices above `T`
bypass the adder and address the bank directly.

| T | rotating indices | non-rotating indices |
|---|------------------|----------------------|
| 0 | (none: index 0 maps to itself) | 0-3 |
| 1 | 0-1 | 2-3 |
| 3 | 0-3 | (none) |

The **offset counter** advances at the end of every iteration (the
controller's `iter_end`, once every II cycles). The register control (RC)
clears it when the incremented value would exceed `T`, so the offset cycles
through `0..T`. Writing a new `T` also clears the offset. It does not clear
the registers.

### Addressing values across iterations

Suppose an instruction writes index `i` (rotating) in iteration *j*. In
iteration *j+d* the same physical register is reached through index

```
(i - d) mod (T+1)
```

So with `T = 1`, a value written through index 0 is read one iteration later
through index 1. With `T = 3`, a value written through index 0 is read one
iteration later through index 3. A value written in the last cycle of an
iteration still uses that iteration's offset: the write and the offset update
happen at the same clock edge.

### Timing

Reads are combinational in the cycle the instruction executes. Writes, the
offset update and the threshold update all take effect at the rising edge.
There is no write-to-read bypass: a read in the same cycle as a write to the
same register returns the old value. Reset clears the registers, the offset
and `T`; `T = 0` makes the whole file non-rotating.

### Reading of the source

The source describes the RC in two ways. It says "an index less than T" is
rotated, and it also says the offset is reset once it is "greater than T".
The second rule makes the AND output range over `0..T`. This design follows
it, so index `T` is part of the rotating region. With that reading, `T = n-1`
gives a fully rotating file and `T = 0` a fully non-rotating one. A threshold
that is not 2^k - 1 is flagged by an assertion in `prf_rc`.

## Processing element

Every cycle each PE executes the instruction that its context memory holds
for the current kernel cycle:

1. **Operands.** Operands `a` and `b` are each chosen from: a PRF read port
   (R1 for `a`, R2 for `b`), the registered output of the N, S, E or W
   neighbour, the PE's own output register, the sign-extended 16-bit
   immediate, or zero.
2. **Execute and write back.** A single-cycle functional unit computes the
   result. At the clock edge the result goes to the PE's **output register**,
   which the neighbours read. If `wr_rf` is set it is also written to the PRF
   through port W. `NOP`, `LDA`, `STA` and `STD` produce no result, so a value
   stays on the output until the PE's next result-producing instruction.
   Schedules use this to hand values to neighbours across several cycles.
3. **Compares.** `CMPEQ`, `CMPNE` and `CMPLT` (signed) produce a predicate.
   It goes to the **predicate output register**, and to the 4-entry predicate
   register file if `wr_prf` is set.
4. **Predication.** A predicated instruction (`pen`) executes only if its
   predicate is 1. The predicate comes from the PE's own predicate file or
   from a neighbour's predicate output, and `pneg` inverts it. An instruction
   that does not execute writes nothing and drives no bus. This is how a
   kernel masks the prologue and epilogue of a software pipeline.

The PRF rotates at every iteration end, whether or not the instruction
executes.

### Instruction format (`cgra_pkg::instr_t`, this design's own)

| field | bits | meaning |
|-------|------|---------|
| `op` | 5 | `opcode_e`: NOP MOV ADD SUB MUL AND OR XOR SHL SRL SRA CMPEQ CMPNE CMPLT LDA LDD STA STD |
| `src_a`, `src_b` | 3 each | `src_e`: RF, N, S, E, W, SELF, IMM, ZERO |
| `ra`, `rb`, `rw` | 4 each | register indices for R1, R2, W (the low log2(NUM_REGS) bits are used) |
| `wr_rf` | 1 | write the result to the PRF |
| `pen`, `psrc`, `pneg`, `pidx` | 1, 3, 1, 2 | predication |
| `pdst`, `wr_prf` | 2, 1 | predicate-file write by compares |
| `imm` | 16 | signed immediate |

`cgra_pkg::make_instr()` builds an unpredicated instruction. The testbenches
use it as a small assembler.

### Memory operations

A load or store takes two instructions:

| cycle | load | store |
|-------|------|-------|
| t | `LDA`: address `a + b` on the row address bus | `STA`: address `a + b` on the row address bus |
| t+1 or later | `LDD` (exactly t+1): the word arrives on the row data bus; it becomes the result | `STD`: operand `a` on the row data bus; memory writes it to the latched address |

The `LDA` and `LDD` of one load may be issued by different PEs of the row. So
may the `STA` and `STD` of one store. Addresses are byte addresses and words
are 32 bits, so pointers step by 4. The address transaction of one access may
overlap the data transaction of another. Load data and store data share the
one data bus, so a `STD` may not sit in the cycle after an `LDA` of the same
row.

## Array

```
          context memory per PE  <-- loop_ctrl (kernel cycle, iter_end)
   PE00 - PE01 - PE02 - PE03   === row bus 0 ===\
    |      |      |      |                        \
   PE10 - PE11 - PE12 - PE13   === row bus 1 ====  data_mem (one port per
    |      |      |      |                        /   row + host port)
   ...                         === row bus 2, 3 =/
```

* **Mesh.** Each PE sees the data and predicate outputs of its four
  neighbours. There is no wrap-around; a missing neighbour reads as 0.
* **Row buses** (`row_bus`). The PEs of a row share one address bus and one
  data bus, so only one transaction of each kind can happen per row per
  cycle. The data bus carries both load data and store data. The schedule
  has to respect this. If two PEs drive the same bus, or a `STD` meets
  returning load data, the `bus_conflict` output is raised and an assertion
  fires; among several drivers the lowest column wins. A store address is
  latched until its store-data transaction.
* **Data memory** (`data_mem`). There are `MEM_DEPTH` = 1024 words. Reads are
  synchronous with one cycle of latency, which is why `LDD` comes one cycle
  after `LDA`. If several writes hit one word in the same cycle, the highest
  row wins and the host port loses to every row.
* **Loop controller** (`loop_ctrl`). On `start` it latches `ii` and `iters`.
  It then steps every context memory through kernel cycles `0..ii-1`, `iters`
  times, with `iter_end` high in each iteration's last cycle. It pulses `done`
  at the end. A loop takes exactly `ii * iters` cycles. Only a kernel is
  sequenced; prologue and epilogue come from predication.

### Using the top (`cgra_top`)

All configuration happens while `busy` is low:

1. Write each PE's kernel with `ctx_we`, `ctx_row`, `ctx_col`, `ctx_addr`
   and `ctx_wdata`.
2. Write data with `host_we`, `host_addr` and `host_wdata`. Reads use
   `host_re` and return `host_rdata` one cycle later.
3. Set up registers and thresholds:
   * Pointers and constants are put into registers by instructions. The usual
     way is a one-iteration initialisation kernel of `MOV`-immediates, run
     while `T` is still 0.
   * Then write each PE's threshold with `thr_we`, `thr_row`, `thr_col` and
     `thr_value`. This clears that PE's offset and keeps its registers.
4. Pulse `start` with `ii` and `iters`, and wait for `done`.

`pe_out`, `pe_offset`, `iter_end`, `iter_cnt`, `bus_load`, `bus_store` and
`bus_conflict` are observation outputs.

Parameters: `ROWS = 4`, `COLS = 4`, `NUM_REGS = 4` and the 16-bit immediate
follow the source design. `DATA_W = 32`, `CTX_DEPTH = 16`, `MEM_DEPTH = 1024`
and `ITER_W = 16` are this design's choices. `DATA_W` must equal
`cgra_pkg::XLEN`, because the bus request type uses it. `ROW_ONE_TXN`
(default 0) selects the stricter bus rule described under Limits.

### Example schedule: first difference, `x[k] = y[k+1] - y[k]`, II = 3

This schedule is used by `tb_cgra_top`, with every row working on its own
slice.

| PE | T | cycle 0 | cycle 1 | cycle 2 |
|----|---|---------|---------|---------|
| (r,0) | 0 | `LDA [r2]` | | `r2 = r2 + 4` |
| (r,1) | 1 | | `LDD` -> r0 | `out = r0 - r1` |
| (r,2) | 0 | `STD W` if p(E) | `r2 = r2 + 4` if p(E) | `STA [r2]` if p(E) |
| (r,3) | 3 | `r0 = r3 + 1` | `p = 1 < out` | |

The schedule uses all three threshold settings:

* **PE (r,1), T = 1.** It keeps the last two loaded words in its rotating
  pair: this iteration's index 1 is the previous iteration's index 0.
* **PE (r,3), T = 3.** It carries an iteration counter through a fully
  rotating file: written at index 0, read one iteration later at index 3.
* **PEs (r,0) and (r,2), T = 0.** Their pointers sit in fixed registers.

The address bus carries `LDA` in cycle 0 and `STA` in cycle 2. The data bus
carries load data in cycle 1 and store data in cycle 0. The predicate from
PE (r,3) suppresses the store transactions issued before the first
difference exists. The loop runs N + 2 iterations for N outputs.

## Files

| file | contents |
|------|----------|
| `rtl/cgra_pkg.sv` | constants, opcode/operand enums, `instr_t`, `mem_req_t`, `make_instr` |
| `rtl/reg_bank.sv` | 2-read/1-write register bank |
| `rtl/offset_counter.sv` | rotation offset counter |
| `rtl/prf_rc.sv` | register control: threshold, region decision, offset clear |
| `rtl/prf.sv` | programmable register file (adders, AND masks, muxes, RC, bank) |
| `rtl/fu.sv` | single-cycle functional unit |
| `rtl/pred_rf.sv` | predicate register file |
| `rtl/pe.sv` | processing element |
| `rtl/context_mem.sv` | per-PE instruction memory |
| `rtl/loop_ctrl.sv` | kernel sequencer |
| `rtl/row_bus.sv` | shared row address and data buses with rule checks |
| `rtl/data_mem.sv` | multi-port data memory |
| `rtl/cgra_top.sv` | the array |

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the module with a reference computed in the testbench, has a
watchdog, and prints `TB_RESULT checks=N failures=M`.

* **`tb_prf`** models the index mapping and offset for every legal `T` under
  random traffic. It also replays the pointer plus loop-carried value case.
* **`tb_pe`** walks through operand sources, predication from the own file
  and from neighbours, two-step loads and stores, and rotation.
* **`tb_cgra_top`** runs the first-difference loop above on the
  default-size array, all four rows in parallel. It checks:
  * every output word and the guard words;
  * the cycle count (`II * iterations`);
  * that each mechanism occurred: offset wrap with `T = 1` and `T = 3`,
    loads and stores on every row, predicated-off stores, iteration ends,
    and no bus conflicts.
* **`tb_livermore`** runs seven more Livermore loops end to end at default
  size:
  * `first_sum`: a prefix sum carried in a rotating register;
  * `inner_prod`: two rows stream in parallel and the accumulator is a
    non-rotating register;
  * `hydro_1d`: `z[k+11]` of one iteration is reused as `z[k+10]` of the
    next through the rotating pair, while the constants share the same PE's
    non-rotating registers;
  * `tridiag_elim`: a recurrence through a multiply, whose first iteration
    is made harmless by the values the initialisation kernel leaves on the
    PE outputs;
  * `mat_x_mat` (innermost loop only): two matrix columns at once, with both
    buses of each row busy in every cycle. Each loaded `px` word waits one
    iteration in a rotating pair before it is updated;
  * `iccg` (one pass of the inner loop): `x[i+1]` loaded in one iteration is
    reused as `x[i-1]` in the next through a rotating pair. Three rows work
    on it: two load and one stores;
  * `band_lin_eq` (one pass of the outer loop): a dot product with a
    5-word stride, then a short kernel that scales and stores the result.

The loop kernels in the testbenches are hand-scheduled at II = 3. Short
set-up and clean-up kernels run once each. None of them is compiler output.
Outer loops (of `mat_x_mat`, `iccg` and `band_lin_eq`) are not sequenced by
the array: each pass is a separate kernel run that a host would start.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cgra_pkg.sv tb/tb_cgra_top.sv --top-module tb_cgra_top -o sim
./obj_dir/sim
```

## Limits and departures

* **Alternatives not included.** The source compares the PRF with two other
  organisations. One is a rotating file per PE plus a non-rotating file
  shared by each row. The other is a per-PE file split into fixed rotating
  and non-rotating halves. Only the PRF organisation is built here.
* **Not from the source.** The instruction set, operand sources, predication
  rules, predicate-file size (4, non-rotating), memory timing,
  conflict handling, configuration ports and all sizes other than 4 x 4 PEs
  and 4 registers per PE.
* **No compiler.** No mapper or register allocator is included. Kernels are
  written by hand with `make_instr`.
* **Host processor.** The host is outside the design; its interface is the
  top's configuration and host ports.
* **Row bus rule.** The source calls the address and data buses of a row
  shared, and also says only one memory transaction proceeds per row per
  cycle. By default each bus carries one transaction per cycle, so the
  address of one access may share a cycle with the data of another. All the
  example schedules rely on this. With `ROW_ONE_TXN = 1`, any cycle with more
  than one transaction on a row (address, store data or returning load data)
  is flagged as a conflict. Those schedules would then need a larger II.
* **Memory size.** The data memory holds 1024 words. Longer arrays have to be
  processed in chunks.
