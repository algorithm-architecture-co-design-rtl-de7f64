# A 4×4 PE core for dense and sparse linear algebra

This is the RTL of one compute core for a matrix accelerator. The core runs seven
linear-algebra kernels on one datapath:

- dense matrix–vector product (GEMV);
- dense matrix–matrix product (GEMM);
- triangular solve (TRSM);
- LU decomposition (LUD);
- matrix inverse;
- sparse matrix–vector product (SpMV);
- sparse matrix–matrix product (SpMM).

The main idea is that every kernel is broken into *panel updates*. A panel update is a short, fixed schedule that works on a 4×4 block, or a 16-element vector, held in a 4×4 array of processing elements (PEs). Large problems become sequences of panel updates issued from outside. Sparse matrices are stored as dense 4×4 blocks plus block indices. Their panel updates are therefore the dense GEMV and GEMM schedules run on the non-zero blocks.

Each PE decodes the same instruction into its own 14-bit control word every cycle. The word depends on the kernel, the step number and the PE's row and column. No datapath is specific to one kernel: the kernels differ only in the control words the PE FSMs produce.

## The PE array and its broadcast buses

The core is an `NR × NR` array of PEs, with `NR = 4`. It has two kinds of bus:

- **Row buses.** Each row of PEs shares one. Row bus `i` carries values between the PEs of row `i`, and also carries external data in and out of the core. That gives `NR` elements per cycle, or 16 bytes per cycle at 32-bit data.
- **Column buses.** Each column of PEs shares one.

Each bus is the OR of per-PE outputs, and those outputs are zero unless the PE drives. So a bus carries the value of the single PE driving it, or zero. Assertions in `lac_core` check that no bus ever has two drivers in a cycle. During load instructions the external input `in_data[i]` drives row bus `i`, and no PE drives it then.

The PEs on the diagonal (`ROW == COL`) also have a reciprocal unit. All other PEs are identical.

## Inside a PE

| Part | Contents |
|---|---|
| Register file | 6 general registers R0..R5. Two read ports, one write port, and a third read tap at the write address that feeds the accumulator. |
| Row buffer (RB), column buffer (CB) | Latch their bus when the control word says so. Read through register addresses 6 and 7, so the 3-bit address space holds 8 entries. |
| ALU | One multiplier and one adder; diagonal PEs add a reciprocal. |
| Local memory | 256 × 32-bit single-port SRAM (1 KB), one-cycle read latency. |
| FSM | Step counter and control-word generator. |

A PE drives a bus with the value on its **second read port**. This lets a PE broadcast one register and do a multiply–accumulate (MAC) on another in the same cycle. A plain register file would have two read ports. The third tap is needed because in GEMM the row that broadcasts reads three values in one cycle: its A element, its accumulator and the B element it sends.

### Control word (14 bits)

| Bits | Field | Meaning |
|---|---|---|
| 13:12 | `alu_op` | 00 MOV, 01 MAC, 10 MSUB, 11 MUL |
| 11 | `rf_en` | write the result to the register file |
| 10:8 | `write_addr` | destination register |
| 7:5 | `read_addr2` | second read port: bus source or multiplier operand |
| 4:2 | `read_addr1` | first read port |
| 1 | `row_buff_rd` | row buffer latches the row bus |
| 0 | `col_buff_rd` | column buffer latches the column bus |

The ALU operations are:

| Op | Result | Notes |
|---|---|---|
| MOV | `rd1` | In a diagonal PE, a non-zero `read_addr2` selects `1/rd1` instead. |
| MAC | `dst + rd1·CB` | `dst` is the current value of the destination register. |
| MSUB | `dst − rd1·CB` | Same operands as MAC. |
| MUL | `rd1·rd2` | |

The field names and widths are the published layout. Putting the leftmost field at the MSB is this design's reading.

Some strobes are kept outside the 14 bits:

- the two bus-drive strobes (`row_drv`, `col_drv`);
- the local-memory strobes.

### Number format

Data are 32-bit two's-complement fixed point with `FRAC_W` fraction bits. The default is Q16.16.

- **Products** are taken at full width, shifted right arithmetically by `FRAC_W` and truncated to 32 bits.
- **The reciprocal** is `2^(2·FRAC_W) / a`, rounded toward zero. It saturates to the largest positive or negative value, and for `a = 0`.
- **Setting `FRAC_W = 0`** makes the core a plain 32-bit integer machine, except that reciprocals are then only useful for ±1.

A lookup table is the natural way to build the reciprocal. Here it is a combinational divider, so the result is exact and the table's contents do not need to be specified.

## Instructions and the core interface

The core accepts one instruction at a time. The instruction is a packed struct `instr_t` (`lac_pkg`) with three fields:

- a 4-bit opcode;
- a 3-bit register select `rsel`;
- an 8-bit local-memory address.

| Opcode | Cycles (NR = 4) | Effect |
|---|---|---|
| `LOAD_PANEL` | NR+1 (5) | Stream an NR×NR panel in. Element (i,j) goes to register `rsel` of PE(i,j). |
| `LOAD_ROWREP` | NR+1 (5) | Stream a panel in. Row i is copied to every PE of row i, element (i,k) into register R`k`. |
| `STORE_PANEL` | NR (4) | Register `rsel` of PE(i,j) appears on `out_data[i]` in the cycle where `out_col = j`. |
| `GEMM`, `SPMM` | NR+1 (5) | C += A·B on one 4×4 block |
| `GEMV`, `SPMV` | NR+1 (5) | Four independent 4×4 matrix–vector updates, one per PE column |
| `TRSM` | 3·NR (12) | Solve L·X = B in place of B, with L lower triangular |
| `LUD` | 5·(NR−1) (15) | Factor the panel in place into unit-lower L and upper U |
| `LM_WRITE` | 1 | Every PE writes register `rsel` to local memory at `addr` |
| `LM_READ` | 2 | Every PE reads local memory at `addr` into register `rsel` |

The interface signals are:

- **Instruction handshake.** An instruction is accepted in a cycle where `instr_valid && instr_ready`. `instr_ready` is low while an instruction runs, and `done` is high in its last cycle. The next instruction can be accepted in the cycle after `done`.
- **Loads.** The core raises `in_rd` with `in_col = t` for `t = 0..NR−1`, starting in the cycle after acceptance. The source must then present element (i, t) of the panel on `in_data[i]` in the same cycle, so the panel streams in one column per cycle.
- **Stores.** `out_valid` and `out_col` mark the columns being stored.

## Data layout of the panel updates

Register names below are those the schedules use (`lac_pkg`): R0..R3, R4 = `R_BVAL`, R5 = `R_CVAL`.

- **GEMM / SpMM.** Load A with `LOAD_ROWREP`, so PE(i,j) holds row i of A in R0..R3. Load B into R4 and C into R5. In step k < NR, row k drives its B element onto the column buses. From step 1 on, every PE does `R5 += R[k]·CB`, where k is the previous step's broadcast index. Broadcast and MAC overlap, so the update takes NR+1 cycles.
- **GEMV / SpMV.** Each PE column j is its own 4×4 problem.
  - PE(i,j) holds row i of A_j in R0..R3 (four `LOAD_PANEL`s), element i of b_j in R4 and element i of c_j in R5.
  - The schedule is the same as GEMM, so one instruction updates a 16-element result.
- **SpMV / SpMM on block-compressed data.** The sparse matrix is stored as dense 4×4 blocks with block-column pointers and block-row indices (BCSC), or the row-wise form (BCSR). Whatever issues the instructions walks these indices:
  - For SpMV it places up to four non-zero blocks in the four PE columns. It then adds each column's partial result into the output rows named by that block's row index.
  - For SpMM it pairs A blocks of block column k with B blocks of block row k.
- **TRSM.** L is row-replicated (R0..R3), and B/X sits in R4. The steps are:
  1. The diagonal PEs form `r_ii = 1/L_ii` in R5.
  2. They drive it on their row bus, and every PE latches it.
  3. Row 0 computes `X = B·r`.
  4. For each m = 0..NR−2, three steps follow: row m drives its X down the columns; every row below m does `B −= L_im·X`; row m+1 computes `X = B·r`.

  This gives 3 + 3(NR−1) = 3·NR cycles.
- **LUD.** The panel sits in R4. Each iteration m = 0..NR−2 takes five steps:
  1. PE(m,m) forms `r = 1/u_mm`.
  2. PE(m,m) drives r down column m, while PE(m,j) drives `u_mj` down column j (j > m). The PEs below row m latch the column buses.
  3. Column m below the diagonal computes `l_im = a_im·r`.
  4. Column m drives l along the row buses.
  5. The trailing sub-array does `a_ij −= l_im·u_mj`.

  At the end, R4 of PE(i,j) holds `l_ij` below the diagonal and `u_ij` elsewhere. The unit diagonal of L is implicit.
- **Matrix inverse.** The inverse is a sequence of panel updates with loads and stores between them:
  1. LUD.
  2. TRSM with B = I, giving L⁻¹.
  3. TRSM on U, giving U⁻¹. U is upper triangular, so it is given to the lower-triangular solver with rows and columns reversed.
  4. GEMM, giving A⁻¹ = U⁻¹·L⁻¹.

  The compute part takes 15 + 12 + 12 + 5 = 44 cycles.

## LUD timing: a deliberate departure

The original schedule for this core runs LUD in 3·NR − 1 cycles (11 at NR = 4). It gets there by computing every diagonal reciprocal once, at the start, from the original diagonal. That is only correct for a 2×2 panel. For larger panels each trailing update changes the later diagonal elements, so the pivots of iterations 1 and beyond would be stale.

This core therefore forms each reciprocal after its diagonal element is final. That costs 5 cycles per iteration: 15 cycles at NR = 4 instead of 11. The result is exact LU (no pivoting). The end-to-end testbench checks it against a software model and checks that L·U reproduces A.

## Local memory and blocked GEMM

Each PE has 256 words of local memory, which is enough to hold the B operand of a GEMM block update with k = 512. The memory is reached through two instructions:

- `LM_WRITE` copies a register into the memory.
- `LM_READ` copies a word back into a register.

Every PE uses the same address. A blocked update `C += A·B` over P panels parks the P panels of B in local memory first. It then alternates three steps: `LM_READ` of a B panel, `LOAD_ROWREP` of the matching A panel and `GEMM`. C stays in R5 throughout. `tb_lac_core` runs this with P = 3. `tb_lac_gemm_k512` runs the full-size case, `C' (8 × 512) += A (8 × 8) · B (8 × 512)`. There, B fills all 256 words of every PE's local memory, and each output panel is loaded, updated by two GEMMs and stored. It prints the share of cycles spent in GEMM. Without overlapped transfers that share is about a quarter.

## What is not in this RTL

The core is meant to sit in a multicore system. That system has a central controller that partitions large problems, a per-core on-chip memory (1 MB) and crossbars to external memory. None of those are built here.

- **The core's boundary.** The core exposes its instruction port and its row-bus load/store port. This is where an on-chip memory and local program would connect. The testbench plays that role.
- **Local controller, sparse kernels.** For SpMV and SpMM the local controller only sequences instructions; it does not do the block-index matching itself. It also does not stall PEs when two sparse blocks would update the same output rows. Such collisions are avoided by giving each PE column its own partial result and adding the partial results afterwards.
- **Overlapped transfers.** The core runs one instruction at a time, so loads and stores do not overlap with computation. Block updates are meant to use *extended* panel updates (an `NR × m` by `m × NR` product with `m ≥ 2·NR`) to hide the transfer of partial results behind the MACs. Here such an update is a sequence of 4×4 panel updates with the transfers in between. The blocked-GEMM test shows this.
- **Register file size.** The register file has 6 registers plus the 2 buffers. A 16-entry register file (64 bytes) would be a straightforward extension. No schedule here needs more than 6.

## Files

| File | Contents |
|---|---|
| `rtl/lac_pkg.sv` | Types (control word, instruction, opcodes), register map, cycle counts per opcode |
| `rtl/lac_core.sv` | Top: PE array, bus OR-trees, local controller, external ports |
| `rtl/local_ctrl.sv` | Instruction handshake, step counting, load/store column sequencing |
| `rtl/pe.sv` | One PE: FSM, register file, buffers, ALU, local memory |
| `rtl/pe_fsm.sv` | Step counter and control-word generation for every instruction |
| `rtl/pe_alu.sv` | MOV / MAC / MSUB / MUL, optional reciprocal |
| `rtl/recip_unit.sv` | Fixed-point reciprocal |
| `rtl/pe_regfile.sv` | 2R1W register file with accumulator read tap |
| `rtl/local_mem.sv` | Single-port SRAM model (array) |
| `tb/tb_fx_pkg.sv` | Fixed-point reference functions for the testbenches |
| `tb/tb_lac_gemm_k512.sv` | GEMM block update with B filling the local memories (k = 512) |
| `tb/tb_<module>.sv` | Self-checking testbench per module; `tb_lac_core` is end to end |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends. Each has a watchdog. Each also checks the cycle count of every operation it issues. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_lac_core rtl/lac_pkg.sv tb/tb_fx_pkg.sv tb/tb_lac_core.sv
./obj_dir/Vtb_lac_core
```

Replace `tb_lac_core` with any other testbench name. `tb_lac_core` runs the core at its default parameters, with these tests:

- GEMM, GEMV, TRSM and LUD with random data;
- SpMV (a 12×8 block-sparse matrix) and SpMM (8×8 by 8×8);
- a 4×4 inverse, checked by A·A⁻¹ ≈ I;
- the blocked GEMM through local memory;
- back-pressure on the instruction port.

It counts every mechanism and fails if one never occurred. It also measures PE utilisation: the share of PE-cycles in which a PE writes a register, latches a bus or drives one. The measured values are 1 for GEMM, GEMV, SpMV and SpMM, 0.5 for TRSM (checked against (2+NR)/(3·NR)) and 0.30 for LUD. It finishes in seconds.

## Changing the design

- **`NR`.** Array sizes 2 to 4 are supported; an assertion enforces this. The cycle counts in `lac_pkg::op_cycles` follow `NR`.
- **`FRAC_W`.** Changes the binary point. `DATA_W` changes the word width.
- **New kernels.** Add an opcode to `lac_pkg`, its cycle count to `op_cycles` and its schedule to `pe_fsm`. No datapath change is needed as long as the kernel fits MOV/MAC/MSUB/MUL and the two broadcast buses.
