# Tensor processors: multi-precision MMA, semiring matrix instructions, fused sparse dataflow

Matrix units in today's accelerators are very fast at one job: a low-precision multiply-accumulate on dense tiles. This repository holds three designs that extend such a unit without rebuilding it:

* **M3XU**, a multi-mode matrix unit. It reuses the 12-bit mantissa multipliers of an FP16 tensor-core datapath to compute exact single-precision (FP32) and single-precision complex (FP32C) matrix products. Each product takes several passes through the same array.
* **SIMD2**, a matrix unit whose multiply and add are replaced by a choice of operator pairs. Examples are (+, min) for shortest paths, (and, or) for reachability and (‖a−b‖², +) for distances. Nine "semiring-like" matrix operations then run on the same tile hardware and instruction flow as a GEMM.
* **SIDA**, an engine for sparse tensor algebra. It fuses *vector × sparse matrix → element-wise → vector × sparse matrix*. Every element of the matrix is read from memory once, although both products use it. It does this by storing what it loads in two sparse formats on chip.

All three are in synthesizable SystemVerilog with default parameters at their published sizes. The top module `tensor_processors_top` places them side by side, each with its own ports.

## M3XU: FP32 and complex FP32 on FP16 multipliers

### Operand split

A tensor-core dot-product unit multiplies 11-bit FP16 significands. Widened slightly to 12 bits, the same multipliers can take half of an FP32 significand. The 24-bit FP32 significand (hidden bit included) is cut into two parts:

* `H` = hidden bit and fraction bits 22..12 (12 bits), worth 2^12 more than
* `L` = fraction bits 11..0 (12 bits).

Then a·b = HaHb·2^24 + (HaLb + LaHb)·2^12 + LaLb. Each FP32 product therefore needs four 12×12 products. Every sub-product enters the multiplier as a 21-bit entry {sign, 8-bit exponent, 12-bit mantissa}, together with a weight shift of 24, 12 or 0 bits. FP16 products all use the weight of 24, so the same alignment logic serves every mode.

### Steps

The unit is an 8×4 array of dot-product units with 8 multipliers each. One step of the array computes:

| mode  | tile per operation (M×N×K)  | steps | what each step computes |
|-------|-----------------------------|-------|-------------------------|
| FP16  | 8×4×8                       | 1     | 8 FP16 products |
| FP32  | 8×4×4                       | 2     | step 0: HH and LL of 4 products; step 1: HL and LH |
| FP32C | 8×4×2 (complex)             | 4     | steps 0–1: real part (re·re, then −im·im); steps 2–3: imaginary part (re·im, im·re) |

The data-assignment stage (`m3xu_data_assign`) produces, for each step, the entries for every multiplier. It swaps the halves of B between steps and flips the sign of imaginary×imaginary products. Register words are 16 bits wide. An FP32 value occupies two neighbouring words, low half first. A complex value is its real FP32 followed by its imaginary FP32.

### Dot-product unit arithmetic

`m3xu_dpu` keeps a 48-bit running significand with its own exponent:

* It aligns the products (and, on the first step, C) to the largest exponent and sums them as signed values.
* It renormalises the result and truncates it to 48 bits plus 4 guard bits.
* After the last step it rounds once to FP32, round-to-nearest-even.
* Subnormal results are flushed to zero and overflow gives infinity. NaN inputs are not treated specially.

So a multi-step FP32 result is rounded once, not once per step. It matches an exact real-number reference to within one rounding of the final sum.

### Interface and timing (`m3xu`)

* `start`/`ready`: an operation is accepted on the clock edge where both are high.
* Back-to-back operations are accepted every 1, 2 or 4 cycles (FP16, FP32, FP32C).
* `done` is high for one cycle, 4 cycles after the accepting edge. The 4 cycles are the operand buffer, the assignment register, the dot-product register and the output register.
* `d[i][j][0]` is the real or plain result and `d[i][j][1]` the imaginary one (zero outside FP32C). `c` has the same layout.

## SIMD2: semiring-like matrix instructions

### Operations

`D = C ⊕ (A ⊗ B)`, with A and B in half precision and C and D in single precision:

| opcode | name     | ⊗            | ⊕   |
|--------|----------|--------------|-----|
| 0      | mma      | ×            | +   |
| 1      | minplus  | +            | min |
| 2      | maxplus  | +            | max |
| 3      | minmul   | ×            | min |
| 4      | maxmul   | ×            | max |
| 5      | minmax   | max          | min |
| 6      | maxmin   | min          | max |
| 7      | orand    | and          | or  |
| 8      | addnorm  | (a−b)²       | +   |

The ⊗ ALU (`simd2_otimes_alu`) turns two FP16 values into one FP32 value, and the ⊕ ALU (`simd2_oplus_alu`) combines two FP32 values.

* Logical and/or treat any non-zero value as true and return 1.0 or 0.0.
* min and max order values by IEEE total order of magnitude and sign.
* Every arithmetic result is rounded to nearest even, subnormal results are flushed to zero and infinities propagate.

### Tile unit and instruction engine

`simd2_unit` computes one 4×4×4 tile step. Each output element chains ⊕ over k = 0..3 in order, starting from C. The result is registered (one cycle).

`simd2_core` is the warp-level engine around the unit:

* A register file of 8 matrix registers of 16×16 words.
* `load` (kind 0) reads 16 rows of 16 words from the shared-memory port, at `addr + r·ld`. Half-precision operands are the low 16 bits of each word.
* `store` (kind 1) writes a register back the same way.
* `arith` (kind 2) runs `D = C ⊕ (A ⊗ B)` on 16×16×16 matrices as 4×4×4 = 64 tile steps. Tiles are visited in i, j, k order, with k innermost, so every element is reduced in k order. The result is staged and written to `rd` only at the end, so `rd` may equal `rc` (in-place update, as iterative graph algorithms need).

Timing:

* `busy` lasts 17 cycles for a load (16 row reads and one cycle of memory latency), 16 for a store and 66 for an arithmetic instruction.
* `instr_ready` returns one cycle later.
* The shared-memory port moves one row per cycle and returns read data one cycle after the request.
* `unit_ops` counts tile steps.

## SIDA: one pass over the matrix for two products

### What a job computes

For an n×n sparse matrix A, vectors x and w, a scalar s and a semiring (⊗, ⊕):

```
y[c]   = ⊕_r  x[r] ⊗ A[r][c]              output-stationary product (per column)
z[c]   = (y[c] op1 s) op2 w[c]            fused element-wise instruction
out[j] = ⊕_c  z[c] ⊗ A[c][j]              input-stationary product (per row)
```

The first product walks A by columns and the second by rows. The supported semirings are (×, +), (and, or) and (+, min). Values are 64-bit signed integers, and addition saturates, so the largest value acts as infinity for min-plus.

### The OEI schedule

Columns are grouped into sub-tensors of T = 64. A dispatcher keeps an index I that starts at −2. In each step:

1. **E-Wise** computes z for sub-tensor I from the OS result of the previous step.
2. **IS** scatters the rows of sub-tensor I whose z is now known. It reads each row's elements from the CSR space of the buffer, up to NPE = 1024 per cycle.
3. **LOAD** streams the CSC data of sub-tensor I+2 from memory into the CSC ring. Each loaded element is either:
   * **eager**: its row already has z, and the element goes straight to the IS core; or
   * **converted**: it is appended to its row in the CSR space for a later step.
4. **OS** multiplies the CSC data of sub-tensor I+1, NPE non-zeros per cycle, reduces it per column and then evicts those columns from the ring.

Each element is loaded once. The OS product of its column uses it once. The IS product of its row uses it exactly once, eagerly or from the CSR space.

### Dual-storage buffer

`sida_dual_buffer` holds the two spaces:

* **CSC space:** a ring of 128-bit elements {row, col, value}. It is written at the tail, read NPE at a time and freed from the head.
* **CSR space:** addressed by row. When the first element of a row arrives, the row's full length is reserved, taken from the per-row length vector the engine loaded beforehand. Later elements fill the reservation in order, so a row ends up stored contiguously.

If a reservation does not fit, the conversion is reported as dropped. The engine counts it in `stat_dropped`, and the result is then incomplete. The defaults (2,097,152 elements per space) add up to a 64 MB on-chip buffer.

### Dispatcher and traffic estimate

`sida_dispatcher` produces I and the valid flags for I (e-wise), I+1 (OS) and I+2 (prefetch). It also computes two estimates for each step:

* X = max(2·nnz(I+2), ⌈nnz(I+1)/NPE⌉ + 1). This is the step's length, in cycles, for loading versus computing, with one memory word per cycle and two words per element.
* R = the spare cycles divided by two: the elements that could be fetched in a step's spare memory bandwidth.

The engine reports X in `stat_est_x`. It does not yet spend R (see *Departures*).

### Memory image and interface

The engine reads 64-bit words through `mem_req`/`mem_addr`/`mem_gnt`. Responses come back in order on `mem_rvalid`/`mem_rdata`.

A job gives the word addresses of:

* `x[0..n-1]` and `w[0..n-1]`;
* the row lengths `rowlen[0..n-1]`;
* the CSC column pointers `colptr[0..n]`;
* the row indices and values `rowidx[0..nnz-1]` and `val[0..nnz-1]`.

The engine first loads x, w, the row lengths and the column pointers on chip (n ≤ NVEC = 65536), then runs n/T + 2 steps. After `done`, `out[j]` is read through `out_raddr`/`out_rdata`.

Statistics outputs: cycles, steps, memory words read, OS and IS busy cycles, eager and converted element counts, dropped conversions and the last X. The memory-word count equals 4n + 1 + 2·nnz, which shows that each matrix element was read once.

## Top level

`tensor_processors_top` exposes each design through flat packed vectors.

* **`m3_*`:** `m3_a` holds element [i][k] at bits `(i*8+k)*16`, `m3_b` element [k][j] at `(k*4+j)*16`, and `m3_c`/`m3_d` element [i][j][p] at `((i*4+j)*2+p)*32`.
* **`s2_*`:** the instruction port and the shared-memory row port, with word c at bits `c*32`.
* **`sd_*`:** the job inputs, the memory port, the result port and the statistics.

The three designs share only clock and reset.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_m3xu_data_assign` | every mode and step against an independent split of random operands |
| `tb_m3xu_dpu` | random products and accumulation against exact real arithmetic |
| `tb_m3xu` | all three modes, integer-exact and random data, issue rates 1/2/4 and the 4-cycle latency |
| `tb_simd2_alus` | every ⊗ and ⊕ operator on random and special values |
| `tb_simd2_unit` | all nine opcodes on random 4×4×4 tiles |
| `tb_simd2_core` | load / arith / store of every opcode through a shared-memory model, an in-place update, and the instruction busy times |
| `tb_sida_pe`, `tb_sida_os_core`, `tb_sida_ewise_core`, `tb_sida_is_core` | SIDA datapaths against integer references for each semiring |
| `tb_sida_dual_buffer` | ring order and count, row reservation and row read-back |
| `tb_sida_dispatcher` | the I / I+1 / I+2 schedule, X and R, and the step count |
| `tb_sida` | whole jobs (all three semirings), with a dense row and a dense column, against a dense reference. It also checks memory words, eager plus converted equals nnz, and the step count. |
| `tb_top` | all three designs at once at the default parameters, with results checked and each mechanism counted |

`tb_top` runs the top with every parameter at its default: a 1024-PE SIDA with 64 MB of buffer arrays, beside the full M3XU and SIMD2 core. It is the full-size test. Its SIDA job is a 320×320 matrix with about 7,700 non-zeros. The job needs several OS passes per sub-tensor and meets random memory back-pressure, and the test counts eager updates and conversions.

`tb/hbm_model.sv` is a behavioural memory with random grant and fixed latency, used only by testbenches.

To run a testbench with Verilator, for example `tb_top`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/m3xu_pkg.sv rtl/simd2_pkg.sv rtl/sida_pkg.sv \
  tb/tb_fp_pkg.sv tb/tb_simd2_ref_pkg.sv tb/tb_top.sv \
  --top-module tb_top
./obj_dir/Vtb_top
```

Modules are found by file name through `-y`; packages are listed first. Block testbenches work the same way with their own top module. They set smaller parameters (for example NPE = 8, T = 16) to keep the runs short. Building `tb_top` at full size takes a few minutes of C++ compilation. The simulation itself takes seconds.

## Departures and open points

* **M3XU:** products are aligned and truncated to 48 + 4 bits before the single final rounding. NaN is not handled, and subnormal inputs are treated as zero-exponent numbers without a hidden bit. The ordering of the cross-term pairs over the two steps is this design's choice; the sum is the same.
* **SIMD2:** the register file is one warp-wide array of matrices. How fragments are spread over the threads of a warp is not modelled. The GPU streaming multiprocessor, its scheduler and shared memory are outside the design: their signals are ports, and the testbenches model them.
* **SIDA:**
  * The four phases of a step run one after another instead of overlapping, so a step lasts about as long as the sum of its phases rather than the X estimate.
  * The engine does not load rows in CSR order with the spare bandwidth R. Rows are not reordered or evicted from the CSR space.
  * Blocked storage for matrices larger than the on-chip vectors is not built. A matrix must have n ≤ 65,536, and its not-yet-consumed elements must fit in the CSR space.
  * The per-row CSR prefetch heuristic is not built. That heuristic spreads R over the rows between the last fully computed row and the last row whose z is known, in proportion to what each row already holds.
  * Buffer repacking is not built.
  * Finished output elements are not written back to memory. They stay in the on-chip output vector and are read through the result port.
  * The OS reduction is a plain masked per-column reduction over all lanes. It gives the same result as a forwarding adder tree, which is the structure normally used for a varying number of non-zeros per column.
  * Only three operator pairs are built in the PEs: (×, +), (and, or) and (+, min).
  * Values are integers. Floating-point semirings are not provided.
  * T = 64 and NVEC = 65,536 are choices of this design.
* **Capacity at default sizes:** of the nine evaluation matrices with 17k–51M rows, the two smallest (about 17k–19k rows) fit. The others exceed the 65,536-entry on-chip vectors and would need the blocked scheme above. GEMM and semiring workloads of any size run on M3XU and SIMD2 as sequences of tile operations issued by software.
