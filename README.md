# FFT multi-digit multiplier in short floating point

This is synthesizable SystemVerilog for a hardware multiplier of very long
integers. It multiplies two m-digit hexadecimal numbers (m = 2^13 = 8192 by
default) by fast convolution:

    product digits c = round( IFFT( FFT(u) .* FFT(v) ) / 2m ),  then carries

Here u and v are the digit strings padded with m zeros each. They are
treated as 2m-point complex vectors whose imaginary parts are zero. The FFT
arithmetic is floating point, and the number format is as short as the
result allows: **1 sign bit, 7 exponent bits and 27 fraction bits** (35 bits in
all). That is enough to get every digit of a 2^13 x 2^13-digit product right,
even in the worst case where all digits are F. A 64-bit IEEE format would
cost more than twice the area.

The design follows a published VLSI design of an FFT multiplier: its block
structure, its module latencies and its number format. Where the published
description stops (addressing, memory interface, the inside of the
floating-point units, the controller), the choices are this implementation's
own. The section "Departures and own choices" lists them.

## Structure

```
            +---------------- fft_multiplier -----------------+
            |  butterfly     complex_mul     inv_butterfly     |
 main  <--->|        \           |            /                |
 memory     |         +--- fftmul_memory ----+   scaler        |
 (external) |         |  8-entry cache       |   rounder_carrier --> digits
            |         |  twiddle table       |                 |
            |  fftmul_controller (passes, addresses, staging)  |
            +--------------------------------------------------+
```

The vectors themselves, 2 x 2m complex words, stay in an external main
memory. The chip holds only a small cache for the operations in flight,
together with the table of twiddle factors. Every arithmetic module works the
same way: it fetches its operands from memory, computes, and writes the
results back. The controller drives these modules through a fixed series of
passes.

| pass      | module          | items | latency L | what it does                      |
|-----------|-----------------|-------|-----------|-----------------------------------|
| FFT U     | butterfly       | K stages x m | 22 | forward FFT of the first operand  |
| FFT V     | butterfly       | K stages x m | 22 | forward FFT of the second operand |
| CMUL      | complex_mul     | 2m    | 17        | U[i] = U[i] * V[i]                |
| IFFT      | inv_butterfly   | K stages x m | 22 | inverse FFT of the product        |
| SCALE     | scaler          | 2m    | 2         | U[i] = U[i] / 2m                  |
| ROUND     | rounder_carrier | 2m    | 10 / digit | nearest integer, carries, digits |

Here K = log2(2m) = LOG2M + 1 is the number of FFT stages. Each FFT stage
must finish before the next one starts, because it reads what the previous
stage wrote.

### Arithmetic modules

* **fp_addsub / fp_mul** (`rtl/fp_addsub.sv`, `rtl/fp_mul.sv`) are the
  floating-point adder/subtracter (latency 5) and multiplier (latency 7).
  Each is one combinational step followed by a register chain, so that
  synthesis retiming can spread the logic over the stages. The format has a
  hidden leading one and bias 63. Exponent code 0 means zero. There are no
  denormals, infinities or NaNs. Rounding is to nearest, ties to even. The
  functions themselves are in `rtl/fftmul_pkg.sv`.
* **complex_mul** computes a complex product with three real multipliers
  instead of four:
  `p_re = s_re t_re - s_im t_im`,
  `p_im = (s_re + s_im)(t_re + t_im) - (s_re t_re + s_im t_im)`.
  The critical path is add, multiply, subtract: 5 + 7 + 5 = 17 cycles. p_re is
  ready at cycle 12 and waits in a 5-cycle buffer.
* **butterfly** is the forward decimation-in-time butterfly:
  `X = x + yW`, `Y = x - yW`. A complex_mul forms yW while x waits 17 cycles
  in a buffer, and one row of adders follows. Latency 22.
* **inv_butterfly** is the inverse decimation-in-frequency butterfly:
  `X' = x + y`, `Y' = (x - y) conj(W)`. The sum and difference come first, and
  the sum then waits 17 cycles while the difference is multiplied by W with
  its imaginary sign inverted. This lets the forward twiddle table serve the
  inverse transform. Latency 22.
* **scaler** divides by 2m = 2^K by subtracting K from the exponent. Only
  the real part is kept: after the inverse transform of a real product, the
  imaginary part is rounding noise. Latency 2.
* **rounder_carrier** adds the carry from the digit below (fp_addsub). Then
  **carry_calc** rounds the sum to the nearest integer n. It uses a shifter to
  select the integer bits and an adder for the rounding bit. It outputs
  n mod 16 as the digit and feeds n / 16 back as a floating-point carry. This
  loop cannot be pipelined. A digit therefore enters only when the previous
  carry is known, which is every T_RC = 10 cycles. A combinational bypass
  passes the new carry to a digit entering in the same cycle. An assertion
  flags a digit that enters too early.

### Memory module and staging

`fftmul_memory` holds an **8-entry cache**. Each entry holds the data of
one butterfly: two complex words. The cache has two write ports and two read
ports, so fetching and write-back never compete:

| port | role |
|------|------|
| write 0 | operands arriving from main memory (entries 0-3, used as a ring) |
| read 0  | operands going to the active module |
| write 1 | results coming from the active module (entries 4-7, ring) |
| read 1  | results going back to main memory |

The module also holds the **twiddle table**. It stores W^e = exp(-2 pi i e / 2m)
for e = 0..m-1 and is written through the `lut_*` ports before use.
Synthesizable logic cannot compute cos/sin, so the values are computed
outside. The testbenches compute them with `$cos`/`$sin`.

An item issued by the controller in cycle c goes through these steps:

* **c**: the main-memory read address goes out.
* **c+1**: the read data is written to an operand cache entry, and the twiddle
  address goes to the table.
* **c+2**: operands and twiddle reach the module (`op_valid`).
* **c+2+L**: the result comes back and is written to a result cache entry.
* **c+3+L**: the result is written to main memory.

One item is issued per cycle, so a pass of n items takes **n + L + 3** cycles.

### FFT ordering: no reordering pass

The hardest part to follow is the addressing. The forward transform is a
decimation-in-time FFT arranged to take **natural-order input** and leave
**bit-reversed output**. The inverse transform is a decimation-in-frequency
FFT arranged the other way: bit-reversed input, natural output. The
pointwise product does not care about order, because both spectra are
bit-reversed in the same way. So the operands go in as plain digit strings,
the product digits come out least significant first, and no pass is spent
on reordering.

For butterfly j = 0..m-1 of stage s = 0..K-1 (`bitrev` reverses K-1 bits):

| transform | span h | group g | x | y | twiddle |
|-----------|--------|---------|---|---|---------|
| forward   | 2^(K-1-s) | j >> (K-1-s) | g*2h + (j mod h) | x + h | W^bitrev(g) |
| inverse   | 2^s       | j >> s       | g*2h + (j mod h) | x + h | conj(W^bitrev(g)) |

In forward stage 0, y always points into the zero half of the padded
operand. That stage therefore only copies x into both outputs. It is still
run as a normal stage.

Main-memory word addresses: region U = 0..2m-1 (first operand, later the
product), region V = 2m..4m-1 (second operand).

## Cycle count

For m = 2^LOG2M, K = LOG2M + 1, N = 2m, one multiplication takes, from the
`start` cycle to the `done` pulse:

    1 + 3K(m + 22 + 3) + (N + 17 + 3) + (N + 2 + 3) + (10 N + 3)  cycles

The testbenches check this formula exactly at every size they run. The
published estimate is

    T = 3(Tb + m - 1) log2 m + (2 Trc + 7) m + (3 Tb + Tcmul + Tscl - Trc - 3)

with Tb = 22, Tcmul = 17, Tscl = 2 and Trc = 10. The difference comes from the
3 staging cycles per pass above.

| m    | this RTL (cycles) | published formula | time at 1.89 ns |
|------|------------------:|------------------:|----------------:|
| 2^5  |   1,823 |   1,731 | 3.4 us  |
| 2^8  |  13,760 |  13,632 | 26.0 us |
| 2^10 |  59,222 |  59,070 | 0.112 ms |
| 2^12 | 259,052 | 258,876 | 0.490 ms |
| 2^13 | 541,751 | 541,563 | 1.024 ms |

The 1.89 ns clock is the published figure for the optimally pipelined
design. This RTL has not been synthesised to a cell library.

## Interface (fft_multiplier)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset (control state only) |
| start | in | 1 | start a multiplication (pulse while idle) |
| busy, done | out | 1 | running; one-cycle pulse after the last digit |
| lut_we, lut_waddr, lut_wdata | in | 1, LOG2M, 70 | load twiddle W^e |
| mm_re, mm_raddr0/1 | out | 1, LOG2M+2 | main-memory reads; data expected on mm_rdata0/1 the next cycle |
| mm_rdata0/1 | in | 70 | read data, {re, im} |
| mm_we0/1, mm_waddr0/1, mm_wdata0/1 | out | 1, LOG2M+2, 70 | main-memory writes |
| digit_valid, digit_idx, digit | out | 1, LOG2M+1, 4 | product digits, least significant first, one per 10 cycles |
| carry_out | out | 35 | carry above the top digit; zero for a correct product |

To use it:

1. Load the m twiddles.
2. Write each digit a_i as a floating-point number to U[i] and b_i to V[i],
   for i < m, with zeros from m to 2m-1.
3. Pulse `start`.

U and V are overwritten. `fftmul_pkg` defines the complex word type
`cplx_t` = {re, im} of type `fp_t` = {sign, exp[6:0], frac[26:0]}.

## Parameters

* `LOG2M` (top, controller, memory): operand length m = 2^LOG2M. The default
  is 13. Smaller values give smaller tables and shorter runs.
* The number format (`EXP_W`, `FRAC_W`) and the latencies (`T_ADD`,
  `T_MUL`, `T_SCL`, `T_CC`) are package constants in `rtl/fftmul_pkg.sv`.
  The 7/27 format is the right one for m = 2^13. It is kept at smaller m too,
  where it has precision to spare. Larger m needs more bits: about 9
  exponent and 40 fraction bits at m = 2^21. For that, change `EXP_W` and
  `FRAC_W`, and widen `INT_W` in carry_calc if carries can exceed 28 bits.

## Simulation

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=F` and has a watchdog. Example with plain
verilator, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fftmul_pkg.sv tb/fftmul_tb_pkg.sv tb/tb_fft_multiplier.sv \
    --top-module tb_fft_multiplier -o sim && ./obj_dir/sim
```

| testbench | what it covers |
|-----------|----------------|
| tb_fp_addsub, tb_fp_mul | bit-exact results against double precision rounded to 35 bits; latency |
| tb_fp_delay | buffer depth |
| tb_complex_mul, tb_butterfly, tb_inv_butterfly | results against double-precision complex arithmetic (1e-6 relative); exact latencies 17 / 22 / 22 |
| tb_scaler | exact division by 2^14, flush to zero, latency 2 |
| tb_carry_calc | rounding (including halves and negative noise), digit and carry |
| tb_rounder_carrier | digits of noisy coefficient streams at the full rate of one per 10 cycles; final carry |
| tb_fftmul_memory | both cache ports in parallel, synchronous table read |
| tb_fftmul_controller | every pass's read/write addresses and twiddle indices against the textbook loop nest; staging; rounding rate; cycle count |
| tb_fft_multiplier | m = 32, four products (random, all F, 1 x random); digits, cycle count, and a count of every mechanism (each pass, carries, both write ports, cache ring wrap) |
| tb_fft_multiplier_sizes | m = 2^5 .. 2^12 in parallel instances; digits and cycle counts, printed next to the published formula |
| tb_fft_multiplier_errors | rounding-error experiment, see below |
| tb_fft_multiplier_full | default size m = 2^13: the all-F worst case and a random product, every one of the 16,384 digits checked |

`tb/main_memory_model.sv` is a behavioural model of the external memory.
`tb/fftmul_tb_pkg.sv` converts between `real` and the 35-bit format. The
full-size test runs in a few seconds. All of the tests above pass.

## How much precision is left

Rounding to the nearest integer gives the right digit only while the
floating-point error of each coefficient stays below 0.5. The 27-bit
fraction was sized from the observation that this error is largest when
both operands consist entirely of F digits. `tb_fft_multiplier_errors`
repeats that experiment on the RTL. It multiplies the repeated-digit
numbers (a...a) x (b...b) for a, b in {3, 7, B, F}. For each product it
records the largest difference between the scaled inverse-FFT outputs and
the exact coefficients:

| m    | 3 x 3   | 7 x 7   | B x B   | F x F   |
|------|---------|---------|---------|---------|
| 2^10 | 0.00008 | 0.00031 | 0.00098 | 0.00195 |
| 2^11 | 0.00012 | 0.00098 | 0.00195 | 0.00586 |

In both cases the maximum over the grid is at F x F, as the sizing assumes,
and it is far below 0.5. At m = 2^13, the all-F product in
`tb_fft_multiplier_full` comes out correct in every digit.

## Departures and own choices

These points are not fixed by the published design:

* The internals of fpaddsub and fpmul are not given. The algorithms here,
  the rounding mode and the absence of special values are choices of this
  implementation. The published design pipelines its Wallace-tree multiplier
  by hand; here the pipeline cuts are left to retiming.
* The adder and multiplier latencies (5 and 7) are derived, not given. Only
  the latencies of the butterfly (22), the complex multiplier (17), the
  scaler (2) and the rounder-carrier (10) are published. 22 = 17 + 5 and
  17 = 5 + 7 + 5 fit the block diagrams.
* Every transform runs all K stages. The scaling pass is separate from the
  rounding pass. The FFT orderings, the main-memory interface and address
  map, the cache port roles and the whole controller are this design's own.
* inv_butterfly delays W by 5 cycles internally, so that callers present
  all operands together.
* carry_calc rounds halves up and turns negative values (noise around zero)
  into 0. Its integer path is 32 bits wide.
* The twiddle table is loaded from outside rather than generated on chip.
* The controller's area and timing were left out of the published
  evaluation. Here it is ordinary RTL.
* The area and clock figures (9.05 mm^2, 1.89 ns in 0.18 um CMOS) belong
  to the published design. This RTL has only been simulated.
