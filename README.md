# KTRON — a fixed-point SVM classifier core for channel equalization

A receiver on a nonlinear, noisy channel has to recover each transmitted
symbol u(n) ∈ {+1, −1} from the received samples x(n). Instead of an analytic
inverse of the channel, a support vector machine (SVM) learns the inverse from
a known training sequence. The learning phase produces support vectors x_i,
weights α_i and a bias b. In the forward phase, every received window
x_n = [x(n), x(n−1), …, x(n−r+1)] is classified by

    y = b + Σ_{i ∈ SV} α_i u_i K(x_i, x_n),        û(n−D) = sign(y)

Here K is a kernel, normally the Gaussian exp(−‖x_i − x_n‖² / 2σ²). In the
published system this sits on an FPGA that is reconfigured at run time. One
region holds either a learning core (FIBS) or the classifier core (KTRON). A
general-purpose processor feeds data and supervises. This repository gives
synthesizable SystemVerilog for the **KTRON classifier core**, plus
testbenches. The main one equalizes a simulated nonlinear channel end to end.

The structure follows the published KTRON block diagram. Its units, their
names and the number format come from that design. Their internal sequencing,
the host interface and the table layout are this implementation's own.

## Blocks

| Module | Published name | What it does |
|---|---|---|
| `ktron` | KTRON core | top: host bus, configuration registers, wiring |
| `ktron_ktype_reg` | K_Type_RAM | one flip-flop: squared-distance or inner-product mode |
| `ktron_drive` | Ktron_Drive | support-vector RAM and input-vector RAM |
| `ktron_pre_kernel` | Pre_Kernel | Σ(a_j − b_j)² or Σ a_j b_j, first multiplier |
| `ktron_kernel` | Kernel | shift by log2(2σ²), then kernel look-up table |
| `ktron_out_mac` | Out_MAC | weight RAM, second multiplier, accumulator from b |
| `ktron_ctrl` | Ktron_ctrl | state machine sequencing all of the above |
| `ktron_bram` | Block RAM | 16-bit simple dual-port RAM, registered read |
| `ktron_pkg` | — | widths, types, address map |

With the default parameters (`MAX_SV = 100`, `MAX_R = 10`), there are four
RAMs, as in the prototype:

- support vectors: 1000 × 16;
- weights: 100 × 16;
- input vector: 10 × 16;
- kernel table: 1024 × 16.

So the core holds up to 100 support vectors of 10 features each. There are
exactly two multipliers: 17 × 17 in Pre_Kernel and 16 × 16 in Out_MAC.

## Number format

Every stored value is 16-bit two's complement Q3.13 (range ±4, step 2⁻¹³):

- features;
- weights w_i = α_i·u_i;
- the bias b;
- kernel-table entries.

Products are carried at 26 fractional bits in 40-bit accumulators (Q14.26).
At that width, ten full-scale squared differences (each < 2³²) cannot
overflow. The outputs are:

- `y_acc`: the raw 40-bit accumulator;
- `y`: the accumulator shifted down to Q3.13 and saturated to ±4;
- `y_pos`: the class, with y = 0 counted as +1.

Weights must fit Q3.13. An SVM trained with a box constraint C > 4 can
produce α_i that do not fit.

## Kernel evaluation: shift and table

This is the least obvious part of the design. Pre_Kernel leaves a Q14.26
value p:

- the squared distance ‖x_i − x‖² when `K_Type = KT_NORM`;
- the inner product x_i·x when `K_Type = KT_DOT`.

The Kernel unit does not divide. As in the prototype, 2σ² is rounded to a
power of two, 2σ² = 2^k, and the division becomes a right shift. The shift
also scales p to a table index:

    index = p >>> shift                                  (KT_NORM, clamped to 0..1023)
    index = clamp(p >>> shift, −512, 511) + 512          (KT_DOT, offset binary)

The table is 1024 Q3.13 words loaded by the host, so it decides the kernel.
The testbenches use these two layouts:

- **Gaussian** (`KT_NORM`): entry n = round(8192 · exp(−n/128)), so the table
  step is 1/128 of the normalized distance. With 2σ² = 2^k, set
  `shift = 19 + k`. The prototype's 2σ² = 1 gives shift 19. Normalized
  distances of 8 or more read the last entry, exp(−8) ≈ 3 LSB.
- **Polynomial** (`KT_DOT`): entry n = (1 + (n − 512)/128)², saturated to
  Q3.13, with shift 19. This gives (1 + x_i·x)² for inner products in [−4, 4).
  A linear kernel is entry n = (n − 512)/128.

The shift field is 6 bits. Each doubling of 2σ² adds one to it.

## Control and timing

`ktron_ctrl` is a non-pipelined state machine. For each support vector i and
feature j, it spends four clocks:

1. Address the RAMs at i·r + j and j.
2. Pre_Kernel captures the difference or the raw operands.
3. Pre_Kernel multiplies.
4. Pre_Kernel accumulates.

After the last feature of a vector it spends three more clocks:

1. The table is read; weight i is already being read.
2. Out_MAC multiplies.
3. Out_MAC accumulates and Pre_Kernel is cleared.

From the clock in which `start` is high to the clock in which `done` is high:

    latency = 2 + m·(4r + 3) clocks

| Configuration | This core | Published implementation |
|---|---|---|
| m = 32, r = 2 | 354 clocks | about 430 |
| m = 100, r = 10 | 4302 clocks | about 7300 |

The published implementation has a different, undisclosed state sequence, so
the clock counts differ. At the prototype's 100 MHz, the two cases take
3.5 µs and 43 µs here. No timing closure was done for this RTL.

## Programming the core

The host interface is a word-write bus (`host_we`, `host_addr[12:0]`,
`host_wdata[15:0]`), plus `start`, `busy` and `done`. Bits [12:10] of the
address select a region:

| Region | `host_addr[12:10]` | Word [9:0] |
|---|---|---|
| support vectors | 0 | i·r + j = feature j of vector i |
| input vector | 1 | j = x(n−j) |
| weights | 2 | i = α_i·u_i |
| kernel table | 3 | 0..1023 |
| configuration | 4 | 0: K_Type (bit 0) · 1: m · 2: r · 3: b · 4: shift |

On writes to the configuration registers:

- m is clamped to `MAX_SV`;
- r is clamped to 1..`MAX_R`, and a written 0 becomes 1.

After reset, m = 0, r = 1, shift = 19 and K_Type = `KT_NORM`.

To program the core:

1. Load the table, the support vectors, the weights and the configuration.
2. For each received window, write the r input words and pulse `start`.
3. Read `y`, `y_acc` and `y_pos` when `done` pulses. They hold until the next
   start.

The core samples m and r at `start`. While `busy` is high, `start` and all
writes are ignored. An assertion in `ktron` reports such writes.

Reset is asynchronous and active-low. It covers all registers but not the
RAMs: whatever the core reads must be written first.

## What is not here

The following parts of the published system are not part of this RTL:

- **Learning core (FIBS).** It is a recurrent network for the α_i plus a
  bisection search for b. Its architecture is not available to reproduce.
  The channel testbench trains in floating point instead, then quantizes and
  loads the result.
- **Supervising processor.** The testbenches act as the processor on the host
  bus.
- **Run-time reconfiguration.** Swapping FIBS and KTRON in one FPGA region is
  a configuration-port mechanism, not RTL logic.
- **I/O interfaces.**

## Departures from the published design

- **Latency.** It is 354 / 4302 clocks instead of about 430 / 7300 (see
  above).
- **Division by 2σ².** The prototype used a shift register; here it is a
  combinational arithmetic shift of the held Pre_Kernel result. The two give
  the same value.
- **Host interface.** The bus, address map, clamping, table layout, index
  clamping, output saturation and reset values are all choices of this
  implementation.
- **Weight RAM placement.** The weight RAM sits in Out_MAC. The published
  design lists a weight RAM but not which unit owns it.

## Fit of the published experiments

- **Prototype configuration: fits.** That is m = 32, r = 2, Gaussian with
  2σ² = 1, and 16-bit data.
- **Largest configuration: fits exactly.** That is 100 vectors × 10 features.
- **Experiments with 500 or 128 training samples.** They fit only if at most
  100 samples become support vectors, and with r·m ≤ 1000.
- **Experiments with C up to 32.** They may need weights beyond the ±4 range
  of Q3.13.
- **Other kernel widths.** Every 2σ² in those experiments must be rounded to a
  power of two.

## Testbenches

Each module has a self-checking testbench in `tb/`. All of them print
`TB_RESULT checks=N failures=M`. They compare against an integer reference
model (`tb/ktron_ref_pkg.sv`) that is written without reference to the RTL
structure.

| Testbench | What it covers |
|---|---|
| `tb_ktron_bram` | read latency, read-before-write, out-of-range writes |
| `tb_ktron_ktype_reg` | reset value, write enable |
| `tb_ktron_drive` | 100 × 10 vectors, random reads |
| `tb_ktron_pre_kernel` | both modes, r = 1..10, full-scale operands |
| `tb_ktron_kernel` | Gaussian values against exp(), index and clamping in both modes |
| `tb_ktron_out_mac` | accumulation, saturation, both classes |
| `tb_ktron_ctrl` | the exact strobe and address schedule, latency for random m and r, start while busy |
| `tb_ktron` | the whole core at default parameters, see below |
| `tb_ktron_model2` | channel equalization workload, see below |
| `tb_ktron_channels` | the published channel experiments, see below |

`tb_ktron` runs the whole core at its default parameters. It covers:

- the prototype configuration;
- other kernel widths;
- m = 100 with r = 10;
- polynomial kernels;
- inputs past the table's end;
- saturation;
- m = 0;
- clamped sizes;
- start and writes while busy;
- kernel-mode switches.

It counts each of these and fails if one never happened.

`tb_ktron_model2` simulates the "Model 2" channel:

- channel: x̃ = 0.5u(n) + u(n−1), x = x̃ + 0.1x̃² + 0.05x̃³ + e;
- noise: coloured, with variance 0.2 and ξ = 0.75.

It trains on 32 samples with r = 2, D = 1 and C = 1.6, then classifies 3000
symbols through the core. For every symbol it checks the result bit-exactly
and checks the latency. The core's decisions match the floating-point
classifier on about 99.97 % of symbols. The bit error rate is about 7 %; the
published figure for this set-up is 4.3 %. The difference comes from the
simple trainer used here.

`tb_ktron_channels` repeats the published channel experiments:

- Models 1 and 2 with delays D = 0, 1, 2 and r = 2, trained on 100 samples
  (the core's capacity; the published runs used 500);
- Model 3 with r = 3, D = 2, 64 and 32 training samples and noise variances
  0.1 to 0.4.

Each run uses its published C and σ², with 2σ² rounded to a power of two and
α_i limited to 3.99 so the weights fit Q3.13. It checks all 3000 results of
each run bit-exactly and checks their latencies. It prints the bit error rate
next to the published SVM figure, for orientation only: the trainer and the
random data differ from the published ones. In every run the core agrees with
the floating-point classifier on more than 99.5 % of symbols.

Run any of them with Verilator 5, for example:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/ktron_pkg.sv tb/ktron_ref_pkg.sv tb/tb_ktron.sv --top-module tb_ktron
    ./obj_dir/Vtb_ktron

Every testbench finishes in well under a minute.
