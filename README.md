# Low-power FIR filter cores with coefficient ordering

A FIR filter computes y(n) = Σ h_j·x(n−j). These cores do it with one
multiplier, one product per clock cycle, so an N-tap filter produces one
output every N cycles. When the filter runs this way, most of its power goes
into the multiplier. That power grows with how many input bits toggle from one
product to the next. The cores use two ideas to cut that toggling:

* **Coefficient ordering.** Within one output, the products can be formed in
  any order. The coefficients are visited in an order where each one differs
  from the previous one in as few bits as possible (a minimum-Hamming-distance
  order). The multiplier's coefficient input then toggles much less. A small
  look-up table (LUT) turns the step number into the coefficient index. A
  second LUT makes sure the matching data sample, or partial sum, is read
  alongside.
* **Transpose direct form.** Instead of streaming a different sample into the
  multiplier on every cycle, the transposed core holds one input sample at the
  multiplier for all N products. It keeps N running partial sums in a ring
  memory instead. The data input then toggles once per sample. The price is a
  larger memory that is read and written every cycle.

The architecture follows the published design "Low Power FIR Filter
Implementations Based on Coefficient Ordering Algorithm", which evaluates four
cores: DF/norm, DF/min, TDF/norm and TDF/min, each a 24-tap, 16-bit
linear-phase low-pass filter. Both structures are here, and each core has a
parameter that picks the normal or the minimum-Hamming order. The default is
the minimum-Hamming order. The filter coefficients, the ordering algorithm,
the handshake, the rounding rule and the ring sizing rule are this design's
own choices, because the source does not give them. They are listed in
"Departures and own choices" below.

## Structure

```
fir_top
├── fir_df    direct form
│   ├── df_ctrl        sequencer
│   ├── coeff_memory   ROM + N:1 mux + order LUT + h_addr counter
│   ├── data_memory    circular data_ring + read LUT + w_addr/r_addr + address adder
│   ├── mul_add        alpha + beta*gamma  (booth_mult inside)
│   └── round_sat      2W -> W rounding and saturation
└── fir_tdf   transpose direct form
    ├── tdf_ctrl
    ├── coeff_memory
    ├── accu_memory    accu_ring of 2W-bit partial sums + read-offset LUT
    ├── mul_add
    └── round_sat
fir_pkg       shared constants, control-bundle structs, default coefficients,
              ordering and ring-sizing functions (elaboration time only)
```

`fir_top` places one direct-form core and one transpose-form core side by
side. Each has its own ports (`df_*`, `tdf_*`), so you can use either one
alone.

Synthesis reports latches for the direct-form core. They are the data ring
and are intended.

Both cores have the same three registers around the multiplier:

* `h_reg` holds the coefficient (multiplier input β).
* `x_reg` holds the data sample (multiplier input γ).
* `o_reg` holds the rounded output.

## Interface and timing (both cores)

| signal | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset. Reset clears all registers and rings. |
| `x_valid`, `x` | in | offered sample, signed W bits |
| `x_ready` | out | the sample is taken in a cycle where `x_valid && x_ready` |
| `y`, `y_valid` | out | signed W-bit output; `y_valid` pulses for one cycle per output |

Throughput is at most one sample per N cycles. With `x_valid` held high, a
sample is taken exactly every N cycles. Outputs leave in input order.

Latency is counted from the clock edge that accepts sample n to the edge
that raises `y_valid`:

* **Direct form:** N+2 cycles, for any order.
* **Transpose form:** K+1 cycles, where K is the step that uses h_(N−1).
  That is N for the normal order. With the default coefficients in the
  minimum-Hamming order it is 2 cycles, because h_(N−1) comes second in that
  order.

At the default N = 24 and the 10 MHz clock the published cores were evaluated
at, the throughput is 416.7 ksamples/s.

## Number format

Data and coefficients are signed W-bit two's complement. The default
coefficients are Q1.15.

* The product and the running sum are 2W bits wide. The sum wraps on
  overflow.
* `round_sat` rounds half up at bit W−1 and saturates to the W-bit range. The
  default filter has a DC gain of 1, but its peak gain is about 1.44. Inputs
  shaped to match the coefficient signs therefore saturate the output.

The default coefficients (`fir_pkg::LP24`) are a Hamming-windowed sinc low-pass
with cutoff 0.2·fs:

    s[n] = sinc(0.4·(n − 11.5)) · (0.54 − 0.46·cos(2πn/23))
    h[n] = round(0.999 · 32768 · s[n] / Σ s)

To use another filter, pass `COEFFS` (packed `[N-1:0][W-1:0]`, entry j = h_j)
together with `N` and `W`.

## Coefficient order

`fir_pkg::min_hamming_order` builds the order when the design is elaborated:

1. Start at h_0.
2. Move to the unused coefficient whose bit pattern differs from the current
   one in the fewest bits. On a tie, take the lowest index.
3. Repeat until every coefficient is used.

For the default filter the order is

    0 23 4 9 14 19 1 22 6 17 5 18 10 13 7 16 2 21 3 20 8 15 11 12

This cuts the Hamming distance summed over one pass from 176 bits (normal
order) to 56 bits. The linear-phase symmetry (h_j = h_(23−j)) makes many
steps cost zero bits.

This greedy rule is not the only way to reach a low-toggle order; any
permutation works. To use another one, change the `ORDER` localparam in a
core. Both the direct-form and transpose-form address logic accept any
permutation.

## The direct-form core

`data_ring` is a circular buffer of N samples. A new sample is written once
per output at address `w_addr − 1`, and `w_addr` then moves to that address.
Because `w_addr` runs backwards, sample x(n−j) always sits at
`(w_addr + j) mod N`, and no sample is ever moved. The read address is
`w_addr + LUT[r_addr]`. The read LUT holds the same index sequence as the
coefficient LUT, so the sample read in each step always matches the
coefficient fetched in that step.

One output is produced in four stages:

1. The accepting cycle writes the sample into the ring.
2. For N cycles, the pipeline loads `h_reg` and `x_reg` (fetch step).
3. One cycle behind each fetch, the pipeline updates `accu` with
   `accu + h_reg·x_reg`. On the first product of an output, the pipeline
   adds to 0 instead of `accu`.
4. One cycle after the last product, `o_reg` takes the rounded accumulator.

The next sample is accepted during the last fetch step. The ring is read
before it is written in that cycle, so overwriting the oldest sample there is
safe.

The ring sees one write every N cycles and one read every cycle.

## The transpose-form core and its partial-sum ring

This core is the hardest part to follow.

The transposed filter keeps N partial sums:

    P_j(n) = h_j·x(n) + P_(j+1)(n−1),   P_N = 0,   y(n) = P_0(n)

Sample x(n) sits in `x_reg` for the N steps of its sample period. Step k uses
coefficient j = order[k]. It reads P_(j+1)(n−1), adds h_j·x(n), and writes
P_j(n).

**Writes are sequential.** Each step writes at `w_addr`, and `w_addr` then
advances by one, modulo the ring depth M. A value needed in step k was
therefore written a fixed number of steps earlier, its *lifetime* L(k):

* For j < N−1, the step reads P_(j+1)(n−1), which was written in the previous
  sample period at step slot(j+1). So L = N + k − slot(j+1).
* For j = N−1 there is no partial sum to add. Alpha is forced to 0. The word
  read in this step is instead the finished output P_0:
  * If h_0 was used earlier in this sample period, this step reads y(n), with
    L = k − slot(0).
  * Otherwise it reads y(n−1), with L = N + k − slot(0). In that case
    `tdf_ctrl` drops the first such read after reset, which holds no output
    yet.

The read address is `w_addr + LUT[r_addr]`, where the LUT holds M − L(k).

**Ring depth.** A word must survive until it is read, so M must exceed every
lifetime: M = max L + 1. The "+1" means no word is ever read in the same
cycle it is rewritten, which a latch-based memory requires.

* In the normal order every L equals N−1, so M = N. This matches the N×2w
  accumulator memory of the published transposed structure.
* A reordered sequence keeps some partial sums alive across most of two
  sample periods. The ring grows: the default coefficients in the
  minimum-Hamming order need M = 42 words of 32 bits, against 24 words for
  the normal order.

That extra memory is the area cost of TDF/min that the source reports, shown
here as concrete numbers.

The ring sees one read and one write in every cycle. The elaboration-time
helpers are in `fir_pkg`:

* `tdf_lifetime` computes L(k).
* `tdf_depth` computes the ring depth M.
* `tdf_y_slot` gives the step in which the output is read.
* `tdf_y_prev` says whether that step reads the output of the previous sample.

`accu_memory` computes its own LUT of read offsets.

Pipeline: in the cycle the sample is accepted, `x_reg` is loaded and the
first coefficient is fetched into `h_reg`. Each fetch is followed one cycle
later by a ring step that reads, multiply-adds and writes in the same cycle.
In the output step, the ring word is rounded into `o_reg`.

## Switching activity

`tb/fir_activity_tb.sv` runs all four configurations on the same 400 random
full-scale samples. It counts bit toggles at the two multiplier input
registers:

| core | coefficient input (`h_reg`) | data input (`x_reg`) |
|---|---|---|
| DF/norm  | 70403 | 75801 |
| DF/min   | 25595 | 75683 |
| TDF/norm | 70403 |  3246 |
| TDF/min  | 25595 |  3246 |

The ordering cuts coefficient-input toggles by about 64%. The transpose form
cuts data-input toggles by about 96%. Together they reduce toggling at both
multiplier inputs, which is the basis of the power savings the source reports
for these cores (up to 34% overall for TDF/min). Power itself depends on the
cell library and the layout, and is not modelled here.

## Departures and own choices

* **Ring storage.** The direct-form data ring is a latch array, one latch
  word per sample. A write is staged in a register at the rising edge, and
  the addressed word is open while the clock is low. This adds a W-bit write
  register that the source does not show. The transposed partial-sum ring is
  an array of enabled flip-flops, in line with its description as a set of
  registers. Reset clears both rings.
* **Output width.** Each core outputs the rounded W-bit word held in `o_reg`.
  The full 2W-bit sum is not brought out.
* **Multiplier.** The multiplier is a plain radix-4 Booth multiplier with a
  behavioural adder tree. The source names a low-power Booth multiplier but
  does not describe its internals.
* **Left open by the source.** The source does not specify:
  * the controller and handshake;
  * the rounding and saturation rule;
  * the reset behaviour;
  * the accumulator overflow behaviour (here it wraps);
  * the coefficient values;
  * the ordering algorithm;
  * the transposed ring sizing rule.

  All of these are this design's own choices.
* **The register trio.** `h_reg`, `x_reg` and `o_reg` are named in the
  published power breakdown. Their placement here is an interpretation: at the
  two multiplier inputs and at the output.
* **Transposed output latency.** In the transpose form, an ordering that used
  h_(N−1) before h_0 would delay each output by one sample period. The greedy
  order always starts with h_0, so this never happens with the shipped
  orders. The logic for it (`Y_PREV`) is still present and tested.

## Simulating

Every testbench checks its own results and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fir_pkg.sv \
    tb/fir_top_tb.sv --top-module fir_top_tb
./obj_dir/Vfir_top_tb
```

Swap in any other testbench name to run it. The testbenches are:

| testbench | what it covers |
|---|---|
| `fir_top_tb` | Whole design at its default size. Random stalls and back-to-back input, checked against a convolution. Counts out-of-order fetches, ring wrap, ring words beyond N−1, output reads and saturation. |
| `fir_df_tb` | Direct-form core, min and normal order. Checks latency and throughput. |
| `fir_tdf_tb` | Transpose-form core, min and normal order. Checks latency and throughput. |
| `fir_activity_tb` | All four configurations; the switching counts above. |
| `df_ctrl_tb`, `tdf_ctrl_tb` | Cycle-exact control schedules. |
| `coeff_memory_tb`, `data_memory_tb`, `accu_memory_tb` | Addressing, with non-sequential orders. |
| `booth_mult_tb`, `mul_add_tb`, `round_sat_tb` | Arithmetic, against integer references. |

Every testbench passes at the default sizes. All of them finish in well under
a second of simulation time.

## Changing the design

* **Filter length and width.** Set `N` and `W`. `W` must be even, because of
  the Booth recoding. Supply matching `COEFFS`.
* **Fraction bits.** For coefficients that are not Q1.(W−1), change the
  rounding point `FRAC` in `round_sat`.
* **Size limit.** The helper functions in `fir_pkg` accept up to 128 taps and
  32-bit words (`MAX_TAPS`, `MAX_W`).
