# Hamming-coded protection of parallel FIR filters, and a reversible-gate Hamming (7,4) codec

Suppose a system runs several FIR filters with the **same** coefficients, each on its own
input signal. Triplicating every filter (TMR) to survive a fault costs more than three times
the area. This design instead treats each filter as one "bit" of a Hamming code. Filtering is
linear, so filtering the sum of some inputs gives the sum of their filtered outputs. A few
extra *check filters* run on sums of the inputs. Comparing each check filter with the sum of
the outputs it mirrors shows which filter went wrong, and that filter's output can be rebuilt
from the others. With four data filters, three check filters are enough to correct any single
faulty filter. With eleven data filters, four are enough.

The same Hamming (7,4) code is also provided as a plain binary encoder/decoder. Every XOR in
it is built from a reversible gate, the Feynman (controlled-NOT) gate.

The two parts share no signals. The top level `ecc_top` places them side by side.

## The word-level code (filter bank, K = 4)

Data filters 1..4 filter `x1..x4` into `y1..y4`. The check encoder forms

    x5 = x1 + x2 + x3      -> check filter -> z1
    x6 = x1 + x2 + x4      -> check filter -> z2
    x7 = x1 + x3 + x4      -> check filter -> z3

With no fault, `z1 = y1 + y2 + y3`, `z2 = y1 + y2 + y4` and `z3 = y1 + y3 + y4`. The fault
corrector computes the three differences

    s1 = y1 + y2 + y3 - z1,   s2 = y1 + y2 + y4 - z2,   s3 = y1 + y3 + y4 - z3

It turns each one into a syndrome bit (1 = "this check failed"). The pattern of failing checks
identifies the fault exactly as in a binary Hamming code:

| s1 s2 s3 | faulty filter | action |
|---|---|---|
| 000 | none | pass outputs through |
| 111 | data 1 | `yc1 = z1 - y2 - y3` |
| 110 | data 2 | `yc2 = z1 - y1 - y3` |
| 101 | data 3 | `yc3 = z1 - y1 - y2` |
| 011 | data 4 | `yc4 = z2 - y1 - y2` |
| 100 / 010 / 001 | check 1 / 2 / 3 | pass outputs through (data outputs are good) |

A faulty output is rebuilt from the first check that covers it. The other data outputs in that
check are fault-free, because only one filter is assumed faulty.

### Why a threshold, and how large

Each filter quantizes its own result: the full-precision sum (20 bits for a data filter) loses
its two least significant bits to become the 18-bit output. A check filter sees a wider input
(10 bits) and drops the same two bits from its own full-precision sum. Truncating three values
separately and truncating their sum do not give the same result: with truncation (floor), the
fault-free difference `s_j` lies between `-(w-1)` and 0, where `w` is the number of data filters in
check `j`. A check therefore counts as failed only when `|s_j| >= THRESH`. The default
`THRESH` equals the largest `w`: 3 for K = 4 and 7 for K = 11. This is the smallest value
that can never flag a fault-free bank. The price has two parts:

* A fault that moves an output by less than about `THRESH` LSB may go unnoticed.
* A rebuilt output can exceed the fault-free value by up to `w - 1` LSB, because it inherits
  the check filter's quantization.

Both effects are a few LSB of an 18-bit output.

### Larger banks (K = 11)

Setting `K` selects the number of check filters `R`. It is the smallest `R` with
`2^R - R - 1 >= K`: 3 for K = 4, 4 for K = 11. Data filter `i` gets, as its syndrome pattern, the
`i`-th R-bit value with at least two ones, counting down from all ones. For R = 3 this rule
gives exactly the table above. For K = 11 the patterns are 1111, 1110, 1101, 1100, 1011, 1010,
1001, 0111, 0110, 0101, 0011. Check inputs widen by `clog2(largest check weight)` bits: 10 for
K = 4 and 11 for K = 11. Check outputs widen by the same amount: 20 and 21 bits. All of this
is computed at elaboration time in `ecc_pkg`.

For K = 4 and K = 11 the code is *perfect*: every non-zero syndrome names exactly one filter,
so two simultaneous faults are silently miscorrected, just as in a binary Hamming code. For
other K (shortened codes), a syndrome that names nothing sets `err_uncorrectable`.

### No shared logic

Every check sum in the encoder, every syndrome adder tree and every rebuilt output is written
as its own expression, with no partial sums shared between them. A shared adder could spread
one fault into several checks and defeat the code. Synthesis may still merge common
subexpressions. Keep the hierarchy, or constrain the tool, if that matters for your fault
model.

## The binary Hamming (7,4) codec

    p1 = d1 ^ d2 ^ d3      p2 = d1 ^ d2 ^ d4      p3 = d1 ^ d3 ^ d4
    codeword y1..y7 = d1 d2 d3 d4 p1 p2 p3

The decoder has three stages:

* `checker_bit_gen` recomputes the checks, giving the syndrome `s = {s1,s2,s3}` (`s = y H^T`,
  with H rows 1110100, 1101010, 1011001).
* `decoder_3x8` turns the syndrome into one-hot error lines.
* `decode` inverts the named bit. The syndrome table is the one above, with `d1..d4` and
  `p1..p3` as bit positions.

**Bit order, which is easy to get wrong.** The data ports carry `d1` in bit 0 (`d[3:0] = {d4,d3,d2,d1}`).
The codeword ports carry `y1` in bit 6 (`y[6:0] = {d1,d2,d3,d4,p1,p2,p3}`). The syndrome port
carries `s1` in bit 2, so its binary value reads like the table (e.g. `3'b101` means `d3`).

**Reversible gates.** Each XOR is a Feynman gate, `p = a`, `q = a ^ b`. The gate is its own
inverse and loses no information. The encoder uses two gates per parity bit, six in all. The
syndrome generator uses three per syndrome bit. The corrector uses one per codeword bit:
control = error line, target = received bit. No gate is shared between two parity or syndrome
bits. The copied-control outputs are the circuit's garbage outputs. They are left
unconnected, which accounts for the `UNUSEDSIGNAL` lint warnings on the `garbage` vectors.

## Modules

| file | role |
|---|---|
| `rtl/ecc_pkg.sv` | default sizes; elaboration functions: number of checks, syndrome patterns, check coverage, widths |
| `rtl/fir_filter.sv` | direct-form FIR filter, one-cycle latency; used for data and check filters |
| `rtl/check_encoder.sv` | sums of the inputs for the check filters |
| `rtl/fault_corrector.sv` | thresholded word-level syndrome, fault location, output rebuilding |
| `rtl/ecc_parallel_fir.sv` | K data filters + encoder + R check filters + corrector |
| `rtl/feynman_gate.sv` | reversible CNOT gate |
| `rtl/hamming_encoder.sv` | (7,4) encoder |
| `rtl/checker_bit_gen.sv`, `rtl/decoder_3x8.sv`, `rtl/decode.sv` | decoder stages |
| `rtl/hamming_decoder.sv` | (7,4) decoder |
| `rtl/ecc_top.sv` | both designs side by side |

## Interface and timing of `ecc_top`

Parameters (defaults): `K = 4`, `TAPS = 16`, `IN_W = 8`, `COEF_W = 8`, `OUT_W = 18`.
`fault_corrector` also has `THRESH`, which defaults to the check weight.

Filter bank (ports `f_*`). All samples and coefficients are signed two's complement.

* `f_coef[16]` holds the shared coefficients. Hold them steady while filtering.
* On a rising edge with `f_en = 1`, the four samples `f_x[0..3]` are taken.
* On the following cycle `f_out_valid = 1`. `f_y[0..3]` then holds the corrected outputs for
  that sample set, and `f_syndrome`, `f_err_detect`, `f_err_data` (+ `f_err_index`),
  `f_err_check` and `f_err_uncorrectable` describe it.
* Throughput is one sample set per cycle. With `f_en = 0` the filters hold their state.
* `rst_n` is an active-low synchronous reset. It clears the delay lines and outputs.

Codec (ports `h_*`, combinational): `h_data_in` -> `h_codeword_out`; `h_codeword_in` ->
`h_data_out`, `h_syndrome`, `h_err`. The two halves are separate ports, so a channel, or an
injected error, can be placed between them.

## What follows the original scheme and what is this design's own

Taken from the scheme:

* four data filters protected by three check filters, and the 11/4 configuration;
* the check sums and check equations;
* the syndrome table, and rebuilding by subtraction;
* the use of a threshold;
* 16 coefficients, 8-bit samples and coefficients, an 18-bit filter output and a 10-bit check
  filter input;
* the (7,4) parity equations and the generator column order;
* the decoder's three stages and their names;
* building the code from reversible logic;
* not sharing logic between checks.

Chosen here, because the scheme leaves them open:

* signed arithmetic, a direct-form filter with a registered output, the enable and the reset;
* truncation as the quantizer;
* coefficients on a port rather than fixed;
* the check filter output width (20 bits);
* the threshold value;
* rebuilding from the first covering check;
* saturation of a rebuilt value;
* the status flags;
* the check assignment for K other than 4;
* the Feynman gate as the reversible element;
* the port bit order of the codec, chosen to match the signal names `d1..d4` and `y1..y7`.

Not reproduced: the reported FPGA LUT counts, power and delay of the encoder and decoder.

## Simulating

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
For example, the whole design at default sizes:

    verilator --binary --timing --assert -Irtl -Itb rtl/ecc_pkg.sv tb/tb_ecc_top.sv \
        --top-module tb_ecc_top -Mdir obj_top && obj_top/Vtb_ecc_top

Replace `tb_ecc_top` with any other `tb_*` name to run that test instead.

* `tb_ecc_top` drives the four-filter bank with random coefficients and samples. About half
  of the cycles force a wrong value onto one data or check filter output. The test checks
  every output against a reference convolution and requires each mechanism to occur: clean
  cycles, a below-threshold quantization mismatch, correction of every data filter, detection
  in every check filter, and idle cycles. It also runs every codec word with every single-bit
  error.
* `tb_ecc_parallel_fir` runs the same kind of test (`tb/epf_harness.sv`) on the K = 4 and
  K = 11 banks at once.
* `tb_fault_corrector` exercises the corrector on its own, including a shortened K = 5 code to
  reach `err_uncorrectable`.
* The codec testbenches are exhaustive.

Fault injection uses `force` on the bank's per-filter output arrays (`y[i]`, `z[j]`) rather
than inside a filter instance. Some simulators apply a force inside one instance of a
module to all of its instances.
