# Four-stream variable-length MDC FFT/IFFT processor

A MIMO-OFDM receiver or transmitter with four antennas has to transform four OFDM symbols
at the same time, one from each antenna stream. This processor does that with a single
radix-4 *multipath delay-commutator* (MDC) pipeline. An MDC pipeline of radix r takes r
samples per clock cycle. Each of the four streams delivers one sample per cycle, so four
streams feed a radix-4 pipeline at exactly its rate. The butterflies and multipliers are
busy every cycle, and no input or output idles while a frame is being processed.

The processor supports FFT and IFFT at 2048, 512, 256 and 128 points, the lengths used by
WiMAX and LTE baseband processing. The length can be changed between frames.

## Data path

```
in_data[0..3]  (stream s, sample t; one per stream per cycle)
   |  re/im swap when cfg_inverse
   v
input_buffer        4 RAM banks x 2 halves, conflict-free mapping
   |  4 lanes: x_s[n], x_s[n+N/4], x_s[n+N/2], x_s[n+3N/4]; stream 0, then 1, 2, 3
   v
r4_stage 0 -> mdc_commutator 0 -> r4_stage 1 -> ... -> mdc_commutator 3 -> r4_stage 4
   |          (entry at stage 0 for 2048, stage 1 for 512 and 256, stage 2 for 128)
   v
r2_stage            (2048, 512, 128 only; bypassed for 256)
   v
output_sort_buffer  digit-reversed -> natural order, one stream -> four parallel streams
   |  re/im swap when cfg_inverse
   v
out_data[0..3] = X_s[out_index]
```

The input buffer turns four slow streams into one fast stream. Each stream's symbol takes
N/4 cycles in the pipeline, and the four symbols follow each other. The output sorting
buffer does the reverse.

## The radix-4 MDC pipeline

Each pipeline stage is a decimation-in-frequency (DIF) radix-4 stage with a *span* s. In
every cycle its four lanes carry the points `x[n], x[n+s], x[n+2s], x[n+3s]` of one block of
4s points. The stage computes the radix-4 butterfly and divides the result by 4. It then
multiplies output lane q by the twiddle factor `W_{4s}^{n*q}`, where n is the cycle count
since the start of the frame, modulo s.

Stage k has span `512/4^k`: 512, 128, 32, 8 and 2. Five radix-4 stages and one radix-2 stage
give 2 x 4^5 = 2048 points. The other lengths use a tail of the same pipeline:

| N    | factorisation | stages used         | spans            |
|------|---------------|---------------------|------------------|
| 2048 | 4^5 x 2       | r4 0-4, r2          | 512,128,32,8,2,1 |
| 512  | 4^4 x 2       | r4 1-4, r2          | 128,32,8,2,1     |
| 256  | 4^4           | r4 1-4 (half spans) | 64,16,4,1        |
| 128  | 4^3 x 2       | r4 2-4, r2          | 32,8,2,1         |

The spans for 2048, 512 and 128 are the same in every stage, so those lengths only differ in
where a frame enters. 256 = 4^4 cannot end with a radix-2 stage. It therefore runs the same
stages at half span. In that mode the twiddle exponent is doubled and every commutator delay
is halved. Stages ahead of the entry stage receive no valid data.

### Delay-commutators

Between two stages the data must be regrouped. After stage k, lane q holds points at
distance s; stage k+1 needs points at distance D = s/4 on its four lanes. If each lane's
stream is cut into blocks of D cycles, the regrouping is a **4x4 transpose of blocks**: the
block that arrives on lane q as block a of a group of four leaves on lane a as block q.
`mdc_commutator` implements this with FIFO delays and a rotating switch:

1. Delay lane q by q*D.
2. Connect output lane a to delayed input lane `(c - a) mod 4`. Here c is the number of
   D-cycle blocks since the start of the frame, modulo 4.
3. Delay output lane a by (3 - a)*D.

Every sample is delayed by 3D relative to its group, so `valid` and `sof` (start of frame)
travel through a matching 3D delay line. The largest commutator has D = 128 and stores
6D = 768 words.

The radix-2 stage uses the two-lane version of the same idea with D = 1, applied to lanes
(0,1) and (2,3). After the last radix-4 stage (span 2), lane q holds the points 8g+2q and
8g+2q+1 in two consecutive cycles. The two-lane transpose puts both points on one lane pair
in the same cycle, where they meet in a radix-2 butterfly.

### Counters and the frame grid

Every stage and commutator keeps a counter that is cleared by `sof` and then runs freely.
The counters are consistent only if all frames start on a common grid of N/4 cycles.
Otherwise the tail of one frame, still inside a commutator, would be switched with the next
frame's count. The input buffer therefore starts a frame only when its own free-running
counter (modulo N/4) is zero.

## Buffers

### Conflict-free banking

The input buffer has to accept four writes per cycle, one sample t from each stream s. It
also has to deliver four reads per cycle, the four quarters of one stream's symbol. Both
sets must hit four different single-port-write RAM banks. The mapping

```
bank    = (s + t div (N/4)) mod 4
address = {half, s, t mod (N/4)}
```

achieves this:

- The writes of one cycle share t and differ in s.
- The reads of one cycle share s and differ in the quarter `t div (N/4)`.

The output sorting buffer uses the same mapping with t replaced by the frequency index k.
The four results of one cycle always differ in `k div (N/4)`. The four parallel reads of one
index k differ in s.

Each bank has two halves (ping-pong). One frame of four symbols is written into one half
while the previous frame is read from the other. Each buffer has 4 banks of 2 x 4 x 512
words of 32 bits, which is 8 memory blocks per buffer.

### Output order

The DIF pipeline leaves the results in digit-reversed order. Let `rev4(x, m)` reverse the m
base-4 digits of x. Then the frequency index k of output cycle tt of a stream, lane L, is:

- 256 points: `p = 4*tt + L`, `k = rev4(p, 4)`.
- 2*4^m points: `p = 8*(tt/2) + 2*(tt%2) + 4*(L/2) + L%2`, `k = (L%2)*N/2 + rev4(p/2, m)`.

`output_sort_buffer` writes each result at its k. Once the frame is complete, it reads the
four streams out in natural order in parallel.

## Arithmetic

- **Samples:** 16-bit two's complement real and imaginary parts (`fft_pkg::DW`).
- **Twiddles:** 16 bits with 14 fractional bits. They come from `twiddle_rom` tables that are
  computed at elaboration from cos/sin, so no data files are needed. Stage k has a table of
  4 x span entries. The last stage needs no table.
- **Scaling:** each radix-4 butterfly divides by 4 and the radix-2 butterfly by 2, both
  rounded to nearest. The output is therefore `DFT(x)/N`. With |x| up to 8000 per part, the
  observed error against a double-precision DFT is at most 2 LSB at every length. A result
  that would round past full scale saturates. The twiddle multiplier also saturates, because
  a rotation can raise one part by up to sqrt(2). Keep inputs below about 2^15/sqrt(2).
- **Adders:** every add and subtract in the radix-4 butterflies runs through `hng_rca`. This
  is an 18-bit ripple-carry adder whose full adders are reversible HNG gates (`hng_gate`:
  P=A, Q=B, R=A^B^C, S=(A^B)C^AB^D, a full adder when D=0). Subtraction inverts the operand
  and uses the first full adder's carry-in.
- **Multipliers:** each radix-4 stage multiplies lanes 1-3 by twiddle factors. Stages 0-3
  use `cmult`, a general complex multiplier built from four real products, fed from a
  twiddle table. The last radix-4 stage only needs powers of W_8. It uses
  `const_cmult_w8`, a ROM-less multiplier that applies 1/sqrt(2) (11585/2^14) with shifts
  and adds. Multiplexed swaps and negations select among the eight factors.
- **IFFT:** swapping real and imaginary parts gives `swap(DFT(swap(x))) = N*IDFT(x)`. The
  swap is applied at the input and the output, so with the 1/N scaling the inverse mode
  delivers exactly `IDFT(x)`.

## Interface and timing (`mimo_mdc_fft`)

| port          | dir | width    | meaning                                                           |
|---------------|-----|----------|-------------------------------------------------------------------|
| `clk`, `rst_n`| in  | 1        | clock, asynchronous active-low reset                              |
| `cfg_len`     | in  | 2        | `fft_len_e`: 0 = 2048, 1 = 512, 2 = 256, 3 = 128                  |
| `cfg_inverse` | in  | 1        | 1 = IFFT                                                          |
| `in_valid`    | in  | 1        | `in_data` holds sample t of all four streams                      |
| `in_data`     | in  | 4 x 32   | `cplx_t` {re, im} per stream                                      |
| `out_valid`   | out | 1        | `out_data` holds result `out_index` of all four streams           |
| `out_index`   | out | 11       | frequency (IFFT: time) index, 0..N-1                              |
| `out_data`    | out | 4 x 32   | `cplx_t` per stream                                               |
| `busy`        | out | 1        | a frame is somewhere in the processor                             |

- A frame is N cycles with `in_valid` high. Idle cycles inside a frame are allowed. The next
  frame may follow immediately.
- The results of a frame leave as N consecutive `out_valid` cycles. Back-to-back frames
  leave back to back, one frame per N cycles.
- Change `cfg_len` and `cfg_inverse` only while `busy` is low.
- Measured latency, from the first input sample to the first result: 316-323 cycles at
  128 points, 639 at 256, about 1279 at 512 and 5118-5122 at 2048. About 2N of this is
  buffering: collecting the frame, then waiting for its last stream to leave the pipeline.

## Departures from the source description and open points

- **Memory scheduling:** the source reduces the buffer memory from 16 blocks to 12 with a
  memory schedule it does not specify. This design uses the plain double-buffered scheme,
  8 blocks in each buffer.
- **Dynamic RAM:** the source replaces the buffer RAM with dynamic RAM. `bank_ram` is a
  static array with the same read/write behaviour. A DRAM macro with refresh would be
  process specific.
- **Twiddle multiplication:** the source mentions both a ROM-less shift-and-add constant
  multiplier and a plain two-input multiplier. This design uses the shift-and-add form only
  where the factor set is small (W_8, last radix-4 stage). The other stages use the plain
  multiplier with computed twiddle tables.
- **Own choices:** the radix-2 closing stage, the stage entry points, the 1/N scaling, all
  word lengths, the handshake, the bank mapping and the N/4 frame grid. The source gives
  none of these.
- **Resource count:** the reported FPGA figures (1798 registers, 7850 LUTs, 228 DSP48
  slices, 6 block RAMs) cannot be matched to this RTL. The buffers alone hold
  8 banks x 4096 words x 32 bits, which is 1 Mbit, far more than six block RAMs.
- **Larger stream counts:** a larger number of streams (up to 64 is suggested for passive
  optical networks) would need radix 64 and is not built. `NS = 4` is fixed.

## Files

`rtl/` holds one module or package per file:

| file                    | role                                                            |
|-------------------------|-----------------------------------------------------------------|
| `fft_pkg.sv`            | widths, `cplx_t`, `twid_t`, `fft_len_e`, length helpers, twiddle function |
| `mimo_mdc_fft.sv`       | top level                                                       |
| `input_buffer.sv`       | input banks, frame scheduling on the N/4 grid                   |
| `r4_stage.sv`           | radix-4 butterfly + twiddle multiplication                      |
| `r4_butterfly.sv`       | radix-4 butterfly on HNG adders                                 |
| `mdc_commutator.sv`     | 4x4 block-transpose delay-commutator                            |
| `r2_stage.sv`           | two-lane commutators + radix-2 butterflies                      |
| `output_sort_buffer.sv` | digit-reversal sort, stream de-interleave                       |
| `cmult.sv`              | complex multiplier                                              |
| `const_cmult_w8.sv`     | ROM-less shift-and-add multiplier by W_8^k                      |
| `twiddle_rom.sv`        | twiddle table computed at elaboration                           |
| `delay_line.sv`         | programmable-length FIFO delay                                  |
| `bank_ram.sv`           | simple dual-port RAM bank                                       |
| `hng_rca.sv`, `hng_gate.sv` | ripple-carry adder/subtractor of reversible HNG gates       |

Each module has a self-checking testbench, `tb/tb_<module>.sv`. `tb_r4_stage_last` also
checks the last radix-4 stage, which uses the ROM-less multiplier. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. `tb_mimo_mdc_fft` runs the top at
its default parameters through every length, forward and inverse, with back-to-back frames
and with input gaps. It compares every output with a floating-point DFT and checks the full
output rate.

Simulate with Verilator 5, for example:

```
verilator --binary --timing -Irtl --top-module tb_mimo_mdc_fft \
    rtl/fft_pkg.sv rtl/*.sv tb/tb_mimo_mdc_fft.sv -o sim && ./obj_dir/sim
```

Substitute any other testbench for `tb_mimo_mdc_fft`. The full top-level test runs in about
a second.
