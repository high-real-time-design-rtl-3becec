# Single-butterfly radix-4 FFT and pulse compression in single-precision floating point

A pulse-compression radar receiver correlates each received echo with the
transmitted waveform. This happens in the frequency domain:

    y(n) = IFFT{ FFT{s(n)} x H(k) },   H(k) = conj(FFT of the transmitted pulse), usually weighted

Most of the work is in the two 4096-point transforms. This design does both
with **one** radix-4 butterfly built from single-precision floating-point
adders and multipliers. The data sit in **four dual-port memories**. A
4096-point transform takes 6221 clock cycles. An in-place design with one
memory and one butterfly needs about four times as long, because it reads the
four operands of every butterfly from the same memory and the butterfly then
waits three cycles out of four.

The RAM used for the speed-up is what an in-place processor has anyway: four
1024-word memories instead of one 4096-word memory.

## The idea: four independent 1024-point FFTs that share one butterfly

Write the 4096 input indices as `n = 4*n1 + n0` (n0 = 0..3, n1 = 0..1023) and
the output indices as `k = 1024*k1 + k0`. The DFT then splits into:

1. **Four independent 1024-point FFTs.** Set n0 holds the samples
   `x(4*n1 + n0)`. Its transform is `X1(k0, n0)`.
2. **A twiddle multiplication.** Each value is multiplied by `W_4096^(n0*k0)`.
3. **1024 four-point DFTs across the sets.** For each k0, combine the four
   sets: `X(1024*k1 + k0) = sum over n0 of X1(k0,n0) W_4096^(n0*k0) W_4^(n0*k1)`.

Steps 2 and 3 together are exactly one radix-4 decimation-in-time butterfly,
with twiddles `1, W^k0, W^2k0, W^3k0`. The same butterfly therefore serves
every stage.

Sample n is written to memory `n mod 4`, so each set lives in its own memory.
Inside a memory it goes to address `digit_rev4(n / 4)`, the base-4 digit
reversal, so that the in-place decimation-in-time stages produce their outputs
in natural order.

## Pipeline stages: one memory per set, staggered by one cycle

The four 1024-point FFTs each take five radix-4 stages of 256 butterflies. A
butterfly needs four operands from the *same* memory, and that memory gives
one word per cycle. The four operands of one set therefore take four cycles
to read.

The four sets use the *same* addresses and the *same* twiddle factors. The
control unit (`mem_ctrl`) reads RAM0 at one address per cycle. RAM1, RAM2 and
RAM3 follow the same address sequence one, two and three cycles later:

    cycle        0    1    2    3    4    5    6    7 ...
    RAM0 reads   b0q0 b0q1 b0q2 b0q3 b1q0 b1q1 ...
    RAM1 reads        b0q0 b0q1 b0q2 b0q3 b1q0 ...
    RAM2 reads             b0q0 b0q1 b0q2 b0q3 ...
    RAM3 reads                  b0q0 b0q1 b0q2 b0q3 ...
    butterfly in                     set0 set1 set2 set3 set0 ...   (one per cycle)

`cache_unit1` keeps a four-word buffer for each memory. When a memory's
fourth operand arrives, the buffer hands all four operands to the butterfly.
Because of the stagger, sets 0, 1, 2 and 3 complete on consecutive cycles.
The butterfly is busy every cycle, where it would otherwise idle three cycles
in four.

The twiddle factors are read once per butterfly index and held for the four
sets. `cache_unit2` works the other way round: it takes a result (four
parallel words) of set r and writes it back into RAM r, one word per cycle, at
the addresses the operands came from. One stage takes 1024 + 3 issue cycles.

Each stage must finish writing before the next one reads, because the
algorithm works in place. So the control unit lets the pipeline drain (11
cycles) before it starts the next stage.

## Parallel last stage

After five stages, memory n0 address k0 holds `X1(k0, n0)`. The last stage
reads all four memories at the same address k0 in one cycle. The twiddle
table supplies `W^k0, W^2k0, W^3k0`, and the butterfly combines the four
words. Output k1 is written to memory k1 at address k0, also in one cycle.
This takes 1024 cycles plus the drain.

Afterwards `X(k)` sits in memory `k / 1024`, address `k mod 1024`. The unloader
reads it out in natural order.

## FFT or IFFT from the same hardware

`IFFT(X) = swap(FFT(swap(X))) / N`, where `swap` exchanges the real and
imaginary parts. A mode bit (`in_fft_mode`: 1 = FFT, 0 = IFFT) therefore
decides two things:

- whether the loader swaps each sample on its way in;
- whether the unloader swaps each result back and divides it by 4096.

The division lowers each exponent by 12. A part whose exponent would not stay
positive becomes zero, which matches the flush-to-zero arithmetic. The engine
itself is the same in both modes.

## Pulse compression (`dpc_top`)

The top module processes one pulse at a time:

| phase | what happens | cycles at N = 4096 |
|---|---|---|
| 0 load | 4096 samples stream in, one per cycle (`in_valid`/`in_ready`) | 4096 |
| 1 FFT | the engine transforms bank 0 | 6221 (+7 hand-over) |
| 2 multiply | spectrum streams out of bank 0, through `mf_mult` (`X(k)*H(k)`), into bank 1 as an IFFT frame | 4096 + 2 |
| 3 IFFT | the engine transforms bank 1 | 6221 (+7) |
| 4 output | y(n) streams out (`out_valid`, `out_last`) | 4096 |

The multiply pass needs a **second memory bank**. The spectrum is stored as
(memory k1, address k0), but the IFFT must read its input as (memory n mod 4,
digit-reversed address). These two layouts are permutations of each other, and
rewriting one into the other in a single streaming pass would overwrite words
that have not yet been read. `fft_processor` therefore has two banks of four
1024 x 64-bit memories and uses them in turn. The spectrum leaves one bank
while the products go into the other, with no extra pass.

The engine is shared between the two banks. In a stand-alone FFT processor,
the two banks also let the next frame load while the current one is
transformed or read out.

The matched-filter coefficients `H(k)` are 4096 complex words. They are held
in a memory inside `mf_mult`, which the host loads through
`coef_we/coef_addr/coef_data` before the first pulse. Their values depend on
the transmitted waveform. A typical choice is the conjugate spectrum of the
chirp times a Hamming window, which is what the testbench uses.

## Number format and arithmetic

Every sample, twiddle factor and coefficient is a complex pair of IEEE-754
single-precision numbers (`dpc_pkg::cpx_t`, 64 bits).

`fp_add` and `fp_mul` are combinational:

- They round to nearest, ties to even.
- Subnormal inputs count as zero, and subnormal results are flushed to zero.
- Overflow gives infinity.
- NaN is not propagated faithfully.

These units are the critical path. Registers surround them in `fp_cmul` (two
stages) and `radix4_bfly` (four stages). For a high clock rate on an FPGA,
replace them with pipelined vendor operators and lengthen the valid/tag delay
lines to match.

The twiddle table stores a quarter-wave cosine, 1025 words. They are computed
at elaboration by a constant function using `$cos`. The table is folded by
quadrant to give `cos - j sin` for any exponent.

## Timing summary (N = 4096)

- **One transform:** `5 x (1024 + 3 + 11) + (1024 + 7) = 6221` cycles. The
  published design this follows reports 6292 cycles for its FFT. The
  difference comes from pipeline depths, which are not published.
- **Multiply pass:** the last product is written about 4100 cycles after the
  spectrum starts to leave, against a published 4110.
- **Load to output:** one pulse from end of input to start of output takes
  about 16 550 cycles (published: 16 694). At 100 MHz that is about 166 us.

## Interfaces

`dpc_top #(LOG4L = 5)` (N = 4^(LOG4L+1)):

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `coef_we`, `coef_addr[LOGN-1:0]`, `coef_data` | in | load H(k) |
| `in_valid`, `in_ready`, `in_data` | in/out/in | received samples s(n), accepted when both are high |
| `out_valid`, `out_data`, `out_last` | out | compressed pulse y(n), natural order, no back-pressure |
| `phase[2:0]` | out | 0 load, 1 FFT, 2 multiply, 3 IFFT, 4 output |
| `fft_busy`, `fft_done` | out | engine running / transform finished |

`fft_processor` can be used on its own as an FFT/IFFT processor. It has the
same input and output handshakes, plus `in_fft_mode` and `out_fft_mode`, and
`out_en`, which gates the start of a read-out.

## Module map

| module | role |
|---|---|
| `dpc_pkg` | `cpx_t`, digit reversal, operand address and twiddle exponent formulas |
| `fp_add`, `fp_mul`, `fp_cmul` | floating-point arithmetic |
| `radix4_bfly` | radix-4 DIT butterfly, 3 complex multipliers + 16 adders, 1 per cycle |
| `twiddle_rom` | three-port twiddle table |
| `dp_ram` | simple dual-port RAM (data memories and coefficient store) |
| `mem_ctrl` | stage sequencing, staggered pipeline addressing, parallel addressing |
| `cache_unit1`, `cache_unit2` | serial-to-parallel and parallel-to-serial buffers around the butterfly |
| `fft_engine` | mem_ctrl + twiddle_rom + cache units + butterfly over four external memories |
| `fft_loader`, `fft_unloader` | input counter / distribution / swap, output order / swap / scale |
| `fft_processor` | two banks + engine + loader + unloader |
| `mf_mult` | coefficient store + complex multiplier |
| `dpc_top` | pulse-compression sequence |

## Where this design makes its own choices

The published description gives the index mapping, the memory organisation,
the staggered access order, the parallel last stage, the FFT/IFFT swap and
the exponent-subtraction division. It does not give the following, so this
design chooses:

- the address and twiddle formulas (standard radix-4 in-place DIT);
- the pipeline depths and the drain between stages;
- the three-port twiddle table. The published timing figures show one twiddle
  per cycle, but the parallel stage needs three;
- rounding and special-value handling in the arithmetic;
- handshakes and reset behaviour;
- the two-bank arrangement for the multiply pass;
- a writable memory for H(k) where the original uses a ROM.

One point differs from the published description rather than filling a gap.
The original stores the finished FFT in its memories in reversed order. Here
the loader applies the digit reversal on the way in (`digit_rev4(n / 4)`), so
the finished spectrum sits in natural order (memory `k / 1024`, address
`k mod 1024`). The multiply pass and the unloader then need no address
reversal. The number of cycles is the same either way.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`. The tests cover:

- **Arithmetic units:** checked against double-precision references, within
  one unit in the last place for `fp_add`/`fp_mul`.
- **Control and buffer units:** checked cycle by cycle against independently
  written address formulas.
- **Engine and processor:** checked against a double-precision DFT (error
  below 2e-5 of the largest bin). The engine's cycle count is checked exactly.
  `tb_fft_processor_full` runs the processor test at N = 4096: one FFT frame
  and one IFFT frame back to back, 6221 engine cycles each.
- **Top level (`tb_dpc_top`, N = 64; `tb_dpc_full`, N = 4096):** runs two
  echoes of a linear-FM chirp through the whole chain. It checks every output
  sample against a double-precision `IDFT(DFT(s)*H)`, checks that the
  correlation peak lands on the echo delay, and checks the transform and
  multiply cycle counts. It counts FFT frames, IFFT frames, pipeline and
  parallel stages, bank swaps, input back-pressure and every phase, and fails
  if any of them never occurs.

To run a testbench with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/dpc_pkg.sv tb/tb_util_pkg.sv tb/tb_dpc_full.sv --top-module tb_dpc_full
    ./obj_dir/Vtb_dpc_full

The full-size run takes a few seconds; most of that time goes into the
reference DFTs in the testbench.

To change the size, set `LOG4L` (N = 4^(LOG4L+1)). It must be at least 1 and
at most 7.

The testbenches also pass when every register starts from a random value
before reset (Verilator `+verilator+rand+reset+2`, 25 seeds).

Not verified: timing closure and resource use on an FPGA, and behaviour with
NaN, infinity or subnormal data.
