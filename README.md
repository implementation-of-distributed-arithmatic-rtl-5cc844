# Distributed-arithmetic FIR filter with run-time reconfigurable coefficients

This is an N-tap FIR filter, `y(n) = sum_k c[k] * x(n-k)`, built without
multipliers. It uses distributed arithmetic (DA). Every product
`c[k] * x(n-k)` is split over the bits of the input samples. All possible
sums of small groups of coefficients are stored in look-up tables (LUTs), and
the filter only reads those tables and does shifted additions. The LUTs are
RAM, so rewriting them changes the filter coefficients while the filter runs.

Default configuration: 16 taps, 8-bit two's complement samples, 8-bit
coefficients. Tables are indexed by groups of M = 2 taps. Each input word is
processed in sections of R = 4 bits, so one sample goes in and one output
comes out every 4 clock cycles.

## The arithmetic

Write each L-bit sample in two's complement as bits `x_b(n-k)`, with bit
`L-1` weighted `-2^(L-1)`. Then

    y = sum_b w_b * S_b,      S_b = sum_k c[k] * x_b(n-k)

where `w_b = 2^b`, or `-2^(L-1)` for the sign bit. `S_b` depends only on one
bit of each sample, called a bit-slice. The N taps are cut into `P = N/M`
groups of M consecutive taps. Then `S_b` is the sum of P table look-ups:

    S_b = sum_p LUT_p[ x_b(n-pM) , x_b(n-pM-1) , ... , x_b(n-pM-M+1) ]
    LUT_p[a] = sum_{j=0}^{M-1} a[j] * c[pM+j]

Each table has `2^M` words. Taking the bits one at a time would cost L cycles
per sample. Instead the L bit positions are split into `Q = L/R` sections of R
bits, and the sections run in parallel. Section q handles bits `qR .. qR+R-1`
over R cycles, most significant bit first:

    A_q = sum_{r=0}^{R-1} 2^(R-1-r) * S_{qR+R-1-r}      (sign slice negated in section Q-1)
    y   = sum_q 2^(qR) * A_q

So the design trades clock cycles per sample (R) against parallel hardware
(Q sections).

## Datapath

```
 x_in ──► sipo_reg ──slice[q]──► drppg[q] ──► pat[q] ──► shift_accumulator[q] ──┐
           (N taps)       │          ▲                                           ├─► psat ──► y_out
                          │     dram_lut (dual port, one per tap group,          │
                          └──── shared by sections 2b and 2b+1)                  │
 lut_we/... ───────────────────► (write port)                        other sections ┘
```

- **`sipo_reg`**, the input register. It is an N-word delay line holding
  `x(n) .. x(n-N+1)`. A new sample shifts in when one is accepted. For the
  current step `r_idx` it also outputs one N-bit slice per section: bit
  `qR + R-1-r_idx` of every tap.
- **`dram_lut`**, a 2^M-word RAM for one tap group. It has one synchronous
  write port and two asynchronous read ports. One table therefore serves two
  sections in the same cycle, so Q sections need only `ceil(Q/2)` copies of
  the table set. With the defaults (Q = 2) there is one copy: 8 tables of 4
  words.
- **`drppg`**, the DRAM-based partial product generator. It cuts a section's
  slice into P addresses of M bits, reads the P shared tables and registers
  the P words.
- **`pat`**, a pipelined adder tree. It sums the P words, with one register
  per tree level (log2 P cycles).
- **`shift_accumulator`** keeps one accumulator per section:
  `acc = (first ? 0 : 2*acc) ± S`. The `-` applies only to the first
  (sign-bit) slice of the top section. The section result is captured after
  the R-th slice.
- **`psat`**, the pipelined shift-adder tree. It weights section q by
  `2^(qR)`; the shifts are plain wiring. It then sums the sections with the
  same pipelined tree as `pat`.
- **`da_fir_ctrl`** frames the samples. It counts the R slice cycles of each
  sample and produces the slice tag (`valid`, `first`, `last`). The tag
  travels down the pipeline next to the data, so every stage knows where a
  sample starts and ends. Nothing else in the pipeline needs a counter.

All widths grow so that nothing can overflow:

| Signal | Width (defaults) |
|---|---|
| LUT word | `W + log2 M` (9) |
| PAT sum | `+ log2 P` (12) |
| Section result | `+ R` (16) |
| `y_out` | `W + L + log2 N` (20) |

`y_out` is exact for any coefficient set that fits in W bits.

## Interface and timing (`da_fir_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `x_valid`, `x_ready`, `x_in` | in/out/in | 1/1/L | sample handshake; transfer when both are high |
| `lut_we`, `lut_wgroup`, `lut_waddr`, `lut_wdata` | in | 1/log2 P/M/DW | write one table word |
| `y_valid`, `y_out` | out | 1/YW | one output per accepted sample |

- **Rate.** `x_ready` is high when the filter is idle and in the last slice
  cycle of the current sample. Samples offered back to back are therefore
  taken every R cycles. That is an input rate of `f_clk / R`, or 62.5
  Msample/s at a 250 MHz clock.
- **Latency.** If a sample is accepted in cycle t, its output has `y_valid`
  in cycle `t + R + 2 + log2 P + log2 Q`. That is 10 cycles with the defaults.
  One output arrives per accepted sample, in order.
- **Reset.** Reset clears the input history to zero and empties the pipeline.
  It does not clear the tables (FPGA distributed RAM has no reset), so program
  every table word before you feed samples.

## Changing coefficients at run time

The coefficients exist only as table contents. To load a coefficient set,
write every word of every group:

    for p in 0..P-1, a in 0..2^M-1:
        lut_wgroup = p; lut_waddr = a
        lut_wdata  = sum_{j: a[j]=1} c[p*M + j]   (sign-extended to W + log2 M bits)

That is `P * 2^M` writes, 32 with the defaults. A write goes to every copy of
the group's table.

A written word is visible from the next cycle. Tables are read only during a
sample's R slice cycles. If you write while no sample is in those cycles, the
change is clean: you are safe when `x_ready` is high and you are not offering
a sample. A write made during a sample's slice cycles gives that one output a
mix of old and new coefficients.

The input history is kept across a change. The first outputs after the change
are therefore the new filter applied to the old samples, exactly as a direct
form filter whose coefficients were swapped.

## Departures and choices

The architecture follows the published DA reconfigurable FIR structure:

- SIPO register
- DRAM-based partial product generators that share dual-port tables in pairs
- pipelined adder trees
- shift accumulators
- pipelined shift-adder tree
- R = 4 and M = 2

The following are this design's own choices:

- **Sizes.** N = 16 taps, L = 8-bit samples and W = 8-bit coefficients. The
  description fixes only R and M. With L = 8 there are exactly two sections,
  which share one set of dual-port tables.
- **Slice order.** Slices run most significant bit first with left-shift
  accumulation, so the arithmetic is exact integer arithmetic. Samples and
  coefficients are signed two's complement.
- **Table loading.** Tables are loaded word by word with precomputed sums.
  No hardware turns coefficients into table words.
- **Handshake.** The input uses a valid/ready handshake.
- **Pipelining.** One register follows the table read, and one follows each
  adder-tree level.
- **Refresh.** The tables need no refresh, because they are static
  distributed RAM.

Not modelled: the timing, power and area figures of an FPGA build. The RTL
has not been put through FPGA timing analysis.

## Verification

Each module has a self-checking testbench in `tb/`:

- `tb_sipo_reg`: taps and all slices against a copy of the delay line.
- `tb_dram_lut`: both read ports, and read-before/after-write behaviour.
- `tb_drppg`: address split and registered partial products, with the
  testbench playing the tables.
- `tb_pat`: 8-, 5- and 1-input trees against reference sums and latency.
- `tb_shift_accumulator`: signed and unsigned sections, extremes, idle gaps.
- `tb_psat`: Q = 2 and Q = 3 trees.
- `tb_da_fir_top`: the whole filter at default size against a direct
  convolution.

The top-level test checks:

- every output value and its exact latency;
- the one-sample-per-R-cycles rate while samples are offered back to back;
- back-pressure and idle gaps;
- four run-time coefficient changes;
- negative samples;
- the largest possible output, from all coefficients and samples at -128.

Two variants run the same checks at other sample widths:

- `tb_da_fir_top_l16`: L = 16, so four sections share two table copies.
- `tb_da_fir_top_l12`: L = 12, so three sections; the last one has a table
  copy of its own.

Every testbench ends with a line `TB_RESULT checks=N failures=F`. To run one
with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_da_fir_top \
        -y rtl -y tb +libext+.sv rtl/da_fir_pkg.sv tb/tb_da_fir_top.sv
    ./obj_dir/Vtb_da_fir_top

To change the size, override the top's parameters `N`, `L`, `W`, `M` and `R`.
`N` must be a multiple of `M`, and `L` a multiple of `R`. Everything else is
derived from them.
