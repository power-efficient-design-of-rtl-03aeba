# A 128-tap FIR filter in the residue number system, serial/parallel and clock-gated

This is a programmable 128-tap FIR filter

    y(n) = sum_{k=0}^{127} a_k x(n-k)

with 18-bit two's complement samples and coefficients and a 36-bit result,
built for a clock eight times the sample rate (160 MHz for 20 MHz samples). It
computes in a **residue number system (RNS)**. Each number is replaced by its
residues modulo ten small co-prime moduli:

    {3, 5, 7, 11, 13, 17, 19, 23, 31, 32}

Their product is M = 110,654,063,520, which is more than 2^36.

Addition and multiplication act on each residue on its own. So the one wide
filter becomes ten narrow filters, each 2 to 5 bits wide, with no carries
between them. Multiplication is cheap too: for a prime modulus it becomes an
addition of table indices.

The filter is **serial/parallel**. The 128-tap sum is split into 16 groups of
8 taps:

    y(n) = sum_{i=0}^{15} sum_{j=0}^{7} a_{8i+j} x(n-8i-j)

Each group is one TAP unit. A TAP holds 8 coefficients and 8 samples and forms
its 8 products one per clock in a single multiply-accumulate unit. Each
modulus therefore needs 16 multipliers, not 128.

The cost of RNS is storage. A residue word takes 2+3+3+4+4+5+5+5+5+5 = 41 bits,
where the plain binary number takes 18. So every TAP's two register files hold
2 x 8 x 41 = 656 bits instead of 288. The design saves their power with
**clock gating**:

- The coefficient files are clocked only when a coefficient is written.
- The sample files are clocked once per sample, which is every 8 cycles.

The filter follows the architecture published by Petricca, Albicocco,
Cardarilli, Nannarelli and Re ("Power Efficient Design of Parallel/Serial FIR
Filters in RNS", Asilomar 2012). The interfaces, the pipeline, the converters
and several encodings are this implementation's own choices. They are marked
as such below.

## Structure

```
                 coef_data ──► bin_to_rns ──┐ (10 residues)
                                             ▼
 x_in ──► bin_to_rns ──► ┌─────────────── rns_fir_channel, m = 3 ─────────────┐
   (10 residues)         │  TAP_0 ─► TAP_1 ─► ... ─► TAP_15   (sample chain)   │
                         │    │        │               │                     │
                         │    └──── modular adder tree (15 mod_add) ─► y_res  │
                         └──────────────────────────────────────────────────────┘
                           ... one channel per modulus, 10 in all ...
                                             │ (10 residues of y)
                                             ▼
                                        rns_to_bin ──► y_out (36 bit)
 in_valid/in_ready ──► fir_ctrl ──► smp_load, mac_en, j, first, last, tree_en, conv_en, out_valid
```

| file | role |
|---|---|
| `rns_pkg.sv` | the base, the `rns_t` bundle (ten 5-bit residue fields), the multiplier choice enum, and elaboration-time functions (primitive root, discrete log, inverse, factorisation) |
| `rns_fir_top.sv` | the whole filter |
| `fir_ctrl.sv` | sample handshake and the 8-cycle frame sequence, shared by all channels |
| `rns_fir_channel.sv` | the filter of one modulus: 16 TAPs and an adder tree |
| `rns_tap.sv` | one TAP: two clock-gated 8-entry register files, a multiplier and an accumulator |
| `clock_gate.sv` | latch-based clock gate |
| `rns_mod_mult.sv` | picks the multiplier for a modulus |
| `iso_mult_basic.sv`, `iso_mult_mod.sv`, `iso_mult_sub.sv` | three isomorphic multipliers |
| `mod_add.sv` | modular adder |
| `bin_to_rns.sv` | input converter (two's complement to residues) |
| `rns_to_bin.sv` | output converter (residues to two's complement, by the Chinese remainder theorem) |

## The TAP and its frame

A TAP of modulus m stores its residues in ceil(log2 m) bits:

- The **coefficient file** holds c[j] = a_{8i+j}.
- The **sample file** is a shift register holding s[j] = x(n-8i-j).

On a sample load, s[0] takes the incoming sample and every entry moves up by
one. For TAP_0 the incoming sample is the new x(n). For the other TAPs it is
the oldest sample of the previous TAP, which leaves that TAP on `smp_out`. The
16 sample files together are therefore the 128-sample delay line.

Neither file moves between loads, so the MAC unit reads entry j through a
multiplexer. One frame of one sample runs as follows:

```
cycle      L        L+1   L+2  ...  L+8          L+9       L+10      L+11
           load     j=0   j=1       j=7 (+next   tree_en   conv_en   out_valid
           x(n)     first           load)        (adder    (output   y_out = y(n)
                                    psum <= sum   tree)    converter)
```

- In cycle L+1 (`first`) the accumulator takes the first product. Each later
  cycle adds its product modulo m.
- In the last MAC cycle the sum also goes into `psum`. It stays there while
  the next frame runs.
- The next sample may be loaded in that same last cycle. The file is read
  before the edge that shifts it. So samples offered back to back are taken
  exactly every 8 cycles, which is the 20 MHz rate at 160 MHz.
- After a frame, the 16 `psum`s of each channel go through a tree of modular
  adders into `y_res`. The output converter then rebuilds y(n).
- The latency from the load cycle to `out_valid` is 11 cycles.

If no sample is waiting, the sequencer goes idle. In that state no register
file receives a clock edge.

## Clock gating

Each TAP has two `clock_gate` cells, one for each register file. The gate is
the standard integrated clock gate. A latch, transparent while `clk` is low,
holds the enable. Its output is ANDed with `clk`, so an enable that changes
while `clk` is high cannot glitch the gated clock. The enables are:

- Sample file: `smp_load`.
- Coefficient file: a write to one of that TAP's 8 addresses.

During reset both gates are open, so reset can clear the files. In a
technology flow, replace `clock_gate` with the library's gating cell.

The latch is the only one in the design, and it is intentional.

A simulation note: drive the filter's inputs away from the rising clock edge,
for example one time unit after it, as all the testbenches here do. If the
stimulus changes the enables at the same instant as the edge, cycle-based
simulators can order the gated clocks differently from hardware.

## Modular multiplication by isomorphism

Take a prime m with primitive root r. Every non-zero residue is r^k for exactly
one index k in 0..m-2. Then

    <a*b>_m = r^<ka+kb>_(m-1)

So a product needs two table look-ups (residue to index), one index addition
and one table look-up back. The code uses the smallest primitive root of each
modulus, for example 2 for m = 11. All tables are computed at elaboration by
the functions in `rns_pkg`, so no data files are needed. Zero has no index,
so a zero detector on either operand forces the product to 0. Three
architectures are provided:

- **`iso_mult_basic`** (`ISO_BASIC`). Two DIT tables (residue to index), a
  modulo-(m-1) adder and one IIT table (index to residue).
- **`iso_mult_mod`** (`ISO_MOD`, the default).
  - The second table (DIT*) stores kb - (m-1) in two's complement. A plain
    binary adder then forms s = ka + kb - (m-1), which lies in
    -(m-1)..m-3.
  - The inverse table is doubled and addressed by s. Its negative half (IIT)
    returns r^(s+m-1) and its non-negative half (IIT*) returns r^s.
  - So the modulo correction costs table entries instead of adder delay.
- **`iso_mult_sub`** (`ISO_SUB`).
  - m-1 is split into co-prime prime-power factors q_i: 10 = 2x5, 30 = 2x3x5,
    22 = 2x11, and 16 stays 16.
  - The DISIT tables map each operand straight to its index residues
    <k>_q_i. Small modular adders then work per factor, in parallel.
  - One IISIT table, addressed by the concatenated sums with factor 0 in the
    low bits, returns r^k.

The modulus 32 is not prime, so it has no primitive root. `rns_mod_mult` uses
the low 5 bits of a binary product for it. The top's parameter `MULT_ARCH` has
one entry per modulus, in the order of the base, so each prime modulus can use
a different architecture. The published architecture chooses per modulus, by
delay and power constraints, and does not state its choice. The default here
is `ISO_MOD` for all of them.

## Converters

**Input (`bin_to_rns`).** For each modulus, every input bit selects the
residue of its weight. The sign bit uses the residue of -2^17. The selected
residues are added in binary, and the small sum is reduced modulo m. Negative
values come out as (m - (|v| mod m)) mod m. The top has two converters: one for
samples and one for coefficients, which are written in two's complement.

**Output (`rns_to_bin`).** This uses the Chinese remainder theorem:

    X = < sum_i M_i <y_i inv_i>_m_i >_M,   M_i = M/m_i,   inv_i = M_i^-1 mod m_i

- One 32-entry table per modulus gives the 37-bit term.
- A tree of nine modulo-M adders sums the ten terms.
- X is read as a signed number, negative above (M-1)/2, and truncated to 36
  bits.

Results inside the 36-bit range are exact. Results outside it wrap: you get
the true sum, read modulo M as a signed number, then cut to 36 bits. There is
no overflow flag. With full-scale 18-bit data a 128-tap sum can reach 2^41,
so keeping the filter gain within the 36-bit range is the user's job.

## Interface of `rns_fir_top`

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | filter clock (8x sample rate) |
| `rst_n` | in | 1 | synchronous, active low; clears coefficients, delay line and pipeline |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, 7, 18 | write a_k. One per cycle. Meant for initialisation or a mask change between samples |
| `x_in`, `in_valid`, `in_ready` | in/in/out | 18, 1, 1 | a sample is taken in a cycle with `in_valid && in_ready` |
| `y_out`, `out_valid` | out | 36, 1 | `y_out` holds a new y(n) in the cycle `out_valid` is high, 11 cycles after the sample was taken |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `N_TAPS` | 128 | number of filter taps |
| `N_SEG` | 16 | number of TAPs; the serial depth is N_TAPS/N_SEG = 8 |
| `XW` | 18 | sample width |
| `AW` | 18 | coefficient width |
| `YW` | 36 | output width |
| `MULT_ARCH` | `'{default: ISO_MOD}` | multiplier architecture of each modulus (`rns_pkg::arch_list_t`) |

The base itself is fixed in `rns_pkg`. The converters' internal widths follow
from it.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench ends by
printing `TB_RESULT checks=N failures=F`.

- **Multipliers and adder.** `tb_iso_mult_*`, `tb_rns_mod_mult` and
  `tb_mod_add` cover every operand pair of every modulus exhaustively, with
  every architecture. The adder is also tested at the 37-bit modulus. The
  index table of modulus 11 is checked against the classic isomorphism table
  for root 2.
- **Converters.** `tb_bin_to_rns` and `tb_rns_to_bin` use random values and
  corner values against arithmetic done in the testbench.
- **Clock gate.** `tb_clock_gate` checks that enable changes while the clock
  is high never reach the gated clock.
- **Sequencer.** `tb_fir_ctrl` checks the frame sequence, the 8-cycle rate for
  back-to-back samples and the 11-cycle latency.
- **TAP.** `tb_rns_tap` checks partial sums and the sample chain output. It
  also counts the edges of both gated clocks: one per load and one per write.
- **Channel.** `tb_rns_fir_channel` checks one modulus of the filter against a
  128-tap model, with back-to-back and gapped frames.
- **Whole filter.** `tb_rns_fir_top` runs at the default size against an
  exact 64-bit reference. It runs 680 samples through three coefficient sets:
  small values, full-range values whose sums leave the 36-bit range, and
  sparse values. Between sets the mask is changed. It checks every output
  value, the rate and the latency. It also checks that the sample file of a
  TAP is clocked exactly once per sample and its coefficient file exactly once
  per write. It counts back-to-back samples, idle gaps, mask changes, negative
  and wrapped outputs and zero operands, and fails if any of these never
  happened.
- **Mixed multipliers.** `tb_rns_fir_top_arch` repeats the whole-filter test
  with the basic, modified and factor-split multipliers spread over the
  moduli.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl \
        rtl/rns_pkg.sv tb/tb_rns_fir_top.sv --top tb_rns_fir_top
    ./obj_dir/Vtb_rns_fir_top

The other testbenches run the same way. Modules are found in `rtl/` through
`-Irtl`. The full-size filter test takes well under a minute.

## What is not here

- **Power and timing.** No timing or power analysis was done, so the 160 MHz
  clock is not verified.
- **Voltage scaling.** Lowering the supply to use the RNS filter's timing
  slack is not an RTL matter.
- **Compared architectures.** The binary (two's complement) filters and the
  fully parallel 128-multiplier transposed-form filter are not included. They
  are only comparisons for this design.
