# APC-OMS lookup-table multiplier and a transposed FIR filter built from it

A memory-based multiplier replaces the multiplication of a fixed coefficient
`A` by a variable input `X` with a table lookup: `A*X` is precomputed for
every possible `X` and read out. For a 5-bit `X` a plain table needs 32
words. This design needs **nine**, by combining two folding tricks:

* **Antisymmetric product coding (APC).** The products of `X` and `32 - X`
  add up to `32A`, so both are `16A` plus or minus the same value. With the
  low four bits of `X` mapped to a 4-bit address `X'`, every product is

      A*X = 16A + X'*A   when x4 = 1,   X' = X[3:0]
      A*X = 16A - X'*A   when x4 = 0,   X' = (16 - X[3:0]) mod 16

  which halves the table to 16 entries (`X'*A` for `X'` = 0..15).
* **Odd-multiple storage (OMS).** Every non-zero `X'` is `2^s * (2i+1)`, so
  `X'*A` is one of the eight odd multiples `(2i+1)A` shifted left by `s`
  (0..3). Only the odd multiples are stored; a small barrel shifter
  restores the rest.

The table therefore holds `A, 3A, 5A, ..., 15A` (words 0..7) and one extra
word `2A` (word 8) for the input `X = 00000`. Each word is `W+4` bits wide.

The multiplier is then used as the coefficient multiplier of every tap of a
transposed-form FIR filter, and inputs wider than 5 bits are handled by
splitting them into 5-bit digits.

## How one multiplication flows through the multiplier

`apc_oms_mult` is combinational from `x` to `p`:

```
x ─┬─> xin_gen ──> X' ──┐
   │                    v
   ├─> oms_control ─s─> addr_gen ──d──> decoder_4to9 ──w──> lut_mem
   │        │   │                                             │ word
   │        │   └─ RESET ─────────────────────────────────────┤ (cleared)
   │        └─ s ──────────────────────────────> barrel_shifter (<< s)
   │                                                          │ X'·A
   └─ x4 ───────────────> add_sub: p = 16A ± X'·A, 0 if clr <─┘
```

1. **`xin_gen`** forms `X'`: the low bits pass unchanged when `x4 = 1` and
   are two's-complemented when `x4 = 0`. It is the classic gate chain: bit
   `k` is flipped when `x4 = 0` and any lower bit is set.
2. **`oms_control`** counts the trailing zeros of `X[3:0]` to get the shift
   `s = s1s0`. A two's complement does not change the number of trailing
   zeros, so the raw input bits can be used:
   `s1 = ~x0 & ~x1`, `s0 = ~x0 & (x1 | ~x2)`. It also raises **RESET** for
   `X = 10000`.
3. **`addr_gen`** shifts `X'` right by `s` to its odd part `y = 2i+1` and
   outputs the table address `d = {~y0, y3, y2, y1}`: `d = 0iii` for a
   non-zero `X'` and `d = 1000` for `X' = 0000`.
4. **`decoder_4to9`** turns `d` into one-hot word selects `w0..w8`.
5. **`lut_mem`** outputs the selected word, or 0 while RESET is high.
6. **`barrel_shifter`** shifts the word left by `s` in two 2:1 multiplexer
   stages (by 2 when `s1`, then by 1 when `s0`), giving `X'*A`.
7. **`add_sub`** adds that to `16A` when `x4 = 1` and subtracts it when
   `x4 = 0`. It is a ripple-carry adder-subtractor: the operand is XORed with
   the subtract control, which is also the carry-in. `clr` forces `p = 0`.

### Address, shift and word for every `X'`

| X'   | s | d    | word × 2^s |   | X'   | s | d    | word × 2^s |
|------|---|------|------------|---|------|---|------|------------|
| 0000 | 3 | 1000 | 2A×8 = 16A |   | 1000 | 3 | 0000 | A×8 = 8A   |
| 0001 | 0 | 0000 | A          |   | 1001 | 0 | 0100 | 9A         |
| 0010 | 1 | 0000 | A×2        |   | 1010 | 1 | 0010 | 5A×2       |
| 0011 | 0 | 0001 | 3A         |   | 1011 | 0 | 0101 | 11A        |
| 0100 | 2 | 0000 | A×4        |   | 1100 | 2 | 0001 | 3A×4       |
| 0101 | 0 | 0010 | 5A         |   | 1101 | 0 | 0110 | 13A        |
| 0110 | 1 | 0001 | 3A×2       |   | 1110 | 1 | 0011 | 7A×2       |
| 0111 | 0 | 0011 | 7A         |   | 1111 | 0 | 0111 | 15A        |

Two examples: `X = 00110` (6) has `x4 = 0`, so `X' = 16 - 6 = 1010`, which
reads `5A` and shifts it once: `p = 16A - 10A = 6A`. `X = 11100` (28) has
`X' = 1100`, reads `3A` shifted twice: `p = 16A + 12A = 28A`.

### The two inputs that fold onto `X' = 0000`

Both `X = 00000` and `X = 10000` map to `X' = 0000`, but their products
differ (0 and 16A):

* `X = 10000` (`x4 = 1`) needs an APC word of 0: RESET clears the table
  output and the adder returns `16A + 0`.
* `X = 00000` (`x4 = 0`) needs an APC word of `16A`: address 1000 selects
  the extra `2A` word, the control word `s = 3` shifts it to `16A`, and the
  subtractor returns `16A - 16A = 0`.

This is the only reason the table has a ninth word and why the decoder is a
4-to-9 rather than a 3-to-8 decoder.

### Widths

`A` is `W` bits. Table words are `W+4` bits (largest `15A`). The barrel
shifter output is kept three bits wider than its input so that `2A << 3`
is never cut; only its low `W+5` bits reach the adder. The product is
`W+5` bits, exactly the range `0..31A`, so the adder-subtractor can work
modulo `2^(W+5)` and still be exact.

## Filling the table

The table is a small register file with one synchronous write port.
`lut_loader` fills it after a one-cycle pulse on `load`: it captures `A`,
then writes one word per cycle for nine cycles, `A, 3A, ..., 15A` to words
0..7 from a running sum that adds `2A` each cycle, then `2A` to word 8.
`ready` rises in the cycle after the last write (ten cycles after the load
pulse) and stays high until the next load. A `load` during loading is
ignored. The products are meaningless while `ready` is low. The captured
`A` also feeds the `16A` term of the adder.

## Wider operands: `decomp_mult`

An `XW`-bit input is cut into `ceil(XW/5)` digits of five bits
(`X = Σ X_k · 32^k`, top digit zero-padded). Each digit has its own
`apc_oms_mult`, all loaded with the same `A`, and the result is
`Σ (A·X_k) << 5k`, truncated to `W+XW` bits (which always holds it). With
the default `W = XW = 8` there are two digit multipliers; 16-bit operands
need four and 32-bit operands seven.

## FIR filter: `fir_filter` (top level)

`y(n) = Σ_{k=0}^{N-1} h(k) x(n-k)` in transposed form. Every tap has a
`decomp_mult` holding `|h(k)|`, and an add/subtract cell that uses the sign
of `h(k)`:

```
r(N-1) <= ± |h(N-1)| x(n)
r(k)   <= r(k+1) ± |h(k)| x(n)        k = N-2 .. 1
y(n)    = r(1)   ± |h(0)| x(n)        (combinational, no output register)
```

`+` is used when `h_pos[k] = 1` (coefficient positive), `-` otherwise.
Samples are unsigned; the coefficients carry the sign.

| port      | dir | width                 | meaning                                   |
|-----------|-----|-----------------------|-------------------------------------------|
| `clk`, `rst_n` | in | 1                | clock, asynchronous active-low reset      |
| `load`    | in  | 1                     | pulse: load `h_mag` into every tap's table |
| `h_mag`   | in  | N × W                 | coefficient magnitudes, abs of h(k)        |
| `h_pos`   | in  | N                     | 1 = `h(k)` positive; read every cycle      |
| `ready`   | out | 1                     | all tables loaded                          |
| `clr`     | in  | 1                     | synchronous clear of the delay line; also forces the products to 0 |
| `x_valid` | in  | 1                     | a sample is present; the delay line advances only then |
| `x`       | in  | XW                    | sample `x(n)`                              |
| `y`       | out | W+XW+clog2(N)+1, signed | output `y(n)`, valid in the same cycle as `x(n)` |

Parameters: `N = 8` taps, `W = 8`, `XW = 8`. All taps load in parallel,
so a coefficient set takes nine cycles. Partial sums already in the delay
line were formed with the old coefficients, so pulse `clr` after a reload
if the old and new filters must not mix.

## Other modules' interfaces

| module | parameters | ports |
|--------|------------|-------|
| `apc_oms_mult` | `W = 8` | `clk, rst_n, load, a[W], ready, clr, x[5], p[W+5]` |
| `xin_gen` | – | `x[5]` → `xp[4]` |
| `oms_control` | – | `x[5]` → `s[2], reset` |
| `addr_gen` | – | `xp[4], s[2]` → `d[4]` |
| `decoder_4to9` | – | `d[4]` → `w[9]` (one-hot, none for d = 9..15) |
| `lut_mem` | `W = 8` | write: `clk, rst_n, we, waddr[4], wdata[W+4]`; read: `w[9], reset` → `q[W+4]` |
| `lut_loader` | `W = 8` | `clk, rst_n, load, a[W]` → `a_q, we, waddr, wdata, busy, ready` |
| `barrel_shifter` | `IW = 12` | `din[IW], s[2]` → `dout[IW+3]` |
| `add_sub` | `W = 8` | `a[W], word[W+5], add, clr` → `p[W+5]` |

Shared constants and types (`L = 5`, nine words, address and select types)
are in the package `apc_oms_pkg`.

## Where this design fills gaps or departs from the original description

The original description gives the two folding rules, the block list, the
table contents, the barrel-shifter equations, the sign rule and the
`16A` adder. The following are this design's own decisions:

* **Address generator input.** The original address-generation drawing
  works on the raw input bits and combines all three normalised index bits
  with `x4`. That form is exact only for odd addresses: the two's
  complement of `2^s * (2i+1)` inverts just the low `3-s` bits of `i`. Here
  the generator is fed with the already-mapped address `X'` from `xin_gen`
  and simply takes its odd part, which is exact for every input.
* **Shift relations** `s1`, `s0` are derived here from the required shift
  counts.
* **Decoder.** The original forms the ninth select as `w8 = d3 & w0`, which
  leaves `w0` high as well for address 1000. Here `w0..w7` are also gated by
  `~d3`, so exactly one select is ever high.
* **Barrel-shifter width** is three bits wider than the table word so that
  `16A` is not truncated.
* **Table loading** (`lut_loader`, write port, reset of the contents) is
  not described in the original and is this design's own.
* **Operand decomposition** is only named in the original; digit width,
  one multiplier per digit and the plain sum are this design's.
* **FIR sizes** (8 taps, 8-bit coefficients and samples), the sample
  enable, the clear and the signed output width are this design's choices.
  The coefficient width `W = 8` is chosen to match the 8-bit word size the
  original uses for comparison.
* Everything is combinational from input to product; no latency or clock
  rate is given for the multiplier.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_xin_gen`, `tb_oms_control`, `tb_addr_gen`, `tb_decoder_4to9`:
  exhaustive over all inputs, against the arithmetic definitions (two's
  complement, trailing-zero count, odd part).
* `tb_barrel_shifter`, `tb_add_sub`, `tb_lut_mem`, `tb_lut_loader`:
  random and corner values; the loader test also checks the nine-cycle
  write window and that every word is written exactly once.
* `tb_apc_oms_mult`: all 32 inputs for 40 coefficients (including 0 and
  all-ones), `clr`, the load latency, and that the RESET path, the `2A`
  word, addition and subtraction are all exercised.
* `tb_apc_oms_examples`: with `A = 1`, checks reference values of the
  internal signals (address mapping 02→E, 06→A, 07→9; selects w6, w7, w3
  reading 13, 15, 7; RESET and `s = 3` for `X = 10000`; `s = 2`, `d = 0`
  for `X = 10100`).
* `tb_decomp_mult`: 8-, 16- and 32-bit operands (coefficient and input of
  equal width) against exact products.
* `tb_fir_filter`: the top level at its default size. An impulse response,
  then four coefficient sets (one fixed, three random) with random and
  corner samples, random gaps in `x_valid`, and clears, all compared with a
  direct-form reference sum. It counts positive-tap additions,
  negative-tap subtractions, RESET and `2A` uses, stalls, clears and
  reloads, and fails if any of them never happened.

Not verified: timing, area or power on any device, and any filter
response beyond the random-coefficient tests above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/apc_oms_pkg.sv tb/tb_fir_filter.sv --top-module tb_fir_filter
./obj_dir/Vtb_fir_filter
```

Replace `tb_fir_filter` with any other testbench name. The package file
must be given first; the other modules are found through `-y`.
To change sizes, override `N`, `W` and `XW` on `fir_filter` (or `W`, `XW`
on `decomp_mult`, `W` on `apc_oms_mult`); the testbenches show how.
