# Programmable bit-serial Reed-Solomon encoder

A Reed-Solomon encoder that handles one bit per clock and can be re-programmed
between codewords. Six select lines pick one of 18 systematic (n, k) codes over
three fields. The field can change from one codeword to the next, and so can
the number of check symbols.

| field   | m | n   | k (t = (n-k)/2)                                     |
|---------|---|-----|-----------------------------------------------------|
| GF(16)  | 4 | 15  | 13, 11, 9, 7, 5, 3, 1 (t = 1..7)                    |
| GF(32)  | 5 | 31  | 29, 27, 25, 23, 15 (t = 1, 2, 3, 4, 8)              |
| GF(256) | 8 | 255 | 253, 251, 249, 247, 239, 223 (t = 1, 2, 3, 4, 8, 16) |

The hardware is small: one 8-bit LFSR does the work of all 2t
constant multipliers. It is a Berlekamp dual-basis multiplier. Add 32 tiny
inner-product units, 31 one-symbol delay lines, a coefficient table and three
small controllers. Synthesised at the defaults, the encoder comes to about 285
flip-flops.

## How one LFSR replaces 2t multipliers

The usual RS encoder divides the message polynomial by the generator
polynomial g(x). It does this with a chain of 2t registers. Each symbol, the
feedback symbol `fb` (incoming message symbol plus chain end) is multiplied by
every coefficient g_0..g_(2t-1), and the products are added into the chain.
In a bit-serial design the question is how to multiply a serial symbol by 2t
constants cheaply.

The answer is Berlekamp's dual basis. Represent a field element x by its
coordinates x_j = L(alpha^j x), j = 0..m-1, where L is a nonzero linear map
from GF(2^m) to GF(2). The field trace is the usual choice, and the hardware
works for any such map. Two facts follow:

* The coordinates obey the field polynomial's recursion:
  x_(j+m) = sum_i f_i x_(j+i). An m-stage LFSR loaded with (x_0..x_(m-1))
  therefore walks through x_j, x_(j+1), ... one step per clock.
* For a constant c = sum_i c_i alpha^i (polynomial basis),
  (c x)_j = sum_i c_i x_(j+i). This is the inner product of the LFSR state
  with the bits of c.

So once `fb` sits in the LFSR, each constant multiplier is only an AND/XOR
inner product with hard-wired constant bits. All 2t of them read the same
LFSR. Each one emits its product bit-serially, in the same dual-basis order
as the data, and the products go straight into the serial XOR chain.

### Pipelining, and why 31 delays are enough

The bits of `fb` are known only one per clock, but the LFSR needs the whole
symbol. Seven staging flip-flops collect the first m-1 bits. On the symbol's
last bit (control1) the LFSR loads all m bits in parallel. It then shifts
through the *next* symbol slot while the next `fb` is being collected. The
products of symbol s therefore come out during slot s+1.

That one-symbol lag makes the multiplier one of the chain's delays. The
recursion r_j[s+1] = r_(j-1)[s] + g_j fb[s] is built as:

```
P_p   = g[p] * fb   (serial product, one slot late)
r0   <= P_0
r_p  <= r_(p-1) ^ P_p          p = 1..30   (prog_shift_reg, m clocks each)
end   = r30 ^ P_31             (combinational: highest remainder symbol)
fb    = control2 & (din ^ end)
dout  = control2 ? din : end   (registered)
```

2t products therefore need only 2t-1 delay stages: 31 stages for 2t = 32.

### Programming the chain length

The chain always has 32 product taps. The coefficient table puts
g_0..g_(2t-1) on the last 2t taps (tap 32-2t+j holds g_j) and zeros on the
others. The unused head of the chain then holds zeros and passes zeros along.
Once the k message symbols are in, control2 drops and `fb` becomes 0. For 2t
symbol slots the chain end then shifts out the remainder, highest degree
first. After exactly 2t slots the chain and the LFSR are empty again. The next
codeword can therefore start at once with any field and any t, with no flush
and no gap.

## Programmable field width

All serial storage is built for m = 8 and shortened by multiplexers. The
multiplexers are controlled by {m1, m0}: 00 gives m = 4, 01 gives m = 5 and 11
gives m = 8. The code 10 is unsupported.

* **prog_berlekamp_lfsr**: the chain is z7 -> z6 -> z5 -> [m1 mux] -> z4 ->
  [m0 mux] -> z3 -> z2 -> z1 -> z0. For m = 8 the new coordinate enters at z7.
  For m = 5 the m1 multiplexer lets it enter at z4. For m = 4 the m0
  multiplexer lets it enter at z3. z0 always holds the current coordinate.
  Stages above m-1 carry stale bits, which the inner products ignore.
* **gf2_inner_product**: 8 AND gates and a 7-XOR chain. A 3:1 multiplexer
  takes the partial sum after 4, 5 or 8 terms.
* **prog_shift_reg**: 3 + 1 + 4 flip-flops. The m1 and m0 multiplexers
  choose whether `din` enters at the head, at the middle stage or at the tail
  four, giving 8, 5 or 4 clocks of delay.

The field polynomials are x^4+x+1, x^5+x^2+1 and x^8+x^4+x^3+x^2+1
(`rs_pkg`). The same constants set the LFSR feedback and the table contents.
To change a field, change both together.

## Code selection and the coefficient table

`genpoly_rom` is combinational. The six select lines address it: {m1, m0} and
T[3:0], with **t = T + 1**. So T = 0..7 selects t = 1..8 and T = 15 selects
t = 16. A combination outside the 18 codes gives `cfg_valid = 0`, and the
codeword it produces is meaningless.

The table is not typed in. Constant functions in `rs_pkg` compute it at
elaboration as

    g(x) = prod_{i=0}^{2t-1} (x + alpha^(b+i)),   b = 2^(m-1) - t

This choice of b makes g(x) self-reciprocal: g_j = g_(2t-j), with g_0 = 1.
This suits a table-driven encoder. An on-line, iterative way of generating
g(x) cannot easily produce such polynomials. Set the parameter `SYMMETRIC = 0`
to get the more common b = 1 instead. A decoder must use the same roots.

Because g(x) comes from a table rather than a sequential generator, t and m
can jump to any supported value from one codeword to the next.

## Control and timing

* `ctrl1_fsm` is a bit counter modulo m. control1 (`sym_last`) is high on
  every m-th clock: on the last bit of each symbol. It loads the multiplier
  and advances the symbol counter.
* `symbol_counter` counts symbols 0..n-1 and wraps, so one count cycle is one
  codeword. `cw_last` marks the codeword's last clock.
* `ctrl2_fsm` computes control2 = (count < k). control2 is high for m*k
  clocks and low for m*2t.

The select lines are sampled on the last clock of every codeword, and on the
first clock after reset. They hold for the whole next codeword.

### Ports of `rs_encoder_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `m1`, `m0`, `T[3:0]` | in | code select, sampled at codeword boundaries |
| `din` | in | message bits, dual basis, bit 0 of each symbol first, while `info` = 1 |
| `cw_start` | out | first clock of a codeword |
| `info` | out | control2: this clock takes a message bit |
| `sym_last` | out | control1: last bit of a symbol |
| `cfg_valid` | out | the sampled selects are one of the 18 codes |
| `dout` | out | codeword bit of the previous clock |
| `dout_info` | out | `dout` is a message bit (otherwise a check bit) |
| `dout_first`, `dout_valid` | out | first bit of a codeword; a codeword is running |
| `tbm_load`, `tbm_b_dual[7:0]`, `tbm_c[7:0]` | in | stand-alone general multiplier (below): load, operand (dual basis), multiplier (polynomial basis) |
| `tbm_a_bit` | out | its serial product, dual basis |

Sequence: reset, then one idle clock in which the selects are sampled. After
that, codewords follow back to back, each n*m clocks long. Messages enter
during the first m*k clocks of each codeword, and `din` is ignored after
that. Output is delayed by one clock. The message bits come out unchanged,
followed by the 2t check symbols, highest degree first. Throughput is one
bit per clock at every setting.

To feed symbols from the polynomial basis, send bit j = Tr(alpha^j x) for
j = 0..m-1. To read them back, invert that map (the testbench does this with a
small table).

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The Galois-field reference
arithmetic in `tb/tb_gf_ref_pkg.sv` is written separately from the RTL's. It
uses a full field polynomial, and it takes dual-basis coordinates from the
trace.

* `tb_rs_encoder_top` runs the top with default parameters. It sends all 18
  codes in turn, then a random sequence of them, then one unsupported select.
  For every codeword it checks the following:
  * the message passes through unchanged;
  * the check symbols equal a long-division reference;
  * the codeword vanishes at all 2t roots of g(x);
  * each codeword lasts n*m clocks, with one clock of latency;
  * control2 is high for m*k clocks;
  * there are n symbol strobes.

  It also counts field switches, t changes, every t, every field, the
  check-symbol phases and the invalid-select flag. It fails if any of them
  never happened. A parallel process checks 50 products of the stand-alone
  general multiplier. It simulates about 26,000 clocks in well under a
  second.
* The unit testbenches do the following:
  * `tb_prog_berlekamp_lfsr` checks the LFSR state against the trace
    coordinates j..j+m-1 of the loaded symbol, and checks product bits for
    random constants.
  * `tb_genpoly_rom` checks roots, symmetry and zero padding for all 64
    select combinations. A second instance with `SYMMETRIC = 0` must vanish
    at alpha^1..alpha^2t.
  * The shift-register and control testbenches check exact delays and
    patterns for m = 4, 5 and 8.

Running one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rs_pkg.sv tb/tb_gf_ref_pkg.sv rtl/*.sv tb/tb_rs_encoder_top.sv \
  --top-module tb_rs_encoder_top -o sim
./obj_dir/sim
```

Two assertions in the top and one in `symbol_counter` check that:
* codewords end on symbol boundaries;
* no feedback enters during check symbols;
* the symbol count stays below n.

## Also included

`berlekamp_mult` is the general Berlekamp multiplier. Its multiplier c sits
in registers instead of being hard-wired. It has an M-stage dual-basis LFSR,
M c-registers, M AND gates and M-1 XOR gates, and a product appears one bit
per clock after a parallel load. The encoder uses the constant, programmable
form instead. The top therefore carries one GF(256) instance beside the
encoder, unconnected to it, on its own `tbm_*` ports. Its testbench covers
GF(16), GF(32) and GF(256).

## What is this design's own choice

These parts follow the reference architecture:
* the overall organisation: one shared Berlekamp LFSR, inner-product constant
  multipliers, 31 programmable delays, a table-based g(x), and the
  control1/control2 generators;
* the multiplexer placement in the programmable LFSR and shift register;
* the {m1, m0} encoding;
* the list of 18 codes.

These are choices made for this implementation:
* the field polynomials;
* the roots of g(x) (symmetric, b = 2^(m-1) - t);
* the T encoding (t = T + 1);
* how the chain length is programmed (zero-padded coefficients at the head
  of the chain);
* the staging and load logic used for pipelining;
* the symbol counter wrapping at n-1;
* control2 as a comparator;
* the sampling of the selects at codeword boundaries;
* the idle clock after reset;
* the registered output and the status strobes;
* asynchronous reset.

Not provided:
* the "Berlekamp-like" bit-serial multiplier, an alternative that is claimed
  to be better suited to RS encoders;
* the iterative on-line g(x) generator, which this architecture
  deliberately replaces with the table.

The symmetry of g(x) is not used to halve the multipliers: all 32 inner
products are built.
