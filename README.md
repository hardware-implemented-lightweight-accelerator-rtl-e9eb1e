# LPMA: a lightweight polynomial multiplier for Saber

This RTL multiplies two polynomials of the Saber key-encapsulation scheme:

    W = D · G  mod (x^N + 1),   coefficients modulo 2^13,   N = 256

The two operands are very unequal. D has full 13-bit coefficients. G is a small
"secret" polynomial whose coefficients lie in [-5, 5]. Fast algorithms such as
Karatsuba or the NTT do not fit this well: Karatsuba's pre-additions widen the
small operand, and the moduli are powers of two, so the NTT is not available. The
design therefore computes the plain schoolbook product, and organises it so that
a few small units do the work:

* The N output coefficients are computed in **u = N/V groups of V**, one group
  per *round*.
* In a round, **V channels** each build one output coefficient. They work in
  parallel for N cycles and need no hardware multiplier.
* In every cycle, **one G coefficient is broadcast to all V channels**. Each
  channel takes its own D coefficient from a V-register sliding window.

One multiplication takes u·N computation cycles. The default configuration is
V = 32, which gives 8 rounds and 2048 cycles. V is a parameter: V = 2 … 64 trade
area against time.

## The schedule

A negacyclic product uses the rule x^N = −1, so

    w_j = Σ_t  d_t · g_{(j−t) mod N} · (−1 if t > j).

Group k holds the outputs w_{kV} … w_{kV+V−1}. Rounds go from the highest group,
k = u−1, down to k = 0. Channel i of round k produces w_{kV+V−1−i}. In cycle
c = 0 … N−1 of that round:

| what                      | value                                     |
|---------------------------|-------------------------------------------|
| G coefficient (all channels) | g_m with m = (kV + V − 1 − c) mod N     |
| D coefficient of channel i   | d_{(c − i) mod N}                        |
| product negated if           | m wrapped (c > kV+V−1) **xor** the D index wrapped (c < i) |

At most one of the two wraps can happen for a given product. The schedule has
three useful properties:

* **The G coefficient does not depend on i.** One register can feed every
  channel.
* **The D coefficient does not depend on k.** The D stream d_0, d_1, …, d_{N−1}
  is the same in every round, so the D unit is just a shift register fed with
  that stream.
* **The two sign terms are handled separately.** The "m wrapped" term belongs to
  G and is stored in G's sign bits. The "D index wrapped" term is a fixed pattern
  per round: channel i is negated during the first i cycles. A 1-bit shift
  register produces that pattern.

## The G register and the group switch

`lpma_gshift` holds G as N cells of 4 bits (sign + magnitude). Cell N−1 is the
output cell. At the start of round k, the cells hold the sequence of G
coefficients for that round, with their signs already applied: the coefficient
used in cycle c sits c cells below the output. A cell can make one of three moves:

* **load**: shift up by one, with a new coefficient entering cell 0. G is loaded
  serially, g_{N−1} first, so after N cycles the register holds the round-(u−1)
  sequence g_{N−1}, g_{N−2}, …, g_0. None of these is negated.
* **rot**: a 1-position circular shift. It brings the next coefficient to the
  output each cycle.
* **jump**: the group switch. Compared with round k, the sequence for round k−1
  starts V coefficients later. The V coefficients at the front move to the back
  and have their sign inverted (x^N = −1). Cells 0 … V−1 receive these
  coefficients and invert the sign bit. All other cells only move.

A round has N−1 rot cycles and then one switch cycle. In the switch cycle the
register must make the round's last 1-position step and the V-position step
together. Cell i therefore takes its second source from cell (i − V − 1) mod N:
V+1 cells below, not V. This keeps every round at exactly N cycles.

## The D window

`lpma_dunit` is a chain of V 13-bit registers. Register i feeds channel i. The
chain shifts once per compute cycle. In compute cycle c it takes d_{(c+1) mod N},
so register i holds d_{(c−i) mod N}. Before the first round the window must hold
d_0, d_{N−1}, …, d_{N−V+1}. These V values are shifted in during the last V cycles
of the G load. After that, the stream simply continues around the polynomial, and
the window lines up again at the start of every round.

## Signs, multiplication and accumulation

`lpma_signctl` is a V-bit register with one flag per channel. At the start of
each round it is reloaded with ones, already shifted by one place, so bit 0 is 0.
Each cycle a zero is shifted in. In cycle c, bit i is therefore 1 exactly when
c < i.

`lpma_cu` is one channel:

* `lpma_mux_mul` selects the product from the multiples 0, d, 2d, 3d, 4d and 5d.
  These are formed by shifts and two additions; there is no multiplier.
* The G sign bit XOR the channel's flag chooses whether the adder adds or
  subtracts the product.
* The 13-bit accumulator wraps modulo 2^13. This is exact for two's-complement
  D.
* On the first product of a round, the accumulator is overwritten rather than
  added to.

The 10-bit modulus of Saber (p = 2^10) needs no separate mode: the low 10 bits of
the result are the mod-2^10 result.

## Output

One cycle after each switch, `lpma_outbuf` captures the V accumulators in
parallel. It then shifts them out one per cycle. Channel V−1 comes first, which
is w_{kV}, then w_{kV+1}, and so on. This output overlaps the next round, which
is always at least V cycles long. The top keeps `w_idx` counting alongside the
data. Groups come out in the order W_{u−1}, …, W_0.

## Control and timing

`lpma_ctrl` is a five-stage FSM:

| stage  | cycles              | work |
|--------|---------------------|------|
| reset  | until `start`       | idle |
| load   | N                   | G serial load; D window filled in the last V cycles |
| comp   | N−1 per round       | multiply-accumulate, G rot, D shift, sign shift |
| switch | 1 per round         | last multiply-accumulate, G jump (except after the last round), sign reload |
| done   | V+1                 | last group drains; `done` pulses with the last result |

With the edge that samples `start` counted as 0, the last result and `done`
appear N + u·N + V clock edges later. At the default size that is
256 + 2048 + 32 = 2336 cycles, of which 2048 are computation.

## Interface of `lpma_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset (all registers clear) |
| start | in | 1 | pulse in the reset stage to begin |
| g_idx / g_in | out / in | 8 / 4 | coefficient source: `g_in` must equal g[g_idx] in the same cycle; bit 3 = sign, bits 2:0 = magnitude ≤ 5 |
| d_idx / d_in | out / in | 8 / 13 | coefficient source: `d_in` must equal d[d_idx] in the same cycle |
| w_valid, w_idx, w_out | out | 1, 8, 13 | one result coefficient per valid cycle |
| state, busy, done | out | 3, 1, 1 | stage, operation in progress, end pulse |

G and D must not change while `busy` is high. Assertions flag a G magnitude above
5, a multi-move request to the G register, and an output-buffer overwrite.

## Parameters and cost

`N` (default 256) and `V` (default 32) are parameters of `lpma_top`. The design
requires N ≥ 2, 2 ≤ V ≤ N and V dividing N. The other sizes are fixed in
`lpma_pkg`: 13-bit D and W, and 4-bit sign-magnitude G.

The register count is 4N for G, plus 13V each for the D window, the
accumulators and the output buffer, plus 2V flag bits, the FSM and the output
index. At the default size that is 2363 flip-flops. For comparison, FPGA
implementations of this architecture with N = 256 have been reported at about 1.4k–7.2k LUTs and
1.4k–3.8k FFs for V = 2 … 64 (2.6k FFs at V = 32). Those figures were not
reproduced with this RTL.

## Where this RTL makes its own choices

These points are not fixed by the published description of the architecture.
Each one is a choice of this implementation:

* **Group switch.** The published description has a V-position shift in the G
  cells and also claims u·N cycles. Both cannot hold together, so this RTL keeps
  u·N cycles and uses a V+1 source in the switch cycle.
* **Sign register reload.** The register is described as loaded with all ones.
  Here it is reloaded with all ones already shifted once, so channel 0 is never
  negated, as the schedule requires.
* **Operand interface.** The index-addressed, same-cycle operand interface is
  this design's own. A caller with only a stream can feed G in the order
  g_{N−1} … g_0, and D as d_{N−V+1} … d_{N−1}, d_0, d_1, … repeating.
* **Housekeeping signals.** The output order, `w_idx`, the `valid` chain, the
  `start`/`done`/`busy` handshake and the reset values are choices of this
  implementation.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_lpma_gshift` (N=16, V=4) | the G output sequence and signs of every round, against the schedule formula |
| `tb_lpma_dunit`, `tb_lpma_signctl`, `tb_lpma_outbuf` | window contents, flag pattern, serial order and valid timing |
| `tb_lpma_mux_mul` | exhaustive, all 8192 × 6 products |
| `tb_lpma_cu` | random signed accumulations with idle cycles |
| `tb_lpma_ctrl` (N=16, V=4) | every control strobe, index and stage, cycle by cycle |
| `tb_lpma_top` | the default size, six multiplications |
| `tb_lpma_sweep` | the same six multiplications at V = 2, 4, 8, 16, 32, 64 with N = 256 (through `tb_lpma_env`) |

The six multiplications use:

* random G in [−5,5], [−4,4] and [−3,3];
* 10-bit D;
* all g = −5 with all-ones D;
* a single g_{N−1} = 1.

Each result is compared with a schoolbook reference. The top-level tests also
check that the latency and the u·N computation cycles are exact. They count the
load, the group switches, the negated cycles, the output overlap and `done`, and
fail if any of these never occurs.

Run a test with plain Verilator, for example:

    verilator --binary --timing -Irtl -y rtl -y tb rtl/lpma_pkg.sv \
        tb/tb_lpma_top.sv --top-module tb_lpma_top -Mdir obj && ./obj/Vtb_lpma_top

For the sweep, use `tb/tb_lpma_sweep.sv` and `--top-module tb_lpma_sweep`. The
sweep takes about two seconds.
