# Retimed low-power FIR filters

Retiming moves the registers of a synchronous circuit across its logic without
changing what the circuit computes. This is usually done to shorten the clock
period. Here it is done to cut dynamic power. A register stops glitches: the
spurious transitions that ripple through multipliers and adders before their
outputs settle. So registers are placed on the nets that switch most or fan out
most, and fewer glitches reach the logic behind them.

This RTL applies that idea to an N-tap FIR filter,

    y(n) = a_0 x(n) + a_1 x(n-1) + ... + a_{N-1} x(n-N+1)

and builds it in three retimed forms, following the paper *Different retiming
transformation technique to design optimized low power VLSI architecture*:

| variant | module | where the registers sit | latency |
|---|---|---|---|
| tabular shift | `fir_tabular_retime` | after every product-add step of the accumulation | 1 clock |
| graphical shift, adder retimed | `fir_gshift_adder` | samples in place, coefficients rotating; a register on every product, then after each level of an adder tree | 1 + ceil(log2 N) clocks |
| graphical shift, multiplier retimed | `fir_gshift_mult` | samples in place, coefficients rotating; a register inside every multiplier, between partial products and their sum, and at the output | 2 clocks |

Latencies count clocks from the edge that accepts a sample to its output. All
three variants compute the same output sequence, bit for bit. They differ in how
samples are held and where the registers sit, and so in area, critical path and
glitch power. The top, `retime_fir_top`, runs all three side by side on one
input stream. Next to them sits a small, separate circuit from the paper: a
data-flow graph whose two multiplications share one pipelined multiplier.

## The three structures

### Tabular shift (`fir_tabular_retime`)

Write the products in a table: one row per coefficient a_k, one column per
sample x(i). Output y(n) is the sum along one diagonal of the table:
a_{N-1} x(n-N+1), ..., a_1 x(n-1), a_0 x(n). The tabular retiming puts one
register after each step along the diagonal. In hardware, every new sample goes
to all N multipliers at once, and a chain of N registers carries the partial
sums:

    x ──┬──────────┬──────────┬── ... ──┬
        × a_{N-1}  × a_{N-2}  × a_{N-3}  × a_0
        │          │          │          │
       [r]──(+)──[r]──(+)──[r]── ... ─(+)──[r]── y
      r[N-1]     r[N-2]                r[0]

Each step is `r[k] <= r[k+1] + a_k x` and `r[N-1] <= a_{N-1} x`. The output is
`y = r[0]`. This is a transposed FIR filter whose last adder is also
registered. That register keeps glitches from the final adder off the output.

### The graphical circles (`gshift_ring`)

The graphical form draws the filter as two circles, one of coefficients and one
of samples. Multiplying them position by position gives the products
m_1..m_N, and their sum is one output. For the next output, the coefficient
circle turns by one position. The sample circle does not move.

In hardware, `gshift_ring` builds the two circles:

* **Sample ring.** A ring buffer of N slots. Each new sample overwrites the
  oldest one, at a write pointer that advances by one per sample. Unlike a
  delay line, stored samples never move, so their registers do not toggle as
  each sample arrives.
* **Coefficient ring.** A ring of N registers that rotates by one position per
  sample. Slot j always faces the coefficient that matches its sample's age:

      coef[j] = a_((wp - j) mod N)     wp = slot the next sample goes to

* **Bypass.** The slot being written shows the incoming sample in the same
  clock, so products can be formed as the sample arrives.

Because the coefficient ring rotates, it must be loaded in step with the
pointer. A one-clock `coeff_load` pulse copies `coeff` into the ring. It also
restarts the filter: the pointer goes back to slot 0 and the stored samples are
cleared. A load therefore needs only fixed wiring, with no rotation multiplexer.
Outputs already in flight still come out unchanged.

### Graphical shift, adder retimed (`fir_gshift_adder`)

Each product m_j = tap[j] · coef[j] is registered. In the four-product example,
the products fall into two groups, {m1, m2} and {m3, m4}. A cut-set line
between the groups lets registers move into the adder. This design repeats that
cut at every level of a binary adder tree (`adder_tree_pipe`): each level adds
pairs and registers the sums. An operand left over at an odd-sized level moves
down unchanged, but it is still registered, so every operand has the same
latency.

### Graphical shift, multiplier retimed (`fir_gshift_mult`, `pipe_mult`)

The multiplier is the largest and slowest block, and its glitches are the
worst. This variant therefore moves the product registers of the adder-retimed
form from the multiplier outputs into the multipliers. Each slot's product is
formed by `pipe_mult`:

* **Stage 1.** Each operand is split in two halves: a signed high half and an
  unsigned low half. The four half-width products are registered:
  a_hi·b_hi, a_hi·b_lo, a_lo·b_hi and a_lo·b_lo.
* **Stage 2.** After the register, each partial product is shifted by its
  weight and the four are added: a_hi·b_hi by (AL+BL) bits, a_hi·b_lo by AL,
  a_lo·b_hi by BL, and a_lo·b_lo not at all. AL and BL are the widths of the
  low halves.

Each low half gets an extra zero bit, so signed multiplication stays exact. When
a width is odd, the high half is the longer one. One adder then sums the N
products into the output register.

### Example graph with a shared multiplier (`dfg_shared_mult`)

The paper demonstrates cut-set retiming on a small data-flow graph before
applying it to filters:

    v1 = a*b,  v2 = c*d,  v3 = v1 + v2,  v4 = v3 * e,  y(n) = D(v4)

Its remark is that the two first multiplications can share one two-stage
pipelined multiplier. `dfg_shared_mult` builds the graph that way, with one
`pipe_mult` used twice per input set:

| clock | shared multiplier input | multiplier output | other action |
|---|---|---|---|
| t (accept) | a, b | — | c, d, e captured |
| t+1 | c, d (captured) | a*b | a*b held in `ab_q` |
| t+2 | a new a, b if one is offered | c*d | y <= (ab_q + c*d) * e |

Sharing halves the input rate. A valid/ready handshake therefore holds the
source off: `in_ready` is low in the clock after each accept. The result appears
3 clocks after the accept. The last multiplication, by e, has its own
multiplier in front of the output register. An assertion checks that c*d always
leaves the multiplier right after a*b.

This circuit is an illustration, separate from the filters. The top carries it
beside them on its own `ex_*` ports.

## Top level (`retime_fir_top`)

The input sample fans out to 3 × N places: every multiplier of the tabular
filter, and every slot of the two sample rings. That makes it the highest
fan-out net in the design. A register sits right before that net (`x_q`,
`x_v`). Glitches from whatever drives `x` stop there instead of spreading into
that fan-out. Every filter latency at the top is therefore one clock longer
than in the variant table above:

| output | latency from the clock that accepts x(n) | at N = 128 |
|---|---|---|
| `y_tab` | 2 | 2 |
| `y_gmul` | 3 | 3 |
| `y_gadd` | 2 + ceil(log2 N) | 9 |

### Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active low; clears the sample history and all partial sums |
| `in_valid` | in | 1 | `x` is a new sample; at most one per clock |
| `x` | in | DATA_W | signed sample |
| `coeff_load` | in | 1 | one-clock pulse: the graphical filters copy `coeff` into their coefficient rings and clear their sample history |
| `coeff[N]` | in | COEF_W each | signed coefficients; `coeff[0]` weights the newest sample |
| `y_*_valid` | out | 1 | the matching `y_*` holds a new output |
| `y_tab`, `y_gadd`, `y_gmul` | out | ACC_W | signed outputs |
| `ex_in_valid`, `ex_in_ready` | in, out | 1 | handshake of the example graph |
| `ex_a` .. `ex_e` | in | EX_W each | its signed operands |
| `ex_y_valid`, `ex_y` | out | 1, 3·EX_W+1 | its result (a*b + c*d) * e, exact |

There is no back-pressure. A filter has no reason to refuse a sample, so there
is no ready signal. When `in_valid` is low, the sample history and partial sums
hold, and gaps in the stream do not change the results. Each variant gives
exactly one output per accepted sample, at a fixed latency.

Coefficients reach the filters in two ways. The tabular filter reads `coeff`
directly, so hold `coeff` stable while samples are streaming. The graphical
filters take `coeff` only on `coeff_load`. After reset, set `coeff`, pulse
`coeff_load` once with no sample in the input register, and then stream. A
reload in the middle of a stream restarts the graphical filters, but not the
tabular one. For all three outputs to agree, reset before changing
coefficients.

### Parameters

| parameter | default | notes |
|---|---|---|
| `TAPS` | 128 | The longest filter in the paper's results. A shorter filter runs with its unused coefficients set to zero. |
| `DATA_W`, `COEF_W` | 16, 16 | The paper gives no word lengths; 16 bits is this design's choice. |
| `ACC_W` | DATA_W + COEF_W + ceil(log2 TAPS) = 39 | Exact sum; overflow cannot happen. |
| `EX_W` | 16 | Operand width of the example graph; this design's choice. |

The defaults live in `retime_fir_pkg`.

## What follows the paper and what does not

Taken from the paper:

* The three retiming variants.
* The diagonal register placement of the tabular form.
* A register on every product, and a cut-set through the adder, in the
  graphical form.
* A two-stage multiplier whose cut-set runs between partial products split by
  operand bit fields.
* A register before a high fan-out node.
* The tap counts 25, 60, 80, 108 and 128.

Choices made for this design:

* **Word lengths, handshake, reset, run-time coefficients.** The paper does not
  give them. Its filters may well use fixed constant coefficients.
* **Coefficient order.** The paper's product tables weight a_0 on the newest
  sample, and that order is used here. Its transposed-filter drawings label the
  multipliers the other way round.
* **Adder tree for more than four products.** The paper shows the cut-set only
  for four products. A register after every tree level is this design's
  generalisation. In the multiplier-retimed variant, the adder gets only an
  output register.
* **Recombining the multiplier.** The paper's multiplier drawing maps each
  partial product to its own output bit field. That cannot be literal, because
  the partial products overlap once weighted. Here they are shifted and added.
* **The circles as a ring buffer.** The paper's circles are built as a ring
  buffer of samples plus a rotating ring of coefficients. The load strobe that
  keeps the coefficient ring aligned is this design's.
* **One multiplier per tap.** The paper remarks that two multiplications can
  share one two-stage multiplier. That sharing is not done here, so each filter
  keeps a rate of one sample per clock.
* **Where the fan-out register sits.** Placing it on the input sample net is
  this design's reading.
* **Example graph.** The paper does not give the schedule of its shared
  multiplier or its handshake; both are this design's. Of the graph's register
  placements, only the register inside the shared multiplier and the output
  register are built.

Not built:

* **Block processing.** The paper's synthesis results use a block size of
  L = 16 outputs per clock, but the paper never describes that block structure.
  These filters take one sample per clock. Matching the paper's throughput at
  equal clock rate would need a block (parallel) version, which would have to be
  designed from scratch.
* **The reference designs.** The paper compares against three designs: the
  conventional transposed filter without retiming, a product-accumulation
  design, and a node splitting/merging design. None of them is included.

The paper reports its area, delay and power figures from 45 nm synthesis. The
multiplier-retimed graphical variant comes out lowest in power at every tap
count. This RTL has not been synthesised to a cell library, so those numbers
have not been reproduced.

## Files

| file | contents |
|---|---|
| `rtl/retime_fir_pkg.sv` | default sizes, accumulator width function |
| `rtl/pipe_mult.sv` | two-stage split-operand multiplier |
| `rtl/adder_tree_pipe.sv` | binary adder tree, one register level per add level |
| `rtl/gshift_ring.sv` | sample ring buffer and rotating coefficient ring |
| `rtl/fir_tabular_retime.sv` | tabular-shift retimed filter |
| `rtl/fir_gshift_adder.sv` | graphical-shift adder-retimed filter |
| `rtl/fir_gshift_mult.sv` | graphical-shift multiplier-retimed filter |
| `rtl/dfg_shared_mult.sv` | example graph (a*b + c*d) * e on one shared multiplier |
| `rtl/retime_fir_top.sv` | input register, the three filters, the example graph |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench checks itself against a 64-bit reference model. It checks every
output value and the exact latency in clocks, feeds random gaps into
`in_valid`, and ends by printing `TB_RESULT checks=N failures=M`.

* The filter testbenches use 7 taps and include a full-scale phase, where most
  coefficients and samples sit at the most negative value, to test the
  accumulator width.
* `tb_pipe_mult` covers corner operands at 16 × 16 and at 7 × 9, where the
  operand halves differ in width.
* `tb_adder_tree_pipe` covers trees of 1, 5 and 8 operands.
* `tb_gshift_ring` checks, at every accepted sample, that each sample faces the
  coefficient matching its age. It uses a 5-slot ring, so the pointer wraps
  often, and loads coefficients both after reset and mid-stream.
* The testbenches of the two graphical filters add a third phase: new
  coefficients loaded mid-stream, without reset.
* `tb_dfg_shared_mult` checks values and latency, and that in_ready drops after
  every accept. It also checks that a continuous stream is served at exactly one
  set per two clocks.
* `tb_retime_fir_top` runs the top at its default size (128 taps). It has four
  phases: a random filter; a full-scale filter; filters of 25, 60, 80 and 108
  taps held in the 128-tap datapath; and a reset in the middle of a stream. The
  example graph runs alongside. The testbench checks that every one of these
  events occurs: gaps, full-scale sums, resets mid-stream, outputs of every
  filter variant, and both results and stalls of the example graph.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_retime_fir_top \
        rtl/retime_fir_pkg.sv tb/tb_retime_fir_top.sv
    ./obj_dir/Vtb_retime_fir_top

Verilator finds the other modules in `rtl/` through `-Irtl`. Each testbench runs
in well under a second.
