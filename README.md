# Carry skip adder with incrementation blocks, built from Toffoli gates

A ripple carry adder is slow because, when every bit propagates, a carry
has to cross every full adder. A carry skip adder cuts the operands into
stages. Each stage can tell from its operands alone whether an incoming
carry would pass straight through, and if so it hands the carry on at once.

This adder uses the *concatenation–incrementation* form of the carry skip
adder:

* every stage's ripple carry adder (RCA) starts from a carry of 0, so all of
  them work at the same time instead of waiting for each other;
* the carry between stages travels through one compound gate per stage
  (AND-OR-Invert or OR-AND-Invert) instead of a 2:1 multiplexer;
* each stage then adds the carry that arrives to its intermediate sum in an
  *incrementation block*, a chain of half adders, which is off the carry
  path.

Every full adder and half adder is made only of 3×3 reversible Toffoli
gates. The skip logic is ordinary AOI/OAI logic.

The circuit is purely combinational: `s = a + b + ci` and `co` appear after
the gate delays, with no clock and no registers.

## Structure

```
 a,b[N-1:N-M]       a,b[2M-1:M]          a,b[M-1:0]
      |                  |                    |
 +----------+       +----------+        +----------+
 | RCA, c=0 |  ...  | RCA, c=0 |        | RCA, c=ci|  stage 1
 +----------+       +----------+        +----------+
  G  P  z            G  P  z               |    \ carry c1
  |  |  |            |  |  |               s[M-1:0]  |
  v  v  |            v  v  |                         |
 [skip]<--- ... <---[skip]<--------------------------+
  |     |             |    |
  co  [INC]<-- c      |  [INC]<-- c1
        |                   |
     s[N-1:N-M]          s[2M-1:M]
```

For stage `j` (stages 2 to Q, Q = N/M):

* `G` is the carry out of the stage's RCA, which starts from 0;
* `P` is the AND of the bit propagate signals `a[i] ^ b[i]` of the stage;
* the stage carry is `C_j = G | (P & C_{j-1})`: if every bit propagates the
  RCA cannot generate a carry and the incoming one is passed on; otherwise
  the RCA carry is already the answer;
* the final sum of the stage is `z + C_{j-1}`, from the incrementation block.
  The incrementer's own carry out is discarded, since the skip logic gives
  the stage carry sooner.

Stage 1 is a plain RCA with carry in `ci` and has no skip logic or
incrementer.

### Alternating carry polarity

An inverting compound gate gives an inverted carry. Rather than put an
inverter on the carry path, stages alternate:

| stage number | gate | receives        | passes on       |
|--------------|------|-----------------|-----------------|
| 2, 4, 6, ... | AOI  | true carry      | inverted carry  |
| 3, 5, 7, ... | OAI  | inverted carry  | true carry      |

The AOI gate computes `~(G | P & c)`. The OAI gate computes
`~(~G & (~P | ~c))`, which equals `G | P & c`; its `~G` and `~P` are made
locally, off the carry path. The incrementation block always needs the
true carry, so an OAI stage inverts the incoming carry before its
incrementer. `co` is corrected for the polarity of the last stage. Keep
this in mind when you read the internal carry nets.

## Reversible cells

The Toffoli gate maps `(a, b, c)` to `(a, b, (a & b) ^ c)`. It is its own
inverse. With one control tied to 1 it becomes a CNOT (`c ^ b`).

The adders use one composite cell, `toffoli_cnot_cell`: a Toffoli gate
followed by a Toffoli gate used as a CNOT. It maps `(x, y, z)` to
`(x, x ^ y, (x & y) ^ z)`. This combination is known as the Peres gate.

* **Half adder** (`rev_half_adder`): one cell with `z = 0` gives
  `(a, a^b, a&b)`. The sum is `a^b` and the carry is `a&b`.
* **Full adder** (`rev_full_adder`): two cells.
  * Cell 1 maps `(a, b, 0)` to `(a, a^b, a&b)`.
  * Cell 2 maps `(a^b, cin, a&b)` to `(a^b, a^b^cin, (a^b)&cin ^ a&b)`.

  The last output is the carry. `a^b` and `a&b` are never 1 together, so
  the XOR acts as an OR there. The first output of each cell is a garbage
  output (`garbage[1:0]`). The half-sum `a^b` is brought out as `prop` and
  is reused as the bit propagate signal of the skip logic.

The two-cell full adder follows the published design. The published figure
draws each cell as a "Toffoli" box. A lone Toffoli gate cannot give both
sum and carry, so each box is read here as a Toffoli gate plus a CNOT.

## Modules

| module              | what it is                                               |
|---------------------|----------------------------------------------------------|
| `toffoli_gate`      | 3×3 Toffoli gate                                         |
| `toffoli_cnot_cell` | Toffoli + Toffoli-as-CNOT (Peres) cell                   |
| `rev_full_adder`    | full adder from two cells, with propagate and garbage outs |
| `rev_half_adder`    | half adder from one cell                                 |
| `rev_rca`           | M-bit ripple carry adder of `rev_full_adder`             |
| `rev_incrementer`   | M-bit incrementation block of `rev_half_adder`           |
| `skip_logic`        | AND of propagates + AOI (`USE_OAI=0`) or OAI (`USE_OAI=1`) |
| `cska_stage`        | one stage ≥ 2: RCA (cin 0) + skip logic + incrementer    |
| `rev_cska`          | top: stage 1 RCA and stages 2..Q, `N` and `M` parameters |

Top-level ports of `rev_cska`: `a[N-1:0]`, `b[N-1:0]`, `ci` in;
`s[N-1:0]`, `co` out.

## Parameters and departures

* `N = 32`. The adder was published in 8, 16 and 32-bit versions. 32 is the
  default, and the end-to-end test also runs 8 and 16. Any positive
  multiple of `M` works, for example 128.
* `M = 4`. The stage size was not published. Stages have a fixed size
  here. The approach also allows variable stage sizes, which give a
  further speed gain; that needs a small change to `rev_cska`, which now
  slices the operands evenly.
* The skip logic is AOI/OAI logic, not Toffoli gates. Only the RCA and
  incrementation blocks are reversible.
* The assignment of AOI to even stages and OAI to odd stages is this
  design's choice.
* Not included: a related hybrid *variable-latency* form of this adder.
  It swaps the largest middle stage for a Brent–Kung parallel prefix
  adder and adds one-cycle/two-cycle prediction for adaptive clock
  stretching. The reversible design described here leaves out the prefix
  stage.
* Published FPGA utilisation figures (area, delay, pins, product terms,
  power) do not say which width they belong to. They are not reproduced
  here.

## Verification

Each module has a self-checking testbench in `tb/`, `<module>_tb.sv`. Each
prints `TB_RESULT checks=<n> failures=<n>`.

* The Toffoli gate, full and half adder, RCA, incrementer, skip logic and
  stage testbenches are exhaustive at `M = 4`. They cover both skip-logic
  polarities.
* `rev_cska_tb` runs the default 32-bit adder (no parameter override) and
  16-bit and 8-bit copies against integer addition. It uses about 100
  directed vectors and 20,000 random ones. A quarter of the random ones are
  biased so that whole stages propagate.
* The testbench also counts how often each mechanism is used, and fails if
  one never is:
  * a carry skipping a stage;
  * an RCA generating a carry;
  * a carry crossing all stages on the skip path;
  * a carry rippling through a whole incrementer;
  * carries through AOI and through OAI stages;
  * a carry out.

* `rev_cska_full_tb` instantiates only the default 32-bit adder. It runs
  about 70 directed vectors and 5,000 random ones.

Running one testbench with Verilator:

```
verilator --binary --timing --assert -Wall -y rtl tb/rev_cska_tb.sv \
    --top-module rev_cska_tb -o sim
./obj_dir/sim
```

To change the width, override `N` (and `M` if you like) on `rev_cska`. The
elaboration check rejects an `N` that is not a multiple of `M`.
