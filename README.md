# Reversible four-bit adder from Peres gates

An ordinary adder throws information away: from a sum alone you cannot tell
which operands produced it. Landauer's principle ties every erased bit to a
minimum amount of dissipated heat, which is why reversible logic keeps enough
of its inputs around that the computation can always be run backwards. This
design is a four-bit ripple-carry adder made only of reversible gates. It
uses the Peres gate, which has the lowest quantum cost (4) of the common
universal reversible gates. Toffoli costs 5. The price is "garbage": extra
outputs that exist only to keep the map one-to-one.

The RTL is plain combinational SystemVerilog. It simulates and synthesises
as ordinary logic, and it is laid out gate by gate as the reversible circuit
would be.

## The Peres gate

`rtl/peres_gate.sv` maps three bits to three bits:

| output | function        |
|--------|-----------------|
| `p`    | `a`             |
| `q`    | `a ^ b`         |
| `r`    | `(a & b) ^ c`   |

Each of the eight input patterns gives a different output pattern, so the
gate can be inverted. It amounts to a Toffoli gate (which produces `r`)
followed by a CNOT, a controlled-NOT (which produces `q`).

## The Peres full adder (PFA)

`rtl/peres_full_adder.sv` chains two Peres gates:

```
            +---------+  a            (garbage G1)
 a    ----->| Peres 1 |-----------------------------------> g.a
 b    ----->|         |  a^b     +---------+  a^b         (garbage G2)
 zero ----->|         |--------->| Peres 2 |-------------> g.a_xor_b
            |         |  ab^zero |         |  a^b^cin
            +---------+--------->|         |-------------> s
 cin  -------------------------->|         |  (a^b)cin ^ ab ^ zero
                                 +---------+-------------> cout
```

The first gate produces the propagate term `a^b` and the generate term `ab`.
The second gate uses the propagate term and the carry in to make the sum. It
folds the propagate-and-carry term into the generate term to make the carry.
The fourth input, `zero`, is an *ancilla*: a constant input that reversible
logic needs so that inputs and outputs are equal in number. With it at 0 the
block is a full adder. With it at 1 the carry comes out inverted. All four
inputs can be recovered from the four outputs in either case. The quantum
cost of one PFA is 8.

The two garbage bits are returned as a packed struct,
`rev_adder_pkg::pfa_garbage_t` = `{a, a_xor_b}`.

## The ripple adder (top: `reversible_adder`)

`rtl/reversible_adder.sv` places `N` PFAs in a carry chain (`N` = 4 by
default). Stage `i` takes `a[i]`, `b[i]` and `ancilla[i]`. Its carry in is
the carry out of stage `i-1`, or `cin` for stage 0. The last carry is `cout`.

| port      | dir | width              | meaning |
|-----------|-----|--------------------|---------|
| `a`, `b`  | in  | N                  | operands |
| `cin`     | in  | 1                  | carry in |
| `ancilla` | in  | N                  | constant-zero inputs, one per stage |
| `sum`     | out | N                  | `a + b + cin`, low N bits |
| `cout`    | out | 1                  | carry out |
| `garbage` | out | N x `pfa_garbage_t` | `garbage[i] = {a[i], a[i]^b[i]}` |

The four-bit adder has 13 inputs (4 + 4 + 1 + 4 ancillas) and 13 outputs
(4 + 1 + 8 garbage), and the map between them is a bijection. The garbage
cost is high: two bits per stage. If the outputs are numbered G1..G8, as
they often are for this circuit, `G(2i+1)` is `garbage[i].a` and `G(2i+2)`
is `garbage[i].a_xor_b`.

The adder only adds when every ancilla bit is 0. A deferred assertion
(`ancilla_zero`) reports any other value in simulation. The hardware itself
still computes the reversible map. Each nonzero ancilla bit inverts that
stage's carry.

Timing: the adder is purely combinational, with no clock, no reset and no
state. The critical path is the carry ripple through `N` PFAs. That is two
gate levels per stage.

## Choices made in this RTL

- The Peres gate has a module of its own, so that the PFA is visibly two
  gates. Written flat, the PFA would be the same logic.
- The width is a parameter. The chain works for any `N >= 1`, but only 4
  and 16 are simulated.
- The sum and the carry out are separate ports. Some descriptions of this
  circuit pack them into a single (N+1)-bit sum.
- The garbage bits and the ancillas are bundled into an array and a vector.
  They are not separate one-bit ports.
- This is a logical model. It says nothing about how a reversible or
  quantum technology would build the gates, and a conventional synthesis
  flow will simply merge the gates into ordinary logic.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_peres_gate.sv` | all 8 inputs; outputs against the gate equations worked out with integer arithmetic; no output pattern repeats |
| `tb/tb_peres_full_adder.sv` | all 16 inputs, with the ancilla at 0 and at 1; sum and carry against `a+b+cin`; garbage; all 16 outputs distinct |
| `tb/tb_reversible_adder.sv` | top at default width: all 512 combinations of `a`, `b`, `cin`; sum and carry, garbage, inputs rebuilt from outputs, no repeated output pattern; counts carry-outs, carries that ripple through all four stages, and carry-free additions, each of which must occur |
| `tb/tb_reversible_adder_wide.sv` | top at `N = 16`: corner cases plus 20000 random additions |

Each testbench passes against the RTL. Each fails against a copy of its
module with one deliberate bug:

- in the gate: OR in place of AND;
- in the PFA: the generate term dropped from the carry;
- in the top: the carry chain cut.

Running one with Verilator, for example the top:

```
verilator --binary --timing --assert \
  rtl/rev_adder_pkg.sv rtl/peres_gate.sv rtl/peres_full_adder.sv \
  rtl/reversible_adder.sv tb/tb_reversible_adder.sv \
  --top-module tb_reversible_adder
./obj_dir/Vtb_reversible_adder
```

The package must come first. `verilator --lint-only -Wall` on the four
files in `rtl/` with `--top-module reversible_adder` reports nothing. Each testbench has a watchdog that ends the run
with a failure if it does not finish.
