# Testable clockless adder: an NCL pipeline with test points and an XOR observation tree

This is a small asynchronous pipeline written in NULL Convention Logic (NCL),
with design-for-test hardware added. The hardware lets stuck-at tests treat
the pipeline much like combinational logic. NCL circuits have no clock. Every
stage tells the previous stage when it has taken a value, over acknowledge
wires that run backwards. Those backward wires form feedback loops, which make
a self-timed pipeline hard to test with ordinary stuck-at test generation: a
net inside a loop can only be set by walking the whole handshake, and a fault
deep in the pipeline often never reaches an output pin.

The design adds two structures for testing, and leaves the pipeline clockless:

* **Test points in the loops.** Each internal acknowledge path passes through
  an XOR gate driven by one test-control pin, `tc`. With `tc = 0` the circuit
  is the plain pipeline. In test mode the tester drives `tc` and can give a
  register whichever acknowledge it wants, whatever the stage after it says.
* **One observation pin.** Eight internal nets that are hard to observe are
  XORed together in a balanced tree. The result comes out on a single pin,
  `obs`. A fault that flips any one of them flips `obs`.

The pipeline itself is a deliberately tiny two-stage adder, a vehicle for
showing the test method.

## Dual-rail values and the four-phase handshake

Each logical bit travels on two wires, packed as `ncl_pkg::dr_t {r1, r0}`:

| r1 r0 | meaning |
|-------|---------|
| 0 0   | NULL (spacer, "no data yet") |
| 0 1   | DATA0 |
| 1 0   | DATA1 |
| 1 1   | illegal |

A set of inputs alternates between all-DATA (a *DATA wavefront*) and all-NULL
(a *NULL wavefront*). Every register has an input `ki` and an output `ko`.
A level of 1 means *request for DATA* (rfd) and 0 means *request for NULL*
(rfn). A register's `ko` is rfd while it holds NULL and rfn while it holds
DATA. A producer may offer DATA only while the `ko` it sees is rfd, and NULL
only while it is rfn. The consumer answers on `ki` in the same way.

## Threshold gates

Everything in this design except the DFT gates is built from TH*mn* gates
(`ncl_thmn`). Such a gate's output rises once at least *m* of its *n* inputs
are high and falls only once all *n* inputs are low. Between those two points
it holds its value (hysteresis). The RTL states this directly as a latch:
the enable is "set condition or reset condition" and the data is the set
condition. Synthesis therefore shows one latch per gate: 36 in the whole
adder. The optional `rst` input forces the output low. Register gates use it
to reset to NULL; all other gates tie it to 0.

Gates used: TH22 (a C-element) in the registers and the half adder, TH33 and
TH14 in the full adder, TH12 and TH13 in the half adder, and TH22/TH33 in the
completion detectors.

## The pipeline

```
            +-------+    +----+    +-------+    +----+    +-------+
 a,b,cin -->| reg1  |--->| FA |--->| reg2  |--->| HA |--->| reg3  |---> s, cout
            | 3-bit |    +----+    | 2-bit |    +----+    | 2-bit |
            +-------+              +-------+              +-------+
    ko <-- CD1 <-- ko[2:0]   ki <-- TP1 <-- CD2 <-- ko[1:0]   ki <-- TP2 <-- CD3 <-- ko[1:0]
                      (reg1.ki)                  (reg2.ki)                 reg3.ki <-- ki
```

* `ncl_reg_bit`: one dual-rail register bit. It has a TH22 gate per rail, with
  `ki` as the second input, and `ko` is the NOR of the two output rails.
  `ncl_reg` is a row of W bits that share `ki`, with one `ko` per bit.
* `ncl_cd` is the completion detector. It turns the per-bit `ko` lines into
  one acknowledge. The output becomes rfd only when every bit is rfd and rfn
  only when every bit is rfn; otherwise it holds. Up to four inputs use a
  single TH*nn* gate. Wider inputs use a tree of such gates.
* `ncl_full_adder` has one TH33 gate for each of the eight input
  combinations and four TH14 gates that OR them into the output rails.
  `ncl_half_adder` does the same with four TH22 gates. Both are
  *input-complete*: no output changes until every input has arrived, and no
  output returns to NULL until every input is NULL.
* The full adder's sum and carry are added again by the half adder. So the
  pipeline computes `s = 1` when one or two of `a, b, cin` are 1, and
  `cout = 1` when all three are 1.

There is no throughput or latency figure to meet: each stage moves when its
neighbours allow. In simulation all gates have zero delay, so a wavefront
crosses the whole pipeline within one time step.

Example of back-pressure: suppose the consumer keeps `ki` at rfd and does not
take a result. Then a second DATA wavefront enters `reg1` and waits there,
because `reg2` is not acknowledged until `reg3` has been emptied. The stages
then hold DATA, NULL, DATA.

## Test points (`dft_test_point`, `tc`)

`TP1` sits between `CD2` and `reg1.ki`, and `TP2` between `CD3` and
`reg2.ki`. Each is `y = fb ^ tc`. The primary `ki`/`ko` path is not changed.

* `tc = 0`: functional mode; the loops work as usual.
* `tc = 1`: every internal acknowledge is inverted. Starting from an idle
  (all-NULL) pipeline, `reg1.ki` becomes rfn, so a DATA input is **not**
  taken. With DATA in flight, `reg1.ki` becomes rfd, so a NULL input is
  **not** taken. With a wave stalled before `reg2`, `reg2.ki` becomes rfd and
  `reg2` takes the wave at once.

With the right `tc` sequence, a tester can therefore put each register into
either state without running a legal handshake. Test mode does not protect
the DATA/NULL alternation. The third case above merges two wavefronts, so a
test sequence should end with `rst`. Two XOR gates driven by one pin are all
the test logic; nothing is added in the functional path except those XORs.
No gate inside a threshold gate's own hysteresis loop is touched.

## Observation tree (`dft_xor_tree`, `obs`)

The eight observed nets:

| tree input | net |
|-----------:|-----|
| 0, 1 | `reg1` bit `a`: rails r0, r1 |
| 2, 3 | `reg1` bit `b`: rails r0, r1 |
| 4, 5 | `reg1` bit `cin`: rails r0, r1 |
| 6    | `CD2` output (before `TP1`) |
| 7    | `CD3` output (before `TP2`) |

The tree is balanced in two senses. Its depth is `ceil(log2 N)`. And each
first-level XOR combines two nets that are equally likely to switch: the two
rails of one bit, or the two detector outputs. At rest in functional mode, the
XOR of the two rails of a bit is 1 for DATA and 0 for NULL. So `obs` then
equals

```
obs = (reg1 holds DATA) ^ (reg2 holds NULL) ^ (reg3 holds NULL)
```

and any single wrong observed net shows up as a flipped `obs`. The module
takes any `N`. For `N = 6` it reproduces the tree shape
`((d0^d1)^(d2^d3))^(d4^d5)`.

The choice of exactly these eight nets is this design's. They are the first
register's output rails and the detector outputs that feed the test points.
Those nets are where faults become hard to observe. The published method
compacts eight observation points into one pin; this design follows that
count.

## Stuck-at fault simulation

`tb/tb_ncl_adder_dft_stuck_at.sv` runs a fault-free copy and a faulty copy
of the adder side by side. Each fault forces one net to 0 or to 1. The net is
one of the 36 threshold-gate outputs, the 7 register `ko` outputs or the 2
test-point outputs: 90 faults in all. The testbench applies a functional
phase: all eight input combinations, then 200 steps of random traffic with
back-pressure. It then applies a test-mode phase using `tc`. It reports:

```
faults 90: seen by functional test 90 (100.0%), with tc and obs 90 (100.0%),
on obs alone 82, observation-point faults on obs 16 of 16
```

Take these numbers for what they are. This is sequential fault simulation
over many handshakes: a stuck acknowledge sooner or later deadlocks the
pipeline or corrupts a result, and the tester sees that. A combinational test
generator working on the loop-broken netlist has a much harder job; that is
the setting the test points and the tree are meant for. This testbench does
not reproduce such a coverage figure. It shows that the test structures do
what they are meant to do: every fault on an observation point changes `obs`
directly, and `tc` drives the registers into states the handshake alone would
not allow.

## Files

| file | contents |
|------|----------|
| `rtl/ncl_pkg.sv` | `dr_t`, `DR_NULL`, `RFD`/`RFN`, encode and test helpers |
| `rtl/ncl_thmn.sv` | TH*mn* gate with hysteresis and reset (`M`, `N`) |
| `rtl/ncl_reg_bit.sv`, `rtl/ncl_reg.sv` | dual-rail register bit and W-bit register (`W`) |
| `rtl/ncl_cd.sv` | completion detector (`N`, `MAX_IN = 4`) |
| `rtl/ncl_full_adder.sv`, `rtl/ncl_half_adder.sv` | dual-rail adders |
| `rtl/dft_test_point.sv` | `tc`-controlled XOR in a feedback path |
| `rtl/dft_xor_tree.sv` | balanced XOR compaction tree (`N`) |
| `rtl/ncl_adder_dft.sv` | top: the pipeline with both DFT structures (`OBS_N = 8`) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ncl_adder_dft_stuck_at.sv` | the fault simulation above |

Top ports: `rst`, `tc`, `a`, `b`, `cin` (dual-rail in), `ko`, `s`, `cout`
(dual-rail out), `ki`, `obs`.

## Simulating

Each testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/ncl_pkg.sv tb/tb_ncl_adder_dft.sv --top-module tb_ncl_adder_dft -o sim
./obj_dir/sim
```

`tb_ncl_adder_dft` runs the top at its default parameters. It drives a random
four-phase producer and consumer and checks every output, at every step,
against an abstract model: each register is a C-element of "previous stage
holds DATA" and its `ki`. It also checks every result arithmetically. It
counts back-pressure stalls, a full pipeline, the three `tc` effects
described above and toggles of `obs`. A mechanism that never occurs counts
as a failure.

Expected tool messages:

* `UNOPTFLAT`: combinational loops, which are the handshake feedback.
* Latch inference: the gate hysteresis.
* `COMBDLY`/`NOLATCH` on the gate's `always_latch`.

The design is meant to have all of these. Verilator's simulation has two
states. All gates are reset through the registers' `rst`: the combinational
gates see all-zero inputs after reset and clear themselves.

## Where this design makes its own choices

* **Gate-level structure of the adders, registers and detectors.** Only
  their functions are fixed. The minterm adders and the TH22/NOR register bit
  are the simplest input-complete forms. The published design may use a
  different gate mix. Weighted threshold gates are not used.
* **Ports and reset.** Handshake polarity (1 = request for DATA),
  reset-to-NULL registers, and one `ko` per register bit.
* **Adder wiring.** The half adder's sum drives `s` and its carry drives
  `cout`.
* **Observation points.** Which eight nets are observed (see the table
  above). The detector outputs are folded into the tree rather than given a
  pin of their own.
* **Two test points, one pin.** Both internal loops get an XOR, and both XORs
  hang on the single `tc` pin.
* **Not built:**
  * the variant with one output pin per observation point;
  * the unbalanced tree;
  * the pipelines without DFT, used only for comparison (the top with
    `tc = 0` behaves as one);
  * XOR test points inside the threshold gates' own hysteresis loops,
    suggested as future work.
