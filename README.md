# Error-tolerant logic from complementary signals and feedback

At very low supply voltages (a few hundred millivolts) the noise on a logic
net is no longer small against the signal swing, and single-event upsets flip
nodes at random. The circuits in this repository share one idea for making
logic survive that: **compute a value together with its complement, and let a
small feedback structure accept a new value only when both agree.** When
they disagree, the feedback pair keeps the last value both agreed on. A
cross-coupled NAND pair does exactly this. Its inputs are two "control"
signals that are never both 0 in normal operation:

| control 1 | control 2 | output        |
|-----------|-----------|---------------|
| 1         | 0         | 0             |
| 0         | 1         | 1             |
| 1         | 1         | hold          |

The designs differ in how they produce the two controls, and in how many
gates share one feedback pair. That choice decides the area cost. The
underlying theory models a gate as a Markov random field (MRF), so
"MRF network" below means such a feedback structure. Four designs are
built:

1. **CDMR**, complementary dual modular redundancy. There are two copies of
   a module: one computes the true outputs and one computes the inverted
   outputs. A two-stage voter merges them. This gives single-error
   tolerance with two copies instead of the three of TMR. The case study is
   a protected 4-bit ripple-carry adder.
2. **A stochastic-computing 8-point DCT.** Numbers are random bit streams,
   so an adder is a multiplexer and a multiplier is an XNOR gate. Pairs of
   these gates share one feedback network.
3. **Coding-based partial MRF (CPMRF) gate groups.** Two gates, for example
   AND and NOR, share one feedback pair through a small coding circuit.
   They are used here in example circuits and in an 8-bit carry-lookahead
   adder, which was also built as a test chip.
4. **PCL gates** (probabilistic-based complementary logic). A gate output
   is re-derived from a "robust 1" and a "robust 0" path, chosen by the
   output itself.

All four sit side by side in the top module `lpet_top`, each with its own
ports. They share no signals.

## What RTL can and cannot express here

The benefit of these circuits is electrical: noise margin and the chance
that a noisy node is seen wrongly. In two-state RTL every gate is ideal, so
a feedback group computes exactly the Boolean function of its gates. The
RTL in this repository therefore reproduces:

- the **gate structure** of each group: which gates, which controls, and
  which outputs feed back;
- the **logic function**;
- the **state** the feedback pairs hold. This state is architecturally
  visible in the CDMR voter, where a disagreement between the two modules
  makes the voter hold its previous output.

It does not reproduce error rates, noise immunity, area or power.

**Synthesis caveat.** A logic optimiser can see that a module and its
complement carry the same information, and that the control pair of a
complementary group is never (1,1). A flattening synthesis flow
(yosys, for example) therefore merges the redundant logic:

- The CDMR adder shrinks to a plain adder, and its hold counter becomes
  constant 0.
- Most feedback latches of the CPMRF groups survive, because their
  controls are not simple complements.

A physical implementation needs the back-end flow to preserve the
instances (hierarchy / don't-touch constraints). The RTL is written so that
each group is its own module, which makes this possible.

**How feedback is modelled.** A cross-coupled NAND pair is written as one
level-sensitive latch (`mrf_nand_latch`):

- it is transparent while either control is 0;
- it holds while both controls are 1.

So there is no combinational loop, and lint tools see an intentional
`always_latch`.

## 1. CDMR voter and protected adder

### The voter (`cdmr_voter`)

Inputs: `x_a` from module M, and `x_b_n` from the inverting twin M-bar
(the complement of the same bit).

**Stage 1** is two NAND gates, one for each product term of the "both
say 1" and "both say 0" conditions:

    x_d = NAND(x_a, ~x_b_n)        x_e = NAND(~x_a, x_b_n)

When the two modules agree, exactly one of `x_d` and `x_e` is 0.

A NAND output is robust in its "1" state. An upset in either module
therefore turns the pair into (1,1), never into (0,0).

**Stage 2** is the NAND feedback pair. It:

- passes the agreed value (`x_f`, and its complement `x_g`);
- holds on (1,1), so a transient error in one module never reaches the
  output;
- reports the hold on `holding`, a port added for observation.

**Bypass.** Two multiplexers after stage 2 (`bypass = 1`) route the raw
module outputs out. The latches then cannot hide a module fault during
production test.

Timing: combinational apart from the hold. There is no clock.

### The adder (`cdmr_rca`, parameters `N = 4`, `SCHEME = 1 | 2`)

There are two ripple chains of full adders (`cdmr_full_adder`): M (true
outputs) and M-bar (`INVERT = 1`, both outputs inverted).

- **Scheme 1** votes only the final outputs: N sum bits plus carry out.
  Each chain ripples on its own. The M-bar carry is re-inverted before it
  enters the next M-bar stage.
- **Scheme 2** votes the sum and the carry after every full adder. The
  voted carry feeds the next stage of both chains, so an error is stopped
  at the stage where it occurs.

`hold_count` counts the voters that currently hold. The top instantiates
one adder of each scheme on shared operand inputs.

## 2. Stochastic 8-point DCT

### Number format

A value v in [-1, 1] is a bit stream whose probability of a 1 is
(v + 1)/2. This is the bipolar encoding. In it:

- **Multiplication** is an XNOR of two independent streams.
- **Scaled addition** (a + b)/2 is a 2:1 multiplexer driven by a select
  stream of probability 1/2.
- **Scaled subtraction** (a - b)/2 is the same multiplexer with `b`
  inverted.

Every adder level halves the result. That halving is the price of keeping
values in range.

### Units

| Module | What it computes | How it is built |
|---|---|---|
| `sc_as_unit` (AS) | (a+b)/2 and (a-b)/2 | Each multiplexer is split into NAND(a, s) and NOR(b, s) (`mrf_nand_nor_group`, one shared network). The two closing OR gates form one `mrf_or_or_group`. |
| `sc_asm_unit` (ASM) | (m_a·c_x + m_b·c_y)/2 and (m_a·c_y − m_b·c_x)/2 | Four XNOR multipliers in two `mrf_xnor_xnor_group`s feed an AS-style adder pair. This is the rotation needed by the odd DCT outputs. |

### DCT structure (`sc_dct8`)

**Even half.** A three-level butterfly of AS units, and one ASM unit
for X(2)/X(6).

**Odd half.** The odd outputs are rewritten with angle-sum identities:

    K3 = M0·C5 + M1·C3    K1 = M0·C3 − M1·C5
    K2 = M2·C7 + M3·C1    K4 = M2·C1 − M3·C7
    X3 = K1 − K2          X5 = K3 − K4
    X1 = C4·((K1+K3) + (K2+K4))      X7 = C4·((K1−K3) − (K4−K2))

Here Mi are the first-level differences and Ck = cos(kπ/16). This uses
two ASM units instead of eight separate products. The odd half is built
as follows:

- Two AS units take (K1, K3) and (K4, K2).
- One AS unit combines their outputs. Its adder and its subtractor take
  different operands, so it is built as `sc_as_pair`: two MUX
  adder/subtractors that share a select stream and an OR-OR group.
- The two stand-alone subtractors for X3 and X5 are grouped the same way,
  in a second `sc_as_pair`.

The multipliers by C4 for X0, X4, X1 and X7 are two XNOR-XNOR groups.

**Totals.** 10 AS units, 3 ASM units and two grouped subtractors: 28
adders and 16 multipliers.

**Output scaling.** The output streams carry X(k)/8 for k = 0, 2..6, and
X(k)/16 for k = 1, 7. Here X(k) = Σ x(n)·cos(kπ(2n+1)/16), with C4 used
for every term of X(0).

**Select streams.** There are six, one per adder level (`sel[5:0]`).

### System wrapper (`sc_dct8_system`, parameters `W = 8`, `L = 256`)

**Inputs.**

- Eight signed W-bit samples (value x/2^(W−1)) are converted by
  `sc_sng`: a 16-bit maximal-length LFSR (x^16+x^14+x^13+x^11+1) whose top
  W bits are compared with the offset-binary input.
- The seven coefficient streams and six select streams have their own
  generators. All 21 generators have distinct seeds from `sc_dct_pkg`.
- The coefficient thresholds are computed at elaboration from a
  Q15 cosine table.

**Outputs.** Eight `sc_counter`s count ones for L clocks, and the result
is `y = 2·count − L`. So y/L estimates the scaled X(k) above.

**Handshake.**

- Pulse `start` for one clock while idle. `x` is sampled on that clock.
- `busy` is high for exactly L clocks.
- `done` is a one-clock pulse L + 1 clocks after `start`.
- `y` holds until the next `start`.
- A `start` while busy is ignored.

**Accuracy.** At L = 256 a single transform is accurate to about
±0.2 in the scaled output range [−1, 1], with a mean error near 0.06.
That is the sampling noise of 256-bit streams.

To trade time for precision, raise `L` (the counter width follows).
`W` sets the input resolution.

## 3. CPMRF gate groups and circuits

A coding unit turns the outputs of two gates into the controls of one NAND
feedback pair.

- **Complementary groups.** If the two gates can never both be "on" for
  the same inputs, one pair serves both. Examples:
  - AND and NOR (`cpmrf_and_nor`): controls AND·¬XOR and NOR·¬XOR; the
    pair outputs, inverted, are AND and NOR.
  - AND and XOR (`cpmrf_and_xor`): a half adder.
  - The MUX half of `cpmrf_mux_and`: a·s and b·¬s, merged by an OR.
- **Non-complementary groups** (`cpmrf_nor_nor`, `cpmrf_nand_nand`,
  `cpmrf_xor_xor`) feed a shared control (AND or OR of both gate outputs)
  back into each output gate.

Circuits built from the groups:

- `cpmrf_parity2x4`: two 4-bit even-parity generators from three
  XOR-XOR groups. The same tree position of both generators shares a
  group.
- `cpmrf_decoder3to8`: a 3-to-8 decoder with enable. AND-NOR groups
  predecode the low two bits, and NAND-NAND groups form the eight lines.
- `cpmrf_cla8` (`N = 8`): the 8-bit carry-lookahead adder.
  - AND-XOR half adders give generate/propagate.
  - A Kogge-Stone prefix tree of MUX-AND blocks follows:
    G = P_hi ? G_lo : G_hi, P = P_hi·P_lo. The multiplexer replaces the
    usual AND-OR because generate and propagate are never both 1.
  - XOR-XOR groups form the sums.
  - Ports match the test chip's pins: `i_a`, `i_b`, `o_s`, `o_c`. There
    is no carry in.

## 4. PCL gates

`pcl_et_unit` is the error-tolerant structure. The gate output y and its
inverse drive:

- a NAND, which is a "robust 1";
- a NOR, which is a "robust 0";
- a multiplexer selected by y itself, which picks the robust level.

Logically it is a buffer.

Gates built on it:

- `pcl_nand`, `pcl_xor` and the helper `pcl_or`: a plain gate followed by
  the unit.
- `pcl_mux`: two PCL NANDs, an inverter for the select, and a PCL OR of
  the two inverted NAND outputs.

## Top level (`lpet_top`)

All ports are plain signals or arrays.

| Group | Ports |
|---|---|
| CDMR adders | `cdmr_a`, `cdmr_b`, `cdmr_cin`, `cdmr_bypass` → `cdmr_s1_sum/cout`, `cdmr_s2_sum/cout`, `cdmr_s1_holds`, `cdmr_s2_holds` |
| DCT | `clk`, `rst_n` (asynchronous, active low), `dct_start`, `dct_x[8]` (signed 8-bit) → `dct_busy`, `dct_done`, `dct_y[8]` (signed 10-bit) |
| CLA | `cla_a`, `cla_b` → `cla_s`, `cla_c` |
| Parity generators | `par_da`, `par_db` → `par_a`, `par_b` |
| Decoder | `dec_a`, `dec_en` → `dec_d` |
| NOR-NOR group | `nn_in[3:0]` → `nn_nor[1:0]` |
| PCL | `pcl_d0`, `pcl_d1`, `pcl_s` → `pcl_mux_z`, `pcl_xor_z` |

Only the DCT is clocked. Everything else is combinational, with hold
latches.

## Where this RTL departs from, or goes beyond, the published design

- **The voter's stage 1.** The published design describes its two stages
  in two ways: as a feedback structure followed by a merging unit, and as
  stable-bit gates followed by a latching feedback stage. The RTL follows
  the second. The NAND wiring of stage 1 is this design's own reading.
- **Gate wiring inside the groups.** The OR-OR, XNOR-XNOR, NOR-NOR,
  NAND-NAND, XOR-XOR and AND-XOR groups, the decoder grouping, and the
  CLA prefix topology are this design's own constructions. They follow
  the stated principles (shared control, stable-bit transfer by AND or
  NAND) rather than a published gate list.
- **The 3-to-8 decoder's enable input** is this design's addition.
- **DCT odd half.** The published design gives the equations and the unit
  counts (28 adders, 16 multipliers), but not the wiring. Two choices
  here are this design's reading:
  - the pairing of coefficients in the two odd ASM units;
  - a last AS unit whose adder and subtractor take different operands.

  A summary statement elsewhere speaks of only 10 multipliers; the 16 of
  the detailed description was followed. The outputs are checked against
  the exact DCT.
- **DCT parameters and conversion.** Stream length, generator type,
  seeds, input format, output format and the handshake are this design's
  choices.
- **The two binary comparators** built from CPMRF groups are not
  included. Their width and outputs are not specified.
- **Added observation outputs.** `holding` and `hold_count` do not come
  from the published design.
- **Not modelled:** noise, error rates and transistor-level behaviour
  (see above).

## Simulation

Every block has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| Gate groups, units, PCL gates, decoder, parity, CLA | Every input combination; the CLA runs all 2^16 operand pairs. |
| `cdmr_voter_tb` | Agreement, single upsets in either module (the output must hold), a multi-bit stream example and bypass. |
| `cdmr_rca_tb` | All operands in both schemes, with upsets forced onto internal module outputs. |
| `sc_dct8_tb` | A bit-exact reference of the stream logic, and long-run value accuracy. |
| `sc_dct8_system_tb` | Handshake timing and results against a floating-point DCT (`tb/dct_ref_pkg.sv`). |
| `lpet_top_tb` | The whole design at default parameters: random traffic on every port group, forced upsets and bypass on both CDMR adders, and four complete DCT transforms, one of them with a start pulse while busy that must be ignored. It counts that each mechanism occurred at least once. |

Example with plain Verilator (5.x):

    verilator --binary --timing -Wno-fatal --top-module lpet_top_tb \
        rtl/sc_dct_pkg.sv tb/lpet_top_tb.sv -y rtl -y tb -o sim
    ./obj_dir/sim

Use the same command for any other testbench, changing the top module and
the testbench file.

The tests are two-state. Every stored value is reset or written before it
is read. The latches start from the first agreed input.
