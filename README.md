# A signed-digit arithmetic element for MSD-first serial processing

This is RTL for an arithmetic unit built as a linear chain of identical
**Digit Processing Modules (DPMs)**. Each DPM holds one radix-2^K digit of
each operand. Arithmetic runs digit-serially, **most significant digit
first**. A microinstruction sweeps down the chain as a wavefront, and the
next one can follow a few cycles behind it. This works because numbers are
kept in a maximally redundant **signed-digit** form. In that form a carry
can never ripple: the new digit of a DPM depends only on its own digits and
those of a fixed number of less significant neighbours (α_j, which is 2
here), whatever the word length. A Global Control Unit (GCU) at the most
significant end is the only part that talks to the outside world.

The core of the design is the digit logic in each DPM. It computes one digit
of

    a' = a + m · φ        (a: accumulator, φ: multiplicand, m: multiplier digit)

It uses a product-matrix generator, K multi-input redundant binary adders
(MIRBAs) and an encoder. All the adders are built from a single adder cell,
the Borovec unit.

The design follows a published description of the DPM's digit logic. From
it come:

- the Borovec unit and its full-adder variant;
- the RBA-3 and the MIRBA trees;
- the product matrix with its "collective product transfer";
- the pin structure of the digit logic and its two pin-saving options;
- the DPM hand-shake;
- the outline of MSD-first multiplication.

This implementation chose the microinstruction set, the cycle-level protocol,
the GCU's instructions and the encoder's cell logic. The module headers say
which parts are which.

## Number formats

| name | bits | value |
|---|---|---|
| SM_r digit | K+1: `{sign, mag[K-1:0]}` | (-1)^sign · mag, digits −(2^K−1) … 2^K−1 |
| SM_b digit (`rb_t`) | 2: `{s, m}` | (-1)^s · m ∈ {−1, 0, 1} |
| transfer pair (`xfer_t`) | 2: `{p, n}` | p − n; p is a (0,1) wire, n a (0,−1) wire |

An SM_r digit splits into K SM_b digits with no logic: each magnitude bit
takes the common sign. Negating a digit means flipping its sign. A
conventional sign-magnitude number becomes an SM_r number by attaching its
sign to every K-bit group. Digits are stored and passed between DPMs in SM_r
form. Inside the adders they are handled in SM_b form.

## The Borovec unit: why carries stop

`bu` adds two SM_b digits `l` and `m`, plus an incoming transfer pair from the
next less significant position. It gives a digit `d` and an outgoing pair of
weight 2:

    l + m + tin.p − tin.n = d + 2·(tout.p − tout.n)

It is a chain of five elements:

1. A D-element splits `m` into a (0,1) part and a (0,−1) part.
2. A symmetric subtractor adds `l` and the negative part. It gives `tout.n`
   and a (0,1) residue.
3. A C-element joins that residue with `tin.n`.
4. A symmetric adder adds the positive part. It gives `tout.p` and a (0,−1)
   residue.
5. A second C-element joins that residue with `tin.p` to form `d`.

`tout.n` depends only on `l` and `m`. `tout.p` also depends on `tin.n`, but
never on `tin.p`. A transfer therefore travels at most two positions, and the
reach of a result is bounded. `tb_bu` checks this property over every input.

The magnitude of `d` is `l ⊕ m ⊕ t+ ⊕ t−`. Where `d ≠ 0`, its sign is
`NOT t+`.

**Transfer Format cell (`TF = 1`).** Write a digit as a pair {p, n} of value
p − n, the same form as a transfer. A Borovec unit is then two ordinary full
adders, with each negative bit entering inverted (−x = x̄ − 1):

    FA1: l.p + ¬l.n + m.p   = 2·c1 + s1
    FA2: s1  + ¬m.n + tin.p = 2·c2 + s2
    tout = {c1, ¬c2},  d = {s2, tin.n}

Here `tout.p` depends only on the operands, and an incoming negative transfer
goes straight to `d`. So the reach is bounded just as in the SM_b cell, with
the roles of the signs swapped. `bu` with `TF = 1` wraps `bu_tf` between
D-elements and a C-element. The MIRBA's slots and everything above it stay
unchanged, and the same α_j works; `tb_arith_unit_cfg` checks this.

## MIRBA: adding K+1 digits of one weight

One digit of `a + m·φ` needs, for each bit weight 2^c, the sum of K+1 SM_b
digits:

- bit c of `a`;
- the c+1 partial products of column c of this DPM's product matrix;
- the K−1−c partial products of column K+c of the *next less significant*
  DPM's matrix. This is the collective product transfer, CPT.

Moving the upper columns of each matrix into the next DPM makes every column
adder identical, with K+1 inputs. `mirba` builds this adder from exactly K
Borovec units, in one of two forms:

- **RBA-3 tree** (default). An `rba3` is a Borovec unit used as a redundant
  (3,2) counter, plus a second unit:
  - In the lower unit, a D-element feeds the third operand into the transfer
    inputs.
  - A C-element turns the lower unit's transfers into one SM_b digit
    (`cout`). That digit goes to the RBA-3 in the next more significant
    column.
  - The upper unit adds the lower sum and the `cin` digit that arrives from
    the less significant column.

  At each tree level, operands are taken three at a time. Two left over go
  into a plain Borovec unit; one left over passes up. For K = 5 (six inputs)
  this gives two RBA-3s feeding one Borovec unit.
- **log2-sum tree**. Operands are taken in pairs into Borovec units, and an
  odd operand passes up. For six inputs this gives three units, then one,
  then one.

With `TREE_AUTO`, every K uses the RBA-3 tree except K = 3, which uses the
log2-sum tree. That is the combination for which the lookahead α_j is 2 for
every K.

Each Borovec unit owns one 2-bit **transfer slot**. Slots are numbered level
by level; an RBA-3 takes two consecutive slots, the lower unit's first. The
lower unit's slot carries the composed SM_b digit. Every other slot carries
an `{p, n}` pair. `sd_pkg::tree_slot_composed` says which is which. Slot `s`
of column c feeds slot `s` of column c+1. Column K−1 sends its slots to the
next DPM as AT, and column 0 receives them from the previous one. A DPM
therefore has 2K transfer wires in each direction.

## One digit: `dpl`

```
 a (SM_r) ──┐
 φ, m ──► pm_gen ──► columns 0..K-1 ─┐
            └──────► CPT out (to DPM_{i-1}: K(K-1)/2 bits + sign)
 CPT in (from DPM_{i+1}) ────────────┤
                                     ▼
 AT in ──► MIRBA_0 → MIRBA_1 → … → MIRBA_{K-1} ──► AT out
               │         │               │
               └──── sd_encoder ─────────┘──► a' (SM_r)
```

The product-matrix generator is K² AND gates and one XOR, for the common
sign. The encoder is a row of identical cells with two chains. The sign chain
runs down from the most significant cell and takes the sign of the leading
nonzero digit. The borrow chain runs up from the least significant cell and
forms the magnitude. The digit logic satisfies, with r = 2^K:

    a + m·φ + AT_in + CPT_in = a' + r · (AT_out + CPT_out)

Its ports add up to K² + 5K + 4 wires: 54 at K = 5, 40 at K = 4.

### The pin-saving interface (`TEIG = 1`)

Two changes cut the digit logic's pins from 54 to 36 at K = 5, counted the
same way. Neither changes the arithmetic.

- **Transfer Encoder.** Every transfer input of the receiving column 0 has
  the same weight, so only the number of +1 and −1 transfers matters.
  - `transfer_encoder` counts them into two ⌈log2(K+1)⌉-bit numbers. A
    composed slot is first split by a D-element.
  - `transfer_decoder`, in the receiving DPM, sets positive input s when
    the count is above s, and does the same for negative inputs. Composed
    slots are rebuilt with a C-element.
  - When K + 1 is a power of two (K = 3, 7), this is a plain fan-out: the
    count bit of weight W drives W inputs. For other K a pure fan-out would
    need more inputs than exist, hence the threshold form.
- **Indirect Generation.** CPT_i depends only on DPM_{i+1}'s multiplicand
  digit and on the multiplier digit, which DPM_i holds too. `cpt_ig` in
  DPM_i therefore rebuilds CPT_i from the neighbour's K+1-bit multiplicand
  digit.

In the top, the encoder sits on the sending DPM's outputs. The decoder and
`cpt_ig` sit on the receiving DPM's inputs, and on the GCU's inputs for
DPM_1. The spread of transfers over the slots differs from the direct
wiring, so the reach of a digit's dependence could in principle change.
End-to-end tests at K = 3, 4, 5 and 7 give exact results with the same
α_j as the direct interface.

## The cascade: wavefront execution

`arith_unit` connects the GCU and N DPMs. `dpm` adds registers and a local
controller to `dpl`. There are three microinstructions:

| uop | effect in DPM_i | information from neighbours |
|---|---|---|
| `UOP_SHR`  | a, φ ← the digits DPM_{i−1} held before the shift (DPM_1: digits from the GCU) | "F", travelling with the uop |
| `UOP_MADD` | a ← a + m·φ with AT/CPT | AT_i, CPT_i from DPM_{i+1}, which depend on DPM_{i+1}…DPM_{i+α} |
| `UOP_SHL`  | a ← a of DPM_{i+1} (0 in DPM_N); DPM_1's old digit goes to the GCU | "G", DPM_{i+1}'s register |

DPM_i executes its next microinstruction μ_j only when both of these hold:

1. DPM_{i−1} has executed μ_j. It reads our old digits first.
2. Each of the next α DPMs (`ALPHA`) has executed μ_{j−1} and already holds
   μ_j. Its registers and its transfers, computed with μ_j's multiplier digit,
   are then exactly what μ_j must see.

A DPM passes μ_j on to its right neighbour once that neighbour has executed
μ_{j−1} and has an empty slot. Status flows toward the GCU as
`{present, holding, executed count mod 4}`. Each DPM forwards its neighbours'
status so that DPM_i can see α DPMs ahead. No signal runs along the whole
chain. The only combinational paths between DPMs are the bounded AT/CPT
transfers.

**Timing.** In a burst, one microinstruction enters the chain every
**α + 2 cycles**: 4 cycles at the default α = 2. Microinstructions overlap
along the chain. `tb_arith_unit` measures and checks this period.

**Why α matters.** The lookahead has to match the adder's real reach.
`alpha_j(K, TREE)` gives it from the tree type:

- 2 for the RBA-3 tree;
- ⌈(2⌈log2(K+1)⌉ − 1)/K⌉ + 1 for the log2-sum tree, which gives 3 for K = 2
  and K = 4.

Every configuration in `tb_arith_unit_cfg` gives exact results with these
values. A trial build with the lookahead forced to 1 at K = 5 produced wrong
sums in 9 of 10 rounds.

### GCU instructions

| instruction | microinstructions | result |
|---|---|---|
| `INS_LOAD` (`in_a`, `in_phi`, N digits each, index 0 most significant) | N × SHR, least significant digit first | digit i lands in DPM_{i+1} |
| `INS_MADD` (`in_m`) | 1 × MADD | A ← A + m·Φ; with m = ±1 this is add or subtract |
| `INS_READ` | N × SHL | A comes out on `rd_valid`/`rd_digit`, most significant digit first; A becomes 0 |
| `INS_MUL` (`in_a` = multiplier M, N digits) | N × (SHL, MADD) | r^N·A + M·Φ: lower half in A, upper half in `xfer_acc` |

`in_valid`/`in_ready` is a plain valid/ready handshake. The GCU is busy while
it still has microinstructions to send.

**Early overflow detection.** Each time DPM_1 executes a MADD, the GCU adds
up the value of the transfers leaving DPM_1 (AT_0 and CPT_0). That value has
weight r^N. The GCU keeps the running sum in `xfer_acc` and sets `ovf` when
any of these values is nonzero. Both are cleared by LOAD. Between a LOAD
and the next READ or MUL, this invariant holds:

    value(A) + xfer_acc · r^N = value(A at LOAD) + Σ m_j · value(Φ)

**Multiplication.** MUL is the column-wise, most-significant-digit-first
multiplier. The GCU keeps the multiplier digits and shifts them out, most
significant first. For each digit m_j it sends two microinstructions:

1. SHL, which multiplies A by r. The digit leaving DPM_1 is added into the
   upper part: `xfer_acc ← r·xfer_acc + digit`.
2. MADD with m_j.

Every product column is summed as it passes along the cascade. The transfers
leaving DPM_1 also go into `xfer_acc`. At the end:

    value(A) + xfer_acc · r^N = r^N · value(A before) + M · value(Φ)

MUL clears `xfer_acc` and `ovf` when it is accepted. `XW` must be at least
K·(N+1) + 2.

`quiet` goes high when the GCU and every DPM are idle.

## Files and parameters

| file | contents |
|---|---|
| `rtl/sd_pkg.sv` | types (`rb_t`, `xfer_t`, `uop_e`, `instr_e`, `dpm_stat_t`, `tree_e`), tree-shape and numbering functions, `alpha_j` |
| `rtl/c_elem.sv`, `rtl/d_elem.sv` | C-element and D-element |
| `rtl/bu.sv` | Borovec unit (RBA-2), SM_b form or wrapping `bu_tf` |
| `rtl/bu_tf.sv` | Borovec unit in Transfer Format, two full adders |
| `rtl/rba3.sv` | three-input redundant binary adder |
| `rtl/mirba.sv` | (K+1)-input MIRBA, RBA-3 tree or log2-sum tree |
| `rtl/pm_gen.sv` | product-matrix generator |
| `rtl/sd_encoder.sv` | redundant binary → SM_r encoder |
| `rtl/dpl.sv` | digit processing logic of one DPM |
| `rtl/dpm.sv` | DPM: registers, microinstructions, hand-shake |
| `rtl/gcu.sv` | Global Control Unit |
| `rtl/transfer_encoder.sv`, `rtl/transfer_decoder.sv` | transfer counts between DPMs (`TEIG = 1`) |
| `rtl/cpt_ig.sv` | indirect CPT generation (`TEIG = 1`) |
| `rtl/arith_unit.sv` | top: GCU + N DPMs |

| parameter | default | meaning |
|---|---|---|
| `K` | 5 | bits per digit, radix 2^K. 5 matches the six-input MIRBA; any K ≥ 2 works, and 2, 3, 4, 5, 7 and 8 are simulated |
| `N` | 8 | DPMs, that is, digits per operand (40 bits at K = 5) |
| `TREE` | `TREE_AUTO` | MIRBA tree style |
| `ALPHA` | `alpha_j(K, TREE)` | lookahead in DPMs; keep the default |
| `XW` | 48 | width of `xfer_acc`, which must be at least K·(N+1) + 2 |
| `TEIG` | 0 | 1 = encoded transfers and indirect CPT between DPMs |
| `TF` | 0 | 1 = Borovec units built from two full adders (Transfer Format) |

Reset is asynchronous and active low, and clears every register. The default
top synthesises to about 5,500 word-level cells and 414 flip-flops.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Example with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sd_pkg.sv tb/tb_arith_unit.sv --top-module tb_arith_unit
./obj_dir/Vtb_arith_unit
```

| testbench | what it checks |
|---|---|
| `tb_c_elem`, `tb_d_elem`, `tb_bu`, `tb_rba3` | exhaustive value identities. For `bu` and `rba3` also the limited-propagation property |
| `tb_mirba` | random sums at K = 2, 3, 4, 5 and 8, and the log2-sum tree at K = 5. Also the unit count and the tree shape |
| `tb_pm_gen`, `tb_sd_encoder` | exhaustive at K = 5 |
| `tb_dpl` | random digit identity at K = 3, 5 and 8 |
| `tb_dpm` | one DPM with scripted neighbours: waiting rules, pass-on, SHR/MADD/SHL results |
| `tb_gcu` | the GCU against a model of DPM_1: digit order, uop sequences (including MUL's SHL/MADD pairs), read-out, transfer and upper-product bookkeeping |
| `tb_arith_unit` | default size, 30 rounds. Each round runs LOAD, a burst of 6 MADDs and READ, then LOAD, MUL and READ. Results are checked against integer arithmetic, 128-bit for MUL. Also checks the MADD period, and that stalls, overlapped issue, overflow transfers and negative multipliers each occurred |
| `tb_bu_tf` | exhaustive: identity and bounded propagation of `bu_tf`, and `bu` with `TF = 1` |
| `tb_transfer_encoder` | exhaustive over all slot values at K = 5, 3 and 4 (log2-sum tree): counts, and the value after decoding |
| `tb_cpt_ig` | exhaustive at K = 5: CPT value against the high part of \|φ\|·\|m\|, sign, and bit-for-bit agreement with the neighbour's `pm_gen` |
| `tb_arith_unit_cfg` | the same exercise with the direct interface at K = 2, 3, 4, 8 (automatic trees) and at K = 2, 4 (log2-sum tree, α = 3). With `TEIG = 1` at K = 3, 4, 5 and 7. With `TF = 1` at K = 5, K = 3 and K = 4 (log2-sum tree, with `TEIG`) |

`tb/au_check.sv` is the shared driver and checker of `tb_arith_unit` and
`tb_arith_unit_cfg`.

## Departures and omissions

- **Borovec-unit sign equation.** The source's Boolean equations for the unit
  give the output sign as t+. The structure of the unit gives NOT t+ wherever
  the output is nonzero. The RTL follows the structure, and the exhaustive
  test confirms that the arithmetic is right.
- **Local control and microinstructions.** The source describes the
  hand-shake only in outline and leaves the DPM's sequential control and the
  full microinstruction repertoire to other work. The SHR/MADD/SHL set, the
  count-based acknowledgement and the α + 2 cycle period belong to this
  implementation.
- **GCU.** LOAD, MADD, READ and MUL are provided. The source describes
  multiplication as a repeated cycle of shift multiplier, multiply-and-add
  and shift accumulator. Here the multiplier is held and shifted in the GCU,
  not in the DPMs. Each step starts with the accumulator shift, so that the
  result needs no final correction. DIVIDE, with quotient-digit selection,
  and normalisation are not built. The source names them but does not give
  them.
- **Pin-saving interface.** The default is the direct interface, 54 wires
  at K = 5. The Transfer Encoder and Indirect Generation are an option
  (`TEIG = 1`, 36 wires at K = 5). Their decoder uses a threshold instead of
  a pure fan-out, so that any K works. The encoder is written as a sum of
  bits rather than as an explicit full-adder network.
- **Nonadjacent multiplier recoding is not built.** This further pin saving
  limits the multiplier digit's redundancy so that only ⌈K/2⌉ + 1 inputs of
  each MIRBA can be nonzero.
- **Transfer Format cell.** The source says only that such a cell is two
  cascaded full adders. The wiring above is this design's own. It is an
  option; the default is the SM_b cell.
- **Not built:** Rohatsch's multi-input adder. The source describes it only
  as the approach its trees improve on.
- **Boundary.** The least significant DPM receives zero transfers and shifts
  in zero digits. The source does not cover the ends of the chain.
