# Binary ⇄ residue number system conversion on a partitioned-bus tree

A residue number system (RNS) represents an integer N by its remainders
α_i = N mod m_i for a set of pairwise coprime moduli m_1 … m_s. Addition and
multiplication then work on every residue independently, without carries
between them. What costs time is getting numbers into and out of that form.
This design does both conversions with one regular structure.

**Binary to residues.** Write N = Σ b_j 2^j. Then

    α_i = ( Σ over j with b_j = 1 of (2^j mod m_i) ) mod m_i.

The constants 2^j mod m_i are known in advance. Converting N is therefore the
sum, modulo m_i, of a subset of n stored constants, and the bits of N select
the subset. A binary tree of modular adders forms the sum in log2(n) steps.

**Residues to binary.** Bit k of α_i stands for the residue vector that is 2^k
in position i and 0 elsewhere. By the Chinese remainder theorem its binary
value is

    q_ik = (2^k · M_i · inv_i) mod M,   M = Π m_i,  M_i = M / m_i,
    inv_i = inverse of M_i modulo m_i.

So N = (Σ over all set residue bits of q_ik) mod M. This is the same problem
again: a sum modulo a constant of a bit-selected subset of stored constants.
The same tree computes it.

## Structure of one conversion array (`rns_tree`)

The array has NC cells, where NC is a power of two, and W-bit words. It is
laid out as NC/2 **rows**. Row x is made of W **bit cells** C(x,0) … C(x,W-1),
one per bit position (`rns_bit_cell`). Each bit cell holds:

* bit y of two storage registers **R0** and **R1**. They are the cells 2x and
  2x+1, and hold the preloaded constants.
* bit y of the row's **accumulator A**.
* a one-bit **processing element** (`rns_pe_bit`). It has a full adder for
  a+b, a full subtractor for (a+b)−m, and a 2:1 multiplexer.
* bit y of the row's **bus gate G**.

Carries and borrows ripple up the bits of a row. The row's top bit makes the
sign test `sel_sub = carry_W | ~borrow_W`, which means "(a+b)−m is not
negative". The test is fed back to every bit to choose the difference or the
sum. Both operands are below m, so one conditional subtraction is enough, and
a row does one addition modulo m per clock (`rns_cell_row`).

All rows share one W-bit vertical **data line**. The gates G cut it into
sections. The operands of row x's PE are:

| step | operand a (data line) | operand b |
|------|-----------------------|-----------|
| 1 (Z_R high) | R0 if bit b(2x) is set, else 0 | R1 if bit b(2x+1) is set, else 0 |
| h ≥ 2 | the accumulator of another row, arriving over the bus | own accumulator |

The result is written into A. After the last step the sum is in the
accumulator of the last row.

## Bus partitioning: who talks to whom in each step

This is the least obvious part of the design. In step h (h ≥ 2), row x
computes only if 2^(h−1) divides x+1. It must then receive the partial sum
held by row x − 2^(h−2). Every row x carries a small down counter
(`rns_part_counter`) loaded, before each run, with the wired preset

    preset(x) = v2(x+1) + 1        (v2 = number of trailing zero bits)

and decremented once per step. Its state decodes to three signals:

* **count > 0**: the row is *active*, its PE computes this step, and its gate
  is open.
* **count = 0** (the zero crossing): the row *drives* its accumulator onto
  the data line, and its gate closes. This joins its section to the row below.
* **after zero**: the row is idle and its gate stays closed.

For n = 16 (8 rows) this gives:

| row x | preset | step 1 | step 2 | step 3 | step 4 |
|------:|------:|:------:|:------:|:------:|:------:|
| 0 | 1 | add | drive | – | – |
| 1 | 2 | add | add | drive | – |
| 2 | 1 | add | drive | – | – |
| 3 | 3 | add | add | add | drive |
| 4 | 1 | add | drive | – | – |
| 5 | 2 | add | add | drive | – |
| 6 | 1 | add | drive | – | – |
| 7 | 4 | add | add | add | add → result |

In step h the open gates sit below the rows that are still active. They cut
the bus into sections of 2^(h−1) rows. Each section holds exactly one driver
(the row whose counter reads zero), and its receiver is the active row at the
bottom of the section. The rows in between have closed gates and pass the
value down. Rows that finished earlier also keep their gates closed, but they
no longer drive. So no section ever has two drivers, and data always flows
from a lower-numbered row to a higher one.

The RTL models the tristate line as a wired OR passed down through an AND per
gate. This is exact because of the two facts above. It is also why
`bus_in`/`bus_out` only go one way.

The counter needs clog2(log2 n + 2) bits, i.e. about log log n. This is what
makes the control distributed: no global decoder tells the rows what to do.

## The two converters

**`rns_forward`** holds an N_BITS-bit input register. It feeds the cell
enables of S arrays, one per modulus, placed side by side. Array i has
N_BITS cells holding 2^j mod m_i, and is bits_for(m_i) bits wide. All arrays
run in lock step under one sequencer (`rns_ctrl`). Conversion takes log2(n)
steps.

**`rns_reverse`** holds the S residues in a register. Their bits enable the
cells of one array: residue 0 first, least significant bit lowest. The array
has one cell per residue bit (18 for the default moduli), padded with cells
that are never enabled up to the next power of two (32). It is
bits_for(M) bits wide and adds **modulo M**. Conversion takes log2(32) = 5
steps.

A plain binary adder would not do here. The CRT sum Σ q_ik is only ≡ N
(mod M), and it can exceed M many times over. The modular PE of the direct
conversion reduces each partial sum, so the result is N itself for any
0 ≤ N < M. Values up to M−1 need n+1 bits (M may exceed 2^n), hence the
17-bit output.

**`rns_converter`** (top) places the two converters side by side with
independent ports: `fwd_*` for binary → residues and `rev_*` for residues →
binary.

## Preloading

The cell constants are not built into the logic. Each cell's R register is a
shift register running through the bit cells of its row. While `preload_en`
is high, every cell takes one bit per clock on its own serial line,
**most significant bit first**. W clocks fill the array. All cells load in
parallel. The moduli themselves are wired into the PEs as parameters, so a
reload can change the stored constants but not the moduli.

* Direct array i, cell j: 2^j mod m_i. The top-level port shifts WA bits (the
  width of the largest residue), zero-extended. Narrower arrays keep only the
  last bits they receive.
* Reverse array, cell c = (bits of residues 0 … i−1) + k: q_ik as above. Each
  value is shifted in over bits_for(M) clocks. Unused cells take zeros.

Preload only while the converter is idle. An assertion checks this.

## Interface and timing

Per converter: `start` is accepted while `busy` is low. The clock edge that
samples `start` also captures the operand (`n_in` / `alpha_in`) and loads
every row counter. Steps run on the next STEPS edges, with Z_R high in the
first step only. `done` is high for the one cycle after the last step. The
result (`alpha` / `n_out`) is valid from then until the next start. A new
`start` may be given in the `done` cycle.

| converter | STEPS | start edge → done visible |
|-----------|------:|------|
| direct, n = 16 | 4 | 4 clock edges after the start edge |
| reverse, 18 residue bits → 32 cells | 5 | 5 clock edges after the start edge |

One step takes one clock. The critical path is one ripple addition plus one
ripple subtraction across W bits, plus the data line through up to NC/2 − 1
gates.

All flip-flops have an asynchronous active-low reset `rst_n`. The R registers
reset to zero, so the array must be preloaded after reset.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_BITS` | 16 | width n of the binary number, a power of two |
| `S` | 4 | number of moduli |
| `MODULI` | '{15, 16, 17, 19} | pairwise coprime moduli, product M = 77520 |

The moduli must be pairwise coprime, and their product must satisfy
2^n ≤ M ≤ 2^(n+1). The method is stated for this range, with moduli of
similar size. The defaults are one such set. With n = 16 they have
s = n/log n = 4 moduli of about log n = 4 bits. Derived widths (WA, W_REV,
NC_REV) are computed at elaboration. The shared defaults live in `rns_pkg`.
The lower-level blocks (`rns_tree`, `rns_cell_row`, …) take their own
NC, W and MOD.

## Files

| file | block |
|------|-------|
| `rtl/rns_pkg.sv` | defaults, elaboration-time helpers (bit widths, counter presets) |
| `rtl/rns_pe_bit.sv` | one-bit slice of the modular-adder PE |
| `rtl/rns_part_counter.sv` | per-row bus-partitioning counter |
| `rtl/rns_bit_cell.sv` | circuit module C(x,y): R bits, PE bit, A bit, gate bit |
| `rtl/rns_cell_row.sv` | one row: W bit cells, sign test, counter |
| `rtl/rns_tree.sv` | the array: NC/2 rows on the partitioned bus |
| `rtl/rns_ctrl.sv` | run sequencer: operand capture, counter load, Z_R, steps, done |
| `rtl/rns_forward.sv` | binary → residues |
| `rtl/rns_reverse.sv` | residues → binary |
| `rtl/rns_converter.sv` | top: both converters |
| `tb/rns_tb_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rns_workloads` |
| `tb/rns_roundtrip_check.sv` | helper: one converter instance with preload and round-trip checks |

## Verification

Every module has a self-checking testbench. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

* `tb_rns_pe_bit`: all 64 input combinations.
* `tb_rns_part_counter`, `tb_rns_ctrl`: cycle-exact sequences. These include
  idle gaps, and a start given while busy, which must be ignored.
* `tb_rns_bit_cell`, `tb_rns_cell_row`: random stimulus against a bit-level
  model kept in the testbench.
* `tb_rns_tree`: a 16×5-bit array modulo 19 and an 8×17-bit array modulo
  77520. Both use random constants and enables, plus all-ones and all-zeros.
* `tb_rns_forward`, `tb_rns_reverse`: the default-size converters against
  N mod m_i and against N, with the latency checked.
* `tb_rns_converter`: the full design at default parameters. It runs round
  trips N → residues → N, numbers between 2^16 and M−1 from their residues,
  back-to-back starts and a second preload. It also counts that each
  mechanism actually occurs: preloading, Z_R steps, rows driving the bus
  after their counter's zero crossing, modular corrections, disabled cells
  and back-to-back runs.
* `tb_rns_workloads` (with the helper `rns_roundtrip_check`): the converter
  at four sizes, one for each regime of moduli the method is analysed for.
  All have 2^n ≤ M ≤ 2^(n+1):

  | regime | n | moduli |
  |--------|--:|--------|
  | few large moduli | 16 | 256, 257 |
  | about log n moduli of n/log n bits | 32 | 83, 85, 87, 89, 91 |
  | about n/log n moduli of log n bits (the default) | 16 | 15, 16, 17, 19 |
  | many small moduli | 16 | 3, 5, 7, 8, 11, 13 |

  Each size runs direct, round-trip and reverse conversions with their
  latencies checked.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/rns_pkg.sv tb/rns_tb_pkg.sv tb/tb_rns_converter.sv \
        --top-module tb_rns_converter
    ./obj_dir/Vtb_rns_converter

All of them finish in well under a second.

## Where this implementation makes its own choices

The method fixes the following: the preloaded constants, the enabling by
input bits, the pairwise tree of modulo-m additions, the modules made of two
R registers with a PE, an accumulator and a bus gate, the Z_R line, and
counters with wired presets whose zero crossing sets the bus partitioning.
The following are choices of this implementation:

* **Sizes.** n = 16 and moduli 15, 16, 17, 19. The method is stated for
  general n and s.
* **PE adder.** The PE is a ripple-carry adder/subtractor. A faster adder
  (carry look-ahead) is what yields the O(log log m) addition time assumed in
  the method's complexity figures. Replacing it changes only `rns_pe_bit` and
  the chains in `rns_cell_row`.
* **Step timing.** One step per clock, with a start/busy/done handshake.
* **Preload order.** MSB-first serial preload, and the cell ordering of the
  reverse array.
* **Counter details.** The counter preset formula and the "expired" state
  after the zero crossing.
* **Reverse adders.** The reverse conversion uses modulo-M adders, not plain
  binary adders, because the CRT sum must be reduced modulo M. For the same
  reason its words are bits_for(M) wide, not n.
* **Reverse padding.** The reverse array is padded to a power of two.
* **Preload constants.** The constants are computed outside the converter
  (in the testbenches, with the formulas above). No generator for them is
  included.
