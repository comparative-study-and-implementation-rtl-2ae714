# Reversible 2x2 Vedic multipliers

A 2x2 multiplier is the basic block of a Vedic multiplier. Larger
Urdhva Tiryagbhyam multipliers are built by splitting the operands into
smaller parts, down to this block. This RTL holds the ordinary 2x2 multiplier and five published
ways to build it from *reversible* gates. A reversible gate maps its n inputs
one-to-one onto n outputs. Nothing it computes is erased, so in principle it
dissipates no Landauer energy. The five circuits compute the same 4-bit
product. They differ in which reversible gates they use, and so in four
figures of merit:

- **gates**: the number of gates in the circuit.
- **ancillary inputs**: constant-0 inputs added to make each gate's input
  and output counts equal.
- **garbage outputs**: gate outputs nobody uses, kept only so the gates stay
  one-to-one.
- **quantum cost**: the number of 1x1 and 2x2 quantum primitives (NOT, CNOT,
  controlled-V/V+) needed to realise the gates.

All of it is combinational logic. In CMOS the reversible gates are simply the
XOR/AND equations they stand for. What the RTL preserves is the netlist
(which gate feeds which), so the figures of merit can be read off it and
checked.

## The arithmetic

For a = a1a0 and b = b1b0, "vertically and crosswise" gives

    P0 = a0b0                        vertical, right column
    P1 = a1b0 xor a0b1               crosswise, middle column
    C1 = a1b0 and a0b1               its carry
    P2 = a1b1 xor C1                 vertical, left column, plus carry
    P3 = a1b1 and C1

The conventional circuit (`vedic2x2_conventional`) builds this from four AND
gates and two half adders: six ANDs and two XORs.

Two identities are what make the cheaper reversible circuits work. Because
C1 = a0a1b0b1, the carry already implies a1b1. So:

    P3 = C1 = a0b0 . a1b1
    P2 = a1b1 xor C1 = a1b1 . not(a0b0)

A circuit can therefore form P3 by multiplying the two *vertical* products,
without ever adding the crosswise ones. It can then obtain P2 from P3 with
one CNOT, or obtain P0, P2 and P3 together from a single NFT gate.

## The gates

| gate | size | outputs | quantum cost |
|---|---|---|---|
| `feynman_gate` (CNOT) | 2x2 | P=A, Q=A^B | 1 |
| `peres_gate` | 3x3 | P=A, Q=A^B, R=AB^C | 4 |
| `toffoli_gate` | 3x3 | P=A, Q=B, R=AB^C | 5 |
| `nft_gate` | 3x3 | P=A^B, Q=~B·C ^ A·~C, R=B·C ^ A·~C | 5 |
| `bme_gate` | 4x4 | P=A, Q=AB^C, R=AD^C, S=AB^C^D | 6 |
| `bvppg_gate` | 5x5 | P=A, Q=B, R=AB^C, S=D, T=AD^E | 10 |

With C = 0, a Peres gate is a half adder: Q is the sum and R the carry. A
Toffoli with C = 0 is an AND that passes both operands on. BVPPG and BME form
two partial products that share operand A. BVPPG also passes B and D on for
later gates, so a circuit built around it needs no operand fan-out.

The BME equations are used as published. Note that they are not one-to-one:
with A = 0, both Q and R equal C. Design 5 uses BME only with C = 0, which is
unaffected. The NFT equations are those of the published parity-preserving
NFT gate. They are also the only reading under which design 4 multiplies.

## The five reversible circuits

Each design's netlist is spelled out in the header comment of its file. Pin
order is A,B,C,... and outputs are P,Q,R,....

**Design 1** (`vedic2x2_design1`): four Toffoli and two Peres gates. It
copies the conventional structure directly. A chain of Toffolis forms the
four partial products while passing the operands along. Two Peres gates are
the two half adders.

**Design 2** (`vedic2x2_design2`): five Peres gates and one CNOT. It uses
the identities above. Peres gates form a0b0 and a1b1, a third Peres gate
multiplies them (P3), and a CNOT turns P3 and a1b1 into P2. The middle digit
is formed by accumulating a0b1 onto a1b0 through the C input of a Peres gate.
It is the cheapest circuit. However, a1b1 drives two gates and every operand
bit enters two gates. Fan-out is not allowed in a reversible circuit, so this
is not a valid reversible design. It is built as published, fan-out
included.

**Design 3** (`vedic2x2_design3`): one BVPPG, three Peres and one Feynman
gate. BVPPG gives a0b0 and a0b1 and passes b0 and b1 on. The operands
therefore never fan out. One Peres gate adds the crosswise products. P3 is
the carry C1 itself, and a Feynman gate gives P2. It has the least garbage
of the fan-out-free circuits.

**Design 4** (`vedic2x2_design4`): one BVPPG, two Peres, one NFT and one
Feynman gate. A Feynman gate gives P1, and the crosswise carry is never
formed. One NFT gate with inputs (0, a0b0, a1b1) gives P0, P2 and P3 at once.

**Design 5** (`vedic2x2_design5`): one BME, three Peres and one Toffoli
gate. BME forms a0b0 and a0b1. The rest follows design 1's half-adder
structure. b0 and b1 each enter two gates directly.

### Figures of merit

Each module computes its own figures in `localparam METRICS`, using
`rev_pkg::tally()`. The function counts the gates the module instantiates,
its constant inputs and the width of its garbage port. It is not a typed-in
table. The values below are what the netlists give; the testbenches check
them.

| design | ancillary inputs | garbage outputs | gates | quantum cost |
|---|---|---|---|---|
| 1 | 6 | 6 | 6 | 28 |
| 2 | 4 | 9 | 6 | 21 |
| 3 | 5 | 5 | 5 | 23 |
| 4 | 5 | 5 | 5 | 24 |
| 5 | 5 | 7 | 5 | 23 |

The published comparison gives design 4 six ancillary inputs. Its drawn
netlist has only five constant inputs, which is the count used here. All
other figures agree with the published ones.

Design 2 has the lowest quantum cost, but its fan-out rules it out. Of the
rest, designs 3 and 5 tie on quantum cost and design 3 has less garbage,
which makes design 3 the best valid circuit.

## Where this RTL departs from the published circuits

- Constant inputs are tied to 0 inside each module, not brought out.
- Garbage outputs are brought out as a port, `garbage`, where bit k-1 is
  garbage line Gk. That keeps them observable in simulation. A synthesis
  tool will remove any that are left unconnected.
- Some pin orders are not shown in the published drawings: PG3, PG5 and the
  CNOT of design 2, and the gate feeding design 5's Toffoli. In each case
  the order chosen is the one that makes the named output the named product
  bit. For design 5's last Peres gate, the other order gives the same
  product and swaps garbage line G7 from C1 to a1b1.
- No clock, registers or timing constraints are specified. Each design is a
  purely combinational block.
- The reversible ALU that motivates these multipliers is not specified, and
  is not included.

## Files

`rtl/`:

- `rev_pkg.sv`: gate quantum costs, the `metrics_t` record and `tally()`.
- One file per gate, listed above.
- `half_adder.sv` and `vedic2x2_conventional.sv`.
- `vedic2x2_design1.sv` to `vedic2x2_design5.sv`.
- `vedic_mult_top.sv`: all six multipliers side by side. Each has its own
  operand inputs (`a_conv`/`b_conv`, `a_d1`/`b_d1`, ...), product output
  (`p_*`) and garbage output (`g_d*`).

`tb/` has one self-checking testbench per module, `tb_<module>.sv`:

- Gate testbenches apply every input pattern and check every output. They
  check that the gate is one-to-one; for BME they check the 12 distinct
  patterns its equations give instead.
- Multiplier testbenches apply all 16 operand pairs. They check the product,
  each garbage line and the four figures of merit.
- `tb_vedic_mult_top` runs all six multipliers, first exhaustively and then
  with independent random operands. It counts the cases that exercise the
  crosswise carry, a single crosswise product and a zero product, and fails
  if any of them never occurs.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the project root:

    verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv \
        tb/tb_vedic_mult_top.sv --top-module tb_vedic_mult_top -Mdir obj
    ./obj/Vtb_vedic_mult_top

Replace the testbench name to run any other one. Modules are found in
`rtl/` through `-Irtl`. `rev_pkg.sv` must come first because it is a
package.

## Changing it

To add a reversible circuit:

1. Add its gates as modules, and their quantum cost to `rev_pkg`.
2. Write the netlist with constant inputs tied to `1'b0`.
3. Compute `METRICS` with `tally()`.

The testbench pattern in `tb_vedic2x2_design*.sv` carries over. Only the
expected garbage vector and the expected figures change.
