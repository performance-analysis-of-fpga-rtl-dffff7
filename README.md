# DBTNS–TRNS mixed-base MAC and FIR filter

An FIR filter, y(n) = Σ x(n−k)·h(k), is computed on one multiply-accumulate (MAC) unit. The unit
does its arithmetic in ternary (base-3 digits, *trits*) and mixes two number systems:

* **DBTNS multiplication.** DBTNS is the double-base ternary number system. Each operand is
  written as a single double-base term, X = 2^i · 3^j, with the indices i and j held as ternary
  numbers. A product is then 2^(i1+i2) · 3^(j1+j2). That takes two small index additions, one
  table look-up for the power of two and a trit shift for the power of three. No partial
  products are formed.
* **TRNS accumulation.** TRNS is a residue number system in ternary. The product is split into
  residues modulo the balanced set {3^N−2, 3^N−1, 3^N}. The three residues are accumulated by
  three independent modular adders. Because the channels do not exchange carries, each adder is
  only N trits wide.

At the end of a sum, a residue-to-integer table turns the accumulated residues back into an
integer using the Chinese remainder theorem (CRT).

The RTL is synthesizable SystemVerilog. Every arithmetic block works on trits, and each trit is
carried on two binary wires.

## Number representation

| Item | Encoding |
|---|---|
| Trit | `tvl_pkg::trit_t`, 2 bits, codes 0, 1, 2 (code 3 is never produced) |
| Ternary word | packed array `trit_t [W-1:0]`; trit 0 has weight 3^0 |
| Multipliable operand | 0 or 2^i·3^j with i, j ∈ 0 … 3^IDX_N − 1 |
| Index i, j | IDX_N trits each |
| Product | PT trits (7 for IDX_N = 1) |
| Residues | N trits each, always below their modulus |
| Filter input/output | plain binary integers |

With the default IDX_N = 1 the operands are 1, 2, 3, 4, 6, 9, 12, 18 and 36. A single
double-base term cannot express 0 or other integers such as 5. Zero is handled as a zero
product. Any other value raises a *miss* flag and also contributes zero; see "Limits" below.

## One MAC cycle (`mac_unit`)

```
x ─► dbtns_conv ─(i2,j2)─┐
                         ├─► dbtns_mult ─► trns_conv ─► 3 × trns_adder ─► treg ─┬─► acc0..2
h ─► dbtns_conv ─(i1,j1)─┘                                  ▲                   │
                                                            └───────────────────┘
```

Everything from the operands to the register input is combinational. One product is
accumulated per clock.

1. **`dbtns_conv`: ternary value to (i, j).** The table holds 2^i·3^j for every index pair.
   For 1-trit indices these are the nine values 0001, 0010, 0100, 0002, 0020, 0200, 0011, 0110
   and 1100 in base 3. The input is compared with all entries at once, and the matching entry
   supplies i and j. The module also outputs `zero` and `miss`.
2. **`dbtns_mult`: the product.** Two ternary ripple-carry adders (`tvl_rca`) form i1+i2 and
   j1+j2, each IDX_N+1 trits wide. `pow2_lut` returns 2^(i1+i2) in N trits.
   `tvl_barrel_shifter` shifts that value left by j1+j2 trits, which multiplies it by
   3^(j1+j2). The shifter has one stage per trit of the shift amount. Stage t uses a three-way
   multiplexer to shift by 0, 3^t or 2·3^t positions. Sizes:

   | IDX_N | index sum | 2^k table width N | largest shift | product M |
   |---|---|---|---|---|
   | 1 | 2 trits (0…4) | 3 | 4 | 7 |
   | 2 | 3 trits (0…16) | 11 | 16 | 27 |
   | 3 | 4 trits (0…52) | 33 | 52 | 85 |

3. **`trns_conv`: product to residues.** This is the least obvious step; see the next section.
4. **`trns_adder`: accumulate.** There is one adder per modulus m. An N-trit ripple-carry adder
   forms a+b in N+1 trits. A comparator (`tvl_lt`) tests whether a+b < m.
   * If it is, a demultiplexer sends the sum straight to the output multiplexer.
   * Otherwise the sum goes into a ternary subtractor (`tvl_sub`) that removes m.

   The `wrap` output shows which path was taken.
5. **`treg`: the ternary register.** It holds the three residues (3·N trits). `clr` zeroes it
   at the start of a sum, and `acc_en` loads the adder outputs.

## Residue conversion

Let X be a 2N-trit number, Xhi its upper N trits and Xlo its lower N trits, so that
X = Xhi·3^N + Xlo.

**Modulus 3^N.** The residue is simply Xlo.

**Modulus 3^N−1 (`trns_conv_m1`).** Since 3^N ≡ 1, X ≡ Xhi + Xlo.
* Three N-trit adders compute Xhi+Xlo with carry-in 0, 1 and 2 at the same time.
* The carry out c of the carry-in-0 adder steers a ternary multiplexer. The carry is worth 3^N,
  and 3^N ≡ 1, so the multiplexer picks the adder that added c back in.
* This one fold is exact. The only extra case is the all-2s word (3^N−1), which is a second code
  for 0. A final compare replaces it with 0.

**Modulus 3^N−2 (`trns_conv_m2`).** Since 3^N ≡ 2, X ≡ 2·Xhi + Xlo.
* Two adders form 2·Xhi + Xlo as an N-trit word S with a carry c ∈ {0, 1, 2}.
* Three adders compute S+0, S+2 and S+4 in parallel, and c selects one of them (the carry is
  worth 3^N ≡ 2, so c adds 2c).
* This fold alone is **not** exact: S+4 can overflow N trits again. The carry out of the chosen
  adder is therefore folded once more as +2. That step cannot overflow.
* A compare-and-subtract then brings the value below 3^N−2.
* The module needs N ≥ 2. With N = 1 the modulus is 1, which carries no information.

**Products longer than 2N trits.** For example, a 27-trit product with N = 2 is cut into N-trit
chunks. These are reduced Horner-fashion, r ← conv({r, chunk}), through a chain of the same
2N-trit converters. With the defaults (a 7-trit product, N = 4) the chain has one stage, so
there is one converter per modulus.

**Default residues.** The moduli are 79, 80 and 81, so the dynamic range is M = 511 920.
`rns_to_int_lut` rebuilds the integer from the residues:
* One table per modulus has 4^N = 256 locations, addressed by the raw trit code of the residue.
* Each location holds r·Mi·(Mi⁻¹ mod mi) mod M, where Mi = M/mi.
* Two binary modular adders sum the three table outputs modulo M.

## FIR operation and timing (`dbtns_trns_fir`, `fir_ctrl`)

```
coef_int ─► int_to_tvl_lut (LUT-4) ─► coef_lut ──h(pc)──┐
x_int    ─► int_to_tvl_lut (LUT-1) ──────────x──────────┼─► mac_unit ─► rns_to_int_lut (LUT-5) ─► y_int
                                         fir_ctrl: pc ──┘
```

**Loading coefficients.** Write all TAPS coefficients first. Drive `coef_we`, `coef_addr` and
`coef_int`, one coefficient per clock. The table is not reset.

**Running one output sample.**

| Cycle after `start` | Event |
|---|---|
| 0 | `start` seen while idle. TReg is cleared and `pc` is set to 0. |
| 1 … TAPS | `pc` = 0 … TAPS−1. Each cycle accumulates x_int · h(pc). |
| TAPS+1 | `y_valid` is high for one cycle, and `y_int` = y(n) mod M. |

The filter does not store past samples. The sample source must drive `x_int` = x(n−pc)
combinationally from `pc` during the run, for example from its own history buffer indexed by
`pc`.

**Status outputs.**
* `busy` is high from cycle 1 to cycle TAPS+1.
* A `start` pulse while busy is ignored.
* `dbtns_miss` is set if any operand in the run had no 2^i·3^j form. The next `start` clears it.

**Default configuration.** The defaults are IDX_N = 1, MOD_N = 4 (moduli 79, 80, 81) and
TAPS = 8. In this configuration the result is exact: the largest sum, 8·36·36 = 10 368, is
below M.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `IDX_N` | 1 | trits per double-base index |
| `MOD_N` | 4 | modulus trit length N; moduli {3^N−2, 3^N−1, 3^N} |
| `TAPS` | 8 | filter taps (one accumulate cycle each) |
| `XB` | 6 | integer operand width (derived from IDX_N) |
| `YB` | 19 | output width, bits for M−1 (derived from MOD_N) |
| `SPARSE_LUT` | 0 | 1 when XB > 12: LUT-1/LUT-4 store only the usable operands (see below) |

All other sizes are derived in `tvl_pkg`. It provides `pow2_trits`, `prod_trits`,
`opnd_trits`, `opnd_bits`, `dbtns_tvl`, `dyn_range` and `crt_term`, and every table is filled at
elaboration by these formulas. Operands of 3-trit indices exceed 64 bits, so `dbtns_tvl` builds
2^i·3^j in ternary as 2^i shifted up j trits rather than as one integer.

Configurations with other moduli:
* MOD_N = 2 (moduli 7, 8, 9) and MOD_N = 3 (moduli 25, 26, 27) work with the same RTL.
* Their dynamic ranges are 504 and 17 550. The 8-tap sums can exceed 504 (the {7, 8, 9} set),
  and y then wraps modulo M.

## Where this RTL departs from or adds to the original architecture

* **Zero and non-representable operands.** The zero/miss handling is added. A single 2^i·3^j
  term has no code for 0, and the original does not say what happens to other integers.
* **Correcting the 3^N−2 converter.** The second +2 fold and the final compare-subtract are
  added. The original equation leaves an N-trit result that can overflow or be above the
  modulus.
* **Canonical zero in the 3^N−1 converter.** The all-2s cleanup is added, so the modular adders
  always get inputs below their modulus.
* **Building 2·Xhi.** In the 3^N−2 converter, 2·Xhi is formed with a plain adder and its carry.
  The original drawing suggests reducing Xhi+Xhi modulo 3^N−1 instead, which would give wrong
  residues.
* **Long products.** The chained (Horner) conversion for products longer than 2N trits is
  added. The original only describes 2N-trit inputs.
* **Index look-up method.** The DBTNS table is searched by value across all entries in
  parallel. The original only says that i and j are read from a table.
* **Operand-only input tables.** For 2- and 3-trit indices LUT-1 and LUT-4 hold only the usable
  operands rather than every integer (`SPARSE_LUT`). For 1-trit indices they are full tables.
* **Output conversion.** It uses three CRT weight tables plus modular adders rather than one
  table with M entries.
* **Integer output.** y(n) leaves as an integer. One passage of the original says the output
  is converted to ternary; its block diagram shows conversion to an integer.
* **Number of taps.** The original describes the operation with 4 taps and reports results for
  8 taps. TAPS defaults to 8. A 4-tap filter either sets TAPS = 4 or loads zeros into taps 4–7.
* **Invented interfaces.** The start/busy/y_valid handshake, the coefficient write port, the
  asynchronous active-low reset and the two-wire trit encoding are this implementation's
  choices.
* **Unsigned arithmetic.** All values are unsigned. Ternary digits 0/1/2 and 2^i·3^j products
  are non-negative; no signed residue mapping is built.

## Limits

* **IDX_N = 2.** The whole filter runs at IDX_N = 2 with all three moduli sets. Operands reach
  2^8·3^8 = 1 679 616 (21 bits), and a full integer-to-ternary table would need 2^21 entries.
  So above 12 integer bits the top uses `int_to_tvl_sparse_lut` for LUT-1 and LUT-4. That
  table stores only zero and the 81 values 2^i·3^j, compares all keys at once, and maps any
  other integer to the all-2s word. The index tables reject that word, so `dbtns_miss` is
  raised as at IDX_N = 1. Products reach 27 trits and exceed every dynamic range, so `y_int`
  is the sum modulo M.
* **IDX_N = 3.** The filter also runs at IDX_N = 3 with all three moduli sets, using the same
  operand-only tables. Operands reach 2^26·3^26 (68 bits, 43 trits), products 85 trits, and the
  index tables have 729 entries. The elaboration functions only handle powers of two below 2^64,
  so index lengths above 3 are not supported.
* **Filter operands.** The filter only multiplies 0 and 2^i·3^j values. Any other input sets
  `dbtns_miss` and is treated as 0.
* **Rare carry selects.** With the default moduli, no product of two operands makes the
  residue converters' carry select anything but 0. Those paths are used with the smaller moduli
  sets or general inputs, and the converter testbenches cover them exhaustively.

## Simulation

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/tvl_pkg.sv tb/tb_dbtns_trns_fir.sv \
          --top-module tb_dbtns_trns_fir -Mdir obj_fir
./obj_fir/Vtb_dbtns_trns_fir
```

Replace the testbench name to run any other test. `-Irtl` lets Verilator find each module in
`rtl/<name>.sv`.

| Testbench | What it shows |
|---|---|
| `tb_dbtns_trns_fir` | Full filter at its defaults. 80 samples with exact integer reference, latency TAPS+1, coefficient reload, miss flag, ignored start. Counts adder wraps, shifts and zero operands. |
| `tb_fir_table5` | 8-tap filters with moduli {7,8,9}, {25,26,27}, {79,80,81}, plus a 4-tap filter. Results are checked mod M, including sums beyond the dynamic range. |
| `tb_mac_unit` | 3000 random MAC cycles against running sums mod 79/80/81. |
| `tb_fir_idx23` | 8-tap filters with 2-trit and 3-trit indices, each with all three moduli sets (six filters), 60 outputs each. Checks against 160-bit reference sums mod M, latency and the miss flag, and requires every converter carry select. |
| `tb_mac_idx2` | MAC with 2-trit indices (14-trit operands, 27-trit products) for all three moduli sets, 8-product sums. |
| `tb_trns_conv`, `tb_trns_conv_m1`, `tb_trns_conv_m2` | Exhaustive converter checks (N = 2 and 4; 7-trit products). Also 27-trit products through the chain. |
| `tb_trns_adder` | Exhaustive for moduli 1, 2, 3, 7, 8, 9, 79, 80, 81. |
| `tb_dbtns_mult`, `tb_dbtns_conv`, `tb_pow2_lut`, `tb_tvl_barrel_shifter` | Multiplier path at IDX_N = 1 (exhaustive) and IDX_N = 2, including the trit-length table above. |
| `tb_rns_to_int_lut` | Every X < 504; random X < 511 920. |
| `tb_tvl_rca`, `tb_tvl_sub`, `tb_tvl_lt`, `tb_int_to_tvl_lut`, `tb_treg`, `tb_coef_lut`, `tb_fir_ctrl` | Leaf blocks and sequencer timing. |

## Files

`rtl/tvl_pkg.sv` holds the trit type, the base-3 helper functions and the sizing functions.
Every other `rtl/<name>.sv` file holds one module. Each file opens with a comment describing
its function, interface and timing.
