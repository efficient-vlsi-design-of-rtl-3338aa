# VHBCSE constant multiplier and 8-tap reconfigurable FIR filter

An FIR filter multiplies every input sample by many coefficients. When the
coefficients are fixed, the multipliers can be reduced to shifts and a few
adders. When the coefficients change at run time, as in a multi-standard radio,
that is not possible. This design is a multiplier for that case. It takes the
coefficient as an ordinary input. It still shares as much of the shift-and-add
work as the bit pattern of the coefficient allows. The sharing works in two
directions:

* **Vertical, 2-bit binary common sub-expressions (BCSE).** The 16-bit
  coefficient magnitude is cut into eight 2-bit groups. A 2-bit group can
  only be worth 0, X/2, X or 3X/2 (times the group's weight). So only one adder
  is needed, for A0 = X + X/2. Every other candidate is X or A0 shifted right
  by a fixed amount, which costs only wiring. All coefficients that multiply the
  same sample can share these candidates. Each 2-bit group then needs only a
  4:1 multiplexer.
* **Horizontal, 4-bit and 8-bit BCSE.** The eight selected partial products are
  added in pairs, giving one sum per 4-bit nibble of the coefficient. If two
  nibbles are equal, the lower nibble's sum is simply the higher nibble's sum
  shifted right by 4, 8 or 12 bits. It is taken from there instead of from its
  own adder. The same is done once more for the two bytes of the coefficient.
  Seven equality flags, computed from the coefficient, steer these choices.

The RTL is written in synthesizable SystemVerilog. It contains three pieces:

* a single multiplier, `vhbcse_mult`;
* a multiple-constant multiplier, `vhbcse_mcm`, in which one partial product
  generator serves eight coefficients;
* an 8-tap transposed-form FIR filter, `fir8_vhbcse`, built on `vhbcse_mcm`.
  Its coefficients can be rewritten while it runs.

## Number format

| signal | width | format | value |
|---|---|---|---|
| `xin` | 16 | two's complement integer | X |
| `h` | 17 | two's complement, bit 16 is the sign | H / 2^16, in [-1, 1) |
| `y` (multiplier) | 16 | two's complement | about X·H / 2^16 |
| `yn` (filter) | 19 | two's complement | sum of the eight 16-bit products |

Inside the multiplier, the coefficient magnitude `Hm` is 16 bits. Bit 15 of
`Hm` is worth 1/2 and bit 0 is worth 2^-16. Group k (k = 0…7) is
`Hm[15-2k:14-2k]`. Its candidate products are X>>>(2k), X>>>(2k+1) and
A0>>>(2k). The partial product of group k therefore needs only 17-2k bits:
17, 15, 13, …, 3.

## Datapath of the multiplier

```
 h ──► coef_sign_conv ──Hm──► cl_gen ──C1..C7──────────────┐
          │ h_sign              │                          │
          │             Hm ─► pp_mux_unit ◄── ppg ◄── xin   │
          │                      │ pp[0..7]                │
          │                 add_layer2  ◄──── C1..C6 ──────┤
          │                      │ AS1..AS4                │
          │                 add_layer3  ◄──── C7 ──────────┘
          │                      │ AS5, AS6
          │                 final_add   (AS5+AS6) >>> 1
          │                      │ p
          └──────────────► result_sign_conv ──► y
```

All of this logic is combinational. Every adder is a carry-skip adder
(`csk_adder`, 4-bit blocks). Everything after the generator is the module
`vhbcse_coef_path`. `vhbcse_mult` is `ppg` followed by one coefficient path.

1. **Coefficient sign conversion** (`coef_sign_conv`). For H ≥ 0, `Hm =
   H[15:0]`. For H < 0, `Hm = ~H[15:0]`, which is |H| − 1. A small negative
   coefficient thus becomes a small magnitude with few nonzero groups. Without
   this step it would be a long run of ones.
2. **Partial product generator** (`ppg`). This is the only adder at this level:
   A0 = X + (X>>>1). It also provides all the shifted copies of X, X/2 and A0.
3. **Layer 1** (`pp_mux_unit`). Eight 4:1 multiplexers. Group pattern `00`,
   `01`, `10`, `11` selects 0, X/2, X or A0, each at the group's shift.
4. **Control logic** (`cl_gen`). Six 4-bit comparators, each an XNOR per bit
   with the four results combined:

   | flag | compares | used by |
   |---|---|---|
   | C1 | `Hm[15:12]` = `Hm[11:8]` | AS2 = S1 >>> 4 |
   | C2 | `Hm[15:12]` = `Hm[7:4]` | AS3 = S1 >>> 8 |
   | C3 | `Hm[11:8]` = `Hm[7:4]` | AS3 = S2 >>> 4 (if not C2) |
   | C4 | `Hm[15:12]` = `Hm[3:0]` | AS4 = S1 >>> 12 |
   | C5 | `Hm[11:8]` = `Hm[3:0]` | AS4 = S2 >>> 8 (if not C4) |
   | C6 | `Hm[7:4]` = `Hm[3:0]` | AS4 = S3 >>> 4 (if not C4, C5) |
   | C7 | C2 ∧ C5, i.e. `Hm[15:8]` = `Hm[7:0]` | AS6 = AS5 >>> 8 |

5. **Layer 2** (`add_layer2`). Four adders give the nibble sums
   S1 = pp0+pp1, S2 = pp2+pp3, S3 = pp4+pp5, S4 = pp6+pp7. They are 17, 13, 9
   and 5 bits wide. Six multiplexers, M1 to M6, replace a lower nibble's sum
   with a shifted higher one, as in the table above. The more significant
   source wins: C2 is checked before C3, and C4 before C5 before C6.
   An adder whose sum is not used for the current coefficient has its
   operands forced to zero (operand isolation), so it does not toggle. This is
   where the horizontal sharing saves power, not only area. S2 is needed if
   ¬C1, or C3∧¬C2, or C5∧¬C4. S3 is needed if ¬C2∧¬C3, or C6∧¬C4∧¬C5. S4 is
   needed if ¬C4∧¬C5∧¬C6.
6. **Layer 3** (`add_layer3`). AS5 = AS1 + AS2 is the high-byte sum.
   AS6 = AS3 + AS4 is the low-byte sum, but when C7 is set it is AS5 >>> 8.
   While C7 is set, the AS3 + AS4 adder is isolated in the same way.
7. **Layer 4** (`final_add`). p = (AS5 + AS6) >>> 1. This is X·Hm/2^16, and
   it fits 16 bits.
8. **Result sign conversion** (`result_sign_conv`). For a negative coefficient,
   y = ~p = −p − 1. Since Hm was |H| − 1, the exact result would be
   −p − X/2^16. The 1's complement replaces the X/2^16 term with 1, so no
   adder is needed. The difference is well below the error budget that
   truncation already uses.

### Why the result is approximate, and by how much

Each shift drops the bits that fall off the right end, so each partial product
is rounded toward minus infinity. A reused sum (for example S1 >>> 4 in place
of S2) is therefore not always bit-identical to the sum its own adder would
have produced. Both are within a few units of the exact value. Over directed
and random tests, the difference between `y` and the exact X·H/2^16 was below
3.5 LSB. The testbench enforces a bound of 5 LSB. The whole result is biased
slightly negative. The lowest value it reaches is exactly −32768 (for
X = −32768, Hm = 0xFFFF), and the highest is 32765. The 16-bit output
therefore never wraps. `final_add` holds a deferred assertion on that range.

If you need a bit-exact product, this design is not it. Use it where a
fixed-point FIR filter with about 15 good bits per product is enough.

## The FIR filter

`fir8_vhbcse` computes y[n] = Σ_{k=0..7} mult(h[k], x[n−k]) in transposed
form. The transposed form is chosen so that each input sample meets all eight
coefficients in the same cycle. That is what lets the candidates of the 2-bit
groups be shared.

* `sample_reg` holds the current sample x[n].
* `vhbcse_mcm` contains one `ppg` and eight `vhbcse_coef_path` instances. Each
  coefficient path is the multiplier of the previous section without its
  generator. Together they form the eight products h[k]·x[n] in parallel. The
  sharing saves seven A0 adders and all the duplicated shift wiring.
* `coef_lut` holds h[0] … h[7] as eight 17-bit registers, all read in
  parallel. It has one write port: `coef_we`, `coef_addr`, `coef_wdata`.
  Writing while samples stream is how the filter is reconfigured.
* `psum_chain` holds seven 19-bit partial sums z[1..7] and the output register.
  On each sample it does:
  * `yn <= p0 + z1`
  * `z[k] <= p[k] + z[k+1]`

**Timing.** A sample presented with `x_valid` at clock edge n enters the sample
register at that edge. Its output `yn` is registered at edge n+1, and `y_valid`
is high for that one cycle. A coefficient written at edge m applies to the
samples processed after edge m. Partial sums already in the chain keep the
products of the old coefficients, as in any transposed-form filter. Eight
samples after the last write, the output equals the direct-form sum again.
When `x_valid` is low the chain holds, and no output is produced one cycle
later. `rst` is synchronous and active high. It clears the sample, the
coefficients, the partial sums and the output.

## Ports

`vhbcse_mult`: `xin[15:0]`, `h[16:0]` → `y[15:0]`, combinational.

`vhbcse_mcm #(N = 8)`: `xin[15:0]`, `coef[N]` (17 bits each) → `prod[N]`
(16 bits each), combinational.

`fir8_vhbcse` (parameter `TAPS = 8`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, active high |
| `x_valid` | in | 1 | `xin` carries a new sample |
| `xin` | in | 16 | input sample |
| `coef_we` | in | 1 | write `coef_wdata` into tap `coef_addr` |
| `coef_addr` | in | 3 | tap index |
| `coef_wdata` | in | 17 | coefficient |
| `y_valid` | out | 1 | `yn` carries a new output |
| `yn` | out | 19 | filter output |

## Where this RTL follows its source and where it chooses

These points come from the published architecture:

* the layer structure and the block names;
* the 16-bit input, the 17-bit coefficient and the 16-bit product;
* the 1's-complement coefficient sign conversion selected by the sign bit;
* the A0 = X + X/2 partial product and the X/2 … X/32768 shifts;
* the comparator pairs behind C1 to C6, with C7 derived from C2 and C5;
* the mux/select pairing of layers 2 and 3;
* the final shift by one;
* the use of a carry-skip adder;
* the sharing of the 2-bit sub-expressions across the coefficients that
  multiply one input;
* the 8-tap filter with a 19-bit output.

These are choices made here:

* **Scaling.** The coefficient is read as a fraction H/2^16. This follows from
  the shift labels and the final shift by one.
* **Truncation.** Shifted-out bits are dropped.
* **Wider sums.** The layer sums carry one more bit than the 16/12/8/4-bit
  (layer 2) and 16/8-bit (layer 3) sizes given for them. The extra bit holds the
  two's-complement sign.
* **Reuse shifts.** Sums reused across two or three nibbles are shifted by 8 or
  12 bits. The source shows only "shift by 4" labels.
* **Operand isolation.** Idle adders have their operands gated to zero.
  The source claims lower adder switching but does not say how.
* **Result sign conversion.** It is y = ~p. The source names this block but
  does not give its rule.
* **Signed input.** X enters the datapath as a two's-complement value. It has
  no sign-conversion stage of its own.
* **Filter around the multiplier.** The transposed form, the
  one-register-per-tap coefficient store with a single write port, the valid
  handshake, the one-cycle latency and the reset are all choices made here.

A published example multiplies H = 17'h1FFFF (−2^-16) by X = 16'hFFFF (−1) and
shows a product of 16'hFFFE. This implementation gives 16'hFFFF for that
input. The exact product is +1/65536 of an output LSB, which is 0 after truncation to 16 bits.
Both values are within the truncation error. No reading of the architecture
that was tried reproduces 16'hFFFE.

The published block diagram also routes the coefficient's sign bit into the
layer-1 multiplexers, but gives it no stated role there. Here the sign is
handled only by the two sign-conversion blocks.

The architecture was also presented with run-time changes of interpolation
factor and filter length. Those are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* Exhaustive tests:
  * `coef_sign_conv`: all 2^17 coefficients;
  * `cl_gen`: all 2^16 magnitudes;
  * `ppg`: all 2^16 inputs;
  * `result_sign_conv`: all products, for both signs;
  * `csk_adder`: an 8-bit instance with 3-bit blocks.
* Random and corner tests: the layer adders, the multiplexer unit, the
  coefficient store, the sample register and the partial-sum chain.
* `tb_vhbcse_coef_path` and `tb_vhbcse_mcm` check the per-coefficient path and
  the shared eight-coefficient multiplier bit for bit against the model.
* `tb_vhbcse_mult` compares every result bit for bit with an integer model
  (`tb/tb_ref_pkg.sv`), which recomputes the algorithm group by group. It also
  checks the error against the exact product. It drives coefficients built to
  take each reuse path. It requires that each of C1 to C7, the negative
  coefficient path and the `11` pattern occur.
* `tb_fir8_vhbcse` runs the full-size filter through about 1100 outputs. It
  loads four coefficient sets while samples are streaming. It uses random gaps
  in `x_valid`, full-scale square waves and a mid-run reset.
  * A scoreboard with its own transposed-form model checks the value and the
    cycle of every output.
  * Whenever no coefficient changed in the last eight samples, it also checks
    the output against the direct-form sum.
  * It checks that every mechanism listed above occurred.

To run a testbench with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vh_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_fir8_vhbcse.sv \
    --top-module tb_fir8_vhbcse -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every run takes well under a
second.

## Files

`rtl/`:

* `vh_pkg.sv`: widths, types (`sample_t`, `coef_t`, `pp_t`, `ctrl_t`, `bcs_t`);
* `csk_adder.sv`;
* `coef_sign_conv.sv`, `ppg.sv`, `pp_mux_unit.sv`, `cl_gen.sv`;
* `add_layer2.sv`, `add_layer3.sv`, `final_add.sv`, `result_sign_conv.sv`;
* `vhbcse_coef_path.sv`, `vhbcse_mult.sv`, `vhbcse_mcm.sv`;
* `coef_lut.sv`, `sample_reg.sv`, `psum_chain.sv`, `fir8_vhbcse.sv` (top).

`tb/`: one `tb_<module>.sv` per module, plus `tb_ref_pkg.sv`, the reference
model.

To change the coefficient width or the group sizes, you must rework the
layer-2 and layer-3 structure. It is written for exactly 16 magnitude bits:
8 groups, 4 nibbles and 2 bytes. The filter's tap count is a parameter.
