# A 4-trit balanced ternary adder-subtractor in binary logic

Balanced ternary counts with the digits -1, 0 and +1 (written `-`, `0`, `+`).
Every integer has one representation, negation is a digit-by-digit swap of
`+` and `-`, and no sign bit is needed. With four trits the range is
-40 … +40 (3^4 = 81 values); for example `+0-0` = 27 - 3 = 24.

This RTL builds a small calculator for such numbers for an FPGA board. The
user sets one operand on eight slide switches (two per trit), stores it in a
register with a button, sets a second operand, and reads
`stored ± switches + carry-in` on eight LEDs (two per trit) plus a carry
LED pair. Everything is binary logic underneath: each trit travels on two
wires.

Beside the calculator, the top level also brings out the other ternary
circuits of the same family: a full subtractor and four two-input gates
(XOR, minimum, maximum, equality comparator). The calculator does not use
them.

## How a trit is carried

| meaning | internal code (`ternary_pkg::trit_t`) | switch pair `p m` | LED pair `m p` |
|---|---|---|---|
| 0  | `2'b00` (`T_ZERO`)  | `0 0` or `1 1` | `0 0` |
| +1 | `2'b01` (`T_PLUS`)  | `1 0`          | `0 1` |
| -1 | `2'b10` (`T_MINUS`) | `0 1`          | `1 0` |

The code `2'b11` is never produced inside the design. Every gate reads it as
0, so a stray value cannot create a fourth digit.

## The ternary gates

All gates are combinational and take two trits `a`, `b`:

| module | name | result |
|---|---|---|
| `tern_mod3` | modulo-3 sum | (a + b) wrapped into -1…+1 |
| `tern_cons` | consensus | `a` if a = b, else 0 (the carry of a + b) |
| `tern_any`  | accept-anything | sign(a + b) |
| `tern_xor`  | ternary XOR | -(a·b) |
| `tern_min`  | minimum (ternary AND) | min(a, b) |
| `tern_max`  | maximum (ternary OR) | max(a, b) |
| `tern_cmp`  | comparator | `+` if a = b, else `-` |
| `tern_inv`  | inverter | -a |
| `tern_sel_inv` | inverter with select | `sub ? -a : a` |

## The full adder, and why it works

`tern_full_adder` adds three trits: `x1 + x2 + cin = 3·cout + s`. It is made
of five gates:

```
m1   = mod3(x1, x2)        c1 = consensus(x1, x2)
s    = mod3(cin, m1)       c2 = consensus(m1, cin)
cout = accept_anything(c1, c2)
```

This is two half-adders and a carry merge, as in binary. A two-trit sum lies
in -2…+2, so `mod3` gives its low digit and `consensus` its carry (only `++`
and `--` overflow). Hence `x1 + x2 = 3·c1 + m1` and `m1 + cin = 3·c2 + s`, so
the total is `3·(c1 + c2) + s`. The total lies in -3…+3, so `c1 + c2` is
always -1, 0 or +1. The two partial carries can have opposite signs, for
example `+ + -` gives `c1 = +` and `c2 = -`. `accept_anything` returns the
sign of `c1 + c2`, which here equals `c1 + c2` itself, so it is the true
carry. The testbench checks all 27 combinations against integer arithmetic.

`tern_full_sub` is the same adder with `x1` negated first:
`x2 - x1 + cin = 3·cout + o`.

## The adder-subtractor (`ternary_addsub`)

```
 in_p/in_m ──► tern_dec_in ──┬──► tern_reg (falling edge of bclk) ──► x1 ┐
 (per trit)                  └──► tern_sel_inv (sub) ───────────────► x2 ├► tern_full_adder ─► tern_dec_out ─► out_m/out_p
 cin_p/cin_m ─► tern_dec_in ───────────────────────── carry into trit 0 ─┘      (ripple)        carry ─► cout_m/cout_p
```

`TRITS` cells (default 4) are chained through their carries, trit 0 being
the least significant. The result is

```
LEDs + 81·carry_out = register + (sub ? -switches : switches) + carry_in
```

which always fits: the worst case, 40 + 40 + 1 = 81, is carry `+` with all
LED trits 0.

**Timing.** Only the register is sequential. It loads on the *falling* edge
of `bclk`, i.e. when the store button is released; everything else follows
the switches at once. Right after a store the register equals the switches,
so the LEDs show the switch value added to itself (or 0 when subtracting,
plus the carry-in) until the switches are changed. There is no other clock.

**Reset.** `rst` (asynchronous, active high) clears the register to 0.

**Board pins.** `ternary_addsub_top` keeps the original Nexys-3 mapping in
its port meanings: `sw_m[i]`/`sw_p[i]` are switches SW(2i)/SW(2i+1),
`led_m[i]`/`led_p[i]` are LEDs LD(2i)/LD(2i+1), `bclk` is the left button,
`sub` the right one, `cin_p`/`cin_m` the up/down buttons. The carry-out pair
is given no LED in the original pin list; it is brought out as `cout_m`/`cout_p`. Pin
constraints are not part of this RTL.

## Where this RTL departs from the original design

- **Reset added.** The original register has no reset and, in simulation,
  starts at `-` in every trit. Here `rst` clears it to 0.
- **Carry-out pin names.** In the original, the carry LED pins are connected
  with plus and minus swapped relative to the result trits (the pin named
  for plus is lit for minus). Here `cout_p` is lit for `+` and `cout_m` for `-`.
- **Output decoder polarity.** The original descriptions disagree on which
  decoder output is the plus line. The version with named minus/plus outputs
  is followed.
- **Accept-anything on opposite inputs.** One description of this gate gives
  `+` for (`+`,`-`) and (`-`,`+`); the gate-level description gives 0.
  Only 0 makes the full adder correct, so 0 is used.
- **Full subtractor operand.** The original gate listing negates `x1`; its
  schematic appears to negate `x2`. The listing is followed: the result is
  `x2 - x1 + cin`.
- **Printed truth tables.** Several of the original printed tables (full
  adder sum/carry, subtractor, the sampled 1-trit adder-subtractor tables)
  do not match the gate structure or each other. The testbenches check
  against integer arithmetic instead, and the gate structure matches that.
- **Width as a parameter.** `TRITS` defaults to 4, the original size; the
  1-trit variant is `TRITS = 1`.

## Files

`rtl/`:

- `ternary_pkg.sv` is the trit type and its normalise and negate helpers.
- The gates are `tern_mod3`, `tern_cons`, `tern_any`, `tern_xor`,
  `tern_min`, `tern_max`, `tern_cmp`, `tern_inv` and `tern_sel_inv`.
- `tern_dec_in` and `tern_dec_out` convert between switch/LED pairs and trits.
- `tern_reg` is the one-trit register, loaded on the falling edge of `bclk`.
- `tern_full_adder` and `tern_full_sub` are the full adder and full subtractor.
- `ternary_addsub` is the N-trit adder-subtractor.
- `ternary_addsub_top` is the top level.

`tb/`:

- There is one self-checking testbench `tb_<module>.sv` per module.
- `tb_ternary_pkg.sv` holds the integer reference arithmetic that the
  testbenches use.
- `tb_ternary_addsub_top` runs the whole design at its default size. It
  replays a fixed store/add/subtract sequence, then 20,000 random
  operations, then checks the stand-alone subtractor and gates. It counts
  how often each mechanism happens: store, add, subtract, carry-in ±,
  carry-out ± and the `11` switch code.
- `tb_ternary_addsub` also checks the 1-trit configuration exhaustively.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ternary_pkg.sv tb/tb_ternary_pkg.sv tb/tb_ternary_addsub_top.sv \
  --top-module tb_ternary_addsub_top -o sim
./obj_dir/sim
```

Replace the last file and `--top-module` to run any other testbench. The
full-size run takes a few seconds.
