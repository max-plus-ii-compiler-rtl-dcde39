# jyankenunita — a two-player rock-paper-scissors judge

Two players each have three push buttons: **goo** (rock), **choki** (scissors)
and **paa** (paper). The judge looks at all six buttons and lights exactly one
of three lamps:

| output   | meaning                                   |
|----------|-------------------------------------------|
| `kachi1` | player 1 wins                             |
| `kachi2` | player 2 wins                             |
| `oaiko`  | draw: both players show the same hand     |

Rock beats scissors, scissors beat paper, paper beats rock. A hand counts only
when a player presses **exactly one** button. If either player presses none,
two or all three, no lamp lights. The circuit has no clock, no state and no
reset: the lamps follow the buttons combinationally.

The design was originally a small block of logic fitted into an Altera FLEX 8000
FPGA (EPF8282ALC84-2). It used 6 input pins, 3 output pins and 11 of the
device's logic cells. This RTL reproduces its truth table.

## The truth table and the "exactly one button" rule

The judge is a function of 6 inputs, so its whole behaviour is a 64-row table.
Only 9 rows have both players valid, and each of those 9 rows lights one lamp:

| player 1 \ player 2 | rock     | scissors | paper    |
|---------------------|----------|----------|----------|
| rock                | `oaiko`  | `kachi1` | `kachi2` |
| scissors            | `kachi2` | `oaiko`  | `kachi1` |
| paper               | `kachi1` | `kachi2` | `oaiko`  |

All other 55 rows light nothing. In the original logic equations, each product
term fixes all six inputs: one button of each player high, the other two low.
This is where the "exactly one button" rule comes from. For example, the term
for "scissors beats paper" is

    kachi1 ⊇ ~goo1 & choki1 & ~paa1 & ~goo2 & ~choki2 & paa2

A weaker judge that only looked at the pressed buttons would let a player who
presses everything at once win or draw. This one never does.

## Structure

```
 goo1 choki1 paa1          goo2 choki2 paa2
        |                         |
 jyanken_hand_decode      jyanken_hand_decode      (one per player)
   hand1, valid1            hand2, valid2
        \_________________________/
                     |
            compare stage (in jyankenunita)
                     |
          kachi1   kachi2   oaiko
```

* `rtl/jyanken_pkg.sv` holds the type `hand_t`: a 2-bit code with the values
  `HAND_NONE`, `HAND_GOO`, `HAND_CHOKI` and `HAND_PAA`. It also holds the
  function `beats(a, b)`, which applies the rock > scissors > paper > rock rule.
* `rtl/jyanken_hand_decode.sv` checks one player's three buttons. It outputs
  `valid` when exactly one is high, and the matching `hand` code
  (`HAND_NONE` otherwise).
* `rtl/jyankenunita.sv` is the top. It has one decoder per player. A lamp
  lights only when both hands are valid: `kachi1 = beats(hand1, hand2)`,
  `kachi2 = beats(hand2, hand1)` and `oaiko = (hand1 == hand2)`. An immediate
  assertion checks that at most one lamp is lit.

The original design is a flat sum of products with no visible sub-blocks. The
split into a per-player decoder and a compare stage, and the hand encoding, are
choices made for this RTL. They do not change the function.

## Ports and original pin assignment

All signals are active high. The pin numbers are the 84-pin PLCC pins of the
original FPGA fit. They are given for reference; nothing in the RTL depends on
them.

| port     | dir | original pin | note                                     |
|----------|-----|--------------|------------------------------------------|
| `choki1` | in  | 12           |                                          |
| `goo2`   | in  | 13           |                                          |
| `paa1`   | in  | 31           |                                          |
| `choki2` | in  | 54           |                                          |
| `goo1`   | in  | 72           | a JTAG-capable pin used as plain I/O     |
| `paa2`   | in  | 73           |                                          |
| `kachi2` | out | 22           |                                          |
| `kachi1` | out | 56           |                                          |
| `oaiko`  | out | 62           |                                          |

On the original board, all other I/O pins of the device are reserved and must
be left unconnected. Power, ground and configuration pins (Active Serial
configuration) are connected as the device requires. The FPGA itself, its
configuration logic and its routing are vendor parts, so they are not modelled.

## How far it can be trusted

* The function was taken from the original design's synthesized logic
  equations, not from its source code. Each equation was reduced to the table
  above. In a few of those equations, the OR between two product terms was read
  from context. The only consistent reading gives every lamp its three
  symmetric cases, and that is the reading used here.
* Polarity is taken as active high on all pins. The equations use the inputs
  uninverted and drive the outputs straight from logic. Button debouncing is
  not part of the design. There is nothing to latch a result.
* Both testbenches check every input pattern exhaustively against a reference
  written separately from the RTL.

## Simulating

Each testbench checks itself. At the end it prints
`TB_RESULT checks=<n> failures=<m>`. A watchdog stops a run that hangs.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/jyanken_pkg.sv tb/tb_jyankenunita.sv --top-module tb_jyankenunita
./obj_dir/Vtb_jyankenunita
```

* `tb/tb_jyankenunita.sv` tests the whole judge. It applies all 64 button
  patterns, then 256 random ones. It compares the lamps with a sum-of-products
  reference over the raw buttons. It also counts how often each case came up:
  player 1 wins, player 2 wins, draw, and an invalid pattern that is rejected.
  It fails if any of these cases never occurred.
* `tb/tb_jyanken_hand_decode.sv` checks one player's decoder. It applies all 8
  button patterns, then 64 random ones, and compares the result with a
  button-count reference.

## Changing it

To use a different hand encoding, edit `hand_t`. Only `beats()` and the
decoder's case statement depend on the codes. To make a player's invalid press
count as a loss instead of "no result", change the compare stage in
`jyankenunita.sv`. The reference in `tb_jyankenunita.sv` would then need the
same change.
