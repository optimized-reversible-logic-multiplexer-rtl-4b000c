# Reversible-logic multiplexers: 2:1, 4:1 and 8:1 in two gate families

A reversible gate has as many outputs as inputs and maps every input pattern
to a distinct output pattern. In principle it loses no information, so it need
not dissipate the kT ln 2 per erased bit that ordinary logic does. Two costs
come with it. Inputs held at a constant (*ancilla* inputs) pad the gate to
its full width. Outputs that nobody uses (*garbage* outputs) exist only to
keep the mapping one-to-one. A reversible design tries to keep both low.

This library builds data selectors from such gates, in two families:

| | 2:1 | 4:1 | 8:1 |
|---|---|---|---|
| **Design 1** (TWIN SJ based) | `mux2_d1`: 1 TWIN SJ | `mux4_d1`: 2 TWIN SJ, 3 AJ, 1 Feynman | `mux8_d1`: 2 × `mux4_d1`, 1 TWIN SJ, 2 Feynman |
| **Design 2** (SJ based) | `mux2_d2`: 1 SJ | `mux4_d2`: 3 SJ | `mux8_d2`: 5 SJ, 2 Fredkin, 1 Feynman |

Design 2 is the preferred family. `reversible_mux_top` places all six
multiplexers side by side with separate ports. Everything is combinational,
with one-bit data and no clock or reset. The "reversible" nature is
structural: the RTL describes each gate by its Boolean equations, and a
synthesis tool will flatten it into ordinary logic. The RTL is useful as an
executable reference for the gate networks and their garbage outputs. It is
not a way to get reversible silicon from a standard-cell flow.

## The gates

All gates are in `rtl/<name>_gate.sv`. `+` means OR, `⊕` means XOR, `'` means NOT.

| Gate | Inputs → outputs | Equations | Role here |
|---|---|---|---|
| Feynman (`feynman_gate`) | A B → P Q | P = A, Q = A ⊕ B | B = 0: copies A (fan-out without fan-out). B = 1: Q = A' (inverter). |
| Fredkin (`fredkin_gate`) | A B C → P Q R | P = A, Q = A'B ⊕ AC, R = A'C ⊕ AB | Controlled swap. Q is a 2:1 mux (B if A = 0, C if A = 1) and P hands the select on. |
| SJ (`sj_gate`) | A B C D → P Q R S | P = A'C + AD, Q = D, R = AD, S = BD | P is a 2:1 mux (C if A = 0, D if A = 1). B is the auxiliary input. |
| TWIN SJ (`twinsj_gate`) | A B C D E → P Q R S T | P = A'C + AD, Q = ((A+B)(C+D)) ⊕ E, R = B ⊕ E, S = A + E, T = B + E | P is a 2:1 mux. With E = 0, S and T repeat A and B, so the selects can be chained. |
| AJ (`aj_gate`) | A B → P Q | P = AB, Q = A + B | Provides AND and OR for merging the two halves of the Design 1 4:1. |

Gate-level facts worth knowing before changing anything:

* **The SJ gate's truth table is not a permutation.** For example, inputs 0000 and
  0100 both give 0000. The library implements the equations as given, and
  the SJ testbench checks all 16 rows of the truth table.
* **S and T of the TWIN SJ gate are read as OR.** With that reading, a high E
  forces S = T = 1. Every TWIN SJ in the library therefore ties E to 0, so
  that S and T are plain copies of A and B. An XOR reading would make E = 1
  produce complemented selects instead. Changing that reading means changing
  `twinsj_gate.sv` and re-checking `mux4_d1`.
* **Only the AJ gate's purpose is known** ("both AND and OR"), not its
  equations. The two-output AND/OR gate here is the simplest thing that does
  the job.

## How the multiplexers are wired

Select and data numbering is the same everywhere. `sel` is `{S2,S1,S0}`
(or a prefix of it). `vin[0]` is input 1 (Vin1 / V_IN1). The output is
`vin[sel]`. So S0 = 1 with the other selects at 0 picks Vin2, S1 = 1 alone
picks Vin3, and all ones picks the last input.

### Design 2

* **`mux2_d2`** is one SJ gate: A = sel, C = vin[0], D = vin[1], and B = 0 (the
  auxiliary input). Q, R and S are the three garbage outputs.
* **`mux4_d2`** is a two-level tree. SJ 1 selects Vin1/Vin2 with S0, SJ 2
  selects Vin3/Vin4 with S0, and SJ 3 selects between their P outputs with
  S1:
  `Muxout = (S0'·Vin1 + S0·Vin2)·S1' + (S0'·Vin3 + S0·Vin4)·S1`.
  S0 reaches SJ 1 and SJ 2 over a plain fanned-out wire.
* **`mux8_d2`** uses eight gates in three levels:
  1. A Feynman gate with B = 0 makes two copies of SEL0. Each copy drives two
     SJ gates, which reduce V_IN1..8 to four pair results.
  2. Fredkin 1, with SEL1 as control, selects between pairs 5/6 and 7/8 on
     its Q output. It passes SEL1 out on P to SJ 5, which selects between
     pairs 1/2 and 3/4.
  3. Fredkin 2, with SEL2 as control, picks the final output on Q.

  Which gate feeds which is a choice made here; only the gate mix and the
  role of each gate type are fixed. A source describing this circuit gives
  its gate count as both "seven" and "two Fredkin, one Feynman, five SJ".
  The library follows the list, which is eight gates.

### Design 1

* **`mux2_d1`** is one TWIN SJ gate: A = sel, C/D = data, and B = E = 0. Q, R,
  S and T are the four garbage outputs.
* **`mux4_d1`** is the least obvious circuit in the library:
  1. TWIN SJ 1 takes S0 on A, S1 on B and Vin1/Vin2 on C/D. Its P is the lower
     half's result. Its S and T outputs hand S0 and S1 to TWIN SJ 2, which
     does the same for Vin3/Vin4.
  2. The halves are merged as `(P1 AND S1') OR (P2 AND S1)` with three AJ
     gates.
  3. AND and OR cannot form S1' from S1, so a Feynman gate with B = 1 takes
     S1 from TWIN SJ 2's T output. It returns S1' on Q and S1 on P. This
     sixth gate is an addition of this library; the reference structure
     names only the two TWIN SJ and three AJ gates.
* **`mux8_d1`** is built from two `mux4_d1` instances. Two Feynman gates
  (B = 0) copy S0 and S1 so that each 4:1 gets its own pair. A final TWIN SJ
  with A = S2 selects between the two 4:1 outputs.

### Ancilla and garbage counts of this RTL

Ancilla inputs are the gate inputs tied to constants. Garbage outputs are the
gate outputs left unused; each multiplexer brings them out on its `garbage`
port.

| | Design 1 ancilla / garbage | Design 2 ancilla / garbage |
|---|---|---|
| 2:1 | 2 / 4 | 1 / 3 |
| 4:1 | 3 / 8 | 3 / 9 |
| 8:1 | 10 / 20 | 6 / 18 |

These are higher than the best published figures for the same circuits:
0 / 3, 1 / 6 and 2 / 9 for the proposed 2:1, 4:1 and 8:1. The published
figures disagree among themselves from one table to the next, and the
wiring that would reach them is not given. One example: a 5-input TWIN SJ
used as a 2:1 mux cannot have 3 ancilla inputs and 6 garbage outputs. So
the library ties every spare input to 0 and reports what that costs. The
garbage widths are collected in `rtl/rmux_pkg.sv`.

## Where this departs from, or fills in, the reference description

* **Fan-out.** In reversible logic a signal should drive only one gate input.
  The library fans out wires where the described gate list offers no copy:
  S0 to two SJ gates in `mux4_d2`, and each SEL0 copy to two SJ gates in
  `mux8_d2`. Adding Feynman copy gates there would remove this.
* **The SJ repeater.** One description has SJ gate 1's Q output repeating
  S1 while Vin1/Vin2 sit on its data inputs. That conflicts with Q = D, and
  the truth table was followed.
* **Enable.** The block symbol of a 2:1 mux and the gate-level 8:1 reference
  both show an enable input. None of the reversible circuits has one, and
  none is provided here.
* **2:1 selection sense.** One passage says the SJ gate picks B when A = 0
  and C otherwise. That disagrees with P = A'C + AD and with the truth table.
  The library follows the equation: C when sel = 0, D when sel = 1.
* **The Design 1 4:1 function** is taken to be the same as Design 2's,
  `S1'(S0'·Vin1 + S0·Vin2) + S1(S0'·Vin3 + S0·Vin4)`. The gate-level 4:1
  reference (I0..I3 over S1, S0) shows the same function.

## Timing

There is no clock. Each output settles a few gate delays after its inputs
change. The longest gate chains are:

| Multiplexer | Gates in series | Path |
|---|---|---|
| `mux2_d*` | 1 | the single gate |
| `mux4_d2` | 2 | SJ 1, SJ 3 |
| `mux4_d1` | 5 | S1 through TWIN SJ 1 T, TWIN SJ 2 T, the Feynman inverter, AJ 1, AJ 3 |
| `mux8_d2` | 4 | Feynman, SJ 1, SJ 5, Fredkin 2 |
| `mux8_d1` | 7 | Feynman, the 5-gate `mux4_d1` path, final TWIN SJ |

No latency is specified. The testbenches sample 1 ns after each input
change.

## Simulating

Each testbench is in `tb/`, checks itself, and prints one line
`TB_RESULT checks=N failures=M`. It also has a watchdog that ends the run
with a failure if it hangs. With plain Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/rmux_pkg.sv \
    tb/tb_reversible_mux_top.sv --top-module tb_reversible_mux_top -Mdir obj
./obj/Vtb_reversible_mux_top
```

| Testbench | What it does |
|---|---|
| `tb_feynman_gate`, `tb_fredkin_gate`, `tb_aj_gate` | all inputs against hand-typed truth tables; Fredkin is also checked to be a permutation |
| `tb_sj_gate` | all 16 rows of the SJ truth table |
| `tb_twinsj_gate` | all 32 inputs against the equations, restated in a different form |
| `tb_mux2_*`, `tb_mux4_*`, `tb_mux8_*` | every select value with every data pattern, against a sum-of-products reference; the 2:1 testbenches also check the garbage outputs |
| `tb_reversible_mux_top` | all six multiplexers at once with unrelated stimulus; counts, for each select value, how often it routed a lone 1 or lone 0 to the output; checks that both 8:1 families agree |
| `tb_wl_mux4_waveforms` | both 4:1 multiplexers with square waves of 100/100, 100/20, 20/100 and 40/200 ns on/off on Vin1..Vin4; selects step 00→11 every 500 ns; the output is compared every 5 ns |
| `tb_wl_mux8_sweep` | both 8:1 multiplexers; selects change at 0, 0.12, 2.5, 3.5, 4.5, 5.5, 6.5 and 7.5 µs (000→111); the output is compared every 10 ns |

There are no parameters. Every testbench runs the full design in well under
a second.

## Changing it

* To try a different wiring, edit the `mux*` module, then update its
  garbage width in `rmux_pkg.sv`. The testbenches check only the
  multiplexer function, plus the garbage outputs of the 2:1 cells, so any
  correct rewiring passes.
* Wider data (a bus per input) would mean one copy of each gate network per
  bit. The gates themselves are one-bit by nature.
