# AN-code protected duplicate adder

A duplex system runs two copies of a unit and compares them. It can tell
that something is wrong, but not which copy is wrong, so on its own it can
only stop. It can do more if each copy can check its own result. This
design gets that self-check from an **arithmetic code**. Each adder unit
works on operands multiplied by a constant `A = 3`. The arithmetic keeps
that property, so a result that does not divide evenly by 3 shows that
*this* unit is faulty. A voter then takes the result of a unit that
passes its own check. Two units can then do part of what triple modular
redundancy does.

The RTL holds the two coded adder units, the voter and a measuring harness
built into the design:

- a fault-free *golden* adder;
- two outcome flags;
- four outcome counters;
- fault-injection controls on the buses between the sub-blocks.

With these, the fault-detection coverage can be measured in simulation by
streaming operands through the design while a fault is injected.

## The 3N code

An AN code encodes a data word `N` as `A*N`. Addition preserves it:
`A*N + A*M = A*(N+M)`. So two codewords can be added with an ordinary
binary adder, and the sum is again a codeword. To check a result, divide it
by `A`. The quotient is the data and the remainder must be zero.

- `A` must not be a power of two. Multiplying by `2^a` only appends zeros,
  and flipping one of the other bits keeps the word divisible by `2^a`.
- With `A = 3`, a single flipped bit changes the value by `±2^k`. Since
  `2^k mod 3` is never 0, **every single-bit error in a codeword is
  detected**.
- Encoding is cheap: `3N = N + 2N`. This is one adder with `N` fed twice,
  once shifted left by a wire position.
- An 8-bit operand becomes a 10-bit codeword. The sum of two codewords
  needs 11 bits, and its quotient fits in 10.

The code protects only what happens between encoding and division. An error
before encoding is encoded faithfully into a valid but wrong codeword. This
covers the shared input register. An error after the remainder is computed
is also missed: in the quotient, in the voter, or in the remainder itself.
The code cannot see either kind. These are the "undetected" outcomes in the
statistics below.

## Pipeline

```
            stage 1          stage 2            stage 3                       stage 4
in_a ──►[ a_q ]──┬─► enc ─►[ code_a ]─┐                                   
in_b ──►[ b_q ]──┤   enc ─►[ code_b ]─┴─ add ─►[ sum ]─ ÷3 ─ q0, err0 ─┐
                 │                                  (unit 0)           ├─ voter ─►[ out_quot, flags ]─► counters
                 ├─► (same in unit 1) ─────────────────── q1, err1 ───┘                ▲
                 └─► golden a+b ─►[ ]─►[ ] ──────────────────────────── compare ───────┘
```

| edge   | what is registered                                   | where                 |
|--------|------------------------------------------------------|-----------------------|
| k      | operands (`in_valid` high before this edge)          | `an_dup_alu`, shared  |
| k+1    | the two 10-bit codewords                             | each `an_alu`         |
| k+2    | the 11-bit coded sum                                 | each `an_alu`         |
| k+3    | voted quotient, `err0/err1`, Error_Detected, Data_Corrupt | `an_dup_alu`     |
| k+4    | one of the four counters increments                  | `case_counters`       |

The pipeline takes one operand pair per cycle and never stalls. `out_valid`
follows `in_valid` four cycles later. Division, the remainder check, voting
and the comparison with the golden sum all happen as one combinational
step between stage 3 and stage 4. The golden adder reads the stage-1
register *before* any injected input fault and is delayed two cycles to
line up with the units.

## Voter and outcome flags

Each unit delivers a quotient and `err` (its remainder is non-zero). The
voter (`voter.sv`) works as follows:

| err0 | err1 | result used | comment                                       |
|------|------|-------------|-----------------------------------------------|
| 0    | x    | unit 0      | unit 0 passes its own check                   |
| 1    | 0    | unit 1      | unit 0 identified itself as faulty            |
| 1    | 1    | unit 0      | both failed; data likely wrong, flagged       |

Each result then gets two flags:

- **Error_Detected** (`out_err_detected`) is `err0 | err1`.
- **Data_Corrupt** (`out_data_corrupt`) is set when the voted quotient
  differs from the golden sum.

Each result falls into one of four cases, and `case_counters` keeps one
counter per case. The counter index follows `an_pkg::case_e`:

| index | case     | meaning                                                        |
|-------|----------|----------------------------------------------------------------|
| 0     | DO, NE   | data ok, no error flagged: the fault had no visible effect     |
| 1     | DO, E    | data ok, error flagged: a unit caught itself and was outvoted, or a false alarm |
| 2     | DNO, E   | data wrong and flagged: needs both units failing (see below)   |
| 3     | DNO, NE  | data wrong and not flagged: fault outside the code's reach     |

"Correct or flagged" is the share of cases 0 to 2. It measures how often
the system either delivers the right sum or says it did not. Case 3 is
what a plain, unchecked adder would suffer from every effective fault.

With one fault, this voter never produces DNO,E. A fault inside one unit
either leaves its codeword valid (case 0 or 3) or makes the unit flag. A
flagging unit is outvoted by the healthy one (case 1). Case 2 needs both
units to flag at once, which is why the fault controls have a second slot.

## Fault injection

`fault_inj` is a transparent block that sits on a bus. The top level
inserts one on each of these buses:

| site (`an_pkg::fault_site_e`) | bus                                   | width |
|-------------------------------|---------------------------------------|-------|
| `FS_IN_A`, `FS_IN_B`          | stage-1 operand, feeds both units     | 8     |
| `FS_ALUn_CODE_A/B`            | codeword generator output of unit n   | 10    |
| `FS_ALUn_SUM`                 | coded adder output of unit n          | 11    |
| `FS_ALUn_QUOT`                | quotient of unit n                    | 10    |
| `FS_ALUn_REM`                 | remainder of unit n                   | 2     |
| `FS_VOTE`                     | voter output                          | 10    |

The fault kinds (`an_pkg::fault_kind_e`) cover four fault families:

| kind            | family                 | effect on the bus                         |
|-----------------|------------------------|-------------------------------------------|
| `FK_SA0/FK_SA1` | single stuck-at        | `bit_a` tied to 0 / 1                     |
| `FK_INVERT`     | gate substitution      | `bit_a` inverted (an AND that became NAND) |
| `FK_BRIDGE_AND/OR` | bridging            | `bit_a` and `bit_b` shorted, wired-AND / OR |
| `FK_SWAP`       | "bizarre" scrambling   | `bit_a` and `bit_b` interchanged          |

The ports `fault_site[2]` and `fault[2]` give two independent fault slots.
Hold them steady during a run, and pulse `cnt_clear` before it. Use
`FS_OFF` to leave a slot empty. If both slots name the same bus or the same
unit, slot 0 wins. A bit index beyond the width of the bus has no effect.
The injectors are ordinary logic. For a design that is not used for
measurement, tie both sites to `FS_OFF` and synthesis removes them.

## Results of the built-in campaigns

`tb_an_dup_alu` runs a fault-free reference run, 29 single faults and two
double faults. The single faults follow the evaluation mix: 15 stuck-at,
7 substitution, 5 bridge and 2 swap. Each run streams the 361 operand pairs
whose operands are multiples of 7 from 0 to 126. The chosen fault positions
give these results:

| family | DO,NE | DO,E | DNO,E | DNO,NE | correct or flagged |
|--------|-------|------|-------|--------|--------------------|
| stuck-at (15 faults)   | 2995 | 1676 | 0  | 744  | 86 % |
| substitution (7)       | 0    | 1444 | 0  | 1083 | 57 % |
| bridge (5)             | 693  | 680  | 0  | 432  | 76 % |
| swap (2)               | 275  | 0    | 0  | 447  | 38 % |
| double, one per unit (2) | 84 | 553  | 85 | 0    | 100 % |

These numbers depend entirely on where the faults are placed. Every
undetected result (DNO,NE) comes from one of two kinds of fault:

- faults on the shared operand inputs, which both units encode into
  consistent but wrong codewords;
- faults after the check (quotient or voter output).

No fault between the encoder output and the remainder went undetected in
these runs.

## Modules

| file                 | contents                                                    |
|----------------------|-------------------------------------------------------------|
| `rtl/an_pkg.sv`      | `A = 3`, fault kind/site enums, `fault_t`, `case_e`         |
| `rtl/an_dup_alu.sv`  | top: input stage, two units, golden adder, voter, output stage, counters, fault decode |
| `rtl/an_alu.sv`      | one unit: encoders, stage 2, coded adder, stage 3, ÷3, remainder check |
| `rtl/an_encoder.sv`  | `3N = N + 2N`                                               |
| `rtl/an_adder.sv`    | codeword adder with carry out                               |
| `rtl/div3.sv`        | restoring long division by 3, unrolled, combinational       |
| `rtl/voter.sv`       | result selection from the two error flags                   |
| `rtl/golden_adder.sv`| reference sum with a `LAT`-stage delay line                 |
| `rtl/case_counters.sv`| four saturating outcome counters with clear                |
| `rtl/fault_inj.sv`   | bus fault injector                                          |

Top-level parameters:

- `W` is the operand width. It defaults to 8; codeword, sum and quotient
  widths follow from it.
- `CNT_W` is the counter width. It defaults to 17, which is enough for a
  full sweep of all 2^16 operand pairs.

Reset is asynchronous and active low. Every register resets to zero, which
is also a valid codeword.

## Simulation

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Two examples with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/an_pkg.sv tb/tb_model_pkg.sv tb/tb_an_dup_alu.sv --top-module tb_an_dup_alu
./obj_dir/Vtb_an_dup_alu

verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/an_pkg.sv tb/tb_model_pkg.sv tb/tb_div3.sv --top-module tb_div3
./obj_dir/Vtb_div3
```

`tb/tb_model_pkg.sv` holds the reference model that the unit and system
testbenches compare against. It is written with integer multiply, divide
and modulo, not with the structures of the RTL.

What the testbenches cover:

- **`tb_an_dup_alu`** runs the top at its default parameters. It does all
  the fault campaigns above. It then runs two fault-free sweeps over all
  65 536 operand pairs; the second one drives a counter into saturation. It
  checks every result, the 4-cycle latency and the counters after each run.
  It also fails if any of these never happened:
  - the voter choosing unit 1;
  - both units flagging;
  - an idle input cycle;
  - a counter clear;
  - saturation;
  - one of the four cases.
- **Unit testbenches.** They cover the encoder, adder and divider
  exhaustively. The ALU unit, voter, golden adder, counters and injector
  are checked against the reference model with random stimulus.

The top also carries a concurrent assertion: without an injected fault,
neither unit may flag and the voted sum must equal the golden sum.

## Design choices and limits

These follow the original design:

- 8-bit operands;
- `A = 3`, with the `N + 2N` encoder;
- adder-only units;
- pipeline stages 1 to 3;
- division by 3 with a remainder check;
- a voter driven by the two error flags;
- a golden adder;
- the two flags and four counters;
- the four fault families.

These are this implementation's own choices:

- **Division.** The divider is restoring long division. The original
  divider is described only as a simple, unoptimised iterative technique.
- **Voter priority.** Unit 0 is preferred. When both units flag, unit 0's
  result is used.
- **Output stage.** The design adds a fourth, output register stage, a
  valid signal, asynchronous reset, a counter clear, counter saturation and
  a counter width of 17 bits.
- **Fault injection is at bus level.** The original evaluation changed
  individual gates and wires of a schematic. Here faults can only be placed
  on the buses between sub-blocks. Gates inside the adders and the divider
  cannot be reached.
- **Fault models.** Gate substitution is modelled as an inverted wire.
  Bridges join two wires, not three. The second fault slot is an addition
  used to reach the both-units-failed case.
- **Input set.** The 361-pair input set (both operands multiples of 7) is
  read as 19 × 19 pairs from 0 to 126. All multiples of 7 below 256 would
  give 37 × 37 pairs.
- **Scope.** Subtraction, multiplication and division are not implemented.
  Neither is the comparison with a triple-modular-redundancy system, which
  was only suggested as further work.
