# A microprogram control unit with three sources of class codes

This is a compositional microprogram control unit (CMCU). It is organised so that the
next-address logic stays small when it is mapped onto CPLD macrocells with a wide fan-in
(PAL-style product terms) plus on-chip PROM blocks.

A microprogram is split into **operational linear chains** (OLCs). These are runs of
microinstructions held at consecutive addresses. Inside a chain the address counter just
counts. Only at the output of a chain (its last microinstruction) is a real branch needed. Chains
whose outputs branch in the same way are **pseudoequivalent** and are grouped into a
**class** B_i. The next-address logic needs only the class's code and the logical conditions, not
the exact address.

The design's central point is where that class code comes from. There are three sources, and each
class uses exactly one:

| set  | class code comes from | what it costs |
|------|----------------------|---------------|
| Π_A  | **T**, the counter itself. The output addresses of the class's chains were placed so that they form one generalized interval (a cube such as `001**`). | nothing |
| Π_E  | **V**, PROM outputs that are left over because the control-memory word does not fill its PROM blocks exactly | nothing (the bits are there anyway) |
| Π_D  | **Z**, from a small address transformer (BAT) that decodes T | macrocells, but only for the classes left over |

The usual CMCU with an address transformer codes *every* class in the BAT. Here the BAT handles
only the classes that fit neither an interval nor the free PROM bits. That is where the saving
in macrocells comes from.

## Structure

```
            X ─────────┐
                       v
   ┌─────────── BMA (Phi = Phi(T, Z, V, X)) ──Phi──> CT ──T──┬──> Control memory ──> Y
   │             ^  ^                          ^  ^          │     (R0 PROM blocks)
   │             │  └────────── V ─────────────┼──┼──────────┼──── V, y0, yE
   │             └──── Z <── BAT (Z = Z(T)) <──┼──┼──────────┘        │   │
   │                                        +1=y0  Start             │   yE
   │                                                         Start ─> TF (S/R) ── Fetch ──> CM enable
   └── T
```

| module                | block |
|-----------------------|-------|
| `cmcu_u1`             | top level. Wires the blocks below. |
| `cmcu_ct`             | CT, the address counter. Start clears it, y0 makes it count, otherwise it loads Phi. |
| `cmcu_control_memory` | CM, built from `R0` instances of `cmcu_prom_block`, each `t` outputs wide. Outputs are zero while Fetch = 0. |
| `cmcu_bma`            | BMA, the block of microinstruction address. One product term per transition-table line. |
| `cmcu_bat`            | BAT, the block of address transformer. Output-address decoder that produces Z. |
| `cmcu_tf`             | TF, the fetch flip-flop. Start sets it and yE resets it. |
| `cmcu_pkg`            | Sizes, sizing rules, types, and the example's tables. |

### Cycle behaviour

The unit executes one microinstruction per clock. T is a register. The PROM read is
asynchronous, so the word at address T (Y, y0, yE, V) is valid in the same cycle as T. Z and Phi
are also valid in that cycle. At the rising edge:

* `start = 1`: T ← 0 and Fetch ← 1. The first microinstruction is at address 0.
* `y0 = 1`: T ← T + 1. The unit stays in the chain.
* `y0 = 0`: T ← Phi. This is the branch at a chain output.
* `yE = 1`: Fetch ← 0. The control memory then outputs zeros, so the unit stops.

Start has priority over everything, including yE.

While Fetch = 0, CT has no enable input, so it keeps loading Phi. This changes nothing visible,
because Y is zero, and the next Start clears it.

## Control-memory word and the sizing rules

With one bit per microoperation, a word needs N + 2 bits: Y1..YN plus y0 and yE. The PROM blocks
of the device have t outputs, with t ∈ {1, 2, 4, 8, 16}. The rules are:

```
R0 = ceil((N+2)/t)       PROM blocks needed
R3 = R0*t - N - 2        outputs left free  -> |V| = R3
R2 = ceil(log2(I_B+1))   bits to code the I_B classes that are not intervals (+1 for "none")
if R3 >= R2: all of them go on V and there is no BAT
else:        I_E = 2^R3 - 1 classes on V, I_D = I_B - I_E classes on Z,
             R4 = ceil(log2(I_D+1)) = |Z|
```

Code 0 on V and on Z means "this class is not coded here". So a transition-table line for a Π_A
class requires V = 0 and Z = 0 and looks at T. A line for a Π_E or Π_D class ignores T.

`cmcu_pkg` implements these rules as functions (`cm_blocks`, `free_outputs`, `code_bits`,
`e_classes`). The word layout, most significant field first, is `{V, yE, y0, Y[N:1]}` (`cm_word_t`). Its width is
exactly `R0*t`.

## The built-in example

The parameter defaults hold a small worked example:

* R = 5 address bits and M = 31 microinstructions.
* N = 13 microoperations and t = 4. This gives R0 = 4 blocks and a 16-bit word.
* R3 = 1, so V = {v1}.
* I_B = 2 and R2 = 2 > R3, so a BAT is needed: I_E = 1, I_D = 1, and Z = {z1}.

Address map:

| chain | microinstructions | addresses     | output | class |
|-------|-------------------|---------------|--------|-------|
| α1    | b1–b2             | 00000–00001   | 00001  | B1 (Π_A, `0000*`) |
| α2    | b3–b6             | 00010–00101   | 00101  | B2 (Π_A, `001**`) |
| α3    | b7–b8             | 00110–00111   | 00111  | B2 |
| α4    | b9–b13            | 01000–01100   | 01100  | B3 (Π_E, v1 = 1) |
| α5    | b14–b17           | 01101–10000   | 10000  | B3 |
| α6    | b18–b21           | 10001–10100   | 10100  | B4 (Π_D, z1 = 1) |
| α7    | b22–b25           | 10101–11000   | 11000  | B4 |
| α9    | b29–b31           | 11001–11011   | 11011  | end of program (yE = 1) |
| α8    | b26–b28           | 11100–11110   | 11110  | B5 (Π_A, `111**`) |

Transition-table lines held by default in `cmcu_pkg::GAMMA1_TABLE`:

| class | code                | condition   | next       |
|-------|---------------------|-------------|------------|
| B2    | T = `001**`, V=Z=0  | x3          | b9 = 01000 |
| B2    |                     | ¬x3         | b26 = 11100 |
| B3    | v1 = 1, z1 = 0      | x1          | b18 = 10001 |
| B3    |                     | ¬x1 x2      | b20 = 10011 |
| B3    |                     | ¬x1 ¬x2     | b26 = 11100 |
| B4    | v1 = 0, z1 = 1      | x5          | b27 = 11101 |
| B4    |                     | ¬x5         | b5 = 00100 |

The BAT decodes z1 = 1 at 10100 and 11000, which are the outputs of B4's chains. The control
memory carries v1 = 1 at 01100 and 10000, which are the outputs of B3's chains.

**The example is incomplete.** It does not define:

* the branches of classes B1 and B5;
* the microoperation columns Y.

With the defaults, Phi is therefore 0 wherever no line applies, and Y is always 0. After Start, the
default unit runs b1, b2 and returns to b1. To run a real microprogram, supply the three tables as
parameters of `cmcu_u1`.

## Writing your own tables

* **`BMA_TABLE`** (`trans_row_t`, `BMA_ROWS` lines). Each line is one product term:
  `(T & t_mask) == t_val && V == v && Z == z && (X & x_mask) == x_val`. When the term fires, it ORs
  `addr` into Phi.
  * For a Π_A class, put its interval in `t_mask`/`t_val`, where a mask bit of 0 means `*`.
  * For Π_E and Π_D classes, set `t_mask = 0`.
  * Lines must be mutually exclusive. An assertion in `cmcu_bma` reports any overlap.
  * `mk_row()` builds a line.
* **`BAT_TABLE`** (`bat_row_t`, `BAT_ROWS` lines). Each line is an output address and its K_D code.
* **`CM_CONTENT`**. One `cm_word_t` per address:
  * y0 = 1 everywhere inside a chain;
  * y0 = 0 at a chain output;
  * yE = 1 at the final output;
  * V = K_E at the outputs of Π_E classes.

Bit order:

* `T[R-1]` is T1, the leftmost bit of the addresses above.
* `x[i-1]` is x_i.
* `v[0]` is v1 and `z[0]` is z1.

The widths of V and Z come from `cmcu_pkg`. To change N, t, R or the number of classes, edit the
package's configuration constants. Every derived width follows from them.

A table with no BAT lines (the case R3 ≥ R2) is not supported, because an array cannot have zero
width. In that case, use a single line with an address that never occurs at a chain output, or
remove `u_bat` and tie Z to 0.

## Choices made here, and their confidence

These parts follow the method directly:

* the three code sources and how they are sized;
* Phi = Phi(T, Z, V, X) and Z = Z(T);
* the rule that V = Z = 0 selects the Π_A lines;
* the seven example lines;
* the z1 equation.

These are choices made in this design:

* Start clears CT to 0 synchronously and has priority.
* TF is clocked, and S (Start) wins over R (yE).
* The PROM read is asynchronous and gated by Fetch.
* CT has no enable input.
* The CM word layout is `{V, yE, y0, Y}`.
* There are L = 5 logical conditions.
* Phi = 0 when no line fires.
* yE sits at the output of α9. That chain ends the program and belongs to no class.

One point of the example needs a decision. A statement in its description puts v1 = 1 in the
cells 10100 and 11000. Those are B4's outputs, which the BAT already codes with z1. Following that
statement would make B4 indistinguishable from B3. So v1 is placed at B3's outputs (01100 and
10000), which matches K_E(B3) = 1 and the z1 equation.

The block diagram shows which signals connect, not gate-level detail. The RTL uses only those
connections, plus an `addr` output that exposes T for observation.

## Simulating

Each testbench in `tb/` is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cmcu_pkg.sv tb/cmcu_ref_pkg.sv tb/tb_cmcu_u1.sv --top-module tb_cmcu_u1
./obj_dir/Vtb_cmcu_u1
```

The testbenches:

* **`tb_cmcu_u1`** runs the unit end to end. It adds test-only branches for B1 (x4 → b3, ¬x4 → b7)
  and B5 (x4 → b29, ¬x4 → b1) and a generated Y pattern, then runs 300 programs with random X. A
  cycle-accurate reference model checks T, Y and Fetch in every cycle. The test counts:
  * counting inside chains;
  * branches from Π_A, Π_E and Π_D classes;
  * each of the seven example lines;
  * stops by yE;
  * restarts, and Start during a run.

  A mechanism that never occurred counts as a failure.
* **`tb_cmcu_u1_full`** runs the unit with all parameters at their defaults.
* **Unit testbenches** cover CT, TF, BMA, BAT, the control memory and the package:
  * the BMA test is exhaustive over T, V, Z and X, and also checks D1 and D2 against their
    sum-of-products form;
  * the package test checks the sizing rules.

`tb/cmcu_ref_pkg.sv` is the reference model. It is written from the address map and the branch
formulae rather than from the RTL's tables.

At the defaults, the unit synthesises to 6 flip-flops (5 in CT and 1 in TF), the four 32 × 4 PROM
blocks, and a few tens of word-level cells for the BMA and the BAT.
