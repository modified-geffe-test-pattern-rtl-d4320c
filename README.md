# Geffe-style test pattern generators with embedded LFSRs

A built-in self-test (BIST) circuit needs an on-chip source of test patterns.
A plain linear feedback shift register (LFSR) is cheap. But its consecutive
patterns are strongly correlated, which hurts delay-fault and sequential-fault
testing, because those depend on *pairs* of consecutive patterns. The Geffe
generator is a classic keystream generator. It gives more varied pattern
sequences: a selector LFSR0 drives a 2-to-1 multiplexer that picks, at every
clock, the output of either LFSR1 or LFSR2. The cost is three full registers,
d0 + d1 + d2 flip-flops.

This RTL implements three cheaper variants of that generator. Each keeps the
idea of switching between two pseudo-random sources, but uses fewer registers:

| Variant | Name | Registers | Flip-flops (default) | Pattern width |
|---|---|---|---|---|
| Modification 1 | G1(d1,d2) | LFSR1, LFSR2; no selector LFSR | d1 + d2 = 3 + 4 = 7 | d1 = 3 |
| Modification 2 | G2(d0,d3[d1]) | selector LFSR0 + one split register LFSR3+ | d0 + d3 = 3 + 7 = 10 | d1 = 4 |
| Modification 3 | G3(d4[d1]) | one split register LFSR4+ that selects itself | d4 = 9 | d1 = 4 |

The top level, `geffe_tpg_top`, places the three default generators side by
side. They share clock, reset and enable, and each has its own pattern and
select outputs. The three variants are alternatives, not stages of one
pipeline; pick the one you want and instantiate it alone.

## The building block: internal-XOR LFSR (`lfsr_type2`)

All registers are "type 2" (internal-XOR, Galois) LFSRs. Cells are numbered
S_0 ... S_{D-1}. The last cell S_{D-1} is fed back:

    S_0'  = S_{D-1}
    S_j'  = S_{j-1} XOR (c_j AND S_{D-1})     for 1 <= j <= D-1

c_j is the coefficient of x^j in the characteristic polynomial
x^D + ... + c_1 x + 1. In the RTL, a polynomial is given as a D-bit tap mask
`TAPS`: bit j is set for each middle term x^j (0 < j < D). Bit 0 is unused.

- x^3+x+1 is `3'b010`.
- x^7+x^6+x^4+x+1 is `7'b1010010`.

Named masks for the default configuration are in `geffe_pkg`.

Every register resets to the seed 0...01 (only the last cell set). **Bit j of
every state and pattern bus is cell S_j.** When a state is written as a
string, such as `0000101`, S_0 is the leftmost character. So the string
`001` is the bus value `3'b100`. Keep this in mind when comparing waveforms
with written sequences.

## Embedding one LFSR inside another (`split_lfsr`)

This is the central trick of Modifications 2 and 3.

Take a primitive polynomial of degree D whose low part has the same middle
terms as a smaller primitive polynomial of degree d1 < D. Add a term x^{d1},
so that c_{d1} = 1. Example:

- LFSR1 = x^4 + x + 1
- LFSR3+ = x^7 + x^6 + x^4 + x + 1

In the type-2 structure, the first d1 cells of the big register then hold the
same XOR taps as the small LFSR. Now cut the feedback line just after cell
S_{d1-1} and put a multiplexer there:

```
            +--------------- MUX (sel) <----+---- S_{d1-1}   (input 1)
            |                               +---- S_{D-1}    (input 0)
            v
   left network: S_0 and every tap c_j with j < d1   <- fb_left
   right network: every tap c_j with j >= d1          <- S_{D-1}
```

- **`sel = 0`:** the left network is fed from S_{D-1}, like the right one. The
  register is the full-length degree-D LFSR, with period 2^D - 1 from any
  non-zero state.
- **`sel = 1`:** the left network is fed from S_{d1-1}. Cells S_0..S_{d1-1}
  form a closed ring with exactly the taps of LFSR1. So they step as LFSR1
  alone, with period 2^{d1} - 1. The right cells keep shifting and take in
  S_{d1-1} through the tap at x^{d1}.

The generator's pattern is always the leftmost d1 cells. So the select bit
chooses, cycle by cycle, between "LFSR1 patterns" and "full-LFSR patterns". No
separate LFSR1 or LFSR2 register exists, which saves d1 + d2 - d3 flip-flops
against the conventional generator.

Two details matter:

- **The tap at x^{d1} (`TAPS[EMB] = 1`).** It is what keeps the right cells
  from emptying while the left ring runs alone. Without it, the register can
  fall into the all-zero state and lock up. Both LFSR modules assert that the
  state never becomes zero.
- **Which network the tap in front of S_{d1} belongs to.** It is fed by
  S_{D-1}, the right network. Moving it to the left network gives a different
  and much poorer sequence.

## The three generators

**`geffe_mod1`: G1(d1,d2), no selector.**

- `sel = S_{1,i} XOR S_{2,i}`. i is parameter `SEL_BIT`, default 0.
- Equal cells give LFSR1's leftmost W cells; different cells give LFSR2's.
- With co-prime d1 and d2 the pattern period is at most
  (2^{d1}-1)(2^{d2}-1). The default G1(3,4) reaches 105.

**`geffe_mod2`: G2(d0,d3[d1]).**

- The last cell of LFSR0 drives the MUX of the split register LFSR3+.
- A 1 lets the embedded LFSR1 run alone.
- The default is G2(3,7[4]): LFSR0 = x^3+x+1, LFSR3+ = x^7+x^6+x^4+x+1,
  d1 = 4. Its pattern period is 63.

**`geffe_mod3`: G3(d4[d1]).**

- There is no selector register at all. Cell S_{d1} of the split register
  LFSR4+ is its own MUX select.
- The default is G3(9[4]): x^9+x^5+x^4+x+1, d1 = 4. Its sequence does not
  repeat within the first 32768 patterns.

All three are fully synchronous:

- One pattern per enabled clock edge.
- `en = 0` holds every register.
- `rst_n = 0` at a clock edge reloads the seeds.

`pattern` and `sel` are combinational functions of the current state. The
first pattern after reset is the seed's pattern (G1 `001`, G2/G3 `0000`).

## Changing the configuration

Every generator takes the register degrees and tap masks as parameters.

Example: the generator used for 8-input circuits, G2(5,11[8]):

```systemverilog
geffe_mod2 #(.D0(5), .TAPS0(5'b00100),            // x^5+x^2+1
             .D3(11), .TAPS3(11'b10100011100),    // x^11+x^10+x^8+x^4+x^3+x^2+1
             .D1(8)) u_tpg (.clk, .rst_n, .en, .pattern, .sel);
```

Rules for a working split register:

- The big polynomial must be primitive.
- Its middle taps below x^{d1} must equal those of the embedded degree-d1
  polynomial.
- c_{d1} must be 1.
- 2 <= d1 < D. The modules stop elaboration with `$error` otherwise.

`tb/tb_workloads.sv` lists tap masks for CUT widths from 3 to 19 inputs.

## How far it has been checked

The testbenches compare the RTL against an independent reference model in
`tb/geffe_ref_pkg.sv`. That model is written from exponent lists, not tap
masks.

- **Hand-worked sequences.** These are reproduced exactly:
  - the 3-bit sequences of x^3+x+1 and x^3+x^2+1
  - the first states and patterns of G1(3,4), G2(3,7[4]) and G3(9[4])
  - the two split-register transitions 0000001 -> 0000101 (sel = 1) ->
    1100111 (sel = 0)
- **Periods.**
  - `lfsr_type2`: 7 for x^3+x+1 and 31 for x^5+x^2+1.
  - `split_lfsr`: 127 in full mode and 15 for the embedded ring.
  - G1 105, G2 63, and no repeat of G3 within 32768 patterns.
- **Random select and enable sequences.** Several thousand steps against the
  model, per block.
- **Full-size run (`tb_geffe_tpg_top`).** The top runs with its default
  parameters for 32768 patterns, including pauses and a mid-run reset. Every
  mechanism is exercised and counted: both MUX inputs of every generator,
  pausing, and restarting.
- **Worked table configurations (`tb_table_configs`).** Eight split
  registers are checked, for CUT widths 3, 4, 7 and 9 in both G2 and G3. For
  each one:
  - with the select at 0 it has the full period 2^D - 1;
  - with the select at 1 its first n cells step exactly as the embedded
    LFSR1.
- **Published experiment configurations (`tb_workloads`).** G2(5,d3[n]) and
  G3(d4[n]) are run for CUT widths up to 19 inputs, 32768 patterns each. The
  test compares the pattern period, the number of distinct consecutive pattern
  pairs and, for G3, the position of the last new pair with the published
  figures.
  - All checked rows agree.
  - A few G2 figures could not be matched from the given polynomials and
    are not checked (see below).

Each block testbench was also run against a deliberately broken copy of its
module, and it fails as it should.

## Departures and open points

- **Reset and enable.** The original describes the generators only as free
  running from the seed 0...01. The synchronous active-low reset and the
  run-enable are additions.
- **G3 select rule.** The description of the self-selecting register is not
  fully consistent. This RTL uses cell S_{d1} as the select, with 1 =
  embedded ring. That rule reproduces the worked example and every published
  G3 period.
- **Two polynomial sets.** For some widths, the worked example tables and
  the table of experiment generators list different (equally valid)
  polynomials; for example, LFSR1 = x^4+x+1 in one and x^4+x^3+1 in the
  other. The defaults follow the worked examples. `tb_workloads` uses the
  experiment set, because the published measurements belong to it.
- **Configuration for 3-input circuits.** Two different polynomial sets are
  given for the 3-bit experiment generators. The set used in `tb_workloads`
  is the one that reproduces the published period (680 for G3) and pair
  counts. The same set calls its G3 a 10-cell register, not a 7-cell one.
- **Wide G2 rows.**
  - For 11 inputs, the published G2 period is twice what the given
    polynomial produces.
  - For 12 or more inputs, the published G2 pair counts are a little off
    from the given polynomials.
  - For these rows only the period is checked (except n = 11, which is left
    out). The published G2 last-pair positions are not checked.
  - Two G3 last-pair positions (14 and 17 inputs) are also not checked.
- **Out of scope.** Not included:
  - the conventional Geffe generator and plain-LFSR generators, which serve
    only as comparison baselines
  - any circuit under test
  - a response compactor or BIST controller

  The fault-coverage figures reported for benchmark circuits need an
  external fault simulator and are not reproduced.

## Files and simulation

| File | Content |
|---|---|
| `rtl/geffe_pkg.sv` | tap masks of the default polynomials, default embedded degree |
| `rtl/lfsr_type2.sv` | internal-XOR LFSR |
| `rtl/split_lfsr.sv` | split register with the feedback multiplexer |
| `rtl/geffe_mod1.sv`, `geffe_mod2.sv`, `geffe_mod3.sv` | the three generators |
| `rtl/geffe_tpg_top.sv` | the three defaults side by side |
| `tb/geffe_ref_pkg.sv` | reference model (used by all testbenches) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workloads` and `tb_table_configs` |
| `tb/wl_*.sv` | period / pair monitor and wrappers used by `tb_workloads` |
| `tb/emb_check.sv` | full-period and embedding checker used by `tb_table_configs` |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. To run
one with Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_geffe_tpg_top -y rtl -y tb +libext+.sv \
  rtl/geffe_pkg.sv tb/geffe_ref_pkg.sv tb/tb_geffe_tpg_top.sv
./obj_dir/Vtb_geffe_tpg_top
```

Replace the top module and testbench file for the others. Each finishes
within seconds.

Lint notes:

- Verilator reports unread cells: LFSR0's inner cells in `geffe_mod2`, the
  right cells of the split registers, and the open `msb` pins in
  `geffe_mod1`. These are intentional. The generators expose only the cells
  that form the pattern and select.
- Tap masks in `geffe_pkg` that a given module does not use show up as
  unused-parameter warnings when that module is linted alone.
