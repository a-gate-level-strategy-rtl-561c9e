# Carry select adder with delay-driven block sizes

A ripple carry adder is slow because the carry must pass through every full
adder in turn. A carry select adder cuts the N bits into Q blocks. Every block
except the first adds its bits twice at once: once as if its carry input were
0, and once as if it were 1. When the real carry arrives from the block below,
multiplexers pick the matching sum and carry. The carry therefore crosses one
multiplexer per block instead of one full adder per bit.

How fast such an adder is depends almost entirely on how the N bits are shared
among the blocks. This RTL builds the adder for any sharing. Its default is the
32-bit sizing **2, 2, 3, 5, 8, 12**, which a delay-driven sizing procedure
produces (described below). That procedure also accounts for the multiplexer
getting slower as its fan-out grows.

## Structure

```
            block 1          block 2                      block Q
 cin ──► [M1-bit chain] ─c1─► sel                ...  ─► sel
             │                [M2 chain, cin=0] ─┐         ...
             ▼ s[M1-1:0]      [M2 chain, cin=1] ─┤
                              sum mux (M2 bits) ◄┤  ──► s[...]
                              carry mux MUX_2   ◄┘  ──► c2 ──► ...  ──► cout
```

| Module | File | Role |
|---|---|---|
| `carry_select_adder` | `rtl/carry_select_adder.sv` | Top level. It splits `x`, `y` and `s` into blocks according to `SIZES` and chains the block carries. |
| `csa_select_block` | `rtl/csa_select_block.sv` | Blocks 2..Q. Each has two carry chains, with carry input 0 and 1, plus the sum mux and the carry mux, all selected by the previous block's carry. |
| `carry_chain` | `rtl/carry_chain.sv` | An M-bit ripple chain of full adders. It forms block 1 on its own and sits twice inside every select block. |
| `full_adder` | `rtl/full_adder.sv` | A one-bit full adder. The carry is the majority of the inputs, and the sum is written in the mirror-adder form `~co&(a|b|ci) \| a&b&ci`. |
| `mux2` | `rtl/mux2.sv` | A W-bit 2:1 multiplexer. `sel=0` picks the carry-in-0 result. |
| `csa_pkg` | `rtl/csa_pkg.sv` | Holds the `block_sizes_t` type, the default sizing and `block_offset()`. |

The whole design is combinational. It has no clock, reset or registers.
`{cout, s} = x + y + cin`.

### Parameters

```systemverilog
carry_select_adder #(
  .Q     (6),                                         // number of blocks
  .SIZES ('{2, 2, 3, 5, 8, 12, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0})  // M_1..M_Q, LSB block first
) u_add (.x, .y, .cin, .s, .cout);                    // N = sum of SIZES[0..Q-1]
```

`SIZES` is a fixed array of `csa_pkg::MAX_BLOCKS` (16) entries. Entries from
`Q` upward are ignored. The width `N` is a localparam derived from the sizes,
so the port widths follow from whatever sizing you choose. An elaboration-time
assertion rejects `Q = 0`, `Q > 16` and any block of size 0.

## Why the blocks grow: the delay model

All times are in units of the full-adder carry delay τ_CARRY. A multiplexer
has delay `α + β·FO`. Here α is its intrinsic delay and β is the extra delay
for each unit of fan-out, both normalised. The select line of block i drives
the M_i sum muxes and the carry mux, so its fan-out is M_i + 1.

* The chains of block i finish at `t_in,i = M_i`.
* Block 2's select is block 1's carry: `t_sel,2 = M_1`.
* For i ≥ 3: `t_sel,i = max(t_in,i-1, t_sel,i-1) + α + β·(M_i + 1)`.
* The adder delay is `max(t_in,Q, t_sel,Q)`, plus a constant for the last
  output mux.

If every block has the same size, the select signal is always the last to
arrive. Each block can therefore grow until its chains finish just as its
select arrives (`t_in,i = t_sel,i`) without slowing the adder. That gives
equal first two blocks and then steadily larger ones.

### The sizing procedure, for N bits and a given α, β

1. Set `M_1 = M_2 = round((α+β) / (ln(1−β)·(2β−1)) − (α+β)/β)`. The smallest
   allowed value is 1.
2. For i = 3, 4, …, take
   `M_i = floor((M_12 + β·Σ_{j=3}^{i−1} M_j + (i−2)(α+β)) / (1−β))`.
   This is the largest size whose chains do not finish after its select. Stop
   before the total would exceed N.
3. Add the missing bits one at a time. Each bit goes to the block where it
   raises the modelled delay least.

For N = 32, α = 0.33, β = 0.26, step 1 gives 1.81, which rounds to 2. Step 2
gives 2, 2, 3, 5, 7, 11, a total of 30 bits. Step 3 adds one bit to block 5
(delay 11.12 → 11.45) and one to block 6 (→ 12.0). The result is the default
sizing, 2, 2, 3, 5, 8, 12.

The procedure is a design-time calculation, not hardware. The RTL takes its
result as a parameter. `tb/tb_csa_sizings.sv` holds a SystemVerilog version of
the procedure and of the delay model.

### Notes on the model

* The "delay" figures used to compare sizings are `max(t_in,Q, t_sel,Q)`. They
  leave out the last multiplexer's `α+β`, which is the same for every sizing.
* Step 3 as written only adds bits to existing blocks. For some (α, β) pairs,
  the reference sizings below instead end with a final block smaller than the bound
  of step 2. One example is N = 32, α = 0.05, β = 0.33, whose sizing is
  2, 2, 3, 5, 8, 12. Steps 1–2 reach 20 bits there, and the next block would
  be allowed 13 bits. The model and the RTL support such sizings, but the
  testbench's version of step 3 does not produce them. Only the α = 0.33,
  β = 0.26 example is checked against the procedure.

### Reference sizings

These sizings for 32- and 64-bit adders are all simulated
(`tb_csa_sizings`). For each one, the delay model above gives the listed delay
to within 0.01.

| N | α | β | sizing | delay |
|---|---|---|---|---|
| 32 | 0.05 | 0.33 | 2 2 3 5 8 12 | 12.76 |
| 32 | 0.20 | 0.21 | 1 1 2 3 4 5 7 9 | 9.93 |
| 32 | 0.21 | 0.10 | 1 1 1 1 2 3 3 4 5 5 6 | 6.85 |
| 32 | 0.30 | 0.08 | 1 1 1 2 2 3 4 5 6 7 / 1 1 1 1 2 3 3 4 5 5 6 | 7.00 / 6.82 |
| 32 | 0.33 | 0.30 | 3 3 5 8 13 / 2 2 3 5 8 12 | 13.00 / 12.92 |
| 32 | 0.48 | 0.40 | 9 9 14 | 15.48 |
| 64 | 0.20 | 0.25 | 1 1 2 4 5 7 10 14 20 / 1 1 1 2 3 5 7 10 14 20 | 20.25 / 20.10 |
| 64 | 0.33 | 0.25 | 1 1 2 3 5 7 10 15 20 | 20.58 |
| 64 | 0.42 | 0.08 | 1 1 1 2 3 4 4 5 6 7 9 10 11 | 11.68 |
| 64 | 0.42 | 0.21 | 1 1 2 4 5 8 10 14 19 / 3 3 3 6 8 11 13 17 | 19.00 / 18.96 |
| 64 | 0.42 | 0.35 | 3 3 6 10 16 26 | 26.51 |
| 64 | 0.48 | 0.21 | 1 1 2 4 5 8 10 14 19 | 19.21 |

Where two sizings are given, the first comes from the procedure and the second
from an exhaustive search. For reference, a 0.35 µm mirror full adder with
transmission-gate muxes has τ_CARRY = 517 ps, τ_int = 97 ps and τ_FO = 19 ps.
That is α ≈ 0.19 and β ≈ 0.037.

## How far to trust it, and what it leaves out

* **Function.** The RTL is plain logic and is checked exhaustively at the cell
  and block level. At the top level it is checked on corner cases and tens of
  thousands of random vectors, for all 13 sizings above.
* **Timing is not in the RTL.** The delay model describes the gate delays of a
  full-custom circuit: mirror full adders and transmission-gate muxes
  whose delay grows with fan-out. Synthesis will map the RTL onto its own
  cells and may restructure it. For example, a synthesis tool is free to
  collapse the duplicated chains or to rebuild the adder entirely. To keep
  the carry-select structure, keep the hierarchy (no flattening) or
  instantiate library cells for `full_adder` and `mux2`.
* **No registers.** Add input and output flops around the adder if it sits on
  a clocked path.
* The sum form in `full_adder` follows the mirror adder's logic equation. The
  single `mux2` of width M in each block stands for M one-bit sum muxes
  sharing one select. Both choices are functionally identical to the
  textbook forms.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs.

```sh
# full-size adder, end to end
verilator --binary --timing --assert -Wno-fatal --top-module tb_carry_select_adder \
  -y rtl -y tb +libext+.sv rtl/csa_pkg.sv tb/tb_carry_select_adder.sv
./obj_dir/Vtb_carry_select_adder
```

Replace the top module and testbench file to run the others:

| Testbench | What it checks |
|---|---|
| `tb_full_adder` | All 8 input combinations. |
| `tb_mux2` | 8-bit random data with both select values. |
| `tb_carry_chain` | A 5-bit chain, all 2¹¹ input combinations. |
| `tb_csa_select_block` | A 4-bit select block, all 2⁹ combinations of `x`, `y` and `sel`. |
| `tb_carry_select_adder` | The default 32-bit adder. It counts, for each block, how often it was selected with carry 0 and with carry 1, how often a carry crossed every block boundary, and how often the adder carried out. It fails if any of these never happened. |
| `tb_csa_sizings` | All 13 reference sizings built and simulated. It also runs the delay model against the table above, and the sizing procedure for N = 32, α = 0.33, β = 0.26, whose result must equal the default `SIZES`. |

To use another sizing, override `Q` and `SIZES` on `carry_select_adder`. The
ports resize themselves.
