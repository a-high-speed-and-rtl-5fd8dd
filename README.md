# 2-stage pipelined 4-bit signed multiply-accumulate unit

This design multiplies two 4-bit two's-complement numbers every clock cycle and adds the
product to a running sum. The sum is held in a 16-bit accumulator: the 8-bit product plus
8 guard bits. The result is presented clamped to 8 bits (-128..127). The pipeline has two
stages:

```
 x[3:0] ─┐   ┌──────┐ prod  ┌────────┐ prod_q  ┌────────────┐ sum,c ┌─────────┐ acc  ┌─────────┐
         ├──►│ vsm4 ├──────►│ 8-bit  ├────────►│ rca16_comp ├──────►│ 17-bit  ├──┬──►│sat_unit ├──► out[7:0]
 y[3:0] ─┘   └──────┘       │  PIPO  │ +8 guard│  a + b + 0 │       │  PIPO   │  │   └─────────┘
                            └────────┘  bits   └─────▲──────┘       └─────────┘  │
                                                     └──────────────── b ────────┘
```

The multiplier and the adder are built from a single full-adder cell. The cell comes in
two forms that differ only in the polarity of their carry pins. Alternating the two forms
lets a ripple carry chain pass the carry along with no inverters or buffers between cells.
The arrangement comes from a transmission-gate circuit, where it limits the load on each carry
node. In RTL, the same structure gives a netlist that maps one to one onto that cell
array. You can read it, check it and change it cell by cell.

## The full-adder cell and its two carry polarities

The basic cell (`ftghfa21t`) computes A xor B and A xnor B in one dual-rail stage
(`xor_xnor11t`). It then uses that pair as the complementary select lines of two 2:1
transmission-gate multiplexers (`tg_mux2`):

| cell | carry in | carry out | Sum | carry out equation |
|---|---|---|---|---|
| `ftghfa21t` | true `cin` | true `cout` | `x ? ~cin : cin` | `x ? cin : b` |
| `fa_type01` ("Type 0-1") | true `cin` | inverted `cout_n` | `x ? ~cin : cin` | `x ? ~cin : ~b` |
| `fa_type10` ("Type 1-0") | inverted `cin_n` | true `cout` | `x ? cin_n : ~cin_n` | `x ? ~cin_n : b` |

Here `x = a ^ b`. The carry mux uses the fact that when A equals B the carry out is B.

All three forms use the same four parts and differ only in which signals feed the two
multiplexers. They are therefore one module, `ftghfa21t`, with two parameters:

- `INV_CIN = 1` means the carry pin holds the inverted carry.
- `INV_COUT = 1` means the cell delivers the inverted carry.

`fa_type01` and `fa_type10` are that module with the parameters fixed.

A Type 0-1 cell always feeds a Type 1-0 cell. Along a chain, the carry wire is therefore
true between odd and even bit positions and inverted between even and odd ones. Whenever
you read a carry wire, check which kind of cell drives it. In `vsm4`, the wires driven by
Type 0-1 cells (`c03`, `c05`, `fc2`, `fc5`, `fc7`) hold inverted carries. All other carry
wires are true.

## Adder: `rca16_comp`

This is a 16-bit ripple adder built from eight Type 0-1 / Type 1-0 pairs. Bit 0 is a
Type 0-1 cell with a true carry in, and bit 15 is a Type 1-0 cell with a true carry out.
`N` is a parameter but must be even. An elaboration-time assertion checks this.

## Signed multiplier: `vsm4`

The multiplier sums partial products column by column ("vertically and crosswise"). It is
made signed in the Baugh-Wooley manner:

- The six products of the sign bit of one operand with a magnitude bit of the other enter
  complemented: `(x3·y0)'`, `(x3·y1)'`, `(x3·y2)'`, `(x0·y3)'`, `(x1·y3)'`, `(x2·y3)'`.
- `x3·y3` enters true.
- A constant 1 is added in columns 4 and 7.

The result modulo 256 is the two's-complement product:

| column | terms |
|---|---|
| 0 | x0y0 |
| 1 | x1y0, x0y1 |
| 2 | x2y0, x1y1, x0y2 + carries |
| 3 | (x3y0)', x2y1, x1y2, (x0y3)' + carries |
| 4 | 1, (x3y1)', x2y2, (x1y3)' + carries |
| 5 | (x3y2)', (x2y3)' + carries |
| 6 | x3y3 + carries |
| 7 | 1 + carry |

Thirteen cells reduce the columns:

- Five cells form a first row.
- Two cells fold in the column-4 constant and `(x3y0)'`.
- A final ripple row of six cells produces p[2]..p[7].

Some inputs are tied to constants so that a cell does the job a half adder would do. For
example, a Type 1-0 cell whose inverted carry pin is tied to 1 has a carry in of 0. Also,
`x0y2` enters column 2 as `(x0y2)'` on an inverted carry pin, which adds `x0y2`. The carry
out of the column-7 cell is dropped. The comments in `vsm4.sv` give the role of each
instance.

## Pipeline, timing and control: `mac2s4b`

- **Stage 1:** `vsm4` → 8-bit `pipo_reg` (`u_preg`).
- **Stage 2:** the registered product, widened to 16 bits, plus the accumulator, through
  `rca16_comp` (carry in 0) → 17-bit `pipo_reg` (`u_areg`). The register holds
  `{sum[15:0], cout}`, with the carry in bit 0 (`mac_pkg::acc_reg_t`).
- **Output:** `sat_unit` clamps the registered sum. This stage is combinational.

Operands present before rising edge *k* are in the product register after edge *k*. They
are included in `acc` and `out` after edge *k+1*. That gives a latency of two cycles and a
throughput of one MAC per cycle.

The registers are built from `dff_sr` flip-flops. These load on the rising edge and have
asynchronous active-low set and reset. Both registers share `set_n` and `reset_n`:

- `reset_n` clears the product register and the accumulator. This is how a new
  accumulation starts.
- `set_n` forces all bits to 1 (product -1, accumulator -1). If both are low, set wins.
  If set is then released while reset is still low, the bits go to 0 at the next rising
  clock edge, not at once.

There is no enable, clear or valid signal. The unit adds a product on every edge.

## Guard bits, wrap-around and saturation

The accumulator has 8 guard bits above the 8-bit product. The largest product is
(-8)·(-8) = 64, so at least 511 worst-case products (32767 / 64) fit before the 16-bit
register overflows. A random stream stays far below that. Past that point the accumulator
wraps modulo 2^16. Only the output is saturated.

`sat_unit` works on the bit pattern, not with a magnitude comparator:

- `op_5` = positive and any of bits 14..7 set → all ones on `out[6:0]` (127).
- `op_6` = non-negative, or negative with bits 14..7 all ones → pass `in[6:0]`.
- A negative value outside the range gets zeros on `out[6:0]` (-128).
- `out[7]` is the sign bit `in[15]`.

## Departures and design choices

- **Sign extension of the product (parameter `SIGN_EXTEND`, default 1).** The reference
  block diagram ties the adder's upper eight operand bits to 0. That adds a negative product
  such as -1 as +255. By default this design fills the guard bits with the product's sign
  bit, so the accumulator holds the true signed sum. `SIGN_EXTEND = 0` gives the grounded
  version, which `tb_mac2s4b_zext` tests against an unsigned-addend reference.
- **Flip-flop.** The storage cell is specified as a six-gate edge-triggered network. Here
  it is an `always_ff` with two asynchronous controls. The active edge (rising) and the
  priority when set and reset are both low (set wins) are choices made here.
- **Shared set/reset.** Each register of the reference has its own Set_bar/Reset_bar
  inputs. Here the two registers share one pair.
- **Saturation internals.** The net names and input groupings of `sat_unit` follow the
  reference schematic. The operation on each net (any-bit-set versus all-bits-set) was
  chosen to give the required -128..127 clamp.
- **Not in the RTL.** The transistor-level design is left out: the 21-transistor FinFET
  cell, transmission-gate sizing and layout. So are the input and output buffers that model
  drive and load in circuit simulation, and every power, delay and corner figure. The
  carry-polarity structure is kept exactly, but in RTL it is only a netlist property.
- The base form of `ftghfa21t` (both carries true) is not used by the MAC. Only its
  Type 0-1 and Type 1-0 forms are. Its testbench checks it on its own.

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | widths (4/8/8/16/8), saturation limits, accumulator register struct |
| `rtl/xor_xnor11t.sv`, `rtl/tg_mux2.sv` | XOR/XNOR stage and complementary-select mux |
| `rtl/ftghfa21t.sv`, `rtl/fa_type01.sv`, `rtl/fa_type10.sv` | the three full-adder cells |
| `rtl/rca16_comp.sv` | alternating-polarity ripple adder |
| `rtl/vsm4.sv` | 4x4 signed multiplier |
| `rtl/dff_sr.sv`, `rtl/pipo_reg.sv` | set/reset flip-flop and parallel register |
| `rtl/sat_unit.sv` | 16→8-bit saturation |
| `rtl/mac2s4b.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module above, plus `tb_mac2s4b_zext` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each one
has a watchdog that counts a failure if the simulation stalls. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/mac_pkg.sv tb/tb_mac2s4b.sv --top-module tb_mac2s4b -o sim
./obj_dir/sim
```

Replace `tb_mac2s4b` with any other testbench name.

What each testbench checks:

- **Cell testbenches:** all 8 input combinations, in two orders.
- **`tb_rca16_comp`:** full carry ripples plus 4000 random additions, against integer
  addition.
- **`tb_vsm4`:** all 256 signed operand pairs.
- **`tb_sat_unit`:** all 65536 inputs.
- **`tb_dff_sr` and `tb_pipo_reg`:** loading on the clock edge, the asynchronous set and
  reset, and set-over-reset priority.
- **`tb_mac2s4b`:** runs the top at its default parameters against an integer reference
  pipeline, in these phases:
  - the two-cycle latency;
  - asynchronous set and reset;
  - 1000 random operand pairs;
  - runs of large products into positive and negative saturation and back;
  - 600 products of 64, which overflow and wrap the accumulator.

  It counts how often each of these happened and fails if any never did.

All testbenches pass. Timing is not modelled: the clock in the testbenches has no relation
to a real clock rate.
