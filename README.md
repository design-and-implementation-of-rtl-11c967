# Single-stage 32-bit multiplier and divider

This is a small integer arithmetic unit: a 32 x 32 -> 64-bit multiplier and a
32-bit divider. Both follow one idea. Do not cut a long combinational function
into several short stages, each with a rank of flip-flops after it. Put the
whole function, or the whole repeated step, between one launching register and
one capturing register. The path then carries one large combinational delay,
one clock-to-out and one setup time. A multi-stage version carries one
clock-to-out and one setup time for every stage and needs a register rank at
each cut.

```
  multi-stage:   FF -> comb -> FF -> comb -> FF -> comb -> FF -> comb -> FF
  single-stage:  FF -> ------------- one large comb block ------------ -> FF
```

The multiplier applies this to the whole product. The divider applies it to
one shift-subtract-restore step, so each quotient bit costs exactly one clock.

## Files

| file | what it is |
|------|------------|
| `rtl/ssd_pkg.sv` | shared constants: operand width 32, widths of the exponent and the step counter |
| `rtl/ssd_mul_core.sv` | the multiplier's combinational block: product, sign, exponent, overflow |
| `rtl/ssd_mul.sv` | the multiplier: operand register, `ssd_mul_core`, product register |
| `rtl/div_structural.sv` | the bit-serial restoring divider with start/ok handshake |
| `rtl/ssd_arith_unit.sv` | top level: multiplier and divider side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ssd_arith_unit_w64` for 64-bit operands |

## Multiplier (`ssd_mul`)

```
 opa, opb --> [operand regs] --> ssd_mul_core --> [product, exponent,  --> outputs
 enable ----------+-----------------------------+  sign, exception regs]
```

Ports: `clk`, `rst`, `enable`, `opa[31:0]`, `opb[31:0]`, `product[63:0]`,
`exponent[5:0]`, `sign` and `exception`.

- Operands are 32-bit two's complement numbers. `product` is the full 64-bit
  two's complement product.
- `sign` is 1 when the product is negative.
- `exponent` is the position of the most significant 1 of |product|, that is
  floor(log2 |product|). It is 0 for a product of 0 or ±1. Six bits cover
  positions 0 to 63.
- `exception` is an overflow flag. It is 1 when the product does not fit in
  a 32-bit signed word, so only the upper half of the result holds it. No
  other exception exists for integer multiplication.
- `enable` gates both register ranks. While it is low, nothing moves and the
  outputs hold.
- `rst` is synchronous and active high. It sets every register, including
  the outputs, to zero.

Timing: operands sampled on an enabled clock edge appear on the outputs after
the next enabled edge. With `enable` held high the latency is two edges and a
new product comes out every cycle. There is no valid output. After reset, and
with `enable` high, the outputs are valid from the second edge onwards.

The multiply itself is written as a full-width signed multiplication. Synthesis
then chooses the partial-product and adder structure for the target: Booth
recoding, a Wallace tree, an array, or FPGA DSP blocks. The design only
requires that all of it sits in one combinational block.

## Divider (`div_structural`)

Ports: `clk`, `reset`, `start`, `A[31:0]` (dividend), `B[31:0]` (divisor),
`D[31:0]` (quotient), `R[31:0]` (remainder), `err` and `ok`. All values are
unsigned.

### How a step works

The remainder and the quotient share one 64-bit register `rq = {rem, quo}`.
A start loads `rq = {32'b0, A}`, the divisor register with `B`, and a step
counter with 32. Each busy clock then does the following in one combinational
path:

1. Take the top 33 bits of `rq` shifted left by one. This is `trial`:
   2·rem plus the next dividend bit.
2. Compute `diff = trial - divisor` at 33 bits.
3. If no borrow, keep `diff` as the new remainder and shift in quotient bit
   1. Otherwise keep `trial` and shift in 0. This is the "restore" step, and
   here it is only a multiplexer.

The remainder always stays below the divisor, so `trial < 2·divisor`. A
non-negative difference therefore fits in 32 bits, and bit 32 of `diff` is
exactly the borrow. That keeps the step to one 33-bit subtractor and a 32-bit
multiplexer. After 32 steps, `rq[63:32]` holds the remainder and `rq[31:0]`
holds the quotient.

### Handshake and timing

- `start` is sampled on a rising edge. If it is high at edge 0, `ok` rises
  after edge 32, which is 33 edges counting the start edge (one load, then 32
  steps). `ok` stays high, and `D`/`R` hold, until the next `start`.
- `D` and `R` are read directly from the working register. They change during
  a division and are meaningful only while `ok` is high.
- A `start` during a division abandons it and begins the new one.
- `err` is set with the start when `B == 0`. The division still runs its 32
  steps. With a zero divisor every step subtracts nothing, so `D` becomes all
  ones and `R` becomes `A`. No other error exists for unsigned division.
- `reset` is synchronous and active high. It clears everything, including
  `ok` and `err`.

The register set is 64 bits for remainder and quotient, 32 for the divisor, a
6-bit counter, and the busy, ok and err flags.

## Top level (`ssd_arith_unit`)

The two units share `clk` and `rst`. Apart from that they are independent and
can run at the same time. Their ports are brought out with a `mul_` or `div_`
prefix. The divider's `D` is called `div_q`. The parameter `WIDTH` (default
32) sets the operand width of both units. `EXPW` follows from it and should
be left at its default.

## Where this RTL makes its own choices

The published description of this unit gives its interfaces, its operand
widths and the single-stage structure. It does not give the internals. This
implementation settles the following points itself:

- The multiplier takes signed (two's complement) operands. The divider takes
  unsigned ones.
- The meaning of the multiplier's 6-bit `exponent` output (leading-one
  position) and of its exception flag (32-bit signed overflow). The original
  description names an exception output but does not define it. The
  `exception` port and its definition are this design's reading.
- The multiplier's "control unit" is only named, never described. Its part
  here, gating both register ranks with `enable` and clearing them on reset,
  is written directly in `ssd_mul`. No separate controller exists.
- The divider is bit-serial, with restoring division and one bit per clock.
  Its published FPGA figures (about 100 flip-flops and 110 LUTs) rule out a
  fully combinational array divider.
- Synchronous reset in both units. Restart-on-start in the divider. What `D`
  and `R` hold after a divide by zero.
- The FPGA results reported for the original unit (Virtex-5 XC5VLX30,
  2.273 ns multiplier and 2.020 ns divider minimum period, slice counts) come
  from another code base. This RTL does not claim to reproduce them.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. All reference values are computed in the
testbench from plain integer arithmetic, not from the RTL.

- `tb_ssd_mul_core`: 64 pairs of corner operands (0, ±1, most negative, most
  positive, 16-bit boundaries) and 4000 random pairs, checking all four
  outputs.
- `tb_ssd_mul`: reset, the exact two-edge latency (the result is absent
  after one edge), back-to-back throughput, holding while `enable` is low,
  and 5000 random cycles with `enable` toggling, checked against a model of
  the two register ranks.
- `tb_div_structural`: 49 pairs of corner operands and 600 random
  divisions. Each is checked for quotient, remainder, `err` and a latency of
  exactly 33 edges. It also checks that `ok` holds after a division, that a
  restart in mid-division works, and that reset works in mid-division.
- `tb_ssd_arith_unit`: the full 32-bit top with both units running
  concurrently. It covers 3000 multiplier cycles and 60 divisions with random
  restarts and divides by zero. It counts multiplier stalls, overflows,
  negative products, divisions, divides by zero and restarts, and fails if
  any of them never happened.
- `tb_ssd_arith_unit_w64`: the top at `WIDTH = 64`. It checks 403
  products against 128-bit reference arithmetic and 152 divisions,
  including their 65-edge latency.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ssd_pkg.sv tb/tb_ssd_arith_unit.sv --top-module tb_ssd_arith_unit
./obj_dir/Vtb_ssd_arith_unit
```

Use the same command for the other testbenches, with the testbench file and
top module changed. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ssd_pkg.sv rtl/<module>.sv`.

## Changing the width

`WIDTH` is a parameter of every module. For example, 64-bit operands give a
128-bit product, a 7-bit exponent and a 65-edge division. The 32-bit and
64-bit configurations have both been simulated. The block testbenches are
written for 32 bits and `tb_ssd_arith_unit_w64` for 64 bits. Other widths
need their own reference code.
