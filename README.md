# Matrix-vector multiplication with MUX-based Vedic multipliers

This RTL multiplies an image-sized matrix by a filter vector with one
multiply-accumulate unit. What sets it apart is its multiplier. It has no array
of AND gates and carry-save adders. Small products come from multiplexers
whose data inputs already hold every multiple of one operand, and the other
operand picks one of them. Larger products are put together from these small
ones by the "vertically and crosswise" (Urdhva Tiryakbhyam) scheme of Vedic
arithmetic. The default configuration multiplies a 1028 x 28 matrix of 8-bit
unsigned elements by a 28 x 1 vector. A 16x16 multiplier built the same way
sits beside it.

All of the arithmetic is unsigned and all multipliers are purely
combinational. The only registers are in the matrix-vector engine.

## The MUX multipliers

A multiplier with a 2-bit operand `a` needs only four possible results for a
given `b`: 0, b, 2b and 3b. `mux_mult_s2` builds those four on the data lines
of a 4:1 multiplexer:

| select `a` | line contents      |
|-----------:|--------------------|
| 00         | 0                  |
| 01         | b                  |
| 10         | b << 1             |
| 11         | b + (b << 1)       |

The only adder is the one for 3b. `BW` sets the width of `b`. It is 2 for the
2x2 multiplier and 3 for the 3x2 one. The output is `BW+2` bits.

`mux_mult_s3` does the same with a 3-bit select and an 8:1 multiplexer. Its
lines hold 0, b, 2b, 3b = b+2b, 4b, 5b = b+4b, 6b = 2b+4b and 7b = b+2b+4b,
each built from the shifts by one and by two. Its output is `BW+3` = 6 bits.

## The 8x8 multiplier: digits of mixed size

This is the least obvious part of the design. `vedic_mult8x8` treats each
8-bit operand as a three-digit number with digits of 2, 3 and 3 bits:

```
a = A:B:C = a[7:6] a[5:3] a[2:0]      weights 2^6, 2^3, 2^0
b = D:E:F = b[7:6] b[5:3] b[2:0]
```

The product is the sum of the nine digit products, each weighted by the sum
of its digits' weights. Digit products of equal weight form a column:

| column | weight | digit products    | sub-multipliers | result bits |
|-------:|-------:|-------------------|-----------------|-------------|
| 1      | 2^0    | C*F               | 3x3             | R2..R0      |
| 2      | 2^3    | E*C, B*F          | 3x3, 3x3        | R5..R3      |
| 3      | 2^6    | D*C, B*E, A*F     | 3x2, 3x3, 3x2   | R8..R6      |
| 4      | 2^9    | B*D, A*E          | 3x2, 3x2        | R11..R9     |
| 5      | 2^12   | A*D               | 2x2             | R15..R12    |

All nine digit products are formed at once: one 2x2, four 3x2 and four 3x3
MUX multipliers. Then four adders work up the columns. Each column's sum
keeps its low three bits as result bits. The rest (sum >> 3) is the carry
added into the next column. The column widths in the RTL fit the largest
possible sum:

- column 2 is at most 49+49+7 = 105
- column 3 is at most 21+49+21+13 = 104
- column 4 is at most 21+21+13 = 55
- column 5 is at most 9+6 = 15, which fits in its four bits, so no carry leaves the product

The carry chain runs through four short adders instead of the 16-bit ripple
of an array multiplier. That chain is the critical path.

For a 3x2 product the 2-bit digit is the mux select. For a 3x3 product the
digit of `a` is the select.

## The 16x16 multiplier

`vedic_mult16x16` applies the same crosswise scheme with 8-bit digits.
`a = aH:aL` and `b = bH:bL`. Four `vedic_mult8x8` instances form aL*bL,
aL*bH, aH*bL and aH*bH. Two adders combine them:

- `r[7:0]` is the low byte of aL*bL.
- The middle sum is aL*bH + aH*bL + the high byte of aL*bL. It is 18 bits wide. Its low byte is `r[15:8]`.
- `r[31:16]` is aH*bH plus the middle sum's bits above bit 7.

## The matrix-vector engine

`matvec_engine` computes G = A x C. A is ROWS x COLS and C is COLS x 1. It
never stores A. A is streamed through once, so the only memories are the
vector register and a result RAM of one word per row.

```
data_in --+--> coef_shift_reg (C, rotating) --head--+
          |                                         v
          +--> a register ------------------> vedic_mult8x8 --> + --> G register --> result_ram[row]
                                                                ^          |            |
                                                                +----------+         data_out
```

### Interface

Everything is synchronous to `clk`. `rst` is a synchronous, active-high reset.

1. Pulse `start` for one cycle. This clears the row and index counters and `done`.
2. Offer the COLS vector elements c1..cCOLS on `data_in`. A word is taken on every cycle with `in_valid` high. The vector shifts into `coef_shift_reg`.
3. Offer the ROWS*COLS matrix elements in row order: a(1,1)..a(1,COLS), then a(2,1), and so on. Idle cycles (`in_valid` low) may fall anywhere. There is no back-pressure: every valid word is taken.
4. `done` goes high when the last row's result has been written. It stays high until the next `start`. `busy` is high from `start` until `done`.
5. Read results at any time: set `rd_addr` to a row number and `data_out` holds that row's dot product one cycle later.

Words offered while the engine is idle are ignored, and so are words after the
last matrix element. `row` and `index` give the position of the next expected
matrix word.

### Timing

- A matrix word taken at clock edge t is in the `a` register after edge t.
- At edge t+1 its product with the vector element is added into G. The vector register rotates at the same edge, so the next element is presented.
- The first element of a row replaces G rather than adding to it. So rows follow each other with no clear cycle.
- After a row's last element, G is written into the RAM at edge t+2. By then the next row is already accumulating.
- `done` rises at the same edge as the last row's write.

With no idle cycles, an operation takes COLS + ROWS*COLS + 1 clock edges from
the first word taken to `done`. That is 28,813 edges at the default size.

### Sizes

| parameter | default | meaning |
|-----------|---------|---------|
| `DW`      | 8       | element width; 16 switches the MAC to the 16x16 multiplier |
| `ROWS`    | 1028    | matrix rows = result RAM words |
| `COLS`    | 28      | matrix columns = vector length |
| `ACC_W`   | 21      | accumulator and result width, 2*DW + clog2(COLS); it cannot overflow |

The defaults live in `mvm_pkg`. The result RAM holds 1028 x 21 bits and maps
onto block RAM: reset clears only its read register.

## Top level

`mux_vedic_top` holds the engine and, next to it, a `vedic_mult16x16` on its
own ports (`m16_a`, `m16_b` -> `m16_r`). The 16x16 multiplier is a deliverable
of its own, not part of the matrix datapath, whose elements are 8 bits.

## Where this RTL goes beyond, or departs from, its source description

The multiplier structures are the ones described: the mux lines, the digit
grouping, the assignment of sub-multipliers to digit pairs, and the adder
chains of both the 8x8 and the 16x16. So is the datapath of the matrix unit:
serial vector, multiplier, adder, accumulator register and result RAM. The
following are this design's own choices or readings:

- **Mux line contents for the 3x3.** The 3x, 6x and 7x lines use the shifts by one and two that the arithmetic needs.
- **Exact output widths.** The 3x3 block has a 6-bit output, the exact product width; a wider output would only carry zeros. In the 16x16, the middle field is r15..r8.
- **Operand roles.** The description leaves open which operand drives the select inside the 8x8. The choice here makes no difference to the result.
- **Engine protocol.** The whole control and interface were designed here: vector-then-matrix loading, `in_valid`, `start`/`busy`/`done`, the read port, the first-element restart of the accumulator and the rotating vector register. The source gives only the datapath. It also shows signals named `rd_wr` and `raw` in a simulation trace; neither is reproduced.
- **Result RAM depth.** The RAM has 1028 words, one per row of the 1028 x 28 workload. A drawing of the same RAM numbers its last entry 1024.
- **Accumulator width.** 21 bits, sized here so that no dot product overflows.
- **Generality.** The multiplier "of any MxN size" is only claimed in general terms. Only the 2x2, 3x2, 3x3, 8x8 and 16x16 sizes are built, and `mac_unit` accepts `DW` = 8 or 16 only.

No timing or area figures are claimed for this RTL. The critical path is
combinational: the mux multipliers, then the column adders, then the
accumulator adder. It is not pipelined.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_mux_mult_s2` | 2x2 truth table; 2x2 and 3x2 exhaustively |
| `tb_mux_mult_s3` | 3x3 exhaustively |
| `tb_vedic_mult8x8` | reference pairs (255*255 = 65025, 170*85 = 14450, 240*80 = 19200, 252*87 = 21924), then all 65,536 pairs |
| `tb_vedic_mult16x16` | 64 corner pairs and 200,000 random pairs |
| `tb_coef_shift_reg` | reset, serial load, three full rotations, hold, reload |
| `tb_mac_unit` | random and maximum dot products with DW = 8 and DW = 16 |
| `tb_result_ram` | fill, random reads, reads during writes, reset of the read register |
| `tb_matvec_engine` | 7 x 4 matrix: back-to-back and gapped streams, maximum operands, ignored words, exact latency and length |
| `tb_matvec_engine_w16` | the same with 16-bit elements (5 x 6 matrix), exercising the 16x16 multiplier inside the MAC |
| `tb_mux_vedic_top` | full 1028 x 28 size, end to end (see below) |

`tb_mux_vedic_top` runs the full default size, end to end. It does two
complete operations, back to back and then with random gaps and maximum-value
rows. It checks all 1028 results each time and the exact operation length,
and tests the 16x16 multiplier on every cycle. It counts how often each
mechanism occurred: vector loads, completed rows, idle gaps, back-to-back
words, maximum rows, restart after done, ignored words and 16x16 products.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mvm_pkg.sv tb/tb_mux_vedic_top.sv \
          --top-module tb_mux_vedic_top -Mdir obj && ./obj/Vtb_mux_vedic_top
```

Run it from the folder that holds `rtl/` and `tb/`. Substitute any other
testbench name. The full-size run takes a couple of seconds.

## Files

- `rtl/mvm_pkg.sv`: default sizes and the accumulator width function
- `rtl/mux_mult_s2.sv`, `rtl/mux_mult_s3.sv`: the 4:1 and 8:1 MUX multipliers
- `rtl/vedic_mult8x8.sv`, `rtl/vedic_mult16x16.sv`: the crosswise multipliers
- `rtl/coef_shift_reg.sv`, `rtl/mac_unit.sv`, `rtl/result_ram.sv`: the engine's datapath parts
- `rtl/matvec_engine.sv`: the engine with its control
- `rtl/mux_vedic_top.sv`: the top level
