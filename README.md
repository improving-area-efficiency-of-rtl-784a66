# Residue-number-system FIR filter with reduced look-up-table arithmetic

A residue number system (RNS) represents an integer X by its remainders
|X|_m for a set of small, pairwise relatively prime moduli. Addition,
subtraction and multiplication then act on each remainder on its own:
no carry crosses from one modulus to another, and every channel is only
3 or 4 bits wide. This design is an FIR filter built that way for the moduli
(5, 7, 9, 11, 13), whose product M = 45045 gives about 15.5 bits of range.

With moduli this small, the arithmetic inside a channel is a table look-up:
a modulo-13 multiply-accumulate |a*b + c|_13 is a table with 13^3 rows.
The area of these tables is the cost that matters. The design uses two ideas
to reduce it:

* **Residue encoding.** A residue is only ever a table input or output, so
  the bit pattern that stands for each residue value is free. Every table,
  register and converter here reads its codes from a *code map*, so a
  different encoding is only a parameter change.
* **Commutativity.** a+b = b+a and a*b = b*a, so a table does not need rows
  for both operand orders. A small detector puts the operands into the order
  the table keeps, and the table drops the other rows.

```
 in_data --> rns_fwd_conv --+--> mod_fir_channel (m=5)  --+
                            +--> mod_fir_channel (m=7)  --+
 coef_in --> rns_fwd_conv --+--> mod_fir_channel (m=9)  --+--> rns_rev_conv --> reg --> out_data
                            +--> mod_fir_channel (m=11) --+
                            +--> mod_fir_channel (m=13) --+
```

## Residue codes

`rns_pkg::code_map_t` is an array of 16 entries of 4 bits. Entry r is the
code of residue r. A channel of modulus m uses W = clog2(m) bits of it: 3 bits
for 5 and 7, and 4 bits for 9, 11 and 13. One code map holds for every column
of a table: both operands, the accumulator input and the result. That is what
lets a result feed straight back into a table as an operand.

The default map is plain binary (residue r is coded as r). The optimised maps
that motivate this feature come from a symbolic-minimisation encoding flow,
and no such table is supplied. `rns_fir` takes one map per channel
(`CODES`, a `code_set_t`). The forward converter emits codes under those maps
and the reverse converter decodes them. The testbenches run the whole filter
under a permuted code as well as binary, so any bijective map can be used.

## Reduced tables and operand swapping

This is the core of the design: `operand_swap` (detector and multiplexers),
`mod_lut` (the table) and `mod_arith`, which chains them. For the
multiply-accumulate table the two multiplicands are the commutative pair. The
accumulator input `c` is never swapped.

`SYM` selects one of three schemes.

| `SYM` | detector (operand_swap) | rows the table keeps |
|---|---|---|
| `SYM_NONE` | none | all m x m operand pairs |
| `SYM_FULL` | swap when code(a) > code(b), a magnitude comparator | pairs with code(a) <= code(b): m(m+1)/2 |
| `SYM_BIT` | swap when bit S of b is 1, with no comparator at all | all pairs except a[S]=0 with b[S]=1 |

Check the one-bit scheme with the modulo-3 multiply and binary codes 00, 01,
10. If b's LSB is 1, swapping makes a's LSB 1. So the table never sees a with
LSB 0 together with b with LSB 1. It drops the rows (0,1) and (2,1) and keeps
7 of 9 rows. The elaborate scheme keeps 6. In general the one-bit scheme
removes (codes with bit S = 0) x (codes with bit S = 1) rows. That is largest
for the most evenly split bit, so S is chosen at elaboration as the bit that
minimises |ones - zeros| over the m codes in use (`rns_pkg::best_sel_bit`).
On a tie the lowest bit wins.

The one-bit scheme costs one multiplexer select and no logic in front of it.
The elaborate scheme removes more rows but puts a W-bit comparator ahead of
the table. Which one is smaller depends on the modulus and the encoding. For
the multiply-accumulate table, the elaborate scheme was found to be the
smallest for every modulus of the set, so it is the default (`SYM_FULL`).

Stored rows for the multiply table under binary code (the MAC table has m
times as many, one per accumulator value):

| m | full | elaborate | one-bit |
|---|---|---|---|
| 5 | 25 | 15 | 19 |
| 7 | 49 | 28 | 37 |
| 9 | 81 | 45 | 61 |
| 11 | 121 | 66 | 91 |
| 13 | 169 | 91 | 127 |

`mod_lut` also offers modulo subtraction |a - b|_m (`OP_SUB`). The filter
does not use it. Subtraction is not commutative, so it exists only as a full
table, and any other `SYM` stops elaboration.

`mod_lut` is a constant array indexed by the concatenated operand codes. The
array is built by a function at elaboration: for every residue combination
whose row is kept, it stores the code of the result. A pattern that is not a
stored row reads as 0, which is what a PLA with no matching product term
gives. Only the swap in front keeps such a pattern from reaching the table.
On its own, a reduced `mod_lut` returns 0 for those rows. Two-level
minimisation of the table (for example into a PLA) is left to the synthesis
tool. The RTL only fixes the truth table.

## The modulo channel

`mod_fir_channel` computes y[n] = |sum_k h[k] x[n-k]|_m over TAPS taps. It is
built like a conventional filter around a single multiplier and adder: a
coefficient register file, a delay line of residue codes and an accumulator,
with one tap per clock.

* `USE_MAC = 1` (default): each tap is one look-up in the merged table,
  acc <- |h[k]*x[n-k] + acc|_m.
* `USE_MAC = 0`: a multiply table followed by an add table. That is two
  look-ups in series, each a `mod_arith` with the same `SYM` scheme.

Timing: the clock edge that takes a sample shifts it into the delay line and
clears the accumulator. Each of the next TAPS edges does one tap, and the last
of them raises `out_valid` for one cycle. `in_ready` is low during those TAPS
cycles, so the channel takes a new sample at most every TAPS + 1 cycles. The
critical path is the tap multiplexer, then the detector, then the table.
Write coefficients only while `in_ready` is high. A write during a
computation changes the taps still to be done.

## Converters

`rns_fwd_conv` (binary to residue) takes a 16-bit two's-complement X. If X is
negative it adds M, which is a multiple of every modulus, so no residue
changes. The result U lies in [0, M). Each residue is then
|sum_j u_j |2^j|_m|_m: a sum of constants selected by the bits of U (at most
192) followed by one small modulo. The result goes out through the code map.

`rns_rev_conv` (residue to binary) uses the Chinese remainder theorem. It
computes U = |sum_i |x_i T_i|_M|_M, with T_i = (M/m_i) |(M/m_i)^-1|_{m_i}.
Each |x_i T_i|_M is a constant table of m_i words indexed directly by the
residue code, so decoding costs nothing extra. The five words add to less
than 5M. Subtracting 4M, 2M and M wherever they fit brings the sum into
[0, M). Values above (M-1)/2 are read as negative. A code that stands for no
residue is read as 0.

## Top level: `rns_fir`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `coef_we`, `coef_addr`, `coef_in` | in | 1, clog2(TAPS), 16 | write signed coefficient h[coef_addr] |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1, 1, 16 | sample handshake; taken when both valid and ready are high |
| `out_valid`, `out_data` | out | 1, 16 | one-cycle pulse with signed y[n] |

Parameters: `TAPS` (16), `USE_MAC` (1), `SYM` (`SYM_FULL`), `CODES` (binary).
The moduli are fixed in `rns_pkg`. All five channels share the handshake and
run in lock step. The result is registered after the reverse converter, so
`out_valid` comes TAPS + 1 cycles after the edge that took the sample.

Number range: every value is an integer modulo 45045, read in -22522..22522.
A result is exact when the true sum lies in that range. Otherwise it comes out
reduced modulo 45045, as in any RNS filter. Inputs and coefficients beyond
±22522 wrap the same way. Choose word lengths and coefficient scaling so the
sum stays in range.

## What follows the source design and what is this implementation's own

Taken from the source design:

* the moduli set and the partition into converters and modulo channels;
* the table-based add, multiply and multiply-accumulate operations;
* one code shared by all the columns of a table;
* the elaborate and one-bit commutativity schemes, and the rule for choosing
  the bit;
* the merged MAC table as the channel's arithmetic, with elaborate detection
  as the default scheme.

Chosen here:

* the tap count (16);
* the serial one-tap-per-clock schedule, the handshake and the reset values;
* 16-bit signed ports and the signed reading of the range;
* the converter algorithms;
* the comparator used as the elaborate detector, and taking the one-bit
  select from operand b;
* zeros for rows that are not stored;
* binary as the default code.

Not built:

* the encoding algorithm, which is a design-time tool, not hardware;
* the published optimised encodings, which are not available as tables;
* identity-based reductions (0-detect for addition, 1-detect for
  multiplication), which are only proposed for future work.

The area figures that motivate the schemes belong to minimised two-level
(PLA) implementations. Synthesis of this RTL with a standard-cell flow will
not reproduce them.

## Files

`rtl/`: `rns_pkg.sv` (constants, types, elaboration-time functions),
`mod_lut.sv`, `operand_swap.sv`, `mod_arith.sv`, `mod_fir_channel.sv`,
`rns_fwd_conv.sv`, `rns_rev_conv.sv`, `rns_fir.sv` (top).

`tb/`: one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_mod_lut`: exhaustive, all operations, schemes and moduli 3..13, two
  code maps, row counts.
* `tb_operand_swap`
* `tb_mod_arith`: exhaustive, must always give the true result.
* `tb_mod_fir_channel`: three channel configurations, value and latency.
* `tb_rns_fwd_conv`: all 65536 inputs.
* `tb_rns_rev_conv`: the whole signed range.
* `tb_rns_fir`: the default filter end to end. It checks in-range, negative
  and wrapped results, stalls, coefficient reloads and operand swaps, each of
  which must occur.
* `tb_rns_fir_modes`: the other structures and codes.
* `tb_rns_example`: the 47 + 31 and 47 x 31 example on moduli (5, 7, 11),
  run through the table units.

Helpers: `tb_ref_pkg` (reference arithmetic and code maps, independent of
`rns_pkg`), `tb_lut_check`, `tb_arith_check`, `tb_channel_run` and
`tb_fir_driver` (stimulus and reference model for the filter).

To simulate, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rns_pkg.sv tb/tb_ref_pkg.sv tb/tb_rns_fir.sv --top-module tb_rns_fir
./obj_dir/Vtb_rns_fir
```

Every testbench finishes in well under a second of simulated time.
