# Radix-2 SRT divider as a ring of three division columns

This is a mantissa divider for floating-point numbers. It divides two
normalised 48-bit mantissas (values 1.f in [1, 2)) and produces 48 quotient
bits. It uses radix-2 SRT division, so no carry runs along the word in any
step: the cost of one step does not depend on the word width.

The hardware sits between two common designs. An iterative divider reuses
one stage on every clock. A combinational array has one stage per quotient
bit. This design has three identical columns wired in a ring, and the
partial remainder goes round the ring until all digits are out. Each column
produces one quotient digit and hands the new remainder to the next column.
The digits are collected per column and converted to an ordinary binary
quotient at the end.

The circuit this follows was self-timed. Its columns were precharged logic,
started by their neighbours, so the ring behaved like a ring oscillator that
produced a quotient bit on every stage. This RTL keeps the structure and the
order of operations but is synchronous: one column evaluates per clock.

## The arithmetic

### Recurrence and digits

Let X be the dividend and D the divisor, both in [1, 2). The divider keeps
the shifted partial remainder Y_i = 2R_i, starting from Y_0 = X, and steps

    Y_{i+1} = 2 (Y_i - q_i D),       q_i in {-1, 0, +1}

The quotient is Q = sum q_i 2^-i for i = 0 .. 47, with q_0 of weight 1. The
digits are chosen to keep |Y_i| <= 2D. That gives X - D*Q = Y_48 * 2^-48, so
|X/D - Q| <= 2^-47: Q is within one unit in the last place of the true
quotient, from either side. No final correction step is included, and the
final remainder is not output.

The digit set is redundant because it holds both -1 and +1. So a digit may
be chosen from a rough estimate of Y: a wrong choice is absorbed by later
digits of the opposite sign. This is what lets the remainder stay in
carry-save form.

### Remainder format

|Y| stays below 4, so Y needs three integer bits, sign included. A remainder
travels between columns as:

| field      | width | form |
|------------|-------|------|
| `top`      | 3     | integer bits, **irredundant** (carries resolved), two's complement |
| `fs`, `fc` | 47 each | fraction as a carry-save pair: sum vector and carry vector |
| `ovf`      | 1     | the resolved integer part was -5 and `top` has wrapped (see below) |
| `ovf_prev` | 1     | the remainder before this one had `ovf` set |

The value is Y = top + fs + fc, and fs + fc lies in [0, 2).

### Digit selection (`srt_quot_sel`)

Only `top` is examined. The divisor is not looked at at all. Because the
unexamined carry-save fraction adds between 0 and 2, the true Y lies in
[top, top + 2), and the rule is:

| `top`           | digit |
|-----------------|-------|
| 0, 1, 2, 3      | +1    |
| -1              | 0     |
| -4, -3, -2      | -1    |

Each row keeps |Y - qD| <= D for every D in [1, 2). The testbench checks
this on a grid of Y and D values. If either flag (`ovf` or `ovf_prev`) is set,
the digit is forced to -1.

### One column step (`srt_addsub`, `srt_top_cpa`)

1. **Carry-save add/subtract.** A single row of full adders adds three
   operands over 50 bits: `{top, fs}`, `fc`, and the divisor multiple, which
   is the digit's choice of:
   - ~D with a +1 carry-in for q = +1;
   - 0 for q = 0;
   - D for q = -1.
   The result is a sum vector and a carry vector, and no carry propagates.
2. **Doubling.** Both vectors are shifted left by one bit.
3. **Short carry-propagate add.** Only the top bits of the two vectors are
   added, with a propagate/generate/kill carry chain and no carry-in from the
   bits below. The three integer bits that come out become the next `top`.
   The fraction bits below stay a carry-save pair.

Passing the resolved bits on, rather than the carry-save ones, means fewer
wires between columns. It also means the next column's selection logic needs
no adder of its own.

### The case below -4

This is the subtle part of the design. The true Y never drops below -2D,
which is above -4. But the resolved integer part equals Y minus the
unresolved fraction, and that fraction can be close to 2. So the integer
part can reach **-5**. In three bits, -5 wraps to +3, which would select
q = +1, the wrong sign.

To catch this, the short adder resolves one more bit, of weight -8, than it
passes on. Taken modulo 16, that resolved value is always exact, even when
the incoming `top` had itself wrapped. Any value from -8 to -5 sets `ovf`,
and only -5 can actually occur. `ovf` forces the next digit to -1, which is
correct because Y < -3 there.

The flag is also carried one stage further as `ovf_prev`, and forces that
digit to -1 as well. That is always valid: after a -1 step from Y < -3,
the next remainder is below -2.

The modulo-16 exactness makes the second forcing redundant in this version,
but it is kept. In the full-size test the override fires about 80 times in
3000 divisions. Without the override, `tb_srt_column` finds digits of the wrong sign.

## The ring and its sequencing

```
 dividend ──► mux ──► column 0 ──► column 1 ──► column 2 ──┐
               ▲                                           │
               └───────────────────────────────────────────┘
 each column:  quotient select ─► divisor multiple ─► carry-save add ─► top-bit add ─► output register
               └─► its own quotient shift register
```

Each column's output register stands for the precharged output of the
original precharged logic. It is either **precharged** (all zero) or holds a
result. `srt_self_timing_ctrl` follows the rules a self-timed ring obeys:

- column k **evaluates** when it is precharged and its input holds a result.
  Its input is column k-1, or for column 0 the last column, or the dividend
  at the start;
- column k is **precharged** once column k+1 holds a result, that is, once
  k's result has been read.

At any moment one column evaluates, one holds the result being read, and one
is precharging. That is why the ring needs at least three columns: with two,
a result would be erased before it was read. `NCOL` can be raised, but must
divide `NDIG`.

The controller also keeps one `valid` bit per column. These bits are the
state of the control; the result data sits in the column registers.

## Quotient collection and completion

- **Collection.** Each column shifts its digits into a register pair: one
  register for the +1 digits, one for the -1 digits (`srt_quot_shift_reg`).
  A marker bit moves up with each shift.
- **Completion.** When the markers of all three registers reach the top, the
  AND of them is the completion signal. It stops the ring and is the
  `done` output.
- **Conversion.** `srt_quot_convert` puts the digits back in order: digit i
  came from column i mod 3. It then forms the binary quotient as
  (+1 digits) - (-1 digits). This is the only full-width carry-propagate
  operation in a division, and it runs once, not once per digit.

## Interface and timing (`srt_divider`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse; ignored while `busy` |
| `dividend`, `divisor` | in | 48 | 1.f mantissas, MSB must be 1 (assertion); captured at `start` |
| `busy` | out | 1 | high during the 48 evaluation cycles |
| `done` | out | 1 | quotient valid; stays high until the next start |
| `qpos`, `qneg` | out | 48 | raw digits, bit 47-i is digit i |
| `quotient` | out | 49 | two's complement, 47 fraction bits (value between about 0.5 and 2) |

**Timing.**

- `start` is sampled at clock edge 0.
- Column evaluations take place at edges 1 to 48.
- `done` is high after edge 49, so the latency is `NDIG + 1` cycles.
- A new division can start in the cycle after `done`.

| parameter | default | meaning |
|-----------|---------|---------|
| `OPW`  | 48 | operand width, hidden bit included |
| `NDIG` | 48 | quotient digits per division |
| `NCOL` | 3  | columns in the ring (>= 3, divides `NDIG`) |

## Files

RTL, in bottom-up order:

| file | role |
|------|------|
| `srt_pkg.sv` | digit type, three-integer-bit constant |
| `srt_quot_sel.sv` | digit selection table |
| `srt_addsub.sv` | divisor multiple and carry-save row |
| `srt_top_cpa.sv` | top-bit carry chain and below -4 detection |
| `srt_column.sv` | one stage, with its precharge/evaluate output register |
| `srt_init_mux.sv` | dividend or feedback into column 0 |
| `srt_quot_shift_reg.sv` | per-column digit register and completion marker |
| `srt_self_timing_ctrl.sv` | evaluate/precharge ordering |
| `srt_quot_convert.sv` | interleave and signed-digit to binary |
| `srt_divider.sv` | top level |

Each module has a testbench `tb/tb_<module>.sv`. They check results against
arithmetic computed in the testbench:

- exhaustive tests for the selection table and the short adder;
- random and extreme operands for the columns and the top level, checked
  exactly or against the SRT error bound;
- the latency of `NDIG + 1` cycles;
- the protocol rules of the controller.

`tb_srt_divider` runs 3000+ divisions at full size in well under a second.
It counts how often each mechanism occurred: each digit value, precharge,
the below -4 override, an ignored start, and completion. It fails if any
of them never happened.

Two more top-level tests use the same checks at other sizes:

- `tb_srt_divider_exhaustive` divides every pair of normalised 8-bit
  operands (16,384 divisions) with 9 quotient digits.
- `tb_srt_divider_ring4` uses a ring of four columns (12-bit operands,
  12 digits).

To simulate, for example:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_srt_divider \
    rtl/srt_pkg.sv tb/tb_srt_divider.sv
./obj_dir/Vtb_srt_divider
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## How far it follows the original, and where it departs

Taken from the original circuit:

- radix 2 with digits {-1, 0, 1};
- a carry-save remainder with a 3-bit resolved top;
- selection from those three bits only, with no divisor bits;
- resolved top bits passed to the next stage;
- forcing -1 in the stage that sees a remainder below -4 and in the stage
  after it;
- three columns in a ring fed by a dividend/feedback multiplexer;
- one quotient shift register per column, with completion generated from
  the registers;
- the 48-bit operand and quotient size.

Choices made for this design:

- **Clocked, not self-timed.** The precharge/evaluate handshakes are
  replaced by a controller that applies the same ordering, one column per
  clock. The original's data-dependent speed (about 13 ns per quotient bit
  in a 2 µm CMOS process) cannot be expressed in this RTL. Here every division
  takes 49 cycles.
- **Below -4 detection.** The original does not say how the case is
  detected. Here the short adder resolves one extra, unshipped bit.
- **The short carry chain** is plain single-rail logic, not a dual-rail
  precharged Manchester chain.
- **Remainder fraction width** equals the operand precision (47 bits).
- **Divisor negation** is ones' complement plus a carry-in.
- **The digit rail encoding** is {neg, pos}.
- **Operands** are registered at `start`, and there is a start/busy/done
  handshake and an asynchronous reset. None of these is described for the
  original.
- **Quotient conversion** is done inside the divider. The original leaves
  it open whether the chip or the surrounding floating-point unit converts
  the digits. The raw digits are output too.

Not included:

- the higher-radix selection schemes and the divisor pre-scaling idea (scale
  by 5/4 when D < 3/2), which are design studies rather than parts of this
  divider;
- any final quotient correction or remainder output;
- exponent handling, rounding and special values, which belong to the
  surrounding floating-point unit.
