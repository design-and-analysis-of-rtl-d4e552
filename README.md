# 4-bit shifter with shift-out and carry flag

A one-place shifter for a 4-bit word that does not lose the bit it pushes
out. A plain shifter built from AND gates and OR gates drops the bit that
falls off the end of the word: D3 on a left shift, D0 on a right shift. That
bit matters. After a right shift, which divides by two, it is the remainder.
After a left shift, which multiplies by two, it tells whether the result
overflowed. This design ORs the two end bits into a `shift_out` output and
keeps it in a carry flag.

The shifter moves the data by exactly one place, within one combinational
pass. It offers four operations, chosen by a 2-bit code:

| `op` (C2 C1) | operation              | `s` (S3..S0)        | `shift_out` |
|--------------|------------------------|---------------------|-------------|
| `00`         | shift left             | D2 D1 D0 0          | D3          |
| `01`         | no shift               | D3 D2 D1 D0         | 0           |
| `10`         | shift right, logical   | 0 D3 D2 D1          | D0          |
| `11`         | shift right, arithmetic| D3 D3 D2 D1         | D0          |

D0 and S0 are the least significant bits. The shifter does not rotate, and it
does not shift by more than one place. The bit that leaves one end is never
fed back into the other end.

## Structure

```
 op[1:0] --> shift_ctrl_decoder --lines{left,no_shift,right,arith}--+
                                                                    v
 d[3:0] ------------------------------------------------------> bs4_shift_array --> s[3:0]
                                                                    |
                                                                    +--> shift_out
                                                                    |
 clk, rst_n, carry_load ----------------------------------------> carry_flag -----> carry
```

`barrel_shifter4` is the top. It wires three parts in a chain:

- `shift_ctrl_decoder` decodes the code into control lines.
- `bs4_shift_array` moves the data under those lines.
- `carry_flag` stores the bit that was shifted out.

`bs4_pkg` holds the code enum `shift_op_e` and the control-line struct
`shift_lines_t`.

### Control decoder

A 2-to-4 decoder turns the code into four one-hot select lines:

- Output 0 is the **Left** line.
- Output 1 is the **No Shift** line.
- An OR gate combines outputs 2 and 3 into the **Right** line. A logical and
  an arithmetic right shift move the data in the same way.
- Output 3 alone also goes out as the **arith** line.

For every code, exactly one of Left, No Shift and Right is active.

### The AND-OR array

This part takes the most care. Each data bit `D[i]` drives up to three AND
gates, one per direction line. Each AND gate sends the bit to a different
output:

| gate              | goes to      |
|-------------------|--------------|
| `D[i] & Left`     | `S[i+1]`     |
| `D[i] & NoShift`  | `S[i]`       |
| `D[i] & Right`    | `S[i-1]`     |

Each output is the OR of the gates aimed at it. Written out for 4 bits:

```
S3 = D3&(NoShift|Arith) | D2&Left
S2 = D2&NoShift | D1&Left | D3&Right
S1 = D1&NoShift | D0&Left | D2&Right
S0 = D0&NoShift           | D1&Right
shift_out = D3&Left | D0&Right
```

Only one direction line is ever active, so at most one term of each OR is
live. The output that nothing feeds gets 0. That is S0 on a left shift and
S3 on a logical right shift.

Two details set this array apart from the textbook one:

- **Shift out.** The textbook array has the gates `D3 & Left` and
  `D0 & Right` at its two ends, and drops their outputs. Here an extra OR
  gate joins them into `shift_out`.
- **Arithmetic copy.** The No Shift gate of the MSB column is enabled by
  `NoShift | Arith`. On an arithmetic right shift, D3 then goes to S2 through
  the Right gate and also stays in S3. This is sign extension by one bit.

`WIDTH` (default 4) makes the same array for any width. The equations stay
the same with D3 replaced by `D[WIDTH-1]`.

### Carry flag

`carry` is a flip-flop. It takes `shift_out` on a rising `clk` edge while
`carry_load` is high, and holds its value otherwise. `rst_n` is an
asynchronous, active-low reset that clears it to 0.

## Timing

`s` and `shift_out` are combinational from `op` and `d`. The path is one
decoder, one AND and one OR, with no clock involved. `carry` changes one
rising edge after a cycle in which `carry_load` is high. Nothing else in the
design is clocked.

## What follows the source design and what is chosen here

These parts follow the source circuit:

- the AND-pair array with Left and Right lines;
- the OR gate that joins the two end bits into Shift Out;
- storing that bit in a carry flag;
- the 2-to-4 decoder, with its OR gate driving Right;
- the code table (00 left, 01 none, 10 right logical, 11 right arithmetic);
- the OR gate that keeps the MSB on an arithmetic shift.

The following choices are made here:

- **Code bit order.** C2 is the MSB of `op`. With that order, the worked
  cases of the source come out right: control bits (0,0) give a left shift
  and (1,0) give a right shift.
- **Carry flag timing.** The source only says that the flag holds the
  shifted-out bit. Its clock, load enable and reset are chosen here.
- **Width.** The `WIDTH` parameter is an addition. Its default is the
  source's 4 bits.
- **All lines low.** If all control lines are low, the array outputs 0. The
  decoder never produces that case.

The source circuit was also built and measured as a 68-transistor CMOS
netlist in 90 nm and 45 nm, at 1.5 V, 1.2 V and 0.7 V. Its power and delay
figures belong to that netlist. They have no counterpart in this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_shift_ctrl_decoder` runs all four codes. It checks the lines against
  the code table, and checks that exactly one direction line is active.
- `tb_bs4_shift_array` runs all 16 words under each legal set of control
  lines, plus all lines low. It compares the outputs with Verilog's `<<`,
  `>>` and `>>>` operators.
- `tb_carry_flag` applies 200 cycles of random `load` and `shift_out`. It
  checks the flag against a reference bit, and checks both the synchronous
  load and the asynchronous reset.
- `tb_barrel_shifter4` exercises the whole top at its default parameters:
  - the two worked cases: code 00 and code 10 on `1011`;
  - every code with every data word, twice in shuffled order, with random
    `carry_load`.

  It counts each mechanism and fails if any mechanism never occurs. The
  mechanisms are: the four operations, an arithmetic shift that copies a 1,
  a 1 shifted out to the left, a 1 shifted out to the right, a carry load, a
  carry hold against a differing `shift_out`, and the reset.

Each testbench was also run against a deliberately broken copy of its module,
and each one reported failures. The broken copies were:

- a decoder that forgets the arithmetic code on the Right line;
- an array without the MSB copy;
- a flag that ignores `carry_load`;
- a top that loads the flag from S0.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bs4_pkg.sv tb/tb_barrel_shifter4.sv --top-module tb_barrel_shifter4
./obj_dir/Vtb_barrel_shifter4
```

Replace the testbench name to run any of the others. `bs4_pkg.sv` must come
first on the command line. To change the width, set `WIDTH` on
`barrel_shifter4` or `bs4_shift_array`. The testbenches are written for 4
bits.
