# Parallel adder for 2D arrays of quaternary signed-digit numbers

Ordinary binary addition is slow on long words because a carry can ripple from the
lowest bit to the highest. This design adds whole arrays of numbers in a few clocks,
however long the numbers are. It stores each number in the **quaternary signed-digit
(QSD)** system: radix 4, with digits -3..3. Because that system is redundant (most values
have several digit strings), a carry moves **at most one digit position**. Every digit of
every number in two arrays can therefore be added at once, in two clock periods.

At its default size the chip adds two 10 x 2 arrays of 16-digit QSD numbers. It writes a
10 x 2 array of 17-digit results. The two arrays enter through a 32-bit port (60 words) and
the results leave through a 32-bit port (32 words). One complete operation takes 96 clocks.

## Number format

Each digit is a 3-bit sign-magnitude code `{sign, mag[1:0]}` (`qsd_pkg::qsd_digit_t`):

| digit | code | digit | code |
|------:|:----:|------:|:----:|
|  3    | 011  |  -1   | 101  |
|  2    | 010  |  -2   | 110  |
|  1    | 001  |  -3   | 111  |
|  0    | 000  |       |      |

The code `100` is never produced. As an input it counts as 0.

A number of N digits is a `3*N`-bit vector with digit 0, the least significant, in bits
`[2:0]`. Its value is the sum of `digit_i * 4^i`. An array packs its elements the same way:
element `e = row*K + col` sits at `[e*3*N +: 3*N]`.

## The two-step addition

For every digit position i, in parallel:

1. **Step 1** (`qsd_first_step`). Let `t = x_i + y_i`, which lies in -6..6. Split it as
   `t = 4*c_i + s_i`: `c_i = +1` if `t >= 3`, `c_i = -1` if `t <= -3`, otherwise 0.
   The intermediate sum `s_i` then lies in -2..2 and the carry `c_i` in -1..1.
2. **Step 2** (`qsd_second_step`). `z_i = s_i + c_{i-1}`, which always lies in -3..3. The
   lowest position takes a carry of 0.

No carry can leave step 2, and that is the whole trick. The thresholds of step 1 keep
`s_i` at magnitude 2 or less, so adding a carry of magnitude 1 or less still fits in a
digit. The result has N+1 digits: the top digit `z_N` is the carry `c_{N-1}` out of the
highest position.

The result is a correct value but not a unique digit string. For example,
2005267773 + 894701077 gives the 17 digits
`0 2 3 -1 1 -1 1 2 2 0 0 1 -1 1 1 0 2` (most significant first) = 2899968850.
The testbenches check that pair digit by digit. For everything else they compare values.

## Architecture and timing

```
 in_wr/in_addr/in_data ──► qsd_input_memory ──bus (60x32)──► qsd_array_adder ──sum (1020 b)──► qsd_output_memory ──► out_data
            add ─────────►   (60 x 32-bit regs)  add_out ─►  (20 x qsd_number_adder) write ─►  (32 x 32-bit regs)    ready
                                                                                                       ▲ out_addr
```

* **`qsd_input_memory`** holds 60 locations of 32 bits. Each one stands for the first word
  of a separate on-chip RAM block, so all 60 can be read in the same clock. The outside
  writes one word per clock. Array A goes in words 0..29 and array B in words 30..59, as
  one flat vector `{B, A}` cut into 32-bit words from the bottom. A one-clock `add` pulse
  copies every location onto a registered parallel bus and sends the ADD signal on.
* **`qsd_array_adder`** contains M*K instances of `qsd_number_adder`. Each one registers
  after step 1 and again after step 2. Two clocks after ADD it raises `write`.
* **`qsd_output_memory`** stores the whole 1020-bit result in 32 locations in one clock.
  It then raises `ready`, which stays high until the next `add`. The read port is
  combinational: `out_data` shows location `out_addr` in the same cycle. The top 4 bits of
  word 31 read as 0.

Clock budget for one operation at the defaults. The testbench checks every number here.

| clocks | what happens |
|-------:|--------------|
| 60 | write input words 0..59 |
| 1  | `add`: all locations onto the bus |
| 1  | step 1: intermediate sums and carries registered |
| 1  | step 2: result digits registered |
| 1  | result array written into the output memory; `ready` high from the next clock |
| 32 | read result words 0..31 |
| **96** | total |

At the 142.8 MHz reported for a Cyclone III FPGA, that is about 672 ns. The adder is fully
pipelined: a new `add` may follow on the next clock. `ready` then refers to the most
recent write.

## Parameters

The top, `qsd_array_adder_top`, has these parameters. Everything else is derived from them.

| parameter | default | meaning |
|-----------|--------:|---------|
| `M`, `K` | 10, 2 | rows and columns of each array |
| `N` | 16 | QSD digits per operand (the result has N+1) |
| `BUS_W` | 32 | external data bus width |

Derived sizes: `IN_WORDS = ceil(2*M*K*N*3 / BUS_W)` = 60, with a 6-bit `in_addr`.
`OUT_WORDS = ceil(M*K*(N+1)*3 / BUS_W)` = 32, with a 5-bit `out_addr`.

Logic grows linearly with `M*K*N`. At the defaults, coarse synthesis gives about 13k
word-level cells and 2.9k flip-flop bits, plus 3k bits of register-array storage.

## What is the design's and what is this implementation's

These come from the design:
* the two-step rule and the digit code;
* the three-part structure with a parallel bus between the parts;
* the ADD and write signals;
* the 32-bit bus;
* the 60/32 word counts and the 6/5-bit addresses;
* the 10 x 2 x 16 size;
* the one-clock-per-stage budget.

These are choices of this implementation:
* the order of the words and of the array elements;
* the `add` pulse and the `ready`/clear flag;
* the valid flags inside the adder;
* reading `100` as 0;
* the combinational read port of the output memory;
* the reset. Only the control flags reset, asynchronously and active low. Data registers
  and memory locations do not reset, and hold garbage until written.

The memories are plain register arrays, not RAM macros. A real single-port RAM could not
deliver all its locations in one clock, which this structure needs. So each location is
a flip-flop word here, and on an FPGA each would take the first word of its own block RAM.

Not checked here: the FPGA resource use and the clock rate. Those belong to one FPGA
implementation and are outside what RTL simulation can show.

## Files and simulation

`rtl/`:
* `qsd_pkg.sv`: the digit type and conversions.
* `qsd_first_step.sv`, `qsd_second_step.sv`: the digit cells.
* `qsd_number_adder.sv`, `qsd_array_adder.sv`: the adders.
* `qsd_input_memory.sv`, `qsd_output_memory.sv`: the memories.
* `qsd_array_adder_top.sv`: the top.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<n>`. `tb_qsd_array_adder_top` runs the top at its default
size through three complete operations. It checks the results, the 96-clock budget and
the 4 clocks from the last input word to `ready`. It also counts that each mechanism
occurs at least once:
* step-1 carries of +1 and of -1;
* negative digits;
* final carry digits of +1, -1 and 0;
* `ready` being cleared;
* reuse of the chip for a new addition.

Example run with Verilator 5:

```sh
verilator --binary --timing -Irtl rtl/qsd_pkg.sv tb/tb_qsd_array_adder_top.sv \
          --top-module tb_qsd_array_adder_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other one. The files use only synthesizable
SystemVerilog in `rtl/`: a package, packed structs, `always_ff`/`always_comb`, and one
immediate assertion, on the input write address.
