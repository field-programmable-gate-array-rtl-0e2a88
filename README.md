# Variable-length pseudorandom pattern generator

A linear feedback shift register (LFSR) whose feedback polynomial is chosen while
it runs. For a register of `DEGREE` bits (3 to 15), four characteristic
polynomials of that degree are wired in side by side. A 2-bit **pattern
selector** chooses which one drives the register. Primitive polynomials step
through all 2^DEGREE − 1 non-lock patterns before repeating. Non-primitive ones
repeat after fewer. One small circuit therefore gives four different pattern
sets with four different cycle lengths, from 4 patterns (degree 3) up to 32 767
(degree 15). Typical uses are built-in self-test stimulus and keystream-like
bit sources.

The structure follows the FPGA pattern generator described in the article
*"Field programmable gate array implementation frameworks of a variable-length
pseudorandom pattern generator"*. It has a Fibonacci LFSR, XNOR tap points, a
common clear to the all-zero pattern, and a 4:1 polynomial multiplexer. The
default configuration is the article's detailed degree-5 example.

```
              +---------------------+   fb[3:0]   +---------------+
 pattern ---->| prpg_feedback_taps  |------------>| prpg_poly_mux |<--- pattern_sel[1:0]
 (q)          | 4 XNOR tap networks |             |     4:1       |
              +---------------------+             +-------+-------+
                                                          | fb_sel
              +-------------------------------------------v-------+
 clk, clear ->| prpg_register_bank: fb_sel -> q[N-1] -> ... -> q[0] |---> pattern[N-1:0]
              +-----------------------------------------------------+
```

## How a pattern is made

Each clock edge shifts the register one place towards bit 0. The feedback bit of
the selected polynomial enters the most significant bit. The output `pattern` is
the register itself, so one new `DEGREE`-bit pattern appears per clock.

### From polynomial to tap bits

This is the part to get right when changing the polynomial table. For a
polynomial x^n + … + x^k + … + 1, the feedback bit is the **XNOR** of:

* `q[0]`, for the x^n term, and
* `q[n−k]`, for every middle term x^k.

The constant term 1 is the feedback input itself. For example, x^5 + x^3 + 1
gives `fb = ~(q[0] ^ q[2])`. Polynomials with several middle terms use one
wide XNOR of all their tap bits. `prpg_pkg::tap_mask(degree, sel)` turns the
polynomial table into this bit mask, and `prpg_feedback_taps` evaluates
`~^(q & mask)` for all four polynomials in parallel.

This convention reproduces the published degree-5 sequences exactly. The first
patterns after a clear are (hex, `pattern[4:0]`):

| sel | polynomial    | cycle | first patterns                          |
|-----|---------------|-------|-----------------------------------------|
| 0   | x^5 + x^4 + 1 | 21    | 00 10 18 1c 1e 0f 17 1b 1d 0e 07 …      |
| 1   | x^5 + x^3 + 1 | 31    | 00 10 18 1c 0e 07 13 09 04 02 11 …      |
| 2   | x^5 + x^2 + 1 | 31    | 00 10 18 0c 06 13 09 14 1a 0d 16 …      |
| 3   | x^5 + x + 1   | 21    | 00 10 08 14 0a 15 1a 0d 06 13 19 …      |

### Why XNOR and a clear instead of a seed

An XOR-feedback LFSR locks up in the all-zero pattern. With XNOR feedback, the
all-zero pattern is an ordinary member of the sequence. That is why a plain
clear of every flip-flop is a valid starting point, and the design needs no
seed input. For a polynomial with an even number of tap bits, which covers
every trinomial and pentanomial in the table, the all-ones pattern is instead
a fixed point, the XNOR lock-up state. The shift is invertible because `q[0]`
is always tapped. So a fixed point is reached only from itself, and the
generator never locks after a clear.

## The polynomial table

`prpg_pkg::poly_terms` holds four polynomials for every degree. The cycle
lengths below are the number of distinct patterns after a clear. They equal the
published pattern counts and are checked by `tb_prpg_all_degrees`.

| degree | sel 0                 | sel 1                | sel 2                 | sel 3                             |
|--------|-----------------------|----------------------|-----------------------|-----------------------------------|
| 3      | x^3+x^2+x+1 (4)       | x^3+x^2+1 (7)        | x^3+x+1 (7)           | x^3+x^2+1 (7)                     |
| 4      | x^4+x^2+1 (6)         | x^4+x^3+x+1 (12)     | x^4+x^3+1 (15)        | x^4+x+1 (15)                      |
| 5      | x^5+x^4+1 (21)        | x^5+x^3+1 (31)       | x^5+x^2+1 (31)        | x^5+x+1 (21)                      |
| 6      | x^6+x^4+1 (14)        | x^6+x^2+1 (14)       | x^6+x^5+1 (63)        | x^6+x+1 (63)                      |
| 7      | x^7+x^2+1 (93)        | x^7+x^3+1 (127)      | x^7+x^3+1 (127)       | x^7+x+1 (127)                     |
| 8      | x^8+x^4+1 (12)        | x^8+x+1 (63)         | x^8+x^7+1 (63)        | x^8+x^6+x^5+x+1 (255)             |
| 9      | x^9+x^8+1 (73)        | x^9+x+1 (73)         | x^9+x^4+1 (511)       | x^9+x^5+1 (511)                   |
| 10     | x^10+x^5+1 (15)       | x^10+x^9+1 (889)     | x^10+x^3+1 (1023)     | x^10+x^7+1 (1023)                 |
| 11     | x^11+x^10+1 (1533)    | x^11+x^7+1 (1533)    | x^11+x^4+1 (1533)     | x^11+x^2+1 (2047)                 |
| 12     | x^12+x^8+1 (28)       | x^12+x^5+1 (819)     | x^12+x^11+1 (3255)    | x^12+x^7+x^4+x^3+1 (4095)         |
| 13     | x^13+x^9+1 (7161)     | x^13+x^6+1 (7665)    | x^13+x^12+1 (7905)    | x^13+x^4+x^3+x+1 (8191)           |
| 14     | x^14+x^2+1 (254)      | x^14+x^5+1 (5461)    | x^14+x+1 (11811)      | x^14+x^12+x^11+x+1 (16383)        |
| 15     | x^15+x^5+1 (35)       | x^15+x^9+1 (93)      | x^15+x^11+1 (32767)   | x^15+x^4+1 (32767)                |

Where this table departs from the published polynomial list:

* Some published entries do not produce their published pattern count under the
  tap convention above, even though that convention reproduces the published
  degree-5 sequences bit for bit. For these entries the table keeps the count
  and uses the polynomial with the fewest changed terms that produces it:
  * degree 3, selectors 1 and 3
  * all four degree-10 entries
  * degree 12, selector 1
  * degree 14, selectors 1 and 2
  * degree 15, selectors 0, 2 and 3
* Degree 13, selector 1 is this design's own choice. It uses x^13+x^6+1 so that
  the cycle length rises with the selector, as it does in the rest of that row.
* Degree 7, selectors 1 and 2 are the same polynomial, as published. Degree 3
  has only two primitive trinomials, so one of them appears twice there as well.

To use other polynomials, edit one line of `poly_terms`. Each middle term x^k is
written `x(k)`. The tap mask, the hardware and `tb_prpg_feedback_taps` follow
from it. The two testbenches with their own copy of the table also need the
same edit.

## Switching polynomials while running

`pattern_sel` feeds the multiplexer combinationally, so a new value takes
effect at the next clock edge. The generator continues from the current pattern
and does not restart. With a primitive polynomial every non-all-ones pattern
lies on the one long cycle. With a non-primitive polynomial, the pattern at the
moment of the switch may lie on a shorter cycle that never passes through all
zeros. Pulse `clear` after a switch when the sequence must start from the
published beginning.

## Interface and timing

| port          | dir | width    | meaning                                                  |
|---------------|-----|----------|----------------------------------------------------------|
| `clk`         | in  | 1        | clock; one pattern per rising edge                       |
| `clear`       | in  | 1        | active high, asynchronous; holds `pattern` at all zeros  |
| `pattern_sel` | in  | 2        | polynomial 0..3 of the configured degree                 |
| `pattern`     | out | `DEGREE` | current pattern, register bit `DEGREE−1` = newest bit    |

The only parameter is `DEGREE` (default 5, legal range 3..15). Each degree is a
separate build: the flip-flop count equals the degree, and the multiplexer
always has four inputs. The I/O count is `DEGREE` + 4, with no enable and no
seed input. The path in front of each flip-flop is at most one XNOR of up to
five inputs followed by a 4:1 multiplexer, so the logic depth does not grow
with the degree.

Choices made in this RTL where the published description says nothing:

* The clear is active high and asynchronous.
* There is no clock enable.
* Multi-term taps are computed as one reduction XNOR rather than a chain of
  2-input gates. This gives the same function.

## Files

* `rtl/prpg_pkg.sv`: degree range, selector type, the polynomial table
  (`poly_terms`) and its conversion to tap masks (`tap_mask`).
* `rtl/prpg_register_bank.sv`: the shift chain of D flip-flops with a common
  clear.
* `rtl/prpg_feedback_taps.sv`: the four XNOR tap networks of one degree.
* `rtl/prpg_poly_mux.sv`: the 4:1 polynomial multiplexer.
* `rtl/prpg.sv`: the top level, which wires the three blocks together.
* `tb/tb_prpg.sv`: end-to-end test at the default degree 5. It checks the
  published sequences for all four selectors pattern by pattern, and checks
  that each cycle closes after 21/31/31/21 clocks. It also runs 3000 cycles of
  random selector switches and asynchronous clears against a next-state model,
  and counts each mechanism.
* `tb/tb_prpg_all_degrees.sv`: every degree 3..15 with every selector. It checks
  each pattern against a reference LFSR and each cycle length against the table
  above: about 150 000 checks, and it runs in well under a second.
* `tb/tb_prpg_register_bank.sv`, `tb/tb_prpg_feedback_taps.sv`,
  `tb/tb_prpg_poly_mux.sv`: unit tests of the three blocks.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/prpg_pkg.sv tb/tb_prpg.sv --top-module tb_prpg
./obj_dir/Vtb_prpg
```

Replace `tb_prpg` with any other testbench name. To build the generator at
another degree, instantiate `prpg #(.DEGREE(n))`.

## How far it has been checked

* Every testbench passes with Verilator.
* Each unit testbench was also run against a deliberately broken copy of its
  block and failed it: reversed shift, XOR in place of XNOR, swapped selector
  bits, inverted selector.
* The RTL passes Verilator lint and elaborates in Yosys (slang front end).
* The published timing, power and utilisation figures came from an Artix-7
  FPGA at 100, 200 and 500 MHz. Those figures and FPGA timing closure have not
  been reproduced here.
