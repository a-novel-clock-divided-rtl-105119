# Low-power memory BIST: clock-divided LFSR addresses and Hamming-protected test data

A memory built-in self-test (BIST) spends most of its power clocking the
address generator: a conventional N-bit LFSR toggles all of its flip-flops on
every test cycle. This design splits the address register in two. The two
least significant bits come from a small 2-bit counter that runs on every
step. The upper N-2 bits come from an LFSR that is clocked only once every
four steps. Most of the register therefore switches at a quarter of the
rate, and the 2-bit part changes one bit per step. Consecutive addresses
differ in few bits.

The test data is a second LFSR, 4 bits wide. Each word is Hamming(7,4)
encoded before it is written. On the way back, a ring-counter error unit
flips one bit of each word read, modelling a stuck-at cell. A Hamming
decoder then finds and corrects that bit. The BIST compares the corrected
word with the expected data. A word it cannot repair, such as one with two
bad bits, fails the run.

Default size: 5-bit addresses (32 locations), 4-bit data, 7-bit stored words.

## Block diagram

```
             step/reseed                       we / re
   +----------------+---------------+     +---------------------------+
   |                |               |     |                           |
   |  bist_controller (write pass, reseed, read pass, compare)        |
   |      ^ expected          ^ decoded, err_exist                    |
   +------|-------------------|---------------------------------------+
          |                   |
 clk_div_addr_gen ---addr---> mem_err_array (32 x 7) ---hamming_code_err--->
   (3-bit LFSR @ clk1_en      ^        |  ring_error_unit XOR on read   |
    2-bit ring @ clk2_en)     |                                         v
                              |                                 hamming_decoder
 lfsr_fib (4-bit data) --> hamming_encoder --hamming_code--+      -> hamming_decode
   @ clk2_en   lfsr_out
```

## The clock-divided address generator

`clk_div_addr_gen` builds the address `{U, q1, q2}` from two parts:

* `U` holds the upper N-2 bits. It is a Fibonacci LFSR (`lfsr_fib`) with the
  polynomial x^3+x^2+1 for N = 5. It steps only when `clk1_en` (the slow
  clock) is high.
* `q1 q2` holds the lower 2 bits. It is the "modified 2-bit LFSR"
  (`johnson2_lfsr`): FF1 takes the inverse of FF2, and FF2 takes FF1. It
  steps on every `clk2_en` (the fast clock). It cycles through
  00 → 10 → 11 → 01. A 2-bit XOR LFSR would reach only three of the four
  codes. This one reaches all four, changing one bit per step.

`clk1_en` is `step` ANDed with "the 2-bit part is in its last state (01)".
The upper LFSR therefore moves exactly when the lower part wraps. Every
upper value meets all four lower values, and the clock ratio is 1:4.

For N = 5 the sequence starts 00100, 00110, 00111, 00101, 01000, … and
repeats after (2^(N-2) − 1) · 4 = 28 addresses. The upper LFSR can never
hold zero, so addresses 0–3 are never generated.

In the testbench, one period of 28 steps toggles 40 address bits. A
conventional 5-bit LFSR (x^5+x^3+1) toggles 73 over the same number of steps.

**The two clocks are clock enables.** `clk1_en` and `clk2_en` enable
flip-flops that all sit on one BIST clock. In an ASIC flow the synthesis tool
turns them into clock-gating cells, which gives the separately gated clock
trees the scheme calls for. Keeping a single clock avoids generating clocks
in logic and the crossings between those clocks.

## Test data and the Hamming(7,4) code

The data LFSR is `lfsr_fib` at its defaults: 4 bits, x^4+x^3+1, seed 0001.
It produces 0001, 0010, 0100, 1001, 0011, 0110, 1101, … with a period of 15.
It steps on the fast enable, so there is one data word per address.

`hamming_encoder` outputs `{d3 d2 d1 d0 p2 p1 p0}`, where

```
p2 = d3 ^ d2 ^ d0      p1 = d3 ^ d1 ^ d0      p0 = d2 ^ d1 ^ d0
```

Examples: 0011 → 0011100, 1000 → 1000110, 1111 → 1111111.

`hamming_decoder` recomputes the parity bits and XORs them with the
received ones to get the 3-bit syndrome. Each bit that can flip has its own
syndrome:

| flipped bit | d3  | d2  | d1  | d0  | p2  | p1  | p0  |
|-------------|-----|-----|-----|-----|-----|-----|-----|
| syndrome    | 110 | 101 | 011 | 111 | 100 | 010 | 001 |

The decoder inverts a flipped data bit and ignores a flipped parity bit.
`err_exist` is high whenever the syndrome is non-zero. A double error also
gives a non-zero syndrome, but it points at a third bit, so the "corrected"
data is always wrong. The comparison in the controller is what catches it.

## The memory under test and its error unit

`mem_err_array` is a 2^N × 7 array. It writes synchronously and reads
combinationally, so the read word arrives in the same cycle as its
address. The array is not reset.

On the read path sits `ring_error_unit`, an 8-bit one-hot ring that moves one
position per read. Its low 7 bits are XORed into the read word. The result:

* ring positions 0 to 6 flip bits 0 to 6 in turn;
* position 7 leaves the word clean;
* the pattern then repeats every eight reads.

`inject_en = 0` turns the flipping off while the ring keeps moving. The ring
is reset by `rst` only, not by `start`. Its position therefore carries over
from one run to the next. Reset puts it at position 6 (`START_POS`). With
that start, the first run after reset flips exactly the bits of the
reference simulation: reads 4 to 14 carry data 0011 … 1000, and the flipped
bit walks 2, 3, 4, 5, 6, none, 0, 1, 2, 3, 4.

## One BIST run (`bist_controller`)

| phase | cycles | what happens |
|-------|--------|--------------|
| IDLE/DONE | – | `start` reseeds both generators and clears `fail`/`err_count` |
| WRITE | 28 | write `enc(data)` at `addr`; step both generators; the 28th cycle reseeds them instead of stepping |
| READ  | 28 | read `addr`; decode; `ok = (decoded == data)`; `fail` goes high and stays high if `ok` is low; `err_count` counts reads with `err_exist` |
| DONE  | – | `done` is high until the next `start` |

Because of the reseed, the read pass replays exactly the addresses and data
of the write pass. The expected data therefore never needs to be stored. A
run takes 56 cycles from the cycle after `start` to `done`. `ok` is 1
outside the read pass.

## Files

| file | contents |
|------|----------|
| `rtl/mbist_pkg.sv` | widths (`ADDR_W`=5, `DATA_W`=4, `CODE_W`=7), `addr_gen_period()`, phase enum |
| `rtl/lfsr_fib.sv` | generic Fibonacci LFSR with enable and reload |
| `rtl/johnson2_lfsr.sv` | 2-bit modified LFSR (twisted ring) |
| `rtl/clk_div_addr_gen.sv` | split address generator and its two clock enables |
| `rtl/hamming_encoder.sv`, `rtl/hamming_decoder.sv` | Hamming(7,4) |
| `rtl/ring_error_unit.sv` | error-injecting ring counter |
| `rtl/mem_err_array.sv` | memory under test plus error unit |
| `rtl/bist_controller.sv` | run sequencer, comparator, counters |
| `rtl/mbist_top.sv` | the whole BIST |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fig8_workload.sv` | replay of the reference simulation on the full design |

The top's ports are named after the signals of a reference simulation of
this scheme: `lfsr_out`, `hamming_code`, `hamming_code_err`,
`hamming_decode`, `err_exist` and `ok`. The top adds `addr`, `syndrome`,
`clk1_en`/`clk2_en`, `phase` (0 idle, 1 write, 2 read, 3 done), `fail`,
`done` and `err_count`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each also has a watchdog. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mbist_pkg.sv tb/tb_mbist_top.sv --top-module tb_mbist_top
./obj_dir/Vtb_mbist_top
```

The other testbenches build the same way. Swap in their own `tb_*.sv` and
`--top-module`.

`tb_mbist_top` runs the top at its default parameters. A reference model in
the testbench checks every cycle of four runs:

1. Injection off: all reads are clean.
2. Injection on: one bit is flipped per read, and every word is corrected.
3. A single stuck bit is planted in the array between the passes. It is
   corrected, and `err_count` is 1.
4. Two bad bits are planted in one word. `ok` drops on that read, and `fail`
   is set.

The testbench also checks that each mechanism happened at least once: slow
and fast clock ticks, reseeds, injected corrections, clean reads, a stuck-bit
correction and an uncorrectable word. The stuck bits are planted through a
hierarchical reference into `u_mem.mem`.

`tb_fig8_workload` also runs the top at its defaults. After reset it does one
run with injection on and compares eleven consecutive read cycles with the
reference simulation, row by row. Each row holds the data word, the code
word, the word read back with its flipped bit, the decoded word, `ok` and
`err_exist`.

## Where this design makes its own choices

The scheme fixes: the N-2 / 2 split of the address; the slow and fast
clocks; the 2-bit modified LFSR; the 4-bit data LFSR; the 4 → 7 bit
Hamming code; the ring-counter error unit; and the 32-location example. The
following are this implementation's own decisions:

* **Bit order of the address.** The upper LFSR forms the MSBs and the 2-bit
  part the LSBs. The scheme's prose says the opposite, but its block diagram
  shows this order. This order also suits the clocking: the fast part sits in
  the low bits, like a counter.
* **Clock ratio 1:4,** derived from when the 2-bit part wraps.
* **Address coverage.** 28 of 32 addresses are tested, because the upper
  part is a plain LFSR that never holds zero. Adding a zero state (a
  de Bruijn-style modification) would cover all 32, but the scheme does not
  describe one, so none is built.
* **Polynomials, seeds and reset values.** x^3+x^2+1 for the upper address
  LFSR. x^4+x^3+1 and the code layout `{data, p2 p1 p0}` for the data
  path: these reproduce the data and code words of the reference
  simulation. Seeds are 001 and 0001. Resets are synchronous and active high.
* **The error unit has eight positions,** one of them clean. This matches the
  reference simulation, where the flipped bit runs 2, 3, 4, 5, 6, none, 0,
  1, … The reset position is chosen to line up with that simulation. The
  `inject_en` gate is an addition.
* **The controller is entirely this design's.** That covers the
  write-then-reseed-then-read sequence, the definition of `ok`, `fail` and
  `err_count`, and combinational memory reads.
* **Not modelled.** Power, FPGA resource use and fault-coverage figures are
  results of a tool flow, not of RTL. Other memory fault types (coupling,
  address-decoder faults) and March-style test algorithms are outside the
  scheme.

## Changing it

* `mbist_top #(.TOP_ADDR_W(n))` resizes the memory and the address
  generator. The run length follows `addr_gen_period(n)`.
* `clk_div_addr_gen` holds primitive tap masks for upper-LFSR widths 2 to 8
  (`n` = 4 to 10). Wider addresses need an entry added to `hi_taps()`. Its
  testbench also checks a 6-bit instance: 60 distinct addresses per period.
* The data width is fixed at 4 by the Hamming(7,4) code.
