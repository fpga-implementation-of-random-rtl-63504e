# LFSR and scrambling random number generator for round keys

This is a small key-schedule generator for lightweight ciphers. It takes a
64-bit initial key, a seed, and produces five 16-bit round keys K1..K5.
It keeps producing new sets of five keys, one set per clock, for as long
as it is enabled.

The scheme combines three cheap operations:

- Nibble regrouping. The key is cut into sixteen 4-bit blocks. Every fourth
  block goes into the same 16-bit lane word.
- LFSR whitening. Each lane word seeds its own 16-bit LFSR, and the LFSR
  output is XORed back onto the lane word.
- Fibonacci scrambling. The four lane results are folded into five keys by
  additions modulo 65537. Each key after the second is the sum of the two
  keys before it.

There are no S-boxes and no multipliers. The datapath is four 16-bit
registers, four XOR words, a fixed wiring permutation and five 17-bit
modular adders.

## Data flow

```
 inkey[63:0] = p1 p2 p3 ... p16          (4 bits each, p1 = inkey[63:60])
      |
 key_partition:  pp1 = p1|p5|p9|p13   pp2 = p2|p6|p10|p14
                 pp3 = p3|p7|p11|p15  pp4 = p4|p8|p12|p16
      |  (held in seed registers after load)
      +-----------------+
      |                 |
      |           lfsr_key (x4, seeded with pp_i, stepped every cycle)
      |                 |
      +------ XOR ------+      white_i = pp_i ^ LFSR_i
                |
           bit_shuffle (x4)   Q_i = 4x4 bit transpose of white_i
                |
           fib_scrambler     K1 = (Q1+Q2) mod 65537
                             K2 = (Q3+Q4) mod 65537
                             K3 = (K2+K1) mod 65537
                             K4 = (K3+K2) mod 65537
                             K5 = (K4+K3) mod 65537
                |
           output register   k_o[0..4] = K1..K5, key_valid
```

### Nibble regrouping (`key_partition`)

Lane word w takes blocks w, w+4, w+8 and w+12, with the first of them in
the top nibble. For the key `0123456789ABCDEF`, the lane words are
`048C 159D 26AE 37BF`. This step is pure wiring.

### Lanes (`lfsr_key`, XOR, `bit_shuffle`)

Each lane has a 16-bit Fibonacci LFSR. It uses the polynomial
x^16 + x^14 + x^13 + x^11 + 1, which has a maximal period of 65535. The
register shifts towards the MSB, and bit 0 receives the XOR of bits 15, 13,
12 and 10.

On `load`, the LFSR takes the lane word as its seed. A lane word of zero
would lock the LFSR, so it is replaced by `0001`. The lane word is also
kept unchanged in a seed register. The whitened word is the seed register
XOR the current LFSR state.

Right after a load, the LFSR state equals the seed, so the XOR would give
zero. That is why the generator steps the LFSRs through a warm-up before it
produces its first keys.

The shuffle is a fixed permutation, so in hardware it is only wiring.
Output bit 4i+j is input bit 4j+i: the word is treated as a 4x4 bit matrix
and transposed. As a result, each output nibble holds one bit from every
input nibble. The same mapping can be written as P(k) = 4k mod 15 for input
bit k < 15, with bit 15 fixed.

### Scrambling modulo 65537 (`fib_scrambler`, `aplusbmodn`)

All additions are taken modulo 65537 (0x10001), on 16-bit operands with a
17-bit modulus. The sum of two 16-bit words is at most 131070, so the
remainder needs at most one subtraction of 65537.

The remainder can be 65536, which does not fit in 16 bits. Each adder
outputs only the low 16 bits, so a sum of exactly 65536 gives 0. That key
then feeds the next addition as 0.

`aplusbmodn` computes a true remainder for any modulus on its `n` port. In
this design `n` is always the constant 65537, so a synthesis tool that
propagates the constant needs only a compare and a subtract. The keys form a chain of four
adders, K1/K2 -> K3 -> K4 -> K5, and this chain is the combinational
critical path.

## Control and timing (`rng_lfsr_top`)

The generator has three phases. `load` restarts it from any phase.

| phase   | entered by                   | what happens each clock                                   |
|---------|------------------------------|-----------------------------------------------------------|
| idle    | reset                        | nothing; `en` is ignored                                  |
| warm-up | `load`                       | LFSRs step; no output; `en` is ignored                    |
| run     | `WARMUP_STEPS` warm-up steps | with `en`=1: register a key set, set `key_valid`, step LFSRs; with `en`=0: hold, `key_valid`=0 |

Cycle by cycle:

- `load` is sampled at clock edge E0. `inkey` must be valid in that cycle
  only.
- `ready` rises after edge E(`WARMUP_STEPS`). With the default, that is 16
  clocks after the load edge.
- Suppose `en` is high when edge Eu samples it in the run phase. Then
  `k_o` and `key_valid` change at Eu, so they can be read in the cycle after
  `en`.
- With `en` held high, the generator produces one new set of 80 bits per
  clock. The latency from `load` to the first key set is `WARMUP_STEPS` + 1
  clocks.
- `rst_n` is an asynchronous, active-low reset. It returns the generator to
  idle, clears the outputs and sets each LFSR to `0001`.

## Parameters

| name | where | default | meaning |
|------|-------|---------|---------|
| `WARMUP_STEPS` | `rng_lfsr_top` | 16 | LFSR steps after `load` before the first key set (16 refills the register once) |
| `SHUFFLE_EN` | `rng_lfsr_top` | 1 | 0 sends the whitened words straight to the scrambler |
| `KEY_W`, `NIB_W`, `LANES`, `WORD_W`, `NUM_KEYS` | `rng_pkg` | 64, 4, 4, 16, 5 | structure of the scheme |
| `MODULUS` | `rng_pkg` | 17'h10001 | modulus of all scrambling additions |
| `LFSR_TAPS` | `rng_pkg` | 16'hB400 | LFSR feedback taps (bit i set = state bit i feeds back) |
| `ZERO_SEED` | `rng_pkg` | 16'h0001 | LFSR seed used instead of an all-zero lane word |

The package constants set the structure of the scheme. The modules assume
4 lanes of 16 bits and a 64-bit key. For example, the 4x4 transpose and the
two first-level adders are written for 16-bit words and four lanes, so
changing these constants requires changing those modules.

## How far the output can be trusted

Treat this generator as a key-expansion function, not as a
cryptographically strong random source.

- **Period.** All four LFSRs have the same polynomial and step together.
  After a load, the sequence of key sets therefore repeats exactly every
  65535 sets, which is 5,242,800 bits. A stream longer than that from one
  seed consists of copies of this period. No choice of 16-bit LFSR could
  make the period longer.
- **Good keys.** Take seeds whose four lane words are unrelated, such as
  `DEADBEEF0BADF00D`, `C381E88F38C0C8FD` or `7F3108CA5E92D46B`. Over one full
  period, their streams pass the monobit frequency test and the runs test of
  NIST SP 800-22 at the 1% level. The block-frequency test (128-bit blocks,
  chi-square by a normal approximation) is not met by all of them: one of
  the three, `7F3108CA5E92D46B`, lands at z = 3.6, well past the 1% bound
  of 2.33, so the block-to-block spread of ones is larger than random.
- **Structured keys.** Some seeds give visibly biased streams, with 49% or
  51% ones and a runs statistic far outside the bound. Examples are lanes seeded
  alike (key `0000000000000001`), lanes that are bitwise complements
  (`3C5A96F0E1D2B487`) and lanes spaced by 0x1111 (`0123456789ABCDEF`). The
  four lanes run the same m-sequence at related phases, so the modular sums
  of related lanes are correlated. The bias shows mostly in K2 and K3.
- **Scope of the tests.** Only the frequency, runs and block-frequency
  tests are run here, on one period per key. The other tests of the NIST
  suite are not run.

## What the original scheme fixes and what this design chose

The original scheme fixes these points, and this design follows them: the
64-bit key, the nibble regrouping, one 16-bit LFSR per lane, XOR whitening,
a bit-shuffling stage, the recurrence K(i) = K(i-1) + K(i-2) with five
keys, and the modulus 0x10001 on 16-bit adder outputs.

This design made its own choices for the following:

- the LFSR polynomial, shift direction and zero-seed rule;
- the shuffle permutation. The original only names a shuffling stage, and
  its synthesized circuit has no shuffle at all. Set `SHUFFLE_EN = 0` for
  that variant.
- all of the clocking: registered seed and outputs, the warm-up, the
  `load` / `en` / `ready` / `key_valid` interface, and producing a
  continuous stream of key sets instead of a single set;
- truncating the remainder 65536 to 0.

The original implementation reports 92 registers, 144 I/O pins and a
9.036 ns path on an Artix-7. This design has 216 flip-flops and 150 port
bits. The difference comes from registering the seed words and all 80
output bits. Its longest path is the four-adder key chain.

## Files

| file | contents |
|------|----------|
| `rtl/rng_pkg.sv` | sizes, modulus, LFSR taps, types, phase enum |
| `rtl/key_partition.sv` | 64-bit key to four 16-bit lane words |
| `rtl/lfsr_key.sv` | 16-bit lane LFSR with load and step |
| `rtl/bit_shuffle.sv` | 4x4 bit transpose |
| `rtl/aplusbmodn.sv` | (a + b) mod n |
| `rtl/fib_scrambler.sv` | K1..K5 from Q1..Q4 |
| `rtl/rng_lfsr_top.sv` | complete generator with control |
| `tb/rng_ref_pkg.sv` | reference model: functions and a cycle model of the top |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_rng_lfsr_modes.sv` | top with shuffle bypassed and a 3-step warm-up |
| `tb/tb_rng_stream.sv` | period check; monobit, runs and block-frequency statistics over a full period |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` at the end. Each has
a watchdog that stops the run if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/rng_pkg.sv tb/rng_ref_pkg.sv tb/tb_rng_lfsr_top.sv \
    --top-module tb_rng_lfsr_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_rng_lfsr_top` with its name.
`tb_rng_stream` does not need `tb/rng_ref_pkg.sv`. Every testbench runs in
well under a second.

What the testbenches cover:

- The unit tests compare each module against the independent model in
  `rng_ref_pkg` on directed corner cases and random inputs. Corner cases
  include the counting key, the sums 65536, 65537 and 131070, and every
  single-bit input of the shuffle. The LFSR test also checks the full
  65535-step period.
- `tb_rng_lfsr_top` runs the top at its default parameters and compares
  every output on every clock against the cycle model. It checks the
  warm-up length and the rate of one key set per clock. It also counts
  loads, reloads during run and during warm-up, `en` low during run, `en`
  during warm-up, zero lane seeds and modular wrap-arounds. If any of these
  never happens, the test fails.
- `tb_rng_lfsr_modes` repeats that test with the shuffle bypassed and a
  3-step warm-up.
- `tb_rng_stream` runs six keys for a full period each. It checks the period
  and the key_valid rate, and it judges the monobit and runs tests on the
  three unstructured keys. For the three structured keys, it checks that the
  bias shows. It prints the block-frequency statistic without judging it.
