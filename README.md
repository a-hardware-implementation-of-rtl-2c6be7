# RSA co-processor: Montgomery exponentiation on a systolic bit array

RSA encryption, decryption and signing all come down to one operation on
1024-bit (or longer) integers: modular exponentiation, `M^E mod N`. Done in
software on a small embedded processor this is slow; done with a full-width
multiplier it is large. This co-processor sits between the two. It performs
`M^E mod N` with a chain of Montgomery modular multiplications, each computed
by a linear systolic array with one small processing element per bit. The
array does one 1024-bit modular multiplication every 2052 clock cycles. At
40 MHz that is:

| operation (1024-bit key)                            | cycles    | time at 40 MHz |
|-----------------------------------------------------|-----------|----------------|
| public key, E = 65537                               | 38,989    | 0.97 ms        |
| private key, 1024-bit exponent with 512 bits set    | 3,151,873 | 78.8 ms        |

A host processor (a 32-bit soft core in the intended system) loads the
operands over a 32-bit memory-mapped bus, starts the engine and polls for the
result. The key length is a synthesis parameter, `N_BITS`, with a default of
1024.

## Files

| file                         | contents                                                   |
|------------------------------|------------------------------------------------------------|
| `rtl/rsa_pkg.sv`             | shared types: B-operand select, array token, register map  |
| `rtl/mmm_pe.sv`              | one bit-column processing element of the multiplier         |
| `rtl/mmm_systolic_array.sv`  | the Montgomery multiplier: `N_BITS+2` PEs and the feeder    |
| `rtl/mod_exp.sv`             | exponentiation controller with domain conversion           |
| `rtl/rsa_bus_if.sv`          | host bus slave and operand registers                       |
| `rtl/rsa_coprocessor.sv`     | top level: bus interface plus exponentiation engine        |
| `tb/tb_*.sv`                 | self-checking testbenches, one per module, plus full size  |

## The arithmetic

Let `n = N_BITS`, with `N` odd and `N < 2^n`. The array uses radix-2
Montgomery multiplication with `K = n + 2` iterations and `R = 2^K`:

```
S = 0
for i = 0 .. K-1:
    q = (S + a_i * B) mod 2          -- makes the sum even
    S = (S + a_i * B + q * N) / 2
result = S  ==  A * B * R^-1  (mod N)
```

Two more iterations than the usual `n` make `R > 4N`. Then, if `A` and `B` are
both below `2N`, the result is also below `2N` (and every intermediate `S` is
below `3N < 2^(n+2)`). Results can therefore be fed straight back as operands
without the conditional subtraction that plain Montgomery multiplication needs
after every step. Values are kept only "congruent modulo N and below 2N"
until the very end.

Exponentiation (`mod_exp`) uses left-to-right binary square-and-multiply in the
Montgomery domain:

1. **Into the domain.** `M~ = M * R mod N`, computed by `K` steps of
   "double, then subtract N if not below N", one step per cycle. No
   precomputed `R^2 mod N` is needed from the host.
2. **Exponent loop.** `P = M~` accounts for the top set bit of `E`. For every
   lower bit, from the top down: `P = P*P*R^-1`, and if the bit is 1 also
   `P = P*M~*R^-1`. Leading zero bits of `E` cost nothing.
3. **Out of the domain.** `P = P*1*R^-1`. With `P < 2N` this gives a value of
   at most `N`.
4. **Fix-up.** A value equal to `N` becomes 0. This can only happen when
   `M^E = 0 (mod N)`, which needs a modulus with a repeated prime factor, so it
   never happens with a real RSA key.

`E = 0` returns 1 (or 0 when `N = 1`) without using the multiplier.

## The systolic array and its schedule

This is the part of the design that takes the most care.

Each processing element (`mmm_pe`) owns one bit column `j` of the running sum
`S`. In one iteration it adds four things: `S_i[j]`, `a_i AND b_j`,
`q_i AND n_j`, and the carry from column `j-1`. The sum is at most 5, so the
carry is two bits. The low bit of the sum is bit `j-1` of the next `S`, because
of the division by 2. The PE sends it *left*, to PE `j-1`. The carry goes
*right*, to PE `j+1`. PE 0 computes `q_i` and has no carry in. The top PE has
no neighbour above it, so its own carry out becomes the top bit of the next `S`.

Data therefore flows both ways: sum bits go down the array and carries go up.
The array settles this with a skewed schedule. **PE `j` works on iteration `i`
in cycle `T0 + 2i + j`.** Check the dependencies:

* The carry from PE `j-1` (same iteration) was produced in the cycle before.
* `S_i[j]` comes from PE `j+1` in iteration `i-1`, at `T0 + 2(i-1) + (j+1)`,
  which is also the cycle before.
* `a_i` and `q_i` come from PE 0 at `T0 + 2i` and travel one PE per cycle, so
  they arrive exactly at `T0 + 2i + j`.

Every link between PEs is therefore one register. A token (`mmm_token_t`:
valid, `a_i`, `q_i`, first, last, B-select) walks up the array one PE per cycle
and tells each PE when it works. Each PE works at most every second cycle. So
the sum bit it leaves for its left neighbour is read before it is overwritten.

**Result in place.** In the last iteration, each PE writes its result bit
straight into the accumulator register `P`, least significant bit first. Bit
`j` of the new `P` is in place at `T0 + 2K + j`.

**Chaining.** The multiplier `A` is always `P`, fed one bit every second cycle
(`a_i = P[i]` at `T0 + 2i`). The multiplicand `B` is chosen per multiplication:
`P` (squaring), `M~` (multiply) or 1 (leaving the domain). A new multiplication
may start at `T0 + 2K`. Its PE `j` first needs `P[j]` at `T0 + 2K + j`, exactly
when that bit of the previous result lands. The previous multiplication's last
read of `P[j]` is at `T0 + 2K - 2 + j`, before it is overwritten. So dependent
multiplications run back to back every `2K` cycles, with no gap and no
separate result register. The B-select bit travels in the token. A squaring and
the following multiply by `M~` can therefore be inside the array at the same
time.

A single multiplication finishes (`done`) at `T0 + 3K - 3`.

## Timing

For an exponent whose top set bit is `t` and which has `h` bits set, counted
from the cycle `start` is sampled to the cycle `done` is high:

```
cycles = (K + 2)              conversion into the domain, load
       + 2K * (t + h - 1)     squarings and multiplies, back to back
       + (3K - 1)             last multiplication (by 1), fix-up
```

With `N_BITS = 1024`, `K = 1026`, this gives the table at the top. For other
key lengths the time grows with the square of the length. At 2048 bits an
average private-key operation takes about 12.6 million cycles (315 ms at
40 MHz). At 4096 bits it takes about 50 million (1.26 s). The count is
available to software in the cycle-count register.

## Host interface

`rsa_bus_if` is a 32-bit slave with Avalon-MM style timing: no wait states. A
write is taken in the cycle `avs_write` is high. `avs_readdata` is valid in the
same cycle as `avs_read` (read latency 0). The word address is
`{region[2:0], index}`, with `index` `log2(N_BITS/32)` bits wide (at least 2):

| region | index | access | contents                                          |
|--------|-------|--------|---------------------------------------------------|
| 0      | 0     | W      | bit 0 = 1: start                                  |
| 0      | 0     | R      | bit 0 = busy, bit 1 = done                        |
| 0      | 1     | R      | clock cycles of the last operation                |
| 0      | 2     | R      | `N_BITS`                                          |
| 1      | word  | R/W    | modulus N, word 0 least significant               |
| 2      | word  | R/W    | message M                                         |
| 3      | word  | R/W    | exponent E                                        |
| 4      | word  | R      | result `M^E mod N`                                |

The host writes `N`, `M` and `E`, then writes 1 to control word 0 and polls
until `done` is set. `done` is cleared by the next start. While the engine is
busy, operand writes and start are ignored, so the engine always sees stable
operands. There is no interrupt. The requirements are `N` odd and `M < N`.
A violation is flagged by an assertion in simulation but not by hardware.

Reset is asynchronous and active low (`rst_n`). The design has a single clock
domain.

## Size

After generic synthesis at `N_BITS = 1024`, the multiplier array has about 11.3
thousand flip-flop bits. The whole core has about 17.5 thousand. Most of the
difference is the three 1024-bit operand registers in the bus interface and
the `M~` and conversion registers in `mod_exp`. Each PE holds 10 state bits:
the 7-bit token (five flags and the 2-bit B-select), one sum bit and a 2-bit
carry. The conversion step uses one `N_BITS`-wide compare and
subtract. An area-critical build could store the operands in block RAM and
reuse the array for the conversion. This design does neither.

## Where this design departs from, or adds to, its source description

The key length (1024 bits, parameterizable), the use of Montgomery
multiplication, the systolic array, a host bus interface and the speed target
are taken from the design description this RTL implements. The following
are choices of this implementation:

* the bit-level PE, its two-bit carry and the token that drives it;
* `K = N_BITS + 2` iterations with no subtraction between multiplications;
* the `2i + j` schedule and back-to-back chaining through the in-place `P`
  register;
* left-to-right binary exponentiation, and shift-and-subtract conversion into
  the Montgomery domain;
* the register map, bus timing and busy-time write protection;
* the handling of `E = 0` and of a result equal to `N`.

The speed target was 2 ms for a 1024-bit public-key operation and 79 ms for
a private-key operation, at 40 MHz. The cycle counts above meet both: 0.97 ms
with E = 65537, and 78.8 ms for an average full-length exponent.

The area target for this design was about 7,000 FPGA logic elements (roughly
50,000 gates) at 1024 bits. This RTL does not meet it as written: it keeps
every operand in flip-flops and gives each PE a 7-bit token register, for
about 17,500 flip-flop bits in total. Putting the operands in block RAM and
slimming the token are the obvious steps towards that target. Neither is
done here.

The key length is fixed when the design is built. At run time any odd modulus
below `2^N_BITS` works, but a shorter key still takes the full-width time per
multiplication. A different key length means rebuilding with another
`N_BITS`, a positive multiple of 32.

Outside this RTL, and needed for a complete system, are the host processor
with its driver software, key generation (done in host software) and the
usual system peripherals.

## Simulating

Each testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Packages must come first on the command
line. For example, the end-to-end test of a 64-bit co-processor:

```
verilator --binary --timing --assert -Irtl \
    rtl/rsa_pkg.sv rtl/mmm_pe.sv rtl/mmm_systolic_array.sv rtl/mod_exp.sv \
    rtl/rsa_bus_if.sv rtl/rsa_coprocessor.sv tb/tb_rsa_coprocessor.sv \
    --top-module tb_rsa_coprocessor -o sim
./obj_dir/sim
```

| testbench                 | what it covers                                                          |
|---------------------------|-------------------------------------------------------------------------|
| `tb_mmm_pe`               | all input combinations of PE 0, a middle PE and the top PE              |
| `tb_mmm_systolic_array`   | random chains of square/multiply/by-1 on 32 bits, exact `2K` period     |
| `tb_mod_exp`              | 64-bit random and corner-case exponentiations, exact cycle counts       |
| `tb_rsa_bus_if`           | register map, start pulse, busy protection, done flag                   |
| `tb_rsa_coprocessor`      | 64-bit end to end over the bus, a textbook RSA key pair, and coverage of each mechanism (squaring, multiply, chaining, leaving the domain, `N`-to-0 fix-up, `E = 0`, busy-time writes) |
| `tb_rsa_full`             | the default 1024-bit build: a public-key and an average private-key operation against a 2048-bit reference, cycle counts, 2 ms and 79 ms budgets at 40 MHz; about one minute |
| `tb_rsa_keysizes`         | 2048- and 4096-bit builds with E = 65537, results and cycle counts      |

The reference model in each testbench is a plain square-and-multiply in wide
integer arithmetic (with `%`, or with shift-and-add modular multiplication for
the widest builds), independent of the Montgomery formulation.
