# RM-PRNG stream cipher

This design is a 32-bit stream cipher whose key stream comes from a
*reseeding-mixing pseudo random number generator* (RM-PRNG). The generator
combines two sources that are weak on their own:

* a **chaotic generator**, the logistic map `X' = 4·X·(1−X)` computed in
  32-bit fixed point. Its output is hard to predict, but once it is
  digitized it falls into fixed points and short cycles;
* a **linear generator**, a DX-8 multiple recursive generator modulo
  `2^31 − 1`. Its period is very long, but its output is linear and so easy
  to predict.

The design repairs the chaotic generator by **reseeding**: on a fixed point,
and in any case every `T_R` steps, it overwrites the 5 least significant bits
of the next state with a constant pattern. It then **mixes** the chaotic state
with the linear generator's word by XOR. The result is one 32-bit key word per
clock. Encryption XORs each plain-text word with the next key word, and
decryption XORs the cipher text again with the same key word.

```
               seed1, seed2, start
                      |
                 +---------+   key K (32 b, one word per accepted plain word)
                 | rm_prng |----------------+------------------+
                 +---------+                |                  | (delayed 1 cycle)
                      ^ next                v                  v
 plain text --------->+-------------> [encryptor] -- cipher --> [decryptor] --> plain text
```

## Key generator (`rm_prng`)

The generator has three parts, and all of them work on the current registers
in the same clock cycle:

```
  X_t  --[ lgm_next_state ]--> X_{t+1} --+--> [ output_construction ] --> OUT_{t+1} = key
   ^                                     |            ^
   |                                     v            | Y_{t+1}
   +--[ RMux: reseed ? {X_{t+1}[31:5], R} : X_{t+1} ] [ dx_generator ]
          ^                                           (8 x 31-bit words)
          +-- reseed = (X_t == X_{t+1}) | (RC == T_R-1)
```

### Nonlinear module: the digitized logistic map

`nonlinear_module` holds the 32-bit state `X_t`. `lgm_next_state` reads `X_t`
as an unsigned fraction in `[0, 1)`. It forms `1 − X` as the 32-bit two's
complement `−X` and multiplies the two into a 64-bit product. With γ = 4 the
multiplication by 4 is a left shift by two, so the next state is product bits
`[61:30]`. The map is symmetric (`F(X) = F(1−X)`), so it has only 31 bits of
useful resolution. `X = 0.5` would map to 1.0, which cannot be represented;
it wraps to 0, a fixed point that the reseeding then removes.

### Reseeding module

`reseeding_module` holds the reseeding counter RC and decides for every step
whether to reseed:

* **Fixed point:** `X_t == X_{t+1}`. A seed of 0, for example, is caught on
  the first step.
* **Period:** RC has counted `T_R − 1` steps since the last reseeding, so
  without fixed points the reseeding happens on every `T_R`-th step.

When either condition holds, RC restarts from 0 and the value written back to
the state register keeps the 27 MSBs of `X_{t+1}` while its 5 LSBs become the
pattern `R`. Replacing only the LSBs changes the state by less than `2^5/2^32`
of full scale, so the chaotic dynamics are hardly disturbed. `T_R` should be
a prime, so that it is not a multiple of a short cycle of the map. The
defaults are `T_R = 1021` and `R = 5'b10011`.

The key word is taken from `X_{t+1}` **before** the reseeding multiplexer.
The overwritten LSBs only affect the following states.

### Vector mixing module: the DX-8 generator and modular arithmetic

This is the part of the design that is hardest to follow. `dx_generator`
computes

```
Y_{t+1} = Y_t + B·Y_{t-7}  (mod M),   B = 2^28 + 2^8,   M = 2^31 − 1
```

from an 8-word register file. Modulo a Mersenne number, three things that
would normally need arithmetic become wiring:

1. **Multiplying by a power of two is a rotation.** `2^31 ≡ 1 (mod M)`, so
   `2^n·Y mod M` is `Y` rotated left by `n`. The two `cls` instances
   (rotations by 28 and by 8) produce the two partial products of `B·Y_{t-7}`
   without a multiplier.
2. **The carry-save step wraps.** `circular_csa` is a row of 31 full adders
   that reduces `Y_t`, `rot28(Y_{t-7})` and `rot8(Y_{t-7})` to a sum word and
   a carry word. The carry out of bit 30 has weight `2^31 ≡ 1`, so it goes
   into bit 0 of the carry word instead of being dropped.
3. **The final adder has an end-around carry.** `eac_cla` adds the two words
   modulo M. It is split into a 7-bit group (bits 6:0) and three 8-bit groups.
   Each group has a propagate/generate generator (`eac_pg_gen`). From the four
   group signals, an EAC term computes the carry that would leave bit 30 with
   a carry-in of 0. That carry becomes the carry into bit 0. An internal-carry
   term then computes the carry-ins of the upper three groups from the group
   signals and the EAC, and each group adds with its own lookahead
   (`eac_cla_group`). Because the EAC is computed from generate/propagate
   terms and not from the adder's own sum, there is no combinational loop.

Modulo M, zero has two forms: `0` and `0x7FFF_FFFF`. When `A + B = 2^31 − 1`
exactly, the adder returns the all-ones form. Every later operation is also
modulo M, so the sequence is unaffected. If you compare `Y` against a model,
reduce both sides modulo M first.

On `start`, all eight words are loaded with `seed2`. `seed2` must not be `0`
or `0x7FFF_FFFF`, because both are zero modulo M and the generator would stay
at zero.

`output_construction` forms the key `{X_{t+1}[31], X_{t+1}[30:0] ^ Y_{t+1}}`.

## Cipher datapath and timing (`crypto_top`)

| signal | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset (clears all registers) |
| `start`, `seed1[31:0]`, `seed2[30:0]` | one-cycle pulse that loads the seeds |
| `pt_valid`, `pt_ready`, `pt_data[31:0]` | plain-text input; a word moves when valid and ready are both high |
| `ct_valid`, `ct_data[31:0]` | cipher text, 1 cycle after the plain word was accepted |
| `dec_valid`, `dec_data[31:0]` | decrypted plain text, 2 cycles after acceptance |
| `key[31:0]` | key word that the next accepted plain word will use |
| `reseed_fixed`, `reseed_period` | which reseeding condition the word now being accepted triggers |

`pt_ready` goes high the cycle after `start`. After that the generator never
blocks, so the datapath takes one word per clock. While `pt_valid` is low,
the key stream holds. Each accepted word uses one key word, so a receiver that
starts its generator with the same seeds can decrypt a message that arrives
with gaps. The decryptor gets the key word through a one-cycle register,
which keeps it aligned with the registered cipher word. Restarting with the
same seeds reproduces the same key stream.

Cycle by cycle, for a word `P0` accepted in cycle 0:

```
cycle     0              1               2
pt        P0 (accepted)
key       K0 -> K1
ct_data                  P0^K0
dec_data                                 P0
```

`rm_prng` can be used on its own as a key-stream source. After `start` raises
`key_valid`, `key` holds the current word. Each cycle with `next` high
consumes that word, and the following word appears in the next cycle.

## Parameters

| parameter | default | where |
|---|---|---|
| `TR` (reseeding period) | 1021 | `crypto_top`, `rm_prng`, `reseeding_module` |
| `R` (5-bit reseeding pattern) | `5'b10011` | same |
| `L` (reseeded LSBs) | 5 | `reseeding_module` |
| `W` | 32 (state), 31 (`cls`, `circular_csa`) | datapath modules |
| `K`, `S1`, `S2` | 8, 28, 8 | `dx_generator` (order and the two shifts of `B`) |

The shared constants live in `rm_prng_pkg`. The `eac_cla` adder is written
for 31 bits only. If you change `YW`, the DX modulus or the shift amounts,
the adder's grouping has to change with them.

## What follows the source description and what is this design's own

These follow the published description: the three-part structure; the
32-bit state; the logistic map with γ = 4 and the shift by two; reseeding on
a fixed point or when the counter reaches the period; `L = 5`; the DX-8
recurrence with `B = 2^28 + 2^8` built from two rotations, a circular 3-2
counter and an end-around-carry lookahead adder with 7/8/8/8-bit groups; the
output XOR of the 31 LSBs with the MSB passed through; and XOR encryption and
decryption with one shared key stream.

These are this design's own choices:

* **`T_R` and `R`.** The description asks only for a prime period and a
  fixed pattern.
* **How `1 − X` is formed.** It is the 32-bit negation, so 0.5 maps to 0.
* **`Y_{t-7}` in the recurrence.** The recurrence is read with `Y_{t-7}`,
  the oldest of the eight words, as the block diagram of the generator shows.
* **Which bits are reseeded.** `R` replaces the **LSBs** of the state, the
  reading that keeps the perturbation small. A literal reading of one bit
  numbering would replace the MSBs instead.
* **Seeding.** `seed2` is 31 bits wide and fills all eight DX words.
* **Interface.** The `start`/`next` and valid/ready handshakes, the output
  registers of the encryptor and decryptor, the key delay register, the
  asynchronous reset, and the observation outputs.
* **One generator.** The encryptor and decryptor share one generator, as in
  the system diagram. A real link would have one generator at each end,
  started with the same seeds.

What is not reproduced:

* the gate counts of the 3-2 counter and the adder;
* the period and statistical-quality claims for the generator;
* the FPGA resource figures;
* the captured hardware values, because their seeds are unknown.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference
values come from `tb/tb_ref_pkg.sv`, which uses plain integer arithmetic:
a 64-bit multiply for the map, and `%` by `2^31 − 1` for the DX recurrence.
It also holds a software model of the whole generator.

| testbench | what it checks |
|---|---|
| `tb_lgm_next_state` | the map against the integer formula, corner values, the `F(X) = F(−X)` symmetry |
| `tb_cls`, `tb_circular_csa` | rotation = `·2^n mod M`; `sum + carry ≡ a + b + c` |
| `tb_eac_cla` | bit-exact end-around addition, carries across every group boundary, the all-ones zero |
| `tb_dx_generator`, `tb_vector_mixing_module` | the recurrence over thousands of steps, with stalls |
| `tb_reseeding_module` | both reseed causes, counter restart, the 5-LSB replacement (with `TR = 7`) |
| `tb_nonlinear_module` | seed load, stepping, loading a perturbed `Z` |
| `tb_rm_prng` | every key word and reseed flag against the model at `TR = 1021`, full-rate and stalled |
| `tb_encryptor`, `tb_decryptor` | XOR result, 1-cycle latency, hold when idle |
| `tb_crypto_top` | end to end at default parameters (see below) |

`tb_crypto_top` runs the top with its default parameters. It sends 2,300
words with random gaps, restarts with the same seeds and checks that the
cipher text repeats, then starts from `seed1 = 0`. It checks every key word,
cipher word and decrypted word, and the 1- and 2-cycle latencies. It also
counts how often each mechanism happened and fails if any of them never did.
In the last run there were 4,900 words, 1,687 stall cycles, 1 fixed-point
reseed, 4 period reseeds and 2,300 reproduced words.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/rm_prng_pkg.sv tb/tb_ref_pkg.sv tb/tb_crypto_top.sv \
    --top-module tb_crypto_top -Mdir obj_tb
./obj_tb/Vtb_crypto_top
```

Replace `tb_crypto_top` with any other testbench name. Each one finishes
in well under a second.

## Size

Generic synthesis of `crypto_top` gives 389 flip-flops:

* 32 for the chaotic state;
* 248 for the DX words;
* 10 for the reseeding counter;
* 1 for the key-valid flag;
* 98 for the key delay register and the two output registers with their valid bits.

The logic is about 250 word-level cells, dominated by the 32×32 multiplier
of the logistic map and the 31-bit adder. The longest combinational path runs
from the state register through the multiplier and the output XOR into the
encryptor. If timing is tight, register the key.

## Caveats

An XOR stream cipher is only as strong as its key stream. Never reuse a seed
pair for two messages. This generator has not been through statistical or
cryptanalytic evaluation here, and the chaotic part is known to be
predictable on its own, so do not treat this as a vetted cipher.
