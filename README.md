# DES with a dynamic key generation unit

Plain DES takes a 64-bit key, of which 56 bits matter, so an attacker who
knows the algorithm has 2^56 keys to try. This design puts a *dynamic key
generation unit* in front of a standard DES engine. The user key does not
have to reach DES as it is: a 2-bit selector `SEL` decides whether DES gets

| `SEL` | key handed to DES |
|-------|-------------------|
| `00`  | the user key scrambled by a 64-bit LFSR (linear feedback shift register) |
| `01`, `10` | the user key itself ("direct key") |
| `11`  | a key produced by a chaotic logistic map seeded with the user key |

Both ends of a link must use the same `SEL`, which becomes part of the
secret. The key unit also refuses to hand DES one of the known weak or
semi-weak DES keys when it has a generator it can step past them.

The DES engine itself is ordinary FIPS 46 DES (Data Encryption Standard) and is
iterative: one Feistel round exists in hardware and is used 16 times, one
round per clock.

```
            +---------------- dynamic_key_unit ----------------+
 KEY ──────►│ lfsr_key ─────────► a                            │
            │ (direct) ─────────► b,c   key_mux ──► key ─────────┼──► des_core ──► DOUT
            │ logistic_key ─────► d       ▲          │           │      ▲  ▲
            │                            SEL   weak_key_detect   │     DIN MODE
            +--------------------------------------------------+
```

## One operation, cycle by cycle

All control goes through `des_dynamic_top`. Raise `en` for a cycle while
`busy` is low; `din`, `key`, `sel` and `mode` (0 encrypt, 1 decrypt) are
captured in that cycle and may change afterwards.

| cycle (en = 0) | what happens |
|----------------|--------------|
| 1 | the key unit is started; both generators are loaded with the key as seed |
| 2 … 1+G | the selected generator steps once per cycle (G = 64 for the LFSR, 16 for the logistic map, 0 for the direct key), plus one cycle per skipped weak key |
| 3+G | the key is ready; DES captures IP(din) and PC-1(key) |
| 4+G … 19+G | rounds 1 … 16 |
| 20+G | `done` pulses for one cycle; `dout` holds the result until the next one |

So an operation takes 84 cycles with the LFSR key, 36 with the logistic key
and 20 with the direct key. `en` is ignored while `busy` is high.

Decryption uses the same `key` and `sel` as encryption. Since both generators
are re-seeded from the user key at the start of every operation, they produce
the same DES key both times, and `mode = 1` just runs the DES subkeys in
reverse order.

## The key generators

### LFSR (`lfsr_key`)

A 64-bit Fibonacci LFSR. Bits move one place toward bit 0 each step, bit 0
is the serial output, and the new bit 63 is the XOR of the tapped bits. The
taps (`TAPS = 64'hB000_0000_0000_0001`) give the maximal-length polynomial
x^64 + x^63 + x^61 + x^60 + 1, i.e. `new_b63 = b0 ^ b60 ^ b61 ^ b63`. Taking
64 steps (`LFSR_STEPS`) replaces every state bit once, so each bit of the DES
key is a linear combination of several key bits. An all-zero seed would
never leave zero and is replaced by `64'h0123456789ABCDEF`.

The LFSR is linear and invertible: this scrambles the key but adds no secrecy
beyond the choice of `SEL` and of the polynomial.

### Logistic map (`logistic_key`)

The map is Y(n+1) = mu · Y(n) · (1 − Y(n)), chaotic for mu between 3 and 4.
Here it runs in fixed point:

* `y` is a 64-bit unsigned fraction, Y = y / 2^64, so 1 − Y is simply `-y`
  modulo 2^64;
* `y * (2^64 − y)` is a 128-bit product whose upper 64 bits are Y(1 − Y),
  at most 1/4;
* that is multiplied by `MU_Q14`, mu in Q2.14 (default 65372, mu ≈ 3.99),
  and the 14 fraction bits are dropped. Because mu < 4 the result fits in
  64 bits.

All steps truncate. One iteration takes one clock; after `LOG_ITERS = 16`
iterations the 64-bit state is the DES key. A zero seed (a fixed point of the
map) is replaced by `64'h0123456789ABCDEF`. The multiplier is a full 64×64
one, the largest piece of logic in the design.

### Weak-key skipping (`weak_key_detect`, `dynamic_key_unit`)

DES has 4 weak keys (encrypting twice gives the plaintext back) and 12
semi-weak ones (six pairs where one key decrypts what the other encrypts).
`weak_key_detect` compares the key with all 16, ignoring the parity bit (the
LSB) of every byte because DES drops those bits. When the LFSR or the
logistic map lands on such a key, the key unit steps that generator once
more, and repeats until the key is no longer weak; the number of extra steps
is reported on `key_retries`. A direct key cannot be changed; it is used as
given and `weak_key` reports it. The further 48 "possibly weak" DES keys are
not checked.

## The DES engine (`des_core`)

* `des_ctrl`: a two-state machine (IDLE, ROUND) with a round counter. It
  raises `load` in the start cycle, then `round_en` for 16 cycles with the
  round number, `last_round` in the final one and `done` one cycle later.
* `des_key_schedule`: PC-1 drops the parity bits and splits the 56 remaining
  bits into two 28-bit halves. Each round both halves rotate and PC-2 picks
  the 48-bit subkey. Encryption rotates left by 1 in rounds 1, 2, 9, 16 and by
  2 otherwise. Decryption rotates right by 0, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2,
  2, 2, 2, 1. The 28-place total brings the halves back to their loaded
  value, so this gives K16 … K1 without storing the subkeys.
* `des_ip` / `des_fp`: the initial permutation and its inverse.
* `des_feistel`: one round, `L' = R`, `R' = L ^ P(S(E(R) ^ K))`.
* `des_sboxes`: the eight S-boxes (the outer two bits of each 6-bit group pick
  the row, the inner four the column).

All tables are the FIPS 46 ones and live in `des_pkg`. Tables index bits
from 1 at the most significant bit, as the standard does, and bit `[63]` of
every 64-bit port is DES bit 1.

## How far to trust it, and where it departs from the original description

* **DES is standard DES.** It was checked against the worked example
  (key 133457799BBCDFF1, plaintext 0123456789ABCDEF → 85E813540F0AB405) and
  further vectors from an independent software DES. The original
  description's simulation results use DIN = CFA111A283810529 and
  KEY = B890B890B890B890. This design reproduces none of its ciphertexts. For
  example, the direct key there gives 72BA79C8AFAF322E, but standard DES
  gives 8818F6EF72148243, and bit- or byte-order variants of the inputs did
  not match either. The cause cannot be determined. The engine follows the
  DES definition. Its results for those inputs are:

  | `SEL` | DES key | ciphertext of CFA111A283810529 |
  |-------|---------|-------------------------------|
  | 00 | 0C9DBA46D7F00C9D | 7637B1B67B92E5EF |
  | 01, 10 | B890B890B890B890 | 8818F6EF72148243 |
  | 11 | CD991D3C0D8F6A87 | 023E4FB37B9099E5 |

* **Choices this design makes.** These were not specified in the original
  description:
  * the LFSR polynomial and step count;
  * the logistic map's number format, mu, and iteration count;
  * seeding both generators with the user key;
  * the zero-seed constant;
  * the weak-key rule;
  * the handshake (`en`, `busy`, `done`) and the reset;
  * the latency.

  The original showed the chaotic block without a clock. Here it is sequential,
  one iteration per cycle.
* **Follows the original description:**
  * the `SEL` encoding;
  * the multiplexer wiring (LFSR on input A, key on B and C, chaotic on D);
  * only the selected generator runs;
  * the port names `DIN`, `KEY`, `DOUT`, `MODE`, `SEL`, `EN`;
  * the 16-round iterative DES with one shared round;
  * the left-shift schedule.
* **Not modelled.** The original waveforms show a third, meaningless `DOUT`
  value after the result. Here `dout` simply holds the result.

## Files and simulation

`rtl/` holds one module per file plus `des_pkg.sv`. Top: `des_dynamic_top`.
Each module has a self-checking testbench `tb/tb_<module>.sv` that ends by
printing `TB_RESULT checks=N failures=M`. Expected values come from reference
vectors or from models written independently in the testbench.
`tb_des_dynamic_top` runs the whole design at its default parameters. It
covers:

* every `SEL` value, encrypting and decrypting, with latencies checked;
* a key whose LFSR output is weak, so one retry is forced;
* a weak direct key;
* an `en` request while busy, which must be ignored.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/des_pkg.sv tb/tb_des_dynamic_top.sv --top-module tb_des_dynamic_top
./obj_dir/Vtb_des_dynamic_top
```

Replace the testbench name to run any other one. Keep `--assert`: the key
unit, the round controller and the top carry concurrent assertions for their
handshake rules, for example that a generated key is never weak and that `done`
follows the last round. `verilator --lint-only -Wall`
reports some unused bits in `logistic_key`. The low half of the 128-bit
product and the fraction bits dropped after scaling by mu are unused on
purpose.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `des_dynamic_top`, `dynamic_key_unit` | `LFSR_STEPS` | 64 | LFSR steps per key |
| | `LOG_ITERS` | 16 | logistic iterations per key |
| | `MU_Q14` | 65372 | mu in Q2.14 (3.99); keep it below 65536 (mu < 4) |
| `lfsr_key` | `TAPS`, `ZERO_SEED` | see above | feedback taps, replacement for a zero seed |
| `des_core`, `des_ctrl` | `ROUNDS` | 16 | DES rounds. Anything other than 16 is not DES; useful only for experiments |

If you change `LFSR_STEPS`, `LOG_ITERS` or `MU_Q14`, the expected keys and
ciphertexts in `tb_dynamic_key_unit` and `tb_des_dynamic_top` change with them.
