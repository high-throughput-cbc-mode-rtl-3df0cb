# Folded multi-channel CBC crypto engines (AES-128 and 3DES)

In cipher-block chaining (CBC) encryption every plaintext block is XORed with
the ciphertext of the block before it. A deeply pipelined block cipher
therefore gains nothing on a single CBC stream. Block *i+1* cannot enter the
pipeline until block *i* has come out, so a 70-stage pipeline would sit 69/70
empty.

A network port, however, carries many independent streams (channels) at
once, and each channel has its own chain. This design interleaves them. The
pipeline entrance is given to the channels in strict round-robin order, one
channel per clock. There are as many channels as pipeline stages. A channel's
ciphertext then leaves the pipeline in exactly the cycle when that channel's
next turn comes round. It is fed straight back to the input XOR, and every
stage holds a block of some channel at all times. One pipeline then does the
work of one pipeline per channel (the "parallel" arrangement) at a fraction
of the area.

Two engines are built this way:

* **`aes_cbc`**: AES-128, encryption and decryption chosen per block. Ten
  unrolled rounds of 7 pipeline stages each (6 for the last), 70 stages in
  all, 70 channels, **one 128-bit block per clock**.
* **`tdes_cbc`**: 3DES (EDE, three keys), encryption. Sixteen pipelined DES
  rounds of 2 stages each (32 stages, 32 channels), used three times per
  block for the 48 rounds. The result is **one 64-bit block every three
  clocks** on average.

`cbc_crypto_top` places both engines side by side. They share only clock and
reset.

## The channel schedule

`cbc_chain` holds the schedule. It is used by both engines. Consider the
AES engine with `NCH = LAT = 70`:

```
cycle          t        t+1      ...   t+69      t+70            t+71
slot_ch        c        c+1            c+69      c               c+1
entrance       blk c,n  blk c+1,n      ...       blk c,n+1       ...
                                                  ^ chained to ct of blk c,n,
pipeline out   ...                               ct of blk c,n   ct of blk c+1,n
```

In cycle *t+70* the ciphertext of channel *c* is on `out_data`. `cbc_chain`
bypasses it combinationally to the input XOR while channel *c*'s next
plaintext enters. Nothing has to wait and nothing is stored in between.

The source architecture draws only this direct feedback wire. The RTL adds
three things so that real traffic, which has gaps, works too:

* **A chaining register per channel.** Every ciphertext that leaves is
  written into it. If a channel has no data in its slot, it picks up its
  chaining value later from the register instead of from the bypass. The
  bypass (the written value used in the same cycle) is what makes the
  back-to-back case work.
* **A busy bit per channel.** It is set when a block enters and cleared when
  it leaves. A slot is granted only if the channel has nothing in flight, or
  if its block is leaving in that very cycle. With `NCH = LAT` this never
  blocks anything. It only makes `NCH < LAT` safe: channels then have to
  wait.
* **IV selection.** With `in_first` the initialization vector `in_iv` is
  used instead of the stored chaining value. Chaining registers are not
  reset, so every message has to start with `in_first`.

The host sees `slot_ch` (the channel whose turn it is). In the same cycle it
drives `in_valid`, `in_first`, `in_data` and `in_iv` for that channel.
`in_ready` says whether the block was taken. Results come out on `out_valid`
and `out_data`, tagged with `out_ch`. The per-channel input and output queues
that a real port needs are not part of this RTL.

### Decryption (AES)

CBC decryption, P_i = D(C_i) ^ C_{i-1}, has no feedback through the cipher.
When a decryption block enters, its ciphertext C_i becomes the channel's
chaining value. This uses a second write port of `cbc_chain` at the entrance.
The previous value C_{i-1} is parked in a per-channel `mask` register until
the block leaves, and is then XORed onto the cipher output. Encryption and
decryption blocks can be mixed freely, even within one channel.

### Recirculation (3DES)

The 3DES engine sends each block through its 16 rounds three times, with a
different key per pass (K1 encrypt, K2 decrypt, K3 encrypt). Each block
carries its channel number and a pass count. When the block at the end of
round 16 has pass 0 or 1, it takes the entrance again (`recirc`) and has
priority over new data. With `NCH = LAT = 32`, the slot it takes is its own
channel's. That channel meets its block twice and cannot send anything then:
this is a stall. On the third meeting the ciphertext leaves, and the next
plaintext enters chained to it through the bypass. Between passes the halves
are only swapped, because the final and initial permutations cancel. IP is
applied after the CBC XOR at entry, and FP on the ciphertext at exit.

## AES-128 datapath

Every round is one `aes_round`. It handles encryption and decryption, chosen
by a mode bit that travels with each block:

| stage | contents |
|---|---|
| 1 | S-box pre-process: map into GF((2^4)^2); for decryption the inverse affine map first; mode multiplexer |
| 2 | norm d = λ·h² ⊕ (h⊕l)·l |
| 3 | GF(2^4) inverse d⁻¹ |
| 4 | the two products d⁻¹·h and d⁻¹·(h⊕l) |
| 5 | post-process (back to GF(2^8), affine map for encryption); ShiftRows (enc) or InvShiftRows ⊕ round key (dec) |
| 6 | MixColumns / InvMixColumns part I |
| 7 | enc: MixColumns ⊕ round key; dec: InvMixColumns part II |

The last round has no MixColumns. Its stage 6 adds the round key for
encryption, so it has 6 stages. The input stage in front of round 1 does the
CBC XOR and the initial AddRoundKey.

**S-box (`aes_sbox`).** The S-box is computed in the composite field rather
than looked up in a table. GF(2^4) uses x⁴+x+1, and GF((2^4)^2) uses
y²+y+λ with λ = {1100}. An element h·y+l is inverted as
(d⁻¹·h)·y + d⁻¹·(h⊕l). The 8×8 isomorphism matrices in `aes_pkg` come from
one valid choice of basis. g = 0x5C is a root of x⁴+x+1 in the AES field, and
Y = 0xF2 is a root of y²+y+λ(g). Composite bit j of the low nibble maps to
gʲ, bit j of the high nibble to gʲ·Y, and the forward matrix is the inverse
of that map. Any other valid choice gives the same S-box, and the testbench
checks all 256 entries in both directions.

**MixColumns (`aes_mixcol`).** One unit produces both directions. It uses
InvMix(x) = Mix(x) ⊕ Mix(u,v,u,v), with u = 4·(a⊕c) and v = 4·(b⊕d). Part I
computes the MixColumns bytes and u, v, and is followed by a register.
Part II computes w = 2·(u⊕v) and W = a′⊕w⊕u, X = b′⊕w⊕v, Y = c′⊕w⊕u,
Z = d′⊕w⊕v.

**Decryption order.** Decryption runs the direct inverse cipher: round i
uses round key 10−i, and the input stage adds round key 10. InvSubBytes comes
before InvShiftRows. The two commute, which lets decryption reuse the
encryption datapath.

**Keys (`aes_key_expand`).** The standard expansion runs once per key load,
one round key per clock (10 cycles, `key_busy`). All channels share the key.
Do not reload it while blocks are in flight.

## 3DES datapath

**S-box as a multiplexer tree (`des_sbox`).** A DES S-box is a 64-to-1
multiplexer of 4-bit constants. It is split into `STAGES` levels, with
registers between the levels:

* `STAGES = 2`: two levels of 8-to-1 multiplexers. This is the default.
* `STAGES = 3`: three levels of 4-to-1 multiplexers.
* `STAGES = 6`: six levels of 2-to-1 multiplexers.

Level k selects with input bits [k·B−1 : (k−1)·B], where B = 6/STAGES. The
table layout in `des_pkg::SBOX` stores entry x at nibble x to match.

**Round (`des_round`).** With 2 stages, the first holds E, the subkey XOR and
the first multiplexer level. The second holds the last level, P and the XOR
with L. Rounds 1–15 end in a register. Round 16 feeds the output and the
feedback multiplexer directly, so the pipeline is 16·STAGES deep.

**Keys (`des_key_sched`).** The subkeys of the three keys are ordered per
pass. K2's subkeys are reversed, which makes the second pass a decryption.
They are registered when `key_load` is pulsed.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `aes_cbc` | `NCH` | 70 | channels; 70 = pipeline depth, the full-rate value |
| `tdes_cbc` | `STAGES` | 2 | S-box pipeline levels (2, 3 or 6) |
| `tdes_cbc` | `NCH` | 16·STAGES | channels; equal to pipeline depth |
| `cbc_chain` | `W`, `NCH` | 128, 70 | block width, channels |
| `cbc_crypto_top` | `AES_NCH`, `DES_STAGES`, `DES_NCH` | 70, 2, 32 | passed to the engines |

`NCH` may be smaller than the depth (channels then wait for their block) or
larger (some slots go unused). Full rate needs `NCH` = depth.

## Where this RTL departs from, or goes beyond, the source architecture

* **3DES rate.** The source reuses 16 pipelined rounds three times. Yet it
  quotes 3DES throughputs equal to 64 bits per clock: for example,
  36.74 Gbps at 574 MHz, or 44.75 Gbps at 699.3 MHz. These two cannot both be
  true. The RTL follows the three-pass structure, so it delivers 64 bits
  every three clocks. Reaching 64 bits per clock would take 48 unrolled
  rounds.
* **Deeper 3DES variants.** The 4-stage round, which uses a mixed
  2-to-1/4-to-1 S-box, is not built. Neither is the 8-stage round. For the
  latter, the S-box is 6 levels of 2-to-1 multiplexers, but how the round
  gets to 8 stages is not specified. `STAGES = 6` gives a 6-stage round.
* **Register placement in MixColumns.** The source's MixColumns drawing
  shows two register lines, but the round is specified as 7 stages. One
  register is used, between part I and part II.
* **Unspecified parts, filled in here:**
  * the chaining registers, busy bits and bypass of `cbc_chain` (the source
    draws a direct feedback wire);
  * the CBC decryption path of the AES engine;
  * the key expansion and key schedule;
  * one shared key per engine;
  * the host interface (`slot_ch` and `in_ready`);
  * the GF isomorphism;
  * which S-box bits select at which multiplexer level.
* **Not built:** the per-channel plaintext and ciphertext buffers, which
  the source leaves open; 3DES decryption.
* Clock rate, area and timing closure have not been evaluated.

## Verification

Each testbench checks its unit against a reference model written separately
in the testbench. It ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_aes_sbox` | all 256 bytes, both directions, with the mode changing every cycle; 4-cycle latency |
| `tb_aes_mixcol` | 1000 random columns, both directions, plus a FIPS-197 column |
| `tb_aes_round` | full and last round, random state and mode every cycle, 7/6-cycle latency |
| `tb_aes_key_expand` | FIPS-197 key (last round key d014f9a8…), 20 random keys, 10-cycle busy |
| `tb_cbc_chain` | 5000 random cycles against a model: slot order, ready, IV, bypass, blocking, recirculation |
| `tb_aes_cbc` | FIPS-197 C.1; NIST SP 800-38A CBC-AES128 encrypt and decrypt; key reload; 70 channels of mixed encrypt/decrypt traffic with idle slots; exact 70-cycle latency; every waiting block accepted; at full load 210 blocks in 210 consecutive cycles |
| `tb_des_sbox` | 2/3/6-level S-boxes against the standard row/column tables |
| `tb_des_round` | 2/3/6-stage rounds with and without the output register |
| `tb_des_key_sched` | published subkeys of key 133457799BBCDFF1; pass ordering; random keys |
| `tb_tdes_cbc` | single-DES known answer; the three-key SP 800-67 example; exact 96-cycle latency; 32 channels of CBC traffic; 32 blocks per 96 cycles at full load; recirculation, stall, bypass, IV and idle all seen (the checks live in `tdes_cbc_check`) |
| `tb_tdes_cbc_deep` | the same checks for the 3-level and 6-level S-box variants (48 and 96 stages, 48 and 96 channels) side by side |
| `tb_cbc_crypto_top` | both engines at default size running concurrently with random traffic; every mechanism counted |

To run one, for example the end-to-end test, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/aes_pkg.sv rtl/des_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_des_ref_pkg.sv \
  tb/tb_cbc_crypto_top.sv --top-module tb_cbc_crypto_top
./obj_dir/Vtb_cbc_crypto_top
```

Replace the last file and the top module name for the other testbenches. The
unit tests run in well under a second of simulation time. The end-to-end test
needs a few seconds, mostly to compile.

## Files

* `rtl/aes_pkg.sv`, `rtl/des_pkg.sv`: types, field arithmetic, permutations,
  S-box contents
* `rtl/aes_sbox.sv`, `rtl/aes_mixcol.sv`, `rtl/aes_round.sv`,
  `rtl/aes_key_expand.sv`, `rtl/aes_cbc.sv`: the AES engine
* `rtl/des_sbox.sv`, `rtl/des_round.sv`, `rtl/des_key_sched.sv`,
  `rtl/tdes_cbc.sv`: the 3DES engine
* `rtl/cbc_chain.sv`: the channel scheduler shared by both engines
* `rtl/cbc_crypto_top.sv`: both engines side by side
* `tb/`: the testbenches, the reusable 3DES checker `tdes_cbc_check` and the
  two reference-model packages
