# Shared-key multi-core AES-128 encryption engine

A single AES-128 core is fully unrolled and pipelined with one register per round.
It then encrypts one 128-bit block per clock cycle. At clock rates a standard-cell
process reaches comfortably (roughly 0.8–0.9 GHz in 45 nm), that is about
100 Gbit/s. That is too little for 400 Gbit/s Ethernet and the links after it.
Raising the clock means cutting every round into several pipeline stages. That costs
area and power, and it makes the latency two to four times longer.

This engine goes the other way. It places **N ordinary cores side by side**, and they
all encrypt under **one key schedule**. The key expansion is built once, and its
eleven round keys are sent on a bus to every core. Each core keeps the short pipeline
of one register per round (11 cycles of latency). The array takes N independent
128-bit blocks every cycle. With the default N = 10 that is 1280 bits per clock:
about 1 Tbit/s at 800 MHz, the clock reported for a ten-core, 45 nm implementation of
this architecture. In a single pipelined core the key expansion is about a tenth of
the area. Sharing it saves that tenth N−1 times over.

The same array can also run the confidentiality half of AES-GCM (counter mode). The
cores encrypt counter blocks instead of data, and the data is XORed with the result.

All RTL is SystemVerilog-2017 and synthesizable. The testbenches are self-checking
and run under plain Verilator.

## Block structure

```
                 key_in ──┬──────────────────────────────── round key 0 ─┐
                          ▼                                              │
              ┌── aes_key_expansion ──────────────┐                      │
              │ reg → KeyExp 1 → reg → … → KeyExp 10 → reg               │
              └───────┬──────────────┬────────────┘                      │
                      │ round keys 1..10 (bus to every core)             │
                      ▼                                                  ▼
 data_in[i] ─► aes_core i:  ⊕rk0 → reg → round 1 → reg → … → round 9 → reg
                            → SubMatrix → ShiftMatrix → ⊕rk10 → reg ─► data_out[i]
```

| module | what it is |
|---|---|
| `aes_engine` | top: the array plus counter-mode front end, mode select, delay line |
| `aes_multicore` | N cores + one shared key expansion (ECB) |
| `aes_core` | one outer-round pipelined AES-128 core, 11 stages |
| `aes_cipher_round` | one round: SubMatrix → ShiftMatrix → MixMatrix → AddRoundKey (MixMatrix left out when `HAS_MIX = 0`) |
| `aes_sub_matrix` / `aes_sbox` | 16 parallel S-boxes / one 256-entry S-box table |
| `aes_shift_matrix` | ShiftRows, wiring only |
| `aes_mix_matrix` / `aes_mix_column` | four MixColumns units / one column |
| `aes_add_round_key` | state XOR round key |
| `aes_key_expansion` / `aes_key_exp_round` | pipelined key schedule / one key-schedule round |
| `aes_ctr_counters` | IV, J0 and the chain of counter incrementers for counter mode |
| `aes_pkg` | types, S-box table, round constants, mode enum |

## Byte order

A 128-bit block is the usual 4×4 byte state. Byte *i* is bits `[127-8*i -: 8]`, so
byte 0 is the most significant. It sits at row *i* mod 4, column *i* div 4. This is
the FIPS-197 order, so the standard test vectors can be written as 32-digit hex
constants. For example, key `000102…0f` and plaintext `00112233…ff` give
`69c4e0d86a7b0430d8cdb78070b4c55a`. Column *c* of the state is the 32-bit slice
`[127-32*c -: 32]`, with row 0 in its top byte.

## The round datapath

Every step is fully parallel over the 128 bits. Nothing in a round is iterative.

* **SubMatrix**: 16 copies of `aes_sbox`. Each is a 256-entry constant table (the
  standard AES S-box). Synthesis decides whether this becomes ROM or logic.
* **ShiftMatrix**: row *r* is rotated left by *r* bytes. It is only a permutation of
  wires.
* **MixMatrix**: four `aes_mix_column` units. Each input byte gets a doubler. The byte
  is shifted left by one bit, and a 2:1 multiplexer, controlled by the bit that fell
  out, picks either that value or that value XOR `8'h1b`. Three times the byte is
  then the doubled byte XOR the byte itself. Each output byte is a 4-input XOR of a
  doubled byte, a tripled byte and two plain bytes, following the rows of the matrix
  `[02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02]`.
* **AddRoundKey**: 128 XORs.

The tenth round has no MixColumns. `aes_cipher_round` has a `HAS_MIX` parameter, and
the core sets it to 0 for round 10.

## Pipeline timing of a core

`aes_core` registers the result of every one of its eleven steps: the initial
AddRoundKey, rounds 1–9 and round 10. The registers hold nothing else, so the
critical path is one round.

* A block sampled with `in_valid` at clock edge *k* comes out on `data_out` with
  `out_valid` after edge *k + 10*. That is eleven register stages, and 11 cycles from
  input to output.
* A new block can enter on every cycle. There is no back-pressure and no stall: the
  pipeline always moves.
* Only the valid bits are reset. The data registers are not.

## The shared key expansion

This part takes the most care to use correctly.

`aes_key_expansion` is also a pipeline. The key is registered first. Then each
key-schedule round (RotWord, SubWord with four S-boxes, XOR with the round constant,
and the XOR chain across the four words) is followed by a register, and its output
is round key *j*. Round key 0 is `key_in` itself, taken before any register. It
drives the cores' first AddRoundKey directly.

Round key *j* appears *j + 1* edges after the key is applied, but a block reaches
round *j* only *j* edges after it enters. The key pipeline therefore does not travel
in step with the data. **The round keys are a static broadcast, not a per-block
value.** This matches the intended use: one key, long streams of data. It has two
consequences:

* After `key_in` changes, all ten round keys are right only after **11 clock edges**.
  `key_ready` tells when. A counter restarts on every change of `key_in`, and
  `key_ready` is high once the key has been stable for 11 edges. It drops in the same
  cycle that `key_in` changes. An assertion in `aes_multicore` flags any block that
  enters while `key_ready` is low.
* Hold `key_in` while blocks are in flight. A block that is in the pipeline when the
  key changes is encrypted with a mix of old and new round keys, and nothing flags it.
  To change keys, stop feeding blocks, wait 11 cycles for the pipeline to drain,
  change the key, and wait for `key_ready`.

Making the key agile per block would need the data delayed by one cycle against the
key, or a second copy of the key schedule. This RTL does not do that.

## Counter mode (front end of AES-GCM)

With `CTR_EN = 1` (the default), `aes_engine` adds the following pieces:

* **`aes_ctr_counters`**: a message starts with `msg_start`, which stores the 96-bit
  `iv`. Counter 0 is J0 = IV ‖ `32'h00000001`. Counters 1…N follow it through a chain
  of incrementers, one between each pair of neighbours. Each incrementer adds 1 to the
  low 32 bits modulo 2³² (GCM's inc32). On every counter-mode cycle in which any lane
  is valid, the chain moves on by N. The next cycle then starts one past the last
  counter used.
* **An extra core, core 0**, encrypts J0 once per message. Its result E(K, J0) appears
  on `tag_mask` with `tag_mask_valid`, 12 cycles after `msg_start`. GCM XORs that
  value into the GHASH result to form the tag.
* **Keystream XOR**: data lane *i* uses core *i + 1*. In counter mode the core
  encrypts the lane's counter, and the lane's data waits in an 11-stage delay line to
  meet the result: `data_out = data_in ⊕ E(K, counter)`. Encryption and decryption
  are the same operation.

`mode` is sampled per cycle and travels with the block, so ECB and counter-mode cycles
may be interleaved freely. The counters move only on counter-mode cycles. Rules, which
are checked by assertions:

* In counter mode, lanes are filled from lane 0 upward (`in_valid` = 0…01…1). Only the
  last cycle of a message may be partly filled. A message then uses consecutive
  counters, lane by lane.
* `msg_start` comes at least one cycle before the first counter-mode data of its
  message.

**Not included: the GHASH authentication block.** It computes the tag from the
ciphertext and additional data over GF(2¹²⁸). The engine provides everything it needs,
the ciphertext lanes and `tag_mask`, but it produces no tag itself. With `CTR_EN = 0`
the counter logic, delay line and extra core disappear. The engine is then exactly the
N-core shared-key ECB array, and `tag_mask_valid` is tied low.

## Top-level interface (`aes_engine`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_in` | in | 128 | cipher key, held while data flows |
| `key_ready` | out | 1 | all round keys belong to `key_in` |
| `mode` | in | `aes_mode_t` | `MODE_ECB` or `MODE_CTR`, per cycle |
| `msg_start`, `iv` | in | 1, 96 | start a counter-mode message with this IV |
| `in_valid`, `data_in` | in | N, N×128 | one block per lane per cycle |
| `out_valid`, `data_out` | out | N, N×128 | results, 11 cycles later |
| `tag_mask_valid`, `tag_mask` | out | 1, 128 | E(K, J0) of the current message |

Parameters: `N_CORES` (default 10, any value ≥ 1) and `CTR_EN` (default 1).
`aes_multicore` on its own is the ECB array with the same ports, without the
counter-mode ones.

## Sizes and rates

Each lane delivers 128 bits per cycle. The published results for this architecture in
45 nm give the following clock rates. The clock is a synthesis result and cannot be
checked in RTL.

| cores | bits / cycle | reported clock | rate | latency |
|---|---|---|---|---|
| 1 | 128 | 870 MHz | 111 Gbit/s | 11 cycles |
| 2 | 256 | 847 MHz | 217 Gbit/s | 11 cycles |
| 4 | 512 | 847 MHz | 434 Gbit/s (enough for 400G Ethernet) | 11 cycles |
| 10 | 1280 | 800 MHz | 1024 Gbit/s | 11 cycles |

The clock falls slightly as N grows. The shared round-key bus fans out to every core,
which lengthens its wires, and the clock tree grows.

## How this RTL relates to the original architecture

These parts follow the architecture as described: the shared pipelined key expansion
with round key 0 taken straight from the key input, the core of 10 unrolled rounds
with registers between rounds and an 11-cycle latency, the S-box-per-byte SubMatrix,
ShiftRows as wiring, and the MixColumns doubler built from a multiplexer and XORs.
The counter chain and the extra J0 core come from the architecture's outline of a GCM
configuration.

These are this RTL's own choices:

* **Output register.** The drawing of the core shows no register after the last
  AddRoundKey. The 11-stage, 11-cycle figure needs one, so the core registers its
  output.
* **Valid strobes, `key_ready`, the key-change rule and reset.** No handshake is
  specified. This RTL adds per-lane valid bits with no back-pressure, `key_ready` with
  its counter, and a reset of the control bits only.
* **S-box contents.** The S-box is a look-up table with the standard AES values.
* **Counter-mode details.** These are the usual GCM conventions: a 96-bit IV, J0 = IV ‖ 1
  and inc32. Also chosen here: how the counters advance from cycle to cycle, the data
  delay line, lane filling from lane 0, per-cycle mode selection, `msg_start` and
  `tag_mask`.
* **No GHASH**, as described above.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare against
`aes_ref_pkg`, a software model written independently of the RTL. Its GF(2⁸) products
use a shift-and-add loop. Its S-box is computed from the field inverse and the affine
map, not read from a table. Its key schedule is the word recurrence. The known-answer
vectors of FIPS-197 (Appendices A.1, B and C.1) are checked as well.

| testbench | checks |
|---|---|
| `tb_aes_sbox` | all 256 entries |
| `tb_aes_sub_matrix`, `tb_aes_shift_matrix`, `tb_aes_mix_column`, `tb_aes_mix_matrix`, `tb_aes_add_round_key` | fixed vectors and random states; MixColumns with every single-byte column, to exercise each reduction |
| `tb_aes_cipher_round` | full and final round, FIPS-197 round 1, random |
| `tb_aes_key_exp_round` | FIPS-197 round keys; all ten rounds for random keys |
| `tb_aes_key_expansion` | round key *j* correct from edge *j+1*; `key_ready` exactly after 11 edges; several key changes |
| `tb_aes_core` | a few hundred random blocks, some with gaps, two keys, exact 11-cycle latency |
| `tb_aes_multicore` | 10 lanes, full-rate bursts (all lanes, every cycle) and random lane patterns, four keys |
| `tb_aes_ctr_counters` | J0, consecutive counters, advancing by N, hold, load over advance |
| `tb_aes_engine` | the whole engine at default size: ECB bursts, counter-mode messages with a partly filled last cycle, tag masks, decryption round trip, ECB/CTR interleaving, key change; counts each of these and fails if one never happens |
| `tb_aes_engine_ecb_only` | the engine with `CTR_EN = 0`: three lanes, random lane patterns, two keys, no tag mask |
| `tb_aes_workloads` | arrays of 1, 2, 4 and 10 cores at full rate: N×128 bits every cycle, 11-cycle latency |

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_engine.sv \
    --top-module tb_aes_engine -Mdir obj_tb
./obj_tb/Vtb_aes_engine
```

Replace `tb_aes_engine` with any other testbench name. The tools find the remaining
modules through `-Irtl` (one module per file, file named after the module). The
full-size engine test builds in about a minute and runs in about a second.

To change the array size, override `N_CORES` on `aes_engine` or `aes_multicore`. Note
that `tb_aes_engine` and `tb_aes_multicore` have their lane count `N` written as a
local constant that must match.
