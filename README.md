# Pipelined AES-GCM-SIV encryption engine

AES-GCM is fast, but if a nonce is ever used twice under the same key it
leaks the XOR of the two plaintexts and loses its authentication security.
AES-GCM-SIV (RFC 8452) fixes this ("nonce-misuse resistance"). It first
authenticates the whole message, then uses the resulting tag as the initial
counter of the encryption. If a nonce repeats, only the fact that two
messages are the same leaks.

The cost is a data dependence: no ciphertext block can be produced until the
last plaintext byte has been authenticated. A serial AES-GCM datapath has one
AES core and one GF(2^128) multiplier. In AES-GCM they work side by side; a
naive AES-GCM-SIV would leave one of them idle while the other works. This
RTL keeps both busy by working on two messages at once:

* an **authentication FSM** derives the per-message keys, runs POLYVAL over
  message n+1 and computes its tag;
* an **encryption FSM** runs AES in counter mode over message n, starting
  from the tag that was stored when message n was authenticated.

Authentication needs the AES core only five times per message (four
key-derivation calls and the tag); its per-block work is on the multiplier.
So the single AES core is shared through a small arbiter and spends almost
all its time on counter-mode encryption. Flags keep the two FSMs apart. The
multiplier is the unmodified AES-GCM multiplier, with byte swaps around it.

The architecture follows the AES-GCM-SIV mapping of *"Architecture
Optimization and Performance Comparison of Nonce-Misuse-Resistant
Authenticated Encryption Algorithms"*. That work describes:

* the serial datapath with a single AES core and a single GF multiplier;
* the split into two FSMs that pipeline two messages and synchronise with
  flags;
* the stored tag;
* S-boxes in logic or in on-chip memory.

The bit-level algorithm (key derivation, POLYVAL, tag and counter formats) is
that of RFC 8452. The buffer, the hand-off record, the interfaces and all
timing are this design's own choices.

## Block diagram

```
                   +------------------------ aes_gcm_siv_top -------------------------+
 hdr (nonce,lens) ->| siv_auth_ctrl ---+                          +--- siv_enc_ctrl  |-> out (CT..., tag)
 din (AD, PT)     ->|   |   |          +--- aes_arbiter --- aes_core        |    ^   |
                    |   |   +--- polyval --- gf128_mul                      |    |   |
                    |   | write                                        read |    |   |
                    |   +-------------> msg_buffer (2 banks) ---------------+    |   |
                    |   |                                                        |   |
                    |   +---- bank_busy[1:0] flags, hand-off slot (tag) ---------+   |
                    +------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `aes_gcm_siv_top` | wires everything and holds the synchronisation flags and the hand-off slot |
| `siv_auth_ctrl` | authentication FSM: key derivation, POLYVAL, tag |
| `siv_enc_ctrl` | encryption FSM: AES-CTR from the tag, ciphertext, tag output |
| `aes_arbiter` | shares the one AES core between the two FSMs (round robin, done routed to the caller) |
| `msg_buffer` | two-bank plaintext RAM, 1 write port and 1 read port |
| `polyval` | POLYVAL accumulator around the GCM multiplier |
| `gf128_mul` | digit-serial GF(2^128) multiplier, GCM convention |
| `aes_core` | iterative AES-128 encryption with an on-the-fly key schedule |
| `aes_sbox` | S-box as combinational logic |
| `aes_sbox_rom` | S-box as a 256 x 8 synchronous ROM loaded from `aes_sbox.hex` |
| `siv_pkg` | block and length types, hand-off record, byte-swap and mul-by-x helpers |

## The two-message pipeline (the part to understand first)

### What each FSM does per message

**Authentication FSM (`siv_auth_ctrl`)**

1. **Claim a bank.** The FSM accepts a header only if the buffer bank it will
   write next is free. Until then `stall_bank` is high. Accepting the header
   claims the bank by setting `bank_busy[b]`.
2. **Derive the keys.** Four AES calls under the master key, on the blocks
   `LE32(i) || nonce` for i = 0..3. The first 8 bytes of outputs 0 and 1 form
   the authentication key. The first 8 bytes of outputs 2 and 3 form the
   encryption key.
3. **Absorb the data.** The AD blocks, then the plaintext blocks, go through
   POLYVAL one at a time. Each plaintext block is also written to the
   claimed bank. Bytes past the stated length are zeroed on the way in, so
   whatever the sender puts there is ignored.
4. **Absorb the length block.** `LE64(8*ad_len) || LE64(8*pt_len)`.
5. **Compute the tag.** XOR the nonce into bytes 0..11, clear bit 7 of
   byte 15, and encrypt under the encryption key.
6. **Hand off.** Wait until the hand-off slot is empty (`stall_slot` is high
   meanwhile). Then store `{tag, encryption key, pt_len, bank}` in the slot
   and switch to the other bank.

**Encryption FSM (`siv_enc_ctrl`)**

1. **Take the record.** When idle, the FSM takes the record from the slot,
   which empties the slot.
2. **Set the counter.** The counter block is the tag with bit 7 of byte 15
   set.
3. **Encrypt each block.** For every plaintext block:
   * read the block from the record's bank;
   * encrypt the counter;
   * XOR the two, and zero the bytes past the length;
   * output the result;
   * increment bytes 0..3 as a little-endian 32-bit counter (mod 2^32).
4. **Release the bank early.** The bank is released when its last block has
   been read, not when the message is finished. For an empty plaintext it is
   released as soon as the record is taken.
5. **Output the tag** with `out_is_tag` high, and go idle.

### Why two flags and not one

A plain "tag ready" flag is not enough, because the plaintext has to be read
twice. The authentication FSM must not start writing message n+2 into a bank
that the encryption FSM is still reading for message n. So there are two
kinds of flag:

* `bank_busy[b]` guards the buffer: it is set by a claim and cleared by a
  release;
* `slot_full` guards the stored tag: it is set by a hand-off and cleared
  when the encryption FSM takes the record.

The early release is what makes the slot flag matter. Suppose the output is
held back while message n-1's last blocks or tag are waiting. The
authentication FSM can then start message n+1 in the bank just released,
finish it, and find message n still in the slot. If the bank were released
only at the very end, this wait could never happen and the slot would always
be empty on arrival.

The top-level assertion `a_bank_claim_free` states the safety rule: a bank is
never claimed while it is busy.

### Timeline (short messages, no back-pressure)

```
auth FSM : [keys m1][POLYVAL m1][tag m1]>[keys m2][POLYVAL m2][tag m2]>[keys m3] ...
enc  FSM :                               [CTR m1 ............][tag]  [CTR m2 ...
```

The steady-state rate is set by the slower side:

* **Encryption side:** one AES call per block (10 clocks with logic S-boxes)
  plus 2–3 clocks of control. It also yields the AES core for the five calls
  the authentication side makes per message.
* **Authentication side:** one multiplication per block (8 clocks at
  `DIGIT=16`) plus about 2 clocks. Each message also costs about 50 clocks
  of key derivation and 12 for the tag. Those run on the shared AES core,
  interleaved with the encryption side's calls.

### Sharing the AES core (`aes_arbiter`)

Both FSMs talk to the arbiter through the same request/response ports they
would use with a core of their own:

* `start`, `key`, `din` form the request;
* `busy` means the request was not taken in this clock;
* `done` is the completion pulse.

A request is granted only when the core is idle. If both FSMs request in the
same clock, the one that was not granted last wins. The core's `done` is
routed to the FSM that owns the call in flight, and that FSM reads the shared
`dout` on its `done`.

## Datapath blocks

### AES core (`aes_core`)

* **Structure.** One round unit, one round per clock. It is encryption only,
  which is all that CTR-based AES-GCM-SIV needs.
* **Key schedule.** Round keys are computed alongside the rounds. Every call
  may therefore use a different key, and each message uses a freshly derived
  one.
* **Timing.** `done` rises 10 clocks after the edge that takes `start`.
* **S-boxes.** 20 in total: 16 for the state and 4 for the key schedule.
  With `SBOX_ROM=1` they are synchronous ROMs. A round then takes two clocks
  (address, data), so a call takes 20 clocks. This trades logic for memory
  bits, as in an FPGA block RAM.

### POLYVAL on the GCM multiplier (`polyval`, `gf128_mul`)

POLYVAL is GHASH with each block's bytes reversed and the key multiplied
by x:

```
POLYVAL(H, X1..Xn) = byte_rev(GHASH(mulX(byte_rev(H)), byte_rev(X1), ..., byte_rev(Xn)))
```

The accumulator is kept in the GHASH domain. The byte swaps are wiring.
mulX is a one-bit shift with a conditional XOR of 0xE1, applied once when the
key is loaded.

`gf128_mul` is the standard GCM right-shift multiplier and handles `DIGIT`
bits of the multiplier per clock:

* 16 by default, so one product takes 8 clocks;
* `DIGIT=128` gives a one-clock multiplier;
* `DIGIT=1` gives a minimal bit-serial one.

### Block and byte order

All 128-bit buses carry byte 0 in bits [127:120], the order in which test
vectors are printed. Little-endian fields are byte-swapped inside the RTL:

* the key-derivation counter;
* the 64-bit lengths;
* the 32-bit CTR counter.

## Interface of `aes_gcm_siv_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `key` | in | 128 | master key; hold it stable while messages are in flight |
| `hdr_valid` / `hdr_ready` | in/out | 1 | header handshake |
| `hdr_nonce` | in | 96 | nonce, byte 0 in bits [95:88] |
| `hdr_ad_len`, `hdr_pt_len` | in | 16 | AD and plaintext lengths in bytes (plaintext at most `16*DEPTH`) |
| `din_valid` / `din_ready` / `din_data` | in/out/in | 1/1/128 | `ceil(ad_len/16)` AD blocks, then `ceil(pt_len/16)` plaintext blocks |
| `out_valid` / `out_ready` / `out_data` | out/in/out | 1/1/128 | `ceil(pt_len/16)` ciphertext blocks, then the tag |
| `out_is_tag` | out | 1 | `out_data` is the tag |
| `stall_bank`, `stall_slot` | out | 1 | the authentication FSM is waiting on a flag |

Transfers happen on a rising edge when valid and ready are both high.

* **Messages in flight.** The next header is accepted once the
  authentication FSM has handed off the previous message and the next bank
  is free. Up to three messages can be in flight:
  * one being authenticated;
  * one authenticated and waiting in the slot;
  * the tail of one whose last plaintext block has been read but whose
    last outputs are still waiting.
* **Output order.** Outputs come in message order.
* **Stalling.** `out_data` is held while `out_ready` is low; the assertion
  `a_out_stable` checks this.

| Parameter | Default | Meaning |
|---|---|---|
| `SBOX_ROM` | 0 | 0: S-boxes in logic; 1: S-boxes in synchronous ROM |
| `DIGIT` | 16 | multiplier bits per clock (must divide 128) |
| `DEPTH` | 64 | buffer blocks per bank (power of two); maximum plaintext `16*DEPTH` bytes |

## Measured performance

Measured with `tb_siv_throughput`, streaming without back-pressure:

| Configuration | Clocks per 16-byte block (full 1 KiB message) | Cycles per byte over a 6-message stream |
|---|---|---|
| logic S-boxes (default) | 13.5 | 1.32 |
| memory S-boxes (`SBOX_ROM=1`) | 24.1 | 2.08 |

The stream figure includes:

* the first message, which has nothing to overlap with;
* a short message and an empty one, for which the per-message key
  derivation dominates.

Synthesised by a generic flow (yosys, coarse cells), the default top has
about 2,550 flip-flops and 16 Kbit of buffer memory. No FPGA or ASIC results
are claimed here.

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

**Reference model.** `tb/siv_ref_pkg.sv` is written independently of the
RTL:

* byte-array AES with its own S-box computed by brute-force inversion;
* the textbook GCM multiplication;
* POLYVAL straight from its definition, reducing modulo
  x^128+x^127+x^126+x^121+1 and multiplying by x^-128;
* a complete AES-GCM-SIV encryption.

`tb_ref_selftest` checks this model against:

* FIPS-197 appendices B and C.1;
* GCM test case 2;
* the RFC 8452 POLYVAL example;
* two RFC 8452 AES-128-GCM-SIV vectors.

**Testbenches.**

| Testbench | What it covers |
|---|---|
| `tb_aes_sbox`, `tb_aes_sbox_rom` | all 256 entries, the published first and last table rows, the ROM's one-clock latency |
| `tb_aes_core` | FIPS-197 vectors and random blocks in both S-box forms; exact 10/20-clock latency |
| `tb_aes_arbiter` | two requesters on one core at random times and in lock-step; results, done routing, round-robin order |
| `tb_gf128_mul` | GCM test case 2 products, identity, random operands; 8-clock latency |
| `tb_polyval` | RFC 8452 example, random sequences, `clear` |
| `tb_msg_buffer` | both banks, reads of one bank during writes to the other |
| `tb_siv_auth_ctrl` | tag, derived key and buffered plaintext for RFC vectors and random messages (up to 1 KiB) with garbage past the lengths; both waits forced |
| `tb_siv_enc_ctrl` | ciphertext and tag under random back-pressure; exactly one bank release per message |
| `tb_aes_gcm_siv_top` | end to end at default parameters (see below) |
| `tb_siv_throughput` | default and memory-S-box engines side by side, outputs checked, block rate bounded |

`tb_aes_gcm_siv_top` drives 20 back-to-back messages, including RFC vectors,
a full 1 KiB message, empty and partial blocks, and random back-pressure. It
counts each pipeline mechanism and fails if any of these never occurred:

* auth/enc overlap;
* each FSM waiting for the shared AES core;
* the bank wait;
* the slot wait;
* output back-pressure;
* use of both banks;
* a partial block;
* an empty plaintext;
* a full-bank message.

**Running a testbench with Verilator.** Run from the repository root, because
the ROM reads `rtl/aes_sbox.hex` by that relative path:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/siv_pkg.sv tb/siv_ref_pkg.sv tb/tb_aes_gcm_siv_top.sv \
    --top-module tb_aes_gcm_siv_top
./obj_dir/Vtb_aes_gcm_siv_top
```

Replace the testbench name to run any other testbench. Each simulation takes
well under a second; building the larger ones takes up to a minute.

**Lint warning.** `verilator -Wall` reports `SYNCASYNCNET` on `rst_n`. This
is because the same reset is used asynchronously by the flip-flops and
synchronously in the assertions' `disable iff`. It has no effect on the
logic.

## Departures and limits

* **Encryption only.** There is no decryption or tag verification.
  Decryption reverses the dependence: it needs CTR before POLYVAL.
* **AES-128 only.** AES-256 (six derived half-keys, 14 rounds) is not
  provided.
* **Message size.** A plaintext must fit in one buffer bank: 1 KiB at the
  default `DEPTH`. AD is streamed and only limited by the 16-bit length.
* **Master key.** The key is a plain input shared by both FSMs. Changing it
  while messages are in flight corrupts them.
* **Start of encryption.** In the published two-FSM schedule, message n is
  encrypted while message n+1's plaintext goes through the multiplier. Here
  encryption of message n starts as soon as its tag is stored. It therefore
  also overlaps the key derivation and AD of message n+1, which share the
  AES core with it.
* **Shared AES core.** The encryption FSM pauses for the authentication
  FSM's five AES calls per message. A second AES core would remove the
  pause, at about twice the AES area.
* **No prefetch.** The encryption FSM starts the next block's AES only after
  the previous output has been taken. Overlapping the two would save about
  two clocks per block.
* **Other algorithms are not provided.** The same study also maps Deoxys-II,
  POET and PRIMATE-APE to hardware. For Deoxys-II it shows two Deoxys block
  ciphers, one under an authentication control and one under an encryption
  control, linked by a `tag_done` signal. No RTL for those three is given
  here, because their ciphers and mode details are not specified there.
  AES-GCM itself is only the baseline of the comparison; its two building
  blocks, `aes_core` and `gf128_mul`, are present and can be reused for it.
