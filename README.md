# HMAC/SHA-2 co-processor

This is a hardware unit that computes keyed-hash message authentication codes
(HMAC, RFC 2104 / FIPS 198) and plain message digests. It supports all four
SHA-2 algorithms: SHA-224, SHA-256, SHA-384 and SHA-512. The algorithm is
chosen per operation. A single SHA-2 core does every hash. Around it sit the
extra pieces that HMAC needs:

- a key register with the ipad/opad XOR logic;
- three registers that hold intermediate hash values;
- a padding unit;
- a stage controller.

Key and text enter on one word-wide stream port (`Key_Text_In`). The MAC or
digest leaves one word per read (`Msg_Digest_MAC_Out`).

The RTL follows a published HMAC/SHA-2 co-processor architecture. The main
features of that architecture are kept:

- a message scheduler that can be loaded serially or in parallel;
- a one-cycle initialisation;
- one iteration per clock;
- an intermediate-hash update that uses only two adders, spread over the last
  four iterations;
- the five HMAC stages, with key reuse.

Where the architecture gives no detail, this RTL makes its own choices. These
include the interfaces, the padding logic, the key storage and the way one core
handles both word widths. They are listed under
[Departures and own choices](#departures-and-own-choices).

## What HMAC asks of the hardware

    MAC = H( (K0 xor opad) || H( (K0 xor ipad) || text ) )

`K0` is the key brought to one block of B bits (512 bits for SHA-224/256, 1024
bits for SHA-384/512):

- a shorter key is padded with zeros;
- a longer key is first hashed, then padded with zeros.

`ipad` is the byte 0x36 repeated over the block, and `opad` is the byte 0x5c
repeated.

So the unit needs two hashes, and each one starts with a block that depends
only on the key. The unit splits the work into five **stages**. They always run
in this order, and some of them can be skipped:

| stage         | runs when                        | block source                        | starts from      | result goes to            |
|---------------|----------------------------------|-------------------------------------|------------------|---------------------------|
| NewKeyHash    | key longer than B bits           | key, streamed through the padding unit | initial values | K0 register (`Hash(key)`, then zeros) |
| KeyIpadHash   | no key reuse                     | `K0 xor ipad`, parallel load        | initial values   | `K0_Ipad_Hash`            |
| TextHash      | always                           | text, streamed, length counted from B | `K0_Ipad_Hash` | `K0_Ipad_Text_Hash`       |
| KeyOpadHash   | no key reuse                     | `K0 xor opad`, parallel load        | initial values   | `K0_Opad_Hash`            |
| MACHash       | always                           | padded `K0_Ipad_Text_Hash`, parallel load | `K0_Opad_Hash` | output block (the MAC) |

`K0_Ipad_Hash` and `K0_Opad_Hash` are the chaining values after the two
key-only blocks. After one full HMAC they stay valid. A later MAC with the same
key and mode can therefore set `key_reuse` and send only the text. That MAC
costs just the text blocks plus one block, instead of two extra key blocks (and
a key hash for a long key). A plain hash (`OP_HASH`) streams the message from
the initial values and does not touch the stored key values, so key reuse still
works after it.

When the text hash continues from `K0_Ipad_Hash`, the padding unit must count
the message length as if the `K0 xor ipad` block had been hashed in the same
stream. It therefore starts its bit counter at B. The outer hash is always
exactly two blocks. Its second block is built in one step from the inner hash:
L/D digest words, then the 0x80 word, then zeros, then the length B + L in the
last word.

## The SHA-2 core (`sha2_core`)

The core has four parts plus an iteration counter `t`:

- **Message scheduler** (`sha2_msg_scheduler`): sixteen registers W0..W15 that
  form a shift register. W0 always holds W_t. Every shift writes a new word into
  W15:
  - during serial loading, the new word is the next message word;
  - during an iteration, it is `s1(W14) + W9 + s0(W1) + W0`, which is
    W_(t+16).
  A parallel load writes all sixteen registers in one cycle.
- **Compressor** (`sha2_compressor`): the working variables a..h. It does one
  SHA-2 round per clock.
- **Intermediate hash computation** (`sha2_ihc`): H0..H7.
- **Constants memory** (`sha2_const_mem`): one table of 80 64-bit round
  constants, plus the initial values. The SHA-224/256 constants are the high 32
  bits of the first 64 SHA-512 constants. SHA-256 and SHA-512 share one
  initial-value table (high half / whole word). SHA-224 and SHA-384 share the
  other (low half / whole word). The values are the standard ones: the
  fractional parts of the cube roots (K) and square roots (IV) of the first
  primes.

### Timing of one block

| cycle(s)        | what happens |
|-----------------|--------------|
| 16 (serial only) | `w_valid` shifts M0..M15 into the scheduler while the core is idle |
| 1               | `start`: a..h and H0..H7 are both set from one source, chosen by `h_sel`. With `blk_load`, W0..W15 are loaded in parallel in the same cycle. |
| j = 64 or 80    | one iteration per cycle, t = 0..j-1 |
| -               | `done` pulses; `h_out` holds the new H |

`done` is high exactly j+1 cycles after the cycle in which `start` is sampled.
The testbenches check this for every block.

`h_sel` has three sources:

- `H_IV`: the initial values of the mode (a new hash);
- `H_KEEP`: the current H (the next block of a message);
- `H_EXT`: a stored value from the HMAC registers.

### Two adders instead of eight

After the last iteration, each H_i must be increased by the matching working
variable. The core does not use eight adders for this. It uses two, and spreads
the eight additions over the last four iterations. This works because the
working variables only shift after they are written:

- the value written into `a` in iteration j-4 is the final `d`;
- the value written in iteration j-3 is the final `c`;
- and so on down to `a`.

The same holds for `e`, which becomes the final `h`, `g`, `f` and `e`. So in
iteration j-4+s (s = 0..3) the two adders compute:

    H(3-s) += T1 + T2        (the new a)
    H(7-s) += d + T1         (the new e)

For SHA-256 this means H3/H7 at t = 60, H2/H6 at t = 61, H1/H5 at t = 62 and
H0/H4 at t = 63. When the last iteration ends, H is already final and no extra
cycle is needed. The compressor outputs the two new values (`a_new`, `e_new`)
for this purpose. A 2-bit step select picks the register pair.

### One datapath for both word widths

SHA-224/256 work on 32-bit words. SHA-384/512 work on 64-bit words. Here every
register is 64 bits wide:

- in the 32-bit modes, only bits [31:0] are used and the high half is kept at
  zero;
- every sum is reduced modulo 2^32 (`word_mask` / `add_w` in `sha2_pkg`);
- the six logical functions switch their rotation amounts with the mode.

So W, a..h and H together take 32 × 64 = 2048 register bits. That is the
requirement of SHA-384/512, and the 1024 bits of SHA-224/256 fit in the low
halves. The mode is latched at `start`. Changing it between blocks of one
message is not supported.

## Streams and padding

### Word format on `Key_Text_In`

- One word per `valid`/`ready` transfer. The word is D = 32 bits (in bits
  [31:0]) for SHA-224/256 and 64 bits for SHA-384/512.
- Bytes are big-endian: the first byte of the stream sits in the most
  significant byte.
- The last word of a stream has `key_text_in_last` set. `key_text_in_bytes`
  gives the number of valid bytes in it, from 0 to D/8. A value of 0 lets an
  empty text end. Unused bytes are ignored.
- Words are accepted only after a command has been taken, so they are always
  interpreted in that command's mode.

### Padding unit

`hmac_input_block` registers each word and clears the unused bytes. Its output
goes to one of two places:

- the K0 register, for a key of at most B bits;
- the padding unit (`sha2_padding_unit`), for everything else.

The padding unit passes message words through to the core and counts their
bits. After the last word it generates the standard SHA-2 padding by itself:

1. a 0x80 byte, in the last message word if there is room, otherwise in the
   next word;
2. zero words;
3. the bit length in words 14 and 15 of the block (a 64-bit length, or a
   128-bit length whose high word is zero).

If the 0x80 byte falls in word 14 or 15, a further block of zeros plus the
length follows. The padding unit marks word 15 of each block and the end of the
padded message. The controller uses these marks to start the core.

Message length is limited to 2^64 - 1 bits in every mode.

## Using the unit

| port | dir | meaning |
|------|-----|---------|
| `cmd_valid` / `cmd_ready` / `cmd` | in / out / in | command: `op` (`OP_HASH`, `OP_HMAC`), `mode`, `key_reuse`, `key_bytes` (K in bytes) |
| `key_text_in_valid` / `_ready` / `key_text_in` / `_last` / `_bytes` | | the key stream (HMAC without reuse), then the text stream |
| `done` | out | one-cycle pulse: the result can be read |
| `msg_digest_mac_out_valid` / `_rd` / `msg_digest_mac_out` / `_last` | | L/D words, H0 first: 7, 8, 6 or 8 reads for SHA-224/256/384/512 |
| `busy` | out | an operation is in progress |

The types and constants are in `sha2_pkg`. A key longer than B/8 bytes is
hashed first (NewKeyHash). A key of exactly B/8 bytes is used as it is.
An empty key is sent as one word with 0 valid bytes.
`key_reuse` only takes effect if both key hashes are stored for the same mode.
Otherwise the unit runs the key stages, and expects the key stream.

The core works one block at a time. While it runs its iterations, it does not
take serial words, and `key_text_in_ready` goes low. Approximate cycle costs:

- streamed block: 16 + j + 2 cycles;
- parallel-loaded block: j + 2 cycles.

For example, an HMAC-SHA-256 with a short key and a one-block text takes:

- about 66 cycles for KeyIpadHash;
- about 82 for TextHash;
- about 66 for KeyOpadHash;
- about 66 for MACHash;
- plus a few cycles per key word.

With key reuse, the same MAC takes about 82 + 66 cycles.

The output block is a separate register. The host can read the result while
the next command already runs.

## Departures and own choices

- **All four algorithms at run time on one 64-bit datapath.** The source
  architecture covers the whole SHA-2 family, but does not say how one core
  switches word width.
- **K0 register.** In the source architecture, `K0_Opad_Hash` also serves as
  temporary key storage. That register holds only L bits, which is less than a
  B-bit key. This design therefore keeps a separate 16-word K0 register, and
  `K0_Opad_Hash` only ever holds the hash.
- **Padding unit, input block, output block.** These appear in the block
  diagram only as names. Their behaviour here (FIPS 180-4 padding, byte
  masking, serial read-out register) is this design's.
- **Logical functions and constants** come from FIPS 180-4. The source names
  them but does not define them.
- **Interfaces.** The command word, the valid/ready handshakes, the byte count
  on the last word, and the `done`/read protocol are all this design's choices.
- **Iteration counter** is 7 bits wide, so that it can reach 80 iterations.
- **Reset** is asynchronous and active low, and clears every register.
- **Not included:** protection against single-event upsets (error detection
  and correction of the constants, inputs and registers). The source says such
  protection is needed for space use, but describes no scheme.

## Files

`rtl/`:

| file | content |
|------|---------|
| `sha2_pkg.sv` | modes, word/hash/block types, constants, SHA-2 word functions, HMAC command type |
| `sha2_const_mem.sv`, `sha2_msg_scheduler.sv`, `sha2_compressor.sv`, `sha2_ihc.sv` | the four parts of the core |
| `sha2_core.sv` | the SHA-2 core with iteration counter |
| `hmac_input_block.sv`, `sha2_padding_unit.sv`, `hmac_registers.sv`, `hmac_output_block.sv`, `hmac_ctrl.sv` | HMAC unit blocks |
| `hmac_sha2_top.sv` | the co-processor; it also contains the multiplexers in front of the core |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. It also has
`tb_sha2_ref_pkg.sv`, which holds reference versions of the SHA-2 word
functions written separately from the RTL. Each testbench prints
`TB_RESULT checks=N failures=M`.

- `tb_hmac_sha2_top` runs 14 hashes and HMACs end to end, in all four modes,
  and compares them with the standard algorithms. The cases include short keys,
  a key of exactly B bits, long keys, key reuse, empty and multi-block texts,
  and extra padding blocks. The input stream and the reads have random gaps.
  The testbench also checks every block's latency and that every serial load
  is exactly 16 words, and it counts how often each mechanism occurred.
- `tb_sha2_core` checks the FIPS "abc" digests and multi-block messages in all
  modes, with both serial and parallel loading.

To run one testbench with Verilator:

    verilator --binary --timing --assert -y rtl -Itb \
        rtl/sha2_pkg.sv tb/tb_sha2_ref_pkg.sv tb/tb_hmac_sha2_top.sv \
        --top-module tb_hmac_sha2_top
    ./obj_dir/Vtb_hmac_sha2_top

`-y rtl` lets Verilator find each module in the file of the same name. The two
packages are named first, because the other files import them. Any other
testbench runs the same way, with its own name in place of `tb_hmac_sha2_top`.
The end-to-end run takes a few seconds.

The expected digests and MACs in the testbenches are standard SHA-2/HMAC
results for the generated data:

- key byte i = (13·i + 19) mod 256;
- text byte i = (13·i + 26) mod 256.

Any SHA-2/HMAC implementation reproduces them.
