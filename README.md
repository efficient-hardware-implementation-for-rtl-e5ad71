# Multi-mode AES (128/192/256-bit keys, ECB/CBC/CTR)

This is a compact, iterative AES engine that encrypts and decrypts 128-bit
blocks with 128, 192 or 256-bit keys, in Electronic Codebook (ECB), Cipher
Block Chaining (CBC) or Counter (CTR) mode. The area is kept low by doing
one AES round per clock on a single 128-bit state register. The key schedule
is expanded once and kept in a register array, so no round key is computed
again while data is processed. The design has four parts:

| part | module | role |
|---|---|---|
| key expansion | `aes_key_expansion` | turns the cipher key into all round keys, 4 words per clock, into an array register |
| encryption block | `aes_cipher` | iterative cipher, one round per clock; also lends 4 S-boxes to the key expansion |
| decryption block | `aes_decipher` | iterative inverse cipher, one round per clock |
| mode selection | `aes_enc_mode_sel`, `aes_dec_mode_sel` | ECB/CBC/CTR muxes and XORs around the two blocks |

`aes_full_modes` is the top. The round transforms are separate modules:
`aes_add_round_key`, `aes_sub_bytes`, `aes_shift_rows`, `aes_mix_columns`
and their inverses. Types, the S-box tables and GF(2^8) helpers are in
`aes_pkg`.

## Using the top

All signals are synchronous to `clk`. `rst` is synchronous and active high.

1. Put the key on `key` and `key_len_sel` and pulse `start_key_exp` for one clock.
   The key is MSB-aligned: a 128-bit key goes in `key[255:128]` and a 192-bit key in
   `key[255:64]`. `key_len_sel` is `00` for 128 bits, `01` for 192 bits and `1x` for
   256 bits. `key_exp_progress` is high while the schedule is computed.
   `key_exp_done` rises after 10, 12 or 13 clocks and stays high.
2. Set `mode_sel` (`00` ECB, `01` CBC, `1x` CTR), plus `iv` (CBC) or `nonce` (CTR).
3. To encrypt, pulse `start_cipher` with the block on `plain_text_in`.
   `cipher_done` pulses when `cipher_text_out` is valid.
   To decrypt, pulse `start_decipher` with the block on `cipher_text_in`.
   `decipher_done` pulses when `plain_text_out` is valid.
   Outputs hold until the next result.

The inputs (text, mode, IV, nonce) are read only in the start clock.

Timing:

| step | clocks |
|---|---|
| key expansion, 128/192/256-bit key | 10 / 12 / 13 |
| one block, start clock to done pulse | Nr + 2: 12 / 14 / 16 |
| throughput, one path | one block per Nr + 2 clocks |

Encryption and ECB/CBC decryption use different blocks, so both can run at
the same time. Starts are dropped in three cases:

* before `key_exp_done`;
* while the same path is still busy;
* a CTR `start_decipher` in the same clock as `start_cipher`, which shares
  the encryption block and loses to it.

A new `start_key_exp` restarts the chaining: CBC goes back to the IV and the
CTR counters go back to 0.

## The round datapaths

**Encryption** (`aes_cipher`): a 128-bit register Q. The start clock loads
`data_in ^ K0`. Each of the next Nr clocks loads
`MixColumns(SubBytes(ShiftRows(Q))) ^ Ki`, and the last round skips
MixColumns. ShiftRows comes before SubBytes because it is only wiring, so the
two commute. `done` pulses in the clock after round Nr. Round keys arrive as
the whole schedule (`round_keys_t`, 15 x 128 bits), and the block indexes it
with its round counter.

**Decryption** (`aes_decipher`): the start clock loads `data_in ^ K[Nr]`.
Then, for i = Nr-1 down to 0, each clock loads
`InvMixColumns(InvSubBytes(InvShiftRows(Q)) ^ Ki)`. InvMixColumns is
bypassed for i = 0. The key is added *before* InvMixColumns, which is the
literal inverse of the cipher. So the decryption uses the encryption round
keys unchanged, and no second, InvMixColumns-transformed key schedule is
needed. The cost is that the key XOR and InvMixColumns sit in series on the
critical path.

## Key expansion, four words per clock

Word j of the schedule is `w[j] = w[j-Nk] ^ t`, where t is `w[j-1]`
transformed as follows:

* when `j mod Nk = 0`: RotWord, then SubWord, then XOR with `Rcon[j/Nk]`;
* for 256-bit keys, when `j mod 8 = 4`: SubWord only;
* otherwise: t is `w[j-1]` unchanged.

Each clock produces four consecutive words as one XOR chain, where each
word's t is the word produced just before it. The group can start at a word
index that is not a multiple of Nk: with 192-bit keys it starts at 6, 10,
14, .... So the rotate/substitute step can fall on any of the four positions,
and the logic works it out per position (`wtype`). For every key length, at
most one word in a group of four needs SubWord. One 32-bit S-box look-up per
clock is therefore enough.

That look-up is borrowed. The key expansion puts the word on `lut_add`, the
encryption block feeds it through its first four S-boxes (`lut_sel` =
`key_exp_progress`), and the result comes back on `lut_data_in` in the same
clock. The encryption block is idle during expansion, because starts are
blocked until `key_exp_done`. Inside the key expansion, the `lut_add` logic
uses only the words before the substituted one, so it never depends on
`lut_data_in`, and there is no combinational loop across the two modules.

All 60 words (enough for Nr = 14) sit in `w[]`. Round key r is
`{w[4r], w[4r+1], w[4r+2], w[4r+3]}`. The array is not reset. Until
`key_exp_done` its contents are meaningless, and the top does not use them.

## Modes of operation

Encryption side (`aes_enc_mode_sel`), going from the text to the encryption
block input:

* ECB: the plaintext itself.
* CBC: the plaintext XOR the chaining value. The chaining value is the IV for
  the first block after a restart and the previous ciphertext after that.
* CTR: `{nonce[119:0], counter[7:0]}`. The result is the block output XOR the
  text, and the counter steps once per block.

CTR decryption is the same operation, so `start_decipher` in CTR mode also
starts the *encryption* block. Its result leaves on `plain_text_out`.
Encryption and decryption keep separate counters, both 0 after a restart, so
a stream encrypted after a key load decrypts after a key load. The 8-bit
counter wraps after 256 blocks. Keep streams shorter than that per nonce and
key.

Decryption side (`aes_dec_mode_sel`): the ciphertext goes straight into the
decryption block. In CBC the output is XORed with the IV (first block) or
with the previous ciphertext. Both mode-selection blocks register their
results, which is the "+1" in the Nr + 2 latency.

## What follows the source architecture and what was chosen here

These parts follow the published architecture:

* the four-part structure, and the port names of the top;
* the 120-bit nonce with an 8-bit counter, and the mode encoding 00/01/1x;
* the single-register iterative rounds, with their input and bypass muxes;
* the key added before InvMixColumns in decryption;
* the four chained XORs per key-expansion step, with results in an array register;
* CTR decryption through the encryption block.

These are choices made for this implementation:

* the `key_len_sel` encoding and the MSB key alignment;
* synchronous active-high reset;
* the start/busy/done handshake and all cycle counts;
* registered mode-selection outputs;
* restarting the CBC chains and CTR counters on a new key;
* counters starting at 0, with separate counters for encryption and decryption;
* reading the key-expansion S-box port as a loan of the cipher's S-boxes;
* the S-box tables, which are computed at elaboration from their
  definition (GF(2^8) inverse then affine map) rather than written out;
* the 256-bit SubWord-only step, taken from the AES standard.

The published simulation shows an AES-256 CBC run with key 00 01 .. 1f and IV
00 01 .. 0f. Its printed ciphertexts are not standard AES for those inputs.
This design produces standard AES: for plaintexts `00112233..eeff` and
`000102..0f` it gives `78e16b06817a4453abef8a235fa9fa51` and
`e6824b0ec6a5ed7cd7978ed0a945cb76`.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line.

* The transforms, key expansion, cipher and decipher are checked against
  vectors from an independent software AES model, which was itself checked
  against a standard library. These tests also check the cycle counts.
* The mode-selection blocks are tested against a stand-in cipher with the
  same handshake.
* `tb_aes_full_modes` runs the whole top at its only configuration:
  - the AES-256 CBC example above, both ways;
  - ECB, CBC and CTR for each key length, both ways;
  - an encryption and a decryption started in the same clock;
  - dropped starts.

  It counts how often each mechanism happens and fails if one never does.
* `tb_aes_stream` runs random 24-block streams in every mode and key length
  against an AES reference model written separately in the testbench.

To run one with Verilator 5:

    verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
        rtl/aes_pkg.sv tb/tb_aes_full_modes.sv --top-module tb_aes_full_modes
    ./obj_dir/Vtb_aes_full_modes

Not verified: gate-level behaviour, timing closure on any device, and the
area or speed figures of the original FPGA implementation. The RTL is
technology independent. The S-boxes are 256-entry constant tables that a
synthesis tool maps to ROM or logic.
