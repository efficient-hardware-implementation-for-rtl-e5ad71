// aes_full_modes: multi-mode AES with 128, 192 and 256-bit keys, encrypting
// and decrypting 128-bit blocks in ECB, CBC or CTR mode.
//
// Structure: the key expansion turns the cipher key into the full round-key
// schedule once (start_key_exp) and both cipher blocks read it from its array
// register. The encryption block and the decryption block are separate
// iterative datapaths, one round per clock, so an encryption and an ECB/CBC
// decryption can run at the same time. The encryption mode selection feeds the
// encryption block and post-processes its output; the decryption mode selection
// does the same for the decryption block. CTR decryption runs through the
// encryption block. During key expansion the encryption block lends four of its
// S-boxes to the key expansion (lut_add / lut_data_in).
//
// Interface: clk, rst (synchronous, active high); start_key_exp with key
// (MSB-aligned) and key_len_sel (00 = 128, 01 = 192, 1x = 256 bit);
// key_exp_done high once round keys are ready, key_exp_progress while they are
// computed. mode_sel (00 = ECB, 01 = CBC, 1x = CTR), iv and nonce are read when
// a block is started. start_cipher encrypts plain_text_in into cipher_text_out,
// marked by a cipher_done pulse; start_decipher decrypts cipher_text_in into
// plain_text_out, marked by a decipher_done pulse. Starts before key_exp_done,
// or while the same path is busy, are ignored. A new start_key_exp restarts
// the CBC chains (back to the IV) and the CTR counters (back to 0).
//
// Timing: key expansion takes 10/12/13 clocks; a block takes Nr + 2 clocks from
// its start to its done pulse (Nr = 10, 12, 14): Nr + 1 in the cipher block and
// one in the registered mode-selection output.
//
// The four parts and their connections follow the described block diagram;
// encodings of key_len_sel, the handshake and the CBC/CTR restart rule are this
// design's choices.
module aes_full_modes
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start_key_exp,
  input  logic [255:0] key,
  input  logic [  1:0] key_len_sel,
  input  logic [  1:0] mode_sel,
  input  logic [127:0] iv,
  input  logic [NONCE_BITS-1:0] nonce,
  input  logic         start_cipher,
  input  logic [127:0] plain_text_in,
  input  logic         start_decipher,
  input  logic [127:0] cipher_text_in,
  output logic [127:0] cipher_text_out,
  output logic         cipher_done,
  output logic [127:0] plain_text_out,
  output logic         decipher_done,
  output logic         key_exp_progress,
  output logic         key_exp_done
);

  round_keys_t  key_data;
  logic [ 31:0] lut_add, lut_data_in;
  logic [  1:0] klen_q;  // key length of the schedule in the array

  always_ff @(posedge clk)
    if (rst) klen_q <= '0;
    else if (start_key_exp) klen_q <= key_len_sel;

  aes_key_expansion u_key_exp (
    .clk,
    .rst,
    .start_key_exp,
    .key,
    .key_len_sel,
    .lut_add,
    .lut_data_in,
    .key_data,
    .key_exp_progress,
    .key_exp_done
  );

  // ---------------- encryption path
  logic         enc_start, enc_done, enc_busy;
  logic [127:0] enc_in, enc_out, ctr_plain_text_out;
  logic         ctr_decipher_done;

  aes_enc_mode_sel u_enc_sel (
    .clk,
    .rst,
    .restart  (start_key_exp),
    .key_ready(key_exp_done),
    .mode_sel,
    .iv,
    .nonce,
    .start_cipher,
    .plain_text_in,
    .start_decipher,
    .cipher_text_in,
    .enc_start,
    .enc_in,
    .enc_out,
    .enc_done,
    .cipher_text_out,
    .cipher_done,
    .ctr_plain_text_out,
    .ctr_decipher_done
  );

  aes_cipher u_cipher (
    .clk,
    .rst,
    .start      (enc_start),
    .key_len_sel(klen_q),
    .data_in    (enc_in),
    .key_data,
    .lut_sel    (key_exp_progress),
    .lut_add,
    .lut_data   (lut_data_in),
    .data_out   (enc_out),
    .busy       (enc_busy),
    .done       (enc_done)
  );

  // ---------------- decryption path
  logic         dec_start, dec_done, dec_busy;
  logic [127:0] dec_in, dec_out, ecb_cbc_plain_text_out;
  logic         ecb_cbc_decipher_done;

  aes_dec_mode_sel u_dec_sel (
    .clk,
    .rst,
    .restart       (start_key_exp),
    .key_ready     (key_exp_done),
    .mode_sel,
    .iv,
    .start_decipher,
    .cipher_text_in,
    .dec_start,
    .dec_in,
    .dec_out,
    .dec_done,
    .plain_text_out(ecb_cbc_plain_text_out),
    .decipher_done (ecb_cbc_decipher_done)
  );

  aes_decipher u_decipher (
    .clk,
    .rst,
    .start      (dec_start),
    .key_len_sel(klen_q),
    .data_in    (dec_in),
    .key_data,
    .data_out   (dec_out),
    .busy       (dec_busy),
    .done       (dec_done)
  );

  // plain_text_out shows the most recent decryption result of either path,
  // already in the clock of its done pulse. The two paths never finish in the
  // same clock: a start_decipher goes to only one of them and both take Nr + 2
  // clocks for the key in place.
  logic last_ctr, sel_ctr;
  always_ff @(posedge clk)
    if (rst) last_ctr <= 1'b0;
    else if (ctr_decipher_done) last_ctr <= 1'b1;
    else if (ecb_cbc_decipher_done) last_ctr <= 1'b0;

  assign sel_ctr        = ctr_decipher_done || (last_ctr && !ecb_cbc_decipher_done);
  assign plain_text_out = sel_ctr ? ctr_plain_text_out : ecb_cbc_plain_text_out;
  assign decipher_done  = ctr_decipher_done | ecb_cbc_decipher_done;

  // Handshake rules: the mode selection never starts a busy block, and the
  // encryption block never runs while it lends its S-boxes to the key expansion.
  always_ff @(posedge clk)
    if (!rst) begin
      assert (!(enc_start && enc_busy)) else $error("encryption started while busy");
      assert (!(dec_start && dec_busy)) else $error("decryption started while busy");
      assert (!(enc_start && key_exp_progress)) else $error("encryption started during key expansion");
      assert (!(ctr_decipher_done && ecb_cbc_decipher_done)) else $error("two decryption results at once");
    end

endmodule
