// aes_enc_mode_sel: the mode of operation around the encryption block, for
// ECB (mode 00), CBC (mode 01) and CTR (mode 1x).
//
// How it works: on an accepted request the block input is chosen by two muxes
// in a row. The CBC/ECB mux picks the plaintext itself (ECB) or the plaintext
// XOR the chaining value (CBC); the chaining value is the IV for the first
// block after a restart and the previous ciphertext afterwards (the "IV or CT
// select"). The CTR mux instead picks {nonce, 8-bit counter}. When the block is
// done, the output mux passes the block output (ECB, CBC) or the block output
// XOR the latched text (CTR). In CBC the ciphertext is kept as the next
// chaining value; in CTR the counter steps by one for every block.
//
// CTR decryption also uses this path: start_decipher with mode 1x starts the
// encryption block on {nonce, counter}, and the result, block output XOR
// cipher_text_in, leaves on ctr_plain_text_out with ctr_decipher_done. Encrypt
// and decrypt keep separate counters, both starting at 0, so a stream
// encrypted after a restart decrypts after a restart. restart (pulsed with
// every new key) sets both counters to 0 and the CBC chain back to the IV.
//
// Timing: a request is taken in a clock where start_cipher (or start_decipher
// with mode 1x) is high, key_ready is high and no block is in flight; others
// are dropped, start_cipher winning when both come together. The result is
// registered: cipher_done (or ctr_decipher_done) pulses one clock after the
// encryption block's done, and the output holds until the next result. mode
// and the text are latched with the request.
//
// The mux order, the 120-bit nonce with an 8-bit counter, the CBC feedback and
// the "start decipher AND CTR, OR start cipher" start of the block follow the
// described encryption mode selection; the restart rule, the counter start
// value, the separate decrypt counter and the handshake are this design's.
module aes_enc_mode_sel
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         restart,
  input  logic         key_ready,
  input  logic [  1:0] mode_sel,
  input  logic [127:0] iv,
  input  logic [NONCE_BITS-1:0] nonce,
  input  logic         start_cipher,
  input  logic [127:0] plain_text_in,
  input  logic         start_decipher,
  input  logic [127:0] cipher_text_in,
  // encryption block
  output logic         enc_start,
  output logic [127:0] enc_in,
  input  logic [127:0] enc_out,
  input  logic         enc_done,
  // results
  output logic [127:0] cipher_text_out,
  output logic         cipher_done,
  output logic [127:0] ctr_plain_text_out,
  output logic         ctr_decipher_done
);

  mode_e        mode, mode_q;
  logic         pending, go, go_dec, op_dec_q, chain_used;
  logic [127:0] chain, text_q, chain_val, res;
  logic [CTR_BITS-1:0] enc_ctr, dec_ctr;

  assign mode      = decode_mode(mode_sel);
  assign go        = key_ready && !restart && !pending && (start_cipher || (start_decipher && mode == MODE_CTR));
  assign go_dec    = !start_cipher;  // with go: a CTR decryption request
  assign chain_val = chain_used ? chain : iv;  // IV or CT select

  always_comb begin
    unique case (mode)
      MODE_CTR: enc_in = {nonce, go_dec ? dec_ctr : enc_ctr};
      MODE_CBC: enc_in = plain_text_in ^ chain_val;
      default:  enc_in = plain_text_in;
    endcase
  end
  assign enc_start = go;

  assign res = (mode_q == MODE_CTR) ? enc_out ^ text_q : enc_out;

  always_ff @(posedge clk)
    if (rst) begin
      pending            <= 1'b0;
      op_dec_q           <= 1'b0;
      mode_q             <= MODE_ECB;
      chain_used         <= 1'b0;
      chain              <= '0;
      text_q             <= '0;
      enc_ctr            <= '0;
      dec_ctr            <= '0;
      cipher_done        <= 1'b0;
      ctr_decipher_done  <= 1'b0;
      cipher_text_out    <= '0;
      ctr_plain_text_out <= '0;
    end else begin
      cipher_done       <= 1'b0;
      ctr_decipher_done <= 1'b0;
      if (restart) begin
        chain_used <= 1'b0;
        enc_ctr    <= '0;
        dec_ctr    <= '0;
      end else if (go) begin
        pending  <= 1'b1;
        op_dec_q <= go_dec;
        mode_q   <= mode;
        text_q   <= go_dec ? cipher_text_in : plain_text_in;
        if (mode == MODE_CTR) begin
          if (go_dec) dec_ctr <= dec_ctr + 1'b1;
          else enc_ctr <= enc_ctr + 1'b1;
        end
      end else if (pending && enc_done) begin
        pending <= 1'b0;
        if (op_dec_q) begin
          ctr_plain_text_out <= res;
          ctr_decipher_done  <= 1'b1;
        end else begin
          cipher_text_out <= res;
          cipher_done     <= 1'b1;
          if (mode_q == MODE_CBC) begin
            chain      <= res;
            chain_used <= 1'b1;
          end
        end
      end
    end

endmodule
