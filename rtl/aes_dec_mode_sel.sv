// aes_dec_mode_sel: the mode of operation around the decryption block, for
// ECB (mode 00) and CBC (mode 01). In CTR (mode 1x) decryption runs through the
// encryption block (see aes_enc_mode_sel) and this block takes no request.
//
// How it works: cipher_text_in goes straight into the decryption block. When
// the block is done, the output mux passes its output unchanged (ECB) or XORed
// with the chaining value (CBC). The chaining value is the IV for the first
// block after a restart and the previous cipher_text_in afterwards (the "IV or
// CT select"); it is latched together with the request.
//
// Timing: a request is taken in a clock where start_decipher is high, mode is
// not CTR, key_ready is high and no block is in flight. decipher_done pulses
// one clock after the decryption block's done and plain_text_out holds until
// the next result. restart (pulsed with every new key) sets the chain back to
// the IV.
//
// The direct ECB path, the IV XOR and the previous-ciphertext feedback follow
// the described decryption mode selection; restart, latching and the handshake
// are this design's.
module aes_dec_mode_sel
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         restart,
  input  logic         key_ready,
  input  logic [  1:0] mode_sel,
  input  logic [127:0] iv,
  input  logic         start_decipher,
  input  logic [127:0] cipher_text_in,
  // decryption block
  output logic         dec_start,
  output logic [127:0] dec_in,
  input  logic [127:0] dec_out,
  input  logic         dec_done,
  // results
  output logic [127:0] plain_text_out,
  output logic         decipher_done
);

  mode_e        mode, mode_q;
  logic         pending, go, chain_used;
  logic [127:0] chain, ct_q, xor_q;

  assign mode      = decode_mode(mode_sel);
  assign go        = key_ready && !restart && !pending && start_decipher && mode != MODE_CTR;
  assign dec_start = go;
  assign dec_in    = cipher_text_in;

  always_ff @(posedge clk)
    if (rst) begin
      pending        <= 1'b0;
      mode_q         <= MODE_ECB;
      chain_used     <= 1'b0;
      chain          <= '0;
      ct_q           <= '0;
      xor_q          <= '0;
      decipher_done  <= 1'b0;
      plain_text_out <= '0;
    end else begin
      decipher_done <= 1'b0;
      if (restart) chain_used <= 1'b0;
      else if (go) begin
        pending <= 1'b1;
        mode_q  <= mode;
        ct_q    <= cipher_text_in;
        xor_q   <= chain_used ? chain : iv;  // IV or CT select
      end else if (pending && dec_done) begin
        pending        <= 1'b0;
        plain_text_out <= (mode_q == MODE_CBC) ? dec_out ^ xor_q : dec_out;
        decipher_done  <= 1'b1;
        if (mode_q == MODE_CBC) begin
          chain      <= ct_q;
          chain_used <= 1'b1;
        end
      end
    end

endmodule
