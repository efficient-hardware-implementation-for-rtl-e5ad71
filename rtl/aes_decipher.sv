// aes_decipher: iterative AES decryption (the inverse cipher), one round per
// clock, for Nr = 10, 12 or 14 rounds (key_len_sel).
//
// How it works: on start the 128-bit state register is loaded with data_in
// XOR round key Nr. Each following clock, with i counting down from Nr-1 to
// 0, the register goes through InvShiftRows and InvSubBytes, is XORed with
// round key i and then goes through InvMixColumns; in the last round (i = 0)
// InvMixColumns is bypassed. Because the key is added before InvMixColumns, the
// round keys are used exactly as the key expansion produced them: no separate
// decryption key schedule is needed. The register output is data_out.
//
// Timing: start is taken when busy is low; busy is then high for Nr clocks and
// done pulses for one clock after the last round, data_out valid from then
// until the next start. Latency from the start clock to done is Nr + 1 clocks.
//
// The datapath (input mux on the first round, key XOR after InvSubBytes and
// before InvMixColumns, bypass mux, one register) follows the described
// decipher block; the handshake is this design's. Reset is synchronous, active
// high.
module aes_decipher
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [  1:0] key_len_sel,
  input  logic [127:0] data_in,
  input  round_keys_t  key_data,
  output logic [127:0] data_out,
  output logic         busy,
  output logic         done
);

  logic [127:0] q, isr, isb, ark_in, x, imc, d;
  logic [3:0] rnd;
  logic       load;

  assign load = start && !busy;

  aes_inv_shift_rows u_isr (.state_in(q), .state_out(isr));
  aes_inv_sub_bytes u_isb (.state_in(isr), .state_out(isb));

  assign ark_in = load ? data_in : isb;

  aes_add_round_key u_ark (
    .state_in (ark_in),
    .round_key(key_data[load ? nr_of(key_len_sel) : rnd]),
    .state_out(x)
  );

  aes_inv_mix_columns u_imc (.state_in(x), .state_out(imc));

  assign d = (load || rnd == 4'd0) ? x : imc;

  always_ff @(posedge clk)
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      rnd  <= '0;
      q    <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        q    <= d;
        rnd  <= nr_of(key_len_sel) - 4'd1;
        busy <= 1'b1;
      end else if (busy) begin
        q <= d;
        if (rnd == 4'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else rnd <= rnd - 4'd1;
      end
    end

  assign data_out = q;

endmodule
