// aes_cipher: iterative AES encryption, one round per clock, for Nr = 10, 12
// or 14 rounds (key_len_sel).
//
// How it works: a single 128-bit state register is loaded on start with
// data_in XOR round key 0 (the pre-round). Each following clock takes the
// register through ShiftRows, SubBytes and MixColumns and XORs round key i; in
// round Nr the MixColumns output is bypassed. The register output is the
// result, data_out. The round keys come as the full schedule (key_data) from
// the key expansion.
//
// S-box sharing: while lut_sel is high (key expansion running) the first four
// S-boxes take their input from lut_add instead of the state, and their output
// is returned on lut_data. The cipher must not be started while lut_sel is
// high; the top module guarantees that.
//
// Timing: start is taken when busy is low; busy is then high for Nr clocks and
// done pulses for one clock in the clock after the last round, with data_out
// valid from then until the next start. Latency from the start clock to done is
// Nr + 1 clocks. A start while busy is ignored.
//
// The datapath (one register, the i == 0 input mux, the i == Nr bypass of
// MixColumns, ShiftRows before SubBytes) follows the described cipher block;
// the handshake and the S-box sharing are this design's choices. Reset is
// synchronous and active high.
module aes_cipher
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [  1:0] key_len_sel,
  input  logic [127:0] data_in,
  input  round_keys_t  key_data,
  input  logic         lut_sel,
  input  logic [ 31:0] lut_add,
  output logic [ 31:0] lut_data,
  output logic [127:0] data_out,
  output logic         busy,
  output logic         done
);

  logic [127:0] q, sr, sb_in, sb, mc, rnd_out, ark_in, d;
  logic [3:0] rnd, nr_q;
  logic       load;

  assign load = start && !busy;

  aes_shift_rows u_sr (.state_in(q), .state_out(sr));
  assign sb_in = lut_sel ? {lut_add, sr[95:0]} : sr;
  aes_sub_bytes u_sb (.state_in(sb_in), .state_out(sb));
  assign lut_data = sb[127:96];
  aes_mix_columns u_mc (.state_in(sb), .state_out(mc));

  assign rnd_out = (rnd == nr_q) ? sb : mc;  // last round skips MixColumns
  assign ark_in  = load ? data_in : rnd_out;  // round 0 takes the input block

  aes_add_round_key u_ark (
    .state_in (ark_in),
    .round_key(key_data[load ? 4'd0 : rnd]),
    .state_out(d)
  );

  always_ff @(posedge clk)
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      rnd  <= '0;
      nr_q <= 4'd10;
      q    <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        q    <= d;
        rnd  <= 4'd1;
        nr_q <= nr_of(key_len_sel);
        busy <= 1'b1;
      end else if (busy) begin
        q <= d;
        if (rnd == nr_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else rnd <= rnd + 4'd1;
      end
    end

  assign data_out = q;

endmodule
