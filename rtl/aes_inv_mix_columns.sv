// aes_inv_mix_columns: InvMixColumns. Each state column is multiplied by the
// inverse matrix, first row {0e 0b 0d 09}, which undoes MixColumns. The
// constant products use aes_pkg::gmul, which unrolls into XORs of xtime terms;
// combinational, no latency.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);
  always_comb
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = state_in[127-32*c-:8];
      a1 = state_in[119-32*c-:8];
      a2 = state_in[111-32*c-:8];
      a3 = state_in[103-32*c-:8];
      state_out[127-32*c-:8] = gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09);
      state_out[119-32*c-:8] = gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d);
      state_out[111-32*c-:8] = gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b);
      state_out[103-32*c-:8] = gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e);
    end
endmodule
