// aes_mix_columns: MixColumns. Each state column (four bytes) is multiplied in
// GF(2^8) by the circulant matrix with first row {02 03 01 01}, i.e. the column
// polynomial times a(x) = 03x^3 + 01x^2 + 01x + 02 modulo x^4 + 1. Built from
// xtime (multiply by 02) and XORs; combinational, no latency.
module aes_mix_columns
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
      state_out[127-32*c-:8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      state_out[119-32*c-:8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      state_out[111-32*c-:8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      state_out[103-32*c-:8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
endmodule
