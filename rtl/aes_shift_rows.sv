// aes_shift_rows: ShiftRows, a circular left shift of state row r by r bytes
// (row 0 unchanged). Pure wiring. Byte k of the vector is s[k%4][k/4], so
// s'[r][c] = s[r][(c+r) mod 4].
module aes_shift_rows (
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);
  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        state_out[127-8*(r+4*c)-:8] = state_in[127-8*(r+4*((c+r)%4))-:8];
endmodule
