// aes_inv_shift_rows: InvShiftRows, a circular right shift of state row r by r
// bytes, undoing ShiftRows: s'[r][(c+r) mod 4] = s[r][c]. Pure wiring.
module aes_inv_shift_rows (
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);
  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        state_out[127-8*(r+4*((c+r)%4))-:8] = state_in[127-8*(r+4*c)-:8];
endmodule
