// aes_inv_sub_bytes: InvSubBytes, each state byte replaced by its entry in the
// inverse S-box. Combinational, no latency. The table is computed in aes_pkg
// as the inverse permutation of the S-box.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);
  always_comb
    for (int k = 0; k < 16; k++) state_out[127-8*k-:8] = INV_SBOX[state_in[127-8*k-:8]];
endmodule
