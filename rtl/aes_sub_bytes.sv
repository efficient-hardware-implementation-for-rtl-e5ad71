// aes_sub_bytes: SubBytes, each of the 16 state bytes replaced independently by
// its S-box entry (16 parallel look-ups of one 256-entry table, row = high
// nibble, column = low nibble). Combinational, no latency. The table is the one
// computed in aes_pkg from the S-box definition.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);
  always_comb
    for (int k = 0; k < 16; k++) state_out[127-8*k-:8] = SBOX[state_in[127-8*k-:8]];
endmodule
