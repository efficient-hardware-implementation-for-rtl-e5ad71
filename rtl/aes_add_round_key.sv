// aes_add_round_key: AddRoundKey, the XOR of the 128-bit state with a 128-bit
// round key. Purely combinational, no latency. Used by both the cipher (after
// the round transforms) and the inverse cipher (before InvMixColumns).
module aes_add_round_key (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  output logic [127:0] state_out
);
  always_comb state_out = state_in ^ round_key;
endmodule
