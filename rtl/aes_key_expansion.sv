// aes_key_expansion: AES key schedule for 128, 192 and 256-bit keys, four
// words per clock, into an array register that holds the whole schedule.
//
// How it works: start_key_exp loads the Nk key words (key is MSB-aligned: a
// 128-bit key is key[255:128], a 192-bit key key[255:64]) into words 0..Nk-1 of
// the array and latches key_len_sel. Then every clock produces the next four
// words w[i..i+3] as a chain: each word is w[j-Nk] XOR the word before it, and
// the word before it first goes through RotWord, SubWord and the Rcon XOR when
// j mod Nk = 0, or through SubWord alone when Nk = 8 and j mod 8 = 4. At most
// one word in a group of four needs SubWord, so a single 32-bit S-box look-up
// per clock is enough. That look-up is not done here: the word is sent out on
// lut_add and its substitution comes back on lut_data_in (combinationally, in
// the same cycle), so the expansion can borrow four S-boxes of the cipher,
// which is idle while keys are expanded.
//
// Timing: key_exp_progress is high from the clock after start_key_exp until
// the schedule is complete, 10, 12 or 13 clocks for 128, 192 or 256-bit keys;
// key_exp_done then rises and stays high until the next start_key_exp or
// reset. key_data[r] = {w[4r], w[4r+1], w[4r+2], w[4r+3]} is round key r.
//
// The chained four-XOR structure, the Rot/Sub/Rcon path and the array register
// follow the described key expansion; the lut_add/lut_data_in sharing, the key
// alignment and the clocking are this design's reading of it. Reset is
// synchronous and active high; it clears the control state, not the array.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start_key_exp,
  input  logic [255:0] key,
  input  logic [  1:0] key_len_sel,
  output logic [ 31:0] lut_add,
  input  logic [ 31:0] lut_data_in,
  output round_keys_t  key_data,
  output logic         key_exp_progress,
  output logic         key_exp_done
);

  logic [31:0] w[NW_MAX];  // the array register: the whole key schedule
  logic [ 5:0] idx;  // index of the first word produced this clock
  logic [ 1:0] klen_q;
  logic [ 3:0] nk;
  logic [ 6:0] total;  // Nb (Nr + 1)

  always_comb begin
    nk    = nk_of(klen_q);
    total = 7'(4 * (int'(nr_of(klen_q)) + 1));
  end

  // Where in this group of four the S-box is needed, and what for.
  typedef enum logic [1:0] {
    T_XOR,      // plain chained XOR
    T_ROTSUB,   // RotWord, SubWord, Rcon
    T_SUB       // SubWord only (256-bit keys, j mod 8 = 4)
  } wtype_e;

  wtype_e      wtype [4];
  logic [ 3:0] rnum  [4];  // Rcon index j / Nk
  logic [31:0] back  [4];  // w[j - Nk]

  always_comb
    for (int j = 0; j < 4; j++) begin
      int jj, pos;
      jj = int'(idx) + j;
      pos = jj % int'(nk);
      rnum[j] = 4'(jj / int'(nk));
      back[j] = w[6'(jj-int'(nk))];
      if (pos == 0) wtype[j] = T_ROTSUB;
      else if (nk == 4'd8 && pos == 4) wtype[j] = T_SUB;
      else wtype[j] = T_XOR;
    end

  // S-box address: the words ahead of the one that needs SubWord use only XORs,
  // so the address never depends on lut_data_in.
  always_comb begin
    logic [31:0] prev;
    prev    = w[6'(int'(idx)-1)];
    lut_add = '0;
    for (int j = 0; j < 4; j++) begin
      if (wtype[j] == T_ROTSUB) lut_add = lut_add | {prev[23:0], prev[31:24]};
      else if (wtype[j] == T_SUB) lut_add = lut_add | prev;
      prev = back[j] ^ prev;
    end
  end

  logic [31:0] nw[4];
  always_comb begin
    logic [31:0] prev;
    prev = w[6'(int'(idx)-1)];
    for (int j = 0; j < 4; j++) begin
      case (wtype[j])
        T_ROTSUB: nw[j] = back[j] ^ lut_data_in ^ {rcon(rnum[j]), 24'h0};
        T_SUB:    nw[j] = back[j] ^ lut_data_in;
        default:  nw[j] = back[j] ^ prev;
      endcase
      prev = nw[j];
    end
  end

  always_ff @(posedge clk)
    if (rst) begin
      key_exp_progress <= 1'b0;
      key_exp_done     <= 1'b0;
      idx              <= '0;
      klen_q           <= '0;
    end else if (start_key_exp) begin
      for (int j = 0; j < 8; j++) w[j] <= key[255-32*j-:32];
      klen_q           <= key_len_sel;
      idx              <= 6'(nk_of(key_len_sel));
      key_exp_progress <= 1'b1;
      key_exp_done     <= 1'b0;
    end else if (key_exp_progress) begin
      for (int j = 0; j < 4; j++) if (int'(idx) + j < NW_MAX) w[6'(int'(idx)+j)] <= nw[j];
      idx <= idx + 6'd4;
      if (7'(idx) + 7'd4 >= total) begin
        key_exp_progress <= 1'b0;
        key_exp_done     <= 1'b1;
      end
    end

  always_comb
    for (int r = 0; r <= NR_MAX; r++) key_data[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};

endmodule
