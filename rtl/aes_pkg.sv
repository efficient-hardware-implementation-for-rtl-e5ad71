// aes_pkg: types, constants and arithmetic shared by the AES blocks.
//
// The 128-bit state is kept as one vector with byte 0 in bits [127:120], and
// byte k holds state element s[r][c] with k = r + 4c (column-major, as in the
// AES standard). Round keys travel as a packed array round_keys_t, entry r
// being the key added in round r; 15 entries cover the 14 rounds of AES-256.
//
// The S-box and its inverse are not typed in as tables. They are computed at
// elaboration from their definition: the multiplicative inverse in GF(2^8)
// modulo x^8+x^4+x^3+x+1 (x^254, with 0 mapped to 0) followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63. The inverse table
// is the inverse permutation of that.
//
// Key length select (this design's encoding): 2'b00 = 128 bit, 2'b01 = 192
// bit, 2'b1x = 256 bit, the same 00/01/1x pattern the mode select uses.
// Mode select: 2'b00 = ECB, 2'b01 = CBC, 2'b1x = CTR.
package aes_pkg;

  localparam int NR_MAX = 14;  // rounds of AES-256, the largest key
  localparam int NW_MAX = 4 * (NR_MAX + 1);  // words of the longest key schedule
  localparam int NONCE_BITS = 120;  // CTR: nonce in the upper bits of the block
  localparam int CTR_BITS = 128 - NONCE_BITS;  // CTR: block counter in the lower bits

  typedef logic [127:0] block_t;
  typedef logic [NR_MAX:0][127:0] round_keys_t;
  typedef logic [255:0][7:0] sbox_t;

  typedef enum logic [1:0] {
    MODE_ECB = 2'b00,
    MODE_CBC = 2'b01,
    MODE_CTR = 2'b10
  } mode_e;

  // CTR is selected by mode[1] alone (mode 1x).
  function automatic mode_e decode_mode(input logic [1:0] sel);
    if (sel[1]) return MODE_CTR;
    else if (sel[0]) return MODE_CBC;
    else return MODE_ECB;
  endfunction

  // Number of rounds Nr and key words Nk for a key length select value.
  function automatic logic [3:0] nr_of(input logic [1:0] klen);
    if (klen[1]) return 4'd14;
    else if (klen[0]) return 4'd12;
    else return 4'd10;
  endfunction

  function automatic logic [3:0] nk_of(input logic [1:0] klen);
    if (klen[1]) return 4'd8;
    else if (klen[0]) return 4'd6;
    else return 4'd4;
  endfunction

  // Multiply by x in GF(2^8).
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic sbox_t gen_sbox();
    sbox_t t;
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, sq, b;
      // x^254 = x^-1 by square-and-multiply over the exponent bits 11111110
      inv = 8'h01;
      sq  = 8'(x);
      for (int e = 1; e < 8; e++) begin
        sq  = gmul(sq, sq);
        inv = gmul(inv, sq);
      end
      b = (x == 0) ? 8'h00 : inv;
      t[x] = b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic sbox_t gen_inv_sbox();
    sbox_t f, t;
    f = gen_sbox();
    t = '0;
    for (int x = 0; x < 256; x++) t[f[x]] = 8'(x);
    return t;
  endfunction

  localparam sbox_t SBOX = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox();

  // Round constant Rcon[n] = x^(n-1), for n >= 1.
  function automatic logic [7:0] rcon(input logic [3:0] n);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 2; i <= 14; i++) if (i <= int'(n)) r = xtime(r);
    return r;
  endfunction

endpackage
