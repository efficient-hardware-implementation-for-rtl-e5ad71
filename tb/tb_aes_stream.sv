// tb_aes_stream: random-stream test of the multi-mode AES top against a
// reference model written here, independently of the RTL.
//
// The reference works on a byte-array state s[r][c], builds its S-box by a
// brute-force search for the GF(2^8) inverse, expands keys one word at a time
// and applies the textbook cipher and inverse cipher. For each key length and
// each mode (ECB, CBC, CTR) a random key is expanded and a stream of NBLK
// random blocks is encrypted and then decrypted through the top; every
// ciphertext and recovered plaintext is compared with the reference. Also
// checks that the decrypted stream equals the original plaintext.
module tb_aes_stream;
  localparam int NBLK = 24;

  typedef logic [7:0] st_t[4][4];

  // ---------------- reference model
  logic [7:0] rsb[256], rinv[256];

  function automatic logic [7:0] rmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic void build_sbox();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv = 0, s;
      for (int y = 1; y < 256; y++) if (rmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = inv;
      for (int k = 1; k <= 4; k++) s ^= 8'((inv << k) | (inv >> (8 - k)));
      rsb[x] = s ^ 8'h63;
    end
    for (int x = 0; x < 256; x++) rinv[rsb[x]] = 8'(x);
  endfunction

  function automatic void to_st(input logic [127:0] b, output st_t s);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = b[127-8*(4*c+r)-:8];
  endfunction

  function automatic logic [127:0] from_st(input st_t s);
    logic [127:0] b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127-8*(4*c+r)-:8] = s[r][c];
    return b;
  endfunction

  logic [31:0] rw[60];
  int rnr;

  function automatic void ref_expand(input logic [255:0] k, input int nk);
    logic [7:0] rc = 8'h01;
    rnr = nk + 6;
    for (int i = 0; i < nk; i++) rw[i] = k[255-32*i-:32];
    for (int i = nk; i < 4 * (rnr + 1); i++) begin
      logic [31:0] t = rw[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {rsb[t[31:24]], rsb[t[23:16]], rsb[t[15:8]], rsb[t[7:0]]};
        t[31:24] ^= rc;
        rc = rmul(rc, 8'h02);
      end else if (nk == 8 && i % nk == 4) t = {rsb[t[31:24]], rsb[t[23:16]], rsb[t[15:8]], rsb[t[7:0]]};
      rw[i] = rw[i-nk] ^ t;
    end
  endfunction

  function automatic void addkey(inout st_t s, input int r);
    for (int c = 0; c < 4; c++) for (int q = 0; q < 4; q++) s[q][c] ^= rw[4*r+c][31-8*q-:8];
  endfunction

  function automatic void mixc(inout st_t s, input logic [7:0] m0, m1, m2, m3);
    st_t t = s;
    logic [7:0] m[4] = '{m0, m1, m2, m3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        s[r][c] = 0;
        for (int k = 0; k < 4; k++) s[r][c] ^= rmul(t[k][c], m[(k-r+4)%4]);
      end
  endfunction

  function automatic logic [127:0] ref_enc(input logic [127:0] b);
    st_t s, t;
    to_st(b, s);
    addkey(s, 0);
    for (int r = 1; r <= rnr; r++) begin
      for (int q = 0; q < 4; q++) for (int c = 0; c < 4; c++) t[q][c] = rsb[s[q][(c+q)%4]];
      s = t;
      if (r != rnr) mixc(s, 8'h02, 8'h03, 8'h01, 8'h01);
      addkey(s, r);
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] ref_dec(input logic [127:0] b);
    st_t s, t;
    to_st(b, s);
    addkey(s, rnr);
    for (int r = rnr - 1; r >= 0; r--) begin
      for (int q = 0; q < 4; q++) for (int c = 0; c < 4; c++) t[q][(c+q)%4] = rinv[s[q][c]];
      s = t;
      addkey(s, r);
      if (r != 0) mixc(s, 8'h0e, 8'h0b, 8'h0d, 8'h09);
    end
    return from_st(s);
  endfunction

  // ---------------- the design
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic         rst, start_key_exp, start_cipher, start_decipher;
  logic [255:0] key;
  logic [  1:0] key_len_sel, mode_sel;
  logic [127:0] iv, plain_text_in, cipher_text_in, cipher_text_out, plain_text_out;
  logic [119:0] nonce;
  logic         cipher_done, decipher_done, key_exp_progress, key_exp_done;

  aes_full_modes dut (.*);

  task automatic check128(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input logic dec, input logic [127:0] text, output logic [127:0] res);
    @(posedge clk);
    if (dec) begin
      start_decipher <= 1'b1;
      cipher_text_in <= text;
    end else begin
      start_cipher  <= 1'b1;
      plain_text_in <= text;
    end
    @(posedge clk);
    start_cipher   <= 1'b0;
    start_decipher <= 1'b0;
    do @(posedge clk); while (!(dec ? decipher_done : cipher_done));
    res = dec ? plain_text_out : cipher_text_out;
  endtask

  logic [127:0] pt[NBLK], ct[NBLK], got, prev, exp;

  initial begin
    build_sbox();
    rst = 1'b1;
    start_key_exp = 1'b0;
    start_cipher = 1'b0;
    start_decipher = 1'b0;
    key = '0;
    key_len_sel = '0;
    mode_sel = '0;
    iv = '0;
    nonce = '0;
    plain_text_in = '0;
    cipher_text_in = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 3; t++)
      for (int m = 0; m < 3; m++) begin
        logic [255:0] k;
        for (int i = 0; i < 8; i++) k[32*i+:32] = $urandom;
        if (t == 0) k[127:0] = '0;
        if (t == 1) k[63:0] = '0;
        ref_expand(k, 4 + 2 * t);
        @(posedge clk);
        key <= k;
        key_len_sel <= 2'(t);
        start_key_exp <= 1'b1;
        iv <= {$urandom, $urandom, $urandom, $urandom};
        nonce <= {$urandom, $urandom, $urandom, 24'($urandom)};
        mode_sel <= 2'(m);
        @(posedge clk);
        start_key_exp <= 1'b0;
        do @(posedge clk); while (!key_exp_done);
        // encrypt the stream
        prev = iv;
        for (int i = 0; i < NBLK; i++) begin
          pt[i] = {$urandom, $urandom, $urandom, $urandom};
          case (m)
            0: exp = ref_enc(pt[i]);
            1: exp = ref_enc(pt[i] ^ prev);
            default: exp = ref_enc({nonce, 8'(i)}) ^ pt[i];
          endcase
          prev = exp;
          run(1'b0, pt[i], got);
          check128($sformatf("klen %0d mode %0d enc %0d", t, m, i), got, exp);
          ct[i] = got;
        end
        // decrypt it again
        prev = iv;
        for (int i = 0; i < NBLK; i++) begin
          case (m)
            0: exp = ref_dec(ct[i]);
            1: exp = ref_dec(ct[i]) ^ prev;
            default: exp = ref_enc({nonce, 8'(i)}) ^ ct[i];
          endcase
          prev = ct[i];
          run(1'b1, ct[i], got);
          check128($sformatf("klen %0d mode %0d dec %0d", t, m, i), got, exp);
          check128($sformatf("klen %0d mode %0d round trip %0d", t, m, i), got, pt[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
