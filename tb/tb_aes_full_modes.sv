// tb_aes_full_modes: end-to-end test of the multi-mode AES top, at its default
// configuration (the top has no parameters).
//
// Expected values come from an independent software model of AES, computed
// beforehand and listed below. The test runs:
//  - the reference scenario: 256-bit key 00 01 .. 1f, CBC with IV 00 01 .. 0f,
//    two blocks encrypted and the two ciphertexts decrypted again;
//  - for each key length (128, 192, 256 bit), after a new key expansion:
//    three blocks each of ECB, CBC and CTR, encrypted and then decrypted;
//  - an ECB encryption and decryption started in the same clock;
//  - starts that must be dropped: before the key is ready and while busy.
// It checks every result, the latency of key expansion (10/12/13 clocks) and
// of a block (Nr + 2 clocks from start to done), and counts how often each
// mechanism of the design happened; a mechanism that never happened counts as
// a failure.
module tb_aes_full_modes;
  localparam logic [255:0] KEYS [3] = '{256'h362bffd70adcb71d6912bc586eb9bc9000000000000000000000000000000000, 256'ha02bf25af7e5535d5ba5643a2a32da138d8fa937bd939ce80000000000000000, 256'h6f844c363dfc79a84833c455e6111cd5c90b537306711de32fb108c1fb621226};
  localparam logic [127:0] PT [9] = '{
    128'h87ee64eb976e2e34567a8133d75406e3,
    128'hafd454d3237a97d9d1991a91370c47aa,
    128'hdc7f5428ac3a78f1e68b02adc10c48cd,
    128'h680f58e6d829d78df55a98872c731ffe,
    128'hc109e9d295a3d0b29a8cae52c615d6f4,
    128'h828e2dc46f874abd38ec3d8ee2031284,
    128'h387ef015d0288d66b94b2e5ccab89628,
    128'h56143d5d09454796f097181634a70f44,
    128'hb32f516d69daa271dfb9709fe942b6c2
  };
  localparam logic [127:0] ECB [9] = '{
    128'h59c891d424d154935e594536552555da,
    128'h1b9666f3872f052b9b64b112c63c4cec,
    128'hbc8ca663bf41c5d0f58fdf915b016141,
    128'h35cab57c82827b992b3350063430ee5e,
    128'hc1847858499dbe03e6406a40fe54bbf2,
    128'heaeff457de512a06098ec897e3947cee,
    128'h45d405d3754bd758be1f341a7e205790,
    128'hb79867505b701577bb606e4d0063e249,
    128'hf4a7049f1080415319305b6275d4854a
  };
  localparam logic [127:0] CBC [9] = '{
    128'h4121cca780e18bc18c5da893c39b399a,
    128'h00e1a34dd98de6666881c49e61941424,
    128'h08bb6fc21bb83c5a34b72db4a0717e27,
    128'h3d9cdf596495a36b187979f5749692d4,
    128'hb1e243e101f5004880b88435a1ef05e0,
    128'h328f6498cce717532b26a591326add35,
    128'h5bef04d88f4c9aac54a15fbc604d0738,
    128'h4bd04af91c1ca58fff0f871ccb8c6ffc,
    128'h9c430b627d1f5dc2ff3d31a3748bf0af
  };
  localparam logic [127:0] CTR [9] = '{
    128'h83adaef832994f02904e7527bdda4553,
    128'hb22d79ad053bf112e6f93b420536fbf0,
    128'h18167d2ddef4eef8fb5adbc8d4b3eebc,
    128'h59585328c37da8426e8faa165bff2631,
    128'haa9c0591c5b0824b4cec386b8fde6d59,
    128'h2fcfaaba096bc3b99ec6e180f2aabc5c,
    128'h90840b0d00af23925723a8125b49283b,
    128'h79812ee8be3fdc57ee8c756cc07523df,
    128'h242e94b7b0226d700a756d9d6e33913e
  };
  localparam logic [119:0] NONCE = 120'h942a089dd8c2b7426288e30771e80c;
  localparam logic [127:0] IV = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] FIG_PT [2] = '{128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f};
  localparam logic [127:0] FIG_CT [2] = '{128'h78e16b06817a4453abef8a235fa9fa51, 128'he6824b0ec6a5ed7cd7978ed0a945cb76};

  localparam int NRS [3] = '{10, 12, 14};
  localparam int KCYC [3] = '{10, 12, 13};

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

  // ---------------- mechanism counters
  typedef enum int {
    M_KEY128, M_KEY192, M_KEY256, M_SBOX_SHARED, M_ECB_ENC, M_ECB_DEC, M_CBC_ENC_CHAIN,
    M_CBC_DEC_CHAIN, M_CTR_ENC, M_CTR_DEC_VIA_ENC, M_CTR_COUNT, M_CONCURRENT, M_DROP_BUSY,
    M_DROP_NOKEY, M_RESTART, M_NUM
  } mech_e;
  int mech[M_NUM];
  localparam string MNAME [M_NUM] = '{
    "128-bit key", "192-bit key", "256-bit key", "S-box shared with key expansion",
    "ECB encryption", "ECB decryption", "CBC encryption chained on ciphertext",
    "CBC decryption chained on ciphertext", "CTR encryption",
    "CTR decryption through the encryption block", "CTR counter stepped",
    "encryption and decryption at the same time", "start dropped while busy",
    "start dropped before key ready", "chains restarted by a new key"
  };

  always_ff @(posedge clk) if (key_exp_progress) mech[M_SBOX_SHARED]++;

  task automatic check128(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expand(input logic [255:0] k, input logic [1:0] klen, input int t);
    int n;
    @(posedge clk);
    key <= k;
    key_len_sel <= klen;
    start_key_exp <= 1'b1;
    @(posedge clk);
    #1;
    start_key_exp <= 1'b0;
    key <= ~k;
    n = 0;
    while (!key_exp_done && n < 100) begin
      @(posedge clk);
      #1;
      n++;
    end
    check_int("key expansion clocks", n, KCYC[t]);
    mech[M_KEY128 + t]++;
  endtask

  // One block through the top. dec selects start_decipher. Waits for the done
  // pulse and checks result and latency (nr + 2 clocks).
  task automatic block(input logic dec, input logic [127:0] text, input logic [127:0] exp,
                       input int nr, input string what);
    int n;
    @(posedge clk);
    if (dec) begin
      start_decipher <= 1'b1;
      cipher_text_in <= text;
    end else begin
      start_cipher  <= 1'b1;
      plain_text_in <= text;
    end
    @(posedge clk);
    #1;
    start_cipher   <= 1'b0;
    start_decipher <= 1'b0;
    plain_text_in  <= ~text;
    cipher_text_in <= ~text;
    n = 1;
    while (!(dec ? decipher_done : cipher_done) && n < 100) begin
      @(posedge clk);
      #1;
      n++;
    end
    check_int({what, " latency"}, n, nr + 2);
    check128(what, dec ? plain_text_out : cipher_text_out, exp);
  endtask

  initial begin
    int n, ndone;
    rst = 1'b1;
    start_key_exp = 1'b0;
    start_cipher = 1'b0;
    start_decipher = 1'b0;
    key = '0;
    key_len_sel = '0;
    mode_sel = '0;
    iv = IV;
    nonce = NONCE;
    plain_text_in = '0;
    cipher_text_in = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // nothing happens before a key has been expanded
    @(posedge clk) start_cipher <= 1'b1;
    @(posedge clk) start_cipher <= 1'b0;
    n = 0;
    repeat (20) begin
      @(posedge clk);
      if (cipher_done) n++;
    end
    check_int("start before key ready", n, 0);
    if (n == 0) mech[M_DROP_NOKEY]++;

    // ---- reference scenario: AES-256, CBC, two blocks each way
    expand({8'h00, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08, 8'h09, 8'h0a,
            8'h0b, 8'h0c, 8'h0d, 8'h0e, 8'h0f, 8'h10, 8'h11, 8'h12, 8'h13, 8'h14, 8'h15,
            8'h16, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h1b, 8'h1c, 8'h1d, 8'h1e, 8'h1f}, 2'b10, 2);
    mode_sel <= 2'b01;
    for (int i = 0; i < 2; i++) block(1'b0, FIG_PT[i], FIG_CT[i], 14, $sformatf("reference CBC enc %0d", i));
    for (int i = 0; i < 2; i++) block(1'b1, FIG_CT[i], FIG_PT[i], 14, $sformatf("reference CBC dec %0d", i));

    // ---- every key length, every mode
    for (int t = 0; t < 3; t++) begin
      expand(KEYS[t], 2'(t), t);
      if (t > 0) mech[M_RESTART]++;  // checked by the CBC / CTR results below
      mode_sel <= 2'b00;
      for (int i = 0; i < 3; i++) begin
        block(1'b0, PT[3*t+i], ECB[3*t+i], NRS[t], $sformatf("key %0d ECB enc %0d", t, i));
        mech[M_ECB_ENC]++;
      end
      for (int i = 0; i < 3; i++) begin
        block(1'b1, ECB[3*t+i], PT[3*t+i], NRS[t], $sformatf("key %0d ECB dec %0d", t, i));
        mech[M_ECB_DEC]++;
      end
      mode_sel <= 2'b01;
      for (int i = 0; i < 3; i++) begin
        block(1'b0, PT[3*t+i], CBC[3*t+i], NRS[t], $sformatf("key %0d CBC enc %0d", t, i));
        if (i > 0) mech[M_CBC_ENC_CHAIN]++;
      end
      for (int i = 0; i < 3; i++) begin
        block(1'b1, CBC[3*t+i], PT[3*t+i], NRS[t], $sformatf("key %0d CBC dec %0d", t, i));
        if (i > 0) mech[M_CBC_DEC_CHAIN]++;
      end
      mode_sel <= (t == 1) ? 2'b11 : 2'b10;  // both encodings of CTR
      for (int i = 0; i < 3; i++) begin
        block(1'b0, PT[3*t+i], CTR[3*t+i], NRS[t], $sformatf("key %0d CTR enc %0d", t, i));
        mech[M_CTR_ENC]++;
        if (i > 0) mech[M_CTR_COUNT]++;
      end
      for (int i = 0; i < 3; i++) begin
        block(1'b1, CTR[3*t+i], PT[3*t+i], NRS[t], $sformatf("key %0d CTR dec %0d", t, i));
        mech[M_CTR_DEC_VIA_ENC]++;
      end
    end

    // ---- ECB encryption and decryption in the same clock (256-bit key in place)
    mode_sel <= 2'b00;
    @(posedge clk);
    start_cipher <= 1'b1;
    plain_text_in <= PT[6];
    start_decipher <= 1'b1;
    cipher_text_in <= ECB[7];
    @(posedge clk);
    start_cipher <= 1'b0;
    start_decipher <= 1'b0;
    ndone = 0;
    n = 0;
    while (ndone < 2 && n < 50) begin
      @(posedge clk);
      #1;
      if (cipher_done) begin
        check128("concurrent enc", cipher_text_out, ECB[6]);
        ndone++;
      end
      if (decipher_done) begin
        check128("concurrent dec", plain_text_out, PT[7]);
        ndone++;
      end
      n++;
    end
    check_int("concurrent results", ndone, 2);
    if (ndone == 2) mech[M_CONCURRENT]++;

    // ---- a second start while the encryption block is busy is dropped
    @(posedge clk);
    start_cipher <= 1'b1;
    plain_text_in <= PT[8];
    @(posedge clk);
    start_cipher <= 1'b0;
    repeat (3) @(posedge clk);
    start_cipher <= 1'b1;
    plain_text_in <= PT[6];
    @(posedge clk);
    start_cipher <= 1'b0;
    ndone = 0;
    repeat (40) begin
      @(posedge clk);
      #1;
      if (cipher_done) begin
        check128("result with a dropped start", cipher_text_out, ECB[8]);
        ndone++;
      end
    end
    check_int("results with a dropped start", ndone, 1);
    if (ndone == 1) mech[M_DROP_BUSY]++;

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-45s %0d", MNAME[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("mechanism never happened: %s", MNAME[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
