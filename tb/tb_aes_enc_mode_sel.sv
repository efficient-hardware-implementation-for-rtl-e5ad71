// tb_aes_enc_mode_sel: self-checking test of aes_enc_mode_sel.
// The encryption block is replaced by a stand-in with the same handshake:
// it answers enc_start after LAT clocks with a keyed word rotation of its input
// (not AES, just an invertible map that makes every input bit matter). The
// expected outputs are built here from that map and the textbook definitions
// of ECB, CBC (chaining from the IV, then from the previous ciphertext) and CTR
// ({nonce, 8-bit counter} from 0, output XOR text). Also checked: CTR
// decryption through the encryption path, restart of chain and counter, and
// that requests are dropped while key_ready is low or in ECB decryption.
module tb_aes_enc_mode_sel;
  localparam int LAT = 5;
  localparam logic [127:0] K = 128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0;

  function automatic logic [127:0] fmap(input logic [127:0] x);
    return {x[95:0], x[127:96]} ^ K;
  endfunction

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic         rst, restart, key_ready, start_cipher, start_decipher;
  logic [  1:0] mode_sel;
  logic [127:0] iv, plain_text_in, cipher_text_in;
  logic [119:0] nonce;
  logic         enc_start, enc_done, cipher_done, ctr_decipher_done;
  logic [127:0] enc_in, enc_out, cipher_text_out, ctr_plain_text_out;

  aes_enc_mode_sel dut (.*);

  // stand-in encryption block
  int cnt;
  always_ff @(posedge clk)
    if (rst) begin
      cnt      <= 0;
      enc_done <= 1'b0;
      enc_out  <= '0;
    end else begin
      enc_done <= 1'b0;
      if (enc_start) begin
        assert (cnt == 0) else $error("enc_start while busy");
        cnt     <= LAT;
        enc_out <= fmap(enc_in);
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) enc_done <= 1'b1;
      end
    end

  task automatic check128(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // one request; returns the result, or all ones when none came in 20 clocks
  task automatic request(input logic dec, input logic [127:0] text, output logic [127:0] res);
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
    start_cipher   <= 1'b0;
    start_decipher <= 1'b0;
    plain_text_in  <= '0;
    cipher_text_in <= '0;
    n = 0;
    res = '1;
    while (n < 20) begin
      @(posedge clk);
      #1;
      if (!dec && cipher_done) begin
        res = cipher_text_out;
        break;
      end
      if (dec && ctr_decipher_done) begin
        res = ctr_plain_text_out;
        break;
      end
      n++;
    end
  endtask

  logic [127:0] pt[4], got, prev;
  int nmode[3];

  initial begin
    rst = 1'b1;
    restart = 1'b0;
    key_ready = 1'b0;
    start_cipher = 1'b0;
    start_decipher = 1'b0;
    mode_sel = 2'b00;
    iv = 128'h000102030405060708090a0b0c0d0e0f;
    nonce = 120'hf0e0d0c0b0a09080706050403020;
    plain_text_in = '0;
    cipher_text_in = '0;
    for (int i = 0; i < 4; i++) pt[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk);
    rst <= 1'b0;

    // no request is taken before the key is ready
    request(1'b0, pt[0], got);
    check128("request without key", got, '1);
    key_ready <= 1'b1;

    // ECB
    mode_sel <= 2'b00;
    for (int i = 0; i < 2; i++) begin
      request(1'b0, pt[i], got);
      check128($sformatf("ECB %0d", i), got, fmap(pt[i]));
      nmode[0]++;
    end
    // ECB decryption is not this block's job
    request(1'b1, pt[0], got);
    check128("ECB decrypt ignored", got, '1);

    // CBC: IV first, then the previous ciphertext
    mode_sel <= 2'b01;
    prev = iv;
    for (int i = 0; i < 4; i++) begin
      request(1'b0, pt[i], got);
      check128($sformatf("CBC %0d", i), got, fmap(pt[i] ^ prev));
      prev = fmap(pt[i] ^ prev);
      nmode[1]++;
    end
    // restart: the chain goes back to the IV
    @(posedge clk) restart <= 1'b1;
    @(posedge clk) restart <= 1'b0;
    request(1'b0, pt[2], got);
    check128("CBC after restart", got, fmap(pt[2] ^ iv));

    // CTR encryption (mode 10) and decryption (mode 11), separate counters
    @(posedge clk) restart <= 1'b1;
    @(posedge clk) restart <= 1'b0;
    mode_sel <= 2'b10;
    for (int i = 0; i < 3; i++) begin
      request(1'b0, pt[i], got);
      check128($sformatf("CTR enc %0d", i), got, fmap({nonce, 8'(i)}) ^ pt[i]);
      nmode[2]++;
    end
    mode_sel <= 2'b11;
    for (int i = 0; i < 3; i++) begin
      request(1'b1, fmap({nonce, 8'(i)}) ^ pt[i], got);
      check128($sformatf("CTR dec %0d", i), got, pt[i]);
      nmode[2]++;
    end
    // the encrypt counter went on from 3
    request(1'b0, pt[3], got);
    check128("CTR enc 3", got, fmap({nonce, 8'd3}) ^ pt[3]);

    for (int m = 0; m < 3; m++) begin
      checks++;
      if (nmode[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
