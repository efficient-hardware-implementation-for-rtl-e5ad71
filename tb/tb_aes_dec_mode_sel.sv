// tb_aes_dec_mode_sel: self-checking test of aes_dec_mode_sel.
// The decryption block is replaced by a stand-in with the same handshake: it
// answers dec_start after LAT clocks with the inverse of a keyed word rotation.
// Expected plaintexts follow the textbook ECB and CBC decryption (XOR with the
// IV for the first block, then with the previous ciphertext), built here from
// the stand-in's map. Also checked: restart of the chain, and that requests are
// dropped in CTR mode or while key_ready is low.
module tb_aes_dec_mode_sel;
  localparam int LAT = 7;
  localparam logic [127:0] K = 128'h1122334455667788_99aabbccddeeff00;

  function automatic logic [127:0] gmap(input logic [127:0] y);
    logic [127:0] t;
    t = y ^ K;
    return {t[31:0], t[127:32]};
  endfunction

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic         rst, restart, key_ready, start_decipher;
  logic [  1:0] mode_sel;
  logic [127:0] iv, cipher_text_in;
  logic         dec_start, dec_done, decipher_done;
  logic [127:0] dec_in, dec_out, plain_text_out;

  aes_dec_mode_sel dut (.*);

  int cnt;
  always_ff @(posedge clk)
    if (rst) begin
      cnt      <= 0;
      dec_done <= 1'b0;
      dec_out  <= '0;
    end else begin
      dec_done <= 1'b0;
      if (dec_start) begin
        assert (cnt == 0) else $error("dec_start while busy");
        cnt     <= LAT;
        dec_out <= gmap(dec_in);
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) dec_done <= 1'b1;
      end
    end

  task automatic check128(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic request(input logic [127:0] text, output logic [127:0] res);
    int n;
    @(posedge clk);
    start_decipher <= 1'b1;
    cipher_text_in <= text;
    @(posedge clk);
    start_decipher <= 1'b0;
    cipher_text_in <= ~text;
    n = 0;
    res = '1;
    while (n < 20) begin
      @(posedge clk);
      #1;
      if (decipher_done) begin
        res = plain_text_out;
        break;
      end
      n++;
    end
  endtask

  logic [127:0] ct[4], got, prev;

  initial begin
    rst = 1'b1;
    restart = 1'b0;
    key_ready = 1'b0;
    start_decipher = 1'b0;
    mode_sel = 2'b00;
    iv = 128'h00112233445566778899aabbccddeeff;
    cipher_text_in = '0;
    for (int i = 0; i < 4; i++) ct[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk);
    rst <= 1'b0;

    request(ct[0], got);
    check128("request without key", got, '1);
    key_ready <= 1'b1;

    mode_sel <= 2'b00;
    for (int i = 0; i < 2; i++) begin
      request(ct[i], got);
      check128($sformatf("ECB %0d", i), got, gmap(ct[i]));
    end

    mode_sel <= 2'b01;
    prev = iv;
    for (int i = 0; i < 4; i++) begin
      request(ct[i], got);
      check128($sformatf("CBC %0d", i), got, gmap(ct[i]) ^ prev);
      prev = ct[i];
    end
    @(posedge clk) restart <= 1'b1;
    @(posedge clk) restart <= 1'b0;
    request(ct[3], got);
    check128("CBC after restart", got, gmap(ct[3]) ^ iv);

    // CTR decryption goes through the encryption path, not here
    mode_sel <= 2'b10;
    request(ct[0], got);
    check128("CTR ignored", got, '1);

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
