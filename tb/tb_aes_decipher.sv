// tb_aes_decipher: self-checking test of aes_decipher.
// For each key length (128, 192, 256 bit) it encrypts (decrypts) three blocks
// with a fixed key schedule and compares with results computed beforehand by
// an independent software model of AES. It checks that done comes exactly
// Nr + 1 clocks after the start, that a start while busy is ignored.
module tb_aes_decipher
  import aes_pkg::*;
;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

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

  localparam round_keys_t SCHED [3] = '{
    '{128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 128'h4d427b330a6d7107625426dce6607a4a, 128'h6308eb6c472f0a34683957db84345c96, 128'haf2308a22427e1582f165defec0d0b4d, 128'h8092328c8b04e9fa0b31bcb7c31b56a2, 128'h25156b640b96db768035554dc82aea15, 128'hc51d01362e83b0128ba38e3b481fbf58, 128'hb0dafa18eb9eb124a5203e29c3bc3163, 128'h66ac2c2b5b444b3c4ebe8f0d669c0f4a, 128'hf1618c1f3de8671715fac43128228047, 128'h927ab438cc89eb082812a3263dd84476, 128'he7eee7615ef35f30e49b482e15cae750},
    '{128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 128'hc8a6c2422e87b76df7629898224adc28, 128'hd9e52ff5d52844b084a545c8c67e7fba, 128'h518d017842db3a72bb7436f6e621752f, 128'h42f476da5d5543d93fc45ada0ccd6b45, 128'h629119033309319f5d406a3d13563b0a, 128'h6e495ba24e165137d31611a71fa13503, 128'h84c78b88ccb724a47d302c005198289c, 128'hb18708a42ca8049c3fd1733e205f0a95, 128'h137977a21f8e79ab43a0a13f4870af2c, 128'h5e16c3ff0bd00e13f9f7a7889d2f0c38, 128'hf227a99b64d8abb08e567b9a0cf70e09, 128'hea8ed02a82a1759334bdc20155c6cdec, 128'h07201e12617b0feda7e1647796ff022b},
    '{128'hbfd36ab1f6683f3933f685318bb0241b, 128'h6a8bf3a8e93db40c51a1baa4365a0e28, 128'h41785eb449bb5588c59eba08b846a12a, 128'h06d1c14d83b647a4b89c0ea867fbb48c, 128'h6ef53a3108c30b3c8c25ef807dd81b22, 128'hf9b06ede856786e93b2a490cdf67ba24, 128'hfb010caf6636310d84e6e4bcf1fdf4a2, 128'h58e4d1e47cd7e837be4dcfe5e44df328, 128'h100c38c69d373da2e2d0d5b1751b101e, 128'hc54b1b96243339d3c29a27d25a003ccd, 128'h77e785788d3b05647fe7e81397cbc5af, 128'h4d54bdefe1782245e6a91e01989a1b1f, 128'hcd48453efadc801cf2dced77e82c2dbc, 128'hd625658aac2c9faa07d13c447e33051e, 128'h0f2337cd3794c52208006d6b1af0c0cb}
  };
  localparam logic [127:0] VIN [9] = '{
    128'he9ab254c5d95f0ad02d1bf34801c45c0,
    128'hdc1b0e12be38e3cd6dd29e43dbce8d38,
    128'h443eaa197cea75a64919c657ca203c81,
    128'h8581bf7e1f73abe4273bf50cd319dc0a,
    128'h6ae0e3515be88ec39a275c69592f65eb,
    128'h19cfbf02e294f1b188052ede6e1e44f0,
    128'hd034c2cfbf1f967a4cad90438d43b385,
    128'h3e4530f35f65d1a9edaa711dae91d7a5,
    128'h2b99c73de98e4687a41d0525a9d3f22b
  };
  localparam logic [127:0] VOUT [9] = '{
    128'heef95a60e56143d6c43bcad76c008a9b,
    128'h0a6b5fc933154a6de28404a897c52526,
    128'h2e6a7c07bcbee841f745c55d4e9f747f,
    128'h615164c6f728d718353713827ac883d7,
    128'hfb9659234074f5258f6c68082389d2e4,
    128'h7f1e175a90bc432fb946e6a9471109f3,
    128'hb79f110a26f6229fa3452526e7bc1642,
    128'haeb42bf227d50fff07c3c20624292e3b,
    128'h83d5a9c6eae1ec2a0f9e2cf60b7539fe
  };
  localparam int NRS [3] = '{10, 12, 14};

  logic         rst, start, busy, done;
  logic [  1:0] key_len_sel;
  logic [127:0] data_in, data_out;
  round_keys_t  key_data;

  aes_decipher dut (.*);

  initial begin
    int n;
    rst = 1'b1;
    start = 1'b0;
    key_len_sel = '0;
    data_in = '0;
    key_data = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;

    for (int t = 0; t < 3; t++)
      for (int v = 0; v < 3; v++) begin
        @(posedge clk);
        key_data <= SCHED[t];
        key_len_sel <= 2'(t);
        data_in <= VIN[3*t+v];
        start <= 1'b1;
        @(posedge clk);
        #1;
        start <= 1'b0;
        data_in <= ~VIN[3*t+v];
        key_len_sel <= 2'(2 - t);  // only read at the start
        n = 1;  // clocks since the start clock
        while (!done) begin
          if (n == 4) start <= 1'b1;  // must be ignored: busy
          else start <= 1'b0;
          @(posedge clk);
          #1;
          n++;
        end
        start <= 1'b0;
        check_int("latency", n, NRS[t] + 1);
        check128($sformatf("key %0d block %0d", t, v), data_out, VOUT[3*t+v]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
