// tb_aes_key_expansion: self-checking test of aes_key_expansion.
// Expands one 128-, one 192- and one 256-bit key and compares every round key
// with a schedule computed beforehand by an independent software model of the
// AES key expansion. Also checks that key_exp_progress lasts 10, 12 and 13
// clocks and that key_exp_done follows it. The S-box look-up the block sends
// out on lut_add is answered here from the package's S-box table.
module tb_aes_key_expansion
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

  localparam logic [255:0] KEYS [3] = '{256'he7eee7615ef35f30e49b482e15cae75000000000000000000000000000000000, 256'h07201e12617b0feda7e1647796ff022bea8ed02a82a175930000000000000000, 256'h0f2337cd3794c52208006d6b1af0c0cbd625658aac2c9faa07d13c447e33051e};
  localparam round_keys_t EXP [3] = '{
    '{128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 128'h4d427b330a6d7107625426dce6607a4a, 128'h6308eb6c472f0a34683957db84345c96, 128'haf2308a22427e1582f165defec0d0b4d, 128'h8092328c8b04e9fa0b31bcb7c31b56a2, 128'h25156b640b96db768035554dc82aea15, 128'hc51d01362e83b0128ba38e3b481fbf58, 128'hb0dafa18eb9eb124a5203e29c3bc3163, 128'h66ac2c2b5b444b3c4ebe8f0d669c0f4a, 128'hf1618c1f3de8671715fac43128228047, 128'h927ab438cc89eb082812a3263dd84476, 128'he7eee7615ef35f30e49b482e15cae750},
    '{128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 128'hc8a6c2422e87b76df7629898224adc28, 128'hd9e52ff5d52844b084a545c8c67e7fba, 128'h518d017842db3a72bb7436f6e621752f, 128'h42f476da5d5543d93fc45ada0ccd6b45, 128'h629119033309319f5d406a3d13563b0a, 128'h6e495ba24e165137d31611a71fa13503, 128'h84c78b88ccb724a47d302c005198289c, 128'hb18708a42ca8049c3fd1733e205f0a95, 128'h137977a21f8e79ab43a0a13f4870af2c, 128'h5e16c3ff0bd00e13f9f7a7889d2f0c38, 128'hf227a99b64d8abb08e567b9a0cf70e09, 128'hea8ed02a82a1759334bdc20155c6cdec, 128'h07201e12617b0feda7e1647796ff022b},
    '{128'hbfd36ab1f6683f3933f685318bb0241b, 128'h6a8bf3a8e93db40c51a1baa4365a0e28, 128'h41785eb449bb5588c59eba08b846a12a, 128'h06d1c14d83b647a4b89c0ea867fbb48c, 128'h6ef53a3108c30b3c8c25ef807dd81b22, 128'hf9b06ede856786e93b2a490cdf67ba24, 128'hfb010caf6636310d84e6e4bcf1fdf4a2, 128'h58e4d1e47cd7e837be4dcfe5e44df328, 128'h100c38c69d373da2e2d0d5b1751b101e, 128'hc54b1b96243339d3c29a27d25a003ccd, 128'h77e785788d3b05647fe7e81397cbc5af, 128'h4d54bdefe1782245e6a91e01989a1b1f, 128'hcd48453efadc801cf2dced77e82c2dbc, 128'hd625658aac2c9faa07d13c447e33051e, 128'h0f2337cd3794c52208006d6b1af0c0cb}
  };
  localparam int NRS [3] = '{10, 12, 14};
  localparam int CYC [3] = '{10, 12, 13};

  logic         rst, start_key_exp, key_exp_progress, key_exp_done;
  logic [255:0] key;
  logic [  1:0] key_len_sel;
  logic [ 31:0] lut_add, lut_data_in;
  round_keys_t  key_data;

  aes_key_expansion dut (.*);

  always_comb
    for (int b = 0; b < 4; b++) lut_data_in[31-8*b-:8] = SBOX[lut_add[31-8*b-:8]];

  initial begin
    int n;
    rst = 1'b1;
    start_key_exp = 1'b0;
    key = '0;
    key_len_sel = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 3; t++) begin
      @(posedge clk);
      key <= KEYS[t];
      key_len_sel <= 2'(t);
      start_key_exp <= 1'b1;
      @(posedge clk);
      start_key_exp <= 1'b0;
      key <= '1;  // the key is only read at the start
      n = 0;
      @(posedge clk);
      while (key_exp_progress) begin
        n++;
        @(posedge clk);
      end
      check_int("expansion clocks", n, CYC[t]);
      check_int("key_exp_done", int'(key_exp_done), 1);
      for (int r = 0; r <= NRS[t]; r++) check128($sformatf("key %0d round key %0d", t, r), key_data[r], EXP[t][r]);
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
