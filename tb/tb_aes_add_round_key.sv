// tb_aes_add_round_key: self-checking test of aes_add_round_key (AddRoundKey).
// Drives 8 fixed vectors and compares the output with results computed
// beforehand by an independent software model of the transform (state byte 0
// in bits [127:120], column-major as in the AES standard). One vector is
// applied per clock; a watchdog ends the run if it stalls.
module tb_aes_add_round_key;
  localparam int N = 8;
  localparam logic [127:0] VIN [N] = '{
    128'ha54dca182530bb1d6d132cded6237b2e,
    128'hd91e3f721fcb1971174494d6493c9d5c,
    128'h3460be31201e69fedaa0eee8b9997f5c,
    128'h7c2999fdafe593253cd654af4dfad714,
    128'h27a0aeb3fee9232f8af2211f9ee491c5,
    128'hb10becb5563bfc1e6f93427ecbc8fe29,
    128'h55e5cd8e46dc8ed4b7c2764d2a5a4d76,
    128'h7706f85d8690024ad6bda3401be9c8cb
  };
  localparam logic [127:0] VKEY [N] = '{
    128'hccc935f6cd1f61226ae15338ae1a3400,
    128'h4d33ba0d246ac04c81b1baf23e3bf9ee,
    128'hf5f79f2b4934af87f5520b69b94b0d98,
    128'h2e85bb55b672a872637acd7466fcb60e,
    128'h0e8ff18463b0e4b2ba29703474f064ac,
    128'h68f700f5b02b3dc666f45bdeaa2ccaed,
    128'hcd2b5157410e4dee4af2b34f430a0734,
    128'h47de636c0e806c957ba684d6431fb5ea
  };
  localparam logic [127:0] VOUT [N] = '{
    128'h6984ffeee82fda3f07f27fe678394f2e,
    128'h942d857f3ba1d93d96f52e24770764b2,
    128'hc197211a692ac6792ff2e58100d272c4,
    128'h52ac22a819973b575fac99db2b06611a,
    128'h292f5f379d59c79d30db512bea14f569,
    128'hd9fcec40e610c1d8096719a061e434c4,
    128'h98ce9cd907d2c33afd30c50269504a42,
    128'h30d89b3188106edfad1b279658f67d21
  };

  logic clk = 1'b0;
  logic [127:0] state_in, state_out;
  logic [127:0] round_key;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_add_round_key dut (
    .state_in,
    .round_key,
    .state_out
  );

  initial begin
    for (int i = 0; i < N; i++) begin
      state_in = VIN[i];
      round_key = VKEY[i];
      @(posedge clk);
      checks++;
      if (state_out !== VOUT[i]) begin
        failures++;
        $display("vector %0d: got %h expected %h", i, state_out, VOUT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
