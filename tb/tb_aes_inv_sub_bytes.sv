// tb_aes_inv_sub_bytes: self-checking test of aes_inv_sub_bytes (InvSubBytes).
// Drives 8 fixed vectors and compares the output with results computed
// beforehand by an independent software model of the transform (state byte 0
// in bits [127:120], column-major as in the AES standard). One vector is
// applied per clock; a watchdog ends the run if it stalls.
module tb_aes_inv_sub_bytes;
  localparam int N = 8;
  localparam logic [127:0] VIN [N] = '{
    128'hf61ff889326ffa9492edeeee3c669f2b,
    128'hf20894ea27e689c66b6b262e4886b843,
    128'h8f39ba76fef8c90c5101fbe6cf9a48d5,
    128'hb0c0a13da900a6adcb3d64069481be21,
    128'hc9c727b8db8c188f341a924c7f88dfa1,
    128'h61bfdb0ecc682919d2e64692f8194157,
    128'hf1d4af90988285cf7a9af7c93d555226,
    128'h6afe70e7aae6da47627c2e59af2ea37a
  };

  localparam logic [127:0] VOUT [N] = '{
    128'hd6cbe1f2a10614e7745399996dd36e0b,
    128'h04bfe7bb3df5f2c7050523c3d4dc9a64,
    128'h735bc00f0ce11281700963f55f37d4b5,
    128'hfc1ff18bb752c518598b8ca5e7915a7b,
    128'h12313d9a9ff034732843745d6b97eff1,
    128'hd8f49fd727f74c8e7ff59874e18ef8da,
    128'h2b191b96e211675fbd3726128bed4823,
    128'h580cd0b062f57a16ab01c3151bc371bd
  };

  logic clk = 1'b0;
  logic [127:0] state_in, state_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_inv_sub_bytes dut (
    .state_in,

    .state_out
  );

  initial begin
    for (int i = 0; i < N; i++) begin
      state_in = VIN[i];

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
