// tb_aes_mix_columns: self-checking test of aes_mix_columns (MixColumns).
// Drives 8 fixed vectors and compares the output with results computed
// beforehand by an independent software model of the transform (state byte 0
// in bits [127:120], column-major as in the AES standard). One vector is
// applied per clock; a watchdog ends the run if it stalls.
module tb_aes_mix_columns;
  localparam int N = 8;
  localparam logic [127:0] VIN [N] = '{
    128'h0fdf32b1f0186e2e9357df0067931b02,
    128'hb2fb30fb5efdb18551916d76ff543829,
    128'hfb35a7b630cdca2cd80cbe699b86db57,
    128'hc277eb4011b2a74fe6a556ede0837640,
    128'habec7962889a4f4f7ea7b25278a76084,
    128'h34543464c44d4b9a98de8c6437368f69,
    128'hc6ed1106ccdf7197ed0b4883cf027cdc,
    128'hd775755c3fe8dda08532d67ccc5080d8
  };

  localparam logic [127:0] VOUT [N] = '{
    128'he74d7c85935c46211b4761267975c425,
    128'ha2f43feb94f24ebf11a980e30836a024,
    128'ha3d55af3cad8060f6870081330ad4945,
    128'had4ab84107d327b898a0c30373274f4e,
    128'h798113b7be395dc8eeb45033e609885c,
    128'hc4a4a4f49519aa7ebad4e929d2b8bf32,
    128'hac3203a11f6d53d417a0e87223934a97,
    128'h03feacda20288d2fedfc84882b2ff434
  };

  logic clk = 1'b0;
  logic [127:0] state_in, state_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_mix_columns dut (
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
