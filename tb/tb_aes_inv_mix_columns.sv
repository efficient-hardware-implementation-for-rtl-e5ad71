// tb_aes_inv_mix_columns: self-checking test of aes_inv_mix_columns (InvMixColumns).
// Drives 8 fixed vectors and compares the output with results computed
// beforehand by an independent software model of the transform (state byte 0
// in bits [127:120], column-major as in the AES standard). One vector is
// applied per clock; a watchdog ends the run if it stalls.
module tb_aes_inv_mix_columns;
  localparam int N = 8;
  localparam logic [127:0] VIN [N] = '{
    128'h540352a4effe97eebfdad6265cb80e0a,
    128'h17a930f7f849116dd440ad30bbaef26b,
    128'h91deafd8801a9495b5fcceaa8bb068fc,
    128'h3ca962a299412c14cccf19cc99370317,
    128'h61f31ec04b2a6c14ea59335c12d73306,
    128'hbc479e849a5ed711a30adc1bfe143cd7,
    128'hcfe42207c64ff3d3342af16c4d07da02,
    128'h043e2d6f3e42f1098d7ce65f19bb4a2b
  };

  localparam logic [127:0] VOUT [N] = '{
    128'h3cd5632b33699ba99b4ec3837d90f4f9,
    128'h707fa5d3f7969f33591b32792eaf6469,
    128'h14c75ab1d038e99a8e85af89fc905a99,
    128'ha5c3516271751ffb8f48edfc9dc2688d,
    128'ha3e4444fc48fd183b8ffc259365cec76,
    128'h71678a7d34627d293eca9d071d6cddad,
    128'h7eac8f538dfcf129c6731e28dddc75e6,
    128'h41d298731fc0c398fde1065290b55eb8
  };

  logic clk = 1'b0;
  logic [127:0] state_in, state_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_inv_mix_columns dut (
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
