// tb_aes_sub_bytes: self-checking test of aes_sub_bytes (SubBytes).
// Drives 8 fixed vectors and compares the output with results computed
// beforehand by an independent software model of the transform (state byte 0
// in bits [127:120], column-major as in the AES standard). One vector is
// applied per clock; a watchdog ends the run if it stalls.
module tb_aes_sub_bytes;
  localparam int N = 8;
  localparam logic [127:0] VIN [N] = '{
    128'hd7424d09e15d024c5848f23d1fa6f736,
    128'h1d7f618d1532e70e20e2a6668de7f47e,
    128'h8467e546d53ec8e2a1257bdb256c9b3e,
    128'h4fbb498146ef7030cbf9537252dccead,
    128'hd764b6a32fbb09adeae109c4a9972039,
    128'h75352b878b145c8a42d884cf4cfda72d,
    128'h8e1d5dd92589082d852a7122873ee805,
    128'hadd58942167a385286195c679f9c6994
  };

  localparam logic [127:0] VOUT [N] = '{
    128'h0e2ce301f84c77296a528927c0246805,
    128'ha4d2ef5d592394abb79824335d94bff3,
    128'h5f85d95a03b2e898323f21b93f5014b2,
    128'h84ea3b0c5adf51041f99ed4000868b95,
    128'h0e434e0a15ea019587f8011cd388b712,
    128'h9d96f1173dfa4a7e2c615f8a29545cd8,
    128'h19a44c353fa730d897e5a39317b29b6b,
    128'h9503a72c47da070044d44a85dbdef922
  };

  logic clk = 1'b0;
  logic [127:0] state_in, state_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_sub_bytes dut (
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
