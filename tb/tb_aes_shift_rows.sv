// tb_aes_shift_rows: self-checking test of aes_shift_rows (ShiftRows).
// Drives 8 fixed vectors and compares the output with results computed
// beforehand by an independent software model of the transform (state byte 0
// in bits [127:120], column-major as in the AES standard). One vector is
// applied per clock; a watchdog ends the run if it stalls.
module tb_aes_shift_rows;
  localparam int N = 8;
  localparam logic [127:0] VIN [N] = '{
    128'ha8615eef109fc1bfa9e2563701288f29,
    128'hb3d73f6ac2b69edd2c19f264bee462a5,
    128'hbaf20fd27ecf14c011ed201f836320ad,
    128'hb98bab1686a28d9801210c7736f3eec5,
    128'h80dcfc43fe5d049b4d78a7a3ebb92865,
    128'hc8517ed02111f6a652da3524872b6a31,
    128'hd7ffe4587744d5eb783e96968f89be82,
    128'h8565e07e5f7d784e9060a721ca807d76
  };

  localparam logic [127:0] VOUT [N] = '{
    128'ha89f562910e28fefa9285ebf0161c137,
    128'hb3b6f2a5c219626a2ce43fddbed79e64,
    128'hbacf20ad7eed20d211630fc083f2141f,
    128'hb9a20cc58621ee1601f3ab98368b8d77,
    128'h805da765fe7828434db9fc9bebdc04a3,
    128'hc811353121da6ad0522b7ea68751f624,
    128'hd7449682773ebe587889e4eb8fffd596,
    128'h857da7765f607d7e9080e04eca657821
  };

  logic clk = 1'b0;
  logic [127:0] state_in, state_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_shift_rows dut (
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
