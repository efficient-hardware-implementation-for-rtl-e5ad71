// tb_aes_inv_shift_rows: self-checking test of aes_inv_shift_rows (InvShiftRows).
// Drives 8 fixed vectors and compares the output with results computed
// beforehand by an independent software model of the transform (state byte 0
// in bits [127:120], column-major as in the AES standard). One vector is
// applied per clock; a watchdog ends the run if it stalls.
module tb_aes_inv_shift_rows;
  localparam int N = 8;
  localparam logic [127:0] VIN [N] = '{
    128'hd79d7fd9c7bce4e05b0b01faee78e4ea,
    128'h5bf2cc362241b7dcbb2ee21414422aa0,
    128'h281bc1450d21386343fb93547121b381,
    128'h51a58ce94982f56a8679a3be12655dce,
    128'h528ea7c056873a18b8e73581c9be87c0,
    128'hbc4ab8a929e2755a1897819ea0001171,
    128'h4c94ddd5ba1843fa74170b1b01b59b36,
    128'hb672d39a4468bbf35144077c4ce63120
  };

  localparam logic [127:0] VOUT [N] = '{
    128'hd77801e0c79de4fa5bbc7feaee0be4d9,
    128'h5b42e2dc22f22a14bb41cca0142eb736,
    128'h282193630d1bb3544321c18171fb3845,
    128'h5165a36a49a55dbe86828cce1279f5e9,
    128'h52be3518568e8781b887a7c0c9e73ac0,
    128'hbc00815a294a119e18e2b871a09775a9,
    128'h4cb50bfaba949b1b7418dd36011743d5,
    128'hb6e607f34472317c5168d3204c44bb9a
  };

  logic clk = 1'b0;
  logic [127:0] state_in, state_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_inv_shift_rows dut (
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
