// beamformer_full_tb: end-to-end test of the beamformer at its default sizes
// (32x32 elements, 1024 echo samples per channel, 4096/64 coefficient sets,
// 264 apodization zones): loads all 1M echo samples, then beamforms a few
// hundred voxels; the test itself is in beamformer_tb_body.svh.
module beamformer_full_tb;
  localparam int NROW = 32, NCOL = 32, ED = 1024, C2D = 4096, C1D = 64, APD = 264, ADDR_W = 24;
  localparam int NBURST = 64, NSTALL = 100, WATCHDOG = 3000000;

  `include "beamformer_tb_body.svh"

  beamformer dut (.*);

  initial begin
    fork
      @(test_done);
      begin
        repeat (WATCHDOG) @(posedge clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
