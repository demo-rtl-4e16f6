// beamformer_tb: end-to-end test of the beamformer at reduced sizes (4x4
// elements, 64 echo samples per channel, small coefficient and apodization
// memories); the test itself is in beamformer_tb_body.svh.
module beamformer_tb;
  localparam int NROW = 4, NCOL = 4, ED = 64, C2D = 16, C1D = 8, APD = 6, ADDR_W = 24;
  localparam int NBURST = 40, NSTALL = 60, WATCHDOG = 200000;

  `include "beamformer_tb_body.svh"

  beamformer #(.NROW(NROW), .NCOL(NCOL), .ECHO_DEPTH(ED), .C2_DEPTH(C2D), .C1_DEPTH(C1D),
               .APOD_DEPTH(APD), .ADDR_W(ADDR_W)) dut (.*);

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
