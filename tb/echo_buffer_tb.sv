// echo_buffer_tb: fills every channel of a reduced echo buffer (4x4 channels,
// 64 samples each) through its write port, then drives random per-channel
// delays, some outside the echo window, and checks each channel's sample and
// in-range flag one enabled cycle later.
module echo_buffer_tb;
  import bf_pkg::*;

  localparam int NROW = 4, NCOL = 4, DEPTH = 64;
  logic clk = 0, en = 0, we = 0;
  logic signed [DLY_W-1:0] delay [NROW][NCOL];
  logic signed [SAMPLE_W-1:0] sample [NROW][NCOL];
  logic in_range [NROW][NCOL];
  logic [3:0] wch = '0;
  logic [4:0] wpair = '0;
  logic [31:0] wdata = '0;
  int checks = 0, failures = 0;

  echo_buffer #(.NROW(NROW), .NCOL(NCOL), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [SAMPLE_W-1:0] m [NROW*NCOL][DEPTH];
  int  exp_d [NROW][NCOL];
  bit  pend = 0;

  always @(posedge clk) begin
    if (en) begin
      if (pend) begin
        for (int i = 0; i < NROW; i++)
          for (int j = 0; j < NCOL; j++) begin
            bit inr;
            inr = exp_d[i][j] >= 0 && exp_d[i][j] < DEPTH;
            checks++;
            if (in_range[i][j] != inr || (inr && sample[i][j] !== m[i*NCOL+j][exp_d[i][j]])) begin
              failures++;
              if (failures < 10) $display("ch %0d,%0d delay %0d: got %0d (%0b)", i, j, exp_d[i][j], sample[i][j], in_range[i][j]);
            end
          end
      end
      for (int i = 0; i < NROW; i++)
        for (int j = 0; j < NCOL; j++) exp_d[i][j] <= int'(delay[i][j]);
      pend <= 1;
    end
  end

  initial begin
    for (int i = 0; i < NROW; i++) for (int j = 0; j < NCOL; j++) delay[i][j] = '0;
    @(posedge clk);
    for (int c = 0; c < NROW * NCOL; c++)
      for (int p = 0; p < DEPTH / 2; p++) begin
        logic [31:0] d;
        d = $urandom;
        m[c][2*p] = d[15:0];
        m[c][2*p+1] = d[31:16];
        we <= 1; wch <= 4'(c); wpair <= 5'(p); wdata <= d;
        @(posedge clk);
      end
    we <= 0;
    for (int n = 0; n < 3000; n++) begin
      en <= ($urandom % 4) != 0;
      for (int i = 0; i < NROW; i++)
        for (int j = 0; j < NCOL; j++) delay[i][j] <= DLY_W'($urandom_range(0, DEPTH + 20)) - DLY_W'(10);
      @(posedge clk);
    end
    en <= 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
