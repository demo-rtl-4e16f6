// delay_generator_tb: a reduced delay generator (4x4 elements) gets random
// steering coefficients per DelaySteer unit, then random voxels (squared
// distance, coefficient indices, apodization index) with enable gaps. Each
// output must carry delay[i][j] = floor(sqrt(sq)) + C2_i + C1_i[j] and the
// voxel's apodization index exactly 19 enabled cycles after the voxel entered,
// and a burst of back-to-back voxels must come out back to back.
module delay_generator_tb;
  import bf_pkg::*;
  import bf_tb_pkg::*;

  localparam int NROW = 4, NCOL = 4, C2_DEPTH = 16, C1_DEPTH = 8, APOD_AW = 9;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [OPERAND_W-1:0] in_sq = '0;
  logic [3:0] in_c2_idx = '0, c2_waddr = '0;
  logic [2:0] in_c1_idx = '0, c1_waddr = '0;
  logic [APOD_AW-1:0] in_apod_idx = '0, out_apod_idx;
  logic [1:0] wr_row = '0, c1_wcol = '0;
  logic c2_we = 0, c1_we = 0;
  logic signed [COEF_W-1:0] wdata = '0;
  logic out_valid, busy;
  logic signed [DLY_W-1:0] delay [NROW][NCOL];
  int checks = 0, failures = 0;

  delay_generator #(.NROW(NROW), .NCOL(NCOL), .C2_DEPTH(C2_DEPTH), .C1_DEPTH(C1_DEPTH),
                    .APOD_AW(APOD_AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [COEF_W-1:0] c2_m [NROW][C2_DEPTH];
  logic signed [COEF_W-1:0] c1_m [NROW][C1_DEPTH][NCOL];

  typedef struct { logic [OPERAND_W-1:0] sq; int a; int b; int ap; int cyc; } vox_t;
  vox_t q [$];
  int ecyc = 0, burst = 0, max_burst = 0;

  always @(posedge clk) begin
    if (rst_n && en) begin
      ecyc <= ecyc + 1;
      if (in_valid) q.push_back('{in_sq, int'(in_c2_idx), int'(in_c1_idx), int'(in_apod_idx), ecyc});
      if (out_valid) begin
        vox_t v;
        v = q.pop_front();
        checks++;
        if (ecyc - v.cyc != 19 || int'(out_apod_idx) != v.ap) begin
          failures++; $display("latency %0d / apod %0d", ecyc - v.cyc, out_apod_idx);
        end
        for (int i = 0; i < NROW; i++)
          for (int j = 0; j < NCOL; j++) begin
            int e;
            e = int'(isqrt(v.sq)) + int'(c2_m[i][v.a]) + int'(c1_m[i][v.b][j]);
            checks++;
            if (int'(delay[i][j]) != e) begin
              failures++;
              if (failures < 10) $display("delay[%0d][%0d] = %0d, expected %0d", i, j, delay[i][j], e);
            end
          end
        burst <= burst + 1;
        if (burst + 1 > max_burst) max_burst <= burst + 1;
      end else burst <= 0;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < NROW; i++) begin
      for (int a = 0; a < C2_DEPTH; a++) begin
        c2_m[i][a] = COEF_W'($urandom_range(0, 2000)) - 16'sd1000;
        wr_row <= 2'(i); c2_we <= 1; c2_waddr <= 4'(a); wdata <= c2_m[i][a];
        @(posedge clk);
      end
      c2_we <= 0;
      for (int b = 0; b < C1_DEPTH; b++)
        for (int j = 0; j < NCOL; j++) begin
          c1_m[i][b][j] = COEF_W'($urandom_range(0, 200)) - 16'sd100;
          wr_row <= 2'(i); c1_we <= 1; c1_waddr <= 3'(b); c1_wcol <= 2'(j); wdata <= c1_m[i][b][j];
          @(posedge clk);
        end
      c1_we <= 0;
    end
    // back-to-back burst of 40 voxels
    for (int n = 0; n < 40; n++) begin
      in_valid <= 1; in_sq <= $urandom; in_c2_idx <= 4'($urandom); in_c1_idx <= 3'($urandom);
      in_apod_idx <= 9'($urandom);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (max_burst != 40) begin failures++; $display("longest burst %0d, expected 40", max_burst); end
    // random traffic with enable gaps
    for (int n = 0; n < 2000; n++) begin
      en <= ($urandom % 4) != 0;
      in_valid <= 1'($urandom);
      in_sq <= $urandom; in_c2_idx <= 4'($urandom); in_c1_idx <= 3'($urandom);
      in_apod_idx <= 9'($urandom);
      @(posedge clk);
    end
    in_valid <= 0; en <= 1;
    repeat (30) @(posedge clk);
    checks++;
    if (busy || q.size() != 0) begin failures++; $display("%0d voxels missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
