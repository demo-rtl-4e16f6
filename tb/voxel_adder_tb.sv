// voxel_adder_tb: random row sums (including full-scale extremes) into the
// 32-input final adder; the voxel and its valid must follow one enabled cycle
// later and the valid must clear on reset.
module voxel_adder_tb;
  localparam int NROW = 32, IN_W = 22;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  logic signed [IN_W-1:0] row_sum [NROW];
  logic out_valid;
  logic signed [IN_W+4:0] voxel;
  int checks = 0, failures = 0;

  voxel_adder #(.NROW(NROW), .IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_s;
  bit exp_v, pend = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      pend <= 0;
    end else if (en) begin
      longint s;
      if (pend) begin
        checks++;
        if (out_valid != exp_v || (exp_v && longint'(voxel) != exp_s)) begin
          failures++; $display("voxel %0d/%0b, expected %0d/%0b", voxel, out_valid, exp_s, exp_v);
        end
      end
      s = 0;
      for (int i = 0; i < NROW; i++) s += longint'(row_sum[i]);
      exp_s <= s; exp_v <= in_valid;
      pend <= 1;
    end
  end

  initial begin
    for (int i = 0; i < NROW; i++) row_sum[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("valid set after reset"); end
    for (int n = 0; n < 3000; n++) begin
      int mode;
      mode = n % 10;
      en <= ($urandom % 4) != 0;
      in_valid <= 1'($urandom);
      for (int i = 0; i < NROW; i++)
        row_sum[i] <= (mode == 0) ? {1'b1, {(IN_W-1){1'b0}}} :
                      (mode == 1) ? {1'b0, {(IN_W-1){1'b1}}} : IN_W'($urandom);
      @(posedge clk);
    end
    en <= 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
