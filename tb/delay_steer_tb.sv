// delay_steer_tb: loads random C2 and C1 coefficients, then drives random
// reference delays and coefficient indices (with enable gaps) and checks that
// every delay[j] equals ref + C2[c2_idx] + C1[c1_idx][j] three enabled cycles
// later.
module delay_steer_tb;
  import bf_pkg::*;

  localparam int NCOL = 32, C2_DEPTH = 4096, C1_DEPTH = 64;
  logic clk = 0, en = 0;
  logic [REF_W-1:0] ref_delay = '0;
  logic [11:0] c2_idx = '0, c2_waddr = '0;
  logic [5:0]  c1_idx = '0, c1_waddr = '0;
  logic [4:0]  c1_wcol = '0;
  logic c2_we = 0, c1_we = 0;
  logic signed [COEF_W-1:0] wdata = '0;
  logic signed [DLY_W-1:0] delay [NCOL];
  int checks = 0, failures = 0;

  delay_steer #(.NCOL(NCOL), .C2_DEPTH(C2_DEPTH), .C1_DEPTH(C1_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the coefficient memories, over the entries the test uses
  localparam int NIDX = 16;
  logic signed [COEF_W-1:0] c2_m [NIDX];
  logic signed [COEF_W-1:0] c1_m [NIDX][NCOL];
  logic [11:0] c2_sel [NIDX];

  typedef struct { logic [REF_W-1:0] r; int a; int b; } in_t;
  in_t hist [$];
  bit  checking = 0;

  always @(posedge clk) begin
    if (en) begin
      in_t e;
      e.r = ref_delay;
      e.a = -1; e.b = -1;
      for (int k = 0; k < NIDX; k++) if (c2_sel[k] == c2_idx) e.a = k;
      e.b = int'(c1_idx);
      hist.push_back(e);
      if (hist.size() > 4) begin
        in_t o;
        void'(hist.pop_front());
        o = hist[0];
        if (checking && o.a >= 0) begin
          for (int j = 0; j < NCOL; j++) begin
            int exp_d;
            exp_d = int'(o.r) + int'(c2_m[o.a]) + int'(c1_m[o.b][j]);
            checks++;
            if (int'(delay[j]) != exp_d) begin
              failures++;
              if (failures < 10) $display("delay[%0d] = %0d, expected %0d", j, delay[j], exp_d);
            end
          end
        end
      end
    end
  end

  initial begin
    // distinct C2 addresses spread over the whole BRAM
    for (int k = 0; k < NIDX; k++) c2_sel[k] = 12'(k * 257 + 3);
    @(posedge clk);
    for (int k = 0; k < NIDX; k++) begin
      c2_m[k] = COEF_W'($urandom_range(0, 4000)) - 16'sd2000;
      c2_we <= 1; c2_waddr <= c2_sel[k]; wdata <= c2_m[k];
      @(posedge clk);
    end
    c2_we <= 0;
    for (int k = 0; k < NIDX; k++)
      for (int j = 0; j < NCOL; j++) begin
        c1_m[k][j] = COEF_W'($urandom_range(0, 600)) - 16'sd300;
        c1_we <= 1; c1_waddr <= 6'(k); c1_wcol <= 5'(j); wdata <= c1_m[k][j];
        @(posedge clk);
      end
    c1_we <= 0;
    checking = 1;
    for (int n = 0; n < 2000; n++) begin
      en        <= ($urandom % 4) != 0;
      ref_delay <= REF_W'($urandom_range(0, 60000));
      c2_idx    <= c2_sel[$urandom % NIDX];
      c1_idx    <= 6'($urandom % NIDX);
      @(posedge clk);
    end
    en <= 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
