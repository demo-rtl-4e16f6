// row_adder_tb: random signed samples and keep masks (including all-kept
// full-scale rows) into one 32-element row adder; the registered sum must
// equal the sum of the kept samples one enabled cycle later.
module row_adder_tb;
  import bf_pkg::*;
  localparam int NCOL = 32;
  logic clk = 0, en = 0;
  logic signed [SAMPLE_W-1:0] sample [NCOL];
  logic keep [NCOL];
  logic signed [SAMPLE_W+5:0] sum;
  int checks = 0, failures = 0;

  row_adder #(.NCOL(NCOL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_s;
  bit pend = 0;
  always @(posedge clk) begin
    if (en) begin
      longint s;
      if (pend) begin
        checks++;
        if (longint'(sum) != exp_s) begin failures++; $display("sum %0d, expected %0d", sum, exp_s); end
      end
      s = 0;
      for (int j = 0; j < NCOL; j++) if (keep[j]) s += longint'(sample[j]);
      exp_s <= s;
      pend <= 1;
    end
  end

  initial begin
    for (int j = 0; j < NCOL; j++) begin sample[j] = '0; keep[j] = 0; end
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      int mode;
      mode = n % 10;
      en <= ($urandom % 4) != 0;
      for (int j = 0; j < NCOL; j++) begin
        sample[j] <= (mode == 0) ? -16'sd32768 : (mode == 1) ? 16'sd32767 : SAMPLE_W'($urandom);
        keep[j]   <= (mode < 2) ? 1'b1 : 1'($urandom);
      end
      @(posedge clk);
    end
    en <= 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
