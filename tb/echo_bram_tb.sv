// echo_bram_tb: fills both channels of a shared echo BRAM with random sample
// pairs, then reads random addresses on both ports (with enable gaps) and
// checks each port returns its own channel's sample one enabled cycle later.
module echo_bram_tb;
  import bf_pkg::*;

  localparam int DEPTH = 1024;
  logic clk = 0, en = 0, we = 0, wch = 0;
  logic [9:0] a_addr = '0, b_addr = '0;
  logic [8:0] wpair = '0;
  logic [31:0] wdata = '0;
  logic signed [SAMPLE_W-1:0] a_dout, b_dout;
  int checks = 0, failures = 0;

  echo_bram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [SAMPLE_W-1:0] m [2][DEPTH];
  logic signed [SAMPLE_W-1:0] ea, eb;
  bit pend = 0;

  always @(posedge clk) begin
    if (en) begin
      if (pend) begin
        checks += 2;
        if (a_dout !== ea || b_dout !== eb) begin
          failures++;
          $display("read: got %0d/%0d, expected %0d/%0d", a_dout, b_dout, ea, eb);
        end
      end
      ea <= m[0][a_addr];
      eb <= m[1][b_addr];
      pend <= !we;
    end
  end

  initial begin
    @(posedge clk);
    for (int c = 0; c < 2; c++)
      for (int p = 0; p < DEPTH / 2; p++) begin
        logic [31:0] d;
        d = $urandom;
        m[c][2*p]   = d[15:0];
        m[c][2*p+1] = d[31:16];
        we <= 1; wch <= 1'(c); wpair <= 9'(p); wdata <= d;
        @(posedge clk);
      end
    we <= 0;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      en <= ($urandom % 5) != 0;
      a_addr <= 10'($urandom);
      b_addr <= 10'($urandom);
      @(posedge clk);
    end
    en <= 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
