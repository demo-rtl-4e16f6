// sqrt_pipe_tb: feeds the square-root pipeline one operand per cycle (with
// random enable gaps), compares every root with a bit-by-bit reference and
// checks the 16-cycle latency and the one-result-per-cycle rate.
module sqrt_pipe_tb;
  import bf_pkg::*;
  import bf_tb_pkg::*;

  localparam int TAG_W = 8;
  logic clk = 0, rst_n = 0, en = 1;
  logic in_valid = 0;
  logic [OPERAND_W-1:0] in_x = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid, busy;
  logic [REF_W-1:0] out_root;
  logic [TAG_W-1:0] out_tag;
  int checks = 0, failures = 0;

  sqrt_pipe #(.IN_W(OPERAND_W), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [OPERAND_W-1:0] exp_q [$];
  logic [TAG_W-1:0]     tag_q [$];

  function automatic logic [OPERAND_W-1:0] pick(int n);
    case (n % 6)
      0: return $urandom;
      1: return $urandom & 32'h0000_FFFF;
      2: begin logic [15:0] r = 16'($urandom); return 32'(r) * 32'(r); end
      3: begin logic [15:0] r = 16'($urandom); return 32'(r) * 32'(r) - 1; end
      4: return 32'hFFFF_FFFF - ($urandom & 32'hFF);
      default: return 32'(n);
    endcase
  endfunction

  // scoreboard: operands are recorded as the pipeline takes them, with the
  // count of enabled cycles, and each result must come 16 enabled cycles later
  int ecyc = 0, burst = 0, max_burst = 0;
  int cyc_q [$];
  always @(posedge clk) begin
    if (rst_n && en) begin
      ecyc <= ecyc + 1;
      if (in_valid) begin exp_q.push_back(in_x); tag_q.push_back(in_tag); cyc_q.push_back(ecyc); end
      if (out_valid) begin
        logic [OPERAND_W-1:0] x;
        int c;
        x = exp_q.pop_front();
        c = cyc_q.pop_front();
        checks++;
        if (out_root !== isqrt(x) || out_tag !== tag_q.pop_front() || ecyc - c != 16) begin
          failures++;
          $display("sqrt(%0d): got %0d, expected %0d, latency %0d", x, out_root, isqrt(x), ecyc - c);
        end
        burst <= burst + 1;
        if (burst + 1 > max_burst) max_burst <= burst + 1;
      end else burst <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // throughput: 64 back-to-back operands must give 64 back-to-back results
    for (int k = 0; k < 64; k++) begin
      in_valid <= 1; in_x <= pick(k); in_tag <= 8'(k);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (max_burst != 64) begin failures++; $display("longest burst %0d, expected 64", max_burst); end
    // random traffic with enable gaps
    for (int k = 0; k < 3000; k++) begin
      logic v; logic [OPERAND_W-1:0] x;
      v = ($urandom % 4) != 0;
      x = pick($urandom);
      en <= ($urandom % 5) != 0;
      in_valid <= v; in_x <= x; in_tag <= 8'(k);
      @(posedge clk);
    end
    in_valid <= 0; en <= 1;
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || busy) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
