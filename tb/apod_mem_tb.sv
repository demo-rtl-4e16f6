// apod_mem_tb: writes random 1024-bit keep masks into a set of apodization
// zones (32 words each), reads zones back in random order with enable gaps,
// and checks each mask, and the all-zero mask of an index past the 264 zones.
module apod_mem_tb;
  localparam int NCH = 1024, DEPTH = 264;
  logic clk = 0, en = 0, we = 0;
  logic [8:0] rd_idx = '0, widx = '0;
  logic [4:0] wword = '0;
  logic [31:0] wdata = '0;
  logic [NCH-1:0] mask;
  int checks = 0, failures = 0;

  apod_mem #(.NCH(NCH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NZ = 12;
  int zone [NZ];
  logic [NCH-1:0] m [NZ];
  logic [NCH-1:0] expm;
  bit pend = 0;

  always @(posedge clk) begin
    if (en) begin
      if (pend) begin
        checks++;
        if (mask !== expm) begin failures++; $display("mask mismatch"); end
      end
      expm = '0;
      for (int z = 0; z < NZ; z++) if (zone[z] == int'(rd_idx)) expm = m[z];
      pend <= 1;
    end
  end

  initial begin
    for (int z = 0; z < NZ; z++) zone[z] = (z == NZ - 1) ? 263 : z * 23 + 1;
    @(posedge clk);
    for (int z = 0; z < NZ; z++)
      for (int w = 0; w < 32; w++) begin
        m[z][w*32 +: 32] = $urandom;
        we <= 1; widx <= 9'(zone[z]); wword <= 5'(w); wdata <= m[z][w*32 +: 32];
        @(posedge clk);
      end
    // a write past the last zone must change nothing
    we <= 1; widx <= 9'd300; wword <= 0; wdata <= '1;
    @(posedge clk);
    we <= 0;
    for (int n = 0; n < 2000; n++) begin
      en <= ($urandom % 4) != 0;
      if ($urandom % 10 == 0) rd_idx <= 9'($urandom_range(264, 511));
      else rd_idx <= 9'(zone[$urandom % NZ]);
      @(posedge clk);
    end
    en <= 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
