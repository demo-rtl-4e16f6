// bf_axi_lite_tb: drives the AXI4-Lite slave as a bus master. Checks that
// memory writes reach the write bus once with the right region, offset and
// data, in AW-first, W-first and same-cycle order; that a write waits while
// the core is busy (with write_pending high) and fires once it is idle; that
// control-region and unmapped writes answer SLVERR without a write; and that
// reads return the ID, status and voxel count, and SLVERR elsewhere.
module bf_axi_lite_tb;
  import bf_pkg::*;

  localparam int ADDR_W = 24;
  logic clk = 0, rst_n = 0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [ADDR_W-1:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic [31:0] s_axi_wdata = '0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = '1;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic mem_we;
  region_e mem_region;
  logic [ADDR_W-6:0] mem_offset;
  logic [31:0] mem_wdata;
  logic core_idle = 1, write_pending;
  logic [31:0] voxel_count = 32'd1234;
  int checks = 0, failures = 0;

  bf_axi_lite #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record what leaves on the write bus
  typedef struct { region_e r; logic [ADDR_W-6:0] o; logic [31:0] d; } wr_t;
  wr_t seen [$];
  int busy_writes = 0;
  always @(posedge clk) begin
    if (rst_n && mem_we) begin
      seen.push_back('{mem_region, mem_offset, mem_wdata});
      if (!core_idle) busy_writes++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // order: 0 AW first, 1 W first, 2 together
  task automatic axi_write(logic [ADDR_W-1:0] a, logic [31:0] d, int order, output logic [1:0] resp);
    if (order == 1) begin
      s_axi_wvalid <= 1; s_axi_wdata <= d;
      @(posedge clk); while (!s_axi_wready) @(posedge clk);
      s_axi_wvalid <= 0;
    end
    s_axi_awvalid <= 1; s_axi_awaddr <= a;
    if (order == 2) begin s_axi_wvalid <= 1; s_axi_wdata <= d; end
    do @(posedge clk); while (!s_axi_awready);
    s_axi_awvalid <= 0;
    if (order == 2) s_axi_wvalid <= 0;
    if (order == 0) begin
      s_axi_wvalid <= 1; s_axi_wdata <= d;
      do @(posedge clk); while (!s_axi_wready);
      s_axi_wvalid <= 0;
    end
    s_axi_bready <= 1;
    do @(posedge clk); while (!s_axi_bvalid);
    resp = s_axi_bresp;
    s_axi_bready <= 0;
  endtask

  task automatic axi_read(logic [ADDR_W-1:0] a, output logic [31:0] d, output logic [1:0] resp);
    s_axi_arvalid <= 1; s_axi_araddr <= a;
    do @(posedge clk); while (!s_axi_arready);
    s_axi_arvalid <= 0;
    s_axi_rready <= 1;
    do @(posedge clk); while (!s_axi_rvalid);
    d = s_axi_rdata; resp = s_axi_rresp;
    s_axi_rready <= 0;
  endtask

  function automatic logic [ADDR_W-1:0] addr(region_e r, int off);
    return {r, (ADDR_W-5)'(off), 2'b00};
  endfunction

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // memory writes in the three orders
    for (int k = 0; k < 30; k++) begin
      region_e r;
      int off;
      logic [31:0] v;
      r = region_e'(1 + k % 4);
      off = $urandom_range(0, (1 << 19) - 1);
      v = $urandom;
      seen.delete();
      axi_write(addr(r, off), v, k % 3, resp);
      repeat (2) @(posedge clk);
      check(resp == RESP_OKAY, "memory write response");
      check(seen.size() == 1 && seen[0].r == r && int'(seen[0].o) == off && seen[0].d == v,
            $sformatf("write bus for region %0d offset %0d", r, off));
    end
    // control-region and unmapped writes: SLVERR and no write
    seen.delete();
    axi_write(addr(REG_CTRL, 1), 32'hdead, 0, resp);
    check(resp == RESP_SLVERR, "control write answers SLVERR");
    axi_write({3'd6, 21'd8}, 32'hbeef, 2, resp);
    check(resp == RESP_SLVERR, "unmapped write answers SLVERR");
    repeat (2) @(posedge clk);
    check(seen.size() == 0, "no write bus activity for rejected writes");
    // a write waits for the core to be idle
    core_idle <= 0;
    seen.delete();
    fork
      axi_write(addr(REG_ECHO, 77), 32'h1234_5678, 2, resp);
      begin
        repeat (3) @(posedge clk);
        check(write_pending, "write_pending while waiting");
        repeat (20) @(posedge clk);
        check(seen.size() == 0, "write held while core busy");
        core_idle <= 1;
      end
    join
    repeat (2) @(posedge clk);
    check(seen.size() == 1 && busy_writes == 0, "held write fires once idle");
    check(!write_pending, "write_pending clears");
    // reads
    axi_read(addr(REG_CTRL, 0), d, resp);
    check(resp == RESP_OKAY && d == BF_ID, "ID register");
    axi_read(addr(REG_CTRL, 2), d, resp);
    check(resp == RESP_OKAY && d == 32'd1234, "voxel count register");
    core_idle <= 0;
    axi_read(addr(REG_CTRL, 1), d, resp);
    check(resp == RESP_OKAY && d == 32'd1, "status register (busy)");
    core_idle <= 1;
    axi_read(addr(REG_ECHO, 5), d, resp);
    check(resp == RESP_SLVERR, "memory read answers SLVERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
