// beamformer_tb_body.svh: end-to-end test shared by beamformer_tb (reduced
// sizes) and beamformer_full_tb (default sizes). The including module defines
// NROW, NCOL, ED (echo depth), C2D, C1D, APD, ADDR_W, NBURST and NSTALL, then
// includes this file, instantiates the beamformer as dut on the signals
// declared here, and ends the run on test_done (with a watchdog).
//
// The test loads every echo sample, a few coefficient sets per DelaySteer
// unit and a few apodization zones through AXI, then streams voxel requests
// and compares every voxel with a software delay-and-sum of the same data:
//   voxel = sum over kept (i,j) of echo[i][j][ref + C2_i + C1_i[j]],
//   ref = floor(sqrt(sq)), kept = mask bit set and delay inside the window.
// It checks the 22-cycle latency, one voxel per clock in a burst, output
// back-pressure, an AXI write issued while voxels stream (requests stop, the
// pipeline drains, later voxels see the new coefficients), and counts how
// often each mechanism happened.

  import bf_pkg::*;
  import bf_tb_pkg::isqrt;

  localparam int NCH     = NROW * NCOL;
  localparam int C2_AW   = $clog2(C2D);
  localparam int C1_AW   = $clog2(C1D);
  localparam int APOD_AW = $clog2(APD);
  localparam int COL_W   = (NCOL > 1) ? $clog2(NCOL) : 1;
  localparam int SP_W    = $clog2(ED) - 1;
  localparam int NWORD   = (NCH + 31) / 32;
  localparam int WW      = (NWORD > 1) ? $clog2(NWORD) : 1;
  localparam int VOX_W   = SAMPLE_W + $clog2(NCOL) + 1 + $clog2(NROW);
  localparam int LAT     = 22;
  localparam int NSET    = 4;   // coefficient sets loaded per unit
  localparam int NZONE   = 4;   // apodization zones loaded

  logic clk = 0, rst_n = 0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 1, s_axi_arvalid = 0, s_axi_rready = 1;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [ADDR_W-1:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic [31:0] s_axi_wdata = '0, s_axi_rdata;
  logic [3:0]  s_axi_wstrb = '1;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic req_valid = 0, req_ready;  // request side driven on falling edges
  logic [OPERAND_W-1:0] req_sq = '0;
  logic [C2_AW-1:0] req_c2_idx = '0;
  logic [C1_AW-1:0] req_c1_idx = '0;
  logic [APOD_AW-1:0] req_apod_idx = '0;
  logic vox_valid, vox_ready = 1;
  logic signed [VOX_W-1:0] vox_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // the including module ends the run on test_done, or after WATCHDOG
  // cycles as a failure
  event test_done;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ model
  logic signed [SAMPLE_W-1:0] echo_m [NCH][ED];
  logic signed [COEF_W-1:0]   c2_m [NROW][NSET];
  logic signed [COEF_W-1:0]   c1_m [NROW][NSET][NCOL];
  logic [NCH-1:0]             apod_m [NZONE];
  int c2_sel [NSET], c1_sel [NSET], zone_sel [NZONE];

  // mechanism counters
  int n_discard = 0, n_window = 0, n_out_stall = 0, n_write_stall = 0, n_burst = 0;

  function automatic longint model(logic [OPERAND_W-1:0] sq, int a, int b, int z,
                                   output int discarded, output int outside);
    longint s;
    int r;
    s = 0; discarded = 0; outside = 0;
    r = int'(isqrt(sq));
    for (int i = 0; i < NROW; i++)
      for (int j = 0; j < NCOL; j++) begin
        int d;
        d = r + int'(c2_m[i][a]) + int'(c1_m[i][b][j]);
        if (d < 0 || d >= ED) outside++;
        else if (!apod_m[z][i*NCOL+j]) discarded++;
        else s += longint'(echo_m[i*NCOL+j][d]);
      end
    return s;
  endfunction

  // ------------------------------------------------------------ AXI master
  function automatic logic [ADDR_W-1:0] addr(region_e r, longint off);
    return {r, (ADDR_W-5)'(off), 2'b00};
  endfunction

  task automatic axi_write(logic [ADDR_W-1:0] a, logic [31:0] d);
    s_axi_awvalid <= 1; s_axi_awaddr <= a;
    s_axi_wvalid  <= 1; s_axi_wdata  <= d;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 0; s_axi_wvalid <= 0;
    do @(posedge clk); while (!s_axi_bvalid);
    if (s_axi_bresp != RESP_OKAY) begin failures++; $display("write to %h refused", a); end
  endtask

  task automatic axi_read(logic [ADDR_W-1:0] a, output logic [31:0] d);
    s_axi_arvalid <= 1; s_axi_araddr <= a;
    do @(posedge clk); while (!s_axi_arready);
    s_axi_arvalid <= 0;
    do @(posedge clk); while (!s_axi_rvalid);
    d = s_axi_rdata;
  endtask

  task automatic load_c2(int i, int k, logic signed [COEF_W-1:0] v);
    // the model changes once the write is answered: by then every voxel
    // accepted before it has left the pipeline
    axi_write(addr(REG_C2, (longint'(i) << C2_AW) | c2_sel[k]), 32'(v));
    c2_m[i][k] = v;
  endtask

  // ------------------------------------------------------------ scoreboard
  typedef struct { logic [OPERAND_W-1:0] sq; int a; int b; int z; int cyc; } req_t;
  req_t pend [$];
  int cyc = 0, run = 0, max_run = 0, n_vox = 0;
  int lat_min = 1 << 30, lat_max = 0;
  bit track_lat = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (req_valid && req_ready)
        pend.push_back('{req_sq, int'(req_c2_idx), int'(req_c1_idx), int'(req_apod_idx), cyc});
      if (req_valid && !req_ready && dut.write_pending) n_write_stall++;
      if (vox_valid && !vox_ready) n_out_stall++;
      if (vox_valid && vox_ready) begin
        req_t q;
        longint e;
        int a, b, z, dis, outs;
        q = pend.pop_front();
        a = -1; b = -1; z = -1;
        for (int k = 0; k < NSET; k++) begin
          if (c2_sel[k] == q.a) a = k;
          if (c1_sel[k] == q.b) b = k;
        end
        for (int k = 0; k < NZONE; k++) if (zone_sel[k] == q.z) z = k;
        e = model(q.sq, a, b, z, dis, outs);
        n_discard += dis;
        n_window += outs;
        n_vox++;
        if (track_lat) begin
          if (cyc - q.cyc < lat_min) lat_min = cyc - q.cyc;
          if (cyc - q.cyc > lat_max) lat_max = cyc - q.cyc;
        end
        checks++;
        if (longint'(vox_data) != e) begin
          failures++;
          if (failures < 20) $display("voxel %0d: got %0d, expected %0d", n_vox, vox_data, e);
        end
        run <= run + 1;
        if (run + 1 > max_run) max_run <= run + 1;
      end else if (!vox_valid) run <= 0;
    end
  end

  // Requests change on the falling edge; req_ready seen there holds until
  // the rising edge that takes the request.
  task automatic send_req(bit gaps);
    int k, r;
    k = $urandom % NSET;
    r = $urandom_range(0, ED - 1);
    @(negedge clk);
    req_valid    = 1;
    req_sq       = OPERAND_W'(r * r + $urandom_range(0, 2 * r));
    req_c2_idx   = C2_AW'(c2_sel[$urandom % NSET]);
    req_c1_idx   = C1_AW'(c1_sel[k]);
    req_apod_idx = APOD_AW'(zone_sel[$urandom % NZONE]);
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    if (gaps && $urandom % 3 == 0) begin
      @(negedge clk);
      req_valid = 0;
      @(posedge clk);
    end
  endtask

  task automatic end_reqs();
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    logic [31:0] d;
    for (int k = 0; k < NSET; k++) begin
      c2_sel[k] = (k * (C2D / NSET) + 1) % C2D;
      c1_sel[k] = (k * (C1D / NSET) + 1) % C1D;
    end
    for (int k = 0; k < NZONE; k++) zone_sel[k] = (k == NZONE - 1) ? APD - 1 : k * 2;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    axi_read(addr(REG_CTRL, 0), d);
    check(d == BF_ID, "ID register");

    // echo samples: every channel, every sample pair
    for (int ch = 0; ch < NCH; ch++)
      for (int p = 0; p < ED / 2; p++) begin
        logic [31:0] w;
        w = $urandom;
        echo_m[ch][2*p]   = w[15:0];
        echo_m[ch][2*p+1] = w[31:16];
        axi_write(addr(REG_ECHO, (longint'(ch) << SP_W) | p), w);
      end
    // steering coefficients: NSET sets per DelaySteer unit
    for (int i = 0; i < NROW; i++)
      for (int k = 0; k < NSET; k++) begin
        load_c2(i, k, COEF_W'($urandom_range(0, ED / 4)) - COEF_W'(ED / 8));
        for (int j = 0; j < NCOL; j++) begin
          c1_m[i][k][j] = COEF_W'($urandom_range(0, ED / 4)) - COEF_W'(ED / 8);
          axi_write(addr(REG_C1, (((longint'(i) << C1_AW) | c1_sel[k]) << COL_W) | j),
                    32'(c1_m[i][k][j]));
        end
      end
    // apodization zones: all kept, random, random, half kept
    for (int z = 0; z < NZONE; z++)
      for (int w = 0; w < NWORD; w++) begin
        logic [31:0] v;
        v = (z == 0) ? '1 : (z == NZONE - 1) ? 32'h0000_FFFF : $urandom;
        for (int b = 0; b < 32; b++) if (w * 32 + b < NCH) apod_m[z][w*32+b] = v[b];
        axi_write(addr(REG_APOD, (longint'(zone_sel[z]) << WW) | w), v);
      end
    $display("memories loaded at cycle %0d", cyc);

    // 1) latency and one voxel per clock: a back-to-back burst
    track_lat = 1;
    for (int n = 0; n < NBURST; n++) send_req(0);
    end_reqs();
    repeat (LAT + 5) @(posedge clk);
    track_lat = 0;
    check(lat_min == LAT && lat_max == LAT,
          $sformatf("latency %0d..%0d cycles, expected %0d", lat_min, lat_max, LAT));
    check(max_run == NBURST, $sformatf("burst of %0d voxels came out in runs of %0d", NBURST, max_run));
    if (max_run == NBURST) n_burst++;

    // 2) output back-pressure with request gaps
    fork
      begin
        for (int n = 0; n < NSTALL; n++) send_req(1);
        end_reqs();
      end
      repeat (NSTALL * 2) begin @(posedge clk); vox_ready <= 1'($urandom % 3 != 0); end
    join
    @(posedge clk);
    vox_ready <= 1;
    repeat (LAT + 5) @(posedge clk);

    // 3) coefficient write while voxels stream: requests stop, pipeline
    //    drains, the write lands, later voxels use the new coefficients
    fork
      begin
        for (int n = 0; n < NSTALL; n++) send_req(0);
        end_reqs();
      end
      begin
        repeat (5) @(posedge clk);
        for (int i = 0; i < NROW; i++)
          for (int k = 0; k < NSET; k++) load_c2(i, k, c2_m[i][k] + COEF_W'(3));
      end
    join
    repeat (LAT + 5) @(posedge clk);

    check(n_vox == NBURST + 2 * NSTALL, $sformatf("%0d voxels delivered", n_vox));
    check(pend.size() == 0, $sformatf("%0d voxels missing", pend.size()));
    axi_read(addr(REG_CTRL, 2), d);
    check(int'(d) == n_vox, $sformatf("voxel counter %0d, delivered %0d", d, n_vox));
    $display("voxels %0d, apodization discards %0d, out-of-window %0d, output stalls %0d, write stalls %0d, full-rate bursts %0d",
             n_vox, n_discard, n_window, n_out_stall, n_write_stall, n_burst);
    check(n_discard > 0, "apodization discarded no element");
    check(n_window > 0, "no delay fell outside the echo window");
    check(n_out_stall > 0, "output back-pressure never happened");
    check(n_write_stall > 0, "no request waited for an AXI write");
    check(n_burst > 0, "no full-rate burst");
    -> test_done;
  end
