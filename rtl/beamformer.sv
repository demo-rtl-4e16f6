// beamformer: delay-and-sum 3D ultrasound receive beamformer, one voxel per
// clock, for a matrix probe of NROW x NCOL elements (32 x 32 by default).
//
// For every voxel the beamformer needs the two-way travel time from the
// transmit origin to the voxel and back to each of the 1024 elements, reads
// the echo sample of each element at that delay, and sums the samples of the
// elements the apodization keeps. Delays are not computed with one square
// root each: one square root per voxel gives a reference delay, and each
// element's delay is the reference plus a row coefficient C2 plus a column
// coefficient C1 (two additions). The datapath:
//
//   voxel request -> delay_generator (sqrt, NROW DelaySteer units)
//                 -> echo_buffer (NROW x NCOL/2 dual-channel echo BRAMs)
//                    + apod_mem (keep mask of the voxel's apodization zone)
//                 -> NROW row_adder -> voxel_adder -> voxel
//
// That structure, the 32x32 default, two channels per BRAM, one voxel per
// clock and the 33 KB apodization memory follow the design description. The
// request format, the squared distance as sqrt input, the binary apodization
// mask, the memory depths, the address map and the stall rules are this
// design's own choices.
//
// Interfaces (all synchronous to clk, active-low synchronous reset):
//  * AXI4-Lite slave s_axi_* (see bf_axi_lite) loads all memories.
//  * Voxel requests: req_valid/req_ready with req_sq (squared reference
//    distance in samples^2), req_c2_idx, req_c1_idx (steering coefficient
//    sets) and req_apod_idx (apodization zone).
//  * Voxels: vox_valid/vox_ready with vox_data, in request order.
// Timing: a request accepted in cycle t gives its voxel in cycle t+LATENCY
// (22) if the output is never stalled; one request per cycle is accepted.
// vox_ready low freezes the whole pipeline (and stops requests); a pending
// AXI memory write stops requests until the pipeline has drained, then writes.
module beamformer
  import bf_pkg::*;
#(
  parameter int NROW       = 32,
  parameter int NCOL       = 32,
  parameter int ECHO_DEPTH = 1024,
  parameter int C2_DEPTH   = 4096,
  parameter int C1_DEPTH   = 64,
  parameter int APOD_DEPTH = 264,
  parameter int ADDR_W     = 24,
  localparam int NCH       = NROW * NCOL,
  localparam int C2_AW     = $clog2(C2_DEPTH),
  localparam int C1_AW     = $clog2(C1_DEPTH),
  localparam int APOD_AW   = $clog2(APOD_DEPTH),
  localparam int ROW_SUM_W = SAMPLE_W + $clog2(NCOL) + 1,
  localparam int VOX_W     = ROW_SUM_W + $clog2(NROW),
  localparam int LATENCY   = OPERAND_W / 2 + 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // AXI4-Lite slave
  input  logic                    s_axi_awvalid,
  output logic                    s_axi_awready,
  input  logic [ADDR_W-1:0]       s_axi_awaddr,
  input  logic                    s_axi_wvalid,
  output logic                    s_axi_wready,
  input  logic [31:0]             s_axi_wdata,
  input  logic [3:0]              s_axi_wstrb,
  output logic                    s_axi_bvalid,
  input  logic                    s_axi_bready,
  output logic [1:0]              s_axi_bresp,
  input  logic                    s_axi_arvalid,
  output logic                    s_axi_arready,
  input  logic [ADDR_W-1:0]       s_axi_araddr,
  output logic                    s_axi_rvalid,
  input  logic                    s_axi_rready,
  output logic [31:0]             s_axi_rdata,
  output logic [1:0]              s_axi_rresp,
  // voxel requests
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic [OPERAND_W-1:0]    req_sq,
  input  logic [C2_AW-1:0]        req_c2_idx,
  input  logic [C1_AW-1:0]        req_c1_idx,
  input  logic [APOD_AW-1:0]      req_apod_idx,
  // beamformed voxels
  output logic                    vox_valid,
  input  logic                    vox_ready,
  output logic signed [VOX_W-1:0] vox_data
);
  localparam int OFF_W   = ADDR_W - 5;
  localparam int ROW_W   = (NROW > 1) ? $clog2(NROW) : 1;
  localparam int COL_W   = (NCOL > 1) ? $clog2(NCOL) : 1;
  localparam int CH_W    = $clog2(NCH);
  localparam int SP_W    = $clog2(ECHO_DEPTH) - 1;
  localparam int NWORD   = (NCH + 31) / 32;
  localparam int WW      = (NWORD > 1) ? $clog2(NWORD) : 1;

  if (CH_W + SP_W > OFF_W || ROW_W + C2_AW > OFF_W ||
      ROW_W + C1_AW + COL_W > OFF_W || APOD_AW + WW > OFF_W) begin : g_bad_map
    $error("beamformer: ADDR_W too small for the memory sizes");
  end

  // ---------------------------------------------------------------- control
  logic en, busy, write_pending;
  logic dg_busy, dg_valid, d_valid, e_valid;
  logic [31:0] voxel_count;

  assign en        = !(vox_valid && !vox_ready);
  assign req_ready = en && !write_pending;
  assign busy      = dg_busy || dg_valid || d_valid || e_valid || vox_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) voxel_count <= '0;
    else if (vox_valid && vox_ready) voxel_count <= voxel_count + 1;
  end

  // ---------------------------------------------------------------- AXI slave
  logic              mem_we;
  region_e           mem_region;
  logic [OFF_W-1:0]  mem_offset;
  logic [31:0]       mem_wdata;

  bf_axi_lite #(.ADDR_W(ADDR_W)) u_axi (
    .clk, .rst_n,
    .s_axi_awvalid, .s_axi_awready, .s_axi_awaddr,
    .s_axi_wvalid, .s_axi_wready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_bvalid, .s_axi_bready, .s_axi_bresp,
    .s_axi_arvalid, .s_axi_arready, .s_axi_araddr,
    .s_axi_rvalid, .s_axi_rready, .s_axi_rdata, .s_axi_rresp,
    .mem_we, .mem_region, .mem_offset, .mem_wdata,
    .core_idle(!busy),
    .write_pending,
    .voxel_count
  );

  // ------------------------------------------------------- delay generator
  logic signed [DLY_W-1:0] delay [NROW][NCOL];
  logic [APOD_AW-1:0]      dg_apod_idx;

  delay_generator #(
    .NROW(NROW), .NCOL(NCOL), .C2_DEPTH(C2_DEPTH), .C1_DEPTH(C1_DEPTH), .APOD_AW(APOD_AW)
  ) u_dgen (
    .clk, .rst_n, .en,
    .in_valid    (req_valid && req_ready),
    .in_sq       (req_sq),
    .in_c2_idx   (req_c2_idx),
    .in_c1_idx   (req_c1_idx),
    .in_apod_idx (req_apod_idx),
    .wr_row      (mem_region == REG_C2 ? mem_offset[C2_AW +: ROW_W]
                                       : mem_offset[COL_W + C1_AW +: ROW_W]),
    .c2_we       (mem_we && mem_region == REG_C2),
    .c2_waddr    (mem_offset[C2_AW-1:0]),
    .c1_we       (mem_we && mem_region == REG_C1),
    .c1_waddr    (mem_offset[COL_W +: C1_AW]),
    .c1_wcol     (mem_offset[COL_W-1:0]),
    .wdata       (mem_wdata[COEF_W-1:0]),
    .out_valid   (dg_valid),
    .out_apod_idx(dg_apod_idx),
    .delay       (delay),
    .busy        (dg_busy)
  );

  // ---------------------------------------------------- echo BRAMs, masks
  logic signed [SAMPLE_W-1:0] sample   [NROW][NCOL];
  logic                       in_range [NROW][NCOL];
  logic [NCH-1:0]             apod_mask;

  echo_buffer #(.NROW(NROW), .NCOL(NCOL), .DEPTH(ECHO_DEPTH)) u_echo (
    .clk, .en,
    .delay,
    .sample,
    .in_range,
    .we    (mem_we && mem_region == REG_ECHO),
    .wch   (mem_offset[SP_W +: CH_W]),
    .wpair (mem_offset[SP_W-1:0]),
    .wdata (mem_wdata)
  );

  apod_mem #(.NCH(NCH), .DEPTH(APOD_DEPTH)) u_apod (
    .clk, .en,
    .rd_idx(dg_apod_idx),
    .mask  (apod_mask),
    .we    (mem_we && mem_region == REG_APOD),
    .widx  (mem_offset[WW +: APOD_AW]),
    .wword (mem_offset[WW-1:0]),
    .wdata (mem_wdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      e_valid <= 1'b0;
    end else if (en) begin
      d_valid <= dg_valid;
      e_valid <= d_valid;
    end
  end

  // ------------------------------------------------------------ adders
  logic signed [ROW_SUM_W-1:0] row_sum [NROW];

  for (genvar i = 0; i < NROW; i++) begin : g_row
    logic keep [NCOL];
    for (genvar j = 0; j < NCOL; j++) begin : g_keep
      assign keep[j] = in_range[i][j] && apod_mask[i*NCOL + j];
    end
    row_adder #(.NCOL(NCOL)) u_row (
      .clk, .en,
      .sample(sample[i]),
      .keep  (keep),
      .sum   (row_sum[i])
    );
  end

  voxel_adder #(.NROW(NROW), .IN_W(ROW_SUM_W)) u_vox (
    .clk, .rst_n, .en,
    .in_valid (e_valid),
    .row_sum  (row_sum),
    .out_valid(vox_valid),
    .voxel    (vox_data)
  );

  // a voxel request is held until it is accepted
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid && $stable(req_sq));

endmodule
