// delay_generator: computes the NROW x NCOL receive delays of one voxel.
//
// A single square-root unit produces the voxel's reference delay, which is
// loaded into the reference register of every DelaySteer unit; each of the
// NROW units then adds its row coefficient C2 and the NCOL column coefficients
// C1 (see delay_steer). Only one square root per voxel is needed, and two
// additions per delay. The one-sqrt-to-NROW-units structure follows the design
// description; passing the same reference to all rows and supplying the
// squared distance with each voxel are this design's choices.
//
// Interface: a voxel enters with in_valid, the squared reference distance
// in_sq (in samples^2), the steering indices c2_idx/c1_idx and an apodization
// index that only travels along. After SQRT_LAT + 3 enabled cycles out_valid
// rises with delay[][] and out_apod_idx. One voxel per enabled cycle.
// Coefficient writes address one DelaySteer unit (wr_row).
module delay_generator
  import bf_pkg::OPERAND_W, bf_pkg::REF_W, bf_pkg::COEF_W, bf_pkg::DLY_W;
#(
  parameter int NROW       = 32,
  parameter int NCOL       = 32,
  parameter int C2_DEPTH   = 4096,
  parameter int C1_DEPTH   = 64,
  parameter int APOD_AW    = 9,
  localparam int C2_AW     = $clog2(C2_DEPTH),
  localparam int C1_AW     = $clog2(C1_DEPTH),
  localparam int ROW_W     = (NROW > 1) ? $clog2(NROW) : 1,
  localparam int COL_W     = (NCOL > 1) ? $clog2(NCOL) : 1,
  localparam int SQRT_LAT  = OPERAND_W / 2,
  localparam int LATENCY   = SQRT_LAT + 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     in_valid,
  input  logic [OPERAND_W-1:0]     in_sq,
  input  logic [C2_AW-1:0]         in_c2_idx,
  input  logic [C1_AW-1:0]         in_c1_idx,
  input  logic [APOD_AW-1:0]       in_apod_idx,
  // coefficient write port
  input  logic [ROW_W-1:0]         wr_row,
  input  logic                     c2_we,
  input  logic [C2_AW-1:0]         c2_waddr,
  input  logic                     c1_we,
  input  logic [C1_AW-1:0]         c1_waddr,
  input  logic [COL_W-1:0]         c1_wcol,
  input  logic signed [COEF_W-1:0] wdata,
  // delays of one voxel
  output logic                     out_valid,
  output logic [APOD_AW-1:0]       out_apod_idx,
  output logic signed [DLY_W-1:0]  delay [NROW][NCOL],
  output logic                     busy
);
  localparam int TAG_W = C2_AW + C1_AW + APOD_AW;

  logic             sq_valid, sq_busy;
  logic [REF_W-1:0] sq_root;
  logic [TAG_W-1:0] sq_tag;
  logic [C2_AW-1:0] sq_c2_idx;
  logic [C1_AW-1:0] sq_c1_idx;
  logic [APOD_AW-1:0] sq_apod_idx;

  sqrt_pipe #(.IN_W(OPERAND_W), .TAG_W(TAG_W)) u_sqrt (
    .clk, .rst_n, .en,
    .in_valid (in_valid),
    .in_x     (in_sq),
    .in_tag   ({in_c2_idx, in_c1_idx, in_apod_idx}),
    .out_valid(sq_valid),
    .out_root (sq_root),
    .out_tag  (sq_tag),
    .busy     (sq_busy)
  );
  assign {sq_c2_idx, sq_c1_idx, sq_apod_idx} = sq_tag;

  for (genvar i = 0; i < NROW; i++) begin : g_steer
    delay_steer #(.NCOL(NCOL), .C2_DEPTH(C2_DEPTH), .C1_DEPTH(C1_DEPTH)) u_steer (
      .clk, .en,
      .ref_delay(sq_root),
      .c2_idx   (sq_c2_idx),
      .c1_idx   (sq_c1_idx),
      .c2_we    (c2_we && wr_row == ROW_W'(i)),
      .c2_waddr,
      .c1_we    (c1_we && wr_row == ROW_W'(i)),
      .c1_waddr,
      .c1_wcol,
      .wdata,
      .delay    (delay[i])
    );
  end

  // valid and apodization index follow the three DelaySteer stages
  logic [2:0]         vld_q;
  logic [APOD_AW-1:0] apod_q [3];
  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else if (en) vld_q <= {vld_q[1:0], sq_valid};
  end
  always_ff @(posedge clk) begin
    if (en) begin
      apod_q[0] <= sq_apod_idx;
      apod_q[1] <= apod_q[0];
      apod_q[2] <= apod_q[1];
    end
  end

  assign out_valid    = vld_q[2];
  assign out_apod_idx = apod_q[2];
  assign busy         = sq_busy || (|vld_q);

endmodule
