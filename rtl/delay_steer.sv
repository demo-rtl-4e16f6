// delay_steer: one DelaySteer unit, turning a reference delay into the receive
// delays of one row of elements with two additions per delay.
//
// The delay of element (row i, column j) is approximated as
//   delay[i][j] = ref + C2 + C1[j]
// where ref is the exact reference delay of the voxel (from the square root),
// C2 is the row's steering coefficient, read from a BRAM, and C1[j] are the
// NCOL column coefficients, read from a small LUT. This structure (register,
// BRAM-fed first adder, LUT-fed second adder fanned out NCOL times) follows
// the design description. The coefficients depend on the steering direction
// of the voxel; this design indexes the C2 BRAM with c2_idx and the C1 LUT
// with c1_idx, both supplied with each voxel, and both memories are written
// through a simple write port. Depths and widths are this design's choices.
//
// Timing: three cycles of en from (ref, c2_idx, c1_idx) to delay[]:
//   1: reg <= ref, C2 and C1 memories read (registered read)
//   2: first adder  sum1 <= reg + C2
//   3: second adder delay[j] <= sum1 + C1[j]
// en is the global pipeline enable; all stages hold while it is low.
module delay_steer
  import bf_pkg::REF_W, bf_pkg::COEF_W, bf_pkg::DLY_W;
#(
  parameter int NCOL     = 32,
  parameter int C2_DEPTH = 4096,
  parameter int C1_DEPTH = 64,
  localparam int C2_AW   = $clog2(C2_DEPTH),
  localparam int C1_AW   = $clog2(C1_DEPTH),
  localparam int COL_W   = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [REF_W-1:0]         ref_delay,
  input  logic [C2_AW-1:0]         c2_idx,
  input  logic [C1_AW-1:0]         c1_idx,
  // coefficient write port
  input  logic                     c2_we,
  input  logic [C2_AW-1:0]         c2_waddr,
  input  logic                     c1_we,
  input  logic [C1_AW-1:0]         c1_waddr,
  input  logic [COL_W-1:0]         c1_wcol,
  input  logic signed [COEF_W-1:0] wdata,
  output logic signed [DLY_W-1:0]  delay [NCOL]
);
  logic signed [COEF_W-1:0] c2_mem [C2_DEPTH];
  logic signed [COEF_W-1:0] c1_mem [C1_DEPTH][NCOL];

  always_ff @(posedge clk) begin
    if (c2_we) c2_mem[c2_waddr] <= wdata;
    if (c1_we) c1_mem[c1_waddr][c1_wcol] <= wdata;
  end

  // stage 1: reference register and coefficient reads
  logic        [REF_W-1:0]  ref_q;
  logic signed [COEF_W-1:0] c2_q;
  logic signed [COEF_W-1:0] c1_q [NCOL];
  // stage 2: first adder
  logic signed [DLY_W-1:0]  sum1_q;
  logic signed [COEF_W-1:0] c1_d [NCOL];

  always_ff @(posedge clk) begin
    if (en) begin
      ref_q  <= ref_delay;
      c2_q   <= c2_mem[c2_idx];
      c1_q   <= c1_mem[c1_idx];
      sum1_q <= DLY_W'($signed({1'b0, ref_q})) + DLY_W'(c2_q);
      c1_d   <= c1_q;
      for (int j = 0; j < NCOL; j++) delay[j] <= sum1_q + DLY_W'(c1_d[j]);
    end
  end

endmodule
