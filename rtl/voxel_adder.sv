// voxel_adder: the final adder that turns the NROW row sums into one voxel.
//
// Adds the NROW row-adder outputs and registers the result with its valid bit
// on each enabled cycle (one cycle latency). The voxel value is the
// delay-and-sum beamformed echo at the voxel; the final adder follows the
// design description, the width (never overflows) is this design's choice.
module voxel_adder #(
  parameter int NROW  = 32,
  parameter int IN_W  = 22,
  localparam int OUT_W = IN_W + $clog2(NROW)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  row_sum [NROW],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] voxel
);
  logic signed [OUT_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < NROW; i++) acc += OUT_W'(row_sum[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (en) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (en) voxel <= acc;
  end

endmodule
