// row_adder: one of the NROW row adders (Adder[i]) of the beamformer.
//
// Sums the echo samples of the NCOL elements of one transducer row that are
// kept: an element's sample enters the sum only when its apodization mask bit
// is set and its delay fell inside the stored echo window. The per-row adder
// stage follows the design description; applying the apodization as a keep
// mask here is this design's choice. The sum is registered on each enabled
// cycle (one cycle latency) and is wide enough never to overflow.
module row_adder
  import bf_pkg::SAMPLE_W;
#(
  parameter int NCOL  = 32,
  localparam int SUM_W = SAMPLE_W + $clog2(NCOL) + 1
) (
  input  logic                       clk,
  input  logic                       en,
  input  logic signed [SAMPLE_W-1:0] sample [NCOL],
  input  logic                       keep   [NCOL],
  output logic signed [SUM_W-1:0]    sum
);
  logic signed [SUM_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int j = 0; j < NCOL; j++) begin
      if (keep[j]) acc += SUM_W'(sample[j]);
    end
  end

  always_ff @(posedge clk) begin
    if (en) sum <= acc;
  end

endmodule
