// echo_buffer: the array of echo BRAMs, read at the delays of one voxel.
//
// NROW x NCOL receive channels are stored in NROW x NCOL/2 echo_bram
// instances, two channels of the same row per BRAM (so 16 BRAMs per row of
// 32). Every enabled cycle each channel (i,j) reads the sample at its delay
// delay[i][j]; a delay outside 0..DEPTH-1 cannot be read and its channel is
// flagged not in range, so that the adders drop it. Data and flags appear one
// enabled cycle after the delays. The BRAM array and its read addressing
// follow the design description; the range check is this design's choice.
//
// Writes: channel number wch = row*NCOL + col and a sample pair index; the
// 32-bit word holds {sample 2p+1, sample 2p}.
module echo_buffer
  import bf_pkg::SAMPLE_W, bf_pkg::DLY_W;
#(
  parameter int NROW  = 32,
  parameter int NCOL  = 32,
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH),
  localparam int CH_W = $clog2(NROW * NCOL)
) (
  input  logic                       clk,
  input  logic                       en,
  input  logic signed [DLY_W-1:0]    delay    [NROW][NCOL],
  output logic signed [SAMPLE_W-1:0] sample   [NROW][NCOL],
  output logic                       in_range [NROW][NCOL],
  input  logic                       we,
  input  logic [CH_W-1:0]            wch,
  input  logic [AW-2:0]              wpair,
  input  logic [2*SAMPLE_W-1:0]      wdata
);
  for (genvar i = 0; i < NROW; i++) begin : g_row
    for (genvar k = 0; k < NCOL / 2; k++) begin : g_bram
      localparam int CH0 = i * NCOL + 2 * k;
      echo_bram #(.DEPTH(DEPTH)) u_bram (
        .clk, .en,
        .a_addr(delay[i][2*k][AW-1:0]),
        .b_addr(delay[i][2*k+1][AW-1:0]),
        .a_dout(sample[i][2*k]),
        .b_dout(sample[i][2*k+1]),
        .we    (we && (wch[CH_W-1:1] == (CH_W-1)'(CH0 / 2))),
        .wch   (wch[0]),
        .wpair,
        .wdata
      );
    end
    for (genvar j = 0; j < NCOL; j++) begin : g_flag
      always_ff @(posedge clk) begin
        if (en) in_range[i][j] <= (delay[i][j] >= 0) && (delay[i][j] < DLY_W'(DEPTH));
      end
    end
  end

endmodule
