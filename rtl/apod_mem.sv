// apod_mem: trimmed-apodization mask memory.
//
// The trimmed apodization discards, for each voxel, the elements whose echoes
// would be mistimed by the approximate delays or that lie outside the useful
// directivity of the transducer; the remaining elements are summed with equal
// weight. This memory holds one keep-mask of NCH bits (bit = element
// row*NCOL + col, 1 = keep) per apodization zone, and the beamformer picks
// the zone of each voxel by an index that travels with the voxel. The default
// of 264 zones x 1024 bits is exactly 33 KB, the memory size given for the
// scheme; binary weights and the zone indexing are this design's reading of
// "discarding" elements, since the scheme's equations are not given.
//
// Read: mask <= mem[rd_idx] on each enabled cycle (one cycle latency); an
// index past DEPTH reads an all-zero mask. Write: 32 mask bits at a time,
// word wword of zone widx, bit b of the word is element 32*wword + b.
module apod_mem #(
  parameter int NCH    = 1024,
  parameter int DEPTH  = 264,
  localparam int AW    = $clog2(DEPTH),
  localparam int NWORD = (NCH + 31) / 32,
  localparam int WW    = (NWORD > 1) ? $clog2(NWORD) : 1
) (
  input  logic            clk,
  input  logic            en,
  input  logic [AW-1:0]   rd_idx,
  output logic [NCH-1:0]  mask,
  input  logic            we,
  input  logic [AW-1:0]   widx,
  input  logic [WW-1:0]   wword,
  input  logic [31:0]     wdata
);
  logic [NCH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(widx) < DEPTH) begin
      for (int b = 0; b < NCH; b++) begin
        if (32'(wword) == b / 32) mem[widx][b] <= wdata[b % 32];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) mask <= (32'(rd_idx) < DEPTH) ? mem[rd_idx] : '0;
  end

endmodule
