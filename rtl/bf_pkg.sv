// bf_pkg: widths, the AXI address map and the voxel-request record shared by
// the beamformer modules.
//
// The 32x32 element count, the two-channels-per-BRAM sharing and the 33 KB
// apodization memory follow the design description. Sample, coefficient and
// delay widths, the echo depth and the address map are this design's own
// choices (the description does not give them).
package bf_pkg;

  // Echo samples are signed RF samples.
  localparam int SAMPLE_W  = 16;
  // Square-root operand and reference delay (in samples, 32 MHz sampling).
  localparam int OPERAND_W = 32;
  localparam int REF_W     = OPERAND_W / 2;
  // Steering coefficients C1 and C2 are signed sample offsets.
  localparam int COEF_W    = 16;
  // A full delay: ref + C2 + C1, signed, two guard bits.
  localparam int DLY_W     = REF_W + 2;

  // AXI4-Lite data width.
  localparam int AXI_DW    = 32;

  // The top three bits of the AXI byte address select a region.
  typedef enum logic [2:0] {
    REG_CTRL = 3'd0,  // status and counters
    REG_APOD = 3'd1,  // apodization masks, 32 elements per word
    REG_C2   = 3'd2,  // C2 steering coefficient per DelaySteer
    REG_C1   = 3'd3,  // C1 steering coefficients per DelaySteer and column
    REG_ECHO = 3'd4   // echo samples, two consecutive samples per word
  } region_e;

  // Control-region word offsets (read only).
  localparam logic [3:0] CTRL_ID     = 4'd0;
  localparam logic [3:0] CTRL_STATUS = 4'd1;
  localparam logic [3:0] CTRL_VOXELS = 4'd2;
  localparam logic [31:0] BF_ID      = 32'h3D5B_F001;

  // AXI response codes.
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

endpackage
