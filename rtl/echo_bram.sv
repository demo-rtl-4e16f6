// echo_bram: echo-sample memory shared by two receive channels.
//
// One block RAM holds the samples of two neighbouring channels, which halves
// the number of BRAMs against one BRAM per channel (the sharing is from the
// design description). The lower half of the array belongs to channel 0, the
// upper half to channel 1. Each channel has its own port: port A reads
// channel 0 at a_addr, port B reads channel 1 at b_addr, both with a
// registered output (one cycle of en). A write stores two consecutive samples
// of one channel at once, the even one through port A and the odd one through
// port B, so a write uses both ports; the owner only writes while no read is
// in flight. Depth and the write format are this design's choices.
module echo_bram
  import bf_pkg::SAMPLE_W;
#(
  parameter int DEPTH = 1024,               // samples per channel
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       en,
  input  logic [AW-1:0]              a_addr,
  input  logic [AW-1:0]              b_addr,
  output logic signed [SAMPLE_W-1:0] a_dout,
  output logic signed [SAMPLE_W-1:0] b_dout,
  input  logic                       we,
  input  logic                       wch,     // 0: channel 0, 1: channel 1
  input  logic [AW-2:0]              wpair,   // sample pair index
  input  logic [2*SAMPLE_W-1:0]      wdata    // {odd sample, even sample}
);
  logic signed [SAMPLE_W-1:0] mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[{wch, wpair, 1'b0}] <= wdata[SAMPLE_W-1:0];
      mem[{wch, wpair, 1'b1}] <= wdata[2*SAMPLE_W-1:SAMPLE_W];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      a_dout <= mem[{1'b0, a_addr}];
      b_dout <= mem[{1'b1, b_addr}];
    end
  end

endmodule
