// sqrt_pipe: pipelined integer square root that produces the reference delay.
//
// The delay generator computes a small set of reference delays with a square
// root and derives all per-element delays from them by additions. The square
// root itself is a vendor CORDIC core in the original system; this module is a
// replacement with the same function, written as the digit-by-digit
// (non-restoring) method: one result bit per stage, subtract-and-compare only,
// no multipliers.
//
// Interface: in_valid/in_x/in_tag enter when en is high; after STAGES cycles
// of en the result out_root = floor(sqrt(in_x)) leaves with its valid and tag.
// en is a global pipeline enable: when low, every stage holds. One operand is
// accepted per enabled cycle. busy is high while any stage holds a valid.
module sqrt_pipe
  import bf_pkg::OPERAND_W;
#(
  parameter int IN_W  = OPERAND_W,
  parameter int TAG_W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                in_valid,
  input  logic [IN_W-1:0]     in_x,
  input  logic [TAG_W-1:0]    in_tag,
  output logic                out_valid,
  output logic [IN_W/2-1:0]   out_root,
  output logic [TAG_W-1:0]    out_tag,
  output logic                busy
);
  localparam int STAGES = IN_W / 2;

  // Stage s holds the partial remainder and the partial root after s steps.
  logic [IN_W-1:0]  rem_q  [STAGES+1];
  logic [IN_W-1:0]  root_q [STAGES+1];
  logic [TAG_W-1:0] tag_q  [STAGES+1];
  logic             vld_q  [STAGES+1];

  always_comb begin
    rem_q[0]  = in_x;
    root_q[0] = '0;
    tag_q[0]  = in_tag;
    vld_q[0]  = in_valid;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    // The trial bit of step s has weight 4^(STAGES-1-s).
    localparam logic [IN_W-1:0] ONE = IN_W'(1) << (2 * (STAGES - 1 - s));
    logic [IN_W-1:0] trial;
    logic            take;
    always_comb begin
      trial = root_q[s] + ONE;
      take  = rem_q[s] >= trial;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vld_q[s+1] <= 1'b0;
      end else if (en) begin
        vld_q[s+1] <= vld_q[s];
      end
    end
    always_ff @(posedge clk) begin
      if (en) begin
        rem_q[s+1]  <= take ? rem_q[s] - trial : rem_q[s];
        root_q[s+1] <= take ? (root_q[s] >> 1) + ONE : (root_q[s] >> 1);
        tag_q[s+1]  <= tag_q[s];
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int s = 1; s <= STAGES; s++) busy |= vld_q[s];
  end

  assign out_valid = vld_q[STAGES];
  assign out_root  = root_q[STAGES][IN_W/2-1:0];
  assign out_tag   = tag_q[STAGES];

endmodule
