// bf_tb_pkg: reference models shared by the beamformer testbenches.
package bf_tb_pkg;
  import bf_pkg::*;

  // Floor of the square root, found bit by bit with a 64-bit square compare
  // (a different method from the pipelined unit under test).
  function automatic logic [REF_W-1:0] isqrt(input logic [OPERAND_W-1:0] x);
    logic [63:0] r, t;
    r = '0;
    for (int b = REF_W - 1; b >= 0; b--) begin
      t = r | (64'd1 << b);
      if (t * t <= 64'(x)) r = t;
    end
    return r[REF_W-1:0];
  endfunction
endpackage
