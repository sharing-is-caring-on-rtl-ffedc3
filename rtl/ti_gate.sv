// Shared two-input Boolean gate of a three-share threshold implementation.
// Each of the W bit positions evaluates the three component functions
//   share A = F1(Bx,By,Cx,Cy), share B = F2(Ax,Ay,Cx,Cy), share C = F3(Ax,Ay,Bx,By)
// as 16-entry truth tables, so every output share misses one input share
// (non-completeness) and the XOR of the outputs is the gate applied to the
// unshared inputs (correctness). The defaults are AND sharing #1 of the
// published sharing tables; instantiate with OR_F1..OR_F3 for the OR gate.
// F1 and F2 are not uniform, so the outputs must pass through ti_reshare
// before they are stored. Purely combinational.
module ti_gate
  import ti_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter logic [15:0] F1_TT = AND_F1,
  parameter logic [15:0] F2_TT = AND_F2,
  parameter logic [15:0] F3_TT = AND_F3
) (
  input  logic [2:0][W-1:0] x,
  input  logic [2:0][W-1:0] y,
  output logic [2:0][W-1:0] f
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      f[0][i] = F1_TT[{y[2][i], x[2][i], y[1][i], x[1][i]}];
      f[1][i] = F2_TT[{y[2][i], x[2][i], y[0][i], x[0][i]}];
      f[2][i] = F3_TT[{y[1][i], x[1][i], y[0][i], x[0][i]}];
    end
  end

endmodule
