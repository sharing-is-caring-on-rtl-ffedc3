// Shared bit inverter for ALU operand 1. Inverting a shared value only needs
// one share to be inverted: share A is XORed with all ones when `inv` is
// high, shares B and C pass unchanged. Uniformity is preserved, so no
// resharing is needed. Combinational.
module ti_inverter #(
  parameter int unsigned W = 8
) (
  input  logic             inv,
  input  logic [2:0][W-1:0] d,
  output logic [2:0][W-1:0] q
);

  assign q[0] = d[0] ^ {W{inv}};
  assign q[1] = d[1];
  assign q[2] = d[2];

endmodule
