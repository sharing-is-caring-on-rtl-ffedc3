// Comparison units of the shared ALU, with operand isolation.
// The flags compare an unshared value with a constant and therefore have to
// recombine the shares; to keep protected data from being unmasked, both
// inputs are gated to zero unless `en` is high, which the controller asserts
// only while a branch (skip) instruction is executed. is_zero tests the ALU
// result, is_one and is_ff test the register operand. All flags are low while
// `en` is low. Gating by a single enable follows the design; the choice of
// which operand each flag tests is read from the ALU block diagram.
// Combinational.
module alu_compare #(
  parameter int unsigned W = 8
) (
  input  logic             en,
  input  logic [2:0][W-1:0] res,
  input  logic [2:0][W-1:0] opnd,
  output logic             is_zero,
  output logic             is_one,
  output logic             is_ff
);

  logic [2:0][W-1:0] res_g, opnd_g;
  logic [W-1:0]      res_u, opnd_u;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      res_g[k]  = res[k]  & {W{en}};
      opnd_g[k] = opnd[k] & {W{en}};
    end
    res_u  = res_g[0] ^ res_g[1] ^ res_g[2];
    opnd_u = opnd_g[0] ^ opnd_g[1] ^ opnd_g[2];
    is_zero = en && (res_u == '0);
    is_one  = en && (opnd_u == W'(1));
    is_ff   = en && (opnd_u == '1);
  end

endmodule
