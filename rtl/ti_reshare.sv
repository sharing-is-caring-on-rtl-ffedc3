// Reshare unit: restores uniformity after the shared AND or OR gate.
// The chosen AND and OR sharings have a uniform third component function, so
// only shares A (F1) and B (F2) are refreshed, both with the same virtual
// variable v. For bit 0, v is the one fresh random bit `rnd`; for bit i > 0,
// v is bit i-1 of the supplied independent share `vsrc` (the ALU passes share
// C of operand 2). Since v enters two shares, the output XOR is unchanged.
// With `en` low the input passes unchanged (XOR, adder and shift results are
// already uniform). One random bit per use. Combinational.
module ti_reshare #(
  parameter int unsigned W = 8
) (
  input  logic             en,
  input  logic             rnd,
  input  logic [W-1:0]     vsrc,
  input  logic [2:0][W-1:0] f,
  output logic [2:0][W-1:0] q
);

  logic [W-1:0] v;

  always_comb begin
    v = {vsrc[W-2:0], rnd} & {W{en}};
    q[0] = f[0] ^ v;
    q[1] = f[1] ^ v;
    q[2] = f[2];
  end

endmodule
