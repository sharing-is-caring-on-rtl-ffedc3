// Shared one-bit full adder without fresh randomness.
// The sum is the share-wise XOR of the three inputs. The carry
// cout = xy | xc | yc is directly shared so that share A uses only shares B
// and C, share B only C and A, and share C only A and B; this carry sharing
// is uniform, and sum and carry together are uniform for uniform inputs.
// Combinational; the caller must register the outputs before they meet any
// other share-mixing logic.
module ti_full_adder (
  input  logic [2:0] x,   // shares A,B,C of operand bit x
  input  logic [2:0] y,   // shares of operand bit y
  input  logic [2:0] c,   // shares of carry in
  output logic [2:0] s,   // shares of the sum bit
  output logic [2:0] cout // shares of the carry out
);

  logic ax, bx, cx, ay, by, cy, ac, bc, cc;
  assign {cx, bx, ax} = x;
  assign {cy, by, ay} = y;
  assign {cc, bc, ac} = c;

  assign s = x ^ y ^ c;

  assign cout[0] = (bx & by) ^ (bx & cy) ^ (by & cx)
                 ^ (bx & bc) ^ (bx & cc) ^ (bc & cx)
                 ^ (bc & by) ^ (by & cc) ^ (bc & cy);
  assign cout[1] = (cx & cy) ^ (ax & cy) ^ (ay & cx)
                 ^ (cx & cc) ^ (ax & cc) ^ (ac & cx)
                 ^ (cc & cy) ^ (ay & cc) ^ (ac & cy);
  assign cout[2] = (ax & ay) ^ (ax & by) ^ (ay & bx)
                 ^ (ax & ac) ^ (ax & bc) ^ (ac & bx)
                 ^ (ac & ay) ^ (ay & bc) ^ (ac & by);

endmodule
