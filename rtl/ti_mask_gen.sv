// Shared bit-select mask generator with its mask inverter (set/clear choice).
// For bit set and bit clear the ALU XORs operand 1 with the mask produced
// here, so that only the selected bit position changes. The mask is built
// from the shares (A,B,C) of that bit of the operand:
//   M_A = B,  M_B = C ^ set,  M_C = A        (all other bits zero)
// so the result bit shares become (A^B, B^C^set, C^A): they XOR to `set`,
// each depends on only two input shares, and they are uniform whenever the
// operand was. The constant 1 enters a single share (M_B) only when the bit is
// to be set. With `en` low the mask is a shared all-zero word, which the ALU
// uses to pass operand 1 unchanged. This exact mask sharing is this design's
// own. Combinational.
module ti_mask_gen #(
  parameter int unsigned W = 8
) (
  input  logic                 en,
  input  logic [$clog2(W)-1:0] sel,
  input  logic                 set,
  input  logic [2:0][W-1:0]    opnd,
  output logic [2:0][W-1:0]    m
);

  always_comb begin
    m = '0;
    if (en) begin
      m[0][sel] = opnd[1][sel];
      m[1][sel] = opnd[2][sel] ^ set;
      m[2][sel] = opnd[0][sel];
    end
  end

endmodule
