// Shared shift/rotate unit on ALU operand 2. Shifting and rotating move bits
// without combining them, so each of the three shares is shifted the same way
// and the output stays uniform. Modes (ti_pkg::shift_e): pass, shift left or
// right with a 0 fed in (a zero in every share), rotate left or right, and
// rotate left or right through the shared carry_in. `shout` carries the
// shares of the bit moved out, which the ALU reports as its carry out for the
// through-carry rotates. Share-wise shifting follows the design; the set of
// modes and the shift distance of one position are this design's own.
// Combinational.
module ti_shift_rotate
  import ti_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  shift_e           mode,
  input  logic [2:0][W-1:0] d,
  input  logic [2:0]       cin,
  output logic [2:0][W-1:0] q,
  output logic [2:0]       shout
);

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      q[k]     = d[k];
      shout[k] = 1'b0;
      unique case (mode)
        SH_NONE: ;
        SH_SHL: begin q[k] = {d[k][W-2:0], 1'b0};      shout[k] = d[k][W-1]; end
        SH_SHR: begin q[k] = {1'b0, d[k][W-1:1]};      shout[k] = d[k][0];   end
        SH_ROL: begin q[k] = {d[k][W-2:0], d[k][W-1]}; shout[k] = d[k][W-1]; end
        SH_ROR: begin q[k] = {d[k][0], d[k][W-1:1]};   shout[k] = d[k][0];   end
        SH_RLC: begin q[k] = {d[k][W-2:0], cin[k]};    shout[k] = d[k][W-1]; end
        SH_RRC: begin q[k] = {cin[k], d[k][W-1:1]};    shout[k] = d[k][0];   end
        default: ;
      endcase
    end
  end

endmodule
