// Functions array of the shared ALU: the iterative shared adder and the
// shared OR, XOR and AND gates, followed by the result multiplexer.
// XOR is share-wise. AND and OR are ti_gate instances with the first sharing
// of each table; their outputs are not yet uniform, which `nonlin` signals to
// the reshare unit downstream. Timing: the Boolean functions are
// combinational and `done` equals `start`; FN_ADD starts the iterative adder
// (X = operand 1, Y = operand 2) and `done` pulses W cycles later, with the
// result held on `res`/`cout` afterwards. Operand 1 must be held while busy.
module ti_functions_array
  import ti_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  alu_fn_e          fn,
  input  logic             start,
  input  logic [2:0][W-1:0] op1,
  input  logic [2:0][W-1:0] op2,
  input  logic [2:0]       cin,
  output logic [2:0][W-1:0] res,
  output logic [2:0]       cout,
  output logic             busy,
  output logic             done,
  output logic             nonlin
);

  logic [2:0][W-1:0] and_f, or_f, xor_f, add_s;
  logic              add_done;

  ti_gate #(.W(W), .F1_TT(AND_F1), .F2_TT(AND_F2), .F3_TT(AND_F3))
    u_and (.x(op1), .y(op2), .f(and_f));
  ti_gate #(.W(W), .F1_TT(OR_F1), .F2_TT(OR_F2), .F3_TT(OR_F3))
    u_or  (.x(op1), .y(op2), .f(or_f));

  assign xor_f = op1 ^ op2;

  ti_iter_adder #(.W(W)) u_add (
    .clk, .rst_n,
    .start(start && fn == FN_ADD),
    .x(op1), .y(op2), .cin,
    .busy, .done(add_done), .sum(add_s), .cout
  );

  always_comb begin
    unique case (fn)
      FN_ADD:  res = add_s;
      FN_OR:   res = or_f;
      FN_XOR:  res = xor_f;
      FN_AND:  res = and_f;
      default: res = xor_f;
    endcase
  end

  assign nonlin = (fn == FN_AND) || (fn == FN_OR);
  assign done   = (fn == FN_ADD) ? add_done : start;

endmodule
