// Three-share threshold-implementation ALU for an 8-bit microcontroller.
// Every data input and output is a uniform three-share sharing; only the
// control word and the comparison flags are unshared.
// Datapath: operand 1 is reg_1, the shared constant or a shared zero, then
// optionally inverted (share A only). Operand 2 is reg_2 after the
// shift/rotate unit, or the bit-select mask built from reg_1 (a shared zero
// when the mask is disabled). The functions array adds (iteratively, W
// cycles), ANDs, ORs or XORs them; the reshare unit then refreshes the AND/OR
// result with one fresh random bit `rnd` and share C of operand 2, so the ALU
// needs one random bit per clock cycle. carry_out is the adder carry for
// FN_ADD and the shifted-out bit otherwise. The gated comparison units give
// is_zero (result), is_one and is_ff (reg_2) only while ctrl.cmp_en is high.
// Timing: for AND/OR/XOR `done` equals `start` and alu_out is valid in the
// same cycle; for FN_ADD `done` pulses W cycles after `start`, and ctrl and
// the operands must be held until then. Bit set/clear uses the XOR function
// with the mask; increment/decrement use the adder with a zero operand 1
// (inverted for decrement) and carry-in shares chosen by the controller.
module ti_alu
  import ti_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  alu_ctrl_t        ctrl,
  input  logic             start,
  input  logic [2:0][W-1:0] reg_1,
  input  logic [2:0][W-1:0] reg_2,
  input  logic [2:0][W-1:0] const_in,
  input  logic [2:0]       carry_in,
  input  logic             rnd,
  output logic [2:0][W-1:0] alu_out,
  output logic [2:0]       carry_out,
  output logic             busy,
  output logic             done,
  output logic             is_zero,
  output logic             is_one,
  output logic             is_ff
);

  logic [2:0][W-1:0] op1_sel, op_1, op_2, shifted, mask, fa_res;
  logic [2:0]        shout, fa_cout;
  logic              nonlin;

  always_comb begin
    unique case (ctrl.op1_sel)
      OP1_REG:   op1_sel = reg_1;
      OP1_CONST: op1_sel = const_in;
      default:   op1_sel = '0;
    endcase
  end

  ti_inverter #(.W(W)) u_inv (.inv(ctrl.invert), .d(op1_sel), .q(op_1));

  ti_shift_rotate #(.W(W)) u_shift (
    .mode(ctrl.shift), .d(reg_2), .cin(carry_in), .q(shifted), .shout);

  ti_mask_gen #(.W(W)) u_mask (
    .en(ctrl.mask_en), .sel(ctrl.mask_sel[$clog2(W)-1:0]), .set(ctrl.mask_set),
    .opnd(reg_1), .m(mask));

  assign op_2 = (ctrl.op2_sel == OP2_MASK) ? mask : shifted;

  ti_functions_array #(.W(W)) u_fa (
    .clk, .rst_n, .fn(ctrl.fn), .start, .op1(op_1), .op2(op_2), .cin(carry_in),
    .res(fa_res), .cout(fa_cout), .busy, .done, .nonlin);

  ti_reshare #(.W(W)) u_reshare (
    .en(nonlin), .rnd, .vsrc(op_2[2]), .f(fa_res), .q(alu_out));

  assign carry_out = (ctrl.fn == FN_ADD) ? fa_cout : shout;

  // the control word must be held while an addition is running
  a_ctrl_stable: assert property (@(posedge clk) disable iff (!rst_n) busy |-> $stable(ctrl))
    else $error("ti_alu: control word changed during an addition");

  alu_compare #(.W(W)) u_cmp (
    .en(ctrl.cmp_en), .res(alu_out), .opnd(reg_2), .is_zero, .is_one, .is_ff);

endmodule
