// Self-checking test of the shared ALU. Random shared operands; for every
// operation the XOR of the output shares is compared with a reference on the
// unshared values: AND/OR/XOR (single cycle), ADD, SUB, increment and
// decrement (done exactly 8 cycles after start), constant operand, inverted
// operand, shifts and rotates through carry (carry_out = bit shifted out),
// bit set and bit clear, and the gated flags. Also checks that the AND/OR
// result changes its shares with the random bit while its value stays.
module tb_ti_alu;
  import ti_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, rnd = 0;
  alu_ctrl_t ctrl;
  logic [2:0][7:0] reg_1, reg_2, const_in, alu_out;
  logic [2:0] carry_in, carry_out;
  logic busy, done, is_zero, is_one, is_ff;
  int checks = 0, failures = 0;

  ti_alu dut (.clk, .rst_n, .ctrl, .start, .reg_1, .reg_2, .const_in, .carry_in, .rnd,
                       .alu_out, .carry_out, .busy, .done, .is_zero, .is_one, .is_ff);
  always #5 clk = ~clk;

  function automatic logic [7:0] u8(logic [2:0][7:0] v); return v[0] ^ v[1] ^ v[2]; endfunction
  function automatic logic [2:0][7:0] share(logic [7:0] v);
    logic [7:0] a = 8'($urandom), b = 8'($urandom);
    return {v ^ a ^ b, b, a};
  endfunction

  task automatic chk(string what, logic [8:0] got, logic [8:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %03h exp %03h", what, got, exp); end
  endtask

  task automatic base();
    ctrl = '{fn: FN_XOR, op1_sel: OP1_REG, invert: 1'b0, op2_sel: OP2_SHIFT, shift: SH_NONE,
             mask_en: 1'b0, mask_sel: 3'd0, mask_set: 1'b0, cmp_en: 1'b0};
  endtask

  // run one operation, return {carry, result}
  task automatic run(output logic [8:0] r, output int cyc);
    @(negedge clk);
    start = 1; rnd = $urandom;
    #1;
    cyc = 0;
    if (ctrl.fn != FN_ADD) begin
      r = {^carry_out, u8(alu_out)};
      @(negedge clk); start = 0;
    end else begin
      @(negedge clk); start = 0; cyc = 1;
      while (!done && cyc < 20) begin @(negedge clk); cyc++; end
      r = {^carry_out, u8(alu_out)};
    end
  endtask

  initial begin
    logic [7:0] a, b, k; logic c; logic [8:0] r; int cyc; logic [2:0][7:0] o1, o2;
    base(); reg_1 = '0; reg_2 = '0; const_in = '0; carry_in = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      a = 8'($urandom); b = 8'($urandom); k = 8'($urandom); c = $urandom;
      if (n == 0) begin a = 8'h00; b = 8'h01; end
      reg_1 = share(a); reg_2 = share(b); const_in = share(k);
      carry_in = {c ^ 1'b0, 2'($urandom)}; carry_in[2] = c ^ carry_in[1] ^ carry_in[0];
      // Boolean functions
      base(); ctrl.fn = FN_AND; run(r, cyc); chk("and", {1'b0, r[7:0]}, {1'b0, a & b});
      base(); ctrl.fn = FN_OR;  run(r, cyc); chk("or",  {1'b0, r[7:0]}, {1'b0, a | b});
      base(); ctrl.fn = FN_XOR; run(r, cyc); chk("xor", {1'b0, r[7:0]}, {1'b0, a ^ b});
      base(); ctrl.fn = FN_AND; ctrl.op1_sel = OP1_CONST; run(r, cyc);
      chk("andlw", {1'b0, r[7:0]}, {1'b0, k & b});
      // resharing: same inputs, different random bit -> different shares of A
      base(); ctrl.fn = FN_OR; rnd = 0; #1; o1 = alu_out; rnd = 1; #1; o2 = alu_out;
      chk("reshare value", {1'b0, u8(o1)}, {1'b0, u8(o2)});
      chk("reshare bit0", {8'h0, o1[0][0] ^ o2[0][0]}, 9'h001);
      // adder
      base(); ctrl.fn = FN_ADD; carry_in = '0; run(r, cyc);
      chk("add", r, 9'(a) + 9'(b)); chk("add cycles", 9'(cyc), 9'd8);
      base(); ctrl.fn = FN_ADD; ctrl.invert = 1; carry_in = 3'b111; run(r, cyc);
      chk("sub", r, 9'(b) + {1'b0, ~a} + 9'd1);
      base(); ctrl.fn = FN_ADD; ctrl.op1_sel = OP1_ZERO; carry_in = 3'b111; run(r, cyc);
      chk("inc", {1'b0, r[7:0]}, {1'b0, b + 8'd1});
      base(); ctrl.fn = FN_ADD; ctrl.op1_sel = OP1_ZERO; ctrl.invert = 1; carry_in = 3'b110; run(r, cyc);
      chk("dec", {1'b0, r[7:0]}, {1'b0, b - 8'd1});
      // shifts through carry, op1 = 0
      carry_in = {c, 2'b00};
      base(); ctrl.op1_sel = OP1_ZERO; ctrl.shift = SH_RLC; run(r, cyc);
      chk("rlc", r, {b[7], b[6:0], c});
      base(); ctrl.op1_sel = OP1_ZERO; ctrl.shift = SH_RRC; run(r, cyc);
      chk("rrc", r, {b[0], c, b[7:1]});
      // bit set / clear on reg_1
      base(); ctrl.op2_sel = OP2_MASK; ctrl.mask_en = 1; ctrl.mask_sel = 3'(n); ctrl.mask_set = 1;
      run(r, cyc); chk("bset", {1'b0, r[7:0]}, {1'b0, a | (8'd1 << (n % 8))});
      base(); ctrl.op2_sel = OP2_MASK; ctrl.mask_en = 1; ctrl.mask_sel = 3'(n); ctrl.mask_set = 0;
      run(r, cyc); chk("bclr", {1'b0, r[7:0]}, {1'b0, a & ~(8'd1 << (n % 8))});
      // move constant: const XOR shared zero
      base(); ctrl.op1_sel = OP1_CONST; ctrl.op2_sel = OP2_MASK; run(r, cyc);
      chk("movlw", {1'b0, r[7:0]}, {1'b0, k});
      // flags: pass reg_2 through with op1 = 0
      base(); ctrl.op1_sel = OP1_ZERO; ctrl.cmp_en = 1; #1;
      chk("flags", {6'd0, is_zero, is_one, is_ff}, {6'd0, b == 0, b == 1, b == 8'hff});
      base(); ctrl.op1_sel = OP1_ZERO; ctrl.cmp_en = 0; #1;
      chk("flags gated", {6'd0, is_zero, is_one, is_ff}, 9'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
