// Self-checking test of the control FSM: presents instruction words one at a
// time and checks the decoded ALU controls, the register addresses, the
// write-back timing (EXEC for single-cycle instructions, after the ALU done
// pulse for adder instructions), the carry-in shares for SUB/INC/DEC, skip
// decisions from the flags and the jump address built from PAGE.
module tb_control_fsm;
  import ti_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic [15:0] instr;
  logic [7:0] const_b = 8'h5a, const_c = 8'hc3;
  logic alu_done = 0, is_zero = 0, is_one = 0, is_ff = 0;
  logic [2:0] status_carry = 3'b101;
  logic [2:0][7:0] page, const_sh;
  alu_ctrl_t alu_ctrl;
  logic alu_start, we, c_we, pc_adv, pc_skip, pc_load;
  logic [2:0] carry_in;
  logic [5:0] raddr1, raddr2, waddr;
  logic [11:0] pc_load_addr;
  int checks = 0, failures = 0;

  control_fsm dut (.clk, .rst_n, .run, .instr, .const_b, .const_c,
    .alu_done, .is_zero, .is_one, .is_ff, .status_carry, .page, .alu_ctrl, .alu_start, .const_sh,
    .carry_in, .raddr1, .raddr2, .we, .waddr, .c_we, .pc_adv, .pc_skip, .pc_load, .pc_load_addr);
  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr %04h)", what, instr); end
  endtask

  function automatic logic [15:0] rop(logic [3:0] fn, logic d, logic [2:0] b, logic [5:0] f);
    return {2'b00, fn, d, b, f};
  endfunction

  // FETCH cycle then EXEC cycle; leaves the clock at the EXEC negedge
  task automatic issue(logic [15:0] w);
    @(negedge clk); instr = w; run = 1; // FETCH
    chk("fetch idle", !alu_start && !we && !pc_adv && !pc_load);
    @(negedge clk);                    // EXEC
  endtask

  initial begin
    instr = 16'h0000; page = {8'h11, 8'h22, 8'h30};   // PAGE = 0x03
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // ANDWF 9, d=1
    issue(rop(4'd4, 1'b1, 3'd0, 6'd9));
    chk("and ctrl", alu_ctrl.fn == FN_AND && alu_ctrl.op1_sel == OP1_REG && raddr1 == 0 && raddr2 == 9);
    chk("and wb", alu_start && we && waddr == 9 && pc_adv && !pc_skip && !c_we);
    // ADDWF 12, d=0: no write in EXEC, write on done
    issue(rop(4'd2, 1'b0, 3'd0, 6'd12));
    chk("add exec", alu_ctrl.fn == FN_ADD && alu_start && !we && !pc_adv && carry_in == 3'b000);
    repeat (3) begin @(negedge clk); chk("add wait", !we && !pc_adv && !alu_start); end
    alu_done = 1; #1;
    chk("add wb", we && waddr == 0 && c_we && pc_adv);
    @(posedge clk); #1 alu_done = 0;
    // SUBWF: invert + carry 111
    issue(rop(4'd3, 1'b1, 3'd0, 6'd7));
    chk("sub ctrl", alu_ctrl.invert && carry_in == 3'b111 && alu_ctrl.fn == FN_ADD);
    alu_done = 1; @(posedge clk); #1 alu_done = 0;
    // DECF: op1 zero inverted, carry shares A=0, B=C=1
    issue(rop(4'd9, 1'b1, 3'd0, 6'd7));
    chk("dec ctrl", alu_ctrl.invert && alu_ctrl.op1_sel == OP1_ZERO && carry_in == 3'b110);
    alu_done = 1; @(posedge clk); #1 alu_done = 0;
    // BSF 20,5
    issue(rop(4'd13, 1'b0, 3'd5, 6'd20));
    chk("bsf", alu_ctrl.mask_en && alu_ctrl.mask_set && alu_ctrl.mask_sel == 5 && raddr1 == 20
               && waddr == 20 && we && alu_ctrl.op2_sel == OP2_MASK);
    // RLF uses stored carry, writes carry
    issue(rop(4'd10, 1'b1, 3'd0, 6'd8));
    chk("rlf", alu_ctrl.shift == SH_RLC && carry_in == status_carry && c_we && we);
    // ANDLW with shared constant
    issue({2'b01, 2'b00, 4'd2, 8'h77});
    chk("andlw", alu_ctrl.op1_sel == OP1_CONST && alu_ctrl.fn == FN_AND && waddr == 0 && we
                 && const_sh == {8'hc3, 8'h5a, 8'h77} && raddr2 == 0);
    // skip if one: flag set -> skip
    issue({2'b10, 2'd1, 6'd0, 6'd33}); is_one = 1; #1;
    chk("skone", alu_ctrl.cmp_en && raddr2 == 33 && pc_adv && pc_skip && !we);
    is_one = 0;
    // skip if zero, flag clear -> no skip
    issue({2'b10, 2'd0, 6'd0, 6'd33});
    chk("skz", alu_ctrl.cmp_en && pc_adv && !pc_skip);
    // comparison isolated for ordinary instructions
    issue(rop(4'd6, 1'b0, 3'd0, 6'd9));
    chk("cmp gated", !alu_ctrl.cmp_en);
    // goto with PAGE = 3
    issue({2'b11, 6'd0, 8'h9c});
    chk("goto", pc_load && pc_load_addr == 12'h39c && !we && !alu_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
