// Control FSM of the shared microcontroller: fetches, decodes and sequences
// one instruction at a time and drives the ALU, the register file and the
// program counter. Opcodes and data never mix: the FSM sees only the
// unshared instruction fields, the comparison flags (during skip tests) and
// the PAGE register for jumps, never the shared data.
// States: FETCH (program memory reads the word at pc), EXEC (decode, start the
// ALU; Boolean, move, shift and bit instructions write back and advance pc in
// this cycle) and WAIT (adder instructions only, until the ALU's done pulse,
// W cycles after the start, then write back). So an instruction takes 2
// cycles, or 2 + W with the adder; a skip test takes 2; a goto takes 2.
// Carry-in shares: (0,0,0) for ADD, (1,1,1) for SUB and INC, (0,1,1) for DEC
// (share A of the carry cleared, the others set), and the stored STATUS
// carry shares for ADDC and the through-carry rotates. The instruction set
// and its encoding (ti_pkg) are this design's own; the comparison units are
// enabled only for skip tests (operand isolation).
module control_fsm
  import ti_pkg::*;
#(
  parameter int unsigned PC_W  = 12,
  parameter int unsigned N_REG = 64,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(N_REG)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [15:0]       instr,
  input  logic [W-1:0]      const_b,
  input  logic [W-1:0]      const_c,
  input  logic              alu_done,
  input  logic              is_zero,
  input  logic              is_one,
  input  logic              is_ff,
  input  logic [2:0]        status_carry,
  input  logic [2:0][W-1:0] page,
  output alu_ctrl_t         alu_ctrl,
  output logic              alu_start,
  output logic [2:0][W-1:0] const_sh,
  output logic [2:0]        carry_in,
  output logic [AW-1:0]     raddr1,
  output logic [AW-1:0]     raddr2,
  output logic              we,
  output logic [AW-1:0]     waddr,
  output logic              c_we,
  output logic              pc_adv,
  output logic              pc_skip,
  output logic              pc_load,
  output logic [PC_W-1:0]   pc_load_addr
);

  typedef enum logic [1:0] {S_FETCH, S_EXEC, S_WAIT} state_e;
  state_e state, state_nx;

  iclass_e      icl;
  rfunc_e       rf;
  lfunc_e       lf;
  kcond_e       kc;
  logic         d;
  logic [2:0]   bitsel;
  logic [AW-1:0] f;
  logic [W-1:0] page_u;

  // decoded, state independent
  logic         is_add;       // uses the iterative adder
  logic         wr;           // writes a result
  logic [AW-1:0] dst;
  logic         wr_c;         // updates the STATUS carry
  logic         skip_cond;

  assign icl    = iclass_e'(instr[15:14]);
  assign rf     = rfunc_e'(instr[13:10]);
  assign lf     = lfunc_e'(instr[11:8]);
  assign kc     = kcond_e'(instr[13:12]);
  assign d      = instr[9];
  assign bitsel = instr[8:6];
  assign f      = instr[AW-1:0];

  assign const_sh = {const_c, const_b, instr[W-1:0]};
  assign page_u   = page[0] ^ page[1] ^ page[2];
  assign pc_load_addr = PC_W'({page_u, instr[7:0]});

  always_comb begin
    alu_ctrl  = '{fn: FN_XOR, op1_sel: OP1_ZERO, invert: 1'b0, op2_sel: OP2_SHIFT,
                  shift: SH_NONE, mask_en: 1'b0, mask_sel: 3'd0, mask_set: 1'b0, cmp_en: 1'b0};
    carry_in  = 3'b000;
    raddr1    = AW'(ADDR_ACC);
    raddr2    = f;
    is_add    = 1'b0;
    wr        = 1'b0;
    dst       = d ? f : AW'(ADDR_ACC);
    wr_c      = 1'b0;
    skip_cond = 1'b0;
    unique case (icl)
      CL_REG: begin
        wr = 1'b1;
        alu_ctrl.op1_sel = OP1_REG;
        unique case (rf)
          R_MOVF:  alu_ctrl.op1_sel = OP1_ZERO;
          R_MOVWF: begin alu_ctrl.op1_sel = OP1_ZERO; raddr2 = AW'(ADDR_ACC); dst = f; end
          R_ADDWF: begin alu_ctrl.fn = FN_ADD; is_add = 1'b1; wr_c = 1'b1; end
          R_SUBWF: begin alu_ctrl.fn = FN_ADD; alu_ctrl.invert = 1'b1; carry_in = 3'b111;
                         is_add = 1'b1; wr_c = 1'b1; end
          R_ANDWF: alu_ctrl.fn = FN_AND;
          R_IORWF: alu_ctrl.fn = FN_OR;
          R_XORWF: alu_ctrl.fn = FN_XOR;
          R_COMF:  begin alu_ctrl.op1_sel = OP1_ZERO; alu_ctrl.invert = 1'b1; end
          R_INCF:  begin alu_ctrl.op1_sel = OP1_ZERO; alu_ctrl.fn = FN_ADD; carry_in = 3'b111;
                         is_add = 1'b1; end
          R_DECF:  begin alu_ctrl.op1_sel = OP1_ZERO; alu_ctrl.invert = 1'b1; alu_ctrl.fn = FN_ADD;
                         carry_in = 3'b110; is_add = 1'b1; end
          R_RLF:   begin alu_ctrl.op1_sel = OP1_ZERO; alu_ctrl.shift = SH_RLC;
                         carry_in = status_carry; wr_c = 1'b1; end
          R_RRF:   begin alu_ctrl.op1_sel = OP1_ZERO; alu_ctrl.shift = SH_RRC;
                         carry_in = status_carry; wr_c = 1'b1; end
          R_CLRF:  begin alu_ctrl.op1_sel = OP1_ZERO; alu_ctrl.fn = FN_AND; end
          R_BSF, R_BCF: begin
                   raddr1 = f; dst = f;
                   alu_ctrl.op2_sel = OP2_MASK; alu_ctrl.mask_en = 1'b1;
                   alu_ctrl.mask_sel = bitsel; alu_ctrl.mask_set = (rf == R_BSF); end
          R_ADDCWF: begin alu_ctrl.fn = FN_ADD; carry_in = status_carry;
                          is_add = 1'b1; wr_c = 1'b1; end
          default: ;
        endcase
      end
      CL_LIT: begin
        alu_ctrl.op1_sel = OP1_CONST;
        raddr2 = AW'(ADDR_ACC);
        dst    = AW'(ADDR_ACC);
        wr     = 1'b1;
        unique case (lf)
          L_MOVLW: alu_ctrl.op2_sel = OP2_MASK;   // mask disabled: shared zero
          L_ADDLW: begin alu_ctrl.fn = FN_ADD; is_add = 1'b1; wr_c = 1'b1; end
          L_ANDLW: alu_ctrl.fn = FN_AND;
          L_IORLW: alu_ctrl.fn = FN_OR;
          L_XORLW: alu_ctrl.fn = FN_XOR;
          default: wr = 1'b0;                      // no operation
        endcase
      end
      CL_SKIP: begin
        alu_ctrl.cmp_en = 1'b1;                    // pass f through the XOR
        unique case (kc)
          K_SKZ:   skip_cond = is_zero;
          K_SKONE: skip_cond = is_one;
          K_SKFF:  skip_cond = is_ff;
          default: skip_cond = !is_zero;
        endcase
      end
      default: ;                                   // goto
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= state_nx;
  end

  always_comb begin
    state_nx  = state;
    alu_start = 1'b0;
    we        = 1'b0;
    c_we      = 1'b0;
    pc_adv    = 1'b0;
    pc_skip   = 1'b0;
    pc_load   = 1'b0;
    waddr     = dst;
    unique case (state)
      S_FETCH: if (run) state_nx = S_EXEC;
      S_EXEC: begin
        if (icl == CL_GOTO) begin
          pc_load  = 1'b1;
          state_nx = S_FETCH;
        end else begin
          alu_start = 1'b1;
          if (is_add) begin
            state_nx = S_WAIT;
          end else begin
            we       = wr;
            c_we     = wr_c;
            pc_adv   = 1'b1;
            pc_skip  = (icl == CL_SKIP) && skip_cond;
            state_nx = S_FETCH;
          end
        end
      end
      S_WAIT: begin
        if (alu_done) begin
          we       = wr;
          c_we     = wr_c;
          pc_adv   = 1'b1;
          state_nx = S_FETCH;
        end
      end
      default: state_nx = S_FETCH;
    endcase
  end

endmodule
