// Shared types and constants of the three-share threshold-implementation (TI)
// ALU and of the 8-bit microcontroller built around it.
//
// A shared value is held as three shares A, B and C whose XOR is the value;
// in the packed arrays below index 0 is share A, 1 is share B and 2 is share C.
// The truth tables of the shared AND and OR gates are the component functions
// F1 (inputs Bx,By,Cx,Cy), F2 (Ax,Ay,Cx,Cy) and F3 (Ax,Ay,Bx,By) of the
// first AND and the first OR sharing of the published tables. Each 16-bit
// constant is written b15..b0; the entry for inputs (p,q,r,s), in that column
// order, is bit {s,r,q,p}, i.e. the first listed input is the least
// significant index bit. Both sharings have a uniform F3, so only F1 and F2
// need refreshing (see ti_reshare). The ALU control word, function codes and
// the instruction-set encoding are this design's own choices.
package ti_pkg;

  localparam int unsigned NSHARE = 3;
  localparam int unsigned DW     = 8;

  typedef logic [NSHARE-1:0][DW-1:0] sh8_t;   // shared byte
  typedef logic [NSHARE-1:0]         sh1_t;   // shared bit

  // AND sharing #1
  localparam logic [15:0] AND_F1 = 16'b0000001101010110;
  localparam logic [15:0] AND_F2 = 16'b1001010100110000;
  localparam logic [15:0] AND_F3 = 16'b0001110110111000;
  // OR sharing #1
  localparam logic [15:0] OR_F1  = 16'b0000001101010110;
  localparam logic [15:0] OR_F2  = 16'b1001101011000000;
  localparam logic [15:0] OR_F3  = 16'b0111010000101110;

  // functions array select
  typedef enum logic [1:0] {FN_ADD = 2'd0, FN_OR = 2'd1, FN_XOR = 2'd2, FN_AND = 2'd3} alu_fn_e;
  // first operand multiplexer
  typedef enum logic [1:0] {OP1_REG = 2'd0, OP1_CONST = 2'd1, OP1_ZERO = 2'd2} op1_sel_e;
  // second operand multiplexer
  typedef enum logic {OP2_SHIFT = 1'b0, OP2_MASK = 1'b1} op2_sel_e;
  // shift/rotate modes (by one position); RLC/RRC rotate through carry_in
  typedef enum logic [2:0] {SH_NONE = 3'd0, SH_SHL = 3'd1, SH_SHR = 3'd2, SH_ROL = 3'd3,
                            SH_ROR = 3'd4, SH_RLC = 3'd5, SH_RRC = 3'd6} shift_e;

  typedef struct packed {
    alu_fn_e  fn;
    op1_sel_e op1_sel;
    logic     invert;    // invert operand 1 (share A only)
    op2_sel_e op2_sel;
    shift_e   shift;
    logic     mask_en;   // mask generator active (0: shared all-zero mask)
    logic [2:0] mask_sel;// bit position for bit set / bit clear
    logic     mask_set;  // 1: set the bit, 0: clear it
    logic     cmp_en;    // comparison units see the operands (branch tests only)
  } alu_ctrl_t;

  // register file map
  localparam int unsigned ADDR_ACC    = 0;
  localparam int unsigned ADDR_STATUS = 1;
  localparam int unsigned ADDR_PAGE   = 2;

  // Instruction word (16 bits), this design's own encoding:
  //   [15:14]=00 register op : [13:10] func, [9] d (0: ACC, 1: f), [8:6] bit, [5:0] f
  //   [15:14]=01 literal op  : [11:8] func, [7:0] share A of the constant k
  //   [15:14]=10 skip test   : [13:12] cond, [5:0] f  (skip next if condition holds)
  //   [15:14]=11 goto        : [7:0] low address, PAGE supplies the upper bits
  typedef enum logic [1:0] {CL_REG = 2'd0, CL_LIT = 2'd1, CL_SKIP = 2'd2, CL_GOTO = 2'd3} iclass_e;
  typedef enum logic [3:0] {
    R_MOVF = 4'd0, R_MOVWF = 4'd1, R_ADDWF = 4'd2, R_SUBWF = 4'd3,
    R_ANDWF = 4'd4, R_IORWF = 4'd5, R_XORWF = 4'd6, R_COMF = 4'd7,
    R_INCF = 4'd8, R_DECF = 4'd9, R_RLF = 4'd10, R_RRF = 4'd11,
    R_CLRF = 4'd12, R_BSF = 4'd13, R_BCF = 4'd14, R_ADDCWF = 4'd15
  } rfunc_e;
  typedef enum logic [3:0] {
    L_MOVLW = 4'd0, L_ADDLW = 4'd1, L_ANDLW = 4'd2, L_IORLW = 4'd3, L_XORLW = 4'd4
  } lfunc_e;   // other codes: no operation
  typedef enum logic [1:0] {K_SKZ = 2'd0, K_SKONE = 2'd1, K_SKFF = 2'd2, K_SKNZ = 2'd3} kcond_e;

endpackage
