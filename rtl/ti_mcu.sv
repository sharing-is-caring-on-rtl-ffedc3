// Masked 8-bit Harvard microcontroller core built around the three-share
// threshold-implementation ALU. The control FSM decodes instructions from the
// program memory and steers the shared ALU, the tripled register file and the
// program counter. All data (register contents, literal constants, the
// carry, I/O register contents) stays in three shares from the program
// memory and the I/O ports, through the ALU, back to the register file.
// External ports: one fresh random bit per clock (rnd, from a random source
// outside this core), a write port for loading the program with its constant
// shares (hold run low meanwhile), and the I/O register bus: a shared write
// port into the I/O registers and their shared contents. Register map and
// timing: see regfile_shared and control_fsm. Default sizes: 64 registers,
// 4096 x 16 program memory, 8-bit data; the number of I/O registers is this
// design's own choice.
module ti_mcu
  import ti_pkg::*;
#(
  parameter int unsigned PC_W  = 12,
  parameter int unsigned N_REG = 64,
  parameter int unsigned N_IO  = 8,
  localparam int unsigned W    = DW,
  localparam int unsigned AW   = $clog2(N_REG),
  localparam int unsigned IOAW = $clog2(N_IO)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic                        rnd,
  // program loading
  input  logic                        prog_we,
  input  logic [PC_W-1:0]             prog_addr,
  input  logic [15:0]                 prog_instr,
  input  logic [W-1:0]                prog_const_b,
  input  logic [W-1:0]                prog_const_c,
  // I/O registers
  input  logic                        io_we,
  input  logic [IOAW-1:0]             io_waddr,
  input  logic [2:0][W-1:0]           io_wdata,
  output logic [N_IO-1:0][2:0][W-1:0] io_q,
  output logic [PC_W-1:0]             pc
);

  logic [15:0]       instr;
  logic [W-1:0]      const_b, const_c;
  alu_ctrl_t         alu_ctrl;
  logic              alu_start, alu_busy, alu_done;
  logic              is_zero, is_one, is_ff;
  logic [2:0][W-1:0] const_sh, rdata1, rdata2, alu_out, page;
  logic [2:0]        carry_in, carry_out, status_carry;
  logic [AW-1:0]     raddr1, raddr2, waddr;
  logic              we, c_we, pc_adv, pc_skip, pc_load;
  logic [PC_W-1:0]   pc_load_addr;

  program_memory #(.DEPTH(1 << PC_W), .IW(16), .W(W)) u_pmem (
    .clk, .raddr(pc), .instr, .const_b, .const_c,
    .we(prog_we), .waddr(prog_addr), .wdata_instr(prog_instr),
    .wdata_b(prog_const_b), .wdata_c(prog_const_c));

  program_counter #(.PC_W(PC_W)) u_pc (
    .clk, .rst_n, .adv(pc_adv), .skip(pc_skip), .load(pc_load),
    .load_addr(pc_load_addr), .pc);

  control_fsm #(.PC_W(PC_W), .N_REG(N_REG), .W(W)) u_ctrl (
    .clk, .rst_n, .run, .instr, .const_b, .const_c, .alu_done,
    .is_zero, .is_one, .is_ff, .status_carry, .page,
    .alu_ctrl, .alu_start, .const_sh, .carry_in, .raddr1, .raddr2,
    .we, .waddr, .c_we, .pc_adv, .pc_skip, .pc_load, .pc_load_addr);

  regfile_shared #(.N_REG(N_REG), .N_IO(N_IO), .W(W)) u_rf (
    .clk, .rst_n, .raddr1, .raddr2, .rdata1, .rdata2,
    .we, .waddr, .wdata(alu_out), .c_we, .c_wdata(carry_out),
    .carry(status_carry), .page,
    .io_we, .io_waddr, .io_wdata, .io_q);

  ti_alu #(.W(W)) u_alu (
    .clk, .rst_n, .ctrl(alu_ctrl), .start(alu_start),
    .reg_1(rdata1), .reg_2(rdata2), .const_in(const_sh), .carry_in, .rnd,
    .alu_out, .carry_out, .busy(alu_busy), .done(alu_done),
    .is_zero, .is_one, .is_ff);

endmodule
