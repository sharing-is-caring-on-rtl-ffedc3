// Three-share register file of the microcontroller: N_REG registers of W
// bits, each stored as three shares (three times the flip-flops of the
// unshared file). Address 0 is the accumulator ACC, 1 is STATUS (bit 0 holds
// the shared carry), 2 is PAGE (upper program-counter bits for jumps), then
// general-purpose registers, and the top N_IO addresses are I/O registers.
// I/O registers also have an external write path (io_we) and their shares are
// visible on io_q, so peripherals exchange data with the core in shared form.
// Two combinational read ports (reg1, reg2); one synchronous write port for
// ALU results; a carry write port into STATUS bit 0 that takes priority over
// a same-cycle write of that bit; the external I/O write has the lowest
// priority. Asynchronous active-low reset clears all shares. The size and the
// order ACC, STATUS, PAGE, GPRs, I/O follow the design; the carry position,
// the number of I/O registers, the port set and the priorities are this
// design's own.
module regfile_shared
  import ti_pkg::*;
#(
  parameter int unsigned N_REG = 64,
  parameter int unsigned N_IO  = 8,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(N_REG),
  localparam int unsigned IOAW = $clog2(N_IO)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [AW-1:0]               raddr1,
  input  logic [AW-1:0]               raddr2,
  output logic [2:0][W-1:0]           rdata1,
  output logic [2:0][W-1:0]           rdata2,
  input  logic                        we,
  input  logic [AW-1:0]               waddr,
  input  logic [2:0][W-1:0]           wdata,
  input  logic                        c_we,
  input  logic [2:0]                  c_wdata,
  output logic [2:0]                  carry,
  output logic [2:0][W-1:0]           page,
  input  logic                        io_we,
  input  logic [IOAW-1:0]             io_waddr,
  input  logic [2:0][W-1:0]           io_wdata,
  output logic [N_IO-1:0][2:0][W-1:0] io_q
);

  localparam int unsigned IO_BASE = N_REG - N_IO;

  logic [2:0][W-1:0] regs [N_REG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REG; i++) regs[i] <= '0;
    end else begin
      if (io_we) regs[IO_BASE + int'(io_waddr)] <= io_wdata;
      if (we)    regs[waddr] <= wdata;
      if (c_we)
        for (int k = 0; k < 3; k++) regs[ADDR_STATUS][k][0] <= c_wdata[k];
    end
  end

  assign rdata1 = regs[raddr1];
  assign rdata2 = regs[raddr2];
  assign page   = regs[ADDR_PAGE];

  always_comb
    for (int k = 0; k < 3; k++) carry[k] = regs[ADDR_STATUS][k][0];

  always_comb
    for (int i = 0; i < N_IO; i++) io_q[i] = regs[IO_BASE + i];

endmodule
