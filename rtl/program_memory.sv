// Writable program memory, DEPTH words of IW-bit instructions. The shared
// constant of a literal instruction is stored as three shares: share A in the
// instruction's low byte and shares B and C in two side arrays of the same
// depth, so constants never exist unmasked. The write port lets the stored
// program and its constant shares be (re)written, as a non-volatile writable
// memory would allow. Synchronous read: the word at `raddr` appears on the
// outputs after the next rising edge. No reset (memory contents). The
// 4096 x 16 size follows the design; the side arrays for the constant shares
// and the write port are this design's own way of holding shared constants.
module program_memory #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned IW    = 16,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] instr,
  output logic [W-1:0]  const_b,
  output logic [W-1:0]  const_c,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata_instr,
  input  logic [W-1:0]  wdata_b,
  input  logic [W-1:0]  wdata_c
);

  logic [IW-1:0] mem_i [DEPTH];
  logic [W-1:0]  mem_b [DEPTH];
  logic [W-1:0]  mem_c [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem_i[waddr] <= wdata_instr;
      mem_b[waddr] <= wdata_b;
      mem_c[waddr] <= wdata_c;
    end
    instr   <= mem_i[raddr];
    const_b <= mem_b[raddr];
    const_c <= mem_c[raddr];
  end

endmodule
