// Program counter. Each completed instruction advances it by one, or by two
// when a skip test succeeds; a jump loads a new address. Active-low
// asynchronous reset to address 0. Encoding of the increments is this
// design's own.
module program_counter #(
  parameter int unsigned PC_W = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            adv,       // instruction finished: pc + 1
  input  logic            skip,      // with adv: also skip the next one (pc + 2)
  input  logic            load,      // jump
  input  logic [PC_W-1:0] load_addr,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc <= '0;
    else if (load)  pc <= load_addr;
    else if (adv)   pc <= pc + (skip ? PC_W'(2) : PC_W'(1));
  end

endmodule
