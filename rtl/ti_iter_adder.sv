// Iterative shared W-bit adder: one shared full adder, one bit per clock.
// A shared full adder cannot be chained combinationally without breaking
// non-completeness, so the carry is registered between bit positions.
// On the cycle `start` is high, bit 0 of X, bit 0 of the Y input and the
// carry-in shares enter the full adder; the Y register is loaded with
// {S, Y[W-1:1]} and the carry register with the carry out. On each of the
// following W-1 cycles bit n of X is selected, Y'[0] is added, and the Y
// register shifts right taking the new sum bit at the top. After W clock
// edges the register holds X + Y + cin; `done` is high in the cycle after
// the last edge, and `sum`/`cout` hold until the next start.
// X must stay stable while `busy` is high (the ALU operands come from
// registers that are not written during the operation); an assertion checks
// this. No randomness used. The structure follows the design; computing the
// first bit in the start cycle, so that W edges suffice, is this design's own.
module ti_iter_adder #(
  parameter int unsigned W = 8   // at least 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [2:0][W-1:0] x,
  input  logic [2:0][W-1:0] y,
  input  logic [2:0]       cin,
  output logic             busy,
  output logic             done,
  output logic [2:0][W-1:0] sum,
  output logic [2:0]       cout
);

  localparam int unsigned CW = $clog2(W + 1);
  localparam int unsigned IW = $clog2(W);

  logic [2:0][W-1:0] yreg;
  logic [2:0]        creg;
  logic [CW-1:0]     n;       // bit position handled this cycle
  logic              first;
  logic [2:0]        fa_x, fa_y, fa_c, fa_s, fa_co;

  assign first = start && !busy;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      fa_x[k] = first ? x[k][0] : x[k][n[IW-1:0]];
      fa_y[k] = first ? y[k][0] : yreg[k][0];
      fa_c[k] = first ? cin[k]  : creg[k];
    end
  end

  ti_full_adder u_fa (.x(fa_x), .y(fa_y), .c(fa_c), .s(fa_s), .cout(fa_co));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yreg <= '0;
      creg <= '0;
      n    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (first || busy) begin
        for (int k = 0; k < 3; k++)
          yreg[k] <= {fa_s[k], (first ? y[k][W-1:1] : yreg[k][W-1:1])};
        creg <= fa_co;
        if (first) begin
          n    <= CW'(1);
          busy <= (W > 1);
          done <= (W == 1);
        end else if (n == CW'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          n <= n + CW'(1);
        end
      end
    end
  end

  // X is read bit by bit over W cycles and must not change meanwhile
  a_x_stable: assert property (@(posedge clk) disable iff (!rst_n) busy |-> $stable(x))
    else $error("ti_iter_adder: operand X changed during an addition");

  assign sum  = yreg;
  assign cout = creg;

endmodule
