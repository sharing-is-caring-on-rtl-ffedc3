// Self-checking test of the functions array: AND, OR and XOR (combinational,
// done with start) and ADD (done after 8 cycles) on random shared operands;
// the nonlin flag must be set exactly for AND and OR.
module tb_ti_functions_array;
  import ti_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, nonlin;
  alu_fn_e fn;
  logic [2:0][7:0] op1, op2, res;
  logic [2:0] cin, cout;
  int checks = 0, failures = 0;

  ti_functions_array dut (.clk, .rst_n, .fn, .start, .op1, .op2, .cin,
                                   .res, .cout, .busy, .done, .nonlin);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] a, b; logic [8:0] e; int cyc;
    fn = FN_XOR; op1 = '0; op2 = '0; cin = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      op1 = {$urandom, $urandom}; op2 = {$urandom, $urandom}; cin = 3'($urandom);
      fn = alu_fn_e'(n % 4);
      a = op1[0] ^ op1[1] ^ op1[2]; b = op2[0] ^ op2[1] ^ op2[2];
      start = 1;
      #1;
      if (fn != FN_ADD) begin
        e = (fn == FN_AND) ? {1'b0, a & b} : (fn == FN_OR) ? {1'b0, a | b} : {1'b0, a ^ b};
        checks++;
        if ((res[0] ^ res[1] ^ res[2]) !== e[7:0] || !done) begin failures++; $display("FAIL fn %0d", fn); end
        checks++;
        if (nonlin !== (fn == FN_AND || fn == FN_OR)) begin failures++; $display("FAIL nonlin"); end
        @(negedge clk); start = 0;
      end else begin
        e = 9'(a) + 9'(b) + 9'(^cin);
        @(negedge clk); start = 0; cyc = 1;
        while (!done && cyc < 20) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != 8 || {^cout, res[0] ^ res[1] ^ res[2]} !== e) begin
          failures++; $display("FAIL add cyc=%0d", cyc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
