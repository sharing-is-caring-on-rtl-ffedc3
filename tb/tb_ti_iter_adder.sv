// Self-checking test of the iterative shared adder: random shared operands
// and carry-in; the unshared sum and carry must equal x + y + cin, and done
// must come exactly 8 clock edges after start (one bit per cycle).
module tb_ti_iter_adder;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [2:0][7:0] x, y, sum;
  logic [2:0] cin, cout;
  int checks = 0, failures = 0;

  ti_iter_adder dut (.clk, .rst_n, .start, .x, .y, .cin, .busy, .done, .sum, .cout);

  always #5 clk = ~clk;

  initial begin
    logic [8:0] exp;
    int cyc;
    x = '0; y = '0; cin = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; cin = 3'($urandom);
      if (n < 4) begin x = {8'h00, 8'hff, 8'h00}; y = {8'h00, 8'h00, 8'h01}; end
      exp = 9'(x[0] ^ x[1] ^ x[2]) + 9'(y[0] ^ y[1] ^ y[2]) + 9'(^cin);
      start = 1;
      @(negedge clk);
      start = 0;
      y = {$urandom, $urandom};          // Y is registered: may change now
      cyc = 1;
      while (!done && cyc < 20) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 8) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if ({^cout, sum[0] ^ sum[1] ^ sum[2]} !== exp) begin
        failures++; $display("FAIL sum %03h exp %03h", {^cout, sum[0] ^ sum[1] ^ sum[2]}, exp);
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
