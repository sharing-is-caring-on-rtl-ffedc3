// Self-checking test of the program counter: random advance, skip and jump
// commands compared with a reference counter, including wrap-around.
module tb_program_counter;
  logic clk = 0, rst_n = 0, adv = 0, skip = 0, load = 0;
  logic [11:0] load_addr, pc, ref_pc;
  int checks = 0, failures = 0;

  program_counter dut (.clk, .rst_n, .adv, .skip, .load, .load_addr, .pc);
  always #5 clk = ~clk;

  initial begin
    load_addr = '0; ref_pc = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (pc !== ref_pc) begin failures++; $display("FAIL pc %03h exp %03h", pc, ref_pc); end
      adv = $urandom; skip = $urandom; load = ($urandom % 8 == 0); load_addr = 12'($urandom);
      if (n == 10) begin load = 1; load_addr = 12'hffe; end
      if (load) ref_pc = load_addr;
      else if (adv) ref_pc = ref_pc + (skip ? 12'd2 : 12'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
