// Self-checking test of the program memory: writes random words with their
// constant shares to random addresses, then reads them back (one-cycle read
// latency) and compares with a reference model; also checks that a read and a
// write to different addresses in the same cycle do not interfere.
module tb_program_memory;
  logic clk = 0, we = 0;
  logic [11:0] raddr, waddr;
  logic [15:0] instr, wdata_instr;
  logic [7:0] const_b, const_c, wdata_b, wdata_c;
  logic [31:0] ref_m [int];
  int checks = 0, failures = 0;

  program_memory dut (.clk, .raddr, .instr, .const_b, .const_c,
    .we, .waddr, .wdata_instr, .wdata_b, .wdata_c);
  always #5 clk = ~clk;

  initial begin
    int addrs [64];
    raddr = 0; waddr = 0; wdata_instr = 0; wdata_b = 0; wdata_c = 0;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i == 0) ? 0 : (i == 1) ? 4095 : int'($urandom % 4096);
      @(negedge clk);
      we = 1; waddr = 12'(addrs[i]);
      wdata_instr = 16'($urandom); wdata_b = 8'($urandom); wdata_c = 8'($urandom);
      ref_m[addrs[i]] = {wdata_instr, wdata_b, wdata_c};
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      raddr = 12'(addrs[i]);
      we = 1; waddr = 12'(addrs[i] ^ 1) ; wdata_instr = 16'hdead; wdata_b = 8'h11; wdata_c = 8'h22;
      if (!ref_m.exists(addrs[i] ^ 1)) we = 0;
      else ref_m[addrs[i] ^ 1] = {16'hdead, 8'h11, 8'h22};
      @(negedge clk);
      we = 0;
      checks++;
      if ({instr, const_b, const_c} !== ref_m[addrs[i]]) begin failures++; $display("FAIL addr %0d", addrs[i]); end
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
