// Self-checking test of the shared register file against a reference array:
// random writes through the ALU port, carry writes into STATUS bit 0, external
// I/O writes; both read ports, the PAGE and carry outputs and the I/O outputs
// are compared every cycle.
module tb_regfile_shared;
  logic clk = 0, rst_n = 0, we = 0, c_we = 0, io_we = 0;
  logic [5:0] raddr1, raddr2, waddr;
  logic [2:0] io_waddr, c_wdata, carry;
  logic [2:0][7:0] rdata1, rdata2, wdata, io_wdata, page;
  logic [7:0][2:0][7:0] io_q;
  logic [2:0][7:0] ref_m [64];
  int checks = 0, failures = 0;

  regfile_shared dut (.clk, .rst_n, .raddr1, .raddr2, .rdata1, .rdata2,
    .we, .waddr, .wdata, .c_we, .c_wdata, .carry, .page, .io_we, .io_waddr, .io_wdata, .io_q);
  always #5 clk = ~clk;

  initial begin
    raddr1 = 0; raddr2 = 0; waddr = 0; wdata = '0; c_wdata = '0; io_waddr = 0; io_wdata = '0;
    foreach (ref_m[i]) ref_m[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      raddr1 = 6'($urandom); raddr2 = 6'($urandom);
      #1;
      checks++;
      if (rdata1 !== ref_m[raddr1] || rdata2 !== ref_m[raddr2]) begin failures++; $display("FAIL read"); end
      checks++;
      if (page !== ref_m[2] || carry !== {ref_m[1][2][0], ref_m[1][1][0], ref_m[1][0][0]})
        begin failures++; $display("FAIL page/carry"); end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (io_q[i] !== ref_m[56 + i]) begin failures++; $display("FAIL io %0d", i); end
      end
      we = $urandom; waddr = 6'($urandom); wdata = {$urandom, $urandom};
      c_we = ($urandom % 4 == 0); c_wdata = 3'($urandom);
      io_we = ($urandom % 4 == 0); io_waddr = 3'($urandom); io_wdata = {$urandom, $urandom};
      @(posedge clk);
      if (io_we) ref_m[56 + io_waddr] = io_wdata;
      if (we) ref_m[waddr] = wdata;
      if (c_we) for (int k = 0; k < 3; k++) ref_m[1][k][0] = c_wdata[k];
      #1; we = 0; c_we = 0; io_we = 0;
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
