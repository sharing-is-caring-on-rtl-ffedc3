// Self-checking test of the shared bit-select mask generator: operand XOR
// mask must set or clear exactly the selected bit of the unshared operand;
// each share of that bit must be the prescribed two-share combination, and a
// disabled generator must give an all-zero mask.
module tb_ti_mask_gen;
  logic en, set;
  logic [2:0] sel;
  logic [2:0][7:0] opnd, m, r;
  int checks = 0, failures = 0;

  ti_mask_gen dut (.en, .sel, .set, .opnd, .m);
  assign r = opnd ^ m;

  initial begin
    logic [7:0] u, e;
    for (int n = 0; n < 600; n++) begin
      opnd = {$urandom, $urandom}; sel = 3'($urandom); set = $urandom; en = (n % 5 != 0);
      #1;
      u = opnd[0] ^ opnd[1] ^ opnd[2];
      e = u;
      if (en) e[sel] = set;
      checks++;
      if ((r[0] ^ r[1] ^ r[2]) !== e) begin failures++; $display("FAIL value"); end
      if (en) begin
        checks++;
        if (r[0][sel] !== (opnd[0][sel] ^ opnd[1][sel]) || r[2][sel] !== (opnd[2][sel] ^ opnd[0][sel]))
          begin failures++; $display("FAIL share form"); end
      end else begin
        checks++;
        if (m !== '0) begin failures++; $display("FAIL disabled mask"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
