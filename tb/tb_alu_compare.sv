// Self-checking test of the gated comparison units: with en high the flags
// must match the unshared comparisons (values 0, 1 and FF forced often);
// with en low all flags must be low.
module tb_alu_compare;
  logic en, is_zero, is_one, is_ff;
  logic [2:0][7:0] res, opnd;
  int checks = 0, failures = 0;

  alu_compare dut (.en, .res, .opnd, .is_zero, .is_one, .is_ff);

  function automatic logic [2:0][7:0] share(logic [7:0] v);
    logic [7:0] a = 8'($urandom), b = 8'($urandom);
    return {v ^ a ^ b, b, a};
  endfunction

  initial begin
    logic [7:0] ur, uo;
    for (int n = 0; n < 600; n++) begin
      ur = (n % 3 == 0) ? 8'h00 : 8'($urandom);
      uo = (n % 4 == 0) ? 8'h01 : (n % 4 == 1) ? 8'hff : 8'($urandom);
      res = share(ur); opnd = share(uo); en = (n % 7 != 0);
      #1;
      checks++;
      if ({is_zero, is_one, is_ff} !== {en && ur == 0, en && uo == 1, en && uo == 8'hff}) begin
        failures++; $display("FAIL flags en=%0d ur=%02h uo=%02h", en, ur, uo);
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
