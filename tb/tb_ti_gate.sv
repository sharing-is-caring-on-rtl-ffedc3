// Self-checking test of ti_gate as the shared AND (default tables) and as the
// shared OR: random three-share inputs, the XOR of the output shares must equal
// the AND / OR of the unshared inputs. Exhaustive over one bit position with
// all 64 share combinations, then random bytes.
module tb_ti_gate;
  import ti_pkg::*;
  logic [2:0][7:0] x, y, fa, fo;
  int checks = 0, failures = 0;

  ti_gate dut_and (.x, .y, .f(fa));
  ti_gate #(.F1_TT(OR_F1), .F2_TT(OR_F2), .F3_TT(OR_F3)) dut_or (.x, .y, .f(fo));

  function automatic logic [7:0] unsh(logic [2:0][7:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %02h exp %02h", what, got, exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 64; s++) begin
      for (int k = 0; k < 3; k++) begin
        x[k] = {8{s[k]}};
        y[k] = {8{s[k+3]}};
      end
      #1;
      check("and exh", unsh(fa), unsh(x) & unsh(y));
      check("or exh",  unsh(fo), unsh(x) | unsh(y));
    end
    for (int n = 0; n < 500; n++) begin
      x = {$urandom, $urandom} ; y = {$urandom, $urandom};
      #1;
      check("and", unsh(fa), unsh(x) & unsh(y));
      check("or",  unsh(fo), unsh(x) | unsh(y));
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
