// Self-checking test of the shared full adder: all 512 share combinations.
// Checks that sum and carry shares XOR to the full-adder result, and that for
// every unshared (x,y,c) the carry sharing is uniform (each of its 4
// possible sharings occurs 16 times) and so is every pair (sum share k,
// carry share k). The joint sharing of all six output bits is not uniform and
// is not checked.
module tb_ti_full_adder;
  logic [2:0] x, y, c, s, co;
  int checks = 0, failures = 0;
  int hist [4], pair [3][4];

  ti_full_adder dut (.x, .y, .c, .s, .cout(co));

  initial begin
    for (int v = 0; v < 8; v++) begin
      foreach (hist[i]) hist[i] = 0;
      foreach (pair[k, i]) pair[k][i] = 0;
      for (int sh = 0; sh < 64; sh++) begin
        x = {v[0] ^ sh[0] ^ sh[1], sh[1:0]};
        y = {v[1] ^ sh[2] ^ sh[3], sh[3:2]};
        c = {v[2] ^ sh[4] ^ sh[5], sh[5:4]};
        #1;
        checks++;
        if ((^s) !== (v[0] ^ v[1] ^ v[2])) begin failures++; $display("FAIL sum v=%0d", v); end
        checks++;
        if ((^co) !== ((v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]))) begin
          failures++; $display("FAIL carry v=%0d sh=%0d", v, sh);
        end
        hist[co[1:0]]++;
        for (int k = 0; k < 3; k++) pair[k][{s[k], co[k]}]++;
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (hist[i] != 16) begin failures++; $display("FAIL carry uniform v=%0d i=%0d n=%0d", v, i, hist[i]); end
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (pair[k][i] != 16) begin failures++; $display("FAIL pair uniform v=%0d k=%0d", v, k); end
        end
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
