// Exhaustive uniformity test of the shared AND and OR followed by the reshare
// unit, on a 2-bit slice (W = 2) so that every case can be enumerated. For
// each unshared pair (x, y), all 256 uniform input sharings and both values
// of the random bit are applied; each of the 16 possible sharings of the
// 2-bit result must then occur equally often (32 times). Without the reshare
// unit the same count is not flat, which the test also confirms, so it shows
// that the one random bit per cycle is both needed and sufficient.
module tb_ti_uniformity;
  import ti_pkg::*;
  localparam int W = 2;
  logic [2:0][W-1:0] x, y, fa, fo, qa, qo;
  logic rnd;
  int checks = 0, failures = 0;
  int ha [64], ho [64], hr [64];

  ti_gate    #(.W(W)) u_and (.x, .y, .f(fa));
  ti_gate    #(.W(W), .F1_TT(OR_F1), .F2_TT(OR_F2), .F3_TT(OR_F3)) u_or (.x, .y, .f(fo));
  ti_reshare #(.W(W)) u_ra (.en(1'b1), .rnd, .vsrc(y[2]), .f(fa), .q(qa));
  ti_reshare #(.W(W)) u_ro (.en(1'b1), .rnd, .vsrc(y[2]), .f(fo), .q(qo));

  initial begin
    int nonflat_raw = 0;
    for (int xv = 0; xv < 4; xv++)
      for (int yv = 0; yv < 4; yv++) begin
        foreach (ha[i]) begin ha[i] = 0; ho[i] = 0; hr[i] = 0; end
        for (int s = 0; s < 512; s++) begin
          x[0] = W'(s);      x[1] = W'(s >> 2); x[2] = W'(xv) ^ x[0] ^ x[1];
          y[0] = W'(s >> 4); y[1] = W'(s >> 6); y[2] = W'(yv) ^ y[0] ^ y[1];
          rnd  = s[8];
          #1;
          // shares A and B of both bits identify the sharing (C follows)
          ha[{qa[1], qa[0]}]++;
          ho[{qo[1], qo[0]}]++;
          hr[{fa[1], fa[0]}]++;
          checks++;
          if ((qa[0] ^ qa[1] ^ qa[2]) !== W'(xv & yv) || (qo[0] ^ qo[1] ^ qo[2]) !== W'(xv | yv)) begin
            failures++; $display("FAIL value x=%0d y=%0d", xv, yv);
          end
        end
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (ha[i] != 32 || ho[i] != 32) begin
            failures++; $display("FAIL not uniform x=%0d y=%0d sharing %0d: and %0d or %0d", xv, yv, i, ha[i], ho[i]);
          end
          if (hr[i] != 32) nonflat_raw++;
        end
      end
    checks++;
    if (nonflat_raw == 0) begin failures++; $display("FAIL unrepaired AND already uniform"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
