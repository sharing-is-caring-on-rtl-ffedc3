// Self-checking test of the reshare unit: the unshared value must be kept,
// share C must pass unchanged, shares A and B must both be refreshed with
// {vsrc[6:0], rnd} when enabled, and nothing may change when disabled.
module tb_ti_reshare;
  logic en, rnd;
  logic [7:0] vsrc;
  logic [2:0][7:0] f, q;
  int checks = 0, failures = 0;

  ti_reshare dut (.en, .rnd, .vsrc, .f, .q);

  initial begin
    logic [7:0] v;
    for (int n = 0; n < 400; n++) begin
      f = {$urandom, $urandom}; vsrc = 8'($urandom); rnd = $urandom; en = n[0];
      #1;
      v = en ? {vsrc[6:0], rnd} : 8'h00;
      checks++;
      if ((q[0] ^ q[1] ^ q[2]) !== (f[0] ^ f[1] ^ f[2])) begin failures++; $display("FAIL value"); end
      checks++;
      if (q[0] !== (f[0] ^ v) || q[1] !== (f[1] ^ v) || q[2] !== f[2]) begin
        failures++; $display("FAIL shares");
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
