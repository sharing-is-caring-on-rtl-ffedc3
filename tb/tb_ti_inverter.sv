// Self-checking test of the shared inverter: the output must be the
// complement of the input when inv is set (with shares B and C untouched) and
// equal to it otherwise.
module tb_ti_inverter;
  logic inv;
  logic [2:0][7:0] d, q;
  int checks = 0, failures = 0;

  ti_inverter dut (.inv, .d, .q);

  initial begin
    for (int n = 0; n < 300; n++) begin
      d = {$urandom, $urandom}; inv = n[0];
      #1;
      checks++;
      if ((q[0] ^ q[1] ^ q[2]) !== ((d[0] ^ d[1] ^ d[2]) ^ {8{inv}})) begin
        failures++; $display("FAIL value");
      end
      checks++;
      if (q[1] !== d[1] || q[2] !== d[2]) begin failures++; $display("FAIL shares B/C"); end
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
