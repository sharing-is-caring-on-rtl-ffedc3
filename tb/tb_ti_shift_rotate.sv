// Self-checking test of the shared shift/rotate unit: every mode on random
// shared data and carry; unshared output and shifted-out bit are compared
// with a reference computed on the unshared values.
module tb_ti_shift_rotate;
  import ti_pkg::*;
  shift_e mode;
  logic [2:0][7:0] d, q;
  logic [2:0] cin, shout;
  int checks = 0, failures = 0;

  ti_shift_rotate dut (.mode, .d, .cin, .q, .shout);

  initial begin
    logic [7:0] u, e; logic c, eo;
    for (int n = 0; n < 700; n++) begin
      d = {$urandom, $urandom}; cin = 3'($urandom);
      mode = shift_e'(n % 7);
      #1;
      u = d[0] ^ d[1] ^ d[2]; c = ^cin;
      case (mode)
        SH_SHL: begin e = u << 1;            eo = u[7]; end
        SH_SHR: begin e = u >> 1;            eo = u[0]; end
        SH_ROL: begin e = {u[6:0], u[7]};    eo = u[7]; end
        SH_ROR: begin e = {u[0], u[7:1]};    eo = u[0]; end
        SH_RLC: begin e = {u[6:0], c};       eo = u[7]; end
        SH_RRC: begin e = {c, u[7:1]};       eo = u[0]; end
        default: begin e = u;                eo = 1'b0; end
      endcase
      checks++;
      if ((q[0] ^ q[1] ^ q[2]) !== e) begin failures++; $display("FAIL mode %0d", mode); end
      checks++;
      if ((^shout) !== eo) begin failures++; $display("FAIL shout mode %0d", mode); end
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
