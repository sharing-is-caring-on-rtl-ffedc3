// End-to-end test of the shared microcontroller at its default sizes
// (64 registers, 4096-word program memory). A program exercising every
// instruction class is loaded through the program write port with randomly
// shared constants; a value is written into an I/O register from outside in
// shared form; the core then runs with a fresh random bit every cycle until it
// reaches its final self-loop. The unshared results in the I/O and general
// purpose registers are compared with values worked out by hand, every
// instruction's duration is checked (2 cycles, 10 with the iterative adder),
// and each mechanism (iterative add, resharing of AND/OR, bit set/clear,
// rotate through carry, carry write, taken and not-taken skips, gated
// comparisons, paged jump, external I/O write) must occur at least once.
module tb_ti_mcu;
  import ti_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, rnd = 0;
  logic prog_we = 0, io_we = 0;
  logic [11:0] prog_addr = 0, pc;
  logic [15:0] prog_instr = 0;
  logic [7:0] prog_const_b = 0, prog_const_c = 0;
  logic [2:0] io_waddr = 0;
  logic [2:0][7:0] io_wdata = '0;
  logic [7:0][2:0][7:0] io_q;
  int checks = 0, failures = 0;
  int a = 0;   // assembly address

  ti_mcu dut (.clk, .rst_n, .run, .rnd, .prog_we, .prog_addr, .prog_instr, .prog_const_b,
              .prog_const_c, .io_we, .io_waddr, .io_wdata, .io_q, .pc);
  always #5 clk = ~clk;
  always @(negedge clk) rnd <= 1'($urandom);

  function automatic logic [7:0] u8(logic [2:0][7:0] v); return v[0] ^ v[1] ^ v[2]; endfunction

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %02h exp %02h", what, got, exp); end
  endtask

  // ---- tiny assembler ---------------------------------------------------
  task automatic emit(logic [15:0] w, logic [7:0] b = 8'h00, logic [7:0] c = 8'h00);
    @(negedge clk);
    prog_we = 1; prog_addr = 12'(a); prog_instr = w; prog_const_b = b; prog_const_c = c;
    a++;
  endtask
  task automatic R(rfunc_e fn, int f, bit d = 1, int b = 0);
    emit({2'b00, fn, d, 3'(b), 6'(f)});
  endtask
  task automatic L(lfunc_e fn, logic [7:0] k);
    logic [7:0] sb = 8'($urandom), sc = 8'($urandom);
    emit({2'b01, 2'b00, fn, k ^ sb ^ sc}, sb, sc);
  endtask
  task automatic K(kcond_e c, int f); emit({2'b10, c, 6'd0, 6'(f)}); endtask
  task automatic G(logic [7:0] k);    emit({2'b11, 6'd0, k}); endtask

  // ---- mechanism counters -------------------------------------------------
  int n_add, n_reshare, n_mask, n_rot, n_cwe, n_skip_t, n_skip_nt, n_cmp, n_goto, n_io;
  always @(posedge clk) if (rst_n && run) begin
    if (dut.alu_done && dut.alu_ctrl.fn == FN_ADD) n_add++;
    if (dut.we && dut.u_alu.u_reshare.en) n_reshare++;
    if (dut.we && dut.alu_ctrl.mask_en) n_mask++;
    if (dut.we && dut.alu_ctrl.shift inside {SH_RLC, SH_RRC}) n_rot++;
    if (dut.c_we) n_cwe++;
    if (dut.pc_adv && dut.alu_ctrl.cmp_en) begin
      n_cmp++;
      if (dut.pc_skip) n_skip_t++; else n_skip_nt++;
    end
    if (dut.pc_load && dut.pc_load_addr[11:8] != 0) n_goto++;
  end
  always @(posedge clk) if (rst_n && io_we) n_io++;

  // ---- per-instruction duration ------------------------------------------
  int cyc = 0, n_timed = 0;
  logic [15:0] last_w;
  always @(posedge clk) if (rst_n && run) begin
    cyc++;
    if (dut.u_ctrl.state == 2'd1) last_w = dut.instr;     // EXEC
    if (dut.pc_adv || dut.pc_load) begin
      automatic bit addcls =
        (last_w[15:14] == 2'b00 && last_w[13:10] inside {4'd2, 4'd3, 4'd8, 4'd9, 4'd15}) ||
        (last_w[15:14] == 2'b01 && last_w[11:8] == 4'd1);
      checks++;
      n_timed++;
      if (cyc != (addcls ? 10 : 2)) begin
        failures++; $display("FAIL duration %0d of %04h", cyc, last_w);
      end
      cyc = 0;
    end
  end

  localparam int IO0 = 56;
  int loop_top;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // external shared write into I/O register 0
    @(negedge clk); io_we = 1; io_waddr = 0; io_wdata = {8'h33 ^ 8'h9e ^ 8'h41, 8'h9e, 8'h41};
    @(negedge clk); io_we = 0;
    // ---- program ----
    R(R_MOVF, IO0, 0);           // ACC = io0 = 33
    R(R_MOVWF, 8);               // r8 = 33
    L(L_MOVLW, 8'h5a);
    R(R_MOVWF, 3);               // r3 = 5a
    L(L_MOVLW, 8'h3c);
    R(R_ADDWF, 3, 1);            // r3 = 96, C = 0
    R(R_MOVF, 3, 0);
    R(R_MOVWF, IO0 + 1);         // io1 = 96
    L(L_MOVLW, 8'h10);
    R(R_SUBWF, 3, 1);            // r3 = 86, C = 1
    R(R_MOVF, 3, 0);
    R(R_MOVWF, IO0 + 2);         // io2 = 86
    L(L_MOVLW, 8'hf0);
    R(R_ANDWF, 3, 0);            // ACC = 80
    R(R_MOVWF, 9);               // r9 = 80
    L(L_MOVLW, 8'h0f);
    R(R_IORWF, 3, 0);            // ACC = 8f
    L(L_XORLW, 8'hff);           // ACC = 70
    R(R_MOVWF, IO0 + 3);         // io3 = 70
    R(R_BSF, IO0 + 3, 1, 0);     // io3 = 71
    R(R_BCF, IO0 + 3, 1, 4);     // io3 = 61
    R(R_INCF, 3, 1);             // r3 = 87
    R(R_DECF, 3, 1);             // r3 = 86
    R(R_DECF, 3, 1);             // r3 = 85
    R(R_COMF, 3, 0);             // ACC = 7a
    R(R_MOVWF, 10);              // r10 = 7a
    R(R_RLF, 3, 1);              // r3 = 0b, C = 1
    R(R_RLF, 3, 1);              // r3 = 17, C = 0
    R(R_RRF, 3, 0);              // ACC = 0b, C = 1
    R(R_MOVWF, 11);              // r11 = 0b
    L(L_ADDLW, 8'hf0);           // ACC = 0b + f0 = fb, C = 0
    L(L_ADDLW, 8'h10);           // ACC = 0b, C = 1
    R(R_ADDCWF, 3, 0);           // ACC = 0b + 17 + 1 = 23
    L(L_ANDLW, 8'h3e);           // ACC = 22
    L(L_IORLW, 8'h40);           // ACC = 62
    R(R_MOVWF, IO0 + 4);         // io4 = 62
    // counted loop: r5 counts the passes of r4 from 3 down to 0
    L(L_MOVLW, 8'h03);
    R(R_MOVWF, 4);
    R(R_CLRF, 5, 1);
    loop_top = a;
    R(R_INCF, 5, 1);
    R(R_DECF, 4, 1);
    K(K_SKZ, 4);
    G(8'(loop_top));
    R(R_MOVF, 5, 0);
    R(R_MOVWF, IO0 + 5);         // io5 = 3
    // other skip conditions
    L(L_MOVLW, 8'h01);
    R(R_MOVWF, 6);
    K(K_SKONE, 6);
    R(R_CLRF, IO0 + 5, 1);       // skipped
    L(L_MOVLW, 8'hff);
    R(R_MOVWF, 6);
    K(K_SKFF, 6);
    R(R_CLRF, IO0 + 5, 1);       // skipped
    K(K_SKNZ, 6);
    R(R_CLRF, IO0 + 5, 1);       // skipped
    K(K_SKONE, 6);               // not taken
    R(R_MOVWF, IO0 + 6);         // io6 = ff
    // paged jump to 0x100
    L(L_MOVLW, 8'h01);
    R(R_MOVWF, 2);               // PAGE = 1
    G(8'h00);
    a = 12'h100;
    L(L_MOVLW, 8'ha5);
    R(R_MOVWF, IO0 + 7);         // io7 = a5
    G(8'h02);                    // 0x102: stay here
    @(negedge clk); prog_we = 0;
    // ---- run ----
    run = 1;
    while (pc != 12'h102) @(posedge clk);
    repeat (4) @(posedge clk);
    chk("pc stays", 8'(pc), 8'h02);
    chk("r8 from io write", u8(dut.u_rf.regs[8]), 8'h33);
    chk("io1 add", u8(io_q[1]), 8'h96);
    chk("io2 sub", u8(io_q[2]), 8'h86);
    chk("r9 and", u8(dut.u_rf.regs[9]), 8'h80);
    chk("io3 or/xor/bit", u8(io_q[3]), 8'h61);
    chk("r10 inc/dec/com", u8(dut.u_rf.regs[10]), 8'h7a);
    chk("r11 rotate", u8(dut.u_rf.regs[11]), 8'h0b);
    chk("r3", u8(dut.u_rf.regs[3]), 8'h17);
    chk("io4 adc", u8(io_q[4]), 8'h62);
    chk("io5 loop", u8(io_q[5]), 8'h03);
    chk("io6 skips", u8(io_q[6]), 8'hff);
    chk("io7 page", u8(io_q[7]), 8'ha5);
    chk("page reg", u8(dut.u_rf.regs[2]), 8'h01);
    begin
      int cnt [string];
      cnt["iterative add"] = n_add;   cnt["reshare"] = n_reshare; cnt["bit set/clear"] = n_mask;
      cnt["rotate through carry"] = n_rot; cnt["carry write"] = n_cwe;
      cnt["skip taken"] = n_skip_t;   cnt["skip not taken"] = n_skip_nt; cnt["gated compare"] = n_cmp;
      cnt["paged goto"] = n_goto;     cnt["external io write"] = n_io;
      foreach (cnt[s]) begin
        $display("mechanism %-22s %0d", s, cnt[s]);
        checks++;
        if (cnt[s] == 0) begin failures++; $display("FAIL mechanism %s never happened", s); end
      end
    end
    $display("instructions timed: %0d", n_timed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
