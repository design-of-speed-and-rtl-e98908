// tb_risc_pkg: self-checking test of the shared package: the widths, the
// opcode and function numbering, the idle control word and the instruction
// builder functions, against bit patterns assembled here by hand.
module tb_risc_pkg;
  import risc_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(XLEN == 16 && NREGS == 16 && PC_W == 8 && DADDR_W == 8, "widths");
    check(OP_SYS == 4'h0 && OP_ADD == 4'h1 && OP_SHR == 4'h8 && OP_ADDI == 4'h9 &&
          OP_LW == 4'hA && OP_SW == 4'hB && OP_LI == 4'hC && OP_BZ == 4'hD &&
          OP_JMP == 4'hE && OP_BNZ == 4'hF, "opcode numbering");
    check(FN_NOP == 0 && FN_RET == 1 && FN_RETI == 2 && FN_HALT == 3 && FN_EI == 4 &&
          FN_DI == 5, "system functions");
    check(CTRL_NOP.reg_we == 0 && CTRL_NOP.mem_rd == 0 && CTRL_NOP.mem_wr == 0 &&
          CTRL_NOP.br == BR_NONE && CTRL_NOP.halt == 0 && CTRL_NOP.cls == CLS_NONE, "idle control word");
    for (int i = 0; i < 500; i++) begin
      logic [3:0] op, a, b, c;
      logic [7:0] v;
      op = 4'($urandom); a = 4'($urandom); b = 4'($urandom); c = 4'($urandom);
      v = 8'($urandom);
      check(enc_r(opcode_e'(op), a, b, c) == 16'((int'(op) << 12) + (int'(a) << 8) + (int'(b) << 4) + int'(c)),
            $sformatf("enc_r %h %h %h %h", op, a, b, c));
      check(enc_i8(opcode_e'(op), a, v) == 16'((int'(op) << 12) + (int'(a) << 8) + int'(v)),
            $sformatf("enc_i8 %h %h %h", op, a, v));
      check(enc_sys(sysfn_e'(c)) == 16'(int'(c)), $sformatf("enc_sys %h", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
