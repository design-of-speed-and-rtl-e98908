// tb_decoder: self-checking test of the instruction decoder. Every opcode is
// encoded with random fields and the control word is compared with what the
// encoding defines.
module tb_decoder;
  import risc_pkg::*;
  word_t instr;
  ctrl_t ctrl, e;
  int checks = 0, failures = 0;

  decoder dut (.instr, .ctrl);

  function automatic word_t sx4(logic [3:0] v);  return {{12{v[3]}}, v}; endfunction
  function automatic word_t sx8(logic [7:0] v);  return {{8{v[7]}}, v};  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static alu_op_e rops [8] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_MUL, ALU_SHL, ALU_SHR};
    for (int i = 0; i < 3000; i++) begin
      instr = word_t'($urandom);
      if (instr[15:12] == 0) instr[11:4] = 0;
      #1;
      e = CTRL_NOP;
      case (instr[15:12])
        4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h7, 4'h8: begin
          e.alu_op = rops[instr[15:12] - 1]; e.reg_we = 1; e.rd = instr[11:8];
          e.rs = instr[7:4]; e.rt = instr[3:0]; e.rs_used = 1; e.rt_used = 1; e.cls = CLS_ARITH;
        end
        4'h9: begin
          e.alu_op = ALU_ADD; e.use_imm = 1; e.imm = sx4(instr[3:0]); e.reg_we = 1;
          e.rd = instr[11:8]; e.rs = instr[7:4]; e.rs_used = 1; e.cls = CLS_ARITH;
        end
        4'hA: begin
          e.imm = sx4(instr[3:0]); e.reg_we = 1; e.rd = instr[11:8]; e.rs = instr[7:4];
          e.rs_used = 1; e.mem_rd = 1; e.cls = CLS_TRANSFER;
        end
        4'hB: begin
          e.imm = sx4(instr[3:0]); e.rs = instr[7:4]; e.rt = instr[11:8];
          e.rs_used = 1; e.rt_used = 1; e.mem_wr = 1; e.cls = CLS_TRANSFER;
        end
        4'hC: begin
          e.alu_op = ALU_PASSB; e.use_imm = 1; e.imm = sx8(instr[7:0]); e.reg_we = 1;
          e.rd = instr[11:8]; e.cls = CLS_TRANSFER;
        end
        4'hD, 4'hF: begin
          e.br = instr[15:12] == 4'hD ? BR_BZ : BR_BNZ; e.rs = instr[11:8]; e.rs_used = 1;
          e.target = instr[7:0]; e.cls = CLS_CONTROL;
        end
        4'hE: begin
          e.br = instr[8] ? BR_CALL : BR_JMP; e.target = instr[7:0]; e.cls = CLS_CONTROL;
        end
        default: begin
          e.cls = CLS_CONTROL;
          case (instr[3:0])
            4'h1: e.br = BR_RET;
            4'h2: e.br = BR_RETI;
            4'h3: e.halt = 1;
            4'h4: e.ei = 1;
            4'h5: e.di = 1;
            default: e.cls = CLS_NONE;
          endcase
        end
      endcase
      checks++;
      if (ctrl !== e) begin
        failures++;
        if (failures < 10) $display("FAIL instr=%h ctrl=%p exp=%p", instr, ctrl, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
