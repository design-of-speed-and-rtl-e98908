// decoder: instruction decoder of the Reg (decode) stage.
//
// Turns one 16-bit instruction into the control word (ctrl_t) that travels
// down the pipeline: ALU operation, immediate, register indices and which of
// them are read, register write enable, memory read/write, control-transfer
// kind and target, and the instruction class (arithmetic, transfer, control).
// The decode stage itself is the architecture's; the encoding is this design's
// own and is listed in risc_pkg. Unknown system functions decode as NOP.
//
// Purely combinational.
module decoder
  import risc_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);
  opcode_e op;
  sysfn_e  fn;
  regidx_t f_rd, f_rs, f_rt;

  always_comb begin
    op   = opcode_e'(instr[15:12]);
    fn   = sysfn_e'(instr[3:0]);
    f_rd = instr[11:8];
    f_rs = instr[7:4];
    f_rt = instr[3:0];
    ctrl = CTRL_NOP;
    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_MUL, OP_SHL, OP_SHR: begin
        unique case (op)
          OP_ADD:  ctrl.alu_op = ALU_ADD;
          OP_SUB:  ctrl.alu_op = ALU_SUB;
          OP_AND:  ctrl.alu_op = ALU_AND;
          OP_OR:   ctrl.alu_op = ALU_OR;
          OP_XOR:  ctrl.alu_op = ALU_XOR;
          OP_MUL:  ctrl.alu_op = ALU_MUL;
          OP_SHL:  ctrl.alu_op = ALU_SHL;
          default: ctrl.alu_op = ALU_SHR;
        endcase
        ctrl.reg_we  = 1'b1;
        ctrl.rd      = f_rd;
        ctrl.rs      = f_rs;
        ctrl.rt      = f_rt;
        ctrl.rs_used = 1'b1;
        ctrl.rt_used = 1'b1;
        ctrl.cls     = CLS_ARITH;
      end
      OP_ADDI: begin
        ctrl.alu_op  = ALU_ADD;
        ctrl.use_imm = 1'b1;
        ctrl.imm     = word_t'(signed'(instr[3:0]));
        ctrl.reg_we  = 1'b1;
        ctrl.rd      = f_rd;
        ctrl.rs      = f_rs;
        ctrl.rs_used = 1'b1;
        ctrl.cls     = CLS_ARITH;
      end
      OP_LW: begin
        ctrl.imm     = word_t'(signed'(instr[3:0]));
        ctrl.reg_we  = 1'b1;
        ctrl.rd      = f_rd;
        ctrl.rs      = f_rs;
        ctrl.rs_used = 1'b1;
        ctrl.mem_rd  = 1'b1;
        ctrl.cls     = CLS_TRANSFER;
      end
      OP_SW: begin
        ctrl.imm     = word_t'(signed'(instr[3:0]));
        ctrl.rs      = f_rs;
        ctrl.rt      = f_rd;
        ctrl.rs_used = 1'b1;
        ctrl.rt_used = 1'b1;
        ctrl.mem_wr  = 1'b1;
        ctrl.cls     = CLS_TRANSFER;
      end
      OP_LI: begin
        ctrl.alu_op  = ALU_PASSB;
        ctrl.use_imm = 1'b1;
        ctrl.imm     = word_t'(signed'(instr[7:0]));
        ctrl.reg_we  = 1'b1;
        ctrl.rd      = f_rd;
        ctrl.cls     = CLS_TRANSFER;
      end
      OP_BZ, OP_BNZ: begin
        ctrl.br      = (op == OP_BZ) ? BR_BZ : BR_BNZ;
        ctrl.rs      = f_rd;
        ctrl.rs_used = 1'b1;
        ctrl.target  = instr[7:0];
        ctrl.cls     = CLS_CONTROL;
      end
      OP_JMP: begin
        ctrl.br      = instr[8] ? BR_CALL : BR_JMP;
        ctrl.target  = instr[7:0];
        ctrl.cls     = CLS_CONTROL;
      end
      default: begin  // OP_SYS
        unique case (fn)
          FN_RET:  begin ctrl.br = BR_RET;  ctrl.cls = CLS_CONTROL; end
          FN_RETI: begin ctrl.br = BR_RETI; ctrl.cls = CLS_CONTROL; end
          FN_HALT: begin ctrl.halt = 1'b1;  ctrl.cls = CLS_CONTROL; end
          FN_EI:   begin ctrl.ei = 1'b1;    ctrl.cls = CLS_CONTROL; end
          FN_DI:   begin ctrl.di = 1'b1;    ctrl.cls = CLS_CONTROL; end
          default: ;
        endcase
      end
    endcase
  end
endmodule
