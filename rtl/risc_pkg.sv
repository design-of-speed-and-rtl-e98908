// risc_pkg: types and constants shared by the 16-bit five-stage Harvard RISC.
//
// The processor works on 16-bit words and 16-bit instructions. The word width,
// the five pipeline stages and the separate program and data memories follow
// the architecture this design implements; the instruction encoding below is
// this design's own, since no encoding was published for it. It is a small
// MIPS-like three-register load/store set:
//
//   [15:12] op   [11:8] rd   [7:4] rs   [3:0] rt      ADD SUB AND OR XOR MUL SHL SHR
//   [15:12] op   [11:8] rd   [7:4] rs   [3:0] imm4    ADDI, LW rd,imm4(rs)
//   [15:12] op   [11:8] rt   [7:4] rs   [3:0] imm4    SW rt,imm4(rs)
//   [15:12] op   [11:8] rd   [7:0] imm8               LI rd,simm8
//   [15:12] op   [11:8] rs   [7:0] target             BZ / BNZ rs,target (absolute)
//   [15:12] op   [11:9] 0 [8] link [7:0] target       JMP (link=0) / CALL (link=1)
//   [15:12] 0    [11:4] 0    [3:0] fn                 NOP RET RETI HALT EI DI
//
// Register R0 always reads zero. Immediates are sign-extended.
package risc_pkg;

  localparam int unsigned XLEN    = 16;  // data and instruction width
  localparam int unsigned NREGS   = 16;  // registers per bank
  localparam int unsigned PC_W    = 8;   // program address width (= stack width)
  localparam int unsigned DADDR_W = 8;   // data address width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [PC_W-1:0] pc_t;
  typedef logic [3:0]      regidx_t;

  typedef enum logic [3:0] {
    OP_SYS  = 4'h0, OP_ADD = 4'h1, OP_SUB = 4'h2, OP_AND = 4'h3,
    OP_OR   = 4'h4, OP_XOR = 4'h5, OP_MUL = 4'h6, OP_SHL = 4'h7,
    OP_SHR  = 4'h8, OP_ADDI = 4'h9, OP_LW = 4'hA, OP_SW  = 4'hB,
    OP_LI   = 4'hC, OP_BZ  = 4'hD, OP_JMP = 4'hE, OP_BNZ = 4'hF
  } opcode_e;

  typedef enum logic [3:0] {
    FN_NOP = 4'h0, FN_RET = 4'h1, FN_RETI = 4'h2, FN_HALT = 4'h3,
    FN_EI  = 4'h4, FN_DI  = 4'h5
  } sysfn_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_MUL, ALU_SHL, ALU_SHR, ALU_PASSB
  } alu_op_e;

  // Instruction classes, matching the arithmetic / transfer / control
  // write-back variants of the controller's state diagram.
  typedef enum logic [1:0] {
    CLS_NONE, CLS_ARITH, CLS_TRANSFER, CLS_CONTROL
  } iclass_e;

  // Control transfers. BR_INT is never decoded from memory: the controller
  // injects it in place of an instruction when an interrupt is taken.
  typedef enum logic [2:0] {
    BR_NONE, BR_JMP, BR_CALL, BR_BZ, BR_BNZ, BR_RET, BR_RETI, BR_INT
  } br_e;

  typedef struct packed {
    alu_op_e alu_op;
    logic    use_imm;  // ALU operand B is the immediate
    word_t   imm;
    logic    reg_we;
    regidx_t rd;
    regidx_t rs;       // operand A / address base / branch condition
    regidx_t rt;       // operand B / store data
    logic    rs_used;
    logic    rt_used;
    logic    mem_rd;
    logic    mem_wr;
    br_e     br;
    pc_t     target;
    logic    halt;
    logic    ei;
    logic    di;
    iclass_e cls;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{alu_op: ALU_ADD, use_imm: 1'b0, imm: '0, reg_we: 1'b0,
                                 rd: '0, rs: '0, rt: '0, rs_used: 1'b0, rt_used: 1'b0,
                                 mem_rd: 1'b0, mem_wr: 1'b0, br: BR_NONE, target: '0,
                                 halt: 1'b0, ei: 1'b0, di: 1'b0, cls: CLS_NONE};

  // Instruction builders, used by testbenches and program images.
  function automatic word_t enc_r(opcode_e op, regidx_t rd, regidx_t rs, regidx_t rt);
    return {op, rd, rs, rt};
  endfunction
  function automatic word_t enc_i8(opcode_e op, regidx_t r, logic [7:0] v);
    return {op, r, v};
  endfunction
  function automatic word_t enc_sys(sysfn_e fn);
    return {OP_SYS, 8'h00, fn};
  endfunction

endpackage
