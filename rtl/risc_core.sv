// risc_core: 16-bit five-stage pipelined RISC processor core, Harvard style.
//
// Instructions come from a program memory port (code_adr -> opcode) and data
// from a separate data memory port, so fetch and data access never compete.
// The five stages and the registers between them:
//   IF  fetch the instruction at the PC                       -> IF/Reg
//   Reg decode it and read two registers                      -> Reg/EX
//   EX  ALU and address ALU with forwarded operands; control
//       transfers are resolved here, using the return stack   -> EX/DA
//   DA  data memory read or write                             -> DA/WB
//   WB  write the result to the register file
// One instruction enters per clock. Results are fed forward from EX/DA and
// DA/WB into EX, and the register file passes a same-cycle write straight to
// its readers, so only a load followed at once by a user of its result costs
// a stall cycle. A taken branch, jump, call, return or interrupt entry costs
// two cycles (the fetch and decode slots are flushed). CALL and interrupt
// entry push the return address on an 8-bit LIFO stack; interrupt entry also
// switches to the shadow register bank, RETI switches back.
//
// The stages, feed-forward, the LIFO stack, register shadowing and the block
// split (pc, decoder, reg_array, alu, aalu, state_ctrl) are the
// architecture's. Resolving branches in EX, the instruction set, the memory
// timing (combinational read, clocked write) and the interrupt rules are this
// design's choices. All state is reset synchronously by rst_n (active low).
module risc_core
  import risc_pkg::*;
#(
  parameter pc_t         INT_VECTOR  = 8'h02,
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // program memory
  output pc_t                code_adr,
  input  word_t              opcode,
  // data memory
  output logic [DADDR_W-1:0] data_adr,
  output logic               dm_rd_en,
  output logic               dm_wr_en,
  output word_t              dm_wr,
  input  word_t              dm_rd,
  // interrupt and status
  input  logic               irq,
  output logic               irq_ack,
  output logic               halted,
  output logic               stack_err
);

  typedef struct packed {
    logic  valid;
    word_t instr;
    pc_t   pc;
  } ifid_t;

  typedef struct packed {
    logic  valid;
    ctrl_t ctrl;
    pc_t   pc;
    word_t a;
    word_t b;
    logic  bank;
  } idex_t;

  typedef struct packed {
    logic               valid;
    logic               reg_we;
    regidx_t            rd;
    word_t              result;
    logic               mem_rd;
    logic               mem_wr;
    logic [DADDR_W-1:0] addr;
    word_t              sdata;
    logic               bank;
  } exda_t;

  typedef struct packed {
    logic    valid;
    logic    reg_we;
    regidx_t rd;
    word_t   result;
    logic    bank;
  } dawb_t;

  ifid_t ifid;
  idex_t idex;
  exda_t exda;
  dawb_t dawb;

  // controller outputs
  logic pc_en, pc_load, ifid_load, ifid_flush, idex_bubble, inject_int, load_use;
  logic ie, bank;

  // ---------------------------------------------------------------- IF
  pc_t ex_target;

  pc u_pc (
    .clk, .rst_n,
    .en       (pc_en),
    .load     (pc_load),
    .target   (ex_target),
    .code_adr (code_adr)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || ifid_flush) ifid <= '0;
    else if (ifid_load)       ifid <= '{valid: 1'b1, instr: opcode, pc: code_adr};
  end

  // ---------------------------------------------------------------- Reg
  ctrl_t dec_ctrl, id_ctrl;
  word_t regalua, regalub;

  decoder u_dec (.instr(ifid.instr), .ctrl(dec_ctrl));

  always_comb begin
    id_ctrl = dec_ctrl;
    if (inject_int) begin
      id_ctrl     = CTRL_NOP;
      id_ctrl.br  = BR_INT;
      id_ctrl.cls = CLS_CONTROL;
    end
  end

  reg_array u_regs (
    .clk, .rst_n,
    .rd_bank (bank),
    .ra_idx  (dec_ctrl.rs),
    .rb_idx  (dec_ctrl.rt),
    .regalua (regalua),
    .regalub (regalub),
    .we      (dawb.valid && dawb.reg_we),
    .wr_bank (dawb.bank),
    .w_idx   (dawb.rd),
    .w_data  (dawb.result)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || idex_bubble) idex <= '0;
    else idex <= '{valid: ifid.valid, ctrl: id_ctrl, pc: ifid.pc,
                   a: regalua, b: regalub, bank: bank};
  end

  // ---------------------------------------------------------------- EX
  word_t op_a, op_b, alu_b, alu_y;
  logic [1:0] fwd_sel_a, fwd_sel_b;
  logic [DADDR_W-1:0] ex_addr;
  logic ex_taken, stk_push, stk_pop;
  pc_t  stk_din, stk_top;
  logic stk_full, stk_empty;
  logic exda_fwd_we, dawb_fwd_we;

  assign exda_fwd_we = exda.valid && exda.reg_we && !exda.mem_rd;
  assign dawb_fwd_we = dawb.valid && dawb.reg_we;

  fwd_unit u_fwd_a (
    .src (idex.ctrl.rs), .rf_val (idex.a),
    .exda_we (exda_fwd_we), .exda_rd (exda.rd), .exda_val (exda.result),
    .dawb_we (dawb_fwd_we), .dawb_rd (dawb.rd), .dawb_val (dawb.result),
    .val (op_a), .sel (fwd_sel_a)
  );

  fwd_unit u_fwd_b (
    .src (idex.ctrl.rt), .rf_val (idex.b),
    .exda_we (exda_fwd_we), .exda_rd (exda.rd), .exda_val (exda.result),
    .dawb_we (dawb_fwd_we), .dawb_rd (dawb.rd), .dawb_val (dawb.result),
    .val (op_b), .sel (fwd_sel_b)
  );

  assign alu_b = idex.ctrl.use_imm ? idex.ctrl.imm : op_b;

  alu u_alu (.op(idex.ctrl.alu_op), .a(op_a), .b(alu_b), .y(alu_y));

  aalu u_aalu (.base(op_a), .offset(idex.ctrl.imm), .data_adr(ex_addr));

  always_comb begin
    ex_taken  = 1'b0;
    ex_target = idex.ctrl.target;
    stk_push  = 1'b0;
    stk_pop   = 1'b0;
    stk_din   = idex.pc + PC_W'(1);
    if (idex.valid) begin
      unique case (idex.ctrl.br)
        BR_JMP:  ex_taken = 1'b1;
        BR_CALL: begin ex_taken = 1'b1; stk_push = 1'b1; end
        BR_BZ:   ex_taken = (op_a == '0);
        BR_BNZ:  ex_taken = (op_a != '0);
        BR_RET, BR_RETI: begin
          ex_taken  = 1'b1;
          stk_pop   = 1'b1;
          ex_target = stk_top;
        end
        BR_INT: begin
          ex_taken  = 1'b1;
          stk_push  = 1'b1;
          stk_din   = idex.pc;        // resume at the replaced instruction
          ex_target = INT_VECTOR;
        end
        default: ;
      endcase
    end
  end

  assign irq_ack = idex.valid && idex.ctrl.br == BR_INT;

  lifo_stack #(.WIDTH(PC_W), .DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n,
    .push  (stk_push),
    .pop   (stk_pop),
    .din   (stk_din),
    .top   (stk_top),
    .full  (stk_full),
    .empty (stk_empty),
    .err   (stack_err)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) exda <= '0;
    else exda <= '{valid:  idex.valid,
                   reg_we: idex.valid && idex.ctrl.reg_we,
                   rd:     idex.ctrl.rd,
                   result: alu_y,
                   mem_rd: idex.valid && idex.ctrl.mem_rd,
                   mem_wr: idex.valid && idex.ctrl.mem_wr,
                   addr:   ex_addr,
                   sdata:  op_b,
                   bank:   idex.bank};
  end

  // ---------------------------------------------------------------- DA
  assign data_adr = exda.addr;
  assign dm_rd_en = exda.mem_rd;
  assign dm_wr_en = exda.mem_wr;
  assign dm_wr    = exda.sdata;

  always_ff @(posedge clk) begin
    if (!rst_n) dawb <= '0;
    else dawb <= '{valid:  exda.valid,
                   reg_we: exda.reg_we,
                   rd:     exda.rd,
                   result: exda.mem_rd ? dm_rd : exda.result,
                   bank:   exda.bank};
  end

  // ---------------------------------------------------------------- control
  state_ctrl u_ctrl (
    .clk, .rst_n,
    .id_valid   (ifid.valid),
    .id_rs      (dec_ctrl.rs),
    .id_rs_used (dec_ctrl.rs_used),
    .id_rt      (dec_ctrl.rt),
    .id_rt_used (dec_ctrl.rt_used),
    .ex_valid   (idex.valid),
    .ex_mem_rd  (idex.ctrl.mem_rd),
    .ex_rd      (idex.ctrl.rd),
    .ex_br      (idex.ctrl.br),
    .ex_taken   (ex_taken),
    .ex_halt    (idex.ctrl.halt),
    .ex_ei      (idex.ctrl.ei),
    .ex_di      (idex.ctrl.di),
    .irq,
    .pc_en, .pc_load, .ifid_load, .ifid_flush, .idex_bubble,
    .inject_int, .load_use, .ie, .bank, .halted
  );

  // A return stack entry is pushed only by a call or interrupt entry and
  // popped only by a return, never both in one cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(stk_push && stk_pop));

endmodule
