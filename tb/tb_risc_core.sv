// tb_risc_core: directed test of the pipelined core on its own, with program
// and data memories modelled here. One program exercises forwarding from both
// later stages, a store and a load through the data port, a load-use stall,
// a call and return through the stack, taken and untaken branches and the
// multiplier; the register file, the data port traffic and the cycle count
// are checked against hand-worked values.
module tb_risc_core;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0, irq = 0;
  pc_t code_adr;
  word_t opcode, dm_wr, dm_rd;
  logic [DADDR_W-1:0] data_adr;
  logic dm_rd_en, dm_wr_en, irq_ack, halted, stack_err;

  word_t imem [256];
  word_t dmem [256];
  int checks = 0, failures = 0;
  int writes = 0;

  risc_core dut (.*);

  assign opcode = imem[code_adr];
  assign dm_rd  = dmem[data_adr];
  always @(posedge clk) if (rst_n && dm_wr_en) begin
    dmem[data_adr] <= dm_wr;
    writes++;
  end

  always #5 clk = ~clk;

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
    static int cycles = 0;
    foreach (imem[a]) imem[a] = enc_sys(FN_HALT);
    foreach (dmem[a]) dmem[a] = 16'hDEAD;
    imem[0]  = {OP_LI,  4'd1, 8'd5};
    imem[1]  = {OP_LI,  4'd2, 8'd7};
    imem[2]  = {OP_ADD, 4'd3, 4'd1, 4'd2};   // 12, R2 from EX/DA, R1 from DA/WB
    imem[3]  = {OP_SW,  4'd3, 4'd0, 4'd1};   // mem[1] = 12
    imem[4]  = {OP_LW,  4'd4, 4'd0, 4'd1};   // R4 = 12
    imem[5]  = {OP_ADD, 4'd5, 4'd4, 4'd4};   // load-use stall, 24
    imem[6]  = {OP_JMP, 4'b0001, 8'd12};     // CALL 12
    imem[7]  = {OP_BZ,  4'd0, 8'd9};         // taken
    imem[8]  = {OP_LI,  4'd6, 8'd99};        // skipped
    imem[9]  = {OP_BNZ, 4'd0, 8'd8};         // not taken
    imem[10] = {OP_MUL, 4'd7, 4'd5, 4'd3};   // 288
    imem[11] = enc_sys(FN_HALT);
    imem[12] = {OP_SUB, 4'd8, 4'd5, 4'd1};   // 19
    imem[13] = {OP_SHL, 4'd9, 4'd1, 4'd1};   // 160
    imem[14] = enc_sys(FN_RET);
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    while (!halted && cycles < 200) begin @(negedge clk); cycles++; end
    check(halted, "halted");
    check(dut.u_regs.regs[0][3] == 12,  "R3");
    check(dut.u_regs.regs[0][4] == 12,  "R4");
    check(dut.u_regs.regs[0][5] == 24,  "R5");
    check(dut.u_regs.regs[0][6] == 0,   "R6 (skipped)");
    check(dut.u_regs.regs[0][7] == 288, "R7");
    check(dut.u_regs.regs[0][8] == 19,  "R8");
    check(dut.u_regs.regs[0][9] == 160, "R9");
    check(dmem[1] == 12 && writes == 1, "data port store");
    check(!stack_err, "stack");
    // 1 reset cycle, 14 instructions issued one per cycle, 1 load-use stall,
    // 3 taken transfers at 2 flushed slots each, then 3 cycles for HALT to
    // move from decode to execute and through the drain cycle.
    check(cycles == 1 + 14 + 1 + 6 + 3, $sformatf("cycles %0d", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
