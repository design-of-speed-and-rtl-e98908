// tb_risc_top: end-to-end test of the processor with its memories and board
// I/O, at the design's default parameters.
//
// 1. Random programs (ALU, immediates, loads/stores including the I/O
//    address, forward branches, calls to subroutines) run on the processor and
//    on an instruction-level reference model written here; registers of the
//    normal bank, every data-memory word, the display output and the number
//    of display writes must agree after HALT.
//    The same with interrupts raised at random cycles: the handler runs in
//    the shadow bank, so the main program's results must still agree with
//    the model, and the handler's count must equal the interrupt entries.
// 2. An interrupt program: a counting loop in the normal bank while three
//    interrupts run a handler in the shadow bank that reuses the same register
//    numbers; the loop result, the handler's counter and the display are
//    checked.
// 3. Rates: an independent instruction costs one cycle, a load followed by a
//    user of its result one extra cycle, a taken jump two extra cycles, a
//    dependent ALU chain (forwarded) none.
// Each mechanism (forwarding from both stages, load-use stall, flush, call,
// return, interrupt entry, bank switch, I/O read and write, halt, the three
// instruction classes) is counted and must occur at least once.
module tb_risc_top;
  import risc_pkg::*;

  logic  clk = 0, rst_n = 0, ld_we = 0, irq = 0;
  pc_t   ld_adr = 0;
  word_t ld_data = 0, switches = 16'h5A3C, lcd_data;
  logic  lcd_stb, irq_ack, halted, stack_err;

  risc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t prog [256];

  // -------------------------------------------------------------- counters
  typedef enum int {M_FWD_EXDA, M_FWD_DAWB, M_LOAD_USE, M_FLUSH, M_CALL, M_RET,
                    M_INT, M_BANK, M_IO_RD, M_IO_WR, M_HALT, M_ARITH, M_TRANSFER,
                    M_CONTROL, M_NUM} mech_e;
  int mech [M_NUM];
  logic bank_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.idex.valid && (dut.u_core.fwd_sel_a == 2'd1 || dut.u_core.fwd_sel_b == 2'd1))
      mech[M_FWD_EXDA]++;
    if (dut.u_core.idex.valid && (dut.u_core.fwd_sel_a == 2'd2 || dut.u_core.fwd_sel_b == 2'd2))
      mech[M_FWD_DAWB]++;
    if (dut.u_core.load_use && dut.u_core.idex_bubble && !dut.u_core.pc_load) mech[M_LOAD_USE]++;
    if (dut.u_core.pc_load) mech[M_FLUSH]++;
    if (dut.u_core.idex.valid && dut.u_core.idex.ctrl.br == BR_CALL) mech[M_CALL]++;
    if (dut.u_core.idex.valid && dut.u_core.idex.ctrl.br inside {BR_RET, BR_RETI}) mech[M_RET]++;
    if (irq_ack) mech[M_INT]++;
    if (dut.u_core.bank && !bank_q) mech[M_BANK]++;
    bank_q <= dut.u_core.bank;
    if (dut.is_io && dut.dm_rd_en) mech[M_IO_RD]++;
    if (lcd_stb) mech[M_IO_WR]++;
    if (dut.u_core.idex.valid)
      case (dut.u_core.idex.ctrl.cls)
        CLS_ARITH:    mech[M_ARITH]++;
        CLS_TRANSFER: mech[M_TRANSFER]++;
        CLS_CONTROL:  mech[M_CONTROL]++;
        default: ;
      endcase
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // -------------------------------------------------------------- running
  int lcd_writes, acks;
  always @(posedge clk) if (lcd_stb) lcd_writes++;
  always @(posedge clk) if (rst_n && irq_ack) acks++;

  // Loads prog[] while the processor is in reset, releases reset and counts
  // cycles until halted. irq_at lists cycles at which to raise irq; it drops
  // when the processor acknowledges.
  task automatic run(input int irq_at [$], output int cycles);
    rst_n = 0;
    irq   = 0;
    for (int a = 0; a < 256; a++) begin
      ld_we = 1; ld_adr = pc_t'(a); ld_data = prog[a];
      @(negedge clk);
    end
    ld_we = 0;
    @(negedge clk);
    lcd_writes = 0;
    acks = 0;
    rst_n = 1;
    cycles = 0;
    while (!halted && cycles < 20000) begin
      if (irq_at.size() > 0 && cycles == irq_at[0]) begin
        irq = 1;
        void'(irq_at.pop_front());
      end
      @(posedge clk);
      if (irq_ack) irq = 0;
      @(negedge clk);
      cycles++;
    end
    check(halted, "program did not halt");
    if (halted) mech[M_HALT]++;
  endtask

  // -------------------------------------------------------------- reference
  word_t m_regs [16];
  word_t m_mem  [256];
  word_t m_lcd;
  int    m_lcd_writes;

  function automatic word_t sx4(logic [3:0] v); return {{12{v[3]}}, v}; endfunction
  function automatic word_t sx8(logic [7:0] v); return {{8{v[7]}}, v};  endfunction

  function automatic word_t m_alu(logic [3:0] op, word_t x, word_t y);
    logic [31:0] p;
    case (op)
      4'h1: return x + y;
      4'h2: return x - y;
      4'h3: return x & y;
      4'h4: return x | y;
      4'h5: return x ^ y;
      4'h6: begin p = 32'(x) * 32'(y); return p[15:0]; end
      4'h7: return x << y[3:0];
      default: return x >> y[3:0];
    endcase
  endfunction

  task automatic run_model();
    int pc = 0;
    int stk [$];
    m_lcd = 0;
    m_lcd_writes = 0;
    foreach (m_regs[i]) m_regs[i] = 0;
    for (int a = 0; a < 256; a++) m_mem[a] = dut.u_dmem.mem[a];
    for (int step = 0; step < 20000; step++) begin
      word_t w = prog[pc];
      logic [3:0] a = w[11:8], b = w[7:4], c = w[3:0];
      int npc = (pc + 1) % 256;
      int adr;
      case (w[15:12])
        4'h0: begin
          if (c == 4'h3) return;
          if (c == 4'h1) npc = stk.pop_back();
        end
        4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h7, 4'h8:
          m_regs[a] = m_alu(w[15:12], m_regs[b], m_regs[c]);
        4'h9: m_regs[a] = m_regs[b] + sx4(c);
        4'hA: begin
          adr = int'(8'(m_regs[b] + sx4(c)));
          m_regs[a] = (adr == 255) ? switches : m_mem[adr];
        end
        4'hB: begin
          adr = int'(8'(m_regs[b] + sx4(c)));
          if (adr == 255) begin m_lcd = m_regs[a]; m_lcd_writes++; end
          else m_mem[adr] = m_regs[a];
        end
        4'hC: m_regs[a] = sx8(w[7:0]);
        4'hD: if (m_regs[a] == 0) npc = int'(w[7:0]);
        4'hF: if (m_regs[a] != 0) npc = int'(w[7:0]);
        default: begin  // JMP / CALL
          if (w[8]) stk.push_back((pc + 1) % 256);
          npc = int'(w[7:0]);
        end
      endcase
      m_regs[0] = 0;
      pc = npc;
    end
  endtask

  // -------------------------------------------------------------- programs
  function automatic word_t rand_alu_or_mem();
    logic [3:0] rd = 4'($urandom % 8), rs = 4'($urandom % 8), rt = 4'($urandom % 8);
    case ($urandom % 10)
      0, 1, 2: return {4'(1 + $urandom % 8), rd, rs, rt};
      3:       return {OP_ADDI, rd, rs, 4'($urandom)};
      4, 5:    return {OP_LI, rd, 8'($urandom)};
      6:       return {OP_LW, rd, ($urandom % 2) ? 4'h0 : rs, 4'($urandom)};
      7:       return {OP_SW, rd, ($urandom % 2) ? 4'h0 : rs, 4'($urandom)};
      8:       return {OP_LW, rd, 4'h0, 4'hF};       // switches
      default: return {OP_SW, rd, 4'h0, 4'hF};       // display
    endcase
  endfunction

  // A program of n random instructions from address `first`, then HALT, then
  // three subroutines. With with_irq, address 0 jumps over an interrupt
  // handler at INT_VECTOR (2) that counts interrupts in mem[FE] using the
  // shadow bank, the main program clears the count and enables interrupts,
  // and memory accesses are R0-based and avoid address FE.
  function automatic word_t fix_for_irq(word_t w);
    if (w[15:12] inside {OP_LW, OP_SW}) begin
      w[7:4] = 4'h0;
      if (w[3:0] == 4'hE) w[3:0] = 4'h0;
    end
    if (w == enc_sys(FN_DI)) w = enc_sys(FN_NOP);
    return w;
  endfunction

  task automatic gen_random_prog(bit with_irq);
    int first = with_irq ? 10 : 0;
    int n = 30 + $urandom % 40;
    int last = first + n;
    int sub [3];
    for (int a = 0; a < 256; a++) prog[a] = enc_sys(FN_HALT);
    for (int s = 0; s < 3; s++) begin
      sub[s] = last + 1 + 6 * s;
      for (int k = 0; k < 5; k++) prog[sub[s] + k] = rand_alu_or_mem();
      prog[sub[s] + 5] = enc_sys(FN_RET);
    end
    for (int a = first; a < last; a++) begin
      case ($urandom % 12)
        0: prog[a] = {(($urandom % 2) ? OP_BZ : OP_BNZ), 4'($urandom % 8),
                      8'(a + 1 + $urandom % (last - a))};
        1: prog[a] = {OP_JMP, 4'b0001, 8'(sub[$urandom % 3])};
        2: prog[a] = {OP_LW, 4'($urandom % 8), 4'h0, 4'($urandom)};   // load then use
        3: prog[a] = enc_sys(($urandom % 2) ? FN_NOP : FN_DI);
        default: prog[a] = rand_alu_or_mem();
      endcase
    end
    if (with_irq) begin
      for (int a = first; a < 256; a++) prog[a] = fix_for_irq(prog[a]);
      prog[0] = {OP_JMP, 4'b0000, 8'd8};
      prog[1] = enc_sys(FN_NOP);
      prog[2] = {OP_LW,   4'd1, 4'd0, 4'hE};
      prog[3] = {OP_ADDI, 4'd1, 4'd1, 4'h1};
      prog[4] = {OP_SW,   4'd1, 4'd0, 4'hE};
      prog[5] = {OP_ADD,  4'd2, 4'd1, 4'd1};
      prog[6] = {OP_LI,   4'd3, 8'hA5};
      prog[7] = enc_sys(FN_RETI);
      prog[8] = {OP_SW,   4'd0, 4'd0, 4'hE};
      prog[9] = enc_sys(FN_EI);
    end
  endtask

  task automatic compare_with_model(string name, bit skip_fe = 0);
    for (int r = 1; r < 16; r++)
      check(dut.u_core.u_regs.regs[0][r] == m_regs[r],
            $sformatf("%s: R%0d=%h exp %h", name, r, dut.u_core.u_regs.regs[0][r], m_regs[r]));
    for (int a = 0; a < 255; a++)
      if (!(skip_fe && a == 'hFE)) check(dut.u_dmem.mem[a] == m_mem[a],
            $sformatf("%s: mem[%0d]=%h exp %h", name, a, dut.u_dmem.mem[a], m_mem[a]));
    check(lcd_data == m_lcd, $sformatf("%s: lcd=%h exp %h", name, lcd_data, m_lcd));
    check(lcd_writes == m_lcd_writes,
          $sformatf("%s: lcd writes %0d exp %0d", name, lcd_writes, m_lcd_writes));
    check(!stack_err, $sformatf("%s: stack error", name));
  endtask

  // -------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------------- tests
  initial begin
    int cyc, cyc2, noirq [$];
    static int irqs_taken = 0;
    foreach (mech[i]) mech[i] = 0;

    // 1. random programs against the reference model
    for (int t = 0; t < 25; t++) begin
      gen_random_prog(1'b0);
      rst_n = 0;
      @(negedge clk);
      run_model();
      run(noirq, cyc);
      compare_with_model($sformatf("random %0d", t));
    end

    // 1b. random programs interrupted at random cycles: the main program's
    // registers and memory must not notice; the handler runs once per entry
    for (int t = 0; t < 25; t++) begin
      int at [$];
      int c;
      at.delete();
      c = 5;
      gen_random_prog(1'b1);
      rst_n = 0;
      @(negedge clk);
      run_model();
      for (int k = 0; k < 4; k++) begin
        c += 3 + $urandom % 25;
        at.push_back(c);
      end
      run(at, cyc);
      compare_with_model($sformatf("random irq %0d", t), 1'b1);
      check(dut.u_dmem.mem[8'hFE] == 16'(acks),
            $sformatf("random irq %0d: handler count %0d, entries %0d", t, dut.u_dmem.mem[8'hFE], acks));
      check(dut.u_core.bank == 1'b0, $sformatf("random irq %0d: bank", t));
      irqs_taken += acks;
    end
    check(irqs_taken > 40, $sformatf("only %0d random interrupts taken", irqs_taken));

    // 2. interrupts with the shadow register bank
    foreach (prog[a]) prog[a] = enc_sys(FN_HALT);
    prog[0]  = {OP_JMP, 4'b0000, 8'd8};
    prog[2]  = {OP_LW,   4'd1, 4'd0, 4'hE};      // handler: R1 = mem[FE]
    prog[3]  = {OP_ADDI, 4'd1, 4'd1, 4'h1};
    prog[4]  = {OP_SW,   4'd1, 4'd0, 4'hE};
    prog[5]  = {OP_SW,   4'd1, 4'd0, 4'hF};      // display <- count
    prog[6]  = {OP_ADD,  4'd2, 4'd1, 4'd1};      // clobber shadow R2
    prog[7]  = enc_sys(FN_RETI);
    prog[8]  = {OP_SW,   4'd0, 4'd0, 4'hE};      // main: count = 0
    prog[9]  = enc_sys(FN_EI);
    prog[10] = {OP_LI,   4'd1, 8'd0};
    prog[11] = {OP_LI,   4'd2, 8'd1};
    prog[12] = {OP_LI,   4'd3, 8'd40};
    prog[13] = {OP_ADD,  4'd1, 4'd1, 4'd2};      // loop: sum += i
    prog[14] = {OP_ADDI, 4'd2, 4'd2, 4'h1};
    prog[15] = {OP_SUB,  4'd4, 4'd3, 4'd2};
    prog[16] = {OP_BNZ,  4'd4, 8'd13};
    prog[17] = enc_sys(FN_DI);
    prog[18] = {OP_JMP,  4'b0001, 8'd20};        // CALL
    prog[19] = enc_sys(FN_HALT);
    prog[20] = {OP_SW,   4'd1, 4'd0, 4'h0};      // mem[0] = sum
    prog[21] = enc_sys(FN_RET);
    begin
      static int at [$] = '{30, 95, 170};
      run(at, cyc);
    end
    check(dut.u_core.u_regs.regs[0][1] == 16'd780, "irq: sum");
    check(dut.u_core.u_regs.regs[0][2] == 16'd40,  "irq: main R2 clobbered");
    check(dut.u_core.u_regs.regs[0][4] == 16'd0,   "irq: R4");
    check(dut.u_dmem.mem[0] == 16'd780, "irq: mem[0]");
    check(dut.u_dmem.mem[8'hFE] == 16'd3, $sformatf("irq: count %0d", dut.u_dmem.mem[8'hFE]));
    check(dut.u_core.u_regs.regs[1][2] == 16'd6, "irq: shadow R2");
    check(lcd_data == 16'd3 && lcd_writes == 3, "irq: display");
    check(!stack_err && dut.u_core.bank == 1'b0, "irq: stack / bank after RETI");

    // 3. rates
    // independent instructions: one per cycle
    foreach (prog[a]) prog[a] = enc_sys(FN_HALT);
    for (int a = 0; a < 20; a++) prog[a] = {OP_LI, 4'(1 + a % 15), 8'(a)};
    run(noirq, cyc);
    for (int a = 0; a < 60; a++) prog[a] = {OP_LI, 4'(1 + a % 15), 8'(a)};
    run(noirq, cyc2);
    check(cyc2 - cyc == 40, $sformatf("CPI: 40 more instructions took %0d cycles", cyc2 - cyc));
    // dependent ALU chain: forwarding, no extra cycles
    for (int a = 0; a < 60; a++) prog[a] = {OP_ADDI, 4'd1, 4'd1, 4'h1};
    run(noirq, cyc2);
    check(cyc2 - cyc == 40, $sformatf("forwarded chain: %0d", cyc2 - cyc));
    check(dut.u_core.u_regs.regs[0][1] == 16'd60, "forwarded chain result");
    // load-use: one extra cycle per pair
    for (int a = 0; a < 60; a += 2) begin
      prog[a]     = {OP_LW,  4'd1, 4'd0, 4'h0};
      prog[a + 1] = {OP_ADD, 4'd2, 4'd1, 4'd1};
    end
    run(noirq, cyc2);
    check(cyc2 - cyc == 70, $sformatf("load-use: %0d", cyc2 - cyc));
    // taken jumps: two extra cycles each
    for (int a = 0; a < 60; a++) prog[a] = {OP_JMP, 4'b0000, 8'(a + 1)};
    run(noirq, cyc2);
    check(cyc2 - cyc == 40 + 2 * 60, $sformatf("jumps: %0d", cyc2 - cyc));

    // stack overflow: 9 nested calls
    foreach (prog[a]) prog[a] = enc_sys(FN_HALT);
    for (int a = 0; a < 9; a++) prog[a] = {OP_JMP, 4'b0001, 8'(a + 1)};
    run(noirq, cyc);
    check(stack_err, "stack overflow flag");

    foreach (mech[i]) begin
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_e'(i)));
      $display("mechanism %-12s %0d", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
