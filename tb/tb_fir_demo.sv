// tb_fir_demo: the processor running a small signal-processing kernel, a
// 4-tap FIR filter y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3] over
// 16 random 8-bit samples (13 outputs, 16-bit wrap-around arithmetic).
//
// The program first stores the samples and coefficients with LI/SW, then
// loads the coefficients into R8..R11 and loops: four loads, four multiplies,
// three adds and a store per output. Outputs are compared with values
// computed here, the last one must appear on the display, and the cycle count
// must match the pipeline's costs: one cycle per instruction, plus one per
// load whose result is used by the next instruction, plus two per taken
// branch.
module tb_fir_demo;
  import risc_pkg::*;

  logic  clk = 0, rst_n = 0, ld_we = 0, irq = 0;
  pc_t   ld_adr = 0;
  word_t ld_data = 0, switches = 0, lcd_data;
  logic  lcd_stb, irq_ack, halted, stack_err;

  risc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t prog [256];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x [16], h [4];
    word_t y;
    static int pc = 0, cycles = 0;
    int loop_top, expected_cycles;
    foreach (prog[a]) prog[a] = enc_sys(FN_HALT);
    foreach (x[i]) x[i] = 8'($urandom);
    foreach (h[i]) h[i] = 8'($urandom);
    // store samples at 0x10.., coefficients at 0x08..
    foreach (x[i]) begin
      prog[pc++] = {OP_LI, 4'd1, x[i]};
      prog[pc++] = {OP_LI, 4'd2, 8'(16 + i)};     // R2 = address
      prog[pc++] = {OP_SW, 4'd1, 4'd2, 4'h0};
    end
    foreach (h[i]) begin
      prog[pc++] = {OP_LI, 4'd1, h[i]};
      prog[pc++] = {OP_LI, 4'd2, 8'(8 + i)};
      prog[pc++] = {OP_SW, 4'd1, 4'd2, 4'h0};
    end
    prog[pc++] = {OP_LI, 4'd7, 8'd8};
    prog[pc++] = {OP_LW, 4'd8,  4'd7, 4'd0};
    prog[pc++] = {OP_LW, 4'd9,  4'd7, 4'd1};
    prog[pc++] = {OP_LW, 4'd10, 4'd7, 4'd2};
    prog[pc++] = {OP_LW, 4'd11, 4'd7, 4'd3};
    prog[pc++] = {OP_LI, 4'd1, 8'h13};            // &x[3]
    prog[pc++] = {OP_LI, 4'd2, 8'h23};            // &y[3]
    prog[pc++] = {OP_LI, 4'd3, 8'd13};            // outputs
    loop_top = pc;
    prog[pc++] = {OP_LW,  4'd4, 4'd1, 4'h0};
    prog[pc++] = {OP_MUL, 4'd5, 4'd4, 4'd8};
    prog[pc++] = {OP_LW,  4'd4, 4'd1, 4'hF};     // x[n-1]
    prog[pc++] = {OP_MUL, 4'd6, 4'd4, 4'd9};
    prog[pc++] = {OP_ADD, 4'd5, 4'd5, 4'd6};
    prog[pc++] = {OP_LW,  4'd4, 4'd1, 4'hE};     // x[n-2]
    prog[pc++] = {OP_MUL, 4'd6, 4'd4, 4'd10};
    prog[pc++] = {OP_ADD, 4'd5, 4'd5, 4'd6};
    prog[pc++] = {OP_LW,  4'd4, 4'd1, 4'hD};     // x[n-3]
    prog[pc++] = {OP_MUL, 4'd6, 4'd4, 4'd11};
    prog[pc++] = {OP_ADD, 4'd5, 4'd5, 4'd6};
    prog[pc++] = {OP_SW,  4'd5, 4'd2, 4'h0};
    prog[pc++] = {OP_ADDI, 4'd1, 4'd1, 4'h1};
    prog[pc++] = {OP_ADDI, 4'd2, 4'd2, 4'h1};
    prog[pc++] = {OP_ADDI, 4'd3, 4'd3, 4'hF};    // -1
    prog[pc++] = {OP_BNZ,  4'd3, 8'(loop_top)};
    prog[pc++] = {OP_SW,   4'd5, 4'd0, 4'hF};    // display last output
    prog[pc++] = enc_sys(FN_HALT);

    for (int a = 0; a < 256; a++) begin
      ld_we = 1; ld_adr = pc_t'(a); ld_data = prog[a];
      @(negedge clk);
    end
    ld_we = 0;
    @(negedge clk);
    rst_n = 1;
    while (!halted && cycles < 5000) begin @(negedge clk); cycles++; end
    check(halted, "halted");

    for (int n = 3; n < 16; n++) begin
      y = 0;
      for (int k = 0; k < 4; k++) y += {{8{h[k][7]}}, h[k]} * {{8{x[n-k][7]}}, x[n-k]};
      check(dut.u_dmem.mem[8'h20 + n] == y,
            $sformatf("y[%0d]=%h exp %h", n, dut.u_dmem.mem[8'h20 + n], y));
      if (n == 15) check(lcd_data == y, "display shows y[15]");
    end
    // instructions: 16*3 + 4*3 stores, 5 + 3 setup, 13*16 loop, 2 tail;
    // 4 load-use stalls per pass, 12 taken branches; 1 reset + 3 halt cycles
    expected_cycles = (48 + 12 + 8 + 13 * 16 + 2) + 13 * 4 + 12 * 2 + 1 + 3;
    check(cycles == expected_cycles, $sformatf("cycles %0d exp %0d", cycles, expected_cycles));
    $display("FIR: 13 outputs in %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
