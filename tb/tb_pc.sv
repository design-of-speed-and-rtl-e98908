// tb_pc: self-checking test of the program counter: reset, increment, hold
// and load with load taking priority, against a cycle model.
module tb_pc;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [7:0] target = 0, code_adr;
  int checks = 0, failures = 0;
  int model;

  pc dut (.clk, .rst_n, .en, .load, .target, .code_adr);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1; model = 0;
    for (int i = 0; i < 1000; i++) begin
      en     = ($urandom % 4) != 0;
      load   = ($urandom % 8) == 0;
      target = 8'($urandom);
      if (i == 500) rst_n = 0;
      @(negedge clk);
      if (!rst_n)    model = 0;
      else if (load) model = int'(target);
      else if (en)   model = (model + 1) % 256;
      rst_n = 1;
      checks++;
      if (int'(code_adr) != model) begin
        failures++;
        $display("FAIL cycle %0d pc=%0d exp=%0d", i, code_adr, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
