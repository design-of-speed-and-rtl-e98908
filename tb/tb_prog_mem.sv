// tb_prog_mem: self-checking test of the program memory: words written
// through the load port are read back on the fetch port.
module tb_prog_mem;
  logic clk = 0, ld_we = 0;
  logic [7:0] code_adr = 0, ld_adr = 0;
  logic [15:0] opcode, ld_data = 0;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  prog_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      ld_we = 1; ld_adr = 8'(a); ld_data = 16'($urandom); model[a] = ld_data;
      @(negedge clk);
    end
    ld_we = 0;
    for (int i = 0; i < 1000; i++) begin
      code_adr = 8'($urandom);
      if (i % 4 == 0) begin  // rewrite while fetching elsewhere
        ld_we = 1; ld_adr = 8'($urandom); ld_data = 16'($urandom);
      end
      #1;
      checks++;
      if (opcode !== model[code_adr]) begin
        failures++;
        $display("FAIL adr=%h opcode=%h exp=%h", code_adr, opcode, model[code_adr]);
      end
      @(negedge clk);
      if (ld_we) model[ld_adr] = ld_data;
      ld_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
