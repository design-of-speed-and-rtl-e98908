// tb_data_mem: self-checking test of the data memory: random writes and
// reads against a model; a write appears on the read port after the clock.
module tb_data_mem;
  logic clk = 0, dm_we = 0;
  logic [7:0] data_adr = 0;
  logic [15:0] dm_wr = 0, dm_rd;
  logic [15:0] model [256];
  bit known [256];
  int checks = 0, failures = 0;

  data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      data_adr = 8'($urandom % 32);
      dm_we = 1'($urandom);
      dm_wr = 16'($urandom);
      #1;
      if (known[data_adr]) begin
        checks++;
        if (dm_rd !== model[data_adr]) begin
          failures++;
          $display("FAIL adr=%h rd=%h exp=%h", data_adr, dm_rd, model[data_adr]);
        end
      end
      @(negedge clk);
      if (dm_we) begin model[data_adr] = dm_wr; known[data_adr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
