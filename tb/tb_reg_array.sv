// tb_reg_array: self-checking test of the banked register file: random writes
// and reads in both banks against a model, R0 stays zero, a same-cycle write
// is seen by the read ports, the two banks are independent.
module tb_reg_array;
  logic clk = 0, rst_n = 0;
  logic rd_bank = 0, we = 0, wr_bank = 0;
  logic [3:0] ra_idx = 0, rb_idx = 0, w_idx = 0;
  logic [15:0] regalua, regalub, w_data = 0;
  logic [15:0] model [2][16];
  int checks = 0, failures = 0;

  reg_array dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] exp_rd(logic [3:0] idx);
    if (idx == 0) return 0;
    if (we && wr_bank == rd_bank && w_idx == idx) return w_data;
    return model[rd_bank][idx];
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[b, i]) model[b][i] = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); wr_bank = 1'($urandom); w_idx = 4'($urandom);
      w_data = 16'($urandom);
      rd_bank = 1'($urandom); ra_idx = 4'($urandom);
      rb_idx = (i % 3 == 0) ? w_idx : 4'($urandom);
      #1;
      checks++;
      if (regalua !== exp_rd(ra_idx) || regalub !== exp_rd(rb_idx)) begin
        failures++;
        $display("FAIL bank %0d a[%0d]=%h exp %h b[%0d]=%h exp %h", rd_bank,
                 ra_idx, regalua, exp_rd(ra_idx), rb_idx, regalub, exp_rd(rb_idx));
      end
      @(negedge clk);
      if (we && w_idx != 0) model[wr_bank][w_idx] = w_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
