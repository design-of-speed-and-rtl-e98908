// tb_fwd_unit: self-checking test of the forwarding selection: newest
// producer wins, register 0 is never forwarded.
module tb_fwd_unit;
  logic [3:0] src, exda_rd, dawb_rd;
  logic exda_we, dawb_we;
  logic [15:0] rf_val, exda_val, dawb_val, val;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  logic [15:0] exp_v;
  logic [1:0]  exp_s;

  fwd_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      src = 4'($urandom % 4); exda_rd = 4'($urandom % 4); dawb_rd = 4'($urandom % 4);
      exda_we = 1'($urandom); dawb_we = 1'($urandom);
      rf_val = 16'($urandom); exda_val = 16'($urandom); dawb_val = 16'($urandom);
      #1;
      exp_v = rf_val; exp_s = 0;
      if (src != 0) begin
        if (dawb_we && dawb_rd == src) begin exp_v = dawb_val; exp_s = 2; end
        if (exda_we && exda_rd == src) begin exp_v = exda_val; exp_s = 1; end
      end
      checks++;
      if (val !== exp_v || sel !== exp_s) begin
        failures++;
        $display("FAIL src=%0d val=%h exp=%h sel=%0d exp=%0d", src, val, exp_v, sel, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
