// tb_board_io: self-checking test of the board I/O: switches appear on
// rd_data two clocks later, a write updates the display word and gives a
// one-cycle strobe, and reset clears both.
module tb_board_io;
  logic clk = 0, rst_n = 0, wr_en = 0, lcd_stb;
  logic [15:0] switches = 0, rd_data, wr_data = 0, lcd_data;
  logic [15:0] sw_hist [3];
  logic [15:0] exp_lcd;
  logic exp_stb;
  int checks = 0, failures = 0;

  board_io dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++;
    if (rd_data !== 0 || lcd_data !== 0 || lcd_stb !== 0) begin
      failures++; $display("FAIL reset values");
    end
    rst_n = 1; exp_lcd = 0; exp_stb = 0;
    sw_hist = '{0, 0, 0};
    for (int i = 0; i < 500; i++) begin
      switches = 16'($urandom);
      wr_en    = ($urandom % 3) == 0;
      wr_data  = 16'($urandom);
      @(negedge clk);
      sw_hist[2] = sw_hist[1];
      sw_hist[1] = sw_hist[0];
      sw_hist[0] = switches;
      exp_stb = wr_en;
      if (wr_en) exp_lcd = wr_data;
      if (i >= 2) begin
        checks++;
        if (rd_data !== sw_hist[1]) begin
          failures++; $display("FAIL rd_data=%h exp=%h", rd_data, sw_hist[1]);
        end
      end
      checks++;
      if (lcd_data !== exp_lcd || lcd_stb !== exp_stb) begin
        failures++; $display("FAIL lcd=%h exp=%h stb=%b", lcd_data, exp_lcd, lcd_stb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
