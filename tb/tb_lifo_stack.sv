// tb_lifo_stack: self-checking test of the return-address stack against a
// queue model, including overflow and underflow setting the error flag.
module tb_lifo_stack;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty, err;
  logic [7:0] din = 0, top;
  logic [7:0] q[$];
  logic exp_err;
  int checks = 0, failures = 0;

  lifo_stack #(.WIDTH(8), .DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == 8) || err !== exp_err ||
        (q.size() > 0 && top !== q[$])) begin
      failures++;
      $display("FAIL size=%0d top=%h exp=%h empty=%b full=%b err=%b/%b",
               q.size(), top, q.size() ? q[$] : 8'h0, empty, full, err, exp_err);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1; exp_err = 0;
    check();
    for (int i = 0; i < 600; i++) begin
      // phases: fill past full, drain past empty, then random
      if (i < 12)       begin push = 1; pop = 0; end
      else if (i < 24)  begin push = 0; pop = 1; end
      else              begin push = 1'($urandom); pop = !push && 1'($urandom); end
      din = 8'($urandom);
      @(negedge clk);
      if (pop) begin
        if (q.size() == 0) exp_err = 1; else void'(q.pop_back());
      end else if (push) begin
        if (q.size() == 8) exp_err = 1; else q.push_back(din);
      end
      push = 0; pop = 0;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
