// tb_aalu: self-checking test of the address ALU: base plus signed offset,
// wrapped to the data address width.
module tb_aalu;
  import risc_pkg::*;
  word_t base, offset;
  logic [DADDR_W-1:0] data_adr;
  int checks = 0, failures = 0;
  int exp;

  aalu dut (.base, .offset, .data_adr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      base   = word_t'($urandom);
      offset = word_t'(signed'(4'($urandom)));
      #1;
      exp = (int'(base) + int'(signed'(offset))) & 255;
      checks++;
      if (int'(data_adr) != exp) begin
        failures++;
        $display("FAIL base=%h off=%h adr=%h exp=%h", base, offset, data_adr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
