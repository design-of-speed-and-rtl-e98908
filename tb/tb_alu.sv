// tb_alu: self-checking test of the ALU. Drives every operation with random
// and corner operands and compares with results computed here from the
// operation's definition.
module tb_alu;
  import risc_pkg::*;
  alu_op_e op;
  word_t a, b, y, exp;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic word_t model(alu_op_e o, word_t x, word_t z);
    int unsigned p;
    case (o)
      ALU_ADD:   return word_t'(int'(x) + int'(z));
      ALU_SUB:   return word_t'(int'(x) - int'(z));
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_MUL:   begin p = int'(x) * int'(z); return p[15:0]; end
      ALU_SHL:   return word_t'({16'h0, x} << z[3:0]);
      ALU_SHR:   return word_t'(int'(x) / (1 << z[3:0]));
      ALU_PASSB: return z;
      default:   return '0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = alu_op_e'(i % 9);
      case (i % 7)
        0: begin a = 16'hFFFF; b = 16'h0001; end
        1: begin a = 16'h8000; b = 16'h000F; end
        default: begin a = word_t'($urandom); b = word_t'($urandom); end
      endcase
      #1;
      exp = model(op, a, b);
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
