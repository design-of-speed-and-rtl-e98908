// alu: 16-bit arithmetic and logic unit of the execute stage.
//
// Computes add, subtract, and, or, xor, the low 16 bits of the product (one
// hardware multiplier, as the architecture's resource use shows), logical left
// and right shift by b[3:0], and pass-through of operand B (load immediate).
// The operation set is this design's choice.
//
// Purely combinational; the result is registered in the EX/DA pipeline
// register.
module alu
  import risc_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  logic [2*XLEN-1:0] prod;
  always_comb begin
    prod = a * b;
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_MUL:   y = prod[XLEN-1:0];
      ALU_SHL:   y = a << b[3:0];
      ALU_SHR:   y = a >> b[3:0];
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
