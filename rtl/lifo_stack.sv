// lifo_stack: 8-bit wide last-in first-out return-address stack.
//
// On a subroutine call or an interrupt the processor pushes the address to
// return to; RET and RETI pop it. top always shows the newest entry, so a
// return reads its target and pops in the same cycle. A push when full or a
// pop when empty is ignored and sets the sticky error flag, which clears only
// on reset. The 8-bit width and the stack's purpose are the architecture's;
// depth, the error flag and the read-before-pop behaviour are this design's.
//
// Timing: push and pop take effect on the rising edge; top, full and empty
// are registered state read combinationally. push and pop together are not
// used by the processor; if both are asserted the push is ignored.
module lifo_stack #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW   = $clog2(DEPTH + 1),
  localparam int unsigned IW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] top,
  output logic             full,
  output logic             empty,
  output logic             err
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp;            // number of entries

  assign full  = (sp == PW'(DEPTH));
  assign empty = (sp == '0);
  assign top   = empty ? '0 : mem[IW'(sp - PW'(1))];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sp  <= '0;
      err <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (pop) begin
      if (empty) err <= 1'b1;
      else       sp  <= sp - PW'(1);
    end else if (push) begin
      if (full) err <= 1'b1;
      else begin
        mem[IW'(sp)] <= din;
        sp <= sp + PW'(1);
      end
    end
  end
endmodule
