// pc: program counter of the fetch stage.
//
// Holds the address of the instruction being fetched from program memory
// (code_adr). Each clock it either reloads the reset address, loads a branch
// target (load), holds (stall, or fetch disabled) or advances by one word.
// A load has priority over a stall so that a taken branch in EX always
// redirects fetch. The separate program counter block is the architecture's;
// priorities and reset address are this design's choice.
//
// Timing: one register, all changes on the rising clock edge; rst_n is
// synchronous to clk and active low.
module pc #(
  parameter int unsigned       PC_W       = risc_pkg::PC_W,
  parameter logic [PC_W-1:0]   RESET_ADDR = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,        // advance when no stall
  input  logic            load,      // take target
  input  logic [PC_W-1:0] target,
  output logic [PC_W-1:0] code_adr
);
  always_ff @(posedge clk) begin
    if (!rst_n)    code_adr <= RESET_ADDR;
    else if (load) code_adr <= target;
    else if (en)   code_adr <= code_adr + PC_W'(1);
  end
endmodule
