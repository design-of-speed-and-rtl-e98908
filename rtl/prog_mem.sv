// prog_mem: program (instruction) memory of the Harvard architecture.
//
// 2**AW words of DW bits. The processor reads it through its own port: the
// word at code_adr appears combinationally on opcode, as from a distributed
// (LUT) RAM, and is captured by the processor's IF/Reg register. A second,
// clocked write port loads the program (from a loader, a debugger or a
// testbench). The separate program memory is the architecture's; size and
// ports are this design's choice. Contents are not reset.
module prog_mem #(
  parameter int unsigned AW = risc_pkg::PC_W,
  parameter int unsigned DW = risc_pkg::XLEN
) (
  input  logic          clk,
  // fetch port
  input  logic [AW-1:0] code_adr,
  output logic [DW-1:0] opcode,
  // load port
  input  logic          ld_we,
  input  logic [AW-1:0] ld_adr,
  input  logic [DW-1:0] ld_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk)
    if (ld_we) mem[ld_adr] <= ld_data;

  assign opcode = mem[code_adr];
endmodule
