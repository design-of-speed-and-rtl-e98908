// data_mem: data memory of the Harvard architecture.
//
// 2**AW words of DW bits with one port used by the processor's data-access
// stage: the word at data_adr is read combinationally onto dm_rd, and when
// dm_we is high the word dm_wr is written on the rising clock edge. The
// separate data memory is the architecture's; size and timing are this
// design's choice. Contents are not reset.
module data_mem #(
  parameter int unsigned AW = risc_pkg::DADDR_W,
  parameter int unsigned DW = risc_pkg::XLEN
) (
  input  logic          clk,
  input  logic [AW-1:0] data_adr,
  input  logic          dm_we,
  input  logic [DW-1:0] dm_wr,
  output logic [DW-1:0] dm_rd
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk)
    if (dm_we) mem[data_adr] <= dm_wr;

  assign dm_rd = mem[data_adr];
endmodule
