// aalu: address ALU of the execute stage.
//
// Forms the data-memory address of a load or store as base register plus
// sign-extended 4-bit offset, truncated to the data address width. It is kept
// apart from the main ALU so that address and result are computed in the same
// cycle, as in the architecture's block diagram. The base+offset addressing
// mode is this design's choice.
//
// Purely combinational.
module aalu #(
  parameter int unsigned XLEN    = risc_pkg::XLEN,
  parameter int unsigned DADDR_W = risc_pkg::DADDR_W
) (
  input  logic [XLEN-1:0]    base,
  input  logic [XLEN-1:0]    offset,    // already sign-extended
  output logic [DADDR_W-1:0] data_adr
);
  logic [XLEN-1:0] sum;
  always_comb begin
    sum      = base + offset;
    data_adr = sum[DADDR_W-1:0];
  end
endmodule
