// reg_array: register file with a shadow bank.
//
// Two banks of NREGS words. Bank 0 is used by normal code; bank 1 is the
// shadow bank that an interrupt switches to, so the interrupted program's
// registers are kept without any save or restore instructions. Two
// asynchronous read ports (operands A and B, read in the decode stage) and one
// synchronous write port (write-back stage). Register 0 of each bank always
// reads zero and ignores writes. A write and a read of the same register of
// the same bank in one cycle returns the new value (write-through), so the
// decode stage never sees a stale value from the write-back stage.
//
// The two read ports and register shadowing are the architecture's; bank
// switching as the shadowing method, the register count and R0 = 0 are this
// design's choices. All registers clear on reset.
module reg_array #(
  parameter int unsigned XLEN  = risc_pkg::XLEN,
  parameter int unsigned NREGS = risc_pkg::NREGS,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // read ports
  input  logic            rd_bank,
  input  logic [AW-1:0]   ra_idx,
  input  logic [AW-1:0]   rb_idx,
  output logic [XLEN-1:0] regalua,
  output logic [XLEN-1:0] regalub,
  // write port
  input  logic            we,
  input  logic            wr_bank,
  input  logic [AW-1:0]   w_idx,
  input  logic [XLEN-1:0] w_data
);
  logic [XLEN-1:0] regs [2][NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < NREGS; i++)
          regs[b][i] <= '0;
    end else if (we && w_idx != '0) begin
      regs[wr_bank][w_idx] <= w_data;
    end
  end

  function automatic logic [XLEN-1:0] read_port(logic [AW-1:0] idx);
    if (idx == '0)                                     return '0;
    else if (we && wr_bank == rd_bank && w_idx == idx) return w_data;
    else                                               return regs[rd_bank][idx];
  endfunction

  always_comb begin
    regalua = read_port(ra_idx);
    regalub = read_port(rb_idx);
  end
endmodule
