// fwd_unit: feed-forward (operand forwarding) selection for the execute stage.
//
// For one source register of the instruction in EX it picks the newest value:
// the result waiting in the EX/DA register if that instruction writes the same
// register, else the result in the DA/WB register, else the value read from
// the register file in the decode stage. This removes the stall cycles a
// dependent instruction would otherwise wait for its operand, the purpose of
// the architecture's feed-forward path. A load's data is not yet known in
// EX/DA; the controller stalls instead (load-use hazard), so the EX/DA source
// is never a load here. Register 0 is never forwarded.
//
// Purely combinational. sel reports the choice: 0 register file, 1 EX/DA,
// 2 DA/WB.
module fwd_unit #(
  parameter int unsigned XLEN = risc_pkg::XLEN,
  parameter int unsigned AW   = 4
) (
  input  logic [AW-1:0]   src,
  input  logic [XLEN-1:0] rf_val,
  input  logic            exda_we,
  input  logic [AW-1:0]   exda_rd,
  input  logic [XLEN-1:0] exda_val,
  input  logic            dawb_we,
  input  logic [AW-1:0]   dawb_rd,
  input  logic [XLEN-1:0] dawb_val,
  output logic [XLEN-1:0] val,
  output logic [1:0]      sel
);
  always_comb begin
    if (src != '0 && exda_we && exda_rd == src) begin
      val = exda_val;
      sel = 2'd1;
    end else if (src != '0 && dawb_we && dawb_rd == src) begin
      val = dawb_val;
      sel = 2'd2;
    end else begin
      val = rf_val;
      sel = 2'd0;
    end
  end
endmodule
