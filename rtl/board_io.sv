// board_io: the processor's connection to the board's switches and display.
//
// Input: the switch levels pass through a two-flop synchroniser and are read
// by the processor as one data word. Output: a word the processor writes is
// held in a register that drives the display connection (lcd_data), and
// lcd_stb pulses for one cycle after each write so a display controller can
// take the new value. Switch input and display output are the board setup the
// processor was shown in; the synchroniser, the strobe and the register are
// this design's choice.
//
// Timing: rd_data is the switches as they were two clocks ago; lcd_data
// changes on the clock edge that ends a write cycle.
module board_io #(
  parameter int unsigned DW = risc_pkg::XLEN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] switches,
  output logic [DW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic [DW-1:0] lcd_data,
  output logic          lcd_stb
);
  logic [DW-1:0] sw_meta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_meta  <= '0;
      rd_data  <= '0;
      lcd_data <= '0;
      lcd_stb  <= 1'b0;
    end else begin
      sw_meta <= switches;
      rd_data <= sw_meta;
      lcd_stb <= wr_en;
      if (wr_en) lcd_data <= wr_data;
    end
  end
endmodule
