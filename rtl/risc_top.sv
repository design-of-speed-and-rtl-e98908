// risc_top: the processor as placed on the FPGA board.
//
// Joins the pipelined core to its two memories, Harvard style: a program
// memory on the fetch port and a data memory on the data port. The topmost
// data address (IO_ADDR) is not memory but the board: a load from it reads the
// switches, a store to it updates the display output. The program memory is
// loaded through ld_we/ld_adr/ld_data while the core is held in reset.
//
// The core, the two memories and the switch-in / display-out setup are the
// architecture's; the memory map and the load port are this design's. Timing:
// one clock; rst_n is synchronous and active low; a program starts at address
// 0 the second clock after rst_n rises.
module risc_top
  import risc_pkg::*;
#(
  parameter logic [DADDR_W-1:0] IO_ADDR = '1
) (
  input  logic        clk,
  input  logic        rst_n,
  // program loading
  input  logic        ld_we,
  input  pc_t         ld_adr,
  input  word_t       ld_data,
  // board
  input  word_t       switches,
  output word_t       lcd_data,
  output logic        lcd_stb,
  // interrupt and status
  input  logic        irq,
  output logic        irq_ack,
  output logic        halted,
  output logic        stack_err
);
  pc_t                code_adr;
  word_t              opcode;
  logic [DADDR_W-1:0] data_adr;
  logic               dm_rd_en, dm_wr_en;
  word_t              dm_wr, dm_rd, mem_rd, io_rd;
  logic               is_io;

  risc_core u_core (
    .clk, .rst_n,
    .code_adr, .opcode,
    .data_adr, .dm_rd_en, .dm_wr_en, .dm_wr, .dm_rd,
    .irq, .irq_ack, .halted, .stack_err
  );

  prog_mem u_pmem (
    .clk,
    .code_adr, .opcode,
    .ld_we, .ld_adr, .ld_data
  );

  assign is_io = (data_adr == IO_ADDR);

  data_mem u_dmem (
    .clk,
    .data_adr,
    .dm_we (dm_wr_en && !is_io),
    .dm_wr,
    .dm_rd (mem_rd)
  );

  board_io u_io (
    .clk, .rst_n,
    .switches,
    .rd_data  (io_rd),
    .wr_en    (dm_wr_en && is_io),
    .wr_data  (dm_wr),
    .lcd_data,
    .lcd_stb
  );

  assign dm_rd = is_io ? io_rd : mem_rd;
endmodule
