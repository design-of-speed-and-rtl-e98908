// state_ctrl: pipeline controller of the processor.
//
// A small state machine sequences the processor: one RESET cycle after reset
// with fetch held, RUN, and on a HALT instruction reaching execute a DRAIN
// cycle (older instructions finish write-back) before HALT, where fetch stays
// stopped until the next reset. In RUN it also produces the per-stage enables
// that replace the separate fetch/load/execute/write-back clocks of the
// original phase-clocked controller:
//   * load-use stall: the instruction in decode needs the register a load in
//     execute is about to read from data memory. PC and IF/Reg hold, a bubble
//     enters execute. (Every other dependence is covered by forwarding.)
//   * flush: a taken control transfer or HALT in execute discards the two
//     younger instructions in fetch and decode.
//   * interrupt entry: with interrupts enabled, a level-high irq replaces the
//     instruction in decode with an interrupt pseudo-instruction, which in
//     execute jumps to the vector and pushes that instruction's address.
// It keeps the interrupt enable (cleared at reset and on entry, set by EI and
// RETI, cleared by DI) and the register bank: bank 1, the shadow bank, from
// interrupt entry until RETI.
//
// The state machine, pipelining with feed-forward, stalls, interrupts and
// shadowing are the architecture's; the single clock with enables, the exact
// states and the interrupt rules are this design's choices.
//
// Timing: inputs are the decode and execute stages of the current cycle;
// stall/flush/inject outputs are combinational, ie/bank/state registered.
module state_ctrl
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // decode stage
  input  logic    id_valid,
  input  regidx_t id_rs,
  input  logic    id_rs_used,
  input  regidx_t id_rt,
  input  logic    id_rt_used,
  // execute stage
  input  logic    ex_valid,
  input  logic    ex_mem_rd,
  input  regidx_t ex_rd,
  input  br_e     ex_br,
  input  logic    ex_taken,     // control transfer in EX is taken
  input  logic    ex_halt,
  input  logic    ex_ei,
  input  logic    ex_di,
  // interrupt request, level sensitive
  input  logic    irq,
  // controls
  output logic    pc_en,        // PC advances
  output logic    pc_load,      // PC takes the EX target
  output logic    ifid_load,    // IF/Reg register takes the fetched instruction
  output logic    ifid_flush,   // IF/Reg register becomes empty
  output logic    idex_bubble,  // Reg/EX register becomes empty
  output logic    inject_int,   // decode passes an interrupt instead
  output logic    load_use,
  output logic    ie,
  output logic    bank,
  output logic    halted
);
  typedef enum logic [1:0] {S_RESET, S_RUN, S_DRAIN, S_HALT} state_e;
  state_e state, state_n;

  logic ex_ctrl_busy;
  logic redirect;

  always_comb begin
    load_use = ex_valid && ex_mem_rd && ex_rd != '0 && id_valid &&
               ((id_rs_used && id_rs == ex_rd) || (id_rt_used && id_rt == ex_rd));
    redirect = ex_valid && (ex_taken || ex_halt);
    ex_ctrl_busy = ex_valid && (ex_br != BR_NONE || ex_halt || ex_ei || ex_di);

    pc_en       = 1'b0;
    pc_load     = 1'b0;
    ifid_load   = 1'b0;
    ifid_flush  = 1'b1;
    idex_bubble = 1'b1;
    inject_int  = 1'b0;
    state_n     = state;

    unique case (state)
      S_RESET: state_n = S_RUN;
      S_RUN: begin
        if (redirect) begin
          pc_load = ex_taken;
          if (ex_halt) state_n = S_DRAIN;
        end else if (load_use) begin
          ifid_flush = 1'b0;           // hold
        end else begin
          pc_en       = 1'b1;
          ifid_flush  = 1'b0;
          ifid_load   = 1'b1;
          idex_bubble = 1'b0;
          inject_int  = irq && ie && id_valid && !ex_ctrl_busy;
        end
      end
      S_DRAIN: state_n = S_HALT;
      default: ;                       // S_HALT
    endcase
  end

  assign halted = (state == S_HALT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_RESET;
      ie    <= 1'b0;
      bank  <= 1'b0;
    end else begin
      state <= state_n;
      if (inject_int)                                ie <= 1'b0;
      else if (ex_valid && (ex_ei || ex_br == BR_RETI)) ie <= 1'b1;
      else if (ex_valid && ex_di)                    ie <= 1'b0;
      if (ex_valid && ex_br == BR_INT)       bank <= 1'b1;
      else if (ex_valid && ex_br == BR_RETI) bank <= 1'b0;
    end
  end
endmodule
