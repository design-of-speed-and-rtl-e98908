// tb_state_ctrl: self-checking test of the pipeline controller. Random
// decode/execute stage conditions drive it; a cycle model written here from
// the controller's rules (reset cycle, load-use stall, flush on taken
// transfer or HALT, interrupt injection, enable and bank state, drain and
// halt) gives the expected outputs every cycle.
module tb_state_ctrl;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic id_valid = 0, id_rs_used = 0, id_rt_used = 0;
  regidx_t id_rs = 0, id_rt = 0, ex_rd = 0;
  logic ex_valid = 0, ex_mem_rd = 0, ex_taken = 0, ex_halt = 0, ex_ei = 0, ex_di = 0, irq = 0;
  br_e ex_br = BR_NONE;
  logic pc_en, pc_load, ifid_load, ifid_flush, idex_bubble, inject_int, load_use, ie, bank, halted;

  state_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_state;          // 0 reset, 1 run, 2 drain, 3 halt
  logic m_ie, m_bank;
  int seen_inject = 0, seen_stall = 0, seen_halt = 0, seen_flush = 0;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic lu, redir, busy, e_pc_en, e_pc_load, e_ifid_load, e_flush, e_bubble, e_inject;
    @(negedge clk); rst_n = 1;
    m_state = 0; m_ie = 0; m_bank = 0;
    for (int i = 0; i < 4000; i++) begin
      if (i % 500 == 0 && i > 0) begin
        rst_n = 0; @(negedge clk); rst_n = 1;
        m_state = 0; m_ie = 0; m_bank = 0;
      end
      id_valid = 1'($urandom % 4 != 0);
      id_rs = 4'($urandom % 4); id_rt = 4'($urandom % 4);
      id_rs_used = 1'($urandom); id_rt_used = 1'($urandom);
      ex_valid = 1'($urandom % 4 != 0);
      ex_rd = 4'($urandom % 4);
      ex_mem_rd = ($urandom % 3) == 0;
      ex_br = ($urandom % 3 == 0) ? br_e'($urandom % 8) : BR_NONE;
      ex_taken = ex_br != BR_NONE && 1'($urandom);
      ex_halt = ($urandom % 150) == 0;
      ex_ei = ($urandom % 10) == 0;
      ex_di = !ex_ei && ($urandom % 20) == 0;
      irq = 1'($urandom);
      #1;
      lu = ex_valid && ex_mem_rd && ex_rd != 0 && id_valid &&
           ((id_rs_used && id_rs == ex_rd) || (id_rt_used && id_rt == ex_rd));
      redir = ex_valid && (ex_taken || ex_halt);
      busy = ex_valid && (ex_br != BR_NONE || ex_halt || ex_ei || ex_di);
      {e_pc_en, e_pc_load, e_ifid_load, e_flush, e_bubble, e_inject} = 6'b000110;
      if (m_state == 1) begin
        if (redir) e_pc_load = ex_taken;
        else if (lu) e_flush = 0;
        else begin
          e_pc_en = 1; e_ifid_load = 1; e_flush = 0; e_bubble = 0;
          e_inject = irq && m_ie && id_valid && !busy;
        end
      end
      checks++;
      if ({pc_en, pc_load, ifid_load, ifid_flush, idex_bubble, inject_int} !==
          {e_pc_en, e_pc_load, e_ifid_load, e_flush, e_bubble, e_inject} ||
          load_use !== lu || ie !== m_ie || bank !== m_bank || halted !== (m_state == 3)) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d state %0d: got %b%b%b%b%b%b lu%b ie%b bank%b halted%b exp %b%b%b%b%b%b lu%b ie%b bank%b",
                   i, m_state, pc_en, pc_load, ifid_load, ifid_flush, idex_bubble, inject_int,
                   load_use, ie, bank, halted, e_pc_en, e_pc_load, e_ifid_load, e_flush,
                   e_bubble, e_inject, lu, m_ie, m_bank);
      end
      seen_inject += int'(e_inject);
      seen_stall  += int'(m_state == 1 && !redir && lu);
      seen_flush  += int'(m_state == 1 && redir);
      seen_halt   += int'(m_state == 3);
      @(negedge clk);
      // model state update
      if (e_inject) m_ie = 0;
      else if (ex_valid && (ex_ei || ex_br == BR_RETI)) m_ie = 1;
      else if (ex_valid && ex_di) m_ie = 0;
      if (ex_valid && ex_br == BR_INT) m_bank = 1;
      else if (ex_valid && ex_br == BR_RETI) m_bank = 0;
      case (m_state)
        0: m_state = 1;
        1: if (ex_valid && ex_halt) m_state = 2;
        2: m_state = 3;
        default: ;
      endcase
    end
    checks++;
    if (seen_inject == 0 || seen_stall == 0 || seen_flush == 0 || seen_halt == 0) begin
      failures++;
      $display("FAIL coverage inject=%0d stall=%0d flush=%0d halt=%0d",
               seen_inject, seen_stall, seen_flush, seen_halt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
