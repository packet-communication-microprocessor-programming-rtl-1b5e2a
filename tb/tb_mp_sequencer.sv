// tb_mp_sequencer: runs long random sequences of the 16 control operations
// with random conditions, operands, REG options and offsets against a
// reference model written from the operation descriptions (queue as call
// stack, losing the oldest entry beyond five), and checks PC, next PC and
// the address/count register after every instruction. It also checks that the
// PC holds while disabled and that pc_clear zeroes it, and counts how often
// loops repeat, stacks overflow and JCB / VJMP / REG addresses occur.
module tb_mp_sequencer;
  import mp_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, pc_clear = 0, cond = 0, reg_opt = 0;
  logic [3:0] code = 4'hE;
  logic [11:0] operand = 0, pc, next_pc, count;
  logic [7:0] offset = 0;
  logic [2:0] depth;
  int checks = 0, failures = 0, overflows = 0, loops = 0, jcbs = 0;

  logic [11:0] m_pc = 0, m_cnt = 0;
  logic [11:0] m_stk [$];

  mp_sequencer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] m_ea();
    int n;
    if (reg_opt) return {operand[11:8], offset};
    if (code == PC_VJMP) return {operand[11:4], offset[3:0]};
    if (code == PC_JCB) begin
      n = 8;
      for (int b = 7; b >= 0; b--) if (!offset[b]) begin n = b; break; end
      return {operand[11:4], 4'(n)};
    end
    return operand;
  endfunction

  task automatic m_push(logic [11:0] v);
    m_stk.push_front(v);
    if (m_stk.size() > 5) begin void'(m_stk.pop_back()); overflows++; end
  endtask
  task automatic m_pop();
    if (m_stk.size() > 0) void'(m_stk.pop_front());
  endtask
  function automatic logic [11:0] m_tos();
    return m_stk.size() > 0 ? m_stk[0] : 12'h000;
  endfunction

  // one instruction of the reference model
  task automatic m_exec();
    logic [11:0] ea, nx, tos;
    ea = m_ea(); nx = m_pc + 1; tos = m_tos();
    case (code)
      PC_RESET:  begin nx = 0; m_stk.delete(); end
      PC_JSR:    if (cond) begin m_push(m_pc + 1); nx = ea; end
      PC_VJMP:   nx = ea;
      PC_JMP:    if (cond) nx = ea;
      PC_LSETUP: begin m_push(m_pc + 1); if (cond) m_cnt = ea; end
      PC_JSRR:   begin m_push(m_pc + 1); nx = cond ? ea : m_cnt; end
      PC_JCB:    if (cond) nx = ea;
      PC_JMPR:   nx = cond ? ea : m_cnt;
      PC_LPCT:   if (m_cnt != 0) begin m_cnt--; nx = tos; loops++; end else m_pop();
      PC_COUNT:  if (m_cnt != 0) begin m_cnt--; nx = ea; end
      PC_RTN:    if (cond) begin m_pop(); nx = tos; end
      PC_EXIT:   if (cond) begin m_pop(); nx = ea; end
      PC_LDCT:   m_cnt = ea;
      PC_LOOP:   if (cond) m_pop(); else begin nx = tos; loops++; end
      PC_TWB:    if (cond) begin m_pop(); if (m_cnt != 0) m_cnt--; end
                 else if (m_cnt != 0) begin m_cnt--; nx = tos; loops++; end
                 else begin m_pop(); nx = ea; end
      default: ;
    endcase
    if (code == PC_JCB && !reg_opt && cond) jcbs++;
    m_pc = nx;
  endtask

  task automatic chk(string what);
    checks++;
    if (pc !== m_pc || count !== m_cnt || depth !== 3'(m_stk.size())) begin
      failures++;
      if (failures < 10) $display("FAIL %s code=%h: pc=%h cnt=%h d=%0d want %h %h %0d", what,
                                  code, pc, count, depth, m_pc, m_cnt, m_stk.size());
    end
  endtask

  initial begin
    #1 rst_n = 0;  // a real falling edge, so the asynchronous reset fires
    @(negedge clk); rst_n = 1;
    // directed: JCB address from the leftmost zero of the offset
    en = 1; code = PC_JCB; cond = 1; operand = 12'hAB0; offset = 8'b1110_1111;
    #1 checks++; if (next_pc !== 12'hAB4) failures++;
    offset = 8'hFF; #1 checks++; if (next_pc !== 12'hAB8) failures++;
    code = PC_VJMP; operand = 12'h3C7; offset = 8'h5D; #1 checks++; if (next_pc !== 12'h3CD) failures++;
    code = PC_JMP; reg_opt = 1; #1 checks++; if (next_pc !== 12'h35D) failures++;
    reg_opt = 0; code = PC_CONT;
    @(posedge clk); m_exec(); #1 chk("cont");
    for (int i = 0; i < 20000; i++) begin
      int r;
      @(negedge clk);
      r = $urandom % 100;
      // bias towards loop and stack operations
      if (r < 15) code = PC_LPCT;
      else if (r < 25) code = PC_LSETUP;
      else if (r < 30) code = PC_CONT;
      else code = 4'($urandom);
      if (code == PC_RESET && ($urandom % 4) != 0) code = PC_CONT;
      cond = 1'($urandom); reg_opt = ($urandom % 4) == 0;
      operand = 12'($urandom % 64); offset = 8'($urandom);
      if (code == PC_LSETUP || code == PC_LDCT) operand = 12'($urandom % 6);
      en = ($urandom % 10) != 0;
      pc_clear = ($urandom % 200) == 0;
      @(posedge clk);
      if (en) m_exec();
      if (pc_clear) m_pc = 0;
      #1 chk("random");
    end
    en = 0; pc_clear = 0;
    checks++; if (overflows == 0 || loops == 0 || jcbs == 0) failures++;
    $display("stack overflows=%0d loop repeats=%0d jcb=%0d", overflows, loops, jcbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
