// mp_sequencer: program counter, address/count register and call stack of
// the MP, executing the 16 program control operations.
//
// Every executed instruction (en = 1) carries a control code and a condition;
// the sequencer computes the effective address from the 12 bit operand and
// the offset register, picks the next PC, and updates the address/count
// register and the stack. The next PC is also an output (next_pc) so that a
// synchronous program memory can fetch the next instruction in the same
// cycle. "Push the PC" pushes the address of the following instruction, so a
// loop set up with LSETUP restarts at the instruction after it.
// Effective address (manual, class IV): REG option -> operand[11:8] and the
// 8 bit offset; VJMP -> operand[11:4] and offset[3:0]; JCB -> operand[11:4]
// and the position of the leftmost zero of the offset (8 if none);
// otherwise the operand.
// With en = 0 nothing changes and next_pc = pc. pc_clear (from the host)
// sets the PC to zero. Timing: all state updates on the rising clock edge.
module mp_sequencer
  import mp_pkg::*;
#(
  parameter int unsigned AW = 12,
  parameter int unsigned DEPTH = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          pc_clear,
  input  logic [3:0]    code,
  input  logic          cond,
  input  logic          reg_opt,
  input  logic [AW-1:0] operand,
  input  logic [7:0]    offset,
  output logic [AW-1:0] pc,
  output logic [AW-1:0] next_pc,
  output logic [AW-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] depth
);

  logic [AW-1:0] ea, pc1, tos, cnt_next;
  logic [3:0]    lzpos;
  logic          push, pop, sclear, cnt_nz;

  mp_call_stack #(.DEPTH(DEPTH), .AW(AW)) u_stack (
    .clk, .rst_n, .clear(sclear), .push, .pop, .push_data(pc1),
    .tos, .count(depth)
  );

  // position of the leftmost zero bit of the offset register
  always_comb begin
    lzpos = 4'd8;
    for (int i = 0; i < 8; i++)
      if (!offset[i]) lzpos = 4'(i);
  end

  always_comb begin
    if (reg_opt)                   ea = {operand[AW-1:AW-4], offset};
    else if (code == PC_VJMP)      ea = {operand[AW-1:4], offset[3:0]};
    else if (code == PC_JCB)       ea = {operand[AW-1:4], lzpos};
    else                           ea = operand;
  end

  always_comb begin
    pc1      = pc + 1'b1;
    cnt_nz   = (count != '0);
    next_pc  = pc1;
    cnt_next = count;
    push     = 1'b0;
    pop      = 1'b0;
    sclear   = 1'b0;
    unique case (pc_op_e'(code))
      PC_RESET:  begin next_pc = '0; sclear = 1'b1; end
      PC_JSR:    if (cond) begin push = 1'b1; next_pc = ea; end
      PC_VJMP:   next_pc = ea;
      PC_JMP:    if (cond) next_pc = ea;
      PC_LSETUP: begin push = 1'b1; if (cond) cnt_next = ea; end
      PC_JSRR:   begin push = 1'b1; next_pc = cond ? ea : count; end
      PC_JCB:    if (cond) next_pc = ea;
      PC_JMPR:   next_pc = cond ? ea : count;
      PC_LPCT:   if (cnt_nz) begin cnt_next = count - 1'b1; next_pc = tos; end
                 else pop = 1'b1;
      PC_COUNT:  if (cnt_nz) begin cnt_next = count - 1'b1; next_pc = ea; end
      PC_RTN:    if (cond) begin pop = 1'b1; next_pc = tos; end
      PC_EXIT:   if (cond) begin pop = 1'b1; next_pc = ea; end
      PC_LDCT:   cnt_next = ea;
      PC_LOOP:   if (cond) pop = 1'b1; else next_pc = tos;
      PC_CONT:   ;
      PC_TWB:    if (cond) begin
                   pop = 1'b1;
                   if (cnt_nz) cnt_next = count - 1'b1;
                 end else if (cnt_nz) begin
                   cnt_next = count - 1'b1;
                   next_pc = tos;
                 end else begin
                   pop = 1'b1;
                   next_pc = ea;
                 end
    endcase
    if (!en) begin
      next_pc  = pc;
      cnt_next = count;
      push     = 1'b0;
      pop      = 1'b0;
      sclear   = 1'b0;
    end
    if (pc_clear) next_pc = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= '0;
      count <= '0;
    end else begin
      pc    <= next_pc;
      count <= cnt_next;
    end
  end

endmodule
