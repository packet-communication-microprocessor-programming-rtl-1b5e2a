// mp_asm_pkg: a minimal assembler for MP test programs, used by the
// testbenches. Each function returns one 40 bit instruction word in the
// encoding of mp_pkg.
//   c1  class I:  ALU op, shift/destination, shift link, SRC, DST,
//                 carry-in, Q modifier, control (CONT / RTN / LPCT)
//   sp  class I special operation (multiply, divide, ... steps)
//   c2  class II: ALU op, SRC register or 8 bit immediate, DST,
//                 destination (NULL / N / Q / NQ), memory read / write,
//                 IO source or destination code, carry-in, Q modifier, control
//   c3  class III: CC operation and mask, operand register, control
//   c4  class IV: control operation, 12 bit operand, condition (-1 = none),
//                 REG option
package mp_asm_pkg;
  import mp_pkg::*;

  function automatic logic [39:0] c1(alu_op_e op, sd_e sd, logic [3:0] lnk,
                                     logic [3:0] src, logic [3:0] dst,
                                     cin_e cin = CIN_NONE, logic qm = 1'b0,
                                     pc_op_e pc = PC_CONT);
    instr_t i;
    i = '0;
    i.cls = CLS_ARITH; i.op = op; i.sd = sd; i.link = lnk; i.src = src; i.dst = dst;
    i.cin = cin; i.qmod = qm; i.pc = pc;
    return i;
  endfunction

  function automatic logic [39:0] sp(special_e s, logic [3:0] lnk, logic [3:0] src,
                                     logic [3:0] dst, cin_e cin = CIN_NONE,
                                     pc_op_e pc = PC_CONT);
    instr_t i;
    i = '0;
    i.cls = CLS_ARITH; i.op = ALU_XFF_SPEC; i.sd = s; i.link = lnk; i.src = src;
    i.dst = dst; i.cin = cin; i.pc = pc;
    return i;
  endfunction

  // src8: register number (imm = 0) or immediate data (imm = 1)
  function automatic logic [39:0] c2(alu_op_e op, logic imm, logic [7:0] src8,
                                     logic [3:0] dst, sd_e sd = SD_NULL,
                                     logic mr = 1'b0, logic wm = 1'b0,
                                     logic iosrc = 1'b0, logic [2:0] io = 3'd0,
                                     cin_e cin = CIN_NONE, logic qm = 1'b0,
                                     pc_op_e pc = PC_CONT);
    instr_t i;
    i = '0;
    i.cls = CLS_IOMEM; i.op = op; i.imm = imm; {i.link, i.src} = src8; i.dst = dst;
    i.sd = sd; i.mr = mr; i.wm = wm; i.iosrc = iosrc; i.io = io; i.cin = cin;
    i.qmod = qm; i.pc = pc;
    return i;
  endfunction

  function automatic logic [39:0] c3(ccop_e op, logic [3:0] mask, logic [3:0] dst = 4'd0,
                                     pc_op_e pc = PC_CONT);
    instr_t i;
    i = '0;
    i.cls = CLS_CCOP; i.op = op; i.link = mask; i.dst = dst; i.pc = pc;
    return i;
  endfunction

  function automatic logic [39:0] c4(pc_op_e pc, logic [11:0] operand = 12'd0,
                                     int cond = -1, logic reg_opt = 1'b0);
    instr_t i;
    i = '0;
    i.cls = CLS_CTRL; i.pc = pc; {i.link, i.src, i.dst} = operand;
    i.ccen = (cond >= 0); i.op = (cond >= 0) ? 4'(cond) : 4'd0; i.reg_opt = reg_opt;
    return i;
  endfunction

endpackage
