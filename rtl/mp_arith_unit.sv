// mp_arith_unit: executes the arithmetic part of a class I or class II
// instruction in one combinational pass.
//
// Inputs are the decoded fields, the first operand r (SRC register or
// immediate), the second operand s_dst (DST register, or memory / IO / status
// / CC data substituted for it by a class II instruction), the Q register,
// the condition code and the sign compare flip-flop. Outputs are the final
// result y with its DST write enable, the new Q value with its enable, the new
// condition code and the new sign compare bit.
//
// Normal instructions: the ALU result is shifted by the shift/destination
// code (RS/LS 8 bit, RA/LA 7 bit keeping the sign, optional 8 bit Q shift,
// LXT sign extension) and the shift linker fills the vacated ends. N comes
// from the ALU result before the shift, Z from the final result; V and C from
// the adder (both 0 for logical functions) unless the link shifts a bit into C.
// "Right" codes without a shift (<null>, Q, NQ, NRQ) hand the linker the
// parity of the ALU result and the shift-in bit; "left" ones (N, NLQ, Y17)
// hand it bit 7.
// Special instructions (ALU op 0 without Q modifier, class I only): UMPY, MPY,
// LMPY (one multiply step each), INC, SMCVT, NORM, DNORM, DIV and LDIV, with
// the operand choice, shift and flag rules of the manual's special-operation
// section. The "Z" carry-in adds the value the Z flag will take.
// Class II forces the link to its "no link" code (0 right, 2 left) since its
// bits 11-8 hold the immediate.
//
// Design choices where the manual is silent: the parity shift-in bit and the
// LXT fill bit are taken from the linker evaluated with a 0 leaving the ALU,
// which is exact for every link that does not feed the ALU end back into
// itself; undefined special codes (1,3,7,9,B,D,F) write nothing; the Z carry
// in of DNORM uses "DST and Q both zero".
module mp_arith_unit
  import mp_pkg::*;
(
  input  logic       cls_iomem,  // class II instruction
  input  logic [3:0] op,
  input  logic [1:0] cin_code,
  input  logic       qmod,
  input  logic [3:0] sd,
  input  logic [3:0] link,
  input  logic [7:0] r,
  input  logic [7:0] s_dst,
  input  logic [7:0] q,
  input  cc_t        cc,
  input  logic       sc,
  output logic [7:0] y,
  output logic       dst_we,
  output logic [7:0] q_next,
  output logic       q_we,
  output cc_t        cc_next,
  output logic       sc_next
);

  logic       special;
  special_e   spc;
  logic [7:0] alu_r, alu_s;
  logic [3:0] alu_op;
  logic       alu_cin, zc;
  logic [7:0] f;
  logic       cout, ovf, arith;
  logic       left, ao_fixed, par_mode, fill_mode, ao;
  logic       n_nx, v_nx, qo;
  logic [3:0] lk_code;
  logic       in0, qin0, cl0, cv0;
  logic       alu_in, q_in, c_load, c_val;
  logic       neg;
  logic       unused_bits;  // outputs of the first linker pass and alu.arith

  // operand and ALU function selection
  always_comb begin
    special = !cls_iomem && (op == ALU_XFF_SPEC) && !qmod;
    spc     = special_e'(sd);
    neg     = s_dst[7];
    alu_r   = r;
    alu_s   = qmod ? q : s_dst;
    alu_op  = op;
    zc      = 1'b0;
    if (special) begin
      alu_s = s_dst;
      unique case (spc)
        SP_UMPY, SP_MPY: begin alu_op = q[0] ? ALU_ADD : ALU_DST;   zc = q[0]; end
        SP_LMPY:         begin alu_op = q[0] ? ALU_RSUB1 : ALU_DST; zc = q[0]; end
        SP_INC:          begin alu_op = ALU_ADD; alu_r = 8'd1; end
        SP_SMCVT:        begin alu_op = neg ? ALU_CDST : ALU_DST;   zc = neg; end
        SP_NORM:         begin alu_op = ALU_DST; zc = (q == 8'h00); end
        SP_DNORM:        begin alu_op = ALU_DST; zc = (s_dst == 8'h00) && (q == 8'h00); end
        SP_DIV, SP_LDIV: begin alu_op = sc ? ALU_RSUB1 : ALU_ADD;   zc = sc; end
        default:         alu_op = ALU_DST;
      endcase
    end
    unique case (cin_e'(cin_code))
      CIN_NONE: alu_cin = 1'b0;
      CIN_ONE:  alu_cin = 1'b1;
      CIN_Z:    alu_cin = special && zc;
      CIN_C:    alu_cin = cc.c;
    endcase
  end

  mp_alu u_alu (
    .r(alu_r), .s(alu_s), .op(alu_op), .cin(alu_cin),
    .f(f), .cout(cout), .ovf(ovf), .arith(arith)
  );

  // what the linker sees: direction, bit leaving the ALU end, new N and V
  always_comb begin
    par_mode  = 1'b0;
    fill_mode = 1'b0;
    ao_fixed  = f[7];
    n_nx      = f[7];
    v_nx      = ovf;
    if (special) begin
      left = spc[3];
      unique case (spc)
        SP_UMPY, SP_MPY, SP_LMPY: ao_fixed = f[0];
        SP_INC:   par_mode = 1'b1;
        SP_SMCVT: begin par_mode = 1'b1; n_nx = f[7] ^ neg; end
        SP_NORM:  begin ao_fixed = f[7]; n_nx = q[7]; v_nx = q[6] ^ q[5]; end
        SP_DNORM: begin ao_fixed = f[7] ^ r[7]; v_nx = f[6] ^ f[5]; end
        SP_DIV:   ao_fixed = ~(f[7] ^ r[7]);
        default:  ao_fixed = f[7];
      endcase
    end else begin
      left = sd[3];
      unique case (sd_e'(sd))
        SD_RA, SD_RS, SD_RARQ, SD_RSRQ: ao_fixed = f[0];
        SD_NULL, SD_NRQ, SD_NQ, SD_Q:   par_mode = 1'b1;
        SD_LA, SD_LALQ:                 ao_fixed = f[6];
        SD_LXT:                         fill_mode = 1'b1;
        default:                        ao_fixed = f[7];
      endcase
    end
    qo = left ? q[7] : q[0];
    if (cls_iomem) lk_code = left ? LL_NULL : RL_NULL;
    else           lk_code = link;
  end

  // first pass: the bit entering the ALU when nothing feeds back
  mp_shift_linker u_link0 (
    .left(left), .code(lk_code), .alu_out(par_mode | fill_mode ? 1'b0 : ao_fixed),
    .q_out(qo), .c_old(cc.c), .c_next(cout), .n_next(n_nx), .v_next(v_nx),
    .alu_in(in0), .q_in(qin0), .c_load(cl0), .c_val(cv0)
  );

  assign ao = par_mode ? (^f ^ in0) : (fill_mode ? in0 : ao_fixed);

  mp_shift_linker u_link (
    .left(left), .code(lk_code), .alu_out(ao),
    .q_out(qo), .c_old(cc.c), .c_next(cout), .n_next(n_nx), .v_next(v_nx),
    .alu_in(alu_in), .q_in(q_in), .c_load(c_load), .c_val(c_val)
  );

  // final result, Q, flags
  always_comb begin
    y       = f;
    dst_we  = 1'b1;
    q_next  = q;
    q_we    = 1'b0;
    sc_next = sc;
    cc_next.n = f[7];
    cc_next.v = ovf;
    cc_next.c = cout;
    if (special) begin
      unique case (spc)
        SP_UMPY, SP_MPY, SP_LMPY: begin
          y = {(spc == SP_UMPY) ? cout : (ovf ^ f[7]), f[7:1]};
          q_next = {q_in, q[7:1]};
          q_we = 1'b1;
        end
        SP_INC: ;
        SP_SMCVT: y = f ^ {neg, 7'h00};
        SP_NORM: begin
          q_next = {q[6:0], q_in};
          q_we = 1'b1;
          cc_next.n = q[7];
          cc_next.v = q[6] ^ q[5];
          cc_next.c = q[7] ^ q[6];
        end
        SP_DNORM, SP_DIV, SP_LDIV: begin
          if (spc != SP_LDIV) y = {f[6:0], alu_in};
          q_next = {q[6:0], q_in};
          q_we = 1'b1;
          if (spc == SP_DNORM) begin
            cc_next.v = f[6] ^ f[5];
            cc_next.c = f[7] ^ f[6];
            sc_next   = ~ao;
          end else if (spc == SP_DIV) begin
            sc_next   = ao;
          end
        end
        default: dst_we = 1'b0;
      endcase
      unique case (spc)
        SP_UMPY, SP_MPY, SP_LMPY: cc_next.z = q[0];
        SP_SMCVT:        cc_next.z = neg;
        SP_NORM:         cc_next.z = (q == 8'h00);
        SP_DNORM:        cc_next.z = (f == 8'h00) && (q == 8'h00);
        SP_DIV, SP_LDIV: cc_next.z = sc;
        default:         cc_next.z = (y == 8'h00);
      endcase
      if (spc == SP_SMCVT) cc_next.n = y[7];
      if (!(spc inside {SP_UMPY, SP_MPY, SP_LMPY, SP_INC, SP_SMCVT, SP_NORM,
                        SP_DNORM, SP_DIV, SP_LDIV})) cc_next = cc;
    end else begin
      unique case (sd_e'(sd))
        SD_RA, SD_RARQ:   y = {f[7], alu_in, f[6:1]};
        SD_RS, SD_RSRQ:   y = {alu_in, f[7:1]};
        SD_LA, SD_LALQ:   y = {f[7], f[5:0], alu_in};
        SD_LS, SD_LSLQ:   y = {f[6:0], alu_in};
        SD_LXT:           y = {8{alu_in}};
        default:          y = f;
      endcase
      unique case (sd_e'(sd))
        SD_RARQ, SD_RSRQ, SD_NRQ: begin q_next = {q_in, q[7:1]}; q_we = 1'b1; end
        SD_LALQ, SD_LSLQ, SD_NLQ: begin q_next = {q[6:0], q_in}; q_we = 1'b1; end
        SD_NQ, SD_Q:              begin q_next = f;              q_we = 1'b1; end
        default: ;
      endcase
      dst_we = !(sd_e'(sd) inside {SD_NRQ, SD_NQ, SD_N, SD_NLQ});
      cc_next.z = (y == 8'h00);
    end
    if (c_load) cc_next.c = c_val;
  end

  assign unused_bits = ^{arith, qin0, cl0, cv0};

endmodule
