// tb_mp_arith_unit: checks class I / II execution.
// Directed cases: addition and subtraction flags, RS/LS/RA/LA shifts, a
// 16 bit double shift through Q, the manual's examples "ZERO LXT" with link
// OC, "<null>" with link UN (C = parity) and "N" with link C (C = sign), the
// Q modifier, NQ, class II link suppression, INC/INCO, SMCVTZ and NORM.
// Algorithms: the manual's unsigned multiply (8 x UMPY D), two's complement
// multiply (7 x MPY D + LMPYZ D) and division (DNORM RD, 7 x DIVZ RD,
// LDIVZ O) are run step by step, feeding the outputs back as the MP would,
// and compared with integer products and with dividend = Q * divisor + Y,
// -|divisor| <= Y < |divisor|.
module tb_mp_arith_unit;
  import mp_pkg::*;
  logic cls_iomem, qmod, sc, dst_we, q_we, sc_next;
  logic [3:0] op, sd, link;
  logic [1:0] cin_code;
  logic [7:0] r, s_dst, q, y, q_next;
  cc_t cc, cc_next;
  int checks = 0, failures = 0;

  mp_arith_unit dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s: r=%h s=%h q=%h -> y=%h q=%h cc=%b sc=%b",
                                  what, r, s_dst, q, y, q_next, cc_next, sc_next);
    end
  endtask

  task automatic set(logic c2, logic [3:0] o, logic [1:0] ci, logic qm, logic [3:0] d,
                     logic [3:0] l);
    cls_iomem = c2; op = o; cin_code = ci; qmod = qm; sd = d; link = l;
    #1;
  endtask

  // one step of an iterative special instruction: write back DST, Q, CC, SC
  task automatic step(logic [3:0] spc, logic [1:0] ci, logic [3:0] l);
    set(0, ALU_XFF_SPEC, ci, 0, spc, l);
    if (dst_we) s_dst = y;
    if (q_we) q = q_next;
    cc = cc_next; sc = sc_next;
    #1;
  endtask

  function automatic bit par(logic [7:0] v); return ^v; endfunction

  initial begin
    cc = '0; sc = 0; q = 8'h00;
    // additions / subtractions
    for (int i = 0; i < 2000; i++) begin
      int sr, ss, t;
      r = 8'($urandom); s_dst = 8'($urandom); cc = cc_t'($urandom);
      sr = int'($signed(r)); ss = int'($signed(s_dst));
      set(0, ALU_ADD, CIN_NONE, 0, SD_NULL, RL_NULL);
      t = sr + ss;
      chk(y == 8'(r + s_dst) && dst_we && !q_we && cc_next.c == ((int'(r) + int'(s_dst)) > 255)
          && cc_next.v == (t > 127 || t < -128) && cc_next.n == y[7] && cc_next.z == (y == 0), "ADD");
      set(0, ALU_SUB1, CIN_ONE, 0, SD_NULL, RL_NULL);   // SUB
      t = sr - ss;
      chk(y == 8'(r - s_dst) && cc_next.c == (r >= s_dst) && cc_next.v == (t > 127 || t < -128), "SUB");
      set(0, ALU_ADD, CIN_C, 0, SD_NULL, RL_NULL);      // ADDC
      chk(y == 8'(r + s_dst + cc.c), "ADDC");
      set(0, ALU_XOR, CIN_NONE, 0, SD_NULL, RL_NULL);
      chk(y == (r ^ s_dst) && !cc_next.v && !cc_next.c, "XOR");
    end
    // shifts of the ALU result (function DST: f = s_dst)
    for (int i = 0; i < 500; i++) begin
      logic [15:0] dw;
      s_dst = 8'($urandom); q = 8'($urandom); cc = cc_t'($urandom); r = 8'($urandom);
      set(0, ALU_DST, CIN_NONE, 0, SD_RS, RL_NULL);
      chk(y == {1'b0, s_dst[7:1]} && cc_next.c == 0 && !q_we, "RS");
      set(0, ALU_DST, CIN_NONE, 0, SD_RS, RL_O);
      chk(y == {1'b1, s_dst[7:1]}, "RS O");
      set(0, ALU_DST, CIN_NONE, 0, SD_LS, LL_NULL);
      chk(y == {s_dst[6:0], 1'b0}, "LS");
      set(0, ALU_DST, CIN_NONE, 0, SD_LS, LL_C);
      chk(y == {s_dst[6:0], 1'b0} && cc_next.c == s_dst[7], "LS C");
      set(0, ALU_DST, CIN_NONE, 0, SD_RA, RL_NULL);
      chk(y == {s_dst[7], 1'b0, s_dst[6:1]}, "RA");
      set(0, ALU_DST, CIN_NONE, 0, SD_LA, LL_C);
      chk(y == {s_dst[7], s_dst[5:0], 1'b0} && cc_next.c == s_dst[6], "LA");
      set(0, ALU_DST, CIN_NONE, 0, SD_RS, RL_RC);
      chk(y == {cc.c, s_dst[7:1]} && cc_next.c == s_dst[0], "RS RC");
      dw = {s_dst, q};
      set(0, ALU_DST, CIN_NONE, 0, SD_RSRQ, RL_RD);
      chk({y, q_next} == {dw[0], dw[15:1]} && q_we && dst_we, "RSRQ RD");
      set(0, ALU_DST, CIN_NONE, 0, SD_LSLQ, LL_D);
      chk({y, q_next} == {dw[14:0], 1'b0}, "LSLQ D");
      set(0, ALU_DST, CIN_NONE, 0, SD_RARQ, RL_R);
      chk(y == {s_dst[7], s_dst[0], s_dst[6:1]} && q_next == {q[0], q[7:1]}, "RARQ R");
      set(0, ALU_DST, CIN_NONE, 0, SD_NRQ, RL_NULL);
      chk(!dst_we && q_we && q_next == {1'b0, q[7:1]}, "NRQ");
      set(0, ALU_DST, CIN_NONE, 0, SD_NULL, RL_UN);
      chk(y == s_dst && cc_next.c == par(s_dst), "<null> UN parity");
      set(0, ALU_DST, CIN_NONE, 0, SD_N, LL_C);
      chk(!dst_we && cc_next.c == s_dst[7], "N C sign");
      set(0, ALU_ADD, CIN_NONE, 1, SD_NQ, RL_NULL);
      chk(y == 8'(r + q) && q_next == y && q_we && !dst_we, "ADDQ NQ");
      set(1, ALU_DST, CIN_NONE, 0, SD_N, 4'h0);   // class II: bits 11-8 are data
      chk(!dst_we && cc_next.c == 1'b0, "class II no link");
      set(0, ALU_XFF_SPEC, CIN_NONE, 0, SP_INC, RL_NULL);
      chk(y == 8'(s_dst + 1), "INC");
      set(0, ALU_XFF_SPEC, CIN_ONE, 0, SP_INC, RL_NULL);
      chk(y == 8'(s_dst + 2) && cc_next.z == (y == 0), "INCO");
      set(0, ALU_XFF_SPEC, CIN_Z, 0, SP_SMCVT, RL_NULL);
      if (s_dst[7]) chk(y == ((8'(-s_dst)) ^ 8'h80) && cc_next.z && cc_next.v == (s_dst == 8'h80), "SMCVTZ neg");
      else          chk(y == s_dst && !cc_next.z && !cc_next.v, "SMCVTZ pos");
      set(0, ALU_XFF_SPEC, CIN_NONE, 0, SP_NORM, LL_NULL);
      chk(y == s_dst && q_next == {q[6:0], 1'b0} && cc_next.n == q[7] && cc_next.c == (q[7] ^ q[6])
          && cc_next.v == (q[6] ^ q[5]) && cc_next.z == (q == 0), "NORM");
    end
    // the manual's LXT example: ZERO LXT OC gives 377, C=1, N=0, Z=0
    set(0, ALU_ZERO, CIN_NONE, 0, SD_LXT, LL_OC);
    chk(y == 8'hFF && cc_next.c && !cc_next.n && !cc_next.z && dst_we, "ZERO LXT OC");

    // unsigned multiply: LSETUP 7 / UMPY D LPCT X,Y (8 steps)
    for (int i = 0; i < 300; i++) begin
      logic [7:0] x, m;
      x = 8'($urandom); m = 8'($urandom);
      r = x; q = m; s_dst = 0;
      for (int k = 0; k < 8; k++) step(SP_UMPY, CIN_NONE, RL_D);
      chk({s_dst, q} == 16'(x * m), "UMPY product");
    end
    // two's complement multiply: 7 x MPY D, LMPYZ D
    for (int i = 0; i < 300; i++) begin
      logic [7:0] x, m;
      int p;
      x = 8'($urandom); m = 8'($urandom);
      r = x; q = m; s_dst = 0;
      for (int k = 0; k < 7; k++) step(SP_MPY, CIN_NONE, RL_D);
      step(SP_LMPY, CIN_Z, RL_D);
      p = int'($signed(x)) * int'($signed(m));
      chk({s_dst, q} == 16'(p), "MPY product");
    end
    // division: DNORM RD, 7 x DIVZ RD, LDIVZ O
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] dd;
      logic [7:0] dv;
      int n, d, qq, rm, ad;
      dv = 8'($urandom); if (dv == 0) dv = 8'd3;
      d = int'($signed(dv));
      qq = int'($urandom % 200) - 100;          // aim for a quotient that fits
      ad = (d < 0) ? -d : d;
      n = qq * d + int'($urandom % ad);
      if (n > 32767 || n < -32768) continue;
      dd = 16'(n);
      r = dv; s_dst = dd[15:8]; q = dd[7:0]; cc = '0;
      step(SP_DNORM, CIN_NONE, LL_RD);
      for (int k = 0; k < 7; k++) step(SP_DIV, CIN_Z, LL_RD);
      step(SP_LDIV, CIN_Z, LL_O);
      qq = int'($signed(q)); rm = int'($signed(s_dst));
      if (!(n / d < 127 && n / d > -127)) continue;  // quotient must fit in 8 bits
      chk(qq * d + rm == n && rm >= -ad && rm < ad && cc.n == s_dst[7], "DIV identity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
