// tb_mp_cond_select: checks the 16 conditions by their meaning. For random
// X and Y the condition code of X - Y is formed arithmetically and each
// condition is compared with the signed or unsigned comparison it stands
// for; the single-flag conditions are checked on all 16 flag values, and a
// cleared condition enable must always give true.
module tb_mp_cond_select;
  import mp_pkg::*;
  logic [3:0] code;
  logic ccen, cond;
  cc_t cc;
  int checks = 0, failures = 0;

  mp_cond_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic want, string what);
    checks++;
    if (cond !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s code=%h cc=%b cond=%b", what, code, cc, cond);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] x, y, d;
      int sx, sy, st;
      x = 8'($urandom); y = 8'($urandom);
      if (i % 7 == 0) y = x;
      d = x - y;
      sx = $signed(x); sy = $signed(y); st = sx - sy;
      cc.n = d[7]; cc.z = (d == 0); cc.c = (x >= y); cc.v = (st > 127) || (st < -128);
      ccen = 1;
      code = CD_GT;  #1 expect_eq(sx >  sy, "GT");
      code = CD_LE;  #1 expect_eq(sx <= sy, "LE");
      code = CD_GE;  #1 expect_eq(sx >= sy, "GE");
      code = CD_LT;  #1 expect_eq(sx <  sy, "LT");
      code = CD_EQ;  #1 expect_eq(x == y, "EQ");
      code = CD_NE;  #1 expect_eq(x != y, "NE");
      code = CD_HIS; #1 expect_eq(x >= y, "HIS");
      code = CD_LO;  #1 expect_eq(x <  y, "LO");
      code = CD_HI;  #1 expect_eq(x >  y, "HI");
      code = CD_LOS; #1 expect_eq(x <= y, "LOS");
    end
    for (int v = 0; v < 16; v++) begin
      cc = cc_t'(v); ccen = 1;
      code = CD_MI;  #1 expect_eq(cc.n, "MI");
      code = CD_PL;  #1 expect_eq(!cc.n, "PL");
      code = CD_VS;  #1 expect_eq(cc.v, "VS");
      code = CD_VC;  #1 expect_eq(!cc.v, "VC");
      code = CD_CZ;  #1 expect_eq(cc.c || cc.z, "CZ");
      code = CD_NCZ; #1 expect_eq(!(cc.c || cc.z), "NCZ");
      ccen = 0;
      for (int k = 0; k < 16; k++) begin code = 4'(k); #1 expect_eq(1'b1, "always"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
