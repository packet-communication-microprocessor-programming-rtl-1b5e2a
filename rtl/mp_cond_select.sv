// mp_cond_select: the branch condition of a class IV instruction.
//
// Computes one of the 16 conditions of the manual's condition table from the
// N, Z, V and C bits left by the previous instruction; with the condition
// enable bit clear (the "<null>" condition) the result is always true.
// Codes follow the manual's op-code appendix. Purely combinational.
module mp_cond_select
  import mp_pkg::*;
(
  input  logic [3:0] code,
  input  logic       ccen,
  input  cc_t        cc,
  output logic       cond
);

  logic lt;  // signed less-than after a subtraction: N xor V

  always_comb begin
    lt = cc.n ^ cc.v;
    unique case (cond_e'(code))
      CD_GT:  cond = ~lt & ~cc.z;
      CD_LE:  cond = lt | cc.z;
      CD_GE:  cond = ~lt;
      CD_LT:  cond = lt;
      CD_NE:  cond = ~cc.z;
      CD_EQ:  cond = cc.z;
      CD_VC:  cond = ~cc.v;
      CD_VS:  cond = cc.v;
      CD_NCZ: cond = ~(cc.c | cc.z);
      CD_CZ:  cond = cc.c | cc.z;
      CD_LO:  cond = ~cc.c;
      CD_HIS: cond = cc.c;
      CD_HI:  cond = cc.c & ~cc.z;
      CD_LOS: cond = ~cc.c | cc.z;
      CD_PL:  cond = ~cc.n;
      CD_MI:  cond = cc.n;
    endcase
    if (!ccen) cond = 1'b1;
  end

endmodule
