// mp_alu: the 8 bit, 16 function ALU of the MP.
//
// R is the first operand (SRC register or immediate) and S the second (DST
// register, Q register, memory or IO data). Functions 1-7 are additions done
// by one 8 bit adder with carry in; subtraction is X + ~Y + carry, so C is the
// complement of a borrow. V is the adder overflow (operands of equal sign
// giving a sum of the other sign). Functions 8-F are logical; function 0 gives
// all ones (XFF). The function codes follow the manual's op-code appendix.
// `arith` tells the caller that V and C are meaningful: the manual clears both
// after logical functions. Purely combinational.
module mp_alu
  import mp_pkg::*;
(
  input  logic [7:0] r,
  input  logic [7:0] s,
  input  logic [3:0] op,
  input  logic       cin,
  output logic [7:0] f,
  output logic       cout,
  output logic       ovf,
  output logic       arith
);

  logic [7:0] a, b;
  logic [8:0] sum;

  always_comb begin
    a = 8'h00;
    b = 8'h00;
    arith = 1'b1;
    unique case (alu_op_e'(op))
      ALU_RSUB1: begin a = s;  b = ~r; end
      ALU_SUB1:  begin a = r;  b = ~s; end
      ALU_ADD:   begin a = r;  b = s;  end
      ALU_DST:   begin a = s;  end
      ALU_CDST:  begin a = ~s; end
      ALU_SRC:   begin a = r;  end
      ALU_CSRC:  begin a = ~r; end
      default:   arith = 1'b0;
    endcase
    sum = {1'b0, a} + {1'b0, b} + {8'h00, cin};
    unique case (alu_op_e'(op))
      ALU_XFF_SPEC: f = 8'hFF;
      ALU_ZERO:     f = 8'h00;
      ALU_ANDCS:    f = ~r & s;
      ALU_XNOR:     f = ~(r ^ s);
      ALU_XOR:      f = r ^ s;
      ALU_AND:      f = r & s;
      ALU_NOR:      f = ~(r | s);
      ALU_NAND:     f = ~(r & s);
      ALU_OR:       f = r | s;
      default:      f = sum[7:0];
    endcase
    cout = arith & sum[8];
    ovf  = arith & (a[7] == b[7]) & (sum[7] != a[7]);
  end

endmodule
