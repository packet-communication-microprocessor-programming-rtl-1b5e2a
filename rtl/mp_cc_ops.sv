// mp_cc_ops: the class III condition code operations.
//
// The mask selects the bits {N,Z,V,C} an operation touches (mask values 8, 4,
// 2, 1 as in the manual's appendix). LOAD copies the masked bits from the low
// four bits of a scratchpad register (format 0000NZVC), SET and CLEAR force
// them, INVERT complements them, and XCHG loads V from C (mask bit V, the
// manual's LVC) and/or C from V (mask bit C, LCV), both from the old values,
// so that both together exchange C and V. Unmasked bits and unused operation
// codes leave the condition code unchanged. Purely combinational.
module mp_cc_ops
  import mp_pkg::*;
(
  input  logic [3:0] op,
  input  logic [3:0] mask,
  input  logic [3:0] reg_bits,  // low four bits of the operand register
  input  cc_t        cc_in,
  output cc_t        cc_out
);

  logic [3:0] cur;

  always_comb begin
    cur = cc_in;
    unique case (op)
      CCO_LOAD:  cc_out = cc_t'((cur & ~mask) | (reg_bits & mask));
      CCO_SET:   cc_out = cc_t'(cur | mask);
      CCO_CLEAR: cc_out = cc_t'(cur & ~mask);
      CCO_INV:   cc_out = cc_t'(cur ^ mask);
      CCO_XCHG: begin
        cc_out = cc_in;
        if (mask[1]) cc_out.v = cc_in.c;
        if (mask[0]) cc_out.c = cc_in.v;
      end
      default:   cc_out = cc_in;
    endcase
  end

endmodule
