// mp_shift_linker: joins the ends of the ALU result, the Q register and the
// C bit during a shift.
//
// For a right shift the linker receives the bits leaving bit 0 of the ALU
// result (alu_out) and of Q (q_out) and returns the bits entering bit 7
// (alu_in, q_in); for a left shift it receives the bits leaving the left end
// and returns the bits entering bit 0. When the link puts a bit into C,
// c_load is set and c_val overrides the adder carry. The 16 right and 16 left
// links are the ones drawn in the manual's shift link diagrams: R rotate,
// O shift ones, D join ALU and Q into one 16 bit word, C / U place C at the
// left / right end, BC copy the bit passing the left end into C, N shift the
// new N bit in. X13 shifts in the new C bit, X16 the XOR of new N and new V.
// Codes without a pictured C connection leave C to the adder. Purely
// combinational.
module mp_shift_linker
  import mp_pkg::*;
(
  input  logic       left,     // 1: left-shift meaning of the code
  input  logic [3:0] code,
  input  logic       alu_out,
  input  logic       q_out,
  input  logic       c_old,    // C before this instruction
  input  logic       c_next,   // adder carry out of this instruction
  input  logic       n_next,   // N bit this instruction sets
  input  logic       v_next,   // V bit this instruction sets
  output logic       alu_in,
  output logic       q_in,
  output logic       c_load,
  output logic       c_val
);

  always_comb begin
    alu_in = 1'b0;
    q_in   = 1'b0;
    c_load = 1'b0;
    c_val  = 1'b0;
    if (!left) begin
      unique case (rlink_e'(code))
        RL_NULL: ;
        RL_O:    begin alu_in = 1'b1; q_in = 1'b1; end
        RL_UN:   begin c_load = 1'b1; c_val = alu_out; q_in = n_next; end
        RL_DO:   begin alu_in = 1'b1; q_in = alu_out; end
        RL_DC:   begin alu_in = c_old; q_in = alu_out; end
        RL_DN:   begin alu_in = n_next; q_in = alu_out; end
        RL_D:    q_in = alu_out;
        RL_DU:   begin c_load = 1'b1; c_val = q_out; q_in = alu_out; end
        RL_RBC:  begin c_load = 1'b1; c_val = alu_out; alu_in = alu_out; q_in = q_out; end
        RL_RC:   begin c_load = 1'b1; c_val = alu_out; alu_in = c_old; q_in = q_out; end
        RL_R:    begin alu_in = alu_out; q_in = q_out; end
        RL_X13:  begin alu_in = c_next; q_in = alu_out; end
        RL_RDC:  begin c_load = 1'b1; c_val = q_out; alu_in = c_old; q_in = alu_out; end
        RL_RDBC: begin c_load = 1'b1; c_val = q_out; alu_in = q_out; q_in = alu_out; end
        RL_X16:  begin alu_in = n_next ^ v_next; q_in = alu_out; end
        RL_RD:   begin alu_in = q_out; q_in = alu_out; end
      endcase
    end else begin
      unique case (llink_e'(code))
        LL_C:    begin c_load = 1'b1; c_val = alu_out; end
        LL_OC:   begin c_load = 1'b1; c_val = alu_out; alu_in = 1'b1; q_in = 1'b1; end
        LL_NULL: ;
        LL_O:    begin alu_in = 1'b1; q_in = 1'b1; end
        LL_DC:   begin c_load = 1'b1; c_val = alu_out; alu_in = q_out; end
        LL_DOC:  begin c_load = 1'b1; c_val = alu_out; alu_in = q_out; q_in = 1'b1; end
        LL_D:    alu_in = q_out;
        LL_DO:   begin alu_in = q_out; q_in = 1'b1; end
        LL_RBC:  begin c_load = 1'b1; c_val = alu_out; alu_in = alu_out; q_in = q_out; end
        LL_RC:   begin c_load = 1'b1; c_val = alu_out; alu_in = c_old; q_in = q_out; end
        LL_R:    begin alu_in = alu_out; q_in = q_out; end
        LL_U:    alu_in = c_old;
        LL_RDC:  begin c_load = 1'b1; c_val = alu_out; alu_in = q_out; q_in = c_old; end
        LL_RDBC: begin c_load = 1'b1; c_val = alu_out; alu_in = q_out; q_in = alu_out; end
        LL_DU:   begin alu_in = q_out; q_in = c_old; end
        LL_RD:   begin alu_in = q_out; q_in = alu_out; end
      endcase
    end
  end

endmodule
