// tb_mp_shift_linker: checks all 16 right and 16 left shift links.
// The expected connections are written as a table of letters, one row per
// link as drawn in the link diagrams: for ALU-in, Q-in and C the source is
// 0, 1, a (bit leaving the ALU), q (bit leaving Q), c (old C), n (new N),
// x (new C from the adder), v (new N xor new V), or '-' for "C not loaded".
// Every row is exercised with all 64 input combinations.
module tb_mp_shift_linker;
  logic left, alu_out, q_out, c_old, c_next, n_next, v_next;
  logic [3:0] code;
  logic alu_in, q_in, c_load, c_val;
  int checks = 0, failures = 0;

  mp_shift_linker dut (.*);

  //                  ALU-in, Q-in, C   for codes 0..F
  string right_tab [16] = '{"00-", "11-", "0na", "1a-", "ca-", "na-", "0a-", "0aq",
                            "aqa", "cqa", "aq-", "xa-", "caq", "qaq", "va-", "qa-"};
  string left_tab  [16] = '{"00a", "11a", "00-", "11-", "q0a", "q1a", "q0-", "q1-",
                            "aqa", "cqa", "aq-", "c0-", "qca", "qaa", "qc-", "qa-"};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic pick(byte ch);
    case (ch)
      "0": return 1'b0;
      "1": return 1'b1;
      "a": return alu_out;
      "q": return q_out;
      "c": return c_old;
      "n": return n_next;
      "x": return c_next;
      "v": return n_next ^ v_next;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < 16; k++)
        for (int v = 0; v < 64; v++) begin
          string row;
          left = d[0]; code = 4'(k);
          {alu_out, q_out, c_old, c_next, n_next, v_next} = 6'(v);
          #1;
          row = left ? left_tab[k] : right_tab[k];
          checks++;
          if (alu_in !== pick(row[0]) || q_in !== pick(row[1]) ||
              c_load !== (row[2] != "-") || (c_load && c_val !== pick(row[2]))) begin
            failures++;
            if (failures < 10)
              $display("FAIL left=%0d code=%h in=%b: alu_in=%b q_in=%b c_load=%b c_val=%b (%s)",
                       left, code, 6'(v), alu_in, q_in, c_load, c_val, row);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
