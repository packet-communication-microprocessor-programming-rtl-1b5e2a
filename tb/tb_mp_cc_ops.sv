// tb_mp_cc_ops: checks the class III condition code operations bit by bit
// for every operation, mask, register value and old condition code.
module tb_mp_cc_ops;
  import mp_pkg::*;
  logic [3:0] op, mask, reg_bits;
  cc_t cc_in, cc_out;
  int checks = 0, failures = 0;

  mp_cc_ops dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ops [6] = '{0, 1, 3, 4, 5, 7};
    foreach (ops[o])
      for (int m = 0; m < 16; m++)
        for (int c = 0; c < 16; c++)
          for (int rr = 0; rr < 16; rr += 5) begin
            logic [3:0] want;
            op = 4'(ops[o]); mask = 4'(m); cc_in = cc_t'(c); reg_bits = 4'(rr);
            #1;
            for (int b = 0; b < 4; b++) begin
              logic old;
              old = c[b];
              if (!m[b]) want[b] = old;
              else case (ops[o])
                0: want[b] = rr[b];
                1: want[b] = 1'b1;
                3: want[b] = 1'b0;
                5: want[b] = !old;
                4: want[b] = (b == 1) ? c[0] : (b == 0) ? c[1] : old;  // V<-C, C<-V
                default: want[b] = old;
              endcase
            end
            checks++;
            if (cc_out !== want) begin
              failures++;
              if (failures < 10) $display("FAIL op=%0d mask=%b cc=%b reg=%b -> %b want %b",
                                          op, mask, cc_in, reg_bits, cc_out, want);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
