// tb_mp_alu: self-checking test of the 16 ALU functions.
// Random operands and carry-in for every function; the expected result, C
// and V are computed with integer arithmetic: C as "unsigned sum above 255"
// with the subtrahend complemented, V as "signed result outside -128..127".
module tb_mp_alu;
  import mp_pkg::*;

  logic [7:0] r, s, f;
  logic [3:0] op;
  logic cin, cout, ovf, arith;
  int checks = 0, failures = 0;

  mp_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int i);
    int us, ss;          // unsigned sum, signed true result
    int sr, sv, ci;      // signed operands and carry as integers
    logic [7:0] ef;
    logic ec, ev, ar;
    ar = 1'b1;
    sr = int'($signed(r)); sv = int'($signed(s)); ci = int'(cin);
    unique case (op)
      4'h1: begin us = s + (255 - r) + cin; ss = sv - sr - 1 + ci; end
      4'h2: begin us = r + (255 - s) + cin; ss = sr - sv - 1 + ci; end
      4'h3: begin us = r + s + cin;         ss = sr + sv + ci; end
      4'h4: begin us = s + cin;             ss = sv + ci; end
      4'h5: begin us = (255 - s) + cin;     ss = -sv - 1 + ci; end
      4'h6: begin us = r + cin;             ss = sr + ci; end
      4'h7: begin us = (255 - r) + cin;     ss = -sr - 1 + ci; end
      default: begin ar = 1'b0; us = 0; ss = 0; end
    endcase
    if (ar) begin
      ef = us[7:0];
      ec = us > 255;
      ev = (ss > 127) || (ss < -128);
    end else begin
      ec = 0; ev = 0;
      unique case (op)
        4'h0: ef = 8'hFF;
        4'h8: ef = 8'h00;
        4'h9: ef = ~r & s;
        4'hA: ef = ~(r ^ s);
        4'hB: ef = r ^ s;
        4'hC: ef = r & s;
        4'hD: ef = ~(r | s);
        4'hE: ef = ~(r & s);
        default: ef = r | s;
      endcase
    end
    checks++;
    if (f !== ef || cout !== ec || ovf !== ev || arith !== ar) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%h r=%h s=%h cin=%b: f=%h c=%b v=%b, want %h %b %b",
                 op, r, s, cin, f, cout, ovf, ef, ec, ev);
    end
  endtask

  initial begin
    // corner cases: negate -128, 0 - 0, 127 + 1
    for (int k = 0; k < 16; k++) begin
      op = 4'(k);
      r = 8'h80; s = 8'h80; cin = 1; #1 check(0);
      r = 8'h00; s = 8'h00; cin = 1; #1 check(0);
      r = 8'h7F; s = 8'h01; cin = 0; #1 check(0);
    end
    for (int i = 0; i < 20000; i++) begin
      op = 4'($urandom); r = 8'($urandom); s = 8'($urandom); cin = 1'($urandom);
      #1 check(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
