// tb_mp_scratchpad: random writes and two-port reads of the 16 x 8
// scratchpad against an array model; also checks the reset value.
module tb_mp_scratchpad;
  logic clk = 0, rst_n = 1, we = 0;
  logic [3:0] ra, rb, wa;
  logic [7:0] da, db, wd;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  mp_scratchpad dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    ra = 0; rb = 0; wa = 0; wd = 0;
    #1 rst_n = 0;  // a real falling edge, so the asynchronous reset fires
    @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      checks++;
      if (da != model[ra] || db != model[rb]) begin
        failures++;
        if (failures < 10) $display("FAIL ra=%0d da=%h rb=%0d db=%h", ra, da, rb, db);
      end
      we = 1'($urandom); wa = 4'($urandom); wd = 8'($urandom);
      @(posedge clk);
      if (we) model[wa] = wd;
      #1 we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
