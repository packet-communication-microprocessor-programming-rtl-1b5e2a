// tb_mp_data_mem: random writes and reads over the full 64 K byte data
// memory against an associative-array model, including reads of the address
// being written in the same cycle (which must return the new byte).
module tb_mp_data_mem;
  logic clk = 0, we = 0;
  logic [15:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [int];
  int checks = 0, failures = 0, bypasses = 0;

  mp_data_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = 0; raddr = 0; wdata = 0;
    // initialise a small window and the two ends of the address space
    for (int a = 0; a < 256; a++) begin
      for (int hi = 0; hi < 2; hi++) begin
        we = 1; waddr = 16'(a) | (hi ? 16'hFF00 : 16'h0000); wdata = 8'($urandom);
        model[int'(waddr)] = wdata;
        @(posedge clk); #1;
      end
    end
    for (int i = 0; i < 5000; i++) begin
      logic [15:0] ra;
      ra = 16'($urandom % 256) | (($urandom % 2) ? 16'hFF00 : 16'h0000);
      raddr = ra;
      we = 1'($urandom);
      waddr = ($urandom % 3 == 0) ? ra : (16'($urandom % 256) | 16'hFF00);
      wdata = 8'($urandom);
      if (we && waddr == ra) bypasses++;
      @(posedge clk);
      if (we) model[int'(waddr)] = wdata;
      #1;
      checks++;
      if (rdata != model[int'(ra)]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h got %h want %h", ra, rdata, model[int'(ra)]);
      end
    end
    checks++;
    if (bypasses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
