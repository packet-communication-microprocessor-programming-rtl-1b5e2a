// tb_mp_prog_mem: fills the full 4096 x 40 program memory with a pattern
// computed from the address, then reads random addresses and checks that the
// word appears one clock after its address.
module tb_mp_prog_mem;
  logic clk = 0, we = 0;
  logic [11:0] waddr, raddr;
  logic [39:0] wdata, rdata;
  int checks = 0, failures = 0;

  mp_prog_mem dut (.*);
  always #5 clk = ~clk;

  function automatic logic [39:0] pat(logic [11:0] a);
    return {a, 16'hA5C3 ^ {a, a[11:8]}, ~a} ^ 40'h5A_0000_0000;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = 0;
    for (int a = 0; a < 4096; a++) begin
      we = 1; waddr = 12'(a); wdata = pat(12'(a));
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [11:0] ad;
      ad = 12'($urandom);
      raddr = ad;
      @(posedge clk); #1;
      checks++;
      if (rdata != pat(ad)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h got %h want %h", ad, rdata, pat(ad));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
