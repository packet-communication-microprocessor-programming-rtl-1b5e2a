// tb_mp_io_mux: for every port select value and random port states checks
// the status byte {0,ORS,OR1,OR0,LBS,IRS,IR1,IR0}, the data path of the
// selected input port, and that acknowledge and output strobe reach only the
// selected port.
module tb_mp_io_mux;
  logic clk = 0;
  logic [1:0] psel, in_valid, in_last, in_ack, out_ready, out_valid;
  logic rd, wr, wr_last, out_last;
  logic [7:0] wdata, rdata, status, out_data;
  logic [7:0] in_data [2];
  int checks = 0, failures = 0;

  mp_io_mux dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s psel=%b iv=%b il=%b or=%b st=%b", what, psel,
                                  in_valid, in_last, out_ready, status);
    end
  endtask

  initial begin
    rd = 0; wr = 0; wr_last = 0; wdata = 0;
    psel = 0; in_valid = 0; in_last = 0; out_ready = 0; in_data = '{8'h00, 8'h00};
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      int ip, op;
      @(negedge clk);
      psel = 2'($urandom); in_valid = 2'($urandom); in_last = 2'($urandom);
      out_ready = 2'($urandom); in_data[0] = 8'($urandom); in_data[1] = 8'($urandom);
      ip = psel[1]; op = psel[0];
      rd = in_valid[ip] & 1'($urandom);
      wr = out_ready[op] & 1'($urandom);
      wr_last = 1'($urandom); wdata = 8'($urandom);
      #1;
      chk(status[0] == in_valid[0] && status[1] == in_valid[1], "IR0/IR1");
      chk(status[2] == in_valid[ip], "IRS");
      chk(status[3] == (in_valid[ip] && in_last[ip]), "LBS");
      chk(status[4] == out_ready[0] && status[5] == out_ready[1], "OR0/OR1");
      chk(status[6] == out_ready[op] && status[7] == 1'b0, "ORS");
      chk(rdata == in_data[ip], "rdata");
      chk(in_ack[ip] == rd && in_ack[1-ip] == 1'b0, "ack");
      chk(out_valid[op] == wr && out_valid[1-op] == 1'b0, "out_valid");
      chk(!wr || (out_data == wdata && out_last == wr_last), "out data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
