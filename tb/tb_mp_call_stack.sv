// tb_mp_call_stack: pushes past the depth of five and checks that the oldest
// entries are lost silently, that pops return entries newest first, that a
// pop of an empty stack keeps the count at zero, that push with pop replaces
// the top, and that clear empties the stack. A queue is the reference model.
module tb_mp_call_stack;
  logic clk = 0, rst_n = 1, clear = 0, push = 0, pop = 0;
  logic [11:0] push_data, tos;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [11:0] model [$];

  mp_call_stack #(.DEPTH(5), .AW(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit pu, bit po, bit cl);
    @(negedge clk);
    push = pu; pop = po; clear = cl; push_data = 12'($urandom);
    @(posedge clk);
    if (cl) model.delete();
    else if (pu && po) begin
      if (model.size() > 0) model[0] = push_data;
    end else if (pu) begin
      model.push_front(push_data);
      if (model.size() > 5) void'(model.pop_back());
    end else if (po && model.size() > 0) void'(model.pop_front());
    #1;
    checks++;
    if (count != 3'(model.size()) || (model.size() > 0 && tos != model[0])) begin
      failures++;
      if (failures < 10) $display("FAIL count=%0d tos=%h want %0d %h", count, tos,
                                  model.size(), model.size() ? model[0] : 12'h0);
    end
  endtask

  initial begin
    #1 rst_n = 0;  // a real falling edge, so the asynchronous reset fires
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 7; i++) step(1, 0, 0);   // overflow: two oldest lost
    for (int i = 0; i < 6; i++) step(0, 1, 0);   // underflow on the sixth
    for (int i = 0; i < 3; i++) step(1, 0, 0);
    step(1, 1, 0);
    step(0, 0, 1);
    for (int i = 0; i < 500; i++) step(1'($urandom), 1'($urandom), ($urandom % 40) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
