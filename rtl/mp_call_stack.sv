// mp_call_stack: the MP's subroutine / loop stack, DEPTH words of AW bits.
//
// Built as a shift register whose entry 0 is the top of stack, with a count of
// valid entries. A push shifts every entry down one place, so when the stack
// is full the oldest entry falls off the bottom without any indication, as
// the manual specifies. A pop shifts up and decrements the count (a pop of an
// empty stack leaves the count at zero). push and pop in the same cycle
// replace the top entry. clear empties the stack (RESET operation). Entries
// above the count are kept at zero, so an empty stack reads as address 0.
// Depth 5 and width 12 are the manual's; the shift-register structure and
// the count are this design's choice. Updates on the rising clock edge; tos
// and count are register outputs.
module mp_call_stack #(
  parameter int unsigned DEPTH = 5,
  parameter int unsigned AW    = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic          pop,
  input  logic [AW-1:0] push_data,
  output logic [AW-1:0] tos,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  logic [AW-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push && pop) begin
      if (count != '0) mem[0] <= push_data;
    end else if (push) begin
      mem[0] <= push_data;
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
      if (count != DEPTH[$clog2(DEPTH+1)-1:0]) count <= count + 1'b1;
    end else if (pop) begin
      for (int i = 0; i < DEPTH - 1; i++) mem[i] <= mem[i+1];
      mem[DEPTH-1] <= '0;
      if (count != '0) count <= count - 1'b1;
    end
  end

  assign tos = mem[0];

endmodule
