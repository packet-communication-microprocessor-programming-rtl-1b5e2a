// mp_scratchpad: the 16 x 8 bit scratchpad of the MP, all registers
// equivalent.
//
// Two combinational read ports (SRC and DST register numbers of the
// executing instruction) and one write port clocked on the rising edge, so an
// instruction reads its operands and writes its result back in one cycle.
// Size from the manual; the port structure is this design's choice. All
// registers reset to zero.
module mp_scratchpad #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned W     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(WORDS)-1:0] ra,
  input  logic [$clog2(WORDS)-1:0] rb,
  output logic [W-1:0]             da,
  output logic [W-1:0]             db,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] wa,
  input  logic [W-1:0]             wd
);

  logic [W-1:0] regs [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign da = regs[ra];
  assign db = regs[rb];

endmodule
