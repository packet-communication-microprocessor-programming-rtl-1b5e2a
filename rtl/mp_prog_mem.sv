// mp_prog_mem: the MP's program memory, WORDS instructions of W bits
// (4096 x 40 in the manual).
//
// The host writes it through the write port while the MP is idle; the
// program does not change it. The read port is synchronous: the word at
// raddr appears on rdata after the next rising clock edge, and the sequencer
// drives raddr with the next PC so that rdata is the instruction of the
// current PC. Size from the manual; port structure is this design's choice.
// The array is not reset: the host must load what the program executes.
module mp_prog_mem #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned W     = 40
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
