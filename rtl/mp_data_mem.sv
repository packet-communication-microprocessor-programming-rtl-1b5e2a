// mp_data_mem: the MP's data memory, WORDS bytes (65536 x 8 in the manual).
//
// One write port and one synchronous read port. The read port is driven with
// the address the memory address register will hold in the next cycle, so
// rdata holds the byte at the current address while an instruction executes.
// A write to the address being read in the same cycle is forwarded, so a
// read always sees the latest write. The processor owns both ports while it
// runs; the MP top hands them to the host while the MP is idle, as the manual
// allows host access only then. Size from the manual; the port structure is
// this design's choice. The array is not reset.
module mp_data_mem #(
  parameter int unsigned WORDS = 65536,
  parameter int unsigned W     = 8
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
    if (we && waddr == raddr) rdata <= wdata;
    else                      rdata <= mem[raddr];
  end

endmodule
