// mp_io_mux: the IO multiplexor between the MP and its two external ports.
//
// Each port carries 8 data bits plus a "last" bit marking the end of a
// packet. Input port i offers a byte with in_valid[i]; the MP takes it when
// rd is asserted for the selected input port, which raises in_ack[i] for that
// cycle (the byte moves on the rising edge where valid and ack are both high).
// Output port i accepts a byte when out_ready[i]; the MP sends one by
// asserting wr, which raises out_valid[i] of the selected output port for that
// cycle with out_data and out_last. Bit 1 of the port select register picks
// the input port, bit 0 the output port, as the manual states.
// The status byte is {0, ORS, OR1, OR0, LBS, IRS, IR1, IR0}: the manual
// names these seven bits but their positions are this design's choice.
// out_data, out_last and the IR0/IR1/OR0/OR1 status bits are the port
// signals passed straight through, and status bit 7 is always 0.
// Purely combinational; the assertions check the manual's rule that data is
// read only from a ready input and sent only to a ready output; clk feeds
// only those assertions. rd and wr must be low while the MP is idle or in
// reset (mp_top gates them with run), so the assertions need no reset.
module mp_io_mux (
  input  logic       clk,
  input  logic [1:0] psel,
  input  logic       rd,
  input  logic       wr,
  input  logic       wr_last,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic [7:0] status,
  input  logic [1:0] in_valid,
  input  logic [7:0] in_data [2],
  input  logic [1:0] in_last,
  output logic [1:0] in_ack,
  input  logic [1:0] out_ready,
  output logic [1:0] out_valid,
  output logic [7:0] out_data,
  output logic       out_last
);

  logic isel, osel, irs, ors, lbs;

  always_comb begin
    isel   = psel[1];
    osel   = psel[0];
    irs    = in_valid[isel];
    ors    = out_ready[osel];
    lbs    = irs & in_last[isel];
    status = {1'b0, ors, out_ready[1], out_ready[0], lbs, irs, in_valid[1], in_valid[0]};
    rdata  = in_data[isel];
    in_ack = '0;
    in_ack[isel] = rd;
    out_valid = '0;
    out_valid[osel] = wr;
    out_data = wdata;
    out_last = wr_last;
  end

  a_read_ready: assert property (@(posedge clk) rd |-> irs)
    else $error("IO read from an input port that is not ready");
  a_write_ready: assert property (@(posedge clk) wr |-> ors)
    else $error("IO write to an output port that is not ready");

endmodule
