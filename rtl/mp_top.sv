// mp_top: the packet communication microprocessor (MP), an 8 bit
// microprogrammed machine that executes one 40 bit instruction per clock.
//
// Parts (the manual's logical diagram): program memory (4096 x 40), data
// memory (65536 x 8) addressed by the 16 bit address register, 16 x 8
// scratchpad, Q register, 4 bit condition code {N,Z,V,C}, sign compare
// flip-flop, 12 bit program counter with 5 x 12 call stack and 12 bit
// address/count register, 8 bit offset register, 2 bit port select register
// and two byte-serial IO ports with a "last" bit.
//
// Instruction classes (bits 39-38, encoding in mp_pkg):
//   I   ALU operation with shift, shift link and special operations
//   II  ALU operation with immediate operand, memory and IO transfers, loads
//       of address, offset and port select registers
//   III condition code operations
//   IV  program control (jumps, calls, loops, counts) on a condition
// Classes I-III may also carry the control operations RTN (unconditional)
// and LPCT; other control codes in those classes act as "continue".
//
// Timing: the program memory is read synchronously with the sequencer's next
// PC, so the instruction of the current PC is available at the start of each
// cycle and every instruction completes in one cycle: operands are read,
// the result, Q, condition code, sign compare, memory, IO and special
// registers are written, and the PC moves, all on one rising clock edge.
// The data memory is likewise read with the next address register value.
//
// Host interface (the manual says only that the host downloads the program,
// may clear the PC and may access data memory while the MP is idle; the
// signals are this design's): run = 1 executes, run = 0 holds the MP idle.
// While idle the host writes program memory (pm_we), clears the PC
// (pc_clear) and reads or writes data memory (dm_*; dm_rdata follows dm_addr
// one cycle later). After loading the program memory or clearing the PC the
// host waits one cycle before raising run so that the first instruction is
// fetched. Reset clears all registers but not the memories. The spare instruction
// bits 30 and 15 and the sequencer's count and depth outputs are not used
// here and are gathered into the unused_bits net.
module mp_top
  import mp_pkg::*;
#(
  parameter int unsigned PM_WORDS = 4096,
  parameter int unsigned DM_WORDS = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  // host
  input  logic        run,
  input  logic        pc_clear,
  input  logic        pm_we,
  input  logic [11:0] pm_addr,
  input  logic [39:0] pm_wdata,
  input  logic        dm_we,
  input  logic [15:0] dm_addr,
  input  logic [7:0]  dm_wdata,
  output logic [7:0]  dm_rdata,
  output logic [11:0] pc,
  // IO ports
  input  logic [1:0]  in_valid,
  input  logic [7:0]  in_data [2],
  input  logic [1:0]  in_last,
  output logic [1:0]  in_ack,
  input  logic [1:0]  out_ready,
  output logic [1:0]  out_valid,
  output logic [7:0]  out_data,
  output logic        out_last
);

  localparam int unsigned PA = $clog2(PM_WORDS);
  localparam int unsigned DA = $clog2(DM_WORDS);

  instr_t      ir;
  logic [39:0] ir_bits;
  logic [11:0] next_pc, count;
  logic [2:0]  depth;
  logic        unused_bits;

  // architectural registers
  logic [7:0]  q;
  cc_t         cc;
  logic        sc;
  logic [15:0] ar;
  logic [7:0]  offset;
  logic [1:0]  psel;

  // datapath signals
  logic [7:0]  sp_a, sp_b, r_opnd, s_opnd, y, q_nx, io_rdata, io_status, dm_q;
  logic        dst_we, q_we, sc_nx;
  cc_t         cc_arith, cc_ccop;
  logic        is_alu, is_iomem, is_ccop, is_ctrl, cond;
  logic [3:0]  seq_code;
  logic        io_rd, io_wr, io_wr_last;
  logic [15:0] ar_nx;
  logic        mem_we;

  // program memory, read with the next PC
  mp_prog_mem #(.WORDS(PM_WORDS), .W(40)) u_pm (
    .clk, .we(pm_we & ~run), .waddr(pm_addr[PA-1:0]), .wdata(pm_wdata),
    .raddr(next_pc[PA-1:0]), .rdata(ir_bits)
  );
  assign ir = instr_t'(ir_bits);

  always_comb begin
    is_alu   = run && (ir.cls == CLS_ARITH);
    is_iomem = run && (ir.cls == CLS_IOMEM);
    is_ccop  = run && (ir.cls == CLS_CCOP);
    is_ctrl  = run && (ir.cls == CLS_CTRL);
  end

  mp_scratchpad #(.WORDS(16), .W(8)) u_sp (
    .clk, .rst_n, .ra(ir.src), .rb(ir.dst), .da(sp_a), .db(sp_b),
    .we((is_alu | is_iomem) & dst_we), .wa(ir.dst), .wd(y)
  );

  // operand selection: immediate first operand, class II second operand
  always_comb begin
    r_opnd = (is_iomem && ir.imm) ? {ir.link, ir.src} : sp_a;
    s_opnd = sp_b;
    if (is_iomem) begin
      if (ir.iosrc) begin
        unique case (io_src_e'(ir.io))
          IOS_RIODAT:  s_opnd = io_rdata;
          IOS_RIOSTAT: s_opnd = io_status;
          IOS_RCC:     s_opnd = {4'h0, cc};
          default:     s_opnd = sp_b;
        endcase
      end else if (ir.mr) begin
        s_opnd = dm_q;
      end
    end
  end

  mp_arith_unit u_au (
    .cls_iomem(is_iomem), .op(ir.op), .cin_code(ir.cin), .qmod(ir.qmod),
    .sd(ir.sd), .link(ir.link), .r(r_opnd), .s_dst(s_opnd), .q, .cc, .sc,
    .y, .dst_we, .q_next(q_nx), .q_we, .cc_next(cc_arith), .sc_next(sc_nx)
  );

  mp_cc_ops u_ccop (
    .op(ir.op), .mask(ir.link), .reg_bits(sp_b[3:0]), .cc_in(cc), .cc_out(cc_ccop)
  );

  mp_cond_select u_cond (.code(ir.op), .ccen(ir.ccen), .cc, .cond);

  // classes I-III may only return (unconditionally) or loop-count
  always_comb begin
    if (is_ctrl) seq_code = ir.pc;
    else if (ir.pc == PC_RTN || ir.pc == PC_LPCT) seq_code = ir.pc;
    else seq_code = PC_CONT;
  end

  mp_sequencer #(.AW(12), .DEPTH(5)) u_seq (
    .clk, .rst_n, .en(run), .pc_clear(pc_clear & ~run), .code(seq_code),
    .cond(is_ctrl ? cond : 1'b1), .reg_opt(is_ctrl & ir.reg_opt),
    .operand({ir.link, ir.src, ir.dst}), .offset, .pc, .next_pc, .count, .depth
  );

  // class II IO and register destinations
  always_comb begin
    io_rd      = is_iomem && ir.iosrc && (io_src_e'(ir.io) == IOS_RIODAT);
    io_wr      = is_iomem && !ir.iosrc &&
                 (io_dst_e'(ir.io) inside {IOD_WIODAT, IOD_WIOLAST});
    io_wr_last = io_dst_e'(ir.io) == IOD_WIOLAST;
    mem_we     = is_iomem && ir.wm;
    ar_nx      = ar;
    if (is_iomem && !ir.iosrc) begin
      if (io_dst_e'(ir.io) == IOD_WARL) ar_nx[15:8] = y;
      if (io_dst_e'(ir.io) == IOD_WARR) ar_nx[7:0]  = y;
    end
  end

  mp_io_mux u_io (
    .clk, .psel, .rd(io_rd), .wr(io_wr), .wr_last(io_wr_last),
    .wdata(y), .rdata(io_rdata), .status(io_status),
    .in_valid, .in_data, .in_last, .in_ack, .out_ready, .out_valid,
    .out_data, .out_last
  );

  // data memory: the processor owns it while running, the host while idle
  mp_data_mem #(.WORDS(DM_WORDS), .W(8)) u_dm (
    .clk, .we(run ? mem_we : dm_we),
    .waddr(run ? ar[DA-1:0] : dm_addr[DA-1:0]),
    .wdata(run ? y : dm_wdata),
    .raddr(run ? ar_nx[DA-1:0] : dm_addr[DA-1:0]),
    .rdata(dm_q)
  );
  assign dm_rdata = dm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= '0;
      cc     <= '0;
      sc     <= 1'b0;
      ar     <= '0;
      offset <= '0;
      psel   <= '0;
    end else begin
      if ((is_alu | is_iomem) && q_we) q <= q_nx;
      if (is_alu | is_iomem) begin
        cc <= cc_arith;
        sc <= sc_nx;
      end
      if (is_ccop) cc <= cc_ccop;
      ar <= ar_nx;
      if (is_iomem && !ir.iosrc) begin
        if (io_dst_e'(ir.io) == IOD_WPSEL) psel   <= y[1:0];
        if (io_dst_e'(ir.io) == IOD_WOFF)  offset <= y;
      end
    end
  end

  assign unused_bits = ^{ir.spare30, ir.spare15, count, depth};

endmodule
