// tb_mp_top: end-to-end test of the MP at its full default size.
//
// The testbench acts as the host: it loads a test program into the program
// memory and one operand byte into the data memory, clears the PC and runs
// the MP. The program exercises every instruction class: the manual's
// unsigned and two's complement multiply loops and its division sequence,
// a memory-read addition, a subroutine call, loops under count (COUNT and
// LSETUP/LPCT) and under test (LOOP), both exits of a three way branch, a
// loop EXIT, 16-way VJMP and JCB dispatch through the offset register,
// JMPR / JSRR falling back on the address/count register, the CC operations
// read back with RCC, LXT and a 16 bit double rotate, a call stack overflow,
// and a packet echo between the two IO ports (poll the status byte, sense
// the "last" bit, read port 1, add one, send on port 0). It then RESETs,
// takes the second-pass branch, writes a completion marker and parks in a
// jump-to-self. The host stops the MP and reads all results from data
// memory. Results are compared with values computed here; the multiply and
// divide step instructions must run exactly 8 / 7 / 7 times. Each mechanism
// is counted while the program runs and one that never happens is a failure.
module tb_mp_top;
  import mp_pkg::*;
  import mp_asm_pkg::*;

  logic clk = 0, rst_n = 1, run = 0, pc_clear = 0, pm_we = 0, dm_we = 0;
  logic [11:0] pm_addr = 0, pc;
  logic [39:0] pm_wdata = 0;
  logic [15:0] dm_addr = 0;
  logic [7:0]  dm_wdata = 0, dm_rdata;
  logic [1:0]  in_valid = 0, in_last = 0, in_ack, out_ready = 0, out_valid;
  logic [7:0]  in_data [2];
  logic [7:0]  out_data;
  logic        out_last;

  mp_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mech [string];
  logic [39:0] prog [4096];
  int a = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  task automatic e(logic [39:0] w);
    prog[a] = w;
    a++;
  endtask
  // store register r at data address 0x01lo (address register high byte is 01)
  task automatic st(logic [3:0] r, logic [7:0] lo);
    e(c2(ALU_SRC, 1, lo, 0, SD_N, 0, 0, 0, IOD_WARR));
    e(c2(ALU_DST, 0, 0, r, SD_N, 0, 1));
  endtask
  task automatic stq(logic [7:0] lo);
    e(c2(ALU_SRC, 1, lo, 0, SD_N, 0, 0, 0, IOD_WARR));
    e(c2(ALU_DST, 0, 0, 0, SD_N, 0, 1, 0, 0, CIN_NONE, 1));
  endtask
  task automatic rcc(logic [7:0] lo);
    e(c2(ALU_DST, 0, 0, 9, SD_NULL, 0, 0, 1, IOS_RCC));
    st(9, lo);
  endtask

  int halt_addr;

  task automatic build();
    int x, ret;
    foreach (prog[i]) prog[i] = c4(PC_JMP, 12'(i));   // unused words hang
    a = 0;
    e(c1(ALU_DST, SD_N, LL_NULL, 0, 14));              // second pass?
    e(c4(PC_JMP, 12'h3F0, CD_NE));
    e(c2(ALU_SRC, 1, 8'h01, 0, SD_N, 0, 0, 0, IOD_WARL));
    // unsigned multiply 200 x 183
    e(c2(ALU_SRC, 1, 8'hC8, 1));
    e(c2(ALU_SRC, 1, 8'hB7, 0, SD_NQ));
    e(c1(ALU_ZERO, SD_NULL, 0, 0, 2));
    e(c4(PC_LSETUP, 7));
    e(sp(SP_UMPY, RL_D, 1, 2, CIN_NONE, PC_LPCT));
    st(2, 8'h00); stq(8'h01);
    // two's complement multiply -100 x 55
    e(c2(ALU_SRC, 1, 8'h9C, 3));
    e(c2(ALU_SRC, 1, 8'h37, 0, SD_NQ));
    e(c1(ALU_ZERO, SD_NULL, 0, 0, 4));
    e(c4(PC_LSETUP, 6));
    e(sp(SP_MPY, RL_D, 3, 4, CIN_NONE, PC_LPCT));
    e(sp(SP_LMPY, RL_D, 3, 4, CIN_Z));
    st(4, 8'h02); stq(8'h03);
    // divide -3000 by 37
    e(c2(ALU_SRC, 1, 8'hF4, 5));
    e(c2(ALU_SRC, 1, 8'h48, 0, SD_NQ));
    e(c2(ALU_SRC, 1, 8'd37, 6));
    e(sp(SP_DNORM, LL_RD, 6, 5));
    e(c4(PC_LSETUP, 6));
    e(sp(SP_DIV, LL_RD, 6, 5, CIN_Z, PC_LPCT));
    e(sp(SP_LDIV, LL_O, 6, 5, CIN_Z));
    st(5, 8'h04); stq(8'h05);
    // memory read: R7 = R1 + mem[0x0180]
    e(c2(ALU_SRC, 1, 8'h80, 0, SD_N, 0, 0, 0, IOD_WARR));
    e(c2(ALU_ADD, 0, 8'd1, 7, SD_NULL, 1));
    st(7, 8'h06);
    // subroutine
    e(c4(PC_JSR, 12'h200));
    st(8, 8'h07);
    // loop under count without the stack: LDCT 4 / COUNT
    e(c1(ALU_ZERO, SD_NULL, 0, 0, 9));
    e(c4(PC_LDCT, 4));
    x = a; e(c2(ALU_ADD, 1, 8'd1, 9));
    e(c4(PC_COUNT, 12'(x)));
    st(9, 8'h08);
    // loop under test: add 3 until R10 = 15
    e(c1(ALU_ZERO, SD_NULL, 0, 0, 10));
    e(c4(PC_LSETUP));
    e(c2(ALU_ADD, 1, 8'd3, 10));
    e(c2(ALU_SUB1, 1, 8'd15, 10, SD_N, 0, 0, 0, 0, CIN_ONE));
    e(c4(PC_LOOP, 0, CD_EQ));
    st(10, 8'h09);
    // three way branch, condition true on the third pass
    e(c1(ALU_ZERO, SD_NULL, 0, 0, 11));
    e(c4(PC_LSETUP, 5));
    e(c2(ALU_ADD, 1, 8'd1, 11));
    e(c2(ALU_SUB1, 1, 8'd3, 11, SD_N, 0, 0, 0, 0, CIN_ONE));
    x = a; e(c4(PC_TWB, 12'(x + 2), CD_EQ));
    e(c4(PC_JMP, 12'(x + 3)));
    e(c2(ALU_SRC, 1, 8'hEE, 11));
    st(11, 8'h0A);
    // three way branch, count expires
    e(c1(ALU_ZERO, SD_NULL, 0, 0, 12));
    e(c4(PC_LSETUP, 2));
    e(c2(ALU_ADD, 1, 8'd1, 12));
    x = a; e(c4(PC_TWB, 12'(x + 2), CD_MI));
    e(c2(ALU_SRC, 1, 8'hEE, 12));
    st(12, 8'h0B);
    // abnormal exit from a loop
    e(c1(ALU_ZERO, SD_NULL, 0, 0, 13));
    e(c4(PC_LSETUP));
    e(c2(ALU_ADD, 1, 8'd1, 13));
    e(c2(ALU_SUB1, 1, 8'd2, 13, SD_N, 0, 0, 0, 0, CIN_ONE));
    x = a; e(c4(PC_EXIT, 12'(x + 2), CD_EQ));
    e(c4(PC_LOOP, 0, CD_VS));
    st(13, 8'h0C);
    // 16 way dispatch on the low 4 bits of the offset register
    e(c2(ALU_SRC, 1, 8'h23, 0, SD_N, 0, 0, 0, IOD_WOFF));
    e(c4(PC_VJMP, 12'h300));
    ret = a;
    for (int k = 0; k < 16; k++) begin
      prog[12'h300 + k]     = c4(PC_JMP, 12'(12'h320 + 2 * k));
      prog[12'h320 + 2 * k] = c2(ALU_SRC, 1, 8'(k), 9);
      prog[12'h321 + 2 * k] = c4(PC_JMP, 12'(ret));
    end
    st(9, 8'h0D);
    // jump and count bits: leftmost zero of 1110_1111 is bit 4
    e(c2(ALU_SRC, 1, 8'hEF, 0, SD_N, 0, 0, 0, IOD_WOFF));
    e(c4(PC_JCB, 12'h340));
    ret = a;
    for (int k = 0; k < 9; k++) begin
      prog[12'h340 + k]     = c4(PC_JMP, 12'(12'h360 + 2 * k));
      prog[12'h360 + 2 * k] = c2(ALU_SRC, 1, 8'(8'h40 + k), 9);
      prog[12'h361 + 2 * k] = c4(PC_JMP, 12'(ret));
    end
    st(9, 8'h0E);
    // JMPR with a false condition takes the address/count register
    e(c4(PC_LDCT, 12'h3A0));
    e(c2(ALU_SRC, 1, 8'h01, 0, SD_N));
    e(c4(PC_JMPR, 12'h3C0, CD_MI));
    ret = a;
    prog[12'h3A0] = c2(ALU_SRC, 1, 8'h77, 9);
    prog[12'h3A1] = c4(PC_JMP, 12'(ret));
    st(9, 8'h0F);
    // JSRR with a true condition calls the effective address
    e(c4(PC_JSRR, 12'h3B0, CD_PL));
    prog[12'h3B0] = c2(ALU_SRC, 1, 8'h78, 9);
    prog[12'h3B1] = c1(ALU_DST, SD_N, LL_NULL, 0, 9, CIN_NONE, 0, PC_RTN);
    st(9, 8'h10);
    // condition code operations, read back with RCC
    e(c3(CCO_CLEAR, 4'hF));
    e(c3(CCO_SET, 4'b0101));
    rcc(8'h11);
    e(c2(ALU_SRC, 1, 8'h0A, 10));
    e(c3(CCO_LOAD, 4'hF, 10));
    rcc(8'h12);
    e(c3(CCO_LOAD, 4'hF, 10));
    e(c3(CCO_XCHG, 4'b0011));
    rcc(8'h13);
    e(c3(CCO_LOAD, 4'hF, 10));
    e(c3(CCO_INV, 4'hF));
    rcc(8'h14);
    // shifts: ZERO LXT OC, 16 bit rotate right of R2:Q
    e(c1(ALU_ZERO, SD_LXT, LL_OC, 0, 1));
    st(1, 8'h15);
    e(c2(ALU_SRC, 1, 8'h81, 2));
    e(c2(ALU_SRC, 1, 8'h01, 0, SD_NQ));
    e(c1(ALU_DST, SD_RSRQ, RL_RD, 0, 2));
    st(2, 8'h16); stq(8'h17);
    // call stack overflow: six pushes, five pops
    repeat (6) e(c4(PC_LSETUP));
    repeat (5) e(c4(PC_LOOP));
    // packet echo: input port 1 -> +1 -> output port 0
    e(c2(ALU_SRC, 1, 8'h02, 0, SD_N, 0, 0, 0, IOD_WPSEL));
    ret = a;
    e(c2(ALU_AND, 1, 8'h04, 0, SD_N, 0, 0, 1, IOS_RIOSTAT));   // IRS
    e(c4(PC_JMP, 12'(ret), CD_EQ));
    e(c2(ALU_AND, 1, 8'h08, 6, SD_NULL, 0, 0, 1, IOS_RIOSTAT)); // LBS
    e(c2(ALU_ADD, 1, 8'h01, 5, SD_NULL, 0, 0, 1, IOS_RIODAT));
    x = a;
    e(c2(ALU_AND, 1, 8'h40, 0, SD_N, 0, 0, 1, IOS_RIOSTAT));   // ORS
    e(c4(PC_JMP, 12'(x), CD_EQ));
    e(c1(ALU_DST, SD_N, LL_NULL, 0, 6));
    x = a; e(c4(PC_JMP, 12'(x + 3), CD_NE));
    e(c2(ALU_DST, 0, 0, 5, SD_N, 0, 0, 0, IOD_WIODAT));
    e(c4(PC_JMP, 12'(ret)));
    e(c2(ALU_DST, 0, 0, 5, SD_N, 0, 0, 0, IOD_WIOLAST));
    // restart from zero, second pass goes to 0x3F0
    e(c2(ALU_SRC, 1, 8'd1, 14));
    e(c4(PC_RESET));
    // subroutine at 0x200: R8 = 0x11 + 0x11, return
    prog[12'h200] = c2(ALU_SRC, 1, 8'h11, 8);
    prog[12'h201] = c1(ALU_ADD, SD_NULL, 0, 8, 8, CIN_NONE, 0, PC_RTN);
    // completion marker at 0x3F0
    a = 12'h3F0;
    e(c2(ALU_SRC, 1, 8'hA5, 9));
    st(9, 8'hFF);
    halt_addr = a;
    e(c4(PC_JMP, 12'(halt_addr)));
  endtask

  // ------------------------------------------------------------ IO devices
  localparam int NB = 6;
  logic [7:0] pkt [NB];
  logic [7:0] got [$];
  logic       got_last [$];

  initial begin
    in_data[0] = 8'h00; in_data[1] = 8'h00;
    foreach (pkt[i]) pkt[i] = 8'($urandom);
    wait (run);
    // port 0 offers a byte that must never be taken
    @(negedge clk); in_valid[0] = 1; in_data[0] = 8'h99;
    for (int i = 0; i < NB; i++) begin
      repeat ($urandom % 40) @(negedge clk);
      in_valid[1] = 1; in_data[1] = pkt[i]; in_last[1] = (i == NB - 1);
      do @(posedge clk); while (!(in_ack[1]));
      @(negedge clk); in_valid[1] = 0; in_last[1] = 0;
    end
  end

  // output port 0 becomes ready at random times and stays ready until a byte
  // is sent, as the status polling protocol requires
  always @(negedge clk) begin
    out_ready[1] <= 1'b1;
    if (!out_ready[0]) out_ready[0] <= ($urandom % 24 == 0);
  end
  always @(posedge clk) if (out_valid[0] && out_ready[0]) out_ready[0] <= 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid[0] && out_ready[0]) begin
      got.push_back(out_data);
      got_last.push_back(out_last);
    end
    if (out_valid[1]) begin
      failures++;
      $display("FAIL output on the unselected port");
    end
    if (in_ack[0]) begin
      failures++;
      $display("FAIL acknowledge on the unselected port");
    end
  end

  // --------------------------------------------------- mechanism counters
  always @(posedge clk) if (rst_n && run) begin
    instr_t i;
    i = dut.ir;
    case (i.cls)
      CLS_ARITH: begin
        if (i.op == ALU_XFF_SPEC && !i.qmod) mech[$sformatf("special %s", special_e'(i.sd))]++;
        else if (i.sd == SD_LXT) mech["LXT"]++;
        else if (i.sd == SD_RSRQ) mech["double shift"]++;
      end
      CLS_IOMEM: begin
        if (i.mr) mech["memory read"]++;
        if (i.wm) mech["memory write"]++;
        if (i.imm) mech["immediate"]++;
        if (i.iosrc) mech[$sformatf("io source %s", io_src_e'(i.io))]++;
        else if (i.io != 0) mech[$sformatf("io dest %s", io_dst_e'(i.io))]++;
        if (i.iosrc && i.io == IOS_RIOSTAT && i.src == 4'h4 && !dut.io_status[2]) mech["input wait"]++;
        if (i.iosrc && i.io == IOS_RIOSTAT && i.src == 4'h0 && i.link == 4'h4 && !dut.io_status[6])
          mech["output stall"]++;
      end
      CLS_CCOP: mech[$sformatf("cc %s", ccop_e'(i.op))]++;
      default: ;
    endcase
    if (i.cls == CLS_CTRL || i.pc == PC_RTN || i.pc == PC_LPCT) begin
      logic cnd;
      cnd = (i.cls == CLS_CTRL) ? dut.cond : 1'b1;
      case (i.pc)
        PC_LPCT:  mech[dut.count != 0 ? "LPCT repeat" : "LPCT done"]++;
        PC_COUNT: if (dut.count != 0) mech["COUNT repeat"]++;
        PC_LOOP:  mech[cnd ? "LOOP done" : "LOOP repeat"]++;
        PC_TWB:   mech[cnd ? "TWB true" : (dut.count != 0 ? "TWB repeat" : "TWB expire")]++;
        PC_EXIT:  if (cnd) mech["EXIT taken"]++;
        PC_JMPR:  if (!cnd) mech["JMPR register"]++;
        PC_JSRR:  if (cnd) mech["JSRR call"]++;
        PC_LSETUP, PC_JSR, PC_JSRR: if (dut.u_seq.depth == 5) mech["stack overflow"]++;
        default: ;
      endcase
      if (!(i.pc inside {PC_LPCT, PC_COUNT, PC_LOOP, PC_TWB, PC_EXIT, PC_JMPR, PC_CONT}))
        mech[$sformatf("%s", pc_op_e'(i.pc))]++;
    end
  end

  // ------------------------------------------------------------------ host
  initial begin
    int cyc;
    logic [7:0] res [256];
    int qv, rv;
    build();
    #1 rst_n = 0;  // a real falling edge, so the asynchronous reset fires
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4096; i++) begin
      pm_we = 1; pm_addr = 12'(i); pm_wdata = prog[i];
      @(negedge clk);
    end
    pm_we = 0;
    dm_we = 1; dm_addr = 16'h0180; dm_wdata = 8'h3C;
    @(negedge clk);
    dm_we = 0;
    pc_clear = 1;
    @(negedge clk);
    pc_clear = 0;
    @(negedge clk);
    run = 1;
    cyc = 0;
    while (!(pc == 12'(halt_addr) && dut.ir == c4(PC_JMP, 12'(halt_addr)))) begin
      @(negedge clk);
      cyc++;
    end
    run = 0;
    $display("program finished after %0d cycles", cyc);
    // read results through the host port
    for (int i = 0; i < 256; i++) begin
      dm_addr = 16'h0100 + 16'(i);
      @(negedge clk);
      res[i] = dm_rdata;
    end
    chk({res[0], res[1]} == 16'(200 * 183), "UMPY product");
    chk({res[2], res[3]} == 16'(-100 * 55), "MPY product");
    qv = int'($signed(res[5])); rv = int'($signed(res[4]));
    chk(qv * 37 + rv == -3000 && rv >= -37 && rv < 37, "division identity");
    $display("division: quotient %0d remainder %0d", qv, rv);
    chk(res[6] == 8'(8'hC8 + 8'h3C), "memory read add");
    chk(res[7] == 8'h22, "subroutine");
    chk(res[8] == 8'd5, "COUNT loop");
    chk(res[9] == 8'd15, "LOOP under test");
    chk(res[8'h0A] == 8'd3, "TWB condition");
    chk(res[8'h0B] == 8'd3, "TWB expiry");
    chk(res[8'h0C] == 8'd2, "EXIT");
    chk(res[8'h0D] == 8'd3, "VJMP");
    chk(res[8'h0E] == 8'h44, "JCB");
    chk(res[8'h0F] == 8'h77, "JMPR");
    chk(res[8'h10] == 8'h78, "JSRR");
    chk(res[8'h11] == 8'h05, "SEZ SEC");
    chk(res[8'h12] == 8'h0A, "LCC");
    chk(res[8'h13] == 8'h09, "LVC LCV");
    chk(res[8'h14] == 8'h05, "ICC");
    chk(res[8'h15] == 8'hFF, "ZERO LXT OC");
    chk(res[8'h16] == 8'hC0 && res[8'h17] == 8'h80, "RSRQ RD");
    chk(res[8'hFF] == 8'hA5, "second pass after RESET");
    // packet echo
    chk(got.size() == NB, "echoed byte count");
    for (int i = 0; i < NB && i < got.size(); i++)
      chk(got[i] == 8'(pkt[i] + 1) && got_last[i] == (i == NB - 1), $sformatf("echo byte %0d", i));
    // exact step counts of the multiply and divide loops
    chk(mech["special SP_UMPY"] == 8, "UMPY runs 8 times");
    chk(mech["special SP_MPY"] == 7, "MPY runs 7 times");
    chk(mech["special SP_DIV"] == 7, "DIVZ runs 7 times");
    // every mechanism happened
    begin
      string need [] = '{"special SP_UMPY", "special SP_MPY", "special SP_LMPY",
        "special SP_DNORM", "special SP_DIV", "special SP_LDIV", "LXT", "double shift",
        "memory read", "memory write", "immediate", "io source IOS_RIODAT",
        "io source IOS_RIOSTAT", "io source IOS_RCC", "io dest IOD_WIODAT",
        "io dest IOD_WIOLAST", "io dest IOD_WARL", "io dest IOD_WARR", "io dest IOD_WPSEL",
        "io dest IOD_WOFF", "input wait", "output stall", "cc CCO_LOAD", "cc CCO_SET",
        "cc CCO_CLEAR", "cc CCO_XCHG", "cc CCO_INV", "LPCT repeat", "LPCT done",
        "COUNT repeat", "LOOP repeat", "LOOP done", "TWB true", "TWB repeat", "TWB expire",
        "EXIT taken", "JMPR register", "JSRR call", "stack overflow", "PC_JSR", "PC_RTN",
        "PC_VJMP", "PC_JCB", "PC_JMP", "PC_LDCT", "PC_LSETUP", "PC_RESET"};
      foreach (need[k]) begin
        checks++;
        if (!mech.exists(need[k]) || mech[need[k]] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", need[k]);
        end
      end
    end
    foreach (mech[k]) $display("  %-24s %0d", k, mech[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
