// tb_mp_workloads: runs the MP's arithmetic application programs on many
// operand sets, on the MP at its full default size.
//
// The testbench acts as the host. It writes NREC operand records into data
// memory, one 256 byte page per record (page k holds record k), loads one
// program and runs it. For each record the program:
//   - multiplies two bytes unsigned (LSETUP 7; UMPY D LPCT) and
//     two's complement (LSETUP 6; MPY D LPCT; LMPYZ D);
//   - divides a 16 bit dividend by an 8 bit divisor (DNORM RD; LSETUP 6;
//     DIVZ RD LPCT; LDIVZ O), then applies the remainder repair sequence
//     that makes 0 <= remainder < |divisor|;
//   - adds and subtracts two 24 bit numbers byte by byte through the carry
//     (ADD, ADDC, ADDC and SUB, SUB1C, SUB1C).
// It writes the results back into the same page and counts the records down
// in a scratchpad register. The host then reads every page and compares the
// results with products, Euclidean quotients and remainders, and sums worked
// out here. Operands are random, plus edge cases: the most negative
// multiplicands, quotients of -128 and 127, and divisor -128.
// The multiply and divide step instructions must run exactly 8, 7 and 7
// times per record. Each repair path (none, negative divisor, positive
// divisor) must occur.
//
// Page layout (byte offsets): 0 a, 1 b, 2-3 dividend, 4 divisor,
// 5-7 X (24 bit, high byte first), 8-10 Y; results: 16-17 a*b unsigned,
// 18-19 a*b signed, 20 quotient, 21 remainder, 22-24 X+Y, 25-27 X-Y.
module tb_mp_workloads;
  import mp_pkg::*;
  import mp_asm_pkg::*;

  localparam int NREC = 96;

  logic clk = 0, rst_n = 1, run = 0, pc_clear = 0, pm_we = 0, dm_we = 0;
  logic [11:0] pm_addr = 0, pc;
  logic [39:0] pm_wdata = 0;
  logic [15:0] dm_addr = 0;
  logic [7:0]  dm_wdata = 0, dm_rdata;
  logic [1:0]  in_valid = 0, in_last = 0, in_ack, out_ready = 0, out_valid;
  logic [7:0]  in_data [2] = '{8'h00, 8'h00};
  logic [7:0]  out_data;
  logic        out_last;

  mp_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [39:0] prog [4096];
  int a = 0, halt_addr;
  int n_umpy = 0, n_mpy = 0, n_lmpy = 0, n_div = 0;
  int n_fix_none = 0, n_fix_neg = 0, n_fix_pos = 0;
  int fix_neg_at, fix_pos_at, fix_done_at;

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
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  task automatic e(logic [39:0] w);
    prog[a] = w;
    a++;
  endtask
  task automatic setar(logic [7:0] lo);     // low half of the address
    e(c2(ALU_SRC, 1, lo, 0, SD_N, 0, 0, 0, IOD_WARR));
  endtask
  task automatic ld(logic [3:0] r, logic [7:0] lo);
    setar(lo);
    e(c2(ALU_DST, 0, 0, r, SD_NULL, 1));
  endtask
  task automatic ldq(logic [7:0] lo);
    setar(lo);
    e(c2(ALU_DST, 0, 0, 0, SD_NQ, 1));
  endtask
  task automatic st(logic [3:0] r, logic [7:0] lo);
    setar(lo);
    e(c2(ALU_DST, 0, 0, r, SD_N, 0, 1));
  endtask
  task automatic stq(logic [7:0] lo);
    setar(lo);
    e(c2(ALU_DST, 0, 0, 0, SD_N, 0, 1, 0, 0, CIN_NONE, 1));
  endtask

  // registers: R1 a, R2 unsigned product high, R3 a, R4 signed product
  // high, R5 dividend high / remainder, R6 divisor, R7-R9 X, R10-R12 Y,
  // R14 records left, R15 page number
  task automatic build();
    int top, p;
    foreach (prog[i]) prog[i] = c4(PC_JMP, 12'(i));
    a = 0;
    e(c2(ALU_SRC, 1, 8'd1, 15));
    e(c2(ALU_SRC, 1, 8'(NREC), 14));
    top = a;
    e(c2(ALU_SRC, 0, 8'd15, 0, SD_N, 0, 0, 0, IOD_WARL));
    // unsigned multiply
    ld(1, 0); ldq(1);
    e(c1(ALU_ZERO, SD_NULL, RL_NULL, 0, 2));
    e(c4(PC_LSETUP, 7));
    e(sp(SP_UMPY, RL_D, 1, 2, CIN_NONE, PC_LPCT));
    st(2, 16); stq(17);
    // two's complement multiply
    ld(3, 0); ldq(1);
    e(c1(ALU_ZERO, SD_NULL, RL_NULL, 0, 4));
    e(c4(PC_LSETUP, 6));
    e(sp(SP_MPY, RL_D, 3, 4, CIN_NONE, PC_LPCT));
    e(sp(SP_LMPY, RL_D, 3, 4, CIN_Z));
    st(4, 18); stq(19);
    // division and remainder repair
    ld(5, 2); ldq(3); ld(6, 4);
    e(sp(SP_DNORM, LL_RD, 6, 5));
    e(c4(PC_LSETUP, 6));
    e(sp(SP_DIV, LL_RD, 6, 5, CIN_Z, PC_LPCT));
    e(sp(SP_LDIV, LL_O, 6, 5, CIN_Z));
    p = a;
    e(c4(PC_JMP, 12'(p + 8), int'(CD_PL)));  // remainder OK
    e(c1(ALU_DST, SD_N, LL_NULL, 0, 6));                      // test divisor
    e(c4(PC_JMP, 12'(p + 6), int'(CD_PL)));
    fix_neg_at = a;
    e(c1(ALU_RSUB1, SD_NULL, RL_NULL, 6, 5, CIN_ONE));        // Y - X -> Y
    e(c1(ALU_DST, SD_NQ, RL_NULL, 0, 0, CIN_ONE, 1'b1));      // Q + 1 -> Q
    e(c4(PC_JMP, 12'(p + 8)));
    fix_pos_at = a;
    e(c1(ALU_ADD, SD_NULL, RL_NULL, 6, 5));                   // X + Y -> Y
    e(c2(ALU_ADD, 1, 8'hFF, 0, SD_NQ, 0, 0, 0, 0, CIN_NONE, 1'b1)); // Q - 1
    fix_done_at = a;
    st(5, 21); stq(20);
    // 24 bit addition: Y = X + Y
    ld(7, 5); ld(8, 6); ld(9, 7); ld(10, 8); ld(11, 9); ld(12, 10);
    e(c1(ALU_ADD, SD_NULL, RL_NULL, 9, 12));
    e(c1(ALU_ADD, SD_NULL, RL_NULL, 8, 11, CIN_C));
    e(c1(ALU_ADD, SD_NULL, RL_NULL, 7, 10, CIN_C));
    st(10, 22); st(11, 23); st(12, 24);
    // 24 bit subtraction: Y = X - Y
    ld(10, 8); ld(11, 9); ld(12, 10);
    e(c1(ALU_SUB1, SD_NULL, RL_NULL, 9, 12, CIN_ONE));
    e(c1(ALU_SUB1, SD_NULL, RL_NULL, 8, 11, CIN_C));
    e(c1(ALU_SUB1, SD_NULL, RL_NULL, 7, 10, CIN_C));
    st(10, 25); st(11, 26); st(12, 27);
    // next record
    e(c2(ALU_ADD, 1, 8'd1, 15));
    e(c2(ALU_ADD, 1, 8'hFF, 14));
    e(c4(PC_JMP, 12'(top), int'(CD_NE)));
    halt_addr = a;
    e(c4(PC_JMP, 12'(halt_addr)));
  endtask

  // ---------------------------------------------------------------- records
  logic [7:0]  ra [NREC], rb [NREC], rd [NREC];
  logic [15:0] rdd [NREC];
  logic [23:0] rx [NREC], ry [NREC];
  int          rq [NREC], rr [NREC];

  task automatic make_records();
    int d, q, r, n;
    for (int k = 0; k < NREC; k++) begin
      ra[k] = 8'($urandom); rb[k] = 8'($urandom);
      rx[k] = 24'($urandom); ry[k] = 24'($urandom);
      do begin
        d = int'($signed(8'($urandom)));
        q = int'($signed(8'($urandom)));
        case (k)
          0: begin d = -128; q = 127; end
          1: begin d = 127;  q = -128; end
          2: begin d = -1;   q = -128; end
          3: begin d = 1;    q = 127; end
          default: ;
        endcase
        r = (d == 0) ? 0 : int'($urandom_range((d < 0 ? -d : d) - 1, 0));
        n = q * d + r;
      end while (d == 0 || n < -32768 || n > 32767);
      rd[k] = 8'(d); rdd[k] = 16'(n); rq[k] = q; rr[k] = r;
    end
    ra[0] = 8'h80; rb[0] = 8'h80;
    ra[1] = 8'h80; rb[1] = 8'h7F;
    ra[2] = 8'hFF; rb[2] = 8'hFF;
    ry[3] = 24'hFFFFFF; rx[3] = 24'h000001;
  endtask

  task automatic poke(logic [15:0] ad, logic [7:0] v);
    dm_we = 1; dm_addr = ad; dm_wdata = v;
    @(negedge clk);
    dm_we = 0;
  endtask

  // count the step instructions and the repair paths as they execute
  always @(posedge clk) if (rst_n && run) begin
    instr_t i;
    i = dut.ir;
    if (i.cls == CLS_ARITH && i.op == ALU_XFF_SPEC && !i.qmod) begin
      if (special_e'(i.sd) == SP_UMPY) n_umpy++;
      if (special_e'(i.sd) == SP_MPY)  n_mpy++;
      if (special_e'(i.sd) == SP_LMPY) n_lmpy++;
      if (special_e'(i.sd) == SP_DIV)  n_div++;
    end
    if (int'(pc) == fix_neg_at) n_fix_neg++;
    if (int'(pc) == fix_pos_at) n_fix_pos++;
    if (int'(pc) == fix_done_at) n_fix_none++;
  end

  // ------------------------------------------------------------------ host
  initial begin
    int cyc;
    logic [7:0] res [32];
    logic [15:0] pu, ps;
    logic [23:0] sum, dif;
    build();
    make_records();
    #1 rst_n = 0;  // a real falling edge, so the asynchronous reset fires
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i <= halt_addr; i++) begin
      pm_we = 1; pm_addr = 12'(i); pm_wdata = prog[i];
      @(negedge clk);
    end
    pm_we = 0;
    for (int k = 0; k < NREC; k++) begin
      logic [15:0] pg;
      pg = 16'(k + 1) << 8;
      poke(pg + 0, ra[k]); poke(pg + 1, rb[k]);
      poke(pg + 2, rdd[k][15:8]); poke(pg + 3, rdd[k][7:0]); poke(pg + 4, rd[k]);
      poke(pg + 5, rx[k][23:16]); poke(pg + 6, rx[k][15:8]); poke(pg + 7, rx[k][7:0]);
      poke(pg + 8, ry[k][23:16]); poke(pg + 9, ry[k][15:8]); poke(pg + 10, ry[k][7:0]);
    end
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
    $display("%0d records in %0d cycles", NREC, cyc);
    for (int k = 0; k < NREC; k++) begin
      for (int i = 0; i < 32; i++) begin
        dm_addr = (16'(k + 1) << 8) + 16'(i);
        @(negedge clk);
        res[i] = dm_rdata;
      end
      pu = 16'(ra[k]) * 16'(rb[k]);
      ps = 16'($signed(ra[k]) * $signed(rb[k]));
      sum = rx[k] + ry[k];
      dif = rx[k] - ry[k];
      chk({res[16], res[17]} == pu,
          $sformatf("rec %0d: %0d x %0d unsigned gave %0d", k, ra[k], rb[k], {res[16], res[17]}));
      chk({res[18], res[19]} == ps,
          $sformatf("rec %0d: %0d x %0d signed gave %0d", k, $signed(ra[k]), $signed(rb[k]),
                    $signed({res[18], res[19]})));
      chk(int'($signed(res[20])) == rq[k] && int'($signed(res[21])) == rr[k],
          $sformatf("rec %0d: %0d / %0d gave q %0d r %0d, want q %0d r %0d", k,
                    $signed(rdd[k]), $signed(rd[k]), $signed(res[20]), $signed(res[21]),
                    rq[k], rr[k]));
      chk({res[22], res[23], res[24]} == sum, $sformatf("rec %0d: 24 bit add", k));
      chk({res[25], res[26], res[27]} == dif, $sformatf("rec %0d: 24 bit subtract", k));
    end
    chk(n_umpy == 8 * NREC, $sformatf("UMPY ran %0d times", n_umpy));
    chk(n_mpy == 7 * NREC && n_lmpy == NREC, $sformatf("MPY/LMPY ran %0d/%0d times", n_mpy, n_lmpy));
    chk(n_div == 7 * NREC, $sformatf("DIVZ ran %0d times", n_div));
    chk(n_fix_neg > 0 && n_fix_pos > 0 && n_fix_none > n_fix_neg + n_fix_pos,
        "every remainder repair path taken");
    $display("repair paths: none %0d, negative divisor %0d, positive divisor %0d",
             n_fix_none - n_fix_neg - n_fix_pos, n_fix_neg, n_fix_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
