// mp_pkg: types and constants shared by the MP (packet communication
// microprocessor) modules.
//
// The op-code values of every field (ALU function, special function, carry-in,
// shift/destination, shift link, IO code, CC operation, PC control, condition)
// and the bit positions they occupy (bits 29-28, 27-24, 23-20, 19-16, 14-12,
// 11-8) follow the op-code appendix of the MP programming manual. The manual does not give the
// positions of the remaining fields of the 40 bit instruction; this design
// places them as follows (its own choice):
//   39-38 class (0 = I arithmetic/shift, 1 = II arithmetic/IO/memory,
//         2 = III CC operations, 3 = IV program control)
//   37 Q modifier, 36 I (immediate) modifier, 35 MR (memory read),
//   34 WM (memory write), 33 IO source (bits 14-12 name an IO source rather
//   than an IO destination), 32 condition enable (class IV; 0 = always true),
//   31 REG option (class IV), 30 and 15 unused,
//   11-8 shift link / CC mask / upper half of an immediate,
//   7-4 SRC register / lower half of an immediate, 3-0 DST register.
//   Class IV uses 11-0 as its 12 bit operand.
package mp_pkg;

  typedef enum logic [1:0] {
    CLS_ARITH = 2'd0,  // class I
    CLS_IOMEM = 2'd1,  // class II
    CLS_CCOP  = 2'd2,  // class III
    CLS_CTRL  = 2'd3   // class IV
  } cls_e;

  typedef struct packed {
    cls_e        cls;      // 39-38
    logic        qmod;     // 37
    logic        imm;      // 36
    logic        mr;       // 35
    logic        wm;       // 34
    logic        iosrc;    // 33
    logic        ccen;     // 32
    logic        reg_opt;  // 31
    logic        spare30;  // 30
    logic [1:0]  cin;      // 29-28
    logic [3:0]  op;       // 27-24 ALU op / CC op / condition
    logic [3:0]  sd;       // 23-20 shift-destination / special
    logic [3:0]  pc;       // 19-16 PC control
    logic        spare15;  // 15
    logic [2:0]  io;       // 14-12
    logic [3:0]  link;     // 11-8  shift link / CC mask
    logic [3:0]  src;      // 7-4
    logic [3:0]  dst;      // 3-0
  } instr_t;

  // ALU functions (bits 27-24)
  typedef enum logic [3:0] {
    ALU_XFF_SPEC = 4'h0, ALU_RSUB1 = 4'h1, ALU_SUB1 = 4'h2, ALU_ADD = 4'h3,
    ALU_DST      = 4'h4, ALU_CDST  = 4'h5, ALU_SRC  = 4'h6, ALU_CSRC = 4'h7,
    ALU_ZERO     = 4'h8, ALU_ANDCS = 4'h9, ALU_XNOR = 4'hA, ALU_XOR  = 4'hB,
    ALU_AND      = 4'hC, ALU_NOR   = 4'hD, ALU_NAND = 4'hE, ALU_OR   = 4'hF
  } alu_op_e;

  // special functions (bits 23-20 when the ALU op is 0 without Q modifier)
  typedef enum logic [3:0] {
    SP_UMPY = 4'h0, SP_MPY = 4'h2, SP_INC = 4'h4, SP_SMCVT = 4'h5,
    SP_LMPY = 4'h6, SP_NORM = 4'h8, SP_DNORM = 4'hA, SP_DIV = 4'hC,
    SP_LDIV = 4'hE
  } special_e;

  // carry-in codes (bits 29-28)
  typedef enum logic [1:0] {
    CIN_NONE = 2'd0, CIN_ONE = 2'd1, CIN_Z = 2'd2, CIN_C = 2'd3
  } cin_e;

  // shift / destination codes (bits 23-20); 0-7 right, 8-F left
  typedef enum logic [3:0] {
    SD_RA = 4'h0, SD_RS = 4'h1, SD_RARQ = 4'h2, SD_RSRQ = 4'h3,
    SD_NULL = 4'h4, SD_NRQ = 4'h5, SD_NQ = 4'h6, SD_Q = 4'h7,
    SD_LA = 4'h8, SD_LS = 4'h9, SD_LALQ = 4'hA, SD_LSLQ = 4'hB,
    SD_N = 4'hC, SD_NLQ = 4'hD, SD_LXT = 4'hE, SD_Y17 = 4'hF
  } sd_e;

  // shift link codes (bits 11-8), right-shift meaning
  typedef enum logic [3:0] {
    RL_NULL = 4'h0, RL_O = 4'h1, RL_UN = 4'h2, RL_DO = 4'h3,
    RL_DC = 4'h4, RL_DN = 4'h5, RL_D = 4'h6, RL_DU = 4'h7,
    RL_RBC = 4'h8, RL_RC = 4'h9, RL_R = 4'hA, RL_X13 = 4'hB,
    RL_RDC = 4'hC, RL_RDBC = 4'hD, RL_X16 = 4'hE, RL_RD = 4'hF
  } rlink_e;

  // shift link codes (bits 11-8), left-shift meaning
  typedef enum logic [3:0] {
    LL_C = 4'h0, LL_OC = 4'h1, LL_NULL = 4'h2, LL_O = 4'h3,
    LL_DC = 4'h4, LL_DOC = 4'h5, LL_D = 4'h6, LL_DO = 4'h7,
    LL_RBC = 4'h8, LL_RC = 4'h9, LL_R = 4'hA, LL_U = 4'hB,
    LL_RDC = 4'hC, LL_RDBC = 4'hD, LL_DU = 4'hE, LL_RD = 4'hF
  } llink_e;

  // IO sources / destinations (bits 14-12)
  typedef enum logic [2:0] {
    IOS_RIODAT = 3'd0, IOS_RIOSTAT = 3'd1, IOS_RCC = 3'd2
  } io_src_e;
  typedef enum logic [2:0] {
    IOD_NULL = 3'd0, IOD_WIODAT = 3'd1, IOD_WIOLAST = 3'd2, IOD_WARL = 3'd3,
    IOD_WARR = 3'd4, IOD_WPSEL = 3'd5, IOD_WOFF = 3'd6
  } io_dst_e;

  // CC operations (bits 27-24); the mask (bits 11-8) is {N,Z,V,C}
  typedef enum logic [3:0] {
    CCO_LOAD = 4'h0, CCO_SET = 4'h1, CCO_CLEAR = 4'h3, CCO_XCHG = 4'h4,
    CCO_INV = 4'h5
  } ccop_e;

  // PC control codes (bits 19-16)
  typedef enum logic [3:0] {
    PC_RESET = 4'h0, PC_JSR = 4'h1, PC_VJMP = 4'h2, PC_JMP = 4'h3,
    PC_LSETUP = 4'h4, PC_JSRR = 4'h5, PC_JCB = 4'h6, PC_JMPR = 4'h7,
    PC_LPCT = 4'h8, PC_COUNT = 4'h9, PC_RTN = 4'hA, PC_EXIT = 4'hB,
    PC_LDCT = 4'hC, PC_LOOP = 4'hD, PC_CONT = 4'hE, PC_TWB = 4'hF
  } pc_op_e;

  // conditions (bits 27-24)
  typedef enum logic [3:0] {
    CD_GT = 4'h0, CD_LE = 4'h1, CD_GE = 4'h2, CD_LT = 4'h3,
    CD_NE = 4'h4, CD_EQ = 4'h5, CD_VC = 4'h6, CD_VS = 4'h7,
    CD_NCZ = 4'h8, CD_CZ = 4'h9, CD_LO = 4'hA, CD_HIS = 4'hB,
    CD_HI = 4'hC, CD_LOS = 4'hD, CD_PL = 4'hE, CD_MI = 4'hF
  } cond_e;

  // condition code, in the order of the RCC / LCC format 0000NZVC
  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } cc_t;

endpackage
