// althea_pkg: types and constants shared by the ALTHEA pipeline blocks.
//
// ALTHEA is a 32-bit processor with a native 16-bit instruction set and
// 32-bit data. Its register file holds 16 general-purpose registers and nine
// special-purpose registers, 25 in all; that count and the names RSR (first
// special register) and RER (extension register, last) follow the design
// description. The 16-bit instruction encoding below is this design's own:
// only the LERI format (2-bit opcode "11", 14-bit immediate) and the fact
// that instructions fall into 13 groups are given by the description.
//
// Encoding (bit 15 is the most significant):
//   LERI   11 iiiiiiiiiiiiii        extend the immediate of the next instruction
//   MISC   0000 ffff ....           0 NOP, 1 HALT, 2 CPW cr,rs  3 CPR rd,cr
//          0000 ffff rd ra          4 LDB, 5 LDH rd,[ra+ER]; 6 STB, 7 STH rd,[ra+ER]
//   ALURR  0001 rd rs func          rd = rd op rs        (func: alu_op_e)
//   ALURI  0010 rd func imm4        rd = rd op imm       (func 6: LDI rd = imm)
//   SHIFT  0011 rd src func         func 0/1/2 by rs, 4/5/6 by immediate src
//   MUL    0100 ra rb func          func 0 MUL, 1 MAC : {MH,ML} (+)= ra*rb
//   MOVE   0101 rd rs func          func 0 MOV rd,rs; 1 MFS rd,S[rs]; 2 MTS S[rd],rs
//   LOAD   0110 rd ra imm4          rd = mem[ra + off]
//   STORE  0111 rd ra imm4          mem[ra + off] = rd
//   PUSH   1000 mask12              push R0..R11 selected by the mask
//   POP    1001 mask12              pop  R0..R11 selected by the mask
//   BRANCH 1010 cond disp8          conditional PC-relative branch
//   JUMP   1011 func rs/disp        func 0 JAL disp8 (link in RLR), 1 JR rs
// Immediates: with no LERI in front, imm4 is zero-extended, disp8 is sign
// extended. One to three LERIs in front build ER (first LERI sign-extended,
// each next one shifts in 14 bits); the immediate is then {ER, field}.
// Load/store offsets without LERI are imm4*4; with LERI they are {ER, imm4}.
// Byte and halfword accesses have no offset field: the offset is ER with a
// LERI in front, else zero. Byte order is little-endian.
package althea_pkg;

  localparam int XLEN     = 32;
  localparam int ILEN     = 16;
  localparam int NUM_GPR  = 16;
  localparam int NUM_SPR  = 9;
  localparam int NUM_REGS = NUM_GPR + NUM_SPR;   // 25
  localparam int RW       = 5;                   // register index width
  localparam int NGROUPS  = 13;

  // Special-purpose register indices (16..24)
  localparam logic [RW-1:0] R_SR  = 5'd16;
  localparam logic [RW-1:0] R_LR  = 5'd17;
  localparam logic [RW-1:0] R_ML  = 5'd18;
  localparam logic [RW-1:0] R_MH  = 5'd19;
  localparam logic [RW-1:0] R_SP  = 5'd20;
  localparam logic [RW-1:0] R_SSP = 5'd21;
  localparam logic [RW-1:0] R_USP = 5'd22;
  localparam logic [RW-1:0] R_CR  = 5'd23;
  localparam logic [RW-1:0] R_ER  = 5'd24;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [ILEN-1:0] inst_t;
  typedef logic [RW-1:0]   reg_t;
  typedef logic [NUM_REGS-1:0] regmask_t;

  // Major opcodes (inst[15:12]); 4'b11xx is LERI
  typedef enum logic [3:0] {
    OP_MISC = 4'h0, OP_ALURR = 4'h1, OP_ALURI = 4'h2, OP_SHIFT = 4'h3,
    OP_MUL  = 4'h4, OP_MOVE  = 4'h5, OP_LOAD  = 4'h6, OP_STORE = 4'h7,
    OP_PUSH = 4'h8, OP_POP   = 4'h9, OP_BRANCH = 4'hA, OP_JUMP = 4'hB
  } opcode_e;

  // The 13 instruction groups the predecoder tags each instruction with
  typedef enum logic [3:0] {
    G_SYS = 4'd0, G_ALURR = 4'd1, G_ALURI = 4'd2, G_SHIFT = 4'd3,
    G_MUL = 4'd4, G_MOVE = 4'd5, G_LOAD = 4'd6, G_STORE = 4'd7,
    G_PUSH = 4'd8, G_POP = 4'd9, G_BRANCH = 4'd10, G_JUMP = 4'd11,
    G_CP = 4'd12
  } group_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_SUB = 4'd1, ALU_AND = 4'd2, ALU_OR = 4'd3,
    ALU_XOR = 4'd4, ALU_CMP = 4'd5, ALU_LDI = 4'd6
  } alu_op_e;

  // Execution unit selected in EX
  typedef enum logic [2:0] {
    EU_BYPASS = 3'd0, EU_ALU = 3'd1, EU_SHIFT = 3'd2, EU_MUL = 3'd3,
    EU_AGU = 3'd4, EU_CP = 3'd5
  } eunit_e;

  typedef enum logic [1:0] { SH_LL = 2'd0, SH_RL = 2'd1, SH_RA = 2'd2 } shift_op_e;

  // word load/store, PUSH/POP micro-ops, and the byte/halfword forms
  // (LDB/LDH zero-extend)
  typedef enum logic [3:0] {
    MEM_NONE = 4'd0, MEM_LOAD = 4'd1, MEM_STORE = 4'd2,
    MEM_PUSH = 4'd3, MEM_POP = 4'd4,
    MEM_LDB = 4'd5, MEM_LDH = 4'd6, MEM_STB = 4'd7, MEM_STH = 4'd8
  } mem_op_e;

  // Status flags produced by EX and used for conditional branches
  typedef struct packed {
    logic n, z, c, v;
  } flags_t;

  // Instruction after LERI folding and predecoding (IF -> ID)
  typedef struct packed {
    inst_t     inst;
    word_t     pc;
    logic      ext_valid;   // one or more LERIs were folded into it
    word_t     ext;         // ER value built by the folded LERIs
    group_e    group;
  } fetched_t;

  // Position of a segmented PUSH/POP micro-op (ID -> DE1)
  typedef struct packed {
    logic       first;
    logic       last;
    logic [3:0] index;      // 0 for the first micro-op
    logic [3:0] count;      // number of micro-ops of the whole instruction
  } seg_t;

  // Single-operand instruction from ID to DE1
  typedef struct packed {
    fetched_t  f;
    seg_t      seg;
    reg_t      sreg;        // register of a PUSH/POP micro-op
  } idinst_t;

  // Merged read request channel DE1 -> RF
  typedef struct packed {
    logic [3:0]  rd_en;     // which of the four read ports are used
    reg_t [3:0]  rd_addr;
    regmask_t    lock;      // destinations to lock
  } rf_req_t;

  // Read responses RF -> DE2 (RD_Resp_0..3)
  typedef struct packed {
    logic [3:0]  valid;
    word_t [3:0] data;
  } rf_rsp_t;

  // One write request channel ME -> RF
  typedef struct packed {
    logic  en;
    reg_t  addr;
    word_t data;
  } rf_wr_t;

  // Control bundle DE1 -> DE2
  typedef struct packed {
    group_e     group;
    eunit_e     unit;
    logic [3:0] func;
    logic       need_rf;    // an RF response belongs to this instruction
    logic [3:0] rd_en;      // operand n comes from RF response port n
    logic [3:0] opsel_imm;  // operand n taken from imm instead of RF port n
    word_t      imm;
    word_t      pc;
    logic       setflags;
    mem_op_e    mem;
    seg_t       seg;
    logic [2:0] wb_en;      // write ports used: 0 result, 1 high word, 2 stack pointer
    reg_t [2:0] wb_addr;
    logic       jr;         // register jump, resolved in DE2
    logic [3:0] cpreg;
  } de_ctl_t;

  // Operand channels DE2 -> EX: Opa..Opd, only the needed ones carry data
  typedef struct packed {
    eunit_e     unit;
    logic [3:0] func;
    logic [3:0] opv;        // which operand channels were active
    word_t      a, b, c, d;
    logic       setflags;
    mem_op_e    mem;
    seg_t       seg;
    logic [2:0] wb_en;
    reg_t [2:0] wb_addr;
    logic [3:0] cpreg;
  } ex_in_t;

  // EX -> ME
  typedef struct packed {
    word_t      res_lo;     // result, or memory address base
    word_t      res_hi;     // high word of a 64-bit product
    word_t      sdata;      // store data
    mem_op_e    mem;
    seg_t       seg;
    logic [2:0] wb_en;
    reg_t [2:0] wb_addr;
  } ex_out_t;

  // Coprocessor channel
  typedef struct packed {
    logic       read;       // 1: read cpreg, 0: write data to cpreg
    logic [3:0] cpreg;
    word_t      data;
  } cp_req_t;

  function automatic group_e predecode(inst_t i);
    group_e g;
    unique case (i[15:12])
      OP_MISC:   unique case (i[11:8])
                   4'd2, 4'd3: g = G_CP;
                   4'd4, 4'd5: g = G_LOAD;     // LDB, LDH
                   4'd6, 4'd7: g = G_STORE;    // STB, STH
                   default:    g = G_SYS;
                 endcase
      OP_ALURR:  g = G_ALURR;
      OP_ALURI:  g = G_ALURI;
      OP_SHIFT:  g = G_SHIFT;
      OP_MUL:    g = G_MUL;
      OP_MOVE:   g = G_MOVE;
      OP_LOAD:   g = G_LOAD;
      OP_STORE:  g = G_STORE;
      OP_PUSH:   g = G_PUSH;
      OP_POP:    g = G_POP;
      OP_BRANCH: g = G_BRANCH;
      OP_JUMP:   g = G_JUMP;
      default:   g = G_SYS;       // LERI never reaches a decoder
    endcase
    return g;
  endfunction

  function automatic logic is_leri(inst_t i);
    return i[15:14] == 2'b11;
  endfunction

  // Branch condition on the status flags
  function automatic logic cond_true(logic [3:0] cond, flags_t f);
    unique case (cond)
      4'd0:  return 1'b1;                     // always
      4'd1:  return f.z;                      // EQ
      4'd2:  return !f.z;                     // NE
      4'd3:  return f.c;                      // CS (no borrow on SUB)
      4'd4:  return !f.c;                     // CC
      4'd5:  return f.n;                      // MI
      4'd6:  return !f.n;                     // PL
      4'd7:  return f.v;                      // VS
      4'd8:  return !f.v;                     // VC
      4'd9:  return f.c && !f.z;              // HI
      4'd10: return !f.c || f.z;              // LS
      4'd11: return f.n == f.v;               // GE
      4'd12: return f.n != f.v;               // LT
      4'd13: return !f.z && (f.n == f.v);     // GT
      4'd14: return f.z || (f.n != f.v);      // LE
      default: return 1'b0;                   // never
    endcase
  endfunction

endpackage
