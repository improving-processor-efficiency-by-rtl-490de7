// sp_pkg: types and constants shared by the static pipeline (SP) processor.
//
// The SP processor exposes its internal registers to the compiler: every
// 32-bit instruction is a bundle of independent "effects" (register reads,
// an ALU operation, an integer addition, a memory access, a copy, a
// prepare-to-branch, ...) that each read internal registers at the start of
// the cycle and write one internal register at its end.
//
// Instruction formats (field widths follow the design description):
//   A: ID[31:27] | E10[26:17] | E10[16:7]  | E7[6:0]
//   B: ID[31:27] | PTB[26:24] | E7[23:17]  | E10[16:7] | E7[6:0]
//   C: ID[31:27] | E10[26:17] | LIMM[16:0]
//   D: ID[31:27] | PTB[26:24] | E7[23:17]  | LIMM[16:0]
// The 5-bit template ID selects the format and which effect kind each field
// holds. The set of 32 templates, the bit layout inside each effect and the
// source codes below are this design's own choices; the document gives only
// the field widths and the lists of 10-bit and 7-bit effect kinds.
package sp_pkg;

  parameter int unsigned XLEN     = 32;  // data path and instruction width
  parameter int unsigned IADDR_W  = 32;  // instruction address width (counts instructions)

  typedef logic [XLEN-1:0] word_t;
  typedef logic [IADDR_W-1:0] iaddr_t;

  // ------------------------------------------------------------------
  // Interconnect source codes (4 bits). Codes 0..7 are also the 3-bit
  // "short" source codes used by ALU, memory, adder operand B and load.
  typedef enum logic [3:0] {
    SRC_RS1   = 4'd0,
    SRC_RS2   = 4'd1,
    SRC_SE    = 4'd2,
    SRC_LV    = 4'd3,
    SRC_OPER1 = 4'd4,
    SRC_OPER2 = 4'd5,
    SRC_CP1   = 4'd6,
    SRC_CP2   = 4'd7,
    SRC_TARG  = 4'd8,
    SRC_SEQ   = 4'd9,
    SRC_PC    = 4'd10,
    SRC_PCINC = 4'd11,
    SRC_ZERO  = 4'd12
  } src_e;

  // Values visible on the interconnect (start-of-cycle register contents).
  typedef struct packed {
    word_t rs1;
    word_t rs2;
    word_t se;
    word_t lv;
    word_t oper1;
    word_t oper2;
    word_t cp1;
    word_t cp2;
    word_t targ;
    word_t seq;
    word_t pc;
  } sp_regs_t;

  // ------------------------------------------------------------------
  // ALU operations (4-bit field of the 10-bit ALU effect). Ops below
  // ALU_BEQ write OPER1; compare ops decide a transfer of control.
  typedef enum logic [3:0] {
    ALU_NOP  = 4'd0,
    ALU_ADD  = 4'd1,
    ALU_SUB  = 4'd2,
    ALU_AND  = 4'd3,
    ALU_OR   = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_NOR  = 4'd6,
    ALU_SLL  = 4'd7,
    ALU_SRL  = 4'd8,
    ALU_SRA  = 4'd9,
    ALU_SLT  = 4'd10,
    ALU_SLTU = 4'd11,
    ALU_BEQ  = 4'd12,
    ALU_BNE  = 4'd13,
    ALU_BLT  = 4'd14,
    ALU_BGE  = 4'd15
  } alu_op_e;

  // Memory operations (4-bit field of the 10-bit load/store effect).
  typedef enum logic [3:0] {
    MEM_NOP = 4'd0,
    MEM_LW  = 4'd1,
    MEM_LH  = 4'd2,
    MEM_LHU = 4'd3,
    MEM_LB  = 4'd4,
    MEM_LBU = 4'd5,
    MEM_SW  = 4'd9,
    MEM_SH  = 4'd10,
    MEM_SB  = 4'd11
  } mem_op_e;

  function automatic logic mem_is_load(mem_op_e op);
    return op inside {MEM_LW, MEM_LH, MEM_LHU, MEM_LB, MEM_LBU};
  endfunction

  function automatic logic mem_is_store(mem_op_e op);
    return op inside {MEM_SW, MEM_SH, MEM_SB};
  endfunction

  // Prepare-to-branch code (3 bits): [2] unconditional (jump), [1:0] the
  // register that supplies the fetch address; 0 means no PTB.
  typedef enum logic [1:0] {
    PTB_NONE = 2'd0,
    PTB_TARG = 2'd1,
    PTB_SEQ  = 2'd2,
    PTB_RS2  = 2'd3
  } ptb_sel_e;

  // ------------------------------------------------------------------
  // Effect kinds and templates.
  typedef enum logic [3:0] {
    EK_NONE, // field unused
    EK_ALU,  // 10-bit: [9:6] op, [5:3] src a, [2:0] src b -> OPER1
    EK_FPU,  // 10-bit: floating point (not built, decodes as illegal)
    EK_MEM,  // 10-bit: [9:6] op, [5:3] address src, [2:0] store data src
    EK_RD2,  // 10-bit: [9:5] reg -> RS1, [4:0] reg -> RS2
    EK_RW,   // 10-bit: [9] enable, [8:4] reg, [3:0] 4-bit source
    EK_ADD,  // 7-bit : [6:4] src a (0 = PC), [3:1] src b, [0] dest 0=OPER2 1=TARG
    EK_LSW,  // 7-bit : [6] enable, [5:3] address src, load signed word -> LV
    EK_RD1,  // 7-bit : [6] enable, [5] 0=RS1 1=RS2, [4:0] reg
    EK_SIMM, // 7-bit : SE = sign-extended [6:0]
    EK_CPY,  // 7-bit : [6:5] dest 0=CP1 1=CP2 2=SEQ 3=none, [4:1] 4-bit source
    EK_PTB   // 7-bit : [2:0] PTB code
  } ekind_e;

  typedef enum logic [1:0] {FMT_A, FMT_B, FMT_C, FMT_D} fmt_e;

  typedef struct packed {
    fmt_e   fmt;
    ekind_e k10a;  // format A/C: bits [26:17]; format B: bits [16:7]
    ekind_e k10b;  // format A: bits [16:7]
    ekind_e k7a;   // format A: bits [6:0]; format B/D: bits [23:17]
    ekind_e k7b;   // format B: bits [6:0]
  } template_t;

  function automatic template_t tmpl(fmt_e f, ekind_e a, ekind_e b, ekind_e c, ekind_e d);
    template_t t;
    t.fmt = f; t.k10a = a; t.k10b = b; t.k7a = c; t.k7b = d;
    return t;
  endfunction

  // Template table. Formats B and D always carry the 3-bit PTB field and
  // formats C and D a 17-bit long immediate.
  function automatic template_t template_lookup(logic [4:0] id);
    case (id)
      5'd0 : return tmpl(FMT_A, EK_NONE, EK_NONE, EK_NONE, EK_NONE);
      5'd1 : return tmpl(FMT_A, EK_ALU,  EK_MEM,  EK_ADD,  EK_NONE);
      5'd2 : return tmpl(FMT_A, EK_ALU,  EK_RW,   EK_ADD,  EK_NONE);
      5'd3 : return tmpl(FMT_A, EK_ALU,  EK_RD2,  EK_ADD,  EK_NONE);
      5'd4 : return tmpl(FMT_A, EK_MEM,  EK_RW,   EK_ADD,  EK_NONE);
      5'd5 : return tmpl(FMT_A, EK_MEM,  EK_RD2,  EK_ADD,  EK_NONE);
      5'd6 : return tmpl(FMT_A, EK_RW,   EK_RD2,  EK_ADD,  EK_NONE);
      5'd7 : return tmpl(FMT_A, EK_ALU,  EK_MEM,  EK_CPY,  EK_NONE);
      5'd8 : return tmpl(FMT_A, EK_ALU,  EK_RW,   EK_CPY,  EK_NONE);
      5'd9 : return tmpl(FMT_A, EK_ALU,  EK_RD2,  EK_CPY,  EK_NONE);
      5'd10: return tmpl(FMT_A, EK_MEM,  EK_RW,   EK_CPY,  EK_NONE);
      5'd11: return tmpl(FMT_A, EK_RW,   EK_RD2,  EK_CPY,  EK_NONE);
      5'd12: return tmpl(FMT_A, EK_ALU,  EK_MEM,  EK_SIMM, EK_NONE);
      5'd13: return tmpl(FMT_A, EK_ALU,  EK_RW,   EK_SIMM, EK_NONE);
      5'd14: return tmpl(FMT_A, EK_MEM,  EK_RW,   EK_SIMM, EK_NONE);
      5'd15: return tmpl(FMT_A, EK_RW,   EK_RD2,  EK_SIMM, EK_NONE);
      5'd16: return tmpl(FMT_A, EK_ALU,  EK_MEM,  EK_RD1,  EK_NONE);
      5'd17: return tmpl(FMT_A, EK_ALU,  EK_MEM,  EK_PTB,  EK_NONE);
      5'd18: return tmpl(FMT_A, EK_ALU,  EK_RW,   EK_LSW,  EK_NONE);
      5'd19: return tmpl(FMT_A, EK_ALU,  EK_FPU,  EK_NONE, EK_NONE);
      5'd20: return tmpl(FMT_B, EK_ALU,  EK_NONE, EK_ADD,  EK_CPY);
      5'd21: return tmpl(FMT_B, EK_MEM,  EK_NONE, EK_ADD,  EK_CPY);
      5'd22: return tmpl(FMT_B, EK_RW,   EK_NONE, EK_ADD,  EK_CPY);
      5'd23: return tmpl(FMT_B, EK_ALU,  EK_NONE, EK_SIMM, EK_ADD);
      5'd24: return tmpl(FMT_B, EK_ALU,  EK_NONE, EK_RD1,  EK_CPY);
      5'd25: return tmpl(FMT_B, EK_ALU,  EK_NONE, EK_LSW,  EK_ADD);
      5'd26: return tmpl(FMT_B, EK_RD2,  EK_NONE, EK_CPY,  EK_ADD);
      5'd27: return tmpl(FMT_C, EK_ALU,  EK_NONE, EK_NONE, EK_NONE);
      5'd28: return tmpl(FMT_C, EK_RW,   EK_NONE, EK_NONE, EK_NONE);
      5'd29: return tmpl(FMT_C, EK_RD2,  EK_NONE, EK_NONE, EK_NONE);
      5'd30: return tmpl(FMT_D, EK_NONE, EK_NONE, EK_ADD,  EK_NONE);
      default: return tmpl(FMT_D, EK_NONE, EK_NONE, EK_CPY, EK_NONE);
    endcase
  endfunction

  // ------------------------------------------------------------------
  // Decoded control for one instruction, consumed by the core.
  typedef struct packed {
    logic        illegal;   // FPU effect or other unsupported encoding
    alu_op_e     alu_op;
    src_e        alu_a;
    src_e        alu_b;
    mem_op_e     mem_op;
    src_e        mem_addr;
    src_e        mem_data;
    logic        rd1_en;    // RS1 <= RF[rd1_reg]
    logic [4:0]  rd1_reg;
    logic        rd2_en;    // RS2 <= RF[rd2_reg]
    logic [4:0]  rd2_reg;
    logic        rw_en;     // RF[rw_reg] <= source
    logic [4:0]  rw_reg;
    src_e        rw_src;
    logic        add_en;    // OPER2 or TARG <= add_a + add_b
    src_e        add_a;
    src_e        add_b;
    logic        add_targ;
    logic        se_en;     // SE <= immediate
    logic        se_hi;     // SE <= {imm[15:0], SE[15:0]}
    word_t       imm;
    logic        cpy_en;    // CP1/CP2/SEQ <= source
    logic [1:0]  cpy_dst;
    src_e        cpy_src;
    logic        ptb_en;    // prepare to branch
    logic        ptb_uncond;
    ptb_sel_e    ptb_sel;
  } ctrl_t;

  // Events of one executed instruction (for activity based energy estimation).
  typedef struct packed {
    logic       valid;        // an instruction executed this cycle
    logic [1:0] rf_reads;     // register file read ports used
    logic       rf_write;
    logic       alu;          // ALU used
    logic       adder;        // integer adder used
    logic       dc_access;
    logic       bpb_access;   // BPB read (conditional PTB)
    logic       transfer;     // control left the sequential path
    logic       mispredict;   // fetched instruction squashed
    logic [3:0] int_writes;   // internal registers written
  } sp_events_t;

endpackage
