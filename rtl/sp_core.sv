// sp_core: the statically pipelined (SP) processor core.
//
// Instead of a five-stage pipeline with hidden pipeline registers, hazard
// detection and forwarding, the SP core has two stages (fetch, execute) and
// a set of internal registers the instruction set names directly:
//   RS1, RS2  register file read data        SE    sign-extended immediate
//   LV        loaded value (in sp_dcache)    OPER1 ALU result
//   OPER2     integer adder result           CP1/CP2 copies of any register
//   TARG      branch target (adder result)   SEQ   sequential address (PC+1)
//   PTB       prepare-to-branch (in sp_fetch)
// Each instruction is a bundle of effects (see sp_pkg / sp_decoder). In the
// execute cycle every effect reads start-of-cycle values through the
// interconnect and its result is written at the clock edge, so all effects
// of one instruction act in parallel and a value is visible to the next
// instruction. There are no interlocks and no forwarding: the compiler is
// responsible for ordering. Units:
//   register file  2 reads (into RS1/RS2), 1 write (source: interconnect)
//   ALU            -> OPER1, or a compare that resolves a branch
//   integer adder  (PC or a register) + register -> OPER2 or TARG
//   data cache     address and store data from the interconnect -> LV
//   copy           any source -> CP1, CP2 or SEQ ("SEQ = PC + 1")
// Instruction cache and data cache are outside the core (sp_top). The core
// reports per-instruction events for activity-based energy accounting.
// An instruction with an unsupported effect (FPU) executes as a no-op and
// raises `illegal` for that cycle.
// From the document: the register set, the units and their connections
// (register file -> RS1/RS2, sign extend -> SE, ALU -> OPER1, adder -> OPER2
// and TARG, data cache -> LV), the two-stage pipeline and PTB branching.
// This design's own: encodings, reset values (all zero), event outputs.
module sp_core
  import sp_pkg::*;
#(
  parameter int unsigned NREGS       = 32,
  parameter int unsigned BPB_ENTRIES = 256,
  parameter logic [31:0] RESET_PC    = 32'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction cache
  output logic        ic_re,
  output logic [31:0] ic_addr,
  input  logic [31:0] ic_rdata,
  // data cache
  output mem_op_e     dc_op,
  output word_t       dc_addr,
  output word_t       dc_wdata,
  input  word_t       dc_lv,
  // status
  output logic [31:0] pc,
  output logic        illegal,
  output sp_events_t  events
);
  localparam int unsigned NP = 8;
  localparam int unsigned BW = $clog2(BPB_ENTRIES);
  localparam int P_ALU_A = 0, P_ALU_B = 1, P_ADD_A = 2, P_ADD_B = 3,
                 P_MEM_A = 4, P_MEM_D = 5, P_RW = 6, P_CPY = 7;

  // Internal registers.
  word_t rs1_q, rs2_q, se_q, oper1_q, oper2_q, cp1_q, cp2_q, targ_q, seq_q;

  logic [31:0] pc_ex;
  logic        valid_ex;
  ctrl_t       dec, c;
  template_t   tmpl_unused;
  sp_regs_t    regs;
  src_e        sel  [NP];
  word_t       ic_d [NP];
  word_t       rf_rd1, rf_rd2, alu_res, add_sum;
  logic        alu_cond, alu_writes, alu_is_br;

  sp_decoder u_dec (.instr(ic_rdata), .ctrl(dec), .tmpl_o(tmpl_unused));

  // Only a valid, legal instruction has effects.
  always_comb begin
    c = dec;
    if (!valid_ex || dec.illegal) begin
      c = '0;
      c.alu_op = ALU_NOP;
      c.mem_op = MEM_NOP;
    end
  end
  assign illegal = valid_ex & dec.illegal;

  assign regs = '{rs1: rs1_q, rs2: rs2_q, se: se_q, lv: dc_lv, oper1: oper1_q,
                  oper2: oper2_q, cp1: cp1_q, cp2: cp2_q, targ: targ_q,
                  seq: seq_q, pc: pc_ex};

  assign sel[P_ALU_A] = c.alu_a;
  assign sel[P_ALU_B] = c.alu_b;
  assign sel[P_ADD_A] = c.add_a;
  assign sel[P_ADD_B] = c.add_b;
  assign sel[P_MEM_A] = c.mem_addr;
  assign sel[P_MEM_D] = c.mem_data;
  assign sel[P_RW]    = c.rw_src;
  assign sel[P_CPY]   = c.cpy_src;

  sp_interconnect #(.NPORTS(NP)) u_ic (.regs(regs), .sel(sel), .data(ic_d));

  sp_regfile #(.NREGS(NREGS), .XLEN(32)) u_rf (
    .clk, .rst_n,
    .raddr1(c.rd1_reg[$clog2(NREGS)-1:0]), .rdata1(rf_rd1),
    .raddr2(c.rd2_reg[$clog2(NREGS)-1:0]), .rdata2(rf_rd2),
    .we(c.rw_en), .waddr(c.rw_reg[$clog2(NREGS)-1:0]), .wdata(ic_d[P_RW])
  );

  sp_alu u_alu (.op(c.alu_op), .a(ic_d[P_ALU_A]), .b(ic_d[P_ALU_B]),
                .result(alu_res), .cond(alu_cond), .writes(alu_writes),
                .is_branch(alu_is_br));

  // Integer adder (address and target calculation).
  assign add_sum = ic_d[P_ADD_A] + ic_d[P_ADD_B];

  // Data cache access.
  assign dc_op    = c.mem_op;
  assign dc_addr  = ic_d[P_MEM_A];
  assign dc_wdata = ic_d[P_MEM_D];

  // Branch prediction buffer and fetch.
  logic          bpb_rd_en, bpb_pred, bpb_upd_en, bpb_upd_taken;
  logic [BW-1:0] bpb_rd_idx, bpb_upd_idx;
  logic          ev_transfer, ev_mispredict;

  sp_bpb #(.ENTRIES(BPB_ENTRIES)) u_bpb (
    .clk, .rst_n, .rd_en(bpb_rd_en), .rd_idx(bpb_rd_idx), .pred_taken(bpb_pred),
    .upd_en(bpb_upd_en), .upd_idx(bpb_upd_idx), .upd_taken(bpb_upd_taken)
  );

  sp_fetch #(.BPB_ENTRIES(BPB_ENTRIES), .RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .ex_ptb_en(c.ptb_en), .ex_ptb_uncond(c.ptb_uncond), .ex_ptb_sel(c.ptb_sel),
    .ex_br_valid(alu_is_br), .ex_br_cond(alu_cond),
    .targ(targ_q), .seq(seq_q), .rs2(rs2_q),
    .ic_re, .ic_addr, .pc_ex, .valid_ex,
    .bpb_rd_en, .bpb_rd_idx, .bpb_pred,
    .bpb_upd_en, .bpb_upd_idx, .bpb_upd_taken,
    .ev_transfer, .ev_mispredict
  );

  assign pc = pc_ex;

  // Internal register writes at the end of the execute cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs1_q <= '0; rs2_q <= '0; se_q <= '0; oper1_q <= '0; oper2_q <= '0;
      cp1_q <= '0; cp2_q <= '0; targ_q <= '0; seq_q <= '0;
    end else begin
      if (c.rd1_en) rs1_q <= rf_rd1;
      if (c.rd2_en) rs2_q <= rf_rd2;
      if (c.se_en)  se_q  <= c.se_hi ? {c.imm[31:16], se_q[15:0]} : c.imm;
      if (alu_writes) oper1_q <= alu_res;
      if (c.add_en) begin
        if (c.add_targ) targ_q  <= add_sum;
        else            oper2_q <= add_sum;
      end
      if (c.cpy_en) begin
        unique case (c.cpy_dst)
          2'd0: cp1_q <= ic_d[P_CPY];
          2'd1: cp2_q <= ic_d[P_CPY];
          2'd2: seq_q <= ic_d[P_CPY];
          default: ;
        endcase
      end
    end
  end

  // Events of the executing instruction.
  always_comb begin
    events            = '0;
    events.valid      = valid_ex;
    events.rf_reads   = {1'b0, c.rd1_en} + {1'b0, c.rd2_en};
    events.rf_write   = c.rw_en && c.rw_reg != 5'd0;
    events.alu        = (c.alu_op != ALU_NOP);
    events.adder      = c.add_en;
    events.dc_access  = mem_is_load(c.mem_op) || mem_is_store(c.mem_op);
    events.bpb_access = bpb_rd_en;
    events.transfer   = ev_transfer;
    events.mispredict = ev_mispredict;
    events.int_writes = 4'({3'b0, c.rd1_en}) + 4'({3'b0, c.rd2_en}) + 4'({3'b0, c.se_en})
                      + 4'({3'b0, alu_writes}) + 4'({3'b0, c.add_en}) + 4'({3'b0, c.cpy_en})
                      + 4'({3'b0, mem_is_load(c.mem_op)}) + 4'({3'b0, c.ptb_en});
  end
endmodule
