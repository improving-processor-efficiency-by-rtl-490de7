// sp_decoder: the control of the static pipeline (instruction decode).
//
// Splits a 32-bit instruction into its fields according to the format named
// by the 5-bit template ID (see sp_pkg), decodes each effect field by the
// kind the template assigns to it and merges the results into one ctrl_t.
// Purely combinational; the core registers nothing of it, since every
// effect completes in the execute cycle.
//
// From the document: the 5-bit template ID, the four formats with their
// 10-bit, 7-bit, 3-bit PTB and long-immediate fields, and the effect kinds.
// This design's own: the template table, the bit layout of each effect, the
// 17-bit long immediate (bit 16 = "high half" form SE = {imm, SE[15:0]},
// else SE = sign-extended imm[15:0]). An FPU effect sets `illegal` and does
// nothing else, since no floating-point unit is built.
module sp_decoder
  import sp_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output template_t   tmpl_o
);
  template_t   t;
  logic [9:0]  f10a, f10b;
  logic [6:0]  f7a, f7b;
  logic [2:0]  fptb;
  logic [16:0] limm;
  logic        has_ptb, has_limm;

  assign t      = template_lookup(instr[31:27]);
  assign tmpl_o = t;

  // Field extraction by format.
  always_comb begin
    f10a = '0; f10b = '0; f7a = '0; f7b = '0; fptb = '0; limm = '0;
    has_ptb = 1'b0; has_limm = 1'b0;
    unique case (t.fmt)
      FMT_A: begin f10a = instr[26:17]; f10b = instr[16:7]; f7a = instr[6:0]; end
      FMT_B: begin has_ptb = 1'b1; fptb = instr[26:24]; f7a = instr[23:17];
                   f10a = instr[16:7]; f7b = instr[6:0]; end
      FMT_C: begin has_limm = 1'b1; f10a = instr[26:17]; limm = instr[16:0]; end
      FMT_D: begin has_ptb = 1'b1; has_limm = 1'b1; fptb = instr[26:24];
                   f7a = instr[23:17]; limm = instr[16:0]; end
    endcase
  end

  // Apply one 10-bit effect.
  function automatic ctrl_t apply10(ctrl_t c, ekind_e k, logic [9:0] f);
    case (k)
      EK_ALU: begin
        c.alu_op = alu_op_e'(f[9:6]);
        c.alu_a  = src_e'({1'b0, f[5:3]});
        c.alu_b  = src_e'({1'b0, f[2:0]});
      end
      EK_MEM: begin
        c.mem_op   = mem_op_e'(f[9:6]);
        c.mem_addr = src_e'({1'b0, f[5:3]});
        c.mem_data = src_e'({1'b0, f[2:0]});
        if (!(mem_is_load(c.mem_op) || mem_is_store(c.mem_op) || c.mem_op == MEM_NOP))
          c.illegal = 1'b1;
      end
      EK_RD2: begin
        c.rd1_en = 1'b1; c.rd1_reg = f[9:5];
        c.rd2_en = 1'b1; c.rd2_reg = f[4:0];
      end
      EK_RW: begin
        c.rw_en  = f[9];
        c.rw_reg = f[8:4];
        c.rw_src = src_e'(f[3:0]);
      end
      EK_FPU: c.illegal = 1'b1;
      default: ;
    endcase
    return c;
  endfunction

  // Apply one 7-bit effect.
  function automatic ctrl_t apply7(ctrl_t c, ekind_e k, logic [6:0] f);
    case (k)
      EK_ADD: begin
        c.add_en   = 1'b1;
        c.add_a    = (f[6:4] == 3'd0) ? SRC_PC : src_e'({1'b0, f[6:4]});
        c.add_b    = src_e'({1'b0, f[3:1]});
        c.add_targ = f[0];
      end
      EK_LSW: begin
        if (f[6]) begin
          c.mem_op   = MEM_LW;
          c.mem_addr = src_e'({1'b0, f[5:3]});
        end
      end
      EK_RD1: begin
        if (f[6] && !f[5]) begin c.rd1_en = 1'b1; c.rd1_reg = f[4:0]; end
        if (f[6] &&  f[5]) begin c.rd2_en = 1'b1; c.rd2_reg = f[4:0]; end
      end
      EK_SIMM: begin
        c.se_en = 1'b1;
        c.se_hi = 1'b0;
        c.imm   = {{25{f[6]}}, f};
      end
      EK_CPY: begin
        c.cpy_en  = (f[6:5] != 2'd3);
        c.cpy_dst = f[6:5];
        c.cpy_src = src_e'(f[4:1]);
      end
      EK_PTB: begin
        c.ptb_en     = (f[1:0] != 2'd0);
        c.ptb_uncond = f[2];
        c.ptb_sel    = ptb_sel_e'(f[1:0]);
      end
      default: ;
    endcase
    return c;
  endfunction

  always_comb begin
    ctrl_t c;
    c          = '0;
    c.alu_op   = ALU_NOP;
    c.mem_op   = MEM_NOP;
    c.rw_src   = SRC_ZERO;
    c.cpy_src  = SRC_ZERO;
    c.add_a    = SRC_ZERO;
    c.add_b    = SRC_ZERO;
    c.alu_a    = SRC_ZERO;
    c.alu_b    = SRC_ZERO;
    c.mem_addr = SRC_ZERO;
    c.mem_data = SRC_ZERO;
    c.ptb_sel  = PTB_NONE;
    c = apply10(c, t.k10a, f10a);
    c = apply10(c, t.k10b, f10b);
    c = apply7(c, t.k7a, f7a);
    c = apply7(c, t.k7b, f7b);
    if (has_ptb) c = apply7(c, EK_PTB, {4'b0, fptb});
    if (has_limm) begin
      c.se_en = 1'b1;
      c.se_hi = limm[16];
      c.imm   = limm[16] ? {limm[15:0], 16'b0} : {{16{limm[15]}}, limm[15:0]};
    end
    ctrl = c;
  end
endmodule
