// sp_decoder_tb: directed decode checks, one instruction per format and
// effect kind, with the expected control values written out by hand.
module sp_decoder_tb;
  import sp_pkg::*;
  import sp_asm_pkg::*;
  logic [31:0] instr;
  ctrl_t       c;
  template_t   t;
  int checks = 0, failures = 0;

  sp_decoder dut (.instr, .ctrl(c), .tmpl_o(t));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0h vs %0h (instr %h)", what, got, exp, instr); end
  endtask

  initial begin
    // nop
    instr = fa(0, E10_NOP, E10_NOP, E7_NOP); #1;
    chk("nop alu", c.alu_op, ALU_NOP); chk("nop mem", c.mem_op, MEM_NOP);
    chk("nop rd", c.rd1_en | c.rd2_en | c.rw_en | c.add_en | c.se_en | c.cpy_en | c.ptb_en, 0);
    // format A: ALU, MEM, ADD
    instr = fa(1, e_alu(ALU_SUB, S_LV, S_CP1), e_mem(MEM_SH, S_CP2, S_OPER1), e_add(A_PC, S_SE, 1'b1)); #1;
    chk("A alu op", c.alu_op, ALU_SUB); chk("A alu a", c.alu_a, SRC_LV); chk("A alu b", c.alu_b, SRC_CP1);
    chk("A mem op", c.mem_op, MEM_SH); chk("A mem addr", c.mem_addr, SRC_CP2); chk("A mem data", c.mem_data, SRC_OPER1);
    chk("A add en", c.add_en, 1); chk("A add a", c.add_a, SRC_PC); chk("A add b", c.add_b, SRC_SE);
    chk("A add targ", c.add_targ, 1); chk("A fmt", t.fmt, FMT_A);
    // adder operand A other than PC
    instr = fa(6, e_rw(3, SRC_OPER2), e_rd2(7, 8), e_add(S_CP2, S_SE, 1'b0)); #1;
    chk("add a CP2", c.add_a, SRC_CP2); chk("add oper2", c.add_targ, 0);
    chk("rw en", c.rw_en, 1); chk("rw reg", c.rw_reg, 3); chk("rw src", c.rw_src, SRC_OPER2);
    chk("rd1", {c.rd1_en, c.rd1_reg}, {1'b1, 5'd7}); chk("rd2", {c.rd2_en, c.rd2_reg}, {1'b1, 5'd8});
    // copy SEQ = PC + 1
    instr = fa(8, E10_NOP, E10_NOP, e_cpy(2'd2, SRC_PCINC)); #1;
    chk("cpy en", c.cpy_en, 1); chk("cpy dst", c.cpy_dst, 2); chk("cpy src", c.cpy_src, SRC_PCINC);
    chk("rw disabled", c.rw_en, 0);
    instr = fa(8, E10_NOP, E10_NOP, CPY_NOP); #1;
    chk("cpy nop", c.cpy_en, 0);
    // format B: PTB b:SEQ, RD1 to RS2, ALU, CPY
    instr = fb(24, ptb(1'b0, PTB_SEQ), e_rd1(1'b1, 5'd9), e_alu(ALU_ADD, S_LV, S_CP1), e_cpy(2'd0, SRC_TARG)); #1;
    chk("B ptb en", c.ptb_en, 1); chk("B ptb uncond", c.ptb_uncond, 0); chk("B ptb sel", c.ptb_sel, PTB_SEQ);
    chk("B rd1 to rs2", {c.rd1_en, c.rd2_en, c.rd2_reg}, {1'b0, 1'b1, 5'd9});
    chk("B alu", c.alu_op, ALU_ADD); chk("B cpy", {c.cpy_dst, c.cpy_src}, {2'd0, SRC_TARG});
    chk("B fmt", t.fmt, FMT_B);
    // format B: SIMM negative, ADD
    instr = fb(23, 3'd0, e_simm(-5), e_alu(ALU_BNE, S_OPER2, S_RS2), e_add(S_RS2, S_SE, 1'b0)); #1;
    chk("simm", c.imm, 32'hFFFF_FFFB); chk("simm en", c.se_en, 1); chk("simm lo", c.se_hi, 0);
    chk("no ptb", c.ptb_en, 0); chk("bne", c.alu_op, ALU_BNE);
    // format B: LSW
    instr = fb(25, ptb(1'b1, PTB_RS2), e_lsw(S_CP2), E10_NOP, e_add(S_CP1, S_CP2, 1'b0)); #1;
    chk("lsw op", c.mem_op, MEM_LW); chk("lsw addr", c.mem_addr, SRC_CP2);
    chk("jump rs2", {c.ptb_en, c.ptb_uncond, c.ptb_sel}, {1'b1, 1'b1, PTB_RS2});
    // format C: RD2 + long immediate
    instr = fc(29, e_rd2(6, 5), -2); #1;
    chk("C rd", {c.rd1_reg, c.rd2_reg}, {5'd6, 5'd5}); chk("C imm", c.imm, 32'hFFFF_FFFE);
    chk("C se", {c.se_en, c.se_hi}, 2'b10); chk("C fmt", t.fmt, FMT_C);
    // format D: PTB j:TARG, CPY, high-half immediate
    instr = fd(31, ptb(1'b1, PTB_TARG), e_cpy(2'd1, SRC_RS1), 'hABCD, 1'b1); #1;
    chk("D imm", c.imm[31:16], 16'hABCD); chk("D hi", c.se_hi, 1);
    chk("D ptb", {c.ptb_en, c.ptb_uncond, c.ptb_sel}, {1'b1, 1'b1, PTB_TARG});
    chk("D cpy", {c.cpy_en, c.cpy_dst, c.cpy_src}, {1'b1, 2'd1, SRC_RS1}); chk("D fmt", t.fmt, FMT_D);
    // format D: ADD + immediate
    instr = fd(30, 3'd0, e_add(A_PC, S_SE, 1'b1), 'h1234); #1;
    chk("D add", {c.add_en, c.add_targ}, 2'b11); chk("D imm2", c.imm, 32'h1234);
    // format A with the 7-bit PTB effect
    instr = fa(17, e_alu(ALU_BEQ, S_OPER2, S_RS2), e_mem(MEM_SW, S_CP2, S_OPER1), 7'(ptb(1'b1, PTB_SEQ))); #1;
    chk("A7 ptb", {c.ptb_en, c.ptb_uncond, c.ptb_sel}, {1'b1, 1'b1, PTB_SEQ});
    chk("A7 mem", c.mem_op, MEM_SW); chk("A7 alu", c.alu_op, ALU_BEQ);
    instr = fa(17, E10_NOP, E10_NOP, 7'(ptb(1'b0, PTB_NONE))); #1;
    chk("A7 no ptb", c.ptb_en, 0);
    // FPU effect is illegal
    instr = fa(19, e_alu(ALU_OR, S_RS1, S_RS2), 10'h155, E7_NOP); #1;
    chk("fpu illegal", c.illegal, 1);
    instr = fa(7, e_alu(ALU_OR, S_RS1, S_RS2), e_mem(mem_op_e'(4'd7), S_RS1, S_RS1), CPY_NOP); #1;
    chk("bad mem op illegal", c.illegal, 1);
    instr = fa(7, e_alu(ALU_OR, S_RS1, S_RS2), e_mem(MEM_SB, S_RS1, S_RS1), CPY_NOP); #1;
    chk("legal", c.illegal, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
