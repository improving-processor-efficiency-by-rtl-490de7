// sp_asm_pkg: instruction encoding helpers for the static pipeline
// testbenches. Each function packs one effect or one whole instruction in
// the layout decoded by sp_decoder; see sp_pkg for the template table.
package sp_asm_pkg;
  import sp_pkg::*;

  // 3-bit short source codes
  localparam logic [2:0] S_RS1 = 3'd0, S_RS2 = 3'd1, S_SE = 3'd2, S_LV = 3'd3,
                         S_OPER1 = 3'd4, S_OPER2 = 3'd5, S_CP1 = 3'd6, S_CP2 = 3'd7;
  localparam logic [2:0] A_PC = 3'd0;  // adder operand A code 0 is PC

  // 10-bit effects
  function automatic logic [9:0] e_alu(alu_op_e op, logic [2:0] a, logic [2:0] b);
    return {op, a, b};
  endfunction
  function automatic logic [9:0] e_mem(mem_op_e op, logic [2:0] addr, logic [2:0] data);
    return {op, addr, data};
  endfunction
  function automatic logic [9:0] e_rd2(logic [4:0] r1, logic [4:0] r2);
    return {r1, r2};
  endfunction
  function automatic logic [9:0] e_rw(logic [4:0] r, src_e src);
    return {1'b1, r, src};
  endfunction
  localparam logic [9:0] E10_NOP = 10'd0;   // ALU, MEM and RW no-op

  // 7-bit effects
  function automatic logic [6:0] e_add(logic [2:0] a, logic [2:0] b, logic to_targ);
    return {a, b, to_targ};
  endfunction
  function automatic logic [6:0] e_lsw(logic [2:0] addr);
    return {1'b1, addr, 3'b0};
  endfunction
  function automatic logic [6:0] e_rd1(logic to_rs2, logic [4:0] r);
    return {1'b1, to_rs2, r};
  endfunction
  function automatic logic [6:0] e_simm(int v);
    return 7'(v);
  endfunction
  function automatic logic [6:0] e_cpy(logic [1:0] dst, src_e src);
    return {dst, src, 1'b0};
  endfunction
  localparam logic [6:0] CPY_NOP = 7'b1100000;
  localparam logic [6:0] E7_NOP  = 7'd0;    // RD1 and LSW no-op
  function automatic logic [2:0] ptb(logic uncond, ptb_sel_e sel);
    return {uncond, sel};
  endfunction

  // Instructions by format
  function automatic logic [31:0] fa(int id, logic [9:0] a, logic [9:0] b, logic [6:0] c);
    return {5'(id), a, b, c};
  endfunction
  function automatic logic [31:0] fb(int id, logic [2:0] p, logic [6:0] a, logic [9:0] b, logic [6:0] c);
    return {5'(id), p, a, b, c};
  endfunction
  function automatic logic [31:0] fc(int id, logic [9:0] a, int imm, logic hi = 1'b0);
    return {5'(id), a, hi, 16'(imm)};
  endfunction
  function automatic logic [31:0] fd(int id, logic [2:0] p, logic [6:0] a, int imm, logic hi = 1'b0);
    return {5'(id), p, a, hi, 16'(imm)};
  endfunction
endpackage
