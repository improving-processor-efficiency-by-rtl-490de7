// sp_alu: integer ALU of the static pipeline.
//
// Purely combinational. Arithmetic and logic operations produce `result`,
// which the core writes into OPER1. The compare operations (BEQ, BNE, BLT,
// BGE) produce `cond` instead; the core uses it to resolve a transfer of
// control whose point was announced by the preceding prepare-to-branch
// effect (the document's "PC = OPER2 != RS2, @PTB"). `writes` tells whether
// the operation produces an OPER1 value. The operation set is a MIPS-like
// choice of this design; the document lists only "ALU operation".
module sp_alu
  import sp_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output logic    cond,
  output logic    writes,
  output logic    is_branch
);
  always_comb begin
    result    = '0;
    cond      = 1'b0;
    writes    = 1'b1;
    is_branch = 1'b0;
    unique case (op)
      ALU_NOP : writes = 1'b0;
      ALU_ADD : result = a + b;
      ALU_SUB : result = a - b;
      ALU_AND : result = a & b;
      ALU_OR  : result = a | b;
      ALU_XOR : result = a ^ b;
      ALU_NOR : result = ~(a | b);
      ALU_SLL : result = a << b[4:0];
      ALU_SRL : result = a >> b[4:0];
      ALU_SRA : result = word_t'($signed(a) >>> b[4:0]);
      ALU_SLT : result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: result = {31'b0, a < b};
      ALU_BEQ : begin writes = 1'b0; is_branch = 1'b1; cond = (a == b); end
      ALU_BNE : begin writes = 1'b0; is_branch = 1'b1; cond = (a != b); end
      ALU_BLT : begin writes = 1'b0; is_branch = 1'b1; cond = ($signed(a) < $signed(b)); end
      ALU_BGE : begin writes = 1'b0; is_branch = 1'b1; cond = ($signed(a) >= $signed(b)); end
      default : writes = 1'b0;
    endcase
  end
endmodule
