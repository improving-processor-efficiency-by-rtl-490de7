// sp_interconnect: the source multiplexers between the internal registers
// and the units of the static pipeline.
//
// Every consumer (ALU operands, adder operands, data cache address and
// store data, register file write data, copy source) has its own 4-bit
// source select; port i returns the start-of-cycle value of the register
// named by sel[i]. Besides the internal registers the sources include PC
// (address of the executing instruction) and PC+1, which the document uses
// for "TARG = PC + SE" and "SEQ = PC + 1". Unused codes return zero.
// Purely combinational. The document draws the interconnect as one block;
// the per-consumer multiplexer structure is this design's choice.
module sp_interconnect
  import sp_pkg::*;
#(
  parameter int unsigned NPORTS = 9
) (
  input  sp_regs_t regs,
  input  src_e     sel  [NPORTS],
  output word_t    data [NPORTS]
);
  for (genvar i = 0; i < int'(NPORTS); i++) begin : g_port
    always_comb begin
      unique case (sel[i])
        SRC_RS1  : data[i] = regs.rs1;
        SRC_RS2  : data[i] = regs.rs2;
        SRC_SE   : data[i] = regs.se;
        SRC_LV   : data[i] = regs.lv;
        SRC_OPER1: data[i] = regs.oper1;
        SRC_OPER2: data[i] = regs.oper2;
        SRC_CP1  : data[i] = regs.cp1;
        SRC_CP2  : data[i] = regs.cp2;
        SRC_TARG : data[i] = regs.targ;
        SRC_SEQ  : data[i] = regs.seq;
        SRC_PC   : data[i] = regs.pc;
        SRC_PCINC: data[i] = regs.pc + 32'd1;
        default  : data[i] = '0;
      endcase
    end
  end
endmodule
