// sp_regfile: the architectural register file of the static pipeline.
//
// NREGS x XLEN registers, two combinational read ports and one write port.
// In the SP datapath the read data are captured in the internal registers
// RS1 and RS2 at the end of the cycle, so a read effect delivers its value
// one cycle later through RS1/RS2. A write takes effect at the clock edge;
// a read of the same register in the same cycle returns the old value (no
// internal bypass: the compiler sees and schedules this). Register 0 reads
// as zero and ignores writes, as in the MIPS baseline the compiler targets.
// Port count follows the "dual register reads" and "register write"
// effects; the zero register and the missing bypass are this design's
// choices. Registers reset to zero.
module sp_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   raddr1,
  output logic [XLEN-1:0] rdata1,
  input  logic [AW-1:0]   raddr2,
  output logic [XLEN-1:0] rdata2,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [XLEN-1:0] wdata
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];
endmodule
