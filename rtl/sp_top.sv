// sp_top: static pipeline processor with its level-one instruction and data
// stores.
//
// Wires sp_core to sp_icache (8 KB) and sp_dcache (8 KB). The program is
// loaded through the `prog_*` write port and data through the `dmem_*` port
// while the core is held in reset (rst_n low resets only the core; the
// stores keep their contents). `pc` is the address of the instruction in the
// execute stage, `events` the activity of that instruction. Default sizes
// follow the document's evaluated configuration: 8 KB caches, 256-entry
// branch prediction buffer, 32 registers; the reset PC is this design's.
module sp_top
  import sp_pkg::*;
#(
  parameter int unsigned IC_BYTES    = 8192,
  parameter int unsigned DC_BYTES    = 8192,
  parameter int unsigned BPB_ENTRIES = 256,
  parameter int unsigned NREGS       = 32,
  parameter logic [31:0] RESET_PC    = 32'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  // program load
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  // data load / inspection
  input  logic        dmem_en,
  input  logic        dmem_we,
  input  logic [31:0] dmem_addr,
  input  logic [31:0] dmem_wdata,
  output logic [31:0] dmem_rdata,
  // status
  output logic [31:0] pc,
  output logic        illegal,
  output sp_events_t  events
);
  logic        ic_re;
  logic [31:0] ic_addr, ic_rdata;
  mem_op_e     dc_op;
  word_t       dc_addr, dc_wdata, dc_lv;

  sp_core #(.NREGS(NREGS), .BPB_ENTRIES(BPB_ENTRIES), .RESET_PC(RESET_PC)) u_core (
    .clk, .rst_n,
    .ic_re, .ic_addr, .ic_rdata,
    .dc_op, .dc_addr, .dc_wdata, .dc_lv,
    .pc, .illegal, .events
  );

  sp_icache #(.SIZE_BYTES(IC_BYTES)) u_icache (
    .clk, .rst_n, .re(ic_re), .addr(ic_addr), .rdata(ic_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  sp_dcache #(.SIZE_BYTES(DC_BYTES)) u_dcache (
    .clk, .rst_n, .op(dc_op), .addr(dc_addr), .wdata(dc_wdata), .lv(dc_lv),
    .ext_en(dmem_en), .ext_we(dmem_we), .ext_addr(dmem_addr),
    .ext_wdata(dmem_wdata), .ext_rdata(dmem_rdata)
  );
endmodule
