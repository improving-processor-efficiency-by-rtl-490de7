// sp_icache: level-one instruction store of the static pipeline.
//
// SIZE_BYTES of 32-bit instructions, addressed by instruction index (the SP
// program counter counts instructions: the document writes "SEQ = PC + 1").
// One synchronous read per cycle: the word at `addr` appears on `rdata` after
// the clock edge when `re` is high, and `rdata` holds otherwise, so the
// output register doubles as the instruction register of the execute stage.
// A write port (`we`) loads the program. Addresses wrap modulo the size.
// From the document: 8 KB. This design's own: the store always hits; the
// document gives no cache organisation or next memory level, so tags, miss
// handling and refill are not built.
module sp_icache #(
  parameter int unsigned SIZE_BYTES = 8192,
  localparam int unsigned WORDS     = SIZE_BYTES / 4,
  localparam int unsigned AW        = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        re,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] ra, wa;

  assign ra = addr[AW-1:0];
  assign wa = waddr[AW-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[ra];
  end
endmodule
