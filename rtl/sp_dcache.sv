// sp_dcache: level-one data store of the static pipeline, with the LV
// (loaded value) register.
//
// SIZE_BYTES, byte addressed, organised as 32-bit words. A load (`op` a
// MEM_L* code) reads the word at the clock edge; the word, the byte offset
// and the load kind are registered and `lv` presents the extracted, sign- or
// zero-extended value from then on until the next load. `lv` is thus the
// document's LV register: "LV = M[RS1]" writes it at the end of the cycle.
// A store (MEM_SW/SH/SB) writes the selected bytes at the clock edge. A
// second port (`ext_*`) gives word access for loading and inspecting data;
// it has priority over the core port. Misaligned half/word accesses use the
// aligned word (address bits below the access size are ignored).
// From the document: 8 KB, loads into LV. This design's own: the store
// always hits (no tags, miss handling or next level), byte lanes, ext port.
module sp_dcache
  import sp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  localparam int unsigned WORDS     = SIZE_BYTES / 4,
  localparam int unsigned AW        = $clog2(WORDS)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mem_op_e op,
  input  word_t   addr,
  input  word_t   wdata,
  output word_t   lv,
  input  logic    ext_en,
  input  logic    ext_we,
  input  word_t   ext_addr,
  input  word_t   ext_wdata,
  output word_t   ext_rdata
);
  logic [31:0]   mem [WORDS];
  logic [AW-1:0] wi;
  logic [31:0]   word_q;
  logic [1:0]    off_q;
  mem_op_e       op_q;
  logic [3:0]    be;
  logic [31:0]   wd;

  assign wi = ext_en ? ext_addr[AW+1:2] : addr[AW+1:2];

  // Byte enables and aligned store data.
  always_comb begin
    be = 4'b0000;
    wd = '0;
    if (ext_en) begin
      be = ext_we ? 4'b1111 : 4'b0000;
      wd = ext_wdata;
    end else begin
      unique case (op)
        MEM_SW: begin be = 4'b1111; wd = wdata; end
        MEM_SH: begin be = addr[1] ? 4'b1100 : 4'b0011; wd = {2{wdata[15:0]}}; end
        MEM_SB: begin be = 4'b0001 << addr[1:0]; wd = {4{wdata[7:0]}}; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++)
      if (be[b]) mem[wi][8*b +: 8] <= wd[8*b +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      off_q  <= '0;
      op_q   <= MEM_LW;
      ext_rdata <= '0;
    end else if (ext_en) begin
      ext_rdata <= mem[wi];
    end else if (mem_is_load(op)) begin
      word_q <= mem[wi];
      off_q  <= addr[1:0];
      op_q   <= op;
    end
  end

  // Extraction of the loaded value (little-endian byte order).
  always_comb begin
    logic [7:0]  b8;
    logic [15:0] h16;
    b8  = word_q[8*off_q +: 8];
    h16 = off_q[1] ? word_q[31:16] : word_q[15:0];
    unique case (op_q)
      MEM_LB : lv = {{24{b8[7]}}, b8};
      MEM_LBU: lv = {24'b0, b8};
      MEM_LH : lv = {{16{h16[15]}}, h16};
      MEM_LHU: lv = {16'b0, h16};
      default: lv = word_q;
    endcase
  end
endmodule
