// sp_fetch: instruction fetch and transfer-of-control unit of the static
// pipeline.
//
// The SP pipeline has two stages, fetch (IF) and execute (EX). This unit
// holds the address of the instruction in EX (`pc_ex`) and its valid bit,
// chooses the instruction cache address each cycle, and owns the PTB
// (prepare-to-branch) register.
//
// A transfer of control is split in three: the target is computed earlier
// into TARG (or SEQ, or RS2 for indirect jumps) by ordinary effects; a PTB
// effect in instruction i names the target register and whether the transfer
// is conditional; instruction i+1 is the point of transfer and, for a
// conditional transfer, carries the ALU compare that decides it.
//   cycle 2: i in EX writes the PTB register; for a conditional PTB the BPB
//            is read with the address of i+1, which is being fetched.
//   cycle 3: i+1 in EX. The cache address is the register the PTB names
//            (TARG, SEQ or RS2), unless the BPB predicted not taken, in
//            which case it is the sequential address. The compare of i+1
//            resolves the branch in the same cycle.
//   cycle 4: on a misprediction the instruction fetched in cycle 3 is
//            squashed and the correct address is fetched (one bubble).
// An unconditional PTB (jump) is always taken and does not read the BPB.
// After reset the first fetch is from RESET_PC.
// From the document: the PTB register and its timing, the fetch multiplexer
// with inputs PC (sequential), TARG, SEQ and RS2, the BPB override. This
// design's own: the squash/redirect recovery, dropping a PTB issued by a
// mispredicted point of transfer, and treating a conditional PTB with no
// compare in the next instruction as not taken.
module sp_fetch
  import sp_pkg::*;
#(
  parameter int unsigned BPB_ENTRIES = 256,
  parameter logic [31:0] RESET_PC    = 32'd0,
  localparam int unsigned BW         = $clog2(BPB_ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // execute-stage inputs
  input  logic          ex_ptb_en,
  input  logic          ex_ptb_uncond,
  input  ptb_sel_e      ex_ptb_sel,
  input  logic          ex_br_valid,
  input  logic          ex_br_cond,
  input  word_t         targ,
  input  word_t         seq,
  input  word_t         rs2,
  // instruction cache
  output logic          ic_re,
  output logic [31:0]   ic_addr,
  // execute stage state
  output logic [31:0]   pc_ex,
  output logic          valid_ex,
  // branch prediction buffer
  output logic          bpb_rd_en,
  output logic [BW-1:0] bpb_rd_idx,
  input  logic          bpb_pred,
  output logic          bpb_upd_en,
  output logic [BW-1:0] bpb_upd_idx,
  output logic          bpb_upd_taken,
  // events
  output logic          ev_transfer,
  output logic          ev_mispredict
);
  typedef struct packed {
    logic     active;
    logic     uncond;
    ptb_sel_e sel;
  } ptb_reg_t;

  ptb_reg_t    ptb_q;
  logic        redir_q;
  logic [31:0] redir_addr_q;
  logic [31:0] ptb_value, seq_addr, fetch_addr, correct_addr;
  logic        pred_taken, resolve, actual_taken, mispredict;

  always_comb begin
    unique case (ptb_q.sel)
      PTB_TARG: ptb_value = targ;
      PTB_SEQ : ptb_value = seq;
      PTB_RS2 : ptb_value = rs2;
      default : ptb_value = seq_addr;
    endcase
  end

  assign seq_addr     = pc_ex + 32'd1;
  assign pred_taken   = ptb_q.uncond | bpb_pred;
  assign resolve      = ptb_q.active & valid_ex;
  assign actual_taken = ptb_q.uncond | (ex_br_valid & ex_br_cond);
  assign mispredict   = resolve & (actual_taken != pred_taken);
  assign correct_addr = actual_taken ? ptb_value : seq_addr;

  always_comb begin
    if (redir_q)                         fetch_addr = redir_addr_q;
    else if (ptb_q.active && pred_taken) fetch_addr = ptb_value;
    else                                 fetch_addr = seq_addr;
  end

  assign ic_re   = 1'b1;
  assign ic_addr = fetch_addr;

  // BPB: read for a conditional PTB, written when the branch resolves.
  assign bpb_rd_en     = valid_ex & ex_ptb_en & ~ex_ptb_uncond & ~mispredict;
  assign bpb_rd_idx    = fetch_addr[BW-1:0];
  assign bpb_upd_en    = resolve & ~ptb_q.uncond;
  assign bpb_upd_idx   = pc_ex[BW-1:0];
  assign bpb_upd_taken = actual_taken;

  assign ev_transfer   = resolve & actual_taken;
  assign ev_mispredict = mispredict;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptb_q        <= '0;
      redir_q      <= 1'b1;
      redir_addr_q <= RESET_PC;
      pc_ex        <= RESET_PC;
      valid_ex     <= 1'b0;
    end else begin
      pc_ex        <= fetch_addr;
      valid_ex     <= ~mispredict;
      redir_q      <= mispredict;
      redir_addr_q <= correct_addr;
      if (valid_ex && ex_ptb_en && !mispredict)
        ptb_q <= '{active: 1'b1, uncond: ex_ptb_uncond, sel: ex_ptb_sel};
      else
        ptb_q <= '0;
    end
  end

  // A conditional point of transfer must carry exactly one compare.
  a_branch_has_compare: assert property (@(posedge clk) disable iff (!rst_n)
    (resolve && !ptb_q.uncond) |-> ex_br_valid)
    else $warning("conditional PTB not followed by a compare; taken as not taken");
endmodule
