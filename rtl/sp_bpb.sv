// sp_bpb: branch prediction buffer of the static pipeline.
//
// ENTRIES two-bit saturating counters indexed by the low bits of the
// address of the branch instruction. No branch target buffer exists: the
// target comes from the register the prepare-to-branch (PTB) effect names.
// The buffer is read only when a conditional PTB effect executes, i.e. one
// cycle before the branch, and the prediction (`pred_taken`, counter MSB) is
// valid from the next clock edge, in the cycle in which the branch executes
// and its successor is fetched. The outcome is written back with `upd_en`.
// Counters reset to weakly not-taken (01).
// From the document: 256 entries, read in the cycle of the PTB effect, no
// BTB. This design's own: 2-bit counters, direct indexing, reset value.
module sp_bpb #(
  parameter int unsigned ENTRIES = 256,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [IW-1:0] rd_idx,
  output logic          pred_taken,
  input  logic          upd_en,
  input  logic [IW-1:0] upd_idx,
  input  logic          upd_taken
);
  logic [1:0] ctr [ENTRIES];
  logic       pred_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) ctr[i] <= 2'b01;
      pred_q <= 1'b0;
    end else begin
      if (rd_en) pred_q <= ctr[rd_idx][1];
      if (upd_en) begin
        if (upd_taken && ctr[upd_idx] != 2'b11) ctr[upd_idx] <= ctr[upd_idx] + 2'd1;
        else if (!upd_taken && ctr[upd_idx] != 2'b00) ctr[upd_idx] <= ctr[upd_idx] - 2'd1;
      end
    end
  end

  assign pred_taken = pred_q;
endmodule
