// sp_fetch_tb: cycle-by-cycle check of the fetch unit with its BPB.
// TARG = 100, SEQ = 50 and RS2 = 200 stay fixed; the stimulus plays the
// execute stage (PTB effects and branch compares) and every cycle the
// cache address, the execute-stage PC and valid bit, and the
// misprediction and transfer events are compared with a hand-written
// trace. Covered: reset fetch, jumps through TARG and RS2, a conditional
// branch predicted not taken but taken (one squashed slot, redirect), the
// same branch then predicted taken and correct, a correctly predicted
// not-taken branch, and a taken prediction that turns out wrong.
module sp_fetch_tb;
  import sp_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ptb_en, ptb_uncond, br_valid, br_cond;
  ptb_sel_e    ptb_sel;
  logic        ic_re, valid_ex, bpb_rd_en, bpb_pred, bpb_upd_en, bpb_upd_taken;
  logic [31:0] ic_addr, pc_ex;
  logic [7:0]  bpb_rd_idx, bpb_upd_idx;
  logic        ev_transfer, ev_mispredict;
  int checks = 0, failures = 0;

  sp_fetch #(.BPB_ENTRIES(256), .RESET_PC(0)) dut (
    .clk, .rst_n, .ex_ptb_en(ptb_en), .ex_ptb_uncond(ptb_uncond), .ex_ptb_sel(ptb_sel),
    .ex_br_valid(br_valid), .ex_br_cond(br_cond),
    .targ(32'd100), .seq(32'd50), .rs2(32'd200),
    .ic_re, .ic_addr, .pc_ex, .valid_ex,
    .bpb_rd_en, .bpb_rd_idx, .bpb_pred, .bpb_upd_en, .bpb_upd_idx, .bpb_upd_taken,
    .ev_transfer, .ev_mispredict);

  sp_bpb #(.ENTRIES(256)) u_bpb (.clk, .rst_n, .rd_en(bpb_rd_en), .rd_idx(bpb_rd_idx),
    .pred_taken(bpb_pred), .upd_en(bpb_upd_en), .upd_idx(bpb_upd_idx), .upd_taken(bpb_upd_taken));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One row per cycle: stimulus {ptb code (0 none, else [2]=uncond,[1:0]=sel),
  // compare valid, compare result}, expected {valid_ex, pc_ex, ic_addr,
  // mispredict, transfer}.
  typedef struct { int ptb; bit bv; bit bc; bit v; int pc; int ia; bit mis; bit tr; } row_t;
  row_t trace [] = '{
    '{0, 0, 0, 0,   0,   0, 0, 0},  // after reset: fetch RESET_PC
    '{0, 0, 0, 1,   0,   1, 0, 0},
    '{5, 0, 0, 1,   1,   2, 0, 0},  // PTB = j:TARG
    '{0, 0, 0, 1,   2, 100, 0, 1},  // point of transfer, fetch TARG
    '{2, 0, 0, 1, 100, 101, 0, 0},  // PTB = b:SEQ, BPB[101] weakly not taken
    '{0, 1, 1, 1, 101, 102, 1, 1},  // taken: mispredicted
    '{0, 0, 0, 0, 102,  50, 0, 0},  // squashed slot, redirect to SEQ
    '{5, 0, 0, 1,  50,  51, 0, 0},  // PTB = j:TARG
    '{0, 0, 0, 1,  51, 100, 0, 1},
    '{2, 0, 0, 1, 100, 101, 0, 0},  // PTB = b:SEQ, BPB[101] now weakly taken
    '{0, 1, 1, 1, 101,  50, 0, 1},  // predicted taken, taken
    '{7, 0, 0, 1,  50,  51, 0, 0},  // PTB = j:RS2
    '{0, 0, 0, 1,  51, 200, 0, 1},
    '{1, 0, 0, 1, 200, 201, 0, 0},  // PTB = b:TARG, BPB[201] not taken
    '{0, 1, 0, 1, 201, 202, 0, 0},  // not taken, correct
    '{5, 0, 0, 1, 202, 203, 0, 0},  // PTB = j:TARG
    '{0, 0, 0, 1, 203, 100, 0, 1},
    '{2, 0, 0, 1, 100, 101, 0, 0},  // PTB = b:SEQ, BPB[101] strongly taken
    '{0, 1, 0, 1, 101,  50, 1, 0},  // not taken: mispredicted
    '{0, 0, 0, 0,  50, 102, 0, 0},  // squashed, redirect to 102
    '{0, 0, 0, 1, 102, 103, 0, 0}
  };

  task automatic chk(string what, int cyc, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL cycle %0d %s: %0d vs %0d", cyc, what, got, exp); end
  endtask

  initial begin
    ptb_en = 0; ptb_uncond = 0; ptb_sel = PTB_NONE; br_valid = 0; br_cond = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (trace[i]) begin
      ptb_en     = trace[i].ptb != 0;
      ptb_uncond = trace[i].ptb[2];
      ptb_sel    = ptb_sel_e'(trace[i].ptb[1:0]);
      br_valid   = trace[i].bv;
      br_cond    = trace[i].bc;
      #1;
      chk("valid_ex", i, valid_ex, trace[i].v);
      chk("pc_ex", i, pc_ex, trace[i].pc);
      chk("ic_addr", i, ic_addr, trace[i].ia);
      chk("mispredict", i, ev_mispredict, trace[i].mis);
      chk("transfer", i, ev_transfer, trace[i].tr);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
