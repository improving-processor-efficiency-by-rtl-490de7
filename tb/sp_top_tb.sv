// sp_top_tb: end-to-end test of the static pipeline processor at its
// default sizes (8 KB stores, 256-entry BPB, 32 registers).
//
// Program part 1 is the loop "for (i = 0; i < 100; i++) a[i] += m;" in the
// fully optimised static-pipeline form: the loop body is three
// instructions, the loop-invariant values live in CP1 (m), SE (4) and RS2
// (end address), CP2 walks the array, and the backward branch uses SEQ as
// its target (SEQ = PC + 1 set just before the loop) announced by a
// conditional PTB one instruction ahead:
//   L2: LV = M[CP2];      OPER2 = CP2 + SE;
//       OPER1 = LV + CP1; PTB = b:&SEQ;
//       M[CP2] = OPER1;   CP2 = OPER2;  PC = OPER2 != RS2, @PTB;
// Part 2 covers the remaining mechanisms: TARG = PC + SE, a conditional
// branch correctly predicted not taken, an unconditional jump through TARG
// that skips an instruction, a long immediate built in two halves, word,
// half-word and byte memory accesses, and an indirect jump through RS2.
// Checked: the array, memory and register results, the loop cycle count
// (3 cycles per iteration plus one bubble per misprediction), and the
// number of each event.
module sp_top_tb;
  import sp_pkg::*;
  import sp_asm_pkg::*;

  localparam int N     = 100;
  localparam int M     = 7;
  localparam int ABASE = 'h400;
  localparam int WATCHDOG = 5000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        prog_we = 1'b0, dmem_en = 1'b0, dmem_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_data = '0, dmem_addr = '0, dmem_wdata = '0;
  logic [31:0] dmem_rdata, pc;
  logic        illegal;
  sp_events_t  ev;

  sp_top dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data,
              .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
              .pc, .illegal, .events(ev));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [31:0] prog [$];

  task automatic build_program();
    // set-up: r9 = &a[0], r5 = &a[N], r6 = m
    prog.push_back(fc(28, E10_NOP, ABASE));                            // 0  SE = a
    prog.push_back(fa(8, E10_NOP, e_rw(9, SRC_SE), CPY_NOP));          // 1  r9 = SE
    prog.push_back(fc(28, E10_NOP, ABASE + 4*N));                      // 2  SE = a+4N
    prog.push_back(fa(8, E10_NOP, e_rw(5, SRC_SE), CPY_NOP));          // 3  r5 = SE
    prog.push_back(fc(28, E10_NOP, M));                                // 4  SE = m
    prog.push_back(fa(8, E10_NOP, e_rw(6, SRC_SE), CPY_NOP));          // 5  r6 = SE
    // loop preheader
    prog.push_back(fc(29, e_rd2(6, 5), 4));                            // 6  RS1=r6 RS2=r5 SE=4
    prog.push_back(fa(11, E10_NOP, e_rd2(9, 5), e_cpy(2'd0, SRC_RS1)));// 7  CP1=RS1 RS1=r9
    prog.push_back(fd(31, 3'd0, e_cpy(2'd1, SRC_RS1), 4));             // 8  CP2=RS1 SE=4
    prog.push_back(fa(8, E10_NOP, E10_NOP, e_cpy(2'd2, SRC_PCINC)));   // 9  SEQ=PC+1
    // L2 = 10
    prog.push_back(fa(1, E10_NOP, e_mem(MEM_LW, S_CP2, S_RS1),
                      e_add(S_CP2, S_SE, 1'b0)));                      // 10 LV=M[CP2] OPER2=CP2+SE
    prog.push_back(fb(24, ptb(1'b0, PTB_SEQ), E7_NOP,
                      e_alu(ALU_ADD, S_LV, S_CP1), CPY_NOP));          // 11 OPER1=LV+CP1 PTB=b:SEQ
    prog.push_back(fa(7, e_alu(ALU_BNE, S_OPER2, S_RS2),
                      e_mem(MEM_SW, S_CP2, S_OPER1),
                      e_cpy(2'd1, SRC_OPER2)));                        // 12 M[CP2]=OPER1 CP2=OPER2 PC=OPER2!=RS2,@PTB
    // part 2
    prog.push_back(fc(27, E10_NOP, 6));                                // 13 SE=6
    prog.push_back(fd(30, 3'd0, e_add(A_PC, S_SE, 1'b1), 'h1234));     // 14 TARG=PC+SE (=20) SE=0x1234
    prog.push_back(fb(24, ptb(1'b0, PTB_TARG), E7_NOP, E10_NOP, CPY_NOP)); // 15 PTB=b:TARG
    prog.push_back(fa(9, e_alu(ALU_BEQ, S_SE, S_CP1), e_rd2(0, 0), CPY_NOP)); // 16 PC=SE==CP1,@PTB (not taken)
    prog.push_back(fd(31, ptb(1'b1, PTB_TARG), CPY_NOP, 'hABCD, 1'b1));// 17 PTB=j:TARG SE={ABCD,SE[15:0]}
    prog.push_back(fa(8, E10_NOP, e_rw(10, SRC_SE), CPY_NOP));         // 18 r10=SE (point of transfer)
    prog.push_back(fa(8, E10_NOP, e_rw(11, SRC_SE), CPY_NOP));         // 19 skipped
    prog.push_back(fc(29, e_rd2(10, 0), 'h200));                       // 20 RS1=r10 SE=0x200
    prog.push_back(fa(12, E10_NOP, e_mem(MEM_SW, S_SE, S_RS1), e_simm(2))); // 21 M[SE]=RS1 SE=2
    prog.push_back(fc(27, E10_NOP, 'h202));                            // 22 SE=0x202
    prog.push_back(fa(1, E10_NOP, e_mem(MEM_LH, S_SE, S_RS1),
                      e_add(A_PC, S_SE, 1'b0)));                       // 23 LV=M16[SE]
    prog.push_back(fa(10, E10_NOP, e_rw(12, SRC_LV), CPY_NOP));        // 24 r12=LV
    prog.push_back(fa(1, E10_NOP, e_mem(MEM_LBU, S_SE, S_RS1),
                      e_add(A_PC, S_SE, 1'b0)));                       // 25 LV=M8u[SE]
    prog.push_back(fa(14, e_mem(MEM_SB, S_SE, S_SE), e_rw(16, SRC_LV),
                      e_simm(-3)));                                    // 26 M8[SE]=SE r16=LV SE=-3
    prog.push_back(fc(27, E10_NOP, 31));                               // 27 SE=31
    prog.push_back(fa(8, E10_NOP, e_rw(13, SRC_SE), CPY_NOP));         // 28 r13=SE (r17 below)
    prog.push_back(fb(26, ptb(1'b1, PTB_RS2), CPY_NOP, e_rd2(0, 13),
                      e_add(A_PC, S_SE, 1'b0)));                       // 29 RS2=r13 PTB=j:RS2
    prog.push_back(fa(8, E10_NOP, e_rw(14, SRC_SE), CPY_NOP));         // 30 r14=SE (point of transfer)
    prog.push_back(fa(8, E10_NOP, e_rw(15, SRC_PCINC),
                      e_cpy(2'd2, SRC_PCINC)));                        // 31 r15=PC+1 SEQ=PC+1
    prog.push_back(fd(31, ptb(1'b1, PTB_SEQ), CPY_NOP, 0));            // 32 end: PTB=j:SEQ SE=0
    prog.push_back(fa(0, E10_NOP, E10_NOP, E7_NOP));                   // 33 nop, jumps back to 32
  endtask

  // Event and mechanism counters.
  int n_instr = 0, n_mispred = 0, n_transfer = 0, n_bpb = 0, n_rf_read = 0;
  int n_rf_write = 0, n_dc = 0, n_alu = 0, n_adder = 0, n_int_writes = 0;
  int n_pred_taken_ok = 0, n_pred_nt_ok = 0, n_mis_taken = 0, n_mis_nt = 0;
  int n_jump_targ = 0, n_jump_rs2 = 0, n_seq_target = 0, n_squash = 0, n_se_hi = 0;
  int t_loop_start = -1, t_loop_end = -1;
  bit r19_executed = 1'b0;
  logic stop = 1'b0;

  always @(posedge clk) if (rst_n && !stop) begin
    cycles++;
    if (ev.valid) begin
      n_instr++;
      n_rf_read    += int'(ev.rf_reads);
      n_rf_write   += int'(ev.rf_write);
      n_dc         += int'(ev.dc_access);
      n_alu        += int'(ev.alu);
      n_adder      += int'(ev.adder);
      n_bpb        += int'(ev.bpb_access);
      n_int_writes += int'(ev.int_writes);
      if (dut.u_core.c.se_en && dut.u_core.c.se_hi) n_se_hi++;
      if (pc == 10 && t_loop_start < 0) t_loop_start = cycles;
      if (pc == 13 && t_loop_end < 0)   t_loop_end = cycles;
      if (pc == 19) r19_executed = 1'b1;
      if (pc == 32) stop <= 1'b1;
    end else begin
      n_squash++;
    end
    if (ev.transfer)   n_transfer++;
    if (ev.mispredict) n_mispred++;
    if (dut.u_core.u_fetch.resolve && !dut.u_core.u_fetch.ptb_q.uncond) begin
      if (!ev.mispredict &&  dut.u_core.u_fetch.actual_taken) n_pred_taken_ok++;
      if (!ev.mispredict && !dut.u_core.u_fetch.actual_taken) n_pred_nt_ok++;
      if ( ev.mispredict &&  dut.u_core.u_fetch.actual_taken) n_mis_taken++;
      if ( ev.mispredict && !dut.u_core.u_fetch.actual_taken) n_mis_nt++;
    end
    if (ev.transfer && dut.u_core.u_fetch.ptb_q.sel == PTB_SEQ)  n_seq_target++;
    if (ev.transfer && dut.u_core.u_fetch.ptb_q.uncond && dut.u_core.u_fetch.ptb_q.sel == PTB_TARG) n_jump_targ++;
    if (ev.transfer && dut.u_core.u_fetch.ptb_q.uncond && dut.u_core.u_fetch.ptb_q.sel == PTB_RS2)  n_jump_rs2++;
    if (illegal) begin failures++; $display("FAIL illegal instruction at %0d", pc); end
  end

  initial begin
    #(10 * WATCHDOG);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mechanism(string name, int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  logic [31:0] rdw;
  task automatic dread(int addr);
    @(negedge clk); dmem_en = 1'b1; dmem_we = 1'b0; dmem_addr = addr;
    @(negedge clk); dmem_en = 1'b0; rdw = dmem_rdata;
  endtask

  initial begin
    build_program();
    // load program and data with the core in reset
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk); prog_we = 1'b0;
    for (int i = 0; i <= N; i++) begin
      @(negedge clk); dmem_en = 1'b1; dmem_we = 1'b1; dmem_addr = ABASE + 4*i;
      dmem_wdata = (i < N) ? 3*i + 1 : 0;
    end
    @(negedge clk); dmem_en = 1'b0; dmem_we = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    wait (stop);
    // the core now idles in the two-instruction loop 32/33
    for (int i = 0; i < N; i++) begin
      dread(ABASE + 4*i);
      check($sformatf("a[%0d]", i), rdw, 3*i + 1 + M);
    end
    dread(ABASE + 4*N); check("word after array untouched", rdw, 0);
    dread('h200); check("M[0x200] word, byte 0x202 overwritten", rdw, 32'hAB021234);
    check("r10 long immediate", dut.u_core.u_rf.regs[10], 32'hABCD1234);
    check("r11 skipped instruction", dut.u_core.u_rf.regs[11], 0);
    check("r12 LH sign extended", dut.u_core.u_rf.regs[12], 32'hFFFFABCD);
    check("r16 LBU zero extended", dut.u_core.u_rf.regs[16], 32'h000000CD);
    check("r14 point of transfer executed", dut.u_core.u_rf.regs[14], 31);
    check("r15 PC+1 at jump target", dut.u_core.u_rf.regs[15], 32);
    check("r9 unchanged", dut.u_core.u_rf.regs[9], ABASE);
    check("instruction 19 not executed", r19_executed, 0);
    check("loop cycles", t_loop_end - t_loop_start, 3*N + 2);
    check("mispredictions", n_mispred, 2);
    check("transfers", n_transfer, (N - 1) + 2);
    check("instructions", n_instr, 10 + 3*N + 19);  // instruction 19 is skipped
    check("BPB reads", n_bpb, N + 1);
    check("RF writes", n_rf_write, 3 + 1 + 5);
    check("RF reads", n_rf_read, 4 + 2 + 2 + 2);
    check("data accesses", n_dc, 2*N + 4);
    $display("instructions=%0d cycles=%0d ALU=%0d adder=%0d internal_writes=%0d",
             n_instr, cycles, n_alu, n_adder, n_int_writes);
    mechanism("conditional taken, predicted", n_pred_taken_ok);
    mechanism("conditional not taken, predicted", n_pred_nt_ok);
    mechanism("mispredict, actually taken", n_mis_taken);
    mechanism("mispredict, actually not taken", n_mis_nt);
    mechanism("squashed fetch", n_squash);
    mechanism("branch to SEQ", n_seq_target);
    mechanism("jump through TARG", n_jump_targ);
    mechanism("jump through RS2", n_jump_rs2);
    mechanism("long immediate high half", n_se_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
