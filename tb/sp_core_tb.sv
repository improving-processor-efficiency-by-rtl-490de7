// sp_core_tb: runs a small program on sp_core with instruction and data
// memories modelled in the testbench (one-cycle synchronous reads, as the
// caches behave). The program sums 10..1 in a three-instruction loop whose
// branch goes through TARG (TARG = PC + SE computed before the loop) and
// compares OPER1 with RS1 (= r0), stores and reloads the sum, exercises
// shift, XOR and the adder into OPER2, and contains one instruction with an
// FPU effect, which must raise `illegal` and change nothing. Checked: the
// register file and memory results, the loop cycle count (3 per iteration
// plus one bubble for each of the two mispredictions) and the event counts.
module sp_core_tb;
  import sp_pkg::*;
  import sp_asm_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ic_re, illegal;
  logic [31:0] ic_addr, ic_rdata, pc;
  mem_op_e     dc_op;
  word_t       dc_addr, dc_wdata, dc_lv;
  sp_events_t  ev;
  logic [31:0] imem [64];
  logic [31:0] dmem [64];
  int checks = 0, failures = 0;

  sp_core #(.NREGS(32), .BPB_ENTRIES(256), .RESET_PC(0)) dut (
    .clk, .rst_n, .ic_re, .ic_addr, .ic_rdata, .dc_op, .dc_addr, .dc_wdata, .dc_lv,
    .pc, .illegal, .events(ev));

  always #5 clk = ~clk;

  // memory models
  always @(posedge clk) begin
    if (!rst_n) ic_rdata <= 0;
    else if (ic_re) ic_rdata <= imem[ic_addr[5:0]];
    if (!rst_n) dc_lv <= 0;
    else if (dc_op == MEM_LW) dc_lv <= dmem[dc_addr[7:2]];
    else if (dc_op == MEM_SW) dmem[dc_addr[7:2]] <= dc_wdata;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", what, got, exp); end
  endtask

  int t_l = -1, t_end = -1, n_ill = 0, n_mis = 0, n_bubble = 0, cyc = 0;
  logic stop = 0;
  always @(posedge clk) if (rst_n && !stop) begin
    cyc++;
    if (illegal) n_ill++;
    if (ev.mispredict) n_mis++;
    if (!ev.valid) n_bubble++;
    if (ev.valid && pc == 7 && t_l < 0) t_l = cyc;
    if (ev.valid && pc == 10 && t_end < 0) t_end = cyc;
    if (ev.valid && pc == 20) stop <= 1;
  end

  initial begin
    foreach (imem[i]) imem[i] = fa(0, E10_NOP, E10_NOP, E7_NOP);
    foreach (dmem[i]) dmem[i] = 0;
    imem[0]  = fc(29, e_rd2(0, 0), 10);                                  // RS1=RS2=r0 SE=10
    imem[1]  = fa(8, E10_NOP, e_rw(1, SRC_SE), e_cpy(2'd0, SRC_SE));     // r1=SE CP1=SE
    imem[2]  = fc(27, E10_NOP, 4);                                       // SE=4
    imem[3]  = fd(30, 3'd0, e_add(A_PC, S_SE, 1'b1), 1);                 // TARG=PC+SE=7 SE=1
    imem[4]  = fa(8, E10_NOP, E10_NOP, e_cpy(2'd1, SRC_RS1));            // CP2=RS1=0
    imem[5]  = fa(19, e_alu(ALU_ADD, S_SE, S_SE), 10'h3FF, E7_NOP);      // FPU: illegal
    imem[6]  = fa(8, E10_NOP, e_rw(2, SRC_OPER1), CPY_NOP);              // r2=OPER1
    imem[7]  = fb(20, 3'd0, e_add(S_CP2, S_CP1, 1'b0),
                  e_alu(ALU_SUB, S_CP1, S_SE), CPY_NOP);                 // L: OPER2=CP2+CP1 OPER1=CP1-SE
    imem[8]  = fb(24, ptb(1'b0, PTB_TARG), E7_NOP, E10_NOP,
                  e_cpy(2'd1, SRC_OPER2));                               // PTB=b:TARG CP2=OPER2
    imem[9]  = fa(7, e_alu(ALU_BNE, S_OPER1, S_RS1), E10_NOP,
                  e_cpy(2'd0, SRC_OPER1));                               // PC=OPER1!=RS1,@PTB CP1=OPER1
    imem[10] = fc(27, E10_NOP, 'h40);                                    // SE=0x40
    imem[11] = fa(14, e_mem(MEM_SW, S_SE, S_CP2), e_rw(3, SRC_CP2), e_simm(3)); // M[SE]=CP2 r3=CP2 SE=3
    imem[12] = fa(2, e_alu(ALU_SLL, S_CP2, S_SE), e_rw(4, SRC_CP1),
                  e_add(A_PC, S_SE, 1'b0));                              // OPER1=CP2<<SE r4=CP1 OPER2=PC+SE
    imem[13] = fa(8, E10_NOP, e_rw(5, SRC_OPER1), CPY_NOP);              // r5=OPER1
    imem[14] = fa(8, E10_NOP, e_rw(6, SRC_OPER2), CPY_NOP);              // r6=OPER2
    imem[15] = fc(27, E10_NOP, 'h40);                                    // SE=0x40
    imem[16] = fb(25, 3'd0, e_lsw(S_SE), e_alu(ALU_XOR, S_CP2, S_SE),
                  e_add(S_CP2, S_SE, 1'b0));                             // LV=M[SE] OPER1=CP2^SE OPER2=CP2+SE
    imem[17] = fa(10, E10_NOP, e_rw(7, SRC_LV), CPY_NOP);                // r7=LV
    imem[18] = fa(8, E10_NOP, e_rw(8, SRC_OPER1), CPY_NOP);              // r8=OPER1
    imem[19] = fa(8, E10_NOP, e_rw(9, SRC_OPER2), e_cpy(2'd2, SRC_PCINC)); // r9=OPER2 SEQ=PC+1
    imem[20] = fd(31, ptb(1'b1, PTB_SEQ), CPY_NOP, 0);                   // PTB=j:SEQ (idle loop)
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (stop);
    @(negedge clk);
    chk("r1", dut.u_rf.regs[1], 10);
    chk("r2 (FPU instruction had no effect)", dut.u_rf.regs[2], 0);
    chk("r3 sum", dut.u_rf.regs[3], 55);
    chk("r4 counter", dut.u_rf.regs[4], 0);
    chk("r5 shift", dut.u_rf.regs[5], 55 << 3);
    chk("r6 PC+SE", dut.u_rf.regs[6], 15);
    chk("r7 load", dut.u_rf.regs[7], 55);
    chk("r8 xor", dut.u_rf.regs[8], 55 ^ 'h40);
    chk("r9 add", dut.u_rf.regs[9], 55 + 'h40);
    chk("memory", dmem['h40 >> 2], 55);
    chk("illegal count", n_ill, 1);
    chk("mispredictions", n_mis, 2);
    chk("loop cycles", t_end - t_l, 3 * 10 + 2);
    chk("bubbles", n_bubble, 1 + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
