// sp_loop_opt_tb: the loop "for (i = 0; i < 100; i++) a[i] += m" run twice
// on sp_top at its default sizes, first as the plain effect expansion of
// the MIPS loop (every MIPS instruction becomes register-file reads into
// RS1/RS2, one unit effect and a register-file write; one effect per
// instruction), then in the scheduled form with CP registers, hoisted
// constants and SEQ as the loop target (three instructions per iteration).
// Both must add m to every element (so after both runs a[i] = a0[i] + 2m).
// The counts show what static pipelining saves:
//   expansion: 19 cycles and 8 register-file reads + 3 writes per iteration
//   scheduled:  3 cycles and no register-file access per iteration
// plus one bubble for each of the two mispredictions of each loop.
module sp_loop_opt_tb;
  import sp_pkg::*;
  import sp_asm_pkg::*;

  localparam int N = 100, M = 5, ABASE = 'h200;

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

  initial begin
    #(10 * 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", what, got, exp); end
  endtask

  logic [31:0] prog [$];
  int loop_pc, exit_pc;

  // common set-up: r9 = &a[0], r5 = &a[N], r6 = m
  task automatic setup();
    prog.delete();
    prog.push_back(fc(28, E10_NOP, ABASE));
    prog.push_back(fa(8, E10_NOP, e_rw(9, SRC_SE), CPY_NOP));
    prog.push_back(fc(28, E10_NOP, ABASE + 4*N));
    prog.push_back(fa(8, E10_NOP, e_rw(5, SRC_SE), CPY_NOP));
    prog.push_back(fc(28, E10_NOP, M));
    prog.push_back(fa(8, E10_NOP, e_rw(6, SRC_SE), CPY_NOP));
  endtask

  task automatic finish_prog();
    exit_pc = prog.size();
    prog.push_back(fa(8, E10_NOP, E10_NOP, e_cpy(2'd2, SRC_PCINC)));     // SEQ = PC+1
    prog.push_back(fd(31, ptb(1'b1, PTB_SEQ), CPY_NOP, 0));              // idle loop
    prog.push_back(fa(0, E10_NOP, E10_NOP, E7_NOP));
  endtask

  function automatic logic [31:0] rd1(logic to_rs2, int r);   // RS1/RS2 = r
    return fa(16, E10_NOP, E10_NOP, e_rd1(to_rs2, 5'(r)));
  endfunction
  function automatic logic [31:0] rw(int r, src_e s);         // r = source
    return fa(8, E10_NOP, e_rw(5'(r), s), CPY_NOP);
  endfunction

  task automatic build_expanded();
    setup();
    loop_pc = prog.size();
    prog.push_back(rd1(0, 9));                                            // RS1 = r9
    prog.push_back(fa(7, E10_NOP, e_mem(MEM_LW, S_RS1, S_RS1), CPY_NOP)); // LV = M[RS1]
    prog.push_back(rw(3, SRC_LV));                                        // r3 = LV
    prog.push_back(rd1(0, 3));                                            // RS1 = r3
    prog.push_back(rd1(1, 6));                                            // RS2 = r6
    prog.push_back(fa(1, E10_NOP, E10_NOP, e_add(S_RS2, S_RS1, 1'b0)));   // OPER2 = RS1 + RS2
    prog.push_back(rw(2, SRC_OPER2));                                     // r2 = OPER2
    prog.push_back(rd1(0, 9));                                            // RS1 = r9
    prog.push_back(rd1(1, 2));                                            // RS2 = r2
    prog.push_back(fa(7, E10_NOP, e_mem(MEM_SW, S_RS1, S_RS2), CPY_NOP)); // M[RS1] = RS2
    prog.push_back(fa(12, E10_NOP, E10_NOP, e_simm(4)));                  // SE = 4
    prog.push_back(rd1(0, 9));                                            // RS1 = r9
    prog.push_back(fa(1, E10_NOP, E10_NOP, e_add(S_SE, S_RS1, 1'b0)));    // OPER2 = RS1 + SE
    prog.push_back(rw(9, SRC_OPER2));                                     // r9 = OPER2
    prog.push_back(fa(12, E10_NOP, E10_NOP, e_simm(loop_pc - (loop_pc + 15)))); // SE = offset(L2)
    prog.push_back(fa(1, E10_NOP, E10_NOP, e_add(A_PC, S_SE, 1'b1)));     // TARG = PC + SE
    prog.push_back(rd1(0, 9));                                            // RS1 = r9
    prog.push_back(fb(24, ptb(1'b0, PTB_TARG), e_rd1(1'b1, 5'd5), E10_NOP, CPY_NOP)); // RS2 = r5; PTB = b:&TARG
    prog.push_back(fa(7, e_alu(ALU_BNE, S_RS1, S_RS2), E10_NOP, CPY_NOP)); // PC = RS1 != RS2, @PTB
    finish_prog();
  endtask

  task automatic build_scheduled();
    setup();
    prog.push_back(fc(29, e_rd2(6, 5), 4));                               // RS1=r6 RS2=r5 SE=4
    prog.push_back(fa(11, E10_NOP, e_rd2(9, 5), e_cpy(2'd0, SRC_RS1)));   // CP1=RS1 RS1=r9
    prog.push_back(fd(31, 3'd0, e_cpy(2'd1, SRC_RS1), 4));                // CP2=RS1 SE=4
    prog.push_back(fa(8, E10_NOP, E10_NOP, e_cpy(2'd2, SRC_PCINC)));      // SEQ=PC+1
    loop_pc = prog.size();
    prog.push_back(fa(1, E10_NOP, e_mem(MEM_LW, S_CP2, S_RS1), e_add(S_CP2, S_SE, 1'b0)));
    prog.push_back(fb(24, ptb(1'b0, PTB_SEQ), E7_NOP, e_alu(ALU_ADD, S_LV, S_CP1), CPY_NOP));
    prog.push_back(fa(7, e_alu(ALU_BNE, S_OPER2, S_RS2), e_mem(MEM_SW, S_CP2, S_OPER1),
                      e_cpy(2'd1, SRC_OPER2)));
    finish_prog();
  endtask

  // per-run counters between the first execution of the loop head and of
  // the loop exit
  logic counting = 1'b0, stop = 1'b0;
  int l_cycles = 0, l_rf_rd = 0, l_rf_wr = 0, l_mis = 0, l_instr = 0;
  always @(posedge clk) if (rst_n && !stop) begin
    if (ev.valid && pc == loop_pc && !counting && l_cycles == 0) counting = 1'b1;
    if (ev.valid && pc == exit_pc) begin counting = 1'b0; stop <= 1'b1; end
    if (counting) begin
      l_cycles++;
      l_instr += int'(ev.valid);
      l_rf_rd += int'(ev.rf_reads);
      l_rf_wr += int'(ev.rf_write);
      l_mis   += int'(ev.mispredict);
    end
    if (illegal) begin failures++; $display("FAIL illegal at %0d", pc); end
  end

  task automatic run(string name);
    rst_n = 1'b0;
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk); prog_we = 1'b0;
    l_cycles = 0; l_rf_rd = 0; l_rf_wr = 0; l_mis = 0; l_instr = 0; stop = 1'b0; counting = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    wait (stop);
    @(negedge clk);
    $display("%-10s loop: cycles=%0d instructions=%0d rf_reads=%0d rf_writes=%0d mispredictions=%0d",
             name, l_cycles, l_instr, l_rf_rd, l_rf_wr, l_mis);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk); dmem_en = 1'b1; dmem_we = 1'b1; dmem_addr = ABASE + 4*i; dmem_wdata = 1000 - 7*i;
    end
    @(negedge clk); dmem_en = 1'b0; dmem_we = 1'b0;

    build_expanded();
    run("expanded");
    chk("expanded cycles", l_cycles, 19*N + 2);
    chk("expanded RF reads", l_rf_rd, 8*N);
    chk("expanded RF writes", l_rf_wr, 3*N);
    chk("expanded mispredictions", l_mis, 2);

    build_scheduled();
    run("scheduled");
    chk("scheduled cycles", l_cycles, 3*N + 2);
    chk("scheduled RF reads", l_rf_rd, 0);
    chk("scheduled RF writes", l_rf_wr, 0);
    chk("scheduled mispredictions", l_mis, 2);

    for (int i = 0; i < N; i++) begin
      @(negedge clk); dmem_en = 1'b1; dmem_addr = ABASE + 4*i;
      @(negedge clk); dmem_en = 1'b0;
      chk($sformatf("a[%0d]", i), dmem_rdata, 1000 - 7*i + 2*M);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
