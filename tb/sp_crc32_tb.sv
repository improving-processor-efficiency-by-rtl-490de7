// sp_crc32_tb: CRC-32 (reflected, polynomial 0xEDB88320) over a generated
// buffer, run as static-pipeline code on sp_top at its default sizes.
//
// Register use in the loop: OPER1 = crc, OPER2 = byte pointer, RS1 = 1,
// RS2 = end pointer, SE = 31, CP2 = polynomial, TARG = loop head.
// Per byte: load and pointer increment, crc ^= byte, then eight bit steps
// crc = (crc >> 1) ^ (poly & -(crc & 1)) of five instructions each, the
// mask formed as (crc << 31) >>> 31; SEQ and CP1 hold intermediate values:
//   OPER1 = OPER1 >> RS1;  CP1 = OPER1          (crc >> 1; keep crc)
//   OPER1 = CP1 << SE;     SEQ = OPER1          (lsb to bit 31; keep crc>>1)
//   OPER1 = OPER1 >>> SE                        (mask)
//   OPER1 = OPER1 & CP2;   CP1 = SEQ            (mask & poly)
//   OPER1 = OPER1 ^ CP1                         (new crc)
// The last step of a byte also sets PTB = b:&TARG and the next instruction
// branches on OPER2 != RS2. The result (~crc) is stored and compared with a
// reference computed here. The loop must take 43 cycles per byte plus one
// bubble for each of its two mispredictions (first and last iteration).
// The event counts are printed with relative unit energies for an
// activity-based energy estimate.
module sp_crc32_tb;
  import sp_pkg::*;
  import sp_asm_pkg::*;

  localparam int NBYTES = 256;
  localparam int BUF    = 'h100;
  localparam int RES    = 'h40;

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
  logic [7:0]  data [NBYTES];
  logic [31:0] prog [$];
  int loop_pc, exit_pc, end_pc;

  initial begin
    #(10 * 60000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  function automatic logic [31:0] crc_ref();
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = 0; i < NBYTES; i++) begin
      c ^= {24'b0, data[i]};
      for (int k = 0; k < 8; k++) c = (c >> 1) ^ (32'hEDB8_8320 & {32{c[0]}});
    end
    return ~c;
  endfunction

  task automatic build();
    prog.push_back(fc(29, e_rd2(0, 0), 1));                              // SE = 1
    prog.push_back(fa(8, E10_NOP, e_rw(1, SRC_SE), CPY_NOP));            // r1 = 1
    prog.push_back(fc(27, E10_NOP, BUF + NBYTES));                       // SE = end
    prog.push_back(fa(8, E10_NOP, e_rw(2, SRC_SE), CPY_NOP));            // r2 = end
    prog.push_back(fc(29, e_rd2(1, 2), 'h8320));                         // RS1 = 1, RS2 = end, SE low
    prog.push_back(fd(31, 3'd0, CPY_NOP, 'hEDB8, 1'b1));                 // SE high half
    prog.push_back(fa(8, E10_NOP, E10_NOP, e_cpy(2'd1, SRC_SE)));        // CP2 = poly
    prog.push_back(fc(27, E10_NOP, 'hFFFF));                             // SE = -1
    prog.push_back(fc(27, e_alu(ALU_OR, S_SE, S_SE), BUF - 1));          // OPER1 = -1, SE = BUF-1
    prog.push_back(fb(20, 3'd0, e_add(S_SE, S_RS1, 1'b0), E10_NOP, CPY_NOP)); // OPER2 = BUF
    prog.push_back(fc(27, E10_NOP, 1));                                  // SE = 1
    prog.push_back(fd(30, 3'd0, e_add(A_PC, S_SE, 1'b1), 31));           // TARG = PC+1, SE = 31
    loop_pc = prog.size();
    prog.push_back(fa(1, E10_NOP, e_mem(MEM_LBU, S_OPER2, S_RS1),
                      e_add(S_OPER2, S_RS1, 1'b0)));                     // LV = M8[OPER2], OPER2++
    prog.push_back(fa(7, e_alu(ALU_XOR, S_OPER1, S_LV), E10_NOP, CPY_NOP)); // crc ^= byte
    for (int k = 0; k < 8; k++) begin
      prog.push_back(fa(7, e_alu(ALU_SRL, S_OPER1, S_RS1), E10_NOP, e_cpy(2'd0, SRC_OPER1)));
      prog.push_back(fa(7, e_alu(ALU_SLL, S_CP1, S_SE), E10_NOP, e_cpy(2'd2, SRC_OPER1)));
      prog.push_back(fa(7, e_alu(ALU_SRA, S_OPER1, S_SE), E10_NOP, CPY_NOP));
      prog.push_back(fa(7, e_alu(ALU_AND, S_OPER1, S_CP2), E10_NOP, e_cpy(2'd0, SRC_SEQ)));
      if (k == 7)
        prog.push_back(fb(24, ptb(1'b0, PTB_TARG), E7_NOP, e_alu(ALU_XOR, S_OPER1, S_CP1), CPY_NOP));
      else
        prog.push_back(fa(7, e_alu(ALU_XOR, S_OPER1, S_CP1), E10_NOP, CPY_NOP));
    end
    prog.push_back(fa(7, e_alu(ALU_BNE, S_OPER2, S_RS2), E10_NOP, CPY_NOP)); // PC = OPER2 != RS2, @PTB
    exit_pc = prog.size();
    prog.push_back(fc(27, e_alu(ALU_NOR, S_OPER1, S_OPER1), RES));       // OPER1 = ~crc, SE = RES
    prog.push_back(fa(14, e_mem(MEM_SW, S_SE, S_OPER1), e_rw(3, SRC_OPER1), e_simm(0))); // store, r3
    prog.push_back(fa(8, E10_NOP, E10_NOP, e_cpy(2'd2, SRC_PCINC)));     // SEQ = PC+1
    end_pc = prog.size();
    prog.push_back(fd(31, ptb(1'b1, PTB_SEQ), CPY_NOP, 0));              // idle loop
    prog.push_back(fa(0, E10_NOP, E10_NOP, E7_NOP));
  endtask

  int cycles = 0, n_instr = 0, n_rf = 0, n_alu = 0, n_dc = 0, n_bpb = 0, n_iw = 0, n_mis = 0;
  int t_loop = -1, t_exit = -1;
  logic stop = 1'b0;
  always @(posedge clk) if (rst_n && !stop) begin
    cycles++;
    n_mis += int'(ev.mispredict);
    if (illegal) begin failures++; $display("FAIL illegal at %0d", pc); end
    if (ev.valid) begin
      n_instr++;
      n_rf  += int'(ev.rf_reads) + int'(ev.rf_write);
      n_alu += int'(ev.alu);
      n_dc  += int'(ev.dc_access);
      n_bpb += int'(ev.bpb_access);
      n_iw  += int'(ev.int_writes);
      if (pc == loop_pc && t_loop < 0) t_loop = cycles;
      if (pc == exit_pc && t_exit < 0) t_exit = cycles;
      if (pc == end_pc) stop <= 1'b1;
    end
  end

  initial begin
    real energy;
    foreach (data[i]) data[i] = 8'($urandom);
    build();
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk); prog_we = 1'b0;
    for (int w = 0; w < NBYTES / 4; w++) begin
      @(negedge clk); dmem_en = 1'b1; dmem_we = 1'b1; dmem_addr = BUF + 4*w;
      dmem_wdata = {data[4*w+3], data[4*w+2], data[4*w+1], data[4*w]};
    end
    @(negedge clk); dmem_en = 1'b0; dmem_we = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    wait (stop);
    @(negedge clk); dmem_en = 1'b1; dmem_addr = RES;
    @(negedge clk); dmem_en = 1'b0;
    chk("stored CRC", dmem_rdata, crc_ref());
    chk("r3 CRC", dut.u_core.u_rf.regs[3], crc_ref());
    chk("loop cycles", t_exit - t_loop, 43 * NBYTES + 2);
    chk("mispredictions", n_mis, 2);
    chk("BPB reads", n_bpb, NBYTES);
    energy = 5.10 * (cycles + n_dc) + 0.65 * n_bpb + 1.00 * n_rf + 4.11 * n_alu + 0.10 * n_iw;
    $display("crc=%h cycles=%0d instructions=%0d ic=%0d dc=%0d bpb=%0d rf=%0d alu=%0d internal_writes=%0d",
             crc_ref(), cycles, n_instr, cycles, n_dc, n_bpb, n_rf, n_alu, n_iw);
    $display("relative energy (register-file access = 1): %0.1f", energy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
