// sp_regfile_tb: random reads and writes of the register file against a
// reference array; checks that register 0 stays zero and that a read in the
// cycle of a write to the same register returns the old value.
module sp_regfile_tb;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] ref_regs [32];
  int checks = 0, failures = 0;

  sp_regfile #(.NREGS(32), .XLEN(32)) dut (.clk, .rst_n, .raddr1(ra1), .rdata1(rd1),
    .raddr2(ra2), .rdata2(rd2), .we, .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    foreach (ref_regs[i]) ref_regs[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = $urandom_range(0, 3) != 0;
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = (n % 7 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      chk("read port 1", rd1, ref_regs[ra1]);
      chk("read port 2", rd2, ref_regs[ra2]);
      @(posedge clk);
      if (we && wa != 0) ref_regs[wa] = wd;
    end
    @(negedge clk); we = 1; wa = 0; wd = 32'hFFFF_FFFF; ra1 = 0;
    @(negedge clk); we = 0; #1 chk("register 0 reads zero", rd1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
