// sp_icache_tb: fills the 8 KB instruction store with a pattern, then reads
// random addresses and checks that each word appears one clock after it is
// requested and that the output holds while `re` is low.
module sp_icache_tb;
  localparam int WORDS = 2048;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        re, we;
  logic [31:0] addr, rdata, waddr, wdata;
  int checks = 0, failures = 0;

  sp_icache #(.SIZE_BYTES(8192)) dut (.clk, .rst_n, .re, .addr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'h5A5A_0000;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] last;
    re = 0; we = 0; addr = 0; waddr = 0; wdata = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = i; wdata = pattern(i);
    end
    @(negedge clk); we = 0;
    last = 0;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(0, WORDS - 1);
      re = $urandom_range(0, 3) != 0;
      addr = a;
      @(negedge clk);
      if (re) last = pattern(a);
      checks++;
      if (rdata !== last) begin failures++; $display("FAIL read %0d: %h vs %h", a, rdata, last); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
