// sp_alu_tb: every ALU operation on random and corner operands against
// results computed here, including the branch compares.
module sp_alu_tb;
  import sp_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, res;
  logic        cond, writes, is_br;
  int checks = 0, failures = 0;

  sp_alu dut (.op, .a, .b, .result(res), .cond, .writes, .is_branch(is_br));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s op=%0d a=%h b=%h: %h vs %h", what, op, a, b, got, exp); end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] er; logic ec, ew, eb;
      op = alu_op_e'(n % 16);
      a  = (n % 5 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b  = (n % 3 == 0) ? corner[$urandom_range(0, 5)] : ((n % 4 == 0) ? a : $urandom);
      #1;
      er = 0; ec = 0; ew = 1; eb = 0;
      case (n % 16)
        0 : ew = 0;
        1 : er = a + b;
        2 : er = a - b;
        3 : er = a & b;
        4 : er = a | b;
        5 : er = a ^ b;
        6 : er = ~(a | b);
        7 : er = a << (b % 32);
        8 : er = a >> (b % 32);
        9 : er = (a >> (b % 32)) | ((a[31] && (b % 32) != 0) ? ~(32'hFFFF_FFFF >> (b % 32)) : 0);
        10: er = (signed'(a) < signed'(b)) ? 1 : 0;
        11: er = (a < b) ? 1 : 0;
        12: begin ew = 0; eb = 1; ec = (a == b); end
        13: begin ew = 0; eb = 1; ec = (a != b); end
        14: begin ew = 0; eb = 1; ec = (signed'(a) < signed'(b)); end
        default: begin ew = 0; eb = 1; ec = !(signed'(a) < signed'(b)); end
      endcase
      chk("writes", 32'(writes), 32'(ew));
      chk("is_branch", 32'(is_br), 32'(eb));
      if (ew) chk("result", res, er);
      if (eb) chk("cond", 32'(cond), 32'(ec));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
