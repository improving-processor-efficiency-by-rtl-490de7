// sp_interconnect_tb: random register contents and random selects on all
// ports; every output must equal the selected register (PC+1 for the
// incremented-PC source, zero for unused codes).
module sp_interconnect_tb;
  import sp_pkg::*;
  localparam int NP = 9;
  sp_regs_t regs;
  src_e     sel  [NP];
  word_t    data [NP];
  int checks = 0, failures = 0;

  sp_interconnect #(.NPORTS(NP)) dut (.regs, .sel, .data);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_val(sp_regs_t r, int s);
    case (s)
      0: return r.rs1;   1: return r.rs2;   2: return r.se;    3: return r.lv;
      4: return r.oper1; 5: return r.oper2; 6: return r.cp1;   7: return r.cp2;
      8: return r.targ;  9: return r.seq;  10: return r.pc;   11: return r.pc + 1;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 500; n++) begin
      regs = '{rs1: $urandom, rs2: $urandom, se: $urandom, lv: $urandom, oper1: $urandom,
               oper2: $urandom, cp1: $urandom, cp2: $urandom, targ: $urandom,
               seq: $urandom, pc: $urandom};
      foreach (sel[i]) sel[i] = src_e'((n + 3 * i) % 16);
      #1;
      foreach (sel[i]) begin
        checks++;
        if (data[i] !== expect_val(regs, int'(sel[i]))) begin
          failures++;
          $display("FAIL port %0d sel %0d: %h", i, sel[i], data[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
