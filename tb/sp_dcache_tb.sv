// sp_dcache_tb: random word, half-word and byte loads and stores on the
// 8 KB data store against a byte-array reference model (little-endian).
// A load's value must appear on LV after the clock edge and stay there
// until the next load; the external word port is checked too.
module sp_dcache_tb;
  import sp_pkg::*;
  localparam int BYTES = 8192;
  logic        clk = 1'b0, rst_n = 1'b0;
  mem_op_e     op;
  logic [31:0] addr, wdata, lv, ext_addr, ext_wdata, ext_rdata;
  logic        ext_en, ext_we;
  logic [7:0]  model [BYTES];
  logic [31:0] exp_lv;
  int checks = 0, failures = 0;

  sp_dcache #(.SIZE_BYTES(BYTES)) dut (.clk, .rst_n, .op, .addr, .wdata, .lv,
    .ext_en, .ext_we, .ext_addr, .ext_wdata, .ext_rdata);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mword(int a);
    a = a & ~3;
    return {model[a+3], model[a+2], model[a+1], model[a]};
  endfunction

  initial begin
    mem_op_e ops [8] = '{MEM_LW, MEM_LH, MEM_LHU, MEM_LB, MEM_LBU, MEM_SW, MEM_SH, MEM_SB};
    op = MEM_NOP; addr = 0; wdata = 0; ext_en = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    @(negedge clk); rst_n = 1;
    // initialise the region used below through the external port
    for (int a = 0; a < 256; a += 4) begin
      logic [31:0] w;
      w = $urandom;
      @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = a; ext_wdata = w;
      {model[a+3], model[a+2], model[a+1], model[a]} = w;
    end
    @(negedge clk); ext_en = 0; ext_we = 0;
    exp_lv = lv;
    for (int n = 0; n < 4000; n++) begin
      int a;
      op = ops[$urandom_range(0, 7)];
      if ($urandom_range(0, 4) == 0) op = MEM_NOP;
      a = $urandom_range(0, 255);
      if (op inside {MEM_LW, MEM_SW}) a = a & ~3;
      if (op inside {MEM_LH, MEM_LHU, MEM_SH}) a = a & ~1;
      addr = a; wdata = $urandom;
      @(posedge clk);
      case (op)
        MEM_LW : exp_lv = mword(a);
        MEM_LH : exp_lv = {{16{model[a+1][7]}}, model[a+1], model[a]};
        MEM_LHU: exp_lv = {16'b0, model[a+1], model[a]};
        MEM_LB : exp_lv = {{24{model[a][7]}}, model[a]};
        MEM_LBU: exp_lv = {24'b0, model[a]};
        MEM_SW : {model[a+3], model[a+2], model[a+1], model[a]} = wdata;
        MEM_SH : {model[a+1], model[a]} = wdata[15:0];
        MEM_SB : model[a] = wdata[7:0];
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (lv !== exp_lv) begin failures++; $display("FAIL op %0d addr %0d: lv %h vs %h", op, a, lv, exp_lv); end
    end
    op = MEM_NOP;
    for (int a = 0; a < 256; a += 4) begin
      @(negedge clk); ext_en = 1; ext_addr = a;
      @(negedge clk); ext_en = 0;
      checks++;
      if (ext_rdata !== mword(a)) begin failures++; $display("FAIL ext read %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
