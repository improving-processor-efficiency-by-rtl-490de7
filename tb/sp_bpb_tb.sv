// sp_bpb_tb: random reads and updates of the 256-entry prediction buffer
// against a reference model of two-bit saturating counters; a read returns
// the counter MSB from the clock edge after it was requested.
module sp_bpb_tb;
  localparam int E = 256;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       rd_en, upd_en, upd_taken, pred;
  logic [7:0] rd_idx, upd_idx;
  logic [1:0] model [E];
  logic       exp_pred;
  int checks = 0, failures = 0;

  sp_bpb #(.ENTRIES(E)) dut (.clk, .rst_n, .rd_en, .rd_idx, .pred_taken(pred),
                             .upd_en, .upd_idx, .upd_taken);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; upd_en = 0; upd_taken = 0; rd_idx = 0; upd_idx = 0;
    foreach (model[i]) model[i] = 2'b01;
    exp_pred = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (pred !== exp_pred) begin failures++; $display("FAIL pred cycle %0d", n); end
      rd_en     = $urandom_range(0, 1);
      rd_idx    = 8'($urandom_range(0, 15));
      upd_en    = $urandom_range(0, 1);
      upd_idx   = 8'($urandom_range(0, 15));
      upd_taken = $urandom_range(0, 3) != 0;
      @(posedge clk);
      if (rd_en) exp_pred = model[rd_idx][1];
      if (upd_en) begin
        if (upd_taken && model[upd_idx] != 3) model[upd_idx]++;
        if (!upd_taken && model[upd_idx] != 0) model[upd_idx]--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
