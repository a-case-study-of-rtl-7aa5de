// tb_plic_local_pc: drives random combinations of increment, taken branch,
// restore and clear and compares the local PC with a reference register
// updated by the same priority rule (restore, clear, taken branch, +1, hold).
module tb_plic_local_pc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic inc, take, restore, clear;
  logic [5:0] branch_target, saved_lpc, lpc, model;

  plic_local_pc dut (.clk, .rst_n, .inc, .take, .branch_target, .restore, .saved_lpc, .clear, .lpc);

  initial begin
    inc = 0; take = 0; restore = 0; clear = 0; branch_target = 0; saved_lpc = 0; model = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (lpc != 0) failures++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      inc = ($urandom_range(3) != 0); take = ($urandom_range(5) == 0);
      restore = ($urandom_range(15) == 0); clear = ($urandom_range(15) == 0);
      branch_target = 6'($urandom); saved_lpc = 6'($urandom);
      if (restore)    model = saved_lpc;
      else if (clear) model = 0;
      else if (take)  model = branch_target;
      else if (inc)   model = model + 1;
      @(posedge clk); #1;
      checks++;
      if (lpc != model) begin failures++; $display("FAIL step %0d: %0d expected %0d", n, lpc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
