// tb_plic_branch_addr_logic: loads random loop bases and branch targets and
// checks the target local PC, the in-loop flag and the resume address
// against arithmetic done in the testbench; also checks the restore path.
module tb_plic_branch_addr_logic;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load_base, load_target, restore, in_loop;
  logic [25:0] pc, dec_target, restore_base, base, resume_pc;
  logic [5:0] resume_lpc, target_lpc;

  plic_branch_addr_logic dut (.clk, .rst_n, .load_base, .pc, .load_target, .dec_target,
    .restore, .restore_base, .resume_lpc, .base, .target_lpc, .target_in_loop(in_loop), .resume_pc);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    load_base = 0; load_target = 0; restore = 0; pc = 0; dec_target = 0; restore_base = 0; resume_lpc = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int unsigned b, off, tgt;
      b   = ($urandom_range(26'h3fff00) & ~32'h7);
      off = $urandom_range(80);              // words from the loop start, some beyond 63
      tgt = (n % 7 == 0) ? b - 16 : b + 8 + off * 8;
      @(negedge clk);
      if (n % 5 == 4) begin
        restore = 1; restore_base = 26'(b + 8);
      end else begin
        load_base = 1; pc = 26'(b);
      end
      @(negedge clk);
      load_base = 0; restore = 0;
      check(base == 26'(b + 8), "base is the address after slp");
      load_target = 1; dec_target = 26'(tgt);
      @(negedge clk);
      load_target = 0;
      resume_lpc = 6'($urandom);
      #1;
      if (n % 7 == 0) check(!in_loop, "target before the loop is not in it");
      else begin
        check(in_loop == (off < 64), "in-loop flag");
        if (off < 64) check(target_lpc == 6'(off), $sformatf("target lpc %0d vs %0d", target_lpc, off));
      end
      check(resume_pc == 26'(b + 8 + resume_lpc * 8), "resume address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
