// tb_task_scheduler: starts the scheduler at a given first task and answers
// its switch requests after a random delay. Checks the round-robin order, that
// each task runs exactly `interval` cycles before the next request, that only
// the dispatched core is enabled and that the switch count is right.
module tb_task_scheduler;
  import plic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, cs_req, cs_ack, running;
  logic [31:0] interval, n_switches;
  logic [2:0] first_task, cs_task, active;
  logic [4:0] core_en;

  task_scheduler dut (.clk, .rst_n, .start, .interval, .first_task, .cs_req, .cs_task, .cs_ack,
    .core_en, .active, .running, .n_switches);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    start = 0; cs_ack = 0;
    for (int run = 0; run < 3; run++) begin
      int exp_task, run_cycles;
      rst_n = 0; interval = 32'(5 + run * 9); first_task = 3'(run * 2 % 5);
      repeat (2) @(negedge clk); rst_n = 1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      exp_task = int'(first_task);
      for (int sw = 0; sw < 12; sw++) begin
        check(cs_req && int'(cs_task) == exp_task, $sformatf("request for task %0d got %0d", exp_task, cs_task));
        repeat ($urandom_range(3)) @(negedge clk);
        cs_ack = 1; @(negedge clk); cs_ack = 0;
        check(!cs_req && int'(active) == exp_task && core_en == 5'(1 << exp_task), "dispatch and clock enable");
        run_cycles = 0;
        while (!cs_req) begin @(negedge clk); run_cycles++; end
        check(run_cycles == int'(interval), $sformatf("slice %0d cycles", run_cycles));
        check(core_en == 5'(1 << exp_task), "running core keeps its enable until the switch");
        check(n_switches == 32'(sw), "switch count");
        exp_task = (exp_task + 1) % 5;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
