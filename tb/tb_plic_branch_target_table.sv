// tb_plic_branch_target_table: checks partition-bounded insertion, overwrite
// of an existing branch, the full signal, lookup hits and misses, isolation
// between two partitions and the clear of one partition, against a reference
// model of each partition kept in the testbench.
module tb_plic_branch_target_table;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] part_base;
  logic [5:0] part_size;
  logic clear, wr_en, wr_full, lookup_hit;
  logic [5:0] wr_lpc, wr_target, lookup_lpc, lookup_target;

  plic_branch_target_table dut (.clk, .rst_n, .part_base, .part_size, .clear, .wr_en, .wr_lpc,
    .wr_target, .wr_full, .lookup_lpc, .lookup_hit, .lookup_target);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int l, input int t, input bit exp_full);
    @(negedge clk);
    wr_en = 1; wr_lpc = 6'(l); wr_target = 6'(t); #1;
    check(wr_full == exp_full, $sformatf("full flag writing %0d", l));
    @(negedge clk); wr_en = 0;
  endtask

  task automatic look(input int l, input bit hit, input int t);
    lookup_lpc = 6'(l); #1;
    check(lookup_hit == hit && (!hit || lookup_target == 6'(t)),
          $sformatf("lookup %0d: hit=%0d tgt=%0d", l, lookup_hit, lookup_target));
  endtask

  initial begin
    part_base = 4; part_size = 3; clear = 0; wr_en = 0; wr_lpc = 0; wr_target = 0; lookup_lpc = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    look(5, 0, 0);
    wr(5, 1, 0); wr(9, 2, 0); wr(20, 10, 0);
    look(5, 1, 1); look(9, 1, 2); look(20, 1, 10); look(7, 0, 0);
    wr(30, 3, 1);                 // partition of 3 is full
    look(30, 0, 0);
    wr(9, 7, 0);                  // overwrite in place
    look(9, 1, 7);
    // other partition sees nothing of the first and has its own entries
    part_base = 0; part_size = 4;
    look(5, 0, 0); look(9, 0, 0);
    wr(5, 33, 0); wr(6, 34, 0); wr(7, 35, 0); wr(8, 36, 0); wr(11, 1, 1);
    look(5, 1, 33); look(8, 1, 36);
    part_base = 4; part_size = 3;
    look(5, 1, 1); look(9, 1, 7); look(20, 1, 10);
    // clear the first partition only
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    look(5, 0, 0); look(9, 0, 0);
    part_base = 0; part_size = 4;
    look(6, 1, 34);
    // random fill of the whole table as one partition against a model
    begin
      int mt [int];
      part_base = 0; part_size = 32;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int n = 0; n < 32; n++) begin
        int l, t;
        l = int'($urandom_range(63)); t = int'($urandom_range(63));
        wr(l, t, 0);
        mt[l] = t;
      end
      for (int l = 0; l < 64; l++) look(l, mt.exists(l), mt.exists(l) ? mt[l] : 0);
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
