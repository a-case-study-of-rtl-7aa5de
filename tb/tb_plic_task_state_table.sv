// tb_plic_task_state_table: configures task entries and partition
// descriptors, then saves random loop states for random tasks and checks
// that every lookup returns the task's partition ID, descriptor and last
// saved state, that unknown tasks miss, and that reconfiguring an entry
// resets its state.
module tb_plic_task_state_table;
  import plic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, cfg_valid, pmap_we, save_en, look_hit;
  logic [2:0] cfg_idx, cfg_task, cfg_part, pmap_id, save_task, look_task, look_part;
  part_desc_t pmap_desc, look_desc;
  loop_state_t save_state, look_state;

  plic_task_state_table dut (.clk, .rst_n, .cfg_we, .cfg_idx, .cfg_valid, .cfg_task, .cfg_part,
    .pmap_we, .pmap_id, .pmap_desc, .save_en, .save_task, .save_state,
    .look_task, .look_hit, .look_part, .look_desc, .look_state);

  part_desc_t  descs  [8];
  loop_state_t states [8];   // indexed by task
  int          part_of [8];  // -1: task not configured

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic look(input int t);
    look_task = 3'(t); #1;
    if (part_of[t] < 0) check(!look_hit, $sformatf("task %0d absent", t));
    else begin
      check(look_hit && look_part == 3'(part_of[t]), $sformatf("task %0d partition", t));
      check(look_desc == descs[part_of[t]], $sformatf("task %0d descriptor", t));
      check(look_state == states[t], $sformatf("task %0d saved state", t));
    end
  endtask

  initial begin
    cfg_we = 0; cfg_valid = 0; cfg_idx = 0; cfg_task = 0; cfg_part = 0; pmap_we = 0; pmap_id = 0;
    pmap_desc = '0; save_en = 0; save_task = 0; save_state = '0; look_task = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 8; t++) part_of[t] = -1;
    // tasks 0..5 in entries 7..2, partitions (t+3)%8
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = 3'(7 - t); cfg_valid = 1; cfg_task = 3'(t); cfg_part = 3'((t + 3) % 8);
      part_of[t] = (t + 3) % 8; states[t] = '0;
    end
    for (int p = 0; p < 8; p++) begin
      @(negedge clk);
      cfg_we = 0; pmap_we = 1; pmap_id = 3'(p);
      pmap_desc = '{pit_base: 7'($urandom), pit_size: 7'($urandom_range(64)),
                    pbtt_base: 5'($urandom), pbtt_size: 6'($urandom_range(32))};
      descs[p] = pmap_desc;
    end
    @(negedge clk); pmap_we = 0;
    for (int t = 0; t < 8; t++) look(t);
    for (int n = 0; n < 300; n++) begin
      int t;
      t = int'($urandom_range(7));
      @(negedge clk);
      save_en = 1; save_task = 3'(t);
      save_state = '{mode: plic_mode_e'($urandom_range(2)), lpc: 6'($urandom), base: 26'($urandom), skipped: 1'($urandom)};
      if (part_of[t] >= 0) states[t] = save_state;
      @(negedge clk); save_en = 0;
      look(int'($urandom_range(7)));
      look(t);
    end
    // reconfigure task 2's entry (index 5): state returns to non-loop, local PC 0
    @(negedge clk);
    cfg_we = 1; cfg_idx = 5; cfg_valid = 1; cfg_task = 2; cfg_part = 1;
    part_of[2] = 1; states[2] = '0;
    @(negedge clk); cfg_we = 0;
    look(2);
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
