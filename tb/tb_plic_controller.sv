// tb_plic_controller: context switches through the PLIC controller.
//
// Two behavioural cores (tasks 0 and 3) share one PLIC, each with its own
// partition, and the testbench switches between them after a random number
// of cycles, so switches land in non-loop code (case 2) and in the middle of
// loops being filled or run from the PLIC (case 1). Both cores check every
// instruction they receive against their program, so a local PC or loop
// state that is not saved and restored correctly is a failure. Also checked:
// no switch is acknowledged while a loop branch waits for EX, both kinds of
// switch happen, and cached loops keep being served from the PLIC.
module tb_plic_controller;
  import plic_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  core_to_plic_t c2p [2];
  plic_to_core_t p2c [2];
  fetch_req_t    freq [2];
  fetch_rsp_t    frsp [2];
  core_to_plic_t plic_in;
  plic_to_core_t plic_out;
  logic cs_req = 0, cs_ack, cfg_we = 0, pmap_we = 0;
  logic [TASK_W-1:0] cs_task = 0, cfg_task = 0;
  logic [2:0] cfg_idx = 0;
  logic [PART_W-1:0] cfg_part = 0, pmap_id = 0;
  part_desc_t pmap_desc = '0;
  plic_mode_e mode;
  logic ev_w, ev_a, ev_cached, ev_exit, ev_refill, ev_abort, ev_c1, ev_c2;
  int unsigned n_instr [2], n_plic [2], n_err [2];
  int act = 0;          // running core
  logic running = 0;
  localparam int TASKS [2] = '{0, 3};

  plic dut (
    .clk, .rst_n, .core_i(plic_in), .core_o(plic_out),
    .cs_req, .cs_task, .cs_ack,
    .cfg_we, .cfg_idx, .cfg_valid(1'b1), .cfg_task, .cfg_part,
    .pmap_we, .pmap_id, .pmap_desc,
    .mode, .ev_plic_write(ev_w), .ev_plic_access(ev_a), .ev_loop_cached(ev_cached),
    .ev_loop_exit(ev_exit), .ev_refill, .ev_abort, .ev_cs_case1(ev_c1), .ev_cs_case2(ev_c2)
  );

  for (genvar i = 0; i < 2; i++) begin : g_core
    tb_core_model #(.TASK(TASKS[i])) core (
      .clk, .rst_n, .en(running && act == i), .p_i(p2c[i]), .p_o(c2p[i]), .f_o(freq[i]), .f_i(frsp[i]),
      .n_instr(n_instr[i]), .n_from_plic(n_plic[i]), .n_err(n_err[i])
    );
    always_ff @(posedge clk) begin
      frsp[i].valid <= freq[i].req;
      frsp[i].instr <= prog_word(TASKS[i], freq[i].pc);
    end
    assign frsp[i].ready = 1'b1;
    always_comb begin
      p2c[i] = plic_out;
      if (!(running && act == i)) begin
        p2c[i].id_valid = 1'b0; p2c[i].if_stall = 1'b1; p2c[i].resume = 1'b0;
      end
    end
  end
  assign plic_in = running ? c2p[act] : '0;

  int n_c1 = 0, n_c2 = 0, n_bad_ack = 0, n_cached = 0;
  always_ff @(posedge clk) begin
    n_c1 <= n_c1 + int'(ev_c1);
    n_c2 <= n_c2 + int'(ev_c2);
    n_cached <= n_cached + int'(ev_cached);
    if (cs_ack && running && c2p[act].ex_valid) n_bad_ack <= n_bad_ack + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(input int idx, input int t, input int p, input part_desc_t d);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 3'(idx); cfg_task = 3'(t); cfg_part = 3'(p);
    pmap_we = 1; pmap_id = 3'(p); pmap_desc = d;
    @(negedge clk); cfg_we = 0; pmap_we = 0;
  endtask

  task automatic switch_to(input int i);
    @(negedge clk);
    cs_req = 1; cs_task = 3'(TASKS[i]);
    do @(posedge clk); while (!cs_ack);
    act = i; running = 1;   // the preempting core runs from the cycle after the acknowledge
    @(negedge clk); cs_req = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    cfg(0, 0, 2, '{pit_base: 7'd0,  pit_size: 7'd48, pbtt_base: 5'd0,  pbtt_size: 6'd8});
    cfg(1, 3, 6, '{pit_base: 7'd48, pit_size: 7'd48, pbtt_base: 5'd8,  pbtt_size: 6'd8});
    switch_to(0);
    for (int n = 0; n < 150; n++) begin
      repeat ($urandom_range(60, 5)) @(posedge clk);
      switch_to(1 - act);
    end
    repeat (50) @(posedge clk);
    $display("instr %0d/%0d plic %0d/%0d case1 %0d case2 %0d cached %0d",
             n_instr[0], n_instr[1], n_plic[0], n_plic[1], n_c1, n_c2, n_cached);
    // every instruction a core model compared against its program is a check
    for (int i = 0; i < 2; i++) begin
      checks += int'(n_instr[i]); failures += int'(n_err[i]);
      if (n_err[i] != 0) $display("FAIL: core %0d: %0d instructions at ID differ from the program", i, n_err[i]);
    end
    check(n_instr[0] > 500 && n_instr[1] > 500, "both tasks progressed");
    check(n_plic[0] > 100 && n_plic[1] > 100, "both tasks ran loops from the PLIC");
    check(n_c1 > 0, "switch away from a task using the PLIC happened");
    check(n_c2 > 0, "switch away from a task in non-loop code happened");
    check(n_c1 + n_c2 == 150, "every switch saved the preempted task");
    check(n_bad_ack == 0, "no switch while a loop branch waited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    for (int i = 0; i < 2; i++) begin
      checks += int'(n_instr[i]); failures += int'(n_err[i]);
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
