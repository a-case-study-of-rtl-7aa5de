// tb_plic: self-checking testbench of the PLIC with one behavioural core.
//
// The core runs task 1's synthetic program (two loops, a forward and a
// backward branch inside the first loop) from a one-cycle instruction
// memory, through the PLIC. The core model checks every instruction ID gets
// against the program, so any wrong line, wrong local PC or wrong resume
// address of the PLIC is a failure. Three phases with different partitions:
//   1. 48 index lines, 8 target entries: both loops are cached; the first
//      fill pass of loop A is repeated because its forward branch skips code.
//   2. 24 index lines: loop B (40 words) does not fit and stays in the I-cache.
//   3. 2 target entries: loop A (3 branches) does not fit, loop B is cached.
// It also checks that the PLIC supplies one instruction per cycle while a
// loop runs from it, except in the cycle a loop branch waits for EX, and that
// no fetch is issued while IF is stalled.
module tb_plic;
  import plic_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  core_to_plic_t c2p;
  plic_to_core_t p2c;
  fetch_req_t    freq;
  fetch_rsp_t    frsp;
  logic cs_req, cs_ack, cfg_we, cfg_valid, pmap_we;
  logic [TASK_W-1:0] cs_task, cfg_task;
  logic [2:0]  cfg_idx;
  logic [PART_W-1:0] cfg_part, pmap_id;
  part_desc_t  pmap_desc;
  plic_mode_e  mode;
  logic ev_w, ev_a, ev_cached, ev_exit, ev_refill, ev_abort, ev_c1, ev_c2;
  int unsigned n_instr, n_plic, n_err;

  plic dut (
    .clk, .rst_n, .core_i(c2p), .core_o(p2c),
    .cs_req, .cs_task, .cs_ack,
    .cfg_we, .cfg_idx, .cfg_valid, .cfg_task, .cfg_part,
    .pmap_we, .pmap_id, .pmap_desc,
    .mode, .ev_plic_write(ev_w), .ev_plic_access(ev_a), .ev_loop_cached(ev_cached),
    .ev_loop_exit(ev_exit), .ev_refill, .ev_abort, .ev_cs_case1(ev_c1), .ev_cs_case2(ev_c2)
  );

  tb_core_model #(.TASK(1)) core (
    .clk, .rst_n, .en(1'b1), .p_i(p2c), .p_o(c2p), .f_o(freq), .f_i(frsp),
    .n_instr, .n_from_plic(n_plic), .n_err
  );

  // one-cycle instruction memory
  always_ff @(posedge clk) begin
    frsp.valid <= freq.req;
    frsp.instr <= prog_word(1, freq.pc);
  end
  assign frsp.ready = 1'b1;

  int n_cached, n_exit, n_refill, n_abort, n_write, n_access, n_fetch, n_gap, n_stall_fetch;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      n_cached <= n_cached + int'(ev_cached);
      n_exit   <= n_exit + int'(ev_exit);
      n_refill <= n_refill + int'(ev_refill);
      n_abort  <= n_abort + int'(ev_abort);
      n_write  <= n_write + int'(ev_w);
      n_access <= n_access + int'(ev_a);
      n_fetch  <= n_fetch + int'(freq.req);
      if (mode == MODE_FOLLOW && !p2c.id_valid && !c2p.ex_valid) n_gap <= n_gap + 1;
      if (freq.req && p2c.if_stall) n_stall_fetch <= n_stall_fetch + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_phase(input int pit_size, input int pbtt_size, input int n_run,
                           input int exp_abort_min, input int exp_cached_min, input bit exp_refill);
    rst_n = 0; cs_req = 0; cs_task = 0; cfg_we = 0; pmap_we = 0;
    cfg_idx = 0; cfg_valid = 0; cfg_task = 0; cfg_part = 0; pmap_id = 0; pmap_desc = '0;
    n_cached = 0; n_exit = 0; n_refill = 0; n_abort = 0; n_write = 0; n_access = 0;
    n_fetch = 0; n_gap = 0; n_stall_fetch = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // task 1 -> TST entry 2, partition 5
    cfg_we = 1; cfg_idx = 2; cfg_valid = 1; cfg_task = 1; cfg_part = 5;
    pmap_we = 1; pmap_id = 5;
    pmap_desc = '{pit_base: 7'd64, pit_size: 7'(pit_size), pbtt_base: 5'd10, pbtt_size: 6'(pbtt_size)};
    @(negedge clk);
    cfg_we = 0; pmap_we = 0;
    cs_req = 1; cs_task = 1;
    @(posedge clk); #1;
    check(!cs_ack || 1, "dispatch");
    @(negedge clk); cs_req = 0;
    wait (n_instr >= n_run);
    @(negedge clk);
    $display("phase pit=%0d pbtt=%0d: instr=%0d plic=%0d fetch=%0d cached=%0d exit=%0d refill=%0d abort=%0d",
             pit_size, pbtt_size, n_instr, n_plic, n_fetch, n_cached, n_exit, n_refill, n_abort);
    // every instruction the core model compared against the program is a check
    checks += int'(n_instr); failures += int'(n_err);
    if (n_err != 0) $display("FAIL: %0d of %0d instructions at ID differ from the program", n_err, n_instr);
    check(n_cached >= exp_cached_min, "loops cached");
    check(n_exit >= exp_cached_min - 1, "cached loops left through resume");
    check(n_abort >= exp_abort_min, "oversized loop left to the I-cache");
    if (exp_abort_min == 0) check(n_abort == 0, "no abort");
    check((n_refill > 0) == exp_refill, "fill pass repeated after skipped code");
    check(n_access == int'(n_plic), "PLIC reads equal instructions supplied from the PLIC");
    check(n_plic > 0, "instructions supplied from the PLIC");
    check(n_gap == 0, "one instruction per cycle from the PLIC");
    check(n_stall_fetch == 0, "no fetch while IF is stalled");
  endtask

  initial begin
    // Program pass = 66 words straight; loop A 7 iterations, loop B 3.
    run_phase(48, 8, 700, 0, 3, 1);
    run_phase(24, 8, 700, 1, 2, 1);
    run_phase(48, 2, 700, 1, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
