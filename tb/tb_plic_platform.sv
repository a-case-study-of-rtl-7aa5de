// tb_plic_platform: end-to-end test of the five-task platform at its default
// size (8 KB I-cache, 128/32/8-entry PLIC tables, five tasks).
//
// Five behavioural cores run synthetic programs (two loops each) from five
// 30-cycle memories through the shared I-cache, the PLIC and the switching
// logic, with round-robin switches every 5000, 10000 and 20000 cycles, each
// starting with each of the five tasks (15 configurations). Each is run twice: once with no PLIC partitions (the baseline: the
// PLIC never engages) and once with the partitions below; every run lasts
// ten time slices. The cores check every instruction they execute, so the
// instruction stream must be exact in both configurations. The testbench
// counts I-cache accesses and misses and PLIC writes and reads per executed
// instruction, evaluates the energy model (227.3 pJ per I-cache access, 6332.5 pJ per memory access,
// 56.3 pJ per PLIC access) and checks that the PLIC lowers I-cache accesses
// and energy. Partitions: index table 40/40/16/16/16 lines, branch target
// table 8/8/8/6/2 entries for tasks 0..4, so tasks 2..4 have a loop too
// large for their partition and task 4 a loop with too many branches. Every
// mechanism (fill, refill, cached loop, exit, both aborts, both kinds of
// context switch, I-cache miss, IF stall) must occur at least once.
module tb_plic_platform;
  import plic_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0;
  logic [31:0] interval = 5000, n_switches;
  logic [2:0] first_task = 0, active;
  logic [4:0] core_en;
  logic cfg_we = 0, pmap_we = 0;
  logic [2:0] cfg_idx = 0, cfg_task = 0, cfg_part = 0, pmap_id = 0;
  part_desc_t pmap_desc = '0;
  core_to_plic_t core_i [5];
  plic_to_core_t core_o [5];
  fetch_req_t fetch_i [5];
  fetch_rsp_t fetch_o [5];
  mem_req_t mem_o [5];
  mem_rsp_t mem_i [5];
  plic_mode_e plic_mode;
  logic ev_ia, ev_im, ev_pw, ev_pa, ev_cached, ev_exit, ev_refill, ev_abort, ev_c1, ev_c2;
  int unsigned n_instr [5], n_plic [5], n_err [5];

  plic_platform dut (
    .clk, .rst_n, .start, .interval, .first_task, .core_en, .active, .n_switches,
    .cfg_we, .cfg_idx, .cfg_valid(1'b1), .cfg_task, .cfg_part, .pmap_we, .pmap_id, .pmap_desc,
    .core_i, .core_o, .fetch_i, .fetch_o, .mem_o, .mem_i,
    .plic_mode, .ev_icache_access(ev_ia), .ev_icache_miss(ev_im), .ev_plic_write(ev_pw),
    .ev_plic_access(ev_pa), .ev_loop_cached(ev_cached), .ev_loop_exit(ev_exit),
    .ev_refill, .ev_abort, .ev_cs_case1(ev_c1), .ev_cs_case2(ev_c2)
  );

  for (genvar i = 0; i < 5; i++) begin : g_task
    tb_core_model #(.TASK(i)) core (
      .clk, .rst_n, .en(core_en[i]), .p_i(core_o[i]), .p_o(core_i[i]), .f_o(fetch_i[i]), .f_i(fetch_o[i]),
      .n_instr(n_instr[i]), .n_from_plic(n_plic[i]), .n_err(n_err[i])
    );
    tb_mem_model #(.TASK(i), .LAT(30)) mem (.clk, .req(mem_o[i]), .rsp(mem_i[i]));
  end

  // event counters of one run
  longint c_ia, c_im, c_pw, c_pa, c_cached, c_exit, c_refill, c_abort, c_c1, c_c2, c_fetch, c_stall, c_resume;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      c_ia <= c_ia + longint'(ev_ia);       c_im <= c_im + longint'(ev_im);
      c_pw <= c_pw + longint'(ev_pw);       c_pa <= c_pa + longint'(ev_pa);
      c_cached <= c_cached + longint'(ev_cached); c_exit <= c_exit + longint'(ev_exit);
      c_refill <= c_refill + longint'(ev_refill); c_abort <= c_abort + longint'(ev_abort);
      c_c1 <= c_c1 + longint'(ev_c1);       c_c2 <= c_c2 + longint'(ev_c2);
      for (int i = 0; i < 5; i++) begin
        if (fetch_o[i].ready) c_fetch <= c_fetch + 1;
        if (core_o[i].resume) c_resume <= c_resume + 1;
      end
      if (fetch_i[active].req && core_o[active].if_stall && core_en != 0) c_stall <= c_stall + 1;
    end
  end

  // mechanism totals over all runs
  longint t_cached, t_exit, t_refill, t_abort, t_c1, t_c2, t_miss, t_resume, t_pw;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int PIT_SZ [5]  = '{40, 40, 16, 16, 16};
  localparam int PBTT_SZ [5] = '{8, 8, 8, 6, 2};

  task automatic run(input int ivl, input int first, input bit with_plic, output real energy,
                     output longint acc, output longint miss, output real n_exec);
    int pit_b, pbtt_b;
    longint instr0, plic0;
    rst_n = 0;
    c_ia = 0; c_im = 0; c_pw = 0; c_pa = 0; c_cached = 0; c_exit = 0; c_refill = 0; c_abort = 0;
    c_c1 = 0; c_c2 = 0; c_fetch = 0; c_stall = 0; c_resume = 0;
    interval = 32'(ivl); first_task = 3'(first);
    repeat (3) @(negedge clk);
    rst_n = 1;
    if (with_plic) begin
      pit_b = 0; pbtt_b = 0;
      for (int t = 0; t < 5; t++) begin
        @(negedge clk);
        cfg_we = 1; cfg_idx = 3'(t + 1); cfg_task = 3'(t); cfg_part = 3'(t + 2);
        pmap_we = 1; pmap_id = 3'(t + 2);
        pmap_desc = '{pit_base: 7'(pit_b), pit_size: 7'(PIT_SZ[t]), pbtt_base: 5'(pbtt_b), pbtt_size: 6'(PBTT_SZ[t])};
        pit_b += PIT_SZ[t]; pbtt_b += PBTT_SZ[t];
      end
      @(negedge clk); cfg_we = 0; pmap_we = 0;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (n_switches == 10);
    @(negedge clk);
    acc = c_ia; miss = c_im;
    energy = real'(c_ia) * 227.3 + real'(c_im) * 6332.5 + real'(c_pw + c_pa) * 56.3;
    instr0 = 0; plic0 = 0;
    for (int i = 0; i < 5; i++) begin
      instr0 += n_instr[i]; plic0 += n_plic[i];
      // every instruction the core model compared against the program is a check
      checks += int'(n_instr[i]); failures += int'(n_err[i]);
      if (n_err[i] != 0) $display("FAIL: task %0d: %0d instructions at ID differ from the program", i, n_err[i]);
      check(n_instr[i] > 100, $sformatf("task %0d progressed", i));
    end
    n_exec = real'(instr0);
    $display("interval %0d first T%0d %s: instr %0d icache acc %0d miss %0d plic wr %0d rd %0d energy %.1f nJ",
             ivl, first, with_plic ? "PLIC    " : "baseline", instr0, c_ia, c_im, c_pw, c_pa, energy / 1000.0);
    check(c_ia == c_fetch, "I-cache accesses equal fetches taken");
    check(c_pa == plic0, "PLIC reads equal instructions the cores got from the PLIC");
    check(c_stall == 0, "no I-cache access while IF is stalled");
    check(c_c1 + c_c2 == (with_plic ? 10 : 10), "each switch saved the preempted task");
    if (!with_plic) check(c_pw == 0 && c_pa == 0, "baseline never uses the PLIC");
    else check(c_pa > 0, "PLIC used");
    t_cached += c_cached; t_exit += c_exit; t_refill += c_refill; t_abort += c_abort;
    t_c1 += c_c1; t_c2 += c_c2; t_miss += c_im; t_resume += c_resume; t_pw += c_pw;
  endtask

  localparam int IVLS [3] = '{5000, 10000, 20000};
  real sum_acc_red, sum_e_ratio;
  real e_base, e_plic, i_base, i_plic, acc_red, e_ratio;
  longint a_base, m_base, a_plic, m_plic;

  initial begin
    t_cached = 0; t_exit = 0; t_refill = 0; t_abort = 0; t_c1 = 0; t_c2 = 0; t_miss = 0; t_resume = 0; t_pw = 0;
    sum_acc_red = 0.0; sum_e_ratio = 0.0;
    // the evaluated configurations: three switching intervals x five starting tasks
    for (int n = 0; n < 15; n++) begin
      begin
        int k, f;
        k = n / 5; f = n % 5;
        run(IVLS[k], f, 0, e_base, a_base, m_base, i_base);
        run(IVLS[k], f, 1, e_plic, a_plic, m_plic, i_plic);
        // compare per executed instruction: the PLIC run executes more in the same time
        acc_red = 1.0 - (real'(a_plic) / i_plic) / (real'(a_base) / i_base);
        e_ratio = (e_plic / i_plic) / (e_base / i_base);
        sum_acc_red = sum_acc_red + acc_red; sum_e_ratio = sum_e_ratio + e_ratio;
        $display("%0d,T%0d: per instruction, I-cache accesses -%.1f%%, misses -%.1f%%, energy %.1f%% of baseline",
                 IVLS[k], f, 100.0 * acc_red,
                 100.0 * (1.0 - (real'(m_plic) / i_plic) / (real'(m_base) / i_base)), 100.0 * e_ratio);
        check(acc_red > 0.0, "PLIC lowers I-cache accesses per instruction");
        check(e_ratio < 1.0, "PLIC lowers memory-hierarchy energy per instruction");
      end
    end
    $display("mean over 15 configurations: I-cache accesses -%.1f%%, energy %.1f%% of baseline",
             100.0 * sum_acc_red / 15.0, 100.0 * sum_e_ratio / 15.0);
    check(t_pw > 0,     "loop instructions filled into the PLIC");
    check(t_cached > 0, "loop cached after its first iteration");
    check(t_exit > 0 && t_resume == t_exit, "cached loop left with a fetch resume");
    check(t_refill > 0, "fill pass repeated after skipped code");
    check(t_abort > 0,  "loop too large for its partition");
    check(t_c1 > 0,     "context switch from a task using the PLIC (case 1)");
    check(t_c2 > 0,     "context switch from a task in non-loop code (case 2)");
    check(t_miss > 0,   "I-cache misses");
    $display("mechanisms: cached %0d exit %0d refill %0d abort %0d case1 %0d case2 %0d misses %0d",
             t_cached, t_exit, t_refill, t_abort, t_c1, t_c2, t_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
