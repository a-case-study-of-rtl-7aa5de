// tb_switch_fabric: drives random signals on all five core ports, the PLIC,
// the I-cache and the memory ports, with a random running task, and checks
// every routing rule: the running core alone reaches the PLIC and the
// I-cache, its fetch is gated by the IF stall and tagged with its task
// number, other cores see IF stalled and nothing for ID, an I-cache answer
// returns to the core that asked even after a switch, and a refill goes to
// and comes from the memory named by the line address.
module tb_switch_fabric;
  import plic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] active;
  logic running, ic_req, ic_ready, ic_rsp_valid, ic_mem_req, ic_mem_valid;
  core_to_plic_t core_i [5];
  plic_to_core_t core_o [5];
  fetch_req_t fetch_i [5];
  fetch_rsp_t fetch_o [5];
  core_to_plic_t plic_i;
  plic_to_core_t plic_o;
  logic [ADDR_W-1:0] ic_addr;
  logic [63:0] ic_rsp_instr;
  logic [ADDR_W-6:0] ic_mem_line;
  logic [255:0] ic_mem_data;
  mem_req_t mem_o [5];
  mem_rsp_t mem_i [5];

  switch_fabric dut (.clk, .rst_n, .active, .running, .core_i, .core_o, .fetch_i, .fetch_o,
    .plic_i, .plic_o, .ic_req, .ic_addr, .ic_ready, .ic_rsp_valid, .ic_rsp_instr,
    .ic_mem_req, .ic_mem_line, .ic_mem_valid, .ic_mem_data, .mem_o, .mem_i);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [255:0] r256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    int owner;
    owner = 0;
    active = 0; running = 0; ic_ready = 0; ic_rsp_valid = 0; ic_rsp_instr = 0; ic_mem_req = 0;
    ic_mem_line = 0; plic_o = '0;
    for (int i = 0; i < 5; i++) begin core_i[i] = '0; fetch_i[i] = '0; mem_i[i] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int a, mt;
      @(negedge clk);
      running = ($urandom_range(7) != 0);
      active = 3'($urandom_range(4)); a = int'(active);
      for (int i = 0; i < 5; i++) begin
        core_i[i] = {$urandom, $urandom, $urandom, $urandom};
        core_i[i].dec_op = loop_op_e'($urandom_range(4));
        fetch_i[i] = {1'($urandom), 26'($urandom)};
        mem_i[i] = {1'($urandom), r256()};
      end
      plic_o = {$urandom, $urandom, $urandom};
      ic_ready = 1'($urandom); ic_rsp_valid = 1'($urandom); ic_rsp_instr = {$urandom, $urandom};
      ic_mem_req = 1'($urandom);
      mt = int'($urandom_range(4));
      ic_mem_line = {3'(mt), 21'($urandom)};
      #1;
      check(plic_i == (running ? core_i[a] : '0), "PLIC sees the running core");
      for (int i = 0; i < 5; i++) begin
        if (running && i == a) check(core_o[i] == plic_o, "running core gets the PLIC outputs");
        else check(!core_o[i].id_valid && core_o[i].if_stall && !core_o[i].resume, "idle core held");
        check(fetch_o[i].ready == (running && i == a && ic_ready && fetch_i[a].req && !plic_o.if_stall),
              "fetch ready routing");
        check(fetch_o[i].valid == (ic_rsp_valid && i == owner), "answer to the requesting core");
        check(mem_o[i].req == (ic_mem_req && i == mt) && mem_o[i].line == ic_mem_line[20:0],
              "refill to the task's memory");
      end
      check(ic_req == (running && fetch_i[a].req && !plic_o.if_stall), "fetch gated by IF stall");
      check(ic_addr == {active, fetch_i[a].pc}, "global fetch address");
      check(ic_mem_valid == mem_i[mt].valid && ic_mem_data == mem_i[mt].data, "refill data from the task's memory");
      @(posedge clk);
      if (ic_req && ic_ready) owner = a;
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
