// plic_platform: five-task platform with a shared I-cache and the PLIC.
//
// One core and one program memory per task, a task scheduler that lets one
// core run at a time and switches round-robin every `interval` cycles, a
// shared 8 KB 2-way I-cache between the cores and the memories, and the
// partitioned loop instruction cache (PLIC) in the ID stage of whichever core
// runs. Switching logic steered by the scheduler connects the running core
// to the PLIC and the I-cache and the I-cache to the memory of the task that
// missed. Together this behaves as a multitasking uniprocessor whose tasks
// share the I-cache (and interfere in it) but use separate PLIC partitions.
//
// The cores and the memories are not part of this module: their signals are
// ports (core_*, fetch_*, mem_*, core_en as the cores' clock enables). The
// operating system's start-up configuration of the task state table and of
// the partitions enters through cfg_* and pmap_*; scheduling starts with a
// pulse on start. ev_* pulse once per event of the energy model (I-cache
// access and miss, PLIC write and read) and per PLIC mechanism, for counting.
module plic_platform
  import plic_pkg::*;
#(
  parameter int unsigned N = N_CORES
) (
  input  logic              clk,
  input  logic              rst_n,
  // scheduler control
  input  logic              start,
  input  logic [31:0]       interval,
  input  logic [TASK_W-1:0] first_task,
  output logic [N-1:0]      core_en,
  output logic [TASK_W-1:0] active,
  output logic [31:0]       n_switches,
  // PLIC configuration
  input  logic              cfg_we,
  input  logic [$clog2(TST_DEPTH)-1:0] cfg_idx,
  input  logic              cfg_valid,
  input  logic [TASK_W-1:0] cfg_task,
  input  logic [PART_W-1:0] cfg_part,
  input  logic              pmap_we,
  input  logic [PART_W-1:0] pmap_id,
  input  part_desc_t        pmap_desc,
  // cores
  input  core_to_plic_t     core_i  [N],
  output plic_to_core_t     core_o  [N],
  input  fetch_req_t        fetch_i [N],
  output fetch_rsp_t        fetch_o [N],
  // memories
  output mem_req_t          mem_o [N],
  input  mem_rsp_t          mem_i [N],
  // events
  output plic_mode_e        plic_mode,
  output logic              ev_icache_access,
  output logic              ev_icache_miss,
  output logic              ev_plic_write,
  output logic              ev_plic_access,
  output logic              ev_loop_cached,
  output logic              ev_loop_exit,
  output logic              ev_refill,
  output logic              ev_abort,
  output logic              ev_cs_case1,
  output logic              ev_cs_case2
);

  localparam int unsigned OFF_W = $clog2(LINE_BYTES);

  logic              cs_req, cs_ack, running;
  logic [TASK_W-1:0] cs_task;
  core_to_plic_t     plic_i;
  plic_to_core_t     plic_o;
  logic              ic_req, ic_ready, ic_rsp_valid, ic_mem_req, ic_mem_valid;
  logic [ADDR_W-1:0] ic_addr;
  logic [INSTR_W-1:0] ic_rsp_instr;
  logic [ADDR_W-OFF_W-1:0] ic_mem_line;
  logic [LINE_W-1:0] ic_mem_data;

  task_scheduler #(.N(N)) u_sched (
    .clk, .rst_n, .start, .interval, .first_task,
    .cs_req, .cs_task, .cs_ack, .core_en, .active, .running, .n_switches
  );

  plic u_plic (
    .clk, .rst_n, .core_i(plic_i), .core_o(plic_o),
    .cs_req, .cs_task, .cs_ack,
    .cfg_we, .cfg_idx, .cfg_valid, .cfg_task, .cfg_part,
    .pmap_we, .pmap_id, .pmap_desc,
    .mode(plic_mode), .ev_plic_write, .ev_plic_access, .ev_loop_cached,
    .ev_loop_exit, .ev_refill, .ev_abort, .ev_cs_case1, .ev_cs_case2
  );

  switch_fabric #(.N(N)) u_switch (
    .clk, .rst_n, .active, .running,
    .core_i, .core_o, .fetch_i, .fetch_o,
    .plic_i, .plic_o,
    .ic_req, .ic_addr, .ic_ready, .ic_rsp_valid, .ic_rsp_instr,
    .ic_mem_req, .ic_mem_line, .ic_mem_valid, .ic_mem_data,
    .mem_o, .mem_i
  );

  icache u_icache (
    .clk, .rst_n,
    .req(ic_req), .addr(ic_addr), .ready(ic_ready),
    .rsp_valid(ic_rsp_valid), .rsp_instr(ic_rsp_instr),
    .mem_req(ic_mem_req), .mem_line(ic_mem_line),
    .mem_valid(ic_mem_valid), .mem_data(ic_mem_data),
    .ev_access(ev_icache_access), .ev_miss(ev_icache_miss)
  );

endmodule
