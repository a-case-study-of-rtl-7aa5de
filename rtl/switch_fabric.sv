// switch_fabric: switching logic of the five-core platform.
//
// The platform emulates a multitasking uniprocessor with one core and one
// program memory per task. Three switches, steered by the task scheduler,
// make the shared PLIC and I-cache behave as if one processor ran all tasks:
//   - the PLIC switch connects the running core's fetch/decode/execute
//     signals to the PLIC and returns the PLIC outputs to it; other cores
//     see IF stalled and no instruction for ID;
//   - the I-cache switch forwards the running core's fetch request, gated by
//     the PLIC's IF stall so that instructions supplied by the PLIC cost no
//     I-cache access, with the global address {task, pc}; the answer goes
//     back to the core that made the request;
//   - the memory switch sends an I-cache line refill to the memory of the
//     task whose address missed (the task field of the line address) and
//     returns that memory's line.
// Combinational, except for the register that remembers which core owns an
// outstanding I-cache request. The three switches follow the reference
// platform; the address format and the gating by the IF stall are this
// design's own choices.
module switch_fabric
  import plic_pkg::*;
#(
  parameter int unsigned N = N_CORES,
  localparam int unsigned OFF_W = $clog2(LINE_BYTES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [TASK_W-1:0]       active,
  input  logic                    running,
  // cores
  input  core_to_plic_t           core_i  [N],
  output plic_to_core_t           core_o  [N],
  input  fetch_req_t              fetch_i [N],
  output fetch_rsp_t              fetch_o [N],
  // PLIC
  output core_to_plic_t           plic_i,
  input  plic_to_core_t           plic_o,
  // I-cache
  output logic                    ic_req,
  output logic [ADDR_W-1:0]       ic_addr,
  input  logic                    ic_ready,
  input  logic                    ic_rsp_valid,
  input  logic [INSTR_W-1:0]      ic_rsp_instr,
  input  logic                    ic_mem_req,
  input  logic [ADDR_W-OFF_W-1:0] ic_mem_line,
  output logic                    ic_mem_valid,
  output logic [LINE_W-1:0]       ic_mem_data,
  // memories
  output mem_req_t                mem_o [N],
  input  mem_rsp_t                mem_i [N]
);

  logic [TASK_W-1:0] owner;
  logic [TASK_W-1:0] mtask;

  // PLIC switch.
  always_comb begin
    plic_i = '0;
    if (running) plic_i = core_i[active];
    for (int i = 0; i < N; i++) begin
      core_o[i] = '{id_valid: 1'b0, id_instr: plic_o.id_instr, if_stall: 1'b1,
                    resume: 1'b0, resume_pc: plic_o.resume_pc};
      if (running && int'(active) == i) core_o[i] = plic_o;
    end
  end

  // I-cache switch.
  assign ic_req  = running && fetch_i[active].req && !plic_o.if_stall;
  assign ic_addr = {active, fetch_i[active].pc};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 owner <= '0;
    else if (ic_req && ic_ready) owner <= active;
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      fetch_o[i].ready = ic_ready && ic_req && int'(active) == i;
      fetch_o[i].valid = ic_rsp_valid && int'(owner) == i;
      fetch_o[i].instr = ic_rsp_instr;
    end
  end

  // Memory switch.
  assign mtask = ic_mem_line[ADDR_W-OFF_W-1 -: TASK_W];
  always_comb begin
    ic_mem_valid = 1'b0;
    ic_mem_data  = '0;
    for (int i = 0; i < N; i++) begin
      mem_o[i].req  = ic_mem_req && int'(mtask) == i;
      mem_o[i].line = ic_mem_line[PC_W-OFF_W-1:0];
      if (int'(mtask) == i) begin
        ic_mem_valid = mem_i[i].valid;
        ic_mem_data  = mem_i[i].data;
      end
    end
  end

endmodule
