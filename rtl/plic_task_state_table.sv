// plic_task_state_table: the task state table (TST) of the PLIC.
//
// DEPTH entries (8 by default), each binding a task ID to the PLIC partition
// allocated to that task and holding the task's saved local PC. The partition
// sizes are fixed before the program runs (from a static loop profile), so
// the operating system writes the entries through the cfg_* port at start-up,
// and writes the place and size of each partition in the two loop tables
// through the pmap_* port; a partition ID selects one of these descriptors.
//
// At a context switch the controller saves the loop state of the preempted
// task (save_*: local PC, PLIC operation state, loop base address and fill
// flag) into the entry with that task ID, and reads the entry of the
// preempting task through the combinational lookup port. The entry is found
// by comparing the task ID field of every valid entry.
//
// The task ID, partition ID and local PC fields follow the reference table
// (3 + 3 + 6 bits). Saving the PLIC operation state is required by the
// context switch procedure; keeping it, the loop base and the fill flag in
// this table, and the partition descriptor registers, are this design's own
// choices.
module plic_task_state_table
  import plic_pkg::*;
#(
  parameter int unsigned DEPTH = TST_DEPTH,
  localparam int unsigned IW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // entry configuration (OS, program start)
  input  logic              cfg_we,
  input  logic [IW-1:0]     cfg_idx,
  input  logic              cfg_valid,
  input  logic [TASK_W-1:0] cfg_task,
  input  logic [PART_W-1:0] cfg_part,
  // partition descriptors (OS, program start)
  input  logic              pmap_we,
  input  logic [PART_W-1:0] pmap_id,
  input  part_desc_t        pmap_desc,
  // save the state of the preempted task
  input  logic              save_en,
  input  logic [TASK_W-1:0] save_task,
  input  loop_state_t       save_state,
  // look up the preempting task
  input  logic [TASK_W-1:0] look_task,
  output logic              look_hit,
  output logic [PART_W-1:0] look_part,
  output part_desc_t        look_desc,
  output loop_state_t       look_state
);

  logic [DEPTH-1:0]  valid;
  logic [TASK_W-1:0] task_id [DEPTH];
  logic [PART_W-1:0] part_id [DEPTH];
  loop_state_t       state   [DEPTH];
  part_desc_t        pmap    [2**PART_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        task_id[i] <= '0;
        part_id[i] <= '0;
        state[i]   <= '0;
      end
      for (int p = 0; p < 2**PART_W; p++) pmap[p] <= '0;
    end else begin
      if (cfg_we) begin
        valid[cfg_idx]   <= cfg_valid;
        task_id[cfg_idx] <= cfg_task;
        part_id[cfg_idx] <= cfg_part;
        state[cfg_idx]   <= '{mode: MODE_NONLOOP, lpc: '0, base: '0, skipped: 1'b0};
      end
      if (pmap_we) pmap[pmap_id] <= pmap_desc;
      if (save_en) begin
        for (int i = 0; i < DEPTH; i++) begin
          if (valid[i] && task_id[i] == save_task && !(cfg_we && cfg_idx == IW'(i)))
            state[i] <= save_state;
        end
      end
    end
  end

  always_comb begin
    look_hit   = 1'b0;
    look_part  = '0;
    look_state = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!look_hit && valid[i] && task_id[i] == look_task) begin
        look_hit   = 1'b1;
        look_part  = part_id[i];
        look_state = state[i];
      end
    end
    look_desc = pmap[look_part];
  end

endmodule
