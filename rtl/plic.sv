// plic: partitioned loop instruction cache.
//
// A small loop cache in the ID stage that is shared by several tasks without
// interference: each task owns a partition of the index table (loop
// instructions) and of the branch target table (loop branch targets), chosen
// before run time and recorded in the task state table. During a loop's first
// iteration the instructions passing from IF to ID are copied into the
// task's partition; from the second iteration on, ID is fed from the PLIC and
// IF is stalled, so the I-cache is not accessed. At a context switch the
// local PC and loop state of the preempted task are saved in the task state
// table and those of the preempting task are restored, so a cached loop
// survives the switch.
//
// This module joins the task state table, the index table, the branch target
// table, the branch address logic, the local PC logic and the controller, and
// contains the multiplexer in front of ID that chooses between the IF
// instruction and the index table output. Interface: core_i/core_o are the
// running core's pipeline signals (see plic_pkg), cs_* the context switch
// handshake with the task scheduler, cfg_* and pmap_* the start-up
// configuration written by the operating system. ID receives an instruction
// in every cycle in which core_o.id_valid and core_i.id_ready are both high.
module plic
  import plic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  core_to_plic_t     core_i,
  output plic_to_core_t     core_o,
  input  logic              cs_req,
  input  logic [TASK_W-1:0] cs_task,
  output logic              cs_ack,
  input  logic              cfg_we,
  input  logic [$clog2(TST_DEPTH)-1:0] cfg_idx,
  input  logic              cfg_valid,
  input  logic [TASK_W-1:0] cfg_task,
  input  logic [PART_W-1:0] cfg_part,
  input  logic              pmap_we,
  input  logic [PART_W-1:0] pmap_id,
  input  part_desc_t        pmap_desc,
  output plic_mode_e        mode,
  output logic              ev_plic_write,
  output logic              ev_plic_access,
  output logic              ev_loop_cached,
  output logic              ev_loop_exit,
  output logic              ev_refill,
  output logic              ev_abort,
  output logic              ev_cs_case1,
  output logic              ev_cs_case2
);

  // task state table
  logic        look_hit, save_en;
  logic [PART_W-1:0] look_part;
  part_desc_t  look_desc, desc;
  loop_state_t look_state, save_state;
  logic [TASK_W-1:0] save_task;
  // index table
  logic        pit_we, pit_flag;
  logic [PIT_AW-1:0] pit_addr;
  logic [INSTR_W-1:0] pit_instr;
  // branch target table
  logic        pbtt_we, pbtt_clear, pbtt_full, pbtt_hit;
  logic [LPC_W-1:0] pbtt_target;
  // branch address logic
  logic        bal_load_base, bal_load_target, bal_restore, bal_in_loop;
  logic [PC_W-1:0] bal_restore_base, bal_base, resume_pc;
  logic [LPC_W-1:0] bal_target_lpc, resume_lpc;
  // local PC logic
  logic        lpc_inc, lpc_take, lpc_restore, lpc_clear;
  logic [LPC_W-1:0] lpc, lpc_target, lpc_saved;
  // controller
  logic        id_valid, sel_plic, if_stall, resume;

  plic_task_state_table u_tst (
    .clk, .rst_n,
    .cfg_we, .cfg_idx, .cfg_valid, .cfg_task, .cfg_part,
    .pmap_we, .pmap_id, .pmap_desc,
    .save_en, .save_task, .save_state,
    .look_task(cs_task), .look_hit, .look_part, .look_desc, .look_state
  );

  plic_index_table u_pit (
    .clk,
    .we(pit_we), .waddr(pit_addr), .wflag(core_i.dec_op inside {OP_ELP, OP_BRB, OP_BRF}),
    .wdata(core_i.if_instr),
    .raddr(pit_addr), .rflag(pit_flag), .rdata(pit_instr)
  );

  plic_branch_target_table u_pbtt (
    .clk, .rst_n,
    .part_base(desc.pbtt_base), .part_size(desc.pbtt_size),
    .clear(pbtt_clear),
    .wr_en(pbtt_we), .wr_lpc(lpc), .wr_target(bal_target_lpc), .wr_full(pbtt_full),
    .lookup_lpc(lpc), .lookup_hit(pbtt_hit), .lookup_target(pbtt_target)
  );

  plic_branch_addr_logic u_bal (
    .clk, .rst_n,
    .load_base(bal_load_base), .pc(core_i.if_pc),
    .load_target(bal_load_target), .dec_target(core_i.dec_target),
    .restore(bal_restore), .restore_base(bal_restore_base),
    .resume_lpc, .base(bal_base), .target_lpc(bal_target_lpc),
    .target_in_loop(bal_in_loop), .resume_pc
  );

  plic_local_pc u_lpc (
    .clk, .rst_n,
    .inc(lpc_inc), .take(lpc_take), .branch_target(lpc_target),
    .restore(lpc_restore), .saved_lpc(lpc_saved), .clear(lpc_clear),
    .lpc
  );

  plic_controller u_ctrl (
    .clk, .rst_n,
    .c(core_i), .id_valid, .sel_plic, .if_stall, .resume, .resume_lpc,
    .cs_req, .cs_task, .cs_ack,
    .look_hit, .look_desc, .look_state, .save_en, .save_task, .save_state,
    .pit_flag, .pit_we, .pit_addr,
    .pbtt_hit, .pbtt_target, .pbtt_full, .pbtt_we, .pbtt_clear, .desc,
    .bal_target_lpc, .bal_target_in_loop(bal_in_loop), .bal_base,
    .bal_load_base, .bal_load_target, .bal_restore, .bal_restore_base,
    .lpc, .lpc_inc, .lpc_take, .lpc_target, .lpc_restore, .lpc_saved, .lpc_clear,
    .mode, .ev_plic_write, .ev_plic_access, .ev_loop_cached, .ev_loop_exit,
    .ev_refill, .ev_abort, .ev_cs_case1, .ev_cs_case2
  );

  // Multiplexer in front of ID.
  assign core_o.id_valid  = id_valid;
  assign core_o.id_instr  = sel_plic ? pit_instr : core_i.if_instr;
  assign core_o.if_stall  = if_stall;
  assign core_o.resume    = resume;
  assign core_o.resume_pc = resume_pc;

endmodule
