// plic_controller: control state machine of the PLIC.
//
// The controller watches the decode of the instruction entering ID and the
// branch outcome from EX, and runs each task's loops through three operation
// states:
//   NONLOOP  instructions flow from IF (the I-cache) to ID; an slp instruction
//            starts a loop if the task owns a PLIC partition.
//   FIRST    first iteration: each instruction going from IF to ID is also
//            written into the index table at the current local PC; a loop
//            branch (elp, brb, brf) is flagged there, and one cycle later its
//            (branch local PC, target local PC) pair is written into the
//            branch target table. The local PC follows the branch outcome
//            from EX. A taken elp moves the task to FOLLOW.
//   FOLLOW   following iterations: IF is stalled and ID reads the index table
//            at the local PC. A flagged instruction waits for its outcome; a
//            taken branch jumps to the target local PC from the branch target
//            table; an untaken elp ends the loop and restarts IF at the
//            address after the elp (resume / resume_pc).
// While a loop branch waits for its outcome, IF is stalled and nothing new is
// passed to ID, so a branch is resolved before the next instruction is
// taken. If a forward branch skipped instructions during a fill pass, the
// next iteration is filled again (the index table has no valid bits). A loop
// larger than the task's partition, or whose branch does not fit the branch
// target table, is left to the I-cache (NONLOOP) until the next slp.
//
// Context switch: cs_req with the preempting task's ID is acknowledged when
// no loop branch is pending. In the acknowledge cycle the preempted task's
// operation state, local PC, loop base and fill flag are written to the task
// state table and the preempting task's are restored from it, together with
// its partition descriptor. cs_req also blocks ID and stalls IF.
//
// The three operation states, the IF stall, the loads into the two tables and
// the saving of local PC and state at a switch follow the reference design.
// The wait-for-outcome handshake, the re-fill rule, the abort rule, the
// resume address and the acknowledge of the switch are this design's own.
module plic_controller
  import plic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // running core
  input  core_to_plic_t     c,
  output logic              id_valid,
  output logic              sel_plic,   // ID takes the index table output, not IF
  output logic              if_stall,
  output logic              resume,
  output logic [LPC_W-1:0]  resume_lpc,
  // task scheduler
  input  logic              cs_req,
  input  logic [TASK_W-1:0] cs_task,
  output logic              cs_ack,
  // task state table
  input  logic              look_hit,
  input  part_desc_t        look_desc,
  input  loop_state_t       look_state,
  output logic              save_en,
  output logic [TASK_W-1:0] save_task,
  output loop_state_t       save_state,
  // index table
  input  logic              pit_flag,
  output logic              pit_we,
  output logic [PIT_AW-1:0] pit_addr,
  // branch target table
  input  logic              pbtt_hit,
  input  logic [LPC_W-1:0]  pbtt_target,
  input  logic              pbtt_full,
  output logic              pbtt_we,
  output logic              pbtt_clear,
  output part_desc_t        desc,
  // branch address logic
  input  logic [LPC_W-1:0]  bal_target_lpc,
  input  logic              bal_target_in_loop,
  input  logic [PC_W-1:0]   bal_base,
  output logic              bal_load_base,
  output logic              bal_load_target,
  output logic              bal_restore,
  output logic [PC_W-1:0]   bal_restore_base,
  // local PC logic
  input  logic [LPC_W-1:0]  lpc,
  output logic              lpc_inc,
  output logic              lpc_take,
  output logic [LPC_W-1:0]  lpc_target,
  output logic              lpc_restore,
  output logic [LPC_W-1:0]  lpc_saved,
  output logic              lpc_clear,
  // state and events
  output plic_mode_e        mode,
  output logic              ev_plic_write,   // index table line written
  output logic              ev_plic_access,  // instruction supplied from the PLIC
  output logic              ev_loop_cached,  // FIRST -> FOLLOW
  output logic              ev_loop_exit,    // FOLLOW -> NONLOOP
  output logic              ev_refill,       // fill pass repeated after a skipped part
  output logic              ev_abort,        // loop does not fit the partition
  output logic              ev_cs_case1,     // switch away from a task using the PLIC
  output logic              ev_cs_case2      // switch away from a task in non-loop execution
);

  logic              waiting;     // a loop branch waits for its EX outcome
  logic              brwr_q;      // branch target table write due this cycle
  loop_op_e          pend_op;
  logic              skipped;
  logic [TASK_W-1:0] cur_task;
  logic              cur_valid;   // a task has been dispatched
  logic              cur_part;    // the running task owns a partition

  logic is_loop_br, accept_if, accept_plic, resolve, abort_wr, exit_follow;

  assign is_loop_br = c.dec_op inside {OP_ELP, OP_BRB, OP_BRF};

  assign sel_plic  = (mode == MODE_FOLLOW);
  assign id_valid  = sel_plic ? (!waiting && !cs_req)
                              : (c.if_valid && !waiting && !brwr_q && !cs_req);
  assign if_stall  = sel_plic || waiting || brwr_q || cs_req;
  assign accept_if   = !sel_plic && id_valid && c.id_ready;
  assign accept_plic =  sel_plic && id_valid && c.id_ready;

  assign cs_ack = cs_req && !waiting && !brwr_q;

  assign pit_addr = desc.pit_base + PIT_AW'(lpc);

  // Branch target table write one cycle after a loop branch was taken into
  // the index table; a failure leaves the loop to the I-cache.
  assign pbtt_we  = brwr_q && mode == MODE_FIRST && bal_target_in_loop &&
                    ({1'b0, bal_target_lpc} < desc.pit_size);
  assign abort_wr = brwr_q && mode == MODE_FIRST && (!pbtt_we || pbtt_full);

  assign resolve  = waiting && c.ex_valid && !abort_wr;

  // Leaving FOLLOW: an untaken elp, or a taken branch without a target entry
  // (then the branch itself is fetched again from the I-cache).
  assign exit_follow = resolve && mode == MODE_FOLLOW &&
                       ((!c.ex_taken && pend_op == OP_ELP) || (c.ex_taken && !pbtt_hit));
  assign resume      = exit_follow;
  assign resume_lpc  = c.ex_taken ? lpc : lpc + LPC_W'(1);

  logic start_loop, fill_ok;
  assign start_loop = accept_if && c.dec_op == OP_SLP && cur_part && desc.pit_size != 0 &&
                      mode inside {MODE_NONLOOP, MODE_FIRST};
  assign fill_ok    = ({1'b0, lpc} < desc.pit_size);

  // Table and local PC strobes.
  always_comb begin
    pit_we          = 1'b0;
    pbtt_clear      = 1'b0;
    bal_load_base   = 1'b0;
    bal_load_target = 1'b0;
    lpc_inc         = 1'b0;
    lpc_take        = 1'b0;
    lpc_target      = bal_target_lpc;
    lpc_clear       = 1'b0;
    if (start_loop) begin
      pbtt_clear    = 1'b1;
      bal_load_base = 1'b1;
      lpc_clear     = 1'b1;
    end else if (accept_if && mode == MODE_FIRST && fill_ok) begin
      pit_we = 1'b1;
      if (is_loop_br) bal_load_target = 1'b1;
      else            lpc_inc = 1'b1;
    end else if (accept_plic && !pit_flag) begin
      lpc_inc = 1'b1;
    end
    if (resolve) begin
      if (mode == MODE_FIRST) begin
        lpc_take = c.ex_taken;
        lpc_inc  = !c.ex_taken && pend_op != OP_ELP;
      end else begin
        lpc_target = pbtt_target;
        lpc_take   = c.ex_taken && pbtt_hit;
        lpc_inc    = !c.ex_taken && pend_op != OP_ELP;
      end
    end
  end

  // Context switch.
  assign save_en          = cs_ack && cur_valid;
  assign save_task        = cur_task;
  assign save_state       = '{mode: mode, lpc: lpc, base: bal_base, skipped: skipped};
  assign bal_restore      = cs_ack;
  assign bal_restore_base = look_hit ? look_state.base : '0;
  assign lpc_restore      = cs_ack;
  assign lpc_saved        = look_hit ? look_state.lpc : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_NONLOOP;
      waiting   <= 1'b0;
      brwr_q    <= 1'b0;
      pend_op   <= OP_OTHER;
      skipped   <= 1'b0;
      cur_task  <= '0;
      cur_valid <= 1'b0;
      cur_part  <= 1'b0;
      desc      <= '0;
    end else if (cs_ack) begin
      cur_task  <= cs_task;
      cur_valid <= 1'b1;
      cur_part  <= look_hit;
      desc      <= look_hit ? look_desc : '0;
      mode      <= look_hit ? look_state.mode : MODE_NONLOOP;
      skipped   <= look_hit && look_state.skipped;
    end else begin
      brwr_q <= 1'b0;
      if (start_loop) begin
        mode    <= MODE_FIRST;
        skipped <= 1'b0;
      end else if (accept_if && mode == MODE_FIRST) begin
        if (!fill_ok) begin
          mode <= MODE_NONLOOP;
        end else if (is_loop_br) begin
          waiting <= 1'b1;
          brwr_q  <= 1'b1;
          pend_op <= c.dec_op;
        end
      end else if (accept_plic && pit_flag) begin
        waiting <= 1'b1;
        pend_op <= c.dec_op;
      end
      if (abort_wr) begin
        mode    <= MODE_NONLOOP;
        waiting <= 1'b0;
      end else if (resolve) begin
        waiting <= 1'b0;
        if (mode == MODE_FIRST) begin
          if (c.ex_taken && pend_op == OP_BRF) skipped <= 1'b1;
          if (pend_op == OP_ELP) begin
            if (!c.ex_taken)  mode <= MODE_NONLOOP;
            else if (skipped) skipped <= 1'b0;
            else              mode <= MODE_FOLLOW;
          end
        end else if (exit_follow) begin
          mode <= MODE_NONLOOP;
        end
      end
    end
  end

  assign ev_plic_write  = pit_we;
  assign ev_plic_access = accept_plic;
  assign ev_loop_cached = resolve && mode == MODE_FIRST && pend_op == OP_ELP && c.ex_taken && !skipped;
  assign ev_refill      = resolve && mode == MODE_FIRST && pend_op == OP_ELP && c.ex_taken && skipped;
  assign ev_loop_exit   = exit_follow;
  assign ev_abort       = abort_wr || (accept_if && mode == MODE_FIRST && !fill_ok && c.dec_op != OP_SLP);
  assign ev_cs_case1    = save_en && mode != MODE_NONLOOP;
  assign ev_cs_case2    = save_en && mode == MODE_NONLOOP;

  // A loop branch outcome only arrives for a pending branch while a loop is cached.
  a_resolve_follow: assert property (@(posedge clk) disable iff (!rst_n)
    (mode == MODE_FOLLOW && c.ex_valid) |-> waiting);

endmodule
