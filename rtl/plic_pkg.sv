// plic_pkg: sizes and types shared by the partitioned loop instruction cache
// (PLIC) and the five-core evaluation platform around it.
//
// The table sizes are the ones of the reference configuration: a 128-entry
// index table holding a branch flag and a 64-bit instruction per entry, a
// 32-entry branch target table of two 6-bit local PCs, and an 8-entry task
// state table of task ID (3 bits), partition ID (3 bits) and local PC
// (6 bits). Memory addresses are 26-bit byte addresses (64 MB per task
// memory) and instructions are 8 bytes wide. The loop-operation encoding, the
// partition descriptor and the extra fields saved per task beside the local
// PC are this design's own choices.
package plic_pkg;

  localparam int unsigned INSTR_W     = 64;  // instruction width
  localparam int unsigned INSTR_BYTES = INSTR_W / 8;
  localparam int unsigned PC_W        = 26;  // byte address inside a 64 MB task memory
  localparam int unsigned LPC_W       = 6;   // local PC width
  localparam int unsigned TASK_W      = 3;   // task ID width
  localparam int unsigned PART_W      = 3;   // partition ID width
  localparam int unsigned PIT_DEPTH   = 128; // PLIC index table entries
  localparam int unsigned PBTT_DEPTH  = 32;  // PLIC branch target table entries
  localparam int unsigned TST_DEPTH   = 8;   // task state table entries
  localparam int unsigned PIT_AW      = $clog2(PIT_DEPTH);
  localparam int unsigned PBTT_AW     = $clog2(PBTT_DEPTH);
  localparam int unsigned N_CORES     = 5;   // tasks / cores of the platform
  localparam int unsigned ADDR_W      = TASK_W + PC_W; // global address: {task, pc}
  localparam int unsigned LINE_BYTES  = 32;  // I-cache block size
  localparam int unsigned LINE_W      = LINE_BYTES * 8;

  // Loop-control operation reported by the ID stage decoder.
  typedef enum logic [2:0] {
    OP_OTHER = 3'd0,  // any instruction that is not a loop-control one
    OP_SLP   = 3'd1,  // start of loop: the next instruction is the loop's first
    OP_ELP   = 3'd2,  // end of loop: conditional backward branch to the loop start
    OP_BRB   = 3'd3,  // backward branch inside a loop
    OP_BRF   = 3'd4   // forward branch inside a loop
  } loop_op_e;

  // PLIC operation state of a task.
  typedef enum logic [1:0] {
    MODE_NONLOOP = 2'd0,  // instructions come from the I-cache, PLIC idle
    MODE_FIRST   = 2'd1,  // first iteration: I-cache instructions are copied into the PLIC
    MODE_FOLLOW  = 2'd2   // following iterations: instructions come from the PLIC only
  } plic_mode_e;

  // Place and size of one partition in the two loop tables.
  typedef struct packed {
    logic [PIT_AW-1:0]  pit_base;
    logic [LPC_W:0]     pit_size;   // 0 .. 64 entries
    logic [PBTT_AW-1:0] pbtt_base;
    logic [PBTT_AW:0]   pbtt_size;  // 0 .. 32 entries
  } part_desc_t;

  // Loop state of a task that is saved and restored at a context switch.
  typedef struct packed {
    plic_mode_e        mode;
    logic [LPC_W-1:0]  lpc;
    logic [PC_W-1:0]   base;     // byte address of local PC 0
    logic              skipped;  // a forward branch skipped part of this fill pass
  } loop_state_t;

  // One core's fetch/decode/execute signals seen by the PLIC.
  typedef struct packed {
    logic                 if_valid;   // IF holds an instruction for ID
    logic [INSTR_W-1:0]   if_instr;
    logic [PC_W-1:0]      if_pc;
    logic                 id_ready;   // ID takes the instruction offered to it this cycle
    loop_op_e             dec_op;     // decode of the instruction offered to ID
    logic [PC_W-1:0]      dec_target; // branch target address of that instruction
    logic                 ex_valid;   // EX resolves the pending loop branch this cycle
    logic                 ex_taken;
  } core_to_plic_t;

  // PLIC signals returned to one core.
  typedef struct packed {
    logic                 id_valid;   // an instruction is offered to ID
    logic [INSTR_W-1:0]   id_instr;
    logic                 if_stall;   // IF must not fetch
    logic                 resume;     // loop left from the PLIC: restart IF at resume_pc
    logic [PC_W-1:0]      resume_pc;
  } plic_to_core_t;

  // Instruction fetch request of a core and the I-cache answer.
  typedef struct packed {
    logic            req;
    logic [PC_W-1:0] pc;
  } fetch_req_t;

  typedef struct packed {
    logic               ready;  // request taken this cycle
    logic               valid;  // instruction returned this cycle
    logic [INSTR_W-1:0] instr;
  } fetch_rsp_t;

  // Line refill between the I-cache and a task memory.
  typedef struct packed {
    logic                           req;
    logic [PC_W-$clog2(LINE_BYTES)-1:0] line;  // line address inside the memory
  } mem_req_t;

  typedef struct packed {
    logic              valid;
    logic [LINE_W-1:0] data;
  } mem_rsp_t;

endpackage
