// plic_branch_addr_logic: branch address logic of the PLIC.
//
// Two registers and a subtractor turn the absolute target address of a loop
// branch into a local PC. The base address register is loaded when the ID
// stage decodes an slp (start loop) instruction; it holds the address of the
// loop's first instruction, which is local PC 0. The memory-target register
// is loaded with the decoded target address of an elp, brb or brf
// instruction. The subtractor output, (target - base) / INSTR_BYTES, is the
// target local PC written into the branch target table one cycle after the
// branch was decoded. The same base gives the address at which instruction
// fetch resumes when a loop that runs from the PLIC ends:
// base + lpc * INSTR_BYTES.
//
// The base, target and subtractor follow the reference block diagram. Loading
// the base with the address after the slp (slp itself is not cached), the
// division by the instruction size, and the restore path used at a context
// switch are this design's own choices.
module plic_branch_addr_logic
  import plic_pkg::*;
#(
  parameter int unsigned AW = PC_W,
  parameter int unsigned LW = LPC_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_base,     // slp decoded: base <= pc + INSTR_BYTES
  input  logic [AW-1:0] pc,
  input  logic          load_target,   // loop branch decoded: target <= dec_target
  input  logic [AW-1:0] dec_target,
  input  logic          restore,       // context switch: base <= restore_base
  input  logic [AW-1:0] restore_base,
  input  logic [LW-1:0] resume_lpc,
  output logic [AW-1:0] base,
  output logic [LW-1:0] target_lpc,    // (target - base) / INSTR_BYTES
  output logic          target_in_loop,// target lies at or after the base, inside the local PC range
  output logic [AW-1:0] resume_pc      // base + resume_lpc * INSTR_BYTES
);

  localparam int unsigned SH = $clog2(INSTR_BYTES);

  logic [AW-1:0] target_q;
  logic [AW-1:0] diff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base     <= '0;
      target_q <= '0;
    end else begin
      if (restore)        base <= restore_base;
      else if (load_base) base <= pc + AW'(INSTR_BYTES);
      if (load_target)    target_q <= dec_target;
    end
  end

  assign diff           = target_q - base;
  assign target_lpc     = diff[SH +: LW];
  assign target_in_loop = (target_q >= base) && ((diff >> SH) < (AW'(1) << LW));
  assign resume_pc      = base + (AW'(resume_lpc) << SH);

endmodule
