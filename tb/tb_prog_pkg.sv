// tb_prog_pkg: synthetic task programs for the PLIC testbenches.
//
// Every task's program is a pure function of (task, address), so the core
// model (which checks every instruction that reaches ID) and the memory model
// (which serves I-cache refills) agree without sharing a data file.
// Instruction format used only by the testbenches:
//   [63:60] kind: 0 ALU, 1 SLP, 2 ELP, 3 BRB, 4 BRF, 5 JMP
//   [59:56] task, [55:30] address of the word, [29:26] unused,
//   [25:0]  branch target address, or the iteration count for SLP.
// Word layout of a program (word index = address / 8):
//   0..3 straight code, 4 slp(count 6+task), loop A at 5..16 (12 words:
//   brf at 7 -> 9, brb at 12 -> 10, elp at 16 -> 5), 17..19 straight code,
//   20 slp(count 3), loop B at 21..(21+LB-1) ending in an elp, three straight
//   words, then a jump back to 0.
package tb_prog_pkg;
  import plic_pkg::*;

  localparam int LB = 40;               // loop B length in words
  localparam int W_B_END = 21 + LB - 1; // elp of loop B
  localparam int W_JMP = W_B_END + 4;   // last word of the program

  typedef enum logic [3:0] {K_ALU = 0, K_SLP = 1, K_ELP = 2, K_BRB = 3, K_BRF = 4, K_JMP = 5} kind_e;

  function automatic logic [63:0] mk(kind_e k, int task_id, int w, int arg);
    return {4'(k), 4'(task_id), 26'(w * 8), 4'h0, 26'(arg)};
  endfunction

  function automatic logic [63:0] prog_word(int task_id, logic [PC_W-1:0] addr);
    int w;
    w = int'(addr >> 3) % (W_JMP + 1);
    if (int'(addr >> 3) > W_JMP) return mk(K_ALU, task_id, int'(addr >> 3), 0);
    case (w)
      4:       return mk(K_SLP, task_id, w, 6 + task_id);
      7:       return mk(K_BRF, task_id, w, 9 * 8);
      12:      return mk(K_BRB, task_id, w, 10 * 8);
      16:      return mk(K_ELP, task_id, w, 5 * 8);
      20:      return mk(K_SLP, task_id, w, 3);
      W_B_END: return mk(K_ELP, task_id, w, 21 * 8);
      W_JMP:   return mk(K_JMP, task_id, w, 0);
      default: return mk(K_ALU, task_id, w, (w * 37 + task_id * 11) & 32'h0000_ffff);
    endcase
  endfunction

  function automatic loop_op_e dec_op(logic [63:0] instr);
    case (instr[63:60])
      4'd1:    return OP_SLP;
      4'd2:    return OP_ELP;
      4'd3:    return OP_BRB;
      4'd4:    return OP_BRF;
      default: return OP_OTHER;
    endcase
  endfunction

endpackage
