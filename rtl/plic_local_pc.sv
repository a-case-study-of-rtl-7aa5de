// plic_local_pc: local PC (L-PC) logic of the PLIC.
//
// A register holds the local PC of the running task: the position, counted in
// instructions from the loop start, of the instruction being filled into or
// read from the PLIC. A multiplexer picks its next value: the register plus
// one (sequential flow or an untaken branch), the branch target local PC (a
// taken loop branch), the value saved in the task state table (context switch)
// or zero (a new loop starts). The adder, the register and the multiplexer
// steered by the branch outcome from EX follow the reference block diagram;
// the explicit select encoding below is this design's own.
//
// Timing: lpc changes on the rising edge after sel is applied.
module plic_local_pc #(
  parameter int unsigned LW = plic_pkg::LPC_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,        // sequential step / untaken branch
  input  logic          take,       // taken loop branch: lpc <= branch_target
  input  logic [LW-1:0] branch_target,
  input  logic          restore,    // context switch: lpc <= saved_lpc
  input  logic [LW-1:0] saved_lpc,
  input  logic          clear,      // loop start: lpc <= 0
  output logic [LW-1:0] lpc
);

  logic [LW-1:0] lpc_inc;
  assign lpc_inc = lpc + LW'(1);

  // Priority: restore, clear, take, inc, hold.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lpc <= '0;
    else if (restore) lpc <= saved_lpc;
    else if (clear)   lpc <= '0;
    else if (take)    lpc <= branch_target;
    else if (inc)     lpc <= lpc_inc;
  end

endmodule
