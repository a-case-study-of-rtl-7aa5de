// plic_index_table: the PLIC index table (PIT), a tagless direct-mapped store
// of loop instructions with one instruction word per line.
//
// Each of the DEPTH lines holds a branch flag and an encoded instruction
// (1 + 64 bits, 128 lines by default). The table is shared by all tasks; the
// controller places each task in its own partition by adding the partition
// base to the task's local PC, so this module only sees a physical line
// address. One write port fills a line while a loop runs its first iteration;
// the read port is combinational so that the line at the current local PC is
// offered to the ID stage in the same cycle.
//
// Timing: a write on the rising edge with we=1 is visible on the read port
// from the next cycle. Lines are not reset; the controller only reads lines a
// fill pass has written.
module plic_index_table #(
  parameter int unsigned DEPTH = plic_pkg::PIT_DEPTH,
  parameter int unsigned W     = plic_pkg::INSTR_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wflag,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic          rflag,
  output logic [W-1:0]  rdata
);

  logic [W:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wflag, wdata};
  end

  assign {rflag, rdata} = mem[raddr];

endmodule
