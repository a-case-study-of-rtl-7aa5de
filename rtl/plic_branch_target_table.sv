// plic_branch_target_table: the PLIC branch target table (PBTT).
//
// Each entry pairs the local PC of a loop branch (elp, brb or brf) with the
// local PC of its target, 6 + 6 bits, 32 entries by default, as register
// file storage. A task only uses the entries of its partition,
// [part_base, part_base + part_size). Lookup is associative over that
// partition and combinational: it matches lookup_lpc against the stored
// branch local PCs and returns the target local PC. A write during a loop's
// first iteration overwrites the entry with the same branch local PC if there
// is one, else takes the lowest free entry of the partition; if neither
// exists, wr_full is raised in the same cycle and nothing is written. clear
// frees every entry of the partition (a new loop starts filling).
//
// Each entry also has a valid bit, which the 6 + 6 bit entry size of the
// reference configuration does not count; it is this design's own choice.
module plic_branch_target_table #(
  parameter int unsigned DEPTH = plic_pkg::PBTT_DEPTH,
  parameter int unsigned LW    = plic_pkg::LPC_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] part_base,
  input  logic [AW:0]   part_size,
  input  logic          clear,
  input  logic          wr_en,
  input  logic [LW-1:0] wr_lpc,
  input  logic [LW-1:0] wr_target,
  output logic          wr_full,
  input  logic [LW-1:0] lookup_lpc,
  output logic          lookup_hit,
  output logic [LW-1:0] lookup_target
);

  logic [DEPTH-1:0] valid;
  logic [LW-1:0]    br_lpc [DEPTH];
  logic [LW-1:0]    tg_lpc [DEPTH];
  logic [DEPTH-1:0] in_part;

  // Entries belonging to the current partition.
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      in_part[i] = (i >= int'(part_base)) && (i < int'(part_base) + int'(part_size));
    end
  end

  // Lookup.
  always_comb begin
    lookup_hit    = 1'b0;
    lookup_target = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!lookup_hit && in_part[i] && valid[i] && br_lpc[i] == lookup_lpc) begin
        lookup_hit    = 1'b1;
        lookup_target = tg_lpc[i];
      end
    end
  end

  // Write slot: the matching entry, else the lowest free one.
  logic          wr_match, wr_free;
  logic [AW-1:0] match_idx, free_idx;
  always_comb begin
    wr_match = 1'b0; match_idx = '0;
    wr_free  = 1'b0; free_idx  = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!wr_match && in_part[i] && valid[i] && br_lpc[i] == wr_lpc) begin
        wr_match = 1'b1; match_idx = AW'(i);
      end
      if (!wr_free && in_part[i] && !valid[i]) begin
        wr_free = 1'b1; free_idx = AW'(i);
      end
    end
  end
  assign wr_full = wr_en && !wr_match && !wr_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (clear) begin
      valid <= valid & ~in_part;
    end else if (wr_en && (wr_match || wr_free)) begin
      valid[wr_match ? match_idx : free_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!clear && wr_en && (wr_match || wr_free)) begin
      br_lpc[wr_match ? match_idx : free_idx] <= wr_lpc;
      tg_lpc[wr_match ? match_idx : free_idx] <= wr_target;
    end
  end

endmodule
