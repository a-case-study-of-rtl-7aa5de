// icache: shared L1 instruction cache of the platform.
//
// 8 KB, 2-way set associative, 32-byte blocks (128 sets), one-cycle hit
// latency, 64-bit instructions, as in the reference configuration. It is
// shared by all tasks; the address is the global address {task, pc}, so
// lines of different tasks compete for the same sets, which is the
// interference the PLIC reduces.
//
// Timing: a request is taken when req and ready are both high. On a hit the
// instruction is returned on the next cycle (rsp_valid). On a miss the cache
// asks for the whole line (mem_req held high with mem_line until mem_valid),
// writes it into the least recently used way of the set and returns the
// instruction on the cycle after mem_valid; ready is low meanwhile. The
// replacement policy (LRU), the reset of the valid bits and the whole-line
// refill interface are this design's own choices. ev_access and ev_miss pulse
// once per request taken and per miss, for access counting.
module icache
  import plic_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned LBYTES     = LINE_BYTES,
  parameter int unsigned AW         = ADDR_W,
  localparam int unsigned WAYS      = 2,
  localparam int unsigned SETS      = SIZE_BYTES / (LBYTES * WAYS),
  localparam int unsigned OFF_W     = $clog2(LBYTES),
  localparam int unsigned IDX_W     = $clog2(SETS),
  localparam int unsigned TAG_W     = AW - OFF_W - IDX_W,
  localparam int unsigned WPL       = LBYTES / INSTR_BYTES,
  localparam int unsigned LW        = LBYTES * 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req,
  input  logic [AW-1:0]        addr,
  output logic                 ready,
  output logic                 rsp_valid,
  output logic [INSTR_W-1:0]   rsp_instr,
  output logic                 mem_req,
  output logic [AW-OFF_W-1:0]  mem_line,
  input  logic                 mem_valid,
  input  logic [LW-1:0]        mem_data,
  output logic                 ev_access,
  output logic                 ev_miss
);

  localparam int unsigned WSEL_W = $clog2(WPL);

  logic [WAYS-1:0]  valid [SETS];
  logic [TAG_W-1:0] tag   [SETS][WAYS];
  logic [LW-1:0]    data  [SETS][WAYS];
  logic [SETS-1:0]  lru;            // way to replace next

  typedef enum logic {S_LOOKUP, S_REFILL} state_e;
  state_e state;

  logic [AW-1:0]    miss_addr;
  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] atag;
  logic [WAYS-1:0]  hit_way;
  logic             hit;

  assign idx  = addr[OFF_W +: IDX_W];
  assign atag = addr[AW-1 -: TAG_W];
  always_comb begin
    for (int w = 0; w < WAYS; w++) hit_way[w] = valid[idx][w] && tag[idx][w] == atag;
  end
  assign hit = |hit_way;

  assign ready     = (state == S_LOOKUP);
  assign ev_access = req && ready;
  assign ev_miss   = req && ready && !hit;
  assign mem_req   = (state == S_REFILL);
  assign mem_line  = miss_addr[AW-1:OFF_W];

  function automatic logic [INSTR_W-1:0] pick(logic [LW-1:0] line, logic [WSEL_W-1:0] w);
    return line[w*INSTR_W +: INSTR_W];
  endfunction

  logic [IDX_W-1:0] midx;
  assign midx = miss_addr[OFF_W +: IDX_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOOKUP;
      rsp_valid <= 1'b0;
      rsp_instr <= '0;
      miss_addr <= '0;
      lru       <= '0;
      for (int s = 0; s < SETS; s++) valid[s] <= '0;
    end else begin
      rsp_valid <= 1'b0;
      case (state)
        S_LOOKUP: if (req) begin
          if (hit) begin
            rsp_valid <= 1'b1;
            rsp_instr <= pick(data[idx][hit_way[1]], addr[OFF_W-1 -: WSEL_W]);
            lru[idx]  <= !hit_way[1];
          end else begin
            miss_addr <= addr;
            state     <= S_REFILL;
          end
        end
        S_REFILL: if (mem_valid) begin
          valid[midx][lru[midx]] <= 1'b1;
          rsp_valid <= 1'b1;
          rsp_instr <= pick(mem_data, miss_addr[OFF_W-1 -: WSEL_W]);
          lru[midx] <= !lru[midx];
          state     <= S_LOOKUP;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_REFILL && mem_valid) begin
      tag[midx][lru[midx]]  <= miss_addr[AW-1 -: TAG_W];
      data[midx][lru[midx]] <= mem_data;
    end
  end

endmodule
