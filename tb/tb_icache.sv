// tb_icache: random instruction fetches against a reference model of an
// 8 KB 2-way LRU cache with 32-byte lines. A 30-cycle memory model serves
// refills with line contents computed from the address. Checks every
// returned instruction, every hit/miss decision, the one-cycle hit latency
// and that a miss costs exactly one line refill.
module tb_icache;
  import plic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT = 30;
  logic req, ready, rsp_valid, mem_req, mem_valid, ev_access, ev_miss;
  logic [ADDR_W-1:0] addr;
  logic [63:0] rsp_instr;
  logic [ADDR_W-6:0] mem_line;
  logic [255:0] mem_data;

  icache dut (.clk, .rst_n, .req, .addr, .ready, .rsp_valid, .rsp_instr,
    .mem_req, .mem_line, .mem_valid, .mem_data, .ev_access, .ev_miss);

  function automatic logic [63:0] word_at(logic [ADDR_W-1:0] a);
    return {32'hC0DE0000 ^ 32'(a >> 3), 32'(a >> 3) * 32'h9E3779B1};
  endfunction

  // memory model
  int mcnt = 0, n_refills = 0;
  always_ff @(posedge clk) begin
    mem_valid <= 1'b0;
    if (mem_req && !mem_valid) begin
      if (mcnt == LAT - 1) begin
        mcnt <= 0; mem_valid <= 1'b1; n_refills <= n_refills + 1;
        for (int w = 0; w < 4; w++) mem_data[w*64 +: 64] <= word_at({mem_line, 5'(w * 8)});
      end else mcnt <= mcnt + 1;
    end
  end

  // reference cache
  logic [23:0] rtag [128][2];
  logic        rval [128][2];
  logic        rlru [128];

  function automatic bit ref_access(logic [ADDR_W-1:0] a);
    int s; logic [16:0] t; bit h;
    s = int'(a[11:5]); t = a[28:12]; h = 0;
    for (int w = 0; w < 2; w++) if (rval[s][w] && rtag[s][w] == 24'(t)) begin h = 1; rlru[s] = !w[0]; end
    if (!h) begin
      rval[s][rlru[s]] = 1; rtag[s][rlru[s]] = 24'(t); rlru[s] = !rlru[s];
    end
    return h;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_miss_exp = 0;
    req = 0; addr = 0;
    for (int s = 0; s < 128; s++) begin rval[s][0] = 0; rval[s][1] = 0; rlru[s] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [ADDR_W-1:0] a;
      bit h; int lat;
      // three "tasks" share a few sets so that lines evict each other
      a = {3'($urandom_range(2)), 10'd0, 4'($urandom_range(1)), 7'($urandom_range(15)), 2'($urandom), 3'b000};
      @(negedge clk);
      req = 1; addr = a;
      #1;
      check(ready, "ready between requests");
      check(ev_miss == !ref_hit_peek(a), "hit/miss decision");
      h = ref_access(a);
      if (!h) n_miss_exp++;
      @(posedge clk); #1;
      req = 0;
      lat = 1;
      while (!rsp_valid) begin @(posedge clk); #1; lat++; end
      check(rsp_instr == word_at(a), $sformatf("data at %h", a));
      if (h) check(lat == 1, "hit latency one cycle");
      else   check(lat == LAT + 2, $sformatf("miss latency %0d", lat));
    end
    check(n_refills == n_miss_exp, "one refill per miss");
    $display("misses %0d of 3000", n_miss_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_hit_peek(logic [ADDR_W-1:0] a);
    int s;
    s = int'(a[11:5]);
    for (int w = 0; w < 2; w++) if (rval[s][w] && rtag[s][w] == 24'(a[28:12])) return 1;
    return 0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
