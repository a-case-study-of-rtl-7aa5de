// tb_plic_index_table: fills every line of the index table with random
// flag/instruction pairs, reads them all back against a reference array, then
// rewrites random lines and checks that a write is visible the next cycle and
// does not disturb other lines.
module tb_plic_index_table;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, wflag, rflag;
  logic [6:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [64:0] ref_mem [128];

  plic_index_table dut (.clk, .we, .waddr, .wflag, .wdata, .raddr, .rflag, .rdata);

  task automatic chk(input int a);
    raddr = 7'(a); #1;
    checks++;
    if ({rflag, rdata} !== ref_mem[a]) begin
      failures++; $display("FAIL line %0d: %h expected %h", a, {rflag, rdata}, ref_mem[a]);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wflag = 0; wdata = 0; raddr = 0;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      we = 1; waddr = 7'(a); wflag = 1'($urandom); wdata = {$urandom, $urandom};
      ref_mem[a] = {wflag, wdata};
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 128; a++) chk(a);
    for (int n = 0; n < 200; n++) begin
      int a;
      a = int'($urandom_range(127));
      @(negedge clk);
      we = 1; waddr = 7'(a); wflag = 1'($urandom); wdata = {$urandom, $urandom};
      ref_mem[a] = {wflag, wdata};
      @(negedge clk); we = 0;
      chk(a);
      chk(int'($urandom_range(127)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
