// tb_mem_model: behavioural model of one task's program memory (SDRAM in the
// reference platform). Answers a line refill request LAT cycles after it
// appears with the 32-byte line of the task's synthetic program.
module tb_mem_model
  import plic_pkg::*;
  import tb_prog_pkg::*;
#(
  parameter int TASK = 0,
  parameter int LAT  = 30
) (
  input  logic     clk,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  int cnt = 0;
  initial rsp = '0;
  always_ff @(posedge clk) begin
    rsp.valid <= 1'b0;
    if (req.req && !rsp.valid) begin
      if (cnt == LAT - 1) begin
        cnt <= 0;
        rsp.valid <= 1'b1;
        for (int w = 0; w < 4; w++) rsp.data[w*64 +: 64] <= prog_word(TASK, {req.line, 5'(w * 8)});
      end else cnt <= cnt + 1;
    end
  end
endmodule
