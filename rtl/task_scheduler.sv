// task_scheduler: round-robin task scheduler of the platform.
//
// Emulates the context switches of a multitasking uniprocessor on a platform
// with one core per task: exactly one core is enabled at a time (core_en,
// used as the clock enable of that core), and every `interval` cycles of the
// running task the scheduler switches to the next task in round-robin order.
// At each switch it sends a request and the ID of the preempting task to the
// PLIC (cs_req, cs_task) and moves the enable when the PLIC acknowledges
// (cs_ack); the running core keeps its enable until then. After start, the
// first dispatch goes to task first_task.
//
// Round-robin order, the interval (5K, 10K or 20K cycles in the reference
// experiments) and the switch signal with task ID follow the reference
// platform; the acknowledge handshake and the start input are this design's
// own choices.
module task_scheduler
  import plic_pkg::*;
#(
  parameter int unsigned N    = N_CORES,
  parameter int unsigned CW   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,        // begin dispatching (pulse)
  input  logic [CW-1:0]     interval,     // time slice in cycles, >= 1
  input  logic [TASK_W-1:0] first_task,   // < N
  output logic              cs_req,
  output logic [TASK_W-1:0] cs_task,
  input  logic              cs_ack,
  output logic [N-1:0]      core_en,
  output logic [TASK_W-1:0] active,
  output logic              running,      // some task has been dispatched
  output logic [CW-1:0]     n_switches
);

  logic [CW-1:0] count;

  function automatic logic [TASK_W-1:0] next_task(logic [TASK_W-1:0] t);
    return (int'(t) == N - 1) ? '0 : t + TASK_W'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_req     <= 1'b0;
      cs_task    <= '0;
      active     <= '0;
      running    <= 1'b0;
      count      <= '0;
      n_switches <= '0;
    end else begin
      if (start && !running && !cs_req) begin
        cs_req  <= 1'b1;
        cs_task <= first_task;
      end else if (cs_req && cs_ack) begin
        cs_req     <= 1'b0;
        active     <= cs_task;
        running    <= 1'b1;
        count      <= '0;
        n_switches <= n_switches + CW'(running);
      end else if (running && !cs_req) begin
        if (count + CW'(1) >= interval) begin
          cs_req  <= 1'b1;
          cs_task <= next_task(active);
        end
        count <= count + CW'(1);
      end
    end
  end

  always_comb begin
    core_en = '0;
    if (running) core_en[active] = 1'b1;
  end

  a_one_hot: assert property (@(posedge clk) $onehot0(core_en));

endmodule
