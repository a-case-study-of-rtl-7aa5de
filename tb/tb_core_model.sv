// tb_core_model: behavioural model of one processor core for the PLIC
// testbenches (not synthesizable intent; the real cores are outside the RTL).
//
// Fetches one instruction at a time into an IF buffer, hands it to ID through
// the PLIC, decodes it with the testbench instruction format, executes the
// loop branches one cycle later (ex_valid/ex_taken) and redirects its own
// fetch on taken branches, jumps and PLIC resumes. It keeps its own
// architectural PC and checks that every instruction ID receives, whether it
// came from IF or from the PLIC, is the program word at that PC, and that a
// resume address is that PC. Loop semantics: slp loads an iteration count,
// elp decrements it and is taken while it is not zero, brb is taken once per
// iteration, brf is taken when the count is odd. Everything holds while en is
// low (clock gating), except that an outstanding fetch answer is still taken.
module tb_core_model
  import plic_pkg::*;
  import tb_prog_pkg::*;
#(
  parameter int TASK = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  plic_to_core_t p_i,
  output core_to_plic_t p_o,
  output fetch_req_t    f_o,
  input  fetch_rsp_t    f_i,
  output int unsigned   n_instr,
  output int unsigned   n_from_plic,
  output int unsigned   n_err
);

  logic [PC_W-1:0] fetch_pc, req_pc, arch_pc, ibuf_pc, ex_target;
  logic [63:0]     ibuf;
  logic            ibuf_v, outstanding, drop;
  logic            ex_pend, ex_taken_q, ex_from_if;
  logic [15:0]     cnt;
  logic            brb_done;

  assign p_o.if_valid   = ibuf_v;
  assign p_o.if_instr   = ibuf;
  assign p_o.if_pc      = ibuf_pc;
  assign p_o.id_ready   = en && !ex_pend;
  assign p_o.dec_op     = dec_op(p_i.id_instr);
  assign p_o.dec_target = p_i.id_instr[PC_W-1:0];
  assign p_o.ex_valid   = en && ex_pend;
  assign p_o.ex_taken   = ex_taken_q;

  assign f_o.req = en && !ibuf_v && !outstanding && !p_i.if_stall;
  assign f_o.pc  = fetch_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_pc <= '0; req_pc <= '0; arch_pc <= '0; ibuf_pc <= '0; ibuf <= '0;
      ibuf_v <= 0; outstanding <= 0; drop <= 0; ex_pend <= 0; ex_taken_q <= 0;
      ex_from_if <= 0; ex_target <= '0; cnt <= '0; brb_done <= 0;
      n_instr <= 0; n_from_plic <= 0; n_err <= 0;
    end else begin
      // fetch
      if (f_o.req && f_i.ready) begin
        outstanding <= 1'b1;
        req_pc      <= fetch_pc;
        fetch_pc    <= fetch_pc + PC_W'(8);
      end
      if (f_i.valid) begin
        outstanding <= 1'b0;
        if (drop) drop <= 1'b0;
        else begin
          ibuf_v  <= 1'b1;
          ibuf    <= f_i.instr;
          ibuf_pc <= req_pc;
        end
      end
      if (en) begin
        // execute: loop branch outcome
        if (ex_pend) begin
          ex_pend <= 1'b0;
          if (ex_taken_q && ex_from_if) begin
            fetch_pc <= ex_target; ibuf_v <= 1'b0;
            if ((outstanding && !f_i.valid) || (f_o.req && f_i.ready)) drop <= 1'b1;
          end
        end
        if (p_i.resume) begin
          if (p_i.resume_pc != arch_pc) begin
            n_err <= n_err + 1;
            $display("core %0d: resume at %h, expected %h", TASK, p_i.resume_pc, arch_pc);
          end
          fetch_pc <= p_i.resume_pc; ibuf_v <= 1'b0;
          if ((outstanding && !f_i.valid) || (f_o.req && f_i.ready)) drop <= 1'b1;
        end
        // decode
        if (p_i.id_valid && p_o.id_ready) begin
          logic [63:0] exp_w;
          logic        from_if, tk;
          exp_w   = prog_word(TASK, arch_pc);
          from_if = !p_i.if_stall;
          tk      = 1'b0;
          n_instr <= n_instr + 1;
          if (!from_if) n_from_plic <= n_from_plic + 1;
          if (from_if) ibuf_v <= 1'b0;
          if (p_i.id_instr != exp_w) begin
            n_err <= n_err + 1;
            $display("core %0d: at %h got %h expected %h", TASK, arch_pc, p_i.id_instr, exp_w);
          end
          case (p_i.id_instr[63:60])
            4'd1: begin cnt <= p_i.id_instr[15:0]; brb_done <= 1'b0; arch_pc <= arch_pc + 8; end
            4'd2: begin tk = (cnt != 16'd1); cnt <= cnt - 16'd1; brb_done <= 1'b0; end
            4'd3: begin tk = !brb_done; brb_done <= 1'b1; end
            4'd4: tk = cnt[0];
            4'd5: begin
              arch_pc <= p_i.id_instr[PC_W-1:0];
              fetch_pc <= p_i.id_instr[PC_W-1:0];
              if ((outstanding && !f_i.valid) || (f_o.req && f_i.ready)) drop <= 1'b1;
            end
            default: arch_pc <= arch_pc + 8;
          endcase
          if (p_i.id_instr[63:60] inside {4'd2, 4'd3, 4'd4}) begin
            ex_pend    <= 1'b1;
            ex_taken_q <= tk;
            ex_from_if <= from_if;
            ex_target  <= p_i.id_instr[PC_W-1:0];
            arch_pc    <= tk ? p_i.id_instr[PC_W-1:0] : arch_pc + 8;
          end
        end
      end
    end
  end

endmodule
