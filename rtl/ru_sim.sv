// ru_sim - reconfigurable-unit model built from programmable counters.
//
// Stands in for a real reconfigurable unit when measuring the manager: it
// has one counter for the reconfiguration latency, one for the execution
// time, and a state register holding the task it serves. rec_start (or
// exec_start) loads the corresponding counter with rec_cycles (exec_cycles)
// and the unit counts down; rec_done (exec_done) is high for one cycle,
// the N-th cycle after the cycle of the start pulse, N being the programmed
// count (0 is treated as 1), so the unit is busy for exactly N cycles. A start while the unit is busy is ignored.
// The two counters and the state register follow the document; the exact
// timing is this design's choice.
module ru_sim
  import tgem_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  tag_t  task_tag,
  input  logic  rec_start,
  input  cyc_t  rec_cycles,
  output logic  rec_done,
  input  logic  exec_start,
  input  cyc_t  exec_cycles,
  output logic  exec_done,
  output logic  busy,
  output tag_t  state_tag
);
  typedef enum logic [1:0] {S_IDLE, S_RECONF, S_EXEC} sim_state_e;

  sim_state_e st;
  tag_t       cur_tag;
  cyc_t       rec_cnt, exec_cnt;

  assign busy      = (st != S_IDLE);
  assign state_tag = cur_tag;
  assign rec_done  = (st == S_RECONF) && (rec_cnt == cyc_t'(1));
  assign exec_done = (st == S_EXEC)   && (exec_cnt == cyc_t'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cur_tag   <= '0;
      rec_cnt   <= '0;
      exec_cnt  <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (rec_start) begin
            st      <= S_RECONF;
            cur_tag <= task_tag;
            rec_cnt <= (rec_cycles == '0) ? cyc_t'(1) : rec_cycles;
          end else if (exec_start) begin
            st       <= S_EXEC;
            cur_tag  <= task_tag;
            exec_cnt <= (exec_cycles == '0) ? cyc_t'(1) : exec_cycles;
          end
        end
        S_RECONF: begin
          rec_cnt <= rec_cnt - 1'b1;
          if (rec_cnt == cyc_t'(1)) st <= S_IDLE;
        end
        S_EXEC: begin
          exec_cnt <= exec_cnt - 1'b1;
          if (exec_cnt == cyc_t'(1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
