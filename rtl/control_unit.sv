// control_unit - event-driven controller of the task-graph execution manager.
//
// Takes one event at a time from the event queue and performs its actions:
//   new graph            : look for a reconfiguration.
//   end of execution     : deletion and update of the finished task in the
//                          table (one cycle to read and free the entry, then
//                          one cycle per successor in del_update_unit), look
//                          for a reconfiguration, then scan every RU and
//                          start the loaded task of each RU whose task is
//                          ready (two cycles per RU: present tag, read ready).
//   end of reconfiguration,
//   reused task          : check the loaded task (two cycles) and start it if
//                          ready, then look for a reconfiguration.
// Look for a reconfiguration: if no RU is being reconfigured (the single
// reconfiguration circuitry is free) and the RU named by the head of the
// reconfiguration FIFO is FREE, pop the head and send that RU a load order;
// the RU reconfigures or reuses. At most one order per look.
// An execution is ordered only for an RU in LOADED with no event waiting, so
// a task started by a scan is not started again by its own late event.
// The end-of-execution events are counted; when the count reaches the task
// count of the graph, irq rises and stays until irq_ack.
// The event actions follow the document; the step order inside each action
// and the cycle costs are this design's.
module control_unit
  import tgem_pkg::*;
#(
  parameter int NUM_RU = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // event queue
  input  event_t               ev_head,
  input  logic                 ev_empty,
  output logic                 ev_pop,
  // reconfiguration FIFO
  input  rec_entry_t           rec_head,
  input  logic                 rec_empty,
  output logic                 rec_pop,
  // RU info
  input  ru_state_e            ru_state   [NUM_RU],
  input  tag_t                 ru_cur_tag [NUM_RU],
  input  tag_t                 ru_head_tag [NUM_RU],
  input  logic [NUM_RU-1:0]    ru_ev_pending,
  input  logic [NUM_RU-1:0]    ru_sched_empty,
  output logic [NUM_RU-1:0]    load_order,
  output logic [NUM_RU-1:0]    exec_order,
  // table of task dependencies
  output tag_t                 tbl_tag,
  output logic                 tbl_clear,
  output logic                 tbl_use_du,  // table tag/update from del_update_unit
  input  logic                 tbl_hit,
  input  logic                 tbl_ready,
  output logic                 du_load,
  input  logic                 du_busy,
  // graph bookkeeping
  input  logic                 graph_start,
  input  tag_t                 num_tasks,
  output logic                 graph_active,
  output logic                 irq,
  input  logic                 irq_ack,
  output logic                 rc_busy
);
  localparam int IW = (NUM_RU > 1) ? $clog2(NUM_RU) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_DISPATCH, S_DEL_READ, S_DEL_WAIT, S_LFR,
    S_SCAN_REQ, S_SCAN_RD, S_CHK_REQ, S_CHK_RD
  } cu_state_e;

  cu_state_e     st;
  event_t        cur;
  logic [IW-1:0] scan_i;
  tag_t          done_cnt;
  tag_t          total;

  logic          lfr_ok;
  logic [IW-1:0] rec_ru;

  always_comb begin
    rc_busy = 1'b0;
    for (int i = 0; i < NUM_RU; i++) if (ru_state[i] == RU_RECONF) rc_busy = 1'b1;
  end

  always_comb begin
    rec_ru = rec_head.ru[IW-1:0];
    lfr_ok = 1'b0;
    if (!rc_busy && !rec_empty && int'(rec_head.ru) < NUM_RU) begin
      lfr_ok = (ru_state[rec_ru] == RU_FREE) && !ru_ev_pending[rec_ru] && !ru_sched_empty[rec_ru];
    end
  end

  // Combinational outputs per state.
  always_comb begin
    ev_pop     = 1'b0;
    rec_pop    = 1'b0;
    load_order = '0;
    exec_order = '0;
    tbl_tag    = cur.tag;
    tbl_clear  = 1'b0;
    tbl_use_du = 1'b0;
    du_load    = 1'b0;
    unique case (st)
      S_IDLE:     ev_pop = !ev_empty;
      S_DEL_READ: begin
        tbl_clear = tbl_hit;
        du_load   = tbl_hit;
      end
      S_DEL_WAIT: tbl_use_du = 1'b1;
      S_LFR: if (lfr_ok) begin
        rec_pop            = 1'b1;
        load_order[rec_ru] = 1'b1;
      end
      S_SCAN_REQ, S_SCAN_RD: tbl_tag = ru_cur_tag[scan_i];
      default: ;
    endcase
    if (st == S_SCAN_RD && tbl_ready && ru_state[scan_i] == RU_LOADED && !ru_ev_pending[scan_i])
      exec_order[scan_i] = 1'b1;
    if (st == S_CHK_RD && tbl_ready) begin
      for (int i = 0; i < NUM_RU; i++) begin
        if (int'(cur.ru) == i && ru_state[i] == RU_LOADED && !ru_ev_pending[i] && ru_cur_tag[i] == cur.tag)
          exec_order[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      cur          <= '0;
      scan_i       <= '0;
      done_cnt     <= '0;
      total        <= '0;
      graph_active <= 1'b0;
      irq          <= 1'b0;
    end else begin
      if (irq_ack) irq <= 1'b0;
      if (graph_start) begin
        total        <= num_tasks;
        done_cnt     <= '0;
        graph_active <= 1'b1;
      end
      unique case (st)
        S_IDLE: if (!ev_empty) begin
          cur <= ev_head;
          st  <= S_DISPATCH;
        end
        S_DISPATCH: begin
          unique case (cur.code)
            EV_NEW_GRAPH:  st <= S_LFR;
            EV_END_EXEC:   st <= S_DEL_READ;
            default:       st <= S_CHK_REQ;   // end of reconfiguration, reused task
          endcase
        end
        S_DEL_READ: begin
          if (tbl_hit) begin
            done_cnt <= done_cnt + 1'b1;
            if (graph_active && done_cnt + 1'b1 == total) begin
              irq          <= 1'b1;
              graph_active <= 1'b0;
            end
          end
          st <= S_DEL_WAIT;
        end
        S_DEL_WAIT: if (!du_busy) st <= S_LFR;
        S_LFR: begin
          if (cur.code == EV_END_EXEC) begin
            scan_i <= '0;
            st     <= S_SCAN_REQ;
          end else begin
            st <= S_IDLE;
          end
        end
        S_SCAN_REQ: begin
          if (ru_state[scan_i] == RU_LOADED && !ru_ev_pending[scan_i]) st <= S_SCAN_RD;
          else if (int'(scan_i) == NUM_RU-1) st <= S_IDLE;
          else scan_i <= scan_i + 1'b1;
        end
        S_SCAN_RD: begin
          if (int'(scan_i) == NUM_RU-1) st <= S_IDLE;
          else begin
            scan_i <= scan_i + 1'b1;
            st     <= S_SCAN_REQ;
          end
        end
        S_CHK_REQ: st <= S_CHK_RD;
        S_CHK_RD:  st <= S_LFR;
        default:   st <= S_IDLE;
      endcase
    end
  end

  // The RU loads the task named by the reconfiguration sequence.
  for (genvar i = 0; i < NUM_RU; i++) begin : g_chk
    a_seq_match: assert property (@(posedge clk) disable iff (!rst_n)
      load_order[i] |-> ru_head_tag[i] == rec_head.tag);
  end

  // One order of each kind per cycle.
  a_one_reconf: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(load_order) && $onehot0(exec_order));
endmodule
