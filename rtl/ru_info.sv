// ru_info - per-unit information and controller of one reconfigurable unit.
//
// Holds, for one RU:
//   * a FIFO with the tasks assigned to the unit, in execution order; its
//     head is the next task to be executed on the unit,
//   * the current-task register (tag, configuration, execution time) and a
//     flag telling whether the configuration in the unit is valid,
//   * the unit-state register (FREE, RECONF, LOADED, EXEC),
// and the small controller between the manager and the unit.
//
// load_order (accepted in FREE only) moves the FIFO head into the current
// task register. If the unit already holds that configuration the task is
// reused: the state goes to LOADED at once and a reused-task event is
// raised. Otherwise rec_start is pulsed with the task's reconfiguration
// time, the state is RECONF until rec_done, then LOADED with an
// end-of-reconfiguration event. exec_order (accepted in LOADED) pulses
// exec_start with the execution time; at exec_done the state returns to
// FREE (the configuration stays valid for later reuse) and an
// end-of-execution event is raised.
//
// Events are offered on ev_req/ev until ev_gnt; while one waits
// (ev_pending) the unit takes no order. Orders are single-cycle pulses.
// Reuse detection by configuration id and the event hold-off are this
// design's choices; the FIFO, registers and events follow the document.
module ru_info
  import tgem_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int RU_ID = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  // schedule from the graph input
  input  logic          sched_push,
  input  sched_entry_t  sched_in,
  output logic          sched_full,
  output logic          sched_empty,
  // orders from the control unit
  input  logic          load_order,
  input  logic          exec_order,
  output ru_state_e     state,
  output tag_t          cur_tag,
  output tag_t          head_tag,
  // event to the queue
  output logic          ev_req,
  output event_t        ev,
  input  logic          ev_gnt,
  output logic          ev_pending,
  // to / from the unit
  output logic          rec_start,
  output cyc_t          rec_cycles,
  input  logic          rec_done,
  output logic          exec_start,
  output cyc_t          exec_cycles,
  input  logic          exec_done
);
  sched_entry_t head;
  logic         fifo_pop;
  logic         cfg_valid;
  cfg_t         cur_cfg;
  cyc_t         cur_exec;
  logic         reuse;

  sync_fifo #(.T(sched_entry_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push  (sched_push),
    .wdata (sched_in),
    .pop   (fifo_pop),
    .rdata (head),
    .empty (sched_empty),
    .full  (sched_full),
    .count ()
  );

  logic take_load, take_exec;
  assign take_load = load_order && state == RU_FREE && !ev_pending && !sched_empty;
  assign take_exec = exec_order && state == RU_LOADED && !ev_pending;
  assign fifo_pop  = take_load;
  assign reuse     = cfg_valid && (head.cfg == cur_cfg);
  assign head_tag  = head.tag;
  assign ev_req    = ev_pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= RU_FREE;
      cfg_valid   <= 1'b0;
      cur_cfg     <= '0;
      cur_tag     <= '0;
      cur_exec    <= '0;
      ev_pending  <= 1'b0;
      ev          <= '0;
      rec_start   <= 1'b0;
      rec_cycles  <= '0;
      exec_start  <= 1'b0;
      exec_cycles <= '0;
    end else begin
      rec_start  <= 1'b0;
      exec_start <= 1'b0;
      if (ev_gnt) ev_pending <= 1'b0;

      if (take_load) begin
        cur_tag  <= head.tag;
        cur_cfg  <= head.cfg;
        cur_exec <= head.exec_cycles;
        if (reuse) begin
          state      <= RU_LOADED;
          ev_pending <= 1'b1;
          ev         <= '{code: EV_REUSED, tag: head.tag, ru: ru_idx_t'(RU_ID)};
        end else begin
          state      <= RU_RECONF;
          cfg_valid  <= 1'b0;
          rec_start  <= 1'b1;
          rec_cycles <= head.rec_cycles;
        end
      end

      if (take_exec) begin
        state       <= RU_EXEC;
        exec_start  <= 1'b1;
        exec_cycles <= cur_exec;
      end

      if (state == RU_RECONF && rec_done) begin
        state      <= RU_LOADED;
        cfg_valid  <= 1'b1;
        ev_pending <= 1'b1;
        ev         <= '{code: EV_END_RECONF, tag: cur_tag, ru: ru_idx_t'(RU_ID)};
      end

      if (state == RU_EXEC && exec_done) begin
        state      <= RU_FREE;
        ev_pending <= 1'b1;
        ev         <= '{code: EV_END_EXEC, tag: cur_tag, ru: ru_idx_t'(RU_ID)};
      end
    end
  end

  // An event is never overwritten before it has been granted.
  a_no_event_loss: assert property (@(posedge clk) disable iff (!rst_n)
    ev_pending && !ev_gnt |=> $stable(ev));
  a_done_in_state: assert property (@(posedge clk) disable iff (!rst_n)
    (rec_done -> state == RU_RECONF) && (exec_done -> state == RU_EXEC));
endmodule
