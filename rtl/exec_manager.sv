// exec_manager - hardware task-graph execution manager.
//
// Steers the execution of a scheduled task graph (a DAG) on NUM_RU
// reconfigurable units. It contains:
//   * graph_loader      - takes the graph description and schedule records,
//   * dep_table         - associative table of task dependencies,
//   * del_update_unit   - walks the successors of a finished task,
//   * sync_fifo         - the reconfiguration FIFO (reconfiguration sequence),
//   * ru_info x NUM_RU  - schedule FIFO, current-task and state registers and
//                         controller of each unit,
//   * event_queue       - arbiter and queue of run-time events,
//   * control_unit      - processes the events one at a time.
// Reconfigurations are started as early as the sequence, the single
// reconfiguration circuitry and the units allow (prefetch), and a load of a
// configuration already in its unit is replaced by a one-cycle reuse.
// Toward the RUs each unit has point-to-point start/done signals for a
// reconfiguration and for an execution, with the cycle counts to program.
// Toward the processor: the record stream and a level interrupt at the end
// of the graph, cleared by irq_ack. The table's tag input comes from the
// control unit, or from del_update_unit while successors are being updated.
module exec_manager
  import tgem_pkg::*;
#(
  parameter int NUM_RU     = 4,
  parameter int ENTRIES    = 8,
  parameter int SUB_SIZE   = 8,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // processor side
  input  logic                in_valid,
  output logic                in_ready,
  input  graph_rec_t          in_rec,
  output logic                irq,
  input  logic                irq_ack,
  output logic                graph_active,
  output logic                load_error,
  output logic                rc_busy,
  // RU side
  output logic [NUM_RU-1:0]   rec_start,
  output cyc_t                rec_cycles  [NUM_RU],
  input  logic [NUM_RU-1:0]   rec_done,
  output logic [NUM_RU-1:0]   exec_start,
  output cyc_t                exec_cycles [NUM_RU],
  input  logic [NUM_RU-1:0]   exec_done,
  output tag_t                ru_tag      [NUM_RU]
);
  localparam int N_SRC = NUM_RU + 1;

  // graph input
  logic                 ins_req, ins_done, ins_fail;
  task_info_t           ins_info;
  logic [NUM_RU-1:0]    sched_push, sched_full, sched_empty;
  sched_entry_t         sched_entry;
  logic                 rec_push, rec_full, rec_empty, rec_pop;
  rec_entry_t           rec_entry, rec_head;
  logic                 graph_start;
  tag_t                 num_tasks;

  // table
  tag_t                 tbl_tag, cu_tag, du_succ;
  logic                 tbl_clear, tbl_use_du, tbl_hit, tbl_ready, tbl_solved;
  cnt_t                 tbl_nsucc;
  tag_t [MAX_SUCC-1:0]  tbl_succ;
  logic                 du_load, du_busy, du_solved;

  // events
  logic [N_SRC-1:0]     ev_req, ev_gnt;
  event_t               ev_in [N_SRC];
  event_t               ev_head;
  logic                 ev_empty, ev_pop;

  // RU info
  ru_state_e            ru_state [NUM_RU];
  tag_t                 ru_cur   [NUM_RU];
  tag_t                 ru_head  [NUM_RU];
  logic [NUM_RU-1:0]    ru_pend, load_order, exec_order;

  graph_loader #(.NUM_RU(NUM_RU)) u_loader (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_rec,
    .ins_req, .ins_info, .ins_done, .ins_fail,
    .sched_push, .sched_entry, .sched_full,
    .rec_push, .rec_entry, .rec_full,
    .ev_req  (ev_req[NUM_RU]),
    .ev      (ev_in[NUM_RU]),
    .ev_gnt  (ev_gnt[NUM_RU]),
    .graph_active, .graph_start, .num_tasks, .load_error
  );

  assign tbl_tag    = tbl_use_du ? du_succ : cu_tag;
  assign tbl_solved = tbl_use_du && du_solved;

  dep_table #(.ENTRIES(ENTRIES), .SUB_SIZE(SUB_SIZE)) u_table (
    .clk, .rst_n,
    .ins_req, .ins_info, .ins_done, .ins_fail,
    .tag        (tbl_tag),
    .solved_dep (tbl_solved),
    .clear      (tbl_clear),
    .hit        (tbl_hit),
    .num_succ   (tbl_nsucc),
    .succ       (tbl_succ),
    .task_ready (tbl_ready),
    .valid      ()
  );

  del_update_unit u_du (
    .clk, .rst_n,
    .load       (du_load),
    .num_succ   (tbl_nsucc),
    .succ_in    (tbl_succ),
    .cur_succ   (du_succ),
    .solved_dep (du_solved),
    .busy       (du_busy)
  );

  sync_fifo #(.T(rec_entry_t), .DEPTH(FIFO_DEPTH)) u_rec_fifo (
    .clk, .rst_n,
    .push  (rec_push),
    .wdata (rec_entry),
    .pop   (rec_pop),
    .rdata (rec_head),
    .empty (rec_empty),
    .full  (rec_full),
    .count ()
  );

  for (genvar r = 0; r < NUM_RU; r++) begin : g_ru
    ru_info #(.DEPTH(FIFO_DEPTH), .RU_ID(r)) u_ru (
      .clk, .rst_n,
      .sched_push  (sched_push[r]),
      .sched_in    (sched_entry),
      .sched_full  (sched_full[r]),
      .sched_empty (sched_empty[r]),
      .load_order  (load_order[r]),
      .exec_order  (exec_order[r]),
      .state       (ru_state[r]),
      .cur_tag     (ru_cur[r]),
      .head_tag    (ru_head[r]),
      .ev_req      (ev_req[r]),
      .ev          (ev_in[r]),
      .ev_gnt      (ev_gnt[r]),
      .ev_pending  (ru_pend[r]),
      .rec_start   (rec_start[r]),
      .rec_cycles  (rec_cycles[r]),
      .rec_done    (rec_done[r]),
      .exec_start  (exec_start[r]),
      .exec_cycles (exec_cycles[r]),
      .exec_done   (exec_done[r])
    );
    assign ru_tag[r] = ru_cur[r];
  end

  event_queue #(.N_SRC(N_SRC), .DEPTH(FIFO_DEPTH)) u_evq (
    .clk, .rst_n,
    .req   (ev_req),
    .ev_in (ev_in),
    .gnt   (ev_gnt),
    .pop   (ev_pop),
    .head  (ev_head),
    .empty (ev_empty),
    .full  ()
  );

  control_unit #(.NUM_RU(NUM_RU)) u_cu (
    .clk, .rst_n,
    .ev_head, .ev_empty, .ev_pop,
    .rec_head, .rec_empty, .rec_pop,
    .ru_state,
    .ru_cur_tag     (ru_cur),
    .ru_head_tag    (ru_head),
    .ru_ev_pending  (ru_pend),
    .ru_sched_empty (sched_empty),
    .load_order, .exec_order,
    .tbl_tag        (cu_tag),
    .tbl_clear, .tbl_use_du, .tbl_hit, .tbl_ready,
    .du_load, .du_busy,
    .graph_start, .num_tasks, .graph_active,
    .irq, .irq_ack, .rc_busy
  );
endmodule
