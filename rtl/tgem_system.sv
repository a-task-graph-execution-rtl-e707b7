// tgem_system - execution manager with its reconfigurable units.
//
// The evaluation platform of the manager: exec_manager connected point to
// point to NUM_RU reconfigurable units, each modelled by ru_sim (a
// reconfiguration counter, an execution counter and a state register).
// The processor side is what the processor's bus interface would carry: the
// graph record stream (in_valid/in_ready/in_rec) and the end-of-graph
// interrupt (irq, cleared by irq_ack). The per-unit start and done strobes
// are brought out so that the reconfigurations, reuses and executions can be
// observed and timed, and graph_timer gives the execution time of the last
// graph in cycles (graph_cycles). The processor, buses, DMA and memories are
// not part of this top.
module tgem_system
  import tgem_pkg::*;
#(
  parameter int NUM_RU     = 4,
  parameter int ENTRIES    = 8,
  parameter int SUB_SIZE   = 8,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  graph_rec_t          in_rec,
  output logic                irq,
  input  logic                irq_ack,
  output logic                graph_active,
  output logic                load_error,
  output logic                rc_busy,
  output logic [NUM_RU-1:0]   ru_busy,
  output cyc_t                graph_cycles,
  output logic [NUM_RU-1:0]   rec_start,
  output logic [NUM_RU-1:0]   rec_done,
  output logic [NUM_RU-1:0]   exec_start,
  output logic [NUM_RU-1:0]   exec_done,
  output tag_t                ru_tag [NUM_RU]
);
  cyc_t rec_cycles  [NUM_RU];
  cyc_t exec_cycles [NUM_RU];

  exec_manager #(
    .NUM_RU(NUM_RU), .ENTRIES(ENTRIES), .SUB_SIZE(SUB_SIZE), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_mgr (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_rec,
    .irq, .irq_ack, .graph_active, .load_error, .rc_busy,
    .rec_start, .rec_cycles, .rec_done,
    .exec_start, .exec_cycles, .exec_done,
    .ru_tag
  );

  graph_timer u_timer (
    .clk, .rst_n,
    .graph_active,
    .elapsed (graph_cycles),
    .running ()
  );

  for (genvar r = 0; r < NUM_RU; r++) begin : g_ru
    ru_sim u_ru (
      .clk, .rst_n,
      .task_tag    (ru_tag[r]),
      .rec_start   (rec_start[r]),
      .rec_cycles  (rec_cycles[r]),
      .rec_done    (rec_done[r]),
      .exec_start  (exec_start[r]),
      .exec_cycles (exec_cycles[r]),
      .exec_done   (exec_done[r]),
      .busy        (ru_busy[r]),
      .state_tag   ()
    );
  end
endmodule
