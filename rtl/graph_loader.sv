// graph_loader - graph input of the execution manager.
//
// The processor (directly or by DMA) sends the description of a task graph
// and its schedule as a stream of graph_rec_t records on a valid/ready
// handshake. Each record is routed to the structure it fills:
//   REC_TASK   -> insertion into the table of task dependencies; the record
//                 is accepted when the table reports ins_done (or ins_fail),
//   REC_SCHED  -> push into the schedule FIFO of RU 'ru' (records for one RU
//                 arrive in that RU's execution order),
//   REC_RECONF -> push into the reconfiguration FIFO (in sequence order),
//   REC_END    -> the graph is complete: graph_start pulses with the task
//                 count and a new-graph event is offered to the event queue
//                 until granted.
// No record is accepted while a graph is running or the new-graph event
// waits. The record format is this design's; the document only says that
// the graph description and the schedule are sent to the manager.
module graph_loader
  import tgem_pkg::*;
#(
  parameter int NUM_RU = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  graph_rec_t          in_rec,
  // table insertion
  output logic                ins_req,
  output task_info_t          ins_info,
  input  logic                ins_done,
  input  logic                ins_fail,
  // RU schedules
  output logic [NUM_RU-1:0]   sched_push,
  output sched_entry_t        sched_entry,
  input  logic [NUM_RU-1:0]   sched_full,
  // reconfiguration FIFO
  output logic                rec_push,
  output rec_entry_t          rec_entry,
  input  logic                rec_full,
  // new-graph event
  output logic                ev_req,
  output event_t              ev,
  input  logic                ev_gnt,
  // to the control unit
  input  logic                graph_active,
  output logic                graph_start,
  output tag_t                num_tasks,
  output logic                load_error
);
  logic ev_pending;
  logic open;

  assign open        = !graph_active && !ev_pending;
  assign ins_info    = in_rec.info;
  assign sched_entry = in_rec.sched;
  assign rec_entry   = '{tag: in_rec.info.tag, ru: in_rec.ru};
  assign ev_req      = ev_pending;
  assign ev          = '{code: EV_NEW_GRAPH, tag: '0, ru: '0};
  assign num_tasks   = in_rec.num_tasks;

  always_comb begin
    in_ready    = 1'b0;
    ins_req     = 1'b0;
    sched_push  = '0;
    rec_push    = 1'b0;
    graph_start = 1'b0;
    if (open) begin
      unique case (in_rec.kind)
        REC_TASK: begin
          ins_req  = in_valid;
          in_ready = ins_done || ins_fail;
        end
        REC_SCHED: begin
          in_ready = 1'b1;
          for (int i = 0; i < NUM_RU; i++) begin
            if (int'(in_rec.ru) == i) begin
              in_ready      = !sched_full[i];
              sched_push[i] = in_valid && !sched_full[i];
            end
          end
        end
        REC_RECONF: begin
          in_ready = !rec_full;
          rec_push = in_valid && !rec_full;
        end
        REC_END: begin
          in_ready    = 1'b1;
          graph_start = in_valid;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ev_pending <= 1'b0;
      load_error <= 1'b0;
    end else begin
      if (ev_gnt) ev_pending <= 1'b0;
      if (graph_start) begin
        ev_pending <= 1'b1;
        load_error <= 1'b0;
      end
      if (open && in_valid && in_rec.kind == REC_TASK && ins_fail) load_error <= 1'b1;
      if (open && in_valid && in_rec.kind == REC_SCHED && int'(in_rec.ru) >= NUM_RU) load_error <= 1'b1;
    end
  end
endmodule
