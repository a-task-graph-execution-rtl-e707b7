// graph_timer - measures the total execution time of a task graph.
//
// The evaluation platform includes a timer next to the manager that gives
// the execution time of a whole graph, to be compared with the graph's
// ideal time. Here the span is taken in hardware: the counter clears and
// starts when graph_active rises (the graph description is complete and
// the manager starts), counts one per clock while graph_active is high,
// and stops and holds its value when graph_active falls (the last task has
// ended). 'running' is high while it counts. The count saturates at its
// maximum instead of wrapping.
// The timer's purpose follows the document; starting and stopping it from
// the manager's own graph_active signal, instead of software reads, is
// this design's choice.
module graph_timer
  import tgem_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  graph_active,
  output cyc_t  elapsed,
  output logic  running
);
  logic active_q;

  assign running = graph_active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      elapsed  <= '0;
    end else begin
      active_q <= graph_active;
      if (graph_active && !active_q) elapsed <= cyc_t'(1);
      else if (graph_active && elapsed != '1) elapsed <= elapsed + 1'b1;
    end
  end
endmodule
