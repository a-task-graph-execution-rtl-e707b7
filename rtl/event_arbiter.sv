// event_arbiter - fixed-priority arbiter in front of the event queue.
//
// Several RU controllers (and the graph input) may want to write an event
// in the same cycle. The arbiter grants at most one request per cycle,
// the lowest-numbered requester winning, by raising its grant line; while
// the queue is full it grants nothing, so requesters hold their event.
// Purely combinational. The priority order is this design's choice.
module event_arbiter #(
  parameter int N = 5
) (
  input  logic [N-1:0] req,
  input  logic         full,
  output logic [N-1:0] gnt
);
  always_comb begin
    gnt = '0;
    if (!full) begin
      for (int i = N-1; i >= 0; i--) begin
        if (req[i]) gnt = N'(1) << i;
      end
    end
  end
endmodule
