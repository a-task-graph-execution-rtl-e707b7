// event_queue - queue of run-time events waiting for the control unit.
//
// N_SRC sources (the RU controllers and the graph input) offer events with
// req/ev_in and hold them until their grant line rises. The fixed-priority
// event_arbiter grants one source per cycle and none while the queue is
// full; the granted event is written into a FIFO of DEPTH entries, each
// holding the event code, the task tag and the RU index. The control unit
// reads the oldest event on head and removes it with pop.
// The arbiter and the code/tag contents follow the document; the RU field
// and the depth are this design's choices.
module event_queue
  import tgem_pkg::*;
#(
  parameter int N_SRC = 5,
  parameter int DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_SRC-1:0]  req,
  input  event_t            ev_in [N_SRC],
  output logic [N_SRC-1:0]  gnt,
  input  logic              pop,
  output event_t            head,
  output logic              empty,
  output logic              full
);
  event_t wsel;

  event_arbiter #(.N(N_SRC)) u_arb (
    .req,
    .full,
    .gnt
  );

  always_comb begin
    wsel = '0;
    for (int i = 0; i < N_SRC; i++) begin
      if (gnt[i]) wsel = ev_in[i];
    end
  end

  sync_fifo #(.T(event_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push  (|gnt),
    .wdata (wsel),
    .pop,
    .rdata (head),
    .empty,
    .full,
    .count ()
  );

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
