// sync_fifo - first-in first-out store with a typed entry.
//
// Used as the reconfiguration FIFO of the manager: it keeps the
// reconfiguration sequence of the current task graph in order, and its
// head is the next task to be loaded. The same store holds the schedule of
// each reconfigurable unit and the event queue.
//
// Circular buffer of DEPTH entries with read and write pointers and an
// occupancy counter. The head is visible on rdata while the FIFO is not
// empty (first-word fall-through), so a reader can inspect the next entry
// before removing it. push and pop may happen in the same cycle. A push to
// a full FIFO or a pop from an empty one is ignored (and flagged by an
// assertion). Synchronous active-low reset empties the FIFO.
// The depth is this design's choice; the document does not size its FIFOs.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  T                           wdata,
  input  logic                       pop,
  output T                           rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic            do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
