// del_update_unit - sequencer of the "deletion and update" operation.
//
// When a task finishes, the control unit reads its table entry and pulses
// load: the successor tags are captured in the successor registers and the
// number of successors in the control counter. From the next cycle on, the
// control counter selects one successor through a multiplexer whose input 0
// is tied to zero; while the counter is non-zero the unit drives that tag
// as cur_succ together with solved_dep, and the counter decrements. The
// operation therefore takes one cycle per successor (O(N)) and ends when the
// counter reaches zero (busy falls). Successors are visited from the last
// to the first; a count above MAX_SUCC is clamped.
// Register, counter and multiplexer follow the document's figure of this
// unit; the visiting order and clamping are this design's choice.
module del_update_unit
  import tgem_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  cnt_t                 num_succ,
  input  tag_t [MAX_SUCC-1:0]  succ_in,
  output tag_t                 cur_succ,
  output logic                 solved_dep,
  output logic                 busy
);
  tag_t [MAX_SUCC-1:0] succ_q;
  cnt_t                ctr;
  tag_t                mux_in [MAX_SUCC+1];

  always_comb begin
    mux_in[0] = '0;                       // input 0 is grounded
    for (int i = 1; i <= MAX_SUCC; i++) mux_in[i] = succ_q[i-1];
  end

  always_comb begin
    cur_succ = '0;
    for (int i = 0; i <= MAX_SUCC; i++) if (ctr == cnt_t'(i)) cur_succ = mux_in[i];
  end
  assign solved_dep = (ctr != '0);
  assign busy       = (ctr != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      succ_q <= '0;
      ctr    <= '0;
    end else if (load) begin
      succ_q <= succ_in;
      ctr    <= (num_succ > cnt_t'(MAX_SUCC)) ? cnt_t'(MAX_SUCC) : num_succ;
    end else if (ctr != '0) begin
      ctr <= ctr - 1'b1;
    end
  end
endmodule
