// dep_table_entry - one entry of the associative table of task dependencies.
//
// The entry holds a task tag, a predecessor counter (dependencies not yet
// resolved), the number of successors and the successor tags, as in the
// manager's table entry. Load writes all fields and marks the entry valid.
// The table's tag input is compared with the stored tag; on a hit:
//   solved_dep  decrements the predecessor counter (saturating at zero),
//   clear       frees the entry (the deletion step).
// Outputs are combinational: hit, ready (hit and predecessor counter zero),
// and the successor count and tags, which the table muxes onto its data out.
// A valid bit, saturation and clear-on-hit are this design's additions.
module dep_table_entry
  import tgem_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  task_info_t           info,
  input  tag_t                 tag,
  input  logic                 solved_dep,
  input  logic                 clear,
  output logic                 valid,
  output logic                 hit,
  output logic                 ready,
  output cnt_t                 num_succ,
  output tag_t [MAX_SUCC-1:0]  succ
);
  task_info_t e;

  assign hit      = valid && (e.tag == tag);
  assign ready    = hit && (e.pred_cnt == '0);
  assign num_succ = e.num_succ;
  assign succ     = e.succ;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      e     <= '0;
    end else if (load) begin
      valid <= 1'b1;
      e     <= info;
    end else if (hit) begin
      if (clear) valid <= 1'b0;
      else if (solved_dep && e.pred_cnt != '0) e.pred_cnt <= e.pred_cnt - 1'b1;
    end
  end
endmodule
