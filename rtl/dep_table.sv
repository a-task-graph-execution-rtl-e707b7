// dep_table - associative table of task dependencies.
//
// Holds one entry (dep_table_entry) per task of the running graph and
// supports the manager's table operations:
//   insertion  - ins_req is held with ins_info until ins_done (or ins_fail
//                when every entry is taken). The table is split into
//                sub-tables of SUB_SIZE entries, each with a register that
//                points to its first free entry. One sub-table is examined
//                per cycle, starting with the first, so insertion takes
//                1 cycle if sub-table 0 has room, k+1 cycles if the first
//                free entry is in sub-table k. The clock period therefore
//                does not grow with the table size.
//   check      - the tag input is compared with every entry; task_ready is
//                registered and valid in the cycle after the tag is given.
//   update     - solved_dep with a tag decrements that task's predecessor
//                counter (driven by del_update_unit).
//   deletion   - clear with a tag frees that task's entry.
// Data out (hit, num_succ, succ) is combinational for the current tag.
// The free-entry registers are computed from the valid bits of the next
// cycle so that back-to-back insertions see the entry just written.
// Sub-table insertion follows the document; table-full handling is this
// design's choice.
module dep_table
  import tgem_pkg::*;
#(
  parameter int ENTRIES  = 8,
  parameter int SUB_SIZE = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // insertion
  input  logic                 ins_req,
  input  task_info_t           ins_info,
  output logic                 ins_done,
  output logic                 ins_fail,
  // check / update / deletion
  input  tag_t                 tag,
  input  logic                 solved_dep,
  input  logic                 clear,
  output logic                 hit,
  output cnt_t                 num_succ,
  output tag_t [MAX_SUCC-1:0]  succ,
  output logic                 task_ready,
  output logic [ENTRIES-1:0]   valid
);
  localparam int NSUB  = (ENTRIES + SUB_SIZE - 1) / SUB_SIZE;
  localparam int SW    = (SUB_SIZE > 1) ? $clog2(SUB_SIZE) : 1;
  localparam int NW    = (NSUB > 1) ? $clog2(NSUB) : 1;

  logic [ENTRIES-1:0]         hit_v, ready_v, load_v, valid_next;
  cnt_t                       nsucc_v [ENTRIES];
  tag_t [MAX_SUCC-1:0]        succ_v  [ENTRIES];

  // Per sub-table: register to the first free entry, and a full flag.
  logic [SW-1:0]              first_free [NSUB];
  logic [NSUB-1:0]            sub_full;
  logic [NW-1:0]              sidx;          // sub-table examined this cycle

  for (genvar i = 0; i < ENTRIES; i++) begin : g_entry
    dep_table_entry u_entry (
      .clk, .rst_n,
      .load       (load_v[i]),
      .info       (ins_info),
      .tag,
      .solved_dep,
      .clear,
      .valid      (valid[i]),
      .hit        (hit_v[i]),
      .ready      (ready_v[i]),
      .num_succ   (nsucc_v[i]),
      .succ       (succ_v[i])
    );
    assign valid_next[i] = load_v[i] | (valid[i] & ~(hit_v[i] & clear));
  end

  // Data out: tags are unique, so at most one entry hits.
  always_comb begin
    hit      = |hit_v;
    num_succ = '0;
    succ     = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (hit_v[i]) begin
        num_succ = num_succ | nsucc_v[i];
        succ     = succ | succ_v[i];
      end
    end
  end

  // Insertion into the examined sub-table.
  always_comb begin
    load_v   = '0;
    ins_done = 1'b0;
    ins_fail = 1'b0;
    if (ins_req) begin
      if (!sub_full[sidx]) begin
        load_v[int'(sidx) * SUB_SIZE + int'(first_free[sidx])] = 1'b1;
        ins_done = 1'b1;
      end else if (int'(sidx) == NSUB-1) begin
        ins_fail = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sidx <= '0;
    end else if (ins_req && !ins_done && !ins_fail) begin
      sidx <= sidx + 1'b1;
    end else begin
      sidx <= '0;
    end
  end

  // First-free registers, from next cycle's valid bits. Entries beyond
  // ENTRIES in a partial last sub-table count as taken.
  always_ff @(posedge clk) begin
    for (int s = 0; s < NSUB; s++) begin
      logic           found;
      logic [SW-1:0]  idx;
      found = 1'b0;
      idx   = '0;
      for (int k = SUB_SIZE-1; k >= 0; k--) begin
        int e;
        e = s * SUB_SIZE + k;
        if (e < ENTRIES) begin
          if (!rst_n || !valid_next[e]) begin
            found = 1'b1;
            idx   = SW'(k);
          end
        end
      end
      first_free[s] <= idx;
      sub_full[s]   <= !found;
    end
  end

  // Check: ready is read in the cycle after the tag is presented.
  always_ff @(posedge clk) begin
    if (!rst_n) task_ready <= 1'b0;
    else        task_ready <= |ready_v;
  end

  a_unique_hit: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_v));
endmodule
