// tb_dep_table - test of the associative table of task dependencies with
// two sub-tables (16 entries of 8). Checks:
//   * insertion latency: 1 cycle while sub-table 0 has room, 2 cycles once
//     it is full; a 17th insertion fails after 2 cycles,
//   * check: task_ready is valid the cycle after the tag is presented,
//   * update: solved_dep decrements only the addressed task,
//   * deletion: clear frees the entry and a new insertion reuses sub-table 0
//     again in one cycle,
//   * data out (hit, successor count and tags) for a present tag.
module tb_dep_table;
  import tgem_pkg::*;
  localparam int ENTRIES = 16, SUB_SIZE = 8;

  logic clk = 0, rst_n = 0;
  logic ins_req, ins_done, ins_fail, solved_dep, clear, hit, task_ready;
  task_info_t ins_info;
  tag_t tag;
  cnt_t num_succ;
  tag_t [MAX_SUCC-1:0] succ;
  logic [ENTRIES-1:0] valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dep_table #(.ENTRIES(ENTRIES), .SUB_SIZE(SUB_SIZE)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Insert and return the number of cycles until done (or fail).
  task automatic insert(tag_t t, int preds, output int cycles, output bit failed);
    ins_info = '0;
    ins_info.tag = t;
    ins_info.pred_cnt = cnt_t'(preds);
    ins_info.num_succ = 4'd2;
    ins_info.succ[0] = t + 8'd1;
    ins_info.succ[1] = t + 8'd2;
    ins_req = 1;
    cycles = 1;
    #1;
    while (!ins_done && !ins_fail) begin
      @(negedge clk);
      cycles++;
      #1;
    end
    failed = ins_fail;
    @(negedge clk);
    ins_req = 0;
  endtask

  task automatic probe(tag_t t, output bit rdy);
    tag = t;
    @(negedge clk);
    rdy = task_ready;
  endtask

  int cyc; bit f, rdy;

  initial begin
    ins_req = 0; ins_info = '0; tag = '0; solved_dep = 0; clear = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < ENTRIES; i++) begin
      insert(tag_t'(8'd100 + 8'(i)), i % 3, cyc, f);
      check(!f, "insertion accepted");
      check(cyc == ((i < SUB_SIZE) ? 1 : 2), $sformatf("insertion %0d latency %0d", i, cyc));
    end
    check(&valid, "all entries valid");
    insert(8'd200, 0, cyc, f);
    check(f && cyc == 2, $sformatf("full table rejects after 2 cycles (%0d)", cyc));

    probe(8'd100, rdy); check(rdy, "task 100 ready (0 preds)");
    probe(8'd101, rdy); check(!rdy, "task 101 not ready (1 pred)");
    probe(8'd250, rdy); check(!rdy, "absent tag not ready");
    // registered: ready follows the tag with one cycle of delay
    tag = 8'd100; @(negedge clk); tag = 8'd101; #1;
    check(task_ready, "ready output belongs to previous tag");
    @(negedge clk);
    check(!task_ready, "then follows the new tag");

    tag = 8'd111; #1;
    check(hit && num_succ == 4'd2 && succ[0] == 8'd112 && succ[1] == 8'd113, "data out");
    solved_dep = 1; @(negedge clk); solved_dep = 0;
    probe(8'd111, rdy); check(!rdy, "111 one pred left");
    probe(8'd110, rdy); check(!rdy, "110 untouched (1 pred)");
    tag = 8'd111; solved_dep = 1; @(negedge clk); solved_dep = 0;
    probe(8'd111, rdy); check(rdy, "111 ready");

    tag = 8'd103; clear = 1; @(negedge clk); clear = 0; #1;
    check(!hit && !valid[3], "entry freed");
    insert(8'd201, 0, cyc, f);
    check(!f && cyc == 1 && valid[3], $sformatf("reinsert in sub-table 0 in 1 cycle (%0d)", cyc));
    tag = 8'd112; clear = 1; @(negedge clk); clear = 0;
    insert(8'd202, 0, cyc, f);
    check(!f && cyc == 2 && valid[12], $sformatf("insert in sub-table 1 in 2 cycles (%0d)", cyc));
    probe(8'd202, rdy); check(rdy, "new entry ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
