// tb_dep_table_entry - directed test of one table entry: load, tag
// compare (hit), predecessor counter decrement on solved dependency,
// ready when the counter is zero, saturation, and clear.
module tb_dep_table_entry;
  import tgem_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load, solved_dep, clear, valid, hit, ready;
  task_info_t info;
  tag_t tag;
  cnt_t num_succ;
  tag_t [MAX_SUCC-1:0] succ;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dep_table_entry dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    load = 0; solved_dep = 0; clear = 0; info = '0; tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid && !hit, "empty after reset");
    info.tag = 8'd42; info.pred_cnt = 4'd2; info.num_succ = 4'd3;
    info.succ = {8'd0, 8'd7, 8'd6, 8'd5};
    load = 1;
    @(negedge clk);
    load = 0;
    tag = 8'd42;
    #1;
    check(valid && hit && !ready, "loaded, 2 predecessors");
    check(num_succ == 4'd3 && succ[0] == 8'd5 && succ[2] == 8'd7, "successors out");
    tag = 8'd43; #1;
    check(!hit && !ready, "other tag misses");
    solved_dep = 1; @(negedge clk); solved_dep = 0;
    tag = 8'd42; #1;
    check(hit && !ready, "other tag does not decrement");
    solved_dep = 1; @(negedge clk); solved_dep = 0; #1;
    check(hit && !ready, "one predecessor left");
    solved_dep = 1; @(negedge clk); solved_dep = 0; #1;
    check(hit && ready, "ready at zero");
    solved_dep = 1; @(negedge clk); solved_dep = 0; #1;
    check(hit && ready, "saturates at zero");
    tag = 8'd1; clear = 1; @(negedge clk); clear = 0;
    tag = 8'd42; #1;
    check(valid, "clear of another tag ignored");
    clear = 1; @(negedge clk); clear = 0; #1;
    check(!valid && !hit && !ready, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
