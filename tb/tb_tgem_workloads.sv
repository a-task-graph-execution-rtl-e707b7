// tb_tgem_workloads - the complete system at real time scale (100 MHz,
// 1 ms = 100,000 cycles, 4 ms reconfigurations) on graphs with the task
// counts and times of the multimedia workloads the manager was evaluated on,
// each run twice in a row. Two systems run side by side, each driven by a
// tb_workload_runner (see that file for the graphs, the zero-delay
// reference and the per-graph checks):
//   * the default system (4 RUs, 8-entry table) runs all eight graphs;
//   * a 5-RU system runs Parallel-JPEG only.
// On top of the runners' checks this testbench compares the two for
// Parallel-JPEG. With 4 RUs each RU runs two of its tasks, so the second
// run can reuse nothing. With a fifth RU some RUs keep a single task, whose
// configuration the second run reuses, and the second run ends earlier than
// on 4 RUs. The original evaluation reports reuse appearing for this graph
// once a fifth RU is added; the graph shape and assignment here are this
// testbench's own, so only the direction is checked, not the amount.
module tb_tgem_workloads;
  localparam int NW = 8, PJ = 1;   // index of Parallel-JPEG in the list

  logic done4, done5;
  int   checks4, failures4, checks5, failures5;
  int   reuse4 [NW], time4 [NW], reuse5 [NW], time5 [NW];
  int   checks = 0, failures = 0;

  tb_workload_runner #(.NUM_RU(4)) u_ru4 (
    .done(done4), .checks(checks4), .failures(failures4), .reuse2(reuse4), .time2(time4));
  tb_workload_runner #(.NUM_RU(5), .FIRST(PJ), .LAST(PJ)) u_ru5 (
    .done(done5), .checks(checks5), .failures(failures5), .reuse2(reuse5), .time2(time5));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100;
    wait (done4 && done5);
    check(reuse4[PJ] == 0, "Parallel-JPEG on 4 RUs reuses nothing");
    check(reuse5[PJ] > 0, "Parallel-JPEG on 5 RUs reuses a task");
    check(time5[PJ] < time4[PJ], "Parallel-JPEG second run is faster on 5 RUs");
    $display("INFO Parallel-JPEG second run: 4 RUs %0d cycles, %0d reused; 5 RUs %0d cycles, %0d reused",
             time4[PJ], reuse4[PJ], time5[PJ], reuse5[PJ]);
    checks   += checks4 + checks5;
    failures += failures4 + failures5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_500_000_000;   // 150 M cycles of 10 ns
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks4 + checks5,
             failures + failures4 + failures5);
    $finish;
  end
endmodule
