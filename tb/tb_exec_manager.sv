// tb_exec_manager - runs the five-task, three-RU example graph through the
// execution manager, with the reconfigurable units modelled in the
// testbench (a done strobe N cycles after each start).
//
// Graph (times in ms; 1 ms = MS cycles, reconfiguration 4 ms):
//   task 1 (16 ms, RU1) -> tasks 2 (8 ms, RU2) and 3 (12 ms, RU3)
//   task 2 -> task 5 (8 ms, RU2, same configuration as task 2)
//   task 3 -> tasks 5 and 4 (12 ms, RU1)
//   reconfiguration sequence 1-3-2-4-5 (sorted by weight)
// Expected, worked out by hand from the manager's rules: reconfigurations of
// 1, 3, 2 start at 0, 4, 8 ms, of 4 at 20 ms; task 5 is reused (no
// reconfiguration) at 28 ms; executions start at 1:4, 2:20, 3:20, 5:32,
// 4:32 ms; the graph ends at 44 ms. Each start may lag its expected time by
// at most SLACK cycles of management delay. A second run of the same graph
// must reuse tasks 3, 2 and 5 and reconfigure only 1 and 4.
module tb_exec_manager;
  import tgem_pkg::*;
  localparam int NUM_RU = 4, MS = 200, SLACK = 100;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, irq, irq_ack, graph_active, load_error, rc_busy;
  graph_rec_t in_rec;
  logic [NUM_RU-1:0] rec_start, rec_done, exec_start, exec_done;
  cyc_t rec_cycles [NUM_RU], exec_cycles [NUM_RU];
  tag_t ru_tag [NUM_RU];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  exec_manager #(.NUM_RU(NUM_RU)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // RU models
  int rcnt [NUM_RU], ecnt [NUM_RU];
  always @(posedge clk) begin
    for (int r = 0; r < NUM_RU; r++) begin
      if (rec_start[r]) rcnt[r] <= int'(rec_cycles[r]);
      else if (rcnt[r] > 0) rcnt[r] <= rcnt[r] - 1;
      if (exec_start[r]) ecnt[r] <= int'(exec_cycles[r]);
      else if (ecnt[r] > 0) ecnt[r] <= ecnt[r] - 1;
    end
  end
  always_comb for (int r = 0; r < NUM_RU; r++) begin
    rec_done[r]  = (rcnt[r] == 1);
    exec_done[r] = (ecnt[r] == 1);
  end

  // observation
  int t0, cyc = 0;
  int rec_at [256], exec_at [256];
  int n_rec = 0, n_reuse = 0;
  always @(posedge clk) begin
    cyc++;
    for (int r = 0; r < NUM_RU; r++) begin
      if (rec_start[r])  begin rec_at[ru_tag[r]]  = cyc - t0; n_rec++; end
      if (exec_start[r]) exec_at[ru_tag[r]] = cyc - t0;
    end
    if (dut.u_evq.u_fifo.push && dut.u_evq.u_fifo.wdata.code == EV_REUSED) n_reuse++;
  end

  task automatic send(graph_rec_t r);
    in_rec = r; in_valid = 1; #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic task_rec(int t, int preds, int ns, int s0, int s1);
    graph_rec_t r;
    r = '0; r.kind = REC_TASK; r.info.tag = tag_t'(t); r.info.pred_cnt = cnt_t'(preds);
    r.info.num_succ = cnt_t'(ns); r.info.succ[0] = tag_t'(s0); r.info.succ[1] = tag_t'(s1);
    send(r);
  endtask

  task automatic sched_rec(int ru, int t, int cfg, int ms);
    graph_rec_t r;
    r = '0; r.kind = REC_SCHED; r.ru = ru_idx_t'(ru);
    r.sched = '{tag: tag_t'(t), cfg: cfg_t'(cfg), rec_cycles: cyc_t'(4 * MS), exec_cycles: cyc_t'(ms * MS)};
    send(r);
  endtask

  task automatic reconf_rec(int t, int ru);
    graph_rec_t r;
    r = '0; r.kind = REC_RECONF; r.ru = ru_idx_t'(ru); r.info.tag = tag_t'(t);
    send(r);
  endtask

  task automatic load_graph();
    graph_rec_t r;
    task_rec(1, 0, 2, 2, 3);
    task_rec(2, 1, 1, 5, 0);
    task_rec(3, 1, 2, 5, 4);
    task_rec(5, 2, 0, 0, 0);
    task_rec(4, 1, 0, 0, 0);
    sched_rec(0, 1, 1, 16); sched_rec(0, 4, 4, 12);
    sched_rec(1, 2, 2, 8);  sched_rec(1, 5, 2, 8);
    sched_rec(2, 3, 3, 12);
    reconf_rec(1, 0); reconf_rec(3, 2); reconf_rec(2, 1); reconf_rec(4, 0); reconf_rec(5, 1);
    r = '0; r.kind = REC_END; r.num_tasks = 8'd5;
    in_rec = r; in_valid = 1; #1;
    while (!in_ready) begin @(negedge clk); #1; end
    t0 = cyc + 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic near(int got, int exp_ms, string what);
    check(got >= exp_ms * MS && got <= exp_ms * MS + SLACK,
          $sformatf("%s at %0d cycles, expected %0d..%0d", what, got, exp_ms * MS, exp_ms * MS + SLACK));
  endtask

  int done_at;

  initial begin
    in_valid = 0; in_rec = '0; irq_ack = 0;
    foreach (rec_at[i]) begin rec_at[i] = -1; exec_at[i] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // first execution
    load_graph();
    while (!irq) @(negedge clk);
    done_at = cyc - t0;
    near(rec_at[1], 0, "rec 1");  near(rec_at[3], 4, "rec 3");
    near(rec_at[2], 8, "rec 2");  near(rec_at[4], 20, "rec 4");
    check(rec_at[5] == -1 && n_rec == 4 && n_reuse == 1, "task 5 reused, 4 reconfigurations");
    near(exec_at[1], 4, "exec 1");  near(exec_at[2], 20, "exec 2"); near(exec_at[3], 20, "exec 3");
    near(exec_at[5], 32, "exec 5"); near(exec_at[4], 32, "exec 4");
    near(done_at, 44, "graph end");
    check(!load_error, "no load error");
    $display("INFO first run %0d cycles (ideal %0d)", done_at, 44 * MS);
    irq_ack = 1; @(negedge clk); irq_ack = 0;

    // second execution: configurations 4, 2 (or 5), 3 are still loaded
    foreach (rec_at[i]) begin rec_at[i] = -1; exec_at[i] = -1; end
    n_rec = 0; n_reuse = 0;
    load_graph();
    while (!irq) @(negedge clk);
    done_at = cyc - t0;
    check(n_rec == 2 && n_reuse == 3 && rec_at[1] >= 0 && rec_at[4] >= 0,
          $sformatf("second run: %0d reconfigurations, %0d reuses", n_rec, n_reuse));
    near(done_at, 44, "second graph end");
    $display("INFO second run %0d cycles", done_at);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * MS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
