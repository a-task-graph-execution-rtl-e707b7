// tb_workload_runner - runs graphs with the sizes of the evaluated
// multimedia workloads on one complete system (manager and counter-based
// RUs) with NUM_RU units and the default 8-entry table, at real time scale
// (100 MHz, 1 ms = 100,000 cycles, 4 ms reconfigurations). It is driven by
// tb_tgem_workloads, which instantiates it once per RU count; it has its own
// clock and raises done when its graphs have run, with its check and
// failure counts, and, per graph, the tasks reused and the time measured in
// the second run.
//
// Graphs FIRST..LAST of this list run, each twice in a row (a "first" and a
// "second" execution, so that the second can reuse what the first left in
// the RUs): JPEG (4 tasks, 79 ms), Parallel-JPEG (8, 54 ms), MPEG-1 (5,
// 37 ms), HOUGH (6, 94 ms) and four Pocket-GL graphs (2, 4, 5 and 6 tasks;
// 4.1, 16.02, 26.89, 48.75 ms). Task counts and times are the published
// ones; the shapes were not published, so the shapes here are this
// testbench's own: chains for JPEG and Pocket-GL, two parallel chains of four
// for Parallel-JPEG, a fork-join for MPEG-1 and HOUGH. Every task of a level
// runs for the published time divided by the number of levels, task i goes
// to RU i mod NUM_RU, and each task has its own configuration. The
// reconfiguration sequence and the RU schedules are sorted by ALAP weight,
// as a design-time scheduler would do.
//
// Reference: the runner computes, independently of the design, when each
// reconfiguration and each execution would start if management took no time
// at all. With the sequence sorted by weight everything a task depends on
// comes earlier in the sequence, so one pass in sequence order suffices:
//   issue  = max(previous issue, reconfiguration port free, RU's previous
//            task ended)
//   loaded = issue if the RU already holds the configuration (reuse),
//            else issue + 4 ms (and the port is busy until then)
//   start  = max(loaded, ends of all predecessors); end = start + time
// Checked: every reconfiguration and execution starts at its reference time
// plus a management delay of at most SLACK cycles; the number of
// reconfigurations equals the reference's; the graph timer reads the
// reference end plus at most SLACK; dependencies, RU order, a single
// reconfiguration at a time and the exact counter times hold; an 8-task
// graph fills the table without a load error. Reuse and prefetch must both
// happen. Per graph it prints the ideal time (critical path, no
// reconfiguration), the reference time and the measured time.
module tb_workload_runner #(
  parameter int NUM_RU = 4,
  localparam int NW    = 8,   // number of workload graphs in the list below
  parameter int FIRST  = 0,
  parameter int LAST   = NW - 1
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   reuse2 [NW],
  output int   time2  [NW]
);
  import tgem_pkg::*;
  localparam int MS = 100000, REC = 4 * MS, SLACK = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, irq, irq_ack, graph_active, load_error, rc_busy;
  graph_rec_t in_rec;
  logic [NUM_RU-1:0] ru_busy, rec_start, rec_done, exec_start, exec_done;
  tag_t ru_tag [NUM_RU];
  cyc_t graph_cycles;

  initial forever begin   // 100 MHz, stopped once the graphs have run
    #5;
    if (done) break;
    clk = ~clk;
  end

  tgem_system #(.NUM_RU(NUM_RU)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- workload graphs ----------------
  string wname [NW] = '{"JPEG", "PARALLEL-JPEG", "MPEG-1", "HOUGH",
                        "POCKET-GL-A", "POCKET-GL-B", "POCKET-GL-C", "POCKET-GL-D"};
  int    wtasks [NW] = '{4, 8, 5, 6, 2, 4, 5, 6};
  int    wtime  [NW] = '{7900, 5400, 3700, 9400, 410, 1602, 2689, 4875}; // 10 us units

  int n, wl;
  int ru_of [8], cfg_of [8], ex_of [8], w [8], npred [8];
  int succ [8][$];
  int order [$];
  int ru_sched [NUM_RU][$];

  function automatic tag_t tg(int i); return tag_t'(8'd20 + 8'(i)); endfunction

  task automatic edge_add(int a, int b);
    succ[a].push_back(b); npred[b]++;
  endtask

  task automatic make_graph(int k);
    int depth;
    wl = k; n = wtasks[k];
    for (int i = 0; i < n; i++) begin
      succ[i].delete(); npred[i] = 0;
      ru_of[i] = i % NUM_RU;
      cfg_of[i] = 16 * k + i + 1;
    end
    case (wname[k])
      "PARALLEL-JPEG": begin   // two chains of four
        for (int i = 0; i < 3; i++) begin edge_add(i, i + 1); edge_add(i + 4, i + 5); end
        depth = 4;
      end
      "MPEG-1": begin          // 0 -> {1,2} -> 3 -> 4
        edge_add(0, 1); edge_add(0, 2); edge_add(1, 3); edge_add(2, 3); edge_add(3, 4);
        depth = 4;
      end
      "HOUGH": begin           // 0 -> {1,2}, 1 -> 3, 2 -> 4, {3,4} -> 5
        edge_add(0, 1); edge_add(0, 2); edge_add(1, 3); edge_add(2, 4);
        edge_add(3, 5); edge_add(4, 5);
        depth = 4;
      end
      default: begin           // chain
        for (int i = 0; i + 1 < n; i++) edge_add(i, i + 1);
        depth = n;
      end
    endcase
    for (int i = 0; i < n; i++) ex_of[i] = wtime[k] * (MS / 100) / depth;
    for (int i = n - 1; i >= 0; i--) begin
      int m; m = 0;
      foreach (succ[i][j]) if (w[succ[i][j]] > m) m = w[succ[i][j]];
      w[i] = ex_of[i] + m;
    end
    order.delete();
    for (int i = 0; i < n; i++) order.push_back(i);
    for (int a = 1; a < n; a++)
      for (int b = a; b > 0 && w[order[b]] > w[order[b-1]]; b--) begin
        int t; t = order[b]; order[b] = order[b-1]; order[b-1] = t;
      end
    for (int r = 0; r < NUM_RU; r++) ru_sched[r].delete();
    foreach (order[j]) ru_sched[ru_of[order[j]]].push_back(order[j]);
  endtask

  // ---------------- zero-delay reference ----------------
  int ref_cfg [NUM_RU];            // configuration each RU holds (-1: none)
  int ref_rec_t [8], ref_start [8], ref_end [8], ref_n_rec, ref_total, ideal;

  task automatic reference();
    int issue, port_free, ru_free [NUM_RU];
    issue = 0; port_free = 0; ref_n_rec = 0; ref_total = 0; ideal = 0;
    foreach (ru_free[r]) ru_free[r] = 0;
    foreach (order[j]) begin
      int t, r, loaded;
      t = order[j]; r = ru_of[t];
      issue = (issue > port_free) ? issue : port_free;
      if (ru_free[r] > issue) issue = ru_free[r];
      if (ref_cfg[r] == cfg_of[t]) begin
        loaded = issue; ref_rec_t[t] = -1;
      end else begin
        ref_rec_t[t] = issue; loaded = issue + REC; port_free = loaded;
        ref_cfg[r] = cfg_of[t]; ref_n_rec++;
      end
      ref_start[t] = loaded;
      for (int p = 0; p < n; p++) foreach (succ[p][q])
        if (succ[p][q] == t && ref_end[p] > ref_start[t]) ref_start[t] = ref_end[p];
      ref_end[t] = ref_start[t] + ex_of[t];
      ru_free[r] = ref_end[t];
      if (ref_end[t] > ref_total) ref_total = ref_end[t];
      if (w[t] > ideal) ideal = w[t];
    end
  endtask

  // ---------------- loading ----------------
  task automatic send(graph_rec_t r);
    in_rec = r; in_valid = 1; #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic load_graph();
    graph_rec_t r;
    for (int i = 0; i < n; i++) begin
      r = '0; r.kind = REC_TASK; r.info.tag = tg(i);
      r.info.pred_cnt = cnt_t'(npred[i]); r.info.num_succ = cnt_t'(succ[i].size());
      foreach (succ[i][j]) r.info.succ[j] = tg(succ[i][j]);
      send(r);
    end
    for (int rr = 0; rr < NUM_RU; rr++)
      foreach (ru_sched[rr][j]) begin
        int t; t = ru_sched[rr][j];
        r = '0; r.kind = REC_SCHED; r.ru = ru_idx_t'(rr);
        r.sched = '{tag: tg(t), cfg: cfg_t'(cfg_of[t]), rec_cycles: cyc_t'(REC),
                    exec_cycles: cyc_t'(ex_of[t])};
        send(r);
      end
    foreach (order[j]) begin
      r = '0; r.kind = REC_RECONF; r.ru = ru_idx_t'(ru_of[order[j]]); r.info.tag = tg(order[j]);
      send(r);
    end
    r = '0; r.kind = REC_END; r.num_tasks = tag_t'(n);
    send(r);
  endtask

  // ---------------- observation ----------------
  int cyc = 0, g_t0 = 0, n_rec = 0, ended = 0, reconf_active = 0;
  int done_at [8], started [8], rec_t0 [NUM_RU], exec_t0 [NUM_RU];
  int run_sched [NUM_RU][$];
  int m_reuse = 0, m_prefetch = 0, m_full_table = 0;
  logic ga_q = 0;

  function automatic bit in_window(int got, int want);
    return got >= want && got <= want + SLACK;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int t;
    cyc++;
    ga_q <= graph_active;
    if (graph_active && !ga_q) g_t0 = cyc;
    for (int r = 0; r < NUM_RU; r++) begin
      t = int'(ru_tag[r]) - 20;
      if (rec_start[r]) begin
        check(reconf_active == 0, "one reconfiguration at a time");
        check(t >= 0 && t < n && ref_rec_t[t] >= 0, "reconfiguration expected by the reference");
        if (t >= 0 && t < n)
          check(in_window(cyc - g_t0, ref_rec_t[t]),
                $sformatf("%s task %0d reconfiguration at %0d, reference %0d",
                          wname[wl], t, cyc - g_t0, ref_rec_t[t]));
        if (|(ru_busy & ~(NUM_RU'(1) << r))) m_prefetch++;
        reconf_active++; n_rec++; rec_t0[r] = cyc;
      end
      if (rec_done[r]) begin
        reconf_active--;
        check(cyc - rec_t0[r] == REC, "reconfiguration latency");
      end
      if (exec_start[r]) begin
        check(t >= 0 && t < n && started[t] == 0, "task started once");
        check(run_sched[r].size() > 0 && run_sched[r][0] == t, "RU schedule order");
        if (run_sched[r].size() > 0) void'(run_sched[r].pop_front());
        if (t >= 0 && t < n) begin
          for (int p = 0; p < n; p++) foreach (succ[p][q])
            if (succ[p][q] == t) check(done_at[p] > 0, "predecessor finished");
          check(in_window(cyc - g_t0, ref_start[t]),
                $sformatf("%s task %0d start at %0d, reference %0d",
                          wname[wl], t, cyc - g_t0, ref_start[t]));
          started[t] = 1;
        end
        exec_t0[r] = cyc;
      end
      if (exec_done[r]) begin
        if (t >= 0 && t < n) begin
          done_at[t] = cyc;
          check(cyc - exec_t0[r] == ex_of[t], "execution time");
        end
        ended++;
      end
    end
    if (dut.u_mgr.u_table.valid == '1) m_full_table++;
    if (irq) check(ended == n, "irq only after the last task");
  end

  initial begin
    in_valid = 0; in_rec = '0; irq_ack = 0; done = 0; checks = 0; failures = 0;
    foreach (reuse2[k]) begin reuse2[k] = 0; time2[k] = 0; end
    foreach (ref_cfg[r]) ref_cfg[r] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = FIRST; k <= LAST; k++)
      for (int run = 1; run <= 2; run++) begin
        make_graph(k);
        reference();
        for (int i = 0; i < 8; i++) begin done_at[i] = 0; started[i] = 0; end
        for (int r = 0; r < NUM_RU; r++) run_sched[r] = ru_sched[r];
        ended = 0; n_rec = 0;
        load_graph();
        while (!irq) @(negedge clk);
        @(negedge clk);
        check(ended == n && !load_error, $sformatf("%s run %0d complete", wname[k], run));
        for (int i = 0; i < n; i++) check(started[i] == 1, "every task executed");
        check(n_rec == ref_n_rec, $sformatf("%s run %0d: %0d reconfigurations, reference %0d",
                                            wname[k], run, n_rec, ref_n_rec));
        check(in_window(int'(graph_cycles), ref_total),
              $sformatf("%s run %0d: graph timer %0d, reference %0d",
                        wname[k], run, graph_cycles, ref_total));
        m_reuse += n - n_rec;
        if (run == 2) begin reuse2[k] = n - n_rec; time2[k] = int'(graph_cycles); end
        $display("INFO %0d RUs %-13s run %0d tasks %0d reconf %0d reused %0d ideal %0d ref %0d measured %0d overhead %0d cycles",
                 NUM_RU, wname[k], run, n, n_rec, n - n_rec, ideal, ref_total, graph_cycles,
                 int'(graph_cycles) - ref_total);
        irq_ack = 1; @(negedge clk); irq_ack = 0;
        repeat (3) @(negedge clk);
      end
    $display("INFO %0d RUs: reuse %0d prefetch %0d full_table_cycles %0d", NUM_RU, m_reuse, m_prefetch, m_full_table);
    check(m_reuse > 0,      "reuse happened");
    check(m_prefetch > 0,   "prefetched reconfiguration happened");
    check(m_full_table > 0, "the 8-task graph filled the table");
    done = 1;
  end
endmodule
