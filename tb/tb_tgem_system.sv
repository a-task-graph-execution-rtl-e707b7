// tb_tgem_system - end-to-end test of the manager with its counter-based
// RUs on random scheduled task graphs.
//
// Each graph has 2..12 tasks (the table is set to 16 entries, two
// sub-tables of 8, so insertions into the second sub-table happen), random
// edges from lower to higher task index (at most MAX_SUCC successors), a
// random RU per task among 4 and a configuration from a small pool so that
// reuse occurs within and across graphs. As a design-time scheduler would,
// the testbench gives each task a weight, its execution time plus the
// largest weight of its successors, and orders both the reconfiguration
// sequence and each RU's schedule by decreasing weight. Graphs run back to
// back; the configurations left in the RUs carry over.
//
// Checked against the testbench's own bookkeeping, not the design's:
//   * a task starts only after all its predecessors ended, once, on its RU,
//     in that RU's schedule order, with its own configuration loaded;
//   * never more than one reconfiguration at a time;
//   * no reconfiguration of a configuration that the RU already holds;
//   * each task starts within LAT cycles of the later of its load and its
//     last predecessor's end (management delay of a few hundred cycles);
//   * reconfigurations last REC_LAT cycles and executions their own time;
//   * irq after the last task, and only then.
// Each mechanism must occur at least once: reuse, prefetched reconfiguration,
// reconfiguration held by a busy RU, held by the busy reconfiguration
// circuitry, task loaded before its dependencies were solved, simultaneous
// event requests, insertion into the second sub-table, successor update.
module tb_tgem_system;
  import tgem_pkg::*;
  localparam int NUM_RU = 4, ENTRIES = 16, REC_LAT = 60, LAT = 300, NGRAPHS = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, irq, irq_ack, graph_active, load_error, rc_busy;
  graph_rec_t in_rec;
  logic [NUM_RU-1:0] ru_busy, rec_start, rec_done, exec_start, exec_done;
  tag_t ru_tag [NUM_RU];
  cyc_t graph_cycles;
  int   g_t0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tgem_system #(.NUM_RU(NUM_RU), .ENTRIES(ENTRIES)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- graph description ----------------
  int n;
  int ru_of [16], cfg_of [16], ex_of [16], w [16], npred [16];
  int succ [16][$];
  int order [$];              // tasks by decreasing weight
  int ru_sched [NUM_RU][$];   // remaining schedule per RU

  function automatic tag_t tg(int i); return tag_t'(8'd20 + 8'(i)); endfunction

  task automatic make_graph();
    n = $urandom_range(2, 12);
    for (int i = 0; i < n; i++) begin
      succ[i].delete(); npred[i] = 0;
      ru_of[i]  = $urandom_range(0, NUM_RU-1);
      cfg_of[i] = $urandom_range(1, 6);
      ex_of[i]  = $urandom_range(20, 250);
    end
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++)
        if (succ[i].size() < MAX_SUCC && npred[j] < 6 && $urandom_range(0, 99) < 30) begin
          succ[i].push_back(j); npred[j]++;
        end
    for (int i = n - 1; i >= 0; i--) begin
      int m; m = 0;
      foreach (succ[i][k]) if (w[succ[i][k]] > m) m = w[succ[i][k]];
      w[i] = ex_of[i] + m;
    end
    order.delete();
    for (int i = 0; i < n; i++) order.push_back(i);
    // stable sort by decreasing weight (predecessors always weigh more)
    for (int a = 1; a < n; a++)
      for (int b = a; b > 0 && w[order[b]] > w[order[b-1]]; b--) begin
        int t; t = order[b]; order[b] = order[b-1]; order[b-1] = t;
      end
    for (int r = 0; r < NUM_RU; r++) ru_sched[r].delete();
    foreach (order[k]) ru_sched[ru_of[order[k]]].push_back(order[k]);
  endtask

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
      foreach (succ[i][k]) r.info.succ[k] = tg(succ[i][k]);
      send(r);
    end
    for (int rr = 0; rr < NUM_RU; rr++)
      foreach (ru_sched[rr][k]) begin
        int t; t = ru_sched[rr][k];
        r = '0; r.kind = REC_SCHED; r.ru = ru_idx_t'(rr);
        r.sched = '{tag: tg(t), cfg: cfg_t'(cfg_of[t]), rec_cycles: cyc_t'(REC_LAT), exec_cycles: cyc_t'(ex_of[t])};
        send(r);
      end
    foreach (order[k]) begin
      r = '0; r.kind = REC_RECONF; r.ru = ru_idx_t'(ru_of[order[k]]); r.info.tag = tg(order[k]);
      send(r);
    end
    r = '0; r.kind = REC_END; r.num_tasks = tag_t'(n);
    send(r);
  endtask

  // ---------------- run-time bookkeeping ----------------
  int cyc = 0;
  int done_at [16], loaded_at [16], started [16];
  int ended;
  int loaded_cfg [NUM_RU];
  int rec_t0 [NUM_RU], exec_t0 [NUM_RU];
  int reconf_active;
  // mechanism counters
  int m_reuse = 0, m_prefetch = 0, m_hold_ru = 0, m_hold_rc = 0, m_wait_dep = 0;
  int m_conflict = 0, m_sub2 = 0, m_update = 0, m_graphs = 0;

  function automatic int idx_of(tag_t t); return int'(t) - 20; endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int r = 0; r < NUM_RU; r++) begin
      int t;
      t = idx_of(ru_tag[r]);
      if (rec_start[r]) begin
        check(reconf_active == 0, "one reconfiguration at a time");
        check(loaded_cfg[r] != cfg_of[t], "no reconfiguration of a loaded configuration");
        reconf_active++;
        rec_t0[r] = cyc;
        loaded_cfg[r] = -1;
        if (|(ru_busy & ~(1 << r))) m_prefetch++;
      end
      if (rec_done[r]) begin
        reconf_active--;
        check(cyc - rec_t0[r] == REC_LAT, "reconfiguration latency");
        loaded_cfg[r] = cfg_of[t];
        loaded_at[t] = cyc;
      end
      if (exec_start[r]) begin
        int ready_t;
        check(t >= 0 && t < n && started[t] == 0, "task started once");
        check(ru_of[t] == r, "task on its RU");
        check(ru_sched[r].size() > 0 && ru_sched[r][0] == t, "RU schedule order");
        if (ru_sched[r].size() > 0) void'(ru_sched[r].pop_front());
        check(loaded_cfg[r] == cfg_of[t], "configuration loaded");
        ready_t = loaded_at[t];
        for (int p = 0; p < n; p++) foreach (succ[p][k]) if (succ[p][k] == t) begin
          check(done_at[p] > 0, "predecessor finished");
          if (done_at[p] > ready_t) ready_t = done_at[p];
        end
        if (ready_t > loaded_at[t]) m_wait_dep++;
        check(cyc - ready_t <= LAT, $sformatf("start latency %0d", cyc - ready_t));
        started[t] = 1;
        exec_t0[r] = cyc;
      end
      if (exec_done[r]) begin
        done_at[t] = cyc;
        check(cyc - exec_t0[r] == ex_of[t], "execution time");
        ended++;
      end
    end
    if (dut.u_mgr.u_evq.u_fifo.push && dut.u_mgr.u_evq.u_fifo.wdata.code == EV_REUSED) begin
      int t;
      t = idx_of(dut.u_mgr.u_evq.u_fifo.wdata.tag);
      m_reuse++;
      loaded_at[t] = cyc;
      loaded_cfg[dut.u_mgr.u_evq.u_fifo.wdata.ru] = cfg_of[t];
    end
    if (!dut.u_mgr.rec_empty) begin
      if (dut.u_mgr.rc_busy) m_hold_rc++;
      else if (dut.u_mgr.ru_state[dut.u_mgr.rec_head.ru[1:0]] != RU_FREE) m_hold_ru++;
    end
    if ($countones(dut.u_mgr.ev_req) > 1) m_conflict++;
    if (dut.u_mgr.u_table.ins_done && dut.u_mgr.u_table.sidx != 0) m_sub2++;
    if (dut.u_mgr.tbl_solved) m_update++;
    if (irq) check(ended == n, "irq only after the last task");
  end

  initial begin
    in_valid = 0; in_rec = '0; irq_ack = 0;
    foreach (loaded_cfg[r]) loaded_cfg[r] = -1;
    reconf_active = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int g = 0; g < NGRAPHS; g++) begin
      make_graph();
      for (int i = 0; i < 16; i++) begin done_at[i] = 0; loaded_at[i] = 0; started[i] = 0; end
      ended = 0;
      load_graph();
      g_t0 = cyc;
      while (!irq) @(negedge clk);
      @(negedge clk);
      check(int'(graph_cycles) > 0 && int'(graph_cycles) <= cyc - g_t0 + 2, "graph timer span");
      check(ended == n && !load_error, $sformatf("graph %0d (%0d tasks) complete", g, n));
      for (int i = 0; i < n; i++) check(started[i] == 1, "every task executed");
      m_graphs++;
      irq_ack = 1; @(negedge clk); irq_ack = 0;
      repeat (3) @(negedge clk);
    end
    $display("INFO graphs %0d reuse %0d prefetch %0d hold_ru %0d hold_rc %0d wait_dep %0d conflict %0d sub2 %0d update %0d",
             m_graphs, m_reuse, m_prefetch, m_hold_ru, m_hold_rc, m_wait_dep, m_conflict, m_sub2, m_update);
    check(m_reuse > 0,    "reuse happened");
    check(m_prefetch > 0, "prefetched reconfiguration happened");
    check(m_hold_ru > 0,  "reconfiguration held by busy RU happened");
    check(m_hold_rc > 0,  "reconfiguration held by busy circuitry happened");
    check(m_wait_dep > 0, "loaded task waited for dependencies");
    check(m_conflict > 0, "simultaneous event requests happened");
    check(m_sub2 > 0,     "insertion into second sub-table happened");
    check(m_update > 0,   "successor update happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
