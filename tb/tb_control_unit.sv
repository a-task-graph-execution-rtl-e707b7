// tb_control_unit - the control unit against simple models of the event
// queue, reconfiguration FIFO, RU registers, table and deletion unit.
// Scenarios, each from one event:
//   new graph, RU free          -> one load order to the head's RU, FIFO pop
//   new graph, head's RU busy   -> no load order
//   new graph, another RU reconfiguring -> no load order (one at a time)
//   end of reconfiguration, task ready / not ready -> execution order / none,
//                                  within 4 cycles of the event
//   end of execution            -> entry cleared, deletion unit loaded and
//                                  waited for, then a load order, then
//                                  execution orders only for loaded ready RUs;
//                                  irq when the last task of the graph ends
module tb_control_unit;
  import tgem_pkg::*;
  localparam int NUM_RU = 4;

  logic clk = 0, rst_n = 0;
  event_t ev_head; logic ev_empty, ev_pop;
  rec_entry_t rec_head; logic rec_empty, rec_pop;
  ru_state_e ru_state [NUM_RU];
  tag_t ru_cur_tag [NUM_RU], ru_head_tag [NUM_RU];
  logic [NUM_RU-1:0] ru_ev_pending, ru_sched_empty, load_order, exec_order;
  tag_t tbl_tag; logic tbl_clear, tbl_use_du, tbl_hit, tbl_ready, du_load, du_busy;
  logic graph_start, graph_active, irq, irq_ack, rc_busy;
  tag_t num_tasks;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit #(.NUM_RU(NUM_RU)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // models
  event_t evq [$];
  rec_entry_t recq [$];
  bit ready_set [256];
  bit present   [256];
  int du_cnt = 0, du_loads = 0, clears = 0;
  int loads [NUM_RU], execs [NUM_RU];
  int cyc = 0, first_load_cyc = -1, first_exec_cyc = -1;

  // queue heads are copied into signals whenever the queues change
  function automatic void refresh();
    ev_empty  = (evq.size() == 0);
    ev_head   = ev_empty ? '0 : evq[0];
    rec_empty = (recq.size() == 0);
    rec_head  = rec_empty ? '0 : recq[0];
  endfunction
  always_comb tbl_hit = present[tbl_tag];
  assign du_busy   = du_cnt > 0;

  always @(posedge clk) begin
    cyc++;
    tbl_ready <= present[tbl_tag] && ready_set[tbl_tag];
    if (ev_pop && evq.size() > 0) void'(evq.pop_front());
    if (rec_pop && recq.size() > 0) void'(recq.pop_front());
    if (du_load) begin du_cnt <= 3; du_loads++; end
    else if (du_cnt > 0) du_cnt <= du_cnt - 1;
    if (tbl_clear) begin present[tbl_tag] <= 0; clears++; end
    for (int i = 0; i < NUM_RU; i++) begin
      if (load_order[i]) begin loads[i]++; if (first_load_cyc < 0) first_load_cyc = cyc; end
      if (exec_order[i]) begin execs[i]++; if (first_exec_cyc < 0) first_exec_cyc = cyc; end
    end
  end
  always @(negedge clk) refresh();

  task automatic clear_counts();
    for (int i = 0; i < NUM_RU; i++) begin loads[i] = 0; execs[i] = 0; end
    first_load_cyc = -1; first_exec_cyc = -1;
  endtask

  task automatic post(ev_code_e c, tag_t t, int r);
    evq.push_back('{code: c, tag: t, ru: ru_idx_t'(r)});
    refresh();
  endtask

  task automatic settle(int n);
    repeat (n) @(negedge clk);
  endtask

  int start;

  initial begin
    graph_start = 0; num_tasks = '0; irq_ack = 0;
    for (int i = 0; i < NUM_RU; i++) begin
      ru_state[i] = RU_FREE; ru_cur_tag[i] = '0; ru_head_tag[i] = tag_t'(8'd10 + 8'(i));
    end
    ru_ev_pending = '0; ru_sched_empty = '0;
    refresh();
    foreach (ready_set[i]) begin ready_set[i] = 0; present[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    graph_start = 1; num_tasks = 8'd1; @(negedge clk); graph_start = 0;
    check(graph_active && !irq, "graph active");

    // 1. new graph, RU 1 free
    clear_counts();
    recq.push_back('{tag: 8'd11, ru: 4'd1}); refresh();
    post(EV_NEW_GRAPH, 0, 0);
    settle(8);
    check(loads[1] == 1 && loads[0] + loads[2] + loads[3] == 0 && recq.size() == 0, "load order to RU 1");

    // 2. head's RU executing
    clear_counts();
    recq.push_back('{tag: 8'd10, ru: 4'd0}); refresh();
    ru_state[0] = RU_EXEC;
    post(EV_NEW_GRAPH, 0, 0);
    settle(8);
    check(loads[0] == 0 && recq.size() == 1, "no load while RU busy");

    // 3. RU free but another RU reconfiguring
    ru_state[0] = RU_FREE; ru_state[3] = RU_RECONF;
    #1; check(rc_busy, "reconfiguration circuitry busy");
    post(EV_NEW_GRAPH, 0, 0);
    settle(8);
    check(loads[0] == 0 && recq.size() == 1, "no load while circuitry busy");
    ru_state[3] = RU_FREE;

    // 4. end of reconfiguration on RU 2, task 20 ready
    clear_counts();
    recq.delete(); refresh();
    ru_state[2] = RU_LOADED; ru_cur_tag[2] = 8'd20; present[20] = 1; ready_set[20] = 1;
    post(EV_END_RECONF, 8'd20, 2);
    start = cyc;
    settle(8);
    check(execs[2] == 1 && first_exec_cyc - start <= 4, $sformatf("ready task started (%0d cycles)", first_exec_cyc - start));
    //    not ready
    clear_counts();
    ready_set[20] = 0;
    post(EV_REUSED, 8'd20, 2);
    settle(8);
    check(execs[2] == 0, "not-ready task waits");
    //    RU has an event waiting: no order
    ready_set[20] = 1; ru_ev_pending[2] = 1;
    post(EV_END_RECONF, 8'd20, 2);
    settle(8);
    check(execs[2] == 0, "no order while RU event waits");
    ru_ev_pending[2] = 0;

    // 5. end of execution of task 7
    clear_counts();
    present[7] = 1;
    recq.push_back('{tag: 8'd11, ru: 4'd1}); refresh();
    ru_state[2] = RU_LOADED; ru_cur_tag[2] = 8'd20; ready_set[20] = 1;
    ru_state[3] = RU_LOADED; ru_cur_tag[3] = 8'd30; present[30] = 1; ready_set[30] = 0;
    ru_state[0] = RU_LOADED; ru_cur_tag[0] = 8'd40; present[40] = 1; ready_set[40] = 1; ru_ev_pending[0] = 1;
    du_loads = 0; clears = 0;
    post(EV_END_EXEC, 8'd7, 1);
    settle(30);
    check(clears == 1 && !present[7] && du_loads == 1, "entry deleted, successors updated");
    check(loads[1] == 1, "reconfiguration looked for");
    check(execs[2] == 1 && execs[3] == 0 && execs[0] == 0, "only ready loaded RUs started");
    check(first_load_cyc >= 0 && first_exec_cyc > first_load_cyc, "load before scan");
    check(irq && !graph_active, "irq at last task");
    irq_ack = 1; @(negedge clk); irq_ack = 0;
    check(!irq, "irq acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
