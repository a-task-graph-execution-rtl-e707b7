// tb_ru_info - directed test of one RU controller (RU_ID 2, FIFO depth 4):
// schedule FIFO order and full flag, load order -> reconfiguration command
// with the task's latency, end-of-reconfiguration event held until granted,
// orders ignored in the wrong state or while an event waits, execution
// command and end-of-execution event, and reuse: a load of the
// configuration already present gives a reused-task event with no
// reconfiguration command.
module tb_ru_info;
  import tgem_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sched_push, sched_full, sched_empty, load_order, exec_order;
  sched_entry_t sched_in;
  ru_state_e state;
  tag_t cur_tag, head_tag;
  logic ev_req, ev_gnt, ev_pending;
  event_t ev;
  logic rec_start, rec_done, exec_start, exec_done;
  cyc_t rec_cycles, exec_cycles;
  int checks = 0, failures = 0;
  int n_rec_start = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rec_start) n_rec_start++;

  ru_info #(.DEPTH(4), .RU_ID(2)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic push(tag_t t, cfg_t c, int rc, int ec);
    sched_in = '{tag: t, cfg: c, rec_cycles: cyc_t'(rc), exec_cycles: cyc_t'(ec)};
    sched_push = 1; @(negedge clk); sched_push = 0;
  endtask

  task automatic pulse_load();  load_order = 1; @(negedge clk); load_order = 0; endtask
  task automatic pulse_exec();  exec_order = 1; @(negedge clk); exec_order = 0; endtask

  task automatic expect_event(ev_code_e code, tag_t t, int hold);
    check(ev_req && ev.code == code && ev.tag == t && ev.ru == ru_idx_t'(2),
          $sformatf("event %s tag %0d", code.name(), t));
    for (int i = 0; i < hold; i++) begin
      @(negedge clk);
      check(ev_req && ev.code == code && ev.tag == t, "event held");
    end
    ev_gnt = 1; @(negedge clk); ev_gnt = 0;
    check(!ev_req, "event released");
  endtask

  initial begin
    sched_push = 0; sched_in = '0; load_order = 0; exec_order = 0;
    ev_gnt = 0; rec_done = 0; exec_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == RU_FREE && sched_empty && !ev_req, "reset state");
    push(8'd1, 8'd5, 4, 6);
    push(8'd2, 8'd5, 4, 3);
    push(8'd3, 8'd7, 9, 2);
    push(8'd4, 8'd8, 1, 1);
    check(sched_full && head_tag == 8'd1, "FIFO full, head is first task");

    pulse_exec();
    check(state == RU_FREE && !exec_start, "exec order ignored in FREE");
    load_order = 1; #1;
    load_order = 1; @(negedge clk); load_order = 0;
    check(state == RU_RECONF && rec_start && rec_cycles == 32'd4 && cur_tag == 8'd1, "reconfiguration started");
    check(head_tag == 8'd2 && !sched_full, "head popped");
    pulse_load();
    check(state == RU_RECONF && head_tag == 8'd2, "load ignored while reconfiguring");
    rec_done = 1; @(negedge clk); rec_done = 0;
    check(state == RU_LOADED, "loaded");
    pulse_exec();
    check(state == RU_LOADED && !exec_start, "exec ignored while event waits");
    expect_event(EV_END_RECONF, 8'd1, 3);
    pulse_exec();
    check(state == RU_EXEC && exec_start && exec_cycles == 32'd6, "execution started");
    pulse_load();
    check(state == RU_EXEC && head_tag == 8'd2, "load ignored while executing");
    exec_done = 1; @(negedge clk); exec_done = 0;
    check(state == RU_FREE, "free after execution");
    expect_event(EV_END_EXEC, 8'd1, 1);

    // same configuration (5) -> reuse
    pulse_load();
    check(state == RU_LOADED && cur_tag == 8'd2 && !rec_start, "reused in one cycle");
    expect_event(EV_REUSED, 8'd2, 0);
    pulse_exec();
    check(exec_start && exec_cycles == 32'd3, "reused task executes");
    exec_done = 1; @(negedge clk); exec_done = 0;
    expect_event(EV_END_EXEC, 8'd2, 0);

    // different configuration (7) -> reconfigure
    pulse_load();
    check(state == RU_RECONF && rec_start && rec_cycles == 32'd9 && cur_tag == 8'd3, "new configuration reconfigures");
    check(n_rec_start == 2, $sformatf("two reconfigurations in all (%0d)", n_rec_start));
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
