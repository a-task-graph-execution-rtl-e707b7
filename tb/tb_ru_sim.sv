// tb_ru_sim - checks that the programmable counters of the RU model give
// rec_done and exec_done exactly N cycles after the start pulse, for
// several N, and that the state register keeps the task tag.
module tb_ru_sim;
  import tgem_pkg::*;

  logic clk = 0, rst_n = 0;
  logic rec_start, rec_done, exec_start, exec_done, busy;
  cyc_t rec_cycles, exec_cycles;
  tag_t task_tag, state_tag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ru_sim dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(bit is_exec, int n);
    int waited;
    task_tag = tag_t'($urandom);
    if (is_exec) begin exec_start = 1; exec_cycles = cyc_t'(n); end
    else         begin rec_start  = 1; rec_cycles  = cyc_t'(n); end
    @(negedge clk);
    exec_start = 0; rec_start = 0;
    check(busy && state_tag == task_tag, "busy with task");
    waited = 1;
    while (!(is_exec ? exec_done : rec_done) && waited < n + 10) begin
      @(negedge clk);
      waited++;
    end
    check(waited == ((n == 0) ? 1 : n), $sformatf("%s latency n=%0d got %0d", is_exec ? "exec" : "rec", n, waited));
    @(negedge clk);
    check(!rec_done && !exec_done && !busy, "single pulse, idle");
  endtask

  initial begin
    rec_start = 0; exec_start = 0; rec_cycles = '0; exec_cycles = '0; task_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0, 1); run(0, 5); run(1, 3); run(1, 40); run(0, 0); run(1, 17);
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
