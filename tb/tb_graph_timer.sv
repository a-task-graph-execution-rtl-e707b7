// tb_graph_timer - checks that the graph timer counts exactly the cycles
// during which graph_active is high, holds the value afterwards, restarts
// from one on the next graph, and reports running.
module tb_graph_timer;
  import tgem_pkg::*;

  logic clk = 0, rst_n = 0;
  logic graph_active, running;
  cyc_t elapsed;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  graph_timer dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic span(int n);
    graph_active = 1;
    repeat (n) @(negedge clk);
    check(running, "running");
    graph_active = 0;
    @(negedge clk);
    check(elapsed == cyc_t'(n), $sformatf("span %0d measured %0d", n, elapsed));
    repeat (5) @(negedge clk);
    check(elapsed == cyc_t'(n) && !running, "held after the graph");
  endtask

  initial begin
    graph_active = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(elapsed == '0 && !running, "cleared by reset");
    span(1); span(17); span(300); span(4);
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
