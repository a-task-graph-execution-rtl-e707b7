// tb_del_update_unit - checks the deletion-and-update sequencer: after
// load with N successors it drives exactly N cycles of solved_dep, one
// successor tag per cycle (last to first), then drops busy. Covers N = 0,
// 1, 3, MAX_SUCC and a clamped count above MAX_SUCC.
module tb_del_update_unit;
  import tgem_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load, solved_dep, busy;
  cnt_t num_succ;
  tag_t [MAX_SUCC-1:0] succ_in;
  tag_t cur_succ;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  del_update_unit dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(int n);
    int eff;
    eff = (n > MAX_SUCC) ? MAX_SUCC : n;
    for (int i = 0; i < MAX_SUCC; i++) succ_in[i] = tag_t'(8'h10 + 8'(i) + 8'($urandom_range(0, 7) << 4));
    num_succ = cnt_t'(n);
    load = 1;
    @(negedge clk);
    load = 0;
    for (int k = eff; k >= 1; k--) begin
      check(busy && solved_dep, $sformatf("update active n=%0d k=%0d", n, k));
      check(cur_succ == succ_in[k-1], $sformatf("successor n=%0d k=%0d", n, k));
      @(negedge clk);
    end
    check(!busy && !solved_dep, $sformatf("done n=%0d", n));
  endtask

  initial begin
    load = 0; num_succ = '0; succ_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy, "idle after reset");
    run(0); run(1); run(3); run(MAX_SUCC); run(MAX_SUCC + 3); run(2);
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
