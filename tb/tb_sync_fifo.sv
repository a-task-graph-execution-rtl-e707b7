// tb_sync_fifo - self-checking test of sync_fifo used as the
// reconfiguration FIFO (rec_entry_t entries, depth 4).
// Random pushes and pops, including simultaneous ones, phases that fill
// and drain the FIFO, are compared against a queue model: head contents,
// empty, full and count are checked every cycle.
module tb_sync_fifo;
  import tgem_pkg::*;
  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  rec_entry_t wdata, rdata;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  rec_entry_t model [$];
  int fulls = 0;

  always #5 clk = ~clk;

  sync_fifo #(.T(rec_entry_t), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      // compare state before the edge
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rdata == model[0], "head");
      push  = ($urandom_range(0, 99) < ((n / 100) % 2 == 0 ? 70 : 30)) && !full;
      pop   = ($urandom_range(0, 99) < 45) && !empty;
      wdata = rec_entry_t'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (full) fulls++;
      if (push) model.push_back(wdata);
      @(negedge clk);
      push = 0; pop = 0;
    end
    check(fulls > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
