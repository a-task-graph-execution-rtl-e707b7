// tb_event_queue - three sources write events at random, each holding its
// event until granted. Checks one grant per cycle, fixed priority among
// simultaneous requests, blocking while full (depth 4), and that the
// control-unit side reads every event once and in grant order.
module tb_event_queue;
  import tgem_pkg::*;
  localparam int N = 3, DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  event_t ev_in [N];
  logic pop, empty, full;
  event_t head;
  int checks = 0, failures = 0;
  event_t model [$];
  logic [N-1:0] granted;
  int sent = 0, recvd = 0, conflicts = 0, blocked = 0;

  always #5 clk = ~clk;

  event_queue #(.N_SRC(N), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    req = '0; pop = 0;
    for (int i = 0; i < N; i++) ev_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // new requests from idle sources
      for (int i = 0; i < N; i++) begin
        if (!req[i] && $urandom_range(0, 99) < 40) begin
          req[i] = 1;
          ev_in[i] = '{code: ev_code_e'($urandom_range(0, 3)), tag: tag_t'($urandom), ru: ru_idx_t'(i)};
        end
      end
      pop = !empty && ($urandom_range(0, 99) < ((n / 150) % 2 == 0 ? 60 : 20));
      #1;
      // expected grant: lowest requester unless full
      begin
        logic [N-1:0] exp;
        exp = '0;
        if (!full) for (int i = 0; i < N; i++) if (req[i] && exp == '0) exp[i] = 1;
        check(gnt == exp, "grant");
        if ($countones(req) > 1) conflicts++;
        if (full && req != '0) blocked++;
      end
      if (pop) begin
        check(model.size() > 0 && head == model[0], "head order");
        if (model.size() > 0) void'(model.pop_front());
        recvd++;
      end
      for (int i = 0; i < N; i++) if (gnt[i]) begin
        model.push_back(ev_in[i]);
        sent++;
      end
      granted = gnt;
      @(posedge clk);
      #1;
      pop = 0;
      req = req & ~granted;
    end
    check(conflicts > 0 && blocked > 0, "simultaneous requests and full queue seen");
    $display("events sent %0d read %0d conflicts %0d blocked %0d", sent, recvd, conflicts, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
