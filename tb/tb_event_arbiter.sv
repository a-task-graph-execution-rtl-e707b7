// tb_event_arbiter - exhaustive check of the fixed-priority arbiter: for
// every request pattern the grant is the lowest-numbered request alone,
// and no grant is given while the queue is full.
module tb_event_arbiter;
  localparam int N = 5;
  logic [N-1:0] req, gnt, exp_gnt;
  logic full;
  int checks = 0, failures = 0;

  event_arbiter #(.N(N)) dut (.*);

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < (1 << N); r++) begin
        req  = N'(r);
        full = f[0];
        #1;
        exp_gnt = '0;
        if (!full) begin
          for (int i = 0; i < N; i++) if (req[i] && exp_gnt == '0) exp_gnt[i] = 1'b1;
        end
        checks++;
        if (gnt !== exp_gnt) begin
          failures++;
          $display("FAIL req=%b full=%b gnt=%b exp=%b", req, full, gnt, exp_gnt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
