// tb_graph_loader - drives graph records into the loader and checks that
// each reaches its structure: task records are held on the table insertion
// port until the table answers (after a random delay), schedule records
// push the FIFO of the named RU (and wait while it is full), reconfiguration
// records push the reconfiguration FIFO, and the end record pulses
// graph_start with the task count and offers a new-graph event until
// granted. No record is accepted while a graph is active.
module tb_graph_loader;
  import tgem_pkg::*;
  localparam int NUM_RU = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, ins_req, ins_done, ins_fail;
  graph_rec_t in_rec;
  task_info_t ins_info;
  logic [NUM_RU-1:0] sched_push, sched_full;
  sched_entry_t sched_entry;
  logic rec_push, rec_full;
  rec_entry_t rec_entry;
  logic ev_req, ev_gnt, graph_active, graph_start, load_error;
  event_t ev;
  tag_t num_tasks;
  int checks = 0, failures = 0;
  int ins_wait = 0;

  always #5 clk = ~clk;

  graph_loader #(.NUM_RU(NUM_RU)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // table model: answers an insertion after 0..2 extra cycles
  always_comb ins_done = ins_req && ins_wait == 0;
  assign ins_fail = 1'b0;
  always @(posedge clk) begin
    if (ins_req && ins_wait > 0) ins_wait <= ins_wait - 1;
    else if (!ins_req) ins_wait <= $urandom_range(0, 2);
  end

  // send one record; returns the cycles it took to be accepted
  task automatic send(graph_rec_t r, output int cycles);
    in_rec = r; in_valid = 1; cycles = 1; #1;
    while (!in_ready) begin @(negedge clk); cycles++; #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  graph_rec_t r;
  int cyc;

  initial begin
    in_valid = 0; in_rec = '0; sched_full = '0; rec_full = 0; ev_gnt = 0; graph_active = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    r = '0; r.kind = REC_TASK; r.info.tag = 8'd9; r.info.pred_cnt = 4'd1;
    in_rec = r; in_valid = 1; #1;
    check(ins_req && ins_info.tag == 8'd9 && ins_info.pred_cnt == 4'd1, "task routed to table");
    while (!in_ready) begin @(negedge clk); #1; check(ins_req, "insertion held"); end
    @(negedge clk); in_valid = 0;

    r = '0; r.kind = REC_SCHED; r.ru = 4'd2; r.sched.tag = 8'd9; r.sched.cfg = 8'd3; r.sched.exec_cycles = 32'd77;
    sched_full[2] = 1;
    in_rec = r; in_valid = 1; #1;
    check(!in_ready && sched_push == '0, "waits for full RU FIFO");
    @(negedge clk); sched_full[2] = 0; #1;
    check(in_ready && sched_push == 4'b0100 && sched_entry.exec_cycles == 32'd77, "pushed to RU 2");
    @(negedge clk); in_valid = 0;

    r = '0; r.kind = REC_RECONF; r.ru = 4'd1; r.info.tag = 8'd9;
    in_rec = r; in_valid = 1; #1;
    check(in_ready && rec_push && rec_entry.tag == 8'd9 && rec_entry.ru == 4'd1, "reconfiguration entry");
    @(negedge clk); in_valid = 0;

    r = '0; r.kind = REC_END; r.num_tasks = 8'd5;
    in_rec = r; in_valid = 1; #1;
    check(graph_start && num_tasks == 8'd5, "graph start with task count");
    @(negedge clk); in_valid = 0;
    graph_active = 1;
    check(ev_req && ev.code == EV_NEW_GRAPH, "new-graph event offered");
    @(negedge clk);
    check(ev_req, "event held");
    ev_gnt = 1; @(negedge clk); ev_gnt = 0;
    check(!ev_req, "event granted");

    r = '0; r.kind = REC_RECONF;
    in_rec = r; in_valid = 1; #1;
    check(!in_ready && !rec_push, "closed while graph active");
    @(negedge clk); graph_active = 0; #1;
    check(in_ready && rec_push, "open again");
    @(negedge clk); in_valid = 0;

    r = '0; r.kind = REC_SCHED; r.ru = 4'd9;
    send(r, cyc);
    #1;
    check(load_error, "bad RU index flagged");
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
