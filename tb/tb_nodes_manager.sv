// tb_nodes_manager: the controller driven through scripted searches, with the
// testbench playing memory manager, evaluators, queues, comparator engine and
// path extractor. It checks, cycle by cycle, the request of the start node,
// the start node's record update and the evaluator start, the child record
// updates from the evaluator results, a pop that waits for the memory manager,
// a halt while the neighbourhood is not ready, the skip of a stale (closed)
// node, the goal ending the search with a flush and a path trace, and a second
// search that ends without a path when the queues run dry.
module tb_nodes_manager;
  import astar_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  coord_t        start_pos = '0, goal_pos = '0;
  logic          busy, done, found, expand, stale;
  logic          mm_req_valid, mm_req_ready = 1'b0, mm_flush, mm_nb_valid = 1'b0;
  coord_t        mm_req_pos, mm_center = '0;
  node_t         mm_nb [9];
  logic [8:0]    mm_nb_inmap = '1, mm_upd_en;
  node_t         mm_upd_data [9];
  logic          ev_start;
  coord_t        ev_cur_pos, ev_goal;
  logic [GW-1:0] ev_cur_g;
  node_t         ev_child [8];
  logic [7:0]    ev_child_inmap, ev_ins_valid = '0;
  logic [GW-1:0] ev_upd_g [8];
  coord_t        ev_upd_parent [8];
  logic          q_clear, cmp_valid = 1'b0, pe_start, pe_done = 1'b0;
  logic [7:0]    q_pop, cmp_onehot = '0;
  qentry_t       cmp_entry = '0;

  nodes_manager dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  function automatic coord_t xy(int x, int y);
    return '{x: crd_t'(x), y: crd_t'(y)};
  endfunction

  // a neighbourhood around (x, y): record j gets G = 1000 + j
  task automatic set_nb(int x, int y, bit centre_closed);
    mm_center = xy(x, y);
    for (int j = 0; j < 9; j++) begin
      mm_nb[j]          = '0;
      mm_nb[j].g        = GW'(1000 + j);
      mm_nb[j].parent   = xy(j, j);
      mm_nb[j].obstacle = (j == 2);
    end
    mm_nb[4].closed = centre_closed;
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin
      ev_upd_g[k] = '0;
      ev_upd_parent[k] = '0;
    end
    set_nb(0, 0, 1'b0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    tick();
    check(!busy && !mm_req_valid && !ev_start, "idle after reset");

    // ---------------- search 1: start (10,10), goal (12,10) -----------------
    start_pos = xy(10, 10);
    goal_pos  = xy(12, 10);
    start     = 1'b1;
    #0 check(q_clear, "start clears the queues");
    tick();
    start = 1'b0;
    mm_req_ready = 1'b1;
    #0 check(mm_req_valid && mm_req_pos == xy(10, 10), "request of the start node");
    tick();
    // neighbourhood not ready yet: nothing happens
    #0 check(!ev_start && mm_upd_en == '0 && !mm_req_valid, "halt while the neighbourhood is missing");
    tick();
    set_nb(10, 10, 1'b0);
    mm_nb_valid = 1'b1;
    #0;
    check(ev_start && expand, "start node expanded");
    check(ev_cur_g == '0 && ev_cur_pos == xy(10, 10) && ev_goal == xy(12, 10), "evaluator inputs");
    check(mm_upd_en == 9'b000010000 && mm_upd_data[4].g == '0 && mm_upd_data[4].closed &&
          mm_upd_data[4].parent == xy(10, 10), "start record: G = 0, closed, parent = itself");
    check(ev_child[0] == mm_nb[0] && ev_child[3] == mm_nb[3] && ev_child[4] == mm_nb[5] &&
          ev_child[7] == mm_nb[8], "children routed from the neighbourhood");
    tick();
    // EVAL: two children improved
    ev_ins_valid     = 8'b0001_0001;
    ev_upd_g[0]      = 20'd14;
    ev_upd_parent[0] = xy(10, 10);
    ev_upd_g[4]      = 20'd10;
    ev_upd_parent[4] = xy(10, 10);
    #0;
    check(mm_upd_en == 9'b000100001, "child updates at neighbourhood 0 and 5");
    check(mm_upd_data[0].g == 20'd14 && mm_upd_data[5].g == 20'd10 &&
          mm_upd_data[5].parent == xy(10, 10) && !mm_upd_data[5].closed, "child records");
    tick();
    ev_ins_valid = '0;
    // POP with the memory manager busy: must wait
    cmp_valid    = 1'b1;
    cmp_onehot   = 8'b0001_0000;
    cmp_entry    = '{f: 21'd30, pos: xy(11, 10)};
    mm_req_ready = 1'b0;
    mm_nb_valid  = 1'b0;
    #0 check(q_pop == '0 && !mm_req_valid, "no pop while the memory manager is busy");
    tick();
    mm_req_ready = 1'b1;
    #0 check(q_pop == 8'b0001_0000 && mm_req_valid && mm_req_pos == xy(11, 10), "pop and request");
    tick();
    // the popped node is already closed: stale
    set_nb(11, 10, 1'b1);
    mm_nb_valid = 1'b1;
    #0 check(stale && !ev_start && mm_upd_en == '0, "stale node skipped");
    tick();
    mm_nb_valid = 1'b0;
    cmp_onehot  = 8'b0000_0100;
    cmp_entry   = '{f: 21'd20, pos: xy(12, 10)};
    #0 check(q_pop == 8'b0000_0100 && mm_req_pos == xy(12, 10), "pop of the next node");
    tick();
    set_nb(12, 10, 1'b0);
    mm_nb_valid = 1'b1;
    #0 check(!ev_start && !stale, "goal is not expanded");
    tick();
    mm_nb_valid = 1'b0;
    #0 check(mm_flush && !mm_req_valid, "flush after the goal");
    tick();
    mm_req_ready = 1'b0;
    tick();
    #0 check(!pe_start, "trace waits for the flush");
    tick();
    mm_req_ready = 1'b1;
    #0 check(pe_start, "path extractor started");
    tick();
    tick();
    pe_done = 1'b1;
    tick();
    pe_done = 1'b0;
    #0 check(done && found && !busy, "done with a path");
    tick();
    check(!done, "done is a pulse");

    // ---------------- search 2: queues run dry -------------------------------
    start_pos = xy(0, 0);
    goal_pos  = xy(200, 200);
    start     = 1'b1;
    tick();
    start = 1'b0;
    tick();                                  // request accepted
    set_nb(0, 0, 1'b0);
    mm_nb_valid = 1'b1;
    #0 check(ev_start, "start node expanded");
    tick();
    mm_nb_valid = 1'b0;
    tick();                                  // EVAL, nothing improved
    cmp_valid = 1'b0;
    #0 check(!mm_req_valid && q_pop == '0, "nothing to pop");
    tick();
    #0 check(mm_flush, "flush when the queues are empty");
    tick();
    tick();
    check(done && !found, "done without a path");
    check(!pe_start, "no trace without a path");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
