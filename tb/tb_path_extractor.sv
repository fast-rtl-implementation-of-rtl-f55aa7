// tb_path_extractor: builds parent chains in a testbench memory (one-cycle
// read latency) and checks the streamed path node by node, goal first, with
// path_last on the start node and one node every two cycles. Also checks a
// one-node path (start = goal) and that a parent loop that never reaches the
// start ends with `error`.
module tb_path_extractor;
  import astar_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  coord_t      start_pos = '0, goal_pos = '0, path_pos;
  logic        mem_re, path_valid, path_last, busy, done, error;
  logic [15:0] mem_raddr;
  node_t       mem_rdata;

  path_extractor dut (.*);

  always #5 clk = ~clk;

  node_t mem [65536];
  always @(posedge clk) if (mem_re) mem_rdata <= mem[mem_raddr];

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // chain[0] = goal ... chain[$] = start; returns the number of nodes streamed
  task automatic run(coord_t chain [$], bit expect_error);
    int n, cyc, first_cyc, last_cyc;
    start_pos = chain[chain.size()-1];
    goal_pos  = chain[0];
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n = 0; cyc = 0; first_cyc = -1; last_cyc = -1;
    while (!done && cyc < 300000) begin
      if (path_valid) begin
        if (!expect_error) begin
          check(n < chain.size() && path_pos == chain[n], $sformatf("path node %0d", n));
          check(path_last == (n == chain.size() - 1), $sformatf("path_last at node %0d", n));
        end
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        n++;
      end
      @(posedge clk); #1;
      cyc++;
    end
    check(done, "done never pulsed");
    check(error == expect_error, "error flag");
    if (!expect_error) begin
      check(n == chain.size(), $sformatf("%0d nodes streamed, %0d expected", n, chain.size()));
      check(last_cyc - first_cyc == 2 * (n - 1), "one node every two cycles");
    end
  endtask

  initial begin
    coord_t chain [$];
    coord_t p;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 20; t++) begin
      // a chain of distinct nodes along a random walk that never revisits
      chain.delete();
      p = '{x: crd_t'($urandom), y: crd_t'($urandom)};
      chain.push_back(p);
      for (int i = 0; i < 1 + $urandom % 300; i++) begin
        p.x = p.x + 8'd1;
        p.y = p.y + crd_t'(($urandom % 3) - 1);
        chain.push_back(p);
      end
      for (int i = 0; i < chain.size() - 1; i++) begin
        mem[{chain[i].y, chain[i].x}] = node_t'({$urandom, $urandom});
        mem[{chain[i].y, chain[i].x}].parent = chain[i+1];
      end
      run(chain, 1'b0);
    end
    // start = goal
    chain.delete();
    chain.push_back('{x: 8'd7, y: 8'd9});
    run(chain, 1'b0);
    // parent loop that never reaches the start
    mem[{8'd1, 8'd1}].parent = '{x: 8'd2, y: 8'd1};
    mem[{8'd1, 8'd2}].parent = '{x: 8'd1, y: 8'd1};
    chain.delete();
    chain.push_back('{x: 8'd1, y: 8'd1});
    chain.push_back('{x: 8'd50, y: 8'd50});
    run(chain, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
