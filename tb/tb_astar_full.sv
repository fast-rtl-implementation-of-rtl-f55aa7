// tb_astar_full: the accelerator at its default size (256 x 256 map, eight
// queues of 313 entries) on the benchmark workload: random maps whose nodes are
// obstacles with probability 10 %, 20 %, 30 %, 40 % and 50 %, searched from
// (0,0) to (255,255), the worst case. One map per probability.
// Each result is checked against the exact least cost from astar_ref_pkg
// (equal when no queue entry was lost, never below it otherwise; an
// unreachable goal must be reported as such), and the search time at a
// 200 MHz clock is printed, with the average over the MAPS maps of each
// probability.
module tb_astar_full;
  import astar_pkg::*;
  import astar_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   map_we = 1'b0, map_obstacle = 1'b0, start = 1'b0;
  coord_t map_pos = '0, start_pos = '0, goal_pos = '0;
  logic   busy, done, found, path_valid, path_last, path_error;
  coord_t path_pos;
  logic [31:0] stat_cycles, stat_expanded, stat_hits, stat_misses, stat_stale, stat_drops;

  astar_top dut (.*);

  always #5 clk = ~clk;

  localparam int MAPS = 3;

  int checks = 0, failures = 0;
  int px [$], py [$];

  always @(posedge clk) if (path_valid) begin
    px.push_back(int'(path_pos.x));
    py.push_back(int'(path_pos.y));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_map();
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        map_we       <= 1'b1;
        map_pos      <= '{x: crd_t'(x), y: crd_t'(y)};
        map_obstacle <= obst[idx(x, y)];
        @(posedge clk);
      end
    map_we <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int pct = 10; pct <= 50; pct += 10) begin
     longint sum_cycles;
     int n_found, n_least;
     sum_cycles = 0;
     n_found = 0;
     n_least = 0;
     for (int mi = 0; mi < MAPS; mi++) begin
      int c, best;
      clear_map();
      random_fill(0, 0, N - 1, N - 1, pct);
      obst[idx(0, 0)]         = 1'b0;
      obst[idx(N - 1, N - 1)] = 1'b0;
      solve_costs(0, 0);
      best = cost_to[idx(N - 1, N - 1)];
      load_map();
      px.delete();
      py.delete();
      start_pos <= '{x: 8'd0, y: 8'd0};
      goal_pos  <= '{x: 8'd255, y: 8'd255};
      start     <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      do @(posedge clk); while (!done);
      @(posedge clk);
      $display("obstacles %0d%%: found=%0d len=%0d cycles=%0d (%0.3f ms at 200 MHz) expanded=%0d hits=%0d misses=%0d stale=%0d drops=%0d least_cost=%0d",
               pct, found, px.size(), stat_cycles, real'(stat_cycles) / 200.0e3, stat_expanded,
               stat_hits, stat_misses, stat_stale, stat_drops, best);
      if (best >= INF) begin
        check(!found, $sformatf("%0d%%: unreachable goal reported as found", pct));
      end else begin
        check(found, $sformatf("%0d%%: path not found", pct));
        c = path_cost(px, py, 0, 0, N - 1, N - 1);
        $display("  path cost %0d, least cost %0d", c, best);
        check(c >= 0, $sformatf("%0d%%: illegal path (code %0d)", pct, c));
        if (stat_drops == 0) check(c == best, $sformatf("%0d%%: cost %0d, least %0d", pct, c, best));
        else                 check(c >= best, $sformatf("%0d%%: cost %0d below least %0d", pct, c, best));
        n_found++;
        if (c == best) n_least++;
      end
      sum_cycles += stat_cycles;
     end
     $display("obstacles %0d%%: average %0.3f ms at 200 MHz over %0d maps; %0d with a path, %0d of them least-cost",
              pct, real'(sum_cycles) / MAPS / 200.0e3, MAPS, n_found, n_least);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
