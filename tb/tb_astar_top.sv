// tb_astar_top: end-to-end test of the A* accelerator.
//
// Loads several 256 x 256 maps, runs a search on each and checks the streamed
// path against the reference model in astar_ref_pkg: the path must be legal
// (adjacent steps, no obstacles, goal to start) and, unless a queue overflowed,
// its cost must equal the exact least cost. The queues are shortened to 16
// entries so that overflow happens. The scenarios make every mechanism occur:
// window hits, window misses (halts), stale queue entries, queue overflow, map
// border cells, an unreachable goal and start = goal; each is counted, and one
// that never happens is a failure.
module tb_astar_top;
  import astar_pkg::*;
  import astar_ref_pkg::*;

  localparam int QD = 16;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   map_we = 1'b0, map_obstacle = 1'b0, start = 1'b0;
  coord_t map_pos = '0, start_pos = '0, goal_pos = '0;
  logic   busy, done, found, path_valid, path_last, path_error;
  coord_t path_pos;
  logic [31:0] stat_cycles, stat_expanded, stat_hits, stat_misses, stat_stale, stat_drops;

  astar_top #(.QDEPTH(QD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_stale = 0, n_drop = 0, n_border = 0, n_nopath = 0, n_same = 0;
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

  task automatic search(string name, int sx, int sy, int gx, int gy);
    int c;
    solve_costs(sx, sy);
    load_map();
    px.delete();
    py.delete();
    start_pos <= '{x: crd_t'(sx), y: crd_t'(sy)};
    goal_pos  <= '{x: crd_t'(gx), y: crd_t'(gy)};
    start     <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do @(posedge clk); while (!done);
    @(posedge clk);
    $display("%s: found=%0d len=%0d cycles=%0d expanded=%0d hits=%0d misses=%0d stale=%0d drops=%0d ref=%0d",
             name, found, px.size(), stat_cycles, stat_expanded, stat_hits, stat_misses,
             stat_stale, stat_drops, cost_to[idx(gx, gy)]);
    n_hit   += stat_hits;
    n_miss  += stat_misses - 1;       // the first fetch of a search is always a miss
    n_stale += stat_stale;
    n_drop  += stat_drops;
    if (cost_to[idx(gx, gy)] >= INF) begin
      check(!found, {name, ": goal is unreachable but a path was reported"});
      check(px.size() == 0, {name, ": no path expected"});
      if (!found) n_nopath++;
    end else begin
      check(found, {name, ": path not found"});
      check(!path_error, {name, ": path extractor error"});
      c = path_cost(px, py, sx, sy, gx, gy);
      check(c >= 0, $sformatf("%s: illegal path (code %0d)", name, c));
      if (stat_drops == 0)
        check(c == cost_to[idx(gx, gy)], $sformatf("%s: cost %0d, least cost %0d", name, c, cost_to[idx(gx, gy)]));
      else
        check(c >= cost_to[idx(gx, gy)], $sformatf("%s: cost %0d below least cost %0d", name, c, cost_to[idx(gx, gy)]));
      if (sx == gx && sy == gy) begin
        check(px.size() == 1, {name, ": start = goal must give a one-node path"});
        n_same++;
      end
      if (sx == 0 || sy == 0 || gx == N - 1 || gy == N - 1) n_border++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // open map
    clear_map();
    search("open", 5, 5, 40, 20);

    // a wall across the straight line forces a detour
    clear_map();
    for (int y = 0; y < 60; y++) obst[idx(30, y)] = 1'b1;
    search("wall", 20, 20, 40, 20);

    // random obstacles in a region touching the map border
    clear_map();
    random_fill(0, 0, 40, 40, 30);
    obst[idx(0, 0)]   = 1'b0;
    obst[idx(40, 40)] = 1'b0;
    search("random30", 0, 0, 40, 40);

    // start node boxed in by obstacles
    clear_map();
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (dx != 0 || dy != 0) obst[idx(100 + dx, 100 + dy)] = 1'b1;
    search("boxed", 100, 100, 120, 90);

    // start = goal at the far corner
    clear_map();
    search("same", 255, 255, 255, 255);

    check(n_hit   > 0, "no window hit happened");
    check(n_miss  > 0, "no window miss after the first fetch happened");
    check(n_stale > 0, "no stale queue entry was skipped");
    check(n_drop  > 0, "no queue overflow happened");
    check(n_border > 0, "no search touched the map border");
    check(n_nopath > 0, "no unreachable-goal search completed");
    check(n_same  > 0, "no start = goal search completed");
    $display("mechanisms: hits=%0d misses=%0d stale=%0d drops=%0d border=%0d nopath=%0d same=%0d",
             n_hit, n_miss, n_stale, n_drop, n_border, n_nopath, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
