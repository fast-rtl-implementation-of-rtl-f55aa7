// astar_ref_pkg: reference model for the accelerator testbenches.
//
// Holds a 256 x 256 obstacle map and computes, independently of the RTL, the
// exact least cost from a start node to every node with the same step costs
// (10 straight, 14 diagonal, eight neighbours). It uses repeated forward and
// backward raster sweeps of edge relaxation until nothing changes, which gives
// the exact shortest-path costs whatever the obstacle layout. It also checks a
// path reported by the accelerator: consecutive nodes adjacent, none an
// obstacle, from the goal to the start, and returns its cost.
package astar_ref_pkg;

  localparam int N = 256;
  localparam int INF = 32'h3fff_ffff;

  bit obst [N*N];
  int cost_to [N*N];

  function automatic int idx(int x, int y);
    return y * N + x;
  endfunction

  function automatic void clear_map();
    foreach (obst[i]) obst[i] = 1'b0;
  endfunction

  // Fill the rectangle [x0,x1] x [y0,y1] with obstacles at `pct` percent.
  function automatic void random_fill(int x0, int y0, int x1, int y1, int pct);
    for (int y = y0; y <= y1; y++)
      for (int x = x0; x <= x1; x++)
        obst[idx(x, y)] = (($urandom % 100) < pct);
  endfunction

  function automatic bit relax(int x, int y);
    int best, c;
    bit ch;
    ch = 1'b0;
    if (obst[idx(x, y)]) return 1'b0;
    best = cost_to[idx(x, y)];
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        int nx, ny;
        nx = x + dx;
        ny = y + dy;
        if ((dx != 0 || dy != 0) && nx >= 0 && nx < N && ny >= 0 && ny < N &&
            !obst[idx(nx, ny)] && cost_to[idx(nx, ny)] < INF) begin
          c = cost_to[idx(nx, ny)] + ((dx != 0 && dy != 0) ? 14 : 10);
          if (c < best) begin
            best = c;
            ch   = 1'b1;
          end
        end
      end
    cost_to[idx(x, y)] = best;
    return ch;
  endfunction

  // Exact least costs from (sx, sy) to every node.
  function automatic void solve_costs(int sx, int sy);
    bit changed;
    foreach (cost_to[i]) cost_to[i] = INF;
    cost_to[idx(sx, sy)] = 0;
    do begin
      changed = 1'b0;
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) changed |= relax(x, y);
      for (int y = N - 1; y >= 0; y--)
        for (int x = N - 1; x >= 0; x--) changed |= relax(x, y);
    end while (changed);
  endfunction

  // Cost of a path given goal first; -1 if it is not a legal path from
  // (sx, sy) to (gx, gy).
  function automatic int path_cost(int px [$], int py [$], int sx, int sy, int gx, int gy);
    int c;
    c = 0;
    if (px.size() == 0) return -1;
    if (px[0] != gx || py[0] != gy) return -2;
    if (px[px.size()-1] != sx || py[py.size()-1] != sy) return -3;
    for (int i = 0; i < px.size(); i++) begin
      if (obst[idx(px[i], py[i])]) return -4;
      if (i > 0) begin
        int dx, dy;
        dx = px[i] - px[i-1];
        dy = py[i] - py[i-1];
        if (dx < -1 || dx > 1 || dy < -1 || dy > 1 || (dx == 0 && dy == 0)) return -5;
        c += (dx != 0 && dy != 0) ? 14 : 10;
      end
    end
    return c;
  endfunction

endpackage
