// tb_evaluator: the eight evaluator instances (one per direction) driven with
// random current nodes, goals and child records. The expected child position,
// G, F = G + H (H written here as 14*min + 10*(max-min)) and keep decision are
// worked out in the testbench and compared one cycle after `start`.
module tb_evaluator;
  import astar_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  coord_t        cur_pos = '0, goal = '0;
  logic [GW-1:0] cur_g = '0;
  node_t         child [8];
  logic [7:0]    child_in_map = '0;
  logic [7:0]    ins_valid;
  qentry_t       ins_data [8];
  logic [GW-1:0] upd_g [8];
  coord_t        upd_parent [8];

  for (genvar k = 0; k < 8; k++) begin : g_ev
    evaluator #(.K(k)) dut (
      .clk, .rst_n, .start, .cur_pos, .cur_g, .child(child[k]),
      .child_in_map(child_in_map[k]), .goal,
      .ins_valid(ins_valid[k]), .ins_data(ins_data[k]),
      .upd_g(upd_g[k]), .upd_parent(upd_parent[k])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_keep = 0, n_reject = 0;
  localparam int DXS [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
  localparam int DYS [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      int cx, cy, gx, gy, g0;
      int ex [8], ey [8], eg [8], ef [8];
      bit ek [8];
      cx = 1 + ($urandom % 254);
      cy = 1 + ($urandom % 254);
      gx = $urandom % 256;
      gy = $urandom % 256;
      g0 = $urandom % 400000;
      cur_pos <= '{x: crd_t'(cx), y: crd_t'(cy)};
      goal    <= '{x: crd_t'(gx), y: crd_t'(gy)};
      cur_g   <= GW'(g0);
      for (int k = 0; k < 8; k++) begin
        int adx, ady, mn, mx, cg;
        node_t n;
        ex[k] = cx + DXS[k];
        ey[k] = cy + DYS[k];
        eg[k] = g0 + ((DXS[k] != 0 && DYS[k] != 0) ? 14 : 10);
        adx = (ex[k] > gx) ? ex[k] - gx : gx - ex[k];
        ady = (ey[k] > gy) ? ey[k] - gy : gy - ey[k];
        mn = (adx < ady) ? adx : ady;
        mx = (adx < ady) ? ady : adx;
        ef[k] = eg[k] + 14 * mn + 10 * (mx - mn);
        case ($urandom % 4)
          0: cg = int'(G_INF);
          1: cg = eg[k];                        // equal: not an improvement
          2: cg = eg[k] + 1 + ($urandom % 50);  // improvement
          default: cg = $urandom % 400000;
        endcase
        n.parent   = '{x: crd_t'($urandom), y: crd_t'($urandom)};
        n.g        = GW'(cg);
        n.obstacle = ($urandom % 5) == 0;
        n.closed   = ($urandom % 5) == 0;
        child[k]  <= n;
        child_in_map[k] <= ($urandom % 8) != 0;
        #0;
      end
      start <= 1'b1;
      @(posedge clk);
      for (int k = 0; k < 8; k++)
        ek[k] = child_in_map[k] && !child[k].obstacle && !child[k].closed && (eg[k] < int'(child[k].g));
      start <= 1'b0;
      #1;
      for (int k = 0; k < 8; k++) begin
        check(ins_valid[k] == ek[k], $sformatf("dir %0d keep %0d expected %0d", k, ins_valid[k], ek[k]));
        check(int'(ins_data[k].pos.x) == ex[k] && int'(ins_data[k].pos.y) == ey[k], $sformatf("dir %0d position", k));
        check(int'(ins_data[k].f) == ef[k], $sformatf("dir %0d F %0d expected %0d", k, ins_data[k].f, ef[k]));
        check(int'(upd_g[k]) == eg[k], $sformatf("dir %0d G", k));
        check(int'(upd_parent[k].x) == cx && int'(upd_parent[k].y) == cy, $sformatf("dir %0d parent", k));
        if (ek[k]) n_keep++; else n_reject++;
      end
      @(posedge clk);
      #1;
      check(ins_valid == '0, "ins_valid must last one cycle");
    end
    check(n_keep > 0 && n_reject > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
