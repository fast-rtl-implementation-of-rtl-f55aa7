// tb_mem_manager: the 5x5 window against a golden copy of the whole map.
//
// A testbench memory (same one-cycle read latency as the node memory) starts
// with a distinct record per node. The test walks the window around the map:
// mostly single steps in all eight directions (hits), sometimes jumps (misses),
// short ones whose windows overlap the old one and long ones, often along the
// map border. After every move it compares the nine served
// records and their in-map flags with the golden copy, and it writes random
// new records into the inner 3x3, updating the golden copy. A hit must serve
// its neighbourhood in the cycle after the request is accepted. At the end the
// window is flushed and the whole testbench memory must equal the golden copy.
module tb_mem_manager;
  import astar_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       req_valid = 1'b0, flush = 1'b0;
  coord_t     req_pos = '0;
  logic       req_ready, hit, miss, nb_valid;
  coord_t     center;
  node_t      nb [9];
  logic [8:0] nb_inmap;
  logic [8:0] upd_en = '0;
  node_t      upd_data [9];
  logic       mem_re, mem_we;
  logic [15:0] mem_raddr, mem_waddr;
  node_t      mem_rdata, mem_wdata;

  mem_manager dut (.*);

  always #5 clk = ~clk;

  node_t mem    [65536];
  node_t golden [65536];

  always @(posedge clk) begin
    if (mem_re) mem_rdata <= mem[mem_raddr];
    if (mem_we && rst_n) mem[mem_waddr] <= mem_wdata;
  end

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_border = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic node_t rand_node();
    node_t n;
    n = node_t'({$urandom, $urandom});
    return n;
  endfunction

  task automatic move(int x, int y, bit expect_hit);
    int lat;
    req_valid = 1'b1;
    req_pos   = '{x: crd_t'(x), y: crd_t'(y)};
    while (!req_ready) begin
      @(posedge clk); #1;
    end
    #0;
    check(hit == expect_hit && miss == !expect_hit, $sformatf("hit/miss for (%0d,%0d)", x, y));
    @(posedge clk); #1;
    req_valid = 1'b0;
    if (expect_hit) begin
      n_hit++;
      check(nb_valid, "hit must serve the neighbourhood in the next cycle");
    end else n_miss++;
    lat = 0;
    while (!nb_valid && lat < 200) begin
      @(posedge clk); #1;
      lat++;
    end
    check(nb_valid, "neighbourhood never served");
    check(int'(center.x) == x && int'(center.y) == y, "centre");
    for (int j = 0; j < 9; j++) begin
      int cx, cy;
      bit inm;
      cx = x + j % 3 - 1;
      cy = y + j / 3 - 1;
      inm = cx >= 0 && cx < 256 && cy >= 0 && cy < 256;
      check(nb_inmap[j] == inm, $sformatf("in-map flag %0d at (%0d,%0d)", j, x, y));
      if (inm) check(nb[j] == golden[cy * 256 + cx], $sformatf("record %0d at (%0d,%0d)", j, x, y));
      else     check(nb[j].obstacle, "outside cell must read as obstacle");
    end
    if (x <= 1 || y <= 1 || x >= 254 || y >= 254) n_border++;
    // update some inner records
    for (int j = 0; j < 9; j++) begin
      int cx, cy;
      cx = x + j % 3 - 1;
      cy = y + j / 3 - 1;
      upd_en[j]   = nb_inmap[j] && ($urandom % 3 == 0);
      upd_data[j] = rand_node();
      if (upd_en[j]) golden[cy * 256 + cx] = upd_data[j];
    end
    @(posedge clk); #1;
    upd_en = '0;
  endtask

  initial begin
    int x, y;
    for (int i = 0; i < 65536; i++) begin
      mem[i]    = rand_node();
      golden[i] = mem[i];
    end
    for (int j = 0; j < 9; j++) upd_data[j] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    x = 1; y = 1;
    move(x, y, 1'b0);
    for (int t = 0; t < 3000; t++) begin
      if ($urandom % 20 == 0) begin
        int nx, ny;
        do begin
          if (t % 2 == 0) begin
            // short jump: the old and new windows overlap
            nx = x + int'($urandom % 9) - 4;
            ny = y + int'($urandom % 9) - 4;
            nx = (nx < 0) ? 0 : (nx > 255) ? 255 : nx;
            ny = (ny < 0) ? 0 : (ny > 255) ? 255 : ny;
          end else begin
            nx = (t % 3 == 0) ? (($urandom % 2) ? 0 : 255) : $urandom % 256;
            ny = $urandom % 256;
          end
        end while ((nx - x) <= 1 && (x - nx) <= 1 && (ny - y) <= 1 && (y - ny) <= 1);
        x = nx; y = ny;
        move(x, y, 1'b0);
      end else begin
        int dx, dy;
        do begin
          dx = int'($urandom % 3) - 1;
          dy = int'($urandom % 3) - 1;
        end while (x + dx < 0 || x + dx > 255 || y + dy < 0 || y + dy > 255);
        x += dx; y += dy;
        move(x, y, 1'b1);
      end
    end
    // flush and compare the whole memory
    while (!req_ready) begin @(posedge clk); #1; end
    flush = 1'b1;
    @(posedge clk); #1;
    flush = 1'b0;
    while (!req_ready) begin @(posedge clk); #1; end
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 65536; i++) if (mem[i] != golden[i]) bad++;
      check(bad == 0, $sformatf("%0d records differ after the flush", bad));
    end
    check(n_hit > 0 && n_miss > 1 && n_border > 0, "hits, misses and border moves all seen");
    $display("hits=%0d misses=%0d border=%0d", n_hit, n_miss, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
