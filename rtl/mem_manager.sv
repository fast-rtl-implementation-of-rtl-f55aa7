// mem_manager: cache-like 5x5 window of node records around the current node.
//
// The A* iteration works on the 3x3 block of the current node and its eight
// children. This block keeps the 5x5 block centred on the current node in
// registers, so that when the search moves to one of the eight neighbours the
// new 3x3 block is already inside the window (a hit): the window shifts by one
// place in the cycle the request is accepted and the new neighbourhood is on
// nb/nb_valid in the next cycle, without any memory access. In the background
// the block then writes the row and/or column that left the window back to the
// node memory (5 or 9 records) and reads the row and/or column that entered it,
// one read and one write per cycle, until the window is complete again.
// A request for any other node is a miss: the window moves by the same rule
// (cells the old and new windows share are kept, the others are written back
// and the new ones read), but now the inner 3x3 must come from memory, so
// nb_valid stays low until they are loaded, which halts the controller like a
// cache miss halts a processor. The inner 3x3 are always read first.
// Because a cell is read only if it was not in the old window, and written back
// only if it is not in the new one, reads and write-backs never touch the same
// node and run in parallel.
// Cells that lie outside the map read as obstacles and are never written.
// Interface: req_valid/req_pos are accepted when req_ready (window complete,
// no memory traffic pending); flush writes every record back and empties the
// window, and req_ready returns when it has finished. upd_en/upd_data write
// records of the inner 3x3 (same numbering as nb: index (dy+1)*3+(dx+1), the
// centre is 4); they are taken while nb_valid is high and no request is
// accepted. hit/miss pulse once per accepted request.
// The 5x5 window, the 3x3 service, the shift-and-refill on a neighbour move and
// the halt on any other move follow the accelerator's description; the
// write-back policy, the one-record-per-cycle memory traffic, the handling of
// a miss and the order in which cells are refilled are this design's choices.
module mem_manager
  import astar_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // move request from the nodes manager
  input  logic       req_valid,
  input  coord_t     req_pos,
  output logic       req_ready,
  input  logic       flush,
  output logic       hit,
  output logic       miss,
  // 3x3 neighbourhood of the current node
  output coord_t     center,
  output node_t      nb       [9],
  output logic [8:0] nb_inmap,
  output logic       nb_valid,
  input  logic [8:0] upd_en,
  input  node_t      upd_data [9],
  // node memory ports
  output logic       mem_re,
  output logic [2*CW-1:0] mem_raddr,
  input  node_t      mem_rdata,
  output logic       mem_we,
  output logic [2*CW-1:0] mem_waddr,
  output node_t      mem_wdata
);

  localparam int MAXC = 2**CW - 1;

  node_t w    [5][5];          // window records, [row = dy+2][col = dx+2]
  logic  have [5][5];          // record present (or cell outside the map)
  logic  need [5][5];          // record still to be read from memory
  logic  loaded;               // window is centred on `center`

  node_t            ev      [25];   // records waiting to be written back
  logic [2*CW-1:0]  ev_addr [25];
  logic [24:0]      ev_v;

  logic             rd_busy;        // read issued last cycle
  logic [2:0]       rd_r, rd_c;

  // -------- helpers --------------------------------------------------------
  function automatic logic in_map(coord_t cc, int r, int c);
    int x, y;
    x = int'(cc.x) + c - 2;
    y = int'(cc.y) + r - 2;
    return (x >= 0) && (x <= MAXC) && (y >= 0) && (y <= MAXC);
  endfunction

  function automatic logic [2*CW-1:0] cell_addr(coord_t cc, int r, int c);
    crd_t x, y;
    x = crd_t'(int'(cc.x) + c - 2);
    y = crd_t'(int'(cc.y) + r - 2);
    return {y, x};
  endfunction

  localparam node_t OUTSIDE = '{parent: '0, g: G_INF, closed: 1'b1, obstacle: 1'b1};

  // -------- request decode -------------------------------------------------
  logic signed [CW+1:0] mdx, mdy;   // move of the window
  logic                 near;
  logic                 accept, do_flush;

  always_comb begin
    mdx  = $signed({2'b00, req_pos.x}) - $signed({2'b00, center.x});
    mdy  = $signed({2'b00, req_pos.y}) - $signed({2'b00, center.y});
    near = loaded && (mdx >= -1) && (mdx <= 1) && (mdy >= -1) && (mdy <= 1);
  end

  logic any_need;
  always_comb begin
    any_need = 1'b0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) any_need |= need[r][c];
  end

  assign req_ready = !any_need && !rd_busy && (ev_v == '0);
  assign accept    = req_valid && req_ready;
  assign do_flush  = flush && req_ready && !req_valid;
  assign hit       = accept && near;
  assign miss      = accept && !near;

  // -------- neighbourhood output --------------------------------------------
  always_comb begin
    nb_valid = loaded;
    for (int j = 0; j < 9; j++) begin
      nb[j]       = w[j/3 + 1][j%3 + 1];
      nb_inmap[j] = in_map(center, j/3 + 1, j%3 + 1);
      nb_valid   &= have[j/3 + 1][j%3 + 1];
    end
  end

  // -------- refill read selection ------------------------------------------
  logic       rd_go;
  logic [2:0] sel_r, sel_c;
  always_comb begin
    rd_go = 1'b0;
    sel_r = '0;
    sel_c = '0;
    // outer ring in row-major order, then the inner 3x3 take precedence
    for (int r = 4; r >= 0; r--)
      for (int c = 4; c >= 0; c--)
        if (need[r][c]) begin
          rd_go = 1'b1;
          sel_r = 3'(r);
          sel_c = 3'(c);
        end
    for (int r = 3; r >= 1; r--)
      for (int c = 3; c >= 1; c--)
        if (need[r][c]) begin
          sel_r = 3'(r);
          sel_c = 3'(c);
        end
  end

  assign mem_re    = rd_go;
  assign mem_raddr = cell_addr(center, int'(sel_r), int'(sel_c));

  // -------- write-back selection -------------------------------------------
  logic [4:0] ev_sel;
  always_comb begin
    ev_sel = '0;
    for (int i = 24; i >= 0; i--)
      if (ev_v[i]) ev_sel = 5'(i);
  end

  assign mem_we    = |ev_v;
  assign mem_waddr = ev_addr[ev_sel];
  assign mem_wdata = ev[ev_sel];

  // -------- window state -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded    <= 1'b0;
      center    <= '0;
      rd_busy   <= 1'b0;
      rd_r      <= '0;
      rd_c      <= '0;
      ev_v      <= '0;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          w[r][c]    <= OUTSIDE;
          have[r][c] <= 1'b0;
          need[r][c] <= 1'b0;
        end
      for (int i = 0; i < 25; i++) begin
        ev[i]      <= '0;
        ev_addr[i] <= '0;
      end
    end else begin
      // write-back drains one record per cycle
      if (mem_we) ev_v[ev_sel] <= 1'b0;

      // refill: issue one read, land it one cycle later
      rd_busy <= rd_go;
      if (rd_go) begin
        need[sel_r][sel_c] <= 1'b0;
        rd_r <= sel_r;
        rd_c <= sel_c;
      end
      if (rd_busy) begin
        w[rd_r][rd_c]    <= mem_rdata;
        have[rd_r][rd_c] <= 1'b1;
      end

      // record updates from the nodes manager (inner 3x3 only)
      for (int j = 0; j < 9; j++)
        if (upd_en[j]) w[j/3 + 1][j%3 + 1] <= upd_data[j];

      if (accept) begin
        // move the window by (mdx, mdy): shared cells are kept, the cells
        // that leave are written back, the cells that enter are read
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++) begin
            int sr, sc, nr, nc;
            sr = r + int'(mdy);       // source of the new cell (r, c)
            sc = c + int'(mdx);
            nr = r - int'(mdy);       // new place of the old cell (r, c)
            nc = c - int'(mdx);
            if (loaded && sr >= 0 && sr <= 4 && sc >= 0 && sc <= 4) begin
              w[r][c]    <= w[sr][sc];
              have[r][c] <= have[sr][sc];
              need[r][c] <= 1'b0;
            end else if (in_map(req_pos, r, c)) begin
              have[r][c] <= 1'b0;
              need[r][c] <= 1'b1;
            end else begin
              w[r][c]    <= OUTSIDE;
              have[r][c] <= 1'b1;
              need[r][c] <= 1'b0;
            end
            if (!(nr >= 0 && nr <= 4 && nc >= 0 && nc <= 4)) begin
              ev[r*5+c]      <= w[r][c];
              ev_addr[r*5+c] <= cell_addr(center, r, c);
              ev_v[r*5+c]    <= loaded && have[r][c] && in_map(center, r, c);
            end
          end
        center <= req_pos;
        loaded <= 1'b1;
      end else if (do_flush) begin
        // write the whole window back and empty it
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++) begin
            ev[r*5+c]      <= w[r][c];
            ev_addr[r*5+c] <= cell_addr(center, r, c);
            ev_v[r*5+c]    <= loaded && have[r][c] && in_map(center, r, c);
            w[r][c]        <= OUTSIDE;
            have[r][c]     <= 1'b1;
            need[r][c]     <= 1'b0;
          end
        loaded <= 1'b0;
      end
    end
  end

  // A request or a flush must not meet a record update in the same cycle.
  // A neighbour move serves its 3x3 block in the next cycle.
  a_hit_next_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    hit |=> nb_valid) else $error("hit not served in the next cycle");
  // Records can only be updated while the neighbourhood is served.
  a_upd_when_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (upd_en != '0) |-> nb_valid) else $error("record update while the neighbourhood is not valid");
  a_no_upd_on_move: assert property (@(posedge clk) disable iff (!rst_n)
    !((accept || do_flush) && (upd_en != '0))) else $error("record update during a window move");

endmodule
