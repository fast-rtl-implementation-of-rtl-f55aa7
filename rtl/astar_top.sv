// astar_top: A* path-planning accelerator for a 256 x 256 grid map.
//
// The host first writes the map into the node memory through the map_* port
// (one node per cycle, while no search runs; every node must be written before
// each search, since a search leaves costs and flags behind). A `start` pulse
// with start_pos and goal_pos then starts the search:
//   - the nodes manager asks the memory manager for the node to expand;
//   - the memory manager serves the node and its eight children from a 5x5
//     register window, refilling it from the node memory in the background;
//   - eight evaluators compute G, the octile H and F = G + H of the eight
//     children at once, and each inserts an improved child into its own
//     shift-register priority queue of QDEPTH entries;
//   - the comparator engine picks the least F among the eight queue heads, and
//     that node is expanded next.
// When the goal is expanded, the path extractor streams the path out on
// path_valid/path_pos (goal first, path_last on the start node) and `done`
// pulses with found = 1; if the queues run dry, `done` pulses with found = 0.
// The stat_* outputs count, for the last search, its cycles, expanded nodes,
// window hits and misses of the memory manager, stale queue entries skipped
// and queue entries lost to a full queue.
// The block structure follows the accelerator's description; the host port,
// the statistics and the FPGA debug access (plain ports here) are this design's
// choices.
module astar_top
  import astar_pkg::*;
#(
  parameter int QDEPTH = 313
) (
  input  logic          clk,
  input  logic          rst_n,
  // map loading
  input  logic          map_we,
  input  coord_t        map_pos,
  input  logic          map_obstacle,
  // search control
  input  logic          start,
  input  coord_t        start_pos,
  input  coord_t        goal_pos,
  output logic          busy,
  output logic          done,
  output logic          found,
  // path output
  output logic          path_valid,
  output coord_t        path_pos,
  output logic          path_last,
  output logic          path_error,
  // statistics of the last search
  output logic [31:0]   stat_cycles,
  output logic [31:0]   stat_expanded,
  output logic [31:0]   stat_hits,
  output logic [31:0]   stat_misses,
  output logic [31:0]   stat_stale,
  output logic [31:0]   stat_drops
);

  // ---------------- node memory and its port sharing -----------------------
  logic            mem_we, mem_re;
  logic [2*CW-1:0] mem_waddr, mem_raddr;
  node_t           mem_wdata, mem_rdata;

  logic            mm_mem_we, mm_mem_re, pe_mem_re;
  logic [2*CW-1:0] mm_mem_waddr, mm_mem_raddr, pe_mem_raddr;
  node_t           mm_mem_wdata;

  always_comb begin
    if (busy) begin
      mem_we    = mm_mem_we;
      mem_waddr = mm_mem_waddr;
      mem_wdata = mm_mem_wdata;
    end else begin
      mem_we    = map_we;
      mem_waddr = {map_pos.y, map_pos.x};
      mem_wdata = '{parent: '0, g: G_INF, closed: 1'b0, obstacle: map_obstacle};
    end
    mem_re    = mm_mem_re || pe_mem_re;
    mem_raddr = pe_mem_re ? pe_mem_raddr : mm_mem_raddr;
  end

  node_mem u_mem (
    .clk, .we(mem_we), .wr_addr(mem_waddr), .wr_data(mem_wdata),
    .re(mem_re), .rd_addr(mem_raddr), .rd_data(mem_rdata)
  );

  // ---------------- memory manager ------------------------------------------
  logic       mm_req_valid, mm_req_ready, mm_flush, mm_hit, mm_miss, mm_nb_valid;
  coord_t     mm_req_pos, mm_center;
  node_t      mm_nb [9];
  logic [8:0] mm_nb_inmap, mm_upd_en;
  node_t      mm_upd_data [9];

  mem_manager u_mm (
    .clk, .rst_n,
    .req_valid(mm_req_valid), .req_pos(mm_req_pos), .req_ready(mm_req_ready),
    .flush(mm_flush), .hit(mm_hit), .miss(mm_miss),
    .center(mm_center), .nb(mm_nb), .nb_inmap(mm_nb_inmap), .nb_valid(mm_nb_valid),
    .upd_en(mm_upd_en), .upd_data(mm_upd_data),
    .mem_re(mm_mem_re), .mem_raddr(mm_mem_raddr), .mem_rdata(mem_rdata),
    .mem_we(mm_mem_we), .mem_waddr(mm_mem_waddr), .mem_wdata(mm_mem_wdata)
  );

  // ---------------- nodes manager --------------------------------------------
  logic                ev_start, q_clear, cmp_valid, pe_start, pe_done;
  logic                expand, stale;
  coord_t              ev_cur_pos, ev_goal;
  logic [GW-1:0]       ev_cur_g;
  node_t               ev_child      [NCHILD];
  logic [NCHILD-1:0]   ev_child_inmap, ev_ins_valid, q_pop, cmp_onehot;
  logic [GW-1:0]       ev_upd_g      [NCHILD];
  coord_t              ev_upd_parent [NCHILD];
  qentry_t             ev_ins_data   [NCHILD];
  qentry_t             cmp_entry;

  nodes_manager u_nm (
    .clk, .rst_n,
    .start, .start_pos, .goal_pos, .busy, .done, .found, .expand, .stale,
    .mm_req_valid, .mm_req_pos, .mm_req_ready, .mm_flush, .mm_center,
    .mm_nb, .mm_nb_inmap, .mm_nb_valid, .mm_upd_en, .mm_upd_data,
    .ev_start, .ev_cur_pos, .ev_cur_g, .ev_goal, .ev_child, .ev_child_inmap,
    .ev_ins_valid, .ev_upd_g, .ev_upd_parent,
    .q_clear, .q_pop, .cmp_valid, .cmp_onehot, .cmp_entry,
    .pe_start, .pe_done
  );

  // ---------------- evaluators and priority queues --------------------------
  qentry_t           q_head [NCHILD];
  logic [NCHILD-1:0] q_head_valid, q_dropped;

  for (genvar k = 0; k < NCHILD; k++) begin : g_lane
    evaluator #(.K(k)) u_ev (
      .clk, .rst_n,
      .start(ev_start), .cur_pos(ev_cur_pos), .cur_g(ev_cur_g),
      .child(ev_child[k]), .child_in_map(ev_child_inmap[k]), .goal(ev_goal),
      .ins_valid(ev_ins_valid[k]), .ins_data(ev_ins_data[k]),
      .upd_g(ev_upd_g[k]), .upd_parent(ev_upd_parent[k])
    );

    priority_queue #(.DEPTH(QDEPTH)) u_q (
      .clk, .rst_n, .clear(q_clear),
      .ins_valid(ev_ins_valid[k]), .ins_data(ev_ins_data[k]), .pop(q_pop[k]),
      .head(q_head[k]), .head_valid(q_head_valid[k]), .dropped(q_dropped[k]),
      .count()
    );
  end

  // ---------------- comparator engine --------------------------------------
  comparator_engine #(.N(NCHILD)) u_cmp (
    .heads(q_head), .valid(q_head_valid),
    .sel_valid(cmp_valid), .sel_onehot(cmp_onehot), .sel_idx(), .sel_entry(cmp_entry)
  );

  // ---------------- path extractor --------------------------------------------
  path_extractor u_pe (
    .clk, .rst_n, .start(pe_start), .start_pos, .goal_pos,
    .mem_re(pe_mem_re), .mem_raddr(pe_mem_raddr), .mem_rdata(mem_rdata),
    .path_valid, .path_pos, .path_last, .busy(), .done(pe_done), .error(path_error)
  );

  // ---------------- statistics ------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_cycles   <= '0;
      stat_expanded <= '0;
      stat_hits     <= '0;
      stat_misses   <= '0;
      stat_stale    <= '0;
      stat_drops    <= '0;
    end else if (!busy && start) begin
      stat_cycles   <= '0;
      stat_expanded <= '0;
      stat_hits     <= '0;
      stat_misses   <= '0;
      stat_stale    <= '0;
      stat_drops    <= '0;
    end else if (busy) begin
      stat_cycles   <= stat_cycles + 1;
      stat_expanded <= stat_expanded + 32'(expand);
      stat_hits     <= stat_hits + 32'(mm_hit);
      stat_misses   <= stat_misses + 32'(mm_miss);
      stat_stale    <= stat_stale + 32'(stale);
      stat_drops    <= stat_drops + 32'($countones(q_dropped));
    end
  end

endmodule
