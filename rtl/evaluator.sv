// evaluator: cost evaluation of one child node of the current node.
//
// Eight instances run in parallel, one per neighbour direction K (numbering in
// astar_pkg). When `start` is high the evaluator takes the current node (its
// position and its G), the child's record as read from the memory manager, a
// flag saying whether the child lies inside the map, and the goal. It computes
//   G_new = G_cur + (diagonal ? D2 : D)      H = octile(child, goal)
//   F     = G_new + H
// and decides that the child is worth keeping when it is inside the map, not an
// obstacle, not closed, and G_new is lower than the G it already has. One cycle
// later `ins_valid` carries that decision with the queue entry {F, child} for
// this evaluator's own priority queue and `upd_*` with the new G and parent for
// the child's record.
// The F = G + H formula and the octile heuristic follow the accelerator's
// description; the integer weights, the single register stage and the
// interface are this design's choices.
module evaluator
  import astar_pkg::*;
#(
  parameter int K = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  coord_t        cur_pos,
  input  logic [GW-1:0] cur_g,
  input  node_t         child,
  input  logic          child_in_map,
  input  coord_t        goal,
  output logic          ins_valid,    // child improved: insert and update
  output qentry_t       ins_data,
  output logic [GW-1:0] upd_g,
  output coord_t        upd_parent
);

  localparam int STEP = child_diag(K) ? D_DIAG : D_ORTH;

  coord_t        cpos;
  logic [GW:0]   g_new;
  logic [FW-1:0] h, f;
  logic          keep;

  always_comb begin
    cpos.x = crd_t'(int'(cur_pos.x) + child_dx(K));
    cpos.y = crd_t'(int'(cur_pos.y) + child_dy(K));
    g_new  = {1'b0, cur_g} + (GW+1)'(STEP);
    h      = octile(cpos, goal);
    f      = FW'(g_new) + h;
    keep   = child_in_map && !child.obstacle && !child.closed &&
             (g_new < {1'b0, child.g});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ins_valid  <= 1'b0;
      ins_data   <= '0;
      upd_g      <= '0;
      upd_parent <= '0;
    end else begin
      ins_valid <= start && keep;
      if (start) begin
        ins_data.f   <= f;
        ins_data.pos <= cpos;
        upd_g        <= g_new[GW-1:0];
        upd_parent   <= cur_pos;
      end
    end
  end

endmodule
