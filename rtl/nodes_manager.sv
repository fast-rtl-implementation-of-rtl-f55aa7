// nodes_manager: the controller of the A* search.
//
// One iteration expands one node:
//   REQ/POP  ask the memory manager for the node to expand (the start node, or
//            the least-cost node the comparator engine names, which is popped
//            from its queue in the same cycle);
//   WAIT     wait until the memory manager shows the node's 3x3 neighbourhood
//            (one cycle on a neighbour move, longer on a miss). A node that is
//            already closed is a stale duplicate and is skipped; the goal ends
//            the search; otherwise the node is marked closed and the eight
//            evaluators are started on its children;
//   EVAL     the evaluators' results are written: every improved child gets its
//            new G and this node as parent in the memory manager, and goes into
//            the evaluator's own priority queue;
//   POP      next iteration. Empty queues end the search without a path.
// At the end the memory manager writes its window back (FLUSH) and, if the goal
// was reached, the path extractor is started (TRACE). `done` pulses at the end
// with `found` telling whether a path exists. A new search starts with a
// `start` pulse while idle; it empties the queues.
// Outputs `expand` and `stale` pulse once per expanded and skipped node.
// The node manager's role (main controller, requests data from the memory
// manager, takes the next node from the comparator engine) follows the
// accelerator's description; the state sequence, the lazy removal of stale
// queue entries and the end conditions are this design's choices.
module nodes_manager
  import astar_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // host
  input  logic          start,
  input  coord_t        start_pos,
  input  coord_t        goal_pos,
  output logic          busy,
  output logic          done,
  output logic          found,
  output logic          expand,
  output logic          stale,
  // memory manager
  output logic          mm_req_valid,
  output coord_t        mm_req_pos,
  input  logic          mm_req_ready,
  output logic          mm_flush,
  input  coord_t        mm_center,
  input  node_t         mm_nb       [9],
  input  logic [8:0]    mm_nb_inmap,
  input  logic          mm_nb_valid,
  output logic [8:0]    mm_upd_en,
  output node_t         mm_upd_data [9],
  // evaluators
  output logic          ev_start,
  output coord_t        ev_cur_pos,
  output logic [GW-1:0] ev_cur_g,
  output coord_t        ev_goal,
  output node_t         ev_child       [NCHILD],
  output logic [NCHILD-1:0] ev_child_inmap,
  input  logic [NCHILD-1:0] ev_ins_valid,
  input  logic [GW-1:0] ev_upd_g       [NCHILD],
  input  coord_t        ev_upd_parent  [NCHILD],
  // priority queues and comparator engine
  output logic          q_clear,
  output logic [NCHILD-1:0] q_pop,
  input  logic          cmp_valid,
  input  logic [NCHILD-1:0] cmp_onehot,
  input  qentry_t       cmp_entry,
  // path extractor
  output logic          pe_start,
  input  logic          pe_done
);

  typedef enum logic [2:0] {
    S_IDLE, S_REQ, S_WAIT, S_EVAL, S_POP, S_FLUSH, S_FLUSH_WAIT, S_TRACE
  } state_t;

  state_t state;
  coord_t spos, gpos;
  logic   first;            // the node being fetched is the start node
  node_t  ctr;

  // child k sits at neighbourhood index k (k < 4) or k+1 (k >= 4)
  function automatic int nb_of(int k);
    return (k < 4) ? k : k + 1;
  endfunction

  assign ctr = mm_nb[4];

  always_comb begin
    ev_cur_pos = mm_center;
    ev_cur_g   = first ? '0 : ctr.g;
    ev_goal    = gpos;
    for (int k = 0; k < NCHILD; k++) begin
      ev_child[k]       = mm_nb[nb_of(k)];
      ev_child_inmap[k] = mm_nb_inmap[nb_of(k)];
    end
  end

  // control outputs
  always_comb begin
    busy         = (state != S_IDLE);
    mm_req_valid = 1'b0;
    mm_req_pos   = spos;
    mm_flush     = 1'b0;
    mm_upd_en    = '0;
    ev_start     = 1'b0;
    q_clear      = (state == S_IDLE) && start;
    q_pop        = '0;
    pe_start     = 1'b0;
    expand       = 1'b0;
    stale        = 1'b0;
    for (int j = 0; j < 9; j++) mm_upd_data[j] = mm_nb[j];

    unique case (state)
      S_REQ: mm_req_valid = 1'b1;
      S_WAIT: if (mm_nb_valid) begin
        if (first) begin
          mm_upd_en[4]          = 1'b1;
          mm_upd_data[4].parent = spos;
          mm_upd_data[4].g      = '0;
          mm_upd_data[4].closed = 1'b1;
          ev_start              = (mm_center != gpos);
          expand                = 1'b1;
        end else if (ctr.closed) begin
          stale = 1'b1;
        end else begin
          mm_upd_en[4]          = 1'b1;
          mm_upd_data[4].closed = 1'b1;
          ev_start              = (mm_center != gpos);
          expand                = 1'b1;
        end
      end
      S_EVAL: begin
        for (int k = 0; k < NCHILD; k++) begin
          mm_upd_en[nb_of(k)]          = ev_ins_valid[k];
          mm_upd_data[nb_of(k)].parent = ev_upd_parent[k];
          mm_upd_data[nb_of(k)].g      = ev_upd_g[k];
        end
      end
      S_POP: if (cmp_valid && mm_req_ready) begin
        mm_req_valid = 1'b1;
        mm_req_pos   = cmp_entry.pos;
        q_pop        = cmp_onehot;
      end
      S_FLUSH: mm_flush = !mm_req_valid;
      S_FLUSH_WAIT: pe_start = mm_req_ready && found;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      spos  <= '0;
      gpos  <= '0;
      first <= 1'b0;
      found <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          spos  <= start_pos;
          gpos  <= goal_pos;
          first <= 1'b1;
          found <= 1'b0;
          state <= S_REQ;
        end
        S_REQ: if (mm_req_ready) state <= S_WAIT;
        S_WAIT: if (mm_nb_valid) begin
          first <= 1'b0;
          if (!first && ctr.closed) begin
            state <= S_POP;
          end else if (mm_center == gpos) begin
            found <= 1'b1;
            state <= S_FLUSH;
          end else begin
            state <= S_EVAL;
          end
        end
        S_EVAL: state <= S_POP;
        S_POP: begin
          if (!cmp_valid)        state <= S_FLUSH;
          else if (mm_req_ready) state <= S_WAIT;
        end
        S_FLUSH: if (mm_req_ready) state <= S_FLUSH_WAIT;
        S_FLUSH_WAIT: if (mm_req_ready) begin
          if (found) begin
            state <= S_TRACE;
          end else begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_TRACE: if (pe_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // At most one queue is popped, only the selected one, and only together
  // with an accepted memory manager request for that node.
  a_pop_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(q_pop)) else $error("more than one queue popped");
  a_pop_with_req: assert property (@(posedge clk) disable iff (!rst_n)
    (q_pop != '0) |-> (cmp_valid && (q_pop == cmp_onehot) && mm_req_valid && mm_req_ready))
    else $error("pop without an accepted request");
  // Records are only written while the neighbourhood is being served.
  a_upd_when_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (mm_upd_en != '0) |-> (mm_nb_valid && !mm_req_valid))
    else $error("record update without a served neighbourhood");

endmodule
