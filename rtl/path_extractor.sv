// path_extractor: reads the found path out of the node memory.
//
// After the search has reached the goal and the memory manager has written its
// window back, every node on the best path points to its parent. Started with a
// one-cycle `start` pulse, this block walks those parent pointers from the goal
// back to the start node and streams the nodes out, goal first: one node on
// path_pos with path_valid every two cycles (one cycle to issue the memory read
// of the node's record, one to receive its parent), path_last marking the start
// node. The walk stops after 2**(2*CW) nodes at most; reaching that bound sets
// `error`, which can only happen if the parent pointers form a loop. `done`
// pulses when the walk ends.
// The document names this block and its place (it takes the result from the
// nodes manager); how it walks the memory, the output stream and the loop bound
// are this design's choices.
module path_extractor
  import astar_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  coord_t          start_pos,
  input  coord_t          goal_pos,
  output logic            mem_re,
  output logic [2*CW-1:0] mem_raddr,
  input  node_t           mem_rdata,
  output logic            path_valid,
  output coord_t          path_pos,
  output logic            path_last,
  output logic            busy,
  output logic            done,
  output logic            error
);

  typedef enum logic [1:0] {S_IDLE, S_EMIT, S_READ} state_t;

  state_t        state;
  coord_t        cur, from;
  logic [2*CW:0] steps;

  always_comb begin
    path_valid = (state == S_EMIT);
    path_pos   = cur;
    path_last  = (state == S_EMIT) && (cur == from || steps[2*CW]);
    mem_re     = (state == S_EMIT) && !path_last;
    mem_raddr  = {cur.y, cur.x};
    busy       = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= '0;
      from  <= '0;
      steps <= '0;
      done  <= 1'b0;
      error <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur   <= goal_pos;
          from  <= start_pos;
          steps <= '0;
          error <= 1'b0;
          state <= S_EMIT;
        end
        S_EMIT: begin
          steps <= steps + 1'b1;
          if (path_last) begin
            error <= (cur != from);
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_READ;
          end
        end
        S_READ: begin
          cur   <= mem_rdata.parent;
          state <= S_EMIT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
