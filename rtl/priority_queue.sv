// priority_queue: one open list of the A* accelerator, a sorted shift-register
// queue.
//
// The queue holds up to DEPTH entries (astar_pkg::qentry_t) sorted by F, the
// least F at position 0, which is the head shown on head/head_valid. A new
// entry is compared with every stored entry in parallel; each cell then keeps
// its entry, takes the new one or takes its left neighbour's, so an insert,
// sorting included, takes one clock cycle. A pop shifts every cell one place
// towards the head, also in one cycle, and an insert and a pop may happen in
// the same cycle. A new entry goes in front of stored entries of equal F, so
// among equal costs the newest node is taken first.
// When the queue is full an insert drops the entry with the largest F (the one
// that falls off the tail, or the new one if it is the largest); each such
// loss pulses `dropped`. `clear` empties the queue.
// The shift-register structure, one-cycle insertion and the 313-entry default
// follow the accelerator's description; the tie rule, the drop rule and the
// handshake are this design's choices.
module priority_queue
  import astar_pkg::*;
#(
  parameter int DEPTH = 313
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    ins_valid,
  input  qentry_t ins_data,
  input  logic    pop,
  output qentry_t head,
  output logic    head_valid,
  output logic    dropped,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  qentry_t q [DEPTH];
  logic    v [DEPTH];

  // base view: the queue after the pop (if any) of this cycle
  qentry_t b  [DEPTH];
  logic    bv [DEPTH];
  logic    lt [DEPTH];        // stored entry stays ahead of the new one

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      if (pop) begin
        b[i]  = (i < DEPTH - 1) ? q[i+1] : '0;
        bv[i] = (i < DEPTH - 1) ? v[i+1] : 1'b0;
      end else begin
        b[i]  = q[i];
        bv[i] = v[i];
      end
      lt[i] = bv[i] && (b[i].f < ins_data.f);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        q[i] <= '0;
        v[i] <= 1'b0;
      end
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) v[i] <= 1'b0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (!ins_valid || lt[i]) begin
          q[i] <= b[i];
          v[i] <= bv[i];
        end else if (i == 0 || lt[i-1]) begin
          q[i] <= ins_data;
          v[i] <= 1'b1;
        end else begin
          q[i] <= b[i-1];
          v[i] <= bv[i-1];
        end
      end
    end
  end

  // Entry lost this cycle: the tail was full and got pushed out, or the new
  // entry belonged behind a full queue.
  always_comb begin
    dropped = 1'b0;
    if (!clear && ins_valid && bv[DEPTH-1]) dropped = 1'b1;
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count += $bits(count)'(v[i]);
  end

  assign head       = q[0];
  assign head_valid = v[0];

  // A pop of an empty queue is a controller error.
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    !(pop && !clear && !v[0])) else $error("pop of an empty queue");

endmodule
