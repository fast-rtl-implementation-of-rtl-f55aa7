// comparator_engine: picks the least-cost entry among the heads of the
// parallel priority queues in one phase of comparison.
//
// Every head is compared with every other head at the same time. Only the
// comparators for pairs (i, j) with i < j are built: c[i][j] says that head i
// wins against head j (i valid and, if j is valid, F(i) <= F(j)). The opposite
// relation, j wins against i, is simply the inverse of c[i][j], so about half of
// the comparators are replaced by inverters. Head i is selected when it wins
// against all others; ties go to the lower queue index, so exactly one head is
// selected whenever any is valid. The engine is purely combinational.
// Outputs: sel_valid (some queue holds an entry), sel_onehot / sel_idx (which
// queue), sel_entry (its head entry).
// The all-pairs structure and the inverter sharing follow the accelerator's
// description; the tie rule is this design's choice.
module comparator_engine
  import astar_pkg::*;
#(
  parameter int N = NCHILD
) (
  input  qentry_t              heads     [N],
  input  logic    [N-1:0]      valid,
  output logic                 sel_valid,
  output logic    [N-1:0]      sel_onehot,
  output logic [$clog2(N)-1:0] sel_idx,
  output qentry_t              sel_entry
);

  logic c [N][N];   // c[i][j] for i < j: head i wins against head j

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) c[i][j] = 1'b0;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        c[i][j] = valid[i] && (!valid[j] || heads[i].f <= heads[j].f);
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      sel_onehot[i] = 1'b1;
      for (int j = 0; j < N; j++) begin
        if (j > i)      sel_onehot[i] &= c[i][j];
        else if (j < i) sel_onehot[i] &= !c[j][i];
      end
    end
    sel_valid = |valid;
    if (!sel_valid) sel_onehot = '0;
    sel_idx   = '0;
    sel_entry = '0;
    for (int i = 0; i < N; i++) begin
      if (sel_onehot[i]) begin
        sel_idx   = $clog2(N)'(i);
        sel_entry = heads[i];
      end
    end
  end

  // Exactly one queue is selected whenever any head is valid.
  always_comb begin
    if (|valid) a_one_winner: assert ($onehot(sel_onehot)) else $error("not exactly one winner");
  end

endmodule
