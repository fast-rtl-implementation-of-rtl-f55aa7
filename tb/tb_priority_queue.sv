// tb_priority_queue: random inserts, pops and simultaneous insert+pop on a
// short (8-entry) queue, compared every cycle with a sorted-list model: head,
// head_valid, count and the drop pulse. A new entry goes in front of equal
// ones; a full queue loses its largest entry. Also checks that an insert is
// visible at the head in the very next cycle and that clear empties the queue.
module tb_priority_queue;
  import astar_pkg::*;

  localparam int D = 8;

  logic    clk = 1'b0, rst_n = 1'b0, clear = 1'b0, ins_valid = 1'b0, pop = 1'b0;
  qentry_t ins_data = '0, head;
  logic    head_valid, dropped;
  logic [$clog2(D+1)-1:0] count;

  priority_queue #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_drop = 0, n_both = 0;
  qentry_t model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // drive one cycle, update the model, compare after the edge
  task automatic step(bit do_ins, qentry_t e, bit do_pop, bit do_clear);
    bit exp_drop;
    int p;
    ins_valid = do_ins;
    ins_data  = e;
    pop       = do_pop;
    clear     = do_clear;
    #1;
    exp_drop = 1'b0;
    if (do_clear) model.delete();
    else begin
      if (do_pop) void'(model.pop_front());
      if (do_ins) begin
        if (model.size() == D) exp_drop = 1'b1;
        p = 0;
        while (p < model.size() && model[p].f < e.f) p++;
        model.insert(p, e);
        if (model.size() > D) void'(model.pop_back());
      end
    end
    check(dropped == exp_drop, "drop pulse");
    if (exp_drop) n_drop++;
    if (do_ins && do_pop) n_both++;
    @(posedge clk);
    #1;
    ins_valid = 1'b0;
    pop       = 1'b0;
    clear     = 1'b0;
    check(head_valid == (model.size() > 0), "head_valid");
    check(int'(count) == model.size(), $sformatf("count %0d model %0d", count, model.size()));
    if (model.size() > 0)
      check(head == model[0], $sformatf("head f=%0d model f=%0d", head.f, model[0].f));
  endtask

  initial begin
    qentry_t e;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    check(!head_valid && count == 0, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      bit di, dp;
      e.f     = FW'($urandom % 40);            // small range: many ties
      e.pos.x = crd_t'($urandom);
      e.pos.y = crd_t'($urandom);
      di = ($urandom % 100) < 60;
      dp = (model.size() > 0) && (($urandom % 100) < 45);
      step(di, e, dp, (i % 997) == 996);
    end
    check(n_drop > 0, "overflow never happened");
    check(n_both > 0, "insert+pop never happened");
    $display("drops=%0d insert+pop=%0d", n_drop, n_both);
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
