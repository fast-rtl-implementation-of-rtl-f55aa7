// tb_comparator_engine: random queue heads and valid masks (with many equal
// costs) against a sequential search for the least F, ties to the lowest
// queue index; checks sel_valid, sel_onehot, sel_idx and sel_entry.
module tb_comparator_engine;
  import astar_pkg::*;

  qentry_t     heads [8];
  logic [7:0]  valid;
  logic        sel_valid;
  logic [7:0]  sel_onehot;
  logic [2:0]  sel_idx;
  qentry_t     sel_entry;

  comparator_engine #(.N(8)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int best;
      for (int i = 0; i < 8; i++) begin
        heads[i].f     = (t % 2) ? FW'($urandom % 6) : FW'($urandom);
        heads[i].pos.x = crd_t'($urandom);
        heads[i].pos.y = crd_t'($urandom);
      end
      valid = (t % 50 == 0) ? 8'h00 : 8'($urandom);
      #1;
      best = -1;
      for (int i = 0; i < 8; i++)
        if (valid[i] && (best < 0 || heads[i].f < heads[best].f)) best = i;
      check(sel_valid == (best >= 0), "sel_valid");
      if (best >= 0) begin
        check(sel_onehot == 8'(1 << best), $sformatf("onehot %b, expected queue %0d", sel_onehot, best));
        check(int'(sel_idx) == best, "sel_idx");
        check(sel_entry == heads[best], "sel_entry");
      end else begin
        check(sel_onehot == '0, "onehot with no valid head");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
