// tb_node_mem: random writes and reads of the node memory against an array
// model; checks the one-cycle read latency and that a read of an address being
// written in the same cycle returns the old record.
module tb_node_mem;
  import astar_pkg::*;

  logic        clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [15:0] wr_addr = '0, rd_addr = '0;
  node_t       wr_data = '0, rd_data;

  node_mem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  node_t model [logic [15:0]];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [15:0] a [$];
    // fill a set of addresses
    for (int i = 0; i < 512; i++) begin
      logic [15:0] ad;
      node_t d;
      ad = 16'($urandom);
      d  = node_t'({$urandom, $urandom});
      we <= 1'b1; wr_addr <= ad; wr_data <= d;
      model[ad] = d;
      a.push_back(ad);
      @(posedge clk);
    end
    we <= 1'b0;
    // random reads, some with a write to the same address
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] ad;
      node_t exp_d, d;
      bit same;
      ad = a[$urandom % a.size()];
      exp_d = model[ad];
      same = ($urandom % 4) == 0;
      re <= 1'b1; rd_addr <= ad;
      d = node_t'({$urandom, $urandom});
      we <= same; wr_addr <= ad; wr_data <= d;
      if (same) model[ad] = d;
      @(posedge clk);
      re <= 1'b0; we <= 1'b0;
      #1;
      check(rd_data == exp_d, $sformatf("read of %h", ad));
    end
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
