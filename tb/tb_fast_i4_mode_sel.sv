// Testbench of the three-step Intra4x4 mode selector.  A responder returns
// a cost for each requested mode from a random table of nine costs (with
// ties), after a random delay.  The requested sequence and the final
// choice are compared with a model of the three-step rule; the number of
// cycles per block is checked for the one-cycle cost latency case
// (6 requests x 2 cycles + 1).  Both branches (vertical / horizontal) and
// both step-3 diagonals are counted.
module tb_fast_i4_mode_sel;

  localparam int SW = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, req_valid, cost_valid, done, busy;
  logic [3:0] req_mode, best_mode;
  logic [SW-1:0] cost, best_cost;

  fast_i4_mode_sel #(.SW(SW)) dut (.*);

  int checks = 0, failures = 0;
  int costs [9];
  int lat;          // responder delay in cycles (>= 1)
  int seen [$];
  int n_vert = 0, n_horz = 0, n_d3 = 0, n_d4 = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("[%0t] %s", $time, msg);
    end
  endtask

  // responder
  initial begin
    cost_valid = 0; cost = '0;
    forever begin
      @(posedge clk);
      if (req_valid) begin
        automatic int m = req_mode;
        seen.push_back(m);
        repeat (lat - 1) @(negedge clk);
        @(negedge clk);
        cost_valid = 1; cost = SW'(costs[m]);
        @(negedge clk);
        cost_valid = 0;
      end
    end
  end

  initial begin
    int exp_seq [6], bm, bc, s2, t0;
    bit vert;
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int blk = 0; blk < 3000; blk++) begin
      for (int m = 0; m < 9; m++) costs[m] = $urandom_range(0, (blk % 4 == 0) ? 3 : 5000);
      lat = (blk % 2 == 0) ? 1 : $urandom_range(1, 4);
      // model
      vert = costs[0] <= costs[1];
      exp_seq[0] = 0; exp_seq[1] = 1; exp_seq[2] = 2;
      exp_seq[3] = vert ? 5 : 6; exp_seq[4] = vert ? 7 : 8;
      s2 = (costs[exp_seq[4]] < costs[exp_seq[3]]) ? exp_seq[4] : exp_seq[3];
      exp_seq[5] = (s2 == 5 || s2 == 6) ? 4 : 3;
      bm = 0; bc = costs[0];
      for (int i = 1; i < 6; i++) if (costs[exp_seq[i]] < bc) begin bc = costs[exp_seq[i]]; bm = exp_seq[i]; end
      if (vert) n_vert++; else n_horz++;
      if (exp_seq[5] == 3) n_d3++; else n_d4++;
      seen.delete();
      check(!busy, "busy while idle");
      start = 1; t0 = $time / 10;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      if (lat == 1) check($time / 10 - t0 == 13, $sformatf("block took %0d cycles", $time / 10 - t0));
      check(seen.size() == 6, $sformatf("%0d requests", seen.size()));
      for (int i = 0; i < 6 && i < seen.size(); i++)
        check(seen[i] == exp_seq[i], $sformatf("request %0d: mode %0d expected %0d", i, seen[i], exp_seq[i]));
      check(int'(best_mode) == bm && int'(best_cost) == bc,
            $sformatf("best %0d/%0d expected %0d/%0d", best_mode, best_cost, bm, bc));
      @(negedge clk);
      check(!done, "done longer than one cycle");
    end
    check(n_vert > 100 && n_horz > 100 && n_d3 > 100 && n_d4 > 100, "branch coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
