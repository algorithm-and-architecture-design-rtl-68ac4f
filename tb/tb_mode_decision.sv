// Testbench of the cost generation and mode decision unit: random
// candidate modes of one block (Intra4x4) or sixteen / four blocks
// (Intra16x16 / chroma) with random mode costs, lines in random order,
// compared with the weighted-transform cost equation and a running
// minimum.  Checks result timing (one cycle after the last word), the
// strictly-smaller replacement rule and clear.
module tb_mode_decision;
  import intra_ref_pkg::*;

  localparam int CW = 20, SW = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid, first, blk_last, last, result_valid, best_valid;
  logic [1:0] line;
  logic [4*CW-1:0] coef;
  logic [3:0] mode, best_mode;
  logic [SW-1:0] mode_cost, result_cost, best_cost;

  mode_decision #(.CW(CW), .SW(SW)) dut (.*);

  int checks = 0, failures = 0, ties = 0, replaced = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("[%0t] %s", $time, msg);
    end
  endtask

  initial begin
    blk_t f;
    int nb, cost, mc, bcost, bmode, ord [4], prev_cost;
    bit bvalid;
    clear = 0; in_valid = 0; first = 0; blk_last = 0; last = 0; line = 0; coef = '0;
    mode = 0; mode_cost = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int grp = 0; grp < 300; grp++) begin
      clear = 1; @(negedge clk); clear = 0;
      check(!best_valid, "clear did not empty the best register");
      bvalid = 0; bcost = 0; bmode = 0; prev_cost = -1;
      nb = (grp % 3 == 0) ? 1 : ((grp % 3 == 1) ? 16 : 4);
      for (int md = 0; md < 9; md++) begin
        cost = 0;
        mc = $urandom_range(0, 3) == 0 ? 0 : $urandom_range(0, 200);
        for (int b = 0; b < nb; b++) begin
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              f[i][j] = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(0, 4000) - 2000;
          cost += block_cost(f);
          for (int i = 0; i < 4; i++) ord[i] = i;
          ord.shuffle();
          for (int w = 0; w < 4; w++) begin
            in_valid = 1; first = (b == 0 && w == 0); blk_last = (w == 3);
            last = (b == nb - 1 && w == 3); line = 2'(ord[w]); mode = 4'(md); mode_cost = SW'(mc);
            for (int k = 0; k < 4; k++) coef[CW*k +: CW] = CW'(f[ord[w]][k]);
            @(negedge clk);
            if (!last) check(!result_valid || w == 0 && b == 0, "result_valid too early");
          end
          in_valid = 0;
        end
        cost += mc;
        check(result_valid, "result_valid missing one cycle after last word");
        check(int'(result_cost) == cost, $sformatf("mode %0d: cost %0d expected %0d", md, result_cost, cost));
        if (bvalid && cost == bcost) ties++;
        if (!bvalid || cost < bcost) begin
          if (bvalid) replaced++;
          bvalid = 1; bcost = cost; bmode = md;
        end
        check(best_valid && int'(best_mode) == bmode && int'(best_cost) == bcost,
              $sformatf("best %0d/%0d expected %0d/%0d", best_mode, best_cost, bmode, bcost));
        // a mode with the same cost as the best must not replace it
        if (md == 4) begin
          int bb;
          bb = bcost;
          in_valid = 1; first = 1; blk_last = 1; last = 1; line = 0; coef = '0; mode = 4'd15;
          mode_cost = SW'(bb);
          @(negedge clk);
          in_valid = 0;
          check(int'(best_mode) == bmode, "an equal cost replaced the best mode");
          ties++;
        end
      end
    end
    check(replaced > 100 && ties > 100, $sformatf("coverage: replaced %0d ties %0d", replaced, ties));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
