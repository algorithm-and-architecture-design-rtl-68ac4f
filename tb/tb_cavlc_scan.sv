// Testbench of the CAVLC scanning phase: random sparse 4x4 level blocks
// (including empty blocks, blocks of +-1 and full blocks) are sent row by
// row; the block statistics and the stream of non-zero levels with their
// run_before / zeros_left are compared with a model that walks the
// zigzag scan.  Also checks that a block with N levels takes N scan
// cycles and that in_ready is low meanwhile.
module tb_cavlc_scan;

  localparam int LW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, blk_valid, out_valid, out_last;
  logic [1:0] in_line, trailing_ones;
  logic [4*LW-1:0] in_data;
  logic [4:0] total_coeff;
  logic [3:0] total_zeros, out_run_before, out_zeros_left;
  logic [LW-1:0] out_level;

  cavlc_scan #(.LW(LW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("[%0t] %s", $time, msg);
    end
  endtask

  // zigzag order as (row, column)
  const int zr [16] = '{0, 0, 1, 2, 1, 0, 0, 1, 2, 3, 3, 2, 1, 2, 3, 3};
  const int zc [16] = '{0, 1, 0, 0, 1, 2, 3, 2, 1, 0, 1, 2, 3, 3, 2, 3};

  initial begin
    int b [4][4], s [16], tc, t1, tz, top, n, last_nz, zl, k, kind, cyc;
    bit run_on;
    in_valid = 0; in_line = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3000; blk++) begin
      kind = blk % 5;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          case (kind)
            0: b[i][j] = 0;
            1: b[i][j] = ($urandom_range(0, 3) == 0) ? (($urandom_range(0, 1)) ? 1 : -1) : 0;
            2: b[i][j] = $urandom_range(0, 40) - 20;
            default: b[i][j] = ($urandom_range(0, 4) == 0) ? $urandom_range(0, 600) - 300 : 0;
          endcase
      // model
      for (int i = 0; i < 16; i++) s[i] = b[zr[i]][zc[i]];
      tc = 0; top = 0;
      for (int i = 0; i < 16; i++) if (s[i] != 0) begin tc++; top = i + 1; end
      tz = top - tc;
      t1 = 0; run_on = 1;
      for (int i = 15; i >= 0; i--)
        if (s[i] != 0 && run_on) begin
          if ((s[i] == 1 || s[i] == -1) && t1 < 3) t1++; else run_on = 0;
        end
      // send rows, row 3 last
      while (!in_ready) @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        in_valid = 1; in_line = 2'((r == 3) ? 3 : ((blk % 2) ? 2 - r : r));
        for (int j = 0; j < 4; j++) in_data[LW*j +: LW] = LW'(b[in_line][j]);
        @(negedge clk);
      end
      in_valid = 0;
      check(blk_valid, "blk_valid missing");
      check(int'(total_coeff) == tc && int'(trailing_ones) == t1 && int'(total_zeros) == tz,
            $sformatf("stats %0d/%0d/%0d expected %0d/%0d/%0d", total_coeff, trailing_ones, total_zeros, tc, t1, tz));
      // scan stream
      zl = tz; n = 0; cyc = 0;
      for (int i = 15; i >= 0; i--) if (s[i] != 0) begin
        last_nz = -1;
        for (k = i - 1; k >= 0; k--) if (s[k] != 0) begin last_nz = k; break; end
        check(out_valid, "out_valid missing");
        check(!in_ready, "in_ready high while scanning");
        check(int'($signed(out_level)) == s[i], $sformatf("level %0d expected %0d", $signed(out_level), s[i]));
        check(int'(out_zeros_left) == zl, $sformatf("zeros_left %0d expected %0d", out_zeros_left, zl));
        check(int'(out_run_before) == ((last_nz >= 0) ? i - last_nz - 1 : zl),
              $sformatf("run_before %0d at scan %0d", out_run_before, i));
        check(out_last == (last_nz < 0), "out_last");
        if (last_nz >= 0) zl -= i - last_nz - 1;
        n++;
        @(negedge clk);
        cyc++;
      end
      check(cyc == tc && !out_valid, $sformatf("scan took %0d cycles for %0d levels", cyc, tc));
    end
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
