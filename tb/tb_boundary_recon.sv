// Self-checking testbench of boundary_recon.
//
// Random blocks (residual x64 over the full range that clips at both ends,
// random prediction) are sent one column per cycle, back to back and with
// gaps.  Every output pixel is compared with clip(pred + ((res+32)>>6)),
// the output latency is one cycle, and after column 3 the right and bottom
// boundaries must equal column 3 and row 3 of the block.
module tb_boundary_recon;
  localparam int unsigned RW = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid, bnd_valid;
  logic [1:0] in_line, out_line;
  logic [4*RW-1:0] in_res;
  logic [31:0] in_pred, out_pix, bnd_right, bnd_bottom;

  int checks = 0, failures = 0;
  int exp_pix [4][4];

  boundary_recon #(.RW(RW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL %s", $time, msg);
    end
  endtask

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  initial begin
    in_valid = 0; in_line = '0; in_res = '0; in_pred = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < 2000; b++) begin
      for (int c = 0; c < 4; c++) begin
        in_valid = 1; in_line = 2'(c);
        for (int r = 0; r < 4; r++) begin
          int res, p;
          res = (b % 3 == 0) ? $urandom_range(0, 2 * 64 * 300) - 64 * 300 : $urandom_range(0, 2 * 64 * 40) - 64 * 40;
          p = $urandom_range(0, 255);
          in_res[RW*r +: RW] = RW'(res);
          in_pred[8*r +: 8] = 8'(p);
          exp_pix[r][c] = clip(p + ((res + 32) >>> 6));
        end
        @(negedge clk);
        check(out_valid && int'(out_line) == c, $sformatf("block %0d column %0d: valid %0d line %0d", b, c, out_valid, out_line));
        for (int r = 0; r < 4; r++)
          check(int'(out_pix[8*r +: 8]) == exp_pix[r][c],
                $sformatf("block %0d pixel (%0d,%0d): %0d expected %0d", b, r, c, out_pix[8*r +: 8], exp_pix[r][c]));
        check(bnd_valid == (c == 3), $sformatf("block %0d column %0d: bnd_valid %0d", b, c, bnd_valid));
      end
      for (int k = 0; k < 4; k++) begin
        check(int'(bnd_right[8*k +: 8]) == exp_pix[k][3], $sformatf("block %0d right boundary %0d", b, k));
        check(int'(bnd_bottom[8*k +: 8]) == exp_pix[3][k], $sformatf("block %0d bottom boundary %0d", b, k));
      end
      in_valid = 0;
      if (b % 4 == 1) begin
        @(negedge clk);
        check(!out_valid && !bnd_valid, "output during a gap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
