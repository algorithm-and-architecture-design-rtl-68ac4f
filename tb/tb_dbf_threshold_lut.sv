// Testbench of the threshold look-up: every indexA/indexB and every
// boundary strength against the standard's tables.
module tb_dbf_threshold_lut;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] index_a, index_b;
  bs_t bs;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;
  int checks = 0, failures = 0;

  dbf_threshold_lut dut (.*);

  initial begin
    for (int i = 0; i < 64; i++)
      for (int b = 0; b < 5; b++) begin
        index_a = 6'(i); index_b = 6'(63 - i); bs = 3'(b);
        #1;
        checks += 3;
        if (alpha != 8'(alpha_t[i > 51 ? 51 : i])) begin failures++; $display("alpha[%0d]=%0d", i, alpha); end
        if (beta != 5'(beta_t[(63-i) > 51 ? 51 : 63-i])) begin failures++; $display("beta[%0d]=%0d", 63-i, beta); end
        if (tc0 != ((b == 0 || b == 4) ? 5'd0 : 5'(tc0_t[i > 51 ? 51 : i][b-1]))) begin
          failures++; $display("tc0[%0d][%0d]=%0d", i, b, tc0);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
