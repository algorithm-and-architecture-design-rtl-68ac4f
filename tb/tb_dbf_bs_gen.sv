// Testbench of the boundary-strength decision: random block pairs
// against the table of conditions evaluated top-down; every strength
// 0..4 must occur.
module tb_dbf_bs_gen;
  import dbf_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  localparam int MVW = 14;
  logic p_intra, q_intra, mb_edge, p_coded, q_coded;
  logic signed [MVW-1:0] p_mvx, p_mvy, q_mvx, q_mvy;
  logic [3:0] p_ref, q_ref;
  bs_t bs;
  int checks = 0, failures = 0, seen [5];

  dbf_bs_gen #(.MVW(MVW)) dut (.*);

  initial begin
    int exp, dx, dy;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 5000; n++) begin
      p_intra = ($urandom_range(0, 5) == 0); q_intra = ($urandom_range(0, 5) == 0);
      mb_edge = $urandom_range(0, 1);
      p_coded = ($urandom_range(0, 2) == 0); q_coded = ($urandom_range(0, 2) == 0);
      p_mvx = MVW'($signed($urandom_range(0, 20)) - 10); p_mvy = MVW'($signed($urandom_range(0, 20)) - 10);
      q_mvx = (n % 3 == 0) ? p_mvx + MVW'($signed($urandom_range(0, 6)) - 3) : MVW'($signed($urandom_range(0, 20)) - 10);
      q_mvy = (n % 3 == 0) ? p_mvy : MVW'($signed($urandom_range(0, 20)) - 10);
      if (n % 11 == 0) begin p_mvx = -MVW'(8000); q_mvx = MVW'(8000); end
      p_ref = 4'($urandom_range(0, 1)); q_ref = (n % 2 == 0) ? p_ref : 4'($urandom_range(0, 1));
      #1;
      dx = int'(p_mvx) - int'(q_mvx); dy = int'(p_mvy) - int'(q_mvy);
      if ((p_intra || q_intra) && mb_edge) exp = 4;
      else if (p_intra || q_intra) exp = 3;
      else if (p_coded || q_coded) exp = 2;
      else if (dx >= 4 || dx <= -4 || dy >= 4 || dy <= -4 || p_ref != q_ref) exp = 1;
      else exp = 0;
      seen[exp]++;
      checks++;
      if (int'(bs) != exp) begin
        failures++;
        if (failures < 10) $display("bs %0d expected %0d", bs, exp);
      end
    end
    for (int i = 0; i < 5; i++) begin checks++; if (seen[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
