// Testbench of the 8-pixel edge filter: random lines, chosen so that all
// filter decisions occur, compared with the reference model of the
// standard's equations.  Every filtering kind (none, normal, strong,
// 3-tap bS=4) must occur for luma and chroma.
module tb_dbf_edge_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  word_t p_in, q_in, p_out, q_out;
  bs_t bs;
  logic chroma, filtered;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;
  int checks = 0, failures = 0;
  int seen [2][4];

  dbf_edge_filter dut (.*);

  initial begin
    int p[4], q[4], ia, ib, base, spread;
    ref_kind_e kind;
    foreach (seen[a, b]) seen[a][b] = 0;
    for (int n = 0; n < 20000; n++) begin
      ia = $urandom_range(0, 51); ib = $urandom_range(0, 51);
      base = $urandom_range(0, 255); spread = $urandom_range(0, 40);
      for (int i = 0; i < 4; i++) begin
        p[i] = clampi(0, 255, base + $urandom_range(0, spread) - spread/2);
        q[i] = clampi(0, 255, base + $urandom_range(0, 2*spread) - spread);
        if (n % 7 == 0) begin p[i] = $urandom_range(0, 255); q[i] = $urandom_range(0, 255); end
      end
      bs = 3'($urandom_range(0, 4));
      chroma = ($urandom_range(0, 3) == 0);
      alpha = 8'(alpha_t[ia]); beta = 5'(beta_t[ib]);
      tc0 = (bs >= 1 && bs <= 3) ? 5'(tc0_t[ia][bs-1]) : 5'd0;
      for (int i = 0; i < 4; i++) begin
        p_in[8*(3-i) +: 8] = 8'(p[i]);
        q_in[8*i +: 8] = 8'(q[i]);
      end
      kind = filter_line(p, q, int'(bs), chroma, ia, ib);
      seen[chroma][int'(kind)]++;
      #1;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (p_out[8*(3-i) +: 8] != 8'(p[i])) begin
          failures++;
          if (failures < 10) $display("p%0d got %0d exp %0d (bs %0d)", i, p_out[8*(3-i) +: 8], p[i], bs);
        end
        if (q_out[8*i +: 8] != 8'(q[i])) begin
          failures++;
          if (failures < 10) $display("q%0d got %0d exp %0d (bs %0d)", i, q_out[8*i +: 8], q[i], bs);
        end
      end
      checks++;
      if (filtered != (kind != RK_NONE)) failures++;
    end
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < 4; k++) begin
        if (c == 1 && k == int'(RK_STRONG)) continue;   // chroma has no strong filter
        checks++;
        if (seen[c][k] == 0) begin failures++; $display("kind %0d chroma %0d never seen", k, c); end
      end
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
