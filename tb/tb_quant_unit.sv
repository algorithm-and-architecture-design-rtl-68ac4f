// Testbench of the quantisation / inverse quantisation unit: random lines
// of coefficients at every QP, AC and DC paths, compared with the
// reference quantiser equations; also checks the one-cycle latency and
// that zero coefficients give zero results.
module tb_quant_unit;
  import intra_ref_pkg::*;

  localparam int CW = 20, LW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, dc, out_valid;
  logic [5:0] qp;
  logic [1:0] line;
  logic [4*CW-1:0] coef, dequant;
  logic [4*LW-1:0] level;

  quant_unit #(.CW(CW), .LW(LW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("[%0t] %s", $time, msg);
    end
  endtask

  initial begin
    int m [4], el [4], ed [4], q, ln;
    bit d;
    in_valid = 0; dc = 0; qp = 0; line = 0; coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      q = $urandom_range(0, 51); ln = $urandom_range(0, 3); d = ($urandom_range(0, 4) == 0);
      for (int k = 0; k < 4; k++) begin
        case ($urandom_range(0, 3))
          0:       m[k] = 0;
          1:       m[k] = $urandom_range(0, 64) - 32;
          default: m[k] = $urandom_range(0, 16383) - 8191;
        endcase
        el[k] = quant(m[k], q, ln, k, d);
        ed[k] = intra_ref_pkg::dequant(el[k], q, ln, k, d);
        coef[CW*k +: CW] = CW'(m[k]);
      end
      in_valid = 1; qp = 6'(q); line = 2'(ln); dc = d;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "out_valid missing one cycle after in_valid");
      for (int k = 0; k < 4; k++) begin
        check(int'($signed(level[LW*k +: LW])) == el[k],
              $sformatf("qp %0d dc %0d (%0d,%0d) M=%0d: level %0d expected %0d", q, d, ln, k, m[k],
                        int'($signed(level[LW*k +: LW])), el[k]));
        check(int'($signed(dequant[CW*k +: CW])) == ed[k],
              $sformatf("qp %0d dc %0d (%0d,%0d) level %0d: dequant %0d expected %0d", q, d, ln, k,
                        el[k], int'($signed(dequant[CW*k +: CW])), ed[k]));
      end
      if ($urandom_range(0, 1)) begin
        @(negedge clk);
        check(!out_valid, "out_valid without in_valid");
      end
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
