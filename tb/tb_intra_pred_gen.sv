// Testbench of the intra predictor generation unit: random neighbours,
// every supported mode of every class, every line in both orientations,
// every availability combination, against the standard's equations.
// The plane modes must be reported as unsupported.
module tb_intra_pred_gen;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  pred_cls_e  cls;
  logic [3:0] mode;
  logic [1:0] line, blk_x, blk_y;
  logic col_order, top_avail, left_avail, mode_ok;
  logic [7:0] nb_top [8], nb_left [4], nb_m, top [16], left [16], pred [4];
  int checks = 0, failures = 0;

  intra_pred_gen dut (.*);

  int t8 [8], l4 [4], t16 [16], l16 [16], m;

  function automatic int big_pred(int c, int md, int x, int y, bit ta, bit la);
    // x, y: pixel position inside the 16x16 (c = 1) or 8x8 (c = 2) block
    int s, n, bx, by, st, sl;
    if (c == 1) begin
      case (md)
        0: return t16[x];
        1: return l16[y];
        2: begin
          s = 0;
          for (int i = 0; i < 16; i++) s += t16[i] + l16[i];
          if (ta && la) return (s + 16) >> 5;
          s = 0;
          if (ta) begin for (int i = 0; i < 16; i++) s += t16[i]; return (s + 8) >> 4; end
          if (la) begin for (int i = 0; i < 16; i++) s += l16[i]; return (s + 8) >> 4; end
          return 128;
        end
        default: return -1;
      endcase
    end
    case (md)
      1: return l16[y];
      2: return t16[x];
      0: begin
        bx = x / 4; by = y / 4; st = 0; sl = 0;
        for (int i = 0; i < 4; i++) begin st += t16[4*bx + i]; sl += l16[4*by + i]; end
        if (bx == by) begin
          if (ta && la) return (st + sl + 4) >> 3;
          if (ta) return (st + 2) >> 2;
          if (la) return (sl + 2) >> 2;
          return 128;
        end
        if (bx == 1) begin
          if (ta) return (st + 2) >> 2;
          if (la) return (sl + 2) >> 2;
          return 128;
        end
        if (la) return (sl + 2) >> 2;
        if (ta) return (st + 2) >> 2;
        return 128;
      end
      default: return -1;
    endcase
  endfunction

  initial begin
    int exp, x, y, nb;
    for (int trial = 0; trial < 60; trial++) begin
      for (int i = 0; i < 8; i++) begin t8[i] = $urandom_range(0, 255); nb_top[i] = 8'(t8[i]); end
      for (int i = 0; i < 4; i++) begin l4[i] = $urandom_range(0, 255); nb_left[i] = 8'(l4[i]); end
      for (int i = 0; i < 16; i++) begin
        t16[i] = $urandom_range(0, 255); top[i] = 8'(t16[i]);
        l16[i] = $urandom_range(0, 255); left[i] = 8'(l16[i]);
      end
      m = $urandom_range(0, 255); nb_m = 8'(m);
      top_avail = trial[0]; left_avail = trial[1];
      for (int c = 0; c < 3; c++)
        for (int md = 0; md < ((c == 0) ? 9 : 4); md++)
          for (int b = 0; b < ((c == 0) ? 1 : (c == 1 ? 16 : 4)); b++)
            for (int ln = 0; ln < 4; ln++)
              for (int co = 0; co < 2; co++) begin
                nb = (c == 2) ? 2 : 4;
                cls = pred_cls_e'(c); mode = 4'(md); line = 2'(ln); col_order = co[0];
                blk_x = 2'(b % nb); blk_y = 2'(b / nb);
                #1;
                if (c != 0 && md == 3) begin
                  checks++;
                  if (mode_ok) failures++;
                  continue;
                end
                checks++;
                if (!mode_ok) failures++;
                for (int k = 0; k < 4; k++) begin
                  x = co ? ln : k; y = co ? k : ln;
                  if (c == 0) exp = i4_pred(md, x, y, t8, l4, m, top_avail, left_avail);
                  else        exp = big_pred(c, md, 4*(b % nb) + x, 4*(b / nb) + y, top_avail, left_avail);
                  checks++;
                  if (int'(pred[k]) != exp) begin
                    failures++;
                    if (failures < 10) $display("cls %0d mode %0d blk %0d (%0d,%0d): %0d expected %0d",
                                                c, md, b, x, y, pred[k], exp);
                  end
                end
              end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
