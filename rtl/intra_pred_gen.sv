// Reconfigurable intra predictor generation unit, four pixels per cycle.
//
// Produces one line (row, or column when col_order is set) of four
// predicted pixels of a 4x4 block.  Supported: the nine Intra4x4 modes,
// Intra16x16 vertical/horizontal/DC and Chroma8x8 DC/horizontal/vertical.
// The plane modes are deliberately left out (mode_ok = 0 for them).
//
// Every Intra4x4 predictor is one of four kinds of arithmetic on the
// reconstructed boundary pixels: bypass (copy), (A+B+1)>>1, (A+2B+C+2)>>2
// or DC.  The boundary of a 4x4 block is laid out as one 13-pixel edge
// e = L K J I M A B C D E F G H, the pair sums e[i]+e[i+1] are formed once
// and shared: each 2-tap output uses one pair sum and each 3-tap output
// adds two neighbouring pair sums, so (B+C) serves both B+2C+D and A+2B+C.
// Each mode then just selects outputs by index.
//
// For 16x16 and chroma blocks (blk_x, blk_y) picks the 4x4 block inside
// the macroblock; top[]/left[] hold the 16 (or 8) neighbouring pixels.
// DC rules follow the standard, including the per-4x4-block chroma DC
// rule and the fallbacks for unavailable neighbours (128 if none).  For
// 4x4 blocks the caller supplies E..H already substituted by D when the
// upper-right block is unavailable, as the standard prescribes.
// Purely combinational.
module intra_pred_gen
  import intra_pkg::*;
(
  input  pred_cls_e  cls,
  input  logic [3:0] mode,
  input  logic [1:0] line,        // row (or column) within the 4x4 block
  input  logic       col_order,   // 1: output a column instead of a row
  input  logic [1:0] blk_x,       // 4x4 block inside the 16x16 / 8x8 block
  input  logic [1:0] blk_y,
  input  logic       top_avail,
  input  logic       left_avail,
  // 4x4 neighbours: A..H above, I..L left, M upper-left corner
  input  logic [7:0] nb_top  [8],
  input  logic [7:0] nb_left [4],
  input  logic [7:0] nb_m,
  // 16x16 / 8x8 neighbours (chroma uses entries 0..7)
  input  logic [7:0] top  [16],
  input  logic [7:0] left [16],
  output logic [7:0] pred [4],    // pred[k]: position k along the line
  output logic       mode_ok
);

  logic [7:0]  e  [13];
  logic [8:0]  s2 [12];      // shared pair sums
  logic [7:0]  f2 [12];      // (e[i] + e[i+1] + 1) >> 1
  logic [7:0]  f3 [11];      // (e[i] + 2e[i+1] + e[i+2] + 2) >> 2
  logic [7:0]  dc4, dc_big;
  logic [7:0]  p4 [4][4];    // full 4x4 block, [y][x]
  logic [10:0] st4, sl4;
  logic [12:0] st16, sl16;

  always_comb begin
    // boundary edge
    e[0] = nb_left[3]; e[1] = nb_left[2]; e[2] = nb_left[1]; e[3] = nb_left[0];
    e[4] = nb_m;
    for (int i = 0; i < 8; i++) e[5+i] = nb_top[i];
    for (int i = 0; i < 12; i++) begin
      s2[i] = {1'b0, e[i]} + {1'b0, e[i+1]};
      f2[i] = 8'((10'(s2[i]) + 10'd1) >> 1);
    end
    for (int i = 0; i < 11; i++) f3[i] = 8'((11'(s2[i]) + 11'(s2[i+1]) + 11'd2) >> 2);

    // 4x4 DC
    st4 = '0; sl4 = '0;
    for (int i = 0; i < 4; i++) begin
      st4 = st4 + 11'(nb_top[i]);
      sl4 = sl4 + 11'(nb_left[i]);
    end
    if (top_avail && left_avail) dc4 = 8'((st4 + sl4 + 11'd4) >> 3);
    else if (top_avail)          dc4 = 8'((st4 + 11'd2) >> 2);
    else if (left_avail)         dc4 = 8'((sl4 + 11'd2) >> 2);
    else                         dc4 = 8'd128;

    // 16x16 DC (32 pixels) and chroma DC (per 4x4 block, 4+4 pixels)
    st16 = '0; sl16 = '0;
    dc_big = 8'd128;
    if (cls == CLS_I16) begin
      for (int i = 0; i < 16; i++) begin
        st16 = st16 + 13'(top[i]);
        sl16 = sl16 + 13'(left[i]);
      end
      if (top_avail && left_avail) dc_big = 8'((st16 + sl16 + 13'd16) >> 5);
      else if (top_avail)          dc_big = 8'((st16 + 13'd8) >> 4);
      else if (left_avail)         dc_big = 8'((sl16 + 13'd8) >> 4);
    end else begin
      for (int i = 0; i < 4; i++) begin
        st16 = st16 + 13'(top[4*blk_x[0] + i]);
        sl16 = sl16 + 13'(left[4*blk_y[0] + i]);
      end
      if (blk_x[0] == blk_y[0]) begin            // blocks (0,0) and (1,1)
        if (top_avail && left_avail) dc_big = 8'((st16 + sl16 + 13'd4) >> 3);
        else if (top_avail)          dc_big = 8'((st16 + 13'd2) >> 2);
        else if (left_avail)         dc_big = 8'((sl16 + 13'd2) >> 2);
      end else if (blk_x[0]) begin               // block (1,0): top first
        if (top_avail)       dc_big = 8'((st16 + 13'd2) >> 2);
        else if (left_avail) dc_big = 8'((sl16 + 13'd2) >> 2);
      end else begin                             // block (0,1): left first
        if (left_avail)      dc_big = 8'((sl16 + 13'd2) >> 2);
        else if (top_avail)  dc_big = 8'((st16 + 13'd2) >> 2);
      end
    end

    mode_ok = 1'b1;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        p4[y][x] = dc_big;
        case (cls)
          CLS_I4: begin
            case (mode)
              I4_V:   p4[y][x] = e[5+x];
              I4_H:   p4[y][x] = e[3-y];
              I4_DC:  p4[y][x] = dc4;
              I4_DDL: p4[y][x] = (x == 3 && y == 3) ? 8'((10'(e[11]) + 10'(3*e[12]) + 10'd2) >> 2)
                                                    : f3[5+x+y];
              I4_DDR: p4[y][x] = f3[3+x-y];
              I4_VR: begin
                if (2*x - y >= 0 && (2*x - y) % 2 == 0) p4[y][x] = f2[4+x-(y>>1)];
                else if (2*x - y > 0)                    p4[y][x] = f3[3+x-(y>>1)];
                else if (2*x - y == -1)                  p4[y][x] = f3[3];
                else                                     p4[y][x] = f3[4-y];
              end
              I4_HD: begin
                if (2*y - x >= 0 && (2*y - x) % 2 == 0) p4[y][x] = f2[3-y+(x>>1)];
                else if (2*y - x > 0)                    p4[y][x] = f3[3-y+(x>>1)];
                else if (2*y - x == -1)                  p4[y][x] = f3[3];
                else                                     p4[y][x] = f3[2+x];
              end
              I4_VL:  p4[y][x] = (y % 2 == 0) ? f2[5+x+(y>>1)] : f3[5+x+(y>>1)];
              I4_HU: begin
                if (x + 2*y < 5 && (x + 2*y) % 2 == 0) p4[y][x] = f2[2-(y+(x>>1))];
                else if (x + 2*y < 5)                   p4[y][x] = f3[1-(y+(x>>1))];
                else if (x + 2*y == 5)                  p4[y][x] = 8'((10'(e[1]) + 10'(3*e[0]) + 10'd2) >> 2);
                else                                    p4[y][x] = e[0];
              end
              default: begin p4[y][x] = 8'd128; mode_ok = 1'b0; end
            endcase
          end
          CLS_I16: begin
            case (mode)
              I16_V:  p4[y][x] = top[4*blk_x + x];
              I16_H:  p4[y][x] = left[4*blk_y + y];
              I16_DC: p4[y][x] = dc_big;
              default: begin p4[y][x] = 8'd128; mode_ok = 1'b0; end
            endcase
          end
          default: begin
            case (mode)
              C8_DC: p4[y][x] = dc_big;
              C8_H:  p4[y][x] = left[4*blk_y[0] + y];
              C8_V:  p4[y][x] = top[4*blk_x[0] + x];
              default: begin p4[y][x] = 8'd128; mode_ok = 1'b0; end
            endcase
          end
        endcase
      end

    for (int k = 0; k < 4; k++) pred[k] = col_order ? p4[k][line] : p4[line][k];
  end

endmodule
