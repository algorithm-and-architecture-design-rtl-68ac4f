// Reference models for the intra-coding testbenches, written from the
// standard's equations: 4x4 / 16x16 / chroma prediction, forward and
// inverse 4x4 transforms, the quantiser and the mode-decision cost.
package intra_ref_pkg;

  typedef int blk_t [4][4];

  // Neighbour access in the standard's notation: pt(x) = p[x,-1] for
  // x = -1..7 (x = -1 is the corner), pl(y) = p[-1,y] for y = 0..3.
  function automatic int i4_pred(int mode, int x, int y, int top [8], int left [4], int m,
                                 bit ta, bit la);
    int pt [-1:7];
    int pl [-1:3];
    int z, s;
    pt[-1] = m; pl[-1] = m;
    for (int i = 0; i < 8; i++) pt[i] = top[i];
    for (int i = 0; i < 4; i++) pl[i] = left[i];
    case (mode)
      0: return pt[x];
      1: return pl[y];
      2: begin
        s = 0;
        if (ta && la) begin for (int i = 0; i < 4; i++) s += pt[i] + pl[i]; return (s + 4) >> 3; end
        if (ta) begin for (int i = 0; i < 4; i++) s += pt[i]; return (s + 2) >> 2; end
        if (la) begin for (int i = 0; i < 4; i++) s += pl[i]; return (s + 2) >> 2; end
        return 128;
      end
      3: if (x == 3 && y == 3) return (pt[6] + 3*pt[7] + 2) >> 2;
         else return (pt[x+y] + 2*pt[x+y+1] + pt[x+y+2] + 2) >> 2;
      4: if (x > y) return (pt[x-y-2] + 2*pt[x-y-1] + pt[x-y] + 2) >> 2;
         else if (x < y) return (pl[y-x-2] + 2*pl[y-x-1] + pl[y-x] + 2) >> 2;
         else return (pt[0] + 2*m + pl[0] + 2) >> 2;
      5: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return (pt[x-(y>>1)-1] + pt[x-(y>>1)] + 1) >> 1;
        if (z > 0) return (pt[x-(y>>1)-2] + 2*pt[x-(y>>1)-1] + pt[x-(y>>1)] + 2) >> 2;
        if (z == -1) return (pl[0] + 2*m + pt[0] + 2) >> 2;
        return (pl[y-1] + 2*pl[y-2] + pl[y-3] + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return (pl[y-(x>>1)-1] + pl[y-(x>>1)] + 1) >> 1;
        if (z > 0) return (pl[y-(x>>1)-2] + 2*pl[y-(x>>1)-1] + pl[y-(x>>1)] + 2) >> 2;
        if (z == -1) return (pl[0] + 2*m + pt[0] + 2) >> 2;
        return (pt[x-1] + 2*pt[x-2] + pt[x-3] + 2) >> 2;
      end
      7: if (y % 2 == 0) return (pt[x+(y>>1)] + pt[x+(y>>1)+1] + 1) >> 1;
         else return (pt[x+(y>>1)] + 2*pt[x+(y>>1)+1] + pt[x+(y>>1)+2] + 2) >> 2;
      8: begin
        z = x + 2*y;
        if (z < 5 && z % 2 == 0) return (pl[y+(x>>1)] + pl[y+(x>>1)+1] + 1) >> 1;
        if (z < 5) return (pl[y+(x>>1)] + 2*pl[y+(x>>1)+1] + pl[y+(x>>1)+2] + 2) >> 2;
        if (z == 5) return (pl[2] + 3*pl[3] + 2) >> 2;
        return pl[3];
      end
      default: return -1;
    endcase
  endfunction

  // Forward core transform of the standard: C X C^T.
  function automatic blk_t fwd_dct(blk_t x, bit had);
    int c [4][4];
    blk_t t, r;
    if (had) c = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
    else     c = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += c[i][k] * x[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[i][j] = 0;
        for (int k = 0; k < 4; k++) r[i][j] += t[i][k] * c[j][k];
      end
    return r;
  endfunction

  // Inverse transform as the standard specifies it: each row first, then
  // each column, with arithmetic halving of the odd inputs.  (Hadamard:
  // plain matrix product.)
  function automatic blk_t inv_dct(blk_t d, bit had);
    blk_t f, h;
    int e0, e1, e2, e3;
    if (had) return fwd_dct(d, 1'b1);
    for (int i = 0; i < 4; i++) begin
      e0 = d[i][0] + d[i][2]; e1 = d[i][0] - d[i][2];
      e2 = (d[i][1] >>> 1) - d[i][3]; e3 = d[i][1] + (d[i][3] >>> 1);
      f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      e0 = f[0][j] + f[2][j]; e1 = f[0][j] - f[2][j];
      e2 = (f[1][j] >>> 1) - f[3][j]; e3 = f[1][j] + (f[3][j] >>> 1);
      h[0][j] = e0 + e3; h[1][j] = e1 + e2; h[2][j] = e1 - e2; h[3][j] = e0 - e3;
    end
    return h;
  endfunction

  const int quant_coef [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                                  '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  const int dequant_coef [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                                    '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  function automatic int pcls(int i, int j);
    if (i % 2 == 0 && j % 2 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    return 2;
  endfunction

  function automatic int quant(int m, int qp, int i, int j, bit dc);
    longint qb, qc, mag;
    int cls;
    qb = 15 + qp / 6 + (dc ? 1 : 0);
    qc = ((longint'(1) << (15 + qp / 6)) / 3) * (dc ? 2 : 1);
    cls = dc ? 0 : pcls(i, j);
    mag = ((m < 0 ? -m : m) * longint'(quant_coef[qp % 6][cls]) + qc) >> qb;
    return m < 0 ? -int'(mag) : int'(mag);
  endfunction

  function automatic int dequant(int lv, int qp, int i, int j, bit dc);
    return (lv * dequant_coef[qp % 6][dc ? 0 : pcls(i, j)]) <<< (qp / 6);
  endfunction

  function automatic int block_cost(blk_t f);
    int s, w;
    s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        w = (pcls(i, j) == 0) ? 32 : ((pcls(i, j) == 1) ? 20 : 25);
        s += w * (f[i][j] < 0 ? -f[i][j] : f[i][j]);
      end
    return s >> 5;
  endfunction

endpackage
