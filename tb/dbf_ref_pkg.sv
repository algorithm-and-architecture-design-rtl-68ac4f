// Reference model of the H.264/AVC deblocking filter used by the
// testbenches: threshold tables and the filtering of one line of eight
// samples, written directly from the standard's equations with integer
// arithmetic.
package dbf_ref_pkg;

  typedef int line_t [4];

  // kind of filtering a line received
  typedef enum int {RK_NONE = 0, RK_NORMAL = 1, RK_STRONG = 2, RK_BS4_3TAP = 3} ref_kind_e;

  const int alpha_t [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                             32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  const int beta_t  [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                             9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  const int tc0_t [52][3] = '{'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
                              '{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},
                              '{0,0,0},'{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},
                              '{1,1,1},'{1,1,1},'{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},'{1,2,3},
                              '{1,2,3},'{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},'{3,4,6},'{3,4,6},
                              '{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},'{6,8,13},'{7,10,14},'{8,11,16},
                              '{9,12,18},'{10,13,20},'{11,15,23},'{13,17,25}};

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int clampi(int lo, int hi, int v); return v < lo ? lo : (v > hi ? hi : v); endfunction

  // p[i] = p_i (p[0] next to the edge), q[i] = q_i.  Filters in place and
  // returns the kind of filtering applied.
  function automatic ref_kind_e filter_line(ref int p[4], ref int q[4], input int bs,
                                            input bit chroma, input int ia, input int ib);
    int a, b, tc0v, tc, d, ap, aq, np[3], nq[3];
    bit sflag;
    ref_kind_e kind;
    a = alpha_t[ia]; b = beta_t[ib];
    if (bs == 0 || !(iabs(p[0]-q[0]) < a && iabs(p[1]-p[0]) < b && iabs(q[1]-q[0]) < b))
      return RK_NONE;
    for (int i = 0; i < 3; i++) begin np[i] = p[i]; nq[i] = q[i]; end
    ap = iabs(p[2]-p[0]); aq = iabs(q[2]-q[0]);
    if (bs == 4) begin
      sflag = iabs(p[0]-q[0]) < ((a >> 2) + 2);
      kind = RK_BS4_3TAP;
      if (!chroma && ap < b && sflag) begin
        kind = RK_STRONG;
        np[0] = (p[2] + 2*p[1] + 2*p[0] + 2*q[0] + q[1] + 4) >> 3;
        np[1] = (p[2] + p[1] + p[0] + q[0] + 2) >> 2;
        np[2] = (2*p[3] + 3*p[2] + p[1] + p[0] + q[0] + 4) >> 3;
      end else
        np[0] = (2*p[1] + p[0] + q[1] + 2) >> 2;
      if (!chroma && aq < b && sflag) begin
        kind = RK_STRONG;
        nq[0] = (p[1] + 2*p[0] + 2*q[0] + 2*q[1] + q[2] + 4) >> 3;
        nq[1] = (p[0] + q[0] + q[1] + q[2] + 2) >> 2;
        nq[2] = (2*q[3] + 3*q[2] + q[1] + q[0] + p[0] + 4) >> 3;
      end else
        nq[0] = (2*q[1] + q[0] + p[1] + 2) >> 2;
    end else begin
      kind = RK_NORMAL;
      tc0v = tc0_t[ia][bs-1];
      tc = chroma ? tc0v + 1 : tc0v + (ap < b) + (aq < b);
      d = clampi(-tc, tc, (((q[0] - p[0]) * 4) + (p[1] - q[1]) + 4) >>> 3);
      np[0] = clampi(0, 255, p[0] + d);
      nq[0] = clampi(0, 255, q[0] - d);
      if (!chroma && ap < b) np[1] = p[1] + clampi(-tc0v, tc0v, (p[2] + ((p[0] + q[0] + 1) >> 1) - 2*p[1]) >>> 1);
      if (!chroma && aq < b) nq[1] = q[1] + clampi(-tc0v, tc0v, (q[2] + ((p[0] + q[0] + 1) >> 1) - 2*q[1]) >>> 1);
    end
    for (int i = 0; i < 3; i++) begin p[i] = np[i]; q[i] = nq[i]; end
    return kind;
  endfunction

endpackage
