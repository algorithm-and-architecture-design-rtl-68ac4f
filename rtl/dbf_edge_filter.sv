// One-dimensional, 8-pixel parallel-in parallel-out deblocking filter.
//
// Filters one line of eight pixels across a 4x4 block edge in one cycle:
// p3..p0 on one side, q0..q3 on the other.  The same unit serves
// horizontal filtering (a row across a vertical edge) and vertical
// filtering (a column across a horizontal edge); only the data fed in
// differs.  The filter is reconfigured by the boundary strength:
//   bs = 0     line passes unchanged;
//   bs = 1..3  normal filter, p0/q0 moved by a clipped delta and, for
//              luma, p1/q1 corrected where the side is smooth;
//   bs = 4     strong filter (4/5-tap over p2..q2 for luma where the edge
//              is flat, 3-tap on p0/q0 otherwise and always for chroma).
// Filtering takes place only if |p0-q0| < alpha, |p1-p0| < beta and
// |q1-q0| < beta.  The arithmetic is that of the H.264/AVC standard,
// which the design must match bit for bit.
//
// Interface: p_in = {p0,p1,p2,p3} (p3 in bits 7:0), q_in = {q3,q2,q1,q0}
// (q0 in bits 7:0); outputs use the same packing.  Combinational.  p3 and
// q3 are never modified, so those output bits are wired from the inputs.
// The unit itself (one reconfigurable 8-pixel filter shared by all edges)
// follows the document; the bit packing is this design's choice.
module dbf_edge_filter
  import dbf_pkg::*;
(
  input  word_t      p_in,
  input  word_t      q_in,
  input  bs_t        bs,
  input  logic       chroma,   // 1: chroma rules (p1/q1 and p2/q2 untouched)
  input  logic [7:0] alpha,
  input  logic [4:0] beta,
  input  logic [4:0] tc0,
  output word_t      p_out,
  output word_t      q_out,
  output logic       filtered  // line was modified by the filter
);

  typedef logic signed [11:0] s12_t;

  s12_t p0, p1, p2, p3, q0, q1, q2, q3;
  s12_t ap, aq, tc, delta, dp1, dq1, d0;
  logic filt_en, ap_ok, aq_ok, strong_ok;

  function automatic s12_t absd(s12_t a, s12_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic s12_t clip3(s12_t lo, s12_t hi, s12_t v);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic pix_t clip1(s12_t v);
    return (v < 0) ? 8'd0 : ((v > 255) ? 8'd255 : v[7:0]);
  endfunction

  always_comb begin
    p3 = s12_t'({4'd0, p_in[7:0]});
    p2 = s12_t'({4'd0, p_in[15:8]});
    p1 = s12_t'({4'd0, p_in[23:16]});
    p0 = s12_t'({4'd0, p_in[31:24]});
    q0 = s12_t'({4'd0, q_in[7:0]});
    q1 = s12_t'({4'd0, q_in[15:8]});
    q2 = s12_t'({4'd0, q_in[23:16]});
    q3 = s12_t'({4'd0, q_in[31:24]});

    filt_en   = (bs != 3'd0) && (absd(p0, q0) < s12_t'({4'd0, alpha})) &&
                (absd(p1, p0) < s12_t'({7'd0, beta})) && (absd(q1, q0) < s12_t'({7'd0, beta}));
    ap        = absd(p2, p0);
    aq        = absd(q2, q0);
    ap_ok     = ap < s12_t'({7'd0, beta});
    aq_ok     = aq < s12_t'({7'd0, beta});
    strong_ok = absd(p0, q0) < s12_t'({6'd0, alpha[7:2]}) + 12'sd2;

    tc    = chroma ? s12_t'({7'd0, tc0}) + 12'sd1
                   : s12_t'({7'd0, tc0}) + s12_t'({11'd0, ap_ok}) + s12_t'({11'd0, aq_ok});
    d0    = (((q0 - p0) <<< 2) + (p1 - q1) + 12'sd4) >>> 3;
    delta = clip3(-tc, tc, d0);
    dp1   = clip3(-s12_t'({7'd0, tc0}), s12_t'({7'd0, tc0}), (p2 + ((p0 + q0 + 12'sd1) >>> 1) - (p1 <<< 1)) >>> 1);
    dq1   = clip3(-s12_t'({7'd0, tc0}), s12_t'({7'd0, tc0}), (q2 + ((p0 + q0 + 12'sd1) >>> 1) - (q1 <<< 1)) >>> 1);

    p_out    = p_in;
    q_out    = q_in;
    filtered = filt_en;
    if (filt_en) begin
      if (bs == 3'd4) begin
        if (!chroma && ap_ok && strong_ok) begin
          p_out[31:24] = clip1((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 12'sd4) >>> 3);
          p_out[23:16] = clip1((p2 + p1 + p0 + q0 + 12'sd2) >>> 2);
          p_out[15:8]  = clip1((2*p3 + 3*p2 + p1 + p0 + q0 + 12'sd4) >>> 3);
        end else begin
          p_out[31:24] = clip1((2*p1 + p0 + q1 + 12'sd2) >>> 2);
        end
        if (!chroma && aq_ok && strong_ok) begin
          q_out[7:0]   = clip1((p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 12'sd4) >>> 3);
          q_out[15:8]  = clip1((p0 + q0 + q1 + q2 + 12'sd2) >>> 2);
          q_out[23:16] = clip1((2*q3 + 3*q2 + q1 + q0 + p0 + 12'sd4) >>> 3);
        end else begin
          q_out[7:0]   = clip1((2*q1 + q0 + p1 + 12'sd2) >>> 2);
        end
      end else begin
        p_out[31:24] = clip1(p0 + delta);
        q_out[7:0]   = clip1(q0 - delta);
        if (!chroma && ap_ok) p_out[23:16] = clip1(p1 + dp1);
        if (!chroma && aq_ok) q_out[15:8]  = clip1(q1 + dq1);
      end
    end
  end

endmodule
