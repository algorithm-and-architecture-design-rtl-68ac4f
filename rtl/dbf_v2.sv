// In-place deblocking filter for one macroblock (luma 16x16, Cb 8x8, Cr 8x8).
//
// Idea: instead of filtering all vertical edges of a macroblock and then
// all horizontal edges, each 4x4 block is finished as soon as its data is
// there.  Per row of 4x4 blocks the edges are taken in the order
//   H(left|1) H(1|2) V(top|1) H(2|3) V(top|2) H(3|4) V(top|3) V(top|4)
// (H = horizontal filtering across a vertical edge, V = vertical
// filtering across a horizontal edge; chroma has two blocks per row).
// A block therefore only has to wait in local memory for the edge below
// it, and the local memory shrinks to one row of 4x4 blocks: a 16x32-bit
// 1R/1W SRAM holding W blocks as columns (W = 4 luma, 2 chroma).  The
// result is bit-exact with the standard edge order.
//
// Datapath: one 8-pixel edge filter (dbf_edge_filter), a 4x4 shift
// register that carries the block on the q side of one vertical edge to
// the p side of the next, a 4x4 transpose register that turns a finished
// row-major block into columns for its top edge and turns the filtered top
// block back into rows for output, and the SRAM.  The transpose register
// alternates its shift direction from block to block so that it reads out
// one block while it takes in the next.
//
// External memory interface (32 bits = 4 pixels, row-major, one word per
// cycle).  Blocks are named by position in a (W+1)x(W+1) grid: by/bx = 0
// is the row of blocks above / the column of blocks to the left of the
// macroblock (from the neighbouring macroblocks), 1..W are the macroblock's
// own blocks.  in_req/in_comp/in_by/in_bx/in_row ask for a word and in_data
// must return it in the same cycle.  out_valid/out_comp/out_by/out_bx/out_row/
// out_data write one finished word back.  Every word read is written back
// exactly once.
//
// Timing: start (one cycle, while idle) begins a macroblock; bs, qp and
// offset inputs must stay stable until done.  Luma takes 184 cycles and
// each chroma component 64, 312 in all; done pulses in the last cycle.
// Where the document leaves the schedule open the choices are this
// design's own: the memory handshake, the grid naming, the order of the
// SRAM writes during the first 16 cycles and the final read-out.
module dbf_v2
  import dbf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  // Boundary strengths of the luma edges; chroma uses the co-located ones.
  input  bs_t         bs_v [4][4],   // [edge column x][block row y]
  input  bs_t         bs_h [4][4],   // [edge row y][block column x]
  // Quantiser parameters of this, the left and the upper macroblock.
  input  logic [5:0]  qp_y  [3],     // [0]=current [1]=left [2]=top
  input  logic [5:0]  qp_cb [3],
  input  logic [5:0]  qp_cr [3],
  input  logic signed [4:0] offset_a,
  input  logic signed [4:0] offset_b,
  // Input port
  output logic        in_req,
  output comp_e       in_comp,
  output logic [2:0]  in_by,
  output logic [2:0]  in_bx,
  output logic [1:0]  in_row,
  input  word_t       in_data,
  // Output port
  output logic        out_valid,
  output comp_e       out_comp,
  output logic [2:0]  out_by,
  output logic [2:0]  out_bx,
  output logic [1:0]  out_row,
  output word_t       out_data
);

  typedef enum logic [2:0] {
    PH_IDLE, PH_INIT, PH_LOADL, PH_H, PH_V, PH_SHIFT, PH_FIN
  } phase_e;

  typedef struct packed {
    phase_e     ph;
    comp_e      comp;
    logic [2:0] m;    // block row being filtered, 0..W-1
    logic [2:0] k;    // block column / sub-step
    logic [1:0] ln;   // word within the 4-cycle step
  } st_t;

  // Per-cycle control decoded from the schedule position.
  typedef enum logic [2:0] {TS_ZERO, TS_IN, TS_FP, TS_SR, TS_RAM} tsrc_e;
  typedef struct packed {
    logic       in_req;
    logic [2:0] in_by, in_bx;
    logic       sr_shift;
    logic       sr_from_in;   // 1: shift register takes the input word
    logic       t_shift;
    tsrc_e      t_src;
    logic       is_v;         // filter fed by SRAM/transpose register
    logic       use_filter;
    logic       ram_re;
    logic [3:0] ram_raddr;
    logic       ram_we;
    logic       ram_w_from_t; // 1: transpose output, 0: filter q output
    logic [3:0] ram_waddr;
    logic       out_v;
    logic       out_from_t;   // 1: transpose output, 0: filter p output
    logic [2:0] out_by, out_bx;
    logic       t_active;     // this 4-cycle step uses the transpose register
  } ctl_t;

  function automatic logic [2:0] width_of(comp_e c);
    return (c == COMP_Y) ? 3'd4 : 3'd2;
  endfunction

  // Next schedule position.
  function automatic st_t advance(st_t s, logic go);
    st_t n;
    logic [2:0] w;
    n = s;
    w = width_of(s.comp);
    if (s.ph == PH_IDLE) begin
      if (go) begin
        n.ph = PH_INIT; n.comp = COMP_Y; n.m = '0; n.k = 3'd1; n.ln = '0;
      end
      return n;
    end
    n.ln = s.ln + 2'd1;
    if (s.ln != 2'd3) return n;
    case (s.ph)
      PH_INIT:  if (s.k == w) n.ph = PH_LOADL; else n.k = s.k + 3'd1;
      PH_LOADL: begin n.ph = PH_H; n.k = 3'd1; end
      PH_H:     if (s.k == 3'd1) n.k = 3'd2;
                else begin n.ph = PH_V; n.k = s.k - 3'd1; end
      PH_V: begin
        if (s.k == w) begin
          if (s.m == w - 3'd1) begin n.ph = PH_FIN; n.k = '0; end
          else begin n.ph = PH_H; n.k = 3'd1; n.m = s.m + 3'd1; end
        end else if (s.k == w - 3'd1) n.ph = PH_SHIFT;
        else begin n.ph = PH_H; n.k = s.k + 3'd2; end
      end
      PH_SHIFT: begin n.ph = PH_V; n.k = w; end
      PH_FIN: begin
        if (s.k != w) n.k = s.k + 3'd1;
        else if (s.comp == COMP_CR) n.ph = PH_IDLE;
        else begin
          n.ph = PH_INIT; n.comp = comp_e'(s.comp + 2'd1); n.m = '0; n.k = 3'd1;
        end
      end
      default: n.ph = PH_IDLE;
    endcase
    return n;
  endfunction

  function automatic ctl_t decode(st_t s);
    ctl_t c;
    logic [2:0] w;
    c = '0;
    w = width_of(s.comp);
    case (s.ph)
      PH_INIT: begin  // top blocks in as rows, out as columns into SRAM
        c.in_req = 1'b1; c.in_by = 3'd0; c.in_bx = s.k;
        c.t_shift = 1'b1; c.t_src = TS_IN; c.t_active = 1'b1;
        if (s.k >= 3'd2) begin
          c.ram_we = 1'b1; c.ram_w_from_t = 1'b1;
          c.ram_waddr = {s.k[1:0] - 2'd2, s.ln};
        end
      end
      PH_LOADL: begin // last top block to SRAM, left block into shift register
        c.in_req = 1'b1; c.in_by = s.m + 3'd1; c.in_bx = 3'd0;
        c.sr_shift = 1'b1; c.sr_from_in = 1'b1;
        c.t_shift = 1'b1; c.t_src = TS_ZERO; c.t_active = 1'b1;
        c.ram_we = 1'b1; c.ram_w_from_t = 1'b1;
        c.ram_waddr = {w[1:0] - 2'd1, s.ln};
      end
      PH_H: begin     // row across vertical edge between columns k-1 and k
        c.in_req = 1'b1; c.in_by = s.m + 3'd1; c.in_bx = s.k;
        c.use_filter = 1'b1;
        c.sr_shift = 1'b1; c.sr_from_in = 1'b0;
        if (s.k == 3'd1) begin
          c.out_v = 1'b1; c.out_from_t = 1'b0; c.out_by = s.m + 3'd1; c.out_bx = 3'd0;
        end else begin
          c.t_shift = 1'b1; c.t_src = TS_FP; c.t_active = 1'b1;
          c.out_from_t = 1'b1;
          if (s.k == 3'd2) begin
            c.out_v = (s.m != 3'd0); c.out_by = s.m - 3'd1; c.out_bx = w;
          end else begin
            c.out_v = 1'b1; c.out_by = s.m; c.out_bx = s.k - 3'd2;
          end
        end
      end
      PH_V: begin     // column across the top edge of block (m+1, k)
        c.is_v = 1'b1; c.use_filter = 1'b1;
        c.ram_re = 1'b1; c.ram_raddr = {s.k[1:0] - 2'd1, s.ln};
        c.ram_we = 1'b1; c.ram_w_from_t = 1'b0; c.ram_waddr = {s.k[1:0] - 2'd1, s.ln};
        c.t_shift = 1'b1; c.t_src = TS_FP; c.t_active = 1'b1;
      end
      PH_SHIFT: begin // last block of the row to the transpose register
        c.t_shift = 1'b1; c.t_src = TS_SR; c.t_active = 1'b1;
        c.sr_shift = 1'b1; c.sr_from_in = 1'b1;
        c.out_v = 1'b1; c.out_from_t = 1'b1; c.out_by = s.m; c.out_bx = w - 3'd1;
        if (s.m != w - 3'd1) begin  // overlapped with loading the next left block
          c.in_req = 1'b1; c.in_by = s.m + 3'd2; c.in_bx = 3'd0;
        end
      end
      PH_FIN: begin   // bottom row of blocks from SRAM, back to rows, out
        c.t_shift = 1'b1; c.t_active = 1'b1;
        c.out_v = 1'b1; c.out_from_t = 1'b1;
        if (s.k == 3'd0) begin c.out_by = w - 3'd1; c.out_bx = w; end
        else begin c.out_by = w; c.out_bx = s.k; end
        if (s.k != w) begin
          c.t_src = TS_RAM; c.ram_re = 1'b1; c.ram_raddr = {s.k[1:0], s.ln};
        end else c.t_src = TS_ZERO;
      end
      default: ;
    endcase
    return c;
  endfunction

  st_t   st, st_nx;
  ctl_t  c, c_nx;
  logic  tdir;
  word_t sr_dout, t_dout, t_din, sr_din, ram_rdata;
  word_t f_p_in, f_q_in, f_p_out, f_q_out;
  bs_t   f_bs;
  logic  chroma, mb_edge;
  logic [5:0] qp_cur, qp_nb, idx_a, idx_b;
  logic [6:0] qp_avg;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;

  always_comb begin
    st_nx = advance(st, start);
    c     = decode(st);
    c_nx  = decode(st_nx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= '{ph: PH_IDLE, comp: COMP_Y, m: '0, k: '0, ln: '0};
      tdir <= 1'b0;
    end else begin
      st <= st_nx;
      if (c.t_active && st.ln == 2'd3) tdir <= ~tdir;
    end
  end

  assign busy = (st.ph != PH_IDLE);
  assign done = (st.ph == PH_FIN) && (st.comp == COMP_CR) && (st.k == 3'd2) && (st.ln == 2'd3);

  // ---------------- edge parameters ----------------
  always_comb begin
    chroma = (st.comp != COMP_Y);
    f_bs   = '0;
    mb_edge = 1'b0;
    if (st.ph == PH_H) begin
      mb_edge = (st.k == 3'd1);
      if (!chroma) f_bs = bs_v[st.k[1:0] - 2'd1][st.m[1:0]];
      else         f_bs = bs_v[{st.k[0] - 1'b1, 1'b0}][{st.m[0], st.ln[1]}];
    end else if (st.ph == PH_V) begin
      mb_edge = (st.m == 3'd0);
      if (!chroma) f_bs = bs_h[st.m[1:0]][st.k[1:0] - 2'd1];
      else         f_bs = bs_h[{st.m[0], 1'b0}][{st.k[0] - 1'b1, st.ln[1]}];
    end
    case (st.comp)
      COMP_Y:  begin qp_cur = qp_y[0];  qp_nb = (st.ph == PH_H) ? qp_y[1]  : qp_y[2];  end
      COMP_CB: begin qp_cur = qp_cb[0]; qp_nb = (st.ph == PH_H) ? qp_cb[1] : qp_cb[2]; end
      default: begin qp_cur = qp_cr[0]; qp_nb = (st.ph == PH_H) ? qp_cr[1] : qp_cr[2]; end
    endcase
    if (!mb_edge) qp_nb = qp_cur;
    qp_avg = (7'(qp_cur) + 7'(qp_nb) + 7'd1) >> 1;
    idx_a  = clip_index(qp_avg, offset_a);
    idx_b  = clip_index(qp_avg, offset_b);
  end

  function automatic logic [5:0] clip_index(logic [6:0] q, logic signed [4:0] off);
    logic signed [8:0] v;
    v = $signed({2'b00, q}) + 9'(off);
    if (v < 0) return 6'd0;
    if (v > 51) return 6'd51;
    return v[5:0];
  endfunction

  dbf_threshold_lut u_lut (
    .index_a(idx_a), .index_b(idx_b), .bs(f_bs),
    .alpha(alpha), .beta(beta), .tc0(tc0)
  );

  // ---------------- datapath ----------------
  assign f_p_in = c.is_v ? ram_rdata : sr_dout;
  assign f_q_in = c.is_v ? t_dout    : in_data;

  dbf_edge_filter u_filter (
    .p_in(f_p_in), .q_in(f_q_in), .bs(f_bs), .chroma(chroma),
    .alpha(alpha), .beta(beta), .tc0(tc0),
    .p_out(f_p_out), .q_out(f_q_out), .filtered()
  );

  assign sr_din = c.sr_from_in ? in_data : f_q_out;

  shift_reg4x4 #(.EW(8)) u_sr (
    .clk(clk), .rst_n(rst_n), .shift(c.sr_shift), .din(sr_din), .dout(sr_dout)
  );

  always_comb begin
    case (c.t_src)
      TS_IN:   t_din = in_data;
      TS_FP:   t_din = f_p_out;
      TS_SR:   t_din = sr_dout;
      TS_RAM:  t_din = ram_rdata;
      default: t_din = '0;
    endcase
  end

  transpose_reg4x4 #(.EW(8)) u_tr (
    .clk(clk), .rst_n(rst_n), .shift(c.t_shift), .dir(tdir), .din(t_din), .dout(t_dout)
  );

  sram_1r1w #(.DEPTH(16), .WIDTH(32)) u_ram (
    .clk(clk),
    .re(c_nx.ram_re), .raddr(c_nx.ram_raddr), .rdata(ram_rdata),
    .we(c.ram_we), .waddr(c.ram_waddr), .wdata(c.ram_w_from_t ? t_dout : f_q_out)
  );

  // ---------------- ports ----------------
  assign in_req    = c.in_req;
  assign in_comp   = st.comp;
  assign in_by     = c.in_by;
  assign in_bx     = c.in_bx;
  assign in_row    = st.ln;
  assign out_valid = c.out_v;
  assign out_comp  = st.comp;
  assign out_by    = c.out_by;
  assign out_bx    = c.out_bx;
  assign out_row   = st.ln;
  assign out_data  = c.out_from_t ? t_dout : f_p_out;

endmodule
