// End-to-end testbench of h264_top at its default parameters.
//
// Deblocking: a 3x2-macroblock frame (luma and chroma) with random coding
// information per 4x4 block (intra / coded / motion vector / reference)
// is deblocked macroblock by macroblock through the top's memory ports.
// The testbench derives the boundary strengths itself from the standard's
// rules and filters a copy of the frame in the standard's order; the
// frames must match.  Each macroblock must take 312 cycles.
//
// Intra coding: a macroblock with blocky, striped content is written to
// the source buffer.  For several 4x4 blocks the three-step selector
// drives the datapath: every mode it requests is run through predictor,
// residual, forward transform and cost unit, and the resulting cost goes
// back to the selector.  All nine modes are also run in a full search,
// and the three Intra16x16 modes over the sixteen blocks.  Costs and best
// modes are compared with the reference equations.  A coding pass then
// quantises the chosen block into the coefficient buffer and the
// reconstructed residual is compared with the reference; a DC block goes
// through the Hadamard path (direct input, DC quantisation, DC part of
// the buffer).  After a swap the entropy-coder side reads the levels and
// passes one block through the CAVLC scanning phase.
//
// Each mechanism is counted and must occur at least once: every bS value,
// strong / 3-tap / normal / chroma filtering and no filtering, DCT and
// Hadamard passes, a best-mode replacement, both selector branches and
// both step-3 diagonals, a ping-pong swap, non-zero levels, scanned levels.
module tb_h264_top;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  localparam int MVW = 14, SW = 24;
  localparam int FW = 3, FH = 2;
  localparam int LW = 16*FW + 4, LH = 16*FH + 4;
  localparam int CWD = 8*FW + 4,  CHT = 8*FH + 4;
  localparam int MB_CYCLES = 312;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- DUT ports ----------------
  logic dbf_start, dbf_busy, dbf_done, filter_left, filter_top;
  logic cur_intra, left_intra, top_intra;
  logic [15:0] cur_coded;
  logic [3:0] left_coded, top_coded;
  logic signed [MVW-1:0] cur_mvx [16], cur_mvy [16], left_mvx [4], left_mvy [4], top_mvx [4], top_mvy [4];
  logic [3:0] cur_ref [16], left_ref [4], top_ref [4];
  logic [5:0] qp_y [3], qp_cb [3], qp_cr [3];
  logic signed [4:0] offset_a, offset_b;
  logic dbf_in_req, dbf_out_valid;
  comp_e dbf_in_comp, dbf_out_comp;
  logic [2:0] dbf_in_by, dbf_in_bx, dbf_out_by, dbf_out_bx;
  logic [1:0] dbf_in_row, dbf_out_row;
  word_t dbf_in_data, dbf_out_data;

  logic src_we, src_re;
  logic [6:0] src_waddr, src_raddr;
  logic [31:0] src_wdata;
  logic res_valid, res_ready;
  pred_cls_e pred_cls;
  logic [3:0] pred_mode;
  logic [1:0] pred_line, pred_blk_x, pred_blk_y;
  logic top_avail, left_avail, pred_mode_ok;
  logic [7:0] nb_top [8], nb_left [4], nb_m, mb_top [16], mb_left [16];
  logic hadamard, fwd_direct, inv_hadamard;
  logic fwd_dc_cap, fwd_dc_sel, inv_dc_load, inv_dc_sub;
  logic recon_valid, bnd_valid;
  logic [1:0] recon_line;
  logic [31:0] recon_pix, bnd_right, bnd_bottom;
  logic [63:0] fwd_data;
  logic md_clear;
  logic [4:0] md_blocks;
  logic [SW-1:0] md_mode_cost, md_result_cost, md_best_cost;
  logic md_result_valid;
  logic [3:0] md_best_mode;
  logic [5:0] qp;
  logic q_dc, coef_we, coef_dc, coef_swap, ec_re, ec_dc;
  logic [6:0] coef_waddr, ec_raddr;
  logic [63:0] ec_rdata;
  logic ec_scan, scan_ready, scan_blk_valid, scan_valid, scan_last;
  logic [4:0] scan_total_coeff;
  logic [1:0] scan_trailing_ones;
  logic [3:0] scan_total_zeros, scan_run_before, scan_zeros_left;
  logic [15:0] scan_level;
  logic rec_valid;
  logic [1:0] rec_line;
  logic [79:0] rec_data;
  logic sel_start, sel_req_valid, sel_cost_valid, sel_done;
  logic [3:0] sel_req_mode, sel_best_mode;
  logic [SW-1:0] sel_cost, sel_best_cost;

  h264_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("[%0t] %s", $time, msg);
    end
  endtask

  // ======================= deblocking part =======================
  byte unsigned fr [3][LH][LW];
  byte unsigned rf [3][LH][LW];
  int mbx, mby;
  int mbqp [3][FH][FW];
  // coding information per 4x4 block of the frame
  bit blk_intra [4*FH][4*FW];
  bit blk_coded [4*FH][4*FW];
  int blk_mvx [4*FH][4*FW], blk_mvy [4*FH][4*FW], blk_ref [4*FH][4*FW];
  int ref_bs_v [4][4], ref_bs_h [4][4];
  int n_bs [5] = '{0, 0, 0, 0, 0};
  int n_strong = 0, n_weak = 0, n_normal = 0, n_chroma = 0, n_skip = 0;

  function automatic int iabs_i(int v); return v < 0 ? -v : v; endfunction

  function automatic int std_bs(int py, int px, int qy, int qx, bit mb_edge);
    if (blk_intra[py][px] || blk_intra[qy][qx]) return mb_edge ? 4 : 3;
    if (blk_coded[py][px] || blk_coded[qy][qx]) return 2;
    if (blk_ref[py][px] != blk_ref[qy][qx] || iabs_i(blk_mvx[py][px] - blk_mvx[qy][qx]) >= 4 ||
        iabs_i(blk_mvy[py][px] - blk_mvy[qy][qx]) >= 4) return 1;
    return 0;
  endfunction

  task automatic ref_line(int c, int y, int x, int dy, int dx, int bs, int qpav);
    int p[4], q[4], ia, ib;
    ref_kind_e kind;
    for (int i = 0; i < 4; i++) begin
      p[i] = rf[c][y - (i+1)*dy][x - (i+1)*dx];
      q[i] = rf[c][y + i*dy][x + i*dx];
    end
    ia = clampi(0, 51, qpav + int'(offset_a));
    ib = clampi(0, 51, qpav + int'(offset_b));
    kind = filter_line(p, q, bs, c != 0, ia, ib);
    case (kind)
      RK_NONE:     n_skip++;
      RK_STRONG:   n_strong++;
      RK_BS4_3TAP: n_weak++;
      default:     n_normal++;
    endcase
    if (kind != RK_NONE && c != 0) n_chroma++;
    for (int i = 0; i < 3; i++) begin
      rf[c][y - (i+1)*dy][x - (i+1)*dx] = byte'(p[i]);
      rf[c][y + i*dy][x + i*dx] = byte'(q[i]);
    end
  endtask

  task automatic ref_mb(int my, int mx);
    int n, x0, y0, qc, qn, bs;
    for (int e = 0; e < 4; e++)
      for (int r = 0; r < 4; r++) begin
        ref_bs_v[e][r] = (e == 0 && mx == 0) ? 0 : std_bs(4*my + r, 4*mx + e - 1, 4*my + r, 4*mx + e, e == 0);
        ref_bs_h[e][r] = (e == 0 && my == 0) ? 0 : std_bs(4*my + e - 1, 4*mx + r, 4*my + e, 4*mx + r, e == 0);
        n_bs[ref_bs_v[e][r]]++;
        n_bs[ref_bs_h[e][r]]++;
      end
    for (int c = 0; c < 3; c++) begin
      n  = (c == 0) ? 16 : 8;
      x0 = 4 + n*mx; y0 = 4 + n*my;
      qc = mbqp[c][my][mx];
      for (int e = 0; e < n/4; e++)
        for (int r = 0; r < n; r++) begin
          bs = (c == 0) ? ref_bs_v[e][r/4] : ref_bs_v[2*e][r/2];
          qn = (e == 0 && mx > 0) ? mbqp[c][my][mx-1] : qc;
          ref_line(c, y0 + r, x0 + 4*e, 0, 1, bs, (qc + qn + 1) >> 1);
        end
      for (int e = 0; e < n/4; e++)
        for (int col = 0; col < n; col++) begin
          bs = (c == 0) ? ref_bs_h[e][col/4] : ref_bs_h[2*e][col/2];
          qn = (e == 0 && my > 0) ? mbqp[c][my-1][mx] : qc;
          ref_line(c, y0 + 4*e, x0 + col, 1, 0, bs, (qc + qn + 1) >> 1);
        end
    end
  endtask

  function automatic int px_x(int c, int bx); return 4 + ((c == 0) ? 16 : 8)*mbx + 4*(bx-1); endfunction
  function automatic int px_y(int c, int by, int row); return 4 + ((c == 0) ? 16 : 8)*mby + 4*(by-1) + row; endfunction

  always_comb begin
    int x, y;
    dbf_in_data = '0;
    if (dbf_in_req) begin
      x = px_x(int'(dbf_in_comp), int'(dbf_in_bx));
      y = px_y(int'(dbf_in_comp), int'(dbf_in_by), int'(dbf_in_row));
      if (x >= 0 && y >= 0 && x + 3 < LW && y < LH)
        for (int k = 0; k < 4; k++) dbf_in_data[8*k +: 8] = fr[int'(dbf_in_comp)][y][x+k];
    end
  end

  always_ff @(posedge clk) begin
    int x, y;
    if (dbf_out_valid) begin
      x = px_x(int'(dbf_out_comp), int'(dbf_out_bx)); y = px_y(int'(dbf_out_comp), int'(dbf_out_by), int'(dbf_out_row));
      for (int k = 0; k < 4; k++) fr[int'(dbf_out_comp)][y][x+k] <= dbf_out_data[8*k +: 8];
    end
  end

  task automatic set_dbf_inputs();
    int by0, bx0;
    by0 = 4*mby; bx0 = 4*mbx;
    filter_left = (mbx > 0); filter_top = (mby > 0);
    cur_intra = blk_intra[by0][bx0];
    left_intra = (mbx > 0) ? blk_intra[by0][bx0-1] : 1'b0;
    top_intra = (mby > 0) ? blk_intra[by0-1][bx0] : 1'b0;
    for (int i = 0; i < 16; i++) begin
      cur_coded[i] = blk_coded[by0 + i/4][bx0 + i%4];
      cur_mvx[i] = MVW'(blk_mvx[by0 + i/4][bx0 + i%4]);
      cur_mvy[i] = MVW'(blk_mvy[by0 + i/4][bx0 + i%4]);
      cur_ref[i] = 4'(blk_ref[by0 + i/4][bx0 + i%4]);
    end
    for (int i = 0; i < 4; i++) begin
      left_coded[i] = (mbx > 0) ? blk_coded[by0 + i][bx0 - 1] : 1'b0;
      left_mvx[i]   = (mbx > 0) ? MVW'(blk_mvx[by0 + i][bx0 - 1]) : '0;
      left_mvy[i]   = (mbx > 0) ? MVW'(blk_mvy[by0 + i][bx0 - 1]) : '0;
      left_ref[i]   = (mbx > 0) ? 4'(blk_ref[by0 + i][bx0 - 1]) : '0;
      top_coded[i]  = (mby > 0) ? blk_coded[by0 - 1][bx0 + i] : 1'b0;
      top_mvx[i]    = (mby > 0) ? MVW'(blk_mvx[by0 - 1][bx0 + i]) : '0;
      top_mvy[i]    = (mby > 0) ? MVW'(blk_mvy[by0 - 1][bx0 + i]) : '0;
      top_ref[i]    = (mby > 0) ? 4'(blk_ref[by0 - 1][bx0 + i]) : '0;
    end
    for (int c = 0; c < 3; c++) begin
      logic [5:0] q3 [3];
      q3[0] = 6'(mbqp[c][mby][mbx]);
      q3[1] = 6'(mbqp[c][mby][(mbx > 0) ? mbx-1 : mbx]);
      q3[2] = 6'(mbqp[c][(mby > 0) ? mby-1 : mby][mbx]);
      if (c == 0) qp_y = q3; else if (c == 1) qp_cb = q3; else qp_cr = q3;
    end
  endtask

  task automatic run_deblocking();
    int base, n, mism;
    bit mbintra;
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < LH; y += 4)
        for (int x = 0; x < LW; x += 4) begin
          base = 40 + $urandom_range(0, 170);
          for (int yy = y; yy < y + 4; yy++)
            for (int xx = x; xx < x + 4; xx++) begin
              fr[c][yy][xx] = byte'(base + $urandom_range(0, 6) - 3);
              rf[c][yy][xx] = fr[c][yy][xx];
            end
        end
    for (int my = 0; my < FH; my++)
      for (int mx = 0; mx < FW; mx++) begin
        mbintra = ((my * FW + mx) % 3 == 1);
        for (int c = 0; c < 3; c++) mbqp[c][my][mx] = $urandom_range(26, 51);
        for (int by = 0; by < 4; by++)
          for (int bx = 0; bx < 4; bx++) begin
            blk_intra[4*my + by][4*mx + bx] = mbintra;
            blk_coded[4*my + by][4*mx + bx] = ($urandom_range(0, 3) == 0);
            blk_mvx[4*my + by][4*mx + bx] = $urandom_range(0, 12) - 6;
            blk_mvy[4*my + by][4*mx + bx] = ($urandom_range(0, 1)) ? 0 : $urandom_range(0, 12) - 6;
            blk_ref[4*my + by][4*mx + bx] = ($urandom_range(0, 4) == 0) ? 1 : 0;
          end
      end
    offset_a = 5'sd2; offset_b = 5'sd0;
    for (int my = 0; my < FH; my++)
      for (int mx = 0; mx < FW; mx++) begin
        mby = my; mbx = mx;
        set_dbf_inputs();
        ref_mb(my, mx);
        @(negedge clk); dbf_start = 1;
        @(negedge clk); dbf_start = 0;
        n = 1;
        while (!dbf_done) begin @(negedge clk); n++; end
        check(n == MB_CYCLES, $sformatf("MB (%0d,%0d): %0d cycles, expected %0d", my, mx, n, MB_CYCLES));
        @(negedge clk);
      end
    mism = 0;
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < ((c == 0) ? LH : CHT); y++)
        for (int x = 0; x < ((c == 0) ? LW : CWD); x++) begin
          checks++;
          if (fr[c][y][x] != rf[c][y][x]) begin
            failures++;
            if (mism++ < 10) $display("deblocking comp %0d (%0d,%0d): got %0d expected %0d",
                                      c, y, x, fr[c][y][x], rf[c][y][x]);
          end
        end
  endtask

  // ======================= intra part =======================
  int src [16][16];             // luma source macroblock
  int ntop [17], nleft [16], ncorner;   // neighbour pixels (ntop: 16 + extension)
  int n_dct = 0, n_had = 0, n_replace = 0, n_vert = 0, n_horz = 0, n_d3 = 0, n_d4 = 0;
  int n_swap = 0, n_nzlevel = 0, n_rec = 0, n_scan = 0, n_dcreg = 0, n_bnd = 0;
  int recon_q [$];              // reconstructed pixel words, 4 pixels each
  int bnd_r [4], bnd_b [4];
  always @(posedge clk) if (rst_n) begin
    if (recon_valid)
      for (int k = 0; k < 4; k++) recon_q.push_back(int'(recon_pix[8*k +: 8]));
    if (bnd_valid) begin
      n_bnd++;
      for (int k = 0; k < 4; k++) begin bnd_r[k] = int'(bnd_right[8*k +: 8]); bnd_b[k] = int'(bnd_bottom[8*k +: 8]); end
    end
  end

  // recorded outputs of the datapath
  int res_cost_q [$];
  int rec_q [$];                // reconstructed residual words, 4 values each
  always @(posedge clk) if (rst_n) begin
    if (md_result_valid) res_cost_q.push_back(int'(md_result_cost));
    if (rec_valid) begin
      for (int k = 0; k < 4; k++) rec_q.push_back(int'($signed(rec_data[20*k +: 20])));
      n_rec++;
    end
  end

  function automatic int saddr(int by, int bx, int col);   // source buffer map
    return (4*by + bx)*4 + col;
  endfunction

  task automatic load_source();
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        // left half: horizontal stripes; right half: vertical stripes
        if (x < 8) src[y][x] = 60 + 10*(y % 4) + 40*(y/8) + $urandom_range(0, 2);
        else       src[y][x] = 70 + 12*(x % 4) + 30*(x/12) + $urandom_range(0, 2);
      end
    for (int i = 0; i < 17; i++) ntop[i] = 80 + $urandom_range(0, 40);
    for (int i = 0; i < 16; i++) nleft[i] = 60 + 10*(i % 4) + $urandom_range(0, 3);
    ncorner = 90;
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++)
        for (int col = 0; col < 4; col++) begin
          @(negedge clk);
          src_we = 1; src_waddr = 7'(saddr(by, bx, col));
          for (int k = 0; k < 4; k++) src_wdata[8*k +: 8] = 8'(src[4*by + k][4*bx + col]);
        end
    @(negedge clk);
    src_we = 0;
    for (int i = 0; i < 16; i++) begin mb_top[i] = 8'(ntop[i]); mb_left[i] = 8'(nleft[i]); end
  endtask

  // Neighbours of the 4x4 block (by,bx), taken from the source itself
  // (stands in for reconstructed pixels) or the macroblock neighbours.
  function automatic int pix(int y, int x);
    if (y < 0 && x < 0) return ncorner;
    if (y < 0) return ntop[x > 16 ? 16 : x];
    if (x < 0) return nleft[y];
    return src[y][x];
  endfunction

  task automatic set_i4_neighbours(int by, int bx, output int t8 [8], output int l4 [4], output int m);
    for (int i = 0; i < 8; i++) begin
      // top-right is available only for blocks of the top row or left column pairs; keep
      // it simple: use the pixel above when inside the frame, else replicate
      t8[i] = (i < 4 || (by == 0 && 4*bx + i < 16)) ? pix(4*by - 1, 4*bx + i) : pix(4*by - 1, 4*bx + 3);
      nb_top[i] = 8'(t8[i]);
    end
    for (int i = 0; i < 4; i++) begin l4[i] = pix(4*by + i, 4*bx - 1); nb_left[i] = 8'(l4[i]); end
    m = pix(4*by - 1, 4*bx - 1); nb_m = 8'(m);
    top_avail = 1; left_avail = 1;
  endtask

  // Send one 4x4 block through the forward path: source read one cycle
  // ahead of the residual word.
  task automatic send_block(pred_cls_e c, int md, int by, int bx, int nblk, int mc, bit had);
    while (!res_ready) @(negedge clk);
    for (int col = 0; col <= 4; col++) begin
      src_re = (col < 4); src_raddr = 7'(saddr(by, bx, col < 4 ? col : 0));
      res_valid = (col > 0); fwd_direct = 0; hadamard = had;
      pred_cls = c; pred_mode = 4'(md); pred_line = 2'(col - 1);
      pred_blk_x = 2'(bx); pred_blk_y = 2'(by);
      md_blocks = 5'(nblk); md_mode_cost = SW'(mc);
      @(negedge clk);
    end
    src_re = 0; res_valid = 0;
    // let the block leave the transform before the next read is issued
    // (the read is one cycle ahead of the ready check)
    repeat (3) @(negedge clk);
    if (had) n_had++; else n_dct++;
  endtask

  function automatic blk_t residual(int by, int bx, int c, int md, int t8 [8], int l4 [4], int m);
    blk_t r;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        if (c == 0) r[y][x] = src[4*by + y][4*bx + x] - i4_pred(md, x, y, t8, l4, m, 1'b1, 1'b1);
        else begin
          int p, s;
          case (md)
            0: p = ntop[4*bx + x];
            1: p = nleft[4*by + y];
            default: begin
              s = 0;
              for (int i = 0; i < 16; i++) s += ntop[i] + nleft[i];
              p = (s + 16) >> 5;
            end
          endcase
          r[y][x] = src[4*by + y][4*bx + x] - p;
        end
    return r;
  endfunction

  function automatic int mode_cost_of(int md); return (md == 2) ? 0 : 8; endfunction

  // Cost one Intra4x4 mode of block (by,bx) through the datapath; returns the cost.
  task automatic cost_i4(int by, int bx, int md, output int cost);
    int t8 [8], l4 [4], m, exp;
    set_i4_neighbours(by, bx, t8, l4, m);
    exp = block_cost(fwd_dct(residual(by, bx, 0, md, t8, l4, m), 1'b0)) + mode_cost_of(md);
    res_cost_q.delete();
    send_block(CLS_I4, md, by, bx, 1, mode_cost_of(md), 1'b0);
    repeat (6) @(negedge clk);
    check(res_cost_q.size() == 1, $sformatf("I4 mode %0d: %0d results", md, res_cost_q.size()));
    cost = res_cost_q.size() > 0 ? res_cost_q[0] : -1;
    check(cost == exp, $sformatf("block (%0d,%0d) I4 mode %0d cost %0d expected %0d", by, bx, md, cost, exp));
  endtask

  task automatic run_intra();
    int costs [9], bm, bc, cost, prev_best, exp_best, s2, t8 [8], l4 [4], m, i16c [3], nbm;
    bit vert;
    blk_t y, lv, dq, rec;
    load_source();

    // --- full search of all nine Intra4x4 modes for some blocks ---
    for (int b = 0; b < 4; b++) begin
      int by, bx;
      by = (b == 0) ? 1 : (b == 1 ? 1 : (b == 2 ? 2 : 3)); bx = (b == 0) ? 1 : (b == 1 ? 2 : (b == 2 ? 0 : 3));
      md_clear = 1; @(negedge clk); md_clear = 0;
      bm = -1; bc = 0;
      for (int md = 0; md < 9; md++) begin
        prev_best = int'(md_best_mode);
        cost_i4(by, bx, md, costs[md]);
        if (bm < 0 || costs[md] < bc) begin
          if (bm >= 0) n_replace++;
          bm = md; bc = costs[md];
        end
        check(int'(md_best_mode) == bm && int'(md_best_cost) == bc,
              $sformatf("best after mode %0d: %0d/%0d expected %0d/%0d", md, md_best_mode, md_best_cost, bm, bc));
      end
      // --- three-step selector on the same block, costs from the datapath ---
      vert = costs[0] <= costs[1];
      s2 = vert ? ((costs[7] < costs[5]) ? 7 : 5) : ((costs[8] < costs[6]) ? 8 : 6);
      exp_best = 0;
      begin
        int seq [6];
        seq = '{0, 1, 2, vert ? 5 : 6, vert ? 7 : 8, (s2 == 5 || s2 == 6) ? 4 : 3};
        for (int i = 1; i < 6; i++) if (costs[seq[i]] < costs[exp_best]) exp_best = seq[i];
        if (seq[5] == 3) n_d3++; else n_d4++;
      end
      if (vert) n_vert++; else n_horz++;
      sel_start = 1; @(negedge clk); sel_start = 0;
      for (int i = 0; i < 6; i++) begin
        while (!sel_req_valid) @(negedge clk);
        nbm = sel_req_mode;
        @(negedge clk);
        cost_i4(by, bx, nbm, cost);
        sel_cost_valid = 1; sel_cost = SW'(cost);
        @(negedge clk);
        sel_cost_valid = 0;
      end
      while (!sel_done) @(negedge clk);
      check(int'(sel_best_mode) == exp_best && int'(sel_best_cost) == costs[exp_best],
            $sformatf("selector chose %0d/%0d expected %0d/%0d", sel_best_mode, sel_best_cost,
                      exp_best, costs[exp_best]));
      @(negedge clk);
    end

    // --- Intra16x16: three modes over sixteen blocks; plane unsupported ---
    md_clear = 1; @(negedge clk); md_clear = 0;
    top_avail = 1; left_avail = 1;
    pred_cls = CLS_I16; pred_mode = 4'd3; #1;
    check(!pred_mode_ok, "Intra16x16 plane mode reported as supported");
    res_cost_q.delete();
    for (int md = 0; md < 3; md++) begin
      i16c[md] = 0;
      for (int by = 0; by < 4; by++)
        for (int bx = 0; bx < 4; bx++) begin
          i16c[md] += block_cost(fwd_dct(residual(by, bx, 1, md, t8, l4, m), 1'b0));
          send_block(CLS_I16, md, by, bx, 16, 16, 1'b0);
        end
      i16c[md] += 16;
    end
    repeat (6) @(negedge clk);
    check(res_cost_q.size() == 3, $sformatf("Intra16x16: %0d results", res_cost_q.size()));
    bm = 0;
    for (int md = 0; md < 3 && md < res_cost_q.size(); md++) begin
      check(res_cost_q[md] == i16c[md], $sformatf("I16 mode %0d cost %0d expected %0d", md, res_cost_q[md], i16c[md]));
      if (i16c[md] < i16c[bm]) bm = md;
    end
    check(int'(md_best_mode) == bm, $sformatf("I16 best %0d expected %0d", md_best_mode, bm));

    // --- coding pass: block (1,1) with its best I4 mode, levels to the buffer ---
    set_i4_neighbours(1, 1, t8, l4, m);
    y = fwd_dct(residual(1, 1, 0, 0, t8, l4, m), 1'b0);
    qp = 6'd20; q_dc = 0; inv_hadamard = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        lv[i][j] = quant(y[i][j], 20, i, j, 1'b0);
        dq[i][j] = intra_ref_pkg::dequant(lv[i][j], 20, i, j, 1'b0);
        if (lv[i][j] != 0) n_nzlevel++;
      end
    rec = inv_dct(dq, 1'b0);
    rec_q.delete();
    recon_q.delete();
    fork
      send_block(CLS_I4, 0, 1, 1, 1, 0, 1'b0);
      begin
        // coefficient buffer write address travels with the transform output
        coef_we = 1; coef_dc = 0;
        for (int t = 0; t < 16; t++) begin
          coef_waddr = 7'(4*5 + int'(dut.ft_line));
          @(negedge clk);
        end
        coef_we = 0;
      end
    join
    repeat (10) @(negedge clk);
    check(rec_q.size() == 16, $sformatf("reconstruction: %0d values", rec_q.size()));
    for (int j = 0; j < 4 && rec_q.size() == 16; j++)
      for (int i = 0; i < 4; i++)
        check(rec_q[4*j + i] == rec[i][j], $sformatf("rec (%0d,%0d) %0d expected %0d", i, j, rec_q[4*j + i], rec[i][j]));
    // reconstructed pixels = clip(pred + (res+32)>>6), and the boundaries
    // the previous block's last pixel word lands one cycle after the queue was cleared
    while (recon_q.size() > 16) void'(recon_q.pop_front());
    check(recon_q.size() == 16, $sformatf("reconstructed pixels: %0d", recon_q.size()));
    for (int j = 0; j < 4 && recon_q.size() == 16; j++)
      for (int i = 0; i < 4; i++) begin
        int pv, ev;
        pv = i4_pred(0, j, i, t8, l4, m, 1'b1, 1'b1);
        ev = pv + ((rec[i][j] + 32) >>> 6);
        ev = ev < 0 ? 0 : (ev > 255 ? 255 : ev);
        check(recon_q[4*j + i] == ev, $sformatf("pixel (%0d,%0d) %0d expected %0d", i, j, recon_q[4*j + i], ev));
        if (j == 3) check(bnd_r[i] == ev, $sformatf("right boundary %0d: %0d expected %0d", i, bnd_r[i], ev));
        if (i == 3) check(bnd_b[j] == ev, $sformatf("bottom boundary %0d: %0d expected %0d", j, bnd_b[j], ev));
      end

    // --- DC block through the Hadamard path into the DC part ---
    begin
      blk_t dcb, hy, hl, hd, hr;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) dcb[i][j] = $urandom_range(0, 800) - 400;
      hy = fwd_dct(dcb, 1'b1);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          hl[i][j] = quant(hy[i][j], 20, i, j, 1'b1);
          hd[i][j] = intra_ref_pkg::dequant(hl[i][j], 20, i, j, 1'b1);
        end
      hr = fwd_dct(hd, 1'b1);
      rec_q.delete();
      q_dc = 1; inv_hadamard = 1;
      while (!res_ready) @(negedge clk);
      fork
        begin
          for (int r = 0; r < 4; r++) begin
            // columns of the DC block, as the residual would come
            res_valid = 1; fwd_direct = 1; hadamard = 1;
            for (int k = 0; k < 4; k++) fwd_data[16*k +: 16] = 16'(dcb[k][r]);
            @(negedge clk);
          end
          res_valid = 0; fwd_direct = 0;
        end
        begin
          coef_we = 1; coef_dc = 1;
          for (int t = 0; t < 12; t++) begin
            coef_waddr = 7'(dut.ft_line);
            @(negedge clk);
          end
          coef_we = 0; coef_dc = 0;
        end
      join
      res_valid = 0; fwd_direct = 0; n_had++;
      repeat (10) @(negedge clk);
      check(rec_q.size() == 16, $sformatf("DC reconstruction: %0d values", rec_q.size()));
      for (int j = 0; j < 4 && rec_q.size() == 16; j++)
        for (int i = 0; i < 4; i++)
          check(rec_q[4*j + i] == hr[i][j], $sformatf("DC rec (%0d,%0d) %0d expected %0d", i, j, rec_q[4*j + i], hr[i][j]));

      // --- swap, entropy-coder side reads the levels ---
      coef_swap = 1; @(negedge clk); coef_swap = 0; n_swap++;
      for (int r = 0; r < 8; r++) begin
        ec_re = 1; ec_dc = (r >= 4); ec_raddr = 7'((r >= 4) ? r - 4 : 4*5 + r);
        @(negedge clk);
        ec_re = 0;
        for (int k = 0; k < 4; k++)
          check(int'($signed(ec_rdata[16*k +: 16])) == ((r >= 4) ? hl[r-4][k] : lv[r][k]),
                $sformatf("buffer word %0d elem %0d: %0d expected %0d", r, k,
                          int'($signed(ec_rdata[16*k +: 16])), (r >= 4) ? hl[r-4][k] : lv[r][k]));
      end
      // --- the stored AC block goes through the CAVLC scanning phase ---
      begin
        const int zr [16] = '{0, 0, 1, 2, 1, 0, 0, 1, 2, 3, 3, 2, 1, 2, 3, 3};
        const int zc [16] = '{0, 1, 0, 0, 1, 2, 3, 2, 1, 0, 1, 2, 3, 3, 2, 3};
        int tc, nseen, lvl_exp [$];
        tc = 0;
        for (int i = 15; i >= 0; i--) if (lv[zr[i]][zc[i]] != 0) begin tc++; lvl_exp.push_back(lv[zr[i]][zc[i]]); end
        for (int r = 0; r < 4; r++) begin
          ec_re = 1; ec_scan = 1; ec_dc = 0; ec_raddr = 7'(4*5 + r);
          @(negedge clk);
        end
        ec_re = 0; ec_scan = 0;
        @(negedge clk);
        check(scan_blk_valid && int'(scan_total_coeff) == tc,
              $sformatf("scanner: blk_valid %0d total_coeff %0d expected %0d", scan_blk_valid, scan_total_coeff, tc));
        nseen = 0;
        while (scan_valid) begin
          check(nseen < lvl_exp.size() && int'($signed(scan_level)) == lvl_exp[nseen],
                $sformatf("scanned level %0d: %0d", nseen, $signed(scan_level)));
          nseen++; n_scan++;
          @(negedge clk);
        end
        check(nseen == tc, $sformatf("scanner gave %0d levels, expected %0d", nseen, tc));
      end
      q_dc = 0; inv_hadamard = 0;
    end
  endtask


  // Intra16x16 through the DC registers.  Pass 1: sixteen residual blocks
  // (raster order) through the DCT, their DCs kept in the forward DC
  // register.  Pass 2: the DC block is read from that register through the
  // Hadamard / DC quantiser / inverse Hadamard and lands, scaled, in the
  // inverse DC register.  Pass 3: the sixteen blocks again, the inverse
  // DCT taking each block's DC from the inverse DC register.
  task automatic send_direct(blk_t b, bit had, bit from_dcreg);
    while (!res_ready) @(negedge clk);
    for (int r = 0; r < 4; r++) begin
      res_valid = 1; fwd_direct = 1; fwd_dc_sel = from_dcreg; hadamard = had;
      for (int k = 0; k < 4; k++) fwd_data[16*k +: 16] = 16'(b[k][r]);
      @(negedge clk);
    end
    res_valid = 0; fwd_direct = 0; fwd_dc_sel = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic run_i16_dc();
    blk_t rb [16];
    blk_t dcb, hy, hl, hd, hr, y, dq, rec;
    const int iqp = 24;
    qp = 6'(iqp); q_dc = 0; inv_hadamard = 0;
    for (int b = 0; b < 16; b++)
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) rb[b][i][j] = $urandom_range(0, 120) - 60;
    // pass 1
    md_clear = 1; md_blocks = 5'd16; @(negedge clk); md_clear = 0;
    fwd_dc_cap = 1;
    for (int b = 0; b < 16; b++) begin
      send_direct(rb[b], 1'b0, 1'b0);
      y = fwd_dct(rb[b], 1'b0);
      dcb[b / 4][b % 4] = y[0][0];
    end
    repeat (12) @(negedge clk);
    fwd_dc_cap = 0;
    // pass 2
    hy = fwd_dct(dcb, 1'b1);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        hl[i][j] = quant(hy[i][j], iqp, i, j, 1'b1);
        hd[i][j] = intra_ref_pkg::dequant(hl[i][j], iqp, i, j, 1'b1);
      end
    hr = fwd_dct(hd, 1'b1);
    md_clear = 1; md_blocks = 5'd1; @(negedge clk); md_clear = 0;
    rec_q.delete();
    q_dc = 1; inv_hadamard = 1; inv_dc_load = 1;
    send_direct(dcb, 1'b1, 1'b1);
    repeat (10) @(negedge clk);
    inv_dc_load = 0; q_dc = 0; inv_hadamard = 0;
    check(rec_q.size() == 16, $sformatf("I16 DC pass: %0d values", rec_q.size()));
    for (int j = 0; j < 4 && rec_q.size() == 16; j++)
      for (int i = 0; i < 4; i++)
        check(rec_q[4*j + i] == hr[i][j], $sformatf("I16 DC (%0d,%0d) %0d expected %0d", i, j, rec_q[4*j + i], hr[i][j]));
    // pass 3
    md_clear = 1; md_blocks = 5'd16; @(negedge clk); md_clear = 0;
    inv_dc_sub = 1;
    for (int b = 0; b < 16; b++) begin
      rec_q.delete();
      send_direct(rb[b], 1'b0, 1'b0);
      repeat (10) @(negedge clk);
      y = fwd_dct(rb[b], 1'b0);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          dq[i][j] = intra_ref_pkg::dequant(quant(y[i][j], iqp, i, j, 1'b0), iqp, i, j, 1'b0);
      dq[0][0] = (hr[b / 4][b % 4] + 2) >>> 2;
      rec = inv_dct(dq, 1'b0);
      check(rec_q.size() == 16, $sformatf("I16 block %0d: %0d values", b, rec_q.size()));
      for (int j = 0; j < 4 && rec_q.size() == 16; j++)
        for (int i = 0; i < 4; i++)
          check(rec_q[4*j + i] == rec[i][j],
                $sformatf("I16 block %0d rec (%0d,%0d) %0d expected %0d", b, i, j, rec_q[4*j + i], rec[i][j]));
      if (rec_q.size() == 16 && rec_q[0] == rec[0][0]) n_dcreg++;
    end
    inv_dc_sub = 0; md_blocks = 5'd1;
  endtask

  // ======================= main =======================
  initial begin
    dbf_start = 0; filter_left = 0; filter_top = 0; cur_intra = 0; left_intra = 0; top_intra = 0;
    cur_coded = '0; left_coded = '0; top_coded = '0; offset_a = 0; offset_b = 0;
    for (int i = 0; i < 16; i++) begin cur_mvx[i] = '0; cur_mvy[i] = '0; cur_ref[i] = '0; end
    for (int i = 0; i < 4; i++) begin
      left_mvx[i] = '0; left_mvy[i] = '0; top_mvx[i] = '0; top_mvy[i] = '0; left_ref[i] = '0; top_ref[i] = '0;
    end
    for (int i = 0; i < 3; i++) begin qp_y[i] = '0; qp_cb[i] = '0; qp_cr[i] = '0; end
    src_we = 0; src_re = 0; src_waddr = '0; src_raddr = '0; src_wdata = '0;
    res_valid = 0; pred_cls = CLS_I4; pred_mode = '0; pred_line = '0; pred_blk_x = '0; pred_blk_y = '0;
    top_avail = 0; left_avail = 0; nb_m = '0;
    for (int i = 0; i < 8; i++) nb_top[i] = '0;
    for (int i = 0; i < 4; i++) nb_left[i] = '0;
    for (int i = 0; i < 16; i++) begin mb_top[i] = '0; mb_left[i] = '0; end
    hadamard = 0; fwd_direct = 0; fwd_data = '0; inv_hadamard = 0;
    fwd_dc_cap = 0; fwd_dc_sel = 0; inv_dc_load = 0; inv_dc_sub = 0;
    md_clear = 0; md_blocks = 5'd1; md_mode_cost = '0; qp = 6'd28; q_dc = 0;
    coef_we = 0; coef_dc = 0; coef_waddr = '0; coef_swap = 0; ec_re = 0; ec_dc = 0; ec_raddr = '0; ec_scan = 0;
    sel_start = 0; sel_cost_valid = 0; sel_cost = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    run_deblocking();
    run_intra();
    run_i16_dc();

    $display("mechanisms: bS0..4=%0d/%0d/%0d/%0d/%0d strong=%0d bs4_3tap=%0d normal=%0d chroma=%0d no_filter=%0d",
             n_bs[0], n_bs[1], n_bs[2], n_bs[3], n_bs[4], n_strong, n_weak, n_normal, n_chroma, n_skip);
    $display("mechanisms: dct=%0d hadamard=%0d best_replaced=%0d sel_vert=%0d sel_horz=%0d diag3=%0d diag4=%0d swap=%0d nz_levels=%0d rec_words=%0d scanned=%0d",
             n_dct, n_had, n_replace, n_vert, n_horz, n_d3, n_d4, n_swap, n_nzlevel, n_rec, n_scan);
    $display("mechanisms: dc_register_blocks=%0d boundary_blocks=%0d", n_dcreg, n_bnd);
    for (int i = 0; i < 5; i++) check(n_bs[i] > 0, $sformatf("bS %0d never occurred", i));
    check(n_strong > 0, "no strong filtering");
    check(n_weak > 0, "no bS4 3-tap filtering");
    check(n_normal > 0, "no normal filtering");
    check(n_chroma > 0, "no chroma filtering");
    check(n_skip > 0, "no unfiltered line");
    check(n_dct > 0 && n_had > 0, "transform kinds");
    check(n_replace > 0, "no best-mode replacement");
    check(n_vert > 0 && n_horz > 0, "selector branches");
    check(n_d3 > 0 && n_d4 > 0, "selector step-3 diagonals");
    check(n_swap > 0, "no buffer swap");
    check(n_nzlevel > 0, "no non-zero level");
    check(n_rec > 0, "no reconstruction");
    check(n_scan > 0, "no level scanned");
    check(n_dcreg == 16, "DC registers not used for a whole macroblock");
    check(n_bnd > 0, "no boundary samples produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
