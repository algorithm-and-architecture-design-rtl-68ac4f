// Self-checking testbench of the in-place deblocking filter (dbf_v2).
//
// A small frame of FW x FH macroblocks (luma plus two chroma planes) is
// filled with blocky random content and deblocked macroblock by macroblock
// in raster order by the design, which reads and writes the frame through
// its 32-bit ports.  In parallel a reference model filters a copy of the
// frame in the order the standard prescribes (all vertical edges of a
// macroblock left to right, then all horizontal edges top to bottom).
// The two frames must match pixel for pixel.  Also checked: each
// macroblock takes exactly 312 cycles, every word read is written back
// exactly once, and the strong filter, the normal filter, the chroma
// filter and the "no filtering" decision all occur.
module tb_dbf_v2;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int FW = 3, FH = 3, NFRAMES = 2;
  localparam int LW = 16*FW + 4, LH = 16*FH + 4;   // 4-pixel margin top/left
  localparam int CW = 8*FW + 4,  CH = 8*FH + 4;
  localparam int MB_CYCLES = 312;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // frame stores: [comp][y][x]
  byte unsigned fr  [3][LH][LW];
  byte unsigned rf  [3][LH][LW];
  int           rd_cnt [3][LH][LW/4];
  int           wr_cnt [3][LH][LW/4];

  logic start;
  logic busy, done;
  bs_t bs_v [4][4];
  bs_t bs_h [4][4];
  logic [5:0] qp_y [3], qp_cb [3], qp_cr [3];
  logic signed [4:0] offset_a, offset_b;
  logic in_req, out_valid;
  comp_e in_comp, out_comp;
  logic [2:0] in_by, in_bx, out_by, out_bx;
  logic [1:0] in_row, out_row;
  word_t in_data, out_data;

  dbf_v2 dut (.*);

  int mbx, mby;
  int mbqp [3][FH][FW];
  int n_strong = 0, n_weak = 0, n_normal = 0, n_chroma = 0, n_skip = 0;

  // Filter one line of the reference frame.  (c,y,x) is q0; (dy,dx) steps
  // from p0 toward q0.
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

  function automatic int qp_of(int c, int my, int mx);
    return mbqp[c][my][mx];
  endfunction

  task automatic ref_mb(int my, int mx);
    int n, x0, y0, qc, qn, bs;
    for (int c = 0; c < 3; c++) begin
      n  = (c == 0) ? 16 : 8;
      x0 = 4 + n*mx; y0 = 4 + n*my;
      qc = qp_of(c, my, mx);
      for (int e = 0; e < n/4; e++)
        for (int r = 0; r < n; r++) begin
          bs = (c == 0) ? bs_v[e][r/4] : bs_v[2*e][r/2];
          qn = (e == 0 && mx > 0) ? qp_of(c, my, mx-1) : qc;
          ref_line(c, y0 + r, x0 + 4*e, 0, 1, bs, (qc + qn + 1) >> 1);
        end
      for (int e = 0; e < n/4; e++)
        for (int col = 0; col < n; col++) begin
          bs = (c == 0) ? bs_h[e][col/4] : bs_h[2*e][col/2];
          qn = (e == 0 && my > 0) ? qp_of(c, my-1, mx) : qc;
          ref_line(c, y0 + 4*e, x0 + col, 1, 0, bs, (qc + qn + 1) >> 1);
        end
    end
  endtask

  // ------------- memory model of the external frame store -------------
  function automatic int px_x(int c, int bx); return 4 + ((c == 0) ? 16 : 8)*mbx + 4*(bx-1); endfunction
  function automatic int px_y(int c, int by, int row); return 4 + ((c == 0) ? 16 : 8)*mby + 4*(by-1) + row; endfunction

  always_comb begin
    int x, y;
    in_data = '0;
    if (in_req) begin
      x = px_x(int'(in_comp), int'(in_bx));
      y = px_y(int'(in_comp), int'(in_by), int'(in_row));
      if (x >= 0 && y >= 0 && x + 3 < LW && y < LH)
        for (int k = 0; k < 4; k++) in_data[8*k +: 8] = fr[int'(in_comp)][y][x+k];
    end
  end

  always_ff @(posedge clk) begin
    int x, y;
    if (in_req) begin
      x = px_x(int'(in_comp), int'(in_bx)); y = px_y(int'(in_comp), int'(in_by), int'(in_row));
      rd_cnt[int'(in_comp)][y][x/4] <= rd_cnt[int'(in_comp)][y][x/4] + 1;
    end
    if (out_valid) begin
      x = px_x(int'(out_comp), int'(out_bx)); y = px_y(int'(out_comp), int'(out_by), int'(out_row));
      for (int k = 0; k < 4; k++) fr[int'(out_comp)][y][x+k] <= out_data[8*k +: 8];
      wr_cnt[int'(out_comp)][y][x/4] <= wr_cnt[int'(out_comp)][y][x/4] + 1;
    end
  end

  // ------------- stimulus -------------
  task automatic fill_frame();
    int base;
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
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < FH; y++)
        for (int x = 0; x < FW; x++) mbqp[c][y][x] = $urandom_range(24, 51);
  endtask

  task automatic set_mb_inputs();
    for (int e = 0; e < 4; e++)
      for (int r = 0; r < 4; r++) begin
        bs_v[e][r] = (e == 0) ? ((mbx == 0) ? 3'd0 : 3'($urandom_range(0, 4)))
                              : 3'($urandom_range(0, 3));
        bs_h[e][r] = (e == 0) ? ((mby == 0) ? 3'd0 : 3'($urandom_range(0, 4)))
                              : 3'($urandom_range(0, 3));
      end
    qp_y[0]  = 6'(mbqp[0][mby][mbx]);
    qp_cb[0] = 6'(mbqp[1][mby][mbx]);
    qp_cr[0] = 6'(mbqp[2][mby][mbx]);
    qp_y[1]  = 6'(mbqp[0][mby][(mbx > 0) ? mbx-1 : mbx]);
    qp_cb[1] = 6'(mbqp[1][mby][(mbx > 0) ? mbx-1 : mbx]);
    qp_cr[1] = 6'(mbqp[2][mby][(mbx > 0) ? mbx-1 : mbx]);
    qp_y[2]  = 6'(mbqp[0][(mby > 0) ? mby-1 : mby][mbx]);
    qp_cb[2] = 6'(mbqp[1][(mby > 0) ? mby-1 : mby][mbx]);
    qp_cr[2] = 6'(mbqp[2][(mby > 0) ? mby-1 : mby][mbx]);
  endtask

  initial begin
    int cyc, mism;
    start = 0; offset_a = 0; offset_b = 0;
    foreach (rd_cnt[c, y, x]) begin rd_cnt[c][y][x] = 0; wr_cnt[c][y][x] = 0; end
    mbx = 0; mby = 0;
    set_mb_inputs();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      offset_a = (f == 0) ? 5'sd0 : 5'sd6;
      offset_b = (f == 0) ? 5'sd0 : -5'sd2;
      fill_frame();
      foreach (rd_cnt[c, y, x]) begin rd_cnt[c][y][x] = 0; wr_cnt[c][y][x] = 0; end
      for (int my = 0; my < FH; my++)
        for (int mx = 0; mx < FW; mx++) begin
          mby = my; mbx = mx;
          set_mb_inputs();
          ref_mb(my, mx);
          @(negedge clk); start = 1;
          @(negedge clk); start = 0;
          cyc = 1;
          while (!done) begin @(negedge clk); cyc++; end
          checks++;
          if (cyc != MB_CYCLES) begin
            failures++;
            $display("MB (%0d,%0d): %0d cycles, expected %0d", my, mx, cyc, MB_CYCLES);
          end
          @(negedge clk);
          checks++;
          if (busy) begin failures++; $display("still busy after done"); end
        end
      // compare frames
      mism = 0;
      for (int c = 0; c < 3; c++)
        for (int y = 0; y < ((c == 0) ? LH : CH); y++)
          for (int x = 0; x < ((c == 0) ? LW : CW); x++) begin
            checks++;
            if (fr[c][y][x] != rf[c][y][x]) begin
              failures++;
              if (mism++ < 10) $display("frame %0d comp %0d (%0d,%0d): got %0d expected %0d",
                                         f, c, y, x, fr[c][y][x], rf[c][y][x]);
            end
          end
      // every word read was written back once
      for (int c = 0; c < 3; c++)
        for (int y = 0; y < ((c == 0) ? LH : CH); y++)
          for (int x = 0; x < ((c == 0) ? LW : CW) / 4; x++) begin
            checks++;
            if (rd_cnt[c][y][x] != wr_cnt[c][y][x]) begin
              failures++;
              $display("word c%0d y%0d x%0d read %0d written %0d", c, y, 4*x, rd_cnt[c][y][x], wr_cnt[c][y][x]);
            end
          end
    end
    $display("mechanisms: strong=%0d bs4_3tap=%0d normal=%0d chroma=%0d no_filter=%0d",
             n_strong, n_weak, n_normal, n_chroma, n_skip);
    checks += 4;
    if (n_strong == 0) failures++;
    if (n_weak == 0) failures++;
    if (n_normal == 0) failures++;
    if (n_chroma == 0) failures++;
    checks++;
    if (n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 * FW * FH * NFRAMES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
