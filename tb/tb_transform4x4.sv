// Testbench of the 4x4 transform unit: a forward and an inverse instance
// each get a stream of random blocks (random DCT/Hadamard choice, random
// gaps between blocks) and their outputs are compared with the matrix
// definitions.  It also checks the timing: first output word one cycle
// after the last input word, and a back-to-back stream at one block per
// four cycles.
module tb_transform4x4;
  import intra_ref_pkg::*;

  localparam int IW = 16, OW = 20, NBLK = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic had [2], in_valid [2], in_ready [2], out_valid [2];
  logic [4*IW-1:0] in_data [2];
  logic [1:0] out_line [2];
  logic [4*OW-1:0] out_data [2];

  transform4x4 #(.INVERSE(1'b0), .IW(IW), .OW(OW)) u_fwd (
    .clk, .rst_n, .hadamard(had[0]), .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_data(in_data[0]), .out_valid(out_valid[0]), .out_line(out_line[0]), .out_data(out_data[0]));
  transform4x4 #(.INVERSE(1'b1), .IW(IW), .OW(OW)) u_inv (
    .clk, .rst_n, .hadamard(had[1]), .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_data(in_data[1]), .out_valid(out_valid[1]), .out_line(out_line[1]), .out_data(out_data[1]));

  int checks = 0, failures = 0;
  int   exp_q [2][$];   // 16 values per block, row-major
  int   last_in_cyc [2][$];
  int   cyc = 0;
  int   nout [2] = '{0, 0};

  always @(posedge clk) cyc++;

  task automatic check(bit c, bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("[%0t] unit %0d: %s", $time, c, msg);
    end
  endtask

  // output checkers
  for (genvar u = 0; u < 2; u++) begin : g_chk
    blk_t cur;
    int   first_cyc;
    always @(posedge clk) if (rst_n && out_valid[u]) begin
      if (out_line[u] == 2'd0) begin
        for (int i = 0; i < 16; i++) cur[i/4][i%4] = exp_q[u].pop_front();
        first_cyc = last_in_cyc[u].pop_front();
        check(u, cyc - first_cyc == 1, $sformatf("first output %0d cycles after last input", cyc - first_cyc));
      end
      for (int i = 0; i < 4; i++)
        check(u, int'($signed(out_data[u][OW*i +: OW])) == cur[i][out_line[u]],
              $sformatf("word %0d elem %0d: %0d expected %0d", out_line[u], i,
                        int'($signed(out_data[u][OW*i +: OW])), cur[i][out_line[u]]));
      if (out_line[u] == 2'd3) nout[u]++;
    end
  end

  task automatic send(int u, bit h, blk_t x, bit burst_gap);
    blk_t y;
    if (u == 0) y = fwd_dct(x, h); else y = inv_dct(x, h);
    if (!burst_gap) repeat ($urandom_range(0, 3)) @(negedge clk);
    while (!in_ready[u]) @(negedge clk);
    for (int i = 0; i < 16; i++) exp_q[u].push_back(y[i/4][i%4]);
    for (int r = 0; r < 4; r++) begin
      in_valid[u] = 1; had[u] = h;
      for (int k = 0; k < 4; k++) in_data[u][IW*k +: IW] = IW'(x[r][k]);
      if (r == 3) last_in_cyc[u].push_back(cyc + 1);
      @(negedge clk);
      if (r == 0) check(u, in_ready[u], "in_ready dropped inside a block");
    end
    in_valid[u] = 0;
  endtask

  initial begin
    blk_t x;
    int t0;
    for (int u = 0; u < 2; u++) begin in_valid[u] = 0; had[u] = 0; in_data[u] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int u = 0; u < 2; u++) begin
      // random stream with gaps
      for (int b = 0; b < NBLK; b++) begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            x[i][j] = (u == 0) ? $urandom_range(0, 510) - 255 : $urandom_range(0, 8000) - 4000;
        send(u, $urandom_range(0, 3) == 0, x, 1'b0);
      end
      // back-to-back stream: 32 blocks must be accepted in 128 cycles
      t0 = cyc;
      for (int b = 0; b < 32; b++) begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            x[i][j] = (u == 0) ? $urandom_range(0, 510) - 255 : $urandom_range(0, 8000) - 4000;
        send(u, 1'b0, x, 1'b1);
      end
      check(u, cyc - t0 == 128, $sformatf("32 back-to-back blocks took %0d cycles", cyc - t0));
      repeat (8) @(negedge clk);
      check(u, nout[u] == NBLK + 32, $sformatf("%0d blocks out", nout[u]));
      check(u, exp_q[u].size() == 0, "blocks left over");
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
