// Testbench of the 4x4 transpose register: a continuous stream of random
// blocks, direction alternating per block.  While block n+1 goes in,
// block n must come out transposed (word k = line k of the transpose),
// both when the blocks enter as rows and when they enter as columns.
module tb_transpose_reg4x4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic shift, dir;
  logic [31:0] din, dout;
  int checks = 0, failures = 0;

  transpose_reg4x4 #(.EW(8)) dut (.*);

  logic [7:0] blk [2][4][4];   // [buffer][word][element]

  initial begin
    shift = 0; dir = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) blk[n % 2][i][j] = 8'($urandom);
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        shift = 1; dir = n[0];
        for (int j = 0; j < 4; j++) din[8*j +: 8] = blk[n % 2][w][j];
        #1;
        if (n > 0)
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (dout[8*j +: 8] != blk[(n-1) % 2][j][w]) begin
              failures++;
              if (failures < 10) $display("block %0d word %0d elem %0d: %h expected %h",
                                          n-1, w, j, dout[8*j +: 8], blk[(n-1) % 2][j][w]);
            end
          end
      end
    end
    // hold: without shifting the contents stay (read back in the write direction)
    @(negedge clk); shift = 0;
    @(negedge clk);
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (dout[8*j +: 8] != blk[199 % 2][0][j]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
