// Testbench of the ping-pong coefficient buffer at its default size
// (2 x 104 x 64).  Each round the write side fills its bank with one
// macroblock of levels (AC part and DC part, then rewrites some DC words
// and reads them back) while the read side reads the previous macroblock
// from the other bank in random order; then a swap.  All read data are
// compared with a model one cycle after the address.
module tb_coef_pingpong_buf;

  localparam int DEPTH = 104, WIDTH = 64, DC_BASE = 96, AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic swap, wr_en, wr_we, wr_dc, rd_en, rd_dc, wr_bank;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, wr_rdata, rd_data;

  coef_pingpong_buf #(.DEPTH(DEPTH), .WIDTH(WIDTH), .DC_BASE(DC_BASE)) dut (.*);

  int checks = 0, failures = 0, swaps = 0;
  logic [WIDTH-1:0] model [2][DEPTH];
  bit               known [2][DEPTH];   // written since reset (memories start undefined)

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("[%0t] %s", $time, msg);
    end
  endtask

  initial begin
    int wb, ra, wa, exp_rd, exp_wr;
    bit rd_pend, wr_pend;
    logic [WIDTH-1:0] rd_exp, wr_exp;
    swap = 0; wr_en = 0; wr_we = 0; wr_dc = 0; rd_en = 0; rd_dc = 0;
    wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int b = 0; b < 2; b++) for (int a = 0; a < DEPTH; a++) begin model[b][a] = '0; known[b][a] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 40; round++) begin
      wb = wr_bank;
      check(wb == swaps % 2, "wr_bank does not follow the swaps");
      for (int c = 0; c < DEPTH + 24; c++) begin
        // write side: sequential fill, then DC rewrite / read-back
        wr_en = 1;
        if (c < DEPTH) begin
          wr_we = 1; wa = c; wr_dc = (c >= DC_BASE);
          wr_addr = AW'(wr_dc ? c - DC_BASE : c);
        end else begin
          wr_we = $urandom_range(0, 1); wr_dc = 1; wa = DC_BASE + $urandom_range(0, DEPTH - DC_BASE - 1);
          wr_addr = AW'(wa - DC_BASE);
        end
        wr_data = {$urandom, $urandom};
        // read side: random address in the other bank
        rd_en = $urandom_range(0, 3) != 0;
        ra = $urandom_range(0, DEPTH - 1); rd_dc = (ra >= DC_BASE) && $urandom_range(0, 1);
        rd_addr = AW'(rd_dc ? ra - DC_BASE : ra);
        @(negedge clk);
        rd_pend = rd_en && known[1 - wb][ra]; rd_exp = model[1 - wb][ra];
        wr_pend = !wr_we && known[wb][wa]; wr_exp = model[wb][wa];
        if (wr_we) begin model[wb][wa] = wr_data; known[wb][wa] = 1; end
        // read data appear one cycle after the address
        if (rd_pend) check(rd_data == rd_exp, $sformatf("read side: %h expected %h", rd_data, rd_exp));
        if (wr_pend) check(wr_rdata == wr_exp, $sformatf("write side read: %h expected %h", wr_rdata, wr_exp));
      end
      wr_en = 0; rd_en = 0;
      swap = 1;
      @(negedge clk);
      swap = 0; swaps++;
    end
    check(swaps == 40, "swap count");
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
