// Self-checking testbench of dc_register.
//
// Random entry writes, column writes and both at once (also to the same
// entry, where the column write must win), with both read ports checked
// every cycle against a model array.  Reset must clear all entries.
module tb_dc_register;
  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic elem_we, col_we;
  logic [3:0] elem_idx, elem_sel;
  logic [1:0] col_widx, col_sel;
  logic [W-1:0] elem_din, elem_dout;
  logic [4*W-1:0] col_din, col_dout;

  int checks = 0, failures = 0;
  int model [16];

  dc_register #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL %s", $time, msg);
    end
  endtask

  task automatic check_reads();
    for (int s = 0; s < 16; s++) begin
      elem_sel = 4'(s); #1;
      check(int'(elem_dout) == model[s], $sformatf("entry %0d: %0d expected %0d", s, elem_dout, model[s]));
    end
    for (int c = 0; c < 4; c++) begin
      col_sel = 2'(c); #1;
      for (int k = 0; k < 4; k++)
        check(int'(col_dout[W*k +: W]) == model[4*k + c],
              $sformatf("column %0d element %0d: %0d expected %0d", c, k, col_dout[W*k +: W], model[4*k + c]));
    end
  endtask

  initial begin
    elem_we = 0; col_we = 0; elem_idx = '0; elem_sel = '0; col_widx = '0; col_sel = '0;
    elem_din = '0; col_din = '0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    check_reads();                       // cleared by reset
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      elem_we  = ($urandom_range(0, 2) != 0);
      col_we   = ($urandom_range(0, 2) == 0);
      elem_idx = 4'($urandom_range(0, 15));
      col_widx = 2'($urandom_range(0, 3));
      elem_din = W'($urandom);
      col_din  = {$urandom, $urandom};
      if (t % 50 == 0 && elem_we && col_we) elem_idx = {2'($urandom_range(0, 3)), col_widx};
      @(negedge clk);
      if (elem_we) model[elem_idx] = int'(elem_din);
      if (col_we) for (int k = 0; k < 4; k++) model[4*k + int'(col_widx)] = int'(col_din[W*k +: W]);
      elem_we = 0; col_we = 0;
      check_reads();
    end
    // a reset in mid-run clears everything
    rst_n = 1'b0; #1;
    for (int i = 0; i < 16; i++) model[i] = 0;
    check_reads();
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
