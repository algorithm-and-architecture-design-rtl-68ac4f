// Testbench of the 4x4 shift register: a random word stream with random
// stall cycles; each word must come out exactly four shifts after it
// went in, and hold while not shifting.
module tb_shift_reg4x4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic shift;
  logic [31:0] din, dout;
  logic [31:0] q [$];
  int checks = 0, failures = 0;

  shift_reg4x4 #(.EW(8)) dut (.*);

  initial begin
    shift = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (dout != '0) failures++;
    for (int i = 0; i < 4; i++) q.push_back('0);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      din = $urandom;
      checks++;
      if (dout != q[0]) begin
        failures++;
        if (failures < 10) $display("dout %h expected %h", dout, q[0]);
      end
      if (shift) begin void'(q.pop_front()); q.push_back(din); end
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
