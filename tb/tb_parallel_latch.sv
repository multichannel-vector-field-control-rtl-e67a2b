// tb_parallel_latch: drives random offset-binary words and checks that the
// latch registers them as two's complement only on the sample enable.
module tb_parallel_latch;
  logic clk = 0, rst = 1, ce = 0;
  logic [13:0] din = 0;
  logic signed [13:0] dout;
  int checks = 0, failures = 0;

  parallel_latch dut (.clk, .rst, .ce, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [13:0] exp_v;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    exp_v = 0;
    for (int n = 0; n < 300; n++) begin
      ce  <= ($urandom % 2) == 0;
      din <= 14'($urandom);
      @(posedge clk); #1;
      if (ce) exp_v = $signed(din) - $signed(14'sh2000) ;  // offset binary: code - 8192
      checks++;
      if (dout !== exp_v) begin failures++; $display("n=%0d got %0d exp %0d", n, dout, exp_v); end
    end
    // extremes
    ce <= 1; din <= 14'h0000; @(posedge clk); #1; checks++; if (dout != -14'sd8192) failures++;
    din <= 14'h3FFF; @(posedge clk); #1; checks++; if (dout != 14'sd8191) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
