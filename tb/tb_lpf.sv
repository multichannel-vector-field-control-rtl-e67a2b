// tb_lpf: compares the filter with a bit-exact reference model of
// y += (x - y) / 2^k for several k, and checks that a step settles to the
// input value (unity DC gain) and that k = 0 is a one-sample delay.
module tb_lpf;
  logic clk = 0, rst = 1, ce = 0;
  logic [3:0] k = 0;
  logic signed [17:0] x = 0, y;
  int checks = 0, failures = 0;

  lpf dut (.clk, .rst, .ce, .k, .x, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint acc;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    acc = 0;
    for (int kk = 0; kk < 8; kk += 2) begin
      k = 4'(kk);
      for (int n = 0; n < 600; n++) begin
        x = (n < 300) ? 18'($urandom) : 18'sd70000;
        ce = 1; @(posedge clk); #1; ce = 0;
        acc = acc + ((longint'(x) * 256 - acc) >>> kk);
        checks++; if (longint'(y) != (acc >>> 8)) begin failures++; $display("k=%0d n=%0d got %0d exp %0d", kk, n, y, acc >>> 8); end
        if (kk == 0) begin
          checks++; if (y != x) begin failures++; $display("k=0 not a delay"); end
        end
        @(posedge clk); #1;
      end
      // settled on the step value (within the 8 fraction bits' truncation)
      if (kk <= 4) checks++;
      if (kk <= 4 && (y < 18'sd69990 || y > 18'sd70000)) begin failures++; $display("k=%0d no settle %0d", kk, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
