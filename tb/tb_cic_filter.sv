// tb_cic_filter: compares the filter with a reference boxcar: y after sample
// n is the sum of the M inputs n-M .. n-1 shifted right by SHIFT and
// saturated (two-sample latency). Also checks the step response reaches the
// final value exactly M+1 samples after the step.
module tb_cic_filter;
  localparam int M = 8, SHIFT = 8, IN_W = 23;
  logic clk = 0, rst = 1, ce = 0;
  logic signed [IN_W-1:0] x = 0;
  logic signed [17:0] y;
  int checks = 0, failures = 0;

  cic_filter #(.IN_W(IN_W), .OUT_W(18), .M(M), .SHIFT(SHIFT)) dut (.clk, .rst, .ce, .x, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [$];
  longint s, e;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < M + 1; k++) hist.push_back(0);
    for (int n = 0; n < 600; n++) begin
      // full-scale stretches drive the saturation
      if (n >= 200 && n < 240)      x <= {1'b0, {(IN_W-1){1'b1}}};
      else if (n >= 240 && n < 280) x <= {1'b1, {(IN_W-1){1'b0}}};
      else                          x <= IN_W'($urandom);
      ce <= 1; @(posedge clk); #1; ce <= 0;
      hist.push_back(longint'(x));
      hist.pop_front();
      // y now = sum of inputs of samples n-M .. n-1: hist[0..M-1] (hist[M] is sample n)
      s = 0;
      for (int k = 0; k < M; k++) s += hist[k];
      e = s >>> SHIFT;
      if (e > 131071) e = 131071;
      if (e < -131072) e = -131072;
      checks++; if (longint'(y) != e) begin failures++; $display("n=%0d got %0d exp %0d", n, y, e); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
